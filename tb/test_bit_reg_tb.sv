// test_bit_reg_tb -- checks that the test-bit register takes key[idx] when
// enabled, holds otherwise, and reads 0 for an index beyond the key.
module test_bit_reg_tb;
  import ecc_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, q, model;
  gf_t key;
  logic [IDX_W-1:0] idx;
  int checks = 0, failures = 0;

  test_bit_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) key[i*32 +: 32] = $urandom;
    idx = '0; model = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = ($urandom_range(3, 0) != 0);
      idx = IDX_W'($urandom_range(255, 0));
      if (en) model = (int'(idx) < M) ? key[idx] : 1'b0;
      @(negedge clk);
      en = 0;
      checks++;
      if (q !== model) begin failures++; $display("FAIL idx %0d", idx); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
