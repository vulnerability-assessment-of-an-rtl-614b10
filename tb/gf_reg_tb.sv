// gf_reg_tb -- checks bus write, host load (with priority over the bus
// write) and hold of the 233-bit register.
module gf_reg_tb;
  import ecc_pkg::*;

  logic clk = 0, rst_n = 0, we = 0, ld = 0;
  gf_t din, ld_data, dout, model;
  int checks = 0, failures = 0;

  gf_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gf_t rnd();
    gf_t v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    din = '0; ld_data = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (dout !== '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      we = $urandom_range(1, 0); ld = ($urandom_range(3, 0) == 0);
      din = rnd(); ld_data = rnd();
      if (ld) model = ld_data; else if (we) model = din;
      @(negedge clk);
      we = 0; ld = 0; din = rnd();
      checks++;
      if (dout !== model) begin failures++; $display("FAIL step %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
