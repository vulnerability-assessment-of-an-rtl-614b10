// ecc_alu_tb -- checks load, field addition (xor), squaring against the
// reference product a*a, the 32-bit word load of each word index, and that
// the register holds its value when no enable is set.
module ecc_alu_tb;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0, we = 0, xe = 0, sqe = 0, we32 = 0;
  logic [4:0] be32 = '0;
  logic [31:0] r_in32 = '0;
  gf_t din, dout, model;
  int checks = 0, failures = 0;

  ecc_alu dut (.*);
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

  task automatic op(input int kind, input gf_t d);
    @(negedge clk);
    din = d; we = (kind == 0); xe = (kind == 1); sqe = (kind == 2); we32 = 0;
    unique case (kind)
      0: model = d;
      1: model = model ^ d;
      2: model = fmul(d, d);
      default: ;
    endcase
    @(negedge clk);
    we = 0; xe = 0; sqe = 0;
    checks++;
    if (dout !== model) begin failures++; $display("FAIL op %0d: got %h exp %h", kind, dout, model); end
  endtask

  initial begin
    din = '0;
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) op($urandom_range(3, 0), rnd());
    // squaring of x^232 exercises the reduction
    op(2, gf_t'(1) << (M-1));
    // 32-bit word loads
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      we32 = 1; be32 = 5'(w); r_in32 = $urandom;
      for (int i = 0; i < 32; i++) if (w*32 + i < M) model[w*32 + i] = r_in32[i];
      @(negedge clk);
      we32 = 0;
      checks++;
      if (dout !== model) begin failures++; $display("FAIL we32 word %0d", w); end
    end
    // set to one the way the controller does: add itself, then word 0 = 1
    op(1, dout);
    checks++; if (dout !== '0) begin failures++; $display("FAIL self add"); end
    @(negedge clk); we32 = 1; be32 = 0; r_in32 = 32'd1;
    @(negedge clk); we32 = 0;
    checks++; if (dout !== gf_t'(1)) begin failures++; $display("FAIL set to one"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
