// gf_mult_ks4_tb -- checks the Karatsuba multiplier against a bit-serial
// reference product (gf_ref_pkg::fmul).
//
// Each product is loaded with seta in cycle t and setb in t+1; the test
// checks that the old result is still shown in cycle t+10 and that the new
// one appears in cycle t+11 (9 compute cycles, 11 in all). It also starts
// products back to back (setb in the last compute cycle of the previous one)
// and uses edge operands (0, 1, all ones, single top bits).
module gf_mult_ks4_tb;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0, seta = 0, setb = 0;
  gf_t din, dout;
  logic busy;
  int checks = 0, failures = 0;

  gf_mult_ks4 dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gf_t rnd();
    gf_t v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(input gf_t got, input gf_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic one(input gf_t a, input gf_t b);
    gf_t old;
    @(negedge clk); din = a; seta = 1;
    @(negedge clk); seta = 0; din = b; setb = 1;
    @(negedge clk); setb = 0; din = rnd();
    old = dout;
    repeat (8) @(negedge clk);          // now in cycle t+10
    check(dout, old, "result too early");
    @(negedge clk);                     // cycle t+11
    check(dout, fmul(a, b), "product");
  endtask

  initial begin
    gf_t a[4], b[4];
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one('0, rnd());
    one(gf_t'(1), 233'h1ab_cdef0123_456789ab_cdef0123_456789ab_cdef0123_456789ab_cdef0123);
    one('1, '1);
    one(gf_t'(1) << (M-1), gf_t'(1) << (M-1));
    for (int i = 0; i < 40; i++) one(rnd(), rnd());
    // back to back: next setb in the last compute cycle
    for (int i = 0; i < 4; i++) begin a[i] = rnd(); b[i] = rnd(); end
    @(negedge clk); din = a[0]; seta = 1;
    @(negedge clk); seta = 0; din = b[0]; setb = 1;
    for (int i = 1; i < 4; i++) begin
      @(negedge clk); setb = 0; din = a[i]; seta = 1;   // compute cycle 1
      @(negedge clk); seta = 0;
      repeat (7) @(negedge clk);                        // compute cycle 8
      din = b[i]; setb = 1;
      @(negedge clk); setb = 0;
      check(dout, fmul(a[i-1], b[i-1]), "back-to-back product");
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy after back-to-back start"); end
    end
    repeat (9) @(negedge clk);
    check(dout, fmul(a[3], b[3]), "last back-to-back product");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
