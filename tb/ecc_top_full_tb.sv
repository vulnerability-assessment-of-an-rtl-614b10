// ecc_top_full_tb -- the two full-length point multiplications of the
// side-channel study, with the design at its default configuration.
//
// Point P1 with the 232-bit scalars k1 and k2. Each result is compared with
// the affine double-and-add reference; the test also checks that the
// ladder part takes (232 - 1) * 57 = 13167 cycles, as 231 slots of 57
// cycles, and reports the total cycle count.
module ecc_top_full_tb;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  gf_t  k_in, x_in, y_in, b_in;
  logic busy, done, key_zero;
  gf_t  x_out, y_out;
  cntr_t cntr_o;
  int checks = 0, failures = 0;
  int ladder = 0;

  ecc_top dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk)
    if (rst_n && dut.u_ctrl.prog inside {PROG_MONT, PROG_MONTK1, PROG_MONTK0}) ladder++;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input gf_t k, input string name);
    pt_t ref_p;
    int cycles;
    ref_p = pmul(k, P1_X, P1_Y);
    ladder = 0;
    @(negedge clk);
    k_in = k; x_in = P1_X; y_in = P1_Y; b_in = B233_B; start = 1;
    @(negedge clk);
    start = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 2;
    if (x_out != ref_p.x || y_out != ref_p.y) begin
      failures++;
      $display("FAIL %s: got x=%h y=%h exp x=%h y=%h", name, x_out, y_out, ref_p.x, ref_p.y);
    end
    if (ladder != 231 * SLOT_CYCLES) begin
      failures++;
      $display("FAIL %s: ladder took %0d cycles", name, ladder);
    end
    $display("%s: kP x=%h", name, x_out);
    $display("%s: kP y=%h", name, y_out);
    $display("%s: %0d cycles in all, %0d in the ladder", name, cycles, ladder);
  endtask

  initial begin
    k_in = '0; x_in = '0; y_in = '0; b_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(K1, "k1");
    run(K2, "k2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
