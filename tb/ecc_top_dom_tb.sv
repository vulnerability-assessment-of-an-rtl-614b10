// ecc_top_dom_tb -- horizontal difference-of-means test on a switching-
// activity power model of the point multiplier.
//
// The design has no power model, so each clock cycle is given a power value
// equal to the number of register bits that toggle in it (X1, Z1, X2, Z2,
// the ALU register, the multiplier's operand, working, accumulator and
// result registers, the key register and the bus). For kP with P1 and the
// 232-bit scalars k1 and k2, the trace of the ladder is cut into its 231
// slots of 57 cycles. The 57-point mean slot is formed, and for every point
// p a key candidate is built: bit = 1 where the slot's value at p is below
// the mean, else 0. Each candidate's correctness (matching bits / 231) is
// printed. The same is done on the toggles of single units (X1, Z1, X2, Z2,
// ALU, multiplier, bus), listing the points whose candidate is >= 70 % or
// <= 30 % correct. The test checks the cut (231 slots of 57 cycles), the
// result of each multiplication, and that the unprotected ladder leaks: at
// least one point of the whole-design trace, and at least one point of one
// of the four coordinate registers, must give such a candidate.
module ecc_top_dom_tb;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int SLOTS = 231;

  logic clk = 0, rst_n = 0, start = 0;
  gf_t  k_in, x_in, y_in, b_in;
  logic busy, done, key_zero;
  gf_t  x_out, y_out;
  cntr_t cntr_o;
  int checks = 0, failures = 0;

  ecc_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // power model: toggled state bits per cycle, for the whole design (unit 0)
  // and for single units
  localparam int UNITS = 8;
  localparam string UNIT_NAME [UNITS] =
    '{"design", "X1", "Z1", "X2", "Z2", "ALU", "multiplier", "bus"};
  typedef logic [M*11 + 472 - 1:0] snap_t;
  snap_t prev_s;
  function automatic snap_t snap();
    return {dut.u_x1.dout, dut.u_z1.dout, dut.u_x2.dout, dut.u_z2.dout,
            dut.u_alu.dout, dut.u_mult.a_q, dut.u_mult.wa_q, dut.u_mult.wb_q,
            dut.u_mult.acc_q, dut.u_mult.dout, dut.u_k.dout, dut.bus};
  endfunction

  // toggles of one unit; bit offsets follow the order in snap()
  function automatic int unit_toggles(input snap_t d, input int u);
    localparam int BASE = 472;   // acc_q sits between the M-wide fields
    unique case (u)
      1: return $countones(d[BASE + 11*M - 1 -: M]);
      2: return $countones(d[BASE + 10*M - 1 -: M]);
      3: return $countones(d[BASE +  9*M - 1 -: M]);
      4: return $countones(d[BASE +  8*M - 1 -: M]);
      5: return $countones(d[BASE +  7*M - 1 -: M]);
      6: return $countones(d[BASE + 6*M - 1 : 3*M]);  // a, wa, wb, acc, result
      7: return $countones(d[M-1:0]);
      default: return $countones(d);
    endcase
  endfunction

  int trace [UNITS][SLOTS][SLOT_CYCLES];
  int slot = -1, pt = 0;
  always @(negedge clk) if (rst_n) begin
    snap_t s;
    s = snap();
    if (dut.u_ctrl.prog == PROG_MONT) begin slot++; pt = 0; end
    if (slot >= 0 && slot < SLOTS &&
        dut.u_ctrl.prog inside {PROG_MONT, PROG_MONTK1, PROG_MONTK0}) begin
      if (pt < SLOT_CYCLES)
        for (int u = 0; u < UNITS; u++) trace[u][slot][pt] = unit_toggles(s ^ prev_s, u);
      pt++;
    end
    prev_s = s;
  end

  // Candidate correctness in % at every point of one unit's trace; returns
  // the distance from 50 % of the strongest point.
  function automatic real dom(input int u, input gf_t k, input int t, input string name,
                              output int best_p);
    real mean, corr, best;
    int good;
    string line, hits;
    best = 0.0; best_p = 0;
    line = ""; hits = "";
    for (int p = 0; p < SLOT_CYCLES; p++) begin
      mean = 0.0;
      for (int s = 0; s < SLOTS; s++) mean += trace[u][s][p];
      mean = mean / SLOTS;
      good = 0;
      for (int s = 0; s < SLOTS; s++)
        if ((mean > real'(trace[u][s][p])) == k[t - 1 - s]) good++;
      corr = 100.0 * good / SLOTS;
      line = {line, $sformatf(" %0d:%0.0f", p + 1, corr)};
      if (corr >= 70.0 || corr <= 30.0) hits = {hits, $sformatf(" %0d:%0.0f", p + 1, corr)};
      if ((corr > 50.0 ? corr - 50.0 : 50.0 - corr) > best) begin
        best = (corr > 50.0 ? corr - 50.0 : 50.0 - corr);
        best_p = p + 1;
      end
    end
    if (u == 0) $display("%s: candidate correctness %% (point:value):%s", name, line);
    $display("%s %s: points at >= 70 %% or <= 30 %%:%s", name, UNIT_NAME[u],
             hits == "" ? " none" : hits);
    return best;
  endfunction

  task automatic run(input gf_t k, input string name);
    pt_t  ref_p;
    real  best, reg_best;
    int   best_p, p, t;
    ref_p = pmul(k, P1_X, P1_Y);
    t = 0;
    for (int i = M-1; i >= 0; i--) if (k[i]) begin t = i; break; end
    slot = -1;
    @(negedge clk);
    k_in = k; x_in = P1_X; y_in = P1_Y; b_in = B233_B; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks += 2;
    if (x_out != ref_p.x || y_out != ref_p.y) begin failures++; $display("FAIL %s: wrong kP", name); end
    if (slot != SLOTS - 1 || t != SLOTS) begin failures++; $display("FAIL %s: %0d slots", name, slot + 1); end
    best = dom(0, k, t, name, best_p);
    $display("%s: strongest point %0d, %0.1f %% away from 50 %%", name, best_p, best);
    checks++;
    if (best < 20.0) begin failures++; $display("FAIL %s: no leaking point found", name); end
    // the coordinate registers are the units that give the key away
    reg_best = 0.0;
    for (int u = 1; u < UNITS; u++) begin
      real d;
      d = dom(u, k, t, name, p);
      if (u <= 4 && d > reg_best) reg_best = d;
    end
    checks++;
    if (reg_best < 20.0) begin failures++; $display("FAIL %s: no register leaks", name); end
  endtask

  initial begin
    k_in = '0; x_in = '0; y_in = '0; b_in = '0;
    prev_s = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(K1, "k1");
    run(K2, "k2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
