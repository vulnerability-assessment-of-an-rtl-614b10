// ecc_top_tb -- end-to-end test of the B-233 point multiplier.
//
// Runs kP for several scalars and points and compares x_out/y_out with an
// affine double-and-add reference (gf_ref_pkg). Cases: the 10-bit scalar
// k = 0x2cc on the study point P1, k = 1, 2, 3, random 16-bit scalars on P1
// and on the B-233 generator, and k = 0 (key_zero). It also checks the
// timing: 57 cycles per slot, 8 cycles of initialisation activity (6 for k = 1), a scan
// wait of 234 - t cycles for a leading one at bit t, 437 post cycles. It
// counts each mechanism of the controller (key-bit-1 and key-bit-0 slots,
// the key scan, the 32-bit ALU load, squarings, additions, back-to-back
// products, the key register used as a temporary, the k = 0 exit) and fails
// if one never happened.
module ecc_top_tb;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  gf_t  k_in, x_in, y_in, b_in;
  logic busy, done, key_zero;
  gf_t  x_out, y_out;
  cntr_t cntr_o;

  int checks = 0, failures = 0;
  int n_k1 = 0, n_k0 = 0, n_scan = 0, n_we32 = 0, n_sqe = 0, n_xe = 0;
  int n_b2b = 0, n_kwe = 0, n_zero = 0, n_init = 0, n_post = 0;

  ecc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  prog_e prog_q;
  int slot_len;
  always @(posedge clk) if (rst_n) begin
    prog_e p;
    p = dut.u_ctrl.prog;
    if (p == PROG_MONT && prog_q != PROG_MONT) begin
      if (dut.u_ctrl.st.kbit) ; // nothing
    end
    if (p == PROG_MONTK1 && prog_q == PROG_MONT) n_k1++;
    if (p == PROG_MONTK0 && prog_q == PROG_MONT) n_k0++;
    if (p == PROG_SCAN) n_scan++;
    if (p == PROG_INIT || p == PROG_PREP) n_init++;
    if (p == PROG_POST) n_post++;
    if (cntr_o.we32) n_we32++;
    if (cntr_o.sqe) n_sqe++;
    if (cntr_o.xe) n_xe++;
    if (cntr_o.k_we) n_kwe++;
    if (cntr_o.setb && dut.u_mult.busy) n_b2b++;
    prog_q <= p;
  end

  // slot length check
  int cyc_since_mont = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.prog == PROG_MONT) begin
      if (cyc_since_mont != 0) begin
        checks++;
        if (cyc_since_mont != SLOT_CYCLES) begin
          failures++;
          $display("FAIL slot length %0d", cyc_since_mont);
        end
      end
      cyc_since_mont = 1;
    end else if (dut.u_ctrl.prog == PROG_MONTK1 || dut.u_ctrl.prog == PROG_MONTK0)
      cyc_since_mont++;
    else
      cyc_since_mont = 0;
  end

  function automatic int msb_of(input gf_t k);
    for (int i = M-1; i >= 0; i--) if (k[i]) return i;
    return -1;
  endfunction

  task automatic run(input gf_t k, input gf_t x, input gf_t y, input string name);
    pt_t  ref_p;
    int   cycles, scan0, init0, post0, t;
    ref_p = pmul(k, x, y);
    scan0 = n_scan; init0 = n_init; post0 = n_post;
    @(negedge clk);
    k_in = k; x_in = x; y_in = y; b_in = B233_B;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    t = msb_of(k);
    checks++;
    if (k == '0) begin
      n_zero += key_zero;
      if (!key_zero) begin failures++; $display("FAIL %s: key_zero not raised", name); end
    end else if (key_zero) begin
      failures++; $display("FAIL %s: key_zero raised", name);
    end else if (ref_p.inf) begin
      $display("note %s: reference result is the point at infinity", name);
    end else if (x_out != ref_p.x || y_out != ref_p.y) begin
      failures++;
      $display("FAIL %s: got x=%h y=%h", name, x_out, y_out);
      $display("        exp x=%h y=%h", ref_p.x, ref_p.y);
    end
    if (k != '0) begin
      checks += 3;
      if (n_init - init0 != (t > 0 ? 8 : 6)) begin failures++; $display("FAIL %s: init %0d cycles", name, n_init - init0); end
      if (n_scan - scan0 != 234 - t) begin failures++; $display("FAIL %s: scan %0d cycles", name, n_scan - scan0); end
      if (n_post - post0 != 437) begin failures++; $display("FAIL %s: post %0d cycles", name, n_post - post0); end
    end
    $display("%s: k=%0h msb=%0d cycles=%0d", name, k, t, cycles);
  endtask

  initial begin
    gf_t k;
    k_in = '0; x_in = '0; y_in = '0; b_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(gf_t'(12'h2cc), P1_X, P1_Y, "k=2cc P1");
    run(gf_t'(1), P1_X, P1_Y, "k=1");
    run(gf_t'(2), P1_X, P1_Y, "k=2");
    run(gf_t'(3), P1_X, P1_Y, "k=3");
    run('0, P1_X, P1_Y, "k=0");
    for (int i = 0; i < 3; i++) begin
      k = gf_t'($urandom_range(16'hffff, 1));
      run(k, P1_X, P1_Y, "random P1");
      k = gf_t'($urandom_range(20'hfffff, 1));
      run(k, B233_GX, B233_GY, "random G");
    end
    // mechanisms
    checks++; if (n_k1 == 0)   begin failures++; $display("FAIL no key-bit-1 slot"); end
    checks++; if (n_k0 == 0)   begin failures++; $display("FAIL no key-bit-0 slot"); end
    checks++; if (n_scan == 0) begin failures++; $display("FAIL no key scan"); end
    checks++; if (n_we32 == 0) begin failures++; $display("FAIL no 32-bit ALU load"); end
    checks++; if (n_sqe == 0)  begin failures++; $display("FAIL no squaring"); end
    checks++; if (n_xe == 0)   begin failures++; $display("FAIL no addition"); end
    checks++; if (n_b2b == 0)  begin failures++; $display("FAIL no back-to-back product"); end
    checks++; if (n_kwe == 0)  begin failures++; $display("FAIL key register never used as temporary"); end
    checks++; if (n_zero == 0) begin failures++; $display("FAIL k=0 exit never taken"); end
    $display("mechanisms: k1 slots=%0d k0 slots=%0d scan=%0d we32=%0d sqe=%0d xe=%0d b2b=%0d k_we=%0d zero=%0d",
             n_k1, n_k0, n_scan, n_we32, n_sqe, n_xe, n_b2b, n_kwe, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
