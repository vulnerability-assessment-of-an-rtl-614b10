// ecc_controller_tb -- checks the control sequence on its own.
//
// A small model of the key and test-bit register answers the controller's
// is_set, and a model of the multiplier's busy time (9 cycles after each
// setb) is kept. For the scalar 0x2cc, random 12-bit scalars and k = 0 the
// test checks: 6 initialisation cycles, a scan of 234 - t cycles for a
// leading one at bit t, 2 preparation cycles, one 57-cycle slot per key bit
// after the leading one, in each slot 6 seta, 6 setb, 5 squarings and 3
// additions, the multiplier idle in cycles 9, 55 and 56, setb in cycle 56
// fed from the ALU (bit 1) or X1 (bit 0), the squaring sources of cycles 2
// and 9 (Z2 / X2 for bit 1, X1 / Z1 for bit 0), the extra X2 write of cycle
// 46 in bit-0 slots only, the same operation pattern in bit-1
// and bit-0 slots, and a 437-cycle post phase with 233 squarings and 20
// products, ending in a done pulse (with key_zero for k = 0).
module ecc_controller_tb;
  import ecc_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, is_set;
  cntr_t cntr;
  logic [IDX_W-1:0] bit_idx;
  logic [31:0] r_in32;
  logic busy, done, key_zero;
  prog_e prog;
  gf_t key;
  int checks = 0, failures = 0;

  ecc_controller dut (.*);
  always #5 clk = ~clk;

  // key and test-bit register model
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) is_set <= 1'b0;
    else if (cntr.tb_we) is_set <= (int'(bit_idx) < M) ? key[bit_idx] : 1'b0;

  // multiplier busy model
  int mbusy = 0;
  always @(posedge clk) begin
    if (cntr.setb) mbusy <= 9;
    else if (mbusy > 0) mbusy <= mbusy - 1;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  logic [4:0] pat1 [57], pat0 [57];
  bit have1 = 0, have0 = 0;

  task automatic run(input gf_t k);
    int t, n_init, n_scan, n_prep, n_slots, n_post, c, sa, sb, sq, xo;
    int p_sq, p_sb;
    logic kb;
    logic [4:0] pat [57];
    key = k;
    t = -1;
    for (int i = M-1; i >= 0; i--) if (k[i]) begin t = i; break; end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n_init = 0; n_scan = 0; n_prep = 0; n_slots = 0; n_post = 0; p_sq = 0; p_sb = 0;
    while (prog == PROG_INIT) begin n_init++; @(negedge clk); end
    while (prog == PROG_SCAN) begin n_scan++; @(negedge clk); end
    expect_eq(n_init, 6, "init cycles");
    if (t < 0) begin
      checks++;
      if (!(done && key_zero)) begin failures++; $display("FAIL k=0 exit"); end
      @(negedge clk);
      return;
    end
    expect_eq(n_scan, 234 - t, "scan cycles");
    while (prog == PROG_PREP) begin n_prep++; @(negedge clk); end
    if (t > 0) expect_eq(n_prep, 2, "prep cycles");
    while (prog == PROG_MONT) begin
      c = 0; sa = 0; sb = 0; sq = 0; xo = 0;
      kb = is_set;
      do begin
        pat[c] = {cntr.seta, cntr.setb, cntr.sqe, cntr.xe, cntr.alu_we};
        sa += cntr.seta; sb += cntr.setb; sq += cntr.sqe; xo += cntr.xe;
        if (c == 2 || c == 9) begin
          checks++;
          if (!cntr.sqe || cntr.sel != (c == 2 ? (kb ? SEL_Z2 : SEL_X1)
                                               : (kb ? SEL_X2 : SEL_Z1))) begin
            failures++; $display("FAIL cycle-%0d squaring source %0d for bit %0d", c, cntr.sel, kb);
          end
        end
        if (c == 46) begin
          checks++;
          if (!cntr.alu_we || cntr.x2_we != !kb) begin
            failures++; $display("FAIL cycle-46 writes for bit %0d", kb);
          end
        end
        if (c == 9 || c == 55 || c == 56) begin
          checks++;
          if (mbusy != 0) begin failures++; $display("FAIL multiplier busy in cycle %0d", c); end
        end
        if (c == 56) begin
          checks++;
          if (!cntr.setb || cntr.sel != (kb ? SEL_ALU : SEL_X1)) begin
            failures++; $display("FAIL cycle-56 setb source %0d for bit %0d", cntr.sel, kb);
          end
        end
        c++;
        @(negedge clk);
      end while (prog == PROG_MONTK1 || prog == PROG_MONTK0);
      n_slots++;
      expect_eq(c, SLOT_CYCLES, "slot cycles");
      expect_eq(sa, 6, "seta per slot");
      expect_eq(sb, 6, "setb per slot");
      expect_eq(sq, 5, "squarings per slot");
      expect_eq(xo, 3, "additions per slot");
      if (kb) begin pat1 = pat; have1 = 1; end else begin pat0 = pat; have0 = 1; end
    end
    expect_eq(n_slots, t, "slots");
    while (prog == PROG_POST) begin
      n_post++; p_sq += cntr.sqe; p_sb += cntr.setb;
      @(negedge clk);
    end
    expect_eq(n_post, 437, "post cycles");
    expect_eq(p_sq, 233, "post squarings");
    expect_eq(p_sb, 20, "post products");
    checks++;
    if (!done || key_zero) begin failures++; $display("FAIL done pulse"); end
    @(negedge clk);
  endtask

  initial begin
    key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(gf_t'(12'h2cc));
    for (int i = 0; i < 4; i++) run(gf_t'($urandom_range(12'hfff, 1)));
    run(gf_t'(1));
    run('0);
    checks++;
    if (!(have1 && have0)) begin failures++; $display("FAIL both slot kinds not seen"); end
    else for (int c = 1; c < 57; c++) begin
      checks++;
      if (pat1[c] != pat0[c]) begin failures++; $display("FAIL op pattern differs in cycle %0d", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
