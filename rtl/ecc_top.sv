// ecc_top -- elliptic-curve point multiplier kP over NIST B-233.
//
// Computes the affine point kP for a point P = (x, y) on
// y^2 + xy = x^3 + x^2 + b over GF(2^233), with the Montgomery ladder in
// Lopez-Dahab projective coordinates. All units sit on one 233-bit bus:
// in every clock cycle the controller's 32-bit word selects the single unit
// that drives the bus and enables the units that take its value.
//
//   units on the bus: key/temporary register k (code 0), b (1), Z1 (2),
//   Z2 (3), X1 (4), X2 (5), multiplier (6, 4-segment Karatsuba, 9 cycles per
//   product), ALU (7, add / square / load), x (8), y (9); the test-bit
//   register feeds the key bit to the controller.
//
// Interface: with the unit idle, a one-cycle `start` loads k_in, x_in, y_in
// and b_in into the k, x, y and b registers and begins the computation.
// `busy` stays high until the one-cycle `done`; x_out/y_out (the x and y
// registers) then hold kP. For k = 0, `key_zero` is raised with done and
// x_out/y_out keep the input point. For a key whose leading one is bit t the
// run takes 6 + (234 - t) + 2 + 57*t + 437 cycles: 57 per key bit after the
// leading one. kP equal to the point at infinity is not detected (the
// affine conversion then returns zero).
// The structure, bus codes and control-word bits follow the design
// description; the host loading port is this implementation's choice.
module ecc_top
  import ecc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  gf_t   k_in,
  input  gf_t   x_in,
  input  gf_t   y_in,
  input  gf_t   b_in,
  output logic  busy,
  output logic  done,
  output logic  key_zero,
  output gf_t   x_out,
  output gf_t   y_out,
  output cntr_t cntr_o
);

  cntr_t            cntr;
  logic [IDX_W-1:0] bit_idx;
  logic [31:0]      r_in32;
  logic             is_set;
  logic             ld;
  prog_e            prog;
  gf_t bus, k_r, b_r, z1_r, z2_r, x1_r, x2_r, mult_r, alu_r, x_r, y_r;

  assign ld = start && !busy;

  ecc_controller u_ctrl (
    .clk, .rst_n, .start(ld), .is_set, .cntr, .bit_idx, .r_in32,
    .busy, .done, .key_zero, .prog
  );

  ecc_bus u_bus (
    .sel(cntr.sel), .ext_r(k_r), .b_r, .z1_r, .z2_r, .x1_r, .x2_r,
    .mult_r, .alu_r, .x_r, .y_r, .bus
  );

  gf_mult_ks4 u_mult (
    .clk, .rst_n, .seta(cntr.seta), .setb(cntr.setb), .din(bus),
    .dout(mult_r), .busy()
  );

  ecc_alu u_alu (
    .clk, .rst_n, .din(bus), .we(cntr.alu_we), .xe(cntr.xe), .sqe(cntr.sqe),
    .we32(cntr.we32), .be32(cntr.be32), .r_in32, .dout(alu_r)
  );

  gf_reg u_x1 (.clk, .rst_n, .we(cntr.x1_we), .din(bus), .ld(1'b0), .ld_data('0), .dout(x1_r));
  gf_reg u_z1 (.clk, .rst_n, .we(cntr.z1_we), .din(bus), .ld(1'b0), .ld_data('0), .dout(z1_r));
  gf_reg u_x2 (.clk, .rst_n, .we(cntr.x2_we), .din(bus), .ld(1'b0), .ld_data('0), .dout(x2_r));
  gf_reg u_z2 (.clk, .rst_n, .we(cntr.z2_we), .din(bus), .ld(1'b0), .ld_data('0), .dout(z2_r));
  gf_reg u_b  (.clk, .rst_n, .we(cntr.b_we),  .din(bus), .ld(ld), .ld_data(b_in), .dout(b_r));
  gf_reg u_x  (.clk, .rst_n, .we(cntr.x_we),  .din(bus), .ld(ld), .ld_data(x_in), .dout(x_r));
  gf_reg u_y  (.clk, .rst_n, .we(cntr.y_we),  .din(bus), .ld(ld), .ld_data(y_in), .dout(y_r));
  gf_reg u_k  (.clk, .rst_n, .we(cntr.k_we),  .din(bus), .ld(ld), .ld_data(k_in), .dout(k_r));

  test_bit_reg u_tbit (
    .clk, .rst_n, .en(cntr.tb_we), .key(k_r), .idx(bit_idx), .q(is_set)
  );

  assign x_out  = x_r;
  assign y_out  = y_r;
  assign cntr_o = cntr;

endmodule
