// ecc_bus -- the shared 233-bit data bus.
//
// A combinational multiplexer: the 4-bit `sel` (controller bits 27..24)
// chooses which unit's output is driven onto `bus`, which every unit reads
// in the same cycle. The codes are those of ecc_pkg::bus_sel_e:
//   0 key/temporary register, 1 b, 2 Z1, 3 Z2, 4 X1, 5 X2, 6 multiplier,
//   7 ALU, 8 x, 9 y.
// Unused codes 10..15 drive zero (this implementation's choice).
module ecc_bus
  import ecc_pkg::*;
(
  input  bus_sel_e sel,
  input  gf_t      ext_r,
  input  gf_t      b_r,
  input  gf_t      z1_r,
  input  gf_t      z2_r,
  input  gf_t      x1_r,
  input  gf_t      x2_r,
  input  gf_t      mult_r,
  input  gf_t      alu_r,
  input  gf_t      x_r,
  input  gf_t      y_r,
  output gf_t      bus
);

  always_comb begin
    unique case (sel)
      SEL_EXT: bus = ext_r;
      SEL_B:   bus = b_r;
      SEL_Z1:  bus = z1_r;
      SEL_Z2:  bus = z2_r;
      SEL_X1:  bus = x1_r;
      SEL_X2:  bus = x2_r;
      SEL_MUL: bus = mult_r;
      SEL_ALU: bus = alu_r;
      SEL_X:   bus = x_r;
      SEL_Y:   bus = y_r;
      default: bus = '0;
    endcase
  end

endmodule
