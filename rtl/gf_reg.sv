// gf_reg -- 233-bit storage register on the shared bus.
//
// Used for the ladder registers X1, Z1, X2, Z2 and for the operand/result
// registers b, x, y and k. In a clock cycle where `we` (its bit of the
// controller word) is high it stores the bus value `din`. A host port
// (`ld`, `ld_data`) loads the register from outside the datapath; it has
// priority over `we` and is how the curve constant, the point and the scalar
// enter. `dout` shows the stored value (one cycle after the write). The bus
// write follows the design description; the host port and the reset to zero
// are this implementation's choices.
module gf_reg
  import ecc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  gf_t  din,
  input  logic ld,
  input  gf_t  ld_data,
  output gf_t  dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dout <= '0;
    else if (ld) dout <= ld_data;
    else if (we) dout <= din;
  end

endmodule
