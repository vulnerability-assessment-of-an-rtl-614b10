// test_bit_reg -- one-bit register holding the key bit about to be processed.
//
// When `en` (controller bit 6) is high it stores bit `idx` of the key
// register; its output drives the controller's is_set input, which chooses
// between the key-bit-1 and key-bit-0 programs and lets the controller find
// the leading one of the key. An index beyond the key width reads as 0. The
// register and its enable bit follow the design description; taking the bit
// by an index from the controller is this implementation's choice.
module test_bit_reg
  import ecc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  gf_t              key,
  input  logic [IDX_W-1:0] idx,
  output logic             q
);

  logic bit_sel;
  assign bit_sel = (int'(idx) < M) ? key[idx] : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= bit_sel;
  end

endmodule
