// ecc_alu -- GF(2^233) adder/squarer with one internal 233-bit register.
//
// The register drives `dout` at all times. In each clock cycle at most one
// of the enables acts on the data `din` from the bus:
//   we   - load:    r <= din
//   xe   - add:     r <= r ^ din   (field addition is a bitwise xor, so a
//                                   sum of two bus values takes two cycles:
//                                   we for the first, xe for the second)
//   sqe  - square:  r <= din^2 mod x^233 + x^74 + 1 (one cycle)
//   we32 - word:    r[32*be32 +: 32] <= r_in32 (bits above 232 dropped); the
//                   controller uses it once to set the register to 1
// The four operations and their enables follow the design description. The
// priority we > xe > sqe > we32 when several are set, and the reading of be32
// as a word index, are this implementation's choices (the controller never
// sets two at once; an assertion checks it). Reset clears the register.
module ecc_alu
  import ecc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  gf_t         din,
  input  logic        we,
  input  logic        xe,
  input  logic        sqe,
  input  logic        we32,
  input  logic [4:0]  be32,
  input  logic [31:0] r_in32,
  output gf_t         dout
);

  gf_t r_q, r_n;

  always_comb begin
    r_n = r_q;
    if (we)       r_n = din;
    else if (xe)  r_n = r_q ^ din;
    else if (sqe) r_n = gf_sqr(din);
    else if (we32) begin
      for (int i = 0; i < M; i++)
        if (5'(i / 32) == be32) r_n[i] = r_in32[i % 32];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_q <= '0;
    else        r_q <= r_n;
  end

  assign dout = r_q;

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({we, xe, sqe, we32}));

endmodule
