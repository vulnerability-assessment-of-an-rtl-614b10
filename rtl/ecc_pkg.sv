// ecc_pkg -- types, constants and field arithmetic shared by the B-233 point
// multiplier.
//
// The field is GF(2^233) in polynomial basis with the NIST B-233 reduction
// trinomial f(x) = x^233 + x^74 + 1. Elements are 233-bit vectors, bit i being
// the coefficient of x^i. The 32-bit control word `cntr_t` follows the bit
// assignment of the controller's cntr register: bits 27..24 select the bus
// source, the other used bits are write / operation enables of the units.
// Bits 31..28, 23, 12, 8 and 7 are unused. The bus source codes follow the
// numbering of the units on the bus (0 = key/temporary register, 1 = b,
// 2 = Z1, 3 = Z2, 4 = X1, 5 = X2, 6 = multiplier, 7 = ALU, 8 = x, 9 = y).
// The functions here are combinational and synthesizable (fixed loop bounds).
package ecc_pkg;

  localparam int M = 233;          // field degree
  localparam int POLY_MID = 74;    // middle term of x^233 + x^74 + 1
  localparam int CNTR_W = 32;      // width of the controller's cntr register
  localparam int SLOT_CYCLES = 57; // clock cycles per processed key bit
  localparam int MULT_CYCLES = 9;  // compute cycles of one field product
  localparam int IDX_W = 8;        // width of a key-bit index

  typedef logic [M-1:0] gf_t;
  typedef logic [2*M-2:0] gf_wide_t;

  // Bus source select, cntr[27:24]
  typedef enum logic [3:0] {
    SEL_EXT = 4'd0,  // key register, reused as temporary in the post phase
    SEL_B   = 4'd1,
    SEL_Z1  = 4'd2,
    SEL_Z2  = 4'd3,
    SEL_X1  = 4'd4,
    SEL_X2  = 4'd5,
    SEL_MUL = 4'd6,
    SEL_ALU = 4'd7,
    SEL_X   = 4'd8,
    SEL_Y   = 4'd9
  } bus_sel_e;

  // Program the controller is running. PROG_MONT is cycle 0 of a slot, in
  // which the key bit picks PROG_MONTK1 or PROG_MONTK0 for cycles 1..56.
  typedef enum logic [2:0] {
    PROG_IDLE   = 3'd0,
    PROG_INIT   = 3'd1,  // first six cycles of the initialisation
    PROG_SCAN   = 3'd2,  // search for the leading one of k
    PROG_PREP   = 3'd3,  // last two initialisation cycles
    PROG_MONT   = 3'd4,
    PROG_MONTK1 = 3'd5,
    PROG_MONTK0 = 3'd6,
    PROG_POST   = 3'd7   // conversion to affine coordinates
  } prog_e;

  // The controller's 32-bit output word, msb first.
  typedef struct packed {
    logic [3:0] unused31_28;
    bus_sel_e   sel;       // 27..24
    logic       unused23;
    logic       seta;      // 22 multiplier: load first operand
    logic       setb;      // 21 multiplier: load second operand, start
    logic       sqe;       // 20 ALU: square bus into register
    logic       xe;        // 19 ALU: xor bus into register
    logic       alu_we;    // 18 ALU: load bus into register
    logic       x2_we;     // 17
    logic       x1_we;     // 16
    logic       z2_we;     // 15
    logic       z1_we;     // 14
    logic       b_we;      // 13
    logic       unused12;
    logic       x_we;      // 11
    logic       y_we;      // 10
    logic       k_we;      // 9
    logic [1:0] unused8_7;
    logic       tb_we;     // 6 test-bit register load
    logic [4:0] be32;      // 5..1 ALU 32-bit word index
    logic       we32;      // 0 ALU 32-bit word load
  } cntr_t;

  // Reduce a product of degree <= 2M-2 modulo x^233 + x^74 + 1.
  function automatic gf_t gf_reduce(input gf_wide_t c);
    gf_wide_t t;
    t = c;
    for (int i = 2*M-2; i >= M; i--) begin
      if (t[i]) begin
        t[i]              = 1'b0;
        t[i-M]            = ~t[i-M];
        t[i-M+POLY_MID]   = ~t[i-M+POLY_MID];
      end
    end
    return t[M-1:0];
  endfunction

  // Squaring: interleave zeros, then reduce.
  function automatic gf_t gf_sqr(input gf_t a);
    gf_wide_t s;
    s = '0;
    for (int i = 0; i < M; i++) s[2*i] = a[i];
    return gf_reduce(s);
  endfunction

endpackage
