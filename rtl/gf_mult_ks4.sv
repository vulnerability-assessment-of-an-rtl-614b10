// gf_mult_ks4 -- GF(2^233) multiplier, iterative 4-segment Karatsuba.
//
// Both operands are split into four segments of SEG = 59 bits
// (a = a3 x^177 + a2 x^118 + a1 x^59 + a0). Two levels of Karatsuba turn the
// 233 x 233 carry-less product into nine 59 x 59 segment products:
//   a0b0, a1b1, (a0+a1)(b0+b1), a2b2, a3b3, (a2+a3)(b2+b3),
//   (a0+a2)(b0+b2), (a1+a3)(b1+b3), (a0+a1+a2+a3)(b0+b1+b2+b3).
// One segment product is formed per clock cycle by a single 59-bit
// carry-less multiplier and xored into a 472-bit accumulator at the offsets
// (multiples of 59 bits) that the Karatsuba recombination gives it, so a
// product takes nine compute cycles. In the ninth cycle the complete
// accumulator is reduced modulo x^233 + x^74 + 1 and stored in the result
// register, which drives `dout` until the next product completes.
//
// Interface and timing (operands come from the shared bus):
//   seta  - `din` is stored as the first operand (a register that keeps its
//           value until the next seta).
//   setb  - `din` is the second operand; together with the stored first
//           operand it is copied to the working registers and the nine
//           compute cycles start in the next cycle.
//   A product with seta in cycle t and setb in t+1 computes in t+2..t+10 and
//   is readable on `dout` from cycle t+11: 11 cycles in all, 9 of them
//   computing. setb may be given while idle or in the last compute cycle of
//   the previous product, so products can run back to back; `busy` is high
//   in the compute cycles.
// The four-segment Karatsuba method, the nine cycles and the seta/setb
// protocol follow the design description; the segment width, the order of
// the nine partial products and the reduction in the last cycle are this
// implementation's choices.
module gf_mult_ks4
  import ecc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic seta,
  input  logic setb,
  input  gf_t  din,
  output gf_t  dout,
  output logic busy
);

  localparam int SEG   = (M + 3) / 4;   // 59
  localparam int ACC_W = 8 * SEG;       // 472
  localparam int PP_W  = 2 * SEG - 1;   // 117

  typedef logic [SEG-1:0]   seg_t;
  typedef logic [4*SEG-1:0] ext_t;

  gf_t                a_q, wa_q, wb_q, res_q;
  logic [ACC_W-1:0]   acc_q;
  logic [3:0]         cnt_q;
  logic               busy_q;

  // Operand segments of the working registers
  ext_t wa_ext, wb_ext;
  seg_t sa, sb;
  logic [PP_W-1:0]  pp;
  logic [ACC_W-1:0] acc_n;
  logic [6:0]       place;   // bit j set: add pp at offset j*SEG

  assign wa_ext = ext_t'(wa_q);
  assign wb_ext = ext_t'(wb_q);

  function automatic seg_t seg(input ext_t v, input int i);
    return v[i*SEG +: SEG];
  endfunction

  function automatic logic [PP_W-1:0] clmul(input seg_t x, input seg_t y);
    logic [PP_W-1:0] r;
    r = '0;
    for (int i = 0; i < SEG; i++)
      if (y[i]) r ^= PP_W'(x) << i;
    return r;
  endfunction

  always_comb begin
    sa = '0; sb = '0; place = '0;
    unique case (cnt_q)
      4'd0: begin sa = seg(wa_ext,0); sb = seg(wb_ext,0); place = 7'b0001111; end
      4'd1: begin sa = seg(wa_ext,1); sb = seg(wb_ext,1); place = 7'b0011110; end
      4'd2: begin sa = seg(wa_ext,0) ^ seg(wa_ext,1);
                  sb = seg(wb_ext,0) ^ seg(wb_ext,1);     place = 7'b0001010; end
      4'd3: begin sa = seg(wa_ext,2); sb = seg(wb_ext,2); place = 7'b0111100; end
      4'd4: begin sa = seg(wa_ext,3); sb = seg(wb_ext,3); place = 7'b1111000; end
      4'd5: begin sa = seg(wa_ext,2) ^ seg(wa_ext,3);
                  sb = seg(wb_ext,2) ^ seg(wb_ext,3);     place = 7'b0101000; end
      4'd6: begin sa = seg(wa_ext,0) ^ seg(wa_ext,2);
                  sb = seg(wb_ext,0) ^ seg(wb_ext,2);     place = 7'b0001100; end
      4'd7: begin sa = seg(wa_ext,1) ^ seg(wa_ext,3);
                  sb = seg(wb_ext,1) ^ seg(wb_ext,3);     place = 7'b0011000; end
      4'd8: begin sa = seg(wa_ext,0) ^ seg(wa_ext,1) ^ seg(wa_ext,2) ^ seg(wa_ext,3);
                  sb = seg(wb_ext,0) ^ seg(wb_ext,1) ^ seg(wb_ext,2) ^ seg(wb_ext,3);
                  place = 7'b0001000; end
      default: ;
    endcase
    pp = clmul(sa, sb);
    acc_n = acc_q;
    for (int j = 0; j < 7; j++)
      if (place[j]) acc_n ^= ACC_W'(pp) << (j*SEG);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      wa_q   <= '0;
      wb_q   <= '0;
      res_q  <= '0;
      acc_q  <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
    end else begin
      if (seta) a_q <= din;
      if (busy_q) begin
        acc_q <= acc_n;
        cnt_q <= cnt_q + 4'd1;
        if (cnt_q == 4'(MULT_CYCLES-1)) begin
          res_q  <= gf_reduce(acc_n[2*M-2:0]);
          busy_q <= 1'b0;
        end
      end
      if (setb) begin
        wa_q   <= a_q;
        wb_q   <= din;
        acc_q  <= '0;
        cnt_q  <= '0;
        busy_q <= 1'b1;
      end
    end
  end

  assign dout = res_q;
  assign busy = busy_q;

  // setb only when idle or in the last compute cycle; never both loads at once
  a_setb_free: assert property (@(posedge clk) disable iff (!rst_n)
    setb |-> (!busy_q || cnt_q == 4'(MULT_CYCLES-1)));
  a_not_both: assert property (@(posedge clk) disable iff (!rst_n)
    !(seta && setb));

endmodule
