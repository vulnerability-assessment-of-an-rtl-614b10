// ecc_controller -- sequencer of the B-233 point multiplication kP.
//
// The controller owns the 32-bit control register `cntr` (layout in
// ecc_pkg::cntr_t): every clock cycle it selects one unit's output for the
// bus and sets the enables of the units that take the bus value. A
// computation runs through four programs, named as in the design:
//
//   mont      - initialisation (8 cycles of activity): X1 = x, Z2 = x^2,
//               X2 = x^4 + b, Z1 = 1 (via the ALU's 32-bit word load), then,
//               after the leading one of k has been found, the operands of
//               the first product of the first slot are sent to the
//               multiplier. Between the first six cycles and the last two
//               the controller scans the key from bit 232 down, one bit per
//               cycle through the test-bit register, until it meets the
//               leading one: the length of this wait depends on the key.
//               mont also owns cycle 0 of every slot, in which the first
//               product of the slot starts and is_set picks the program for
//               cycles 1..56.
//   montk1 /  - one Montgomery-ladder step (Lopez-Dahab projective
//   montk0      coordinates) for a key bit 1 / 0, 57 cycles per slot:
//               6 products, 5 squarings, 3 additions. For bit 1,
//               (X1,Z1) <- (X1,Z1)+(X2,Z2) and (X2,Z2) <- 2(X2,Z2); for bit 0
//               the register pairs swap roles. The two programs issue the
//               same operations in the same cycles and differ only in which
//               registers they read and write (e.g. cycle 2 squares Z2 for
//               bit 1 but X1 for bit 0), plus one redundant X2 write in
//               cycle 46 of a bit-0 slot.
//   montpost  - conversion back to affine coordinates, with a field
//               inversion by Itoh-Tsujii (232 squarings, 10 products); the
//               result goes to the x and y registers.
//
// The slot length (57), the multiplier idle cycles 9, 55 and 56, the
// operation counts, the registers squared in cycles 2 and 9, the ALU burst
// of two additions and one squaring in cycles 38..42, the X2 write in cycle
// 46 of bit-0 slots, the setb at cycle 56 taken from the ALU (bit 1) or X1
// (bit 0) and the reuse of the key register as a temporary in the post phase
// follow the design description. The remaining cycles of the slot are
// filled in by this implementation so as to meet all of those points; the
// start/done handshake and the post-phase program (437 cycles) are also
// this implementation's own.
//
// Interface: `start` (one cycle, while idle) begins a computation; `is_set`
// is the test-bit register; `cntr` and `bit_idx` (key bit for the test-bit
// register) are registered outputs; `r_in32` is the constant word for the
// ALU's 32-bit load; `done` pulses for one cycle at the end, `key_zero`
// with it when k = 0 (no result is written then); `busy` is high from start
// to done. `prog` shows the running program.
module ecc_controller
  import ecc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             is_set,
  output cntr_t            cntr,
  output logic [IDX_W-1:0] bit_idx,
  output logic [31:0]      r_in32,
  output logic             busy,
  output logic             done,
  output logic             key_zero,
  output prog_e            prog
);

  // ---------------------------------------------------------------------
  // Controller state
  // ---------------------------------------------------------------------
  typedef struct packed {
    prog_e            prog;
    logic [5:0]       cyc;      // cycle within init / slot / prep
    logic [IDX_W-1:0] idx;      // scan position, or bit being processed
    logic [IDX_W-1:0] last;     // scan: index loaded in the previous cycle
    logic             scan_v;   // scan: test bit holds key[last]
    logic             kbit;     // key bit of the current slot
    logic             prev_k0;  // previous slot processed a 0
    logic [6:0]       pc;       // post program counter
    logic [6:0]       rep;      // cycles spent in the current post step
  } state_t;

  state_t st, st_n;

  // ---------------------------------------------------------------------
  // Control-word helpers
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {R_X1, R_Z1, R_X2, R_Z2} lreg_e;

  function automatic bus_sel_e sel_of(input lreg_e r);
    unique case (r)
      R_X1: return SEL_X1;
      R_Z1: return SEL_Z1;
      R_X2: return SEL_X2;
      default: return SEL_Z2;
    endcase
  endfunction

  function automatic cntr_t wr(input cntr_t w, input lreg_e r);
    cntr_t v;
    v = w;
    unique case (r)
      R_X1: v.x1_we = 1'b1;
      R_Z1: v.z1_we = 1'b1;
      R_X2: v.x2_we = 1'b1;
      default: v.z2_we = 1'b1;
    endcase
    return v;
  endfunction

  function automatic cntr_t w_sel(input bus_sel_e s);
    cntr_t v;
    v = '0;
    v.sel = s;
    return v;
  endfunction

  // ---------------------------------------------------------------------
  // Initialisation, cycles 0..5
  // ---------------------------------------------------------------------
  function automatic cntr_t init_word(input logic [5:0] cyc);
    cntr_t w;
    w = '0;
    unique case (cyc)
      6'd0: begin w = w_sel(SEL_X);   w.x1_we = 1; w.sqe = 1; end // X1=x, A=x^2
      6'd1: begin w = w_sel(SEL_ALU); w.z2_we = 1; w.sqe = 1; end // Z2=x^2, A=x^4
      6'd2: begin w = w_sel(SEL_B);   w.xe = 1;               end // A=x^4+b
      6'd3: begin w = w_sel(SEL_ALU); w.x2_we = 1; w.xe = 1;  end // X2=x^4+b, A=0
      6'd4: begin w.we32 = 1; w.be32 = 5'd0;                  end // A=1
      default: begin w = w_sel(SEL_ALU); w.z1_we = 1;         end // Z1=1
    endcase
    return w;
  endfunction

  // ---------------------------------------------------------------------
  // One ladder slot, cycles 0..56. kbit picks the register roles:
  //   A pair (AX,AZ) receives P1+P2, P pair (PX,PZ) is doubled;
  //   Q1 / Q2 are the P registers squared in cycles 2 / 9,
  //   A1 / A2 the A registers that are operands of M1 / M2.
  // Products (windows): M1=X1*Z2 (0-8), M2=A2*Q2 (10-18), M5=PX^2*PZ^2
  // (19-27), M6=b*PZ^4 (28-36), M3=M1*M2 (37-45), M4=x*AZ' (46-54).
  // Results: AZ'=(M1+M2)^2, AX'=M3+M4, PZ'=M5, PX'=PX^4+M6.
  // ---------------------------------------------------------------------
  function automatic cntr_t slot_word(input logic [5:0] cyc, input logic kbit,
                                      input logic prev_k0, input logic more);
    cntr_t w;
    lreg_e ax, az, px, pz, q1, q2, a1, a2;
    ax = kbit ? R_X1 : R_X2;
    az = kbit ? R_Z1 : R_Z2;
    px = kbit ? R_X2 : R_X1;
    pz = kbit ? R_Z2 : R_Z1;
    q1 = kbit ? R_Z2 : R_X1;
    q2 = kbit ? R_X2 : R_Z1;
    a1 = kbit ? R_X1 : R_Z2;
    a2 = kbit ? R_Z1 : R_X2;
    w = '0;
    unique case (cyc)
      6'd0:  begin w = w_sel(SEL_ALU); if (prev_k0) w.x2_we = 1; end // AX' of a 0-slot
      6'd1:  begin w = w_sel(sel_of(a2)); w.seta = 1; end            // M2 operand
      6'd2:  begin w = w_sel(sel_of(q1)); w.sqe = 1; end             // A=Q1^2
      6'd3:  begin w = wr(w_sel(SEL_ALU), q1); w.sqe = 1; end        // Q1=Q1^2, A=Q1^4
      6'd4:  begin w = wr(w_sel(SEL_ALU), a1); end                   // A1=Q1^4
      6'd9:  begin w = w_sel(sel_of(q2)); w.setb = 1; w.sqe = 1; end // M2, A=Q2^2
      6'd10: begin w = wr(w_sel(SEL_ALU), q2); w.sqe = 1; end        // Q2=Q2^2, A=Q2^4
      6'd11: begin w = wr(w_sel(SEL_ALU), a2); end                   // A2=Q2^4
      6'd12: begin w = w_sel(SEL_MUL); w.alu_we = 1; end             // A=M1
      6'd13: begin w = w_sel(sel_of(q1)); w.seta = 1; end
      6'd18: begin w = w_sel(sel_of(q2)); w.setb = 1; end            // M5=PX^2*PZ^2
      6'd19: begin w = wr(w_sel(SEL_MUL), px); end                   // PX=M2
      6'd20: begin w = w_sel(SEL_B); w.seta = 1; end
      6'd27: begin w = w_sel(sel_of(ax)); w.setb = 1; end            // M6=b*PZ^4
      6'd28: begin w = wr(w_sel(SEL_MUL), pz); end                   // PZ=M5 (final)
      6'd29: begin w = w_sel(SEL_ALU); w.seta = 1; end               // a=M1
      6'd36: begin w = w_sel(sel_of(px)); w.setb = 1; end            // M3=M1*M2
      6'd37: begin w = w_sel(SEL_X); w.seta = 1; end
      6'd38: begin w = w_sel(sel_of(px)); w.xe = 1; end              // A=M1+M2
      6'd39: begin w = w_sel(SEL_ALU); w.sqe = 1; end                // A=AZ'
      6'd40: begin w = wr(w_sel(SEL_ALU), px); end                   // PX=AZ'
      6'd41: begin w = w_sel(sel_of(az)); w.alu_we = 1; end          // A=PX^4
      6'd42: begin w = w_sel(SEL_MUL); w.xe = 1; end                 // A=PX^4+M6
      6'd43: begin w = wr(w_sel(sel_of(px)), az); end                // AZ=AZ' (final)
      6'd44: begin w = wr(w_sel(SEL_ALU), px); end                   // PX=PX' (final)
      6'd45: begin w = w_sel(sel_of(az)); w.setb = 1; end            // M4=x*AZ'
      6'd46: begin                                                   // A=M3
        w = w_sel(SEL_MUL); w.alu_we = 1;
        if (!kbit) w.x2_we = 1;                                      // redundant X2 write
      end
      6'd54: begin w = w_sel(SEL_Z2); w.seta = 1; end                // next M1
      6'd55: begin w = w_sel(SEL_MUL); w.xe = 1; end                 // A=AX'
      6'd56: begin
        if (kbit) begin w = wr(w_sel(SEL_ALU), R_X1); w.setb = 1; end // X1=AX'
        else      begin w = w_sel(SEL_X1); w.setb = 1; end
        w.tb_we = more;                                               // next key bit
      end
      default: ;
    endcase
    return w;
  endfunction

  // ---------------------------------------------------------------------
  // Post program: list of steps {word, number of cycles}.
  // ---------------------------------------------------------------------
  typedef struct packed {
    cntr_t      w;
    logic [6:0] n;
  } uop_t;

  localparam int INV_PC0   = 35;           // first inversion step
  localparam int INV_STEPS = 10;
  localparam int INV_PC1   = INV_PC0 + 5 * INV_STEPS;
  localparam int POST_LAST = INV_PC1 + 15; // last step of the program

  function automatic uop_t u(input cntr_t w, input int n);
    uop_t r;
    r.w = w;
    r.n = 7'(n);
    return r;
  endfunction

  function automatic cntr_t w_op(input bus_sel_e s, input logic seta, input logic setb,
                                 input logic sqe, input logic xe, input logic alu_we);
    cntr_t v;
    v = w_sel(s);
    v.seta = seta; v.setb = setb; v.sqe = sqe; v.xe = xe; v.alu_we = alu_we;
    return v;
  endfunction

  // Itoh-Tsujii chain for 2^233-2: beta_{k+j} = beta_k^(2^j) * beta_src,
  // src = beta_k itself or beta_1 (held in Z1). A step takes j + 10 cycles:
  // beta_k comes off the bus (from the multiplier, or Z1 for beta_1) and is
  // squared in the same cycle, which also stores it as the first operand
  // when src = beta_k; j-1 more squarings; setb; nine compute cycles, the
  // first of which loads Z1 as the next step's first operand when that
  // step's src is beta_1. A zero-length entry (j = 1) is skipped.
  function automatic logic [6:0] inv_j(input int s);
    unique case (s)
      0: return 7'd1;   1: return 7'd1;   2: return 7'd3;   3: return 7'd1;
      4: return 7'd7;   5: return 7'd14;  6: return 7'd1;   7: return 7'd29;
      8: return 7'd58;  default: return 7'd116;
    endcase
  endfunction

  function automatic logic inv_src_b1(input int s);
    return (s == 1) || (s == 3) || (s == 6);
  endfunction

  function automatic uop_t post_uop(input logic [6:0] pc, input logic prev_k0);
    uop_t r;
    cntr_t w;
    int s, k;
    r = u('0, 1);
    if (int'(pc) >= INV_PC0 && int'(pc) < INV_PC1) begin
      s = (int'(pc) - INV_PC0) / 5;
      k = (int'(pc) - INV_PC0) % 5;
      unique case (k)
        0: r = u(w_op(s == 0 ? SEL_Z1 : SEL_MUL, !inv_src_b1(s), 0, 1, 0, 0), 1);
        1: r = u(w_op(SEL_ALU, 0, 0, 1, 0, 0), int'(inv_j(s)) - 1);      // squarings
        2: r = u(w_op(SEL_ALU, 0, 1, 0, 0, 0), 1);                       // setb
        3: r = u(w_op(SEL_Z1, s < INV_STEPS-1 && inv_src_b1(s+1), 0, 0, 0, 0), 1);
        default: begin                                                    // wait
          w = '0;
          if (s == 0) begin w = w_sel(SEL_MUL); w.k_we = 1; end           // K=X1*U
          r = u(w, MULT_CYCLES-1);
        end
      endcase
    end else begin
      unique case (int'(pc))
        // projective -> affine: T1=Z1Z2, T2=x*T1, A=X1+xZ1, B=X2+xZ2,
        // C=A*B+(x^2+y)*T1, xa=X1*xZ2/T2, ya=(x+xa)*C/T2+y
        0:  begin w = w_sel(SEL_ALU); w.x2_we = prev_k0; r = u(w, 1); end
        1:  r = u(w_op(SEL_Z1, 1, 0, 0, 0, 0), 1);
        2:  r = u('0, 6);
        3:  r = u(w_op(SEL_Z2, 0, 1, 0, 0, 0), 1);                 // T1=Z1*Z2
        4:  r = u(w_op(SEL_X, 1, 0, 0, 0, 0), 1);
        5:  r = u('0, 7);
        6:  r = u(w_op(SEL_Z1, 0, 1, 0, 0, 0), 1);                 // x*Z1
        7:  begin w = w_sel(SEL_MUL); w.k_we = 1; r = u(w, 1); end // K=T1
        8:  r = u('0, 7);
        9:  r = u(w_op(SEL_Z2, 0, 1, 0, 0, 0), 1);                 // U=x*Z2
        10: r = u(w_op(SEL_MUL, 0, 0, 0, 0, 1), 1);                // A=xZ1
        11: r = u(w_op(SEL_X1, 0, 0, 0, 1, 0), 1);                 // A=X1+xZ1
        12: begin w = w_sel(SEL_ALU); w.z1_we = 1; r = u(w, 1); end
        13: r = u('0, 5);
        14: r = u(w_op(SEL_EXT, 0, 1, 0, 0, 0), 1);                // T2=x*T1
        15: r = u(w_op(SEL_MUL, 0, 0, 0, 0, 1), 1);                // A=U
        16: r = u(w_op(SEL_X2, 0, 0, 0, 1, 0), 1);                 // A=X2+U
        17: begin w = w_sel(SEL_ALU); w.x2_we = 1; r = u(w, 1); end // X2=B
        18: begin w = w_sel(SEL_MUL); w.z2_we = 1; r = u(w, 1); end // Z2=U
        19: r = u(w_op(SEL_Z1, 1, 0, 0, 0, 0), 1);
        20: r = u('0, 3);
        21: r = u(w_op(SEL_X2, 0, 1, 0, 0, 0), 1);                 // A*B
        22: begin w = w_sel(SEL_MUL); w.z1_we = 1; r = u(w, 1); end // Z1=T2
        23: r = u(w_op(SEL_X, 0, 0, 1, 0, 0), 1);                  // A=x^2
        24: r = u(w_op(SEL_Y, 0, 0, 0, 1, 0), 1);                  // A=x^2+y
        25: r = u(w_op(SEL_ALU, 1, 0, 0, 0, 0), 1);
        26: r = u('0, 4);
        27: r = u(w_op(SEL_EXT, 0, 1, 0, 0, 0), 1);                // (x^2+y)*T1
        28: r = u(w_op(SEL_MUL, 0, 0, 0, 0, 1), 1);                // A=A*B
        29: r = u(w_op(SEL_X1, 1, 0, 0, 0, 0), 1);
        30: r = u('0, 6);
        31: r = u(w_op(SEL_Z2, 0, 1, 0, 0, 0), 1);                 // X1*U, back to back
        32: r = u(w_op(SEL_MUL, 0, 0, 0, 1, 0), 1);                // A=C
        33: begin w = w_sel(SEL_ALU); w.x2_we = 1; r = u(w, 1); end // X2=C
        34: r = u('0, 5);            // X1*U is read into K while beta_2 computes
        // inversion steps occupy INV_PC0 .. INV_PC1-1
        INV_PC1:      r = u(w_op(SEL_MUL, 0, 0, 1, 0, 0), 1);      // A=1/T2
        INV_PC1 + 1:  r = u(w_op(SEL_ALU, 1, 0, 0, 0, 0), 1);      // a=1/T2
        INV_PC1 + 2:  r = u(w_op(SEL_EXT, 0, 1, 0, 0, 0), 1);      // xa
        INV_PC1 + 3:  r = u('0, MULT_CYCLES);
        INV_PC1 + 4:  r = u(w_op(SEL_X2, 0, 1, 0, 0, 0), 1);       // W=C/T2
        INV_PC1 + 5:  r = u(w_op(SEL_MUL, 0, 0, 0, 0, 1), 1);      // A=xa
        INV_PC1 + 6:  r = u(w_op(SEL_X, 0, 0, 0, 1, 0), 1);        // A=x+xa
        INV_PC1 + 7:  begin w = w_sel(SEL_MUL); w.x_we = 1; r = u(w, 1); end // x=xa
        INV_PC1 + 8:  r = u(w_op(SEL_ALU, 1, 0, 0, 0, 0), 1);
        INV_PC1 + 9:  r = u('0, 5);
        INV_PC1 + 10: r = u(w_op(SEL_MUL, 0, 1, 0, 0, 0), 1);      // (x+xa)*W
        INV_PC1 + 11: r = u('0, MULT_CYCLES);
        INV_PC1 + 12: r = u(w_op(SEL_MUL, 0, 0, 0, 0, 1), 1);
        INV_PC1 + 13: r = u(w_op(SEL_Y, 0, 0, 0, 1, 0), 1);        // A=ya
        POST_LAST:    begin w = w_sel(SEL_ALU); w.y_we = 1; r = u(w, 1); end // y=ya
        default: r = u('0, 1);
      endcase
    end
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Word of the cycle described by a state
  // ---------------------------------------------------------------------
  function automatic cntr_t word_of(input state_t s);
    cntr_t w;
    w = '0;
    unique case (s.prog)
      PROG_INIT: w = init_word(s.cyc);
      PROG_SCAN: w.tb_we = 1'b1;
      PROG_PREP: begin
        if (s.cyc == 6'd0) begin w = w_sel(SEL_Z2); w.seta = 1; w.tb_we = 1; end
        else               begin w = w_sel(SEL_X1); w.setb = 1; end
      end
      PROG_MONT:   w = slot_word(6'd0, 1'b0, s.prev_k0, 1'b0);
      PROG_MONTK1: w = slot_word(s.cyc, 1'b1, 1'b0, s.idx != '0);
      PROG_MONTK0: w = slot_word(s.cyc, 1'b0, 1'b0, s.idx != '0);
      PROG_POST:   w = post_uop(s.pc, s.prev_k0).w;
      default: ;
    endcase
    return w;
  endfunction

  function automatic logic [IDX_W-1:0] idx_of(input state_t s);
    unique case (s.prog)
      PROG_SCAN: return s.idx;
      PROG_PREP: return s.idx;            // first bit after the leading one
      PROG_MONTK1, PROG_MONTK0: return s.idx - 1'b1;
      default: return '0;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Next state
  // ---------------------------------------------------------------------
  logic done_n, zero_n;

  always_comb begin
    st_n   = st;
    done_n = 1'b0;
    zero_n = 1'b0;
    unique case (st.prog)
      PROG_IDLE: if (start) begin
        st_n      = '0;
        st_n.prog = PROG_INIT;
      end
      PROG_INIT: begin
        st_n.cyc = st.cyc + 1'b1;
        if (st.cyc == 6'd5) begin
          st_n.prog   = PROG_SCAN;
          st_n.idx    = IDX_W'(M-1);
          st_n.scan_v = 1'b0;
        end
      end
      PROG_SCAN: begin
        if (st.scan_v && is_set) begin
          // leading one at st.last
          if (st.last == '0) begin
            st_n.prog = PROG_POST;
            st_n.pc   = '0;
            st_n.rep  = '0;
          end else begin
            st_n.prog = PROG_PREP;
            st_n.cyc  = '0;
            st_n.idx  = st.last - 1'b1;
          end
        end else if (st.scan_v && st.last == '0) begin
          st_n.prog = PROG_IDLE;          // k = 0
          done_n    = 1'b1;
          zero_n    = 1'b1;
        end else begin
          st_n.last   = st.idx;
          st_n.idx    = st.idx - 1'b1;
          st_n.scan_v = 1'b1;
        end
      end
      PROG_PREP: begin
        st_n.cyc = st.cyc + 1'b1;
        if (st.cyc == 6'd1) begin
          st_n.prog    = PROG_MONT;
          st_n.prev_k0 = 1'b0;
        end
      end
      PROG_MONT: begin
        st_n.kbit = is_set;
        st_n.prog = is_set ? PROG_MONTK1 : PROG_MONTK0;
        st_n.cyc  = 6'd1;
      end
      PROG_MONTK1, PROG_MONTK0: begin
        st_n.cyc = st.cyc + 1'b1;
        if (st.cyc == 6'(SLOT_CYCLES-1)) begin
          st_n.prev_k0 = !st.kbit;
          st_n.cyc     = '0;
          if (st.idx == '0) begin
            st_n.prog = PROG_POST;
            st_n.pc   = '0;
            st_n.rep  = '0;
          end else begin
            st_n.prog = PROG_MONT;
            st_n.idx  = st.idx - 1'b1;
          end
        end
      end
      PROG_POST: begin
        if (st.rep + 1'b1 == post_uop(st.pc, st.prev_k0).n) begin
          st_n.rep = '0;
          st_n.pc  = st.pc + ((post_uop(st.pc + 1'b1, st.prev_k0).n == '0) ? 7'd2 : 7'd1);
          if (int'(st.pc) == POST_LAST) begin
            st_n.prog = PROG_IDLE;
            done_n    = 1'b1;
          end
        end else begin
          st_n.rep = st.rep + 1'b1;
        end
      end
      default: st_n.prog = PROG_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= '0;
      cntr     <= '0;
      bit_idx  <= '0;
      done     <= 1'b0;
      key_zero <= 1'b0;
    end else begin
      st       <= st_n;
      cntr     <= word_of(st_n);
      bit_idx  <= idx_of(st_n);
      done     <= done_n;
      key_zero <= zero_n;
    end
  end

  assign r_in32 = 32'd1;
  assign busy   = (st.prog != PROG_IDLE);
  assign prog   = st.prog;

endmodule
