// gf_ref_pkg -- reference arithmetic for the testbenches.
//
// Written independently of the design: GF(2^233) multiplication is done bit
// serially (shift, reduce by x^233 + x^74 + 1, conditional add), inversion by
// Fermat's little theorem, and points of y^2 + xy = x^3 + x^2 + b are added
// and doubled in affine coordinates (the textbook chord-and-tangent
// formulas), so kP is found by plain double-and-add. The curve constants are
// those of NIST B-233.
package gf_ref_pkg;

  localparam int M = 233;
  typedef logic [M-1:0] fe_t;

  localparam fe_t B233_B  = 233'h066_647ede6c_332c7f8c_0923bb58_213b333b_20e9ce42_81fe115f_7d8f90ad;
  localparam fe_t B233_GX = 233'h0fa_c9dfcbac_8313bb21_39f1bb75_5fef65bc_391f8b36_f8f8eb73_71fd558b;
  localparam fe_t B233_GY = 233'h100_6a08a419_03350678_e58528be_bf8a0bef_f867a7ca_36716f7e_01f81052;

  // Point used in the side-channel study and its scalars
  localparam fe_t P1_X = 233'h181_856adc1e_7df13784_91fa736f_2d02e8ac_f1b9425e_b2b061ff_0e9e8246;
  localparam fe_t P1_Y = 233'h089_fed47b79_6480499c_baa86d8e_b39457c4_9d5bf345_a0757e46_e2582de6;
  localparam fe_t K1   = 233'h093_919255fd_4359f4c2_b67dea45_6ef70a54_5a9c44d4_6f7f409f_96cb52cc;
  localparam fe_t K2   = 233'h0cd_ea65f6dd_7a75b8b5_133a70d1_f27a4d95_06ecfb6a_50ea526e_b3d426ed;

  function automatic fe_t fmul(input fe_t a, input fe_t b);
    fe_t r;
    logic top;
    r = '0;
    for (int i = M-1; i >= 0; i--) begin
      top = r[M-1];
      r = r << 1;
      if (top) begin r[0] ^= 1'b1; r[74] ^= 1'b1; end
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic fe_t finv(input fe_t a);
    fe_t t;
    t = a;
    for (int i = 1; i < M-1; i++) t = fmul(fmul(t, t), a);
    return fmul(t, t);
  endfunction

  typedef struct packed { logic inf; fe_t x; fe_t y; } pt_t;

  function automatic logic on_curve(input fe_t x, input fe_t y, input fe_t b);
    fe_t l, r, x2;
    x2 = fmul(x, x);
    l = fmul(y, y) ^ fmul(x, y);
    r = fmul(x2, x) ^ x2 ^ b;
    return l == r;
  endfunction

  function automatic pt_t pdbl(input pt_t p);
    pt_t q;
    fe_t lam;
    if (p.inf || p.x == '0) begin q = '0; q.inf = 1'b1; return q; end
    lam = p.x ^ fmul(p.y, finv(p.x));
    q.inf = 1'b0;
    q.x = fmul(lam, lam) ^ lam ^ fe_t'(1);
    q.y = fmul(p.x, p.x) ^ fmul(lam ^ fe_t'(1), q.x);
    return q;
  endfunction

  function automatic pt_t padd(input pt_t p, input pt_t q);
    pt_t r;
    fe_t lam;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y == q.y) return pdbl(p);
      r = '0; r.inf = 1'b1; return r;
    end
    lam = fmul(p.y ^ q.y, finv(p.x ^ q.x));
    r.inf = 1'b0;
    r.x = fmul(lam, lam) ^ lam ^ p.x ^ q.x ^ fe_t'(1);
    r.y = fmul(lam, p.x ^ r.x) ^ r.x ^ p.y;
    return r;
  endfunction

  function automatic pt_t pmul(input fe_t k, input fe_t x, input fe_t y);
    pt_t r, p;
    r = '0; r.inf = 1'b1;
    p.inf = 1'b0; p.x = x; p.y = y;
    for (int i = M-1; i >= 0; i--) begin
      r = pdbl(r);
      if (k[i]) r = padd(r, p);
    end
    return r;
  endfunction

endpackage
