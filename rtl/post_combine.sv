// post_combine: builds all 28 DFT outputs from the array results.
//
// For k = 0..M (M = 7):
//   A1(0)    = a1(0) + a1(M) + sum s(n)
//   A1(2k)   = a1(0) + a1(M) + S(k)           k = 1..3
//   A1(2k-1) = a1(0) - a1(M) + D(k)           k = 1..3
//   A1(M)    = a1(0) - a1(M) + sum (-1)^n d(n)
//   B1(2k)   = SB(k),  B1(2k-1) = DB(k)      k = 1..3,  B1(0) = B1(M) = 0
//   A2(2k)   = A2E(k) + (-1)^k a2(3),  A2(2k-1) = A2O(k)   k = 1..3
//   A2(0) and B2(M) come complete from the pre-adders,  A2(M) = 0
//   B2(2k)   = B2E(k),  B2(2k-1) = B2O(k) + (-1)^(k-1) b2(3)
//                                                 k = 1..3,  B2(0) = 0
//   A(k)     = A1(k) + A2(k),   A(N/2+k) = A1(k) - A2(k)
//   B(k)     = B1(k) + B2(k),   B(N/2+k) = B1(k) - B2(k)
// and the rest by symmetry:
//   A(N/2-k) = A(N/2+k),  A(N-k) = A(k),  B(N/2-k) = -B(N/2+k),
//   B(N-k) = -B(k).
// Since the input is complex, A and B are complex and
//   X(k) = A(k) - j B(k) = (A.re + B.im) + j (A.im - B.re).
// The array results carry the coefficient scale 2^FRAC; the array-free
// terms are shifted up to it, and X is divided by 2^FRAC at the end by an
// arithmetic shift (rounding toward minus infinity), then cut to OUT_W bits.
//
// The A, B and X equations are the published ones; the A1, B1, A2 and B2
// end cases follow from the foldings done in pre_add. The rounding and the
// single register stage are this design's choice. The result for a block
// appears one clock after in_valid, with out_valid.
module post_combine
  import dft_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  core_t res,
  output logic  out_valid,
  output cout_t x [N]
);

  typedef logic signed [AW+3:0] wide_t;
  typedef struct packed { wide_t re; wide_t im; } cw_t;

  cw_t   a1 [M+1], a2 [M+1], b1 [M+1], b2 [M+1];
  cw_t   av [N], bv [N];
  cout_t nxt [N];

  function automatic cw_t from_acc(cacc_t p);
    from_acc.re = wide_t'(p.re);
    from_acc.im = wide_t'(p.im);
  endfunction

  function automatic cw_t from_dat(cdat_t p);
    from_dat.re = wide_t'(p.re) <<< FRAC;
    from_dat.im = wide_t'(p.im) <<< FRAC;
  endfunction

  function automatic cw_t cadd(cw_t p, cw_t q);
    cadd.re = p.re + q.re;
    cadd.im = p.im + q.im;
  endfunction

  function automatic cw_t csub(cw_t p, cw_t q);
    csub.re = p.re - q.re;
    csub.im = p.im - q.im;
  endfunction

  function automatic cw_t cneg(cw_t p);
    cneg.re = -p.re;
    cneg.im = -p.im;
  endfunction

  always_comb begin
    cw_t p0, m0;
    wide_t xr, xi;
    p0 = from_dat(res.p0);
    m0 = from_dat(res.m0);

    // A1, A2, B1, B2 for k = 0..M
    a1[0] = cadd(p0, from_dat(res.s0));
    a1[M] = cadd(m0, from_dat(res.dalt));
    for (int k = 1; k <= H; k++) begin
      a1[2*k]   = cadd(p0, from_acc(res.r[MAT_S][k-1]));
      a1[2*k-1] = cadd(m0, from_acc(res.r[MAT_D][k-1]));
    end
    b1[0] = '0;
    b1[M] = '0;
    for (int k = 1; k <= H; k++) begin
      b1[2*k]   = from_acc(res.r[MAT_SB][k-1]);
      b1[2*k-1] = from_acc(res.r[MAT_DB][k-1]);
    end
    a2[0] = from_dat(res.a2z);
    a2[M] = '0;
    b2[0] = '0;
    b2[M] = from_dat(res.b2l);
    for (int k = 1; k <= H; k++) begin
      a2[2*k]   = (k % 2 != 0) ? csub(from_acc(res.r[MAT_A2E][k-1]), from_dat(res.a2m))
                               : cadd(from_acc(res.r[MAT_A2E][k-1]), from_dat(res.a2m));
      a2[2*k-1] = from_acc(res.r[MAT_A2O][k-1]);
      b2[2*k]   = from_acc(res.r[MAT_B2E][k-1]);
      b2[2*k-1] = (k % 2 != 0) ? cadd(from_acc(res.r[MAT_B2O][k-1]), from_dat(res.b2m))
                               : csub(from_acc(res.r[MAT_B2O][k-1]), from_dat(res.b2m));
    end

    // A(k), B(k) for every k
    for (int k = 0; k <= M; k++) begin
      av[k]       = cadd(a1[k], a2[k]);
      av[N/2 + k] = csub(a1[k], a2[k]);
      bv[k]       = cadd(b1[k], b2[k]);
      bv[N/2 + k] = csub(b1[k], b2[k]);
    end
    for (int k = 1; k <= M; k++) begin
      av[N/2 - k] = av[N/2 + k];
      bv[N/2 - k] = cneg(bv[N/2 + k]);
    end
    for (int k = 1; k < M; k++) begin
      av[N - k] = av[k];
      bv[N - k] = cneg(bv[k]);
    end

    // X(k) = A(k) - j B(k), rescaled
    for (int k = 0; k < N; k++) begin
      xr = (av[k].re + bv[k].im) >>> FRAC;
      xi = (av[k].im - bv[k].re) >>> FRAC;
      nxt[k].re = out_t'(xr);
      nxt[k].im = out_t'(xi);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      for (int k = 0; k < N; k++) x[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) x <= nxt;
    end
  end

endmodule
