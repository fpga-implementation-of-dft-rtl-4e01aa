// pre_add: input pre-additions of the 28-point DFT.
//
// The cosine part of the DFT only needs the even combinations of input
// samples and the sine part only the odd ones:
//     a(n) = y(n) + y(N-n),  b(n) = y(n) - y(N-n),  1 <= n <= N/2-1
//     a(0) = y(0),  a(N/2) = y(N/2)
// These are split by the parity of n into a1(n) = a(2n), a2(n) = a(2n+1),
// b1(n) = b(2n), b2(n) = b(2n+1), n = 0..M. Each of the four is folded
// once more about its middle so that what is left for the arrays are
// 3-point circular convolutions (M = 7 is prime):
//     s(n)   = a1(n) + a1(M-n),   d(n)   = a1(n) - a1(M-n)     n = 1..3
//     sb(n)  = b1(n) - b1(M-n),   db(n)  = b1(n) + b1(M-n)     n = 1..3
//     a2e(n) = a2(n) + a2(6-n),   a2o(n) = a2(n) - a2(6-n)     n = 0..2
//     b2e(n) = b2(n) - b2(6-n),   b2o(n) = b2(n) + b2(6-n)     n = 0..2
// The first of each pair serves the even output indices, the second the
// odd ones. The terms no array computes are formed here as well:
// a1(0) +/- a1(M), the sum of the s(n) (A1 at k = 0), the alternating sum
// of the d(n) (A1 at k = M), the middle samples a2(3) and b2(3), and the
// complete values A2(0) = sum a2e(n) + a2(3) and
// B2(M) = b2o(0) - b2o(1) + b2o(2) - b2(3).
//
// The a(n), b(n) and s(n), d(n) steps are the published ones; the other
// foldings are worked out here the same way. One register stage: the
// outputs for the block presented with in_valid appear one clock later,
// with out_valid.
module pre_add
  import dft_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  cin_t y [N],
  output logic out_valid,
  output pre_t pre
);

  cdat_t a [N/2+1];
  cdat_t b [N/2];
  cdat_t a1 [M+1];
  cdat_t a2 [M], b2 [M];
  pre_t  nxt;

  function automatic cdat_t cadd(cdat_t p, cdat_t q);
    cadd.re = p.re + q.re;
    cadd.im = p.im + q.im;
  endfunction

  function automatic cdat_t csub(cdat_t p, cdat_t q);
    csub.re = p.re - q.re;
    csub.im = p.im - q.im;
  endfunction

  function automatic cdat_t widen(cin_t p);
    widen.re = dat_t'(p.re);
    widen.im = dat_t'(p.im);
  endfunction

  always_comb begin
    a[0]   = widen(y[0]);
    a[N/2] = widen(y[N/2]);
    b[0]   = '0;
    for (int n = 1; n < N/2; n++) begin
      a[n] = cadd(widen(y[n]), widen(y[N-n]));
      b[n] = csub(widen(y[n]), widen(y[N-n]));
    end
    for (int n = 0; n <= M; n++) a1[n] = a[2*n];
    for (int n = 0; n < M; n++) begin
      a2[n] = a[2*n+1];
      b2[n] = b[2*n+1];
    end

    for (int n = 1; n <= H; n++) begin
      nxt.v[MAT_S][n-1]  = cadd(a1[n], a1[M-n]);
      nxt.v[MAT_D][n-1]  = csub(a1[n], a1[M-n]);
      nxt.v[MAT_SB][n-1] = csub(b[2*n], b[2*(M-n)]);
      nxt.v[MAT_DB][n-1] = cadd(b[2*n], b[2*(M-n)]);
    end
    for (int n = 0; n < H; n++) begin
      nxt.v[MAT_A2E][n] = cadd(a2[n], a2[M-1-n]);
      nxt.v[MAT_A2O][n] = csub(a2[n], a2[M-1-n]);
      nxt.v[MAT_B2E][n] = csub(b2[n], b2[M-1-n]);
      nxt.v[MAT_B2O][n] = cadd(b2[n], b2[M-1-n]);
    end

    nxt.p0   = cadd(a1[0], a1[M]);
    nxt.m0   = csub(a1[0], a1[M]);
    nxt.a2m  = a2[H];
    nxt.b2m  = b2[H];
    nxt.s0   = '0;
    nxt.dalt = '0;
    nxt.a2z  = a2[H];
    nxt.b2l  = csub('0, b2[H]);
    for (int n = 1; n <= H; n++) begin
      nxt.s0   = cadd(nxt.s0, nxt.v[MAT_S][n-1]);
      nxt.dalt = (n % 2 != 0) ? csub(nxt.dalt, nxt.v[MAT_D][n-1])
                              : cadd(nxt.dalt, nxt.v[MAT_D][n-1]);
    end
    for (int n = 0; n < H; n++) begin
      nxt.a2z = cadd(nxt.a2z, nxt.v[MAT_A2E][n]);
      nxt.b2l = (n % 2 != 0) ? csub(nxt.b2l, nxt.v[MAT_B2O][n])
                             : cadd(nxt.b2l, nxt.v[MAT_B2O][n]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      pre       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pre <= nxt;
    end
  end

endmodule
