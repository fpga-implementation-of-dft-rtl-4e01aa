// tb_dft_ref: reference model used by the testbenches of the DFT stages.
//
// Works out, directly from the DFT decomposition equations and with
// coefficients computed here in floating point (round(512*cos), round(512*sin)),
// what the pre-adders and the arrays must produce for a frame, and the
// exact floating-point DFT of that frame.
package tb_dft_ref;
  import dft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  typedef int frame_t [N];

  function automatic longint qcos(real a);
    return longint'($floor(512.0 * $cos(a) + 0.5));
  endfunction

  function automatic longint qsin(real a);
    return longint'($floor(512.0 * $sin(a) + 0.5));
  endfunction

  function automatic cdat_t mk(int re, int im);
    mk.re = dat_t'(re);
    mk.im = dat_t'(im);
  endfunction

  // a(n) and b(n) for n = 0..N/2 (b(0) = b(N/2) = 0), per component
  function automatic int a_of(frame_t y, int n);
    if (n == 0 || n == N / 2) return y[n];
    return y[n] + y[N - n];
  endfunction

  function automatic int b_of(frame_t y, int n);
    if (n == 0 || n == N / 2) return 0;
    return y[n] - y[N - n];
  endfunction

  // a2(n) = a(2n+1), b2(n) = b(2n+1)
  function automatic int a2_of(frame_t y, int n);
    return a_of(y, 2 * n + 1);
  endfunction

  function automatic int b2_of(frame_t y, int n);
    return b_of(y, 2 * n + 1);
  endfunction

  function automatic pre_t pre_of(frame_t yr, frame_t yi);
    pre_t p;
    int sr, si, dr, di, zr, zi, lr, li;
    p = '0;
    for (int n = 1; n <= H; n++) begin
      p.v[MAT_S][n-1] = mk(a_of(yr, 2*n) + a_of(yr, 2*(M-n)), a_of(yi, 2*n) + a_of(yi, 2*(M-n)));
      p.v[MAT_D][n-1] = mk(a_of(yr, 2*n) - a_of(yr, 2*(M-n)), a_of(yi, 2*n) - a_of(yi, 2*(M-n)));
      p.v[MAT_SB][n-1] = mk(b_of(yr, 2*n) - b_of(yr, 2*(M-n)), b_of(yi, 2*n) - b_of(yi, 2*(M-n)));
      p.v[MAT_DB][n-1] = mk(b_of(yr, 2*n) + b_of(yr, 2*(M-n)), b_of(yi, 2*n) + b_of(yi, 2*(M-n)));
    end
    for (int n = 0; n < H; n++) begin
      p.v[MAT_A2E][n] = mk(a2_of(yr, n) + a2_of(yr, 6-n), a2_of(yi, n) + a2_of(yi, 6-n));
      p.v[MAT_A2O][n] = mk(a2_of(yr, n) - a2_of(yr, 6-n), a2_of(yi, n) - a2_of(yi, 6-n));
      p.v[MAT_B2E][n] = mk(b2_of(yr, n) - b2_of(yr, 6-n), b2_of(yi, n) - b2_of(yi, 6-n));
      p.v[MAT_B2O][n] = mk(b2_of(yr, n) + b2_of(yr, 6-n), b2_of(yi, n) + b2_of(yi, 6-n));
    end
    p.p0 = mk(yr[0] + yr[N/2], yi[0] + yi[N/2]);
    p.m0 = mk(yr[0] - yr[N/2], yi[0] - yi[N/2]);
    p.a2m = mk(a2_of(yr, 3), a2_of(yi, 3));
    p.b2m = mk(b2_of(yr, 3), b2_of(yi, 3));
    sr = 0; si = 0; dr = 0; di = 0;
    for (int n = 1; n <= H; n++) begin
      sr += int'(p.v[MAT_S][n-1].re); si += int'(p.v[MAT_S][n-1].im);
      dr += ((n % 2 != 0) ? -1 : 1) * int'(p.v[MAT_D][n-1].re);
      di += ((n % 2 != 0) ? -1 : 1) * int'(p.v[MAT_D][n-1].im);
    end
    p.s0 = mk(sr, si);
    p.dalt = mk(dr, di);
    // A2(0) = sum of a2(n); B2(M) = sum of (-1)^n b2(n), over n = 0..6
    zr = 0; zi = 0; lr = 0; li = 0;
    for (int n = 0; n < M; n++) begin
      zr += a2_of(yr, n); zi += a2_of(yi, n);
      lr += ((n % 2 != 0) ? -1 : 1) * b2_of(yr, n);
      li += ((n % 2 != 0) ? -1 : 1) * b2_of(yi, n);
    end
    p.a2z = mk(zr, zi);
    p.b2l = mk(lr, li);
    return p;
  endfunction

  function automatic cacc_t dot(longint cr [], cdat_t v []);
    longint sr = 0, si = 0;
    for (int i = 0; i < cr.size(); i++) begin
      sr += cr[i] * longint'(v[i].re);
      si += cr[i] * longint'(v[i].im);
    end
    dot.re = acc_t'(sr);
    dot.im = acc_t'(si);
  endfunction

  // Coefficient of output j (1..3), input i (0..2) of a matrix, from its
  // defining cosine or sine (inputs n = i+1 for S, D, SB, DB; n = i for
  // the others).
  function automatic longint refcoef(mat_e mat, int j, int i);
    case (mat)
      MAT_S:   return qcos(2.0 * PI * j * (i + 1) / M);
      MAT_D:   return qcos(PI * (2 * j - 1) * (i + 1) / M);
      MAT_SB:  return qsin(2.0 * PI * j * (i + 1) / M);
      MAT_DB:  return qsin(PI * (2 * j - 1) * (i + 1) / M);
      MAT_A2E: return qcos(PI * j * (2 * i + 1) / M);
      MAT_A2O: return qcos(PI * (2 * j - 1) * (2 * i + 1) / (2 * M));
      MAT_B2E: return qsin(PI * j * (2 * i + 1) / M);
      default: return qsin(PI * (2 * j - 1) * (2 * i + 1) / (2 * M));
    endcase
  endfunction

  // What the arrays must deliver for pre-added values p.
  function automatic core_t core_of(pre_t p);
    core_t  r;
    longint c [];
    cdat_t  v [];
    r = '0;
    v = new[H];
    c = new[H];
    for (int m = 0; m < NMAT; m++) begin
      for (int i = 0; i < H; i++) v[i] = p.v[m][i];
      for (int j = 1; j <= H; j++) begin
        for (int i = 0; i < H; i++) c[i] = refcoef(mat_e'(m), j, i);
        r.r[m][j-1] = dot(c, v);
      end
    end
    r.p0 = p.p0; r.m0 = p.m0; r.s0 = p.s0; r.dalt = p.dalt;
    r.a2m = p.a2m; r.b2m = p.b2m; r.a2z = p.a2z; r.b2l = p.b2l;
    return r;
  endfunction

  // Exact DFT, X(k) = sum_n y(n) exp(-j 2 pi k n / N)
  function automatic void dft(frame_t yr, frame_t yi, output real xr [N], output real xi [N]);
    for (int k = 0; k < N; k++) begin
      xr[k] = 0.0; xi[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        xr[k] += yr[n] * $cos(2.0 * PI * k * n / N) + yi[n] * $sin(2.0 * PI * k * n / N);
        xi[k] += yi[n] * $cos(2.0 * PI * k * n / N) - yr[n] * $sin(2.0 * PI * k * n / N);
      end
    end
  endfunction

  function automatic void random_frame(output frame_t yr, output frame_t yi);
    for (int n = 0; n < N; n++) begin
      yr[n] = int'($urandom_range(0, 255)) - 128;
      yi[n] = int'($urandom_range(0, 255)) - 128;
    end
  endfunction

endpackage
