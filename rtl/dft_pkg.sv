// dft_pkg: sizes, data types and coefficient functions shared by the
// 28-point systolic DFT.
//
// The transform length is N = 28 = 4*M with M = 7 (prime), the configuration
// implemented and evaluated for this design. Every real coefficient the
// arrays use is a cosine or sine of an integer multiple of pi/14, so one
// quarter-wave table of 8 entries, COS_Q[m] = round(2^(CW-1) * cos(m*pi/14)),
// m = 0..7, serves all of them. Coefficients carry 2^(CW-1) = 512 as scale
// (a 10-bit coefficient multiplied by 2^(n-1) with n = 10); the final result
// is divided by the same power of two.
//
// The transform is reduced to eight 3x3 constant matrix products (see
// mat_e), each a 3-point circular convolution computed by a systolic array.
//
// A processing element multiplies by the coefficient magnitude and adds or
// subtracts according to a tag bit (tag = 1: add). coef() below therefore
// returns a signed value whose sign becomes the tag and whose magnitude
// becomes the Z input of the element.
package dft_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int N    = 28;          // transform length
  localparam int M    = N / 4;       // 7, prime
  localparam int H    = (M - 1) / 2; // 3, length of the circular convolutions
  localparam int IN_W = 8;           // serial input sample width (x_r, x_i)
  localparam int OUT_W = 17;         // serial output width (y_r, y_i)
  localparam int CW   = 10;          // coefficient magnitude width (unsigned)
  localparam int FRAC = CW - 1;      // coefficient scale 2^FRAC = 512
  localparam int DW   = 12;          // width of pre-added array inputs
  localparam int AW   = 26;          // accumulator width inside the arrays

  // -------------------------------------------------------------- types
  typedef logic signed [IN_W-1:0] in_t;
  typedef logic signed [DW-1:0]   dat_t;
  typedef logic signed [AW-1:0]   acc_t;
  typedef logic signed [OUT_W-1:0] out_t;
  typedef logic        [CW-1:0]   coef_t;

  typedef struct packed { in_t  re; in_t  im; } cin_t;   // input sample
  typedef struct packed { dat_t re; dat_t im; } cdat_t;  // array input
  typedef struct packed { acc_t re; acc_t im; } cacc_t;  // array sum
  typedef struct packed { out_t re; out_t im; } cout_t;  // DFT output

  // The eight constant 3x3 matrices, each computed by one systolic array.
  // Every one is a 3-point circular convolution (M = 7 is prime): with its
  // rows in the order given by row_k(), its magnitudes are constant along
  // each diagonal. j = 1..3 is the output index, n the input index.
  //   MAT_S  : S(j)   = sum_{n=1..3} s(n)   cos(2*pi*j*n/7)       A1(2j)
  //   MAT_D  : D(j)   = sum_{n=1..3} d(n)   cos(pi*(2j-1)*n/7)    A1(2j-1)
  //   MAT_SB : SB(j)  = sum_{n=1..3} sb(n)  sin(2*pi*j*n/7)       B1(2j)
  //   MAT_DB : DB(j)  = sum_{n=1..3} db(n)  sin(pi*(2j-1)*n/7)    B1(2j-1)
  //   MAT_A2E: A2E(j) = sum_{n=0..2} a2e(n) cos(pi*j*(2n+1)/7)    A2(2j)
  //   MAT_A2O: A2O(j) = sum_{n=0..2} a2o(n) cos(pi*(2j-1)*(2n+1)/14)  A2(2j-1)
  //   MAT_B2E: B2E(j) = sum_{n=0..2} b2e(n) sin(pi*j*(2n+1)/7)    B2(2j)
  //   MAT_B2O: B2O(j) = sum_{n=0..2} b2o(n) sin(pi*(2j-1)*(2n+1)/14)  B2(2j-1)
  typedef enum logic [2:0] {
    MAT_S, MAT_D, MAT_SB, MAT_DB, MAT_A2E, MAT_A2O, MAT_B2E, MAT_B2O
  } mat_e;
  localparam int NMAT = 8;

  typedef cdat_t [H-1:0] cvec_t;   // one array input, index n-1 or n
  typedef cacc_t [H-1:0] rvec_t;   // one array result, index j-1

  // Pre-added values for one transform. v[MAT_x] is the input vector of
  // array x: element i holds s(i+1), d(i+1), sb(i+1), db(i+1) or
  // a2e(i), a2o(i), b2e(i), b2o(i). The rest bypass the arrays.
  typedef struct packed {
    cvec_t [NMAT-1:0] v;
    cdat_t p0;     // a1(0) + a1(M)
    cdat_t m0;     // a1(0) - a1(M)
    cdat_t s0;     // s(1) + s(2) + s(3)
    cdat_t dalt;   // -d(1) + d(2) - d(3)
    cdat_t a2m;    // a2(3), the middle odd-index term
    cdat_t b2m;    // b2(3)
    cdat_t a2z;    // A2(0) = a2e(0) + a2e(1) + a2e(2) + a2(3)
    cdat_t b2l;    // B2(M) = b2o(0) - b2o(1) + b2o(2) - b2(3)
  } pre_t;

  // Array results (natural order, coefficient scale 2^FRAC) plus the
  // bypass terms (input scale) of one transform.
  typedef struct packed {
    rvec_t [NMAT-1:0] r;
    cdat_t p0;
    cdat_t m0;
    cdat_t s0;
    cdat_t dalt;
    cdat_t a2m;
    cdat_t b2m;
    cdat_t a2z;
    cdat_t b2l;
  } core_t;

  // Latency, in clocks, of every array (and of the bypass path):
  // 3 + 3 - 1 for a 3x3 array.
  localparam int ARRAY_LAT = 2 * H - 1;

  // Quarter-wave cosine table, round(512*cos(m*pi/14)).
  localparam int COS_Q [8] = '{512, 499, 461, 400, 319, 222, 114, 0};

  // cos(m*pi/14) * 512 for any integer m >= 0.
  function automatic int cos14(input int m);
    int r;
    r = m % 28;
    if (r > 14) r = 28 - r;           // cos is even about pi
    if (r > 7) return -COS_Q[14 - r]; // second quadrant is negative
    return COS_Q[r];
  endfunction

  // sin(m*pi/14) * 512 = cos((7 - m)*pi/14) * 512, for any integer m >= 0.
  function automatic int sin14(input int m);
    return cos14((m % 28 + 21) % 28);
  endfunction

  // Output index j (1..3) produced by row r (0..2) of an array. The S array
  // gives S(1), S(3), S(2) as in the published layout; SB, A2O and B2O need
  // the same order to be Toeplitz, the others the natural one.
  function automatic int row_k(input mat_e mat, input int r);
    if (mat == MAT_S || mat == MAT_SB || mat == MAT_A2O || mat == MAT_B2O)
      return (r == 0) ? 1 : (r == 1) ? 3 : 2;
    return r + 1;
  endfunction

  // Signed, scaled coefficient of row r, column c (both 0-based).
  function automatic int coef(input mat_e mat, input int r, input int c);
    int j;
    j = row_k(mat, r);
    case (mat)
      MAT_S:   return cos14(4 * j * (c + 1));
      MAT_D:   return cos14(2 * (2 * j - 1) * (c + 1));
      MAT_SB:  return sin14(4 * j * (c + 1));
      MAT_DB:  return sin14(2 * (2 * j - 1) * (c + 1));
      MAT_A2E: return cos14(2 * j * (2 * c + 1));
      MAT_A2O: return cos14((2 * j - 1) * (2 * c + 1));
      MAT_B2E: return sin14(2 * j * (2 * c + 1));
      default: return sin14((2 * j - 1) * (2 * c + 1));
    endcase
  endfunction

endpackage
