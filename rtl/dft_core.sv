// dft_core: the systolic part of the 28-point DFT.
//
// Eight 3x3 systolic arrays of identical processing elements work side by
// side on one block of pre-added values, one array per matrix of mat_e:
//   S,   D    A1 at even and odd k   (cosine sum over even-index samples)
//   SB,  DB   B1 at even and odd k   (sine sum over even-index samples)
//   A2E, A2O  A2 at even and odd k   (cosine sum over odd-index samples)
//   B2E, B2O  B2 at even and odd k   (sine sum over odd-index samples)
// Each is a 3-point circular convolution (M = 7 is prime); S is the
// published array and the others are built the same way. The array-free
// terms (a1(0) +/- a1(M), the sums for A1(0), A1(M), A2(0), B2(M) and the
// middle samples a2(3), b2(3)) travel through a matching delay.
//
// The rows of some arrays come out in the order 1, 3, 2 (see row_k); they
// are put back in natural order here, so res.r[x][j-1] is output j of
// array x.
//
// Timing: a block presented with in_valid comes out ARRAY_LAT clocks later
// with out_valid; a new block can be accepted every clock. Array results
// are at the coefficient scale 2^FRAC; the carried terms at input scale.
module dft_core
  import dft_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  pre_t  pre,
  output logic  out_valid,
  output core_t res
);

  localparam int NSIDE = 8;

  cacc_t       r_out [NMAT][H];
  logic [NMAT-1:0] v;

  for (genvar m = 0; m < NMAT; m++) begin : g_arr
    localparam mat_e MX = mat_e'(m);
    cdat_t y_in [H];

    for (genvar i = 0; i < H; i++) begin : g_in
      assign y_in[i] = pre.v[m][i];
    end

    systolic_array #(.MAT(MX)) u_sa (
      .clk, .rst, .in_valid, .y_in, .out_valid(v[m]), .x_out(r_out[m])
    );
  end

  // Array-free terms, delayed to line up with the array outputs.
  logic [NSIDE*$bits(cdat_t)-1:0] side_d, side_q;
  assign side_d = {pre.p0, pre.m0, pre.s0, pre.dalt, pre.a2m, pre.b2m, pre.a2z, pre.b2l};
  delay_line #(.WIDTH(NSIDE * $bits(cdat_t)), .DEPTH(ARRAY_LAT)) u_side (
    .clk, .rst, .d(side_d), .q(side_q)
  );

  always_comb begin
    for (int m = 0; m < NMAT; m++)
      for (int r = 0; r < H; r++)
        res.r[m][row_k(mat_e'(m), r) - 1] = r_out[m][r];
    {res.p0, res.m0, res.s0, res.dalt, res.a2m, res.b2m, res.a2z, res.b2l} = side_q;
  end

  // All arrays share one latency, so any of them gives the valid.
  assign out_valid = v[0];

  always_ff @(posedge clk) begin
    if (!rst) assert (v == '0 || v == '1)
      else $error("dft_core: arrays out of step");
  end

endmodule
