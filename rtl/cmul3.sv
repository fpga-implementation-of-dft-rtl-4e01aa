// cmul3: complex twiddle-factor multiplier with three real multipliers.
//
// Computes (X + jY)(C + jS) = R + jI as
//     R = Y (C - S) + (X - Y) C
//     I = X (C + S) - (X - Y) C
// The shared product (X - Y) C is formed once, so only three multipliers
// are needed. The twiddle factor arrives already prepared as C, C + S and
// C - S (stored in a table by the user of this block), scaled by 2^(W-1);
// the result is divided by 2^(W-1) again by an arithmetic shift, which
// rounds toward minus infinity.
//
// Ports and widths follow the published test of this multiplier: W-bit
// x_in, y_in, c_in and (W+1)-bit cps_in (C+S) and cms_in (C-S), W-bit
// r_out and i_out. Saturation of the outputs to W bits is this design's
// choice (|C + jS| <= 1 keeps results in range except at the extremes).
// The block is purely combinational.
module cmul3 #(
  parameter int W = 10
) (
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [W-1:0] c_in,
  input  logic signed [W:0]   cps_in,
  input  logic signed [W:0]   cms_in,
  output logic signed [W-1:0] r_out,
  output logic signed [W-1:0] i_out
);

  localparam int PW = 2 * W + 3;
  typedef logic signed [PW-1:0] p_t;

  localparam p_t MAXV = p_t'((1 <<< (W - 1)) - 1);
  localparam p_t MINV = -p_t'(1 <<< (W - 1));

  p_t xmy, p_shared, p_r, p_i, r_full, i_full;

  function automatic logic signed [W-1:0] sat(p_t v);
    if (v > MAXV) return MAXV[W-1:0];
    if (v < MINV) return MINV[W-1:0];
    return v[W-1:0];
  endfunction

  always_comb begin
    xmy      = p_t'(x_in) - p_t'(y_in);
    p_shared = xmy * p_t'(c_in);
    p_r      = p_t'(y_in) * p_t'(cms_in);
    p_i      = p_t'(x_in) * p_t'(cps_in);
    r_full   = (p_r + p_shared) >>> (W - 1);
    i_full   = (p_i - p_shared) >>> (W - 1);
    r_out    = sat(r_full);
    i_out    = sat(i_full);
  end

endmodule
