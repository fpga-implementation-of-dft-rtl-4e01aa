// systolic_array: constant matrix times complex vector, one vector per clock.
//
// A 3x3 grid of identical processing elements (pe) computes
// x_out[r] = sum_c coef(MAT, r, c) * y_in[c], kept at the coefficient
// scale 2^FRAC. Data flow as in the published S(k) array:
//   * y_in[c] enters the top of column c and moves down one row per clock;
//   * the partial sum enters each row from the left as 0 and moves right
//     one column per clock, leaving the last column as that row's result;
//   * the coefficient magnitude Z enters at the top row and the left
//     column only and then moves diagonally (upper-left to lower-right)
//     through the grid; this works because every matrix is a circular
//     convolution whose magnitudes are constant along each diagonal once
//     its rows are ordered by row_k() (an assertion checks this at time 0);
//   * the sign of each coefficient is the cell's add/subtract tag.
// Row r delivers output j = row_k(MAT, r). With MAT_S the tags are
// 1 0 0 / 0 1 0 / 0 0 1 and the rows give S(1), S(3), S(2), which is the
// published array.
//
// Timing (this design's choice, so that a new vector can be accepted every
// clock): column c is delayed c clocks on entry, and row r is delayed
// LAT-H-r clocks on exit, so every output of a vector appears together
// exactly LAT clocks after it was presented. out_valid is in_valid
// delayed by LAT. LAT must be at least 2*H-1.
module systolic_array
  import dft_pkg::*;
#(
  parameter mat_e MAT = MAT_S,
  parameter int   LAT = ARRAY_LAT
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cdat_t y_in  [H],
  output logic  out_valid,
  output cacc_t x_out [H]
);

  localparam int ROWS = H;
  localparam int COLS = H;

  initial begin
    assert (LAT >= ROWS + COLS - 1)
      else $error("systolic_array: LAT too small");
  end

  // Grid interconnect. xs[r][c] is the sum entering cell (r,c) from the
  // left; ys[r][c] the data entering from above; zs[r][c] its coefficient.
  cacc_t xs [ROWS][COLS+1];
  cdat_t ys [ROWS+1][COLS];
  coef_t zs [ROWS][COLS];
  cdat_t yo [ROWS][COLS];
  coef_t zo [ROWS][COLS];

  // Input skew: column c enters c clocks late.
  for (genvar c = 0; c < COLS; c++) begin : g_skew
    delay_line #(.WIDTH($bits(cdat_t)), .DEPTH(c)) u_skew (
      .clk, .rst, .d(y_in[c]), .q(ys[0][c])
    );
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign xs[r][0] = '0;
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int  K   = coef(MAT, r, c);
      localparam bit  TG  = (K >= 0);
      localparam int  MAG = (K >= 0) ? K : -K;

      if (r > 0 && c > 0) begin : g_zdiag
        // Coefficient arrives from the upper-left neighbour.
        assign zs[r][c] = zo[r-1][c-1];
        initial assert (MAG == ((coef(MAT, r-1, c-1) >= 0) ? coef(MAT, r-1, c-1)
                                                            : -coef(MAT, r-1, c-1)))
          else $error("systolic_array: matrix is not Toeplitz in magnitude");
      end else begin : g_zedge
        // Top row and left column: the coefficient enters here.
        assign zs[r][c] = coef_t'(MAG);
      end

      pe #(.TAG(TG)) u_pe (
        .clk, .rst,
        .x_in (xs[r][c]),
        .y_in (ys[r][c]),
        .z_in (zs[r][c]),
        .x_out(xs[r][c+1]),
        .y_out(yo[r][c]),
        .z_out(zo[r][c])
      );
      assign ys[r+1][c] = yo[r][c];
    end

    // Output deskew: row r leaves its last cell COLS+r clocks after entry.
    delay_line #(.WIDTH($bits(cacc_t)), .DEPTH(LAT - COLS - r)) u_deskew (
      .clk, .rst, .d(xs[r][COLS]), .q(x_out[r])
    );
  end

  delay_line #(.WIDTH(1), .DEPTH(LAT)) u_valid (
    .clk, .rst, .d(in_valid), .q(out_valid)
  );

endmodule
