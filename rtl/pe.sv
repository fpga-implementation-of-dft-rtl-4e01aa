// pe: processing element of the systolic DFT arrays.
//
// Every element of every array is this same cell. It takes a partial sum
// X_in from its left neighbour, a data value Y_in from above and a
// coefficient magnitude Z_in from its upper-left neighbour (or from the
// array edge), and forms
//     tag = 1 : X_out = X_in + Y_in * Z_in
//     tag = 0 : X_out = X_in - Y_in * Z_in
//     Y_out = Y_in,  Z_out = Z_in
// The data are complex and the coefficient is real, so the cell holds two
// multipliers and two adder/subtractors, one pair for the real part and one
// for the imaginary part. The tag is fixed per cell (a parameter), as it is
// part of the constant matrix the array computes.
//
// Timing: all three outputs are registered, so a value spends one clock in
// each cell; this is the pipelining that makes the array systolic. The
// registered outputs and synchronous reset are this design's choice.
module pe
  import dft_pkg::*;
#(
  parameter bit TAG = 1'b1
) (
  input  logic  clk,
  input  logic  rst,
  input  cacc_t x_in,
  input  cdat_t y_in,
  input  coef_t z_in,
  output cacc_t x_out,
  output cdat_t y_out,
  output coef_t z_out
);

  acc_t prod_re, prod_im;

  always_comb begin
    prod_re = acc_t'(y_in.re) * acc_t'(signed'({1'b0, z_in}));
    prod_im = acc_t'(y_in.im) * acc_t'(signed'({1'b0, z_in}));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_out <= '0;
      y_out <= '0;
      z_out <= '0;
    end else begin
      x_out.re <= TAG ? x_in.re + prod_re : x_in.re - prod_re;
      x_out.im <= TAG ? x_in.im + prod_im : x_in.im - prod_im;
      y_out    <= y_in;
      z_out    <= z_in;
    end
  end

endmodule
