// dft28: 28-point complex DFT built from systolic arrays.
//
// Data path, one frame of N = 28 complex samples at a time:
//   x_r/x_i (serial, one sample per clock while in_valid)
//     -> sp_conv      serial to parallel, one frame every N samples
//     -> pre_add      a(n), b(n), their odd/even split, folded once more
//     -> dft_core     eight 3x3 systolic arrays of tag-controlled PEs
//     -> post_combine A1, A, B by the symmetry relations, X = A - jB
//     -> ps_conv      parallel to serial
//   y_r/y_i (serial, X(0)..X(27), one per clock while out_valid; out_k
//            is the frequency index)
// Alongside the transform sits the three-multiplier twiddle multiplier
// (cmul3) with its own ports (tw_*), exactly as it is exercised on its own;
// the transform path does not use it.
//
// Timing: frames may follow each other without a gap (one frame per N
// clocks of in_valid). The first output of a frame appears
// 1 + 1 + ARRAY_LAT + 1 + 1 = 9 clocks after its last input sample, and
// the N outputs then follow on consecutive clocks. Reset is synchronous and
// active high. Input 8-bit and output 17-bit widths follow the published
// simulation; y = X(k) rounded toward minus infinity.
module dft28
  import dft_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // transform
  input  logic                in_valid,
  input  in_t                 x_r,
  input  in_t                 x_i,
  output logic                out_valid,
  output logic [4:0]          out_k,
  output out_t                y_r,
  output out_t                y_i,
  // twiddle multiplier
  input  logic signed [9:0]   tw_x_in,
  input  logic signed [9:0]   tw_y_in,
  input  logic signed [9:0]   tw_c_in,
  input  logic signed [10:0]  tw_cps_in,
  input  logic signed [10:0]  tw_cms_in,
  output logic signed [9:0]   tw_r_out,
  output logic signed [9:0]   tw_i_out
);

  cin_t  sample;
  cin_t  frame [N];
  logic  frame_valid, pre_valid, core_valid, x_valid;
  pre_t  pre;
  core_t res;
  cout_t xk [N];
  cout_t y;

  assign sample.re = x_r;
  assign sample.im = x_i;

  sp_conv u_sp (
    .clk, .rst, .in_valid, .x(sample), .blk_valid(frame_valid), .y(frame)
  );

  pre_add u_pre (
    .clk, .rst, .in_valid(frame_valid), .y(frame), .out_valid(pre_valid), .pre
  );

  dft_core u_core (
    .clk, .rst, .in_valid(pre_valid), .pre, .out_valid(core_valid), .res
  );

  post_combine u_post (
    .clk, .rst, .in_valid(core_valid), .res, .out_valid(x_valid), .x(xk)
  );

  ps_conv u_ps (
    .clk, .rst, .load(x_valid), .x(xk), .out_valid, .out_k, .y
  );

  assign y_r = y.re;
  assign y_i = y.im;

  cmul3 #(.W(10)) u_tw (
    .x_in(tw_x_in), .y_in(tw_y_in), .c_in(tw_c_in),
    .cps_in(tw_cps_in), .cms_in(tw_cms_in),
    .r_out(tw_r_out), .i_out(tw_i_out)
  );

endmodule
