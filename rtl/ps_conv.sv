// ps_conv: parallel-to-serial converter at the DFT output.
//
// When load is high the N parallel results x[0..N-1] are captured. Over the
// following N clocks they are presented one per clock on y, in the order
// X(0), X(1), ..., X(N-1), with out_valid high and out_k giving the
// frequency index of the value on y.
//
// The conversion follows the published design; out_k and the overrun
// check are this design's additions. A new load may arrive at the earliest
// on the clock that ends the last output of the previous frame, which the
// input converter guarantees (a frame takes at least N clocks to collect);
// an earlier load is an overrun and is reported by an assertion.
module ps_conv
  import dft_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  cout_t x [N],
  output logic  out_valid,
  output logic [$clog2(N)-1:0] out_k,
  output cout_t y
);

  cout_t hold [N];
  logic  busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      out_k <= '0;
      for (int k = 0; k < N; k++) hold[k] <= '0;
    end else if (load) begin
      hold  <= x;
      busy  <= 1'b1;
      out_k <= '0;
    end else if (busy) begin
      if (out_k == $bits(out_k)'(N - 1)) begin
        busy  <= 1'b0;
        out_k <= '0;
      end else begin
        out_k <= out_k + 1'b1;
      end
    end
  end

  assign out_valid = busy;
  assign y         = hold[out_k];

  always_ff @(posedge clk) begin
    if (!rst && load)
      assert (!busy || out_k == $bits(out_k)'(N - 1))
        else $error("ps_conv: new frame loaded before the previous one was sent");
  end

endmodule
