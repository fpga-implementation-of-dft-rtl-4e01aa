// sp_conv: serial-to-parallel converter at the DFT input.
//
// Complex samples arrive one per clock on x while in_valid is high (a low
// in_valid simply pauses the frame). Sample n of a frame is written to
// slot n; when the N-th sample (n = N-1) is taken, the whole frame is
// copied to the parallel output y and blk_valid is raised for one clock.
// y then holds that frame while the next one is collected, so frames can
// follow each other with no gap.
//
// The conversion follows the published design; the in_valid pause, the
// frame counter restarting at reset and the double buffer (collect + hold)
// are this design's choice. Latency: y and blk_valid are valid the clock
// after the last sample of the frame.
module sp_conv
  import dft_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  cin_t x,
  output logic blk_valid,
  output cin_t y [N]
);

  cin_t collect [N-1];             // the last sample goes straight to y
  logic [$clog2(N)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      blk_valid <= 1'b0;
      for (int n = 0; n < N; n++) y[n] <= '0;
      for (int n = 0; n < N - 1; n++) collect[n] <= '0;
    end else begin
      blk_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == $bits(cnt)'(N - 1)) begin
          cnt <= '0;
          for (int n = 0; n < N - 1; n++) y[n] <= collect[n];
          y[N-1]    <= x;
          blk_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          collect[cnt] <= x;
        end
      end
    end
  end

endmodule
