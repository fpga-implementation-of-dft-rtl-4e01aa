// tb_dft28: end-to-end test of the 28-point systolic DFT at full size.
//
// Frames of 28 complex 8-bit samples are streamed into the top: random
// frames, an impulse, a constant, a single tone and full-scale frames, some
// back to back, some with in_valid pauses inside the frame. For every frame
// the DFT is computed here in floating point,
//     X(k) = sum_n y(n) exp(-j 2 pi k n / 28),
// and each serial output must be within TOL of it (the hardware uses
// 10-bit coefficients; the worst-case coefficient error over 28 samples of
// magnitude 128 is 28*2*128/1024 = 7, plus 1 for the final rounding).
// It also checks the output order (out_k = 0..27 on consecutive clocks)
// and the latency: X(0) must appear 9 clocks after the last sample.
// The twiddle multiplier ports are checked with the published test vectors
// and random ones against R = XC - YS, I = XS + YC.
// Mechanisms counted, each of which must occur: frames following each
// other with no idle clock, and frames paused by in_valid.
module tb_dft28;
  import dft_pkg::*;

  localparam real PI  = 3.14159265358979323846;
  localparam int  TOL = 8;
  localparam int  LATENCY = 9;

  logic clk = 0;
  logic rst = 1;
  logic in_valid = 0;
  in_t  x_r = '0, x_i = '0;
  logic out_valid;
  logic [4:0] out_k;
  out_t y_r, y_i;
  logic signed [9:0]  tw_x_in = '0, tw_y_in = '0, tw_c_in = '0;
  logic signed [10:0] tw_cps_in = '0, tw_cms_in = '0;
  logic signed [9:0]  tw_r_out, tw_i_out;

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_paused = 0, n_frames_out = 0;
  int max_err = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(negedge clk) cycle <= cycle + 1;   // stable at every rising edge

  dft28 dut (.*);

  // expected spectra and the clock of each frame's last sample
  real    exp_re [$], exp_im [$];
  longint last_in [$];

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one frame; kind selects the content; pause inserts idle clocks.
  task automatic send_frame(input int kind, input bit pause);
    int sr [N], si [N];
    real er, ei;
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: begin sr[n] = $urandom_range(0, 255) - 128; si[n] = $urandom_range(0, 255) - 128; end
        1: begin sr[n] = (n == 0) ? 100 : 0; si[n] = 0; end            // impulse
        2: begin sr[n] = 50; si[n] = -30; end                            // constant
        3: begin                                                          // tone at k = 5
             sr[n] = int'($floor(100.0 * $cos(2.0 * PI * 5 * n / N) + 0.5));
             si[n] = int'($floor(100.0 * $sin(2.0 * PI * 5 * n / N) + 0.5));
           end
        4: begin sr[n] = -128; si[n] = 127; end                          // full scale
        default: begin sr[n] = (n % 2) ? 127 : -128; si[n] = (n % 3) ? -128 : 127; end
      endcase
    end
    for (int k = 0; k < N; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        er += sr[n] * $cos(2.0 * PI * k * n / N) + si[n] * $sin(2.0 * PI * k * n / N);
        ei += si[n] * $cos(2.0 * PI * k * n / N) - sr[n] * $sin(2.0 * PI * k * n / N);
      end
      exp_re.push_back(er); exp_im.push_back(ei);
    end
    for (int n = 0; n < N; n++) begin
      if (pause && (n == 5 || n == 17)) begin
        in_valid <= 1'b0;
        repeat ($urandom_range(1, 4)) @(posedge clk);
      end
      in_valid <= 1'b1;
      x_r <= in_t'(sr[n]);
      x_i <= in_t'(si[n]);
      @(posedge clk);
    end
    last_in.push_back(cycle);
    if (pause) n_paused++;
  endtask

  // Output checker
  int expect_k = 0;
  longint frame_start = 0;
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int er, ei, d;
      check($sformatf("out_k %0d expected %0d", out_k, expect_k), out_k == 5'(expect_k));
      if (expect_k == 0) begin
        check("output without an input frame", last_in.size() != 0);
        if (last_in.size() != 0) begin
          check($sformatf("latency %0d expected %0d", cycle - last_in[0], LATENCY),
                cycle - last_in[0] == LATENCY);
          void'(last_in.pop_front());
        end
        frame_start = cycle;
      end else begin
        check("outputs not on consecutive clocks", cycle == frame_start + expect_k);
      end
      if (exp_re.size() != 0) begin
        er = int'($floor(exp_re[0] + 0.5));
        ei = int'($floor(exp_im[0] + 0.5));
        d = (y_r > er) ? y_r - er : er - y_r;
        if (d > max_err) max_err = d;
        check($sformatf("X(%0d).re = %0d expected %0d", out_k, y_r, er), d <= TOL);
        d = (y_i > ei) ? y_i - ei : ei - y_i;
        if (d > max_err) max_err = d;
        check($sformatf("X(%0d).im = %0d expected %0d", out_k, y_i, ei), d <= TOL);
        void'(exp_re.pop_front()); void'(exp_im.pop_front());
      end else begin
        check("unexpected output", 1'b0);
      end
      if (expect_k == N - 1) begin
        expect_k = 0;
        n_frames_out++;
      end else begin
        expect_k++;
      end
    end
  end

  // Twiddle multiplier: scaled by 512, floor.
  task automatic tw_check(input int x, input int y, input int c, input int s);
    int r_exp, i_exp;
    tw_x_in = 10'(x); tw_y_in = 10'(y); tw_c_in = 10'(c);
    tw_cps_in = 11'(c + s); tw_cms_in = 11'(c - s);
    #1;
    r_exp = int'($floor(real'(x * c - y * s) / 512.0));
    i_exp = int'($floor(real'(x * s + y * c) / 512.0));
    if (r_exp > 511) r_exp = 511; if (r_exp < -512) r_exp = -512;
    if (i_exp > 511) i_exp = 511; if (i_exp < -512) i_exp = -512;
    check($sformatf("twiddle (%0d,%0d)*(%0d,%0d): R %0d expected %0d", x, y, c, s,
                    tw_r_out, r_exp), int'(tw_r_out) == r_exp);
    check($sformatf("twiddle (%0d,%0d)*(%0d,%0d): I %0d expected %0d", x, y, c, s,
                    tw_i_out, i_exp), int'(tw_i_out) == i_exp);
  endtask

  initial begin
    int c, s;
    real th;
    // published twiddle multiplier vectors: C = C+S = C-S = 0x1CD
    tw_check(-134, -43, 461, 0);
    check("published R -121, I -39", int'(tw_r_out) == -121 && int'(tw_i_out) == -39);
    tw_check(34, 149, 461, 0);
    check("published R 30, I 134", int'(tw_r_out) == 30 && int'(tw_i_out) == 134);
    tw_check(85, -43, 461, 0);
    check("published R 76, I -39", int'(tw_r_out) == 76 && int'(tw_i_out) == -39);
    for (int i = 0; i < 200; i++) begin
      th = 2.0 * PI * $urandom_range(0, 27) / 28.0;
      c = int'($floor(511.0 * $cos(th) + 0.5));
      s = int'($floor(511.0 * $sin(th) + 0.5));
      tw_check($urandom_range(0, 1023) - 512, $urandom_range(0, 1023) - 512, c, s);
    end

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // back-to-back run of frames of every kind
    for (int kind = 0; kind < 6; kind++) begin
      send_frame(kind, 1'b0);
      if (kind > 0) n_back_to_back++;
    end
    // frames with pauses, and idle gaps between frames
    for (int i = 0; i < 4; i++) begin
      send_frame(0, 1'b1);
      in_valid <= 1'b0;
      repeat ($urandom_range(0, 40)) @(posedge clk);
    end
    // more back-to-back random frames
    for (int i = 0; i < 6; i++) begin
      send_frame(0, 1'b0);
      if (i > 0) n_back_to_back++;
    end
    in_valid <= 1'b0;
    repeat (LATENCY + N + 5) @(posedge clk);

    check("every frame came out", n_frames_out == 16 && exp_re.size() == 0);
    check("back-to-back frames happened", n_back_to_back > 0);
    check("paused frames happened", n_paused > 0);
    $display("frames out %0d, back-to-back %0d, paused %0d, max error %0d",
             n_frames_out, n_back_to_back, n_paused, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
