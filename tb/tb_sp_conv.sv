// tb_sp_conv: self-checking test of the serial-to-parallel converter.
//
// Random complex samples are streamed with random in_valid gaps. After
// every 28th accepted sample, blk_valid must pulse for exactly one clock,
// on the clock after that sample, and y must hold the 28 samples of the
// frame in order, and keep holding them until the next frame completes.
module tb_sp_conv;
  import dft_pkg::*;

  logic clk = 0;
  logic rst = 1;
  logic in_valid = 0;
  cin_t x = '0;
  logic blk_valid;
  cin_t y [N];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_conv dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cin_t sent [$];
  cin_t last_frame [N];
  int   taken = 0, frames = 0;
  bit   pulse_due = 0;

  // Checker, sampling just after each rising edge.
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      checks++;
      if (blk_valid !== pulse_due) begin
        failures++;
        $display("FAIL blk_valid=%0b expected %0b", blk_valid, pulse_due);
      end
      if (blk_valid) begin
        frames++;
        for (int n = 0; n < N; n++) last_frame[n] = sent[n];
        for (int n = 0; n < N; n++) void'(sent.pop_front());
      end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (frames > 0 && y[n] != last_frame[n]) begin
          failures++;
          $display("FAIL frame %0d slot %0d", frames, n);
        end
      end
    end
  end

  initial begin
    cin_t v;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 28 * 20; ) begin
      in_valid <= ($urandom_range(0, 3) != 0) || (i >= 28 * 10);   // gaps, then none
      v.re = in_t'($urandom); v.im = in_t'($urandom);
      x <= v;
      @(posedge clk);
      pulse_due = 0;
      if (in_valid) begin
        sent.push_back(x);
        i++;
        if (i % N == 0) pulse_due = 1;
      end
    end
    in_valid <= 0;
    repeat (3) begin
      @(posedge clk);
      pulse_due = 0;
    end
    checks++;
    if (frames != 20) begin
      failures++;
      $display("FAIL %0d frames, expected 20", frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
