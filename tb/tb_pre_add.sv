// tb_pre_add: self-checking test of the input pre-adders.
//
// Random frames (and full-scale ones) are applied, one per clock with random
// gaps. One clock later every field of the output (the eight array inputs and the
// array-free terms) must equal the value worked out from the
// decomposition equations by the reference model, and out_valid must follow
// in_valid by one clock.
module tb_pre_add;
  import dft_pkg::*;
  import tb_dft_ref::*;

  logic clk = 0;
  logic rst = 1;
  logic in_valid = 0;
  cin_t y [N];
  logic out_valid;
  pre_t pre;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  pre_add dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t yr, yi;
    pre_t   exp_pre;
    bit     v;
    foreach (y[n]) y[n] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      random_frame(yr, yi);
      if (i < 2) foreach (yr[n]) begin
        yr[n] = (i == 0) ? -128 : 127;
        yi[n] = (i == 0) ? 127 : -128;
      end
      v = (i < 2) || ($urandom_range(0, 3) != 0);
      for (int n = 0; n < N; n++) begin
        y[n].re <= in_t'(yr[n]);
        y[n].im <= in_t'(yi[n]);
      end
      in_valid <= v;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != v) begin
        failures++;
        $display("FAIL out_valid=%0b expected %0b", out_valid, v);
      end
      if (v) begin
        exp_pre = pre_of(yr, yi);
        checks++;
        if (pre != exp_pre) begin
          failures++;
          if (failures < 10) begin
            $display("FAIL frame %0d", i);
            $display("  got      %h", pre);
            $display("  expected %h", exp_pre);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
