// tb_post_combine: self-checking test of the output combiner.
//
// For random frames (and an impulse, a constant and full-scale frames) the
// reference model produces the array results the core would deliver; the
// combiner must turn them, one clock later, into all 28 DFT outputs, each
// within 8 of the floating-point DFT of the frame (10-bit coefficients:
// worst case 28*2*128/1024 = 7, plus 1 for rounding).
module tb_post_combine;
  import dft_pkg::*;
  import tb_dft_ref::*;

  localparam int TOL = 8;

  logic  clk = 0;
  logic  rst = 1;
  logic  in_valid = 0;
  core_t res = '0;
  logic  out_valid;
  cout_t x [N];
  int    checks = 0, failures = 0, max_err = 0;

  always #5 clk = ~clk;

  post_combine dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int err(int got, real want);
    int w = int'($floor(want + 0.5));
    return (got > w) ? got - w : w - got;
  endfunction

  initial begin
    frame_t yr, yi;
    real    xr [N], xi [N];
    int     e;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 1000; i++) begin
      random_frame(yr, yi);
      for (int n = 0; n < N; n++) begin
        case (i)
          0: begin yr[n] = (n == 0) ? 100 : 0; yi[n] = (n == 3) ? -50 : 0; end
          1: begin yr[n] = 77; yi[n] = -9; end
          2: begin yr[n] = -128; yi[n] = -128; end
          3: begin yr[n] = (n % 2) ? 127 : -128; yi[n] = (n % 2) ? -128 : 127; end
          default: ;
        endcase
      end
      dft(yr, yi, xr, xi);
      res <= core_of(pre_of(yr, yi));
      in_valid <= 1;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("FAIL out_valid low");
      end
      for (int k = 0; k < N; k++) begin
        e = err(int'(x[k].re), xr[k]);
        if (err(int'(x[k].im), xi[k]) > e) e = err(int'(x[k].im), xi[k]);
        if (e > max_err) max_err = e;
        checks++;
        if (e > TOL) begin
          failures++;
          if (failures < 10)
            $display("FAIL frame %0d X(%0d) = (%0d,%0d) expected (%f,%f)", i, k,
                     x[k].re, x[k].im, xr[k], xi[k]);
        end
      end
      in_valid <= 0;
      @(posedge clk);
    end
    $display("max error %0d", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
