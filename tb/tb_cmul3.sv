// tb_cmul3: self-checking test of the three-multiplier twiddle multiplier.
//
// First the published test vectors (C = C+S = C-S = 0x1CD, i.e. S = 0):
//   (-134, -43) -> (-121, -39), (34, 149) -> (30, 134), (85, -43) -> (76, -39).
// Then random inputs with twiddle factors on the unit circle, scaled by 511,
// against R = floor((XC - YS)/512), I = floor((XS + YC)/512), saturated to
// 10 bits.
module tb_cmul3;
  localparam real PI = 3.14159265358979323846;

  logic signed [9:0]  x_in, y_in, c_in, r_out, i_out;
  logic signed [10:0] cps_in, cms_in;
  int checks = 0, failures = 0;

  cmul3 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int y, input int c, input int cps, input int cms);
    x_in = 10'(x); y_in = 10'(y); c_in = 10'(c);
    cps_in = 11'(cps); cms_in = 11'(cms);
    #1;
  endtask

  task automatic expect_out(input int r, input int i);
    checks++;
    if (int'(r_out) != r || int'(i_out) != i) begin
      failures++;
      $display("FAIL (%0d,%0d) c=%0d cps=%0d cms=%0d: got (%0d,%0d) expected (%0d,%0d)",
               x_in, y_in, c_in, cps_in, cms_in, r_out, i_out, r, i);
    end
  endtask

  initial begin
    int c, s, x, y, r, i;
    real th;
    apply(-134, -43, 'h1CD, 'h1CD, 'h1CD); expect_out(-121, -39);
    apply(34, 149, 'h1CD, 'h1CD, 'h1CD);   expect_out(30, 134);
    apply(85, -43, 'h1CD, 'h1CD, 'h1CD);   expect_out(76, -39);
    for (int n = 0; n < 2000; n++) begin
      th = 2.0 * PI * $urandom_range(0, 359) / 360.0;
      c = int'($floor(511.0 * $cos(th) + 0.5));
      s = int'($floor(511.0 * $sin(th) + 0.5));
      x = $urandom_range(0, 1023) - 512;
      y = $urandom_range(0, 1023) - 512;
      apply(x, y, c, c + s, c - s);
      r = int'($floor(real'(x * c - y * s) / 512.0));
      i = int'($floor(real'(x * s + y * c) / 512.0));
      r = (r > 511) ? 511 : (r < -512) ? -512 : r;
      i = (i > 511) ? 511 : (i < -512) ? -512 : i;
      expect_out(r, i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
