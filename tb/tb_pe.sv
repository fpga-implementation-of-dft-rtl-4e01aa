// tb_pe: self-checking test of one processing element.
//
// Two cells, one with tag 1 (add) and one with tag 0 (subtract), are fed
// random complex X and Y and random coefficient magnitudes Z every clock.
// One clock later each output is compared with X +/- Y*Z computed here,
// and Y and Z must come out unchanged.
module tb_pe;
  import dft_pkg::*;

  logic  clk = 0;
  logic  rst = 1;
  cacc_t x_in;
  cdat_t y_in;
  coef_t z_in;
  cacc_t xa, xs;
  cdat_t ya, ys;
  coef_t za, zs;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe #(.TAG(1'b1)) u_add (.clk, .rst, .x_in, .y_in, .z_in, .x_out(xa), .y_out(ya), .z_out(za));
  pe #(.TAG(1'b0)) u_sub (.clk, .rst, .x_in, .y_in, .z_in, .x_out(xs), .y_out(ys), .z_out(zs));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xr, xi, yr, yi, z;
    x_in = '0; y_in = '0; z_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      xr = longint'($signed($urandom_range(0, 2**20))) - 2**19;
      xi = longint'($signed($urandom_range(0, 2**20))) - 2**19;
      yr = longint'($urandom_range(0, 4095)) - 2048;
      yi = longint'($urandom_range(0, 4095)) - 2048;
      z  = longint'($urandom_range(0, 512));
      if (i < 4) begin                      // corner values
        yr = (i % 2) ? -2048 : 2047;
        yi = (i % 2) ? 2047 : -2048;
        z  = 512;
      end
      x_in.re = acc_t'(xr); x_in.im = acc_t'(xi);
      y_in.re = dat_t'(yr); y_in.im = dat_t'(yi);
      z_in    = coef_t'(z);
      @(posedge clk);
      #1;
      check("add re", longint'(xa.re), xr + yr * z);
      check("add im", longint'(xa.im), xi + yi * z);
      check("sub re", longint'(xs.re), xr - yr * z);
      check("sub im", longint'(xs.im), xi - yi * z);
      check("y pass", longint'(ya.re), yr);
      check("y pass", longint'(ys.im), yi);
      check("z pass", longint'(za), z);
      check("z pass", longint'(zs), z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
