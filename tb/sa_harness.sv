// sa_harness: drives one systolic_array with random vectors and checks it.
//
// A random complex vector is presented on about two clocks in three. Each
// expected row result is worked out here from the defining equation of the
// matrix, with coefficients round(512*cos(.)) or round(512*sin(.))
// computed with real arithmetic, and queued with the clock it is due:
// the array must deliver it exactly LAT clocks later, with out_valid set.
module sa_harness
  import dft_pkg::*;
#(
  parameter mat_e MAT   = MAT_S,
  parameter int   NVEC  = 300
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int ROWS = 3;
  localparam int COLS = 3;
  localparam real PI = 3.14159265358979323846;

  logic  in_valid;
  cdat_t y_in  [COLS];
  logic  out_valid;
  cacc_t x_out [ROWS];
  longint cycle = 0;

  systolic_array #(.MAT(MAT)) dut (.clk, .rst, .in_valid, .y_in, .out_valid, .x_out);

  // Output j produced by row r: the published S array gives S(1), S(3),
  // S(2); SB, A2O and B2O need the same order to be circular.
  function automatic int out_j(int r);
    if (MAT == MAT_S || MAT == MAT_SB || MAT == MAT_A2O || MAT == MAT_B2O)
      return (r == 0) ? 1 : (r == 1) ? 3 : 2;
    return r + 1;
  endfunction

  // Reference coefficient of row r, column c, from the equations directly.
  function automatic longint refcoef(int r, int c);
    real a;
    int  j;
    j = out_j(r);
    case (MAT)
      MAT_S:   a = $cos(2.0 * PI * j * (c + 1) / 7.0);
      MAT_D:   a = $cos(PI * (2 * j - 1) * (c + 1) / 7.0);
      MAT_SB:  a = $sin(2.0 * PI * j * (c + 1) / 7.0);
      MAT_DB:  a = $sin(PI * (2 * j - 1) * (c + 1) / 7.0);
      MAT_A2E: a = $cos(PI * j * (2 * c + 1) / 7.0);
      MAT_A2O: a = $cos(PI * (2 * j - 1) * (2 * c + 1) / 14.0);
      MAT_B2E: a = $sin(PI * j * (2 * c + 1) / 7.0);
      default: a = $sin(PI * (2 * j - 1) * (2 * c + 1) / 14.0);
    endcase
    return longint'($floor(a * 512.0 + 0.5));
  endfunction

  longint exp_re [$], exp_im [$], due [$];

  always_ff @(posedge clk) cycle <= cycle + 1;

  initial begin
    longint yr [COLS], yi [COLS];
    longint sr, si;
    checks = 0; failures = 0; done = 0;
    in_valid = 0;
    foreach (y_in[c]) y_in[c] = '0;
    @(negedge rst);
    @(posedge clk);
    for (int v = 0; v < NVEC; ) begin
      #1;
      in_valid = ($urandom_range(0, 2) != 0);
      for (int c = 0; c < COLS; c++) begin
        yr[c] = longint'($urandom_range(0, 4095)) - 2048;
        yi[c] = longint'($urandom_range(0, 4095)) - 2048;
        y_in[c].re = dat_t'(yr[c]);
        y_in[c].im = dat_t'(yi[c]);
      end
      if (in_valid) begin
        for (int r = 0; r < ROWS; r++) begin
          sr = 0; si = 0;
          for (int c = 0; c < COLS; c++) begin
            sr += refcoef(r, c) * yr[c];
            si += refcoef(r, c) * yi[c];
          end
          exp_re.push_back(sr); exp_im.push_back(si);
        end
        due.push_back(cycle + ARRAY_LAT);
        v++;
      end
      @(posedge clk);
    end
    #1 in_valid = 0;
    repeat (ARRAY_LAT + 3) @(posedge clk);
    if (due.size() != 0) begin
      failures++;
      $display("FAIL %s: %0d results never came out", MAT.name(), due.size());
    end
    done = 1;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (due.size() == 0 || due[0] != cycle) begin
        failures++;
        $display("FAIL %s: result at cycle %0d, due %0d", MAT.name(), cycle,
                 due.size() ? due[0] : -1);
      end
      if (due.size()) void'(due.pop_front());
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (exp_re.size() == 0 || longint'(x_out[r].re) != exp_re[0] ||
            longint'(x_out[r].im) != exp_im[0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL %s row %0d: got (%0d,%0d) expected (%0d,%0d)", MAT.name(), r,
                     x_out[r].re, x_out[r].im, exp_re[0], exp_im[0]);
        end
        if (exp_re.size()) begin
          void'(exp_re.pop_front()); void'(exp_im.pop_front());
        end
      end
    end
  end
endmodule
