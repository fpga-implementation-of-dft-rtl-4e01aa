// tb_systolic_array: checks all eight arrays of the DFT core.
//
// One harness per matrix (S, D, SB, DB, A2E, A2O, B2E, B2O) streams random vectors with
// gaps, compares every row with the matrix product computed from the
// defining cosine/sine equations, and checks that each result appears
// exactly ARRAY_LAT clocks after its input (one vector per clock accepted).
// It also checks that the S array has the published layout: the tag of
// every cell, the coefficients entering at the edges, and the coefficients
// reaching interior cells along the diagonals.
module tb_systolic_array;
  import dft_pkg::*;

  logic clk = 0;
  logic rst = 1;
  int   c [8], f [8];
  logic d [8];
  int   checks, failures;

  always #5 clk = ~clk;

  sa_harness #(.MAT(MAT_S))   h_s   (.clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  sa_harness #(.MAT(MAT_D))   h_d   (.clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  sa_harness #(.MAT(MAT_SB))  h_sb  (.clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  sa_harness #(.MAT(MAT_DB))  h_db  (.clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  sa_harness #(.MAT(MAT_A2E)) h_a2e (.clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));
  sa_harness #(.MAT(MAT_A2O)) h_a2o (.clk, .rst, .checks(c[5]), .failures(f[5]), .done(d[5]));
  sa_harness #(.MAT(MAT_B2E)) h_b2e (.clk, .rst, .checks(c[6]), .failures(f[6]), .done(d[6]));
  sa_harness #(.MAT(MAT_B2O)) h_b2o (.clk, .rst, .checks(c[7]), .failures(f[7]), .done(d[7]));

  function automatic void total();
    checks = fig_checks; failures = fig_failures;
    for (int i = 0; i < 8; i++) begin
      checks += c[i]; failures += f[i];
    end
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    total();
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The S array must be the published one: tags 1 0 0 / 0 1 0 / 0 0 1,
  // coefficients cos 2b, cos 3b, cos b along the top edge and cos 2b,
  // cos b, cos 3b down the left edge (b = pi/7; 319, 114, 461 at scale 512).
  localparam int FIG_TAG [3][3] = '{'{1, 0, 0}, '{0, 1, 0}, '{0, 0, 1}};
  int fig_checks = 0, fig_failures = 0;
  task automatic fig(input bit ok, input string what);
    fig_checks++;
    if (!ok) begin
      fig_failures++;
      $display("FAIL S array layout: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    fig(h_s.dut.g_row[0].g_col[0].TG == FIG_TAG[0][0], "tag (1,1)");
    fig(h_s.dut.g_row[0].g_col[1].TG == FIG_TAG[0][1], "tag (1,2)");
    fig(h_s.dut.g_row[0].g_col[2].TG == FIG_TAG[0][2], "tag (1,3)");
    fig(h_s.dut.g_row[1].g_col[0].TG == FIG_TAG[1][0], "tag (2,1)");
    fig(h_s.dut.g_row[1].g_col[1].TG == FIG_TAG[1][1], "tag (2,2)");
    fig(h_s.dut.g_row[1].g_col[2].TG == FIG_TAG[1][2], "tag (2,3)");
    fig(h_s.dut.g_row[2].g_col[0].TG == FIG_TAG[2][0], "tag (3,1)");
    fig(h_s.dut.g_row[2].g_col[1].TG == FIG_TAG[2][1], "tag (3,2)");
    fig(h_s.dut.g_row[2].g_col[2].TG == FIG_TAG[2][2], "tag (3,3)");
    fig(h_s.dut.zs[0][0] == 319 && h_s.dut.zs[0][1] == 114 && h_s.dut.zs[0][2] == 461,
        "top-edge coefficients");
    fig(h_s.dut.zs[1][0] == 461 && h_s.dut.zs[2][0] == 114, "left-edge coefficients");
    repeat (3) @(posedge clk);
    fig(h_s.dut.zs[1][1] == 319 && h_s.dut.zs[2][2] == 319 && h_s.dut.zs[1][2] == 114 &&
        h_s.dut.zs[2][1] == 461, "diagonal coefficient flow");
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5] && d[6] && d[7]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
