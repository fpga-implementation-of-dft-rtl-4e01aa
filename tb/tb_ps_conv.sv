// tb_ps_conv: self-checking test of the parallel-to-serial converter.
//
// Random blocks of 28 complex results are loaded, sometimes exactly 28
// clocks apart (the tightest spacing, no idle output clock between frames)
// and sometimes with idle clocks between. After each load the block must
// come out on the next 28 clocks in index order, with out_valid high and
// out_k equal to the index; out_valid must be low when nothing is pending.
module tb_ps_conv;
  import dft_pkg::*;

  logic  clk = 0;
  logic  rst = 1;
  logic  load = 0;
  cout_t x [N];
  logic  out_valid;
  logic [4:0] out_k;
  cout_t y;
  int    checks = 0, failures = 0;
  int    back_to_back = 0;

  always #5 clk = ~clk;

  ps_conv dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cout_t expq [$];
  int    expk [$];

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      checks++;
      if (out_valid != (expq.size() != 0)) begin
        failures++;
        $display("FAIL out_valid=%0b with %0d pending", out_valid, expq.size());
      end else if (out_valid) begin
        if (y != expq[0] || int'(out_k) != expk[0]) begin
          failures++;
          $display("FAIL out_k=%0d expected %0d", out_k, expk[0]);
        end
        void'(expq.pop_front()); void'(expk.pop_front());
      end
    end
  end

  initial begin
    for (int k = 0; k < N; k++) x[k] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int f = 0; f < 30; f++) begin
      for (int k = 0; k < N; k++) begin
        x[k].re <= out_t'($urandom);
        x[k].im <= out_t'($urandom);
      end
      load <= 1;
      @(posedge clk);
      for (int k = 0; k < N; k++) begin
        expq.push_back(x[k]);
        expk.push_back(k);
      end
      load <= 0;
      for (int k = 0; k < N; k++) x[k] <= '0;
      if (f % 2 == 0) begin
        repeat (N - 1) @(posedge clk);               // next load 28 clocks later
        back_to_back++;
      end else begin
        repeat (N - 1 + $urandom_range(1, 10)) @(posedge clk);
      end
    end
    repeat (N + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0 || back_to_back == 0) begin
      failures++;
      $display("FAIL %0d outputs never came out", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
