// tb_dft_core: self-checking test of the systolic DFT core.
//
// Pre-added values of random frames are presented on random clocks (about
// three in four, so blocks also follow each other on consecutive clocks).
// Each block's results (all eight arrays in natural order and the carried
// array-free terms) must appear exactly ARRAY_LAT clocks later with
// out_valid, and equal the matrix products worked out by the reference
// model from the cosine/sine definitions.
module tb_dft_core;
  import dft_pkg::*;
  import tb_dft_ref::*;

  logic  clk = 0;
  logic  rst = 1;
  logic  in_valid = 0;
  pre_t  pre = '0;
  logic  out_valid;
  core_t res;
  int    checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(negedge clk) cycle <= cycle + 1;   // stable at every rising edge

  dft_core dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  core_t  expq [$];
  longint dueq [$];

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (dueq.size() == 0 || dueq[0] != cycle || res != expq[0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL result at clock %0d (due %0d)", cycle, dueq.size() ? dueq[0] : -1);
      end
      if (dueq.size()) begin
        void'(dueq.pop_front()); void'(expq.pop_front());
      end
    end
  end

  initial begin
    frame_t yr, yi;
    pre_t   p;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      random_frame(yr, yi);
      p = pre_of(yr, yi);
      if ($urandom_range(0, 3) != 0) begin
        pre <= p;
        in_valid <= 1;
        expq.push_back(core_of(p));
        dueq.push_back(cycle + 1 + ARRAY_LAT);
      end else begin
        pre <= p;
        in_valid <= 0;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (ARRAY_LAT + 3) @(posedge clk);
    checks++;
    if (dueq.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", dueq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
