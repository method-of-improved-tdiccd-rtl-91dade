// vclk_gen_tb: checks the vertical CI clocks in both modes.
// Continuous: for each line of LINE_CLKS clocks (VBIN changed between lines)
// the CI clocks must make exactly 4*VBIN legal 4-phase steps (each a left
// rotation of the previous levels), finish VBIN full periods, and keep CI1
// high for half the line within one step. Burst: a start pulse must give
// 4*VBIN steps exactly BURST_STEP_CLKS apart, done on the last one, then
// no movement.
module vclk_gen_tb;
  import tdi_pkg::*;
  localparam int unsigned LINE = 100;
  localparam int unsigned BSTEP = 3;
  logic clk = 0, rst_n = 0, cont_en = 0, burst_start = 0;
  logic [BIN_W-1:0] vbin = 1;
  logic [3:0] ci, prev;
  logic ci_cycle_done, burst_busy, burst_done;
  int checks = 0, failures = 0;
  int steps = 0, periods = 0, high1 = 0, last_step_t = 0, t = 0, gap_bad = 0;

  vclk_gen #(.LINE_CLKS(LINE), .BURST_STEP_CLKS(BSTEP)) dut (
    .clk, .rst_n, .cont_en, .vbin, .burst_start,
    .ci, .ci_cycle_done, .burst_busy, .burst_done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Step monitor.
  always @(posedge clk) begin
    #1;
    t++;
    if (rst_n) begin
      if (ci !== prev) begin
        steps++;
        if (ci !== {prev[2:0], prev[3]}) begin
          failures++;
          $display("illegal CI step %b -> %b", prev, ci);
        end
        if (!cont_en && steps > 1 && t - last_step_t != BSTEP) gap_bad++;
        last_step_t = t;
      end
      if (ci_cycle_done) periods++;
      if (ci[0]) high1++;
    end
    prev = ci;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // Continuous mode.
    for (int line = 0; line < 30; line++) begin
      int v;
      @(negedge clk);
      v = 1 + ($urandom % 15);
      vbin = BIN_W'(v);
      cont_en = 1;
      steps = 0; periods = 0; high1 = 0;
      repeat (LINE) @(posedge clk);
      #2;
      checks++;
      if (steps != 4 * v) begin
        failures++;
        $display("line %0d vbin %0d: %0d steps", line, v, steps);
      end
      @(posedge clk); #2;  // the period-end flag is registered
      checks++;
      if (periods != v) begin
        failures++;
        $display("line %0d vbin %0d: %0d periods", line, v, periods);
      end
      checks++;
      if (high1 < LINE / 2 - LINE / (4 * v) - 2 || high1 > LINE / 2 + LINE / (4 * v) + 2) begin
        failures++;
        $display("line %0d vbin %0d: CI1 high %0d of %0d", line, v, high1, LINE);
      end
      // realign: back up one clock for the next line window
      @(negedge clk); cont_en = 0;
      @(negedge clk);
    end
    // Burst mode.
    for (int b = 0; b < 10; b++) begin
      int v, len, donet;
      v = 1 + ($urandom % 15);
      @(negedge clk);
      vbin = BIN_W'(v);
      burst_start = 1;
      steps = 0; gap_bad = 0; donet = -1; len = 0;
      @(negedge clk); burst_start = 0;
      while (burst_busy) begin
        @(posedge clk); #2; len++;
        if (burst_done && donet < 0) donet = len;
      end
      repeat (10) @(posedge clk);
      #2;
      checks++;
      if (steps != 4 * v || gap_bad != 0) begin
        failures++;
        $display("burst vbin %0d: %0d steps, %0d bad gaps", v, steps, gap_bad);
      end
      checks++;
      if (len != 4 * v * BSTEP || donet != len) begin
        failures++;
        $display("burst vbin %0d: length %0d done at %0d", v, len, donet);
      end
      checks++;
      if (ci !== 4'b0011 && b == 0) begin
        failures++;
        $display("CI not at rest after burst: %b", ci);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
