// ccd_phase4_tb: checks the 4-phase sequencer against a reference sequence.
// Random step/clear stimulus; each clock the phases must equal the table
// 1100,0110,0011,1001 (phase 1 first) indexed by an independently kept
// count of steps, and cycle_done must pulse exactly after the 4th step.
module ccd_phase4_tb;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [3:0] ph;
  logic [1:0] state;
  logic cycle_done;
  int checks = 0, failures = 0, cyc = 0, ref_n = 0, wraps = 0;
  logic ref_done = 0;
  // Phase levels per step count mod 4, written as {ph4,ph3,ph2,ph1}.
  logic [3:0] table_ph [4] = '{4'b0011, 4'b0110, 4'b1100, 4'b1001};

  ccd_phase4 dut (.clk, .rst_n, .clear, .step, .ph, .state, .cycle_done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      step  = ($urandom % 3) != 0;
      clear = ($urandom % 97) == 0;
      @(posedge clk);
      ref_done = !clear && step && (ref_n % 4 == 3);
      if (clear) ref_n = 0;
      else if (step) ref_n++;
      if (ref_done) wraps++;
      #1;
      checks++;
      if (ph !== table_ph[ref_n % 4]) begin
        failures++;
        $display("ph mismatch at %0d: got %b exp %b", i, ph, table_ph[ref_n % 4]);
      end
      checks++;
      if (cycle_done !== ref_done) begin
        failures++;
        $display("cycle_done mismatch at %0d", i);
      end
    end
    checks++;
    if (wraps < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
