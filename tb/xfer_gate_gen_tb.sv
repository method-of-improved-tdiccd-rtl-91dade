// xfer_gate_gen_tb: checks the SCK/TCK transfer window.
// After a start pulse the window must last XFER_CLKS clocks, SCK must be
// high on window clocks 1..2 and TCK on 4..5, done on the last clock, and
// nothing may happen without a start. A start during a window is ignored.
module xfer_gate_gen_tb;
  logic clk = 0, rst_n = 0, start = 0;
  logic sck, tck, hban, done;
  int checks = 0, failures = 0;

  xfer_gate_gen dut (.clk, .rst_n, .start, .sck, .tck, .hban, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_idle(int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      checks++;
      if (sck || tck || hban || done) begin
        failures++;
        $display("activity while idle");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    expect_idle(5);
    for (int rep = 0; rep < 20; rep++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = (rep % 3 == 0);  // extra start mid-window
      for (int c = 0; c < 8; c++) begin
        #1;
        checks++;
        if (hban !== 1'b1 || sck !== (c == 1 || c == 2) || tck !== (c == 4 || c == 5)
            || done !== (c == 7)) begin
          failures++;
          $display("rep %0d clock %0d: hban=%b sck=%b tck=%b done=%b", rep, c, hban, sck, tck, done);
        end
        @(negedge clk); start = 0;
      end
      #1;
      checks++;
      if (hban) begin failures++; $display("window too long"); end
      expect_idle($urandom % 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
