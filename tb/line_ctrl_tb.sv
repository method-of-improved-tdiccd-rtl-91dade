// line_ctrl_tb: checks the line/frame sequencer with stand-in responders
// that answer burst, transfer and readout starts after fixed delays.
// Checks: lines start every LINE clocks; continuous lines start the
// transfer one clock after the line start, with CI running and no burst;
// burst lines run burst -> transfer -> readout, each started one clock
// after the previous done; area frames give one FSYN, INT integration
// lines with nothing started, then ROWS burst lines, frame period
// (INT+ROWS)*LINE; a configuration change inside a frame waits for its end;
// the overrun flag rises only when the readout outlasts the line.
module line_ctrl_tb;
  import tdi_pkg::*;
  localparam int unsigned LINE = 60;
  localparam int unsigned DB = 5, DX = 4, DH = 20;
  logic clk = 0, rst_n = 0, enable = 0;
  tdi_mode_e mode = MODE_TDI_CONT;
  logic [BIN_W-1:0] hbin = 1, vbin = 1;
  logic [15:0] int_lines = 0, frame_rows = 0;
  logic burst_done = 0, xfer_done = 0, hread_done = 0;
  logic cont_en, burst_start, xfer_start, hread_start, line_sync, fsyn, integrating, overrun;
  tdi_mode_e mode_q;
  logic [BIN_W-1:0] hbin_q, vbin_q;
  int checks = 0, failures = 0, t = 0, dh = DH;
  int t_line = -1, t_burst = -1, t_xfer = -1, t_hread = -1, t_fsyn = -1, t_bdone = -1, t_xdone = -1;
  int n_line = 0, n_burst = 0, n_xfer = 0, n_hread = 0, n_fsyn = 0, n_integ_lines = 0;
  int frame_period = 0, t_hdone = -1;

  line_ctrl #(.LINE_CLKS(LINE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stand-in responders.
  always @(posedge clk) begin
    burst_done <= (t_burst >= 0 && t == t_burst + DB - 1);
    xfer_done  <= (t_xfer  >= 0 && t == t_xfer  + DX - 1);
    hread_done <= (t == t_hdone);
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("t=%0d: %s", t, msg); end
  endtask

  // Event monitor.
  always @(posedge clk) begin
    #1;
    t++;
    if (line_sync) begin
      if (t_line >= 0) chk(t - t_line == LINE, "line period");
      t_line = t; n_line++;
      if (integrating) n_integ_lines++;
    end
    if (fsyn) begin
      if (t_fsyn >= 0) frame_period = t - t_fsyn;
      t_fsyn = t; n_fsyn++;
      chk(line_sync, "FSYN not on a line start");
    end
    if (burst_start) begin
      chk(line_sync && mode_q != MODE_TDI_CONT && !cont_en, "burst start");
      t_burst = t; n_burst++;
    end
    if (burst_done) t_bdone = t;
    if (xfer_done) t_xdone = t;
    if (xfer_start) begin
      if (mode_q == MODE_TDI_CONT) chk(line_sync && cont_en, "continuous line: transfer at line start");
      else chk(t == t_bdone + 1, "transfer one clock after burst done");
      t_xfer = t; n_xfer++;
    end
    if (hread_start) begin
      chk(t == t_xdone + 1, "readout one clock after transfer done");
      t_hread = t; n_hread++;
      t_hdone = t + dh - 1;
    end
    if (integrating) chk(!burst_start && !xfer_start && !hread_start && !cont_en, "activity while integrating");
  end

  task automatic run_lines(int n);
    repeat (n * LINE) @(posedge clk);
  endtask

  task automatic zero();
    n_line = 0; n_burst = 0; n_xfer = 0; n_hread = 0; n_fsyn = 0; n_integ_lines = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // Continuous TDI.
    mode = MODE_TDI_CONT; vbin = 3; hbin = 2; enable = 1;
    run_lines(6); #2;
    chk(n_line >= 5 && n_burst == 0 && n_xfer >= 5 && n_hread >= 5, "continuous mode counts");
    chk(vbin_q == 3 && hbin_q == 2 && mode_q == MODE_TDI_CONT, "config latched");
    chk(!overrun, "no overrun in continuous mode");
    // Burst TDI.
    mode = MODE_TDI_BURST; vbin = 2;
    run_lines(2); zero(); run_lines(5); #2;
    chk(n_line == 5 && n_burst == 5 && n_xfer == 5 && n_hread == 5, "burst mode counts");
    chk(mode_q == MODE_TDI_BURST && !cont_en, "burst mode latched");
    // Area array: 4 integration lines, 3 rows.
    @(negedge clk);
    mode = MODE_AREA; int_lines = 4; frame_rows = 3;
    run_lines(2); zero(); run_lines(7 * 3); #2;
    chk(n_fsyn == 3, "one FSYN per frame");
    chk(frame_period == 7 * LINE, "frame period");
    chk(n_integ_lines == 12 && n_burst == 9 && n_hread == 9, "area frame structure");
    // A change requested inside a frame waits for the frame end.
    wait (fsyn); @(negedge clk);
    mode = MODE_TDI_CONT;
    run_lines(3); #2;
    chk(mode_q == MODE_AREA, "mode held inside area frame");
    run_lines(5); #2;
    chk(mode_q == MODE_TDI_CONT, "mode switched after the frame");
    chk(!overrun, "no overrun before the slow readout");
    // Readout longer than a line: overrun.
    dh = LINE;
    run_lines(3); #2;
    chk(overrun, "overrun flagged");
    // Disable stops at a line boundary.
    dh = DH;
    enable = 0;
    run_lines(2); zero(); run_lines(2); #2;
    chk(n_line == 0 && !cont_en, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
