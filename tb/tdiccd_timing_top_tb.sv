// tdiccd_timing_top_tb: end-to-end test of the TDICCD clock generator at its
// default sizes, driving a behavioural sensor (tdiccd_model) and the
// switch/ADC front end (analog_merge_model).
//
// The test runs continuous TDI, burst TDI and area-array frames with and
// without binning and switches between them. For every line it predicts,
// independently of the generator, how many rows the vertical clocks must
// have summed (VBIN per transfer; rows clocked in continuous mode wait in
// the storage stage for the next transfer) and checks each ADC sample: its
// count per tap (one per HBIN pixels), its tap number and its value (rows
// times the row charge summed over the group). It also checks that no CR
// clock moves while SCK/TCK act, that the CI clocks keep running during
// readout in continuous mode and stand still in burst mode, that at most one
// analog switch is on, that area frames have the set period and no line
// overruns. Each mechanism is counted and must occur at least once.
module tdiccd_timing_top_tb;
  import tdi_pkg::*;
  localparam int unsigned NTAPS = 2, NPIX = 64, LINE = 1024;

  logic clk = 0, rst_n = 0, enable = 0;
  tdi_mode_e mode = MODE_TDI_CONT;
  logic [BIN_W-1:0] hbin = 1, vbin = 1;
  logic [15:0] int_lines = 0, frame_rows = 0;
  logic [3:0] ci;
  logic sck, tck, hban, adc_sample, fsyn, line_sync, integrating, overrun;
  logic [NTAPS-1:0] tap_en, tap_crlst, tap_rg;
  logic [NTAPS-1:0][3:0] tap_cr;
  logic [0:0] adc_tap;
  tdi_mode_e active_mode;
  int node [NTAPS];
  int rows_last, merged, adc_value, conflict;
  logic adc_valid;

  int checks = 0, failures = 0;

  tdiccd_timing_top dut (
    .clk, .rst_n, .enable, .mode, .hbin, .vbin, .int_lines, .frame_rows,
    .ci, .sck, .tck, .hban, .tap_en, .tap_cr, .tap_crlst, .tap_rg,
    .adc_sample, .adc_tap, .fsyn, .line_sync, .integrating, .active_mode, .overrun);

  tdiccd_model #(.NTAPS(NTAPS), .NPIX(NPIX)) u_ccd (
    .clk, .ci, .sck, .tck, .tap_cr, .tap_crlst, .tap_rg, .node, .rows_last);

  analog_merge_model #(.NTAPS(NTAPS)) u_afe (
    .clk, .tap_en, .tap_video(node), .adc_sample, .merged, .adc_value, .adc_valid, .conflict);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  function automatic int row_charge(int t, int c);
    return 1 + ((t * NPIX + c) * 7) % 31;
  endfunction

  // ---- per-line bookkeeping ----
  typedef struct {
    tdi_mode_e mode;
    int hbin, vbin;
    logic integ;
    int rows;
  } line_t;

  line_t cur;
  logic have_line = 0;
  int pending = 0;          // rows clocked since the last transfer
  int frame_left = 0;       // lines left in the current area frame
  int f_int = 0, f_rows = 0, f_hbin = 1, f_vbin = 1;
  int samp_val [$], samp_tap [$];
  int t_fsyn = -1, t = 0, prev_flen = 0;
  logic was_area = 0;
  logic [3:0] prev_ci = 4'b0011;
  logic [NTAPS-1:0][3:0] prev_cr;
  logic prev_hban = 0;
  logic [NTAPS-1:0] prev_en = '0;
  tdi_mode_e last_mode = MODE_TDI_CONT;

  // mechanism counters
  int n_cont = 0, n_burst = 0, n_frames = 0, n_integ = 0, n_area_read = 0;
  int n_hbin = 0, n_vbin = 0, n_switch = 0, n_hban = 0, n_ci_in_read = 0;
  int n_mode_change = 0, n_full_frames = 0;

  task automatic close_line();
    int ngrp, idx;
    if (!have_line) return;
    ngrp = (NPIX + cur.hbin - 1) / cur.hbin;
    if (cur.integ) begin
      chk(samp_val.size() == 0, "samples during integration");
      n_integ++;
    end else begin
      chk(samp_val.size() == NTAPS * ngrp, $sformatf("line: %0d samples, expected %0d",
          samp_val.size(), NTAPS * ngrp));
      chk(rows_last == cur.rows, $sformatf("sensor saw %0d rows, expected %0d", rows_last, cur.rows));
      idx = 0;
      for (int k = 0; k < NTAPS; k++)
        for (int g = 0; g < ngrp; g++) begin
          int e;
          e = 0;
          for (int p = g * cur.hbin; p < (g + 1) * cur.hbin && p < NPIX; p++)
            e += cur.rows * row_charge(k, p);
          checks++;
          if (idx >= samp_val.size() || samp_val[idx] != e || samp_tap[idx] != k) begin
            failures++;
            if (failures < 10) $display("%0t: tap %0d group %0d sample %0d expected %0d", $time, k, g,
                                        (idx < samp_val.size()) ? samp_val[idx] : -1, e);
          end
          idx++;
        end
      if (cur.hbin > 1) n_hbin++;
      if (cur.rows > 1) n_vbin++;
      if (cur.mode == MODE_TDI_CONT) n_cont++;
      else if (cur.mode == MODE_TDI_BURST) n_burst++;
      else n_area_read++;
    end
    // Rows clocked during this line wait for the next transfer.
    if (cur.mode == MODE_TDI_CONT) pending = cur.vbin;
    else if (!cur.integ) pending = 0;
    samp_val.delete(); samp_tap.delete();
  endtask

  always @(posedge clk) begin
    #2;
    t++;
    if (rst_n) begin
      if (adc_valid) begin
        samp_val.push_back(adc_value);
        samp_tap.push_back(adc_tap);
      end
      if (line_sync) begin
        close_line();
        // Configuration latched at this line start.
        if (frame_left == 0) begin
          cur.mode = mode;
          if (mode == MODE_AREA) begin
            f_int = int_lines; f_rows = frame_rows; f_hbin = hbin; f_vbin = vbin;
            frame_left = f_int + f_rows;
          end
          cur.hbin = hbin; cur.vbin = vbin;
        end
        if (cur.mode == MODE_AREA) begin
          cur.integ = (frame_left > f_rows);
          cur.hbin = f_hbin; cur.vbin = f_vbin;
          frame_left--;
        end else begin
          cur.integ = 0;
        end
        cur.rows = cur.integ ? 0 : pending + ((cur.mode != MODE_TDI_CONT) ? cur.vbin : 0);
        chk(active_mode == cur.mode, "mode of the line");
        chk(integrating == cur.integ, "integration flag");
        was_area = (last_mode == MODE_AREA);
        if (cur.mode != last_mode) n_mode_change++;
        last_mode = cur.mode;
        have_line = 1;
      end
      if (fsyn) begin
        chk(active_mode == MODE_AREA, "FSYN outside area mode");
        if (t_fsyn >= 0 && was_area) begin
          chk(t - t_fsyn == prev_flen * LINE, "frame period");
          n_full_frames++;
        end
        t_fsyn = t;
        prev_flen = f_int + f_rows;
        n_frames++;
      end
      // No horizontal clock moves while the transfer gates act.
      if (hban) for (int k = 0; k < NTAPS; k++)
        chk(tap_cr[k] == prev_cr[k] && !tap_rg[k], "CR moved during SCK/TCK");
      if (hban && !prev_hban) n_hban++;
      // CI activity during readout.
      if (ci != prev_ci && tap_en != '0) begin
        if (active_mode == MODE_TDI_CONT) n_ci_in_read++;
        else chk(0, "CI moved during readout in burst/area mode");
      end
      if (tap_en != prev_en && tap_en != '0 && prev_en == '0 && tap_en[0] == 0) n_switch++;
      prev_ci = ci; prev_cr = tap_cr; prev_hban = hban; prev_en = tap_en;
    end
  end

  task automatic wait_lines(int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      while (!line_sync) @(posedge clk);
    end
    @(negedge clk);
  endtask

  task automatic set_cfg(tdi_mode_e m, int hb, int vb, int il, int fr);
    mode = m; hbin = BIN_W'(hb); vbin = BIN_W'(vb);
    int_lines = 16'(il); frame_rows = 16'(fr);
  endtask

  initial begin
    for (int k = 0; k < NTAPS; k++) prev_cr[k] = 4'b0011;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    set_cfg(MODE_TDI_CONT, 1, 1, 0, 0);
    enable = 1;
    wait_lines(4);
    set_cfg(MODE_TDI_CONT, 2, 3, 0, 0);
    wait_lines(4);
    set_cfg(MODE_TDI_BURST, 1, 1, 0, 0);
    wait_lines(3);
    set_cfg(MODE_TDI_BURST, 4, 2, 0, 0);
    wait_lines(3);
    set_cfg(MODE_AREA, 1, 1, 5, 3);
    wait_lines(16);
    set_cfg(MODE_AREA, 3, 2, 3, 2);
    wait_lines(5);
    set_cfg(MODE_TDI_CONT, 5, 15, 0, 0);
    wait_lines(4);
    set_cfg(MODE_TDI_CONT, 1, 1, 0, 0);
    wait_lines(3);
    chk(!overrun, "line overrun");
    chk(conflict == 0, "two analog switches on at once");
    chk(n_cont > 0, "continuous TDI lines");
    chk(n_burst > 0, "burst TDI lines");
    chk(n_frames > 0 && n_full_frames > 0, "area frames");
    chk(n_integ > 0 && n_area_read > 0, "area integration and row readout");
    chk(n_hbin > 0, "horizontal binning");
    chk(n_vbin > 0, "vertical binning");
    chk(n_switch > 0, "tap change-over");
    chk(n_hban > 0, "horizontal transfer ban windows");
    chk(n_ci_in_read > 0, "CI running during readout (continuous transfer)");
    chk(n_mode_change >= 3, "mode switches");
    $display("lines: cont %0d burst %0d area-read %0d integ %0d frames %0d; hbin %0d vbin %0d; tap switches %0d; ban windows %0d; CI steps in readout %0d; mode changes %0d",
             n_cont, n_burst, n_area_read, n_integ, n_frames, n_hbin, n_vbin, n_switch, n_hban, n_ci_in_read, n_mode_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
