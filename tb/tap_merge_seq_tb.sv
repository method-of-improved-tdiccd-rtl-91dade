// tap_merge_seq_tb: checks analog tap merging with a charge model per tap
// and a model of the switches whose outputs are tied together (the merged
// video is the sum of the enabled taps' sense nodes). Checks: taps are read
// in order and one at a time; no tap's CR group moves while its enable is
// low; each enable leads its first CR edge and trails its last sample by at
// least GUARD clocks; the gap between enables is exactly SAFE clocks; every
// merged sample equals its group's charge sum and carries the right tap
// number; the readout takes the documented number of clocks.
module tap_merge_seq_tb;
  import tdi_pkg::*;
  localparam int unsigned NT = 3, NP = 6, GUARD = 2, SAFE = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [BIN_W-1:0] hbin = 1;
  logic [NT-1:0] tap_en, prev_en;
  logic [NT-1:0][3:0] tap_cr, prev_cr;
  logic [NT-1:0] tap_crlst, prev_crlst, tap_rg;
  logic adc_sample, busy, done;
  logic [1:0] adc_tap;
  int checks = 0, failures = 0;
  int hccd [NT][NP];
  int head [NT], well [NT], node [NT];
  int samp_val [$], samp_tap [$];
  int en_order [$];
  int t = 0, en_rise_t [NT], en_fall_t [NT], first_cr_t [NT], last_samp_t [NT];
  int video;

  tap_merge_seq #(.NTAPS(NT), .NPIX(NP), .GUARD_CLKS(GUARD), .SAFE_CLKS(SAFE)) dut (
    .clk, .rst_n, .start, .hbin, .tap_en, .tap_cr, .tap_crlst, .tap_rg,
    .adc_sample, .adc_tap, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    t++;
    if (rst_n) begin
      video = 0;
      for (int k = 0; k < NT; k++) if (tap_en[k]) video += node[k];
      if (adc_sample) begin
        samp_val.push_back(video);
        samp_tap.push_back(adc_tap);
        for (int k = 0; k < NT; k++) if (tap_en[k]) last_samp_t[k] = t;
        if (!tap_en[adc_tap]) begin failures++; $display("sample outside enable"); end
      end
      if ($countones(tap_en) > 1) begin failures++; $display("two taps enabled"); end
      for (int k = 0; k < NT; k++) begin
        if (tap_en[k] && !prev_en[k]) begin en_rise_t[k] = t; en_order.push_back(k); first_cr_t[k] = -1; end
        if (!tap_en[k] && prev_en[k]) en_fall_t[k] = t;
        if (tap_cr[k] != prev_cr[k] || tap_crlst[k] != prev_crlst[k] || tap_rg[k]) begin
          if (!tap_en[k]) begin failures++; $display("tap %0d clocked while disabled", k); end
          if (first_cr_t[k] < 0) first_cr_t[k] = t;
        end
        if (tap_rg[k]) node[k] = 0;
        if (prev_crlst[k] && !tap_crlst[k]) begin node[k] += well[k]; well[k] = 0; end
        if (tap_cr[k] == 4'b1100 && prev_cr[k] != 4'b1100) begin
          well[k] += (head[k] < NP) ? hccd[k][head[k]] : 0;
          head[k]++;
        end
      end
    end
    prev_en = tap_en; prev_cr = tap_cr; prev_crlst = tap_crlst;
  end

  initial begin
    int len;
    prev_en = '0; prev_crlst = '0;
    for (int k = 0; k < NT; k++) prev_cr[k] = 4'b0011;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 16; r++) begin
      int hb, ngrp, idx;
      hb = 1 + (r % 8);
      for (int k = 0; k < NT; k++) begin
        head[k] = 0; well[k] = 0; node[k] = 0;
        for (int p = 0; p < NP; p++) hccd[k][p] = 1 + ($urandom % 500);
      end
      samp_val.delete(); samp_tap.delete(); en_order.delete();
      @(negedge clk); hbin = BIN_W'(hb); start = 1;
      @(negedge clk); start = 0;
      len = 0;
      while (!done && len < 2000) begin @(posedge clk); #2; len++; end
      repeat (3) @(posedge clk); #2;
      // Edges counted from the one after start; done is registered.
      checks++;
      if (len != NT * (2 * GUARD + 4 * NP + 1) + (NT - 1) * SAFE) begin
        failures++; $display("hbin %0d: readout %0d clocks", hb, len);
      end
      checks++;
      if (en_order.size() != NT) begin failures++; $display("%0d enables", en_order.size()); end
      for (int k = 0; k < NT && k < en_order.size(); k++) begin
        checks++;
        if (en_order[k] != k) begin failures++; $display("tap order wrong"); end
        checks++;
        if (first_cr_t[k] - en_rise_t[k] < GUARD || en_fall_t[k] - last_samp_t[k] < GUARD) begin
          failures++; $display("tap %0d: enable does not cover its CR group", k);
        end
        if (k > 0) begin
          checks++;
          if (en_rise_t[k] - en_fall_t[k - 1] != SAFE) begin
            failures++; $display("safe gap %0d", en_rise_t[k] - en_fall_t[k - 1]);
          end
        end
      end
      ngrp = (NP + hb - 1) / hb;
      checks++;
      if (samp_val.size() != NT * ngrp) begin
        failures++; $display("hbin %0d: %0d samples", hb, samp_val.size());
      end
      idx = 0;
      for (int k = 0; k < NT; k++)
        for (int g = 0; g < ngrp; g++) begin
          int e;
          e = 0;
          for (int p = g * hb; p < (g + 1) * hb && p < NP; p++) e += hccd[k][p];
          checks++;
          if (idx >= samp_val.size() || samp_val[idx] != e || samp_tap[idx] != k) begin
            failures++; $display("tap %0d group %0d: wrong merged sample", k, g);
          end
          idx++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
