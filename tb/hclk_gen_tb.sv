// hclk_gen_tb: checks horizontal readout with binning through a small
// charge model of the horizontal register. The register is loaded with
// random pixel charges; the model moves one pixel into the last-gate well
// each time CR enters state 2 (CR3,CR4 high), dumps the well onto the sense
// node when CRLST falls and clears the node on RG. Every ADC sample must
// equal the sum of the HBIN pixels of its group (last group may be short),
// there must be one RG and one CRLST pulse per group, and a readout must
// last 4*NPIX+1 clocks with done on the last.
module hclk_gen_tb;
  import tdi_pkg::*;
  localparam int unsigned NPIX = 10;
  logic clk = 0, rst_n = 0, start = 0;
  logic [BIN_W-1:0] hbin = 1;
  logic [3:0] cr, prev_cr;
  logic crlst, prev_crlst, rg, sample, busy, done;
  int checks = 0, failures = 0;
  int hccd [NPIX];
  int head, well, node, nsamp, nrg, nfall, len, exp_sum;
  int samples [$];

  hclk_gen #(.NPIX(NPIX)) dut (.clk, .rst_n, .start, .hbin, .cr, .crlst, .rg, .sample, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Charge model, evaluated on the levels of each clock period.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (sample) samples.push_back(node);
      if (rg) begin node = 0; nrg++; end
      if (prev_crlst && !crlst) begin node += well; well = 0; nfall++; end
      if (cr == 4'b1100 && prev_cr != 4'b1100) begin
        well += (head < NPIX) ? hccd[head] : 0;
        head++;
      end
    end
    prev_cr = cr;
    prev_crlst = crlst;
  end

  initial begin
    prev_cr = 4'b0011; prev_crlst = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 40; r++) begin
      int hb, ngrp;
      hb = (r < 12) ? 1 + r : 1 + ($urandom % 15);
      for (int p = 0; p < NPIX; p++) hccd[p] = 1 + ($urandom % 1000);
      head = 0; well = 0; node = 0; nrg = 0; nfall = 0; len = 0;
      samples.delete();
      @(negedge clk);
      hbin = BIN_W'(hb);
      start = 1;
      @(negedge clk);
      start = 0;
      hbin = BIN_W'($urandom);  // must be ignored once started
      while (!done) begin
        @(posedge clk); #2; len++;
        if (len > 1000) break;
      end
      repeat (3) @(posedge clk);
      #2;
      ngrp = (NPIX + hb - 1) / hb;
      checks++;
      // 4*NPIX busy clocks plus the tail clock that carries done: done is
      // seen 4*NPIX edges after the edge that took start.
      if (len != 4 * NPIX) begin
        failures++;
        $display("hbin %0d: readout took %0d clocks", hb, len);
      end
      checks++;
      if (samples.size() != ngrp || nrg != ngrp || nfall != ngrp) begin
        failures++;
        $display("hbin %0d: %0d samples %0d RG %0d CRLST, expected %0d", hb,
                 samples.size(), nrg, nfall, ngrp);
      end
      for (int g = 0; g < ngrp && g < samples.size(); g++) begin
        exp_sum = 0;
        for (int p = g * hb; p < (g + 1) * hb && p < NPIX; p++) exp_sum += hccd[p];
        checks++;
        if (samples[g] != exp_sum) begin
          failures++;
          $display("hbin %0d group %0d: sample %0d expected %0d", hb, g, samples[g], exp_sum);
        end
      end
      checks++;
      if (busy || cr !== 4'b0011 || crlst || rg) begin
        failures++;
        $display("not at rest after readout");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
