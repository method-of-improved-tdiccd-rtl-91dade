// hclk_gen: horizontal readout clocks of one CCD output, with horizontal
// binning: CR1-CR4, CRLST (last horizontal gate) and RG (output reset).
//
// A start pulse reads NPIX pixels out of the horizontal register. Each
// pixel takes four master clocks, one per 4-phase step (states 0..3). The
// pixels are read in groups of HBIN (sampled at start): the charge of every
// pixel of a group is collected under the last gate, which is held high
// (CRLST) through the group and dropped only once, in the last step of the
// group's last pixel, to dump the summed charge onto the sense node. RG
// resets the sense node once per group, in step 1 of the group's first
// pixel, before the dump. So one RG and one CRLST pulse go with HBIN CR
// cycles; HBIN=1 is normal readout. A last group shorter than HBIN is
// dumped at the last pixel.
// `sample` marks the clock on which the sense node holds a group's signal
// (step 0 after each dump, and one extra tail clock after the last pixel):
// it is the ADC sample strobe. `done` pulses with the final sample; `busy`
// covers the whole readout. CR rests in state 0 (CR1, CR2 high) when idle
// and CRLST rests low.
// Timing: a readout of NPIX pixels takes 4*NPIX+1 clocks from the clock
// after start. The one-RG/one-CRLST-per-HBIN rule is the binning scheme's;
// the exact step positions of RG, CRLST and sample are this design's.
// Outputs are decoded from registers with simple gates.
module hclk_gen
  import tdi_pkg::*;
#(
  parameter int unsigned NPIX = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [BIN_W-1:0] hbin,
  output logic [3:0]       cr,
  output logic             crlst,
  output logic             rg,
  output logic             sample,
  output logic             busy,
  output logic             done
);

  localparam int unsigned PW = $clog2(NPIX + 1);

  logic             run, tail;
  logic [PW-1:0]    pix;
  logic [BIN_W-1:0] grp, hbin_q;
  logic [1:0]       s;
  logic             last_pix, last_in_grp, unused_cycle;

  assign last_pix    = (pix == PW'(NPIX - 1));
  assign last_in_grp = (grp == hbin_q - BIN_W'(1)) || last_pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      tail   <= 1'b0;
      pix    <= '0;
      grp    <= '0;
      hbin_q <= BIN_W'(1);
    end else begin
      tail <= 1'b0;
      if (start && !run && !tail) begin
        run    <= 1'b1;
        pix    <= '0;
        grp    <= '0;
        hbin_q <= bin_norm(hbin);
      end else if (run && s == 2'd3) begin
        if (last_pix) begin
          run  <= 1'b0;
          tail <= 1'b1;
        end else begin
          pix <= pix + PW'(1);
          grp <= last_in_grp ? '0 : grp + BIN_W'(1);
        end
      end
    end
  end

  ccd_phase4 u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (start && !run),
    .step      (run),
    .ph        (cr),
    .state     (s),
    .cycle_done(unused_cycle)
  );

  always_comb begin
    rg     = run && (grp == '0) && (s == 2'd1);
    crlst  = run && !(last_in_grp && (s == 2'd3));
    sample = (run && (grp == '0) && (s == 2'd0) && (pix != '0)) || tail;
    done   = tail;
    busy   = run || tail;
  end

endmodule
