// tap_merge_seq: analog tap merging sequencer.
//
// Several CCD output taps share one ADC: each tap's video goes through an
// analog switch, the switch outputs are tied together, and the ADC
// quantizes the sum. For this to work the taps must be read strictly one
// after another. On a start pulse this block reads the taps in order
// 0..NTAPS-1 with one shared horizontal clock generator (hclk_gen), so all
// tap groups come from the same master clock and the ADC can sample all of
// them at one rate. For tap t:
//   * tap_en[t] rises GUARD_CLKS clocks before the tap's CR clocks start
//     and falls GUARD_CLKS clocks after the last sample, so the enable
//     covers the whole CR group;
//   * only tap t's CR/CRLST/RG group moves; every other group rests
//     (CR in state 0, CRLST and RG low);
//   * after tap_en[t] falls, all enables stay low for SAFE_CLKS clocks (the
//     safe interval T) before tap t+1 is enabled, giving the analog switch
//     time to change over.
// adc_sample is the shared ADC strobe and adc_tap the tap it belongs to.
// `done` pulses after the last tap's trailing guard; `busy` covers it all.
// One readout takes NTAPS*(2*GUARD_CLKS+4*NPIX+1)+(NTAPS-1)*SAFE_CLKS
// clocks. The grouping of CR with TAPxEN, the covering rule and the safe
// interval are the merging scheme's; GUARD_CLKS and SAFE_CLKS values and
// the tap order are this design's.
module tap_merge_seq
  import tdi_pkg::*;
#(
  parameter int unsigned NTAPS      = 2,
  parameter int unsigned NPIX       = 64,
  parameter int unsigned GUARD_CLKS = 2,
  parameter int unsigned SAFE_CLKS  = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [BIN_W-1:0]         hbin,
  output logic [NTAPS-1:0]         tap_en,
  output logic [NTAPS-1:0][3:0]    tap_cr,
  output logic [NTAPS-1:0]         tap_crlst,
  output logic [NTAPS-1:0]         tap_rg,
  output logic                     adc_sample,
  output logic [((NTAPS > 1) ? $clog2(NTAPS) : 1)-1:0] adc_tap,
  output logic                     busy,
  output logic                     done
);

  localparam int unsigned TW = (NTAPS > 1) ? $clog2(NTAPS) : 1;
  localparam int unsigned GW = $clog2(GUARD_CLKS + SAFE_CLKS + 2);

  typedef enum logic [2:0] {S_IDLE, S_LEAD, S_READ, S_TRAIL, S_SAFE} state_e;

  state_e        st;
  logic [TW-1:0] tap;
  logic [GW-1:0] cnt;
  logic          h_start, h_busy, h_done, h_crlst, h_rg, h_sample;
  logic [3:0]    h_cr;
  logic          en_on;

  assign h_start = (st == S_LEAD) && (cnt == GW'(GUARD_CLKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      tap  <= '0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st  <= S_LEAD;
          tap <= '0;
          cnt <= '0;
        end
        S_LEAD: begin
          cnt <= cnt + GW'(1);
          if (h_start) st <= S_READ;
        end
        S_READ: if (h_done) begin
          st  <= S_TRAIL;
          cnt <= '0;
        end
        S_TRAIL: begin
          cnt <= cnt + GW'(1);
          if (cnt == GW'(GUARD_CLKS - 1)) begin
            cnt <= '0;
            if (tap == TW'(NTAPS - 1)) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else begin
              st <= S_SAFE;
            end
          end
        end
        S_SAFE: begin
          cnt <= cnt + GW'(1);
          if (cnt == GW'(SAFE_CLKS - 1)) begin
            cnt <= '0;
            tap <= tap + TW'(1);
            st  <= S_LEAD;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  hclk_gen #(.NPIX(NPIX)) u_hclk (
    .clk   (clk),
    .rst_n (rst_n),
    .start (h_start),
    .hbin  (hbin),
    .cr    (h_cr),
    .crlst (h_crlst),
    .rg    (h_rg),
    .sample(h_sample),
    .busy  (h_busy),
    .done  (h_done)
  );

  assign en_on = (st == S_LEAD) || (st == S_READ) || (st == S_TRAIL);

  always_comb begin
    for (int t = 0; t < NTAPS; t++) begin
      if (en_on && tap == TW'(t)) begin
        tap_en[t]    = 1'b1;
        tap_cr[t]    = h_cr;
        tap_crlst[t] = h_crlst;
        tap_rg[t]    = h_rg;
      end else begin
        tap_en[t]    = 1'b0;
        tap_cr[t]    = phase_levels(2'd0);
        tap_crlst[t] = 1'b0;
        tap_rg[t]    = 1'b0;
      end
    end
  end

  assign adc_sample = h_sample;
  assign adc_tap    = tap;
  assign busy       = (st != S_IDLE);

  // The shared readout only runs while some tap is enabled.
  assert property (@(posedge clk) disable iff (!rst_n) h_busy |-> en_on);
  // A tap's readout clocks move only while its switch is enabled.
  for (genvar g = 0; g < NTAPS; g++) begin : g_cover
    assert property (@(posedge clk) disable iff (!rst_n)
      (tap_cr[g] != $past(tap_cr[g]) || tap_rg[g]) |-> tap_en[g]);
  end
  // At most one tap is enabled at a time.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(tap_en));

endmodule
