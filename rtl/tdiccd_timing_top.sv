// tdiccd_timing_top: sensor clock generator for a multi-tap TDICCD.
//
// Produces every clock the sensor needs from one master clock `clk`:
//   ci[3:0]            vertical (imaging) 4-phase clocks CI1-CI4
//   sck, tck           storage and transfer gate pulses (vertical -> HCCD)
//   tap_cr[t][3:0]     horizontal 4-phase clocks CR1-CR4 of tap t
//   tap_crlst[t]       last-gate clock CRLST of tap t (horizontal binning)
//   tap_rg[t]          output reset RG of tap t
//   tap_en[t]          enable of the analog switch of tap t
//   adc_sample/adc_tap strobe and tap number for the ADC shared by the taps
//   fsyn, line_sync    frame (area mode) and line markers
//   active_mode        mode of the line (or frame) in progress
//   hban               high while SCK/TCK act; no CR clock moves then
// and the four improvements to plain 4-phase clocking:
//   * analog tap merging: the NTAPS taps are read one after another, each
//     with its own CR group under its own switch enable and a safe gap
//     between groups, so their video can share one wire and one ADC;
//   * continuous transfer: in MODE_TDI_CONT the CI clocks run without
//     pause at 50% duty; only the short SCK/TCK window bans horizontal
//     transfer, and CR runs at any other time;
//   * binning: hbin CR cycles per RG/CRLST pulse (horizontal), vbin CI
//     periods per SCK/TCK transfer (vertical), both set at run time;
//   * area-array mode (MODE_AREA): FSYN, int_lines line periods of static
//     integration, then frame_rows rows read out.
// MODE_TDI_BURST is the conventional scheme, with CI held during readout.
// Configuration inputs are sampled at line starts (frame starts in area
// mode). `overrun` flags a line period too short for the configuration.
// The sizes below (taps, pixels per tap, line period, guard, safe gap and
// transfer window in master clocks) are this design's defaults; the
// clocking scheme gives no numbers for them except two merged taps.
module tdiccd_timing_top
  import tdi_pkg::*;
#(
  parameter int unsigned NTAPS           = 2,
  parameter int unsigned NPIX            = 64,
  parameter int unsigned LINE_CLKS       = 1024,
  parameter int unsigned GUARD_CLKS      = 2,
  parameter int unsigned SAFE_CLKS       = 8,
  parameter int unsigned XFER_CLKS       = 8,
  parameter int unsigned BURST_STEP_CLKS = 2,
  parameter int unsigned CNT_W           = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  tdi_mode_e                mode,
  input  logic [BIN_W-1:0]         hbin,
  input  logic [BIN_W-1:0]         vbin,
  input  logic [CNT_W-1:0]         int_lines,
  input  logic [CNT_W-1:0]         frame_rows,
  output logic [3:0]               ci,
  output logic                     sck,
  output logic                     tck,
  output logic                     hban,
  output logic [NTAPS-1:0]         tap_en,
  output logic [NTAPS-1:0][3:0]    tap_cr,
  output logic [NTAPS-1:0]         tap_crlst,
  output logic [NTAPS-1:0]         tap_rg,
  output logic                     adc_sample,
  output logic [((NTAPS > 1) ? $clog2(NTAPS) : 1)-1:0] adc_tap,
  output logic                     fsyn,
  output logic                     line_sync,
  output logic                     integrating,
  output tdi_mode_e                active_mode,
  output logic                     overrun
);

  // Worst case line: burst of 15 CI periods, transfer window, readout.
  localparam int unsigned WORST_LINE = 2 + 4 * 15 * BURST_STEP_CLKS + 1 + XFER_CLKS + 1
                                     + NTAPS * (2 * GUARD_CLKS + 4 * NPIX + 1)
                                     + (NTAPS - 1) * SAFE_CLKS;

  initial assert (WORST_LINE < LINE_CLKS)
    else $error("LINE_CLKS too short for the readout");

  logic             cont_en, burst_start, xfer_start, hread_start;
  logic             burst_done, xfer_done, hread_done, hread_busy;
  logic [BIN_W-1:0] hbin_q, vbin_q;

  line_ctrl #(.LINE_CLKS(LINE_CLKS), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .enable, .mode, .hbin, .vbin, .int_lines, .frame_rows,
    .burst_done, .xfer_done, .hread_done,
    .cont_en, .burst_start, .xfer_start, .hread_start,
    .mode_q(active_mode), .hbin_q, .vbin_q, .line_sync, .fsyn, .integrating, .overrun
  );

  vclk_gen #(.LINE_CLKS(LINE_CLKS), .BURST_STEP_CLKS(BURST_STEP_CLKS)) u_vclk (
    .clk, .rst_n, .cont_en, .vbin(vbin_q), .burst_start,
    .ci, .ci_cycle_done(), .burst_busy(), .burst_done
  );

  xfer_gate_gen #(.XFER_CLKS(XFER_CLKS)) u_xfer (
    .clk, .rst_n, .start(xfer_start), .sck, .tck, .hban, .done(xfer_done)
  );

  tap_merge_seq #(
    .NTAPS(NTAPS), .NPIX(NPIX), .GUARD_CLKS(GUARD_CLKS), .SAFE_CLKS(SAFE_CLKS)
  ) u_taps (
    .clk, .rst_n, .start(hread_start), .hbin(hbin_q),
    .tap_en, .tap_cr, .tap_crlst, .tap_rg, .adc_sample, .adc_tap,
    .busy(hread_busy), .done(hread_done)
  );

  // Horizontal transfer is banned while the transfer gates act.
  assert property (@(posedge clk) disable iff (!rst_n) !(hban && hread_busy));

endmodule
