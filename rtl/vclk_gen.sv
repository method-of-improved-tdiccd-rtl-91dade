// vclk_gen: vertical (imaging) clock generator for the TDICCD, CI1-CI4.
//
// Two ways of clocking the vertical registers are supported:
//  * Continuous (cont_en=1): the CI clocks run all the time as a 4-phase
//    clock with 50% duty and exactly VBIN full periods per line period of
//    LINE_CLKS master clocks. With VBIN>1 this is vertical binning: VBIN rows
//    are clocked into the horizontal side for each SCK/TCK transfer. The
//    step rate comes from a phase accumulator that adds 4*VBIN every clock
//    and steps the sequencer each time it passes LINE_CLKS, so the count per
//    line is exact even when LINE_CLKS is not a multiple of 4*VBIN (single
//    steps may then differ by one clock).
//  * Burst (burst_start pulse, cont_en=0): the CI clocks stay fixed until
//    started, then make 4*VBIN steps, one every BURST_STEP_CLKS clocks, and
//    stop; burst_done pulses on the clock the last step takes effect.
// ci_cycle_done pulses when a full CI period has ended (one row moved).
// VBIN is sampled every clock; the controller only changes it at line
// starts. The accumulator form and BURST_STEP_CLKS are this design's own
// choices; the 50% duty, continuity and "VBIN periods per transfer" rules
// are the clocking scheme's.
module vclk_gen
  import tdi_pkg::*;
#(
  parameter int unsigned LINE_CLKS       = 1024,
  parameter int unsigned BURST_STEP_CLKS = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cont_en,
  input  logic [BIN_W-1:0] vbin,
  input  logic             burst_start,
  output logic [3:0]       ci,
  output logic             ci_cycle_done,
  output logic             burst_busy,
  output logic             burst_done
);

  localparam int unsigned ACC_W = $clog2(LINE_CLKS + 4 * (2 ** BIN_W)) + 1;
  localparam int unsigned DIV_W = $clog2(BURST_STEP_CLKS + 1);
  localparam int unsigned CNT_W = BIN_W + 3;

  logic [ACC_W-1:0] acc, acc_sum;
  logic             cont_step;
  logic [DIV_W-1:0] div_cnt;
  logic [CNT_W-1:0] steps_left;
  logic             burst_step;

  // Continuous mode: phase accumulator.
  always_comb begin
    acc_sum   = acc + ACC_W'({bin_norm(vbin), 2'b00});
    cont_step = cont_en && (acc_sum >= ACC_W'(LINE_CLKS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             acc <= '0;
    else if (!cont_en)      acc <= '0;
    else if (cont_step)     acc <= acc_sum - ACC_W'(LINE_CLKS);
    else                    acc <= acc_sum;
  end

  // Burst mode: 4*VBIN steps spaced BURST_STEP_CLKS apart.
  assign burst_step = burst_busy && (div_cnt == DIV_W'(BURST_STEP_CLKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      burst_busy <= 1'b0;
      burst_done <= 1'b0;
      div_cnt    <= '0;
      steps_left <= '0;
    end else begin
      burst_done <= 1'b0;
      if (burst_start && !burst_busy && !cont_en) begin
        burst_busy <= 1'b1;
        div_cnt    <= '0;
        steps_left <= CNT_W'({bin_norm(vbin), 2'b00});
      end else if (burst_busy) begin
        if (burst_step) begin
          div_cnt    <= '0;
          steps_left <= steps_left - CNT_W'(1);
          if (steps_left == CNT_W'(1)) begin
            burst_busy <= 1'b0;
            burst_done <= 1'b1;
          end
        end else begin
          div_cnt <= div_cnt + DIV_W'(1);
        end
      end
    end
  end

  ccd_phase4 u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (1'b0),
    .step      (cont_step || burst_step),
    .ph        (ci),
    .state     (),
    .cycle_done(ci_cycle_done)
  );

endmodule
