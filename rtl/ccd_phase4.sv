// ccd_phase4: four-phase CCD clock sequencer.
//
// A CCD pixel has four gates. At any time two adjacent gates are high and
// hold the charge (storage) while the other two are low (barriers). On each
// step the leading barrier gate goes high and the trailing storage gate goes
// low, so the packet moves one gate width; four steps move it one pixel.
// The sequencer keeps a 2-bit state s and drives phases s and s+1 high.
//
// Interface: `step` advances the state by one on the next clock; `clear`
// returns it to state 0 (phases 1 and 2 high). `ph[0]` is phase 1.
// `cycle_done` pulses for one clock when the state wraps from 3 to 0, i.e.
// when one full pixel transfer has finished. Outputs are registered.
// The storage/barrier rule follows the four-phase scheme; the choice of
// state 0 as the rest state is this design's own.
module ccd_phase4
  import tdi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       step,
  output logic [3:0] ph,
  output logic [1:0] state,
  output logic       cycle_done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= 2'd0;
      cycle_done <= 1'b0;
    end else if (clear) begin
      state      <= 2'd0;
      cycle_done <= 1'b0;
    end else begin
      cycle_done <= step && (state == 2'd3);
      if (step) state <= state + 2'd1;
    end
  end

  assign ph = phase_levels(state);

  // Exactly two adjacent phases are high at all times.
  always_comb assert ($countones(ph) == 2);

endmodule
