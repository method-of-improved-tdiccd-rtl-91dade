// tdi_pkg: types and constants shared by the TDICCD clock generator.
//
// The generator runs from one master clock. One step of a CCD 4-phase
// clock lasts one master-clock cycle in the horizontal register and a
// programmable number of cycles in the vertical register. The operating
// mode selects one of the three line/frame structures: continuous-transfer
// TDI (vertical clocks run all the time), burst TDI (vertical clocks are
// held while the horizontal register is read, then pulsed) and area-array
// imaging (static integration for k line periods, then row readout).
// The mode encoding and the binning-factor width are this design's choices.
package tdi_pkg;

  typedef enum logic [1:0] {
    MODE_TDI_CONT  = 2'd0,  // continuous CI clocking, 50% duty
    MODE_TDI_BURST = 2'd1,  // CI held during readout, then burst
    MODE_AREA      = 2'd2   // area-array: FSYN, integration, row readout
  } tdi_mode_e;

  // Width of the runtime binning factors (1..15; 0 is read as 1).
  localparam int unsigned BIN_W = 4;

  // Levels of the four phases in sequencer state s (0..3): phases s and
  // s+1 (mod 4) are high (storage), the other two are low (barrier).
  function automatic logic [3:0] phase_levels(input logic [1:0] s);
    logic [3:0] v;
    v = '0;
    v[s]      = 1'b1;
    v[s + 2'd1] = 1'b1;
    return v;
  endfunction

  // A binning factor of 0 behaves as 1.
  function automatic logic [BIN_W-1:0] bin_norm(input logic [BIN_W-1:0] b);
    return (b == '0) ? BIN_W'(1) : b;
  endfunction

endpackage
