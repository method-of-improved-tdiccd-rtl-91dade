// xfer_gate_gen: fast transfer of one line from the vertical registers into
// the horizontal readout register, SCK then TCK.
//
// A start pulse opens a window of XFER_CLKS master clocks. Inside it the
// storage clock SCK pulses first (moving the charge out of the last
// vertical stage into the storage/transfer gate), then the transfer gate
// clock TCK pulses (moving it into the horizontal register). `hban` is high
// for the whole window: the horizontal CR clocks must not run while it is
// high, but may run at any other time, which keeps the transfer short
// compared with the line. `done` pulses on the last clock of the window.
// Both pulses are active high here; a sensor needing the other polarity is
// served by inverting at the clock driver. The pulse positions and widths
// (SCK_START/SCK_W, TCK_START/TCK_W) and the SCK-before-TCK order are this
// design's choices; the short, exclusive SCK/TCK window is the scheme's.
module xfer_gate_gen #(
  parameter int unsigned XFER_CLKS = 8,
  parameter int unsigned SCK_START = 1,
  parameter int unsigned SCK_W     = 2,
  parameter int unsigned TCK_START = 4,
  parameter int unsigned TCK_W     = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic sck,
  output logic tck,
  output logic hban,
  output logic done
);

  localparam int unsigned CW = $clog2(XFER_CLKS + 1);

  logic [CW-1:0] cnt;

  initial begin
    assert (SCK_START + SCK_W <= TCK_START) else $error("SCK must end before TCK");
    assert (TCK_START + TCK_W <  XFER_CLKS) else $error("TCK must end inside the window");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hban <= 1'b0;
      cnt  <= '0;
    end else if (start && !hban) begin
      hban <= 1'b1;
      cnt  <= '0;
    end else if (hban) begin
      if (cnt == CW'(XFER_CLKS - 1)) hban <= 1'b0;
      cnt <= cnt + CW'(1);
    end
  end

  always_comb begin
    sck  = hban && (cnt >= CW'(SCK_START)) && (cnt < CW'(SCK_START + SCK_W));
    tck  = hban && (cnt >= CW'(TCK_START)) && (cnt < CW'(TCK_START + TCK_W));
    done = hban && (cnt == CW'(XFER_CLKS - 1));
  end

endmodule
