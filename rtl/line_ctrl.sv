// line_ctrl: line and frame sequencer of the TDICCD clock generator.
//
// Keeps the line period: while enabled, a position counter runs over
// LINE_CLKS master clocks per line, and every line starts on a fixed grid
// (line_sync), as TDI needs the charge to move at the image speed. At
// each line start the configuration (mode, HBIN, VBIN, and for area mode
// the integration and row counts) is latched, except inside an area frame,
// where it is held to the end of the frame. The line is then built from
// three phases, each started when the one before reports done:
//   burst  - VBIN CI periods (burst TDI and area readout lines only);
//   xfer   - the SCK/TCK window that moves a line into the horizontal CCD;
//   hread  - the tap-merged horizontal readout;
// then it waits for the next line start. In continuous TDI the CI clocks
// are not burst but run all line long (cont_en), so a line is xfer+hread.
// Area mode: a frame begins with an FSYN pulse, spends int_lines line
// periods integrating with every clock static, then reads frame_rows lines
// with the burst structure (one CI period, or VBIN, per row). The frame
// period is (int_lines+frame_rows) line periods; the longer the static
// integration against the row transfer, the less the transfer smears.
// Start pulses are registered and come one clock after the line start.
// `overrun` is a sticky flag, set if a line start finds the line's work
// unfinished (line period too short for the configuration).
// Dropping `enable` stops the sequencer at the next line boundary (inside
// an area frame, at the end of the frame).
// The three modes and their order of clock actions follow the clocking
// scheme; the fixed line grid, the latching points and the flag are this
// design's choices.
module line_ctrl
  import tdi_pkg::*;
#(
  parameter int unsigned LINE_CLKS = 1024,
  parameter int unsigned CNT_W     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  tdi_mode_e        mode,
  input  logic [BIN_W-1:0] hbin,
  input  logic [BIN_W-1:0] vbin,
  input  logic [CNT_W-1:0] int_lines,
  input  logic [CNT_W-1:0] frame_rows,
  input  logic             burst_done,
  input  logic             xfer_done,
  input  logic             hread_done,
  output logic             cont_en,
  output logic             burst_start,
  output logic             xfer_start,
  output logic             hread_start,
  output tdi_mode_e        mode_q,
  output logic [BIN_W-1:0] hbin_q,
  output logic [BIN_W-1:0] vbin_q,
  output logic             line_sync,
  output logic             fsyn,
  output logic             integrating,
  output logic             overrun
);

  localparam int unsigned PW = $clog2(LINE_CLKS);

  typedef enum logic [2:0] {S_IDLE, S_BURST, S_XFER, S_HREAD, S_WAIT, S_INTEG} state_e;

  state_e           st;
  logic             running;
  logic [PW-1:0]    pos;
  logic [CNT_W-1:0] int_q, rows_q, lcount;
  logic [CNT_W:0]   frame_len;
  logic             line_start, in_frame, next_int;

  assign line_start = running && (pos == '0);
  assign frame_len  = {1'b0, int_q} + {1'b0, rows_q};
  // An area frame continues while lines of it remain.
  assign in_frame   = (mode_q == MODE_AREA) && ({1'b0, lcount} + 1'b1 < frame_len);
  assign next_int   = in_frame ? ({1'b0, lcount} + 1'b1 < {1'b0, int_q})
                               : ((mode == MODE_AREA) && (int_lines != '0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      running     <= 1'b0;
      pos         <= '0;
      mode_q      <= MODE_TDI_CONT;
      hbin_q      <= BIN_W'(1);
      vbin_q      <= BIN_W'(1);
      int_q       <= '0;
      rows_q      <= '0;
      lcount      <= '0;
      burst_start <= 1'b0;
      xfer_start  <= 1'b0;
      hread_start <= 1'b0;
      fsyn        <= 1'b0;
      line_sync   <= 1'b0;
      overrun     <= 1'b0;
    end else begin
      burst_start <= 1'b0;
      xfer_start  <= 1'b0;
      hread_start <= 1'b0;
      fsyn        <= 1'b0;
      line_sync   <= 1'b0;

      // Line grid.
      if (!running) begin
        if (enable) begin
          running <= 1'b1;
          pos     <= '0;
        end
      end else if (pos == PW'(LINE_CLKS - 1)) begin
        pos <= '0;
        if (!enable && !in_frame) begin
          running <= 1'b0;
        end
      end else begin
        pos <= pos + PW'(1);
      end

      // Line start: latch the configuration and launch the first phase.
      if (line_start) begin
        line_sync <= 1'b1;
        if (st != S_WAIT && st != S_INTEG && st != S_IDLE) overrun <= 1'b1;
        if (in_frame) begin
          lcount <= lcount + CNT_W'(1);
        end else begin
          mode_q <= mode;
          hbin_q <= bin_norm(hbin);
          vbin_q <= bin_norm(vbin);
          int_q  <= int_lines;
          rows_q <= frame_rows;
          lcount <= '0;
          fsyn   <= (mode == MODE_AREA);
        end
        if (next_int) begin
          st <= S_INTEG;
        end else if ((in_frame ? mode_q : mode) == MODE_TDI_CONT) begin
          st         <= S_XFER;
          xfer_start <= 1'b1;
        end else begin
          st          <= S_BURST;
          burst_start <= 1'b1;
        end
      end else begin
        unique case (st)
          S_BURST: if (burst_done) begin
            st         <= S_XFER;
            xfer_start <= 1'b1;
          end
          S_XFER: if (xfer_done) begin
            st          <= S_HREAD;
            hread_start <= 1'b1;
          end
          S_HREAD: if (hread_done) st <= S_WAIT;
          S_WAIT, S_INTEG: if (!running) st <= S_IDLE;
          S_IDLE: ;
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  assign cont_en     = running && (st != S_IDLE) && (mode_q == MODE_TDI_CONT);
  assign integrating = (st == S_INTEG);

endmodule
