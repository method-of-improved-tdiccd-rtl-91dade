// tdiccd_model: behavioural charge model of a multi-tap TDICCD, for
// simulation only (not synthesizable; the sensor is an analog device).
//
// Charge is counted in integer units. Every full CI period (the CI clocks
// returning to their rest levels 1100 -> ... -> 1001 -> 0011) moves one row
// of charge out of the imaging area into the storage stage; the row charge
// of column c of tap t is row_charge(t, c). A rising SCK moves the storage
// stage under the transfer gate, a rising TCK moves that into the
// horizontal register of every tap. For each tap, CR entering state 2
// (CR3, CR4 high) shifts one pixel under the last gate, a falling CRLST
// dumps the last-gate charge onto the sense node, and RG clears the node.
// node[t] is the tap's video level. rows_last is the number of rows that
// the most recent TCK moved (the vertical binning factor actually applied).
// The model reacts to the clock levels sampled once per master clock.
module tdiccd_model #(
  parameter int unsigned NTAPS = 2,
  parameter int unsigned NPIX  = 64
) (
  input  logic                  clk,
  input  logic [3:0]            ci,
  input  logic                  sck,
  input  logic                  tck,
  input  logic [NTAPS-1:0][3:0] tap_cr,
  input  logic [NTAPS-1:0]      tap_crlst,
  input  logic [NTAPS-1:0]      tap_rg,
  output int                    node [NTAPS],
  output int                    rows_last
);

  function automatic int row_charge(int t, int c);
    return 1 + ((t * NPIX + c) * 7) % 31;
  endfunction

  int storage_rows, gate_rows;
  int hccd [NTAPS][NPIX];
  int head [NTAPS], well [NTAPS];
  logic [3:0] prev_ci = 4'b0011;
  logic prev_sck = 0, prev_tck = 0;
  logic [NTAPS-1:0] prev_crlst = '0;
  logic [NTAPS-1:0][3:0] prev_cr;

  initial begin
    storage_rows = 0; gate_rows = 0; rows_last = 0;
    for (int t = 0; t < NTAPS; t++) begin
      head[t] = NPIX; well[t] = 0; node[t] = 0; prev_cr[t] = 4'b0011;
      for (int c = 0; c < NPIX; c++) hccd[t][c] = 0;
    end
  end

  always @(posedge clk) begin
    #1;
    if (ci == 4'b0011 && prev_ci == 4'b1001) storage_rows++;
    if (sck && !prev_sck) begin gate_rows += storage_rows; storage_rows = 0; end
    if (tck && !prev_tck) begin
      for (int t = 0; t < NTAPS; t++) begin
        for (int c = 0; c < NPIX; c++) hccd[t][c] = gate_rows * row_charge(t, c);
        head[t] = 0;
      end
      rows_last = gate_rows;
      gate_rows = 0;
    end
    for (int t = 0; t < NTAPS; t++) begin
      if (tap_rg[t]) node[t] = 0;
      if (prev_crlst[t] && !tap_crlst[t]) begin node[t] += well[t]; well[t] = 0; end
      if (tap_cr[t] == 4'b1100 && prev_cr[t] != 4'b1100) begin
        well[t] += (head[t] < NPIX) ? hccd[t][head[t]] : 0;
        head[t]++;
      end
    end
    prev_ci = ci; prev_sck = sck; prev_tck = tck; prev_crlst = tap_crlst; prev_cr = tap_cr;
  end

endmodule
