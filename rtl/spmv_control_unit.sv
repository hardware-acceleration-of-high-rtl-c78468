// spmv_control_unit: turns the CSRO new-row-offset lanes of one input line
// into the controls of the selective adder tree, the reduce unit and the
// merge unit.
//
// CSRO (the document's format): a value's new row offset is 0 when it is in
// the same row as the previous value, otherwise 1 + the number of empty rows
// skipped. The row of lane i is therefore the row of the previous value plus
// the offset; this unit keeps the row of the last value seen as running
// state (all ones at the start of a color, so the first offset 1 gives row 0).
//
// Per line it produces, registered (one cycle after beat_valid):
//   seg_start  lane opens a segment of the adder tree (lane 0 always does)
//   seg_end    lane closes a segment (next valid lane starts a row, or it is
//              the last valid lane of the line)
//   row        global-to-color row of every lane
//   direct     segment ending here is a complete row: goes straight to merge
//   cont       the first segment continues the row left open by the last line
//   multi      the line holds more than one segment
//   first_end / last_end  lane indices that close the first / last segment
//   color_last the line is the last of its color, so nothing stays open
// The last segment of a line is always handed to the reduce unit (it may go
// on in the next line) unless the line is the color's last; the document
// does not say how the control unit decides this, so that is this
// implementation's rule. Valid lanes must form a prefix of the line.
module spmv_control_unit
  import solver_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        color_start,   // clears the row state
  input  logic                        beat_valid,
  input  logic [LANES-1:0]            lane_valid,
  input  logic [LANES-1:0][IDX_W-1:0] nro,
  input  logic                        beat_last,     // last line of the color
  output logic                        o_valid,
  output logic [LANES-1:0]            o_seg_start,
  output logic [LANES-1:0]            o_seg_end,
  output logic [LANES-1:0][31:0]      o_row,
  output logic [LANES-1:0]            o_direct,
  output logic                        o_cont,
  output logic                        o_multi,
  output logic [$clog2(LANES)-1:0]    o_first_end,
  output logic [$clog2(LANES)-1:0]    o_last_end,
  output logic                        o_color_last
);
  localparam int LW = $clog2(LANES);

  logic [31:0] last_row_q;
  logic [LANES-1:0] start, endl, direct;
  logic [LANES-1:0][31:0] row;
  logic [LW-1:0] first_end, last_end;
  logic cont, multi;
  int   nseg;

  always_comb begin
    logic [31:0] r;
    r = last_row_q;
    start = '0; endl = '0; direct = '0;
    first_end = '0; last_end = '0;
    nseg = 0;
    for (int i = 0; i < LANES; i++) begin
      if (lane_valid[i]) r = r + nro[i];
      row[i]   = r;
      start[i] = lane_valid[i] && ((i == 0) || (nro[i] != '0));
    end
    cont = lane_valid[0] && (nro[0] == '0);
    for (int i = 0; i < LANES; i++) begin
      if (i == LANES - 1) endl[i] = lane_valid[i];
      else endl[i] = lane_valid[i] && (!lane_valid[i+1] || nro[i+1] != '0);
    end
    for (int i = LANES - 1; i >= 0; i--) if (endl[i]) first_end = LW'(i);
    for (int i = 0; i < LANES; i++) if (endl[i]) begin last_end = LW'(i); nseg++; end
    multi = nseg > 1;
    for (int i = 0; i < LANES; i++) begin
      direct[i] = endl[i];
      if (LW'(i) == first_end && cont) direct[i] = 1'b0;      // completes the open row
      if (LW'(i) == last_end && !beat_last) direct[i] = 1'b0;  // may continue
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_row_q <= '1;
      o_valid <= 1'b0; o_seg_start <= '0; o_seg_end <= '0; o_row <= '0; o_direct <= '0;
      o_cont <= 1'b0; o_multi <= 1'b0; o_first_end <= '0; o_last_end <= '0; o_color_last <= 1'b0;
    end else begin
      o_valid <= beat_valid;
      if (color_start) last_row_q <= '1;
      else if (beat_valid) last_row_q <= row[last_end];
      o_seg_start  <= start;
      o_seg_end    <= endl;
      o_row        <= row;
      o_direct     <= direct & {LANES{beat_valid}};
      o_cont       <= cont;
      o_multi      <= multi;
      o_first_end  <= first_end;
      o_last_end   <= last_end;
      o_color_last <= beat_last;
    end
  end
endmodule
