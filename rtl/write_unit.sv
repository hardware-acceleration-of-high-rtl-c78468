// write_unit: puts the out-of-order row results of one color back in order.
//
// The SpMV pipeline delivers up to two (row, value) results per cycle in any
// order, because rows finished by the reduce unit overtake or trail rows that
// went straight to the merge unit. This unit writes them into a result memory
// with two write ports (the document's cyclically partitioned result memory)
// and sets a per-row "received" flag. A release pointer walks the rows of the
// color in order and hands each row on (out_*) as soon as it has arrived, so
// it always knows up to which row all results are in. Rows that never get a
// result are empty matrix rows: once the pipeline reports the color drained
// (drained pulse), the pointer also releases those, with value 0. Each row is
// released exactly once, one per cycle at most, and its flag is cleared as it
// leaves, so the memory is ready for the next color. After reset the flags
// are swept clear once (DEPTH cycles, ready low).
//
// The downstream consumer (the line packer for HBM, or the ILU0 unit) takes
// released rows with out_ready. done pulses when the last row of the color
// has been released. DEPTH (rows per color) is not given by the document;
// 65,536 is this implementation's choice.
module write_unit
  import fp64_pkg::*;
#(
  parameter int DEPTH = 65536,
  parameter int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             ready,        // reset sweep finished
  input  logic             color_start,
  input  logic [31:0]      color_rows,
  input  logic [1:0]       in_valid,
  input  logic [1:0][31:0] in_row,
  input  fp64_t [1:0]      in_val,
  input  logic             drained,      // no more results will come for this color
  output logic             out_valid,
  input  logic             out_ready,
  output logic [31:0]      out_row,
  output fp64_t            out_val,
  output logic             done
);
  fp64_t val_mem [DEPTH];
  logic  got_mem [DEPTH];

  logic [AW:0]  sweep_q;
  logic         sweeping;
  logic [31:0]  ptr_q, rows_q;
  logic         active_q, drained_q;
  logic         cur_got;
  logic         fire;

  assign sweeping = !sweep_q[AW];
  assign ready    = !sweeping;
  assign cur_got  = got_mem[AW'(ptr_q)];
  assign out_valid = active_q && (ptr_q < rows_q) && (cur_got || drained_q);
  assign out_row   = ptr_q;
  assign out_val   = cur_got ? val_mem[AW'(ptr_q)] : FP_ZERO;
  assign fire      = out_valid && out_ready;

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (in_valid[p]) begin
        val_mem[AW'(in_row[p])] <= in_val[p];
        got_mem[AW'(in_row[p])] <= 1'b1;
      end
    if (sweeping) got_mem[AW'(sweep_q)] <= 1'b0;
    else if (fire) got_mem[AW'(ptr_q)] <= 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep_q <= '0; ptr_q <= '0; rows_q <= '0; active_q <= 1'b0; drained_q <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (sweeping) sweep_q <= sweep_q + 1'b1;
      if (color_start) begin
        ptr_q <= '0; rows_q <= color_rows; active_q <= 1'b1; drained_q <= 1'b0;
        if (color_rows == '0) begin active_q <= 1'b0; done <= 1'b1; end
      end else begin
        if (drained) drained_q <= 1'b1;
        if (fire) begin
          ptr_q <= ptr_q + 32'd1;
          if (ptr_q + 32'd1 == rows_q) begin active_q <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end

  // results must fall inside the color and arrive only once
  assert property (@(posedge clk)
    (rst_n && in_valid[0] |-> in_row[0] < rows_q) and (rst_n && in_valid[1] |-> in_row[1] < rows_q))
    else $error("write_unit: row outside color");
endmodule
