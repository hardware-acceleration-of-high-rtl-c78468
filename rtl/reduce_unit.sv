// reduce_unit: completes rows whose values span more than one input line of
// the SpMV pipeline.
//
// The selective adder tree sums the values of a row within one line; a row
// that starts in one line and ends in a later one leaves partial sums in
// several lines. This unit holds one open row (accumulator, row index, valid)
// and per line, steered by the control unit:
//   - cont:   the line's first segment continues the open row; it is added
//             to the accumulator;
//   - the line's last segment opens a new row (unless the line is its
//             color's last one, in which case that segment is complete and
//             went straight to the merge unit);
//   - when the open row is known to be complete (a later segment started a
//             new row, or the color ended), it is emitted on the output.
// At most one row is emitted per line, one cycle after the line arrives. The
// document names this unit and its job; the single-accumulator scheme, with a
// one-cycle adder so that a row continuing in consecutive lines needs no
// hazard handling, is this implementation's.
module reduce_unit
  import fp64_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        cont,         // first segment continues the open row
  input  logic        multi,        // more than one segment in the line
  input  logic        color_last,   // last line of the color
  input  fp64_t       first_sum,
  input  fp64_t       last_sum,
  input  logic [31:0] last_row,
  output logic        out_valid,
  output logic [31:0] out_row,
  output fp64_t       out_val,
  output logic        busy          // a row is open
);
  fp64_t       acc_q;
  logic [31:0] acc_row_q;
  logic        acc_v_q;

  fp64_t joined;   // open row plus the line's first segment
  assign joined = fp_add_f(acc_q, first_sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0; acc_row_q <= '0; acc_v_q <= 1'b0;
      out_valid <= 1'b0; out_row <= '0; out_val <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cont && !multi) begin
          // the whole line continues the open row
          if (color_last) begin
            out_valid <= 1'b1; out_row <= acc_row_q; out_val <= joined;
            acc_v_q <= 1'b0;
          end else
            acc_q <= joined;
        end else begin
          // the open row (if any) completes in this line
          if (cont) begin
            out_valid <= 1'b1; out_row <= acc_row_q; out_val <= joined;
          end else if (acc_v_q) begin
            out_valid <= 1'b1; out_row <= acc_row_q; out_val <= acc_q;
          end
          if (color_last) acc_v_q <= 1'b0;
          else begin
            acc_q <= last_sum; acc_row_q <= last_row; acc_v_q <= 1'b1;
          end
        end
      end
    end
  end

  assign busy = acc_v_q;
endmodule
