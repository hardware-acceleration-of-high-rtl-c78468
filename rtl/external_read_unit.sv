// external_read_unit: all off-chip reads of the SpMV/ILU0 unit.
//
// As in the document, it first reads the sizes of a color, then the color's
// vector partition indices, and then the matrix data of the color. Two DDR
// read ports are used: port 0 carries the value lines, port 1 the color
// table, the partition index lines and the index lines (column indices and
// new row offsets); each has a line_reader with its own FIFO.
//   op SIZES  one color-table line -> sizes (color_t), sizes_valid pulse
//   op VPIDX  count partition-index lines -> vp_* stream (16 indices a line)
//   op MATRIX count value and index lines, read side by side -> one pipeline
//             input line (mbeat_t) whenever both FIFOs hold a line and the
//             pipeline is ready; beat_last marks the color's last line.
// A lane whose new row offset is the padding code carries no value. The
// memory layout and the three operations are this implementation's reading
// of the document's description.
module external_read_unit
  import fp64_pkg::*;
  import solver_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  op,           // 0 SIZES, 1 VPIDX, 2 MATRIX
  input  laddr_t      base0,        // value lines (MATRIX)
  input  laddr_t      base1,        // port 1 lines
  input  logic [31:0] count,
  // DDR ports
  output rd_req_t     req0,
  input  logic        req0_ready,
  input  rd_rsp_t     rsp0,
  output rd_req_t     req1,
  input  logic        req1_ready,
  input  rd_rsp_t     rsp1,
  // sizes
  output logic        sizes_valid,
  output color_t      sizes,
  // partition index lines
  output logic        vp_valid,
  output line_t       vp_line,
  input  logic        vp_ready,
  // matrix lines
  output logic        beat_valid,
  output mbeat_t      beat,
  output logic        beat_last,
  input  logic        beat_ready
);
  localparam logic [1:0] OP_SIZES = 2'd0, OP_VPIDX = 2'd1, OP_MATRIX = 2'd2;

  logic [1:0]  op_q;
  logic [31:0] left_q;   // matrix lines still to hand out
  logic        v0, v1, pop0, pop1, done0_unused, done1_unused;
  line_t       d0, d1;

  line_reader u_rd0 (.clk, .rst_n, .start(start && op == OP_MATRIX), .base(base0), .count,
                     .req(req0), .req_ready(req0_ready), .rsp(rsp0),
                     .valid(v0), .data(d0), .pop(pop0), .all_issued(done0_unused));
  line_reader u_rd1 (.clk, .rst_n, .start(start), .base(base1), .count(op == OP_SIZES ? 32'd1 : count),
                     .req(req1), .req_ready(req1_ready), .rsp(rsp1),
                     .valid(v1), .data(d1), .pop(pop1), .all_issued(done1_unused));

  always_comb begin
    sizes       = color_t'(d1[127:0]);
    sizes_valid = (op_q == OP_SIZES) && v1;
    vp_valid    = (op_q == OP_VPIDX) && v1;
    vp_line     = d1;
    beat_valid  = (op_q == OP_MATRIX) && v0 && v1 && (left_q != '0);
    beat_last   = (left_q == 32'd1);
    for (int i = 0; i < LANES; i++) begin
      beat.val[i]   = d0[64*i +: 64];
      beat.col[i]   = d1[32*i +: 32];
      beat.nro[i]   = d1[256 + 32*i +: 32];
      beat.valid[i] = d1[256 + 32*i +: 32] != NRO_PAD;
    end
    pop0 = beat_valid && beat_ready;
    pop1 = sizes_valid || (vp_valid && vp_ready) || pop0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q <= OP_SIZES; left_q <= '0;
    end else begin
      if (start) begin
        op_q <= op; left_q <= count;
      end else if (pop0) left_q <= left_q - 32'd1;
    end
  end
endmodule
