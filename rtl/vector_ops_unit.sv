// vector_ops_unit: the solver's vector operations unit, two dot_axpy units
// fed from two HBM read ports and writing to one HBM write port.
//
// start takes a command (vop_cmd_t) while idle:
//   VOP_AXPY  out[k] = alpha * a[k] + b[k] for lines k = 0 .. lines-1
//   VOP_DOT   s0 = a . b                     (unit 0)
//   VOP_DOT2  s0 = a . b and s1 = b . b       (unit 0 and unit 1 in parallel,
//             each input line is read once; the document uses the second unit
//             this way for omega = (t.s)/(t.t))
// Each cycle in which both input FIFOs hold a line (and, for axpy, the output
// FIFO has room for every line in flight) one line of eight doubles enters the
// units, so a vector of n lines takes about n cycles when the ports keep up.
// Axpy results are written to o_base + k with all lanes enabled (vectors are
// padded with zeros to whole lines in memory). done pulses when the last axpy
// line was accepted by the write port, or when the dot products are ready;
// s0/s1 hold the dot results until the next command. lines must be >= 1.
module vector_ops_unit
  import fp64_pkg::*;
  import solver_pkg::*;
#(
  parameter int OUT_DEPTH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  vop_cmd_t  cmd,
  output logic      busy,
  output logic      done,
  output fp64_t     s0,
  output fp64_t     s1,
  // HBM ports
  output rd_req_t   rda_req,
  input  logic      rda_req_ready,
  input  rd_rsp_t   rda_rsp,
  output rd_req_t   rdb_req,
  input  logic      rdb_req_ready,
  input  rd_rsp_t   rdb_rsp,
  output wr_req_t   wr,
  input  logic      wr_ready
);
  localparam int OW = $clog2(OUT_DEPTH);

  vop_e        op_q;
  logic [31:0] lines_q;
  laddr_t      obase_q;
  fp64_t       alpha_q;
  logic        busy_q;
  logic [31:0] fed_q, wrote_q;
  logic        got0_q, got1_q;

  logic  va, vb, pop;
  line_t da, db;
  logic  ia_unused, ib_unused;

  line_reader u_ra (.clk, .rst_n, .start, .base(cmd.a_base), .count(cmd.lines),
                    .req(rda_req), .req_ready(rda_req_ready), .rsp(rda_rsp),
                    .valid(va), .data(da), .pop, .all_issued(ia_unused));
  line_reader u_rb (.clk, .rst_n, .start, .base(cmd.b_base), .count(cmd.lines),
                    .req(rdb_req), .req_ready(rdb_req_ready), .rsp(rdb_rsp),
                    .valid(vb), .data(db), .pop, .all_issued(ib_unused));

  // output FIFO for axpy lines
  line_t         ofifo [OUT_DEPTH];
  logic [OW-1:0] owp_q, orp_q;
  logic [OW:0]   ocnt_q, oinfl_q;   // lines held / lines fed and not yet sent

  logic is_axpy, room;
  assign is_axpy = (op_q == VOP_AXPY);
  assign room    = !is_axpy || (oinfl_q < (OW+1)'(OUT_DEPTH));
  assign pop     = busy_q && va && vb && (fed_q != lines_q) && room;

  fp64_t [LANES-1:0] a_l, b_l, r0;
  always_comb
    for (int i = 0; i < LANES; i++) begin
      a_l[i] = da[64*i +: 64];
      b_l[i] = db[64*i +: 64];
    end

  logic        rv0, rv1_unused, dv0, dv1;
  fp64_t       d0, d1;
  fp64_t [LANES-1:0] r1_unused;
  logic        last;
  assign last = (fed_q + 32'd1 == lines_q);

  dot_axpy u_da0 (.clk, .rst_n, .start, .dot_mode(!is_axpy), .alpha(alpha_q),
                  .in_valid(pop), .in_last(last), .a(a_l), .b(b_l),
                  .res_valid(rv0), .res(r0), .dot_valid(dv0), .dot_res(d0));
  dot_axpy u_da1 (.clk, .rst_n, .start, .dot_mode(1'b1), .alpha(alpha_q),
                  .in_valid(pop && op_q == VOP_DOT2), .in_last(last), .a(b_l), .b(b_l),
                  .res_valid(rv1_unused), .res(r1_unused), .dot_valid(dv1), .dot_res(d1));

  logic send;
  assign wr.valid   = ocnt_q != '0;
  assign wr.addr    = obase_q + wrote_q;
  assign wr.lane_en = '1;
  assign wr.data    = ofifo[orp_q];
  assign send       = wr.valid && wr_ready;
  assign busy       = busy_q;

  always_ff @(posedge clk) if (rv0) ofifo[owp_q] <= r0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q <= VOP_AXPY; lines_q <= '0; obase_q <= '0; alpha_q <= '0; busy_q <= 1'b0; fed_q <= '0; wrote_q <= '0; got0_q <= 1'b0; got1_q <= 1'b0;
      owp_q <= '0; orp_q <= '0; ocnt_q <= '0; oinfl_q <= '0; done <= 1'b0; s0 <= '0; s1 <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy_q) begin
        op_q <= cmd.op; lines_q <= cmd.lines; obase_q <= cmd.o_base; alpha_q <= cmd.alpha; busy_q <= 1'b1; fed_q <= '0; wrote_q <= '0; got0_q <= 1'b0; got1_q <= 1'b0;
      end else if (busy_q) begin
        if (pop) fed_q <= fed_q + 32'd1;
        if (send) wrote_q <= wrote_q + 32'd1;
        if (dv0) begin s0 <= d0; got0_q <= 1'b1; end
        if (dv1) begin s1 <= d1; got1_q <= 1'b1; end
        unique case (op_q)
          VOP_AXPY: if (send && wrote_q + 32'd1 == lines_q) begin busy_q <= 1'b0; done <= 1'b1; end
          VOP_DOT:  if (got0_q || dv0) begin busy_q <= 1'b0; done <= 1'b1; end
          default:  if ((got0_q || dv0) && (got1_q || dv1)) begin busy_q <= 1'b0; done <= 1'b1; end
        endcase
      end
      if (rv0) owp_q <= owp_q + 1'b1;
      if (send) orp_q <= orp_q + 1'b1;
      ocnt_q  <= ocnt_q + (OW+1)'(rv0) - (OW+1)'(send);
      oinfl_q <= oinfl_q + (OW+1)'(pop && is_axpy) - (OW+1)'(send);
    end
  end
endmodule
