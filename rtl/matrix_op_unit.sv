// matrix_op_unit: the SpMV/ILU0 unit ("matrix operation unit").
//
// One hardware unit runs both the sparse matrix-vector product and the two
// substitutions of the ILU0 application, because they share the structure of
// a CSR-like row traversal and are never active at the same time. The matrix
// is processed color by color (a color, or level, is a group of rows that do
// not depend on each other; each color is one sparstitioning partition).
// For every color the unit
//   1. reads the color's sizes from the color table (external read unit);
//   2. reads the color's vector partition indices and copies the vector
//      values at those positions from the URAM vector memory into the
//      pipeline's vector partition memories (internal read unit);
//   3. streams the color's matrix lines through the SpMV pipeline; the write
//      unit puts the row results back in order;
//   4. SpMV: sends the results as cache lines to the HBM result vector.
//      ILU0: the ILU0 unit subtracts the result from p[i] in URAM (forward)
//      and divides by the diagonal (backward, also writing the HBM copy).
// Because the substitutions update the vector in place, color k+1 reads the
// values color k has just written. For the backward substitution the host
// lists the colors last-first in the color table and stores U in that order.
//
// Steps 1-4 run one after the other for a color. The document overlaps the
// next color's index and partition reads with the current color's pipeline
// run (look-ahead) and forwards ILU0 results straight into the partition
// memories; neither overlap is implemented here (see the design notes), which
// costs time but not correctness. start with a command (mop_cmd_t) while idle;
// done pulses when the last color's results are in memory.
module matrix_op_unit
  import fp64_pkg::*;
  import solver_pkg::*;
#(
  parameter int VP_DEPTH   = 65536,
  parameter int ROWS_MAX   = 65536,
  parameter int URAM_DEPTH = 262144
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mop_cmd_t    cmd,
  output logic        busy,
  output logic        done,
  // DDR read ports (matrix data)
  output rd_req_t     ddr0_req,
  input  logic        ddr0_req_ready,
  input  rd_rsp_t     ddr0_rsp,
  output rd_req_t     ddr1_req,
  input  logic        ddr1_req_ready,
  input  rd_rsp_t     ddr1_rsp,
  // HBM read port (diagonal) and write port (results)
  output rd_req_t     diag_req,
  input  logic        diag_req_ready,
  input  rd_rsp_t     diag_rsp,
  output wr_req_t     res_wr,
  input  logic        res_wr_ready,
  // URAM vector memory ports
  output logic [1:0]  u_en,
  output logic [1:0]  u_we,
  output logic [1:0][$clog2(URAM_DEPTH)-1:0] u_addr,
  output fp64_t [1:0] u_wdata,
  input  fp64_t [1:0] u_rdata,
  // event strobes (for monitoring)
  output logic        ev_stall,
  output logic        ev_color
);
  localparam int UAW = $clog2(URAM_DEPTH);
  localparam int VAW = $clog2(VP_DEPTH);

  typedef enum logic [3:0] {
    S_IDLE, S_SIZES, S_SIZES_W, S_VP, S_VP_W, S_RUN, S_RUN_W, S_DRAIN, S_FLUSH, S_FLUSH_W, S_NEXT
  } state_e;
  state_e st_q;

  mop_cmd_t    cmd_q;
  color_t      col_q;
  logic [31:0] c_q, val_off_q, vp_off_q, beats_q;
  logic        wu_done_q;

  // ---------------- external read unit
  logic        ext_start;
  logic [1:0]  ext_op;
  laddr_t      ext_base0, ext_base1;
  logic [31:0] ext_count;
  logic        sizes_valid, vp_valid, vp_ready, beat_valid, beat_last, beat_ready;
  color_t      sizes;
  line_t       vp_line;
  mbeat_t      beat;

  external_read_unit u_ext (
    .clk, .rst_n, .start(ext_start), .op(ext_op), .base0(ext_base0), .base1(ext_base1), .count(ext_count),
    .req0(ddr0_req), .req0_ready(ddr0_req_ready), .rsp0(ddr0_rsp),
    .req1(ddr1_req), .req1_ready(ddr1_req_ready), .rsp1(ddr1_rsp),
    .sizes_valid, .sizes, .vp_valid, .vp_line, .vp_ready,
    .beat_valid, .beat, .beat_last, .beat_ready);

  logic [31:0] vp_lines;
  assign vp_lines = (col_q.vp_count + 32'd15) >> 4;

  always_comb begin
    ext_start = 1'b0; ext_op = 2'd0; ext_base0 = cmd_q.val_base; ext_base1 = cmd_q.color_tab; ext_count = '0;
    unique case (st_q)
      S_SIZES: begin ext_start = 1'b1; ext_op = 2'd0; ext_base1 = cmd_q.color_tab + c_q; ext_count = 32'd1; end
      S_VP:    begin ext_start = 1'b1; ext_op = 2'd1; ext_base1 = cmd_q.vp_base + vp_off_q; ext_count = vp_lines; end
      S_RUN:   begin ext_start = 1'b1; ext_op = 2'd2; ext_base0 = cmd_q.val_base + val_off_q;
                     ext_base1 = cmd_q.idx_base + val_off_q; ext_count = col_q.nnz_lines; end
      default: ;
    endcase
  end

  // ---------------- internal read unit
  logic iru_done;
  logic [1:0] iru_en;
  logic [1:0][UAW-1:0] iru_addr;
  logic [1:0] vp_we;
  logic [1:0][VAW-1:0] vp_waddr;
  fp64_t [1:0] vp_wdata;

  internal_read_unit #(.UAW(UAW), .VAW(VAW)) u_iru (
    .clk, .rst_n, .start(st_q == S_VP), .count(col_q.vp_count),
    .idx_valid(vp_valid), .idx_line(vp_line), .idx_ready(vp_ready),
    .u_en(iru_en), .u_addr(iru_addr), .u_rdata,
    .vp_we, .vp_addr(vp_waddr), .vp_wdata, .done(iru_done));

  // ---------------- SpMV pipeline
  logic [1:0]       p_valid;
  logic [1:0][31:0] p_row;
  fp64_t [1:0]      p_val;
  logic             p_idle, p_in_ready;

  spmv_pipeline #(.VP_DEPTH(VP_DEPTH)) u_pipe (
    .clk, .rst_n, .color_start(st_q == S_RUN),
    .in_valid(beat_valid), .in_ready(p_in_ready), .in_beat(beat), .in_last(beat_last),
    .vp_we, .vp_waddr, .vp_wdata,
    .out_ready(1'b1), .out_valid(p_valid), .out_row(p_row), .out_val(p_val),
    .idle(p_idle), .stall(ev_stall));
  assign beat_ready = p_in_ready;

  // ---------------- write unit
  logic        wu_ready, wu_valid, wu_out_ready, wu_done;
  logic [31:0] wu_row;
  fp64_t       wu_val;
  logic        drained;
  assign drained = (st_q == S_RUN_W) && (beats_q == col_q.nnz_lines) && p_idle;

  write_unit #(.DEPTH(ROWS_MAX)) u_wu (
    .clk, .rst_n, .ready(wu_ready), .color_start(st_q == S_RUN), .color_rows(col_q.rows),
    .in_valid(p_valid), .in_row(p_row), .in_val(p_val), .drained,
    .out_valid(wu_valid), .out_ready(wu_out_ready), .out_row(wu_row), .out_val(wu_val), .done(wu_done));

  // ---------------- ILU0 unit
  logic        is_ilu;
  assign is_ilu = (cmd_q.mode != MOP_SPMV);
  logic        ilu_in_ready, ilu_u_en, ilu_u_we, ilu_out_valid, ilu_out_ready, ilu_busy;
  logic [UAW-1:0] ilu_u_addr;
  fp64_t       ilu_u_wdata, ilu_out_val;
  logic [31:0] ilu_out_idx;

  ilu0_unit #(.UAW(UAW)) u_ilu (
    .clk, .rst_n, .op_start(start), .backward(cmd_q.mode == MOP_ILU_BWD), .row_base(col_q.row_base),
    .diag_base(cmd_q.diag_base),
    .in_valid(wu_valid && is_ilu), .in_ready(ilu_in_ready), .in_row(wu_row), .in_val(wu_val),
    .u_en(ilu_u_en), .u_we(ilu_u_we), .u_addr(ilu_u_addr), .u_wdata(ilu_u_wdata), .u_rdata(u_rdata[0]),
    .d_req(diag_req), .d_req_ready(diag_req_ready), .d_rsp(diag_rsp),
    .out_valid(ilu_out_valid), .out_ready(ilu_out_ready), .out_idx(ilu_out_idx), .out_val(ilu_out_val),
    .busy(ilu_busy));

  // ---------------- result lines to HBM
  logic        lp_valid, lp_ready, lp_flush, lp_flushed;
  logic [31:0] lp_idx;
  fp64_t       lp_val;
  always_comb begin
    if (is_ilu) begin
      lp_valid = ilu_out_valid; lp_idx = ilu_out_idx; lp_val = ilu_out_val;
    end else begin
      lp_valid = wu_valid; lp_idx = col_q.row_base + wu_row; lp_val = wu_val;
    end
    wu_out_ready  = is_ilu ? ilu_in_ready : lp_ready;
    ilu_out_ready = lp_ready;
  end
  assign lp_flush = (st_q == S_FLUSH);

  line_packer u_lp (
    .clk, .rst_n, .base(cmd_q.out_base), .in_valid(lp_valid), .in_ready(lp_ready),
    .in_idx(lp_idx), .in_val(lp_val), .flush(lp_flush), .flushed(lp_flushed),
    .wr(res_wr), .wr_ready(res_wr_ready));

  // ---------------- URAM port use by phase
  always_comb begin
    u_en = '0; u_we = '0; u_addr = '0; u_wdata = '0;
    if (st_q == S_VP_W || st_q == S_VP) begin
      u_en = iru_en; u_addr = iru_addr;
    end else begin
      u_en[0] = ilu_u_en; u_we[0] = ilu_u_we; u_addr[0] = ilu_u_addr; u_wdata[0] = ilu_u_wdata;
    end
  end

  // ---------------- color sequencer
  assign busy = (st_q != S_IDLE);
  assign ev_color = (st_q == S_NEXT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; cmd_q <= '0; col_q <= '0; c_q <= '0; val_off_q <= '0; vp_off_q <= '0;
      beats_q <= '0; wu_done_q <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (beat_valid && beat_ready) beats_q <= beats_q + 32'd1;
      if (wu_done) wu_done_q <= 1'b1;
      unique case (st_q)
        S_IDLE: if (start && wu_ready) begin
          cmd_q <= cmd; c_q <= '0; val_off_q <= '0; vp_off_q <= '0;
          st_q  <= (cmd.num_colors == '0) ? S_NEXT : S_SIZES;
        end
        S_SIZES:   st_q <= S_SIZES_W;
        S_SIZES_W: if (sizes_valid) begin col_q <= sizes; st_q <= S_VP; end
        S_VP:      st_q <= S_VP_W;
        S_VP_W:    if (iru_done) st_q <= S_RUN;
        S_RUN: begin beats_q <= '0; wu_done_q <= 1'b0; st_q <= S_RUN_W; end
        S_RUN_W:   if (drained) st_q <= S_DRAIN;
        S_DRAIN:   if ((wu_done_q || wu_done) && !ilu_busy && !wu_valid)
                     st_q <= (cmd_q.mode == MOP_ILU_FWD) ? S_NEXT : S_FLUSH;
        S_FLUSH:   st_q <= S_FLUSH_W;
        S_FLUSH_W: if (lp_flushed) st_q <= S_NEXT;
        S_NEXT: begin
          val_off_q <= val_off_q + col_q.nnz_lines;
          vp_off_q  <= vp_off_q + vp_lines;
          c_q       <= c_q + 32'd1;
          if (c_q + 32'd1 >= cmd_q.num_colors) begin st_q <= S_IDLE; done <= 1'b1; end
          else st_q <= S_SIZES;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
