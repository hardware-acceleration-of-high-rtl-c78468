// selective_adder_tree: adds, within one input line of the SpMV pipeline, the
// products that belong to the same matrix row.
//
// The document specifies what the tree does (sum all values of one row that
// arrive in the same cycle, steered by the control unit); the structure here
// is this implementation's: a segmented parallel-prefix (Kogge-Stone) adder
// network of log2(LANES) levels. At level d, lane i adds the partial sum of
// lane i-d unless a segment starts between them; after the last level, a
// lane that closes a segment holds that segment's full sum. Each level is one
// register stage, so sums leave LEVELS = log2(LANES) cycles after entering,
// one line per cycle. The side-band control word (any packed data) travels
// with the line so that it stays aligned with the sums.
module selective_adder_tree
  import fp64_pkg::*;
#(
  parameter int LANES  = 8,
  parameter int CTRL_W = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  fp64_t [LANES-1:0]  in_val,
  input  logic [LANES-1:0]   in_seg_start,  // lane opens a segment (lane 0 always)
  input  logic [CTRL_W-1:0]  in_ctrl,
  output logic               out_valid,
  output fp64_t [LANES-1:0]  out_sum,        // segment sum at every closing lane
  output logic [CTRL_W-1:0]  out_ctrl
);
  localparam int LEVELS = $clog2(LANES);

  fp64_t [LANES-1:0]  s_q [LEVELS+1];
  logic [LANES-1:0]   f_q [LEVELS+1];
  logic [CTRL_W-1:0]  c_q [LEVELS+1];
  logic               v_q [LEVELS+1];

  always_comb begin
    s_q[0] = in_val;
    f_q[0] = in_seg_start | LANES'(1);
    c_q[0] = in_ctrl;
    v_q[0] = in_valid;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int D = 1 << l;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_q[l+1] <= '0; f_q[l+1] <= '0; c_q[l+1] <= '0; v_q[l+1] <= 1'b0;
      end else begin
        for (int i = 0; i < LANES; i++) begin
          if (i >= D && !f_q[l][i]) begin
            s_q[l+1][i] <= fp_add_f(s_q[l][i-D], s_q[l][i]);
            f_q[l+1][i] <= f_q[l][i-D];
          end else begin
            s_q[l+1][i] <= s_q[l][i];
            f_q[l+1][i] <= f_q[l][i];
          end
        end
        c_q[l+1] <= c_q[l];
        v_q[l+1] <= v_q[l];
      end
    end
  end

  assign out_valid = v_q[LEVELS];
  assign out_sum   = s_q[LEVELS];
  assign out_ctrl  = c_q[LEVELS];
endmodule
