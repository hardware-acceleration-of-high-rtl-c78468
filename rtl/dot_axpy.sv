// dot_axpy: vector unit that computes either an axpy or a dot product on one
// cache line (LANES doubles) of each input vector per cycle.
//
// It holds LANES multipliers and LANES adders; the mode decides how they are
// connected, as in the document:
//   axpy: LANES parallel lanes res[i] = alpha * a[i] + b[i]; one multiplier
//         stage and one adder stage, so res follows the inputs by 2 cycles.
//   dot:  the LANES products are summed by a tree of LANES-1 adders
//         (log2(LANES) register stages); the tree output of every cycle is
//         added to the running sum in the final adder, the remaining adder.
// The final adder is pipelined (FADD_LAT stages), so while a vector streams
// in it holds FADD_LAT interleaved partial sums. The "reduce logic" around it
// takes any two available values among {new tree output, adder output, one
// holding register} and feeds them back into the adder, parking a lone value
// in the holding register, until after the last line only one value is left:
// that is the dot product (dot_valid pulse). The order of the additions
// therefore differs from a sequential sum; results are rounded sums of the
// same terms. FADD_LAT = 4 is this implementation's choice; the document does
// not give the adder latency.
module dot_axpy
  import fp64_pkg::*;
#(
  parameter int LANES    = 8,
  parameter int FADD_LAT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,      // clears the dot accumulator
  input  logic              dot_mode,   // 0: axpy, 1: dot
  input  fp64_t             alpha,
  input  logic              in_valid,
  input  logic              in_last,    // last line of the vectors
  input  fp64_t [LANES-1:0] a,
  input  fp64_t [LANES-1:0] b,
  output logic              res_valid,
  output fp64_t [LANES-1:0] res,
  output logic              dot_valid,
  output fp64_t             dot_res
);
  localparam int LEVELS = $clog2(LANES);

  // ---------------- stage 1: multipliers
  fp64_t [LANES-1:0] prod_q, b_q;
  logic              v1_q, last1_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0; b_q <= '0; v1_q <= 1'b0; last1_q <= 1'b0;
    end else begin
      v1_q    <= in_valid;
      last1_q <= in_valid && in_last;
      b_q     <= b;
      for (int i = 0; i < LANES; i++)
        prod_q[i] <= fp_mul_f(dot_mode ? a[i] : alpha, dot_mode ? b[i] : a[i]);
    end
  end

  // ---------------- axpy: stage 2 adders
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res <= '0; res_valid <= 1'b0;
    end else begin
      res_valid <= v1_q && !dot_mode;
      for (int i = 0; i < LANES; i++) res[i] <= fp_add_f(prod_q[i], b_q[i]);
    end
  end

  // ---------------- dot: adder tree
  fp64_t [LANES-1:0] tr_q [LEVELS+1];
  logic              tv_q [LEVELS+1];
  logic              tl_q [LEVELS+1];
  always_comb begin
    tr_q[0] = prod_q;
    tv_q[0] = v1_q && dot_mode;
    tl_q[0] = last1_q && dot_mode;
  end
  for (genvar l = 0; l < LEVELS; l++) begin : g_tree
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tr_q[l+1] <= '0; tv_q[l+1] <= 1'b0; tl_q[l+1] <= 1'b0;
      end else begin
        tr_q[l+1] <= '0;
        for (int i = 0; i < (LANES >> (l + 1)); i++)
          tr_q[l+1][i] <= fp_add_f(tr_q[l][2*i], tr_q[l][2*i+1]);
        tv_q[l+1] <= tv_q[l];
        tl_q[l+1] <= tl_q[l];
      end
    end
  end

  // ---------------- final adder with reduce logic
  fp64_t fa_val [FADD_LAT];
  logic  fa_v   [FADD_LAT];
  fp64_t hold_q;
  logic  hold_v_q, ended_q;

  logic  t_v, o_v;
  fp64_t t_val, o_val;
  assign t_v   = tv_q[LEVELS];
  assign t_val = tr_q[LEVELS][0];
  assign o_v   = fa_v[FADD_LAT-1];
  assign o_val = fa_val[FADD_LAT-1];

  logic  push;
  fp64_t push_x, push_y;
  logic  hold_take, hold_put;
  fp64_t hold_new;
  logic  in_flight;

  always_comb begin
    push = 1'b0; push_x = FP_ZERO; push_y = FP_ZERO;
    hold_take = 1'b0; hold_put = 1'b0; hold_new = FP_ZERO;
    if (t_v && o_v) begin
      push = 1'b1; push_x = t_val; push_y = o_val;
    end else if (t_v && hold_v_q) begin
      push = 1'b1; push_x = t_val; push_y = hold_q; hold_take = 1'b1;
    end else if (o_v && hold_v_q) begin
      push = 1'b1; push_x = o_val; push_y = hold_q; hold_take = 1'b1;
    end else if (t_v) begin
      hold_put = 1'b1; hold_new = t_val;
    end else if (o_v) begin
      hold_put = 1'b1; hold_new = o_val;
    end
    in_flight = 1'b0;
    for (int i = 0; i < FADD_LAT; i++) in_flight |= fa_v[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < FADD_LAT; i++) begin fa_val[i] <= '0; fa_v[i] <= 1'b0; end
      hold_q <= '0; hold_v_q <= 1'b0; ended_q <= 1'b0; dot_valid <= 1'b0; dot_res <= '0;
    end else begin
      dot_valid <= 1'b0;
      fa_v[0]   <= push;
      fa_val[0] <= fp_add_f(push_x, push_y);
      for (int i = 1; i < FADD_LAT; i++) begin
        fa_v[i] <= fa_v[i-1]; fa_val[i] <= fa_val[i-1];
      end
      if (hold_take) hold_v_q <= 1'b0;
      if (hold_put) begin hold_q <= hold_new; hold_v_q <= 1'b1; end
      if (tl_q[LEVELS]) ended_q <= 1'b1;
      // one value left and nothing else in flight: the dot product
      if (ended_q && !t_v && !o_v && !in_flight && hold_v_q) begin
        dot_valid <= 1'b1; dot_res <= hold_q; hold_v_q <= 1'b0; ended_q <= 1'b0;
      end
      if (start) begin
        hold_v_q <= 1'b0; ended_q <= 1'b0;
        for (int i = 0; i < FADD_LAT; i++) fa_v[i] <= 1'b0;
      end
    end
  end
endmodule
