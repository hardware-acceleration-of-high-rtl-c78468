// fp_scalar_ops: the solver's "floating point operations" block, the scalar
// arithmetic between the vector operations (beta, alpha, omega, the residual
// norm).
//
// One operation at a time: start with op, a and b while idle; done pulses
// with the result y (held until the next result).
//   OP_ADD  a + b      fp_add, done 2 cycles after start
//   OP_SUB  a - b      fp_add with b negated
//   OP_MUL  a * b      fp_mul, done 2 cycles after start
//   OP_DIV  a / b      iterative divider (fp_div), done 60 cycles after start
//   OP_SQRT sqrt(a)    iterative square root (fp_sqrt), 60 cycles
//   OP_MOV  a          fp_add with b = +0 (a copy; -0 becomes +0); codes 6
//                      and 7 behave as OP_MOV
// The document names the block but not its structure; one adder, one
// multiplier, a divider and a square root unit is this design's choice.
module fp_scalar_ops
  import fp64_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] op,
  input  fp64_t      a,
  input  fp64_t      b,
  output logic       busy,
  output logic       done,
  output fp64_t      y
);
  localparam logic [2:0] OP_ADD = 3'd0, OP_SUB = 3'd1, OP_MUL = 3'd2,
                         OP_DIV = 3'd3, OP_SQRT = 3'd4, OP_MOV = 3'd5;

  logic  div_busy, div_done, sq_busy, sq_done, add_v, mul_v;
  fp64_t div_y, sq_y, add_y, mul_y, add_b;
  logic  go, pend_q;
  logic  is_add;

  assign go     = start && !busy;
  assign is_add = (op == OP_ADD) || (op == OP_SUB) || (op >= OP_MOV);
  assign add_b  = (op == OP_SUB) ? fp_neg(b) : (op == OP_ADD) ? b : FP_ZERO;

  fp_add  u_add  (.clk, .rst_n, .in_valid(go && is_add),       .a, .b(add_b), .y_valid(add_v), .y(add_y));
  fp_mul  u_mul  (.clk, .rst_n, .in_valid(go && op == OP_MUL), .a, .b,        .y_valid(mul_v), .y(mul_y));
  fp_div  u_div  (.clk, .rst_n, .start(go && op == OP_DIV),  .a, .b, .busy(div_busy), .done(div_done), .y(div_y));
  fp_sqrt u_sqrt (.clk, .rst_n, .start(go && op == OP_SQRT), .a,     .busy(sq_busy),  .done(sq_done),  .y(sq_y));

  assign busy = pend_q || div_busy || sq_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= 1'b0; done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      if (go) pend_q <= 1'b1;
      if (add_v || mul_v || div_done || sq_done) begin
        pend_q <= 1'b0; done <= 1'b1;
        y <= add_v ? add_y : mul_v ? mul_y : div_done ? div_y : sq_y;
      end
    end
  end
endmodule
