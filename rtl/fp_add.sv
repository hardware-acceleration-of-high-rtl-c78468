// fp_add: pipelined IEEE-754 double precision adder.
//
// The operation itself is fp64_pkg::fp_add_f (round to nearest even, subnormals
// flushed to zero). The result is registered and then delayed by LAT-1 more
// register stages, so y/y_valid follow a/b/in_valid by exactly LAT cycles and
// a new operation can start every cycle. The document only names double
// precision adders; their internal structure and latency are this
// implementation's choice.
module fp_add
  import fp64_pkg::*;
#(
  parameter int LAT = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp64_t a,
  input  fp64_t b,
  output logic  y_valid,
  output fp64_t y
);
  fp64_t pipe_q [LAT];
  logic  vld_q  [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        vld_q[i]  <= 1'b0;
        pipe_q[i] <= '0;
      end
    end else begin
      vld_q[0]  <= in_valid;
      pipe_q[0] <= fp_add_f(a, b);
      for (int i = 1; i < LAT; i++) begin
        vld_q[i]  <= vld_q[i-1];
        pipe_q[i] <= pipe_q[i-1];
      end
    end
  end

  assign y       = pipe_q[LAT-1];
  assign y_valid = vld_q[LAT-1];
endmodule
