// variable_regs: the solver's scalar variable registers.
//
// NREG 64-bit registers with one write port and two combinational read
// ports. Indices 0..5 are the variables the document lists (alpha, beta,
// omega, rho, rho_new and the convergence threshold); the remaining ones
// (residual norm and two temporaries) are this design's additions for the
// intermediate results of the scalar operations. A write takes effect at the
// next clock edge. init loads the starting values rho = alpha = omega = 1 and
// clears the others except the convergence threshold.
module variable_regs
  import fp64_pkg::*;
#(
  parameter int NREG = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    init,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] waddr,
  input  fp64_t                   wdata,
  input  logic [$clog2(NREG)-1:0] raddr0,
  output fp64_t                   rdata0,
  input  logic [$clog2(NREG)-1:0] raddr1,
  output fp64_t                   rdata1
);
  // 0 alpha, 1 beta, 2 omega, 3 rho, 4 rho_new, 5 convergence threshold
  localparam int V_ALPHA = 0, V_OMEGA = 2, V_RHO = 3, V_CONV = 5;

  fp64_t regs_q [NREG];

  assign rdata0 = regs_q[raddr0];
  assign rdata1 = regs_q[raddr1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs_q[i] <= FP_ZERO;
    end else if (init) begin
      for (int i = 0; i < NREG; i++)
        if (i != V_CONV) regs_q[i] <= FP_ZERO;
      regs_q[V_ALPHA] <= FP_ONE;
      regs_q[V_OMEGA] <= FP_ONE;
      regs_q[V_RHO]   <= FP_ONE;
      if (we) regs_q[waddr] <= wdata;
    end else if (we) begin
      regs_q[waddr] <= wdata;
    end
  end
endmodule
