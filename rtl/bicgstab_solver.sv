// bicgstab_solver: top level of the preconditioned BiCGStab solver.
//
// What it does: solves A x = b for a sparse matrix A with the stabilized
// bi-conjugate gradient method, preconditioned with an incomplete LU
// factorization without fill-in (ILU0), entirely on the device once the host
// has placed the matrices and vectors in memory and pulsed start.
//
// Blocks (as in the document's solver architecture):
//   - matrix_op_unit     SpMV with A, and the ILU0 application (forward
//                        substitution with L, backward with U and the
//                        diagonal); matrices are read from the two DDR ports.
//   - vector_ops_unit    two dot_axpy units (axpy, dot, two dots at once).
//   - fp_scalar_ops      scalar add/sub/mul/div/sqrt.
//   - variable_regs      alpha, beta, omega, rho, rho_new, the convergence
//                        threshold, the residual norm and two temporaries.
//   - uram_vector_mem    the on-chip vector memory (two ports), holding the
//                        vector the SpMV multiplies or the ILU0 updates.
//   - a fill engine that copies a vector from HBM into the on-chip memory.
//   - the sequencer below, which steps through the algorithm.
//
// Memory ports (Table 10 of the document): read ports 0 and 1 on DDR (matrix
// values; matrix indices, color tables and partition indices), read ports
// 2..4 and write ports 0..2 on HBM. Here HBM read port 2 feeds the first
// input of the vector unit, port 3 the second, port 4 the fill engine and
// the diagonal fetches; HBM write port 0 takes vector results whose target is
// the first copy of a double-buffered vector (or a single vector), write port
// 1 the second copy, write port 2 the matrix unit's results. The vectors x, r
// and p are kept twice ("ping-pong"): an update reads the current copy and
// writes the other one, then the two swap roles, so no port reads and writes
// the same vector at once.
//
// HBM vector slots (line address vec_base + slot * vec_stride):
//   0 b, 1/2 x, 3/4 r, 5/6 p, 7 r_hat (shadow residual), 8 v, 9 t, 10 y
//   (preconditioned direction), 11 temporary. On entry x must hold the
//   initial guess in slot 1; on exit x_addr is the line address of the
//   solution. Vectors are padded with zeros to whole lines.
//
// Algorithm (the textbook right-preconditioned BiCGStab; where the document's
// listing writes beta differently, the textbook form is used, see the README):
//   r = b - A x; r_hat = r; p = v = 0; rho = alpha = omega = 1;
//   thr = rel_tol * |r|
//   loop: rho_new = r_hat.r; beta = (rho_new/rho)(alpha/omega)
//         p = r + beta (p - omega v); y = M^-1 p; v = A y
//         alpha = rho_new / (r_hat.v); rho = rho_new
//         x = x + alpha y; r = r - alpha v; stop if |r| <= thr
//         z = M^-1 r; t = A z; omega = (t.r)/(t.t)
//         x = x + omega z; r = r - omega t; stop if |r| <= thr or the
//         iteration count reaches max_iter
// Steps run one after another; done pulses at the end with converged,
// iterations (completed half iterations count as one) and res_norm.
// The ev_* outputs pulse once per event for monitoring.
module bicgstab_solver
  import fp64_pkg::*;
  import solver_pkg::*;
#(
  parameter int VP_DEPTH   = 65536,
  parameter int ROWS_MAX   = 65536,
  parameter int URAM_DEPTH = 262144
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  solver_cfg_t  cfg,
  output logic         busy,
  output logic         done,
  output logic         converged,
  output logic [31:0]  iterations,
  output fp64_t        res_norm,
  output laddr_t       x_addr,
  // DDR read ports 0 and 1
  output rd_req_t [1:0] ddr_rd_req,
  input  logic    [1:0] ddr_rd_req_ready,
  input  rd_rsp_t [1:0] ddr_rd_rsp,
  // HBM read ports 2..4 (index 0..2 here) and write ports 0..2
  output rd_req_t [2:0] hbm_rd_req,
  input  logic    [2:0] hbm_rd_req_ready,
  input  rd_rsp_t [2:0] hbm_rd_rsp,
  output wr_req_t [2:0] hbm_wr,
  input  logic    [2:0] hbm_wr_ready,
  // events
  output logic         ev_stall,
  output logic         ev_color,
  output logic         ev_mode_switch,
  output logic         ev_swap,
  output logic         ev_fill,
  output logic         ev_dot2,
  output logic         ev_iter
);
  localparam int UAW = $clog2(URAM_DEPTH);

  // step kinds
  localparam logic [2:0] K_FILL = 3'd0, K_MOP = 3'd1, K_VOP = 3'd2, K_SOP = 3'd3,
                         K_CHK = 3'd4, K_LOOP = 3'd5;
  // logical vectors
  localparam logic [3:0] L_B = 4'd0, L_X = 4'd1, L_R = 4'd2, L_P = 4'd3, L_RH = 4'd4,
                         L_V = 4'd5, L_T = 4'd6, L_Y = 4'd7, L_TMP = 4'd8;
  // variables (variable_regs indices) and constant selectors
  localparam logic [3:0] V_ALPHA = 4'd0, V_BETA = 4'd1, V_OMEGA = 4'd2, V_RHO = 4'd3,
                         V_RHO_NEW = 4'd4, V_CONV = 4'd5, V_NORM = 4'd6, V_T1 = 4'd7,
                         V_T2 = 4'd8, C_ZERO = 4'd14, C_ONE = 4'd15, V_NONE = 4'd15;
  // vector ops (vop_e codes, 3 bits wide in a step)
  localparam logic [2:0] Q_AXPY = 3'd0, Q_DOT = 3'd1, Q_DOT2 = 3'd2;
  // scalar ops (fp_scalar_ops codes)
  localparam logic [2:0] S_MUL = 3'd2, S_DIV = 3'd3, S_SQRT = 3'd4, S_MOV = 3'd5;
  // matrices
  localparam logic [3:0] M_A = 4'd0, M_L = 4'd1, M_U = 4'd2;
  localparam logic [5:0] PC_LOOP = 6'd10;

  typedef struct packed {
    logic [2:0] kind;
    logic [2:0] op;     // vop_e or scalar op
    logic [3:0] a;      // slot / matrix / variable
    logic [3:0] b;
    logic [3:0] o;      // output slot / variable
    logic [3:0] asel;   // axpy factor
    logic       neg;    // negate the axpy factor
    logic [3:0] d1;     // variable for the second dot product
  } step_t;

  function automatic step_t mk(logic [2:0] kind, logic [2:0] op, logic [3:0] a, logic [3:0] b,
                               logic [3:0] o, logic [3:0] asel, logic neg, logic [3:0] d1);
    mk = '{kind, op, a, b, o, asel, neg, d1};
  endfunction

  function automatic step_t prog(logic [5:0] pc);
    unique case (pc)
      6'd0:  prog = mk(K_FILL, 3'd0, L_X, 4'd0, 4'd0, 4'd0, 1'b0, V_NONE);
      6'd1:  prog = mk(K_MOP,  3'd0, M_A, 4'd0, L_TMP, 4'd0, 1'b0, V_NONE);
      6'd2:  prog = mk(K_VOP,  Q_AXPY, L_TMP, L_B, L_R, C_ONE, 1'b1, V_NONE);   // r = b - A x
      6'd3:  prog = mk(K_VOP,  Q_AXPY, L_R, L_R, L_RH, C_ZERO, 1'b0, V_NONE);   // r_hat = r
      6'd4:  prog = mk(K_VOP,  Q_AXPY, L_R, L_R, L_P, C_ONE, 1'b1, V_NONE);     // p = 0
      6'd5:  prog = mk(K_VOP,  Q_AXPY, L_R, L_R, L_V, C_ONE, 1'b1, V_NONE);     // v = 0
      6'd6:  prog = mk(K_VOP,  Q_DOT, L_R, L_R, V_T1, 4'd0, 1'b0, V_NONE);
      6'd7:  prog = mk(K_SOP,  S_SQRT, V_T1, V_T1, V_NORM, 4'd0, 1'b0, V_NONE);
      6'd8:  prog = mk(K_SOP,  S_MUL, V_NORM, V_CONV, V_CONV, 4'd0, 1'b0, V_NONE);
      6'd9:  prog = mk(K_CHK,  3'd0, 4'd0, 4'd0, 4'd0, 4'd0, 1'b0, V_NONE);
      // iteration
      6'd10: prog = mk(K_VOP,  Q_DOT, L_RH, L_R, V_RHO_NEW, 4'd0, 1'b0, V_NONE);
      6'd11: prog = mk(K_SOP,  S_DIV, V_RHO_NEW, V_RHO, V_T1, 4'd0, 1'b0, V_NONE);
      6'd12: prog = mk(K_SOP,  S_DIV, V_ALPHA, V_OMEGA, V_T2, 4'd0, 1'b0, V_NONE);
      6'd13: prog = mk(K_SOP,  S_MUL, V_T1, V_T2, V_BETA, 4'd0, 1'b0, V_NONE);
      6'd14: prog = mk(K_VOP,  Q_AXPY, L_V, L_P, L_TMP, V_OMEGA, 1'b1, V_NONE); // p - omega v
      6'd15: prog = mk(K_VOP,  Q_AXPY, L_TMP, L_R, L_P, V_BETA, 1'b0, V_NONE);  // p = r + beta(..)
      6'd16: prog = mk(K_FILL, 3'd0, L_P, 4'd0, 4'd0, 4'd0, 1'b0, V_NONE);
      6'd17: prog = mk(K_MOP,  3'd0, M_L, 4'd0, L_Y, 4'd0, 1'b0, V_NONE);
      6'd18: prog = mk(K_MOP,  3'd0, M_U, 4'd0, L_Y, 4'd0, 1'b0, V_NONE);          // y = M^-1 p
      6'd19: prog = mk(K_MOP,  3'd0, M_A, 4'd0, L_V, 4'd0, 1'b0, V_NONE);          // v = A y
      6'd20: prog = mk(K_VOP,  Q_DOT, L_RH, L_V, V_T1, 4'd0, 1'b0, V_NONE);
      6'd21: prog = mk(K_SOP,  S_DIV, V_RHO_NEW, V_T1, V_ALPHA, 4'd0, 1'b0, V_NONE);
      6'd22: prog = mk(K_SOP,  S_MOV, V_RHO_NEW, V_RHO_NEW, V_RHO, 4'd0, 1'b0, V_NONE);
      6'd23: prog = mk(K_VOP,  Q_AXPY, L_Y, L_X, L_X, V_ALPHA, 1'b0, V_NONE);
      6'd24: prog = mk(K_VOP,  Q_AXPY, L_V, L_R, L_R, V_ALPHA, 1'b1, V_NONE);
      6'd25: prog = mk(K_VOP,  Q_DOT, L_R, L_R, V_T1, 4'd0, 1'b0, V_NONE);
      6'd26: prog = mk(K_SOP,  S_SQRT, V_T1, V_T1, V_NORM, 4'd0, 1'b0, V_NONE);
      6'd27: prog = mk(K_CHK,  3'd1, 4'd0, 4'd0, 4'd0, 4'd0, 1'b0, V_NONE);
      6'd28: prog = mk(K_FILL, 3'd0, L_R, 4'd0, 4'd0, 4'd0, 1'b0, V_NONE);
      6'd29: prog = mk(K_MOP,  3'd0, M_L, 4'd0, L_Y, 4'd0, 1'b0, V_NONE);
      6'd30: prog = mk(K_MOP,  3'd0, M_U, 4'd0, L_Y, 4'd0, 1'b0, V_NONE);          // z = M^-1 r
      6'd31: prog = mk(K_MOP,  3'd0, M_A, 4'd0, L_T, 4'd0, 1'b0, V_NONE);          // t = A z
      6'd32: prog = mk(K_VOP,  Q_DOT2, L_R, L_T, V_T1, 4'd0, 1'b0, V_T2);        // t.r, t.t
      6'd33: prog = mk(K_SOP,  S_DIV, V_T1, V_T2, V_OMEGA, 4'd0, 1'b0, V_NONE);
      6'd34: prog = mk(K_VOP,  Q_AXPY, L_Y, L_X, L_X, V_OMEGA, 1'b0, V_NONE);
      6'd35: prog = mk(K_VOP,  Q_AXPY, L_T, L_R, L_R, V_OMEGA, 1'b1, V_NONE);
      6'd36: prog = mk(K_VOP,  Q_DOT, L_R, L_R, V_T1, 4'd0, 1'b0, V_NONE);
      6'd37: prog = mk(K_SOP,  S_SQRT, V_T1, V_T1, V_NORM, 4'd0, 1'b0, V_NONE);
      default: prog = mk(K_LOOP, 3'd0, 4'd0, 4'd0, 4'd0, 4'd0, 1'b0, V_NONE);
    endcase
  endfunction

  // ---------------- sequencer state
  typedef enum logic [2:0] { T_IDLE, T_ISSUE, T_WAIT, T_WB1, T_NEXT } tstate_e;
  tstate_e     ts_q;
  logic [5:0]  pc_q;
  step_t       st;
  logic        x_q, r_q, p_q;      // which copy of x, r, p is current
  logic [31:0] iter_q;
  mop_e        last_mode_q;
  logic        mode_seen_q;
  assign st = prog(pc_q);

  function automatic logic [3:0] phys(logic [3:0] l, logic wr, logic xs, logic rs, logic ps);
    unique case (l)
      L_B:     phys = 4'd0;
      L_X:     phys = 4'd1 + 4'(xs ^ wr);
      L_R:     phys = 4'd3 + 4'(rs ^ wr);
      L_P:     phys = 4'd5 + 4'(ps ^ wr);
      L_RH:    phys = 4'd7;
      L_V:     phys = 4'd8;
      L_T:     phys = 4'd9;
      L_Y:     phys = 4'd10;
      default: phys = 4'd11;
    endcase
  endfunction

  function automatic laddr_t slot_addr(logic [3:0] s, laddr_t base, laddr_t stride);
    slot_addr = base + laddr_t'(s) * stride;
  endfunction

  solver_cfg_t cfg_q;

  // ---------------- variable registers
  logic        vr_init, vr_we;
  logic [3:0]  vr_waddr, vr_ra0, vr_ra1;
  fp64_t       vr_wdata, vr_rd0, vr_rd1;
  variable_regs #(.NREG(9)) u_vars (
    .clk, .rst_n, .init(vr_init), .we(vr_we), .waddr(vr_waddr), .wdata(vr_wdata),
    .raddr0(vr_ra0), .rdata0(vr_rd0), .raddr1(vr_ra1), .rdata1(vr_rd1));

  // ---------------- scalar unit
  logic  sop_start, sop_busy, sop_done;
  fp64_t sop_y;
  fp_scalar_ops u_sop (.clk, .rst_n, .start(sop_start), .op(st.op), .a(vr_rd0), .b(vr_rd1),
                       .busy(sop_busy), .done(sop_done), .y(sop_y));

  // ---------------- vector unit
  logic     vop_start, vop_busy, vop_done;
  vop_cmd_t vop_cmd;
  fp64_t    s0, s1, axpy_f;
  logic     vop_wr_sel;            // write port 0 or 1
  wr_req_t  vop_wr;
  logic     vop_wr_ready;

  always_comb begin
    axpy_f = (st.asel == C_ONE) ? FP_ONE : (st.asel == C_ZERO) ? FP_ZERO : vr_rd0;
    vop_cmd.op     = vop_e'(st.op[1:0]);
    vop_cmd.lines  = cfg_q.n_lines;
    vop_cmd.a_base = slot_addr(phys(st.a, 1'b0, x_q, r_q, p_q), cfg_q.vec_base, cfg_q.vec_stride);
    vop_cmd.b_base = slot_addr(phys(st.b, 1'b0, x_q, r_q, p_q), cfg_q.vec_base, cfg_q.vec_stride);
    vop_cmd.o_base = slot_addr(phys(st.o, 1'b1, x_q, r_q, p_q), cfg_q.vec_base, cfg_q.vec_stride);
    vop_cmd.alpha  = st.neg ? fp_neg(axpy_f) : axpy_f;
  end

  vector_ops_unit u_vop (
    .clk, .rst_n, .start(vop_start), .cmd(vop_cmd), .busy(vop_busy), .done(vop_done), .s0, .s1,
    .rda_req(hbm_rd_req[0]), .rda_req_ready(hbm_rd_req_ready[0]), .rda_rsp(hbm_rd_rsp[0]),
    .rdb_req(hbm_rd_req[1]), .rdb_req_ready(hbm_rd_req_ready[1]), .rdb_rsp(hbm_rd_rsp[1]),
    .wr(vop_wr), .wr_ready(vop_wr_ready));

  // second copies of x, r and p (slots 2, 4, 6) are written through port 1
  logic [3:0] vop_oslot_q;
  assign vop_wr_sel   = (vop_oslot_q == 4'd2) || (vop_oslot_q == 4'd4) || (vop_oslot_q == 4'd6);
  assign vop_wr_ready = vop_wr_sel ? hbm_wr_ready[1] : hbm_wr_ready[0];
  always_comb begin
    hbm_wr[0] = vop_wr; hbm_wr[1] = vop_wr;
    hbm_wr[0].valid = vop_wr.valid && !vop_wr_sel;
    hbm_wr[1].valid = vop_wr.valid && vop_wr_sel;
  end

  // ---------------- matrix unit
  logic     mop_start, mop_busy, mop_done;
  mop_cmd_t mop_cmd;
  rd_req_t  diag_req;
  rd_rsp_t  diag_rsp;
  logic     diag_req_ready;
  logic [1:0]          m_uen, m_uwe;
  logic [1:0][UAW-1:0] m_uaddr;
  fp64_t [1:0]         m_uwdata, u_rdata;

  always_comb begin
    unique case (st.a)
      M_L:     begin mop_cmd = cfg_q.mat_l; mop_cmd.mode = MOP_ILU_FWD; end
      M_U:     begin mop_cmd = cfg_q.mat_u; mop_cmd.mode = MOP_ILU_BWD; end
      default: begin mop_cmd = cfg_q.mat_a; mop_cmd.mode = MOP_SPMV; end
    endcase
    mop_cmd.out_base = slot_addr(phys(st.o, 1'b1, x_q, r_q, p_q), cfg_q.vec_base, cfg_q.vec_stride);
  end

  matrix_op_unit #(.VP_DEPTH(VP_DEPTH), .ROWS_MAX(ROWS_MAX), .URAM_DEPTH(URAM_DEPTH)) u_mop (
    .clk, .rst_n, .start(mop_start), .cmd(mop_cmd), .busy(mop_busy), .done(mop_done),
    .ddr0_req(ddr_rd_req[0]), .ddr0_req_ready(ddr_rd_req_ready[0]), .ddr0_rsp(ddr_rd_rsp[0]),
    .ddr1_req(ddr_rd_req[1]), .ddr1_req_ready(ddr_rd_req_ready[1]), .ddr1_rsp(ddr_rd_rsp[1]),
    .diag_req, .diag_req_ready, .diag_rsp,
    .res_wr(hbm_wr[2]), .res_wr_ready(hbm_wr_ready[2]),
    .u_en(m_uen), .u_we(m_uwe), .u_addr(m_uaddr), .u_wdata(m_uwdata), .u_rdata,
    .ev_stall, .ev_color);

  // ---------------- fill engine: HBM vector -> on-chip vector memory
  logic        fill_start, fill_q, f_valid, f_pop, f_unused;
  line_t       f_data;
  rd_req_t     f_req;
  rd_rsp_t     f_rsp;
  logic [1:0]  f_pair_q;
  logic [31:0] f_line_q;

  line_reader u_fill (.clk, .rst_n, .start(fill_start),
                      .base(slot_addr(phys(st.a, 1'b0, x_q, r_q, p_q), cfg_q.vec_base, cfg_q.vec_stride)),
                      .count(cfg_q.n_lines), .req(f_req), .req_ready(hbm_rd_req_ready[2] && fill_q),
                      .rsp(f_rsp), .valid(f_valid), .data(f_data), .pop(f_pop), .all_issued(f_unused));
  assign f_pop = fill_q && f_valid && (f_pair_q == 2'd3);

  // HBM read port 4 is shared by the fill engine and the diagonal fetches
  always_comb begin
    hbm_rd_req[2]  = fill_q ? f_req : diag_req;
    hbm_rd_req[2].valid = fill_q ? f_req.valid : diag_req.valid;
    diag_req_ready = hbm_rd_req_ready[2] && !fill_q;
    f_rsp          = hbm_rd_rsp[2];
    f_rsp.valid    = hbm_rd_rsp[2].valid && fill_q;
    diag_rsp       = hbm_rd_rsp[2];
    diag_rsp.valid = hbm_rd_rsp[2].valid && !fill_q;
  end

  // ---------------- on-chip vector memory
  logic [1:0]          u_en, u_we;
  logic [1:0][UAW-1:0] u_addr;
  fp64_t [1:0]         u_wdata;
  always_comb begin
    if (fill_q) begin
      for (int p = 0; p < 2; p++) begin
        u_en[p]    = f_valid;
        u_we[p]    = f_valid;
        u_addr[p]  = UAW'({f_line_q, f_pair_q, 1'b0}) + UAW'(p);
        u_wdata[p] = f_data[64*(2*f_pair_q + p) +: 64];
      end
    end else begin
      u_en = m_uen; u_we = m_uwe; u_addr = m_uaddr; u_wdata = m_uwdata;
    end
  end
  uram_vector_mem #(.DEPTH(URAM_DEPTH)) u_uram (
    .clk, .en(u_en), .we(u_we), .addr(u_addr), .wdata(u_wdata), .rdata(u_rdata));

  // ---------------- sequencer
  logic norm_ok;
  assign norm_ok = !vr_rd0[63] && !vr_rd1[63] && (vr_rd0[62:0] <= vr_rd1[62:0]) &&
                   !fp_is_nan(vr_rd0);

  always_comb begin
    vr_ra0 = st.a; vr_ra1 = st.b;
    if (st.kind == K_VOP) vr_ra0 = st.asel;
    if (st.kind == K_CHK || st.kind == K_LOOP) begin vr_ra0 = V_NORM; vr_ra1 = V_CONV; end
    vr_init  = (ts_q == T_IDLE) && start;
    vr_we    = 1'b0;
    vr_waddr = V_CONV;
    vr_wdata = cfg_q.rel_tol;
    if (ts_q == T_ISSUE && pc_q == '0) vr_we = 1'b1;   // threshold factor
    if (ts_q == T_WAIT && st.kind == K_SOP && sop_done) begin
      vr_we = 1'b1; vr_waddr = st.o; vr_wdata = sop_y;
    end
    if (ts_q == T_WAIT && st.kind == K_VOP && vop_done && st.op != Q_AXPY) begin
      vr_we = 1'b1; vr_waddr = st.o; vr_wdata = s0;
    end
    if (ts_q == T_WB1) begin
      vr_we = 1'b1; vr_waddr = st.d1; vr_wdata = s1;
    end
    fill_start = (ts_q == T_ISSUE) && st.kind == K_FILL;
    mop_start  = (ts_q == T_ISSUE) && st.kind == K_MOP;
    vop_start  = (ts_q == T_ISSUE) && st.kind == K_VOP;
    sop_start  = (ts_q == T_ISSUE) && st.kind == K_SOP;
  end

  assign busy   = (ts_q != T_IDLE) || mop_busy || vop_busy || sop_busy;
  assign x_addr = slot_addr(4'd1 + 4'(x_q), cfg_q.vec_base, cfg_q.vec_stride);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_q <= T_IDLE; pc_q <= '0; x_q <= 1'b0; r_q <= 1'b0; p_q <= 1'b0; iter_q <= '0;
      cfg_q <= '0; fill_q <= 1'b0; f_pair_q <= '0; f_line_q <= '0; vop_oslot_q <= '0;
      last_mode_q <= MOP_SPMV; mode_seen_q <= 1'b0;
      done <= 1'b0; converged <= 1'b0; iterations <= '0; res_norm <= '0;
      ev_mode_switch <= 1'b0; ev_swap <= 1'b0; ev_fill <= 1'b0; ev_dot2 <= 1'b0; ev_iter <= 1'b0;
    end else begin
      done <= 1'b0; ev_mode_switch <= 1'b0; ev_swap <= 1'b0; ev_fill <= 1'b0; ev_dot2 <= 1'b0;
      ev_iter <= 1'b0;
      // fill engine
      if (fill_q && f_valid) begin
        f_pair_q <= f_pair_q + 2'd1;
        if (f_pair_q == 2'd3) f_line_q <= f_line_q + 32'd1;
      end
      unique case (ts_q)
        T_IDLE: if (start) begin
          cfg_q <= cfg; pc_q <= '0; x_q <= 1'b0; r_q <= 1'b0; p_q <= 1'b0; iter_q <= '0;
          converged <= 1'b0; mode_seen_q <= 1'b0; ts_q <= T_ISSUE;
        end
        T_ISSUE: begin
          ts_q <= T_WAIT;
          unique case (st.kind)
            K_FILL: begin fill_q <= 1'b1; f_pair_q <= '0; f_line_q <= '0; ev_fill <= 1'b1; end
            K_MOP: begin
              mode_seen_q <= 1'b1; last_mode_q <= mop_cmd.mode;
              if (mode_seen_q && last_mode_q != mop_cmd.mode) ev_mode_switch <= 1'b1;
            end
            K_VOP: begin
              vop_oslot_q <= phys(st.o, 1'b1, x_q, r_q, p_q);
              if (st.op == Q_DOT2) ev_dot2 <= 1'b1;
            end
            K_CHK: begin
              ts_q <= T_NEXT;
              if (norm_ok) begin
                ts_q <= T_IDLE; done <= 1'b1; converged <= 1'b1; res_norm <= vr_rd0;
                iterations <= iter_q + 32'(st.op[0]);
              end
            end
            K_LOOP: begin
              ev_iter <= 1'b1;
              iter_q  <= iter_q + 32'd1;
              ts_q    <= T_ISSUE;
              pc_q    <= PC_LOOP;
              if (norm_ok || iter_q + 32'd1 >= cfg_q.max_iter) begin
                ts_q <= T_IDLE; done <= 1'b1; converged <= norm_ok; res_norm <= vr_rd0;
                iterations <= iter_q + 32'd1;
              end
            end
            default: ;
          endcase
        end
        T_WAIT: begin
          unique case (st.kind)
            K_FILL: if (fill_q && f_valid && f_pair_q == 2'd3 && f_line_q + 32'd1 == cfg_q.n_lines) begin
              fill_q <= 1'b0; ts_q <= T_NEXT;
            end
            K_MOP: if (mop_done) ts_q <= T_NEXT;
            K_SOP: if (sop_done) ts_q <= T_NEXT;
            K_VOP: if (vop_done) begin
              ts_q <= (st.op == Q_DOT2) ? T_WB1 : T_NEXT;
              if (st.op == Q_AXPY) begin
                if (st.o == L_X) x_q <= !x_q;
                if (st.o == L_R) r_q <= !r_q;
                if (st.o == L_P) p_q <= !p_q;
                if (st.o == L_X || st.o == L_R || st.o == L_P) ev_swap <= 1'b1;
              end
            end
            default: ts_q <= T_NEXT;
          endcase
        end
        T_WB1: ts_q <= T_NEXT;
        T_NEXT: begin pc_q <= pc_q + 6'd1; ts_q <= T_ISSUE; end
        default: ts_q <= T_IDLE;
      endcase
    end
  end
endmodule
