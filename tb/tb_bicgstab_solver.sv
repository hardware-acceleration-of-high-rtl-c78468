// tb_bicgstab_solver: end-to-end test of the solver top level with its
// default (full-size) parameters.
//
// The testbench plays the host and the memories:
//   - builds a sparse, diagonally dominant, non-symmetric system on a 16 x 24
//     grid (five-point pattern plus random extra couplings) plus 128
//     decoupled unknowns (rows with a diagonal entry only, like fixed boundary
//     values; a long run of one-entry rows makes the SpMV pipeline stall),
//     colors its rows
//     greedily so that rows of one color never couple, and renumbers the rows
//     color by color;
//   - computes the ILU0 factors (L, U, diagonal) of the renumbered matrix;
//   - lays out A, L and U per color in the solver's memory format (color
//     table, partition indices, index lines with column positions and new row
//     offsets, value lines), with U's colors listed last-first;
//   - puts b = A x_true and x0 = 0 in the HBM vector slots;
//   - models two DDR read ports and three HBM read and three HBM write ports
//     with a fixed latency and random request back-pressure.
// The default parameters of the solver are used (full-size memories).
// After done it checks that the solver converged, that the returned x matches
// x_true and solves the system, and that the iteration count is close to a
// real-arithmetic BiCGStab run of the same algorithm. It also counts the
// mechanisms the run must exercise (pipeline stall, color changes, switches
// between SpMV and ILU0 modes, ping-pong swaps, vector fills, the double dot
// product, iterations, memory back-pressure, partial-line writes, empty
// rows) and fails if any of them never happened.
`timescale 1ns/1ps
module tb_bicgstab_solver;
  import fp64_pkg::*;
  import solver_pkg::*;

  localparam int NX = 16, NY = 24, NG = NX * NY, NISO = 128, N = NG + NISO;
  localparam int NL = (N + 7) / 8;
  localparam int STRIDE = 64;
  localparam int DIAG_SLOT = 12;
  localparam int MEMW = 2048;
  localparam int LAT = 8;
  localparam int MAXC = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- DUT
  logic         start = 1'b0;
  solver_cfg_t  cfg;
  logic         busy, done, converged;
  logic [31:0]  iterations;
  fp64_t        res_norm;
  laddr_t       x_addr;
  rd_req_t [1:0] ddr_rd_req;
  logic    [1:0] ddr_rd_req_ready;
  rd_rsp_t [1:0] ddr_rd_rsp;
  rd_req_t [2:0] hbm_rd_req;
  logic    [2:0] hbm_rd_req_ready;
  rd_rsp_t [2:0] hbm_rd_rsp;
  wr_req_t [2:0] hbm_wr;
  logic    [2:0] hbm_wr_ready;
  logic ev_stall, ev_color, ev_mode_switch, ev_swap, ev_fill, ev_dot2, ev_iter;

  bicgstab_solver dut (.*);

  // ---------------- memories
  line_t ddr0_mem [MEMW];
  line_t ddr1_mem [MEMW];
  line_t hbm_mem  [MEMW];

  rd_req_t [4:0] rq;
  logic    [4:0] rq_ready;
  rd_rsp_t [4:0] rs;
  assign rq = {hbm_rd_req, ddr_rd_req};
  assign ddr_rd_req_ready = rq_ready[1:0];
  assign hbm_rd_req_ready = rq_ready[4:2];
  assign ddr_rd_rsp = rs[1:0];
  assign hbm_rd_rsp = rs[4:2];

  laddr_t pend_addr [5][64];
  longint pend_due  [5][64];
  int     ph [5], pt [5];
  longint cyc = 0;
  int     backpressure = 0, partial_writes = 0, oob = 0;

  function automatic line_t mem_read(int p, laddr_t a);
    if (a >= MEMW) begin oob++; return '0; end
    if (p == 0) return ddr0_mem[a];
    if (p == 1) return ddr1_mem[a];
    return hbm_mem[a];
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < 5; p++) begin
      // responses, in request order, LAT cycles after the request
      if (ph[p] != pt[p] && pend_due[p][ph[p]] <= cyc) begin
        rs[p].valid <= 1'b1;
        rs[p].data  <= mem_read(p, pend_addr[p][ph[p]]);
        ph[p] = (ph[p] + 1) % 64;
      end else begin
        rs[p].valid <= 1'b0;
      end
      if (rq[p].valid && rq_ready[p]) begin
        pend_addr[p][pt[p]] = rq[p].addr;
        pend_due[p][pt[p]]  = cyc + LAT;
        pt[p] = (pt[p] + 1) % 64;
      end
      if (rq[p].valid && !rq_ready[p]) backpressure++;
      // DDR ports rarely refuse, so the matrix streams nearly at full rate
      rq_ready[p] <= ($urandom % 100) < ((p < 2) ? 97 : 75);
    end
    for (int w = 0; w < 3; w++) begin
      if (hbm_wr[w].valid && hbm_wr_ready[w]) begin
        if (hbm_wr[w].addr >= MEMW) oob++;
        else
          for (int l = 0; l < 8; l++)
            if (hbm_wr[w].lane_en[l]) hbm_mem[hbm_wr[w].addr][64*l +: 64] = hbm_wr[w].data[64*l +: 64];
        if (hbm_wr[w].lane_en != '1) partial_writes++;
      end
      hbm_wr_ready[w] <= ($urandom % 100) < 80;
    end
  end

  // ---------------- event counters
  int n_stall = 0, n_color = 0, n_mode = 0, n_swap = 0, n_fill = 0, n_dot2 = 0, n_iter = 0;
  always @(posedge clk) begin
    n_stall += int'(ev_stall); n_color += int'(ev_color); n_mode += int'(ev_mode_switch);
    n_swap  += int'(ev_swap);  n_fill  += int'(ev_fill);  n_dot2 += int'(ev_dot2);
    n_iter  += int'(ev_iter);
  end

  // ---------------- problem construction
  bit  pat [N][N];      // pattern in original numbering
  real a0  [N][N];
  int  color [N];
  int  ncol;
  int  perm [N];        // new row -> old row
  int  cstart [MAXC], crows [MAXC];
  bit  pp  [N][N];      // pattern, renumbered
  real ap  [N][N];      // A, renumbered
  real lu  [N][N];      // ILU0 factors (unit L below, U on and above the diagonal)
  real xt  [N], bv [N];
  int  ptr0 = 0, ptr1 = 0;
  int  empty_rows = 0;

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 10000) / 10000.0;
  endfunction

  function automatic void put_val(ref line_t mem [MEMW], input int idx, input real v);
    mem[idx / 8][64 * (idx % 8) +: 64] = $realtobits(v);
  endfunction

  // which: 0 = A, 1 = strict L, 2 = strict U; rev lists the colors last-first
  task automatic encode(input int which, input bit rev, output mop_cmd_t cmd);
    int ent_col [N*N];
    real ent_val [N*N];
    int ent_row [N*N];
    int nnz_c [MAXC], vpc [MAXC];
    int c, ne, tab, vpb, idxb, valb, vpoff, loff, prev;
    int pos [N];
    bit seen [N];
    tab = ptr1; ptr1 += ncol;
    // first pass: sizes
    for (int k = 0; k < ncol; k++) begin
      c = rev ? ncol - 1 - k : k;
      nnz_c[k] = 0; vpc[k] = 0;
      for (int j = 0; j < N; j++) seen[j] = 0;
      for (int i = cstart[c]; i < cstart[c] + crows[c]; i++)
        for (int j = 0; j < N; j++)
          if (pp[i][j] && (which == 0 || (which == 1 && j < i) || (which == 2 && j > i))) begin
            nnz_c[k]++; seen[j] = 1;
          end
      for (int j = 0; j < N; j++) vpc[k] += int'(seen[j]);
    end
    vpb = ptr1;
    for (int k = 0; k < ncol; k++) ptr1 += (vpc[k] + 15) / 16;
    idxb = ptr1;
    valb = ptr0;
    vpoff = 0; loff = 0;
    for (int k = 0; k < ncol; k++) begin
      c = rev ? ncol - 1 - k : k;
      ddr1_mem[tab + k] = '0;
      ddr1_mem[tab + k][127:0] = {32'(cstart[c]), 32'(vpc[k]), 32'(crows[c]), 32'((nnz_c[k] + 7) / 8)};
      // partition: the referenced columns in increasing order
      for (int j = 0; j < N; j++) seen[j] = 0;
      ne = 0;
      for (int i = cstart[c]; i < cstart[c] + crows[c]; i++)
        for (int j = 0; j < N; j++)
          if (pp[i][j] && (which == 0 || (which == 1 && j < i) || (which == 2 && j > i))) begin
            seen[j] = 1;
            ent_row[ne] = i - cstart[c]; ent_col[ne] = j;
            ent_val[ne] = (which == 0) ? ap[i][j] : lu[i][j];
            ne++;
          end
      begin
        int q = 0;
        for (int j = 0; j < N; j++)
          if (seen[j]) begin
            pos[j] = q;
            ddr1_mem[vpb + vpoff + q / 16][32 * (q % 16) +: 32] = 32'(j);
            q++;
          end
      end
      // the color's empty rows (no entry) are filled in by the write unit
      for (int i = 0; i < crows[c]; i++) begin
        bit any = 0;
        for (int e = 0; e < ne; e++) if (ent_row[e] == i) any = 1;
        if (!any) empty_rows++;
      end
      prev = -1;
      for (int e = 0; e < (ne + 7) / 8 * 8; e++) begin
        int ln = idxb + loff + e / 8, lane = e % 8;
        if (lane == 0) begin ddr1_mem[ln] = '0; ddr0_mem[valb + loff + e / 8] = '0; end
        if (e < ne) begin
          ddr1_mem[ln][32 * lane +: 32]       = 32'(pos[ent_col[e]]);
          ddr1_mem[ln][256 + 32 * lane +: 32] = 32'((ent_row[e] == prev) ? 0 : ent_row[e] - prev);
          ddr0_mem[valb + loff + e / 8][64 * lane +: 64] = $realtobits(ent_val[e]);
          prev = ent_row[e];
        end else begin
          ddr1_mem[ln][256 + 32 * lane +: 32] = NRO_PAD;
        end
      end
      vpoff += (vpc[k] + 15) / 16;
      loff  += (ne + 7) / 8;
    end
    ptr1 += loff; ptr0 += loff;
    cmd = '0;
    cmd.num_colors = 32'(ncol);
    cmd.color_tab  = laddr_t'(tab);
    cmd.vp_base    = laddr_t'(vpb);
    cmd.idx_base   = laddr_t'(idxb);
    cmd.val_base   = laddr_t'(valb);
    cmd.diag_base  = laddr_t'(DIAG_SLOT * STRIDE);
  endtask

  // real-arithmetic reference: same algorithm, same preconditioner
  function automatic void precond(input real v [N], output real y [N]);
    for (int i = 0; i < N; i++) begin
      y[i] = v[i];
      for (int j = 0; j < i; j++) if (pp[i][j]) y[i] -= lu[i][j] * y[j];
    end
    for (int i = N - 1; i >= 0; i--) begin
      for (int j = i + 1; j < N; j++) if (pp[i][j]) y[i] -= lu[i][j] * y[j];
      y[i] = y[i] / lu[i][i];
    end
  endfunction

  function automatic real dotp(input real u [N], input real v [N]);
    real s = 0.0;
    for (int i = 0; i < N; i++) s += u[i] * v[i];
    return s;
  endfunction

  function automatic void matvec(input real v [N], output real y [N]);
    for (int i = 0; i < N; i++) begin
      y[i] = 0.0;
      for (int j = 0; j < N; j++) if (pp[i][j]) y[i] += ap[i][j] * v[j];
    end
  endfunction

  function automatic int ref_solve(input real tol, input int maxit);
    real x [N], r [N], rh [N], p [N], v [N], y [N], s [N], t [N], z [N];
    real rho, rho_new, alpha, omega, beta, thr;
    for (int i = 0; i < N; i++) begin x[i] = 0.0; r[i] = bv[i]; rh[i] = bv[i]; p[i] = 0.0; v[i] = 0.0; end
    rho = 1.0; alpha = 1.0; omega = 1.0;
    thr = tol * $sqrt(dotp(r, r));
    for (int it = 0; it < maxit; it++) begin
      rho_new = dotp(rh, r);
      beta = (rho_new / rho) * (alpha / omega);
      for (int i = 0; i < N; i++) p[i] = r[i] + beta * (p[i] - omega * v[i]);
      precond(p, y);
      matvec(y, v);
      alpha = rho_new / dotp(rh, v);
      rho = rho_new;
      for (int i = 0; i < N; i++) begin x[i] += alpha * y[i]; r[i] -= alpha * v[i]; end
      if ($sqrt(dotp(r, r)) <= thr) return it + 1;
      precond(r, z);
      matvec(z, t);
      omega = dotp(t, r) / dotp(t, t);
      for (int i = 0; i < N; i++) begin x[i] += omega * z[i]; r[i] -= omega * t[i]; end
      if ($sqrt(dotp(r, r)) <= thr) return it + 1;
    end
    return maxit;
  endfunction

  // ---------------- stimulus and checks
  mop_cmd_t ca, cl, cu;
  int ref_iters;

  initial begin
    for (int i = 0; i < MEMW; i++) begin ddr0_mem[i] = '0; ddr1_mem[i] = '0; hbm_mem[i] = '0; end
    for (int p = 0; p < 5; p++) begin ph[p] = 0; pt[p] = 0; rs[p] = '0; end
    rq_ready = '0; hbm_wr_ready = '0; cfg = '0;

    // pattern: five-point grid plus random symmetric couplings
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) pat[i][j] = (i == j);
    for (int yy = 0; yy < NY; yy++)
      for (int xx = 0; xx < NX; xx++) begin
        int i;
        i = yy * NX + xx;
        if (xx + 1 < NX) begin pat[i][i+1] = 1; pat[i+1][i] = 1; end
        if (yy + 1 < NY) begin pat[i][i+NX] = 1; pat[i+NX][i] = 1; end
      end
    for (int k = 0; k < 40; k++) begin
      int i, j;
      i = $urandom % NG; j = $urandom % NG;
      pat[i][j] = 1; pat[j][i] = 1;
    end
    for (int i = 0; i < N; i++) begin
      real s;
      s = 0.0;
      for (int j = 0; j < N; j++) begin
        a0[i][j] = 0.0;
        if (pat[i][j] && i != j) begin a0[i][j] = rnd(-1.0, -0.1); s += -a0[i][j]; end
      end
      a0[i][i] = s + rnd(0.5, 1.5);
    end
    // greedy coloring and renumbering color by color
    ncol = 0;
    for (int i = 0; i < N; i++) begin
      bit used [MAXC];
      for (int c = 0; c < MAXC; c++) used[c] = 0;
      for (int j = 0; j < i; j++) if (pat[i][j] && j != i) used[color[j]] = 1;
      color[i] = 0;
      while (used[color[i]]) color[i]++;
      if (color[i] + 1 > ncol) ncol = color[i] + 1;
    end
    begin
      int k;
      k = 0;
      for (int c = 0; c < ncol; c++) begin
        cstart[c] = k;
        for (int i = 0; i < N; i++) if (color[i] == c) begin perm[k] = i; k++; end
        crows[c] = k - cstart[c];
      end
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        pp[i][j] = pat[perm[i]][perm[j]];
        ap[i][j] = a0[perm[i]][perm[j]];
      end
    // ILU0 (no fill-in)
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) lu[i][j] = ap[i][j];
    for (int i = 1; i < N; i++)
      for (int k = 0; k < i; k++)
        if (pp[i][k]) begin
          lu[i][k] = lu[i][k] / lu[k][k];
          for (int j = k + 1; j < N; j++)
            if (pp[i][j]) lu[i][j] -= lu[i][k] * lu[k][j];
        end
    // vectors
    for (int i = 0; i < N; i++) xt[i] = rnd(-1.0, 1.0);
    matvec(xt, bv);
    for (int i = 0; i < N; i++) begin
      put_val(hbm_mem, 0 * STRIDE * 8 + i, bv[i]);
      put_val(hbm_mem, 1 * STRIDE * 8 + i, 0.0);
      put_val(hbm_mem, DIAG_SLOT * STRIDE * 8 + i, lu[i][i]);
    end
    encode(0, 0, ca);
    encode(1, 0, cl);
    encode(2, 1, cu);
    $display("system: %0d rows, %0d colors, DDR lines %0d / %0d", N, ncol, ptr0, ptr1);
    check(ncol >= 3, "at least three colors");
    check(ptr0 < MEMW && ptr1 < MEMW, "matrix fits the memory model");

    cfg.n_lines    = NL;
    cfg.vec_base   = '0;
    cfg.vec_stride = STRIDE;
    cfg.mat_a      = ca;
    cfg.mat_l      = cl;
    cfg.mat_u      = cu;
    cfg.rel_tol    = $realtobits(1.0e-10);
    cfg.max_iter   = 60;
    ref_iters = ref_solve(1.0e-10, 60);

    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (70000) @(posedge clk);     // reset sweep of the write unit's flags
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(posedge clk);
    #0.1;
    begin
      real xh, err, nx, res, nb, xv [N], av [N];
      err = 0.0; nx = 0.0; res = 0.0; nb = 0.0;
      for (int i = 0; i < N; i++) begin
        xv[i] = $bitstoreal(hbm_mem[x_addr + i / 8][64 * (i % 8) +: 64]);
        err += (xv[i] - xt[i]) ** 2; nx += xt[i] ** 2;
      end
      matvec(xv, av);
      for (int i = 0; i < N; i++) begin res += (bv[i] - av[i]) ** 2; nb += bv[i] ** 2; end
      xh = $sqrt(err / nx);
      $display("iterations %0d (reference %0d), |x-xt|/|xt| = %g, |b-Ax|/|b| = %g, cycles %0d",
               iterations, ref_iters, xh, $sqrt(res / nb), cyc);
      check(converged, "solver reports convergence");
      check(xh < 1.0e-8, "solution matches x_true");
      check($sqrt(res / nb) < 1.0e-8, "solution solves the system");
      check(iterations + 2 >= ref_iters && iterations <= ref_iters + 2, "iteration count near reference");
      check($bitstoreal(res_norm) <= 1.0e-10 * $sqrt(nb) * 1.01, "reported residual norm below threshold");
    end
    check(oob == 0, "no access outside the memories");
    $display("events: stall %0d color %0d mode %0d swap %0d fill %0d dot2 %0d iter %0d backpressure %0d partial %0d empty rows %0d",
             n_stall, n_color, n_mode, n_swap, n_fill, n_dot2, n_iter, backpressure, partial_writes, empty_rows);
    check(n_stall > 0, "pipeline stall happened");
    check(n_color > 0, "color changes happened");
    check(n_mode > 0, "SpMV/ILU0 mode switches happened");
    check(n_swap > 0, "ping-pong swaps happened");
    check(n_fill > 0, "vector fills happened");
    check(n_dot2 > 0, "double dot product used");
    check(n_iter > 0, "full iterations happened");
    check(backpressure > 0, "memory back-pressure happened");
    check(partial_writes > 0, "partial-line writes happened");
    check(empty_rows > 0, "empty matrix rows present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
