// tb_matrix_op_unit: self-checking test of the SpMV/ILU0 unit together with
// its external and internal read units, SpMV pipeline, write unit, ILU0 unit
// and line packer.
//
// The testbench builds a colored sparse test matrix (five-point grid with
// random extra couplings and a block of one-entry rows), its ILU0 factors
// and the memory images in the unit's format, and models the DDR read ports,
// the HBM diagonal read port and result write port (latency, random
// back-pressure) and the on-chip vector memory (two ports, one-cycle read).
//   - SpMV: y = A x for random x; each element of y must match the
//     real-arithmetic product to 1e-12 relative to sum |a_ij x_j|.
//   - ILU0: forward substitution with L, then backward with U and the
//     diagonal, applied in place to a random p; the result (in the vector
//     memory and in HBM) must match M^-1 p to 1e-10 relative.
// It also requires that the pipeline stalled, colors were processed and
// every output line was written.
`timescale 1ns/1ps
module tb_matrix_op_unit;
  import fp64_pkg::*;
  import solver_pkg::*;

  localparam int NX = 8, NY = 12, NG = NX * NY, NISO = 256, N = NG + NISO;
  localparam int NL = (N + 7) / 8;
  localparam int STRIDE = 64;
  localparam int DIAG_SLOT = 12;
  localparam int MEMW = 2048;
  localparam int LAT = 8;
  localparam int MAXC = 16;
  localparam int UD = 262144;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic       start = 0;
  mop_cmd_t   cmd = '0;
  logic       busy, done;
  rd_req_t    ddr0_req, ddr1_req, diag_req;
  logic       ddr0_req_ready, ddr1_req_ready, diag_req_ready;
  rd_rsp_t    ddr0_rsp, ddr1_rsp, diag_rsp;
  wr_req_t    res_wr;
  logic       res_wr_ready;
  logic [1:0] u_en, u_we;
  logic [1:0][17:0] u_addr;
  fp64_t [1:0] u_wdata, u_rdata;
  logic       ev_stall, ev_color;

  matrix_op_unit dut (.*);

  line_t ddr0_mem [MEMW];
  line_t ddr1_mem [MEMW];
  line_t hbm_mem  [MEMW];
  fp64_t uram [UD];

  rd_req_t [2:0] rq;
  logic    [2:0] rq_ready;
  rd_rsp_t [2:0] rs;
  assign rq = {diag_req, ddr1_req, ddr0_req};
  assign {diag_req_ready, ddr1_req_ready, ddr0_req_ready} = rq_ready;
  assign ddr0_rsp = rs[0];
  assign ddr1_rsp = rs[1];
  assign diag_rsp = rs[2];

  laddr_t pend_addr [3][64];
  longint pend_due  [3][64];
  int     ph [3], pt [3];
  longint cyc = 0;
  int     oob = 0, n_stall = 0, n_color = 0, wr_lines = 0;

  function automatic line_t mem_read(int p, laddr_t a);
    if (a >= MEMW) begin oob++; return '0; end
    if (p == 0) return ddr0_mem[a];
    if (p == 1) return ddr1_mem[a];
    return hbm_mem[a];
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < 3; p++) begin
      if (ph[p] != pt[p] && pend_due[p][ph[p]] <= cyc) begin
        rs[p].valid <= 1'b1;
        rs[p].data  <= mem_read(p, pend_addr[p][ph[p]]);
        ph[p] = (ph[p] + 1) % 64;
      end else rs[p].valid <= 1'b0;
      if (rq[p].valid && rq_ready[p]) begin
        pend_addr[p][pt[p]] = rq[p].addr;
        pend_due[p][pt[p]]  = cyc + LAT;
        pt[p] = (pt[p] + 1) % 64;
      end
      rq_ready[p] <= ($urandom % 100) < ((p < 2) ? 97 : 70);
    end
    if (res_wr.valid && res_wr_ready) begin
      wr_lines++;
      if (res_wr.addr >= MEMW) oob++;
      else for (int l = 0; l < 8; l++)
        if (res_wr.lane_en[l]) hbm_mem[res_wr.addr][64*l +: 64] = res_wr.data[64*l +: 64];
    end
    res_wr_ready <= ($urandom % 100) < 80;
    // on-chip vector memory: one-cycle read, write on enable
    for (int p = 0; p < 2; p++)
      if (u_en[p]) begin
        if (u_we[p]) uram[u_addr[p]] = u_wdata[p];
        else u_rdata[p] <= uram[u_addr[p]];
      end
    n_stall += int'(ev_stall); n_color += int'(ev_color);
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

  function automatic void matvec(input real v [N], output real y [N]);
    for (int i = 0; i < N; i++) begin
      y[i] = 0.0;
      for (int j = 0; j < N; j++) if (pp[i][j]) y[i] += ap[i][j] * v[j];
    end
  endfunction


  task automatic run(input mop_cmd_t c);
    @(negedge clk);
    cmd = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  mop_cmd_t ca, cl, cu;
  real xv [N], yv [N], ref_y [N], pv [N];

  initial begin
    for (int i = 0; i < MEMW; i++) begin ddr0_mem[i] = '0; ddr1_mem[i] = '0; hbm_mem[i] = '0; end
    for (int i = 0; i < UD; i++) uram[i] = '0;
    for (int p = 0; p < 3; p++) begin ph[p] = 0; pt[p] = 0; rs[p] = '0; end
    rq_ready = '0; res_wr_ready = 0; u_rdata = '0;
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
    for (int i = 0; i < N; i++) put_val(hbm_mem, DIAG_SLOT * STRIDE * 8 + i, lu[i][i]);
    encode(0, 0, ca);
    encode(1, 0, cl);
    encode(2, 1, cu);
    ca.mode = MOP_SPMV;    ca.out_base = laddr_t'(1 * STRIDE);
    cl.mode = MOP_ILU_FWD; cl.out_base = laddr_t'(2 * STRIDE);
    cu.mode = MOP_ILU_BWD; cu.out_base = laddr_t'(3 * STRIDE);
    $display("matrix: %0d rows, %0d colors", N, ncol);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (70000) @(posedge clk);     // reset sweep of the write unit's flags

    for (int t = 0; t < 2; t++) begin
      // ---------------- SpMV
      for (int i = 0; i < N; i++) begin xv[i] = rnd(-2.0, 2.0); uram[i] = $realtobits(xv[i]); end
      matvec(xv, ref_y);
      wr_lines = 0;
      run(ca);
      check(wr_lines >= NL, "result lines written");
      for (int i = 0; i < N; i++) begin
        real got, mag;
        got = $bitstoreal(hbm_mem[STRIDE + i / 8][64 * (i % 8) +: 64]);
        mag = 0.0;
        for (int j = 0; j < N; j++) if (pp[i][j]) mag += (ap[i][j] < 0 ? -ap[i][j] : ap[i][j]) * (xv[j] < 0 ? -xv[j] : xv[j]);
        check((got - ref_y[i]) ** 2 <= (1.0e-12 * mag) ** 2, $sformatf("spmv row %0d: %g vs %g", i, got, ref_y[i]));
      end
      // ---------------- ILU0 application
      for (int i = 0; i < N; i++) begin pv[i] = rnd(-2.0, 2.0); uram[i] = $realtobits(pv[i]); end
      precond(pv, ref_y);
      run(cl);
      run(cu);
      for (int i = 0; i < N; i++) begin
        real got, gu;
        got = $bitstoreal(hbm_mem[3 * STRIDE + i / 8][64 * (i % 8) +: 64]);
        gu  = $bitstoreal(uram[i]);
        check((got - ref_y[i]) ** 2 <= (1.0e-10 * (1.0 + (ref_y[i] < 0 ? -ref_y[i] : ref_y[i]))) ** 2,
              $sformatf("ilu0 row %0d: %g vs %g", i, got, ref_y[i]));
        check(gu == got, "vector memory and HBM copy agree");
      end
    end
    check(oob == 0, "no access outside the memories");
    check(n_stall > 0, "pipeline stall happened");
    check(n_color > 0, "colors processed");
    check(empty_rows > 0, "empty rows present");
    $display("stalls %0d colors %0d", n_stall, n_color);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
