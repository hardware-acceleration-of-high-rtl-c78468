// tb_vector_ops_unit: self-checking test of the vector operations unit with
// a behavioural HBM model (fixed read latency, optional random
// back-pressure on all three ports).
//
// Integer-valued vectors keep every result exact. For random lengths it runs
//   - axpy: every output line must equal alpha*a + b and be written once;
//   - dot and dot2: s0 = a.b and s1 = b.b exactly.
// With ports that never refuse, a command on n lines must finish within
// n + 40 cycles (one line per cycle, the unit's rate).
`timescale 1ns/1ps
module tb_vector_ops_unit;
  import fp64_pkg::*;
  import solver_pkg::*;

  localparam int MEMW = 1024, LAT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic     start = 0;
  vop_cmd_t cmd = '0;
  logic     busy, done;
  fp64_t    s0, s1;
  rd_req_t  rda_req, rdb_req;
  logic     rda_req_ready, rdb_req_ready, wr_ready;
  rd_rsp_t  rda_rsp, rdb_rsp;
  wr_req_t  wr;

  vector_ops_unit dut (.*);

  line_t mem [MEMW];
  int    wcount [MEMW];
  bit    bp = 0;
  longint cyc = 0;

  laddr_t qa [$], qb [$];
  longint da [$], db [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rda_rsp.valid <= 0; rdb_rsp.valid <= 0;
    if (qa.size() > 0 && da[0] <= cyc) begin rda_rsp.valid <= 1; rda_rsp.data <= mem[qa[0]]; void'(qa.pop_front()); void'(da.pop_front()); end
    if (qb.size() > 0 && db[0] <= cyc) begin rdb_rsp.valid <= 1; rdb_rsp.data <= mem[qb[0]]; void'(qb.pop_front()); void'(db.pop_front()); end
    if (rda_req.valid && rda_req_ready) begin qa.push_back(rda_req.addr); da.push_back(cyc + LAT); end
    if (rdb_req.valid && rdb_req_ready) begin qb.push_back(rdb_req.addr); db.push_back(cyc + LAT); end
    if (wr.valid && wr_ready) begin
      mem[wr.addr] <= wr.data;
      wcount[wr.addr]++;
      check(wr.lane_en == '1, "full-line writes");
    end
    rda_req_ready <= !bp || ($urandom % 4 != 0);
    rdb_req_ready <= !bp || ($urandom % 4 != 0);
    wr_ready      <= !bp || ($urandom % 3 != 0);
  end

  function automatic fp64_t ival(int v);
    return $realtobits(real'(v));
  endfunction

  int av [MEMW*8];

  task automatic run(input vop_e op, input int n, input int al);
    longint t0, sab, sbb;
    int ab, bb, ob;
    ab = 0; bb = 256; ob = 512;
    sab = 0; sbb = 0;
    for (int k = 0; k < n * 8; k++) begin
      int x, y;
      x = int'($urandom % 2001) - 1000; y = int'($urandom % 2001) - 1000;
      mem[ab + k / 8][64 * (k % 8) +: 64] = ival(x);
      mem[bb + k / 8][64 * (k % 8) +: 64] = ival(y);
      av[k] = al * x + y;
      sab += longint'(x) * y; sbb += longint'(y) * y;
    end
    for (int k = 0; k < MEMW; k++) wcount[k] = 0;
    @(negedge clk);
    cmd.op = op; cmd.lines = n; cmd.a_base = ab; cmd.b_base = bb; cmd.o_base = ob; cmd.alpha = ival(al);
    start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    if (!bp) check(cyc - t0 <= n + 40, $sformatf("rate: %0d lines in %0d cycles", n, cyc - t0));
    @(negedge clk);
    check(!busy, "idle after done");
    if (op == VOP_AXPY) begin
      for (int k = 0; k < n; k++) check(wcount[ob + k] == 1, "each output line written once");
      for (int k = 0; k < n * 8; k++)
        check(mem[ob + k / 8][64 * (k % 8) +: 64] == ival(av[k]), "axpy value");
    end else begin
      check(s0 == $realtobits(real'(sab)), "s0 = a.b");
      if (op == VOP_DOT2) check(s1 == $realtobits(real'(sbb)), "s1 = b.b");
    end
  endtask

  initial begin
    for (int k = 0; k < MEMW; k++) mem[k] = '0;
    rda_rsp = '0; rdb_rsp = '0; rda_req_ready = 0; rdb_req_ready = 0; wr_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      bp = (r == 1);
      for (int t = 0; t < 12; t++) begin
        run(VOP_AXPY, 1 + int'($urandom % 64), int'($urandom % 7) - 3);
        run(VOP_DOT, 1 + int'($urandom % 64), 0);
        run(VOP_DOT2, 1 + int'($urandom % 64), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
