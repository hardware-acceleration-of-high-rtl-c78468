// tb_spmv_pipeline: end-to-end test of the SpMV pipeline (vector partition
// memories, multipliers, control unit, selective adder tree, reduce and
// merge units).
//
// Several random colors are generated in CSRO form: rows with 0..20 values
// (so rows span lines, fill lines exactly, and some rows are empty), small
// integer values and vector elements so every product and sum is exact in
// double precision and the result does not depend on the order of additions.
// The expected row sums are computed with integer arithmetic. Every
// non-empty row must come out exactly once with the right value; empty rows
// must not appear. Also checked: a color whose rows hold >= 8 values streams
// one line per cycle without a stall (the document's aim of feeding the
// multipliers every cycle), and a color of one-value rows, which produces
// more results per line than the two output ports take, does stall.
module tb_spmv_pipeline;
  import fp64_pkg::*;
  import solver_pkg::*;
  localparam int VPD = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic color_start, in_valid, in_ready, in_last, out_ready, idle, stall;
  mbeat_t in_beat;
  logic [1:0] vp_we;
  logic [1:0][$clog2(VPD)-1:0] vp_waddr;
  fp64_t [1:0] vp_wdata;
  logic [1:0] out_valid;
  logic [1:0][31:0] out_row;
  fp64_t [1:0] out_val;

  spmv_pipeline #(.VP_DEPTH(VPD)) dut (.*);

  int checks = 0, failures = 0;
  int vec [VPD];
  longint expv [int];
  int seen [int];
  int stalls = 0;

  always @(posedge clk) if (rst_n) begin
    if (stall) stalls++;
    for (int k = 0; k < 2; k++) if (out_valid[k] && out_ready) begin
      int r;
      r = int'(out_row[k]);
      checks++;
      if (!expv.exists(r)) begin
        failures++; $display("unexpected row %0d", r);
      end else if (seen.exists(r)) begin
        failures++; $display("row %0d twice", r);
      end else if ($bitstoreal(out_val[k]) != real'(expv[r])) begin
        failures++; $display("row %0d got %f exp %0d", r, $bitstoreal(out_val[k]), expv[r]);
      end
      seen[r] = 1;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // vals/cols/nros of one color, then streamed
  int   q_val [$], q_col [$], q_nro [$];

  task automatic gen_color(int nrows, int minnz, int maxnz, int vp_len);
    int skipped;
    q_val.delete(); q_col.delete(); q_nro.delete(); expv.delete(); seen.delete();
    skipped = 0;
    for (int r = 0; r < nrows; r++) begin
      int n;
      longint s;
      n = minnz + int'($urandom_range(maxnz - minnz));
      s = 0;
      if (n == 0) begin skipped++; continue; end
      for (int j = 0; j < n; j++) begin
        int v, c;
        v = int'($urandom_range(16)) - 8;
        c = int'($urandom_range(vp_len - 1));
        q_val.push_back(v); q_col.push_back(c);
        q_nro.push_back(j == 0 ? 1 + skipped : 0);
        s += longint'(v) * longint'(vec[c]);
      end
      skipped = 0;
      expv[r] = s;
    end
  endtask

  task automatic fill_vp(int vp_len);
    for (int i = 0; i < vp_len; i += 2) begin
      vec[i] = int'($urandom_range(200)) - 100;
      vec[i+1] = int'($urandom_range(200)) - 100;
      vp_we <= 2'b11;
      vp_waddr[0] <= 10'(i); vp_waddr[1] <= 10'(i+1);
      vp_wdata[0] <= $realtobits(real'(vec[i]));
      vp_wdata[1] <= $realtobits(real'(vec[i+1]));
      @(posedge clk);
    end
    vp_we <= 2'b00;
    @(posedge clk);
  endtask

  // returns cycles between first and last accepted line
  task automatic stream(output int span, output int nlines);
    int n, i, t0;
    n = q_val.size();
    nlines = (n + LANES - 1) / LANES;
    color_start <= 1'b1;
    @(posedge clk);
    color_start <= 1'b0;
    t0 = -1; span = 0;
    for (int l = 0; l < nlines; l++) begin
      for (int k = 0; k < LANES; k++) begin
        i = l * LANES + k;
        in_beat.valid[k] <= i < n;
        in_beat.val[k]   <= i < n ? $realtobits(real'(q_val[i])) : 64'h0;
        in_beat.col[k]   <= i < n ? 32'(q_col[i]) : 32'h0;
        in_beat.nro[k]   <= i < n ? 32'(q_nro[i]) : NRO_PAD;
      end
      in_last  <= (l == nlines - 1);
      in_valid <= 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (t0 < 0) t0 = $time / 10;
      span = $time / 10 - t0;
    end
    in_valid <= 1'b0;
    @(posedge clk);
    while (!idle) @(posedge clk);
    @(posedge clk);
    foreach (expv[r]) begin
      checks++;
      if (!seen.exists(r)) begin failures++; $display("row %0d missing", r); end
    end
  endtask

  initial begin
    int span, nl, st0;
    color_start = 0; in_valid = 0; in_last = 0; in_beat = '0; vp_we = 0; vp_waddr = '0; vp_wdata = '0;
    out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // mixed colors with empty rows and rows spanning lines
    for (int c = 0; c < 6; c++) begin
      fill_vp(256);
      gen_color(150, 0, 20, 256);
      stream(span, nl);
    end
    // throughput: every row has >= 8 values
    fill_vp(512);
    gen_color(200, 8, 16, 512);
    st0 = stalls;
    stream(span, nl);
    checks++;
    if (span != nl - 1 || stalls != st0) begin
      failures++; $display("throughput: %0d lines over %0d cycles, %0d stalls", nl, span + 1, stalls - st0);
    end
    // one value per row: 8 results per line, more than the 2 output ports take
    gen_color(600, 1, 1, 512);
    st0 = stalls;
    stream(span, nl);
    checks++;
    if (stalls == st0) begin failures++; $display("expected stalls"); end
    // output back-pressure
    gen_color(300, 0, 12, 512);
    fork
      stream(span, nl);
      begin repeat (400) begin @(posedge clk); out_ready <= ($urandom_range(3) != 0); end out_ready <= 1; end
    join
    out_ready <= 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
