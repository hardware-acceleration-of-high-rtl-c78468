// tb_dot_axpy: self-checking test of the dot/axpy vector unit.
//
// Uses small integer values so that every sum is exact whatever the order of
// the additions, which lets the dot product be compared bit for bit even
// though the final adder's reduce logic adds in its own order.
//   - axpy: random lines at one per cycle; each result line must appear
//     exactly 2 cycles after its input line, one line per cycle.
//   - dot: vectors of 1..40 lines, fed every cycle or with random gaps; the
//     result must equal the exact dot product, appear once, and within a
//     bounded number of cycles after the last line.
`timescale 1ns/1ps
module tb_dot_axpy;
  import fp64_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        start = 0, dot_mode = 0, in_valid = 0, in_last = 0;
  fp64_t       alpha = '0;
  fp64_t [7:0] a = '0, b = '0;
  logic        res_valid, dot_valid;
  fp64_t [7:0] res;
  fp64_t       dot_res;

  dot_axpy dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic fp64_t ival(int v);
    return $realtobits(real'(v));
  endfunction

  // expected axpy results, indexed by the cycle they must appear
  fp64_t [7:0] exp_res [longint];
  int          axpy_seen = 0;
  int          dots_seen = 0;
  fp64_t       last_dot;
  longint      last_dot_cyc;

  always @(posedge clk) begin
    if (res_valid) begin
      axpy_seen++;
      check(exp_res.exists(cyc), "axpy result at the expected cycle");
      if (exp_res.exists(cyc)) begin
        check(res == exp_res[cyc], "axpy value");
        exp_res.delete(cyc);
      end
    end
    if (dot_valid) begin dots_seen++; last_dot = dot_res; last_dot_cyc = cyc; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- axpy
    @(negedge clk);
    start = 1; dot_mode = 0;
    @(negedge clk);
    start = 0;
    for (int t = 0; t < 300; t++) begin
      int al;
      al = int'($urandom % 9) - 4;
      alpha = ival(al);
      in_valid = 1;
      for (int i = 0; i < 8; i++) begin
        int x, y;
        x = int'($urandom % 201) - 100; y = int'($urandom % 201) - 100;
        a[i] = ival(x); b[i] = ival(y);
        exp_res[cyc + 2][i] = ival(al * x + y);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    check(axpy_seen == 300, "one axpy line out per line in");
    check(exp_res.num() == 0, "no axpy result missing");
    // ---------------- dot
    for (int v = 0; v < 60; v++) begin
      int n, gaps;
      longint sum, last_in;
      n = 1 + int'($urandom % 40);
      gaps = (v % 2);
      sum = 0;
      dot_mode = 1;
      start = 1;
      @(negedge clk);
      start = 0;
      dots_seen = 0;
      for (int k = 0; k < n; k++) begin
        while (gaps != 0 && ($urandom % 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_last = (k == n - 1);
        for (int i = 0; i < 8; i++) begin
          int x, y;
          x = int'($urandom % 2001) - 1000; y = int'($urandom % 2001) - 1000;
          a[i] = ival(x); b[i] = ival(y);
          sum += longint'(x) * longint'(y);
        end
        last_in = cyc;
        @(negedge clk);
      end
      in_valid = 0; in_last = 0;
      repeat (40) @(negedge clk);
      check(dots_seen == 1, "exactly one dot result");
      check(last_dot == $realtobits(real'(sum)), $sformatf("dot value %0d lines", n));
      // 1 multiply + 3 tree levels + reduction of at most 4 partial sums
      check(last_dot_cyc - last_in <= 24, $sformatf("dot latency %0d", last_dot_cyc - last_in));
      check(axpy_seen == 300, "no axpy output in dot mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
