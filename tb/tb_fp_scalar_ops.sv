// tb_fp_scalar_ops: self-checking test of the scalar floating-point block.
//
// Random normal operands; add, sub, mul and div results are compared with
// the simulator's double arithmetic (same rounding, round to nearest even),
// sqrt with $sqrt, mov with the operand. The cycle count from start to done
// is checked: 2 cycles for add/sub/mul/mov, 60 for div and sqrt (counted from the
// cycle start is applied to the cycle done is seen, both inclusive).
`timescale 1ns/1ps
module tb_fp_scalar_ops;
  import fp64_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic       start = 0;
  logic [2:0] op = '0;
  fp64_t      a = '0, b = '0;
  logic       busy, done;
  fp64_t      y;

  fp_scalar_ops dut (.*);

  function automatic fp64_t rnd_fp();
    real m;
    int  e;
    m = 1.0 + real'($urandom % 1000000) / 1000000.0;
    e = int'($urandom % 40) - 20;
    m = m * (2.0 ** e);
    if ($urandom % 2) m = -m;
    return $realtobits(m);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      fp64_t exp_y;
      int n, want;
      real ra, rb;
      op = 3'($urandom % 6);
      a = rnd_fp(); b = rnd_fp();
      if (op == 3'd4) a[63] = 1'b0;     // sqrt of a positive number
      ra = $bitstoreal(a); rb = $bitstoreal(b);
      unique case (op)
        3'd0: exp_y = $realtobits(ra + rb);
        3'd1: exp_y = $realtobits(ra - rb);
        3'd2: exp_y = $realtobits(ra * rb);
        3'd3: exp_y = $realtobits(ra / rb);
        3'd4: exp_y = $realtobits($sqrt(ra));
        default: exp_y = a;
      endcase
      want = (op == 3'd3 || op == 3'd4) ? 60 : 2;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      n = 1;
      while (!done && n < 200) begin @(negedge clk); n++; end
      check(done, "done");
      check(y == exp_y, $sformatf("op %0d: %h %h -> %h, expected %h", op, a, b, y, exp_y));
      check(n == want, $sformatf("op %0d took %0d cycles", op, n));
      @(negedge clk);
      check(!busy, "idle after done");
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
