// tb_selective_adder_tree: self-checking test of the segmented adder tree.
//
// Random lines of small integer values with random segment starts enter one
// per cycle (with occasional gaps). For every lane that closes a segment (the
// next lane starts a segment, or it is the last lane) the output must be the
// exact sum of the segment, exactly LEVELS = 3 cycles after the input, and
// the side-band word must travel with it.
`timescale 1ns/1ps
module tb_selective_adder_tree;
  import fp64_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        in_valid = 0;
  fp64_t [7:0] in_val = '0;
  logic [7:0]  in_seg_start = '0;
  logic [15:0] in_ctrl = '0;
  logic        out_valid;
  fp64_t [7:0] out_sum;
  logic [15:0] out_ctrl;

  selective_adder_tree #(.LANES(8), .CTRL_W(16)) dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { fp64_t [7:0] sum; logic [7:0] close; logic [15:0] ctrl; } exp_t;
  exp_t   exp_q [longint];
  int     outs = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      outs++;
      check(exp_q.exists(cyc), "output at the expected cycle");
      if (exp_q.exists(cyc)) begin
        for (int i = 0; i < 8; i++)
          if (exp_q[cyc].close[i]) check(out_sum[i] == exp_q[cyc].sum[i], $sformatf("segment sum lane %0d", i));
        check(out_ctrl == exp_q[cyc].ctrl, "side-band word");
        exp_q.delete(cyc);
      end
    end
  end

  initial begin
    int sent;
    sent = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      if (in_valid) begin
        exp_t e;
        int v [8];
        int acc;
        for (int i = 0; i < 8; i++) begin
          v[i] = int'($urandom % 2001) - 1000;
          in_val[i] = $realtobits(real'(v[i]));
        end
        in_seg_start = 8'($urandom) | 8'h01;
        if (t % 7 == 0) in_seg_start = 8'hFF;   // eight one-value segments
        if (t % 11 == 0) in_seg_start = 8'h01;  // one segment over the line
        in_ctrl = 16'($urandom);
        acc = 0;
        for (int i = 0; i < 8; i++) begin
          acc = in_seg_start[i] ? v[i] : acc + v[i];
          e.sum[i]   = $realtobits(real'(acc));
          e.close[i] = (i == 7) || in_seg_start[i+1];
        end
        e.ctrl = in_ctrl;
        exp_q[cyc + 3] = e;
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    check(outs == sent, "one output line per input line");
    check(exp_q.num() == 0, "no output missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
