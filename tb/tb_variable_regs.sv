// tb_variable_regs: self-checking test of the scalar variable registers.
//
// Random writes and reads against a model; checks that a write is visible
// from the next cycle on both read ports, and that init sets alpha, omega and
// rho to 1, clears the other registers and keeps the convergence threshold.
`timescale 1ns/1ps
module tb_variable_regs;
  import fp64_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        init = 0, we = 0;
  logic [3:0]  waddr = '0, raddr0 = '0, raddr1 = '0;
  fp64_t       wdata = '0, rdata0, rdata1;

  variable_regs dut (.*);

  fp64_t model [9];

  initial begin
    for (int i = 0; i < 9; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // check reads of the current state
      raddr0 = 4'($urandom % 9); raddr1 = 4'($urandom % 9);
      #0.1;
      check(rdata0 == model[raddr0] && rdata1 == model[raddr1], "read value");
      init = ($urandom % 50) == 0;
      we   = ($urandom % 2) == 0;
      waddr = 4'($urandom % 9);
      wdata = {$urandom, $urandom};
      @(posedge clk);
      #0.1;
      if (init) begin
        for (int i = 0; i < 9; i++) if (i != 5) model[i] = '0;
        model[0] = FP_ONE; model[2] = FP_ONE; model[3] = FP_ONE;
      end
      if (we) model[waddr] = wdata;
      init = 0; we = 0;
    end
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
