// tb_vector_partition_mem: self-checking test of a vector partition memory
// (default depth 65,536) with its two ports.
//
// Random writes and reads on both ports against a model; a read returns the
// value one cycle later. The two ports never write the same address in one
// cycle. A write followed by a read of the same address in the next cycle
// must return the new value.
`timescale 1ns/1ps
module tb_vector_partition_mem;
  import fp64_pkg::*;

  localparam int DEPTH = 65536, AW = 16;

  logic clk = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [1:0]         we = '0;
  logic [1:0][AW-1:0] addr = '0;
  fp64_t [1:0]        wdata = '0;
  fp64_t [1:0]        rdata;

  vector_partition_mem dut (.*);

  fp64_t model [int];
  fp64_t expv [2];
  bit    expect_v [2];

  initial begin
    expect_v[0] = 0; expect_v[1] = 0;
    // write a known value to every address used below
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 2'b11; addr[0] = AW'(2 * i); addr[1] = AW'(2 * i + 1);
      wdata[0] = {$urandom, $urandom}; wdata[1] = {$urandom, $urandom};
      model[2 * i] = wdata[0]; model[2 * i + 1] = wdata[1];
    end
    for (int i = 0; i < 4; i++) begin       // ends of the address range
      @(negedge clk);
      we = 2'b01; addr[0] = AW'(DEPTH - 1 - i); wdata[0] = {$urandom, $urandom};
      model[DEPTH - 1 - i] = wdata[0];
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) if (expect_v[p]) check(rdata[p] == expv[p], "read data");
      for (int p = 0; p < 2; p++) begin
        int a;
        a = (t % 50 == 0) ? DEPTH - 1 - int'($urandom % 4) : int'($urandom % 1024);
        addr[p] = AW'(a);
        we[p] = ($urandom % 3) == 0;
        wdata[p] = {$urandom, $urandom};
      end
      if (we[0] && we[1] && addr[0] == addr[1]) we[1] = 0;
      for (int p = 0; p < 2; p++) begin
        expect_v[p] = !we[p];
        expv[p] = model[int'(addr[p])];
      end
      for (int p = 0; p < 2; p++) if (we[p]) model[int'(addr[p])] = wdata[p];
    end
    @(negedge clk);
    we = '0;
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
