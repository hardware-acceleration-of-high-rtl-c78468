// tb_merge_unit: self-checking test of the merge unit.
//
// Random sets of up to NIN results per cycle go in while the unit reports
// enough free space; out_ready is randomly low. The results must come out in
// arrival order (lanes in index order within a cycle), none lost or
// duplicated, at most NOUT per cycle; with out_ready always high and a
// full buffer, NOUT results must leave every cycle. free must equal DEPTH
// minus the number of results held.
`timescale 1ns/1ps
module tb_merge_unit;
  import fp64_pkg::*;

  localparam int NIN = 9, NOUT = 2, DEPTH = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [NIN-1:0]        in_valid = '0;
  logic [NIN-1:0][31:0]  in_row = '0;
  fp64_t [NIN-1:0]       in_val = '0;
  logic                  out_ready = 0;
  logic [NOUT-1:0]       out_valid;
  logic [NOUT-1:0][31:0] out_row;
  fp64_t [NOUT-1:0]      out_val;
  logic [$clog2(DEPTH):0] free;

  merge_unit dut (.*);

  int     q_row [$];
  fp64_t  q_val [$];
  int     seq = 0, got = 0, full_rate_cycles = 0;
  bit     full_rate_phase = 0;

  always @(posedge clk) if (rst_n) begin
    int n;
    n = 0;
    check(int'(free) == DEPTH - q_row.size(), "free count");
    if (out_ready)
      for (int k = 0; k < NOUT; k++)
        if (out_valid[k]) begin
          n++;
          if (q_row.size() == 0) check(0, "output with nothing held");
          else begin
            check(out_row[k] == 32'(q_row[0]) && out_val[k] == q_val[0], "arrival order");
            void'(q_row.pop_front()); void'(q_val.pop_front());
          end
          got++;
        end
    if (full_rate_phase && q_row.size() >= NOUT + 9) begin
      full_rate_cycles++;
      check(n == NOUT, "NOUT results per cycle when full");
    end
    for (int i = 0; i < NIN; i++)
      if (in_valid[i]) begin q_row.push_back(int'(in_row[i])); q_val.push_back(in_val[i]); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      full_rate_phase = (t >= 4000);
      out_ready = full_rate_phase ? 1'b1 : (($urandom % 3) != 0);
      in_valid = '0;
      if (free >= NIN && ($urandom % 4) != 0) begin
        in_valid = NIN'($urandom);
        if (t % 9 == 0) in_valid = '1;
        for (int i = 0; i < NIN; i++) begin
          in_row[i] = 32'(seq); seq++;
          in_val[i] = {$urandom, $urandom};
        end
      end
    end
    @(negedge clk);
    in_valid = '0; out_ready = 1;
    repeat (200) @(negedge clk);
    check(q_row.size() == 0, "all results delivered");
    check(full_rate_cycles > 100, "full-rate phase exercised");
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
