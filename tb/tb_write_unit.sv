// tb_write_unit: self-checking test of the in-order release of row results.
//
// For a sequence of colors with a random number of rows, a random subset of
// the rows get a result; the results arrive in random order, zero to two per
// cycle. After the last result the color is marked drained. The unit must
// release every row of the color exactly once, in row order, with its value
// (0 for rows without a result), honour out_ready, and pulse done once after
// the last row. It must never release a row before its result arrived unless
// the color was drained. The first color waits for the reset sweep (ready).
`timescale 1ns/1ps
module tb_write_unit;
  import fp64_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic             ready, color_start = 0, drained = 0, out_ready = 0;
  logic [31:0]      color_rows = '0;
  logic [1:0]       in_valid = '0;
  logic [1:0][31:0] in_row = '0;
  fp64_t [1:0]      in_val = '0;
  logic             out_valid, done;
  logic [31:0]      out_row;
  fp64_t            out_val;

  write_unit dut (.*);

  fp64_t vals [int];
  bit    arrived [int];
  bit    is_drained = 0;
  int    next_row = 0, dones = 0, rows_now = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      check(int'(out_row) == next_row, $sformatf("row order: got %0d expected %0d", out_row, next_row));
      if (vals.exists(int'(out_row))) begin
        check(out_val == vals[int'(out_row)], "row value");
        check(arrived[int'(out_row)] || is_drained, "released after its result");
      end else begin
        check(out_val == FP_ZERO, "empty row released as zero");
        check(is_drained, "empty row released only after drain");
      end
      next_row++;
    end
    if (done) begin
      dones++;
      check(next_row == rows_now, "done after the last row");
    end
    for (int k = 0; k < 2; k++) if (in_valid[k]) arrived[int'(in_row[k])] = 1;
  end

  always @(negedge clk) out_ready <= ($urandom % 4) != 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!ready) @(negedge clk);
    for (int c = 0; c < 40; c++) begin
      int rows, order [$];
      rows = (c % 5 == 0) ? 1 + int'($urandom % 8) : 1 + int'($urandom % 400);
      vals.delete(); arrived.delete();
      for (int r = 0; r < rows; r++)
        if ((c % 7 != 3) && ($urandom % 4) != 0) begin     // every 7th color: all rows empty
          vals[r] = {1'b0, 11'($urandom % 2000 + 1), 52'({$urandom, $urandom})};
          order.push_back(r);
        end
      order.shuffle();
      @(negedge clk);
      color_start = 1; color_rows = 32'(rows); rows_now = rows; next_row = 0; dones = 0; is_drained = 0;
      @(negedge clk);
      color_start = 0;
      while (order.size() > 0) begin
        in_valid = '0;
        for (int k = 0; k < 2; k++)
          if (order.size() > 0 && ($urandom % 3) != 0) begin
            in_valid[k] = 1; in_row[k] = 32'(order[0]); in_val[k] = vals[order[0]];
            void'(order.pop_front());
          end
        @(negedge clk);
      end
      in_valid = '0;
      @(negedge clk);
      drained = 1; is_drained = 1;
      @(negedge clk);
      drained = 0;
      while (dones == 0) @(negedge clk);
      repeat (2) @(negedge clk);
      check(next_row == rows, "all rows released");
      check(dones == 1, "one done per color");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
