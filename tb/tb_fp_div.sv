// tb_fp_div: self-checking test of the iterative double precision divider.
//
// Runs hand-picked special cases and random normal operands one at a time,
// compares each result bit for bit with the simulator's IEEE double
// arithmetic (round to nearest even) and checks that done arrives exactly
// 58 cycles after start is sampled, independent of the operands (the loop
// below counts from the edge that drives start, one more).
module tb_fp_div;
  import fp64_pkg::*;
  localparam int LATENCY = 58;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  fp64_t x, z, y;
  int checks = 0, failures = 0;

  fp_div dut (.clk, .rst_n, .start, .a(x), .b(z), .busy, .done, .y);

  always #5 clk = ~clk;

  function automatic fp64_t rnd_fp(int emin, int emax, bit pos);
    logic [51:0] f;
    int e;
    f = {$urandom(), $urandom()};
    e = emin + int'($urandom_range(emax - emin));
    return {pos ? 1'b0 : 1'($urandom()), 11'(e + 1023), f};
  endfunction

  function automatic fp64_t ref_op(fp64_t x, fp64_t z);
    fp64_t v;
    v = $realtobits($bitstoreal(x) / $bitstoreal(z));
    if (fp_is_nan(v)) v = FP_QNAN;
    return v;
  endfunction

  task automatic run(fp64_t xa, fp64_t zb);
    int n;
    fp64_t e;
    e = ref_op(xa, zb);
    x <= xa; z <= zb; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    n = 0;
    do begin @(posedge clk); n++; end while (!done && n < 200);
    checks++;
    if (y !== e || n != LATENCY + 1) begin
      failures++;
      if (failures < 10) $display("MISMATCH op %h %h got %h exp %h after %0d cycles", xa, zb, y, e, n);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; x = 0; z = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(64'h4000_0000_0000_0000, 64'h4010_0000_0000_0000);   // 2, 4
    run(64'h4008_0000_0000_0000, 64'h4008_0000_0000_0000);   // 3, 3
    run(64'h3FF0_0000_0000_0000, 64'h4008_0000_0000_0000);   // 1, 3
    run(64'h0000_0000_0000_0000, 64'h3FF0_0000_0000_0000);   // 0, 1
    run(64'hBFF0_0000_0000_0000, 64'h0000_0000_0000_0000);   // -1, 0
    run(64'h7FF0_0000_0000_0000, 64'h4000_0000_0000_0000);   // inf
    run(64'h7FF8_0000_0000_0000, 64'h4000_0000_0000_0000);   // nan
    run(64'h4022_0000_0000_0000, 64'h3FE0_0000_0000_0000);   // 9, 0.5
    for (int i = 0; i < 1500; i++)
      run(rnd_fp(-300, 300, "div" == "sqrt"), rnd_fp(-300, 300, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
