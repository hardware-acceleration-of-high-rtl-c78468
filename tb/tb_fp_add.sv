// tb_fp_add: self-checking test of the double precision fp_add.
//
// Drives one operand pair per cycle: hand-picked cases (signed zeros,
// infinities, NaN, exact cancellation, rounding ties) and random normal

// compared bit for bit with the simulator's own IEEE double arithmetic,
// which also rounds to nearest even. Also checks that the result appears
// exactly LAT cycles after the operands are sampled (the checker sees it
// one cycle later than the edge at which the operands were driven).
module tb_fp_add;
  import fp64_pkg::*;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  fp64_t a, b, y;
  logic y_valid;
  int checks = 0, failures = 0;
  fp64_t exp_q [$];
  int    cyc = 0, issue_cyc [$];

  fp_add #(.LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic fp64_t rnd_fp(int emin, int emax);
    logic [51:0] f;
    int e;
    f = {$urandom(), $urandom()};
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom()), 11'(e + 1023), f};
  endfunction

  function automatic fp64_t ref_op(fp64_t a, fp64_t b);
    real r;
    fp64_t v;
    r = $bitstoreal(a) + $bitstoreal(b);
    v = $realtobits(r);
    if (fp_is_nan(v)) v = FP_QNAN;
    return v;
  endfunction

  task automatic drive(fp64_t x, fp64_t z);
    a <= x; b <= z; in_valid <= 1'b1;
    exp_q.push_back(ref_op(x, z));
    issue_cyc.push_back(cyc);
    @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n && y_valid) begin
    fp64_t e;
    int c;
    e = exp_q.pop_front();
    c = issue_cyc.pop_front();
    checks++;
    if (y !== e || (cyc - c) != LAT + 1) begin
      failures++;
      if (failures < 10) $display("MISMATCH got %h exp %h latency %0d", y, e, cyc - c);
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    drive(64'h3FF0_0000_0000_0000, 64'h4000_0000_0000_0000);  // 1, 2
    drive(64'h3FF0_0000_0000_0000, 64'hBFF0_0000_0000_0000);  // 1, -1
    drive(64'h0000_0000_0000_0000, 64'h8000_0000_0000_0000);  // +0, -0
    drive(64'h7FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000);  // inf, 1
    drive(64'h7FF0_0000_0000_0000, 64'hFFF0_0000_0000_0000);  // inf, -inf
    drive(64'h7FF8_0000_0000_0000, 64'h3FF0_0000_0000_0000);  // nan
    drive(64'h3FF0_0000_0000_0001, 64'h3CA0_0000_0000_0000);  // 1+ulp, 2^-53 (tie)
    drive(64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0000);  // 1, 2^-53 (tie to even)
    drive(64'h4340_0000_0000_0000, 64'hBFF0_0000_0000_0000);  // 2^53, -1
    drive(64'h3FF8_0000_0000_0000, 64'h3FF8_0000_0000_0000);  // 1.5, 1.5
    for (int i = 0; i < 4000; i++) begin
      if (i % 4 == 0) begin
        fp64_t x;
        x = rnd_fp(-30, 30);
        // near-cancellation: same exponent, opposite sign
        drive(x, {~x[63], x[62:52], 52'($urandom())});
      end else
        drive(rnd_fp(-200, 200), rnd_fp(-200, 200));
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
