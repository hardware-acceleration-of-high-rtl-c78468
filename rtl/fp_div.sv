// fp_div: iterative IEEE-754 double precision divider, y = a / b.
//
// Used for the division by the diagonal at the end of the backward
// substitution and for the scalar divisions of the solver (alpha, beta,
// omega). The document only says that these divisions are performed; the
// radix-2 restoring algorithm below is this implementation's choice.
//
// A start pulse while !busy loads the operands. The 53-bit mantissas are
// divided one quotient bit per cycle (57 bits: integer bit, 52 fraction bits,
// guard, round and one more), then the result is rounded to nearest even with
// the remainder as sticky bit. done pulses for one cycle with the result in y
// exactly 58 cycles (QBITS + 1) after start. Special operands (NaN, infinity,
// zero, subnormals read as zero) are resolved at start and still reported
// after the same latency, so the timing never depends on the data.
module fp_div
  import fp64_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp64_t a,
  input  fp64_t b,
  output logic  busy,
  output logic  done,
  output fp64_t y
);
  localparam int QBITS = 57;

  logic [5:0]  cnt_q;
  logic [53:0] rem_q;     // partial remainder, < 2 * divisor
  logic [52:0] dvs_q;     // divisor mantissa
  logic [QBITS-1:0] quo_q;
  logic        sign_q;
  logic signed [13:0] exp_q;
  logic        special_q;
  fp64_t       special_val_q;
  logic        fin_q;

  // result assembly from the finished quotient
  function automatic fp64_t finish(logic s, logic signed [13:0] e, logic [QBITS-1:0] q, logic rem_nz);
    logic [55:0] m;
    if (q[QBITS-1]) m = {q[56:2], q[1] | q[0] | rem_nz};
    else            m = {q[55:1], q[0] | rem_nz};
    return fp_round_pack(s, q[QBITS-1] ? e : e - 14'sd1, m);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0; rem_q <= '0; dvs_q <= '0; quo_q <= '0; sign_q <= 1'b0;
      exp_q <= '0; special_q <= 1'b0; special_val_q <= '0; fin_q <= 1'b0;
      busy <= 1'b0; done <= 1'b0; y <= '0;
    end else begin
      done  <= 1'b0;
      fin_q <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        cnt_q  <= 6'(QBITS);
        sign_q <= a[63] ^ b[63];
        exp_q  <= 14'(signed'({3'b0, a[62:52]})) - 14'(signed'({3'b0, b[62:52]})) + 14'sd1023;
        rem_q  <= {1'b0, 1'b1, a[51:0]};
        dvs_q  <= {1'b1, b[51:0]};
        quo_q  <= '0;
        special_q <= 1'b1;
        if (fp_is_nan(a) || fp_is_nan(b) || (fp_is_inf(a) && fp_is_inf(b)) ||
            (fp_is_zero(a) && fp_is_zero(b)))
          special_val_q <= FP_QNAN;
        else if (fp_is_inf(a) || fp_is_zero(b))
          special_val_q <= {a[63] ^ b[63], 11'h7FF, 52'h0};
        else if (fp_is_inf(b) || fp_is_zero(a))
          special_val_q <= {a[63] ^ b[63], 63'h0};
        else
          special_q <= 1'b0;
      end else if (busy && cnt_q != 0) begin
        if (rem_q >= {1'b0, dvs_q}) begin
          rem_q <= (rem_q - {1'b0, dvs_q}) << 1;
          quo_q <= {quo_q[QBITS-2:0], 1'b1};
        end else begin
          rem_q <= rem_q << 1;
          quo_q <= {quo_q[QBITS-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 6'd1;
        if (cnt_q == 6'd1) fin_q <= 1'b1;
      end else if (fin_q) begin
        y    <= special_q ? special_val_q : finish(sign_q, exp_q, quo_q, rem_q != '0);
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end
endmodule
