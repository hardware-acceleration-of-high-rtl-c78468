// fp_sqrt: iterative IEEE-754 double precision square root, y = sqrt(a).
//
// The solver needs one square root per residual norm (norm = sqrt(r . r)).
// The document only names the operation; the digit-by-digit (radix-2,
// restoring) integer square root below is this implementation's choice.
//
// The significand 1.f is taken as a 53-bit integer X (shifted left once more
// when the unbiased exponent is odd, so the exponent halves exactly) and the
// integer square root of X * 2^60 is formed one root bit per cycle, giving 57
// root bits: the 53-bit significand, guard and round bits, and the remainder
// as sticky bit, rounded to nearest even. A start pulse while !busy loads the
// operand; done pulses for one cycle with y exactly 58 cycles after start.
// Negative inputs give NaN, zeros and subnormals give a signed zero.
module fp_sqrt
  import fp64_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp64_t a,
  output logic  busy,
  output logic  done,
  output fp64_t y
);
  localparam int RBITS = 57;        // root bits
  localparam int RADW  = 2 * RBITS; // radicand bits

  logic [5:0]       cnt_q;
  logic [RADW-1:0]  rad_q;     // radicand, consumed two bits per cycle from the top
  logic [RBITS+1:0] rem_q;
  logic [RBITS-1:0] root_q;
  logic signed [13:0] exp_q;
  logic             special_q;
  fp64_t            special_val_q;
  logic             fin_q;

  logic [RBITS+1:0] trial, rem_sh;
  always_comb begin
    rem_sh = {rem_q[RBITS-1:0], rad_q[RADW-1 -: 2]};
    trial  = {root_q, 2'b01};
  end

  logic signed [13:0] eu;   // unbiased exponent of the operand
  assign eu = 14'(signed'({3'b0, a[62:52]})) - 14'sd1023;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0; rad_q <= '0; rem_q <= '0; root_q <= '0; exp_q <= '0;
      special_q <= 1'b0; special_val_q <= '0; fin_q <= 1'b0;
      busy <= 1'b0; done <= 1'b0; y <= '0;
    end else begin
      done  <= 1'b0;
      fin_q <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        cnt_q  <= 6'(RBITS);
        rem_q  <= '0;
        root_q <= '0;
        if (eu[0]) begin
          rad_q <= RADW'({1'b1, a[51:0]}) << 61;
          exp_q <= ((eu - 14'sd1) >>> 1) + 14'sd1023;
        end else begin
          rad_q <= RADW'({1'b1, a[51:0]}) << 60;
          exp_q <= (eu >>> 1) + 14'sd1023;
        end
        special_q <= 1'b1;
        if (fp_is_nan(a))                  special_val_q <= FP_QNAN;
        else if (fp_is_zero(a))            special_val_q <= {a[63], 63'h0};
        else if (a[63])                    special_val_q <= FP_QNAN;
        else if (fp_is_inf(a))             special_val_q <= a;
        else                               special_q <= 1'b0;
      end else if (busy && cnt_q != 0) begin
        if (rem_sh >= trial) begin
          rem_q  <= rem_sh - trial;
          root_q <= {root_q[RBITS-2:0], 1'b1};
        end else begin
          rem_q  <= rem_sh;
          root_q <= {root_q[RBITS-2:0], 1'b0};
        end
        rad_q <= rad_q << 2;
        cnt_q <= cnt_q - 6'd1;
        if (cnt_q == 6'd1) fin_q <= 1'b1;
      end else if (fin_q) begin
        y    <= special_q ? special_val_q
                          : fp_round_pack(1'b0, exp_q, {root_q[56:2], root_q[1] | root_q[0] | (rem_q != '0)});
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end
endmodule
