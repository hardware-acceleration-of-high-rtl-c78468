// ilu0_unit: the per-row tail of an ILU0 substitution step.
//
// The SpMV pipeline, run on the strictly lower (L) or upper (U) factor,
// delivers s_i = sum_j LU(i,j) * p[j] for each row i of a color, in order,
// via the write unit. This unit finishes the row as in the document's ILU0
// application:
//   forward  (L): p[i] = p[i] - s_i
//   backward (U): p[i] = (p[i] - s_i) / d[i]
// p[i] is read from the on-chip vector memory (URAM) where the P vector lives
// during the ILU0 application, and the new p[i] is written back there; in the
// backward step it is also sent to the HBM copy of the result (out_*). d[i]
// comes from the diagonal vector in off-chip memory, fetched one line at a
// time and kept while consecutive rows use the same line.
//
// Rows are handled one at a time: URAM read (1 cycle), subtraction, then for
// the backward step a diagonal line fetch if needed and the 58-cycle
// iterative divider. The document divides by 3x3 diagonal blocks of the
// blocked matrix; this unit divides by a scalar diagonal per row (see the
// design notes), and the one-row-at-a-time schedule is this implementation's.
module ilu0_unit
  import fp64_pkg::*;
  import solver_pkg::*;
#(
  parameter int UAW = 18
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            op_start,      // new substitution: forget the cached diagonal line
  input  logic            backward,      // 0: forward (L), 1: backward (U)
  input  logic [31:0]     row_base,      // first global row of the color
  input  laddr_t          diag_base,
  // rows from the write unit
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [31:0]     in_row,
  input  fp64_t           in_val,
  // URAM port: read p[i], write the new p[i]
  output logic            u_en,
  output logic            u_we,
  output logic [UAW-1:0]  u_addr,
  output fp64_t           u_wdata,
  input  fp64_t           u_rdata,
  // diagonal fetch
  output rd_req_t         d_req,
  input  logic            d_req_ready,
  input  rd_rsp_t         d_rsp,
  // backward results towards HBM
  output logic            out_valid,
  input  logic            out_ready,
  output logic [31:0]     out_idx,
  output fp64_t           out_val,
  output logic            busy
);
  typedef enum logic [2:0] {S_IDLE, S_READ, S_SUB, S_DFETCH, S_DWAIT, S_DIV, S_WRITE} state_e;
  state_e st_q;

  logic [31:0] g_q;
  fp64_t       s_q, t_q, res_q;
  laddr_t      dline_q;
  logic        dline_v_q;
  fp64_t [LANES-1:0] dcache_q;

  logic  div_start, div_busy, div_done;
  fp64_t div_y;
  fp_div u_div (.clk, .rst_n, .start(div_start), .a(t_q),
                .b(dcache_q[g_q[$clog2(LANES)-1:0]]), .busy(div_busy), .done(div_done), .y(div_y));

  laddr_t g_line;
  assign g_line = diag_base + laddr_t'(g_q >> $clog2(LANES));

  assign in_ready  = (st_q == S_IDLE);
  assign busy      = (st_q != S_IDLE);
  assign div_start = (st_q == S_DIV) && !div_busy && !div_done;

  always_comb begin
    u_en    = (st_q == S_READ) || (st_q == S_WRITE);
    u_we    = (st_q == S_WRITE);
    u_addr  = UAW'(g_q);
    u_wdata = res_q;
    d_req.valid = (st_q == S_DFETCH);
    d_req.addr  = g_line;
    out_valid = (st_q == S_WRITE) && backward;
    out_idx   = g_q;
    out_val   = res_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; g_q <= '0; s_q <= '0; t_q <= '0; res_q <= '0;
      dline_q <= '0; dline_v_q <= 1'b0; dcache_q <= '0;
    end else begin
      if (op_start) dline_v_q <= 1'b0;
      unique case (st_q)
        S_IDLE: if (in_valid) begin
          g_q <= row_base + in_row;
          s_q <= in_val;
          st_q <= S_READ;
        end
        S_READ: st_q <= S_SUB;                       // URAM read issued
        S_SUB: begin
          t_q <= fp_add_f(u_rdata, fp_neg(s_q));
          if (!backward) begin
            res_q <= fp_add_f(u_rdata, fp_neg(s_q));
            st_q  <= S_WRITE;
          end else if (dline_v_q && dline_q == g_line) st_q <= S_DIV;
          else st_q <= S_DFETCH;
        end
        S_DFETCH: if (d_req_ready) st_q <= S_DWAIT;
        S_DWAIT: if (d_rsp.valid) begin
          dcache_q  <= d_rsp.data;
          dline_q   <= g_line;
          dline_v_q <= 1'b1;
          st_q      <= S_DIV;
        end
        S_DIV: if (div_done) begin
          res_q <= div_y;
          st_q  <= S_WRITE;
        end
        S_WRITE: if (!backward || out_ready) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
