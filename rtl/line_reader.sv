// line_reader: streams a run of consecutive cache lines from one off-chip
// read port into a small FIFO.
//
// start loads (base, count). Requests for base, base+1, ... are issued while
// the FIFO has room for every response already asked for (credit scheme), so
// the port's responses, which return in request order, never overflow it.
// The consumer pops lines with pop while valid is high. done is high once all
// count lines were requested (responses may still be in the FIFO). FIFO
// depth 16 is this implementation's choice.
module line_reader
  import solver_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  laddr_t      base,
  input  logic [31:0] count,
  output rd_req_t     req,
  input  logic        req_ready,
  input  rd_rsp_t     rsp,
  output logic        valid,
  output line_t       data,
  input  logic        pop,
  output logic        all_issued
);
  localparam int PW = $clog2(DEPTH);
  line_t       fifo [DEPTH];
  logic [PW-1:0] wp_q, rp_q;
  logic [PW:0]   cnt_q, credit_q;   // lines held / lines requested but not popped
  laddr_t      addr_q;
  logic [31:0] left_q;

  assign req.valid  = (left_q != '0) && (credit_q < (PW+1)'(DEPTH));
  assign req.addr   = addr_q;
  assign valid      = cnt_q != '0;
  assign data       = fifo[rp_q];
  assign all_issued = left_q == '0;

  logic issue, take;
  assign issue = req.valid && req_ready;
  assign take  = pop && valid;

  always_ff @(posedge clk) if (rsp.valid) fifo[wp_q] <= rsp.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0; rp_q <= '0; cnt_q <= '0; credit_q <= '0; addr_q <= '0; left_q <= '0;
    end else begin
      if (start) begin
        addr_q <= base; left_q <= count;
      end else if (issue) begin
        addr_q <= addr_q + 1'b1; left_q <= left_q - 1'b1;
      end
      if (rsp.valid) wp_q <= wp_q + 1'b1;
      if (take) rp_q <= rp_q + 1'b1;
      cnt_q    <= cnt_q + (PW+1)'(rsp.valid) - (PW+1)'(take);
      credit_q <= credit_q + (PW+1)'(issue) - (PW+1)'(take);
    end
  end
endmodule
