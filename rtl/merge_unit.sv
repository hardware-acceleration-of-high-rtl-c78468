// merge_unit: funnels the row results of the SpMV pipeline onto a fixed
// number of output ports.
//
// Inputs per cycle: up to NIN results (the complete-row sums of the selective
// adder tree plus the reduce unit's result), each a (row, value) pair with a
// valid bit. They are compacted in arrival order into a circular buffer of
// DEPTH entries (a prefix count of the valid bits gives each its slot), and
// up to NOUT results leave per cycle, oldest first, when out_ready is high.
// free reports the empty slots; the pipeline stops taking input lines while
// free is below what the lines already in flight could still produce, so the
// buffer cannot overflow. The document gives the unit's job and the idea of
// a set number of output ports; the buffer, its depth and NOUT = 2 are this
// implementation's choices.
module merge_unit
  import fp64_pkg::*;
#(
  parameter int NIN   = 9,
  parameter int NOUT  = 2,
  parameter int DEPTH = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NIN-1:0]          in_valid,
  input  logic [NIN-1:0][31:0]    in_row,
  input  fp64_t [NIN-1:0]         in_val,
  input  logic                    out_ready,
  output logic [NOUT-1:0]         out_valid,
  output logic [NOUT-1:0][31:0]   out_row,
  output fp64_t [NOUT-1:0]        out_val,
  output logic [$clog2(DEPTH):0]  free
);
  localparam int PW = $clog2(DEPTH);

  logic [31:0] row_mem [DEPTH];
  fp64_t       val_mem [DEPTH];
  logic [PW-1:0] wr_q, rd_q;
  logic [PW:0]   cnt_q;
  logic [PW:0]   n_in, n_out;

  always_comb begin
    n_in = '0;
    for (int i = 0; i < NIN; i++) n_in = n_in + (PW+1)'(in_valid[i]);
    n_out = (cnt_q > (PW+1)'(NOUT)) ? (PW+1)'(NOUT) : cnt_q;
    if (!out_ready) n_out = '0;
    for (int k = 0; k < NOUT; k++) begin
      out_valid[k] = out_ready && (cnt_q > (PW+1)'(k));
      out_row[k]   = row_mem[PW'(rd_q + PW'(k))];
      out_val[k]   = val_mem[PW'(rd_q + PW'(k))];
    end
    free = (PW+1)'(DEPTH) - cnt_q;
  end

  always_ff @(posedge clk) begin
    logic [PW-1:0] p;
    p = wr_q;
    for (int i = 0; i < NIN; i++) begin
      if (in_valid[i]) begin
        row_mem[p] <= in_row[i];
        val_mem[p] <= in_val[i];
        p = p + PW'(1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q <= '0; rd_q <= '0; cnt_q <= '0;
    end else begin
      wr_q  <= wr_q + PW'(n_in);
      rd_q  <= rd_q + PW'(n_out);
      cnt_q <= cnt_q + n_in - n_out;
    end
  end

  // the pipeline's flow control must keep the buffer from overflowing
  assert property (@(posedge clk) !rst_n || (cnt_q + n_in - n_out) <= (PW+1)'(DEPTH))
    else $error("merge_unit overflow");
endmodule
