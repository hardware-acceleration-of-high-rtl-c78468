// line_packer: gathers an ordered stream of vector elements into 512-bit
// cache lines for an off-chip write port.
//
// Elements arrive one per cycle as (global index, value), indices increasing.
// Element i belongs to line base + i/8, lane i%8. The packer fills one line
// and sends it (with a lane enable per double, so lines shared with a
// neighbouring color are only partly written) when the next element falls in
// another line or when flush is raised after the last element. This is the
// write unit's "queue a full cache line for the HBM" step; the exact buffering
// is this implementation's choice. flushed pulses once the last line of a
// flush has been accepted by the port.
module line_packer
  import fp64_pkg::*;
  import solver_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  laddr_t      base,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_idx,
  input  fp64_t       in_val,
  input  logic        flush,
  output logic        flushed,
  output wr_req_t     wr,
  input  logic        wr_ready
);
  laddr_t           addr_q;
  fp64_t [LANES-1:0] data_q;
  logic [LANES-1:0] en_q;
  logic             send_q;    // line waiting in wr
  logic             flush_q;

  laddr_t in_line;
  assign in_line = base + laddr_t'(in_idx >> $clog2(LANES));

  // an element can enter when the held line is not being sent and either
  // empty or the same line
  assign in_ready = !send_q && (en_q == '0 || in_line == addr_q);

  always_comb begin
    wr.valid   = send_q;
    wr.addr    = addr_q;
    wr.lane_en = en_q;
    wr.data    = data_q;
  end

  logic [$clog2(LANES)-1:0] lane;
  assign lane = in_idx[$clog2(LANES)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0; data_q <= '0; en_q <= '0; send_q <= 1'b0; flush_q <= 1'b0; flushed <= 1'b0;
    end else begin
      flushed <= 1'b0;
      if (flush) flush_q <= 1'b1;
      if (send_q) begin
        if (wr_ready) begin
          send_q <= 1'b0;
          en_q   <= '0;
          if (flush_q) begin flushed <= 1'b1; flush_q <= 1'b0; end
        end
      end else if (in_valid && in_ready) begin
        addr_q       <= in_line;
        data_q[lane] <= in_val;
        en_q[lane]   <= 1'b1;
        if (lane == $clog2(LANES)'(LANES - 1)) send_q <= 1'b1;
      end else if (in_valid && en_q != '0) begin
        send_q <= 1'b1;               // next element is in another line
      end else if ((flush || flush_q) && !in_valid) begin
        if (en_q != '0) send_q <= 1'b1;
        else begin flushed <= 1'b1; flush_q <= 1'b0; end
      end
    end
  end
endmodule
