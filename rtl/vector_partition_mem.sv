// vector_partition_mem: one vector partition memory of the SpMV pipeline.
//
// The pipeline keeps one copy of the current color's vector partition per
// pair of multipliers, because a block RAM offers at most two ports; every
// copy holds the whole partition (the document's replication scheme). Each of
// the two ports either writes (we) or reads in a given cycle; a read returns
// the word one cycle later (registered output, block RAM style). The two
// ports must not write the same address in the same cycle.
//
// DEPTH default 65,536 doubles: the document's maximum matrix size for the
// non-partitioned variant, whose partition memories hold the whole vector.
// The depth of the partitioned variant's memories is not given.
module vector_partition_mem
  import fp64_pkg::*;
#(
  parameter int DEPTH = 65536,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [1:0]    we,
  input  logic [1:0][AW-1:0] addr,
  input  fp64_t [1:0]   wdata,
  output fp64_t [1:0]   rdata
);
  fp64_t mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (we[p]) mem[addr[p]] <= wdata[p];
      rdata[p] <= mem[addr[p]];
    end
  end
endmodule
