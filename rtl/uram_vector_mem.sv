// uram_vector_mem: the on-chip multiplicand vector memory.
//
// One copy of the vector that the SpMV multiplies (or that the ILU0
// substitutions update in place) is kept on chip, so that the values at a
// color's vector partition indices can be fetched at random. The document
// sizes it at 262,144 doubles (the largest matrix column count the kernel
// accepts) and gives it two ports. Each port does one read or one write per
// cycle; reads return one cycle later (registered output, UltraRAM style).
// Writes on both ports to the same address in one cycle are not allowed.
module uram_vector_mem
  import fp64_pkg::*;
#(
  parameter int DEPTH = 262144,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic [1:0]         en,
  input  logic [1:0]         we,
  input  logic [1:0][AW-1:0] addr,
  input  fp64_t [1:0]        wdata,
  output fp64_t [1:0]        rdata
);
  fp64_t mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (en[p]) begin
        if (we[p]) mem[addr[p]] <= wdata[p];
        else       rdata[p] <= mem[addr[p]];
      end
  end

  assert property (@(posedge clk) !(en[0] && we[0] && en[1] && we[1] && addr[0] == addr[1]))
    else $error("uram_vector_mem: both ports write one address");
endmodule
