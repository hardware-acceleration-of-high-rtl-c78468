// internal_read_unit: loads a color's vector partition into the SpMV
// pipeline.
//
// It receives the color's vector partition indices (global vector positions,
// sixteen per line) from the external read unit, reads the vector values at
// those positions from the on-chip URAM vector memory through both of its
// ports (two values per cycle, the document's two internal ports), and writes
// them, one cycle later, into the vector partition memories at consecutive
// partition positions 0, 1, 2, ... The column indices of the color's matrix
// values refer to those positions. done pulses when all count values have
// been written. In the document this unit can also read the next color's
// partition ahead into a buffer of its own; this one loads a partition only
// when the pipeline is idle (see the design notes).
module internal_read_unit
  import fp64_pkg::*;
  import solver_pkg::*;
#(
  parameter int UAW = 18,
  parameter int VAW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       count,
  // index lines
  input  logic              idx_valid,
  input  line_t             idx_line,
  output logic              idx_ready,
  // URAM read ports
  output logic [1:0]        u_en,
  output logic [1:0][UAW-1:0] u_addr,
  input  fp64_t [1:0]       u_rdata,
  // vector partition memory write ports
  output logic [1:0]        vp_we,
  output logic [1:0][VAW-1:0] vp_addr,
  output fp64_t [1:0]       vp_wdata,
  output logic              done
);
  logic [31:0] left_q;      // values still to read
  logic [31:0] pos_q;       // next partition position to read
  logic [2:0]  slot_q;      // pair within the current index line
  logic [1:0]  rd_v_q;      // reads issued last cycle
  logic [31:0] rd_pos_q;
  logic        active_q;

  logic go;
  assign go = active_q && idx_valid && (left_q != '0);

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      u_en[p]   = go && (left_q > 32'(p));
      u_addr[p] = UAW'(idx_line[32*(2*slot_q + p) +: 32]);
      vp_we[p]    = rd_v_q[p];
      vp_addr[p]  = VAW'(rd_pos_q + 32'(p));
      vp_wdata[p] = u_rdata[p];
    end
    // the line is used up after its eighth pair or the last value
    idx_ready = go && (slot_q == 3'd7 || left_q <= 32'd2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_q <= '0; pos_q <= '0; slot_q <= '0; rd_v_q <= '0; rd_pos_q <= '0; active_q <= 1'b0; done <= 1'b0;
    end else begin
      done   <= 1'b0;
      rd_v_q <= u_en;
      rd_pos_q <= pos_q;
      if (start) begin
        left_q <= count; pos_q <= '0; slot_q <= '0; active_q <= 1'b1;
        if (count == '0) begin active_q <= 1'b0; done <= 1'b1; end
      end else if (go) begin
        left_q <= (left_q > 32'd2) ? left_q - 32'd2 : 32'd0;
        pos_q  <= pos_q + 32'd2;
        slot_q <= idx_ready ? 3'd0 : slot_q + 3'd1;
      end else if (active_q && left_q == '0 && rd_v_q == '0) begin
        active_q <= 1'b0;
        done     <= 1'b1;
      end
    end
  end
endmodule
