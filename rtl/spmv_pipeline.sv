// spmv_pipeline: the streaming core of the SpMV/ILU0 unit.
//
// One input line per cycle carries LANES matrix values with their column
// indices (positions inside the color's vector partition) and CSRO new row
// offsets. The flow follows the document's SpMV pipeline:
//   cycle 0  column indices address the vector partition memories (one
//            memory, replicated, per two lanes); values, offsets and lane
//            valids are delayed to match the memory read latency;
//   cycle 1  the LANES multipliers form value * vector element; the control
//            unit decodes the offsets in the same cycle;
//   cycles 2..4  the selective adder tree sums the products of each row
//            within the line;
//   cycle 5  complete rows go to the merge unit; the first and last segment
//            of the line go to the reduce unit, which joins rows that span
//            lines and passes finished ones to the merge unit a cycle later.
// The merge unit hands out up to two (row, value) results per cycle; rows are
// color-local and may leave out of order. in_ready drops while the merge
// buffer could not absorb everything still in flight (a stall).
//
// The vector partition memories are filled through the vp_* write port (two
// words per cycle, written into every copy) while no line is in flight.
// Delays of one cycle per memory, multiplier and adder level are this
// implementation's choice; the document gives the structure, not latencies.
module spmv_pipeline
  import fp64_pkg::*;
  import solver_pkg::*;
#(
  parameter int VP_DEPTH  = 65536,
  parameter int MERGE_DEPTH = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              color_start,
  // input lines
  input  logic              in_valid,
  output logic              in_ready,
  input  mbeat_t            in_beat,
  input  logic              in_last,
  // vector partition fill
  input  logic [1:0]        vp_we,
  input  logic [1:0][$clog2(VP_DEPTH)-1:0] vp_waddr,
  input  fp64_t [1:0]       vp_wdata,
  // results
  input  logic              out_ready,
  output logic [1:0]        out_valid,
  output logic [1:0][31:0]  out_row,
  output fp64_t [1:0]       out_val,
  output logic              idle,
  output logic              stall      // a line was offered but not taken
);
  localparam int AW  = $clog2(VP_DEPTH);
  localparam int NVP = LANES / 2;
  localparam int LW  = $clog2(LANES);
  localparam int NIN = LANES + 1;
  localparam int FLIGHT = 7 * NIN;   // results that lines in flight can still produce

  typedef struct packed {
    logic [LANES-1:0]       direct;
    logic [LANES-1:0][31:0] row;
    logic                   cont;
    logic                   multi;
    logic [LW-1:0]          first_end;
    logic [LW-1:0]          last_end;
    logic                   color_last;
  } sat_ctrl_t;

  logic take;
  logic [$clog2(MERGE_DEPTH):0] m_free;
  assign in_ready = (m_free >= ($clog2(MERGE_DEPTH)+1)'(FLIGHT)) && (vp_we == '0);
  assign take  = in_valid && in_ready;
  assign stall = in_valid && !in_ready;

  // ---------------- stage 0: vector partition memories
  fp64_t [LANES-1:0] vec_s1;
  for (genvar m = 0; m < NVP; m++) begin : g_vpm
    logic [1:0]         we;
    logic [1:0][AW-1:0] addr;
    fp64_t [1:0]        rd;
    always_comb begin
      we = vp_we;
      for (int p = 0; p < 2; p++)
        addr[p] = (vp_we != '0) ? vp_waddr[p] : AW'(in_beat.col[2*m + p]);
    end
    vector_partition_mem #(.DEPTH(VP_DEPTH)) u_vpm (
      .clk, .we, .addr, .wdata(vp_wdata), .rdata(rd));
    assign vec_s1[2*m]   = rd[0];
    assign vec_s1[2*m+1] = rd[1];
  end

  // ---------------- stage 1: delayed values; control unit
  logic              v_s1;
  logic [LANES-1:0]  lv_s1;
  fp64_t [LANES-1:0] val_s1;
  logic [LANES-1:0][IDX_W-1:0] nro_s1;
  logic              last_s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_s1 <= 1'b0; lv_s1 <= '0; val_s1 <= '0; nro_s1 <= '0; last_s1 <= 1'b0;
    end else begin
      v_s1    <= take;
      lv_s1   <= in_beat.valid;
      val_s1  <= in_beat.val;
      nro_s1  <= in_beat.nro;
      last_s1 <= in_last;
    end
  end

  logic             c_valid, c_cont, c_multi, c_color_last;
  logic [LANES-1:0] c_seg_start, c_seg_end_unused, c_direct;
  logic [LANES-1:0][31:0] c_row;
  logic [LW-1:0]    c_first_end, c_last_end;

  spmv_control_unit u_ctrl (
    .clk, .rst_n, .color_start,
    .beat_valid(v_s1), .lane_valid(lv_s1), .nro(nro_s1), .beat_last(last_s1),
    .o_valid(c_valid), .o_seg_start(c_seg_start), .o_seg_end(c_seg_end_unused), .o_row(c_row),
    .o_direct(c_direct), .o_cont(c_cont), .o_multi(c_multi),
    .o_first_end(c_first_end), .o_last_end(c_last_end), .o_color_last(c_color_last));

  // multipliers (registered, aligned with the control unit output)
  fp64_t [LANES-1:0] prod_s2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prod_s2 <= '0;
    else for (int i = 0; i < LANES; i++)
      prod_s2[i] <= lv_s1[i] ? fp_mul_f(val_s1[i], vec_s1[i]) : FP_ZERO;
  end

  // ---------------- stages 2..4: selective adder tree
  sat_ctrl_t sat_in_ctrl, sat_out_ctrl;
  logic      sat_valid;
  fp64_t [LANES-1:0] sat_sum;
  always_comb begin
    sat_in_ctrl.direct     = c_direct;
    sat_in_ctrl.row        = c_row;
    sat_in_ctrl.cont       = c_cont;
    sat_in_ctrl.multi      = c_multi;
    sat_in_ctrl.first_end  = c_first_end;
    sat_in_ctrl.last_end   = c_last_end;
    sat_in_ctrl.color_last = c_color_last;
  end

  selective_adder_tree #(.LANES(LANES), .CTRL_W($bits(sat_ctrl_t))) u_sat (
    .clk, .rst_n, .in_valid(c_valid), .in_val(prod_s2), .in_seg_start(c_seg_start),
    .in_ctrl(sat_in_ctrl), .out_valid(sat_valid), .out_sum(sat_sum), .out_ctrl(sat_out_ctrl));

  // ---------------- stage 5: reduce and merge
  logic        r_valid, r_busy;
  logic [31:0] r_row;
  fp64_t       r_val;
  reduce_unit u_reduce (
    .clk, .rst_n, .in_valid(sat_valid), .cont(sat_out_ctrl.cont), .multi(sat_out_ctrl.multi),
    .color_last(sat_out_ctrl.color_last),
    .first_sum(sat_sum[sat_out_ctrl.first_end]), .last_sum(sat_sum[sat_out_ctrl.last_end]),
    .last_row(sat_out_ctrl.row[sat_out_ctrl.last_end]),
    .out_valid(r_valid), .out_row(r_row), .out_val(r_val), .busy(r_busy));

  logic [NIN-1:0]       m_valid;
  logic [NIN-1:0][31:0] m_row;
  fp64_t [NIN-1:0]      m_val;
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      m_valid[i] = sat_valid && sat_out_ctrl.direct[i];
      m_row[i]   = sat_out_ctrl.row[i];
      m_val[i]   = sat_sum[i];
    end
    m_valid[LANES] = r_valid;
    m_row[LANES]   = r_row;
    m_val[LANES]   = r_val;
  end

  merge_unit #(.NIN(NIN), .NOUT(2), .DEPTH(MERGE_DEPTH)) u_merge (
    .clk, .rst_n, .in_valid(m_valid), .in_row(m_row), .in_val(m_val),
    .out_ready, .out_valid, .out_row, .out_val, .free(m_free));

  // ---------------- drain detection
  logic [5:0] flight_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flight_q <= '0;
    else flight_q <= {flight_q[4:0], take};
  end
  assign idle = (flight_q == '0) && !r_valid && !r_busy &&
                (m_free == ($clog2(MERGE_DEPTH)+1)'(MERGE_DEPTH));

  // control unit: a color's first segment can never continue an open row
  assert property (@(posedge clk)
    (rst_n && sat_valid && sat_out_ctrl.cont) |-> r_busy) else $error("continuation without open row");
endmodule
