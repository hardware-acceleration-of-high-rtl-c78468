// solver_pkg: sizes, memory-port records and command records shared by the
// SpMV/ILU0 unit, the vector operations unit and the solver top level.
//
// Every off-chip port moves one 512-bit cache line per beat (eight doubles),
// matching the 512-bit read ports the pipelines are sized for. A read port is
// a request channel (line address, valid/ready) and a response channel (line
// data, valid); responses return in request order. A write port carries a line
// address, the line and one enable bit per 64-bit lane, with valid/ready.
//
// Matrix data in memory (this layout is a choice of this implementation; the
// host pre-processing produces it):
//   - color table: one line per color, fields {nnz lines, rows, partition
//     index count, first global row} as 32-bit words in lanes 0..3.
//   - value lines: eight doubles per line, on the value read port.
//   - index lines: eight 32-bit column indices in bits 255:0 and the eight
//     matching 32-bit new row offsets in bits 511:256, on the index port.
//     Column indices are positions inside the color's vector partition.
//   - partition index lines: sixteen 32-bit global vector indices per line.
//   A lane whose new row offset is all ones is padding (no value).
package solver_pkg;
  import fp64_pkg::*;

  localparam int LANES   = 8;     // multipliers per pipeline (Table 3, Sec. 5.3)
  localparam int LINE_W  = 512;   // cache line bits (Sec. 5.3)
  localparam int ADDR_W  = 32;    // line address bits
  localparam int IDX_W   = 32;    // width of an index word in memory
  localparam logic [IDX_W-1:0] NRO_PAD = '1;

  typedef logic [LINE_W-1:0] line_t;
  typedef logic [ADDR_W-1:0] laddr_t;

  typedef struct packed {
    logic   valid;
    laddr_t addr;
  } rd_req_t;

  typedef struct packed {
    logic  valid;
    line_t data;
  } rd_rsp_t;

  typedef struct packed {
    logic             valid;
    laddr_t           addr;
    logic [LANES-1:0] lane_en;
    line_t            data;
  } wr_req_t;

  // One input line of the SpMV pipeline.
  typedef struct packed {
    logic [LANES-1:0]            valid;
    fp64_t [LANES-1:0]           val;
    logic [LANES-1:0][IDX_W-1:0] col;
    logic [LANES-1:0][IDX_W-1:0] nro;
  } mbeat_t;

  // Sizes of one color (Sec. 2.5).
  typedef struct packed {
    logic [31:0] row_base;  // first global row of the color
    logic [31:0] vp_count;  // number of vector partition indices
    logic [31:0] rows;      // rows in the color
    logic [31:0] nnz_lines; // value lines (= index lines) of the color
  } color_t;

  typedef enum logic [1:0] {
    MOP_SPMV    = 2'd0,   // y = A * x, x in URAM, y to HBM
    MOP_ILU_FWD = 2'd1,   // p[i] -= L(i,:) * p      (in place in URAM)
    MOP_ILU_BWD = 2'd2    // p[i] = (p[i] - U(i,:) * p) / d[i], also to HBM
  } mop_e;

  typedef struct packed {
    mop_e        mode;
    logic [31:0] num_colors;
    laddr_t      color_tab;  // DDR port 1 line address of the color table
    laddr_t      vp_base;    // DDR port 1 line address of partition indices
    laddr_t      idx_base;   // DDR port 1 line address of index lines
    laddr_t      val_base;   // DDR port 0 line address of value lines
    laddr_t      out_base;   // HBM line address of the result vector
    laddr_t      diag_base;  // HBM line address of the diagonal vector
  } mop_cmd_t;

  typedef enum logic [1:0] {
    VOP_AXPY = 2'd0,   // out = alpha * a + b
    VOP_DOT  = 2'd1,   // s0 = a . b
    VOP_DOT2 = 2'd2    // s0 = a . b and s1 = b . b, b read once
  } vop_e;

  typedef struct packed {
    vop_e        op;
    logic [31:0] lines;   // vector length in lines
    laddr_t      a_base;
    laddr_t      b_base;
    laddr_t      o_base;
    fp64_t       alpha;
  } vop_cmd_t;

  // Problem description handed to the solver by the host. Vectors live in
  // HBM in slots of vec_stride lines starting at vec_base; slot numbers are
  // listed at bicgstab_solver. mat_a/mat_l/mat_u describe the system matrix
  // and the two ILU0 factors (their mode and out_base fields are set by the
  // solver); mat_u.diag_base points at the diagonal vector.
  typedef struct packed {
    logic [31:0] n_lines;     // vector length in lines (rows / 8, rounded up)
    laddr_t      vec_base;
    laddr_t      vec_stride;
    mop_cmd_t    mat_a;
    mop_cmd_t    mat_l;
    mop_cmd_t    mat_u;
    fp64_t       rel_tol;     // stop when |r| <= rel_tol * |r0|
    logic [31:0] max_iter;
  } solver_cfg_t;

endpackage
