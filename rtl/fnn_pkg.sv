// fnn_pkg: types, constants and fixed-point helpers shared by the FNN
// inference pipeline.
//
// The pipeline is built from small clocked stages that talk over "buses" in
// the style of Synchronous Message Exchange: a control bus that starts a stage
// and carries the tensor shape (index_control_t), index buses that carry one
// address with a ready flag (index_value_t), and RAM read and write requests.
//
// Numbers are signed two's-complement fixed point, DATA_W bits wide with FRAC
// fraction bits (Q15.16 by default). The reference model works in floating
// point; fixed point is this design's own choice so that every stage is plain
// integer logic.
package fnn_pkg;

  localparam int DATA_W = 32;          // width of one tensor element
  localparam int FRAC   = 16;          // fraction bits of an element
  localparam int ADDR_W = 24;          // width of a flat RAM address
  localparam int DIM_W  = 16;          // width of one tensor dimension

  typedef logic signed [DATA_W-1:0] fix_t;
  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic [DIM_W-1:0]         dim_t;

  localparam fix_t FX_ONE = fix_t'(1) <<< FRAC;
  localparam fix_t FX_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam fix_t FX_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // Control bus: starts a stage (ready is a one-cycle pulse) and tells it the
  // shape of the tensor it walks and the base addresses of its operands.
  typedef struct packed {
    logic  ready;
    dim_t  height;
    dim_t  width;
    addr_t offset_a;
    addr_t offset_b;
  } index_control_t;

  // Index bus: one flat address, valid while ready is set.
  typedef struct packed {
    logic  ready;
    addr_t addr;
  } index_value_t;

  // Read request to a RAM; the data appears one clock later.
  typedef struct packed {
    logic  en;
    addr_t addr;
  } rd_ctrl_t;

  // Write request to a RAM, performed at the next clock edge.
  typedef struct packed {
    logic  en;
    addr_t addr;
    fix_t  data;
  } wr_ctrl_t;

  // Element-wise operations of the pipeline.
  typedef enum logic [2:0] {
    OP_PRELU    = 3'd0,   // a >= 0 ? a : b*a
    OP_MUL      = 3'd1,   // a*b
    OP_SIGMOID  = 3'd2,   // 1/(1+exp(-a))
    OP_MULMIN   = 3'd3,   // 2*a - 1
    OP_SOFTPLUS = 3'd4,   // log(1+exp(a))
    OP_CLAMP    = 3'd5    // min(max(a, -b), b)
  } ew_op_e;

  // How an element-wise stage addresses its second operand.
  typedef enum logic [1:0] {
    B_NONE  = 2'd0,       // no second operand (a constant on a port instead)
    B_SAME  = 2'd1,       // same flat address as the first operand
    B_COL   = 2'd2,       // column index: broadcast over rows
    B_GROUP = 2'd3        // column index / group: one value per group of columns
  } b_mode_e;

  // Parameter tensors the host loads before a run.
  typedef enum logic [2:0] {
    LD_W0 = 3'd0,         // first-layer weights, (nets*hidden) x input
    LD_X  = 3'd1,         // input, batch x input
    LD_PZ = 3'd2,         // PReLU slopes of the z branch, one per network
    LD_PR = 3'd3,         // PReLU slopes of the r branch, one per network
    LD_WZ = 3'd4,         // second-layer weights of the z branch, nets x hidden
    LD_WR = 3'd5,         // second-layer weights of the r branch, nets x hidden
    LD_ZS = 3'd6          // z_scale, one per network
  } load_sel_e;

  function automatic index_control_t mk_ctrl(logic ready, int height, int width);
    return '{ready: ready, height: dim_t'(height), width: dim_t'(width), offset_a: '0, offset_b: '0};
  endfunction

  // Pipeline depth of each element-wise unit, in clocks.
  function automatic int op_latency(ew_op_e op);
    case (op)
      OP_SIGMOID:  return 3;
      OP_MULMIN:   return 2;
      OP_SOFTPLUS: return 2;
      default:     return 1;
    endcase
  endfunction

  // Saturate a wide signed value to the element width.
  function automatic fix_t fx_sat(logic signed [2*DATA_W-1:0] v);
    if (v > (2*DATA_W)'(FX_MAX))      return FX_MAX;
    else if (v < (2*DATA_W)'(FX_MIN)) return FX_MIN;
    else                      return fix_t'(v);
  endfunction

  // Fixed-point product, rounded toward minus infinity, saturated.
  function automatic fix_t fx_mul(fix_t a, fix_t b);
    logic signed [2*DATA_W-1:0] p;
    p = (2*DATA_W)'(a) * (2*DATA_W)'(b);
    return fx_sat(p >>> FRAC);
  endfunction

  // Saturating sum.
  function automatic fix_t fx_add(fix_t a, fix_t b);
    return fx_sat((2*DATA_W)'(a) + (2*DATA_W)'(b));
  endfunction

endpackage
