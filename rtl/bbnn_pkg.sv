// bbnn_pkg: types and constants shared by the block-based neural network (BbNN) RTL.
//
// A BbNN is a grid of small feed-forward neural-network blocks. Every block has four
// nodes (top, left, right, bottom); each node is either an input or an output, which
// gives the three legal block types block22, block13 and block31. Each output node
// computes y = f(sum(w*x) + b) with integer or fixed-point numbers and an activation
// function f that has no curved part (a step or a saturating ramp).
//
// The RAM row layout constants describe the 256 x 64 memory shared with the host:
// every parameter (weight or bias) occupies one 8-bit byte of a 64-bit row.
// The three block types and the 256 x 64 RAM follow the published design; the
// type names and the enumerations are this design's own.
package bbnn_pkg;

  // Activation functions of the block library (step = "saturation" function).
  typedef enum logic [1:0] {
    ACT_STEP_UNI = 2'd0,  // 0 below zero, +1 from zero up
    ACT_STEP_BI  = 2'd1,  // -1 below zero, +1 from zero up
    ACT_RAMP_UNI = 2'd2,  // slope*x clamped to [0, +1]
    ACT_RAMP_BI  = 2'd3   // slope*x clamped to [-1, +1]
  } act_kind_e;

  // States of the batch controller (bbnn_ctrl).
  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_CHECK, S_FETCH, S_SETTLE, S_WRITE, S_NEXT
  } ctrl_state_e;

  localparam int unsigned RAM_DEPTH  = 256;
  localparam int unsigned RAM_AW     = 8;
  localparam int unsigned RAM_DW     = 64;
  localparam int unsigned PARAM_W    = 8;   // stored width of a weight, bias or input
  localparam logic [RAM_AW-1:0] START_ADDR = 8'hFF;  // host write here starts the core
  localparam int unsigned N_DATASETS = 64;

  typedef logic [RAM_DW-1:0] row_t;
  typedef logic [PARAM_W-1:0] byte_t;

  // Byte k (k = 0 is bits 7:0) of a RAM row.
  function automatic byte_t row_byte(row_t r, int unsigned k);
    return r[k*PARAM_W +: PARAM_W];
  endfunction

endpackage
