// bbnn_top: the two block-based neural network cores and the fixed-function data
// path, side by side.
//
//   xor_*   : XOR pattern classifier (2 x 2 network of block22, ramp activation)
//   rob_*   : mobile-robot navigation controller (1 x 5 network, step activation)
//   asic_*  : stand-alone combinational path f(w1*x1 + w2*x2 + b) with 4-bit operands
//
// Each core exposes the host side of its 256 x 64 RAM (enable, write enable,
// 8-bit row address, 64-bit write and read data), a busy flag and a finish flag;
// a host write to row 255 starts a batch of 64 data sets. In the reconfigurable
// board the two cores are alternative FPGA configurations behind the memory-slot
// interface; here they share clk and rst_n (asynchronous, active low) and are
// otherwise independent.
// Which parts exist follows the published design; placing them side by side in
// one top level with a shared clock is this design's choice.
module bbnn_top
  import bbnn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // XOR classifier host port
  input  logic              xor_en,
  input  logic              xor_we,
  input  logic [RAM_AW-1:0] xor_addr,
  input  row_t              xor_wdata,
  output row_t              xor_rdata,
  output logic              xor_busy,
  output logic              xor_finish,
  // robot controller host port
  input  logic              rob_en,
  input  logic              rob_we,
  input  logic [RAM_AW-1:0] rob_addr,
  input  row_t              rob_wdata,
  output row_t              rob_rdata,
  output logic              rob_busy,
  output logic              rob_finish,
  // fixed-function data path
  input  logic [3:0]        asic_x1,
  input  logic [3:0]        asic_w1,
  input  logic [3:0]        asic_x2,
  input  logic [3:0]        asic_w2,
  input  logic [3:0]        asic_b,
  input  logic [2:0]        asic_m,
  output logic [3:0]        asic_y
);

  xor_core u_xor (
    .clk, .rst_n, .host_en(xor_en), .host_we(xor_we), .host_addr(xor_addr),
    .host_wdata(xor_wdata), .host_rdata(xor_rdata), .busy(xor_busy), .finish(xor_finish)
  );

  robot_core u_rob (
    .clk, .rst_n, .host_en(rob_en), .host_we(rob_we), .host_addr(rob_addr),
    .host_wdata(rob_wdata), .host_rdata(rob_rdata), .busy(rob_busy), .finish(rob_finish)
  );

  asic_dp22 u_asic (
    .x1(asic_x1), .w1(asic_w1), .x2(asic_x2), .w2(asic_w2), .b(asic_b), .m(asic_m),
    .y(asic_y)
  );

endmodule
