// xor_core: XOR-classifier BbNN with its RAM and controller, as placed on the FPGA.
//
// The host owns port A of a 256 x 64 dual-port RAM; the core owns port B. The host
// writes the biases (row 0), the weights of blocks A and B (row 1) and of C and D
// (row 2) and 64 input pairs (rows 3 .. 66, x1 in byte 1, x2 in byte 0, each an
// unsigned 8-bit fraction of 1), then writes any word to row 255. That write
// starts the controller; it loads the parameters, runs the network on every pair
// and writes row 67 + k for pair k: bits 15:0 = network answer y (D.y4), bits
// 31:16 = D.y3, both sign-extended 9-bit numbers with 8 fraction bits (256 = 1.0),
// upper bits zero. finish rises after the last row is written and stays high
// until the next start; a start while the core is busy is ignored.
//
// Each stored 8-bit input is widened to the block format by a zero sign bit (the
// inputs are never negative); the weights and biases, stored as 8-bit integers,
// get their zero fraction inside the blocks. One clock, clk, runs host port and
// core (the host interface is taken as synchronous to it); rst_n is an
// asynchronous active-low reset. Throughput: 7 clocks per data set (6 for the
// first) after a 5-clock parameter load, per the published state table.
module xor_core
  import bbnn_pkg::*;
#(
  parameter int unsigned X_W       = 9,
  parameter int unsigned FRAC      = 8,
  parameter int          SLOPE_NUM = 1,
  parameter int          SLOPE_DEN = 20,
  parameter int unsigned SETTLE    = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_en,
  input  logic              host_we,
  input  logic [RAM_AW-1:0] host_addr,
  input  row_t              host_wdata,
  output row_t              host_rdata,
  output logic              busy,
  output logic              finish
);

  localparam int unsigned N_PARAM_ROWS = 3;

  row_t              ram_rdata, ram_wdata, inp, net_out;
  logic [RAM_AW-1:0] ram_addr;
  logic              ram_we, net_clr, start;
  row_t [N_PARAM_ROWS-1:0] params;
  logic [X_W-1:0]    x1, x2, y, y_d3, y_c4;

  initial assert (FRAC >= PARAM_W && X_W > FRAC)
    else $error("xor_core: stored 8-bit fractions need FRAC >= 8 and a sign bit");

  // start: a host write to the start row, registered into a one-clock pulse
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start <= 1'b0;
    else        start <= host_en && host_we && (host_addr == START_ADDR);
  end

  dpram256x64 u_ram (
    .clka(clk), .ena(host_en), .wea(host_we), .addra(host_addr), .dina(host_wdata),
    .douta(host_rdata),
    .clkb(clk), .enb(1'b1), .web(ram_we), .addrb(ram_addr), .dinb(ram_wdata),
    .doutb(ram_rdata)
  );

  bbnn_ctrl #(.N_PARAM_ROWS(N_PARAM_ROWS), .N_SETS(N_DATASETS), .SETTLE(SETTLE)) u_ctrl (
    .clk, .rst_n, .start, .ram_rdata, .ram_addr, .ram_we, .ram_wdata, .params, .inp,
    .net_out, .net_clr, .busy, .finish
  );

  // stored fraction byte -> X_W-bit word: zero sign bit, extra fraction bits zero
  assign x1 = X_W'(row_byte(inp, 1)) << (FRAC - PARAM_W);
  assign x2 = X_W'(row_byte(inp, 0)) << (FRAC - PARAM_W);

  xor_bbnn #(.X_W(X_W), .FRAC(FRAC), .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN)) u_net (
    .clk, .rst_n, .clr(net_clr), .x1, .x2,
    .bias(params[0]), .w_ab(params[1]), .w_cd(params[2]),
    .y, .y_d3, .y_c4
  );

  assign net_out = {32'b0, 16'($signed(y_d3)), 16'($signed(y))};

endmodule
