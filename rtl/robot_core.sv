// robot_core: robot navigation-control BbNN with its RAM and controller.
//
// Host port A / core port B of a 256 x 64 dual-port RAM. The host writes biases
// of blocks A, B, C (row 0) and D, E (row 1), weights of A and B (row 2), C and D
// (row 3) and E (row 4), then 64 sensor sets in rows 5 .. 68 (S1 in byte 0 ...
// S5 in byte 4, each 0 or 1 as an 8-bit integer), and starts the core by writing
// row 255. For set k the core writes row 69 + k with y1 in byte 3, y2 in byte 2,
// y3 in byte 1 and y4 in byte 0 (each +1 = 8'h01 or -1 = 8'hFF), upper bytes zero;
// a motor decoder outside this design turns y1..y4 into wheel angles. finish
// rises after the last row and stays high until the next start; a start while
// busy is ignored.
//
// One clock for host port and core; rst_n asynchronous, active low. The network
// needs four iterations (the longest path is B -> C -> D -> E), so the controller
// settles for four clocks: 8 clocks per data set (7 for the first) after a
// 7-clock parameter load.
// Row numbers follow the published RAM map; the byte order inside rows, the four
// settle clocks and the single clock are this design's choices.
module robot_core
  import bbnn_pkg::*;
#(
  parameter int unsigned X_W    = 8,
  parameter int unsigned SETTLE = 4
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

  localparam int unsigned N_PARAM_ROWS = 5;

  row_t              ram_rdata, ram_wdata, inp, net_out;
  logic [RAM_AW-1:0] ram_addr;
  logic              ram_we, net_clr, start;
  row_t [N_PARAM_ROWS-1:0] params;
  logic [4:0][X_W-1:0] s;
  logic [3:0][X_W-1:0] y;

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

  always_comb begin
    for (int unsigned i = 0; i < 5; i++) s[i] = X_W'(signed'(row_byte(inp, i)));
  end

  robot_bbnn #(.X_W(X_W)) u_net (
    .clk, .rst_n, .clr(net_clr), .s,
    .bias_abc(params[0]), .bias_de(params[1]), .w_ab(params[2]), .w_cd(params[3]),
    .w_e(params[4]), .y
  );

  assign net_out = {32'b0, PARAM_W'(y[0]), PARAM_W'(y[1]), PARAM_W'(y[2]), PARAM_W'(y[3])};

endmodule
