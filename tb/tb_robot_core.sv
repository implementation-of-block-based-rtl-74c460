// tb_robot_core: the robot core driven through its host port.
// Writes the published biases and weights (rows 0-4) and 64 sensor sets (all 32
// patterns, twice), starts the core, checks the run time against the state
// machine and compares each result row (y1..y4 as +1/-1 bytes) with the network
// model settled from zero.
// Row numbers follow the published RAM map; byte order and four settle clocks are this design's choice.
module tb_robot_core;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [7:0] addr = '0;
  row_t wdata = '0, rdata;
  logic busy, finish;
  int checks = 0, failures = 0;
  // start register, IDLE, 7 LOAD, first set 7, 63 sets of 8, final CHECK
  localparam int EXP_CYCLES = 1 + 1 + 7 + 7 + 63 * 8 + 1;

  always #5 clk = ~clk;

  robot_core dut (.clk, .rst_n, .host_en(en), .host_we(we), .host_addr(addr), .host_wdata(wdata),
                  .host_rdata(rdata), .busy, .finish);

  task automatic cmp(string what, row_t got, row_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  task automatic host_write(int a, row_t d);
    @(negedge clk); en = 1; we = 1; addr = 8'(a); wdata = d;
    @(negedge clk); en = 0; we = 0;
  endtask

  task automatic host_read(int a, output row_t d);
    @(negedge clk); en = 1; we = 0; addr = 8'(a);
    @(negedge clk); d = rdata; en = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sv[5], y[4];
    int cycles;
    row_t d;
    #22 rst_n = 1'b1;
    for (int r = 0; r < 5; r++) host_write(r, rob_row(r));
    for (int k = 0; k < 64; k++) begin
      d = '0;
      for (int i = 0; i < 5; i++) d[8*i] = k[(i + k / 32) % 5];
      host_write(5 + k, d);
    end
    @(negedge clk); en = 1; we = 1; addr = 8'hFF; wdata = '0;
    @(negedge clk); en = 0; we = 0;
    cycles = 1;
    do begin @(negedge clk); cycles++; end while (!finish);
    checks++;
    if (cycles != EXP_CYCLES) begin failures++; $display("FAIL cycles %0d expected %0d", cycles, EXP_CYCLES); end
    for (int k = 0; k < 64; k++) begin
      for (int i = 0; i < 5; i++) sv[i] = k[(i + k / 32) % 5];
      robot_ref(ROB_A, ROB_B, ROB_C, ROB_D, ROB_E, sv, 10, y);
      host_read(69 + k, d);
      cmp($sformatf("out %0d", k), d, {32'b0, 8'(y[0]), 8'(y[1]), 8'(y[2]), 8'(y[3])});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
