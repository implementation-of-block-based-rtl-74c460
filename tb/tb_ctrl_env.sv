// tb_ctrl_env: test environment for one bbnn_ctrl configuration.
// A dual-port RAM holds random parameter and input rows written through port A.
// In place of a network a counter runs while net_clr is low, so the value the
// controller writes back, inp + params[0] + params[last] + counter, shows that
// it took the right rows and let the network iterate exactly SETTLE clocks. The
// start-to-finish time is checked against the state table, a second start
// pulse during the run must be ignored, and the batch is run twice.
// The RAM timing follows the published block RAM; the stand-in network is this design's own test device.
module tb_ctrl_env
  import bbnn_pkg::*;
#(
  parameter int unsigned R = 3,
  parameter int unsigned S = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int IN_BASE = R, OUT_BASE = R + 64;
  // clock edges from the one that samples start to the one that raises finish:
  // IDLE, R+2 LOAD, first set CHECK+S+WRITE+NEXT, 63 x (CHECK+FETCH+S+WRITE+NEXT), CHECK
  localparam int EXP_CYCLES = 1 + (R + 2) + (S + 3) + 63 * (S + 4) + 1;

  logic ena = 1'b0, wea = 1'b0, start = 1'b0;
  logic [7:0] addra = '0;
  row_t dina = '0, douta, ram_rdata, ram_wdata, inp, net_out;
  logic [7:0] ram_addr;
  logic ram_we, net_clr, busy, finish;
  row_t [R-1:0] params;
  row_t rows [256];
  logic [7:0] cnt;

  dpram256x64 u_ram (.clka(clk), .ena, .wea, .addra, .dina, .douta,
                     .clkb(clk), .enb(1'b1), .web(ram_we), .addrb(ram_addr), .dinb(ram_wdata),
                     .doutb(ram_rdata));

  bbnn_ctrl #(.N_PARAM_ROWS(R), .SETTLE(S)) dut (
    .clk, .rst_n, .start, .ram_rdata, .ram_addr, .ram_we, .ram_wdata, .params, .inp,
    .net_out, .net_clr, .busy, .finish);

  always_ff @(posedge clk) cnt <= net_clr ? 8'd0 : cnt + 8'd1;
  assign net_out = inp + params[0] + params[R-1] + 64'(cnt);

  task automatic cmp(string what, row_t got, row_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL R=%0d %s got=%h exp=%h", R, what, got, exp_v);
    end
  endtask

  task automatic host_write(int a, row_t d);
    @(negedge clk); ena = 1; wea = 1; addra = 8'(a); dina = d;
    @(negedge clk); ena = 0; wea = 0;
  endtask

  task automatic host_read(int a, output row_t d);
    @(negedge clk); ena = 1; wea = 0; addra = 8'(a);
    @(negedge clk); d = douta; ena = 0;
  endtask

  initial begin
    row_t d;
    int cycles;
    checks = 0; failures = 0; done = 1'b0;
    wait (rst_n);
    for (int i = 0; i < OUT_BASE + 65; i++) begin
      rows[i] = {$urandom, $urandom};
      host_write(i, rows[i]);
    end
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!finish) begin
        @(negedge clk); cycles++;
        if (cycles == 100) begin start = 1; @(negedge clk); start = 0; cycles++; end
      end
      checks++;
      if (cycles != EXP_CYCLES) begin
        failures++; $display("FAIL R=%0d cycles %0d expected %0d", R, cycles, EXP_CYCLES);
      end
      for (int r = 0; r < R; r++) cmp($sformatf("param row %0d", r), params[r], rows[r]);
      for (int k = 0; k < 64; k++) begin
        host_read(OUT_BASE + k, d);
        cmp($sformatf("out %0d", k), d, rows[IN_BASE + k] + rows[0] + rows[R-1] + 64'(S));
      end
      for (int k = 0; k < 64; k += 9) begin
        host_read(IN_BASE + k, d);
        cmp("input row kept", d, rows[IN_BASE + k]);
      end
      host_read(OUT_BASE + 64, d);
      cmp("row after outputs kept", d, rows[OUT_BASE + 64]);
      checks++;
      if (busy || !finish) begin failures++; $display("FAIL R=%0d busy/finish after run", R); end
    end
    done = 1'b1;
  end
endmodule
