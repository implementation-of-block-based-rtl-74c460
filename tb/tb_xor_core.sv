// tb_xor_core: the XOR core driven through its host port like the host program.
// Writes biases, weights and 64 input pairs, starts the core by writing row 255,
// waits for finish, checks the run time against the state table and reads back
// the 64 result rows, each compared with the network model after three iterations.
// Run once with the published weights and once with random weights.
// Row numbers follow the published RAM map; the byte order inside rows is this design's choice.
module tb_xor_core;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [7:0] addr = '0;
  row_t wdata = '0, rdata;
  logic busy, finish;
  int checks = 0, failures = 0;
  // edges from the start-row write to finish: start register, IDLE, 5 LOAD,
  // first set 6, 63 sets of 7, final CHECK
  localparam int EXP_CYCLES = 1 + 1 + 5 + 6 + 63 * 7 + 1;

  always #5 clk = ~clk;

  xor_core dut (.clk, .rst_n, .host_en(en), .host_we(we), .host_addr(addr), .host_wdata(wdata),
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

  function automatic blk22_t rnd_blk();
    blk22_t r;
    foreach (r[i]) r[i] = int'($urandom_range(0, 63)) - 32;
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk22_t A, B, C, D;
    int x1 [64], x2 [64];
    int e, e3, cycles;
    row_t d;
    #22 rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      if (run == 0) begin A = XOR_A; B = XOR_B; C = XOR_C; D = XOR_D; end
      else begin A = rnd_blk(); B = rnd_blk(); C = rnd_blk(); D = rnd_blk(); end
      host_write(0, xor_bias_row(A, B, C, D));
      host_write(1, xor_w_row(A, B));
      host_write(2, xor_w_row(C, D));
      for (int k = 0; k < 64; k++) begin
        x1[k] = $urandom_range(0, 255); x2[k] = $urandom_range(0, 255);
        if (k < 4) begin x1[k] = (k & 2) ? 243 : 13; x2[k] = (k & 1) ? 243 : 13; end
        host_write(3 + k, {48'($urandom), 8'(x1[k]), 8'(x2[k])});  // upper bytes ignored
      end
      @(negedge clk); en = 1; we = 1; addr = 8'hFF; wdata = '0;
      @(negedge clk); en = 0; we = 0;
      cycles = 1;   // finish of an earlier batch drops only when the core starts
      do begin @(negedge clk); cycles++; end while (!finish);
      checks++;
      if (cycles != EXP_CYCLES) begin failures++; $display("FAIL cycles %0d expected %0d", cycles, EXP_CYCLES); end
      for (int k = 0; k < 64; k++) begin
        e = xor_ref(A, B, C, D, x1[k], x2[k], 3, e3);
        host_read(67 + k, d);
        cmp($sformatf("run %0d out %0d", run, k), d, {32'b0, 16'(e3), 16'(e)});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
