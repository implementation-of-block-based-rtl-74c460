// tb_xor_bbnn: the 2 x 2 XOR network iterated clock by clock.
// For each input pair the block outputs are cleared, then after every one of
// six clock edges D.y4 and D.y3 are compared with a software model that
// iterates the same network from zero. Runs with the published weights and with
// random weight sets; the third iteration is the one the controller uses.
// Wiring and weights are the published ones; the random weight sets are this design's addition.
module tb_xor_bbnn;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b1;
  logic [8:0] x1, x2, y, y_d3, y_c4;
  row_t bias, w_ab, w_cd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xor_bbnn dut (.clk, .rst_n, .clr, .x1, .x2, .bias, .w_ab, .w_cd, .y, .y_d3, .y_c4);

  task automatic cmp(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=(%0d,%0d) got=%0d exp=%0d", what, x1, x2, got, exp_v);
    end
  endtask

  function automatic blk22_t rnd_blk();
    blk22_t r;
    foreach (r[i]) r[i] = int'($urandom_range(0, 63)) - 32;
    return r;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk22_t A, B, C, D;
    int e, e3;
    x1 = '0; x2 = '0;
    #12 rst_n = 1'b1;
    for (int set = 0; set < 6; set++) begin
      if (set == 0) begin A = XOR_A; B = XOR_B; C = XOR_C; D = XOR_D; end
      else begin A = rnd_blk(); B = rnd_blk(); C = rnd_blk(); D = rnd_blk(); end
      bias = xor_bias_row(A, B, C, D); w_ab = xor_w_row(A, B); w_cd = xor_w_row(C, D);
      for (int k = 0; k < 100; k++) begin
        @(negedge clk);
        clr = 1'b1;
        x1 = 9'($urandom_range(0, 255)); x2 = 9'($urandom_range(0, 255));
        @(negedge clk);
        clr = 1'b0;
        for (int it = 1; it <= 6; it++) begin
          @(negedge clk);
          e = xor_ref(A, B, C, D, int'(x1), int'(x2), it, e3);
          cmp($sformatf("y it%0d", it), int'($signed(y)), e);
          cmp($sformatf("y_d3 it%0d", it), int'($signed(y_d3)), e3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
