// tb_robot_bbnn: the 1 x 5 robot network with the published weights.
// Each of the 32 sensor patterns is applied with the published weights and then
// with eight random weight sets (-32 .. 31); before each pattern the block
// outputs are cleared and y1..y4 are compared after each of five clock edges
// with a model iterating the network from zero. Output y1 (block B) must be
// final after one edge and y4 (block E) after four.
// Wiring and weights are the published ones; the random weight sets are this design's addition.
module tb_robot_bbnn;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b1;
  logic [4:0][7:0] s;
  logic [3:0][7:0] y;
  row_t r0, r1, r2, r3, r4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  robot_bbnn dut (.clk, .rst_n, .clr, .s, .bias_abc(r0), .bias_de(r1), .w_ab(r2), .w_cd(r3),
                  .w_e(r4), .y);

  task automatic cmp(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s s=%b got=%0d exp=%0d", what, s, got, exp_v);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rw();
    return int'($urandom_range(0, 63)) - 32;
  endfunction

  initial begin
    int sv[5];
    int e[4], efinal[4];
    blk22_t A, C, D;
    blk13_t B;
    blk31_t E;
    s = '0;
    #12 rst_n = 1'b1;
    for (int pat = 0; pat < 32 * 9; pat++) begin
      if (pat == 0) begin A = ROB_A; B = ROB_B; C = ROB_C; D = ROB_D; E = ROB_E; end
      else if (pat % 32 == 0) begin
        foreach (A[i]) begin A[i] = rw(); B[i] = rw(); C[i] = rw(); D[i] = rw(); end
        foreach (E[i]) E[i] = rw();
      end
      r0 = robot_row(A, B, C, D, E, 0); r1 = robot_row(A, B, C, D, E, 1);
      r2 = robot_row(A, B, C, D, E, 2); r3 = robot_row(A, B, C, D, E, 3);
      r4 = robot_row(A, B, C, D, E, 4);
      @(negedge clk);
      clr = 1'b1;
      for (int i = 0; i < 5; i++) begin sv[i] = (pat >> i) & 1; s[i] = 8'(sv[i]); end
      robot_ref(A, B, C, D, E, sv, 10, efinal);
      @(negedge clk);
      clr = 1'b0;
      for (int it = 1; it <= 5; it++) begin
        @(negedge clk);
        robot_ref(A, B, C, D, E, sv, it, e);
        for (int j = 0; j < 4; j++) cmp($sformatf("y%0d it%0d", j + 1, it), int'($signed(y[j])), e[j]);
        if (it == 1) cmp("y1 final after 1 edge", int'($signed(y[0])), efinal[0]);
        if (it == 4) for (int j = 0; j < 4; j++) cmp("final after 4 edges", int'($signed(y[j])), efinal[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
