// tb_bbnn_block13: random test of the 1-input 3-output block.
// Registered instance in the 9-bit Q.8 format with the bipolar ramp 1/20:
// outputs hold until the edge, then equal f(w*x + b); clr zeroes them. A
// combinational unipolar-step instance (REG_OUT = 0) is checked alongside.
// Block structure follows the published block; clr and REG_OUT are this design's own additions.
module tb_bbnn_block13;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [8:0] x1, y2, y3, y4, cy2, cy3, cy4;
  logic [7:0] w12, w13, w14, b2, b3, b4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bbnn_block13 #(.X_W(9), .FRAC(8), .KIND(ACT_RAMP_BI), .SLOPE_NUM(1), .SLOPE_DEN(20)) dut (
    .clk, .rst_n, .clr, .tc(1'b1), .x1, .w12, .w13, .w14, .b2, .b3, .b4, .y2, .y3, .y4);
  bbnn_block13 #(.X_W(9), .FRAC(8), .KIND(ACT_STEP_UNI), .REG_OUT(1'b0)) dut_c (
    .clk, .rst_n, .clr, .tc(1'b1), .x1, .w12, .w13, .w14, .b2, .b3, .b4,
    .y2(cy2), .y3(cy3), .y4(cy4));

  function automatic int sx(logic [8:0] v); return int'($signed(v)); endfunction
  function automatic int sw(logic [7:0] v); return int'($signed(v)); endfunction
  function automatic longint sum1(logic [7:0] w, logic [8:0] x, logic [7:0] b);
    return longint'(sw(w)) * sx(x) + longint'(sw(b)) * 256;
  endfunction

  task automatic cmp(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d", what, got, exp_v);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e2, e3, e4, o2, o3, o4;
    {x1, w12, w13, w14, b2, b3, b4} = '0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      o2 = sx(y2); o3 = sx(y3); o4 = sx(y4);
      x1 = 9'($urandom);
      {w12, w13, w14, b2} = $urandom; {b3, b4} = 16'($urandom);
      clr = (k % 13 == 3);
      #1;
      cmp("hold y2", sx(y2), o2); cmp("hold y3", sx(y3), o3); cmp("hold y4", sx(y4), o4);
      cmp("comb y2", sx(cy2), ref_step(sum1(w12, x1, b2), 8, 9, 1'b0));
      cmp("comb y3", sx(cy3), ref_step(sum1(w13, x1, b3), 8, 9, 1'b0));
      cmp("comb y4", sx(cy4), ref_step(sum1(w14, x1, b4), 8, 9, 1'b0));
      e2 = clr ? 0 : ref_ramp(sum1(w12, x1, b2), 8, 1, 20, 9, 1'b1);
      e3 = clr ? 0 : ref_ramp(sum1(w13, x1, b3), 8, 1, 20, 9, 1'b1);
      e4 = clr ? 0 : ref_ramp(sum1(w14, x1, b4), 8, 1, 20, 9, 1'b1);
      @(posedge clk); #1;
      cmp("y2", sx(y2), e2); cmp("y3", sx(y3), e3); cmp("y4", sx(y4), e4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
