// tb_bbnn_block31: random test of the 3-input 1-output block.
// Registered instance in the 9-bit Q.8 format with the bipolar ramp 1/20 (output
// holds until the edge, then f(w.x + b), zero on clr) and a combinational
// 8-bit integer instance with the bipolar step.
// Block structure follows the published block; clr and REG_OUT are this design's own additions.
module tb_bbnn_block31;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [8:0] x1, x2, x3, y4;
  logic [7:0] ix1, ix2, ix3, iy4;
  logic [7:0] w14, w24, w34, b4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bbnn_block31 #(.X_W(9), .FRAC(8), .KIND(ACT_RAMP_BI), .SLOPE_NUM(1), .SLOPE_DEN(20)) dut (
    .clk, .rst_n, .clr, .tc(1'b1), .x1, .x2, .x3, .w14, .w24, .w34, .b4, .y4);
  bbnn_block31 #(.X_W(8), .FRAC(0), .KIND(ACT_STEP_BI), .REG_OUT(1'b0)) dut_c (
    .clk, .rst_n, .clr, .tc(1'b1), .x1(ix1), .x2(ix2), .x3(ix3), .w14, .w24, .w34, .b4, .y4(iy4));

  function automatic int sx(logic [8:0] v); return int'($signed(v)); endfunction
  function automatic int sw(logic [7:0] v); return int'($signed(v)); endfunction

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
    int e4, o4;
    {x1, x2, x3, w14, w24, w34, b4, ix1, ix2, ix3} = '0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      o4 = sx(y4);
      x1 = 9'($urandom); x2 = 9'($urandom); x3 = 9'($urandom);
      {w14, w24, w34, b4} = $urandom;
      ix1 = 8'($urandom_range(0, 1)); ix2 = 8'(int'($urandom_range(0, 2)) - 1); ix3 = 8'(int'($urandom_range(0, 2)) - 1);
      clr = (k % 11 == 4);
      #1;
      cmp("hold y4", sx(y4), o4);
      cmp("comb y4", sw(iy4), ref_step(sw(w14) * sw(ix1) + sw(w24) * sw(ix2) + sw(w34) * sw(ix3) + sw(b4), 0, 8, 1'b1));
      e4 = clr ? 0 : ref_ramp(longint'(sw(w14)) * sx(x1) + longint'(sw(w24)) * sx(x2) + longint'(sw(w34)) * sx(x3)
                              + longint'(sw(b4)) * 256, 8, 1, 20, 9, 1'b1);
      @(posedge clk); #1;
      cmp("y4", sx(y4), e4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
