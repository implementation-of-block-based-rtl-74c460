// tb_bbnn_block22: random test of the 2-input 2-output block.
// A registered instance (9-bit Q.8 words, bipolar ramp 1/20) must keep its
// outputs until the clock edge, show f(w.x + b) one edge later and go to zero
// on clr; a combinational instance (REG_OUT = 0, 8-bit integers, bipolar step)
// must follow its inputs at once.
// Block structure follows the published block; clr and REG_OUT are this design's own additions.
module tb_bbnn_block22;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [8:0] x1, x2, y3, y4;
  logic [7:0] w13, w23, w14, w24, b3, b4;
  logic [7:0] ix1, ix2, iy3, iy4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bbnn_block22 #(.X_W(9), .FRAC(8), .KIND(ACT_RAMP_BI), .SLOPE_NUM(1), .SLOPE_DEN(20)) dut (
    .clk, .rst_n, .clr, .tc(1'b1), .x1, .x2, .w13, .w23, .w14, .w24, .b3, .b4, .y3, .y4);
  bbnn_block22 #(.X_W(8), .FRAC(0), .KIND(ACT_STEP_BI), .REG_OUT(1'b0)) dut_c (
    .clk, .rst_n, .clr, .tc(1'b1), .x1(ix1), .x2(ix2), .w13, .w23, .w14, .w24, .b3, .b4,
    .y3(iy3), .y4(iy4));

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
    int e3, e4, old3, old4;
    {x1, x2, w13, w23, w14, w24, b3, b4, ix1, ix2} = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    cmp("reset y3", sx(y3), 0);
    cmp("reset y4", sx(y4), 0);
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      old3 = sx(y3); old4 = sx(y4);
      x1 = 9'($urandom); x2 = 9'($urandom);
      {w13, w23, w14, w24} = $urandom; {b3, b4} = 16'($urandom);
      if (k % 4 == 0) begin w13 = 8'(int'($urandom_range(0, 63)) - 32); w23 = 8'(int'($urandom_range(0, 63)) - 32); end
      clr = (k % 17 == 5);
      #1;
      cmp("hold y3", sx(y3), old3);      // nothing moves before the edge
      cmp("hold y4", sx(y4), old4);
      e3 = ref_ramp(longint'(sw(w13)) * sx(x1) + longint'(sw(w23)) * sx(x2) + longint'(sw(b3)) * 256, 8, 1, 20, 9, 1'b1);
      e4 = ref_ramp(longint'(sw(w14)) * sx(x1) + longint'(sw(w24)) * sx(x2) + longint'(sw(b4)) * 256, 8, 1, 20, 9, 1'b1);
      if (clr) begin e3 = 0; e4 = 0; end
      @(posedge clk); #1;
      cmp("y3", sx(y3), e3);
      cmp("y4", sx(y4), e4);
      // combinational variant
      ix1 = 8'($urandom_range(0, 1)); ix2 = 8'(int'($urandom_range(0, 2)) - 1);
      #1;
      cmp("comb y3", sw(iy3), ref_step(sw(w13) * sw(ix1) + sw(w23) * sw(ix2) + sw(b3), 0, 8, 1'b1));
      cmp("comb y4", sw(iy4), ref_step(sw(w14) * sw(ix1) + sw(w24) * sw(ix2) + sw(b4), 0, 8, 1'b1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
