// tb_bbnn_act: all four activation shapes against a real-number reference.
// Ramps use the slope 1/20 and a 9-bit output with 8 fraction bits; the steps are
// tested in that format and in the 8-bit integer format. Inputs sweep the linear
// region densely and the saturated regions randomly.
// The four shapes and the 1/20 slope follow the published design; the value at zero and truncation are this design's choice.
module tb_bbnn_act;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;
  localparam int IN_W = 26, OUT_W = 9, FRAC = 8;
  logic [IN_W-1:0] s;
  logic [OUT_W-1:0] y_su, y_sb, y_ru, y_rb;
  logic [7:0] y_int;
  int checks = 0, failures = 0;

  bbnn_act #(.KIND(ACT_STEP_UNI), .IN_W(IN_W), .OUT_W(OUT_W), .FRAC(FRAC)) u_su (.act_in(s), .act_out(y_su));
  bbnn_act #(.KIND(ACT_STEP_BI),  .IN_W(IN_W), .OUT_W(OUT_W), .FRAC(FRAC)) u_sb (.act_in(s), .act_out(y_sb));
  bbnn_act #(.KIND(ACT_RAMP_UNI), .IN_W(IN_W), .OUT_W(OUT_W), .FRAC(FRAC), .SLOPE_NUM(1), .SLOPE_DEN(20)) u_ru (.act_in(s), .act_out(y_ru));
  bbnn_act #(.KIND(ACT_RAMP_BI),  .IN_W(IN_W), .OUT_W(OUT_W), .FRAC(FRAC), .SLOPE_NUM(1), .SLOPE_DEN(20)) u_rb (.act_in(s), .act_out(y_rb));
  bbnn_act #(.KIND(ACT_STEP_BI),  .IN_W(IN_W), .OUT_W(8), .FRAC(0)) u_int (.act_in(s), .act_out(y_int));

  task automatic cmp(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s s=%0d got=%0d exp=%0d", what, $signed(s), got, exp_v);
    end
  endtask

  task automatic run(longint v);
    s = IN_W'(v);
    #1;
    cmp("step_uni", int'($signed(y_su)), ref_step(v, FRAC, OUT_W, 1'b0));
    cmp("step_bi",  int'($signed(y_sb)), ref_step(v, FRAC, OUT_W, 1'b1));
    cmp("ramp_uni", int'($signed(y_ru)), ref_ramp(v, FRAC, 1, 20, OUT_W, 1'b0));
    cmp("ramp_bi",  int'($signed(y_rb)), ref_ramp(v, FRAC, 1, 20, OUT_W, 1'b1));
    cmp("step_int", int'($signed(y_int)), ref_step(v, 0, 8, 1'b1));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (longint v = -5200; v <= 5200; v += 7) run(v);
    for (int k = 0; k < 500; k++) run(longint'($signed(IN_W'($urandom))));
    run(0); run(-1); run(1); run(5120); run(-5120); run(5119); run(-5121);
    run(-(longint'(1) << (IN_W-1))); run((longint'(1) << (IN_W-1)) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
