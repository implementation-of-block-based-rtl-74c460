// robot_bbnn: 1 x 5 block-based neural network controlling a two-wheel robot.
//
// Five sensor bits S1..S5 (obstacle present = 1) drive the top inputs of five
// blocks in one row, A..E. Signals run left to right except around A:
//   A (block22): x1 = S1, x2 = B.y2; y3 -> E.x3 (wrap-around), y4 unused
//   B (block13): x1 = S2; y2 -> A, y3 -> C, y4 = network output y1
//   C (block22): x1 = S3, x2 = B.y3; y3 -> D, y4 = y2
//   D (block22): x1 = S4, x2 = C.y3; y3 -> E, y4 = y3
//   E (block31): x1 = S5, x2 = D.y3, x3 = A.y3; y4 = y4
// Every block uses the bipolar saturation (step) activation, so each output is +1
// or -1. The graph has no loop: B settles after one clock edge, A and C after two,
// D after three and E after four.
//
// Numbers are X_W-bit integers (no fraction). Parameters come as RAM rows, byte 0
// = bits 7:0:
//   bias_abc : A.b3 A.b4 B.b2 B.b3 B.b4 C.b3 C.b4 -
//   bias_de  : D.b3 D.b4 E.b4 -
//   w_ab     : A.w13 A.w23 A.w14 A.w24 B.w12 B.w13 B.w14 -
//   w_cd     : C.w13 C.w23 C.w14 C.w24 D.w13 D.w23 D.w14 D.w24
//   w_e      : E.w14 E.w24 E.w34 -
// The structure is the published one; the byte order is this design's reading.
module robot_bbnn
  import bbnn_pkg::*;
#(
  parameter int unsigned X_W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic [4:0][X_W-1:0] s,      // s[0] = S1 ... s[4] = S5
  input  row_t                bias_abc,
  input  row_t                bias_de,
  input  row_t                w_ab,
  input  row_t                w_cd,
  input  row_t                w_e,
  output logic [3:0][X_W-1:0] y       // y[0] = y1 ... y[3] = y4
);

  logic [X_W-1:0] a3, a4, b2, b3, b4, c3, c4, d3, d4, e4;

  bbnn_block22 #(.X_W(X_W), .W_W(PARAM_W), .B_W(PARAM_W), .FRAC(0), .KIND(ACT_STEP_BI))
    u_a (.clk, .rst_n, .clr, .tc(1'b1), .x1(s[0]), .x2(b2),
         .w13(row_byte(w_ab, 0)), .w23(row_byte(w_ab, 1)),
         .w14(row_byte(w_ab, 2)), .w24(row_byte(w_ab, 3)),
         .b3(row_byte(bias_abc, 0)), .b4(row_byte(bias_abc, 1)), .y3(a3), .y4(a4));

  bbnn_block13 #(.X_W(X_W), .W_W(PARAM_W), .B_W(PARAM_W), .FRAC(0), .KIND(ACT_STEP_BI))
    u_b (.clk, .rst_n, .clr, .tc(1'b1), .x1(s[1]),
         .w12(row_byte(w_ab, 4)), .w13(row_byte(w_ab, 5)), .w14(row_byte(w_ab, 6)),
         .b2(row_byte(bias_abc, 2)), .b3(row_byte(bias_abc, 3)), .b4(row_byte(bias_abc, 4)),
         .y2(b2), .y3(b3), .y4(b4));

  bbnn_block22 #(.X_W(X_W), .W_W(PARAM_W), .B_W(PARAM_W), .FRAC(0), .KIND(ACT_STEP_BI))
    u_c (.clk, .rst_n, .clr, .tc(1'b1), .x1(s[2]), .x2(b3),
         .w13(row_byte(w_cd, 0)), .w23(row_byte(w_cd, 1)),
         .w14(row_byte(w_cd, 2)), .w24(row_byte(w_cd, 3)),
         .b3(row_byte(bias_abc, 5)), .b4(row_byte(bias_abc, 6)), .y3(c3), .y4(c4));

  bbnn_block22 #(.X_W(X_W), .W_W(PARAM_W), .B_W(PARAM_W), .FRAC(0), .KIND(ACT_STEP_BI))
    u_d (.clk, .rst_n, .clr, .tc(1'b1), .x1(s[3]), .x2(c3),
         .w13(row_byte(w_cd, 4)), .w23(row_byte(w_cd, 5)),
         .w14(row_byte(w_cd, 6)), .w24(row_byte(w_cd, 7)),
         .b3(row_byte(bias_de, 0)), .b4(row_byte(bias_de, 1)), .y3(d3), .y4(d4));

  bbnn_block31 #(.X_W(X_W), .W_W(PARAM_W), .B_W(PARAM_W), .FRAC(0), .KIND(ACT_STEP_BI))
    u_e (.clk, .rst_n, .clr, .tc(1'b1), .x1(s[4]), .x2(d3), .x3(a3),
         .w14(row_byte(w_e, 0)), .w24(row_byte(w_e, 1)), .w34(row_byte(w_e, 2)),
         .b4(row_byte(bias_de, 2)), .y4(e4));

  assign y = {e4, d4, c4, b4};

endmodule
