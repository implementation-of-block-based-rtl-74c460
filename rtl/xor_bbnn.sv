// xor_bbnn: 2 x 2 block-based neural network for XOR pattern classification.
//
// Four block22 (A, B top row; C, D bottom row) with the bipolar saturating ramp
// (slope SLOPE_NUM/SLOPE_DEN = 1/20, limits -1 and +1). Connections:
//   A: x1 = input x1, x2 = B.y3 (wrap-around link from the right edge)
//   B: x1 = input x2, x2 = A.y3
//   C: x1 = A.y4,     x2 = D.y3 (lateral feedback)
//   D: x1 = B.y4,     x2 = C.y3
// The network answer y is D.y4: positive for class 0, negative for class 1. C.y4
// is not used. Because A/B and C/D feed each other there is no evaluation order;
// the block outputs start from zero (clr) and every clock edge is one iteration.
// The controller takes y after three iterations.
//
// Numbers: inputs x1, x2 and every block output are X_W-bit two's complement with
// FRAC fraction bits (9 bits, 8 fractional: range -1 .. +255/256); weights and
// biases are 8-bit integers in the RAM row layout below, byte 0 = bits 7:0:
//   bias row : A.b3 A.b4 B.b3 B.b4 C.b3 C.b4 D.b3 D.b4
//   w_ab row : A.w13 A.w23 A.w14 A.w24 B.w13 B.w23 B.w14 B.w24
//   w_cd row : the same for C and D
// Structure and activation follow the published XOR network; the byte order is
// this design's reading of the RAM layout. All arithmetic is two's complement.
module xor_bbnn
  import bbnn_pkg::*;
#(
  parameter int unsigned X_W       = 9,
  parameter int unsigned FRAC      = 8,
  parameter int          SLOPE_NUM = 1,
  parameter int          SLOPE_DEN = 20
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic [X_W-1:0] x1,
  input  logic [X_W-1:0] x2,
  input  row_t           bias,
  input  row_t           w_ab,
  input  row_t           w_cd,
  output logic [X_W-1:0] y,
  output logic [X_W-1:0] y_d3,
  output logic [X_W-1:0] y_c4
);

  logic [X_W-1:0] a3, a4, b3, b4, c3, c4, d3, d4;

  bbnn_block22 #(.X_W(X_W), .W_W(PARAM_W), .B_W(PARAM_W), .FRAC(FRAC), .KIND(ACT_RAMP_BI),
                 .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_a (.clk, .rst_n, .clr, .tc(1'b1), .x1(x1), .x2(b3),
         .w13(row_byte(w_ab, 0)), .w23(row_byte(w_ab, 1)),
         .w14(row_byte(w_ab, 2)), .w24(row_byte(w_ab, 3)),
         .b3(row_byte(bias, 0)), .b4(row_byte(bias, 1)), .y3(a3), .y4(a4));

  bbnn_block22 #(.X_W(X_W), .W_W(PARAM_W), .B_W(PARAM_W), .FRAC(FRAC), .KIND(ACT_RAMP_BI),
                 .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_b (.clk, .rst_n, .clr, .tc(1'b1), .x1(x2), .x2(a3),
         .w13(row_byte(w_ab, 4)), .w23(row_byte(w_ab, 5)),
         .w14(row_byte(w_ab, 6)), .w24(row_byte(w_ab, 7)),
         .b3(row_byte(bias, 2)), .b4(row_byte(bias, 3)), .y3(b3), .y4(b4));

  bbnn_block22 #(.X_W(X_W), .W_W(PARAM_W), .B_W(PARAM_W), .FRAC(FRAC), .KIND(ACT_RAMP_BI),
                 .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_c (.clk, .rst_n, .clr, .tc(1'b1), .x1(a4), .x2(d3),
         .w13(row_byte(w_cd, 0)), .w23(row_byte(w_cd, 1)),
         .w14(row_byte(w_cd, 2)), .w24(row_byte(w_cd, 3)),
         .b3(row_byte(bias, 4)), .b4(row_byte(bias, 5)), .y3(c3), .y4(c4));

  bbnn_block22 #(.X_W(X_W), .W_W(PARAM_W), .B_W(PARAM_W), .FRAC(FRAC), .KIND(ACT_RAMP_BI),
                 .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_d (.clk, .rst_n, .clr, .tc(1'b1), .x1(b4), .x2(c3),
         .w13(row_byte(w_cd, 4)), .w23(row_byte(w_cd, 5)),
         .w14(row_byte(w_cd, 6)), .w24(row_byte(w_cd, 7)),
         .b3(row_byte(bias, 6)), .b4(row_byte(bias, 7)), .y3(d3), .y4(d4));

  assign y    = d4;
  assign y_d3 = d3;
  assign y_c4 = c4;

endmodule
