// bbnn_block31: BbNN block with three inputs and one output ("block31").
//
// Inputs x1 (top node), x2 (left node) and x3 (right node); output y4 (bottom
// node) = f(w14*x1 + w24*x2 + w34*x3 + b4), from one combinational bbnn_node.
//
// Timing: with REG_OUT = 1 the output is registered on the rising clock edge, one
// cycle after the inputs; clr synchronously zeroes it and rst_n clears it
// asynchronously. With REG_OUT = 0 the output is combinational. Node numbering
// follows the block library; clr, rst_n and REG_OUT are this design's choices.
module bbnn_block31
  import bbnn_pkg::*;
#(
  parameter int unsigned X_W       = 9,
  parameter int unsigned W_W       = 8,
  parameter int unsigned B_W       = 8,
  parameter int unsigned FRAC      = 8,
  parameter act_kind_e   KIND      = ACT_RAMP_BI,
  parameter int          SLOPE_NUM = 1,
  parameter int          SLOPE_DEN = 20,
  parameter bit          REG_OUT   = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           tc,
  input  logic [X_W-1:0] x1, x2, x3,
  input  logic [W_W-1:0] w14, w24, w34,
  input  logic [B_W-1:0] b4,
  output logic [X_W-1:0] y4
);

  logic [X_W-1:0] f4;

  bbnn_node #(.N_IN(3), .X_W(X_W), .W_W(W_W), .B_W(B_W), .FRAC(FRAC), .KIND(KIND),
              .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_n4 (.x({x3, x2, x1}), .w({w34, w24, w14}), .b(b4), .tc(tc), .y(f4));

  if (REG_OUT) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   y4 <= '0;
      else if (clr) y4 <= '0;
      else          y4 <= f4;
    end
  end else begin : g_comb
    assign y4 = f4;
  end

endmodule
