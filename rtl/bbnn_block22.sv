// bbnn_block22: BbNN block with two inputs and two outputs ("block22").
//
// Inputs x1 (top node) and x2 (left node); outputs y3 (right node) and y4 (bottom
// node). Each output is y_j = f(w1j*x1 + w2j*x2 + bj), computed by its own
// combinational bbnn_node. All inputs and outputs share one word width, so the block
// plugs directly into its neighbours.
//
// Timing: with REG_OUT = 1 (the library's registered-output form, needed for
// networks with feedback) y3/y4 are registered on the rising clock edge, one cycle
// after the inputs; clr synchronously forces both registers to zero, which the
// controller uses to start every data set from a known state. rst_n clears them
// asynchronously. With REG_OUT = 0 the outputs are combinational and clk/clr/rst_n
// are unused. The port naming follows the node numbering of the block library;
// clr, rst_n polarity and the REG_OUT switch are this design's choices.
module bbnn_block22
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
  input  logic [X_W-1:0] x1, x2,
  input  logic [W_W-1:0] w13, w23, w14, w24,
  input  logic [B_W-1:0] b3, b4,
  output logic [X_W-1:0] y3, y4
);

  logic [X_W-1:0] f3, f4;

  bbnn_node #(.N_IN(2), .X_W(X_W), .W_W(W_W), .B_W(B_W), .FRAC(FRAC), .KIND(KIND),
              .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_n3 (.x({x2, x1}), .w({w23, w13}), .b(b3), .tc(tc), .y(f3));

  bbnn_node #(.N_IN(2), .X_W(X_W), .W_W(W_W), .B_W(B_W), .FRAC(FRAC), .KIND(KIND),
              .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_n4 (.x({x2, x1}), .w({w24, w14}), .b(b4), .tc(tc), .y(f4));

  if (REG_OUT) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   {y3, y4} <= '0;
      else if (clr) {y3, y4} <= '0;
      else          {y3, y4} <= {f3, f4};
    end
  end else begin : g_comb
    assign {y3, y4} = {f3, f4};
  end

endmodule
