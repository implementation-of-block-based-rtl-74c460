// bbnn_block13: BbNN block with one input and three outputs ("block13").
//
// Input x1 (top node); outputs y2 (left node), y3 (right node) and y4 (bottom
// node), each y_j = f(w1j*x1 + bj) from its own combinational bbnn_node.
//
// Timing: with REG_OUT = 1 the outputs are registered on the rising clock edge,
// one cycle after the input; clr synchronously zeroes them and rst_n clears them
// asynchronously. With REG_OUT = 0 the outputs are combinational. Node numbering
// follows the block library; clr, rst_n and REG_OUT are this design's choices.
module bbnn_block13
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
  input  logic [X_W-1:0] x1,
  input  logic [W_W-1:0] w12, w13, w14,
  input  logic [B_W-1:0] b2, b3, b4,
  output logic [X_W-1:0] y2, y3, y4
);

  logic [X_W-1:0] f2, f3, f4;

  bbnn_node #(.N_IN(1), .X_W(X_W), .W_W(W_W), .B_W(B_W), .FRAC(FRAC), .KIND(KIND),
              .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_n2 (.x(x1), .w(w12), .b(b2), .tc(tc), .y(f2));

  bbnn_node #(.N_IN(1), .X_W(X_W), .W_W(W_W), .B_W(B_W), .FRAC(FRAC), .KIND(KIND),
              .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_n3 (.x(x1), .w(w13), .b(b3), .tc(tc), .y(f3));

  bbnn_node #(.N_IN(1), .X_W(X_W), .W_W(W_W), .B_W(B_W), .FRAC(FRAC), .KIND(KIND),
              .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN))
    u_n4 (.x(x1), .w(w14), .b(b4), .tc(tc), .y(f4));

  if (REG_OUT) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   {y2, y3, y4} <= '0;
      else if (clr) {y2, y3, y4} <= '0;
      else          {y2, y3, y4} <= {f2, f3, f4};
    end
  end else begin : g_comb
    assign {y2, y3, y4} = {f2, f3, f4};
  end

endmodule
