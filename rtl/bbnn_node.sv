// bbnn_node: one output node of a BbNN block, y = f(w . x + b).
//
// The N_IN inputs are X_W-bit fixed-point words with FRAC fraction bits; the
// weights and the bias are W_W/B_W-bit integers. The bias is aligned to the input
// format by appending FRAC zero fraction bits and enters the sum-of-products unit
// as one more input whose weight is the constant 1, so one bbnn_sop computes the
// whole weighted sum. bbnn_act then scales the sum back to X_W bits.
// Combinational; the block around it registers the result.
// The node equation and the bias entering as an extra product of weight 1 follow
// the published block design; the width of the sum is this design's choice.
module bbnn_node
  import bbnn_pkg::*;
#(
  parameter int unsigned N_IN      = 2,
  parameter int unsigned X_W       = 9,
  parameter int unsigned W_W       = 8,
  parameter int unsigned B_W       = 8,
  parameter int unsigned FRAC      = 8,
  parameter act_kind_e   KIND      = ACT_RAMP_BI,
  parameter int          SLOPE_NUM = 1,
  parameter int          SLOPE_DEN = 20
) (
  input  logic [N_IN-1:0][X_W-1:0] x,
  input  logic [N_IN-1:0][W_W-1:0] w,
  input  logic [B_W-1:0]           b,
  input  logic                     tc,
  output logic [X_W-1:0]           y
);

  localparam int unsigned BF_W  = B_W + FRAC;                // bias with fraction appended
  localparam int unsigned A_W   = (X_W > BF_W) ? X_W : BF_W;  // common word width of A
  // up to four product terms, plus one bit so that an unsigned (tc = 0) sum is
  // still a non-negative two's-complement number for the activation
  localparam int unsigned SUM_W = A_W + W_W + 3;

  logic [N_IN:0][A_W-1:0] a_vec;
  logic [N_IN:0][W_W-1:0] b_vec;
  logic [SUM_W-1:0]       sum;

  always_comb begin
    logic signed [X_W:0]  xs;
    logic signed [BF_W:0] bs;
    for (int unsigned i = 0; i < N_IN; i++) begin
      xs           = {tc & x[i][X_W-1], x[i]};
      a_vec[i+1]   = A_W'(xs);
      b_vec[i+1]   = w[i];
    end
    bs       = (BF_W + 1)'($signed({tc & b[B_W-1], b})) <<< FRAC;
    a_vec[0] = A_W'(bs);
    b_vec[0] = W_W'(1);
  end

  bbnn_sop #(
    .A_W(A_W), .B_W(W_W), .NUM_INPUTS(N_IN + 1), .SUM_W(SUM_W)
  ) u_sop (
    .a(a_vec), .b(b_vec), .tc(tc), .sum(sum)
  );

  bbnn_act #(
    .KIND(KIND), .IN_W(SUM_W), .OUT_W(X_W), .FRAC(FRAC),
    .SLOPE_NUM(SLOPE_NUM), .SLOPE_DEN(SLOPE_DEN)
  ) u_act (
    .act_in(sum), .act_out(y)
  );

endmodule
