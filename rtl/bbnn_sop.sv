// bbnn_sop: generalised sum of products, SUM = sum_i A_i * B_i.
//
// A and B are each NUM_INPUTS words concatenated, word 0 in the least significant
// bits. tc selects the number format: 1 = two's complement, 0 = unsigned. The
// result is the exact sum, reduced modulo 2**SUM_W. The unit is purely
// combinational (no pipeline), as the blocks of the BbNN library use it; a bias is
// fed in as one more A word whose B word is the constant 1.
//
// The pin set (A, B, TC, SUM) and the four size parameters follow the vendor
// sum-of-products core the library was built around; the internals (sign/zero
// extension of every operand to SUM_W, one multiply-add per term) are this
// design's own.
module bbnn_sop #(
  parameter int unsigned A_W        = 8,
  parameter int unsigned B_W        = 8,
  parameter int unsigned NUM_INPUTS = 3,
  parameter int unsigned SUM_W      = 18
) (
  input  logic [NUM_INPUTS*A_W-1:0] a,
  input  logic [NUM_INPUTS*B_W-1:0] b,
  input  logic                      tc,
  output logic [SUM_W-1:0]          sum
);

  always_comb begin
    logic [SUM_W-1:0]   acc;
    logic signed [A_W:0] sa;
    logic signed [B_W:0] sb;
    acc = '0;
    for (int unsigned i = 0; i < NUM_INPUTS; i++) begin
      // one extra top bit: the word's sign in two's complement mode, 0 otherwise
      sa  = {tc & a[i*A_W + A_W-1], a[i*A_W +: A_W]};
      sb  = {tc & b[i*B_W + B_W-1], b[i*B_W +: B_W]};
      acc = acc + SUM_W'(SUM_W'(sa) * SUM_W'(sb));
    end
    sum = acc;
  end

endmodule
