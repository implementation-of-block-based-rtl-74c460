// asic_dp22: one output path of a 2-input 2-output block as a small fixed-function
// circuit, y = f(w1*x1 + w2*x2 + b).
//
// Two 4 x 4 multipliers give 8-bit products, an adder their 9-bit sum, a second
// adder adds the 4-bit bias b (10-bit result) and the activation f multiplies by
// the 3-bit slope m and saturates at the largest 4-bit output, 15. The circuit is
// purely combinational. Operand widths, the multiplier/adder/activation chain and
// the slope input follow the published full-custom data path; treating all
// numbers as unsigned and saturating at 15 are this design's readings (the
// activation is drawn only for positive inputs).
module asic_dp22 (
  input  logic [3:0] x1,
  input  logic [3:0] w1,
  input  logic [3:0] x2,
  input  logic [3:0] w2,
  input  logic [3:0] b,
  input  logic [2:0] m,
  output logic [3:0] y
);

  logic [7:0]  p1, p2;
  logic [8:0]  s9;
  logic [9:0]  s10;
  logic [12:0] t;

  always_comb begin
    p1  = x1 * w1;
    p2  = x2 * w2;
    s9  = 9'(p1) + 9'(p2);
    s10 = 10'(s9) + 10'(b);
    t   = 13'(s10) * 13'(m);
    y   = (t > 13'd15) ? 4'd15 : t[3:0];
  end

endmodule
