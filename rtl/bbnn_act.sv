// bbnn_act: activation function of one BbNN output node.
//
// The input is the wide sum of products (IN_W bits, two's complement, FRAC
// fraction bits); the output is a word of the block width (OUT_W bits, two's
// complement, the same FRAC fraction bits), so a block output can drive the input
// of a neighbouring block directly. "One" is 2**FRAC; where OUT_W cannot hold +1
// exactly, the top level is the largest positive word instead.
//
//   ACT_STEP_UNI  y = +1 if s >= 0 else 0          (unipolar saturation)
//   ACT_STEP_BI   y = +1 if s >= 0 else -1         (bipolar saturation)
//   ACT_RAMP_UNI  y = clamp(s*NUM/DEN, 0, +1)      (unipolar saturating ramp)
//   ACT_RAMP_BI   y = clamp(s*NUM/DEN, -1, +1)     (bipolar saturating ramp)
//
// The four shapes, the parameterised widths and the parameterised slope are the
// library's; the value at s = 0 for the step functions and truncation toward zero
// in the ramp are this design's choices. Purely combinational.
module bbnn_act
  import bbnn_pkg::*;
#(
  parameter act_kind_e   KIND      = ACT_RAMP_BI,
  parameter int unsigned IN_W      = 26,
  parameter int unsigned OUT_W     = 9,
  parameter int unsigned FRAC      = 8,
  parameter int          SLOPE_NUM = 1,
  parameter int          SLOPE_DEN = 20
) (
  input  logic [IN_W-1:0]  act_in,
  output logic [OUT_W-1:0] act_out
);

  localparam int unsigned TW = IN_W + 34;  // room for the slope product and the limits
  localparam longint ONE     = longint'(1) << FRAC;
  localparam longint MAXPOS  = (longint'(1) << (OUT_W-1)) - 1;
  localparam longint MAXNEG  = -(longint'(1) << (OUT_W-1));
  localparam longint HI      = (ONE < MAXPOS) ? ONE : MAXPOS;
  localparam longint LO_BI   = (-ONE > MAXNEG) ? -ONE : MAXNEG;
  localparam longint LO      = (KIND == ACT_STEP_BI || KIND == ACT_RAMP_BI) ? LO_BI : 0;

  logic signed [TW-1:0] s, t, q;

  always_comb begin
    s = TW'($signed(act_in));
    t = s * TW'(SLOPE_NUM);
    q = '0;
    act_out = '0;
    unique case (KIND)
      ACT_STEP_UNI, ACT_STEP_BI: begin
        act_out = (s >= 0) ? OUT_W'(HI) : OUT_W'(LO);
      end
      default: begin  // ramps
        if (t >= TW'(HI * SLOPE_DEN))      act_out = OUT_W'(HI);
        else if (t <= TW'(LO * SLOPE_DEN)) act_out = OUT_W'(LO);
        else begin
          q       = t / TW'(SLOPE_DEN);
          act_out = OUT_W'(q);
        end
      end
    endcase
  end

endmodule
