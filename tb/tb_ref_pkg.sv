// tb_ref_pkg: reference models used by the BbNN testbenches.
//
// Everything here is computed with plain integers and reals, independently of
// the RTL: the activation functions, the two published networks iterated clock by
// clock from all-zero block outputs, their weights, and helpers that pack weights
// into 64-bit RAM rows (byte 0 = bits 7:0).
// Weights come from the published network figures; the byte order of the rows is this design's reading.
package tb_ref_pkg;

  // Saturating ramp: clamp(trunc(s*num/den), lo, hi) in units of 2**-frac.
  function automatic int ref_ramp(longint s, int frac, int num, int den, int out_w, bit bipolar);
    real r;
    longint v, hi, lo, one;
    one = longint'(1) << frac;
    hi  = (one < (longint'(1) << (out_w-1)) - 1) ? one : (longint'(1) << (out_w-1)) - 1;
    lo  = bipolar ? ((-one > -(longint'(1) << (out_w-1))) ? -one : -(longint'(1) << (out_w-1))) : 0;
    r   = real'(s) * real'(num) / real'(den);
    if (r >= real'(hi)) return int'(hi);
    if (r <= real'(lo)) return int'(lo);
    v = longint'($rtoi(r));
    return int'(v);
  endfunction

  function automatic int ref_step(longint s, int frac, int out_w, bit bipolar);
    longint one = longint'(1) << frac;
    longint hi  = (one < (longint'(1) << (out_w-1)) - 1) ? one : (longint'(1) << (out_w-1)) - 1;
    if (s >= 0) return int'(hi);
    return bipolar ? -int'(one) : 0;
  endfunction

  // ---------------- XOR network (2 x 2 block22, ramp 1/20, Q.8) --------------
  // per block: w13, w23, w14, w24, b3, b4
  typedef int blk22_t [6];
  localparam blk22_t XOR_A = '{-22, 31, -23,   0, -18,  19};
  localparam blk22_t XOR_B = '{-29,  2,  15,  30,  14,  12};
  localparam blk22_t XOR_C = '{-15, 28, -30,  22,   0,  11};
  localparam blk22_t XOR_D = '{ 23, 26, -31, -15,  16,  -3};

  function automatic int xor_node(int w1, int w2, int b, int x1, int x2);
    longint s = longint'(w1) * x1 + longint'(w2) * x2 + longint'(b) * 256;
    return ref_ramp(s, 8, 1, 20, 9, 1'b1);
  endfunction

  // Iterate the XOR network `iters` clock edges from zero; return D.y4, D.y3 via d3.
  function automatic int xor_ref(blk22_t A, blk22_t B, blk22_t C, blk22_t D,
                                 int x1, int x2, int iters, output int d3o);
    int a3 = 0, a4 = 0, b3 = 0, b4 = 0, c3 = 0, c4 = 0, d3 = 0, d4 = 0;
    int na3, na4, nb3, nb4, nc3, nc4, nd3, nd4;
    for (int i = 0; i < iters; i++) begin
      na3 = xor_node(A[0], A[1], A[4], x1, b3); na4 = xor_node(A[2], A[3], A[5], x1, b3);
      nb3 = xor_node(B[0], B[1], B[4], x2, a3); nb4 = xor_node(B[2], B[3], B[5], x2, a3);
      nc3 = xor_node(C[0], C[1], C[4], a4, d3); nc4 = xor_node(C[2], C[3], C[5], a4, d3);
      nd3 = xor_node(D[0], D[1], D[4], b4, c3); nd4 = xor_node(D[2], D[3], D[5], b4, c3);
      a3 = na3; a4 = na4; b3 = nb3; b4 = nb4; c3 = nc3; c4 = nc4; d3 = nd3; d4 = nd4;
    end
    d3o = d3;
    return d4;
  endfunction

  function automatic logic [63:0] pack8(int v0, int v1, int v2, int v3,
                                       int v4, int v5, int v6, int v7);
    return {8'(v7), 8'(v6), 8'(v5), 8'(v4), 8'(v3), 8'(v2), 8'(v1), 8'(v0)};
  endfunction

  function automatic logic [63:0] xor_bias_row(blk22_t A, blk22_t B, blk22_t C, blk22_t D);
    return pack8(A[4], A[5], B[4], B[5], C[4], C[5], D[4], D[5]);
  endfunction

  function automatic logic [63:0] xor_w_row(blk22_t P, blk22_t Q);
    return pack8(P[0], P[1], P[2], P[3], Q[0], Q[1], Q[2], Q[3]);
  endfunction

  // ---------------- robot network (1 x 5, bipolar step, integers) ------------
  localparam blk22_t ROB_A = '{-14, -24, -18,  15,   0, -21};
  localparam blk22_t ROB_C = '{-25, -11, -15, -22,   7,  13};
  localparam blk22_t ROB_D = '{ 21,   0, -18,   0, -14,  19};
  typedef int blk13_t [6];   // w12, w13, w14, b2, b3, b4
  localparam blk13_t ROB_B = '{-23, -16,  20,  18,  -1, -15};
  typedef int blk31_t [4];   // w14, w24, w34, b4
  localparam blk31_t ROB_E = '{-31,   7,  29, -16};

  function automatic int rnode(longint s);
    return ref_step(s, 0, 8, 1'b1);
  endfunction

  // Iterate `iters` edges from zero; returns y1..y4 (+1/-1) in y.
  function automatic void robot_ref(blk22_t A, blk13_t B, blk22_t C, blk22_t D, blk31_t E,
                                    int s[5], int iters, output int y[4]);
    int a3 = 0, a4 = 0, b2 = 0, b3 = 0, b4 = 0, c3 = 0, c4 = 0, d3 = 0, d4 = 0, e4 = 0;
    int n[10];
    for (int i = 0; i < iters; i++) begin
      n[0] = rnode(A[0]*s[0] + A[1]*b2 + A[4]);
      n[1] = rnode(A[2]*s[0] + A[3]*b2 + A[5]);
      n[2] = rnode(B[0]*s[1] + B[3]);
      n[3] = rnode(B[1]*s[1] + B[4]);
      n[4] = rnode(B[2]*s[1] + B[5]);
      n[5] = rnode(C[0]*s[2] + C[1]*b3 + C[4]);
      n[6] = rnode(C[2]*s[2] + C[3]*b3 + C[5]);
      n[7] = rnode(D[0]*s[3] + D[1]*c3 + D[4]);
      n[8] = rnode(D[2]*s[3] + D[3]*c3 + D[5]);
      n[9] = rnode(E[0]*s[4] + E[1]*d3 + E[2]*a3 + E[3]);
      a3 = n[0]; a4 = n[1]; b2 = n[2]; b3 = n[3]; b4 = n[4];
      c3 = n[5]; c4 = n[6]; d3 = n[7]; d4 = n[8]; e4 = n[9];
    end
    y[0] = b4; y[1] = c4; y[2] = d4; y[3] = e4;
  endfunction

  function automatic logic [63:0] robot_row(blk22_t A, blk13_t B, blk22_t C, blk22_t D,
                                            blk31_t E, int r);
    case (r)
      0: return pack8(A[4], A[5], B[3], B[4], B[5], C[4], C[5], 0);
      1: return pack8(D[4], D[5], E[3], 0, 0, 0, 0, 0);
      2: return pack8(A[0], A[1], A[2], A[3], B[0], B[1], B[2], 0);
      3: return pack8(C[0], C[1], C[2], C[3], D[0], D[1], D[2], D[3]);
      default: return pack8(E[0], E[1], E[2], 0, 0, 0, 0, 0);
    endcase
  endfunction

  function automatic logic [63:0] rob_row(int r);
    return robot_row(ROB_A, ROB_B, ROB_C, ROB_D, ROB_E, r);
  endfunction

endpackage
