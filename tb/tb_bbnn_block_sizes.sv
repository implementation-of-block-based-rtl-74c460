// tb_bbnn_block_sizes: the three block types at the library's characterised
// word lengths, 4, 8 and 16 bits.
// For each size N one block22, one block13 and one block31 run side by side with
// registered outputs and the bipolar saturating ramp (slope 1/20). Inputs,
// weights and biases are all N-bit words, two's complement (tc = 1) or unsigned
// (tc = 0, every fourth run of 20 steps). Inputs and outputs use N-1 fraction
// bits, so signed data lies in [-1, 1) and unsigned data in [0, 2). Random inputs are applied
// after a falling edge. Each output must keep its old value until the rising
// edge, then equal the reference f(w.x + b) from tb_ref_pkg; clr must zero it.
// A further block31 per size works on plain integers (no fraction bits) with the
// bipolar step, the format of the robot network, in both number formats.
// The three sizes and the equal input and weight widths follow the published
// library characterisation; the fixed-point format (N-1 fraction bits) is this
// design's choice for exercising every size.
module tb_bbnn_block_sizes;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;

  localparam int NSIZE = 3;
  localparam int SIZES [NSIZE] = '{4, 8, 16};
  localparam int ITERS = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  bit done [NSIZE];

  always #5 clk = ~clk;

  task automatic cmp(string what, int n, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %0d-bit %s got=%0d exp=%0d", n, what, got, exp_v);
    end
  endtask

  initial begin
    #(ITERS * 10 * 4);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NSIZE; g++) begin : g_size
    localparam int N = SIZES[g];
    localparam int F = N - 1;

    logic clr = 1'b0;
    logic tcv = 1'b1;
    logic [N-1:0] x1, x2, x3;
    logic [N-1:0] w [10];   // block22: 0..3, block13: 4..6, block31: 7..9
    logic [N-1:0] b [6];    // block22: 0..1, block13: 2..4, block31: 5
    logic [N-1:0] a3, a4, c2, c3, c4, e4, i4;

    bbnn_block22 #(.X_W(N), .W_W(N), .B_W(N), .FRAC(F), .KIND(ACT_RAMP_BI)) u22 (
      .clk, .rst_n, .clr, .tc(tcv), .x1, .x2,
      .w13(w[0]), .w23(w[1]), .w14(w[2]), .w24(w[3]), .b3(b[0]), .b4(b[1]), .y3(a3), .y4(a4));
    bbnn_block13 #(.X_W(N), .W_W(N), .B_W(N), .FRAC(F), .KIND(ACT_RAMP_BI)) u13 (
      .clk, .rst_n, .clr, .tc(tcv), .x1,
      .w12(w[4]), .w13(w[5]), .w14(w[6]), .b2(b[2]), .b3(b[3]), .b4(b[4]),
      .y2(c2), .y3(c3), .y4(c4));
    bbnn_block31 #(.X_W(N), .W_W(N), .B_W(N), .FRAC(F), .KIND(ACT_RAMP_BI)) u31 (
      .clk, .rst_n, .clr, .tc(tcv), .x1, .x2, .x3,
      .w14(w[7]), .w24(w[8]), .w34(w[9]), .b4(b[5]), .y4(e4));
    bbnn_block31 #(.X_W(N), .W_W(N), .B_W(N), .FRAC(0), .KIND(ACT_STEP_BI)) u31i (
      .clk, .rst_n, .clr, .tc(tcv), .x1, .x2, .x3,
      .w14(w[7]), .w24(w[8]), .w34(w[9]), .b4(b[5]), .y4(i4));

    function automatic longint sv(logic [N-1:0] v);
      return longint'($signed(v));
    endfunction

    // operand value in the current number format
    function automatic longint val(logic [N-1:0] v);
      return tcv ? longint'($signed(v)) : longint'(v);
    endfunction

    function automatic longint f(longint s);
      return longint'(ref_ramp(s, F, 1, 20, N, 1'b1));
    endfunction

    initial begin
      longint e [6];
      longint o [6];
      longint ei, oi;
      x1 = '0; x2 = '0; x3 = '0;
      for (int i = 0; i < 10; i++) w[i] = '0;
      for (int i = 0; i < 6; i++) b[i] = '0;
      wait (rst_n);
      for (int k = 0; k < ITERS; k++) begin
        @(negedge clk);
        o = '{sv(a3), sv(a4), sv(c2), sv(c3), sv(c4), sv(e4)};
        oi = sv(i4);
        x1 = N'($urandom); x2 = N'($urandom); x3 = N'($urandom);
        for (int i = 0; i < 10; i++) w[i] = N'($urandom);
        for (int i = 0; i < 6; i++) b[i] = N'($urandom);
        // corner words now and then: most negative and most positive
        if (k % 17 == 3) begin x1 = {1'b1, {(N-1){1'b0}}}; w[0] = {1'b1, {(N-1){1'b0}}}; end
        if (k % 19 == 5) begin x2 = {1'b0, {(N-1){1'b1}}}; w[8] = {1'b0, {(N-1){1'b1}}}; end
        clr = (k % 13 == 7);
        tcv = ((k / 20) % 4 != 3);
        #1;
        cmp("hold", N, sv(a3), o[0]); cmp("hold", N, sv(a4), o[1]);
        cmp("hold", N, sv(c2), o[2]); cmp("hold", N, sv(c3), o[3]);
        cmp("hold", N, sv(c4), o[4]); cmp("hold", N, sv(e4), o[5]);
        cmp("hold", N, sv(i4), oi);
        ei = clr ? 0 : longint'(ref_step(val(w[7]) * val(x1) + val(w[8]) * val(x2) + val(w[9]) * val(x3)
                                          + val(b[5]), 0, N, 1'b1));
        e[0] = f(val(w[0]) * val(x1) + val(w[1]) * val(x2) + (val(b[0]) <<< F));
        e[1] = f(val(w[2]) * val(x1) + val(w[3]) * val(x2) + (val(b[1]) <<< F));
        e[2] = f(val(w[4]) * val(x1) + (val(b[2]) <<< F));
        e[3] = f(val(w[5]) * val(x1) + (val(b[3]) <<< F));
        e[4] = f(val(w[6]) * val(x1) + (val(b[4]) <<< F));
        e[5] = f(val(w[7]) * val(x1) + val(w[8]) * val(x2) + val(w[9]) * val(x3) + (val(b[5]) <<< F));
        if (clr) e = '{0, 0, 0, 0, 0, 0};
        @(posedge clk); #1;
        cmp("block22 y3", N, sv(a3), e[0]); cmp("block22 y4", N, sv(a4), e[1]);
        cmp("block13 y2", N, sv(c2), e[2]); cmp("block13 y3", N, sv(c3), e[3]);
        cmp("block13 y4", N, sv(c4), e[4]); cmp("block31 y4", N, sv(e4), e[5]);
        cmp("integer block31 y4", N, sv(i4), ei);
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    #12 rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
