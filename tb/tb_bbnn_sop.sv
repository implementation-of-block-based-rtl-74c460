// tb_bbnn_sop: random test of the sum-of-products unit in both number formats.
// Three terms of 16-bit A words and 8-bit B words into a 26-bit sum, compared with
// a 64-bit integer sum reduced to 26 bits; plus corner words (all ones, top bit).
// The pins and the two number formats follow the published unit; the word sizes tested are this design's choice.
module tb_bbnn_sop;
  localparam int A_W = 16, B_W = 8, N = 3, SUM_W = 26;
  logic [N*A_W-1:0] a;
  logic [N*B_W-1:0] b;
  logic             tc;
  logic [SUM_W-1:0] sum;
  int checks = 0, failures = 0;

  bbnn_sop #(.A_W(A_W), .B_W(B_W), .NUM_INPUTS(N), .SUM_W(SUM_W)) dut (.a, .b, .tc, .sum);

  function automatic longint word(logic [63:0] v, int w, bit s);
    longint r = longint'(v & ((64'd1 << w) - 1));
    if (s && v[w-1]) r = r - (longint'(1) << w);
    return r;
  endfunction

  task automatic check_one();
    longint acc = 0;
    logic [SUM_W-1:0] exp_sum;
    for (int i = 0; i < N; i++)
      acc += word(64'(a[i*A_W +: A_W]), A_W, tc) * word(64'(b[i*B_W +: B_W]), B_W, tc);
    exp_sum = SUM_W'(acc);
    #1;
    checks++;
    if (sum !== exp_sum) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h tc=%b sum=%h exp=%h", a, b, tc, sum, exp_sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      a  = {$urandom, $urandom};
      b  = N*B_W'($urandom);
      tc = k[0];
      if (k % 50 == 0) begin a = '1; b = '1; end
      if (k % 50 == 1) begin a = {N{16'h8000}}; b = {N{8'h80}}; end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
