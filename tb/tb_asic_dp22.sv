// tb_asic_dp22: the fixed-function path y = min(m*(w1*x1 + w2*x2 + b), 15),
// all operands unsigned, on 20000 random operand sets plus the extremes.
// The widths follow the published data path; the unsigned reading and saturation at 15 are this design's choice.
module tb_asic_dp22;
  logic [3:0] x1, w1, x2, w2, b, y;
  logic [2:0] m;
  int checks = 0, failures = 0, n_sat = 0, n_lin = 0;

  asic_dp22 dut (.x1, .w1, .x2, .w2, .b, .m, .y);

  task automatic one();
    int t, e;
    #1;
    t = int'(m) * (int'(x1) * int'(w1) + int'(x2) * int'(w2) + int'(b));
    e = (t > 15) ? 15 : t;
    if (t > 15) n_sat++; else n_lin++;
    checks++;
    if (int'(y) != e) begin
      failures++;
      if (failures < 10) $display("FAIL x1=%0d w1=%0d x2=%0d w2=%0d b=%0d m=%0d y=%0d exp=%0d", x1, w1, x2, w2, b, m, y, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {x1, w1, x2, w2, b, m} = '0; one();
    {x1, w1, x2, w2, b, m} = '1; one();
    for (int k = 0; k < 20000; k++) begin
      {x1, w1, x2, w2, b, m} = 23'($urandom);
      if (k % 3 == 0) begin w1 = 4'($urandom_range(0, 1)); w2 = 4'($urandom_range(0, 1)); x1 = 4'($urandom_range(0, 3)); end
      one();
    end
    if (n_sat == 0 || n_lin == 0) begin failures++; $display("FAIL coverage sat=%0d lin=%0d", n_sat, n_lin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
