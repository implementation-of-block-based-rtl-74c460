// tb_bbnn_ctrl: the controller in the XOR configuration (3 parameter rows, 3
// settle clocks) and the robot configuration (5 rows, 4 settle clocks), each in
// its own tb_ctrl_env.
// The state sequence follows the published state tables; the counting stand-in network is a test device of this design.
module tb_bbnn_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  int c0, f0, c1, f1;
  logic d0, d1;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 20000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
      $finish;
    end
  end

  tb_ctrl_env #(.R(3), .S(3)) env_xor (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  tb_ctrl_env #(.R(5), .S(4)) env_rob (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));

  initial begin
    #22 rst_n = 1'b1;
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
