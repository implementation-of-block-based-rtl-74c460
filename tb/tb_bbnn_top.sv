// tb_bbnn_top: end-to-end run of the whole design at its default sizes.
// Both cores are loaded through their host ports (XOR: published weights and 64
// input pairs; robot: published weights and 64 sensor sets) and started; while
// they run, a second start is sent to the XOR core, which must ignore it. The
// fixed-function path is exercised alongside. All results are compared with the
// reference models, and each mechanism of the design is counted: parameter
// load, first-set and later-set input paths, settle iterations with feedback,
// output clearing between sets, ramp saturation at +1 and -1 and the linear part,
// both step outputs, the ignored start, finish, and the data path's saturation.
// Weights and RAM row numbers are the published ones; byte order, start handling and the mechanism list are this design's.
module tb_bbnn_top;
  import bbnn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic xor_en = 0, xor_we = 0, rob_en = 0, rob_we = 0;
  logic [7:0] xor_addr = '0, rob_addr = '0;
  row_t xor_wdata = '0, rob_wdata = '0, xor_rdata, rob_rdata;
  logic xor_busy, xor_finish, rob_busy, rob_finish;
  logic [3:0] asic_x1, asic_w1, asic_x2, asic_w2, asic_b, asic_y;
  logic [2:0] asic_m;
  int checks = 0, failures = 0;
  int n_load = 0, n_first = 0, n_fetch = 0, n_settle = 0, n_clear = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_lin = 0, n_step_p = 0, n_step_n = 0;
  int n_ignored = 0, n_finish = 0, n_asic_sat = 0, n_asic_lin = 0;

  always #5 clk = ~clk;

  bbnn_top dut (.*);

  // ---- mechanism monitors --------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    if (dut.u_xor.u_ctrl.state == S_LOAD) n_load++;
    if (dut.u_xor.u_ctrl.state == S_CHECK && dut.u_xor.u_ctrl.ip_addr == 8'd3) n_first++;
    if (dut.u_xor.u_ctrl.state == S_FETCH) n_fetch++;
    if (!dut.u_xor.net_clr) n_settle++;
    if (dut.u_xor.u_ctrl.state == S_WRITE && dut.u_xor.net_clr) n_clear++;
    if (!dut.u_xor.net_clr) begin
      for (int i = 0; i < 8; i++) begin
        if (xor_outs(i) == 255)  n_sat_hi++;
        if (xor_outs(i) == -256) n_sat_lo++;
      end
      if ($signed(dut.u_xor.u_net.d4) > -256 && $signed(dut.u_xor.u_net.d4) < 255
          && dut.u_xor.u_net.d4 != 0) n_lin++;
    end
    if (!dut.u_rob.net_clr) begin
      if ($signed(dut.u_rob.u_net.e4) == 1) n_step_p++;
      if ($signed(dut.u_rob.u_net.e4) == -1) n_step_n++;
    end
  end

  task automatic cmp(string what, row_t got, row_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  // the eight block outputs of the XOR network
  function automatic int xor_outs(int i);
    case (i)
      0: return int'($signed(dut.u_xor.u_net.a3));
      1: return int'($signed(dut.u_xor.u_net.a4));
      2: return int'($signed(dut.u_xor.u_net.b3));
      3: return int'($signed(dut.u_xor.u_net.b4));
      4: return int'($signed(dut.u_xor.u_net.c3));
      5: return int'($signed(dut.u_xor.u_net.c4));
      6: return int'($signed(dut.u_xor.u_net.d3));
      default: return int'($signed(dut.u_xor.u_net.d4));
    endcase
  endfunction

  task automatic mech(string name, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  // one host write to each core in the same cycle (a < 0: no write)
  task automatic host_write2(int xa, row_t xd, int ra, row_t rd);
    @(negedge clk);
    xor_en = (xa >= 0); xor_we = (xa >= 0); xor_addr = 8'(xa); xor_wdata = xd;
    rob_en = (ra >= 0); rob_we = (ra >= 0); rob_addr = 8'(ra); rob_wdata = rd;
    @(negedge clk);
    xor_en = 0; xor_we = 0; rob_en = 0; rob_we = 0;
  endtask

  task automatic host_read2(int a, output row_t xd, output row_t rd);
    @(negedge clk); xor_en = 1; rob_en = 1; xor_addr = 8'(a); rob_addr = 8'(a);
    @(negedge clk); xd = xor_rdata; rd = rob_rdata; xor_en = 0; rob_en = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x1 [64], x2 [64], sv[5], y[4];
    int e, e3, t, cyc_x, cyc_r;
    bit xdone, rdone;
    row_t xd, rd, rin;
    {asic_x1, asic_w1, asic_x2, asic_w2, asic_b, asic_m} = '0;
    #22 rst_n = 1'b1;
    // parameters
    host_write2(0, xor_bias_row(XOR_A, XOR_B, XOR_C, XOR_D), 0, rob_row(0));
    host_write2(1, xor_w_row(XOR_A, XOR_B), 1, rob_row(1));
    host_write2(2, xor_w_row(XOR_C, XOR_D), 2, rob_row(2));
    host_write2(-1, '0, 3, rob_row(3));
    host_write2(-1, '0, 4, rob_row(4));
    // data sets
    for (int k = 0; k < 64; k++) begin
      x1[k] = (k < 16) ? 16 * k + 8 : $urandom_range(0, 255);
      x2[k] = (k < 16) ? 255 - 16 * k : $urandom_range(0, 255);
      rin = '0;
      for (int i = 0; i < 5; i++) rin[8*i] = k[(i + k / 32) % 5];
      host_write2(3 + k, {48'b0, 8'(x1[k]), 8'(x2[k])}, 5 + k, rin);
    end
    // start both cores in the same cycle
    host_write2(255, '0, 255, '0);
    cyc_x = 1; cyc_r = 1; xdone = 0; rdone = 0;
    do begin
      @(negedge clk);
      if (!xdone) cyc_x++;
      if (!rdone) cyc_r++;
      if (cyc_x == 120) begin
        // start again while busy: must change nothing
        xor_en = 1; xor_we = 1; xor_addr = 8'hFF; xor_wdata = '0;
        @(negedge clk); xor_en = 0; xor_we = 0; cyc_x++; cyc_r++;
        if (xor_busy) n_ignored++;
      end
      // drive the data path while the cores run
      {asic_x1, asic_w1, asic_x2, asic_w2, asic_b, asic_m} = 23'($urandom);
      if (cyc_x % 2 == 0) begin asic_w1 = 4'($urandom_range(0, 1)); asic_w2 = 0; asic_x1 = 4'($urandom_range(0, 3)); end
      #1;
      t = int'(asic_m) * (int'(asic_x1) * int'(asic_w1) + int'(asic_x2) * int'(asic_w2) + int'(asic_b));
      if (t > 15) n_asic_sat++; else n_asic_lin++;
      checks++;
      if (int'(asic_y) != ((t > 15) ? 15 : t)) begin failures++; $display("FAIL asic y=%0d t=%0d", asic_y, t); end
      if (cyc_x > 2 && xor_finish && !xdone) begin xdone = 1; n_finish++; end
      if (cyc_r > 2 && rob_finish && !rdone) begin rdone = 1; n_finish++; end
    end while (!(xdone && rdone));
    checks += 2;
    if (cyc_x != 1 + 1 + 5 + 6 + 63 * 7 + 1) begin failures++; $display("FAIL xor cycles %0d", cyc_x); end
    if (cyc_r != 1 + 1 + 7 + 7 + 63 * 8 + 1) begin failures++; $display("FAIL robot cycles %0d", cyc_r); end
    // results
    for (int k = 0; k < 64; k++) begin
      e = xor_ref(XOR_A, XOR_B, XOR_C, XOR_D, x1[k], x2[k], 3, e3);
      host_read2(67 + k, xd, rd);
      cmp($sformatf("xor out %0d", k), xd, {32'b0, 16'(e3), 16'(e)});
      for (int i = 0; i < 5; i++) sv[i] = k[(i + k / 32) % 5];
      robot_ref(ROB_A, ROB_B, ROB_C, ROB_D, ROB_E, sv, 10, y);
      host_read2(69 + k, xd, rd);
      cmp($sformatf("robot out %0d", k), rd, {32'b0, 8'(y[0]), 8'(y[1]), 8'(y[2]), 8'(y[3])});
    end
    $display("mechanisms: load=%0d first_set=%0d fetch=%0d settle=%0d clear=%0d sat_hi=%0d sat_lo=%0d linear=%0d step+=%0d step-=%0d ignored_start=%0d finish=%0d asic_sat=%0d asic_lin=%0d",
             n_load, n_first, n_fetch, n_settle, n_clear, n_sat_hi, n_sat_lo, n_lin, n_step_p, n_step_n,
             n_ignored, n_finish, n_asic_sat, n_asic_lin);
    mech("parameter load", n_load);       mech("first-set input path", n_first);
    mech("later-set input fetch", n_fetch); mech("settle with feedback", n_settle);
    mech("output clear", n_clear);          mech("ramp saturation +1", n_sat_hi);
    mech("ramp saturation -1", n_sat_lo);   mech("ramp linear region", n_lin);
    mech("step output +1", n_step_p);       mech("step output -1", n_step_n);
    mech("start ignored while busy", n_ignored); mech("finish", n_finish);
    mech("data path saturation", n_asic_sat); mech("data path linear", n_asic_lin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
