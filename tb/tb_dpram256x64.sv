// tb_dpram256x64: both ports of the dual-port RAM against an array model.
// Random reads and writes on port A and port B (never the same word written
// by both in one cycle), read data one clock after the address, write-first
// data on dout during a write, dout held while en is low.
// Size and write-first timing follow the published RAM; the random traffic pattern is this design's.
module tb_dpram256x64;
  logic clk = 1'b0;
  logic ena, wea, enb, web;
  logic [7:0] addra, addrb;
  logic [63:0] dina, dinb, douta, doutb;
  logic [63:0] model [256];
  logic [63:0] expa, expb;
  logic chka, chkb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dpram256x64 dut (.clka(clk), .ena, .wea, .addra, .dina, .douta,
                   .clkb(clk), .enb, .web, .addrb, .dinb, .doutb);

  task automatic cmp(string what, logic [63:0] got, logic [63:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp_v);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {ena, wea, enb, web} = '0; addra = '0; addrb = '0; dina = '0; dinb = '0;
    // fill every word through port A, alternate words through port B
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ena = 1; wea = 1; addra = 8'(i); dina = {$urandom, $urandom};
      enb = 0; web = 0;
      model[i] = dina;
    end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      ena = ($urandom_range(0, 3) != 0); wea = ena && ($urandom_range(0, 2) == 0);
      enb = ($urandom_range(0, 3) != 0); web = enb && ($urandom_range(0, 2) == 0);
      addra = 8'($urandom); addrb = 8'($urandom);
      if (wea && web && addra == addrb) web = 0;
      dina = {$urandom, $urandom}; dinb = {$urandom, $urandom};
      // expected dout after this edge (model holds contents before the edge)
      expa = douta; expb = doutb;
      if (ena) expa = wea ? dina : ((enb && web && addrb == addra) ? expa : model[addra]);
      if (enb) expb = web ? dinb : ((ena && wea && addra == addrb) ? expb : model[addrb]);
      chka = !(ena && !wea && enb && web && addrb == addra);
      chkb = !(enb && !web && ena && wea && addra == addrb);
      @(posedge clk); #1;
      if (chka) cmp("douta", douta, expa);
      if (chkb) cmp("doutb", doutb, expb);
      if (wea) model[addra] = dina;
      if (web) model[addrb] = dinb;
    end
    // read everything back through port B
    @(negedge clk); ena = 0; wea = 0; web = 0; enb = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); addrb = 8'(i);
      @(posedge clk); #1;
      cmp("final", doutb, model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
