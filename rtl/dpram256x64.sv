// dpram256x64: true dual-port RAM, 256 words of 64 bits, one clock per port.
//
// Port A belongs to the host, port B to the BbNN core. Both ports behave alike:
// when en is high at the rising edge the word at addr is read into dout; when we is
// also high, din is written to addr and also appears on dout (write-first), so a
// read returns data one clock after the address, as on the FPGA block RAM the
// design was built for. dout holds its value while en is low. Writing the same
// word from both ports in the same cycle is not allowed. Depth and width are
// the design's; the two-clock structure and the read/write timing follow the
// block RAM; the memory contents are not initialised. The array is written from
// two always_ff processes, one per port clock: that is the standard description of
// a true dual-port RAM and maps onto one dual-port memory, so a multiple-driver
// warning on the array is expected and harmless.
module dpram256x64 #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = 8,
  parameter int unsigned DW    = 64
) (
  input  logic          clka,
  input  logic          ena,
  input  logic          wea,
  input  logic [AW-1:0] addra,
  input  logic [DW-1:0] dina,
  output logic [DW-1:0] douta,
  input  logic          clkb,
  input  logic          enb,
  input  logic          web,
  input  logic [AW-1:0] addrb,
  input  logic [DW-1:0] dinb,
  output logic [DW-1:0] doutb
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clka) begin
    if (ena) begin
      if (wea) begin
        mem[addra] <= dina;
        douta      <= dina;
      end else begin
        douta <= mem[addra];
      end
    end
  end

  always_ff @(posedge clkb) begin
    if (enb) begin
      if (web) begin
        mem[addrb] <= dinb;
        doutb      <= dinb;
      end else begin
        doutb <= mem[addrb];
      end
    end
  end

endmodule
