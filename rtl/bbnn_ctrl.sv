// bbnn_ctrl: state machine that runs a BbNN over a batch of data sets in RAM.
//
// RAM map (one 64-bit row per entry): rows 0 .. N_PARAM_ROWS-1 hold biases and
// weights, the next N_SETS rows the input data sets, the N_SETS rows after them
// receive the outputs. After a start pulse the controller
//   1. loads the parameter rows into holding registers (params), issuing one
//      address per clock and taking each word two clocks later (synchronous RAM);
//      the address of the first data set is issued in the same sweep;
//   2. per data set: takes the input row into inp (CHECK for the first set, whose
//      row is already on the RAM output, FETCH for the others), releases the
//      network's output clear (net_clr low) for SETTLE clock edges so that the
//      blocks iterate from zero, captures net_out (WRITE) and writes it to the output
//      row while issuing the next input address (NEXT); net_clr is high again
//      so the block outputs restart from zero for the next set;
//   3. stops when the input pointer passes the last data set, raises finish and
//      returns to IDLE.
// States map onto the published state tables: IDLE = 0, LOAD = 1 .. N_PARAM_ROWS+2,
// then CHECK, FETCH, SETTLE (one state per iteration), WRITE and NEXT. With
// N_PARAM_ROWS = 3 and SETTLE = 3 this is the XOR controller (states 0-12). The
// robot controller uses N_PARAM_ROWS = 5; its network needs four iterations,
// so SETTLE = 4 there, one state more than its table lists between input and write.
//
// Interface: ram_addr, ram_we and ram_wdata are registered and go straight to a
// RAM port whose read data (one clock after the address) is ram_rdata. start is
// sampled only in IDLE. finish stays high from the end of a batch until the next
// start; busy is high outside IDLE. rst_n is an asynchronous active-low reset; it
// also disables the write-address assertion at the end, which some lint tools
// report as a reset used both asynchronously and synchronously.
// The order of operations follows the published state tables; the exact state
// encoding, the held finish flag and ignoring a start while busy are this
// design's choices.
module bbnn_ctrl
  import bbnn_pkg::*;
#(
  parameter int unsigned N_PARAM_ROWS = 3,
  parameter int unsigned N_SETS       = N_DATASETS,
  parameter int unsigned SETTLE       = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  row_t                   ram_rdata,
  output logic [RAM_AW-1:0]      ram_addr,
  output logic                   ram_we,
  output row_t                   ram_wdata,
  output row_t [N_PARAM_ROWS-1:0] params,
  output row_t                   inp,
  input  row_t                   net_out,
  output logic                   net_clr,
  output logic                   busy,
  output logic                   finish
);

  localparam int unsigned IN_BASE  = N_PARAM_ROWS;
  localparam int unsigned OUT_BASE = IN_BASE + N_SETS;
  localparam int unsigned LC_W     = $clog2(N_PARAM_ROWS + 2);
  localparam int unsigned SC_W     = (SETTLE > 1) ? $clog2(SETTLE) : 1;

  ctrl_state_e       state;
  logic [LC_W-1:0]   lc;      // position in the parameter-load sweep
  logic [SC_W-1:0]   sc;      // iteration count while settling
  logic [RAM_AW-1:0] ip_addr, op_addr;

  initial begin
    assert (OUT_BASE + N_SETS <= RAM_DEPTH - 1)
      else $error("bbnn_ctrl: RAM map does not fit below the start row");
  end

  assign net_clr = (state != S_SETTLE);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      lc        <= '0;
      sc        <= '0;
      ip_addr   <= RAM_AW'(IN_BASE);
      op_addr   <= RAM_AW'(OUT_BASE);
      ram_addr  <= '0;
      ram_we    <= 1'b0;
      ram_wdata <= '0;
      params    <= '0;
      inp       <= '0;
      finish    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          ip_addr <= RAM_AW'(IN_BASE);
          op_addr <= RAM_AW'(OUT_BASE);
          lc      <= '0;
          finish  <= 1'b0;
          state   <= S_LOAD;
        end
        S_LOAD: begin
          // issue row lc (row IN_BASE is the first data set), take row lc-2
          if (int'(lc) <= int'(N_PARAM_ROWS)) ram_addr <= RAM_AW'(lc);
          if (lc >= 2) params[lc - 2] <= ram_rdata;
          if (int'(lc) == int'(N_PARAM_ROWS) + 1) state <= S_CHECK;
          lc <= lc + 1'b1;
        end
        S_CHECK: begin
          if (ip_addr == RAM_AW'(OUT_BASE)) begin
            finish <= 1'b1;
            state  <= S_IDLE;
          end else if (ip_addr == RAM_AW'(IN_BASE)) begin
            inp   <= ram_rdata;
            sc    <= '0;
            state <= S_SETTLE;
          end else begin
            state <= S_FETCH;
          end
        end
        S_FETCH: begin
          inp   <= ram_rdata;
          sc    <= '0;
          state <= S_SETTLE;
        end
        S_SETTLE: begin
          sc <= sc + 1'b1;
          if (int'(sc) == int'(SETTLE) - 1) state <= S_WRITE;
        end
        S_WRITE: begin
          ram_wdata <= net_out;
          ram_addr  <= op_addr;
          ram_we    <= 1'b1;
          ip_addr   <= ip_addr + 1'b1;
          state     <= S_NEXT;
        end
        S_NEXT: begin
          ram_we   <= 1'b0;
          ram_addr <= ip_addr;
          op_addr  <= op_addr + 1'b1;
          state    <= S_CHECK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A write goes only to an output row. The check is disabled while rst_n is low
  // (registers hold arbitrary values before the first reset); using the
  // asynchronous reset in this simulation-only qualifier is intended.
  assert property (@(posedge clk) disable iff (!rst_n)
    ram_we |-> (ram_addr >= RAM_AW'(OUT_BASE) && ram_addr < RAM_AW'(OUT_BASE + N_SETS)));

endmodule
