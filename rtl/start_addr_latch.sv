// start_addr_latch: control register holding the command start address.
//
// The host writes the start address of the next command (the "control data")
// into this register. When the sequencer executes JMAP it pulls map_n low and
// the register drives the sequencer's branch input in place of the branch
// field of the pipeline register, which is enabled by pl_n. The two sources
// share one bus in the design; here the bus is a multiplexer whose output is
// zero when neither is enabled. The 8-bit width follows the design's figure;
// the write strobe and the clear on INIT are this implementation's.
//
// Timing: the register loads on the rising edge with ctrl_wr; d_bus is
// combinational.
module start_addr_latch
  import interp_pkg::*;
(
  input  logic            clk,
  input  logic            init,
  input  logic            ctrl_wr,
  input  logic [BR_W-1:0] ctrl_data,
  input  logic            map_n,
  input  logic            pl_n,
  input  logic [BR_W-1:0] branch,
  output logic [BR_W-1:0] start_addr,
  output logic [BR_W-1:0] d_bus
);

  always_ff @(posedge clk) begin
    if (init)         start_addr <= '0;
    else if (ctrl_wr) start_addr <= ctrl_data;
  end

  always_comb begin
    if (!map_n)     d_bus = start_addr;
    else if (!pl_n) d_bus = branch;
    else            d_bus = '0;
  end

endmodule
