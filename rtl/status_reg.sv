// status_reg: the interpolator's status register.
//
// The design latches the CPU's flags (carry, zero, negative, and a fourth,
// taken here as overflow) in a register, so a microword tests the flags of the
// ALU operation of the word before it while its own ALU operation runs; this is
// what lets the firmware overlap a test with the next computation. The
// register loads on every rising clock edge; INIT (synchronous, active high)
// clears it. Which four flags, the clear on INIT and the every-cycle load are
// this implementation's reading of the design.
module status_reg
  import interp_pkg::*;
(
  input  logic   clk,
  input  logic   init,
  input  flags_t flags_in,
  output flags_t flags_q
);

  always_ff @(posedge clk) begin
    if (init) flags_q <= '0;
    else      flags_q <= flags_in;
  end

endmodule
