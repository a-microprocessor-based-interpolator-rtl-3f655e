// cond_mux: condition multiplexer (status selector) of the sequencer.
//
// The 3-bit condition-select field of the microword picks one of six inputs:
// the four latched flags (carry, zero, negative, overflow), the PMSI command
// start flag and the Ipulse reference-pulse flag. Codes 6 and 7 select a
// constant false. The selected condition is active high and drives the
// sequencer's active-low CC input inverted, so a conditional jump is taken when
// the selected condition is 1. The six inputs are the design's; their code
// order and the polarity are this implementation's. Purely combinational.
module cond_mux
  import interp_pkg::*;
(
  input  cond_sel_e sel,
  input  flags_t    flags,
  input  logic      pmsi,
  input  logic      ipulse,
  output logic      cond,
  output logic      cc_n
);

  always_comb begin
    unique case (sel)
      CC_CARRY:  cond = flags.c;
      CC_ZERO:   cond = flags.z;
      CC_NEG:    cond = flags.n;
      CC_OVR:    cond = flags.v;
      CC_PMSI:   cond = pmsi;
      CC_IPULSE: cond = ipulse;
      default:   cond = 1'b0;
    endcase
  end

  assign cc_n = ~cond;

endmodule
