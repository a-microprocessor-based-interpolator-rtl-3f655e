// pulse_flags: the PMSI and Ipulse flags tested by the firmware.
//
// Ipulse records that a reference pulse Fr has arrived: the Fr input is
// synchronised with two flip-flops, its rising edge sets the flag, and the
// firmware clears it with decoder output D5 once the pulse has been used.
// PMSI is the command start request from the host: a one-cycle pmsi_req sets
// it and decoder output D6 clears it when the command is taken. A set in the
// same cycle as a clear wins, so no pulse is lost. The two flags and their
// clearing strobes are the design's; synchroniser, edge detection and
// set-over-clear priority are this implementation's.
module pulse_flags (
  input  logic clk,
  input  logic init,
  input  logic fr,          // reference pulse, asynchronous
  input  logic clr_ipulse,  // D5
  input  logic pmsi_req,    // host command start, synchronous
  input  logic clr_pmsi,    // D6
  output logic ipulse,
  output logic pmsi
);

  logic [2:0] fr_sync;
  logic fr_rise;

  assign fr_rise = fr_sync[1] & ~fr_sync[2];

  always_ff @(posedge clk) begin
    if (init) begin
      fr_sync <= '0;
      ipulse  <= 1'b0;
      pmsi    <= 1'b0;
    end else begin
      fr_sync <= {fr_sync[1:0], fr};
      if (fr_rise)         ipulse <= 1'b1;
      else if (clr_ipulse) ipulse <= 1'b0;
      if (pmsi_req)        pmsi <= 1'b1;
      else if (clr_pmsi)   pmsi <= 1'b0;
    end
  end

endmodule
