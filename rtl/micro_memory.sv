// micro_memory: the interpolator's microprogram memory and pipeline register.
//
// A 512-word by 36-bit read-only memory holds the firmware built by
// interp_fw_pkg::build_rom(). Its output is clocked into the microprogram
// (pipeline) register, as with a registered PROM, so the word addressed by the
// sequencer in one cycle is executed in the next. INIT clears the register to
// an idle word whose sequencer field is JZ, which sends the sequencer to
// address zero. Depth and word width are the design's; the register contents
// after INIT and the synchronous INIT are this implementation's choice.
//
// Interface: addr (low 9 bits of the sequencer's Y), init (synchronous,
// active high), word_q (the word being executed).
module micro_memory
  import interp_pkg::*;
  import interp_fw_pkg::*;
(
  input  logic              clk,
  input  logic              init,
  input  logic [ROM_AW-1:0] addr,
  output uword_t            word_q
);

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (init) word_q <= UWORD_IDLE;
    else      word_q <= uword_t'(ROM[addr]);
  end

endmodule
