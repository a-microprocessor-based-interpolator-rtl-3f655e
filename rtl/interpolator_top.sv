// interpolator_top: microprogrammed pulse interpolator for two-axis (X, Z)
// continuous-path control.
//
// A 24-bit bit-slice CPU (cpu24), a 2910-style sequencer (seq2910) and a
// 512 x 36 microprogram memory with pipeline register (micro_memory) run the
// firmware of interp_fw_pkg. The firmware performs, in one 16-microcycle loop,
// feedrate control of the reference pulse, the down counter of the remaining
// distance, exponential speed up/down, and one step of linear or circular
// interpolation. Each step leaves as a one-cycle pulse on x_pulse or z_pulse
// and as the new position in the X or Z register.
//
// Host interface (the host's 8-bit bus and parallel ports are outside):
//   host_data/fbstb   24-bit word into the input register, read by the firmware
//   ctrl_data/ctrl_wr command start address into the control register
//   pmsi_req          one-cycle request to start the command (sets PMSI)
//   sample            freezes x_pos/z_pos while the host reads them
//   fr                reference pulse Fr (asynchronous)
//   dist_end          one-cycle pulse when a command has finished
//   init              synchronous reset (INIT): pipeline register to JZ
// A command is started by loading the data word (if any), writing its start
// address and pulsing pmsi_req; data words are loaded one per command (see
// interp_fw_pkg for the addresses). With a 250 ns microcycle the loop runs at
// Fa = 250 kHz, which bounds the output at 250K pulses per second.
//
// Wiring follows the design's block diagram: the status register latches the
// CPU flags, the condition multiplexer feeds CC, the branch field (enabled by
// PL) or the control register (enabled by MAP) drives the sequencer's D input,
// and the I/O decoder turns the 3-bit I/O field into D0..D7. The sequencer's
// upper four address bits and VECT are not used by the 0.5K memory.
module interpolator_top
  import interp_pkg::*;
(
  input  logic              clk,
  input  logic              init,
  input  logic              fr,
  input  logic [DATA_W-1:0] host_data,
  input  logic              fbstb,
  input  logic [BR_W-1:0]   ctrl_data,
  input  logic              ctrl_wr,
  input  logic              pmsi_req,
  input  logic              sample,
  output logic [DATA_W-1:0] x_pos,
  output logic [DATA_W-1:0] z_pos,
  output logic              x_pulse,
  output logic              z_pulse,
  output logic              dist_end
);

  uword_t            uw;
  logic [UADDR_W-1:0] y_addr, seq_d;
  logic [BR_W-1:0]   d_bus, start_addr;
  logic              pl_n, map_n, vect_n, full_n;
  logic              cond, cc_n;
  logic              ipulse, pmsi;
  flags_t            flags, flags_q;
  logic [DATA_W-1:0] cpu_d, cpu_y;
  logic [7:0]        dsel;

  micro_memory u_mem (
    .clk, .init, .addr(y_addr[ROM_AW-1:0]), .word_q(uw)
  );

  start_addr_latch u_latch (
    .clk, .init, .ctrl_wr, .ctrl_data, .map_n, .pl_n, .branch(uw.br),
    .start_addr, .d_bus
  );

  assign seq_d = UADDR_W'(d_bus);

  cond_mux u_cmux (
    .sel(uw.cond), .flags(flags_q), .pmsi, .ipulse, .cond, .cc_n
  );

  seq2910 u_seq (
    .clk, .op(uw.seq), .cc_n, .ccen_n(uw.ccen_n), .rld_n(1'b1), .ci(1'b1),
    .d(seq_d), .y(y_addr), .pl_n, .map_n, .vect_n, .full_n
  );

  cpu24 u_cpu (
    .clk, .src(uw.src), .fn(uw.fn), .dst(uw.dst), .a_addr(uw.a),
    .b_addr(uw.b), .cin(uw.cin), .d(cpu_d), .y(cpu_y), .flags
  );

  status_reg u_status (.clk, .init, .flags_in(flags), .flags_q);

  io_decoder u_dec (.code(uw.io), .d(dsel));

  pulse_flags u_flags (
    .clk, .init, .fr, .clr_ipulse(dsel[IO_CLR_IPULSE]), .pmsi_req,
    .clr_pmsi(dsel[IO_CLR_PMSI]), .ipulse, .pmsi
  );

  io_regs u_io (
    .clk, .init, .fbstb, .host_data, .sample,
    .ld_x(dsel[IO_XREG]), .ld_z(dsel[IO_ZREG]), .cpu_y, .cpu_d, .x_pos, .z_pos
  );

  assign x_pulse  = dsel[IO_XPULSE];
  assign z_pulse  = dsel[IO_ZPULSE];
  assign dist_end = dsel[IO_END];

endmodule
