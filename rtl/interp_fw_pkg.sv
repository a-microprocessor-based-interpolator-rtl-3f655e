// interp_fw_pkg: the interpolator's firmware, built as a ROM image.
//
// The microprogram has three parts. The initialisation routine at address 0
// waits for PMSI, clears it and jumps through the control register to the
// command's start address. Data-accept routines copy the input register into
// one working register each. A move command's own data word is its feed data
// Fc, a 24-bit fraction of the reference pulse rate. The command routines (linear, circular) clear the
// feedrate and speed registers, publish the start position and then run one
// main loop whose every pass takes exactly LOOP_CYCLES microcycles, so that the
// addition frequency Fa is the microcycle rate divided by 16.
//
// One pass of the loop does, in order:
//  A  feedrate control: Fd += Fc. If a reference pulse is pending, a carry out
//     of Fd is a feed pulse Ff = Fi: the down counter WUD is decremented and the
//     speed register SDA is raised by one speed unit SDK. Without a pulse the
//     addition is undone.
//  B  speed up/down: SDC += SDA and SDA -= SDK. A carry out of SDC is an output
//     pulse Fo; without it the decrement is undone.
//  C  on Fo, one interpolation step (linear or circular discriminant method).
//  D  Fc is reloaded from the input register, which holds the feed data
//     during a move, so the host can change the feed rate at any time by
//     writing a new word. While WUD is non-zero the loop repeats; once it is
//     zero only B and C run (speed down) until SDA reaches zero, then D4
//     signals the end.
// Shorter paths are padded with idle words so all paths are equally long. SDA
// and SDC use the whole 24-bit word: the host sets SDK = 2**(24-n) to get an
// n-bit speed accumulator, and scales Fc the same way for the feed accumulator.
//
// Conditions are tested one word after the ALU operation that produced them,
// because the status register latches the flags at the end of each word.
package interp_fw_pkg;
  import interp_pkg::*;

  // Working registers (2901 register file addresses).
  localparam logic [3:0] R_ZK = 4'd1, R_XI = 4'd2, R_ZE = 4'd3, R_XE = 4'd4,
                         R_DK = 4'd5, R_WUD = 4'd6, R_FC = 4'd7, R_FD = 4'd8,
                         R_SDA = 4'd9, R_SDC = 4'd10, R_SDK = 4'd11;

  // Command start addresses, written by the host into the control register.
  localparam int unsigned CMD_LD_ZK = 'h10, CMD_LD_XI = 'h11, CMD_LD_ZE = 'h12,
                          CMD_LD_XE = 'h13, CMD_LD_DK = 'h14, CMD_LD_WUD = 'h15,
                          CMD_LD_SDK = 'h16,
                          CMD_LINEAR = 'h20, CMD_CIRCULAR = 'h60;

  localparam int unsigned LOOP_CYCLES = 16;

  typedef logic [$bits(uword_t)-1:0] uword_bits_t;
  typedef uword_bits_t rom_t [ROM_DEPTH];

  localparam int unsigned NOJUMP = 'hFFFF;

  // One microword. Defaults give an idle ALU and CONT. A jump target other
  // than NOJUMP makes the word a CJP: unconditional when cond is CC_NONE6,
  // else taken when the selected condition is 1.
  function automatic uword_t uw(alu_src_e src = SRC_ZA, alu_fn_e fn = FN_ADD,
                                alu_dst_e dst = DST_NOP, logic [3:0] a = 4'd0,
                                logic [3:0] b = 4'd0, logic cin = 1'b0,
                                io_code_e io = IO_NONE,
                                int unsigned jump = NOJUMP,
                                cond_sel_e cond = CC_NONE6,
                                seq_op_e seq = SEQ_CONT);
    uword_t w;
    w.src = src; w.fn = fn; w.dst = dst; w.a = a; w.b = b; w.cin = cin;
    w.seq = seq; w.br = '0; w.cond = cond; w.ccen_n = 1'b1; w.io = io;
    if (jump != NOJUMP) begin
      w.seq = SEQ_CJP;
      w.br = BR_W'(jump);
      w.ccen_n = (cond == CC_NONE6) ? 1'b0 : 1'b1;
    end
    return w;
  endfunction

  // ALU operation shorthands; each passes its I/O code and jump through.
  function automatic uword_t op_add(logic [3:0] dst_b, logic [3:0] src_a, logic cin = 1'b0,
      io_code_e io = IO_NONE, int unsigned jump = NOJUMP, cond_sel_e cond = CC_NONE6);
    return uw(SRC_AB, FN_ADD, DST_RAMF, src_a, dst_b, cin, io, jump, cond);
  endfunction
  // B <= B - A - 1 + cin
  function automatic uword_t op_sub(logic [3:0] dst_b, logic [3:0] src_a, logic cin = 1'b1,
      io_code_e io = IO_NONE, int unsigned jump = NOJUMP, cond_sel_e cond = CC_NONE6);
    return uw(SRC_AB, FN_SUBR, DST_RAMF, src_a, dst_b, cin, io, jump, cond);
  endfunction
  function automatic uword_t op_inc(logic [3:0] r,
      io_code_e io = IO_NONE, int unsigned jump = NOJUMP, cond_sel_e cond = CC_NONE6);
    return uw(SRC_ZB, FN_ADD, DST_RAMF, 4'd0, r, 1'b1, io, jump, cond);
  endfunction
  function automatic uword_t op_dec(logic [3:0] r,
      io_code_e io = IO_NONE, int unsigned jump = NOJUMP, cond_sel_e cond = CC_NONE6);
    return uw(SRC_ZB, FN_SUBR, DST_RAMF, 4'd0, r, 1'b0, io, jump, cond);
  endfunction
  function automatic uword_t op_clr(logic [3:0] r, io_code_e io = IO_NONE);
    return uw(SRC_ZB, FN_AND, DST_RAMF, 4'd0, r, 1'b0, io);
  endfunction
  // F = r, no write (Y = r)
  function automatic uword_t op_test(logic [3:0] r,
      io_code_e io = IO_NONE, int unsigned jump = NOJUMP, cond_sel_e cond = CC_NONE6);
    return uw(SRC_ZB, FN_ADD, DST_NOP, 4'd0, r, 1'b0, io, jump, cond);
  endfunction
  // F = B - A - 1 (negative when B <= A), no write
  function automatic uword_t op_le(logic [3:0] b, logic [3:0] a,
      int unsigned jump = NOJUMP, cond_sel_e cond = CC_NONE6);
    return uw(SRC_AB, FN_SUBR, DST_NOP, a, b, 1'b0, IO_NONE, jump, cond);
  endfunction
  // r <= D, then JZ back to the initialisation routine
  function automatic uword_t op_load(logic [3:0] r);
    return uw(SRC_DZ, FN_ADD, DST_RAMF, 4'd0, r, 1'b0, IO_NONE, NOJUMP, CC_NONE6, SEQ_JZ);
  endfunction
  // idle ALU word with an optional I/O code and jump
  function automatic uword_t idle(int unsigned jump = NOJUMP, cond_sel_e cond = CC_NONE6,
                                  io_code_e io = IO_NONE);
    return uw(SRC_ZA, FN_ADD, DST_NOP, 4'd0, 4'd0, 1'b0, io, jump, cond);
  endfunction

  // Command routine at `start`, main loop from `start + 8`.
  function automatic rom_t emit_command(rom_t rom_in, int unsigned start,
                                        bit circular);
    rom_t rom = rom_in;
    int unsigned s, bc, pads_b, pads_d, pads_dec;
    int unsigned loop_a, a_fr, a_cy, b0, c0, zstep, cn, xstep, d0, dec0, stop;
    int unsigned p;
    s = circular ? 3 : 2;             // words of one axis step
    bc = 6 + s;                        // words of parts B and C on an Fo pass
    pads_b = bc - 3;                   // idle words on a pass without Fo
    pads_d = LOOP_CYCLES - 3 - bc - 3; // part D after its test
    pads_dec = LOOP_CYCLES - bc - 5;   // speed-down pass after its tests

    loop_a = start + 8;
    a_fr = loop_a + 3;
    a_cy = loop_a + 5;
    b0 = loop_a + 6;
    c0 = b0 + 3 + pads_b;
    zstep = c0 + 4;
    cn = zstep + s;
    xstep = cn + 2;
    d0 = xstep + s;
    dec0 = d0 + 3 + pads_d;
    stop = dec0 + 2 + pads_dec;

    // Start: zero the accumulators, publish the start position, go to part D.
    rom[start + 0] = op_clr(R_FD, IO_CLR_IPULSE);
    rom[start + 1] = op_clr(R_SDA);
    rom[start + 2] = op_clr(R_SDC);
    rom[start + 3] = op_test(R_XI, IO_XREG);
    rom[start + 4] = op_test(R_ZK, IO_ZREG, d0);

    // Part A: feedrate control and down counter.
    rom[loop_a + 0] = op_add(R_FD, R_FC, 1'b0, IO_NONE, a_fr, CC_IPULSE);
    rom[loop_a + 1] = op_sub(R_FD, R_FC);                   // no pulse: undo
    rom[loop_a + 2] = idle(b0);
    rom[a_fr + 0]   = op_dec(R_WUD, IO_NONE, a_cy, CC_CARRY);  // tests Fd carry
    rom[a_fr + 1]   = op_inc(R_WUD, IO_CLR_IPULSE, b0);     // no feed pulse: undo
    rom[a_cy]       = op_add(R_SDA, R_SDK, 1'b0, IO_CLR_IPULSE); // falls into B

    // Part B: speed up/down.
    rom[b0 + 0] = op_add(R_SDC, R_SDA);
    rom[b0 + 1] = op_sub(R_SDA, R_SDK, 1'b1, IO_NONE, c0, CC_CARRY); // tests SDC carry
    rom[b0 + 2] = op_add(R_SDA, R_SDK);                     // no Fo: undo
    for (int unsigned i = 0; i < pads_b; i++) begin
      p = b0 + 3 + i;
      rom[p] = (i == pads_b - 1) ? idle(d0) : idle();
    end

    // Part C: discriminant test and the guards that stop an axis at its end.
    rom[c0 + 0] = op_test(R_DK);
    if (circular) begin
      rom[c0 + 1] = op_le(R_ZK, R_ZE, cn, CC_NEG);          // tests Dk < 0
      rom[c0 + 2] = op_le(R_ZK, R_ZE);                      // Zk <= Ze: Z done
    end else begin
      rom[c0 + 1] = op_le(R_ZE, R_ZK, cn, CC_NEG);
      rom[c0 + 2] = op_le(R_ZE, R_ZK);                      // Ze <= Zk: Z done
    end
    rom[c0 + 3] = idle(xstep, CC_NEG);                      // else falls to Z step
    rom[cn + 0] = op_le(R_XE, R_XI);                        // Xe <= Xi: X done
    rom[cn + 1] = idle(zstep, CC_NEG);                      // else falls to X step

    if (circular) begin
      // Z step inward: Zk -= 1; Dk -= 2*Zk + 1 (with the new Zk).
      rom[zstep + 0] = op_dec(R_ZK, IO_ZPULSE);
      rom[zstep + 1] = uw(SRC_AB, FN_SUBR, DST_RAMA, R_ZK, R_DK, 1'b1, IO_ZREG);
      rom[zstep + 2] = op_sub(R_DK, R_ZK, 1'b0, IO_NONE, d0);
      // X step outward: Dk += 2*Xi + 1 (old Xi); Xi += 1.
      rom[xstep + 0] = op_add(R_DK, R_XI, 1'b0, IO_XPULSE);
      rom[xstep + 1] = op_add(R_DK, R_XI, 1'b1);
      rom[xstep + 2] = op_inc(R_XI, IO_XREG, d0);
    end else begin
      // Z step: Dk -= Xe; Zk += 1.
      rom[zstep + 0] = op_sub(R_DK, R_XE, 1'b1, IO_ZPULSE);
      rom[zstep + 1] = op_inc(R_ZK, IO_ZREG, d0);
      // X step: Dk += Ze; Xi += 1.
      rom[xstep + 0] = op_add(R_DK, R_ZE, 1'b0, IO_XPULSE);
      rom[xstep + 1] = op_inc(R_XI, IO_XREG, d0);
    end

    // Part D: take the feed data, then ask whether the whole distance is fed.
    rom[d0 + 0] = uw(SRC_DZ, FN_ADD, DST_RAMF, 4'd0, R_FC);  // Fc <- feed data
    rom[d0 + 1] = op_test(R_WUD);
    rom[d0 + 2] = idle(dec0, CC_ZERO);
    for (int unsigned i = 0; i < pads_d; i++) begin
      p = d0 + 3 + i;
      rom[p] = (i == pads_d - 1) ? idle(loop_a) : idle();
    end
    // Speed down: stop once SDA has drained, else run part B again.
    rom[dec0 + 0] = op_test(R_SDA);
    rom[dec0 + 1] = idle(stop, CC_ZERO);
    for (int unsigned i = 0; i < pads_dec; i++) begin
      p = dec0 + 2 + i;
      rom[p] = (i == pads_dec - 1) ? idle(b0) : idle();
    end
    rom[stop] = uw(SRC_ZA, FN_ADD, DST_NOP, 4'd0, 4'd0, 1'b0, IO_END, NOJUMP, CC_NONE6, SEQ_JZ);
    return rom;
  endfunction

  function automatic rom_t build_rom();
    rom_t rom;
    for (int i = 0; i < int'(ROM_DEPTH); i++) rom[i] = UWORD_IDLE;
    // Initialisation: wait for PMSI, then clear it and jump to the command.
    rom[0] = idle(2, CC_PMSI);
    rom[1] = idle(0);
    rom[2] = uw(SRC_ZA, FN_ADD, DST_NOP, 4'd0, 4'd0, 1'b0, IO_CLR_PMSI, NOJUMP, CC_NONE6, SEQ_JMAP);
    // Data accept: one register per command, then back to initialisation.
    rom[CMD_LD_ZK]  = op_load(R_ZK);
    rom[CMD_LD_XI]  = op_load(R_XI);
    rom[CMD_LD_ZE]  = op_load(R_ZE);
    rom[CMD_LD_XE]  = op_load(R_XE);
    rom[CMD_LD_DK]  = op_load(R_DK);
    rom[CMD_LD_WUD] = op_load(R_WUD);
    rom[CMD_LD_SDK] = op_load(R_SDK);
    rom = emit_command(rom, CMD_LINEAR, 1'b0);
    rom = emit_command(rom, CMD_CIRCULAR, 1'b1);
    return rom;
  endfunction

endpackage
