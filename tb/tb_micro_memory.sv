// tb_micro_memory: test of the microprogram memory and pipeline register.
//
// Checks the pipeline timing (a word appears one clock after its address) and
// INIT (clears to an idle JZ word). It then reads the whole memory and checks
// the firmware's structure independently of how it was assembled: the PMSI
// wait at address 0, the JMAP through the control register, the data-accept
// words (register <- D, then JZ), and, for both the linear and the circular
// command, that part D reloads Fc from the input register, that every
// control path through the main loop, taking each conditional branch both
// ways, returns to the distance test after exactly 16 words, which is what fixes the addition frequency at clock/16; that each
// pass has at most one axis pulse; and that the speed-down path ends with D4.
`timescale 1ns/1ps
module tb_micro_memory;
  import interp_pkg::*;
  import interp_fw_pkg::*;

  logic clk = 0, init = 1;
  logic [8:0] addr = '0;
  uword_t word_q;
  uword_t img [512];
  int checks = 0, failures = 0;
  int n_paths, n_stop;

  micro_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic bit is_cond(uword_t w);
    return w.seq == SEQ_CJP && w.ccen_n;
  endfunction

  // Walk every path from `pc`; `len` words so far, `pulses` axis pulses so far.
  task automatic walk(int pc, int target, int len, int pulses);
    uword_t w;
    int np;
    w = img[pc];
    np = pulses + ((w.io == IO_XPULSE || w.io == IO_ZPULSE) ? 1 : 0);
    if (len > 0 && pc == target) begin
      n_paths++;
      chk(len == int'(LOOP_CYCLES), $sformatf("loop path of %0d words", len));
      chk(pulses <= 1, "at most one axis pulse per pass");
      return;
    end
    if (len > 40) begin chk(0, "path does not return"); return; end
    if (w.seq == SEQ_JZ) begin
      n_stop++;
      chk(w.io == IO_END, "command ends with distribution end");
      return;
    end
    chk(w.seq == SEQ_CJP || w.seq == SEQ_CONT, $sformatf("unexpected sequencer op at %h", pc));
    if (w.seq == SEQ_CONT) walk(pc + 1, target, len + 1, np);
    else if (!is_cond(w)) walk(int'(w.br), target, len + 1, np);
    else begin
      walk(int'(w.br), target, len + 1, np);
      walk(pc + 1, target, len + 1, np);
    end
  endtask

  initial begin
    // INIT gives the idle word
    repeat (2) @(posedge clk);
    #1 chk(word_q.seq == SEQ_JZ && word_q.io == IO_NONE && word_q.dst == DST_NOP, "INIT word");
    @(negedge clk); init = 0;
    // read the image; check the one-clock latency on the way
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); addr = 9'(i);
      #1 if (i > 0) chk(word_q === img[i-1], "word does not change before the clock");
      @(posedge clk); #1 img[i] = word_q;
    end
    // initialisation routine
    chk(img[0].seq == SEQ_CJP && img[0].ccen_n && img[0].cond == CC_PMSI && img[0].br == 8'd2,
        "address 0 waits for PMSI");
    chk(img[1].seq == SEQ_CJP && !img[1].ccen_n && img[1].br == 8'd0, "address 1 loops to 0");
    chk(img[2].seq == SEQ_JMAP && img[2].io == IO_CLR_PMSI, "address 2 maps and clears PMSI");
    // data accept words
    for (int c = CMD_LD_ZK; c <= CMD_LD_SDK; c++) begin
      chk(img[c].src == SRC_DZ && img[c].fn == FN_ADD && img[c].dst == DST_RAMF && !img[c].cin
          && img[c].seq == SEQ_JZ, $sformatf("data accept word %h", c));
    end
    chk(img[CMD_LD_SDK].b == R_SDK && img[CMD_LD_ZK].b == R_ZK, "data accept registers");
    // main loops
    for (int k = 0; k < 2; k++) begin
      int start, d0;
      start = (k == 0) ? CMD_LINEAR : CMD_CIRCULAR;
      // the command start jumps to the distance test
      d0 = -1;
      for (int pc = start; pc < start + 8; pc++)
        if (img[pc].seq == SEQ_CJP && !img[pc].ccen_n) begin d0 = int'(img[pc].br); break; end
      chk(d0 > 0, "command start reaches the loop");
      chk(img[d0].src == SRC_DZ && img[d0].b == R_FC && img[d0].dst == DST_RAMF,
          "each pass reloads Fc from the input register");
      chk(img[d0 + 1].src == SRC_ZB && img[d0 + 1].b == R_WUD && img[d0 + 1].dst == DST_NOP,
          "distance test reads WUD");
      n_paths = 0; n_stop = 0;
      walk(d0, d0, 0, 0);
      chk(n_paths >= 6, $sformatf("%0d loop paths", n_paths));
      chk(n_stop >= 1, "a path ends the command");
      $display("command %h: %0d loop paths, %0d ending paths", start, n_paths, n_stop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
