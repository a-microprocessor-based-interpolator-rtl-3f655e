// tb_seq2910: directed test of the microprogram sequencer. Each step applies
// an instruction, condition and branch value, checks the next address Y and
// the source enables against hand-worked values, then clocks. It covers all
// sixteen instructions, both outcomes of conditional ones, the unconditional
// case (CCEN low), the counter, the stack including the full flag, and JZ.
`timescale 1ns/1ps
module tb_seq2910;
  import interp_pkg::*;

  logic clk = 0;
  seq_op_e op;
  logic cc_n, ccen_n, rld_n, ci;
  logic [11:0] d, y;
  logic pl_n, map_n, vect_n, full_n;
  int checks = 0, failures = 0;

  seq2910 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pass: 1 = condition true (cc_n low), 0 = false; uncond forces pass via CCEN low
  task automatic step(seq_op_e o, bit pass, int dv, int exp_y, bit uncond = 0);
    @(negedge clk);
    op = o; cc_n = !pass; ccen_n = uncond ? 1'b0 : 1'b1; d = 12'(dv);
    #1;
    checks++;
    if (y != 12'(exp_y)) begin
      failures++;
      $display("FAIL %s pass=%0d d=%0d: y=%0d expected %0d", o.name(), pass, dv, y, exp_y);
    end
    @(posedge clk);
    #1;
  endtask

  task automatic expect_bit(logic got, logic exp, string s);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    rld_n = 1; ci = 1;
    step(SEQ_JZ, 0, 0, 0);
    step(SEQ_CONT, 0, 9, 1);
    step(SEQ_CJP, 0, 100, 2);           // fail
    step(SEQ_CJP, 1, 100, 100);         // pass
    step(SEQ_CJP, 0, 200, 200, 1);      // CCEN low: unconditional
    step(SEQ_CJS, 1, 300, 300);         // push 201
    step(SEQ_CONT, 0, 0, 301);
    step(SEQ_CRTN, 1, 0, 201);          // pop
    step(SEQ_CRTN, 0, 0, 202);          // fail
    step(SEQ_LDCT, 0, 2, 203);          // R = 2
    step(SEQ_RPCT, 0, 50, 50);          // R 2 -> 1
    step(SEQ_RPCT, 0, 50, 50);          // R 1 -> 0
    step(SEQ_RPCT, 0, 50, 51);          // R = 0: continue
    // JMAP: map enable
    @(negedge clk); op = SEQ_JMAP; d = 12'd77; #1;
    expect_bit(map_n, 0, "JMAP map_n"); expect_bit(pl_n, 1, "JMAP pl_n");
    step(SEQ_JMAP, 0, 77, 77);
    @(negedge clk); op = SEQ_CJV; d = 12'd88; cc_n = 0; #1;
    expect_bit(vect_n, 0, "CJV vect_n"); expect_bit(map_n, 1, "CJV map_n");
    step(SEQ_CJV, 1, 88, 88);
    step(SEQ_PUSH, 1, 3, 89);           // push 89, R = 3
    step(SEQ_RFCT, 0, 0, 89);           // R 3 -> 2
    step(SEQ_RFCT, 0, 0, 89);           // R 2 -> 1
    step(SEQ_RFCT, 0, 0, 89);           // R 1 -> 0
    step(SEQ_RFCT, 0, 0, 90);           // R = 0: pop, continue
    step(SEQ_LDCT, 0, 400, 91);         // R = 400
    step(SEQ_JRP, 0, 500, 400);
    step(SEQ_JRP, 1, 500, 500);
    step(SEQ_JSRP, 0, 600, 400);        // push 501, go to R
    step(SEQ_CRTN, 1, 0, 501);
    step(SEQ_CJS, 1, 700, 700);         // push 502
    step(SEQ_CJPP, 1, 800, 800);        // pop
    step(SEQ_CJPP, 0, 900, 801);
    // stack depth: five pushes fill it
    for (int i = 0; i < 5; i++) step(SEQ_PUSH, 0, 0, 802 + i);
    expect_bit(full_n, 0, "stack full after five pushes");
    step(SEQ_CRTN, 1, 0, 806);          // top of stack was pushed from uPC 806
    expect_bit(full_n, 1, "not full after a pop");
    step(SEQ_JZ, 0, 0, 0);
    expect_bit(full_n, 1, "JZ empties stack");
    // LOOP: push then loop back until the condition passes
    step(SEQ_PUSH, 0, 0, 1);            // pushes 1 (the word after the PUSH)
    step(SEQ_CONT, 0, 0, 2);
    step(SEQ_LOOP, 0, 0, 1);            // fail: back to top of stack
    step(SEQ_LOOP, 1, 0, 2);            // pass: pop, continue
    // TWB: counter not zero, fail -> top of stack, decrement
    step(SEQ_LDCT, 0, 1, 3);            // R = 1
    step(SEQ_PUSH, 0, 0, 4);            // pushes 4
    step(SEQ_TWB, 0, 999, 4);           // R 1 -> 0, go to stack
    step(SEQ_TWB, 0, 999, 999);         // R = 0, fail: go to D, pop
    step(SEQ_PUSH, 0, 0, 1000);         // pushes 1000
    step(SEQ_TWB, 1, 999, 1001);        // pass: continue, pop
    expect_bit(full_n, 1, "stack balanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
