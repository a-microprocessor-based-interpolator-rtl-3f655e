// tb_alu_slice4: random test of one 4-bit ALU slice against a reference model.
// Every source, function and destination is exercised; the model keeps its
// own copy of the register file and Q and computes F, Y, carry, generate,
// propagate, overflow and zero from the operand definitions.
`timescale 1ns/1ps
module tb_alu_slice4;
  import interp_pkg::*;

  logic clk = 0;
  alu_src_e src; alu_fn_e fn; alu_dst_e dst;
  logic [3:0] a_addr, b_addr, d, y, f;
  logic cn, g_n, p_n, cn4, ovr, f_zero, f3;
  int checks = 0, failures = 0;

  alu_slice4 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] mram [16];
  logic [3:0] mq;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [3:0] r, s, av, bv, ef, ey;
    int sum, rr, ss;
    bit ec, eg, ep;
    // Initialise registers and Q through the ALU: RAM[i] <= D.
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      src = SRC_DZ; fn = FN_ADD; dst = DST_RAMF; a_addr = 0; b_addr = 4'(i);
      d = 4'($urandom); cn = 0; mram[i] = d;
    end
    @(negedge clk);
    src = SRC_DZ; fn = FN_OR; dst = DST_QREG; d = 4'($urandom); cn = 0; mq = d;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      src = alu_src_e'($urandom_range(0, 7));
      fn = alu_fn_e'($urandom_range(0, 7));
      dst = alu_dst_e'($urandom_range(0, 3));
      a_addr = 4'($urandom); b_addr = 4'($urandom); d = 4'($urandom); cn = 1'($urandom);
      #1;
      av = mram[a_addr]; bv = mram[b_addr];
      case (src)
        SRC_AQ: begin r = av; s = mq; end
        SRC_AB: begin r = av; s = bv; end
        SRC_ZQ: begin r = 0; s = mq; end
        SRC_ZB: begin r = 0; s = bv; end
        SRC_ZA: begin r = 0; s = av; end
        SRC_DA: begin r = d; s = av; end
        SRC_DQ: begin r = d; s = mq; end
        default: begin r = d; s = 0; end
      endcase
      rr = (fn == FN_SUBR) ? int'(4'(~r)) : int'(r);
      ss = (fn == FN_SUBS) ? int'(4'(~s)) : int'(s);
      sum = rr + ss + int'(cn);
      case (fn)
        FN_ADD, FN_SUBR, FN_SUBS: ef = 4'(sum);
        FN_OR: ef = r | s;
        FN_AND: ef = r & s;
        FN_NOTRS: ef = ~r & s;
        FN_EXOR: ef = r ^ s;
        default: ef = ~(r ^ s);
      endcase
      ec = sum > 15;
      eg = (rr + ss) > 15;            // generate: carry without carry-in
      ep = (rr + ss) == 15;           // propagate: carry only with carry-in
      ey = (dst == DST_RAMA) ? av : ef;
      chk(f == ef, $sformatf("F src=%0d fn=%0d r=%h s=%h cn=%0d: %h exp %h", src, fn, r, s, cn, f, ef));
      chk(y == ey, "Y");
      chk(f_zero == (ef == 0) && f3 == ef[3], "zero/sign");
      chk(cn4 == ec, $sformatf("carry fn=%0d r=%h s=%h cn=%0d", fn, r, s, cn));
      chk(g_n == !eg, "generate");
      if (!eg) chk(p_n == !(((rr | ss) & 15) == 15), "propagate");
      if (fn == FN_ADD) chk(ovr == ((r[3] == s[3]) && (ef[3] != r[3])), "overflow");
      @(posedge clk);
      if (dst == DST_RAMF || dst == DST_RAMA) mram[b_addr] = ef;
      if (dst == DST_QREG) mq = ef;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
