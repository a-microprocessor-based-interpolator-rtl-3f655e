// tb_cpu24: random test of the 24-bit CPU against a 24-bit reference model of
// the register file, Q, operand selection, ALU functions and flags (carry out,
// zero, sign, overflow). Long carry chains across all six slices are forced
// by operands of all ones.
`timescale 1ns/1ps
module tb_cpu24;
  import interp_pkg::*;

  logic clk = 0;
  alu_src_e src; alu_fn_e fn; alu_dst_e dst;
  logic [3:0] a_addr, b_addr;
  logic cin;
  logic [23:0] d, y;
  flags_t flags;
  int checks = 0, failures = 0;

  cpu24 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] mram [16];
  logic [23:0] mq;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [23:0] rnd24();
    case ($urandom_range(0, 3))
      0: return 24'hFFFFFF;
      1: return 24'(0);
      default: return 24'($urandom);
    endcase
  endfunction

  initial begin
    logic [23:0] r, s, av, bv, ef, ey, rr, ss;
    logic [24:0] sum;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      src = SRC_DZ; fn = FN_ADD; dst = DST_RAMF; a_addr = 0; b_addr = 4'(i);
      d = rnd24(); cin = 0; mram[i] = d;
    end
    @(negedge clk);
    src = SRC_DZ; fn = FN_ADD; dst = DST_QREG; d = rnd24(); cin = 0; mq = d;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      src = alu_src_e'($urandom_range(0, 7));
      fn = alu_fn_e'($urandom_range(0, 7));
      dst = alu_dst_e'($urandom_range(0, 3));
      a_addr = 4'($urandom); b_addr = 4'($urandom); d = rnd24(); cin = 1'($urandom);
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
      rr = (fn == FN_SUBR) ? ~r : r;
      ss = (fn == FN_SUBS) ? ~s : s;
      sum = {1'b0, rr} + {1'b0, ss} + 25'(cin);
      case (fn)
        FN_ADD, FN_SUBR, FN_SUBS: ef = sum[23:0];
        FN_OR: ef = r | s;
        FN_AND: ef = r & s;
        FN_NOTRS: ef = ~r & s;
        FN_EXOR: ef = r ^ s;
        default: ef = ~(r ^ s);
      endcase
      ey = (dst == DST_RAMA) ? av : ef;
      chk(y == ey, $sformatf("Y src=%0d fn=%0d dst=%0d r=%h s=%h cin=%0d: %h exp %h", src, fn, dst, r, s, cin, y, ey));
      chk(flags.z == (ef == 0), "zero flag");
      chk(flags.n == ef[23], "sign flag");
      chk(flags.c == sum[24], "carry flag");
      chk(flags.v == ((rr[23] == ss[23]) && (sum[23] != rr[23])), "overflow flag");
      @(posedge clk);
      if (dst == DST_RAMF || dst == DST_RAMA) mram[b_addr] = ef;
      if (dst == DST_QREG) mq = ef;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
