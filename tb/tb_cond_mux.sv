// tb_cond_mux: exhaustive test of the condition multiplexer over all selects,
// flag values and PMSI / Ipulse values.
`timescale 1ns/1ps
module tb_cond_mux;
  import interp_pkg::*;
  cond_sel_e sel;
  flags_t flags;
  logic pmsi, ipulse, cond, cc_n;
  int checks = 0, failures = 0;
  cond_mux dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic e;
    for (int s = 0; s < 8; s++)
      for (int v = 0; v < 64; v++) begin
        sel = cond_sel_e'(s);
        {flags, pmsi, ipulse} = 6'(v);
        #1;
        case (s)
          0: e = flags.c;
          1: e = flags.z;
          2: e = flags.n;
          3: e = flags.v;
          4: e = pmsi;
          5: e = ipulse;
          default: e = 0;
        endcase
        checks++;
        if (cond != e || cc_n != !e) begin
          failures++; $display("FAIL sel=%0d in=%b cond=%b", s, v, cond);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
