// tb_carry_lookahead: compares the lookahead carries and group outputs with a
// ripple-carry computation over random and corner-case inputs.
`timescale 1ns/1ps
module tb_carry_lookahead;
  localparam int N = 6;
  logic cn, g_out_n, p_out_n;
  logic [N-1:0] g_n, p_n, c;
  int checks = 0, failures = 0;

  carry_lookahead #(.GROUPS(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] g, p;
    logic [N:0] rc;
    for (int t = 0; t < 4000; t++) begin
      g = N'($urandom); p = N'($urandom) | g;  // a generating slice also propagates
      if (t < 64) begin g = '0; p = N'(t) ; end
      cn = 1'($urandom);
      g_n = ~g; p_n = ~p;
      #1;
      rc[0] = cn;
      for (int i = 0; i < N; i++) rc[i+1] = g[i] | (p[i] & rc[i]);
      checks++;
      if (c != rc[N-1:0]) begin
        failures++; $display("FAIL g=%b p=%b cn=%0d c=%b exp %b", g, p, cn, c, rc[N-1:0]);
      end
      // group generate = carry out with cn = 0; group propagate = all P
      begin
        logic [N:0] r0;
        r0[0] = 0;
        for (int i = 0; i < N; i++) r0[i+1] = g[i] | (p[i] & r0[i]);
        checks++;
        if (g_out_n != !r0[N] || p_out_n != !(&p)) begin
          failures++; $display("FAIL group outputs");
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
