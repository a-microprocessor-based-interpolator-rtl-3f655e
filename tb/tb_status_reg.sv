// tb_status_reg: checks that the status register shows, one clock later, the
// flags applied before the clock, and that INIT clears it.
`timescale 1ns/1ps
module tb_status_reg;
  import interp_pkg::*;
  logic clk = 0, init = 1;
  flags_t flags_in, flags_q;
  int checks = 0, failures = 0;
  status_reg dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    flags_t prev;
    flags_in = 4'b1111;
    @(posedge clk); #1;
    checks++; if (flags_q != 0) begin failures++; $display("FAIL init"); end
    init = 0;
    prev = flags_in;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      // the value before the clock must still show
      checks++; if (flags_q != ((i == 0) ? 4'b0000 : prev)) begin failures++; $display("FAIL hold"); end
      flags_in = flags_t'($urandom);
      prev = flags_in;
      @(posedge clk); #1;
      checks++; if (flags_q != prev) begin failures++; $display("FAIL load %b %b", flags_q, prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
