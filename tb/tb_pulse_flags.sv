// tb_pulse_flags: checks the PMSI and Ipulse flags: a rising edge of Fr sets
// Ipulse (after the two-stage synchroniser), a long Fr level sets it only once,
// D5 clears it, a pmsi_req sets PMSI, D6 clears it, and a set coinciding with
// a clear wins.
`timescale 1ns/1ps
module tb_pulse_flags;
  logic clk = 0, init = 1, fr = 0, clr_ipulse = 0, pmsi_req = 0, clr_pmsi = 0;
  logic ipulse, pmsi;
  int checks = 0, failures = 0;
  pulse_flags dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask
  initial begin
    tick(2);
    chk(!ipulse && !pmsi, "INIT clears");
    init = 0;
    tick(3);
    chk(!ipulse, "no pulse, no flag");
    fr = 1;
    tick(2);
    chk(!ipulse, "synchroniser delay");
    tick(1);
    chk(ipulse, "Fr edge sets Ipulse");
    tick(10);
    chk(ipulse, "Ipulse holds until cleared");
    clr_ipulse = 1; tick(1); clr_ipulse = 0;
    chk(!ipulse, "D5 clears Ipulse");
    tick(10);
    chk(!ipulse, "a held Fr level does not set it again");
    fr = 0; tick(4);
    fr = 1; tick(2);
    clr_ipulse = 1; tick(1); clr_ipulse = 0;   // edge arrives together with clear
    chk(ipulse, "set wins over clear");
    clr_ipulse = 1; tick(1); clr_ipulse = 0;
    chk(!ipulse, "cleared");
    fr = 0;
    pmsi_req = 1; tick(1); pmsi_req = 0;
    chk(pmsi, "pmsi_req sets PMSI");
    tick(5);
    chk(pmsi, "PMSI holds");
    clr_pmsi = 1; tick(1);
    chk(!pmsi, "D6 clears PMSI");
    pmsi_req = 1; tick(1); pmsi_req = 0; clr_pmsi = 0;
    chk(pmsi, "request wins over clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
