// tb_start_addr_latch: checks that the control register takes the host's
// address on ctrl_wr and keeps it otherwise, and that the sequencer's branch
// bus carries the register under MAP, the branch field under PL and zero
// with neither enabled.
`timescale 1ns/1ps
module tb_start_addr_latch;
  logic clk = 0, init = 1, ctrl_wr = 0, map_n = 1, pl_n = 1;
  logic [7:0] ctrl_data = 0, branch = 0, start_addr, d_bus;
  int checks = 0, failures = 0;
  start_addr_latch dut (.*);
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
  initial begin
    logic [7:0] held;
    @(posedge clk); #1 chk(start_addr == 0, "INIT clears");
    init = 0; held = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ctrl_wr = 1'($urandom); ctrl_data = 8'($urandom); branch = 8'($urandom);
      {map_n, pl_n} = 2'($urandom);
      #1;
      if (!map_n) chk(d_bus == held, "MAP drives the register");
      else if (!pl_n) chk(d_bus == branch, "PL drives the branch field");
      else chk(d_bus == 0, "idle bus");
      @(posedge clk); #1;
      if (ctrl_wr) held = ctrl_data;
      chk(start_addr == held, "register contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
