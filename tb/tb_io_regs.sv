// tb_io_regs: random test of the input register (FBSTB), the X and Z position
// registers (D0, D1) and the Sample hold, against a model of the three
// registers.
`timescale 1ns/1ps
module tb_io_regs;
  logic clk = 0, init = 1, fbstb = 0, sample = 0, ld_x = 0, ld_z = 0;
  logic [23:0] host_data = 0, cpu_y = 0, cpu_d, x_pos, z_pos;
  int checks = 0, failures = 0;
  int n_held = 0;
  io_regs dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [23:0] md, mx, mz;
    @(posedge clk); #1;
    checks++; if (cpu_d != 0 || x_pos != 0 || z_pos != 0) begin failures++; $display("FAIL init"); end
    init = 0; md = 0; mx = 0; mz = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      fbstb = 1'($urandom); sample = ($urandom_range(0, 3) == 0);
      ld_x = 1'($urandom); ld_z = 1'($urandom);
      host_data = 24'($urandom); cpu_y = 24'($urandom);
      @(posedge clk); #1;
      if (fbstb) md = host_data;
      if (ld_x && !sample) mx = cpu_y;
      if (ld_z && !sample) mz = cpu_y;
      if (sample && (ld_x || ld_z)) n_held++;
      checks++;
      if (cpu_d != md || x_pos != mx || z_pos != mz) begin
        failures++; $display("FAIL step %0d", i);
      end
    end
    checks++; if (n_held == 0) begin failures++; $display("FAIL no Sample hold seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
