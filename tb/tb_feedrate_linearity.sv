// tb_feedrate_linearity: feed rate against feed data.
//
// Runs a long linear move ten times with feed data 10, 20, ..., 100 (the range
// of the design's feedrate experiment) and a constant reference pulse train.
// Each run starts from INIT, waits for the speed-up to settle and then counts
// output steps over a fixed window. The feed data F is loaded as Fc = F * 2**16,
// so the expected steady step rate is F * 2**16 / 2**24 reference pulses, that
// is F / 256 steps per reference pulse. The test checks each count against
// that value and checks that the rate is proportional to F, as in the
// experiment, where speed rose in direct proportion to feed data. A last run
// changes the feed data from 20 to 80 in the middle of a move, by writing
// only the input register, and checks both rates.
`timescale 1ns/1ps
module tb_feedrate_linearity;
  import interp_pkg::*;
  import interp_fw_pkg::*;

  localparam int FR_PERIOD = 24;
  localparam int SETTLE = 12000;
  localparam int WINDOW = 49152;   // 2048 reference pulses

  logic clk = 1'b0, init = 1'b1, fr = 1'b0;
  logic [23:0] host_data = '0;
  logic fbstb = 1'b0;
  logic [7:0] ctrl_data = '0;
  logic ctrl_wr = 1'b0, pmsi_req = 1'b0, sample = 1'b0;
  logic [23:0] x_pos, z_pos;
  logic x_pulse, z_pulse, dist_end;

  interpolator_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    // Feed change during a move: the input register holds the feed data and
    // is read on every loop pass, so a new word changes the rate at once.
    begin
      int f1, f2, s1, s2;
      f1 = 20; f2 = 80;
      init = 1'b1;
      repeat (4) @(negedge clk);
      init = 1'b0;
      repeat (4) @(negedge clk);
      host_cmd(CMD_LD_ZK, 24'd0);
      host_cmd(CMD_LD_XI, 24'd0);
      host_cmd(CMD_LD_ZE, 24'd3000);
      host_cmd(CMD_LD_XE, 24'd1000);
      host_cmd(CMD_LD_DK, 24'd0);
      host_cmd(CMD_LD_WUD, 24'd4000);
      host_cmd(CMD_LD_SDK, 24'h040000);
      host_cmd(CMD_LINEAR, 24'(f1) << 16);
      repeat (SETTLE) @(posedge clk);
      steps = 0; counting = 1;
      repeat (WINDOW) @(posedge clk);
      counting = 0; s1 = steps;
      @(negedge clk); host_data = 24'(f2) << 16; fbstb = 1'b1;
      @(negedge clk); fbstb = 1'b0;
      repeat (SETTLE) @(posedge clk);
      steps = 0; counting = 1;
      repeat (WINDOW) @(posedge clk);
      counting = 0; s2 = steps;
      $display("feed changed %0d -> %0d during the move: %0d then %0d steps", f1, f2, s1, s2);
      chk(s1 == (WINDOW / FR_PERIOD) * f1 / 256 && s2 == (WINDOW / FR_PERIOD) * f2 / 256,
          $sformatf("feed change: %0d then %0d steps", s1, s2));
      chk(!dist_end, "move still running after the feed change");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial forever begin
    @(posedge clk);
    fr <= 1'b1;
    repeat (2) @(posedge clk);
    fr <= 1'b0;
    repeat (FR_PERIOD - 3) @(posedge clk);
  end

  bit counting;
  int steps;
  always @(posedge clk) if (counting && (x_pulse || z_pulse)) steps++;

  task automatic host_cmd(int cmd, logic [23:0] data);
    @(negedge clk);
    host_data = data; fbstb = 1'b1; ctrl_data = 8'(cmd); ctrl_wr = 1'b1;
    @(negedge clk);
    fbstb = 1'b0; ctrl_wr = 1'b0; pmsi_req = 1'b1;
    @(negedge clk);
    pmsi_req = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    int counts [10];
    for (int k = 0; k < 10; k++) begin
      int f;
      real expected;
      f = 10 * (k + 1);
      init = 1'b1;
      repeat (4) @(negedge clk);
      init = 1'b0;
      repeat (4) @(negedge clk);
      host_cmd(CMD_LD_ZK, 24'd0);
      host_cmd(CMD_LD_XI, 24'd0);
      host_cmd(CMD_LD_ZE, 24'd3000);
      host_cmd(CMD_LD_XE, 24'd1000);
      host_cmd(CMD_LD_DK, 24'd0);
      host_cmd(CMD_LD_WUD, 24'd4000);
      host_cmd(CMD_LD_SDK, 24'h040000);
      host_cmd(CMD_LINEAR, 24'(f) << 16);
      repeat (SETTLE) @(posedge clk);
      steps = 0;
      counting = 1;
      repeat (WINDOW) @(posedge clk);
      counting = 0;
      counts[k] = steps;
      expected = real'(WINDOW) / FR_PERIOD * f / 256.0;
      $display("feed data %3d: %0d steps in %0d cycles (expected %0.1f)", f, steps, WINDOW, expected);
      chk(real'(steps) > expected * 0.97 - 2.0 && real'(steps) < expected * 1.03 + 2.0,
          $sformatf("feed %0d rate", f));
      chk(!dist_end, "move still running");
    end
    for (int k = 1; k < 10; k++) begin
      real ratio;
      ratio = real'(counts[k]) / real'(counts[0]);
      chk(ratio > (k + 1) * 0.95 && ratio < (k + 1) * 1.05,
          $sformatf("rate at feed %0d is %0.2f times the rate at feed 10", 10 * (k + 1), ratio));
    end
    // Feed change during a move: the input register holds the feed data and
    // is read on every loop pass, so a new word changes the rate at once.
    begin
      int f1, f2, s1, s2;
      f1 = 20; f2 = 80;
      init = 1'b1;
      repeat (4) @(negedge clk);
      init = 1'b0;
      repeat (4) @(negedge clk);
      host_cmd(CMD_LD_ZK, 24'd0);
      host_cmd(CMD_LD_XI, 24'd0);
      host_cmd(CMD_LD_ZE, 24'd3000);
      host_cmd(CMD_LD_XE, 24'd1000);
      host_cmd(CMD_LD_DK, 24'd0);
      host_cmd(CMD_LD_WUD, 24'd4000);
      host_cmd(CMD_LD_SDK, 24'h040000);
      host_cmd(CMD_LINEAR, 24'(f1) << 16);
      repeat (SETTLE) @(posedge clk);
      steps = 0; counting = 1;
      repeat (WINDOW) @(posedge clk);
      counting = 0; s1 = steps;
      @(negedge clk); host_data = 24'(f2) << 16; fbstb = 1'b1;
      @(negedge clk); fbstb = 1'b0;
      repeat (SETTLE) @(posedge clk);
      steps = 0; counting = 1;
      repeat (WINDOW) @(posedge clk);
      counting = 0; s2 = steps;
      $display("feed changed %0d -> %0d during the move: %0d then %0d steps", f1, f2, s1, s2);
      chk(s1 == (WINDOW / FR_PERIOD) * f1 / 256 && s2 == (WINDOW / FR_PERIOD) * f2 / 256,
          $sformatf("feed change: %0d then %0d steps", s1, s2));
      chk(!dist_end, "move still running after the feed change");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
