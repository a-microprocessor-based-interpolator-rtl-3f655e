// tb_speed_profile: shape of the speed up/down.
//
// Two moves of the kind used in the design's speed up/down experiment. At a
// low feed over a long distance the step interval must fall, settle at the
// static feed interval for a while, and rise again after the whole distance
// has been fed. At a high feed over a short distance the speed-down must
// start before the static feed is reached: the shortest step interval stays
// above the static one. Both moves must end on the end point with the right
// number of steps. The speed accumulator is 6 bits (SDK = 2**18), so the
// time constant is 64 loop passes.
`timescale 1ns/1ps
module tb_speed_profile;
  import interp_pkg::*;
  import interp_fw_pkg::*;

  localparam int FR_PERIOD = 24;

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
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

  task automatic host_cmd(int cmd, logic [23:0] data);
    @(negedge clk);
    host_data = data; fbstb = 1'b1; ctrl_data = 8'(cmd); ctrl_wr = 1'b1;
    @(negedge clk);
    fbstb = 1'b0; ctrl_wr = 1'b0; pmsi_req = 1'b1;
    @(negedge clk);
    pmsi_req = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  // Runs a linear move and returns the step intervals.
  task automatic move(int ze, int xe, logic [23:0] fc, output int iv [$]);
    longint t, last;
    int n;
    iv.delete();
    host_cmd(CMD_LD_ZK, 24'd0);
    host_cmd(CMD_LD_XI, 24'd0);
    host_cmd(CMD_LD_ZE, 24'(ze));
    host_cmd(CMD_LD_XE, 24'(xe));
    host_cmd(CMD_LD_DK, 24'd0);
    host_cmd(CMD_LD_WUD, 24'(ze + xe));
    host_cmd(CMD_LD_SDK, 24'h040000);
    host_cmd(CMD_LINEAR, fc);
    t = 0; last = -1; n = 0;
    while (!dist_end) begin
      @(posedge clk);
      t++;
      if (x_pulse || z_pulse) begin
        n++;
        if (last >= 0) iv.push_back(int'(t - last));
        last = t;
      end
    end
    repeat (4) @(posedge clk);
    chk(n == ze + xe, $sformatf("steps %0d of %0d", n, ze + xe));
    chk(z_pos == 24'(ze) && x_pos == 24'(xe), "end point reached");
  endtask

  initial begin
    int iv [$];
    int steady_iv, n_steady, min_iv, first_min, last_min;
    repeat (4) @(negedge clk);
    init = 1'b0;
    repeat (4) @(negedge clk);

    // Low feed, long move: Fc = 1/8 of the reference rate -> 192-cycle steps.
    steady_iv = FR_PERIOD * 8;
    move(90, 30, 24'h200000, iv);
    n_steady = 0; min_iv = 1 << 30; first_min = -1; last_min = -1;
    foreach (iv[i]) begin
      if (iv[i] >= steady_iv - 16 && iv[i] <= steady_iv + 16) begin
        n_steady++;
        if (first_min < 0) first_min = i;
        last_min = i;
      end
      if (iv[i] < min_iv) min_iv = iv[i];
    end
    $display("low feed: first interval %0d, shortest %0d, last %0d, %0d near static %0d",
             iv[0], min_iv, iv[iv.size()-1], n_steady, steady_iv);
    chk(iv[0] > steady_iv + 64, "starts slowly (speed up)");
    chk(n_steady >= 40, "reaches and holds the static feed");
    chk(iv[iv.size()-1] > 2 * steady_iv, "ends slowly (speed down)");
    chk(first_min > 3 && last_min < iv.size() - 4, "plateau lies between ramps");

    // High feed, short move: Fc = 1/2 of the reference rate -> 48-cycle steps.
    steady_iv = FR_PERIOD * 2;
    move(12, 6, 24'h800000, iv);
    min_iv = 1 << 30;
    foreach (iv[i]) if (iv[i] < min_iv) min_iv = iv[i];
    $display("high feed: shortest interval %0d, static would be %0d", min_iv, steady_iv);
    chk(min_iv > steady_iv + 16, "speed down begins before the static feed is reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
