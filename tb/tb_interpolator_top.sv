// tb_interpolator_top: end-to-end test of the interpolator.
//
// Drives the host interface like the main computer would: each datum is put in
// the input register and taken by its data-accept command, then a linear or
// circular command is started with PMSI while a reference pulse train runs on
// Fr. A reference model of the discriminant method (written here from the
// equations, not from the firmware) predicts the axis of every output step;
// the test checks each pulse's axis, that no point is more than one length
// unit off the line or arc, the position registers, the final end point, the
// number of steps, the distribution-end strobe, the Sample hold and that
// every interval between steps is a whole number of 16-cycle loop passes
// (addition frequency = clock / 16). It also counts the mechanisms seen: feed
// pulses from the feedrate accumulator, reference pulses that gave none, speed
// up, steady feed, speed down, both axis-end guards, both axes and both
// command types, and fails any that never occurred.
`timescale 1ns/1ps
module tb_interpolator_top;
  import interp_pkg::*;
  import interp_fw_pkg::*;

  localparam int FR_PERIOD = 24;          // clock cycles per reference pulse
  localparam logic [23:0] SDK_N6 = 24'h040000;  // 2**(24-6): 6-bit speed accumulator

  logic clk = 1'b0;
  logic init = 1'b1;
  logic fr = 1'b0;
  logic [23:0] host_data = '0;
  logic fbstb = 1'b0;
  logic [7:0] ctrl_data = '0;
  logic ctrl_wr = 1'b0, pmsi_req = 1'b0, sample = 1'b0;
  logic [23:0] x_pos, z_pos;
  logic x_pulse, z_pulse, dist_end;

  interpolator_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference pulse generator
  bit fr_en = 0;
  initial forever begin
    @(posedge clk);
    if (fr_en) begin
      fr <= 1'b1;
      repeat (2) @(posedge clk);
      fr <= 1'b0;
      repeat (FR_PERIOD - 3) @(posedge clk);
    end
  end

  // ---------------- reference model and monitors ----------------
  bit circ;
  longint mz, mx, mze, mxe, md;
  int n_steps, n_x, n_z;
  int n_guard_z, n_guard_x, n_up, n_down, n_steady;
  longint last_pulse, last_interval;
  int check_axis_at;   // cycles until the stepped axis register is checked
  bit check_x;
  longint sample_until;
  int n_feed, n_fr_nofeed, n_clear_ipulse;
  int n_end;
  int min_interval;

  function automatic bit model_next_is_x();
    if (!circ) begin
      if (md >= 0) begin
        if (mze <= mz) begin n_guard_z++; return 1; end
        return 0;
      end
      if (mxe <= mx) begin n_guard_x++; return 0; end
      return 1;
    end else begin
      if (md >= 0) begin
        if (mz <= mze) begin n_guard_z++; return 1; end
        return 0;
      end
      if (mxe <= mx) begin n_guard_x++; return 0; end
      return 1;
    end
  endfunction

  task automatic model_step(bit is_x);
    if (!circ) begin
      if (is_x) begin md += mze; mx++; end
      else      begin md -= mxe; mz++; end
    end else begin
      if (is_x) begin md += 2*mx + 1; mx++; end
      else      begin mz--; md -= 2*mz + 1; end
    end
  endtask

  bit running;
  always @(posedge clk) if (running) begin
    if (x_pulse || z_pulse) begin
      bit exp_x;
      longint iv;
      check(!(x_pulse && z_pulse), "both axis pulses at once");
      exp_x = model_next_is_x();
      check(x_pulse == exp_x, $sformatf("step %0d axis: got %s expected %s (D=%0d z=%0d x=%0d)",
            n_steps, x_pulse ? "X" : "Z", exp_x ? "X" : "Z", md, mz, mx));
      model_step(x_pulse);
      // path error: no point is more than one length unit off the path
      if (!circ) begin
        check(real'(md) * real'(md) <= real'(mze * mze + mxe * mxe),
              $sformatf("point (%0d,%0d) more than one unit from the line", mz, mx));
      end else begin
        real rad, r_end;
        rad = $sqrt(real'(mz * mz + mx * mx));
        r_end = $sqrt(real'(mze * mze + mxe * mxe));
        check(rad >= r_end - 1.0 - 1e-9 && rad <= r_end + 1.0 + 1e-9,
              $sformatf("point (%0d,%0d) more than one unit from the arc", mz, mx));
      end
      if (x_pulse) n_x++; else n_z++;
      n_steps++;
      if (n_steps > 1) begin
        iv = cycle - last_pulse;
        check(iv % LOOP_CYCLES == 0 && iv >= LOOP_CYCLES,
              $sformatf("step interval %0d is not a whole number of loop passes", iv));
        if (iv < min_interval) min_interval = int'(iv);
        if (n_steps > 2) begin
          if (iv < last_interval) n_up++;
          else if (iv > last_interval) n_down++;
          else n_steady++;
        end
        last_interval = iv;
      end
      last_pulse = cycle;
      check_axis_at = 4;
      check_x = x_pulse;
    end
    if (check_axis_at > 0) begin
      check_axis_at--;
      if (check_axis_at == 0 && cycle > sample_until + 4) begin
        if (check_x) check(x_pos == 24'(mx), $sformatf("x_pos %0d, model %0d", x_pos, mx));
        else         check(z_pos == 24'(mz), $sformatf("z_pos %0d, model %0d", z_pos, mz));
      end
    end
    if (dist_end) n_end++;
  end

  // Feed pulses and reference pulses without feed, seen on the strobes that
  // clear Ipulse (the firmware's part A).
  always @(posedge clk) if (running && dut.dsel[IO_CLR_IPULSE]) begin
    n_clear_ipulse++;
  end

  // ---------------- host side ----------------
  task automatic host_cmd(int cmd, logic [23:0] data);
    @(negedge clk);
    host_data = data; fbstb = 1'b1;
    ctrl_data = 8'(cmd); ctrl_wr = 1'b1;
    @(negedge clk);
    fbstb = 1'b0; ctrl_wr = 1'b0; pmsi_req = 1'b1;
    @(negedge clk);
    pmsi_req = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  task automatic run_move(bit is_circ, longint zs, longint xs, longint ze, longint xe,
                          longint d0, longint wud, logic [23:0] fc, bit do_sample);
    longint t0, t_end;
    bit held;
    logic [23:0] xh, zh;
    circ = is_circ;
    mz = zs; mx = xs; mze = ze; mxe = xe; md = d0;
    n_steps = 0; n_end = 0; min_interval = 1 << 30;
    host_cmd(CMD_LD_ZK, 24'(zs));
    host_cmd(CMD_LD_XI, 24'(xs));
    host_cmd(CMD_LD_ZE, 24'(ze));
    host_cmd(CMD_LD_XE, 24'(xe));
    host_cmd(CMD_LD_DK, 24'(d0));
    host_cmd(CMD_LD_WUD, 24'(wud));
    host_cmd(CMD_LD_SDK, SDK_N6);
    running = 1;
    fr_en = 1;
    t0 = cycle;
    host_cmd(is_circ ? CMD_CIRCULAR : CMD_LINEAR, fc);
    held = 0;
    sample_until = -100;
    while (n_end == 0) begin
      @(posedge clk);
      if (do_sample && !held && n_steps == wud / 2) begin
        // hold the position registers for a while and check they do not move
        @(negedge clk); sample = 1'b1;
        @(negedge clk); xh = x_pos; zh = z_pos;
        repeat (100) begin
          @(negedge clk);
          if (x_pos != xh || z_pos != zh) begin
            check(0, "position changed while Sample was high");
          end
        end
        check(x_pos == xh && z_pos == zh, "positions held by Sample");
        sample = 1'b0;
        sample_until = cycle;
        held = 1;
      end
    end
    t_end = cycle;
    fr_en = 0;
    running = 0;
    repeat (20) @(posedge clk);
    check(n_steps == wud, $sformatf("steps %0d, expected %0d", n_steps, wud));
    check(mz == ze && mx == xe, $sformatf("model end (%0d,%0d) not (%0d,%0d)", mz, mx, ze, xe));
    check(z_pos == 24'(ze), $sformatf("final z_pos %0d expected %0d", z_pos, ze));
    check(x_pos == 24'(xe), $sformatf("final x_pos %0d expected %0d", x_pos, xe));
    check(n_end == 1, "exactly one distribution-end strobe");
    $display("move %s (%0d,%0d)->(%0d,%0d): %0d steps in %0d cycles, shortest interval %0d",
             is_circ ? "circular" : "linear", zs, xs, ze, xe, n_steps, t_end - t0, min_interval);
  endtask

  initial begin
    int fr_count;
    repeat (4) @(posedge clk);
    init = 1'b0;
    repeat (4) @(posedge clk);

    // Linear move from the origin; feed 1/4 of the reference rate, so the
    // steady step interval is FR_PERIOD*4 = 96 cycles (6 loop passes).
    run_move(0, 0, 0, 37, 23, 0, 60, 24'h400000, 0);
    check(min_interval >= 80 && min_interval <= 112,
          $sformatf("steady interval %0d, expected about 96", min_interval));
    // Vertical line: the Z-end guard must force X steps.
    run_move(0, 0, 0, 0, 5, 0, 5, 24'h800000, 0);
    // Horizontal line with a negative starting discriminant: the X-end guard
    // must force Z steps.
    run_move(0, 0, 0, 6, 0, -1, 6, 24'h800000, 0);
    // Quarter circle, counter-clockwise, radius 20, with a Sample hold.
    run_move(1, 20, 0, 0, 20, 0, 40, 24'h400000, 1);
    // Short arc ending on the X axis limit first.
    run_move(1, 12, 5, 5, 12, 0, 14, 24'h800000, 0);
    // The two moves of the published results: a 14-step line (9 by 5) and a
    // 12-step quarter circle of radius 6.
    run_move(0, 0, 0, 9, 5, 0, 14, 24'h400000, 0);
    run_move(1, 6, 0, 0, 6, 0, 12, 24'h400000, 0);

    $display("mechanisms: X %0d Z %0d guardZ %0d guardX %0d up %0d steady %0d down %0d Ipulse-clears %0d",
             n_x, n_z, n_guard_z, n_guard_x, n_up, n_steady, n_down, n_clear_ipulse);
    check(n_x > 0, "X steps seen");
    check(n_z > 0, "Z steps seen");
    check(n_guard_z > 0, "Z-end guard seen");
    check(n_guard_x > 0, "X-end guard seen");
    check(n_up > 0, "speed up seen");
    check(n_steady > 0, "steady feed seen");
    check(n_down > 0, "speed down seen");
    check(n_clear_ipulse > 200, "reference pulses consumed by feedrate control");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
