// tb_watchdog_tester: the tester runs with 100 clocks per ms; the
// testbench plays the watchdog (100 ms period, 20 ms wake, 30 ms reset
// when unanswered) and can misbehave: stop waking, skip a due reset, or
// reset although answered. Checks the 15 ms done pulses that start at the
// wake's falling edge, the every-third skip, the counted resets, and that
// each misbehaviour is counted as its own failure with a reconfiguration
// request and a watchdog restart.
`timescale 1ns / 1ps
module tb_watchdog_tester;
  localparam int CPM = 100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [7:0] skip_every = 3;
  logic wd_rst_n, done, wake = 0, dev_rst = 0;
  logic running, reconfig;
  logic [31:0] wakes, skips, resets_ok, f_wake, f_reset, f_spur;
  int reconfigs = 0;

  // Misbehaviour switches of the watchdog model.
  bit dead = 0, no_reset = 0, spurious = 0;

  always #5 clk = ~clk;

  watchdog_tester #(.CLK_HZ(CPM * 1000), .DONE_MS(15), .TIMEOUT_MS(150), .INIT_CYCLES(10)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .stop_i(stop), .skip_every_i(skip_every),
    .wd_rst_n_o(wd_rst_n), .done_o(done), .wake_i(wake), .dev_rst_i(dev_rst),
    .running_o(running), .reconfig_req_o(reconfig), .wakes_o(wakes), .skips_o(skips),
    .resets_ok_o(resets_ok), .fail_no_wake_o(f_wake), .fail_no_reset_o(f_reset),
    .fail_spurious_o(f_spur));

  always @(posedge clk) if (rst_n && reconfig) reconfigs++;

  // Done pulse measurement.
  int done_len = 0, done_pulses = 0, bad_done = 0, wake_fall_cyc = 0, cyc = 0;
  logic done_d = 0, wake_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (!wake && wake_d) wake_fall_cyc = cyc;
    if (done && !done_d && cyc - wake_fall_cyc > 10) bad_done++;
    if (!rst_n) done_len = 0;
    else if (done) done_len++;
    else if (done_d) begin
      done_pulses++;
      if (done_len != 15 * CPM) begin bad_done++; $display("done length %0d", done_len); end
      done_len = 0;
    end
    done_d <= done;
    wake_d <= wake;
  end

  // Watchdog model.
  initial forever begin
    bit answered;
    wake = 0; dev_rst = 0;
    wait (wd_rst_n);
    while (wd_rst_n) begin
      answered = 0;
      if (!dead) wake = 1;
      for (int i = 0; i < 100 * CPM && wd_rst_n; i++) begin
        @(posedge clk);
        if (i == 20 * CPM) wake = 0;
        if (done) answered = 1;
      end
      wake = 0;
      if (!wd_rst_n) break;
      if ((!answered && !no_reset && !dead) || (answered && spurious)) begin
        dev_rst = 1;
        repeat (30 * CPM) @(posedge clk);
        dev_rst = 0;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ms(int n);
    repeat (n * CPM) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    // Nine wakes: the 3rd, 6th and 9th are left unanswered.
    ms(1000);
    checks++; if (wakes < 9 || skips != wakes / 3) begin failures++; $display("wakes %0d skips %0d", wakes, skips); end
    checks++; if (resets_ok < skips - 1 || f_wake + f_reset + f_spur != 0 || reconfigs != 0) begin
      failures++; $display("resets %0d fails %0d %0d %0d", resets_ok, f_wake, f_reset, f_spur); end
    checks++; if (done_pulses < 5 || bad_done != 0) begin failures++; $display("done pulses %0d bad %0d", done_pulses, bad_done); end
    // Watchdog stops waking.
    dead = 1;
    ms(300);
    checks++; if (f_wake < 1 || reconfigs < 1) begin failures++; $display("no-wake fail %0d reconfig %0d", f_wake, reconfigs); end
    dead = 0;
    ms(200);
    // Watchdog misses a due reset.
    begin
      int f0, r0;
      f0 = f_reset; r0 = reconfigs;
      no_reset = 1;
      ms(500);
      checks++; if (f_reset <= f0 || reconfigs <= r0) begin failures++; $display("no-reset fail %0d", f_reset); end
      no_reset = 0;
    end
    // Watchdog resets although answered.
    skip_every = 0;
    ms(150);
    begin
      int s0;
      s0 = f_spur;
      spurious = 1;
      ms(300);
      checks++; if (f_spur <= s0) begin failures++; $display("spurious fail %0d", f_spur); end
      spurious = 0;
    end
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
    @(negedge clk);
    checks++; if (running || wd_rst_n) begin failures++; $display("stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
