// tb_watchdog: runs the watchdog with a 10 kHz clock (10 clocks per ms) so
// that the 100 ms period is 1000 clocks. The testbench plays the device:
// it answers the first wakes with 15 ms done pulses, then stays silent.
// Checks: wake period 100 ms and length 20 ms, no reset while answered,
// a 30 ms reset at the end of an unanswered period, and a new period
// (wake) right after the reset.
`timescale 1ns / 1ps
module tb_watchdog;
  localparam int CPM = 10;                  // clocks per ms
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, done = 0;
  logic wake, dev_rst;
  logic answer = 1;

  always #5 clk = ~clk;

  watchdog #(.CLK_HZ(CPM * 1000), .PERIOD_MS(100), .WAKE_MS(20), .RST_MS(30)) dut (
    .clk(clk), .rst_n(rst_n), .done_i(done), .wake_o(wake), .dev_rst_o(dev_rst));

  // Device: answer each wake with a done pulse when it falls.
  always @(negedge wake) if (answer && rst_n) begin
    repeat (5) @(posedge clk);
    done <= 1;
    repeat (15 * CPM) @(posedge clk);
    done <= 0;
  end

  // Edge timestamps.
  int cyc = 0, wake_rise [$], wake_fall [$], rst_rise [$], rst_fall [$];
  logic wake_d = 0, rst_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && wake && !wake_d) wake_rise.push_back(cyc);
    if (rst_n && !wake && wake_d) wake_fall.push_back(cyc);
    if (rst_n && dev_rst && !rst_d) rst_rise.push_back(cyc);
    if (rst_n && !dev_rst && rst_d) rst_fall.push_back(cyc);
    wake_d <= wake;
    rst_d  <= dev_rst;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (450 * CPM) @(posedge clk);      // four answered periods
    checks++; if (rst_rise.size() != 0) begin failures++; $display("reset while answered"); end
    checks++; if (wake_rise.size() != 5) begin failures++; $display("wakes %0d", wake_rise.size()); end
    for (int i = 1; i < wake_rise.size(); i++) begin
      checks++; if (wake_rise[i] - wake_rise[i-1] != 100 * CPM) begin failures++; $display("period %0d", wake_rise[i] - wake_rise[i-1]); end
    end
    for (int i = 0; i < wake_fall.size(); i++) begin
      checks++; if (wake_fall[i] - wake_rise[i] != 20 * CPM) begin failures++; $display("wake length %0d", wake_fall[i] - wake_rise[i]); end
    end
    // Stop answering: the period that starts at wake_rise[5] (500 ms) ends unanswered.
    answer = 0;
    repeat (300 * CPM) @(posedge clk);
    checks++; if (rst_rise.size() < 1) begin failures++; $display("no reset"); end
    else begin
      checks++; if (rst_rise[0] - wake_rise[5] != 100 * CPM) begin failures++; $display("reset at %0d", rst_rise[0] - wake_rise[5]); end
      checks++; if (rst_fall[0] - rst_rise[0] != 30 * CPM) begin failures++; $display("reset length %0d", rst_fall[0] - rst_rise[0]); end
      checks++; if (wake_rise[6] != rst_fall[0]) begin failures++; $display("wake after reset at %0d vs %0d", wake_rise[6], rst_fall[0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
