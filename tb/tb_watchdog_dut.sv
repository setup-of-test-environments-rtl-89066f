// tb_watchdog_dut: runs the 3-copy (TMR) and 12-copy watchdog designs side
// by side with a fast clock (10 clocks per ms) and an unanswered device.
// The voted outputs must show 20 ms wakes every 100 ms period and a 30 ms
// reset after each unanswered period; an upset forced onto one copy's
// outputs must be outvoted but flagged by the mismatch output.
`timescale 1ns / 1ps
module tb_watchdog_dut;
  localparam int CPM = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, done = 0;
  logic wake3, rst3, mm3, wake12, rst12, mm12;

  always #5 clk = ~clk;

  watchdog_dut #(.N_COPIES(3), .CLK_HZ(CPM * 1000)) dut3 (
    .clk(clk), .rst_n(rst_n), .done_i(done), .wake_o(wake3), .dev_rst_o(rst3), .mismatch_o(mm3));
  watchdog_dut #(.N_COPIES(12), .CLK_HZ(CPM * 1000)) dut12 (
    .clk(clk), .rst_n(rst_n), .done_i(done), .wake_o(wake12), .dev_rst_o(rst12), .mismatch_o(mm12));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs from elapsed time since reset release (unanswered device):
  // cycle of 130 ms = 100 ms period (wake in the first 20 ms) + 30 ms reset.
  int t = 0, bad = 0, mm_seen = 0;
  logic exp_wake, exp_rst;
  always @(posedge clk) if (rst_n) begin
    #1;
    t++;
    exp_wake = ((t - 1) % (130 * CPM)) < 20 * CPM;
    exp_rst  = ((t - 1) % (130 * CPM)) >= 100 * CPM;
    if (wake3 !== exp_wake || rst3 !== exp_rst || wake12 !== exp_wake || rst12 !== exp_rst) begin
      if (bad < 5) $display("t=%0d wake %b/%b rst %b/%b expected %b %b", t, wake3, wake12, rst3, rst12, exp_wake, exp_rst);
      bad++;
    end
    if (mm3 && mm12) mm_seen++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (150 * CPM) @(posedge clk);
    checks++; if (mm_seen != 0) begin failures++; $display("mismatch without upset"); end
    // Upset one copy of each design for 50 clocks.
    force dut3.outs[1]   = 2'b11;
    force dut12.outs[7]  = 2'b11;
    force dut12.outs[8]  = 2'b11;
    repeat (50) @(posedge clk);
    release dut3.outs[1];
    release dut12.outs[7];
    release dut12.outs[8];
    repeat (300 * CPM) @(posedge clk);
    checks++; if (bad != 0) begin failures++; $display("%0d wrong cycles", bad); end
    checks++; if (mm_seen < 40) begin failures++; $display("mismatch seen %0d", mm_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
