// tb_ring_oscillator: checks the behavioural ring model against
// f = 1 / (2 * n * t): period of a 5-stage ring with 10 ns stages must be
// 100 ns; the output must stay 0 while disabled and restart when enabled.
`timescale 1ns / 1ps
module tb_ring_oscillator;
  int checks = 0, failures = 0;
  logic en = 0;
  logic ro;
  realtime last_rise = 0, period = 0;
  int rises = 0;

  ring_oscillator #(.STAGES(5), .STAGE_DELAY_NS(10.0)) dut (.enable_i(en), .ro_o(ro));

  always @(posedge ro) begin
    if (rises > 0) period = $realtime - last_rise;
    last_rise = $realtime;
    rises++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500;
    checks++; if (ro !== 1'b0 || rises != 0) begin failures++; $display("oscillates while disabled"); end
    en = 1;
    #2000;
    checks++; if (rises < 15 || rises > 21) begin failures++; $display("rises %0d", rises); end
    checks++; if (period < 99.9 || period > 100.1) begin failures++; $display("period %f", period); end
    en = 0;
    #200;
    rises = 0;
    #1000;
    checks++; if (ro !== 1'b0 || rises != 0) begin failures++; $display("did not stop"); end
    en = 1;
    #1000;
    checks++; if (rises < 8) begin failures++; $display("no restart %0d", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
