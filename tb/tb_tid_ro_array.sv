// tb_tid_ro_array: selects each of six rings in turn and measures its
// period from the selected output; the period must match 2 * n * t with
// each ring's own stage delay (spread of up to +/-9 percent), rings must
// differ, and an out-of-range selection must return 0.
`timescale 1ns / 1ps
module tb_tid_ro_array;
  localparam int N = 6, S = 3, SP = 9;
  localparam real T = 20.0;
  int checks = 0, failures = 0;
  logic en = 0;
  logic [7:0] sel = 0;
  logic ro;
  realtime t_last = 0, period = 0;
  int rises = 0;

  tid_ro_array #(.N_RO(N), .STAGES(S), .STAGE_DELAY_NS(T), .SPREAD_PCT(SP)) dut (
    .enable_i(en), .sel_i(sel), .ro_o(ro));

  always @(posedge ro) begin
    if (rises > 0) period = $realtime - t_last;
    t_last = $realtime;
    rises++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real expect_p, prev_p;
    int ofs;
    en = 1;
    prev_p = 0;
    for (int i = 0; i < N; i++) begin
      sel = 8'(i);
      rises = 0;
      #2000;
      ofs = (i * 37) % (2 * SP + 1) - SP;
      expect_p = 2.0 * S * T * (100.0 + ofs) / 100.0;
      checks++;
      if (rises < 5 || period < expect_p - 0.01 || period > expect_p + 0.01) begin
        failures++; $display("ring %0d period %f expected %f", i, period, expect_p);
      end
      checks++; if (period == prev_p) begin failures++; $display("ring %0d same as previous", i); end
      prev_p = period;
    end
    sel = 8'(N + 3);
    #1;
    rises = 0;
    #2000;
    checks++; if (ro !== 1'b0 || rises != 0) begin failures++; $display("out of range select"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
