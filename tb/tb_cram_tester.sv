// tb_cram_tester: the testbench plays an XOR chain whose output follows
// its inputs after a 37-clock propagation delay and can be upset on
// purpose. Checks: no event after settling at either level, an injected
// flip is timed as 37 clocks plus the two-clock synchroniser (within one
// clock), an upset counts one event and stops the test, and start
// restarts it.
`timescale 1ns / 1ps
module tb_cram_tester;
  localparam int DLY = 37;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, level = 0, inject = 0;
  logic st, fi, running, valid;
  logic [31:0] events, prop;
  logic upset = 0;
  logic [DLY-1:0] pipe = '0;
  logic chain;

  always #5 clk = ~clk;
  // Chain model: 13 stages' parity (odd length) delayed by DLY clocks.
  always @(posedge clk) pipe <= {pipe[DLY-2:0], fi ^ st ^ upset};
  assign chain = pipe[DLY-1];

  cram_tester #(.SETTLE_CYCLES(100)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .stop_i(stop), .level_i(level),
    .inject_i(inject), .static_o(st), .first_o(fi), .chain_i(chain),
    .running_o(running), .events_o(events), .prop_cycles_o(prop), .prop_valid_o(valid));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    level = 1;
    pulse(start);
    repeat (300) @(posedge clk);
    checks++; if (!running || events != 0 || st !== 1 || fi !== 1) begin failures++; $display("settle: ev %0d", events); end
    // Injection: propagation time measured.
    pulse(inject);
    repeat (DLY + 20) @(posedge clk);
    checks++; if (!valid || prop < DLY + 1 || prop > DLY + 4) begin failures++; $display("prop %0d valid %b", prop, valid); end
    repeat (300) @(posedge clk);
    checks++; if (!running || events != 0 || fi !== 1) begin failures++; $display("after inject: ev %0d fi %b", events, fi); end
    // Upset: counted, test stops.
    @(negedge clk) upset = 1;
    repeat (DLY + 10) @(posedge clk);
    checks++; if (events != 1 || running) begin failures++; $display("upset: ev %0d running %b", events, running); end
    // "Reconfigure" (clear the upset) and restart at level 0.
    @(negedge clk) begin upset = 0; level = 0; end
    pulse(start);
    repeat (400) @(posedge clk);
    checks++; if (!running || events != 1 || st !== 0) begin failures++; $display("restart: ev %0d", events); end
    pulse(stop);
    checks++; if (running) begin failures++; $display("stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
