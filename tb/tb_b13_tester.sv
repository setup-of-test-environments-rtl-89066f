// tb_b13_tester: the testbench plays the device-side checker. It checks the
// reset sequence (reset held RESTART_CYCLES clocks), the LFSR pattern
// against an independent LFSR, that an error counts one event, stores a
// record and restarts the run, that errors during the hold-off after a
// restart are ignored, that a full FIFO halts the test, and that the
// records read back in order.
`timescale 1ns / 1ps
module tb_b13_tester;
  import rad_test_pkg::*;
  localparam int RC = 8, DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic b13_rst_n;
  logic [9:0] pattern;
  logic err = 0;
  logic [7:0] fidx = 0;
  logic [9:0] fval = 0;
  logic running, halted, fifo_rd = 0, fifo_empty;
  logic [31:0] seu;
  b13_rec_t rec;
  logic [2:0] fifo_count;

  always #5 clk = ~clk;

  b13_tester #(.W(10), .FIFO_DEPTH(DEPTH), .RESTART_CYCLES(RC)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .stop_i(stop), .b13_rst_n_o(b13_rst_n),
    .pattern_o(pattern), .error_i(err), .faulty_idx_i(fidx), .faulty_val_i(fval),
    .running_o(running), .halted_o(halted), .seu_count_o(seu), .fifo_rd_i(fifo_rd),
    .fifo_data_o(rec), .fifo_empty_o(fifo_empty), .fifo_count_o(fifo_count));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measures how long the B13 reset stays low.
  int low_len = 0, last_low = 0;
  always @(posedge clk) begin
    if (!b13_rst_n) low_len++;
    else if (low_len != 0) begin last_low = low_len; low_len = 0; end
  end

  task automatic pulse_error(int i, int v);
    @(negedge clk) begin err = 1; fidx = 8'(i); fval = 10'(v); end
    @(negedge clk) err = 0;
  endtask

  initial begin
    logic [15:0] ref_lfsr;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(posedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (b13_rst_n);
    @(posedge clk);
    @(negedge clk);
    checks++; if (last_low < RC || !running) begin failures++; $display("reset length %0d", last_low); end
    // Pattern follows the LFSR x^16 + x^14 + x^13 + x^11 + 1.
    ref_lfsr = 16'hACE1;
    ref_lfsr = {ref_lfsr[14:0], ref_lfsr[15] ^ ref_lfsr[13] ^ ref_lfsr[12] ^ ref_lfsr[10]};
    for (int n = 0; n < 100; n++) begin
      checks++;
      if (pattern !== ref_lfsr[9:0]) begin failures++; $display("pattern %h vs %h", pattern, ref_lfsr[9:0]); break; end
      ref_lfsr = {ref_lfsr[14:0], ref_lfsr[15] ^ ref_lfsr[13] ^ ref_lfsr[12] ^ ref_lfsr[10]};
      @(negedge clk);
    end
    // First error: counted, recorded, run restarted.
    pulse_error(5, 10'h2A);
    checks++; if (seu != 1 || b13_rst_n) begin failures++; $display("first error: seu %0d rst %b", seu, b13_rst_n); end
    wait (b13_rst_n);
    @(posedge clk);
    @(negedge clk);
    checks++; if (last_low != RC) begin failures++; $display("restart length %0d", last_low); end
    // Error right after release is inside the hold-off: ignored.
    pulse_error(9, 1);
    checks++; if (seu != 1 || fifo_count != 1) begin failures++; $display("hold-off: seu %0d", seu); end
    // Three more errors fill the FIFO; then the test halts.
    for (int k = 0; k < 3; k++) begin
      repeat (10) @(posedge clk);
      wait (b13_rst_n);
      repeat (10) @(posedge clk);
      pulse_error(20 + k, 100 + k);
    end
    repeat (RC + 20) @(posedge clk);
    checks++; if (!halted || b13_rst_n || seu != 4 || fifo_count != 4) begin
      failures++; $display("halt: halted %b seu %0d count %0d", halted, seu, fifo_count); end
    // Read the records back in order.
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      checks++;
      if (k == 0 && (rec.idx != 5 || rec.value != 10'h2A)) begin failures++; $display("rec0 %0d %h", rec.idx, rec.value); end
      if (k > 0 && (rec.idx != 8'(19 + k) || rec.value != 10'(99 + k))) begin failures++; $display("rec%0d %0d %0d", k, rec.idx, rec.value); end
      fifo_rd = 1;
      @(negedge clk) fifo_rd = 0;
    end
    checks++; if (!fifo_empty) begin failures++; $display("fifo not empty"); end
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
    checks++; if (halted || running) begin failures++; $display("stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
