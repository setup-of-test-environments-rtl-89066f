// tb_bram_test_tester: the testbench plays a 4 x 32-word device memory
// with upset injection. It checks that the tester writes every word with
// the chosen pattern, scans periodically without events on a clean
// memory, counts a single and a double upset as events with the right bit
// count and location, and rewrites the memory after an event.
`timescale 1ns / 1ps
module tb_bram_test_tester;
  import rad_test_pkg::*;
  localparam int NB = 4, D = 32, DW = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  pattern_e pat = PAT_TOGGLE;
  logic [31:0] interval = 50;
  logic [1:0] blk;
  logic [4:0] addr;
  logic we, running;
  pattern_e wpat;
  logic [DW-1:0] rdata;
  logic [31:0] scans, events, bit_errors;
  logic [1:0] last_blk;
  logic [4:0] last_addr;

  // Device model.
  logic [DW-1:0] mem [NB * D];
  int writes = 0;
  int inj_idx = -1;
  logic [DW-1:0] inj_mask;
  always @(posedge clk) begin
    if (we && rst_n) begin
      for (int i = 0; i < DW; i++) mem[{blk, addr}][i] <= (wpat == PAT_ONE) ? 1'b1 : (wpat == PAT_TOGGLE) ? 1'(i % 2) : 1'b0;
      writes++;
    end
    rdata <= mem[{blk, addr}];
    if (inj_idx >= 0) begin
      mem[inj_idx] <= mem[inj_idx] ^ inj_mask;
      inj_idx <= -1;
    end
  end

  always #5 clk = ~clk;

  bram_test_tester #(.N_BLOCKS(NB), .DEPTH(D), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .stop_i(stop), .pattern_i(pat),
    .interval_i(interval), .blk_o(blk), .addr_o(addr), .we_o(we), .wpat_o(wpat),
    .rdata_i(rdata), .running_o(running), .scans_o(scans), .events_o(events),
    .bit_errors_o(bit_errors), .last_blk_o(last_blk), .last_addr_o(last_addr));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_scans(int n);
    int s0;
    s0 = scans;
    while (scans < s0 + n) @(posedge clk);
  endtask

  initial begin
    int w0;
    for (int i = 0; i < NB * D; i++) mem[i] = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait_scans(3);
    checks++; if (writes != NB * D) begin failures++; $display("writes %0d", writes); end
    checks++; if (events != 0 || bit_errors != 0) begin failures++; $display("clean: ev %0d", events); end
    checks++; if (mem[77] !== 40'hAA_AAAA_AAAA) begin failures++; $display("pattern %h", mem[77]); end
    // Single upset in block 2, word 9.
    w0 = writes;
    @(negedge clk) begin inj_idx = 2 * D + 9; inj_mask = 40'h1; end
    wait_scans(2);
    checks++; if (events != 1 || bit_errors != 1 || last_blk != 2 || last_addr != 9) begin
      failures++; $display("single: ev %0d bits %0d at %0d/%0d", events, bit_errors, last_blk, last_addr); end
    checks++; if (writes != w0 + NB * D) begin failures++; $display("rewrite %0d", writes - w0); end
    checks++; if (mem[2 * D + 9] !== 40'hAA_AAAA_AAAA) begin failures++; $display("not restored"); end
    // Double-bit upset in block 0, word 31.
    @(negedge clk) begin inj_idx = 31; inj_mask = 40'h30_0000_0000; end
    wait_scans(2);
    checks++; if (events != 2 || bit_errors != 3 || last_blk != 0 || last_addr != 31) begin
      failures++; $display("double: ev %0d bits %0d at %0d/%0d", events, bit_errors, last_blk, last_addr); end
    // Stop, then the all-ones pattern.
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
    checks++; if (running) begin failures++; $display("stop"); end
    pat = PAT_ONE;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait_scans(2);
    checks++; if (mem[5] !== '1 || events != 2) begin failures++; $display("ones: %h ev %0d", mem[5], events); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
