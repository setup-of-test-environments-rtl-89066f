// tb_ff_test_tester: the testbench plays the device - two 40-stage chains
// with 8-bit windows - and flips chain bits on purpose. It checks that the
// tester fills the chains, loads the windows every 8 clocks, counts no
// event without upsets in all three pattern modes, and counts the flipped
// bits of injected single and double upsets.
`timescale 1ns / 1ps
module tb_ff_test_tester;
  import rad_test_pkg::*;
  localparam int NC = 2, L = 40, W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  pattern_e mode = PAT_TOGGLE;
  logic pattern, load, running;
  logic [W-1:0] window [NC];
  logic [31:0] events, bits;
  logic [7:0] last_chain;

  // Device model with bit-flip injection.
  logic [L-1:0] chain [NC];
  int inj_chain = -1, inj_stage = 0, inj_n = 1;
  always @(posedge clk) begin
    for (int c = 0; c < NC; c++) begin
      chain[c] <= {chain[c][L-2:0], pattern};
      if (load) window[c] <= chain[c][L-1 -: W];
    end
    if (inj_chain >= 0) begin
      for (int k = 0; k < inj_n; k++) chain[inj_chain][inj_stage+k+1] <= chain[inj_chain][inj_stage+k] ^ 1'b1;
      inj_chain <= -1;
    end
  end

  always #5 clk = ~clk;

  ff_test_tester #(.N_CHAINS(NC), .CHAIN_LEN(L), .WIN_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .stop_i(stop), .mode_i(mode),
    .pattern_o(pattern), .win_load_o(load), .window_i(window), .running_o(running),
    .flip_events_o(events), .flip_bits_o(bits), .last_chain_o(last_chain));

  // Window loads must come exactly every W clocks.
  int last_load = -1, cyc = 0, load_errs = 0, n_loads = 0;
  always @(posedge clk) begin
    cyc++;
    if (load) begin
      if (last_load >= 0 && cyc - last_load != W) load_errs++;
      last_load = cyc;
      n_loads++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_mode(pattern_e m);
    @(negedge clk) begin mode = m; start = 1; end
    @(negedge clk) start = 0;
    last_load = -1;
    repeat (L + W + 200) @(posedge clk);
  endtask

  task automatic stop_test();
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin chain[c] = '0; window[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Toggle pattern, no upset.
    run_mode(PAT_TOGGLE);
    checks++; if (!running || events != 0) begin failures++; $display("toggle clean: ev=%0d", events); end
    checks++; if (n_loads < 20 || load_errs != 0) begin failures++; $display("loads %0d errs %0d", n_loads, load_errs); end
    // Single upset in chain 1.
    @(negedge clk) begin inj_chain = 1; inj_stage = 5; inj_n = 1; end
    repeat (L + 3 * W) @(posedge clk);
    checks++; if (events != 1 || bits != 1 || last_chain != 1) begin failures++; $display("single: ev=%0d bits=%0d ch=%0d", events, bits, last_chain); end
    stop_test();
    checks++; if (running) begin failures++; $display("stop"); end
    // Static one, double upset in chain 0.
    run_mode(PAT_ONE);
    checks++; if (events != 1) begin failures++; $display("static1 clean: ev=%0d", events); end
    checks++; if (pattern !== 1'b1) begin failures++; $display("pattern not 1"); end
    @(negedge clk) begin inj_chain = 0; inj_stage = 3; inj_n = 2; end
    repeat (L + 3 * W) @(posedge clk);
    checks++; if (bits != 3 || events < 2 || events > 3 || last_chain != 0) begin failures++; $display("double: ev=%0d bits=%0d", events, bits); end
    stop_test();
    // Static zero, no upset.
    run_mode(PAT_ZERO);
    repeat (200) @(posedge clk);
    checks++; if (bits != 3 || pattern !== 1'b0) begin failures++; $display("static0: bits=%0d", bits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
