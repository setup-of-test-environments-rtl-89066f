// tb_ff_chain_wsr: feeds random pattern bits into three short chains and
// pulses the window load at random clocks. A queue of every pattern bit
// driven so far gives the expected window: after the load at clock t the
// window holds the bits that entered CHAIN_LEN-WIN_W+1 .. CHAIN_LEN clocks
// earlier, oldest in the top bit.
`timescale 1ns / 1ps
module tb_ff_chain_wsr;
  localparam int NC = 3, L = 40, W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, pattern = 0, load = 0;
  logic [W-1:0] window [NC];
  bit hist [$];               // hist[0] = most recent bit shifted in

  always #5 clk = ~clk;

  ff_chain_wsr #(.N_CHAINS(NC), .CHAIN_LEN(L), .WIN_W(W)) dut (
    .clk(clk), .pattern_i(pattern), .win_load_i(load), .window_o(window));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    int loads = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      pattern = 1'($urandom);
      load    = (t > L + 2) && ($urandom_range(0, 5) == 0);
      @(posedge clk);
      // The chain shifts in `pattern`; the window samples the chain before this edge.
      if (load) begin
        for (int b = 0; b < W; b++) exp[b] = hist[L - W + b];
        #1;
        loads++;
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (window[c] !== exp) begin
            failures++;
            $display("t=%0d chain %0d window %b expected %b", t, c, window[c], exp);
          end
        end
      end
      hist.push_front(pattern);
    end
    checks++; if (loads < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
