// ff_chain_wsr: device-under-test design of the flip-flop test.
//
// N_CHAINS shift registers of CHAIN_LEN flip-flops each take the same
// pattern bit at stage 0 and shift it one stage per clock. Reading a whole
// chain in parallel is not practical, so every chain has a window shift
// register (WSR): on a clock with win_load_i high it copies the last WIN_W
// stages of its chain, and only these windows go back to the tester.
// window_o[c][WIN_W-1] is the last stage of chain c. The windows change one
// clock after the clock that samples win_load_i.
//
// Following the described test, a static 0 or 1 pattern gives constant
// windows, and an alternating pattern with window loads every WIN_W clocks
// (WIN_W even) gives constant windows too, so any change seen by the tester
// is an upset somewhere in a chain. The document drives the window
// registers from the load signal as a clock; here they share the chain
// clock and use win_load_i as an enable. Chain count, length and window
// width are this design's choices. The chains have no reset: the tester
// flushes them with the pattern before it checks anything.
`timescale 1ns / 1ps
module ff_chain_wsr #(
  parameter int unsigned N_CHAINS  = 4,
  parameter int unsigned CHAIN_LEN = 4096,
  parameter int unsigned WIN_W     = 16
) (
  input  logic             clk,
  input  logic             pattern_i,
  input  logic             win_load_i,
  output logic [WIN_W-1:0] window_o [N_CHAINS]
);

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_chain
    logic [CHAIN_LEN-1:0] stages;

    always_ff @(posedge clk) begin
      stages <= {stages[CHAIN_LEN-2:0], pattern_i};
      if (win_load_i) window_o[c] <= stages[CHAIN_LEN-1 -: WIN_W];
    end
  end

endmodule
