// pll_lock_monitor: tester side of the PLL test.
//
// Each PLL of the device under test is fed with the tester clock and
// returns its lock signal. The lock signals arrive asynchronously, so each
// passes a two-flop synchroniser; a falling edge of the synchronised lock
// while arm_i is high counts one loss of lock for that PLL. Counters
// saturate at all ones and clear with rst_n. Four PLLs follow the device
// (the GateMate has four); synchroniser and counter width are this design's
// choices. locked_o shows the synchronised lock state two cycles late.
`timescale 1ns / 1ps
module pll_lock_monitor #(
  parameter int unsigned N_PLL = 4,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arm_i,
  input  logic [N_PLL-1:0] lock_i,
  output logic [N_PLL-1:0] locked_o,
  output logic [CNT_W-1:0] loss_cnt_o [N_PLL]
);

  logic [N_PLL-1:0] sync1, sync2, prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      prev  <= '0;
      for (int i = 0; i < int'(N_PLL); i++) loss_cnt_o[i] <= '0;
    end else begin
      sync1 <= lock_i;
      sync2 <= sync1;
      prev  <= sync2;
      for (int i = 0; i < int'(N_PLL); i++)
        if (arm_i && prev[i] && !sync2[i] && loss_cnt_o[i] != '1)
          loss_cnt_o[i] <= loss_cnt_o[i] + 1'b1;
    end
  end

  assign locked_o = sync2;

endmodule
