// watchdog_dut: the complete iCE40 design of the watchdog test.
//
// N_COPIES identical watchdogs (see watchdog) run from the same clock,
// reset and done input; their wake and reset outputs are majority voted
// (tmr_voter) to one wake_o and one dev_rst_o. The three tested versions
// are N_COPIES = 1 (standard), 3 (TMR) and 12 (the device filled with
// watchdogs); the default is the standard version. With one copy the voter
// passes the outputs through. Timing is that of watchdog.
`timescale 1ns / 1ps
module watchdog_dut #(
  parameter int unsigned N_COPIES  = 1,
  parameter int unsigned CLK_HZ    = 12_000_000,
  parameter int unsigned PERIOD_MS = 100,
  parameter int unsigned WAKE_MS   = 20,
  parameter int unsigned RST_MS    = 30
) (
  input  logic clk,
  input  logic rst_n,
  input  logic done_i,
  output logic wake_o,
  output logic dev_rst_o,
  output logic mismatch_o
);

  logic [1:0] outs [N_COPIES];
  logic [1:0] voted;

  for (genvar i = 0; i < N_COPIES; i++) begin : g_wd
    watchdog #(
      .CLK_HZ    (CLK_HZ),
      .PERIOD_MS (PERIOD_MS),
      .WAKE_MS   (WAKE_MS),
      .RST_MS    (RST_MS)
    ) u_wd (
      .clk       (clk),
      .rst_n     (rst_n),
      .done_i    (done_i),
      .wake_o    (outs[i][0]),
      .dev_rst_o (outs[i][1])
    );
  end

  tmr_voter #(.N(N_COPIES), .W(2)) u_vote (
    .in_i       (outs),
    .out_o      (voted),
    .mismatch_o (mismatch_o)
  );

  assign wake_o    = voted[0];
  assign dev_rst_o = voted[1];

endmodule
