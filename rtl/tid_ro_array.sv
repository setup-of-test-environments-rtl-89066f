// tid_ro_array: device-under-test design of the total-ionising-dose test.
//
// N_RO ring oscillators (130 in the described test, which gives the 8385
// pairwise comparisons N*(N+1)/2 - N) share one enable. sel_i picks the
// ring whose output is returned to the tester on ro_o, a plain
// multiplexer; a selection beyond the last ring returns 0. The rings are
// behavioural models (see ring_oscillator); each gets a slightly different
// stage delay, up to +/- SPREAD_PCT percent from a fixed formula, to stand
// for the process variation that makes every ring's frequency unique.
// The spread formula is this design's choice.
`timescale 1ns / 1ps
module tid_ro_array #(
  parameter int unsigned N_RO           = 130,
  parameter int unsigned STAGES         = 65,
  parameter real         STAGE_DELAY_NS = 1131.0,
  parameter int unsigned SPREAD_PCT     = 9
) (
  input  logic       enable_i,
  input  logic [7:0] sel_i,
  output logic       ro_o
);

  logic [N_RO-1:0] ro;

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    // Deterministic offset in [-SPREAD_PCT, +SPREAD_PCT] percent.
    localparam int  OFS   = int'((i * 37) % (2 * SPREAD_PCT + 1)) - int'(SPREAD_PCT);
    localparam real DELAY = STAGE_DELAY_NS * (100.0 + real'(OFS)) / 100.0;

    ring_oscillator #(
      .STAGES         (STAGES),
      .STAGE_DELAY_NS (DELAY)
    ) u_ro (
      .enable_i (enable_i),
      .ro_o     (ro[i])
    );
  end

  assign ro_o = (int'(sel_i) < int'(N_RO)) ? ro[sel_i] : 1'b0;

endmodule
