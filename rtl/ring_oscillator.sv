// ring_oscillator: behavioural model (not synthesizable logic) of one ring
// oscillator of the total-ionising-dose test.
//
// In the device the ring is a chain of STAGES transparent D-latches whose
// last output is inverted and fed back to the first; the latch enables
// form the ring enable. A level needs STAGES * STAGE_DELAY_NS to travel
// round the ring, so the output toggles at that interval and oscillates at
// f = 1 / (2 * STAGES * STAGE_DELAY_NS), the relation given for such rings.
// This model reproduces exactly that: while enable_i is high ro_o toggles
// every STAGES * STAGE_DELAY_NS; when enable_i is low the ring stops with
// ro_o at 0. Radiation slows the stages, which a testbench can mimic with
// a larger delay. The stage count and the delay (about 1.13 us per stage,
// giving roughly 6.8 kHz, inside the range the rings were measured at) are
// this model's choices.
`timescale 1ns / 1ps
module ring_oscillator #(
  parameter int unsigned STAGES         = 65,
  parameter real         STAGE_DELAY_NS = 1131.0
) (
  input  logic enable_i,
  output logic ro_o
);

  localparam real HALF_PERIOD_NS = STAGES * STAGE_DELAY_NS;

  initial begin
    ro_o = 1'b0;
    forever begin
      wait (enable_i);
      while (enable_i) begin
        #(HALF_PERIOD_NS);
        ro_o = enable_i ? ~ro_o : 1'b0;
      end
      ro_o = 1'b0;
    end
  end

endmodule
