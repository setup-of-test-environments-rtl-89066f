// cram_tester: tester side of the configuration-memory (CRAM) test.
//
// start_i drives all chain inputs of xor_chain_cram to level_i (static_o
// and first_o), waits SETTLE_CYCLES for the chain to settle, and takes the
// synchronised chain output as reference. While running, any change of
// the output counts one event (events_o) and stops the test: the device
// must be reconfigured before start_i restarts it. inject_i (while
// running) instead flips first_o and measures the clocks until the output
// changes; prop_cycles_o then holds that time (including the two-clock
// synchroniser) and prop_valid_o goes high; first_o is restored and the
// test settles and continues. The settle time (4096 clocks, above the
// 1260 clocks of 12.6 us at 100 MHz) is this design's choice.
`timescale 1ns / 1ps
module cram_tester #(
  parameter int unsigned SETTLE_CYCLES = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        stop_i,
  input  logic        level_i,
  input  logic        inject_i,
  output logic        static_o,
  output logic        first_o,
  input  logic        chain_i,
  output logic        running_o,
  output logic [31:0] events_o,
  output logic [31:0] prop_cycles_o,
  output logic        prop_valid_o
);

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_RUN, S_INJECT, S_STOPPED} state_e;
  state_e state;

  logic        s1, s2, ref_q;
  logic [31:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      s1            <= 1'b0;
      s2            <= 1'b0;
      ref_q         <= 1'b0;
      cnt           <= '0;
      static_o      <= 1'b0;
      first_o       <= 1'b0;
      events_o      <= '0;
      prop_cycles_o <= '0;
      prop_valid_o  <= 1'b0;
    end else begin
      s1  <= chain_i;
      s2  <= s1;
      cnt <= cnt + 1;
      case (state)
        S_IDLE, S_STOPPED: begin
          if (start_i) begin
            static_o <= level_i;
            first_o  <= level_i;
            cnt      <= '0;
            state    <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          if (cnt == SETTLE_CYCLES - 1) begin
            ref_q <= s2;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          if (s2 != ref_q) begin
            events_o <= events_o + 1;
            state    <= S_STOPPED;
          end else if (inject_i) begin
            first_o <= ~first_o;
            cnt     <= '0;
            state   <= S_INJECT;
          end
        end
        S_INJECT: begin
          if (s2 != ref_q) begin
            prop_cycles_o <= cnt + 1;
            prop_valid_o  <= 1'b1;
            first_o       <= static_o;
            cnt           <= '0;
            state         <= S_SETTLE;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (stop_i) state <= S_IDLE;
    end
  end

  assign running_o = (state == S_SETTLE) || (state == S_RUN) || (state == S_INJECT);

endmodule
