// watchdog_tester: tester side of the watchdog test, on the 100 MHz tester
// clock.
//
// start_i resets the watchdog (wd_rst_n_o low for INIT_CYCLES) and starts
// supervising it. wake_i and dev_rst_i are synchronised. Every rising
// edge of wake counts in wakes_o; the tester answers it with a done pulse
// of DONE_MS that starts when wake falls, except that every
// skip_every_i-th wake (0: never) is deliberately left unanswered to test
// the reset function. After such a skip a rising edge of dev_rst must
// follow within TIMEOUT_MS of the wake (resets_ok_o). Failures, each of
// which means the watchdog device would be reconfigured: no wake for
// TIMEOUT_MS (fail_no_wake_o), no reset after a skipped answer
// (fail_no_reset_o), or a reset although the answer was given
// (fail_spurious_o). A failure pulses reconfig_req_o and restarts the
// watchdog through wd_rst_n_o. stop_i ends the test. The done length
// follows the described timing; the skip rule, the 150 ms timeout and
// where the done pulse starts are this design's choices.
`timescale 1ns / 1ps
module watchdog_tester #(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned DONE_MS     = 15,
  parameter int unsigned TIMEOUT_MS  = 150,
  parameter int unsigned INIT_CYCLES = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        stop_i,
  input  logic [7:0]  skip_every_i,
  output logic        wd_rst_n_o,
  output logic        done_o,
  input  logic        wake_i,
  input  logic        dev_rst_i,
  output logic        running_o,
  output logic        reconfig_req_o,
  output logic [31:0] wakes_o,
  output logic [31:0] skips_o,
  output logic [31:0] resets_ok_o,
  output logic [31:0] fail_no_wake_o,
  output logic [31:0] fail_no_reset_o,
  output logic [31:0] fail_spurious_o
);

  localparam int unsigned CYC_PER_MS = CLK_HZ / 1000;
  localparam int unsigned DONE       = DONE_MS * CYC_PER_MS;
  localparam int unsigned TIMEOUT    = TIMEOUT_MS * CYC_PER_MS;

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN} state_e;
  state_e state;

  logic        w1, w2, w3, r1, r2, r3;
  logic        wake_rise, wake_fall, rst_rise;
  logic [31:0] init_cnt, wake_timer, rst_timer, done_cnt;
  logic [7:0]  skip_cnt;
  logic        answer_pending, expect_reset;
  logic        fail;

  assign wake_rise = w2 && !w3;
  assign wake_fall = !w2 && w3;
  assign rst_rise  = r2 && !r3;

  // A failure of any kind in this clock.
  always_comb begin
    fail = 1'b0;
    if (state == S_RUN) begin
      if (!wake_rise && wake_timer >= TIMEOUT) fail = 1'b1;
      if (expect_reset && !rst_rise && rst_timer >= TIMEOUT) fail = 1'b1;
      if (rst_rise && !expect_reset) fail = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      {w1, w2, w3}    <= '0;
      {r1, r2, r3}    <= '0;
      init_cnt        <= '0;
      wake_timer      <= '0;
      rst_timer       <= '0;
      done_cnt        <= '0;
      skip_cnt        <= '0;
      answer_pending  <= 1'b0;
      expect_reset    <= 1'b0;
      wd_rst_n_o      <= 1'b0;
      done_o          <= 1'b0;
      reconfig_req_o  <= 1'b0;
      wakes_o         <= '0;
      skips_o         <= '0;
      resets_ok_o     <= '0;
      fail_no_wake_o  <= '0;
      fail_no_reset_o <= '0;
      fail_spurious_o <= '0;
    end else begin
      {w1, w2, w3}   <= {wake_i, w1, w2};
      {r1, r2, r3}   <= {dev_rst_i, r1, r2};
      reconfig_req_o <= 1'b0;

      // Done pulse generator.
      if (done_cnt != 0) begin
        done_cnt <= done_cnt - 1;
        if (done_cnt == 1) done_o <= 1'b0;
      end

      case (state)
        S_IDLE: begin
          wd_rst_n_o <= 1'b0;
          done_o     <= 1'b0;
          done_cnt   <= '0;
          if (start_i) begin
            init_cnt <= '0;
            state    <= S_INIT;
          end
        end
        S_INIT: begin
          wd_rst_n_o     <= 1'b0;
          done_o         <= 1'b0;
          done_cnt       <= '0;
          answer_pending <= 1'b0;
          expect_reset   <= 1'b0;
          skip_cnt       <= '0;
          init_cnt       <= init_cnt + 1;
          if (init_cnt == INIT_CYCLES - 1) begin
            wd_rst_n_o <= 1'b1;
            wake_timer <= '0;
            state      <= S_RUN;
          end
        end
        S_RUN: begin
          wake_timer <= wake_timer + 1;
          if (expect_reset) rst_timer <= rst_timer + 1;

          if (wake_rise) begin
            wakes_o    <= wakes_o + 1;
            wake_timer <= '0;
            if (skip_every_i != 0 && skip_cnt == skip_every_i - 1) begin
              skip_cnt     <= '0;
              skips_o      <= skips_o + 1;
              expect_reset <= 1'b1;
              rst_timer    <= '0;
            end else begin
              skip_cnt       <= skip_cnt + 1;
              answer_pending <= 1'b1;
            end
          end
          if (wake_fall && answer_pending) begin
            answer_pending <= 1'b0;
            done_o         <= 1'b1;
            done_cnt       <= DONE;
          end
          if (rst_rise && expect_reset) begin
            expect_reset <= 1'b0;
            resets_ok_o  <= resets_ok_o + 1;
          end

          if (!wake_rise && wake_timer >= TIMEOUT)
            fail_no_wake_o <= fail_no_wake_o + 1;
          if (expect_reset && !rst_rise && rst_timer >= TIMEOUT)
            fail_no_reset_o <= fail_no_reset_o + 1;
          if (rst_rise && !expect_reset)
            fail_spurious_o <= fail_spurious_o + 1;
          if (fail) begin
            // The watchdog device would be reconfigured: restart it.
            reconfig_req_o <= 1'b1;
            init_cnt       <= '0;
            state          <= S_INIT;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (stop_i) state <= S_IDLE;
    end
  end

  assign running_o = (state != S_IDLE);

endmodule
