// ff_test_tester: tester side of the flip-flop test.
//
// After start_i the tester drives pattern_o (constant 0, constant 1, or a
// bit that toggles every clock, chosen by mode_i) into the chains of
// ff_chain_wsr and waits CHAIN_LEN + WIN_W clocks until the chains are full.
// From then on it pulses win_load_o once every WIN_W clocks, i.e. at
// f_clk / WIN_W, so that every chain bit passes through the window exactly
// once between two loads. One clock after each load the tester reads the
// windows. The first windows read are kept as reference; every later
// window that differs from its reference counts one flip event, and the
// number of differing bits is added to flip_bits_o. last_chain_o names the
// chain of the most recent event. stop_i returns to idle; counters hold
// until rst_n. Choosing the window width as the load divider, and a
// captured reference instead of a computed one, are this design's reading
// of the described method. WIN_W must be even for the toggle pattern.
`timescale 1ns / 1ps
module ff_test_tester
  import rad_test_pkg::*;
#(
  parameter int unsigned N_CHAINS  = 4,
  parameter int unsigned CHAIN_LEN = 4096,
  parameter int unsigned WIN_W     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  logic             stop_i,
  input  pattern_e         mode_i,
  output logic             pattern_o,
  output logic             win_load_o,
  input  logic [WIN_W-1:0] window_i [N_CHAINS],
  output logic             running_o,
  output logic [31:0]      flip_events_o,
  output logic [31:0]      flip_bits_o,
  output logic [7:0]       last_chain_o
);

  localparam int unsigned FILL = CHAIN_LEN + WIN_W;

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_RUN} state_e;
  state_e state;

  pattern_e             mode_q;
  logic [31:0]          fill_cnt;
  logic [$clog2(WIN_W+1)-1:0] phase;
  logic                 load_d;
  logic                 have_ref;
  logic [WIN_W-1:0]     ref_q [N_CHAINS];

  // Differences of the current windows against the reference.
  logic [31:0]          diff_bits;
  logic [31:0]          diff_windows;
  logic [7:0]           diff_last;

  always_comb begin
    diff_bits    = '0;
    diff_windows = '0;
    diff_last    = last_chain_o;
    for (int c = 0; c < int'(N_CHAINS); c++) begin
      if (window_i[c] != ref_q[c]) begin
        diff_windows = diff_windows + 1;
        diff_last    = 8'(c);
      end
      diff_bits = diff_bits + 32'($countones(window_i[c] ^ ref_q[c]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      mode_q        <= PAT_ZERO;
      pattern_o     <= 1'b0;
      win_load_o    <= 1'b0;
      fill_cnt      <= '0;
      phase         <= '0;
      load_d        <= 1'b0;
      have_ref      <= 1'b0;
      flip_events_o <= '0;
      flip_bits_o   <= '0;
      last_chain_o  <= '0;
      for (int c = 0; c < int'(N_CHAINS); c++) ref_q[c] <= '0;
    end else begin
      load_d     <= win_load_o;
      win_load_o <= 1'b0;
      case (state)
        S_IDLE: begin
          pattern_o <= 1'b0;
          if (start_i) begin
            mode_q   <= mode_i;
            fill_cnt <= '0;
            phase    <= '0;
            have_ref <= 1'b0;
            state    <= S_FILL;
          end
        end
        S_FILL: begin
          fill_cnt <= fill_cnt + 1;
          if (fill_cnt == FILL - 1) state <= S_RUN;
        end
        S_RUN: begin
          if (phase == $bits(phase)'(WIN_W - 1)) begin
            phase      <= '0;
            win_load_o <= 1'b1;
          end else begin
            phase <= phase + 1'b1;
          end
          if (load_d) begin
            if (!have_ref) begin
              have_ref <= 1'b1;
              for (int c = 0; c < int'(N_CHAINS); c++) ref_q[c] <= window_i[c];
            end else if (diff_windows != 0) begin
              flip_events_o <= flip_events_o + diff_windows;
              flip_bits_o   <= flip_bits_o + diff_bits;
              last_chain_o  <= diff_last;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
      if (state != S_IDLE) begin
        case (mode_q)
          PAT_ONE:    pattern_o <= 1'b1;
          PAT_TOGGLE: pattern_o <= ~pattern_o;
          default:    pattern_o <= 1'b0;
        endcase
        if (stop_i) begin
          state      <= S_IDLE;
          win_load_o <= 1'b0;
        end
      end
    end
  end

  assign running_o = (state != S_IDLE);

endmodule
