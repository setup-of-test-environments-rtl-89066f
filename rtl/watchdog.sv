// watchdog: the watchdog design of the iCE40 application test.
//
// The watchdog supervises a connected device. Every PERIOD_MS it raises
// wake_o for WAKE_MS. The device has to answer within the same period with
// a done pulse on done_i (asynchronous; two-flop synchroniser, rising edge
// detected). If a period ends without a done pulse, the watchdog holds
// dev_rst_o high for RST_MS to reset the device and then starts a new
// period; otherwise the next period starts at once. rst_n (from the
// tester) restarts the watchdog at the beginning of a period. Timing
// follows the described use case: 100 ms period, 20 ms wake, 30 ms reset,
// counted on the 12 MHz board clock. Letting the answer window span the
// whole period and starting a new period after the reset are this
// design's choices. Outputs are registered.
`timescale 1ns / 1ps
module watchdog #(
  parameter int unsigned CLK_HZ    = 12_000_000,
  parameter int unsigned PERIOD_MS = 100,
  parameter int unsigned WAKE_MS   = 20,
  parameter int unsigned RST_MS    = 30
) (
  input  logic clk,
  input  logic rst_n,
  input  logic done_i,
  output logic wake_o,
  output logic dev_rst_o
);

  localparam int unsigned CYC_PER_MS = CLK_HZ / 1000;
  localparam int unsigned PERIOD     = PERIOD_MS * CYC_PER_MS;
  localparam int unsigned WAKE       = WAKE_MS * CYC_PER_MS;
  localparam int unsigned RST        = RST_MS * CYC_PER_MS;

  typedef enum logic {S_PERIOD, S_RESET} state_e;
  state_e state;

  logic [31:0] cnt;
  logic        d1, d2, d3;
  logic        done_seen;

  logic done_rise;
  assign done_rise = d2 && !d3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_PERIOD;
      cnt       <= '0;
      d1        <= 1'b0;
      d2        <= 1'b0;
      d3        <= 1'b0;
      done_seen <= 1'b0;
      wake_o    <= 1'b0;
      dev_rst_o <= 1'b0;
    end else begin
      d1 <= done_i;
      d2 <= d1;
      d3 <= d2;
      // Registered outputs, one clock behind the counter.
      wake_o    <= (state == S_PERIOD) && (cnt < WAKE);
      dev_rst_o <= (state == S_RESET);
      case (state)
        S_PERIOD: begin
          if (done_rise) done_seen <= 1'b1;
          if (cnt == PERIOD - 1) begin
            cnt       <= '0;
            done_seen <= 1'b0;
            if (!(done_seen || done_rise)) state <= S_RESET;
          end else begin
            cnt <= cnt + 1;
          end
        end
        S_RESET: begin
          done_seen <= 1'b0;
          if (cnt == RST - 1) begin
            cnt   <= '0;
            state <= S_PERIOD;
          end else begin
            cnt <= cnt + 1;
          end
        end
        default: state <= S_PERIOD;
      endcase
    end
  end

endmodule
