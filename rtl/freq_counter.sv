// freq_counter: gated edge counter that measures the frequency of an
// asynchronous signal.
//
// sig_i passes a two-flop synchroniser; start_i (while idle) opens a gate
// of gate_i clocks during which every rising edge of the synchronised
// signal is counted. At the end of the gate done_o pulses for one clock
// and count_o holds the result until the next measurement, so the
// frequency is count_o * f_clk / gate_i. The signal must be well below
// half the clock rate. The counting method is this design's choice.
`timescale 1ns / 1ps
module freq_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  logic [31:0]      gate_i,
  input  logic             sig_i,
  output logic             busy_o,
  output logic             done_o,
  output logic [CNT_W-1:0] count_o
);

  logic             s1, s2, s3;
  logic [31:0]      remaining;
  logic [CNT_W-1:0] edges;
  logic             rise;

  assign rise = s2 && !s3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1        <= 1'b0;
      s2        <= 1'b0;
      s3        <= 1'b0;
      busy_o    <= 1'b0;
      done_o    <= 1'b0;
      remaining <= '0;
      edges     <= '0;
      count_o   <= '0;
    end else begin
      s1     <= sig_i;
      s2     <= s1;
      s3     <= s2;
      done_o <= 1'b0;
      if (!busy_o) begin
        if (start_i && gate_i != 0) begin
          busy_o    <= 1'b1;
          remaining <= gate_i;
          edges     <= '0;
        end
      end else begin
        remaining <= remaining - 1;
        if (rise) edges <= edges + 1'b1;
        if (remaining == 1) begin
          busy_o  <= 1'b0;
          done_o  <= 1'b1;
          count_o <= edges + CNT_W'(rise);
        end
      end
    end
  end

endmodule
