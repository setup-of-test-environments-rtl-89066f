// sync_fifo: single-clock first-in first-out buffer.
//
// wr_i pushes wdata_i unless the FIFO is full; rd_i pops the head unless
// it is empty. rdata_o always shows the head (first-word fall-through), so
// a reader takes rdata_o and pulses rd_i in the same clock. full_o,
// empty_o and count_o describe the state after the last clock edge. The
// storage is an array indexed by wrapping pointers; DEPTH must be a power
// of two. Used by the B13 tester to keep error records until the
// processor collects them.
`timescale 1ns / 1ps
module sync_fifo #(
  parameter int unsigned W     = 50,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_i,
  input  logic [W-1:0] wdata_i,
  input  logic         rd_i,
  output logic [W-1:0] rdata_o,
  output logic         full_o,
  output logic         empty_o,
  output logic [AW:0]  count_o
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;
  logic         do_wr, do_rd;

  assign full_o  = (count_o == (AW + 1)'(DEPTH));
  assign empty_o = (count_o == '0);
  assign do_wr   = wr_i && !full_o;
  assign do_rd   = rd_i && !empty_o;
  assign count_o = wptr - rptr;
  assign rdata_o = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wptr[AW-1:0]] <= wdata_i;

  // The fill level never exceeds the depth.
  a_level: assert property (@(posedge clk) disable iff (!rst_n) count_o <= (AW + 1)'(DEPTH));

endmodule
