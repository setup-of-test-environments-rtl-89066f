// bram_test_dut: device-under-test design of the block-memory test.
//
// N_BLOCKS independent memories of DEPTH x DW bits stand for the block RAMs
// of the device (32 blocks of 40 Kbit, taken here as 1024 words of 40
// bits). The tester addresses one block with blk_i and one word with
// addr_i. With we_i high the word is written with the data chosen by
// wpat_i: all zeros, all ones, or bits alternating 0/1 by bit position
// (bit i = i mod 2); the data is generated here, so only the pattern
// select crosses the cable. Every block reads the addressed word each
// clock; rdata_o shows the word of the block addressed one clock earlier
// (read latency one clock). Block geometry and latency are this design's
// choices.
`timescale 1ns / 1ps
module bram_test_dut
  import rad_test_pkg::*;
#(
  parameter int unsigned N_BLOCKS = 32,
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned DW       = 40,
  localparam int unsigned BW      = $clog2(N_BLOCKS),
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [BW-1:0] blk_i,
  input  logic [AW-1:0] addr_i,
  input  logic          we_i,
  input  pattern_e      wpat_i,
  output logic [DW-1:0] rdata_o
);

  logic [DW-1:0] wdata;
  logic [DW-1:0] rd_blk [N_BLOCKS];
  logic [BW-1:0] blk_q;

  always_comb
    for (int unsigned i = 0; i < DW; i++) wdata[i] = pattern_bit(wpat_i, i);

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_blk
    logic [DW-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we_i && blk_i == BW'(b)) mem[addr_i] <= wdata;
      rd_blk[b] <= mem[addr_i];
    end
  end

  always_ff @(posedge clk) blk_q <= blk_i;

  assign rdata_o = rd_blk[blk_q];

endmodule
