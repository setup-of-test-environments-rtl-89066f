// bram_test_tester: tester side of the block-memory test.
//
// start_i latches the pattern and writes every word of every block with it
// (one word per clock, N_BLOCKS * DEPTH clocks). The tester then waits
// interval_i clocks and reads every word back, comparing each with the
// pattern as the read data returns one clock after its address. A scan
// that finds any difference counts one event (an SEU, or an MEU when
// several bits flipped), adds the flipped bits to bit_errors_o and records
// the block and word of the last bad word. After a scan with an event the
// test halts and restarts by rewriting the whole memory; after a clean scan
// it waits and reads again. stop_i returns to idle; counters hold until
// rst_n. The scan-level event count and the interval input are this
// design's choices.
`timescale 1ns / 1ps
module bram_test_tester
  import rad_test_pkg::*;
#(
  parameter int unsigned N_BLOCKS = 32,
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned DW       = 40,
  localparam int unsigned BW      = $clog2(N_BLOCKS),
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic          stop_i,
  input  pattern_e      pattern_i,
  input  logic [31:0]   interval_i,
  output logic [BW-1:0] blk_o,
  output logic [AW-1:0] addr_o,
  output logic          we_o,
  output pattern_e      wpat_o,
  input  logic [DW-1:0] rdata_i,
  output logic          running_o,
  output logic [31:0]   scans_o,
  output logic [31:0]   events_o,
  output logic [31:0]   bit_errors_o,
  output logic [BW-1:0] last_blk_o,
  output logic [AW-1:0] last_addr_o
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_WAIT, S_READ} state_e;
  state_e state;

  logic [DW-1:0]  expected;
  logic [31:0]    wait_cnt;
  logic           last_word;        // current address is the final word
  logic           chk_v;            // read data of chk_blk/chk_addr is on rdata_i
  logic           chk_last;
  logic [BW-1:0]  chk_blk;
  logic [AW-1:0]  chk_addr;
  logic           scan_bad;
  logic [DW-1:0]  diff;

  always_comb
    for (int unsigned i = 0; i < DW; i++) expected[i] = pattern_bit(wpat_o, i);

  assign diff      = rdata_i ^ expected;
  assign last_word = (blk_o == BW'(N_BLOCKS - 1)) && (addr_o == AW'(DEPTH - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      blk_o        <= '0;
      addr_o       <= '0;
      we_o         <= 1'b0;
      wpat_o       <= PAT_ZERO;
      wait_cnt     <= '0;
      chk_v        <= 1'b0;
      chk_last     <= 1'b0;
      chk_blk      <= '0;
      chk_addr     <= '0;
      scan_bad     <= 1'b0;
      scans_o      <= '0;
      events_o     <= '0;
      bit_errors_o <= '0;
      last_blk_o   <= '0;
      last_addr_o  <= '0;
    end else begin
      chk_v    <= 1'b0;
      chk_last <= 1'b0;
      case (state)
        S_IDLE: begin
          we_o <= 1'b0;
          if (start_i) begin
            wpat_o <= pattern_i;
            blk_o  <= '0;
            addr_o <= '0;
            we_o   <= 1'b1;
            state  <= S_WRITE;
          end
        end
        S_WRITE: begin
          if (last_word) begin
            we_o     <= 1'b0;
            blk_o    <= '0;
            addr_o   <= '0;
            wait_cnt <= '0;
            state    <= S_WAIT;
          end else begin
            {blk_o, addr_o} <= {blk_o, addr_o} + 1'b1;
          end
        end
        S_WAIT: begin
          wait_cnt <= wait_cnt + 1;
          if (wait_cnt >= interval_i) begin
            scan_bad <= 1'b0;
            state    <= S_READ;
          end
        end
        S_READ: begin
          chk_v    <= 1'b1;
          chk_last <= last_word;
          chk_blk  <= blk_o;
          chk_addr <= addr_o;
          if (!last_word) {blk_o, addr_o} <= {blk_o, addr_o} + 1'b1;
          else            state <= S_WAIT;  // the last compare finishes below
          wait_cnt <= '0;
        end
        default: state <= S_IDLE;
      endcase

      // Compare the word read one clock earlier.
      if (chk_v) begin
        if (diff != '0) begin
          scan_bad     <= 1'b1;
          bit_errors_o <= bit_errors_o + 32'($countones(diff));
          last_blk_o   <= chk_blk;
          last_addr_o  <= chk_addr;
        end
        if (chk_last) begin
          scans_o <= scans_o + 1;
          blk_o   <= '0;
          addr_o  <= '0;
          if (scan_bad || diff != '0) begin
            // Halt, then restart by rewriting the initial state.
            events_o <= events_o + 1;
            we_o     <= 1'b1;
            state    <= S_WRITE;
          end
        end
      end

      if (stop_i) begin
        state <= S_IDLE;
        we_o  <= 1'b0;
      end
    end
  end

  assign running_o = (state != S_IDLE);

endmodule
