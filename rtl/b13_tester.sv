// b13_tester: tester side of the B13 benchmark test.
//
// start_i starts a run: the tester holds the B13 reset (b13_rst_n_o low)
// for RESTART_CYCLES clocks, releases it and drives a new pattern word
// every clock from a 16-bit LFSR (its low W bits). The same reset and
// pattern go to all B13 copies on the device and to the golden reference.
// When the device raises error_i, the tester pushes a record {cycle time
// stamp, faulty copy number, faulty value} into its FIFO, counts one event
// (seu_count_o) and restarts the run through the reset. Errors are ignored
// for a few clocks after each reset release while the device pipeline
// refills. When the FIFO is full no more records can be kept, so the test
// stops completely and halted_o stays high until stop_i or rst_n; the
// processor empties the FIFO through fifo_rd_i / fifo_data_o. The LFSR,
// time stamp, FIFO depth and restart length are this design's choices.
`timescale 1ns / 1ps
module b13_tester
  import rad_test_pkg::*;
#(
  parameter int unsigned W              = 10,
  parameter int unsigned FIFO_DEPTH     = 512,
  parameter int unsigned RESTART_CYCLES = 16,
  localparam int unsigned CW            = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic          stop_i,
  output logic          b13_rst_n_o,
  output logic [W-1:0]  pattern_o,
  input  logic          error_i,
  input  logic [7:0]    faulty_idx_i,
  input  logic [W-1:0]  faulty_val_i,
  output logic          running_o,
  output logic          halted_o,
  output logic [31:0]   seu_count_o,
  input  logic          fifo_rd_i,
  output b13_rec_t      fifo_data_o,
  output logic          fifo_empty_o,
  output logic [CW-1:0] fifo_count_o
);

  localparam int unsigned HOLDOFF = 4;

  typedef enum logic [1:0] {S_IDLE, S_RESET, S_RUN, S_HALT} state_e;
  state_e state;

  logic [15:0] lfsr;
  logic [31:0] tstamp;
  logic [31:0] cnt;
  logic        push;
  b13_rec_t    rec;
  logic        fifo_full;

  assign rec = '{timestamp: tstamp, idx: faulty_idx_i, value: 10'(faulty_val_i)};

  sync_fifo #(.W($bits(b13_rec_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_i    (push),
    .wdata_i (rec),
    .rd_i    (fifo_rd_i),
    .rdata_o (fifo_data_o),
    .full_o  (fifo_full),
    .empty_o (fifo_empty_o),
    .count_o (fifo_count_o)
  );

  assign push = (state == S_RUN) && (cnt >= HOLDOFF) && error_i && !fifo_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      lfsr        <= 16'hACE1;
      tstamp      <= '0;
      cnt         <= '0;
      b13_rst_n_o <= 1'b0;
      seu_count_o <= '0;
    end else begin
      tstamp <= tstamp + 1;
      cnt    <= cnt + 1;
      case (state)
        S_IDLE: begin
          b13_rst_n_o <= 1'b0;
          if (start_i) begin
            cnt   <= '0;
            state <= S_RESET;
          end
        end
        S_RESET: begin
          b13_rst_n_o <= 1'b0;
          if (cnt == RESTART_CYCLES - 1) begin
            b13_rst_n_o <= 1'b1;
            cnt         <= '0;
            state       <= S_RUN;
          end
        end
        S_RUN: begin
          lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
          if (fifo_full) begin
            b13_rst_n_o <= 1'b0;
            state       <= S_HALT;
          end else if (cnt >= HOLDOFF && error_i) begin
            seu_count_o <= seu_count_o + 1;
            b13_rst_n_o <= 1'b0;
            cnt         <= '0;
            state       <= S_RESET;
          end
        end
        S_HALT: b13_rst_n_o <= 1'b0;
        default: state <= S_IDLE;
      endcase
      if (stop_i) begin
        b13_rst_n_o <= 1'b0;
        state       <= S_IDLE;
      end
    end
  end

  assign pattern_o = lfsr[W-1:0];
  assign running_o = (state == S_RESET) || (state == S_RUN);
  assign halted_o  = (state == S_HALT);

endmodule
