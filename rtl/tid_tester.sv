// tid_tester: tester side of the total-ionising-dose test.
//
// start_i begins a sweep: the tester enables the rings of tid_ro_array,
// and for each ring 0 .. N_RO-1 it drives the ring select, waits
// SETTLE_CYCLES for the multiplexer and cable, and measures the returned
// signal with freq_counter over gate_i clocks. Each result is stored in a
// result table that the processor reads through rd_idx_i / rd_count_o
// (combinational read). After the last ring sweeps_o increments and the
// rings are disabled again. A sweep takes N_RO * (SETTLE_CYCLES + gate_i +
// a few) clocks. Sweeping all rings automatically, rather than having the
// processor select each ring, is this design's choice.
`timescale 1ns / 1ps
module tid_tester #(
  parameter int unsigned N_RO          = 130,
  parameter int unsigned SETTLE_CYCLES = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic [31:0] gate_i,
  output logic        enable_o,
  output logic [7:0]  sel_o,
  input  logic        ro_i,
  output logic        busy_o,
  output logic [31:0] sweeps_o,
  input  logic [7:0]  rd_idx_i,
  output logic [31:0] rd_count_o
);

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_MEASURE} state_e;
  state_e state;

  logic [31:0] settle_cnt;
  logic        fc_start, fc_busy, fc_done;
  logic [31:0] fc_count;
  logic [31:0] results [N_RO];

  freq_counter #(.CNT_W(32)) u_fc (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_i (fc_start),
    .gate_i  (gate_i),
    .sig_i   (ro_i),
    .busy_o  (fc_busy),
    .done_o  (fc_done),
    .count_o (fc_count)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      enable_o   <= 1'b0;
      sel_o      <= '0;
      settle_cnt <= '0;
      fc_start   <= 1'b0;
      sweeps_o   <= '0;
      for (int i = 0; i < int'(N_RO); i++) results[i] <= '0;
    end else begin
      fc_start <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start_i && gate_i != 0) begin
            enable_o   <= 1'b1;
            sel_o      <= '0;
            settle_cnt <= '0;
            state      <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          settle_cnt <= settle_cnt + 1;
          if (settle_cnt == SETTLE_CYCLES - 1) begin
            fc_start <= 1'b1;
            state    <= S_MEASURE;
          end
        end
        S_MEASURE: begin
          if (fc_done) begin
            results[sel_o] <= fc_count;
            settle_cnt     <= '0;
            if (sel_o == 8'(N_RO - 1)) begin
              enable_o <= 1'b0;
              sweeps_o <= sweeps_o + 1;
              state    <= S_IDLE;
            end else begin
              sel_o <= sel_o + 1'b1;
              state <= S_SETTLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o     = (state != S_IDLE);
  assign rd_count_o = (int'(rd_idx_i) < int'(N_RO)) ? results[rd_idx_i] : '0;

endmodule
