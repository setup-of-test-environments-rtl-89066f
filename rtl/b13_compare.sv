// b13_compare: device-side checker of the B13 benchmark test.
//
// N_B13 copies of the ITC'99 B13 circuit run on the device from the same
// pattern; a golden reference output, produced from the same pattern,
// arrives on golden_i. Every clock this block compares each copy's output
// with the reference. In the TMR version (TMR = 1) each copy is itself
// three circuits, b13_i then holds 3 * N_B13 outputs, and each triple is
// majority voted (tmr_voter) before the comparison. If any copy differs,
// error_o goes high, faulty_idx_o gives the number of the lowest faulty
// copy and faulty_val_o its output; without an error the block reports
// copy 0 and its value, which the tester ignores. Outputs are registered
// (one clock of latency) and cleared by the B13 reset from the tester.
// Reporting the lowest-numbered copy is this design's choice. The B13
// circuit itself is not part of this block.
`timescale 1ns / 1ps
module b13_compare #(
  parameter int unsigned N_B13  = 100,
  parameter int unsigned W      = 10,
  parameter bit          TMR    = 1'b0,
  localparam int unsigned N_INST = TMR ? 3 * N_B13 : N_B13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] b13_i [N_INST],
  input  logic [W-1:0] golden_i,
  output logic         error_o,
  output logic [7:0]   faulty_idx_o,
  output logic [W-1:0] faulty_val_o
);

  logic [W-1:0] copy [N_B13];

  if (TMR) begin : g_tmr
    for (genvar i = 0; i < N_B13; i++) begin : g_vote
      logic [W-1:0] trio [3];
      assign trio[0] = b13_i[3*i];
      assign trio[1] = b13_i[3*i+1];
      assign trio[2] = b13_i[3*i+2];
      tmr_voter #(.N(3), .W(W)) u_vote (
        .in_i       (trio),
        .out_o      (copy[i]),
        .mismatch_o ()
      );
    end
  end else begin : g_plain
    for (genvar i = 0; i < N_B13; i++) begin : g_copy
      assign copy[i] = b13_i[i];
    end
  end

  logic         err_c;
  logic [7:0]   idx_c;
  logic [W-1:0] val_c;

  always_comb begin
    err_c = 1'b0;
    idx_c = '0;
    val_c = copy[0];
    for (int i = int'(N_B13) - 1; i >= 0; i--) begin
      if (copy[i] != golden_i) begin
        err_c = 1'b1;
        idx_c = 8'(i);
        val_c = copy[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      error_o      <= 1'b0;
      faulty_idx_o <= '0;
      faulty_val_o <= '0;
    end else begin
      error_o      <= err_c;
      faulty_idx_o <= idx_c;
      faulty_val_o <= val_c;
    end
  end

endmodule
