// tmr_voter: bitwise majority voter over N redundant copies of a W-bit
// signal, the voter of triple modular redundancy (TMR).
//
// Each output bit is 1 when more than N/2 of the copies have that bit set,
// so with N = 3 a single upset copy is outvoted. The module is purely
// combinational. N = 3 is the classic TMR voter; the watchdog "Full FPGA"
// variant votes 12 copies, where a tie (6 against 6) resolves to 0 - that
// tie rule is this design's choice. mismatch_o is high whenever the copies
// do not all agree, which lets a tester see masked upsets.
`timescale 1ns / 1ps
module tmr_voter #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] in_i [N],
  output logic [W-1:0] out_o,
  output logic         mismatch_o
);

  always_comb begin
    int unsigned ones;
    out_o      = '0;
    mismatch_o = 1'b0;
    for (int unsigned b = 0; b < W; b++) begin
      ones = 0;
      for (int unsigned c = 0; c < N; c++) ones += int'(in_i[c][b]);
      out_o[b] = (2 * ones > N);
      if (ones != 0 && ones != N) mismatch_o = 1'b1;
    end
  end

endmodule
