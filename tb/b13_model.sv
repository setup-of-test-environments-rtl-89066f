// b13_model: small sequential stand-in for one copy of the ITC'99 B13
// benchmark circuit, for testbenches only. It is NOT the B13 logic: it
// only has the same shape (W-bit pattern in, W-bit output, reset) and,
// like B13, changes its output only at some clocks, depending on its
// input. A 3-bit phase counter runs freely; when it wraps, or when the
// pattern's low bit is set, the output takes a rotated, mixed copy of the
// pattern and an internal accumulator.
`timescale 1ns / 1ps
module b13_model #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] pattern_i,
  output logic [W-1:0] out_o
);
  logic [2:0]   phase;
  logic [W-1:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      acc   <= '0;
      out_o <= '0;
    end else begin
      phase <= phase + 1'b1;
      acc   <= acc + pattern_i;
      if (phase == 3'd7 || pattern_i[0])
        out_o <= {pattern_i[W-2:0], pattern_i[W-1]} ^ acc;
    end
  end
endmodule
