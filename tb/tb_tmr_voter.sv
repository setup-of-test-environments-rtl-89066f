// tb_tmr_voter: self-checking test of the majority voter for 3 copies
// (classic TMR) and for 12 copies (tie resolves to 0). Random inputs are
// compared with a reference vote computed bit by bit in the testbench.
`timescale 1ns / 1ps
module tb_tmr_voter;
  int checks = 0, failures = 0;

  logic [3:0] in3 [3];
  logic [3:0] out3;
  logic       mm3;
  logic [1:0] in12 [12];
  logic [1:0] out12;
  logic       mm12;

  tmr_voter #(.N(3),  .W(4)) u3  (.in_i(in3),  .out_o(out3),  .mismatch_o(mm3));
  tmr_voter #(.N(12), .W(2)) u12 (.in_i(in12), .out_o(out12), .mismatch_o(mm12));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp3;
    logic [1:0] exp12;
    logic       expmm;
    int         n;
    // Single upset in one copy is outvoted.
    in3[0] = 4'hA; in3[1] = 4'hA; in3[2] = 4'h5;
    #1;
    checks++; if (out3 !== 4'hA || !mm3) begin failures++; $display("single upset: %h %b", out3, mm3); end
    in3[2] = 4'hA;
    #1;
    checks++; if (out3 !== 4'hA || mm3) begin failures++; $display("agree: %h %b", out3, mm3); end
    repeat (500) begin
      for (int c = 0; c < 3; c++) in3[c] = 4'($urandom);
      for (int c = 0; c < 12; c++) in12[c] = 2'($urandom);
      #1;
      expmm = 0;
      for (int b = 0; b < 4; b++) begin
        n = 0; for (int c = 0; c < 3; c++) n += in3[c][b];
        exp3[b] = (n >= 2);
        if (n != 0 && n != 3) expmm = 1;
      end
      checks++; if (out3 !== exp3 || mm3 !== expmm) begin failures++; $display("N=3 mismatch"); end
      expmm = 0;
      for (int b = 0; b < 2; b++) begin
        n = 0; for (int c = 0; c < 12; c++) n += in12[c][b];
        exp12[b] = (n >= 7);
        if (n != 0 && n != 12) expmm = 1;
      end
      checks++; if (out12 !== exp12 || mm12 !== expmm) begin failures++; $display("N=12 mismatch"); end
    end
    // A 6:6 tie gives 0.
    for (int c = 0; c < 12; c++) in12[c] = (c < 6) ? 2'b11 : 2'b00;
    #1;
    checks++; if (out12 !== 2'b00) begin failures++; $display("tie"); end
    for (int c = 0; c < 12; c++) in12[c] = (c < 7) ? 2'b11 : 2'b00;
    #1;
    checks++; if (out12 !== 2'b11) begin failures++; $display("7 of 12"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
