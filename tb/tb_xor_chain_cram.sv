// tb_xor_chain_cram: checks chains of odd (101) and even (100) length for
// all input combinations: the output must be first XOR (static if the
// length is odd), i.e. any single input change flips the output. A flip
// forced on one stage in the middle of the chain must reach the output.
`timescale 1ns / 1ps
module tb_xor_chain_cram;
  int checks = 0, failures = 0;
  logic st = 0, fi = 0;
  logic out_odd, out_even;

  xor_chain_cram #(.N_CPE(101)) dut_odd  (.static_i(st), .first_i(fi), .chain_o(out_odd));
  xor_chain_cram #(.N_CPE(100)) dut_even (.static_i(st), .first_i(fi), .chain_o(out_even));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic out_prev, mid;
    for (int n = 0; n < 64; n++) begin
      st = 1'($urandom);
      fi = 1'($urandom);
      #1;
      checks++; if (out_odd !== (fi ^ st)) begin failures++; $display("odd: st %b fi %b out %b", st, fi, out_odd); end
      checks++; if (out_even !== fi) begin failures++; $display("even: st %b fi %b out %b", st, fi, out_even); end
    end
    // An upset of one stage (a flipped lookup-table bit) changes the output.
    st = 1; fi = 1;
    #1;
    out_prev = out_odd;
    mid = dut_odd.g_cpe[50].s;
    if (mid) force dut_odd.g_cpe[50].s = 1'b0;
    else     force dut_odd.g_cpe[50].s = 1'b1;
    #1;
    checks++; if (out_odd === out_prev) begin failures++; $display("stage flip not seen"); end
    release dut_odd.g_cpe[50].s;
    #1;
    checks++; if (out_odd !== out_prev) begin failures++; $display("release"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
