// tb_bram_test_dut: writes random words of a 4-block, 64-word memory with
// random patterns, keeps a reference copy, and reads random addresses
// back, checking the data one clock after the address. Also checks the
// three pattern words.
`timescale 1ns / 1ps
module tb_bram_test_dut;
  import rad_test_pkg::*;
  localparam int NB = 4, D = 64, DW = 40;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [1:0] blk = 0;
  logic [5:0] addr = 0;
  logic we = 0;
  pattern_e wpat = PAT_ZERO;
  logic [DW-1:0] rdata;
  logic [DW-1:0] ref_mem [NB][D];
  logic [DW-1:0] words [3];

  always #5 clk = ~clk;

  bram_test_dut #(.N_BLOCKS(NB), .DEPTH(D), .DW(DW)) dut (
    .clk(clk), .blk_i(blk), .addr_i(addr), .we_i(we), .wpat_i(wpat), .rdata_o(rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    words[0] = '0;
    words[1] = '1;
    words[2] = 40'hAA_AAAA_AAAA;   // bit i = i mod 2
    // Fill everything with zeros first.
    for (int b = 0; b < NB; b++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk) begin blk = 2'(b); addr = 6'(a); we = 1; wpat = PAT_ZERO; end
        ref_mem[b][a] = '0;
      end
    @(negedge clk) we = 0;
    for (int n = 0; n < 3000; n++) begin
      int b, a, p;
      b = $urandom_range(0, NB - 1);
      a = $urandom_range(0, D - 1);
      @(negedge clk);
      blk = 2'(b); addr = 6'(a);
      if ($urandom_range(0, 2) == 0) begin
        p = $urandom_range(0, 2);
        we = 1; wpat = pattern_e'(p);
        ref_mem[b][a] = words[p];
        @(negedge clk) we = 0;
      end else begin
        we = 0;
        @(posedge clk); #1;
        checks++;
        if (rdata !== ref_mem[b][a]) begin
          failures++;
          $display("blk %0d addr %0d read %h expected %h", b, a, rdata, ref_mem[b][a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
