// tb_b13_compare: checks the B13 checker in its plain (7 copies) and TMR
// (5 voted triples) forms with random golden values and randomly corrupted
// copies. Expected flag, lowest faulty copy and its value are computed in
// the testbench and compared one clock later; in the TMR form a single
// corrupted circuit of a triple must be masked, two must be reported.
`timescale 1ns / 1ps
module tb_b13_compare;
  localparam int N = 7, NT = 5, W = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] inst [N];
  logic [W-1:0] inst_t [3 * NT];
  logic [W-1:0] golden;
  logic err, err_t;
  logic [7:0] idx, idx_t;
  logic [W-1:0] val, val_t;

  always #5 clk = ~clk;

  b13_compare #(.N_B13(N), .W(W), .TMR(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .b13_i(inst), .golden_i(golden),
    .error_o(err), .faulty_idx_o(idx), .faulty_val_o(val));
  b13_compare #(.N_B13(NT), .W(W), .TMR(1'b1)) dut_t (
    .clk(clk), .rst_n(rst_n), .b13_i(inst_t), .golden_i(golden),
    .error_o(err_t), .faulty_idx_o(idx_t), .faulty_val_o(val_t));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_err, e_err_t;
    int e_idx, e_idx_t;
    logic [W-1:0] e_val, e_val_t;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      golden = W'($urandom);
      for (int i = 0; i < N; i++) inst[i] = golden;
      for (int i = 0; i < 3 * NT; i++) inst_t[i] = golden;
      e_err = 0; e_idx = 0; e_val = golden;
      e_err_t = 0; e_idx_t = 0; e_val_t = golden;
      if ($urandom_range(0, 1) == 1) begin
        int k, m;
        k = $urandom_range(0, N - 1);
        m = $urandom_range(k, N - 1);
        inst[m] = golden ^ W'($urandom_range(1, 1023));
        inst[k] = golden ^ W'($urandom_range(1, 1023));
        e_err = 1; e_idx = k; e_val = inst[k];
      end
      if ($urandom_range(0, 1) == 1) begin
        int t, c1, c2;
        logic [W-1:0] bad;
        t  = $urandom_range(0, NT - 1);
        c1 = $urandom_range(0, 2);
        c2 = (c1 + 1) % 3;
        bad = golden ^ W'($urandom_range(1, 1023));
        inst_t[3 * t + c1] = bad;
        if ($urandom_range(0, 1) == 1) begin
          inst_t[3 * t + c2] = bad;       // two of three wrong: voted value is bad
          e_err_t = 1; e_idx_t = t; e_val_t = bad;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (err !== e_err || (e_err && (idx !== 8'(e_idx) || val !== e_val)) || (!e_err && idx !== 0)) begin
        failures++; $display("plain: err %b idx %0d val %h, expected %b %0d %h", err, idx, val, e_err, e_idx, e_val);
      end
      checks++;
      if (err_t !== e_err_t || (e_err_t && (idx_t !== 8'(e_idx_t) || val_t !== e_val_t))) begin
        failures++; $display("tmr: err %b idx %0d, expected %b %0d", err_t, idx_t, e_err_t, e_idx_t);
      end
    end
    // Reset clears the outputs.
    @(negedge clk) begin inst[3] = ~golden; rst_n = 0; end
    @(posedge clk); #1;
    checks++; if (err !== 1'b0) begin failures++; $display("reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
