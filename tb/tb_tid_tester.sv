// tb_tid_tester: the testbench plays five rings of known periods behind
// the select lines and checks that one sweep measures every ring (count
// within one edge of gate time / period), stores the result in the table,
// disables the rings at the end and counts the sweep.
`timescale 1ns / 1ps
module tb_tid_tester;
  localparam int N = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] gate = 4000;
  logic en, busy;
  logic [7:0] sel, rd_idx = 0;
  logic [31:0] sweeps, rd_count;
  logic [N-1:0] rings = '0;
  real periods [N] = '{90.0, 150.0, 211.0, 333.3, 57.1};

  always #5 clk = ~clk;
  for (genvar i = 0; i < N; i++) begin : g_ring
    initial forever begin
      #(periods[i] / 2.0);
      rings[i] = en ? ~rings[i] : 1'b0;
    end
  end

  tid_tester #(.N_RO(N), .SETTLE_CYCLES(50)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .gate_i(gate), .enable_o(en), .sel_o(sel),
    .ro_i(rings[sel]), .busy_o(busy), .sweeps_o(sweeps), .rd_idx_i(rd_idx), .rd_count_o(rd_count));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exp_n;
    int cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    checks++; if (!busy || !en) begin failures++; $display("not started"); end
    while (busy) begin @(posedge clk); cyc++; end
    checks++; if (sweeps != 1 || en) begin failures++; $display("sweeps %0d en %b", sweeps, en); end
    checks++; if (cyc < N * (4000 + 50) || cyc > N * (4000 + 50 + 5)) begin failures++; $display("sweep took %0d", cyc); end
    for (int i = 0; i < N; i++) begin
      @(negedge clk) rd_idx = 8'(i);
      #1;
      exp_n = 4000.0 * 10.0 / periods[i];
      checks++;
      if (real'(rd_count) < exp_n - 1.5 || real'(rd_count) > exp_n + 1.5) begin
        failures++; $display("ring %0d count %0d expected %f", i, rd_count, exp_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
