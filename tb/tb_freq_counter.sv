// tb_freq_counter: measures asynchronous square waves of several periods
// over a 5000-clock gate (10 ns clock) and compares the count with
// gate time / period, allowing one edge of uncertainty; also checks the
// done pulse timing and that start is ignored while busy.
`timescale 1ns / 1ps
module tb_freq_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, sig = 0;
  logic [31:0] gate = 5000;
  logic busy, done;
  logic [31:0] count;
  real half = 50.0;

  always #5 clk = ~clk;
  initial forever #(half) sig = ~sig;

  freq_counter #(.CNT_W(32)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .gate_i(gate), .sig_i(sig),
    .busy_o(busy), .done_o(done), .count_o(count));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real periods [4] = '{100.0, 73.3, 1234.5, 41.7};
    real exp_n;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (periods[k]) begin
      half = periods[k] / 2.0;
      repeat (200) @(posedge clk);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; if (cyc == 100) begin
        // a second start while busy must be ignored
        start = 1; @(negedge clk); start = 0; end end
      exp_n = 5000.0 * 10.0 / periods[k];
      checks++;
      if (real'(count) < exp_n - 1.5 || real'(count) > exp_n + 1.5) begin
        failures++; $display("period %f: count %0d expected %f", periods[k], count, exp_n);
      end
      checks++; if (cyc < 5000 || cyc > 5003) begin failures++; $display("gate length %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
