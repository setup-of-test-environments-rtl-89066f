// tb_sync_fifo: random pushes and pops on an 8-deep FIFO against a queue
// model; checks head data, full, empty and count every clock, including
// pushes into a full and pops from an empty FIFO, which must be ignored.
`timescale 1ns / 1ps
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  logic [7:0] wdata = 0, rdata;
  logic full, empty;
  logic [3:0] count;
  logic [7:0] q [$];

  always #5 clk = ~clk;

  sync_fifo #(.W(8), .DEPTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .wr_i(wr), .wdata_i(wdata), .rd_i(rd),
    .rdata_o(rdata), .full_o(full), .empty_o(empty), .count_o(count));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      bias = (n / 500) % 2;          // phases that fill and that drain
      @(negedge clk);
      checks++;
      if (count !== 4'(q.size()) || full !== (q.size() == 8) || empty !== (q.size() == 0) ||
          (q.size() > 0 && rdata !== q[0])) begin
        failures++; $display("n=%0d count %0d model %0d", n, count, q.size());
      end
      wr = ($urandom_range(0, 3) < (bias ? 3 : 1));
      rd = ($urandom_range(0, 3) < (bias ? 1 : 3));
      wdata = 8'($urandom);
      @(posedge clk);
      begin
        int pre;
        pre = q.size();
        if (rd && pre > 0) void'(q.pop_front());
        if (wr && pre < 8) q.push_back(wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
