// tb_pll_lock_monitor: drives four lock signals with random drop-outs and
// checks the per-PLL loss counters against a count of the 1->0 edges made
// while armed, taking the two-clock synchroniser into account.
`timescale 1ns / 1ps
module tb_pll_lock_monitor;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, arm = 0;
  logic [3:0] lock = '0;
  logic [3:0] locked;
  logic [31:0] cnt [4];
  int exp_cnt [4];

  always #5 clk = ~clk;

  pll_lock_monitor #(.N_PLL(4), .CNT_W(32)) dut (
    .clk(clk), .rst_n(rst_n), .arm_i(arm), .lock_i(lock),
    .locked_o(locked), .loss_cnt_o(cnt));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) exp_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    lock = 4'hF;                       // all PLLs lock
    repeat (5) @(posedge clk);
    checks++; if (locked !== 4'hF) begin failures++; $display("locked %b", locked); end
    // Losses while not armed are not counted.
    lock[1] = 0; repeat (4) @(posedge clk); lock[1] = 1; repeat (4) @(posedge clk);
    arm = 1;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      int p;
      p = $urandom_range(0, 3);
      @(negedge clk) lock[p] = 0;
      exp_cnt[p]++;
      repeat ($urandom_range(3, 8)) @(posedge clk);
      @(negedge clk) lock[p] = 1;
      repeat ($urandom_range(3, 8)) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (cnt[i] !== 32'(exp_cnt[i])) begin failures++; $display("pll %0d: %0d vs %0d", i, cnt[i], exp_cnt[i]); end
    end
    // Disarmed again: no more counting.
    arm = 0;
    @(negedge clk) lock[0] = 0; repeat (5) @(posedge clk);
    checks++; if (cnt[0] !== 32'(exp_cnt[0])) begin failures++; $display("counted while disarmed"); end
    checks++; if (locked[0] !== 1'b0) begin failures++; $display("locked_o"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
