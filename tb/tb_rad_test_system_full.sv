// tb_rad_test_system_full: the whole setup at its full size, with every
// parameter at its default (100 MHz tester clock, 12 MHz watchdog clock,
// 4 x 4096 flip-flops, 32 x 1024 x 40-bit memory, 130 rings of 65 stages,
// 100 B13 circuits without voting, 13866-CPE XOR chain, single watchdog
// with 100 ms period). All tests run side by side; each does one complete
// operation with one injected upset where the test has one. Short
// run-time settings keep the run short: a 300 us ring gate and a 100 us
// memory interval. The watchdog test withholds the answer to the first
// wake and runs until the watchdog's reset follows (one 100 ms period, about
// 10 million tester clocks); answered wakes are covered by the reduced-size
// system testbench. B13 copies are b13_model stand-ins.
`timescale 1ns / 1ps
module tb_rad_test_system_full;
  import rad_test_pkg::*;
  localparam int NB13 = 100, W = 10, NRO = 130;
  int checks = 0, failures = 0;

  logic clk = 0, clk_wd = 0, rst_n = 0;
  always #5 clk = ~clk;
  always #41.667 clk_wd = ~clk_wd;

  logic [3:0] pll_lock = '0;
  logic pll_arm = 0;
  logic ff_start = 0, ff_stop = 0;
  pattern_e ff_mode = PAT_ONE;
  logic bram_start = 0, bram_stop = 0;
  pattern_e bram_pat = PAT_TOGGLE;
  logic [31:0] bram_interval = 10_000;
  logic tid_start = 0;
  logic [31:0] tid_gate = 30_000;
  logic [7:0] tid_idx = 0;
  logic b13_start = 0, b13_stop = 0, b13_rd = 0;
  logic cram_start = 0, cram_stop = 0, cram_level = 0, cram_inject = 0;
  logic wd_start = 0, wd_stop = 0;
  logic [7:0] wd_skip = 1;

  logic [3:0] pll_locked;
  logic [31:0] pll_loss [4];
  logic ff_running; logic [31:0] ff_ev, ff_bits; logic [7:0] ff_last;
  logic bram_running; logic [31:0] bram_scans, bram_ev, bram_bits; logic [4:0] bram_lblk; logic [9:0] bram_laddr;
  logic tid_busy; logic [31:0] tid_sweeps, tid_count;
  logic b13_rst_n, b13_running, b13_halted, b13_empty; logic [W-1:0] b13_pattern;
  logic [31:0] b13_seu; b13_rec_t b13_rec; logic [9:0] b13_count;
  logic cram_running, cram_valid; logic [31:0] cram_ev, cram_prop;
  logic wd_running, wd_reconfig, wd_mm;
  logic [31:0] wd_wakes, wd_skips, wd_resets, wd_fw, wd_fr, wd_fs;

  logic [W-1:0] b13_raw [NB13];
  logic [W-1:0] b13_inst [NB13];
  logic [W-1:0] b13_golden;
  logic [W-1:0] b13_corrupt [NB13];
  for (genvar i = 0; i < NB13; i++) begin : g_b13
    b13_model #(.W(W)) u_b13 (.clk(clk), .rst_n(b13_rst_n), .pattern_i(b13_pattern), .out_o(b13_raw[i]));
    assign b13_inst[i] = b13_raw[i] ^ b13_corrupt[i];
  end
  b13_model #(.W(W)) u_golden (.clk(clk), .rst_n(b13_rst_n), .pattern_i(b13_pattern), .out_o(b13_golden));

  rad_test_system dut (
    .clk(clk), .clk_wd(clk_wd), .rst_n(rst_n),
    .pll_lock_i(pll_lock), .pll_arm_i(pll_arm), .pll_locked_o(pll_locked), .pll_loss_cnt_o(pll_loss),
    .ff_start_i(ff_start), .ff_stop_i(ff_stop), .ff_mode_i(ff_mode), .ff_running_o(ff_running),
    .ff_flip_events_o(ff_ev), .ff_flip_bits_o(ff_bits), .ff_last_chain_o(ff_last),
    .bram_start_i(bram_start), .bram_stop_i(bram_stop), .bram_pattern_i(bram_pat), .bram_interval_i(bram_interval),
    .bram_running_o(bram_running), .bram_scans_o(bram_scans), .bram_events_o(bram_ev),
    .bram_bit_errors_o(bram_bits), .bram_last_blk_o(bram_lblk), .bram_last_addr_o(bram_laddr),
    .tid_start_i(tid_start), .tid_gate_i(tid_gate), .tid_busy_o(tid_busy), .tid_sweeps_o(tid_sweeps),
    .tid_rd_idx_i(tid_idx), .tid_rd_count_o(tid_count),
    .b13_start_i(b13_start), .b13_stop_i(b13_stop), .b13_rst_n_o(b13_rst_n), .b13_pattern_o(b13_pattern),
    .b13_inst_i(b13_inst), .b13_golden_i(b13_golden), .b13_running_o(b13_running), .b13_halted_o(b13_halted),
    .b13_seu_count_o(b13_seu), .b13_fifo_rd_i(b13_rd), .b13_fifo_data_o(b13_rec),
    .b13_fifo_empty_o(b13_empty), .b13_fifo_count_o(b13_count),
    .cram_start_i(cram_start), .cram_stop_i(cram_stop), .cram_level_i(cram_level), .cram_inject_i(cram_inject),
    .cram_running_o(cram_running), .cram_events_o(cram_ev), .cram_prop_cycles_o(cram_prop), .cram_prop_valid_o(cram_valid),
    .wd_start_i(wd_start), .wd_stop_i(wd_stop), .wd_skip_every_i(wd_skip), .wd_running_o(wd_running),
    .wd_reconfig_req_o(wd_reconfig), .wd_wakes_o(wd_wakes), .wd_skips_o(wd_skips), .wd_resets_ok_o(wd_resets),
    .wd_fail_no_wake_o(wd_fw), .wd_fail_no_reset_o(wd_fr), .wd_fail_spurious_o(wd_fs), .wd_mismatch_o(wd_mm));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (15_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB13; i++) b13_corrupt[i] = '0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) begin
      pll_lock = 4'hF; ff_start = 1; bram_start = 1; tid_start = 1;
      b13_start = 1; cram_start = 1; wd_start = 1;
    end
    @(negedge clk) begin
      ff_start = 0; bram_start = 0; tid_start = 0;
      b13_start = 0; cram_start = 0; wd_start = 0;
    end
    fork
      begin : t_pll
        repeat (10) @(posedge clk);
        @(negedge clk) pll_arm = 1;
        repeat (5) @(posedge clk);
        @(negedge clk) pll_lock[3] = 0;
        repeat (5) @(posedge clk);
        @(negedge clk) pll_lock[3] = 1;
        repeat (5) @(posedge clk);
        check(pll_loss[3] == 1 && pll_loss[0] == 0 && pll_locked == 4'hF, "PLL loss counted");
      end
      begin : t_ff
        repeat (4096 + 16 + 200) @(posedge clk);
        check(ff_running && ff_ev == 0, "FF clean");
        @(negedge clk) dut.u_ff_dut.g_chain[2].stages[1000] = 1'b0;
        repeat (4096 + 100) @(posedge clk);
        check(ff_ev == 1 && ff_bits == 1 && ff_last == 2, "FF upset seen");
      end
      begin : t_bram
        while (bram_scans < 1) @(posedge clk);
        check(bram_ev == 0, "BRAM clean");
        @(negedge clk) dut.u_bram_dut.g_blk[31].mem[1023] = dut.u_bram_dut.g_blk[31].mem[1023] ^ 40'h3;
        while (bram_scans < 2) @(posedge clk);
        check(bram_ev == 1 && bram_bits == 2 && bram_lblk == 31 && bram_laddr == 1023, "BRAM upset seen");
      end
      begin : t_tid
        while (tid_sweeps == 0) @(posedge clk);
        for (int i = 0; i < NRO; i += 43) begin
          @(negedge clk) tid_idx = 8'(i);
          #1 check(tid_count >= 1 && tid_count <= 3, $sformatf("TID ring %0d count %0d", i, tid_count));
        end
      end
      begin : t_b13
        repeat (1000) @(posedge clk);
        check(b13_seu == 0 && b13_running, "B13 clean");
        @(negedge clk) b13_corrupt[77] = 10'h200;
        repeat (2) @(posedge clk);
        @(negedge clk) b13_corrupt[77] = '0;
        repeat (100) @(posedge clk);
        check(b13_seu == 1 && !b13_empty && b13_rec.idx == 77, "B13 upset recorded");
      end
      begin : t_cram
        repeat (4096 + 100) @(posedge clk);
        @(negedge clk) cram_inject = 1;
        @(negedge clk) cram_inject = 0;
        repeat (20) @(posedge clk);
        check(cram_valid && cram_prop >= 2 && cram_prop <= 4, "CRAM injection timed");
        repeat (4096 + 100) @(posedge clk);
        force dut.u_cram_dut.g_cpe[9000].s = 1'b1;   // all stages are 0 at level 0
        repeat (10) @(posedge clk);
        release dut.u_cram_dut.g_cpe[9000].s;
        check(cram_ev == 1, "CRAM upset counted");
      end
      begin : t_wd
        while (wd_resets == 0) @(posedge clk);
        check(wd_wakes == 1 && wd_skips == 1 && wd_fw + wd_fr + wd_fs == 0 && !wd_mm, "watchdog reset after withheld answer");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
