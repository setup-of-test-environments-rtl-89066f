// tb_rad_test_system: end-to-end run of all tests of the setup at reduced
// sizes and with time scaled down 1000x (the tester counts 100 clocks per
// ms, the watchdog 12). The B13 copies and the golden reference are
// b13_model stand-ins; the B13 checker is the TMR version (5 voted
// triples) and the watchdog the 3-copy version, so that voting is
// exercised. Upsets are injected by writing into the device-side designs.
// Every mechanism of the setup is counted and must happen at least once:
// PLL lock loss, flip-flop window change, memory event with rewrite, ring
// sweep, B13 error with restart, a B13 upset masked by voting, B13 FIFO
// full halt, CRAM flip timing and CRAM event, watchdog answer, watchdog
// reset after a withheld answer, watchdog failure with reconfiguration,
// and a watchdog copy outvoted.
`timescale 1ns / 1ps
module tb_rad_test_system;
  import rad_test_pkg::*;
  localparam int NB13 = 5, W = 10, NRO = 8, ROS = 3, SP = 9;
  localparam real ROT = 20.0;
  int checks = 0, failures = 0;

  logic clk = 0, clk_wd = 0, rst_n = 0;
  always #5 clk = ~clk;
  always #41.667 clk_wd = ~clk_wd;

  // Processor-side controls.
  logic [3:0] pll_lock = '0;
  logic pll_arm = 0;
  logic ff_start = 0, ff_stop = 0;
  pattern_e ff_mode = PAT_TOGGLE;
  logic bram_start = 0, bram_stop = 0;
  pattern_e bram_pat = PAT_TOGGLE;
  logic [31:0] bram_interval = 200;
  logic tid_start = 0;
  logic [31:0] tid_gate = 3000;
  logic [7:0] tid_idx = 0;
  logic b13_start = 0, b13_stop = 0, b13_rd = 0;
  logic cram_start = 0, cram_stop = 0, cram_level = 1, cram_inject = 0;
  logic wd_start = 0, wd_stop = 0;
  logic [7:0] wd_skip = 2;

  // Status.
  logic [3:0] pll_locked;
  logic [31:0] pll_loss [4];
  logic ff_running; logic [31:0] ff_ev, ff_bits; logic [7:0] ff_last;
  logic bram_running; logic [31:0] bram_scans, bram_ev, bram_bits; logic [1:0] bram_lblk; logic [4:0] bram_laddr;
  logic tid_busy; logic [31:0] tid_sweeps, tid_count;
  logic b13_rst_n, b13_running, b13_halted, b13_empty; logic [W-1:0] b13_pattern;
  logic [31:0] b13_seu; b13_rec_t b13_rec; logic [2:0] b13_count;
  logic cram_running, cram_valid; logic [31:0] cram_ev, cram_prop;
  logic wd_running, wd_reconfig, wd_mm;
  logic [31:0] wd_wakes, wd_skips, wd_resets, wd_fw, wd_fr, wd_fs;

  // B13 stand-ins: 15 circuits (5 triples) and the golden reference.
  logic [W-1:0] b13_raw [3 * NB13];
  logic [W-1:0] b13_inst [3 * NB13];
  logic [W-1:0] b13_golden;
  logic [W-1:0] b13_corrupt [3 * NB13];
  for (genvar i = 0; i < 3 * NB13; i++) begin : g_b13
    b13_model #(.W(W)) u_b13 (.clk(clk), .rst_n(b13_rst_n), .pattern_i(b13_pattern), .out_o(b13_raw[i]));
    assign b13_inst[i] = b13_raw[i] ^ b13_corrupt[i];
  end
  b13_model #(.W(W)) u_golden (.clk(clk), .rst_n(b13_rst_n), .pattern_i(b13_pattern), .out_o(b13_golden));

  rad_test_system #(
    .TESTER_CLK_HZ(100_000), .WD_CLK_HZ(12_000),
    .FF_CHAINS(2), .FF_LEN(64), .FF_WIN(8),
    .BRAM_BLOCKS(4), .BRAM_DEPTH(32),
    .N_RO(NRO), .RO_STAGES(ROS), .RO_DELAY_NS(ROT),
    .N_B13(NB13), .B13_TMR(1'b1), .B13_FIFO_DEPTH(4),
    .N_CPE(301), .WD_COPIES(3)
  ) dut (
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

  // Mechanism counters.
  int m_pll_loss, m_ff_flip, m_bram_event, m_bram_rewrite, m_tid_sweep, m_b13_error, m_b13_masked,
      m_b13_halt, m_cram_timed, m_cram_event, m_wd_answer, m_wd_reset, m_wd_reconfig, m_wd_outvoted;
  int wd_reconfigs = 0, wd_mm_cycles = 0;
  always @(posedge clk) if (rst_n && wd_reconfig) wd_reconfigs++;
  always @(posedge clk_wd) if (rst_n && wd_mm) wd_mm_cycles++;

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3 * NB13; i++) b13_corrupt[i] = '0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // The watchdog test runs in the background throughout.
    pulse(wd_start);

    // ---- PLL: three lock losses of PLL 2 while armed.
    pll_lock = 4'hF;
    repeat (10) @(posedge clk);
    pll_arm = 1;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk) pll_lock[2] = 0;
      repeat (6) @(posedge clk);
      @(negedge clk) pll_lock[2] = 1;
      repeat (6) @(posedge clk);
    end
    check(pll_loss[2] == 3 && pll_loss[0] == 0, "PLL loss count");
    m_pll_loss = pll_loss[2];

    // ---- Flip-flop chains: toggle pattern, one upset in chain 1.
    pulse(ff_start);
    repeat (64 + 8 + 100) @(posedge clk);
    check(ff_ev == 0, "FF clean");
    @(negedge clk) dut.u_ff_dut.g_chain[1].stages[20] = ~dut.u_ff_dut.g_chain[1].stages[20];
    repeat (64 + 30) @(posedge clk);
    check(ff_ev == 1 && ff_bits == 1 && ff_last == 1, "FF upset seen");
    m_ff_flip = ff_ev;
    pulse(ff_stop);

    // ---- Block memory: toggle pattern, one upset in block 2 word 7.
    pulse(bram_start);
    while (bram_scans < 2) @(posedge clk);
    check(bram_ev == 0, "BRAM clean");
    @(negedge clk) dut.u_bram_dut.g_blk[2].mem[7] = dut.u_bram_dut.g_blk[2].mem[7] ^ 40'h100;
    while (bram_scans < 4) @(posedge clk);
    check(bram_ev == 1 && bram_bits == 1 && bram_lblk == 2 && bram_laddr == 7, "BRAM upset seen");
    check(dut.u_bram_dut.g_blk[2].mem[7] == 40'hAA_AAAA_AAAA, "BRAM rewritten");
    m_bram_event = bram_ev;
    m_bram_rewrite = (dut.u_bram_dut.g_blk[2].mem[7] == 40'hAA_AAAA_AAAA) ? 1 : 0;
    pulse(bram_stop);

    // ---- TID: one sweep over the rings.
    pulse(tid_start);
    while (tid_busy) @(posedge clk);
    m_tid_sweep = tid_sweeps;
    check(tid_sweeps == 1, "TID sweep");
    for (int i = 0; i < NRO; i++) begin
      real per, expn;
      int ofs;
      @(negedge clk) tid_idx = 8'(i);
      #1;
      ofs = (i * 37) % (2 * SP + 1) - SP;
      per = 2.0 * ROS * ROT * (100.0 + ofs) / 100.0;
      expn = 3000.0 * 10.0 / per;
      check(real'(tid_count) > expn - 1.5 && real'(tid_count) < expn + 1.5, $sformatf("TID ring %0d count %0d vs %f", i, tid_count, expn));
    end

    // ---- B13: start, masked single upset, real upset, fill FIFO.
    pulse(b13_start);
    repeat (200) @(posedge clk);
    check(b13_seu == 0, "B13 clean");
    @(negedge clk) b13_corrupt[4] = 10'h3FF;           // one circuit of triple 1
    repeat (50) @(posedge clk);
    check(b13_seu == 0, "B13 single circuit masked by voting");
    m_b13_masked = (b13_seu == 0) ? 1 : 0;
    @(negedge clk) b13_corrupt[4] = '0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk) begin b13_corrupt[9] = 10'h155; b13_corrupt[10] = 10'h155; end   // two circuits of triple 3
      repeat (3) @(posedge clk);
      @(negedge clk) begin b13_corrupt[9] = '0; b13_corrupt[10] = '0; end
      repeat (100) @(posedge clk);
    end
    m_b13_error = b13_seu;
    m_b13_halt = b13_halted;
    check(b13_seu == 4 && b13_halted && b13_count == 4, "B13 errors and halt");
    check(b13_rec.idx == 3, "B13 record names triple 3");
    pulse(b13_stop);

    // ---- CRAM: settle at level 1, time an injected flip, then an upset.
    pulse(cram_start);
    repeat (4200) @(posedge clk);
    pulse(cram_inject);
    repeat (20) @(posedge clk);
    check(cram_valid && cram_prop >= 2 && cram_prop <= 4, "CRAM injection timed");
    m_cram_timed = cram_valid;
    repeat (4200) @(posedge clk);
    check(cram_running && cram_ev == 0, "CRAM clean");
    begin
      logic v;
      v = dut.u_cram_dut.g_cpe[150].s;
      if (v) force dut.u_cram_dut.g_cpe[150].s = 1'b0;
      else   force dut.u_cram_dut.g_cpe[150].s = 1'b1;
      repeat (10) @(posedge clk);
      release dut.u_cram_dut.g_cpe[150].s;
    end
    check(cram_ev == 1 && !cram_running, "CRAM upset counted and test stopped");
    m_cram_event = cram_ev;

    // ---- Watchdog: let it run to at least 6 wakes, upset one copy, then kill its wakes.
    while (wd_wakes < 6) @(posedge clk);
    force dut.u_wd_dut.outs[2] = 2'b11;
    repeat (100) @(posedge clk);
    release dut.u_wd_dut.outs[2];
    m_wd_answer = wd_wakes - wd_skips;
    m_wd_reset = wd_resets;
    m_wd_outvoted = wd_mm_cycles;
    check(wd_resets >= 2 && wd_fw + wd_fr + wd_fs == 0, "watchdog resets after withheld answers");
    force dut.wd_wake = 1'b0;
    repeat (200 * 100) @(posedge clk);
    release dut.wd_wake;
    repeat (300 * 100) @(posedge clk);
    m_wd_reconfig = wd_reconfigs;
    check(wd_fw >= 1 && wd_reconfigs >= 1, "watchdog failure and reconfiguration");
    check(wd_wakes > 6 + 2, "watchdog running again after restart");

    // Every mechanism must have happened.
    check(m_pll_loss > 0, "mechanism: PLL lock loss");
    check(m_ff_flip > 0, "mechanism: flip-flop window change");
    check(m_bram_event > 0, "mechanism: memory event");
    check(m_bram_rewrite > 0, "mechanism: memory rewrite");
    check(m_tid_sweep > 0, "mechanism: ring sweep");
    check(m_b13_error > 0, "mechanism: B13 error and restart");
    check(m_b13_masked > 0, "mechanism: B13 upset masked by voting");
    check(m_b13_halt > 0, "mechanism: B13 FIFO full halt");
    check(m_cram_timed > 0, "mechanism: CRAM flip timing");
    check(m_cram_event > 0, "mechanism: CRAM event");
    check(m_wd_answer > 0, "mechanism: watchdog answered");
    check(m_wd_reset > 0, "mechanism: watchdog reset after withheld answer");
    check(m_wd_reconfig > 0, "mechanism: watchdog failure and reconfiguration");
    check(m_wd_outvoted > 0, "mechanism: watchdog copy outvoted");
    $display("mechanisms: pll_loss=%0d ff_flip=%0d bram_event=%0d bram_rewrite=%0d tid_sweep=%0d b13_error=%0d b13_masked=%0d b13_halt=%0d cram_timed=%0d cram_event=%0d wd_answer=%0d wd_reset=%0d wd_reconfig=%0d wd_outvoted=%0d",
             m_pll_loss, m_ff_flip, m_bram_event, m_bram_rewrite, m_tid_sweep, m_b13_error, m_b13_masked,
             m_b13_halt, m_cram_timed, m_cram_event, m_wd_answer, m_wd_reset, m_wd_reconfig, m_wd_outvoted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
