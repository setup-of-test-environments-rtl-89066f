// rad_test_system: the radiation-test setup, tester and devices under test
// wired together.
//
// The tester side stands for the programmable logic of the Zynq board: one
// core per test, each controlled and read by the processor (the control
// and status ports here). The device-under-test side holds the test
// designs of the GateMate FPGA (flip-flop chains with window registers,
// 32 block memories, 130 ring oscillators, the B13 checker and the CRAM
// XOR chain) and the iCE40 watchdog. In the real setup the GateMate carries
// one test design at a time and each pair is linked through the FMC or
// PMOD cable; here all of them sit side by side so that every test can run
// in one simulation.
//
// Clocks: clk is the 100 MHz tester clock, which the tester also forwards
// to the GateMate designs (and as reference clock to its PLLs); clk_wd is
// the 12 MHz clock of the iCE40 board. rst_n resets the tester cores.
//
// Parts that the setup uses but does not design are outside: the four
// GateMate PLLs (their lock outputs come in on pll_lock_i and their
// reference clock is clk), and the B13 benchmark circuits (the pattern and
// reset go out on b13_pattern_o / b13_rst_n_o, the outputs of the N_B13
// copies and of the golden reference come back on b13_inst_i and
// b13_golden_i).
`timescale 1ns / 1ps
module rad_test_system
  import rad_test_pkg::*;
#(
  parameter int unsigned TESTER_CLK_HZ = DEFAULT_TESTER_CLK_HZ,
  parameter int unsigned WD_CLK_HZ    = DEFAULT_WD_CLK_HZ,
  parameter int unsigned N_PLL        = 4,
  parameter int unsigned FF_CHAINS    = 4,
  parameter int unsigned FF_LEN       = 4096,
  parameter int unsigned FF_WIN       = 16,
  parameter int unsigned BRAM_BLOCKS  = 32,
  parameter int unsigned BRAM_DEPTH   = 1024,
  parameter int unsigned BRAM_DW      = 40,
  parameter int unsigned N_RO         = 130,
  parameter int unsigned RO_STAGES    = 65,
  parameter real         RO_DELAY_NS  = 1131.0,
  parameter int unsigned N_B13        = 100,
  parameter int unsigned B13_W        = 10,
  parameter bit          B13_TMR      = 1'b0,
  parameter int unsigned B13_FIFO_DEPTH = 512,
  parameter int unsigned N_CPE        = 13866,
  parameter int unsigned WD_COPIES    = 1,
  parameter int unsigned WD_PERIOD_MS = 100,
  parameter int unsigned WD_WAKE_MS   = 20,
  parameter int unsigned WD_RST_MS    = 30,
  parameter int unsigned WD_DONE_MS   = 15,
  parameter int unsigned WD_TIMEOUT_MS = 150,
  localparam int unsigned B13_INST    = B13_TMR ? 3 * N_B13 : N_B13,
  localparam int unsigned BBW         = $clog2(BRAM_BLOCKS),
  localparam int unsigned BAW         = $clog2(BRAM_DEPTH)
) (
  input  logic               clk,
  input  logic               clk_wd,
  input  logic               rst_n,

  // PLL test
  input  logic [N_PLL-1:0]   pll_lock_i,
  input  logic               pll_arm_i,
  output logic [N_PLL-1:0]   pll_locked_o,
  output logic [31:0]        pll_loss_cnt_o [N_PLL],

  // Flip-flop test
  input  logic               ff_start_i,
  input  logic               ff_stop_i,
  input  pattern_e           ff_mode_i,
  output logic               ff_running_o,
  output logic [31:0]        ff_flip_events_o,
  output logic [31:0]        ff_flip_bits_o,
  output logic [7:0]         ff_last_chain_o,

  // Block-memory test
  input  logic               bram_start_i,
  input  logic               bram_stop_i,
  input  pattern_e           bram_pattern_i,
  input  logic [31:0]        bram_interval_i,
  output logic               bram_running_o,
  output logic [31:0]        bram_scans_o,
  output logic [31:0]        bram_events_o,
  output logic [31:0]        bram_bit_errors_o,
  output logic [BBW-1:0]     bram_last_blk_o,
  output logic [BAW-1:0]     bram_last_addr_o,

  // Total-ionising-dose test
  input  logic               tid_start_i,
  input  logic [31:0]        tid_gate_i,
  output logic               tid_busy_o,
  output logic [31:0]        tid_sweeps_o,
  input  logic [7:0]         tid_rd_idx_i,
  output logic [31:0]        tid_rd_count_o,

  // B13 benchmark test
  input  logic               b13_start_i,
  input  logic               b13_stop_i,
  output logic               b13_rst_n_o,
  output logic [B13_W-1:0]   b13_pattern_o,
  input  logic [B13_W-1:0]   b13_inst_i [B13_INST],
  input  logic [B13_W-1:0]   b13_golden_i,
  output logic               b13_running_o,
  output logic               b13_halted_o,
  output logic [31:0]        b13_seu_count_o,
  input  logic               b13_fifo_rd_i,
  output b13_rec_t           b13_fifo_data_o,
  output logic               b13_fifo_empty_o,
  output logic [$clog2(B13_FIFO_DEPTH):0] b13_fifo_count_o,

  // CRAM test
  input  logic               cram_start_i,
  input  logic               cram_stop_i,
  input  logic               cram_level_i,
  input  logic               cram_inject_i,
  output logic               cram_running_o,
  output logic [31:0]        cram_events_o,
  output logic [31:0]        cram_prop_cycles_o,
  output logic               cram_prop_valid_o,

  // Watchdog test (iCE40)
  input  logic               wd_start_i,
  input  logic               wd_stop_i,
  input  logic [7:0]         wd_skip_every_i,
  output logic               wd_running_o,
  output logic               wd_reconfig_req_o,
  output logic [31:0]        wd_wakes_o,
  output logic [31:0]        wd_skips_o,
  output logic [31:0]        wd_resets_ok_o,
  output logic [31:0]        wd_fail_no_wake_o,
  output logic [31:0]        wd_fail_no_reset_o,
  output logic [31:0]        wd_fail_spurious_o,
  output logic               wd_mismatch_o
);

  // ---------------------------------------------------------------- PLL
  pll_lock_monitor #(.N_PLL(N_PLL), .CNT_W(32)) u_pll_mon (
    .clk        (clk),
    .rst_n      (rst_n),
    .arm_i      (pll_arm_i),
    .lock_i     (pll_lock_i),
    .locked_o   (pll_locked_o),
    .loss_cnt_o (pll_loss_cnt_o)
  );

  // ---------------------------------------------------------- flip-flops
  logic              ff_pattern, ff_win_load;
  logic [FF_WIN-1:0] ff_window [FF_CHAINS];

  ff_test_tester #(.N_CHAINS(FF_CHAINS), .CHAIN_LEN(FF_LEN), .WIN_W(FF_WIN)) u_ff_tester (
    .clk           (clk),
    .rst_n         (rst_n),
    .start_i       (ff_start_i),
    .stop_i        (ff_stop_i),
    .mode_i        (ff_mode_i),
    .pattern_o     (ff_pattern),
    .win_load_o    (ff_win_load),
    .window_i      (ff_window),
    .running_o     (ff_running_o),
    .flip_events_o (ff_flip_events_o),
    .flip_bits_o   (ff_flip_bits_o),
    .last_chain_o  (ff_last_chain_o)
  );

  ff_chain_wsr #(.N_CHAINS(FF_CHAINS), .CHAIN_LEN(FF_LEN), .WIN_W(FF_WIN)) u_ff_dut (
    .clk        (clk),
    .pattern_i  (ff_pattern),
    .win_load_i (ff_win_load),
    .window_o   (ff_window)
  );

  // --------------------------------------------------------- block RAM
  logic [BBW-1:0]     bram_blk;
  logic [BAW-1:0]     bram_addr;
  logic               bram_we;
  pattern_e           bram_wpat;
  logic [BRAM_DW-1:0] bram_rdata;

  bram_test_tester #(.N_BLOCKS(BRAM_BLOCKS), .DEPTH(BRAM_DEPTH), .DW(BRAM_DW)) u_bram_tester (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (bram_start_i),
    .stop_i       (bram_stop_i),
    .pattern_i    (bram_pattern_i),
    .interval_i   (bram_interval_i),
    .blk_o        (bram_blk),
    .addr_o       (bram_addr),
    .we_o         (bram_we),
    .wpat_o       (bram_wpat),
    .rdata_i      (bram_rdata),
    .running_o    (bram_running_o),
    .scans_o      (bram_scans_o),
    .events_o     (bram_events_o),
    .bit_errors_o (bram_bit_errors_o),
    .last_blk_o   (bram_last_blk_o),
    .last_addr_o  (bram_last_addr_o)
  );

  bram_test_dut #(.N_BLOCKS(BRAM_BLOCKS), .DEPTH(BRAM_DEPTH), .DW(BRAM_DW)) u_bram_dut (
    .clk     (clk),
    .blk_i   (bram_blk),
    .addr_i  (bram_addr),
    .we_i    (bram_we),
    .wpat_i  (bram_wpat),
    .rdata_o (bram_rdata)
  );

  // ---------------------------------------------------------------- TID
  logic       ro_enable, ro_sel_out;
  logic [7:0] ro_sel;

  tid_tester #(.N_RO(N_RO)) u_tid_tester (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_i    (tid_start_i),
    .gate_i     (tid_gate_i),
    .enable_o   (ro_enable),
    .sel_o      (ro_sel),
    .ro_i       (ro_sel_out),
    .busy_o     (tid_busy_o),
    .sweeps_o   (tid_sweeps_o),
    .rd_idx_i   (tid_rd_idx_i),
    .rd_count_o (tid_rd_count_o)
  );

  tid_ro_array #(.N_RO(N_RO), .STAGES(RO_STAGES), .STAGE_DELAY_NS(RO_DELAY_NS)) u_tid_dut (
    .enable_i (ro_enable),
    .sel_i    (ro_sel),
    .ro_o     (ro_sel_out)
  );

  // ---------------------------------------------------------------- B13
  logic             b13_error;
  logic [7:0]       b13_faulty_idx;
  logic [B13_W-1:0] b13_faulty_val;

  b13_tester #(.W(B13_W), .FIFO_DEPTH(B13_FIFO_DEPTH)) u_b13_tester (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (b13_start_i),
    .stop_i       (b13_stop_i),
    .b13_rst_n_o  (b13_rst_n_o),
    .pattern_o    (b13_pattern_o),
    .error_i      (b13_error),
    .faulty_idx_i (b13_faulty_idx),
    .faulty_val_i (b13_faulty_val),
    .running_o    (b13_running_o),
    .halted_o     (b13_halted_o),
    .seu_count_o  (b13_seu_count_o),
    .fifo_rd_i    (b13_fifo_rd_i),
    .fifo_data_o  (b13_fifo_data_o),
    .fifo_empty_o (b13_fifo_empty_o),
    .fifo_count_o (b13_fifo_count_o)
  );

  b13_compare #(.N_B13(N_B13), .W(B13_W), .TMR(B13_TMR)) u_b13_dut (
    .clk          (clk),
    .rst_n        (b13_rst_n_o),
    .b13_i        (b13_inst_i),
    .golden_i     (b13_golden_i),
    .error_o      (b13_error),
    .faulty_idx_o (b13_faulty_idx),
    .faulty_val_o (b13_faulty_val)
  );

  // --------------------------------------------------------------- CRAM
  logic cram_static, cram_first, cram_out;

  cram_tester u_cram_tester (
    .clk           (clk),
    .rst_n         (rst_n),
    .start_i       (cram_start_i),
    .stop_i        (cram_stop_i),
    .level_i       (cram_level_i),
    .inject_i      (cram_inject_i),
    .static_o      (cram_static),
    .first_o       (cram_first),
    .chain_i       (cram_out),
    .running_o     (cram_running_o),
    .events_o      (cram_events_o),
    .prop_cycles_o (cram_prop_cycles_o),
    .prop_valid_o  (cram_prop_valid_o)
  );

  xor_chain_cram #(.N_CPE(N_CPE)) u_cram_dut (
    .static_i (cram_static),
    .first_i  (cram_first),
    .chain_o  (cram_out)
  );

  // ----------------------------------------------------------- watchdog
  logic wd_rst_n, wd_done, wd_wake, wd_dev_rst;

  watchdog_tester #(
    .CLK_HZ     (TESTER_CLK_HZ),
    .DONE_MS    (WD_DONE_MS),
    .TIMEOUT_MS (WD_TIMEOUT_MS)
  ) u_wd_tester (
    .clk             (clk),
    .rst_n           (rst_n),
    .start_i         (wd_start_i),
    .stop_i          (wd_stop_i),
    .skip_every_i    (wd_skip_every_i),
    .wd_rst_n_o      (wd_rst_n),
    .done_o          (wd_done),
    .wake_i          (wd_wake),
    .dev_rst_i       (wd_dev_rst),
    .running_o       (wd_running_o),
    .reconfig_req_o  (wd_reconfig_req_o),
    .wakes_o         (wd_wakes_o),
    .skips_o         (wd_skips_o),
    .resets_ok_o     (wd_resets_ok_o),
    .fail_no_wake_o  (wd_fail_no_wake_o),
    .fail_no_reset_o (wd_fail_no_reset_o),
    .fail_spurious_o (wd_fail_spurious_o)
  );

  watchdog_dut #(
    .N_COPIES  (WD_COPIES),
    .CLK_HZ    (WD_CLK_HZ),
    .PERIOD_MS (WD_PERIOD_MS),
    .WAKE_MS   (WD_WAKE_MS),
    .RST_MS    (WD_RST_MS)
  ) u_wd_dut (
    .clk        (clk_wd),
    .rst_n      (wd_rst_n),
    .done_i     (wd_done),
    .wake_o     (wd_wake),
    .dev_rst_o  (wd_dev_rst),
    .mismatch_o (wd_mismatch_o)
  );

endmodule
