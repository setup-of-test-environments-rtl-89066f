// rad_test_pkg: types and constants shared by the radiation-test tester
// cores and the designs loaded into the devices under test.
//
// The tester runs on a 100 MHz clock and the iCE40 watchdog on its board's
// 12 MHz clock; both rates are those of the described setup. The pattern
// encoding (all zeros, all ones, or a 0/1 toggle) is used by the flip-flop
// test and by the memory test; its 2-bit code is this design's choice.
`timescale 1ns / 1ps
package rad_test_pkg;

  localparam int unsigned DEFAULT_TESTER_CLK_HZ = 100_000_000;
  localparam int unsigned DEFAULT_WD_CLK_HZ     = 12_000_000;

  // Data pattern driven into the flip-flop chains or written into memory.
  typedef enum logic [1:0] {
    PAT_ZERO   = 2'd0,   // constant 0
    PAT_ONE    = 2'd1,   // constant 1
    PAT_TOGGLE = 2'd2    // 0/1 alternating (per cycle, or per bit position)
  } pattern_e;

  // Value of bit position pos for a memory word written with pattern p:
  // toggle gives 0 on even and 1 on odd bit positions.
  function automatic logic pattern_bit(pattern_e p, int unsigned pos);
    case (p)
      PAT_ZERO:   return 1'b0;
      PAT_ONE:    return 1'b1;
      PAT_TOGGLE: return pos[0];
      default:    return 1'b0;
    endcase
  endfunction

  // One B13 error record as stored in the tester FIFO.
  typedef struct packed {
    logic [31:0] timestamp;   // tester cycle count when the error was seen
    logic [7:0]  idx;         // number of the faulty B13 instance
    logic [9:0]  value;       // its faulty output value
  } b13_rec_t;

endpackage
