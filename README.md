# Radiation test logic for an SRAM-based FPGA

Running an SRAM-based FPGA under a particle beam is an experiment: the
beam flips bits, and the test logic must notice each flip, classify it and
record it. Nobody can reach the board during the run. This design is the
digital side of such a setup. A *tester* in the programmable logic of a
Zynq SoC drives several small *device-under-test* (DUT) designs. These
run on the irradiated FPGA: a GateMate-class device with 20,480 logic
elements (CPEs), 32 block RAMs of 40 Kbit and 4 PLLs. A further DUT
design, a watchdog, runs on a small iCE40-class FPGA. Each DUT design
makes one kind of upset visible at a pin. The matching tester core
watches that pin, counts events and keeps what the processor needs to
log them.

Every part here is written in SystemVerilog. The tester cores are plain
synchronous logic on a 100 MHz clock. The DUT designs are the logic that
would be loaded into the devices under test. For simulation, the top
module `rad_test_system` wires each tester to its DUT design, and all
tests run side by side.

## The seven tests

| Test | DUT design | Tester | What an upset looks like |
|---|---|---|---|
| PLL | the device's 4 PLLs (outside) | `pll_lock_monitor` | a lock signal drops |
| Flip-flops | `ff_chain_wsr` | `ff_test_tester` | a window of the chain differs from the reference |
| Block RAM | `bram_test_dut` | `bram_test_tester` | a word read back differs from the written pattern |
| Total dose (TID) | `tid_ro_array` | `tid_tester` + `freq_counter` | ring-oscillator frequencies drift relative to one another |
| B13 benchmark | B13 copies + `b13_compare` | `b13_tester` + `sync_fifo` | a copy disagrees with the golden copy |
| Configuration memory (CRAM) | `xor_chain_cram` | `cram_tester` | the end of the XOR chain changes |
| Watchdog application | `watchdog_dut` (`watchdog`, `tmr_voter`) | `watchdog_tester` | missing wake, missing or spurious reset |

`rad_test_pkg` holds what several modules share:
- the clock rates;
- the pattern encoding: all zeros, all ones, or alternating bits (`pattern_e` and `pattern_bit()`);
- the B13 error record (`b13_rec_t`).

## Configuration memory: the XOR chain

This test is the least obvious one. An SRAM FPGA's configuration bits
define its logic, so a flipped configuration bit changes the function of
a logic element. `xor_chain_cram` turns each CPE into one stage of a long
chain:
- every stage is an 8-input XOR, which is every input of the CPE's lookup table;
- one input of each stage is the previous stage's output;
- the other seven inputs are a common static level;
- the chain has N_CPE = 13866 stages by default.

XOR is the one function where flipping any lookup-table bit that is in
use changes the output for the current inputs. So a single upset in any
used lookup table inverts the chain's output, and no upset can hide.
This also means the number of sensitive configuration bits is known from
the placed chain. For 13866 stages the reported figure is 199,896 bits,
which is the denominator of the per-bit cross section.
With the static level at 0 the output is 0. At level 1 each stage inverts
the previous stage, so the output is (N_CPE−1) mod 2.

`cram_tester` works as follows:
- it drives the level and waits 4096 clocks for the chain to settle;
- the chain needs about 12.6 µs, which is 1260 clocks;
- it then takes the synchronised output as its reference;
- any later change counts one event and stops the test, because the device must be reconfigured before the result means anything again.

On request the tester flips the head of the chain (`first_i`) and counts
the clocks until the output follows. This is how the propagation time is
measured.

In the RTL each stage is its own net (`g_cpe[i].s`), so a simulator
evaluates the 13866 stages as one ordered pass. A testbench injects an
upset by forcing one `g_cpe[k].s`.

## B13 benchmark test: restart, record, halt

The ITC'99 circuit B13 is a small sequential benchmark. The device holds
100 copies plus one golden copy, all driven by the same reset and pattern.
`b13_compare` compares every copy with the golden one. In the TMR version
each voted triple is compared instead: with `TMR=1` the device holds 33
triples. The compare stage registers one error flag, the number of the
lowest faulty copy and its value.

`b13_tester` drives the patterns and handles errors:
- the pattern is a new word every clock from a 16-bit LFSR;
- on an error it pushes a record {time stamp, copy, value} into a FIFO (`sync_fifo`, 512 deep, first-word fall-through);
- it counts the event and restarts the run by pulsing the B13 reset;
- errors in the first clocks after a restart are ignored;
- a full FIFO stops the whole test (`halted_o`) until the processor has read the records and restarted it.

The B13 logic itself is not part of this RTL, because its netlist comes
from the benchmark suite. The top takes the copies' outputs as inputs.
The testbenches use `tb/b13_model.sv` in its place. That is a small
sequential circuit of the same shape, and it is **not** B13.

## Flip-flops: window shift register

`ff_chain_wsr` has N_CHAINS chains of CHAIN_LEN flip-flops each (default
4 × 4096). All chains are fed by one pattern pin. Reading a whole chain
in parallel is not practical, so each chain ends in a 16-bit window
register that loads the last 16 stages on a window-load pulse.

`ff_test_tester` works as follows:
- it fills the chains, then pulses window load every 16 clocks, so every bit of the chain passes through a window once;
- with the alternating pattern, each window therefore always sees the same value;
- the first windows are the reference;
- every later window that differs counts one event, and the differing bits are added up.

## Block RAM

`bram_test_dut` has 32 blocks of 1024 × 40 bits: 40 Kbit each, 1.25 Mbit
in all. Reads have one clock of latency.

`bram_test_tester` works as follows:
- it writes the chosen pattern everywhere (32768 clocks);
- it waits `interval_i` clocks, then reads every word back;
- a scan with wrong words counts one event, adds the flipped bits, and records the block and word of the last bad word;
- it then rewrites the whole memory.

## Total ionising dose: ring oscillators

`tid_ro_array` holds 130 ring oscillators with a common enable and a
select multiplexer. A ring of n stages with stage delay t oscillates at
f = 1/(2·n·t). A real ring is a combinational loop whose frequency comes
from the silicon. Here `ring_oscillator` is a **behavioural model** that
toggles after n·t. Each ring's stage delay is offset by up to ±9 % by a
fixed formula, to give every ring its own frequency. The defaults are
n = 65 and t = 1131 ns; both are this design's choices.

`tid_tester` does one sweep:
- it enables the rings;
- for each ring in turn it selects the ring, waits SETTLE_CYCLES, and counts rising edges over `gate_i` clocks (`freq_counter`, with a 2-flop synchroniser);
- the 130 counts go into a table that the processor reads by index.

Dose effects show as changes in how the rings' frequencies order against
one another: 130·129/2 = 8385 pairs. That comparison is done in software
and is not part of this RTL.

## PLL lock

`pll_lock_monitor` synchronises the lock output of each of the 4 PLLs.
While armed, it counts every falling edge, one counter per PLL
(saturating). The PLLs are part of the device and are not modelled.

## Watchdog on the second FPGA

`watchdog` runs on a 12 MHz clock:
- every 100 ms it raises `wake_o` for 20 ms;
- if no done pulse arrives during that period, it holds `dev_rst_o` for 30 ms and then starts a new period.

`watchdog_dut` holds N_COPIES watchdogs whose outputs go through a bitwise
majority vote (`tmr_voter`):
- 1 copy is the standard version;
- 3 copies are the TMR version;
- 12 copies is the version that fills the device;
- `mismatch_o` shows when the copies disagree.

`watchdog_tester` runs on the 100 MHz clock:
- it answers each wake with a 15 ms done pulse that starts when wake falls;
- it deliberately withholds every K-th answer (`skip_every_i`) and then expects a reset;
- a missing wake (150 ms), a missing reset or a reset after a given answer counts as a failure;
- a failure raises `reconfig_req_o` and restarts the watchdog.

## Interface of the top

`rad_test_system` has three clock and reset inputs: `clk` (100 MHz
tester), `clk_wd` (12 MHz watchdog board) and `rst_n` (synchronous, active
low). Each test has its own group of ports, all plain signals:
- control: start, stop, mode or level, interval, gate time;
- status: running flags, event counters, last location, FIFO read port.

In the full setup a processor writes these controls and reads these
counters through a bank of 32-bit registers. That register interface is
not included. The PLL lock inputs and the B13 copies' outputs are inputs
of the top, because those parts belong to the device.

## Where this design makes its own choices

The tests, their sizes (32 RAMs of 40 Kbit, 130 rings, 100 or 33×3 B13
copies, 13866 XOR stages, 4 PLLs, 1/3/12 watchdogs) and the watchdog
timing (100/20/30 ms, 15 ms done) follow the described setup. The
following are this design's own choices:
- **Flip-flop test:** the number and length of the chains, and taking the first windows as the reference.
- **Block RAM test:** the 1024 × 40 organisation of a 40 Kbit block. The source speaks both of "40K" blocks and of "40 KiB"; 40 Kbit was taken. Also the event-per-scan counting and the run-time interval.
- **Ring oscillators:** stage count and stage delay, the spread formula, the settle time, and sweeping all rings in hardware.
- **B13 test:** output width 10, the LFSR pattern source, the record format, FIFO depth 512 and the restart length.
- **CRAM test:** the separate head input used to time an injected flip, and the settle time.
- **Watchdog test:** the answer window spanning the whole period, the 150 ms wake timeout, the skip-every-K rule, and where the done pulse starts.
- **Top:** all tests side by side in one top, with ports instead of a register bank.

The ring oscillators are behavioural, and so are `tid_ro_array` and the
top, which contain them. Everything else is synthesizable.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
ends with a `TB_RESULT checks=… failures=…` line and has a cycle-limit
watchdog. For example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rad_test_pkg.sv tb/tb_cram_tester.sv
obj_dir/Vtb_cram_tester +verilator+rand+reset+2
```

There are two system-level testbenches:
- **`tb_rad_test_system`** runs everything end to end at reduced sizes, with time scaled down 1000×. It uses the 5-triple TMR B13 compare and the 3-copy watchdog. It injects upsets into the DUT designs and counts each mechanism: PLL loss, flip-flop window change, RAM event and rewrite, ring sweep, B13 error with restart, B13 upset masked by voting, B13 FIFO-full halt, CRAM flip timing, CRAM event, watchdog answer, reset after a withheld answer, failure with reconfiguration, and an outvoted watchdog copy. A mechanism that never happened counts as a failure.
- **`tb_rad_test_system_full`** runs the top with every parameter at its default. It does one complete operation of each test with one injected upset, using a short ring gate and RAM interval. The watchdog part withholds the
first answer and waits for the reset that must follow: one 100 ms period,
about 10 million clocks. This takes a few minutes in Verilator.

Everything runs in two-state simulation with random initial values; all
state that is read is reset.
