# A low-cost functional chip tester in SystemVerilog

This is the digital logic of a small functional tester for chips with up to
128 pins. A host computer drives the tester over a 32-bit memory-mapped bus.
Every tester pin can be an input or an output of the chip under test (DUT),
and this can change from one vector to the next. Speed testing is simple: the
sample point of each vector can be moved in 100 ns steps plus a fine delay.
Chips with dynamic state can be tested by running a block of vectors from
local memory, without the host in the loop.

The original hardware fits in seven small programmable logic arrays (one
controller, six data path arrays), four static RAMs per bank and a few TTL
counters. This RTL keeps that structure: each module matches one physical
part or one repeated macro, so the code can be read against the hardware.

## How a vector reaches the pins: double buffering

The central problem is skew. The host writes 32 bits at a time, but a vector
spans up to 128 pins. If each write changed pins directly, the inputs of the
chip would change microseconds apart. So every pin has **two ranks** of
state:

* the **first rank** is loaded word by word from the bank's local bus, while
  nothing changes at the pins;
* one **transfer** signal (the *enable vector*, `Xselect<4>`) then copies
  the first rank of every bank into the second rank on a single clock edge,
  and the second rank drives the pins.

Each pin holds two bits: its *data* and its *drive enable* (1 = the tester
drives the pin; 0 = the pin is an output of the chip). The pin level is
captured by a **readback register** on the rising edge of the *sample clock*.

The two-pin macro (`pin_macro`) serves pins `2i` and `2i+1` from a single
bus bit `i`, by time-multiplexing that bit six ways:

| Word | Select line   | Meaning                         |
|------|---------------|---------------------------------|
| 0    | `Xselect<0>`  | data of pin 2i                  |
| 1    | `Xselect<1>`  | drive enable of pin 2i          |
| 2    | `Xselect<2>`  | data of pin 2i+1                |
| 3    | `Xselect<3>`  | drive enable of pin 2i+1        |
| 4    | `Xselect<5>=0`, `Xoe` | sampled level of pin 2i   |
| 5    | `Xselect<5>=1`, `Xoe` | sampled level of pin 2i+1 |

A bank has 32 macros (64 pins) on a 32-bit local bus, so one 32-bit word
holds one of the six words above for all 64 pins of the bank. A vector is six
consecutive words in local memory, in this order. With the largest RAMs
(32K words) a bank holds 32768 / 6 = 5461 vectors.

## Structure

```
uw_chip_tester
 ├─ control_register   7 bits: bank select, run, loop, 3 configuration lines
 ├─ controller         host handshake, Step and offline sequencing
 │   └─ reload_counter ×3   address (up), loop (down), delay (down) counters
 ├─ fine_delay         behavioural model: gate-delay chain on the sample clock
 └─ tester_bank ×2     64 pins each
     ├─ datapath_lca ×3     11, 11 and 10 pin_macro instances
     ├─ sram_chip ×4        8 bits each → 32-bit local memory
     └─ local bus mux       host data / memory data / readback results
```

In the hardware the three counters are separate counter chips next to the
controller array, and the control register sits on the host interface card.
Here they are instantiated inside `controller` and in the top level.

All modules share `tester_pkg` (sizes, the word layout `word_e`, the
control register struct `ctrl_reg_t`, the register map and the bus source
enum `bus_src_e`).

Each bank's local bus is one shared set of wires in the hardware (RAM data
pins, array pins and a bus transceiver to the host). Here it is a
multiplexer chosen by the controller (`bus_src`). Memory write data always
comes from the local bus, so results can go from the readback registers
straight into memory.

Banks share one address space. The host reaches one bank at a time, chosen by
the bank-select bits of the control register. During a Step or an offline
test all banks work in parallel: the transfer and the sample clock reach
every bank, and in offline mode every bank reads and writes its own memory at
the same address.

## Timing of one vector

`clk` is the state-machine clock, 100 ns.

```
 state      XFER | DELAY × coarse | SAMPLE |
 Xselect<4>  ‾‾‾‾‾|________________________
 pins        ====X  new inputs  (edge E)
 sample_pulse _____________________|‾‾‾‾‾‾|__       rises at E + coarse clocks
 sample_clk   ________________________|‾‾‾‾‾‾|__    + fine delay (sel × 10 ns)
```

* The second rank loads at edge **E**, the end of the XFER cycle.
* The controller's sample pulse rises at **E + coarse** clocks and lasts one
  clock. With coarse = 0 it rises together with the new inputs.
* `fine_delay` delays that pulse by `fine_sel × 10 ns` (0 to 70 ns, less
  than a clock). The readback registers capture on its rising edge.

The time the chip gets to respond is therefore `coarse × 100 ns +
fine × 10 ns`. Sweeping it until a result changes is a **pseudo speed test**.
It measures only input-to-output delay at the pins, not internal timing.

### Interactive Step

The host writes words 0–3 into the first rank of each bank (select the bank,
write registers 0–3), then writes `REG_STEP`. The controller runs XFER,
`coarse` DELAY cycles and SAMPLE: `coarse + 2` clocks. Then the host reads
result words 4 and 5 (`REG_RES0/1`) from each bank. A result read that
arrives during a Step waits until the Step has ended.

### Offline block

The host fills local memory with vectors, sets the start address
(`REG_START`), the block length in words (`REG_LENGTH`, a multiple of 6)
and the coarse delay, then sets `run` in the control register. Each vector
takes **8 + coarse clocks**:

```
RD0 RD1 RD2 RD3 | XFER | DELAY × coarse | SAMPLE | WR4 WR5
 memory → first rank      coarse wait     sample   results → memory
```

The address counter steps on every memory cycle, so the results of a vector
land in words 4 and 5, just after its inputs. The loop counter starts at the
block length and counts down in step with it. The block ends after the
vector that leaves fewer than six words. Then either `done` is set, or, if
the `loop` bit is set, both counters reload from their stored defaults and
the block starts again. An endless loop is useful for watching the chip on
an oscilloscope. Clearing `run` stops the test after the current vector.

Running offline matters for **dynamic chips**, whose internal charge decays
if they are not clocked often enough. A host under a multitasking operating
system cannot guarantee that rate. The controller can: at coarse = 3, a
vector takes 1.1 µs.

## Host interface

A four-phase handshake on `host_req`/`host_ack`:

1. The host raises `host_req`, with `host_we`, `host_addr` and `host_wdata`
   held stable.
2. The controller does the access in one clock, registers `host_rdata` and
   raises `host_ack`.
3. The host drops `host_req`, and the controller then drops `host_ack`.

Assertions in `controller` check the host side of this protocol.

`host_addr[15] = 1` addresses local-memory word `host_addr[14:0]` of the
selected bank. Otherwise `host_addr[3:0]` selects a register:

| Reg | Name         | Access | Meaning |
|-----|--------------|--------|---------|
| 0–3 | `REG_WORD0..3` | W | first-rank word k of the selected bank |
| 4,5 | `REG_RES0/1` | R | result word of the selected bank |
| 6   | `REG_STEP`   | W | run one interactive vector |
| 7   | `REG_CTRL`   | R/W | control register |
| 8   | `REG_COARSE` | R/W | coarse delay, clocks (8 bits) |
| 9   | `REG_FINE`   | R/W | fine delay tap (3 bits) |
| 10  | `REG_START`  | R/W | first word of the block (default of the address counter) |
| 11  | `REG_LENGTH` | R/W | block length in words (default of the loop counter) |
| 12  | `REG_STATUS` | R | bit 0 busy, bit 1 done, bit 2 looped at least once |

Registers 7–12 are served at any time. Memory, data path and Step accesses
wait (no `host_ack`) while a Step or an offline block runs. Host software
must therefore stop a looping test through the control register before it
touches memory.

Control register bits: `[1:0]` bank select, `[2]` run (a 0→1 change starts
a block), `[3]` loop, `[4]` `cfg_din`, `[5]` `cfg_cclk`, `[6]` `cfg_prog_n`.
The last three drive the serial configuration lines of the programmable
arrays. Loading configurations is not part of this RTL.

## What follows the original design and what is a choice here

Taken from the design:

* two banks of 64 pins;
* three data path arrays per bank, eleven two-pin macros each;
* the double-buffered macro with its six select lines, bank enable, output
  enable and result multiplexer;
* the six-word vector layout;
* four 8-bit RAMs per bank, 2K×8 to 32K×8 (32K used);
* a 7-bit control register with bank-select bits;
* the 4-read / transfer / sample / 2-write offline cycle;
* the address, loop and delay counters with stored defaults, reloaded for
  endless loops;
* a coarse delay in 100 ns clocks plus a fine gate-delay chain;
* one bank reachable by the host at a time, with all banks running in
  parallel during a test.

Choices of this RTL, where the original leaves things open:

* the host handshake and the whole register map;
* the control register bit layout;
* reset behaviour: asynchronous, active low, clears every register but not
  the memories;
* drive enable polarity: 1 = drive;
* `Xselect<5>` polarity;
* the bank enable gates only first-rank loads;
* the block length is counted in words;
* the stop rule;
* widths: 8-bit coarse delay, 3-bit fine select, 16-bit loop counter;
* the fine delay of 8 taps × 10 ns;
* the split of 64 pins over the three arrays as 11 + 11 + 10 macros;
* one memory cycle per clock, with RAM reads asynchronous and writes on the
  clock edge;
* the DUT pads split into `dut_out`/`dut_oe`/`dut_in` instead of
  bidirectional nets;
* the 3-state local bus built as a multiplexer.

Not built:

* the host computer and its C test library;
* the vendor interface card (apart from its control register);
* array configuration;
* the analog behaviour of the pin drivers;
* boards, sockets and power.

Two data path schemes were only considered as alternatives and are not
built: single buffering, and a register queue of four vectors for true speed
testing (proposed as future work).

## Trust and limits

* Every module has a self-checking testbench. Each testbench was also run
  against a deliberately broken copy of its module and caught the fault.
* The end-to-end testbench `tb/tb_uw_chip_tester.sv` runs the top level at
  its default size: 2 banks, 128 pins, 32K words per bank. It covers:
  * the configuration lines;
  * Steps in both banks, including the number of clocks a Step takes;
  * early and late sampling against a modelled 250 ns chip delay, where the
    early sample sees the old outputs and the late one the new;
  * a change of pin direction;
  * an offline block in both banks, including its clock count;
  * a memory access that waits for a running block;
  * loop mode, and stopping it.

  It counts each of these and fails if one never happened.
* `tb/tb_workload_dynamic_chip.sv` fills both banks' 32K-word memories with
  the largest block that fits, 5461 vectors, and runs it offline against a
  modelled two-phase dynamic shift register. The register loses its charge
  after 10 µs, and the other pins are modelled as inverters. All 21,844
  result words are correct, and the run takes exactly 5461 × 11 clocks.
  Stepping the same chip from the host with 12 µs pauses loses stored bits,
  and the testbench requires that it does.
* `fine_delay` is a behavioural model with `#` delays. In synthesis it
  becomes a plain wire, and a real implementation needs a hand-placed delay
  chain.
* `sample_clk` is a second clock that the readback registers use. It is
  derived from `clk` and, by construction, rises at least one clock before
  the controller reads the results.
* With coarse = 0 and fine = 0 the sample clock rises together with the new
  inputs. Which values are captured is then a race, in the hardware as in
  simulation.

## Simulating

Every file carries `` `timescale 1ns/1ps ``. The package must come first.
For example, for the top level:

```
verilator --binary --timing --assert -Irtl rtl/tester_pkg.sv rtl/uw_chip_tester.sv \
          tb/tb_uw_chip_tester.sv --top-module tb_uw_chip_tester -Mdir obj
./obj/Vtb_uw_chip_tester
```

Other modules are found through `-Irtl` (one module per file). Each
testbench ends by printing `TB_RESULT checks=N failures=M`. Block
testbenches: `tb_pin_macro`, `tb_datapath_lca`, `tb_sram_chip`,
`tb_reload_counter`, `tb_fine_delay`, `tb_control_register`,
`tb_controller` and `tb_tester_bank`. The workload test is
`tb_workload_dynamic_chip`, built like the top-level test.

Parameters to change: `N_BANKS` and `ADDR_W` on `uw_chip_tester` (11 to 15
for 2K to 32K RAMs); the sizes in `tester_pkg`. Pins per bank must stay a
multiple of 16, so that the bus width is a whole number of 8-bit RAMs.
