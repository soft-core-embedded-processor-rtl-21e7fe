# Built-in self-test of FPGA logic driven by a soft-core processor

An FPGA can test its own logic blocks. You configure part of the fabric as
test circuitry. Pattern generators drive the blocks under test (BUTs), and
comparators check that identically configured BUTs give identical answers.
You repeat this for every mode of the blocks, and each mode is one more
configuration.

The classic approach downloads every one of those configurations from an
external controller over a slow serial port. Here, a soft-core processor in
one half of the FPGA runs the whole test of the other half. It rewrites only
the part of the configuration that changes between test phases, through the
FPGA's internal 32-bit configuration access port (ICAP). It starts and stops
the test through a control register and reads pass/fail through a status
register. It reads the comparator flip-flops back through the ICAP to locate
a faulty block, and it times each phase. Apart from the first download, the
external side only has to receive a report.

This repository holds the RTL of everything around the processor:

| module | role |
|---|---|
| `soft_bist_top` | the system: BIST area, BIST registers, ICAP interface, timer, UART, 64 kB memory on one bus |
| `bist_array` | the BIST area: 2 pattern generators, 3 x 4 BUTs, 3 x 4 comparators in rings |
| `tpg` | exhaustive test pattern generator |
| `but_cell` | model of one block under test: 6-input look-up table plus flip-flop |
| `ora` | comparison-based output response analyzer with a sticky fail flag |
| `wo_register` / `ro_register` | write-only control and read-only status register, sharing one address |
| `icap_interface` | processor side of the configuration port, bit reordering per device family |
| `timer_counter` | 32-bit test-phase timer |
| `uart_tx` | serial reporting to a PC |
| `prog_mem` | 64 kB program and data memory |
| `bist_pkg` | address map, register bit positions, ICAP bit-order function |

The processor itself (a vendor soft core) is not included. Neither is the
ICAP primitive with the configuration memory, because it is silicon. The top
brings out their connections as ports. The system testbench drives those
ports with a bus-functional processor and a behavioural model of the port
(`tb/icap_model.sv`).

## The BIST area: comparisons in a ring

This is the part that needs the most explanation. With the default sizes the
area has 3 rows of 4 BUTs, and each row has 4 output response analyzers
(ORAs). Within a row:

```
   TPG0      TPG1      TPG0      TPG1
    |         |         |         |
  BUT0 ---- BUT1 ---- BUT2 ---- BUT3 ----+
     \ORA0 /   \ORA1 /   \ORA2 /   \ORA3 |   ORA3 compares BUT3 with BUT0
      ------------------------------------+
```

* ORA j compares BUT j with BUT (j+1) mod 4, so the row closes into a ring.
  Every BUT is watched by exactly two ORAs, and every ORA watches exactly two
  BUTs.
* Two identical pattern generators feed alternating columns. TPG 0 feeds
  BUTs 0 and 2, and TPG 1 feeds BUTs 1 and 3. Each ORA therefore sees one BUT
  from each generator. If a generator is faulty, every ORA fails. A comparison
  scheme needs no stored good responses, but without this split it could not
  tell a broken generator from a working one.
* A faulty BUT k sets exactly ORAs k-1 and k of its row. The diagnosis rule
  follows: a BUT is faulty when both ORAs that watch it failed. The system
  testbench applies this rule to the flags it reads back.
* `fail` is the OR of all ORA flags. This single pass/fail bit is what the
  processor checks after each phase. It needs the individual flags, read
  back through the ICAP or from the status register, only when it wants to
  diagnose.

Each BUT model is a 6-input look-up table followed by a flip-flop. Both
outputs go to the ORAs, so the comparison covers the table and the register.
A "test mode" is a truth table, and each partial reconfiguration loads a new
one. An injected fault is a truth table with one bit flipped.

Timing of one test phase, driven by the control register:

1. Write `clear` (bit 0). This zeroes both generators, the BUT flip-flops and
   the ORA flags.
2. Write `run` (bit 1). The generators step through all 64 patterns, one per
   clock, and the ORAs compare on every clock.
3. `done` rises 2^6 + 1 = 65 clocks after the first run clock. The extra
   clock lets the flip-flop output of the last pattern reach the ORAs.
   Flags and `done` hold until the next clear.

The number of rows and of BUTs per row are parameters. The row length must be
even, so that ring neighbours always come from different generators; an
elaboration-time assertion checks this. The default size is the simplified
array of the published block diagram. A device-sized BIST area only needs larger parameters: one half of a Virtex-5
LX30T holds about 1,200 logic blocks, of which half are BUTs in a session.

## The processor's view

A simple 32-bit bus connects everything:

* A write happens on a clock where `bus_we` and `bus_ready` are both high.
* A read (`bus_re`) returns `bus_rdata` with `bus_rvalid` one clock later.
* `bus_ready` goes low only when a word is written to the ICAP while the
  port is still holding the previous word and signalling BUSY.

| address | write | read |
|---|---|---|
| `0x0000_0000`-`0x0000_FFFF` | memory | memory |
| `0x8000_0000` | BIST control (WO): bit 0 clear, bit 1 run | BIST status (RO): bit 0 done, bit 1 fail, bits 2-13 ORA flags |
| `0x8000_0010` | one configuration word to the ICAP | last word read from the ICAP |
| `0x8000_0014` | bit 0: read one word from the ICAP | bit 0 word pending, bit 1 read word valid |
| `0x8000_0020` | timer: bit 0 start, bit 1 stop, bit 2 clear | bit 0 running |
| `0x8000_0024` | - | timer count |
| `0x8000_0030` | byte to send over the UART | - |
| `0x8000_0034` | - | bit 0 UART ready |

The control and status registers share one address, and the direction of
the access picks the register. The control register's outputs wire straight
to the BIST area's inputs. The status register samples the BIST area's
outputs every clock, so a read returns them as they were two clocks before
the read data appears.

### Configuration port

`icap_interface` holds one word:

* A written word goes to the port on the next clock, with CE and WRITE
  driven low.
* The word stays on the port while the port raises BUSY.
* With BUSY low, words written on consecutive clocks reach the port on
  consecutive clocks. That is one word per clock, the best the 32-bit,
  100 MHz port allows.

A read drives CE low with WRITE high. From the second clock on, the
interface waits for BUSY to fall, then captures the port's word.

The Virtex-5 port expects each byte of a configuration word with its bits in
reverse order; Virtex-4 does not. `BIT_SWAP` (top parameter `ICAP_BIT_SWAP`)
selects the device family when the design is built. The default of 1 is
Virtex-5. The reordering applies in both directions, so software always sees
words in bitstream-file order.

### A session, as the software runs it

The system testbench (`tb/soft_bist_top_tb.sv`) performs these steps
through the bus:

1. The initial configuration is in place. It normally comes from an
   external download, and the testbench loads it straight into the port
   model.
2. The data for the five partial reconfigurations is stored in program
   memory in compressed form. All BUTs are configured identically, so one
   64-bit truth table per phase is enough.
3. Each of the six phases does the following:
   1. Clear and start the timer.
   2. For phases 1 to 5, read the phase's table from memory and expand it
      into a configuration stream for the ICAP. The stream is: dummy word,
      sync word `AA995566`, frame address write, frame data write with the
      table repeated once per BUT, desync command.
   3. Clear and run the BIST.
   4. Poll the status register for `done`, then stop the timer.
   5. Check pass/fail.
   6. Read back the frame that holds the ORA flip-flops.
   7. Diagnose the faulty BUT.
   8. Send the low byte of the phase time over the UART.

In phase 3 the software injects a fault: it flips one bit of the copy of the
table that goes to BUT 5. The testbench expects ORAs 4 and 5 to fail and BUT 5
to be identified.

## Timer and UART

`timer_counter` counts clocks between a start and a stop command, which makes
it possible to measure how long reconfiguration, execution and read back
take. Start takes effect on the next clock. If commands are given together,
clear beats start, and start beats stop. The count wraps.

`uart_tx` sends 8N1 frames, least significant bit first. The default of 868
clocks per bit gives 115200 baud from a 100 MHz clock. It only transmits,
because the system only reports.

## What follows the published design and what is this design's own

Taken from the published design:

* the partition into BIST area, processor, WO register, RO register and
  ICAP;
* the two registers sharing one address and wiring directly to the BIST
  inputs and outputs;
* comparison-based ORAs in a circular arrangement, with every BUT watched by
  two ORAs;
* identical patterns from several generators to alternating BUTs;
* the single pass/fail result;
* the 32-bit ICAP at 100 MHz, with one word per clock as the best case;
* the device-family-dependent word ordering;
* the 32-bit phase timer;
* UART reporting;
* 64 kB of on-chip memory;
* one initial configuration plus five partial reconfigurations per session;
* the 3-row, 4 + 4 cells-per-row size of the simplified diagram.

This design's own choices:

* the exhaustive counting pattern set and the 6-input BUT model (the published
  work tests real logic blocks in many modes);
* which columns each generator feeds;
* sticky ORA flags;
* the bus protocol, address map and register bit assignments;
* the one-word ICAP holding register and its handshake;
* the ICAP pin convention and the reduced configuration packet format used by
  the model, both taken from the Xilinx primitive rather than the published
  text;
* the timer command encoding;
* the UART frame and baud rate.

Not built:

* The processor, the ICAP primitive and the external Boundary Scan
  configuration path. These are outside the RTL.
* Moving the BUTs and ORAs, or the BIST area and the processor, to the other
  half of the die between sessions. This is placement, and logic does not
  express it.
* The faster two-clock variant, with the processor at about 150 MHz and the
  port at 100 MHz. It is only suggested as an improvement.
* A full-custom reconfiguration state machine in place of the processor. It
  is only mentioned as a comparison.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `soft_bist_top` | `ROWS`, `BUTS_PER_ROW` | 3, 4 | size of the BIST area (row length even) |
| | `LUT_K` | 6 | inputs per BUT look-up table; patterns per phase = 2^LUT_K |
| | `MEM_BYTES` | 65536 | program/data memory |
| | `UART_CLKS_PER_BIT` | 868 | baud divisor |
| | `ICAP_BIT_SWAP` | 1 | 1 = Virtex-5 bit order, 0 = Virtex-4 |

If the BIST area has more than 30 ORAs, only the first 30 flags appear in the
status register. All flags are always available through `ora_state` and
read back.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each one also has a watchdog that ends the
run as a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/bist_pkg.sv \
    tb/soft_bist_top_tb.sv --top-module soft_bist_top_tb -Mdir obj
./obj/Vsoft_bist_top_tb
```

Use the same command with any other `tb/<block>_tb.sv` to test a single block.
The system testbench runs the top at its default parameters in well under a
second. It prints each phase's time, result and read-back flags, and a count
of each mechanism it exercised:

* partial reconfigurations;
* ICAP BUSY stalls;
* bus wait states;
* passing and failing phases;
* read backs;
* diagnoses;
* timer measurements;
* UART bytes.

If one of these never happens, that counts as a failure.

What the block testbenches cover:

| testbench | covers |
|---|---|
| `tpg_tb` | pattern sequence; hold while disabled; `done` after exactly 64 clocks |
| `but_cell_tb` | every table entry of random tables; flip-flop delay |
| `ora_tb` | random mismatches against a reference flag |
| `bist_array_tb` | 65-clock phase length; a fault in each of the 12 BUTs; a double fault; a stuck generator (every ORA fails); the diagnosis rule |
| `icap_interface_tb` | one word per clock with BUSY low; in-order delivery under random BUSY; bit reordering; reads; the Virtex-4 build without reordering |
| `uart_tx_tb` | frame content; 10-bit-time frame length |
| `prog_mem_tb` | full 64 kB range with byte enables |

The timer and both BIST registers are tested against reference models.

For each testbench, a deliberately broken copy of its module was also run,
and every testbench reported failures against it.

The RTL is synthesizable SystemVerilog. The program memory is a plain array
with byte enables, which maps onto block RAM. The concurrent assertions
(`icap_interface`, `soft_bist_top`) check the bus rules in simulation: no
ICAP word offered while the interface is not ready, and no read and write in
the same clock. Because these assertions use the asynchronous reset in their
`disable iff`, Verilator's lint warns that the reset is used both
synchronously and asynchronously. That warning is expected.
