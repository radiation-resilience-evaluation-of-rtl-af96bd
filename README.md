# Radiation-hardened fabric for a soft RISC-V microcontroller on a flash FPGA

A soft RISC-V core on a flash-based FPGA is only as robust as its weakest
storage. The configuration memory and the on-chip flash are hardly upset by
radiation, so the program lives in flash and is fetched from there. The block
RAMs and the flip-flops are not immune. This RTL hardens them in two
different ways:

* **Memories get SEC-DED error correction.** Both the data memory and the
  register file use Hsiao codes. Every single-bit upset is corrected on the
  way out and every double-bit upset is detected. Four counters record both
  kinds for each memory.
* **Control flip-flops get triple modular redundancy.** Each state bit of the
  bus logic is stored three times and read through a 2-of-3 majority voter.

The CPU core itself is not part of this code; it is an existing RV32IMC core
with performance counters. This repository contains everything that the
hardening adds or changes around the core:

* the data memory;
* the register file with its encoder and decoders;
* the error counters;
* the processor-internal bus: arbitration, address decoding and the timeout
  watchdog;
* the path from the core's Wishbone port to the flash controller's AHB-Lite
  port.

The core's buses and register-file port are ports of the top module
`rv_ecc_soc_top`. A testbench stands in for the core.

```
 CPU fetch port --+                              +--> ecc_dmem  0x8000_0000, 16 KB
                  +--> bus_switch --> bus_gateway     4 lanes x 4096 x 13 bit
 CPU data port ---+   (data first)        |      +--> bus_keeper register
                                          |      +--> wb_ext_if --Wishbone-->
                       bus_keeper <-------+           wb2ahbl_bridge --AHB-Lite--> flash
                       (15-cycle watch)                                        0x6000_0000
 CPU register-file port --> ecc_regfile  32 x 39 bit
 single/double events   --> ecc_counters 4 x 32 bit
```

All the numbers above are parameter defaults:

* 16 KB of data memory;
* 32 registers;
* a 15-cycle bus timeout;
* TMR on (`TMR=1`).

With `TMR=0` the same RTL gives the ECC-only variant. The design is meant for
a 10 MHz system clock. Nothing in it is timing-critical at that speed.

## Why the data memory is coded per byte

RISC-V stores bytes and half-words as well as words. Suppose one code covered
the whole 32-bit word. Then every partial store would first have to read the
word, merge in the new bytes and re-encode it. That costs either an extra
cycle on every narrow store or a write buffer.

`ecc_dmem` avoids this by coding each byte lane on its own:

* The memory is four banks, one per byte lane. Each bank holds 4096 13-bit
  codewords: 8 data bits and 5 check bits.
* Each lane has its own encoder in front of the bank and its own decoder
  behind it.
* A byte store writes only its own bank and needs no read.
* A load decodes all four lanes in parallel.

The price is four (13,8) coders instead of one (39,32) coder, and 13 stored
bits per byte instead of 9.75. The four 8-bit arrays of the uncoded memory
become four 13-bit arrays, so the change maps onto block RAM in the same way.

**Timing.** Every access is acknowledged exactly one cycle after its request.
Loads return corrected data.

**Error events.**

* `single_o` pulses with a load response when at least one lane corrected an
  error.
* `double_o` pulses when at least one lane found a double error. Such a lane
  returns its stored data bits unchanged.

The memory counts one event per load, not one per lane. A word with a flipped
bit in all four lanes adds one to the single-error counter. A double error is
only counted; it does not raise a bus fault.

**Scrubbing.** The memory never writes corrected data back by itself. Errors
would pile up in words that are read but not written. Software therefore
scrubs periodically: it loads each word and stores it back with `lw`/`sw`. The
decoder corrects the word on the load and the encoder writes clean check bits
on the store. Two consecutive flips in one byte between scrub passes are the
remaining risk.

The banks power up as all-zero codewords. Zero data encodes to zero check
bits, so an all-zero memory is a valid memory. Software should clear the
memory before it starts counting errors. Otherwise uninitialised contents in
a real RAM show up as false detections.

## The Hsiao codes

Both codes are odd-weight-column SEC-DED codes, in the form Hsiao proposed:

* Every column of the parity-check matrix H is distinct and has odd weight.
* The data columns all have weight 3.
* The check columns form an identity matrix.
* The rows are as evenly weighted as possible, which keeps the XOR trees of
  the encoder and the syndrome balanced.

**Codeword layout.** The codeword is `{check, data}`: data in the low bits,
check bit *k* at position `DATA_W + k`.

**Masks.** Each row of H is stored in `ecc_pkg` as a codeword-wide mask.

* The encoder computes check bit *k* as the XOR of the data bits selected by
  mask *k*.
* The decoder forms syndrome bit *k* as the XOR of all the codeword bits
  under mask *k*.

**Decoding.**

* A zero syndrome means no error.
* A syndrome equal to one column of H marks that bit as wrong. The bit is
  flipped back.
* The syndrome of any single error has odd weight. So
  `single = ^syndrome` (flag bit 0 of `dec_errorout`).
* `double = ~single & |syndrome` (flag bit 1): a non-zero even syndrome is an
  uncorrectable double error.

Every other case of three or more flips is outside the guarantee, as for any
SEC-DED code.

**(13,8), data memory.** The syndrome bits are s4..s0.

| bit | d0 | d1 | d2 | d3 | d4 | d5 | d6 | d7 |
|-----|----|----|----|----|----|----|----|----|
| column | 01101 | 11001 | 00111 | 10011 | 10110 | 11010 | 11100 | 01110 |

For example, 0xCE encodes to `13'b11111_11001110`. A single flip of d0 gives
syndrome `01101`.

**(39,32), register file.** There are 35 weight-3 columns of 7 bits. The code
uses 32 of them, taken in lexicographic order of their three row indices, with
{0,1,2}, {0,3,4} and {1,5,6} left out. This gives row weights of 13, 13, 14,
14, 14, 14 and 14.

**Choosing other columns.** Any other Hsiao column choice works as well. A
different choice changes only the stored check bits, not any behaviour. To
use one:

1. Edit `H13_MASK` or `H39_MASK` in `ecc_pkg.sv`.
2. Edit the column tables in `tb_hsiao_13_8` and `tb_hsiao_39_32` to match.
   The testbenches compute their expected check bits from their own tables,
   not from the package. This keeps the checks independent of the RTL.

## Register file

`ecc_regfile` stores 32 registers as 39-bit codewords in a memory with one
write port and two read ports, which maps onto small block RAMs.

* One encoder sits on the write port.
* One decoder sits on each read port (rs1 and rs2).
* Reads are synchronous: data and flags come one cycle after the addresses.
* x0 reads as zero and is never written.

Errors are corrected on the way out only. There is no register scrubbing,
because registers are rewritten often and an error is overwritten by the next
write.

The error events are counted only when `ren` was high, that is when the core
actually used the operands. The events are OR-ed over both ports, so one read
cycle counts as one event. Without that gating, a corrupted register that the
core reads every cycle would run the counter up without bound.

## Error counters

`ecc_counters` holds four 32-bit counters, all cleared by `clr_i`:

* data-memory single errors;
* data-memory double errors;
* register-file single errors;
* register-file double errors.

In a full system they would be read as performance-counter CSRs by the core.
Here they are plain outputs of the top.

## From Wishbone to the flash: `wb_ext_if` and `wb2ahbl_bridge`

Instruction fetches, and any other address that is neither the data memory
nor the keeper register, leave the core's bus through `wb_ext_if`.

**`wb_ext_if`** turns the internal request into a Wishbone classic single
transfer.

* cyc and stb rise one cycle after the request.
* Address, data, write enable and selects stay stable until the slave answers
  with ack or err.
* The answer is passed straight back to the core.
* cyc and stb drop in the next cycle.

**`wb2ahbl_bridge`** is the Wishbone slave that drives the AHB-Lite master
port. Most signals cross directly:

| Wishbone | AHB-Lite |
|---|---|
| we_i | HWRITE |
| data_i | HWDATA |
| data_o | HRDATA |
| err_o | HRESP |

HBURST is fixed at single (000) and HPROT at 0000.

The rest of the bridge hangs on one flip-flop, `stb_dl`, which holds the
strobe of the previous cycle:

```
 cycle        0          1           2 ...       n
 stb_i      __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__
 stb_dl     ____________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_
 HTRANS       NONSEQ     IDLE ...
 HREADY     ‾‾‾‾‾‾‾‾‾‾‾‾\____ wait states ____/‾‾‾‾‾
 ack_o      _____________________________________/‾‾\_
```

* **New transfer.** A rising strobe (`stb & ~stb_dl`) is a new transfer. If
  HREADY is high in that cycle, HTRANS is NONSEQ and the cycle is the AHB
  address phase. In every other cycle HTRANS is IDLE.
* **Acknowledge.** `ack_o = HREADY & stb & stb_dl`. This is the first cycle of
  the data phase in which the slave is ready. A zero-wait-state slave gives
  two cycles per transfer.
* **HSIZE** comes from the byte selects:
  * `1111` gives a word (010);
  * `0011` or `1100` gives a half-word (001);
  * a single lane gives a byte (000);
  * any other pattern is sent as a word.
* **HADDR** keeps the address and aligns it to the transfer size. The two low
  bits are cleared for a word and bit 0 for a half-word. A byte address passes
  through unchanged. The flash sits at the same address, 0x6000_0000, on both
  sides, so no other remapping is done.
* **HRESP.** The top OR-s the two HRESP bits of the fabric interface into the
  bridge's error input.

**Limits of this bridge, inherited from its simple design:**

* **A held strobe is a single transfer.** The master must drop `stb` for at
  least one cycle between transfers. `wb_ext_if` always does.
* **An abandoned transfer can leave a stale HREADY.** Suppose the bus keeper
  times out a transfer while the AHB slave still holds HREADY low. Then the
  abandoned AHB transfer is still running. If a new Wishbone strobe arrives
  before that slave finishes, its late HREADY can acknowledge the new
  transfer. Software that recovers from a timeout should wait for the stuck
  access to drain before using the flash again. The top-level testbench waits
  60 cycles.
* **Writes are not supported by the target.** The flash is read-only while a
  program runs. A write is answered with an AHB error, which becomes a bus
  fault.

## Bus keeper and address decoding

`bus_keeper` watches every request on the internal bus.

* **Device error.** If the addressed device answers with err, the error goes
  to the core, which raises an instruction, load or store access fault. The
  keeper records it.
* **Timeout.** If no device answers within `TIMEOUT` (15) cycles, the keeper
  answers with err itself. It also pulses `timeout_o`, which makes
  `wb_ext_if` drop its pending transfer.

The keeper's control register sits at 0xFFFF_FF78:

| bit | meaning |
|---|---|
| 31 | a bus fault occurred |
| 0 | fault type: 0 = device error, 1 = timeout |

Any read or write of the register clears the flag.

**Timeout timing.** Take a request in cycle *t*. An answer in cycles
*t*+1 … *t*+15 is accepted. Otherwise the keeper's err arrives in cycle
*t*+15.

**`bus_gateway`** decodes the address into three selects:

* data memory, 0x8000_0000 to 0x8000_3FFF;
* keeper register;
* everything else, to the external interface.

Every idle device drives an all-zero response, and the responses are OR-ed
together.

**`bus_switch`** merges the core's fetch port and data port onto one bus.

* A request that arrives while the bus is busy is remembered as pending.
* When the bus is free, a data request wins over an instruction fetch, so
  loads and stores are never delayed by a fetch.
* `conflict_o` marks the cycles where that happened.

## Triple modular redundancy

`tmr_reg` is a drop-in register:

* It holds three copies that all load the same next value.
* Its output is the bitwise majority from `tmr_voter`.
* An upset in one copy is outvoted at once and overwritten on the next load.

Only the copies plus one voter per bit are added; there is no separate
refresh logic. Every state bit of the bus switch, bus keeper, external
interface and bridge is held in a `tmr_reg`. With `TMR=0` a single copy is
built instead.

The memories are not triplicated. Tripling 16 KB of block RAM would cost far
more than the 5/8 (data memory) and 7/32 (register file) overhead of the
codes.

In an FPGA flow the same protection can be inferred by the synthesis tool for
every flip-flop of the core. This RTL writes it out explicitly for the blocks
it contains, so that it survives any tool and can be tested.

## Fault-injection hooks

Three input ports exist only for testing. Tie them to zero in a real design.

* `dmem_inj_i` (13 bits) is XOR-ed into the output of every data-memory
  encoder on writes. For example, `13'b1` stores every written byte with
  d0 flipped.
* `rf_inj_i` (39 bits) does the same for the register-file encoder.
* `seu_i[3k+2:3k]` inverts the chosen copies of the TMR state of unit *k* on
  the next clock edge. The units are: 0 bus switch, 1 bus keeper, 2 external
  interface, 3 bridge.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

`tb/ahbl_envm_model.sv` is a behavioural stand-in for the flash behind the
AHB-Lite port:

* a read-only pattern memory with configurable wait states;
* an error response on writes;
* an address range that hangs longer than the bus keeper's window.

Run, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ecc_pkg.sv tb/tb_rv_ecc_soc_top.sv --top-module tb_rv_ecc_soc_top
./obj_dir/Vtb_rv_ecc_soc_top
```

Replace the testbench file and top-module name with any of the other
testbenches. The package must come first.

`tb_rv_ecc_soc_top` runs the whole fabric at its default sizes. It finishes
in well under a second. The sequence:

1. 64 instruction fetches from flash.
2. Clear all 16 KB of data memory, then write a pattern with word, half-word
   and byte stores. Some words carry injected single errors and one carries a
   double error.
3. A full scrubbing pass and a second, clean pass. The counters must match
   the injected errors exactly.
4. Fetches and loads issued in the same cycle, with upsets injected into one
   TMR copy of each unit.
5. Register-file single and double errors.
6. A timeout on a hanging flash access and a device error from a flash write.
   Both are read back from the keeper register.
7. The counter check: the values 1 to 100 are stored with one bit flipped at
   every encoder output and then read back. The data-memory single-error
   count must be exactly 100, and 0 without the flip.

The testbench counts each mechanism and fails if one never happened:

* fetch;
* arbitration conflict;
* single and double errors in both memories;
* timeout;
* device error;
* scrub;
* TMR upset;
* byte and half-word stores.

The block testbenches:

* `tb_hsiao_13_8` checks the (13,8) coders over all 256 data values, with
  every single flip and every double flip. It also checks the known example
  values above.
* `tb_hsiao_39_32` checks the (39,32) coders on 300 random words and corner
  values, with every single flip and 60 random double flips.
* `tb_ecc_dmem` compares random byte, half-word and word traffic against a
  byte-wise reference memory and checks the one-cycle latency.
* `tb_wb2ahbl_bridge` runs the bridge against the flash model with two wait
  states. For each transfer it checks:
  * one NONSEQ address phase;
  * HSIZE and aligned HADDR for every byte-select pattern;
  * ack exactly three cycles after the strobe rises.

## What differs from a complete system

* **CPU, peripherals and flash controller are not included.** The core, its
  UART, timer and GPIO, and the microcontroller subsystem with its flash
  controller are existing IP. The top brings their connections out as ports.
* **Counters are outputs, not CSRs.** Reading them as hardware performance
  counter CSRs is the core's job.
* **Own choices.** The following are this design's own choices and are
  easiest to change if the rest of a system expects otherwise:
  * The Hsiao column choices above. Part of the (13,8) assignment is fixed by
    known example encodings; the remaining columns are free.
  * The keeper register's bit positions and address.
  * The counter width.
  * Not raising a bus fault on a double error.
* **Flash address alignment.** The bridge passes the flash address through
  with only size alignment. Some descriptions of such bridges instead shift
  the address.
