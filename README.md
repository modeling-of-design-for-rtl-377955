# In-field structural test of an SoC core through a bus-attached DFT bridge

Scan chains and test compression logic are normally used once, on the wafer tester,
and then sit idle for the life of the chip. This design reuses them in the field. A
small bus slave, the **DFT infrastructure bridge (DFT-IB)**, sits on the SoC's FPI
peripheral bus and drives the test pins of one core, the *device under test* (DUT).
The CPU then runs a full structural (stuck-at) test of that core with no ATE attached.
There are two ways to run it:

* **Internal test.** The fault-free test data (patterns, expected responses and
  don't-care masks) is stored inside the bridge. After one command from the CPU, the
  bridge applies every set, compares each response and reports pass, or fail with the
  index of the first failing set. This is fast: 4 clock cycles per set.
* **External test.** A tester outside the car ECU sends the test data over CAN. The CPU
  writes each pattern into the bridge, tells it to apply the pattern, and returns the
  captured response to the tester, which compares it. This is slow, because every set
  costs CAN frames, but it needs no test storage on chip.

In the reference system the DUT is a 10-bit counter. Its flip-flops are stitched into 4
scan chains, which sit behind an EDT (embedded deterministic test) decompressor and
compactor with a single scan channel. The CPU, its memories, the CAN controller and the
tester are outside this RTL. Their connections are ports of the top module
`soc_dft_top`.

```
            CPU (LFI bridge, FPI master)                 CAN controller (Wishbone)
                      |  fpi_req_i / fpi_rsp_o                      ^ wb_*
                      v                                             |
      +---------------+------------------+               +----------+--------+
      |   fpi_mux (priority: ready/ack/data) <--- rsp ---| fpi_wb_bridge     |
      |               ^                  |               | 0xF000_2000, 1 KiB|
      |               | rsp              |               +-------------------+
      |      +--------+----------+       |
      |      | dft_ib            |<-- ld_* (fill the test store)
      |      | 0xF000_1000       |       |
      |      |  bus FSM          |       |
      |      |  command FSM      |       |
      |      |  dft_ib_store     |       |
      |      |   1095 x 73 bit   |       |
      |      +---+-----------^---+       |
      |   t_out  | 7 pins    | 33 pins t_in
      |      +---v-----------+---+       |
      |      | edt_counter        |      |
      |      |  edt_decompressor -> 4 scan chains (counter_scan, scan_dff)
      |      |  -> edt_compactor, bypass                        |
      |      +--------------------+      |
      +----------------------------------+  soc_dft_top
```

## The DFT infrastructure bridge

`rtl/dft_ib.sv` is the core of the design. It is a plain FPI slave, so it cannot start
a bus transfer and has no interrupt line. The CPU therefore controls it only by
polling. Two state machines run side by side, so that register reads get an answer in
the middle of a 4381-cycle test:

* The **bus FSM** decodes one of five word addresses and answers in the next cycle with
  `ready=1`, `ACK_NSC` and, for a read, the data. Any other address gets no answer at
  all, so another slave or the bus controller must handle it.
* The **command FSM** starts when the CMD register is written, and writes its result
  into CMDRSP.

| offset | register | access | contents |
|-------|----------|--------|----------|
| 0x00 | CMD     | R/W | `[3:0]` command: 1 `INT_TEST`, 2 `EXT_APPLY`, 3 `EXT_END` |
| 0x04 | CMDRSP  | R   | `[3:0]` 0 idle, 1 busy, 2 done, 3 pass, 4 fail, 5 bad command; `[31:16]` set index |
| 0x08 | STIM    | R/W | `[6:0]` pattern for the DUT pins (external test) |
| 0x0C | RESP_LO | R   | DUT outputs `[31:0]` |
| 0x10 | RESP_HI | R   | `[0]` DUT output 32 (the EDT channel output) |

If CMD is written while a command is still running, the write is dropped. Software
must poll until CMDRSP stops reading *busy* before it issues the next command.

**Internal test schedule.** Each stored set takes four cycles:

1. `RD`: the set is read from the synchronous store.
2. `DRIVE`: the set's pattern is loaded into the pin register `t_out`, and its expected
   response and mask are latched.
3. `SETTLE`: the DUT sees the new pins and takes any clock pulse they contain.
4. `CMP`: `(t_in ^ expected) & ~mask` is checked. A mismatch stops the test with FAIL
   and the set index. Otherwise the next set starts, and after the last set the result
   is PASS with the set count.

One more cycle decodes the command. The full test of 1095 sets therefore runs in
4·1095 + 1 = 4381 cycles, which is 54.76 µs at 80 MHz. This matches the test time
reported for the original system, and the top-level testbench measures it exactly.

**External test.** `EXT_APPLY` copies STIM onto the pins, waits one cycle, and
captures the 33 outputs into RESP_LO/RESP_HI. This takes 3 cycles. The pins keep their
value between applies, as tester pins would. `EXT_END` returns them to zero. The
software loop for each set is: write STIM, write CMD=2, poll CMDRSP until it reads
*done*, then read both RESP registers.

## Test data: why the DUT clock is a data bit

A stored set is `{pattern[6:0], response[32:0], mask[32:0]}`, 73 bits, and the store
holds 1095 of them (79 935 bits). A set is not one ATPG pattern. It is one *step* of the
DUT's pins, recorded by simulating the ATPG patterns and tapping the pins: in the
original system 28 compressed patterns became 1095 steps. Every pin is therefore part
of the pattern, including the DUT's clock and the EDT logic's clock:

| bit | pin | bit | pin |
|-----|-----|-----|-----|
| 0 | `cnt_clk`, counter clock | 4 | `edt_ch_in`, EDT channel in |
| 1 | `cnt_rst`, counter reset | 5 | `edt_bypass` |
| 2 | `cnt_en`, count enable   | 6 | `lpct_clk`, EDT (LPCT) clock |
| 3 | `scan_en`                |   |  |

The whole design runs on one system clock. Inside `edt_counter`, each of the two clock
pins has an edge detector. If a pin is 1 now and was 0 in the previous system cycle,
the scan cells (or the ring generator) update at the end of that cycle. A scan shift
therefore takes two sets, one with the clocks low and one with them high. The response
stored with a set is the value the outputs show one cycle after its pattern is applied,
which is the instant the bridge compares at.

The expected responses must come from a fault-free model of the DUT. The top-level
testbench builds them the same way the original flow did. It generates the pin
sequence: a reset, then 28 scan patterns each with 10 shift steps and one capture (every
fourth pattern in bypass), then functional counting. It drives that sequence into a
separate `edt_counter` instance and records the outputs. Set 0 comes before the counter
has been reset, so it is fully masked. A mask bit of 1 means *don't care*.

## The device under test: scan chains and EDT

* `counter_scan`: a 10-bit up-counter with 3 functional inputs (clock, synchronous
  reset, enable) and 32 outputs. The outputs are the count, zero-extended. Each
  flip-flop is a `scan_dff`, a mux-D scan cell. Count bit *i* sits in chain *i* mod 4,
  so chains 0 and 1 hold 3 cells and chains 2 and 3 hold 2. Data enters at a chain's
  highest bit and leaves at its lowest, so chain *c* outputs `count[c]`.
* `edt_decompressor`: an 8-bit ring generator in Galois form (x⁸+x⁶+x⁵+x⁴+1, maximal
  period 255). The EDT channel bit is XORed into bit 0. A phase shifter gives each chain
  the XOR of two ring bits: chain 0 gets bits 0 and 3, chain 1 bits 1 and 5, chain 2
  bits 2 and 7, chain 3 bits 4 and 6. The ring advances on the LPCT clock. It is held
  at zero while `scan_en` is 0, so every load starts from a known state.
* `edt_compactor`: XOR of the four chain outputs onto the channel output.
* **Bypass** (`edt_bypass=1`): the four chains are joined into one chain,
  channel in → 0 → 1 → 2 → 3 → channel out, and the EDT logic is skipped.

## The FPI bus side

`fpi_pkg` defines the subset of the FPI bus used here: single 32-bit transfers only. A
master holds `req`, `addr`, `wr` and `wdata` until the transfer completes. The addressed
slave raises `en` from the cycle after the request and finishes with `ready=1` plus a
2-bit `ack`: `00` means no special condition, `01` retry, `10` error. `en=1, ready=0`
means busy. The encodings are this design's own; the real bus has more signals and
block transfers.

* `fpi_mux` has three priority multiplexers, for ready, ack and read data. They select
  the slave whose `en` is high; the lowest index wins if several are. With no enable
  high, the mux returns an idle response: `ready=1`, `NSC`, data 0. The module defaults
  to 3 slaves. The top uses 2, because only the bridge and the translator are on the
  bus.
* `fpi_wb_bridge` turns each FPI access in its 1 KiB window into one classic Wishbone
  cycle, with 8-bit address and 8-bit data for an 8-bit CAN controller. It keeps FPI
  `ready` low until the Wishbone ack, then answers in the next cycle. As a guard against
  a misbehaving master, it checks the request line twice: at the first data-phase cycle
  and when the Wishbone ack arrives. If the request has gone, the answer is
  `ACK_RETRY`, and the master repeats the transfer. A Wishbone write can already have
  happened when a late retry is signalled.

## Sizes and timing

| quantity | value |
|----------|-------|
| system clock | 80 MHz |
| test store | 1095 sets × 73 bits = 79 935 bits (about 9.8 KiB) |
| internal test, 1095 sets | 4381 cycles = 54.76 µs |
| external test, per set | 3 cycles in the bridge, plus CPU bus accesses (each completes in the cycle after the request) and CAN transfers |
| FPI access to the bridge | completes in the cycle after the request is first seen; no wait states |

In the original system almost all of the external test time was CAN traffic: about
225 µs per 8-byte data frame and 80 µs per remote frame. That gave about 582 µs per
set and 640 ms in total. That cost lies outside this RTL.

## Where this RTL differs from the original system or fills gaps

* Register offsets, command and response codes, the ack encoding, base addresses
  (0xF000_1000 and 0xF000_2000, both in the SoC's peripheral range) and the meaning of
  the counter's three inputs are all choices made here.
* The bridge's pin registers follow the 7-bit pattern / 33-bit response data format. An
  earlier connection sketch of the original gives 9 and 7 bits as minimum register
  widths; this RTL uses the widths of the stored test data.
* The ATPG test data of the original flow is not available. The testbench generates
  its own scan/EDT pin sequence of the same length (1095 sets).
* The EDT compactor has no X-masking (gating) logic. The real compactor has some, but
  its control is not specified.
* The test store has a write port (`ld_*`) for filling it. How the store is programmed
  in a product is left open.
* The internal test stops at the first mismatch.
* The ring generator's size and taps, the phase shifter taps, the clear-while-capture
  rule and the use of the LPCT clock as the EDT clock are this design's choices.
* Not built: the TriCore CPU, its memories and LFI bridge, the bus control unit that
  arbitrates the FPI bus, the CAN controller, and the external tester. The top brings
  out their connections.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
`tb_soc_dft_top` runs the whole system at its default size. It runs the internal test
on a good DUT, the internal test with a stuck-at-0 forced on the compactor output, the
internal test with one corrupted stored response, the external test over all 1095 sets,
and CAN-register accesses including a retried transfer. It counts each of these and
fails if any never happened.

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/fpi_pkg.sv rtl/dft_pkg.sv \
  tb/tb_soc_dft_top.sv --top-module tb_soc_dft_top
./obj_dir/Vtb_soc_dft_top
```

Replace the testbench name to run another one: `tb_dft_ib`, `tb_dft_ib_store`,
`tb_edt_counter`, `tb_counter_scan`, `tb_scan_dff`, `tb_edt_decompressor`,
`tb_edt_compactor`, `tb_fpi_mux` or `tb_fpi_wb_bridge`. Each finishes in well under a
second.

To test a different core, widen `PAT_W`/`RESP_W` and the pin structs in `dft_pkg`. Then
set `DEPTH` to the number of steps in the new test and regenerate the stored data from a
fault-free simulation of the new DUT.
