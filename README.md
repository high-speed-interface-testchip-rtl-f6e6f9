# LVDS link testchip: bit-error-rate tester with JTAG control, LCD readout and DDR exerciser

This RTL is a test chip for one high-speed link: five LVDS lanes that run at
up to 945 Mb/s each, of the kind that carries pixel data from a host to a flat
panel. The chip sends a pseudo-random 35-bit word on every core clock to an
external 7:1 serializer (a THC63LVD103D-class part). The serializer sends the
data back over the five lanes. The chip deserializes the lanes, finds the loop
latency, regenerates the same sequence locally and compares word by word. It
counts wrong bits, logs the words that were wrong, and computes the bit error
rate (BER) as an IEEE double on its own floating-point unit. It shows the BER
on a character LCD and gives all of it to a host PC through JTAG.

A second, smaller part drives an external mobile DDR memory through a DFI port.
It replays a command script from an on-chip memory and stores the data read
back, so the host can check the DDR interface the same way.

## The data path

```
 pattern gen ──SRD_DATA[34:0]──► external serializer ──5 LVDS lanes──► tc_des ──35-bit word──► compare
  (tc_lfsr)                                                                                   (tc_pattgen)
```

* **Word format.** A word is 35 bits: 5 lanes × 7 bits. Lane A carries bits
  6..0, lane B carries 13..7, and so on up to lane E. Each lane sends its most
  significant bit first. The serial clock runs at 7× the word clock. The
  serializer's framing puts a two-bit offset between the low-speed clock and
  the word boundary.
* **tc_des.** The deserializer has three stages:
  * A per-lane delay line (`delay`, 3 bits per lane, 0–7 bit times). It stands
    in for the analog delay cells that centre the clock in the data eye.
  * A 7-bit shift register per lane, clocked by `rx_hs_clk`.
  * A word-boundary selector (`phase`, 0–6).

  `int_loaden` generates the load strobe from the high-speed and low-speed
  clocks. `int_rx` holds the per-lane shift and capture logic. The captured
  word moves to the core clock. The PLL lock input passes through a
  two-flop synchroniser.
* **The pseudo-random source.** `tc_lfsr` is a 35-bit Fibonacci LFSR with
  polynomial x^35 + x^33 + 1. It steps 35 times per word, so each word is 35
  fresh sequence bits. One instance makes the transmitted words and a second
  makes the expected words. The second one starts only when the latency is
  known.

## Latency search and comparison (tc_pattgen)

This is the part to understand before changing anything. It runs in this
order:

1. **Zeros until lock.** Until the PLL reports lock, the chip sends only
   zero words.
2. **Training pattern.** After lock, and once a run is started, the chip sends
   a fixed pattern of three words (`TRAIN0..2` in `tc_pkg`), then the LFSR
   stream.
3. **Latency detection.** The receive side counts core cycles from the first
   training word until the three words appear in a row. That count, minus
   the two cycles the detector needs, is the latency L in `LATENCY`.
   * With auto latency off (CTRL bit 1 = 0), the value in `MANLAT` is used
     instead.
   * If no training pattern is seen within `MAXLAT` cycles, the run ends with
     the latency-error status bit. A wrong `PHASE` produces this result, so
     the host finds the right phase by trying all seven.
4. **Comparison.** The receive LFSR starts in step with the returned stream.
   Every received word is XORed with the expected word. For each run and for
   each period of `PERIOD` words, the checker accumulates:
   * the number of wrong bits,
   * the number of erroneous words,
   * the number of compared bits.
5. **Error memories.** Each erroneous word writes the expected word into one
   memory and the received word into the other, at the same address. After
   `ERR_DEPTH` (512) entries, words are still counted but no longer stored.
6. **End of a run.** A run stops after `NUMPAT` words (done). If `STOPERR` is
   not zero, it also stops when that many erroneous words have been seen
   (stopped).
7. **BER request.** At the end of each period and at the end of the run,
   the checker hands its counts to `tc_ber`.

The debug port (`data_sel`, `exp_data_o`, `rec_data_o`) shows the expected and
received 7 bits of one lane on every cycle. With `bypass` set, the
deserialized words go straight back out on `SRD_DATA`.

## BER on a double-precision FPU

`fpu_double` has one counter that starts one clock after `enable` and raises
`ready` after a fixed count for each operation:

| Operation | Cycles |
|---|---|
| add | 20 |
| subtract | 21 |
| multiply | 24 |
| divide | 71 |

Inside it are:
* combinational add, subtract and multiply cores,
* a 57-step restoring divider,
* a rounding module with the four IEEE modes,
* an exceptions module for zero, infinity, NaN, overflow and underflow.

Subnormal results are flushed to zero.

`tc_ber` works in four steps:
1. It converts the wrong-bit count and the compared-bit count to doubles with
   an integer-to-double function.
2. It divides them on the FPU.
3. It multiplies the quotient by 10.0 on the FPU until the result is at least
   10^(DIGITS−1), counting the multiplications.
4. It truncates the result to a 40-bit integer mantissa with an 8-bit signed
   decimal exponent.

It does this for both the total BER and the period BER. The doubles and the
decimal forms can be read from the registers.

## LCD readout (lcd_ctrl)

`lcd_ctrl` drives an HD44780-compatible 1×2-line display with an 8-bit bus
and writes only. It works like this:
* It waits `T_PWRUP` clocks after reset.
* It sends the commands 0x38, 0x0C, 0x01 and 0x06, waiting `T_EXEC` (or
  `T_CLEAR` after the clear) after each.
* From then on it rewrites line 1 (DDRAM 0x00) with the total BER and line 2
  (DDRAM 0x40) with the period BER, in the form `d.dddde-XX`.

The mantissa is turned into BCD by `lcd_bin2bcd` (shift-and-add-3). The digits
are turned into ASCII by `bcd_to_ascii`. `lcd_write` makes the RS/E strobe
timing. The default waits assume a 106 MHz core clock.

## Host access: JTAG → OCP → registers

`jtag_ctrl` is an IEEE 1149.1 TAP. It samples TCK with the core clock, so TCK
must be at least 4× slower than the core clock. It has a 4-bit instruction
register:

| IR | Instruction | DR |
|---|---|---|
| 0 | EXTEST | boundary-scan controls are brought out as `bsr_*` |
| 1 | SAMPLE | boundary-scan controls are brought out as `bsr_*` |
| 2 | IDCODE | 32'h1A5C0001; also selected after reset |
| 8 | OCP_ADDR | 16-bit address |
| 9 | OCP_WRITE | 8-bit data, written on Update-DR |
| A | OCP_READ | 9 bits; Update-DR starts a read, and the next Capture-DR loads {valid, byte} |
| F | BYPASS | 1 bit |

The address increments after every access, so a multi-byte field is read or
written with one address scan followed by repeated data scans.

The OCP bus (`ocp_if`) is byte wide over 64 KB. It carries `MCmd`, `MAddr`,
`MData`, `SCmdAccept`, `SResp` and `SRespData`. It has one outstanding
transfer and the response comes one clock after the command. Assertions in
the interface check these rules. `tc_reg` decodes the bus:

| Address | Register | Contents |
|---|---|---|
| 0x00 | CTRL | bit 0 start, bit 1 auto latency |
| 0x01 | STATUS | bit 0 locked, 1 latency found, 2 latency error, 3 done, 4 stopped, 5 running, 6 BER valid |
| 0x02 / 0x03 / 0x04 | MAXLAT / MANLAT / LATENCY | |
| 0x05 | PHASE | |
| 0x06–0x0A | DELAY | lanes A–E |
| 0x10 | NUMPAT | 32 bit |
| 0x14 | STOPERR | 32 bit |
| 0x18 | PERIOD | 32 bit |
| 0x20 | erroneous words | 48 bit |
| 0x28 | wrong bits | 48 bit |
| 0x30 | compared bits | 48 bit |
| 0x38 | error-memory pointer | |
| 0x40 / 0x48 | total / period BER | IEEE doubles |
| 0x50 / 0x58 | total / period decimal BER | byte 0 exponent, bytes 1–5 mantissa |
| 0x60 | DDR control | bit 0 start |
| 0x61 | DDR status | bit 0 busy, bit 1 done |
| 0x62 / 0x64 | DDR transmit first / last entry | |
| 0x66 | DDR receive start | |
| 0x68 | DDR receive count | |
| 0x2000 + 8·i | error memory, expected word i | |
| 0x3000 + 8·i | error memory, received word i | |
| 0x4000 + 8·i | DDR receive memory | |
| 0x8000 + 16·i | DDR transmit memory | read/write |

Multi-byte fields are little-endian.

Reset values:
* `PHASE` = 2 (parameter `PHASE_RST`), standing in for a phase found by
  timing analysis,
* `DELAY` = 0,
* `MAXLAT` = 64,
* auto latency on.

## DDR exerciser (ddr_ctrl)

The transmit memory holds 2048 × 128-bit script entries:

| Bits | Field |
|---|---|
| [127:64] | write data |
| [63:56] | write mask |
| [55] | cs_n |
| [54] | ras_n |
| [53] | cas_n |
| [52] | we_n |
| [51] | cke |
| [50:49] | bank |
| [48:35] | address |
| [34] | wrdata_en |
| [33] | rddata_en |
| [15:0] | number of NOP cycles to insert after the entry |

Start replays entries `first..last` on the DFI command and data signals.
Every `dfi_rddata_valid` beat is stored in the 2048 × 64 receive memory from
the programmed start address, and the count is kept. Timing between commands
is entirely up to the script. The PHY, with its DDR pad macros, is outside
this RTL.

## Where this design departs from the original chip or fills gaps

* **Clocking.**
  * Everything except the serial front end runs on one core clock.
  * JTAG is oversampled rather than clocked by TCK.
  * The error memories are read on the core clock, not the JTAG clock.
* **Analog parts.** The PLL, LVDS receivers and delay cells are not RTL.
  * The clocks and the lock signal are inputs.
  * The delay cells are replaced by a digital delay of whole bit times.
* **Choices of this design.** The following were not specified and are
  choices made here:
  * the LFSR polynomial and seed,
  * the training pattern,
  * the register map and instruction codes,
  * the IDCODE,
  * the 512-word error-memory depth,
  * the DDR script format,
  * the LCD text format and waits.
* **No boundary-scan cells.** The TAP supplies the boundary-scan controls,
  but the pad-ring cells are not included.
* **DDR controller.** It is a script player. It has no refresh or timing
  logic of its own.
  * It runs on the core clock rather than a separate 200 MHz DDR clock.
  * The DFI data path is 64 bits per cycle: two beats of the 32-bit memory
    bus.
  * Scripts are loaded over JTAG. There is no preload from an external
    serial memory.
* **LCD line order.** Line 1 shows the total BER and line 2 the period BER.
  Another arrangement is possible: per-period BER first, then a total error
  count. It would be a change in `lcd_ctrl` alone.
* **Memory budget.** The five memories hold 429,056 bits. That fits a
  512-kbit block-RAM budget.

## Files

* `rtl/tc_pkg.sv` holds the shared constants, structs, the address map and the
  integer-to-double function.
* `rtl/ocp_if.sv` is the bus interface with its assertions.
* The other `rtl/*.sv` files are one module each, with `tc_top` at the top.
* `tb/` holds:
  * one self-checking testbench per block (`<block>_tb.sv`),
  * `thc63_model.sv`, a behavioural serializer with per-lane skew and random
    bit-error injection,
  * `tc_top_env.svh`, the shared top-level environment: clocks, serializer,
    DFI memory model, LCD model and JTAG/OCP access tasks.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The simulator used is Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tc_top_tb \
  rtl/tc_pkg.sv rtl/ocp_if.sv rtl/*.sv tb/thc63_model.sv tb/tc_top_tb.sv
./obj_dir/Vtc_top_tb
```

(List `tc_pkg.sv` and `ocp_if.sv` first and leave them out of the glob, or
pass the remaining files by name.)

There are three top-level tests:

* **`tc_top_tb`** shortens the LCD waits. It covers:
  * IDCODE, and zeros before lock,
  * the phase sweep (one phase locks, six end in a latency error),
  * an error-free run,
  * the debug port,
  * a run with injected errors: wrong bits must equal injected flips, the
    error memories must differ only in the disturbed lane, and the BER
    double must match bit for bit,
  * the LCD text,
  * stop-at-error and manual latency,
  * bypass,
  * a DDR write/read script.

  It counts each mechanism and fails if any never happened.
* **`tc_top_errors_tb`** first skews lane E by two bit times and checks that
  no phase works until lanes A–D get a matching delay. It then injects random errors on each lane in turn, then on
  all five together. In every run, wrong bits must equal the injected flips,
  the error memory must differ only in the disturbed lanes, and the BER must
  match exactly.
* **`tc_top_full_tb`** runs `tc_top` with all default parameters. It covers:
  * the phase sweep,
  * a 60,000-word run with errors, where the error memory fills up,
  * the BER check,
  * the LCD after its full 1.6-million-cycle power-up.

## Checking the block tests

Each block test has been run against a deliberately broken copy of its module,
for example a wrong LFSR tap or a mis-decoded instruction, and reports
failures. The tests compare against values computed in the testbench.
Floating-point results are compared bit for bit with the simulator's own
`real` arithmetic.
