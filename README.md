# Processor + hardware co-designed FFT: an 8-point radix-2^3 accelerator on an OPB bus

An OFDM receiver has to run one FFT per symbol, and different standards use
different sizes: 64 or 128 points for IEEE 802.11n, 128 to 2048 points for
IEEE 802.16e. One fixed FFT engine does not fit all of them. This design
splits the work instead. A general-purpose processor runs the first stages of
an N-point FFT in software. A small fixed hardware "branch" FFT runs the last
stage. The branch here is an 8-point radix-2^3 FFT. The processor and the
hardware share an on-chip SRAM that sits on the processor's OPB bus (the
On-chip Peripheral Bus of IBM CoreConnect).

A bigger hardware branch takes load off the processor but costs more area.
With an 8-point branch, the processor has to do all stages except the last
radix-8 stage. A 64-point FFT thus becomes one software radix-8 stage
followed by eight hardware 8-point FFTs.
A parameter turns the same hardware into a 64-point branch. It runs the
8-point datapath 16 times per start, with a twiddle multiplier between the
two radix-8 stages (see "The 64-point branch" below).

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The processor
is not part of it. The testbenches model it as a bus master that also does
the software FFT stage.

## How an N-point FFT is split

Write the time index as n = n1 + 8·n2 and the frequency index as
k = k2 + (N/8)·k1. For N = 64 there are eight groups, 0 ≤ n1, k1 < 8 and
0 ≤ n2, k2 < 8. Decimation in frequency then gives:

1. **Software stage.** For each k2, the processor computes
   y(n1, k2) = Σ_n2 x(n1 + 8·n2) · W8^(n2·k2) · W64^(n1·k2).
   The testbenches also scale this by 1/8. The result goes to SRAM word
   8·k2 + n1, so every group k2 fills eight consecutive words.
2. **Hardware stage.** For each group, the processor writes the group's first
   word address into the control register. The hardware reads the eight words
   and computes X1 = Σ_n1 y(n1, k2) · W8^(n1·k1). It writes X1 back to the
   same eight words in natural order and sets a done bit.
3. After eight groups, word 8·k2 + k1 holds X(k2 + 8·k1)/64. The processor
   reads the results in that order.

Larger N uses the same last stage. It has N/8 groups, and the software does
more stages before it.

## Block structure

```
            OPB (processor)
                 |
           +-----------+   reg_*    +----------+  in_en/addr  +--------+
           | opb_slave |----------->| ctrl_reg |------------->| hw_fsm |
           +-----------+            +----------+<-- busy -----+--------+
              | p_* (A1/D1)                       out_en        |  |  ^
              v                                                 |  |  |
           +---------+  <------ h_* (A2/D2) ---------------------+  |  |
           | mem_mux |  <------ hw_owns -------------------------+  |  |
           +---------+                                     fft_in  v  | fft_out
            |A     |B                                         +----------+
       +---------------+ x NUM_BANKS                          | fft8_r23 |
       |    dpram      |  512 x 32, port A processor,         +----------+
       +---------------+  port B hardware                bf2, cmul, mul_sqrt2
```

| Module | Role |
|---|---|
| `fft_cosys_top` | Wires everything together. Ports: OPB slave signals, `fft_busy`, `fft_done`. |
| `opb_slave` | Decodes the address map and does the OPB transfer handshake. |
| `ctrl_reg` | Write register (start address and bank) and read register (done, busy). |
| `hw_fsm` | One hardware pass: read 8 words, run the FFT, write 8 results back. |
| `fft8_r23` | 8-point radix-2^3 FFT. Eight samples in parallel, pipelined. |
| `bf2` | Radix-2 butterfly. |
| `cmul` | Complex multiplier: four real multiplies, two adds. |
| `mul_sqrt2` | Multiply by √2/2 using shifts and adds. |
| `tw_mul` | W64^k twiddle multiplier (table + `cmul`), used only in 64-point mode. |
| `dpram` | 512×32 true dual-port RAM, shaped like a RAMB16_S36_S36. |
| `mem_mux` | Gives each bank to either the processor or the hardware. |
| `fft_pkg` | Shared sample type, widths, address map and latency. |

## The 8-point datapath (`fft8_r23`)

The 8-point DFT is split into three radix-2 steps (decimation in frequency):

| step | operation | twiddles | word width after it |
|---|---|---|---|
| 1 | a[n] = x[n]+x[n+4]; a[n+4] = (x[n]−x[n+4])·W8^n, n=0..3 | 1, W8^1, −j, W8^3 | 18 bits |
| 2 | same on each half, distance 2 | 1, −j | 20 bits |
| 3 | plain 2-point butterflies | – | 21 bits |

Only W8^1 = (√2/2)(1−j) and W8^3 = (√2/2)(−1−j) are non-trivial. Each is
done in two parts:

* a complex multiply by the constant (1−j) or (−1−j), using `cmul`. With
  constant ±1 coefficients this reduces to adders in synthesis;
* a real multiply of both parts by √2/2, using `mul_sqrt2`.

`mul_sqrt2` uses the constant 46341/2^16 = 2^−1 + 2^−3 + 2^−4 + 2^−6 +
2^−8 + 2^−14 + 2^−16. That is seven shifted copies of the input added
together, then rounded. Multiplying by −j just swaps the real and imaginary
parts and negates one of them.

The outputs are rounded half-up, divided by 2^`OUT_SHIFT` (default 3, a
factor 1/8) and saturated to 16 bits. The flow graph produces X in
bit-reversed lane order. The output wiring puts it back into natural order.

**Timing.** All eight inputs arrive in one cycle, and a new block can follow
every cycle. There is a register after each step. A block taken in at clock
edge t can be captured downstream at edge t+3 (`FFT_LATENCY` = 3).

**Accuracy.** The unit tests compare against a direct DFT in floating point.
Every output part is within 1.5 LSB over the full input range. A full 64-point
transform (software stage plus hardware stage) is within 2.5 LSB.

For a B-bit, N-point fixed-point FFT, the usual estimate of the
signal-to-quantisation-noise ratio is 2^(2B) / (5N − 4·log2 N − 3). For B = 16
and N = 64 that gives 71.7 dB. The end-to-end test feeds full-scale uniform
random input. It measures 77.2 dB and requires at least 66 dB. Some reports
give this figure as 20·log10 of the energy ratio, which doubles the number
(154 here). Smaller inputs lose SQNR roughly in proportion to their level,
because the rounding noise stays fixed: 65 dB at a quarter scale and 41 dB at
1/64 scale.

## The 64-point branch (`BRANCH_N = 64`)

The branch length is a trade-off. A 64-point branch removes one more radix-8
stage from the processor's work. `fft_cosys_top #(.BRANCH_N(64))` builds it
without new arithmetic. One start runs the 8-point datapath 16 times, in
place, on 64 consecutive words:

* **Passes 0–7 (first radix-8 stage).** Pass g reads the words at stride 8:
  g, g+8, …, g+56. It transforms them and multiplies result k by
  W64^(g·k) (`tw_mul`, Q1.15 table, four-multiplier `cmul`). It then writes
  result k back to word g + 8k.
* **Passes 8–15 (second stage).** Pass 8+g reads words 8g … 8g+7, transforms
  them and writes them back in natural order.

Afterwards word 8a + b holds X(a + 8b)/64. Each pass takes 22 cycles.
`out_en` comes 354 cycles after the start, and busy is high for 353 of them.
Larger transforms put software radix-8 stages in front, exactly as in the
8-point case: for 512 points, one software stage and eight 64-point starts.

## Bus interface and programming

Byte addresses, relative to `BASEADDR` (default `0x0180_0000`). Only 32-bit
word accesses are supported.

| Offset | Meaning |
|---|---|
| `b·0x800 + 4·i` | SRAM bank b, word i (0 ≤ i < 512). Real part in bits 31:16, imaginary part in bits 15:0, both two's complement. |
| `0x4000` write register | Bits 8:0: first word of the group. Bits 17:16: bank. A bank number that does not exist selects bank 0. A write starts a pass. A write while busy is ignored. |
| `0x4004` read register | Bit 0: output enable (pass done). It stays set until the next start. Bit 1: busy. |

Every OPB transfer takes two cycles: the request cycle, then a one-cycle
`Sl_xferAck`. `Sl_DBus` is zero except during the acknowledge, so it can be
OR-ed onto the bus. The slave refuses an access to a bank that the hardware
currently owns: it drops writes, reads return 0, and `Sl_errAck` comes
together with `Sl_xferAck`. Addresses outside the map get no answer. The
slave never uses `OPB_BE`, `OPB_seqAddr`, `Sl_retry` or `Sl_toutSup`.

Processor sequence for one group:

1. Write the eight intermediate samples into a bank.
2. Write the group address to the write register.
3. Poll the read register until bit 0 is set.
4. Read the eight results.

A hardware pass (`hw_fsm`) goes through these states: IDLE → READ (9
cycles) → START → WAIT (FFT pipeline) → WRITE (8 cycles) → DONE. `out_en`
rises 24 cycles after `in_en`, and `fft_busy` is high for 23 of them. While
busy, the hardware owns only the bank it works on.

## Memory banks and the three timing schedules

`NUM_BANKS` on `fft_cosys_top` selects the buffering:

* **1 bank (default, single-antenna schedule I).** The processor and the
  hardware take turns on one memory within a symbol. This is the simplest
  and smallest system.
* **2 banks (single-antenna schedule II).** The processor writes its stage
  output into a second bank. The hardware processes that bank during the
  next symbol while the processor works on the next symbol in the first
  bank. This costs a second RAM but lowers the processor's required
  operations per second.
* **4 banks (2×2 MIMO schedule).** Each antenna gets one processor bank and
  one hardware bank. The processor and the single hardware branch alternate
  between the two antennas, each getting half a symbol per antenna. So two
  antennas share one hardware FFT, and the processor needs twice the
  operation rate of schedule II.

Every bank is a dual-port RAM. Port A belongs to the processor and port B to
the hardware. `mem_mux` opens port B of the bank the hardware owns and closes
port A of that same bank. All other banks stay fully open to the processor.
This is how the processor can fill or drain one bank while the hardware
works on another.

## Capacity and speed against the standards

The hardware stage needs 24 cycles per group with the 8-point branch, and
the RAM's single hardware-side port is what sets that number. A design
target of 85 MHz gives these figures for the hardware stage alone:

| FFT | groups | cycles | time at 85 MHz | symbol | fits one 512-word bank |
|---|---|---|---|---|---|
| 64 (802.11n, 20 MHz) | 8 | 192 | 2.26 µs | 3.2 µs | yes |
| 128 (802.11n, 40 MHz) | 16 | 384 | 4.52 µs | 3.2 µs | yes, but too slow at 85 MHz |
| 512 (802.16e, 5 MHz) | 64 | 1536 | 18.1 µs | 102.4 µs | yes |
| 1024 (802.16e, 10 MHz) | 128 | 3072 | 36.1 µs | 102.4 µs | no (1024 words) |
| 2048 (802.16e, 20 MHz) | 256 | 6144 | 72.3 µs | 102.4 µs | no (2048 words) |

A group never crosses a bank boundary, so with `NUM_BANKS` = 4 (2048 words
in all) the 1024- and 2048-point data can be spread over the banks. The
hardware then works on each group in whichever bank holds it.
`tb_fft_cosys_sizes` runs all four sizes this way.

The processor's bus transfers and its software stages come on top of these
times. With the 8-point branch, the 2×2 MIMO schedule at 64 points needs 384
hardware cycles per symbol. That requires a clock of at least 120 MHz.

With the 64-point branch, one 64-point start takes 354 cycles: 4.16 µs at
85 MHz, against a 3.2 µs 802.11n symbol. A 512-point FFT needs 8 starts
(33.3 µs). A 2048-point FFT needs 32 starts (133 µs against 102.5 µs) and
more memory than one bank holds.

## Choices made in this design

These points are decisions made here, not given by the system's description:

* The default hardware branch is 8 points, because only the 8-point
  branch's internals are specified. A 64-point branch is also named as
  suitable. Its structure here (16 in-place passes through the 8-point
  datapath, with a table twiddle between them) is this design's own.
* The 8-point FFT takes and returns all eight samples in parallel, with a
  3-cycle pipeline. A serial pipelined branch FFT would have a longer
  latency (about 8 cycles for 8 points).
* A start is slower than a streaming branch FFT would be, because every
  sample crosses the single hardware-side RAM port twice. A streaming branch
  is commonly estimated at about 8 cycles for 8 points and about 103 cycles
  for 64 points. Here a start takes 24 cycles (8-point branch) and 354
  cycles (64-point branch). The speed table above uses these measured
  figures.
* Scaling is 1/8 with round-half-up and saturation, and internal words grow
  to 21 bits.
* Results are written back in place, in natural order.
* The register layout, control register offset (`0x4000`), error
  acknowledge, ignoring starts while busy, and the sticky done bit are all
  choices of this design.
* The bus slave does single-beat transfers only. It has no byte writes and
  no bursts.
* The memory is an inferred RAM array shaped like the FPGA primitive, not
  the primitive itself. Both ports share one clock. The output is
  write-first. If both ports write the same word in the same cycle, port B
  wins. Parity is not modelled.
* One bank spans 0x800 bytes, because 512 × 32 bits is 2 KiB.
* Resets are synchronous and clear control state only. Memory contents and
  datapath registers are not reset.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fft_pkg.sv tb/tb_fft_cosys_top.sv --top-module tb_fft_cosys_top
./obj_dir/Vtb_fft_cosys_top
```

| Testbench | What it shows |
|---|---|
| `tb_fft_cosys_top` | Default configuration. Three 64-point FFTs (software stage in the testbench, hardware stage over the bus) checked against a direct DFT. Prints the SQNR of each and requires at least 66 dB at full scale. Also checks the refused access, an ignored start, and 23 busy cycles per pass. |
| `tb_fft_cosys_mimo` | Four banks, two antennas. Accesses to one antenna's bank succeed while the hardware works on the other's. An access to the owned bank is refused. Both results are checked. |
| `tb_fft_cosys_siso2` | Two banks, schedule II. The processor prepares the next symbol in its own bank while the hardware works on the other. Both symbols are checked. |
| `tb_fft_cosys_b64` | 64-point branch. One 64-point FFT done entirely in hardware, then a 512-point FFT (software radix-8 stage plus eight hardware starts) filling the whole bank. Both checked against a direct DFT. Also checks 353 busy cycles per start. |
| `tb_fft_cosys_sizes` | Four banks. 128-, 512-, 1024- and 2048-point FFTs with the 8-point branch. The data spread over the banks: the software stage in the testbench, then one start per group of 8. All outputs are checked against a direct DFT, along with 23 busy cycles per start. |
| `tb_tw_mul` | Every W64^k table entry against a real-number product. |
| `tb_fft8_r23` | 200 blocks back to back. Checks against a floating-point DFT, 3-cycle latency, and one block per cycle. |
| `tb_hw_fsm`, `tb_opb_slave`, `tb_ctrl_reg`, `tb_mem_mux`, `tb_dpram` | Control and memory blocks against behavioural models. |
| `tb_bf2`, `tb_cmul`, `tb_mul_sqrt2` | Arithmetic units against integer or real reference values. |

To change the size or the schedule, set `NUM_BANKS` and `BRANCH_N` on
`fft_cosys_top`, and `OUT_SHIFT` on `fft8_r23`. Widths, the address map and the pipeline latency
are in `fft_pkg`. Branch sizes other than 8 and 64 would need new pass sequencing in `hw_fsm`.
