# CSM1 chamber service module: FPGA logic

A drift-tube chamber of the muon spectrometer carries up to 18 TDC mezzanine
cards. Each card measures hit times and sends its results as a serial bit
stream, accompanied by its own 40 MHz strobe. The chamber service module
(CSM) collects all 18 streams and sends them to the readout driver over a
single optical fibre. This RTL is the logic inside the module's FPGA:

* it recovers each serial stream even though every strobe arrives with its
  own, unknown phase;
* it cuts each stream into 32-bit words and buffers them per card;
* it interleaves the 18 cards, one word per card in turn, into a single
  32-bit word stream for the optical-link serializer (the GOL chip), and
  closes each round with a spacer word that carries a parity bit per card;
* it exposes control and status over JTAG.

```
 TDC 0  strobe,data ─┐   ┌──────────── s2p_unit (x18 channels) ───────────┐
 TDC 1  strobe,data ─┼──►│ phase_sampler ─► tdc_deserializer ─► async_fifo │──┐
  ...                │   └─────────────────────────────────────────────────┘  │
 TDC 17 strobe,data ─┘        ▲ clk0/90/180/270          40 MHz │ 25 MHz       │
                              │                                ▼              ▼
 clk40_in ─► dcm_model (4 phases)            clk25_in ─► dcm_model (DLL) ─► csm_mux ─► gol_data[31:0],
                                                                             ▲          gol_tx_en, gol_clk
 JTAG (BSCAN user regs) ◄──► jtag_user_regs ── run, tdc_enable ──────────────┘
                                   ▲ overflow, phase, lock status
```

## Reading a stream of unknown phase

This is the least obvious part of the design. The TDC strobes run at the
same 40 MHz as the module's clock, because the cards are clocked from the
module. The cables differ in length, though, so each strobe comes back with an
arbitrary phase. You cannot clock 18 inputs on 18 unrelated clock edges.
Instead, the FPGA's clock manager makes four copies of the local clock,
shifted by 0, 90, 180 and 270 degrees. Every input is sampled on all four,
and the design reads each stream on whichever phase suits it.

`phase_sampler` does this for one input:

1. Four register pairs, one on each phase clock, sample the strobe and the
   data.
2. At every `clk0` edge the eight samples are copied into the `clk0` domain.
   In time order they are `s[0..3]` and `d[0..3]`: one quarter-period apart,
   covering the last 25 ns.
3. The quarter in which the strobe rose is the index `k` where `s[k]` is 1
   and the sample before it is 0. For `k = 0`, "before" means `s[3]` of the
   previous period.
4. The TDC model used here changes its data on the strobe's **falling**
   edge, so the data is most stable around the strobe's rising edge. The
   chosen phase is `k`, the first sample after the rising edge. That sample
   is between 0 and 90 degrees after the centre of the data eye, which leaves
   at least a quarter period of margin on each side.
5. A new `k` is adopted only after it has been seen for `LOCK_CYCLES` (8)
   periods in a row. This keeps jitter near a quarter boundary from moving
   the sampling point back and forth. `locked` rises with the first choice.
6. From then on, `bit_o` delivers `d[k]`, one bit per `clk0` cycle.

Example: a strobe that rises 13 ns after `clk0` is low at 0, 6.25 and
12.5 ns and high at 18.75 ns. So `k = 3`, and the data is read from the
270-degree register. The tests check `k = ceil(offset / 6.25 ns) mod 4` for
strobe offsets across the whole period.

Limits: a phase change while a word is being received can drop or repeat a
bit, which corrupts that one word. The samples of the 90/180/270-degree
registers reach `clk0` with 6.25 to 18.75 ns of slack. A real implementation
should constrain these paths, or retime the 270-degree sample through the
180-degree domain.

## Words and buffering

`tdc_deserializer` frames the recovered bits. The line idles low. A word is
a `1` start bit followed by 32 data bits, most significant bit first, which
makes at least 33 bit periods per word. Words may follow each other with no
gap. With each word it delivers the word's parity, the XOR of all 32 bits.

`async_fifo` stores `{parity, word}` (33 bits, 8 entries). It is written on
`clk0` (40 MHz) and read on the transmission clock (25 MHz), so it is a
dual-clock FIFO:

* read and write pointers are Gray-coded and pass through two-flop
  synchronizers;
* the read side is show-ahead: `rdata` holds the oldest entry while `empty`
  is low;
* a word that arrives while the FIFO is full is dropped, and a sticky
  `overflow` flag is set.

`s2p_unit` holds 18 such channels.

## The output frame

`csm_mux` runs on the transmission clock and sends one 32-bit word per
cycle, in frames of 19 words:

```
slot:   0      1      ...   17      18
word:  TDC0   TDC1    ...  TDC17   spacer   | TDC0  TDC1 ...
```

* **TDC slot i**: if TDC i is enabled and its FIFO holds a word, that word is
  sent and removed from the FIFO. Otherwise the **empty word** `32'h0000_0000`
  is sent.
* **Spacer**: `{14'h3E00, parity[17:0]}`. Bit i is the parity of the word
  TDC i sent in this frame, or 0 if slot i was empty.

The output is registered: a word appears on `gol_data` one clock after its
slot. `gol_tx_en` is high while the multiplexer runs. `gol_tx_er` is always
0. When `run` drops, the rotation stops. It restarts at TDC 0 when `run`
rises again, and words that arrived meanwhile stay in the FIFOs.

Rates at the default clocks:

| quantity | value |
|---|---|
| link words | 32 bit x 25 MHz = 800 Mbit/s, the GOL's 800 Mbit/s mode |
| service per TDC | 25 MHz / 19 = 1.316 M words/s |
| demand per TDC at full rate | 40 MHz / 33 = 1.212 M words/s |
| load at full rate | 92 % of TDC slots carry data |

So all 18 cards can send back to back indefinitely without losing data.
`tb_csm1_throughput` measures exactly this.

A block diagram of the original module labels the link with 106.7 Mbyte/s.
That rate is not reached here: 25 MHz x 4 bytes = 100 MB/s, of which 94.7 MB/s
is TDC slots. Reaching it would need a 26.67 MHz word clock. This design
follows the stated 25 MHz oscillator.

## JTAG user registers

The FPGA's boundary-scan primitive gives the logic two user data registers.
`jtag_user_regs` implements them on `tck`. The primitive's
`sel1/sel2/capture/shift/update/tdi` levels are inputs, sampled on the rising
edge of TCK, and its `tdo1/tdo2` are outputs. Both registers shift least
significant bit first.

| register | bits | content | access |
|---|---|---|---|
| USER1 | 18:0 | `[18]` run, `[17:0]` TDC enable | read/write; resets to all ones, so the module runs without any JTAG access |
| USER2 | 73:0 | `[17:0]` FIFO overflow, `[35:18]` phase locked, `[71:36]` selected phase (2 bits per TDC, TDC i at `36+2i`), `[72]` 40 MHz DCM locked, `[73]` 25 MHz DLL locked | read only |

The run bit and the enables pass through two-flop synchronizers into the
25 MHz domain. The status bits pass through two-flop synchronizers into TCK.
The multiplexer runs only when the run bit is set **and** the 25 MHz DLL has
locked.

## Clocks and reset

| clock | source | drives |
|---|---|---|
| `clk0..clk270` | `clk40_in` through `dcm_model` | input sampling, deserializers, FIFO write side |
| transmission clock (`gol_clk`) | `clk25_in` through a second `dcm_model` used as a DLL | FIFO read side, multiplexer, GOL bus |
| `jtag_tck` | JTAG | user registers |

`rst_n` is an asynchronous, active-low reset for all domains. Hold it until
the clocks run.

`dcm_model` is a **behavioural, simulation-only model** of the FPGA's DCM.
It is not logic:

* it makes `clk90` by delaying the input a quarter of the period given by the
  parameter `CLKIN_PERIOD_PS`;
* `clk180` and `clk270` are the inversions of `clk0` and `clk90`;
* `locked` rises four input cycles after reset.

A synthesis tool that ignores delays reads this model as plain wires, which
collapses the phases. For an implementation, replace it with the vendor's
clock-manager primitive (phase outputs CLK0/CLK90/CLK180/CLK270). Every other
module is synthesizable.

## What is specified and what is chosen here

Taken from the module's specification:

* 18 TDC inputs;
* a 40 MHz strobe per input, sampled on 0/90/180/270-degree clock phases;
* a small FIFO per input;
* the round-robin multiplexer with empty words and a parity-carrying spacer
  after TDC 17;
* 32-bit words to the GOL;
* a 25 MHz transmission clock through a DLL;
* two JTAG user registers.

Chosen in this design, because the specification does not give them:

* how the best phase is found: the first sample after the strobe's rising
  edge, with a lock filter;
* the serial framing: start bit, MSB first;
* parity as the XOR of the word;
* the FIFO depth (8), the dual-clock FIFO and its drop-on-full behaviour;
* the encodings of the empty word and the spacer;
* one link word per transmission clock;
* the contents of the JTAG registers, including the per-TDC enable and the
  run bit;
* reset values and synchronizers.

Change the encodings in `csm_pkg` if your readout driver expects others.

Outside this RTL:

* the GOL serializer and the optical transmitter, driven through `gol_*`;
* the boundary-scan primitive, whose signals are the `jtag_*` ports;
* the configuration PROM, regulators, optical isolators and clock/signal
  fanouts;
* the TTC receiver and the ELMB calibration multiplexer, which this version
  of the module does not carry.

The signals the FPGA sends back to the cards (clock, trigger, calibration)
are not generated here.

## Files

| file | content |
|---|---|
| `rtl/csm_pkg.sv` | widths, encodings, FIFO entry type, register sizes |
| `rtl/csm1_top.sv` | top level: clocks, 18 channels, multiplexer, JTAG |
| `rtl/dcm_model.sv` | behavioural clock manager (4 phases / DLL) |
| `rtl/phase_sampler.sv` | best-phase sampling of one input |
| `rtl/tdc_deserializer.sv` | word framing and parity |
| `rtl/async_fifo.sv` | dual-clock FIFO with overflow flag |
| `rtl/s2p_unit.sv` | 18 input channels |
| `rtl/csm_mux.sv` | frame builder for the link |
| `rtl/jtag_user_regs.sv` | USER1/USER2 registers |
| `rtl/bit_sync.sv` | two-flop synchronizer |
| `tb/tdc_tx_model.sv` | TDC serial output model (strobe with set phase, word queue) |
| `tb/tb_*.sv` | self-checking testbenches |

Parameters: `csm1_top` has `N` (TDC count, 18), `FIFO_DEPTH` (8, a power of
two and at least 4), and `CLK40_PS`/`CLK25_PS` (clock periods for the DCM
models). The spacer holds up to 18 parity bits, so `N` must not exceed 18.

## Simulation

Verilator 5 with timing support is enough. The testbenches use delays, and
so does the DCM model. Pass `--timescale 1ns/1ps`:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          rtl/csm_pkg.sv tb/tb_csm1_top.sv --top-module tb_csm1_top
obj_dir/Vtb_csm1_top
```

Every testbench ends with `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. What they check:

| testbench | checks |
|---|---|
| `tb_csm1_top` | All 18 inputs at default parameters, end to end:<br>- phase choice for strobes spread over the period (all four phases used)<br>- light traffic (empty words)<br>- full-rate traffic with no loss<br>- a TDC disabled over JTAG until its FIFO overflows (seen in USER2)<br>- link stop and restart<br>Every link word and every spacer parity is checked against the words sent. |
| `tb_csm1_throughput` | 18 TDCs x 100 back-to-back words:<br>- 25 link words/us<br>- about 92 % of TDC slots used<br>- nothing lost, no overflow |
| `tb_phase_sampler` | Chosen phase for 8 strobe offsets; 300-bit random streams recovered bit-exact; a strobe stepped by half a period is held for a few cycles, then re-locked and read correctly. |
| `tb_tdc_deserializer` | Framing with gaps and back-to-back words, parity, one-cycle output latency. |
| `tb_async_fifo` | Random traffic across 40/25 MHz against a scoreboard; exact fill to DEPTH, sticky overflow, in-order drain. |
| `tb_s2p_unit` | Four channels end to end, phases, per-channel overflow. |
| `tb_csm_mux` | Cycle-exact against a reference model: slots, empty words, spacer parity and period, enables, run. |
| `tb_jtag_user_regs` | Reset value, write/readback, hold during shift, status read. |
| `tb_dcm_model` | Phase offsets and lock. |

The whole design simulates in well under a minute. The tests use a TDC
model whose strobe is an exactly delayed copy of the reference clock. They do
not exercise slow phase drift, jitter or metastability; a phase step is tested
on one input only.
