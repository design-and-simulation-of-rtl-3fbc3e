# QPSK baseband transmitter with RRC pulse shaping

This is synthesizable SystemVerilog for a packet-based QPSK transmitter.
It builds 200-bit packets from two lookup tables: a 26-bit Barker preamble and
174 scrambled data bits. It pairs the bits into 2-bit symbols and maps each pair
onto the four QPSK points. A root-raised-cosine (RRC) FIR filter then
interpolates the symbols by 4. The output is a complex baseband stream of
signed 16-bit I/Q samples, one per clock, ready for a DAC or an upconverter.

The block structure follows a published FPGA transmitter model that was made
for HDL code generation. That model has a packetizer state machine, a data
source, a scrambler, bit pairing, a symbol mapper, a valid-gated input
multiplexer, an x4 RRC interpolator and pipeline registers between the stages.
The published description gives this structure and the packet sizes. It does
not give word widths, filter taps, data contents or the clocking. This design
chooses those, and each choice is marked below.

## Signal chain

```
 packetizer_fsm ──load_data, preamble_addr──► data_source ──bit──► [reg] ──► bit_pairing ──pair──┐
   (Moore: INIT, PREAMBLE, APPEND_DATA)       ├ preamble table (26)                               │
                                              ├ data table + counter                              │
                                              ├ data_scrambler (1+z^-1+z^-2+z^-4)                 │
                                              └ preamble/data mux                                 │
 constant 1 ─► 3 bit-rate regs ─► down-sample reg ─► reg ──────────────────── valid ─────────────┤
                                                                                                  ▼
   Delay1/Delay2 ─► symbol_mapper ─► input mux (0 until valid) ─► Delay3 ─► rrc_interp_filter ─► 4 output regs ─► out_i, out_q
```

`data_gen` contains everything on the first two lines. `qpsk_tx_top` adds the
symbol-rate delays, the mapper, the multiplexer, the filter and the output
pipeline.

## One clock, three rates

The chain runs at three rates. Bits come at rate R. Symbols come at R/2,
because two bits make one symbol. Filter samples come at 2R, which is four
samples per symbol. The published model is multirate. This RTL uses one clock
at the fastest of those rates, the output sample rate. `qpsk_timing` makes two
clock enables from a free-running 2-bit counter:

| enable   | high in cycles | drives                                                        |
|----------|----------------|---------------------------------------------------------------|
| `bit_ce` | 0, 2, 4, …     | packetizer FSM, data source, its scrambler, the bit register after the source, the valid pipeline |
| `sym_ce` | 0, 4, 8, …     | bit-pair capture, Delay1/Delay2/Delay3, the filter's delay line |

Each register in the chain is therefore a "z^-1 at its own rate". This is what
keeps the latencies fixed. The published model relies on exactly that: the
valid flag and the data reach the multiplexer together, after a start-up delay
known in advance.

Two assertions guard these rules. The filter checks that a symbol arrives
exactly every 4 clocks, starting in cycle 0. Bit pairing checks that `sym_ce`
is only high together with `bit_ce`. If you drive the blocks from your own
enables, keep both rules.

## Packet format and data source

* **Framing.** `packetizer_fsm` is a Moore machine with three states. INIT puts
  out preamble address 0 for one bit period. PREAMBLE counts the address from 1
  to 25. APPEND_DATA holds `load_data` high for 174 bit periods. A packet is
  therefore 1 + 25 + 174 = 200 bit periods long, and packets follow each other
  without gaps.
* **Preamble.** The 13-bit Barker code `1111100110101` with every bit sent
  twice gives 26 bits. The 26-bit length is from the reference. Taking the
  doubled Barker-13 code is this design's reading of "26-bit Barker-type code".
* **Data.** The data table holds `NUM_MSG` packets (default 4) of 174 bits.
  Packet m carries the text `Hello world mmm` in 7-bit ASCII, MSB first
  (105 bits), followed by 69 zeros. The contents are this design's choice. The
  table is padded with zeros to a power-of-two depth: 1024 entries for 696
  bits. Its address counter advances only while `load_data` is high and wraps
  after the last stored bit, so consecutive packets carry consecutive messages
  and the padding is never sent.
* **Scrambler.** Each data bit is XORed with scrambled bits 1, 2 and 4 back:
  `y = x ^ y[-1] ^ y[-2] ^ y[-4]`. This is a self-synchronizing scrambler, so
  a receiver undoes it with the same taps. It advances only on data bits and
  keeps its state from one packet to the next. It starts from zero at reset.
  The preamble is not scrambled.
* **Alignment.** The data source registers every path so that the preamble
  bit, the select signal and the scrambled data bit all reach the
  preamble/data multiplexer two bit periods after the FSM output that caused
  them.

## Bit pairing and valid

`bit_pairing` takes the two phases of the serial stream on `sym_ce`. The
second bit of each pair goes to the high position (H) and the first bit to the
low position (L): symbol = `{bit 2j+1, bit 2j}`. This split of phases follows
the reference. Pairs are aligned to the packet: bits 0 and 1 of every packet
form one symbol.

The valid path is a constant 1 passed through the same number of registers as
the data: three at the bit rate, then a down-sampling register, then one more
at the symbol rate. `valid` therefore rises on exactly the symbol that holds
the first two bits of the first packet. Until then, the input multiplexer in
front of the filter feeds zero symbols, so the filter never sees the junk that
fills the pipeline after reset.

## Symbol mapping

The mapper uses Gray ordering with a pi/4 offset and amplitude 1/sqrt(2)
(23170 in Q1.15):

| pair `{b1,b0}` | I      | Q      |
|----------------|--------|--------|
| 0              | +0.707 | +0.707 |
| 1              | −0.707 | +0.707 |
| 3              | −0.707 | −0.707 |
| 2              | +0.707 | −0.707 |

Bit 0 sets the sign of I and bit 1 sets the sign of Q. The reference only says
that integers 0..3 are mapped to QPSK points. The Gray/pi/4 convention is this
design's choice, picked because it is the usual default of a baseband QPSK
modulator. The constellation amplitude of ±0.707 matches the reference's
measured constellation.

## RRC interpolation filter

`rrc_interp_filter` up-samples by 4. It is equivalent to inserting three zeros
after each symbol and convolving with a 41-tap RRC response. It is built in
polyphase form, so no multiplier ever works on a stuffed zero:

```
y[4n + p] = sum_{k=0..10} h[4k + p] · x[n − k]     p = 0..3, h[m] = 0 for m ≥ 41
```

* A symbol enters an 11-deep delay line on each `sym_ce`. A phase counter
  restarts at 0 on that enable and selects the tap set for each clock.
* There are 11 multipliers per rail and 22 in total. The products are
  registered, and then their sum is registered. These two pipeline stages keep
  the multiplier-adder path short.
* The taps are a root-raised-cosine with roll-off 0.5, spanning 10 symbols,
  scaled to unit energy and rounded to Q1.15. They are listed in
  `qpsk_tx_pkg`, along with the closed form they come from. Roll-off, span and
  scaling are this design's choices. The reference states only "RRC, up-sampling
  by 4".
* Because the taps have unit energy, a matched RRC receive filter gives back
  the ±0.707 constellation at the symbol instants. With QPSK input the output
  magnitude stays below 0.52, so the sum is only truncated (floor) to Q1.15 and
  never saturates.

## Fixed-point formats

| signal               | format                          |
|----------------------|---------------------------------|
| symbols, I and Q     | signed 16 bit, 15 fraction bits |
| RRC taps             | signed 16 bit, 15 fraction bits |
| products / sum       | 32 bit / 36 bit, full precision |
| `out_i`, `out_q`     | signed 16 bit, 15 fraction bits (floor) |

All of these are this design's choices.

## Timing

Cycle 0 is the first clock after `rst` is released. Reset is synchronous and
active high.

| event                                                      | cycle        |
|------------------------------------------------------------|--------------|
| packet bit 0 leaves the data source                        | 3 – 4        |
| `valid` and pair (bit 1, bit 0) leave `data_gen`           | 13 – 16      |
| that symbol enters the filter (`sym_ce` of cycle 24)       | 24           |
| its phase-0 sample on `out_i`/`out_q`; `out_valid` rises   | 31           |
| after that                                                 | one sample per clock, a new symbol every 4 clocks, a new packet every 800 clocks |

`out_sym_start` marks the phase-0 sample of every symbol period. A receiver can
use it to choose its decimation phase. With the 41-tap filter on both sides,
symbol j peaks 40 samples after its phase-0 sample at the transmitter output
once the receive filter is applied. `out_valid` and `out_sym_start` are not in
the reference; they were added here.

## Parameters

| module        | parameter  | default | meaning |
|---------------|------------|---------|---------|
| `qpsk_tx_top`, `data_gen`, `data_source` | `NUM_MSG` | 4 | packets stored in the data table (table depth = next power of two of 174·NUM_MSG) |
| `qpsk_tx_top` | `OUT_PIPE` | 4 | output pipeline stages (Pipeline Register 3 in the reference, z^-4) |
| `packetizer_fsm` | `PRE_LEN`, `DAT_LEN` | 26, 174 | packet sections |

The packet sizes, the filter taps and the word formats are constants in
`qpsk_tx_pkg`. If you change `NTAPS` or the taps, the comments in
`rrc_interp_filter` give the polyphase relation to keep.

## Departures from the reference and limits

* **Clocking.** The reference is a multirate model. Here it runs in one clock
  with clock enables (see above). Register counts per stage follow the
  reference's block diagram. The absolute cycle numbers in the timing table
  are this design's.
* **Conflicting count.** The reference text gives the data section once as 174
  bits and once as "147 cycles". 174 is used here because it agrees with the
  stated packet composition.
* **Chosen details.** The data contents, filter roll-off and span, word
  formats and reset behaviour are not specified by the reference. They are
  chosen here as described in the sections above.
* **Not included.** The receive-side RRC filter, the constellation and EVM
  measurement, and the FPGA board with its ADC/DAC belong to the reference's
  test setup, not to the transmitter. The end-to-end testbench models the
  receive filter in real arithmetic.
* **Resources.** The reference reports an implementation on a Virtex-5 at
  300 MHz with 6 DSP48 blocks. This RTL uses 22 parallel multipliers and about
  1,300 flip-flops. It has not been placed, routed or timed on an FPGA.
* **Constant output bit.** Bit 0 of the mapper's I and Q outputs is always 0,
  because ±23170 is even. Synthesis removes it.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/qpsk_ref_pkg.sv`, a reference model written separately from the RTL.
It rebuilds the packet stream from a text string and its own scrambler loop,
and it computes the RRC taps from the closed-form formula in real arithmetic.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_packetizer_fsm`    | address/`load_data` sequence over 3 packets with a random enable; outputs hold while the enable is low |
| `tb_data_scrambler`    | 2000 random bits against the bit-history model; descrambling returns the data |
| `tb_data_source`       | 6 packets bit-exact (crossing the table wrap), two-bit-period latency |
| `tb_bit_pairing`       | random stream, pair order and two-symbol latency |
| `tb_symbol_mapper`     | all four points, Gray property, valid pass-through |
| `tb_rrc_interp_filter` | taps within 1 LSB of the closed form; 300 random full-scale symbols bit-exact against a zero-stuffed direct convolution; latency c+3+p |
| `tb_data_gen`          | 500 symbols bit-exact; valid after exactly 4 symbol periods |
| `tb_qpsk_tx_top`       | whole transmitter at default parameters: 5 packets, 2000 samples bit-exact from cycle 0; `out_valid`/`out_sym_start` timing; the data-table wrap seen inside the design; zero output before valid; all four phases; EVM after a matched receive filter below 2 % (measured 0.65 %) |

To run one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/qpsk_tx_pkg.sv tb/qpsk_ref_pkg.sv tb/tb_qpsk_tx_top.sv --top-module tb_qpsk_tx_top
./obj_dir/Vtb_qpsk_tx_top
```

Each testbench finishes in well under a second.

## Files

| file | content |
|------|---------|
| `rtl/qpsk_tx_pkg.sv` | packet sizes, I/Q struct type, table contents, RRC taps |
| `rtl/qpsk_timing.sv` | bit/symbol clock enables |
| `rtl/packetizer_fsm.sv` | packet framing FSM |
| `rtl/data_scrambler.sv` | 1 + z^-1 + z^-2 + z^-4 scrambler |
| `rtl/data_source.sv` | preamble and data tables, scrambler, preamble/data multiplexer |
| `rtl/bit_pairing.sv` | serial to 2-bit symbols |
| `rtl/data_gen.sv` | FSM, data source, bit pairing, valid path |
| `rtl/symbol_mapper.sv` | QPSK mapping |
| `rtl/rrc_interp_filter.sv` | polyphase x4 RRC interpolator |
| `rtl/qpsk_tx_top.sv` | complete transmitter |
| `tb/qpsk_ref_pkg.sv` | reference model for the testbenches |
| `tb/tb_*.sv` | testbenches |
