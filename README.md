# 2x2 MIMO-OFDM mobile WiMAX transmitter (IEEE 802.16e, 20 MHz PUSC downlink)

This RTL is the baseband of a real-time transmitter for mobile WiMAX with two antennas.
A PN15 bit stream is turned into QPSK symbols and spread over the data carriers of
2048-point OFDM symbols with the downlink PUSC permutation. It is space-time coded with the
Alamouti scheme ("matrix A") and transformed by an inverse FFT. A cyclic prefix is added and
the result is sent out as frames: a preamble symbol, then 46 data symbols, then a silence as
long as the frame. Each of the four real streams (I and Q of two antennas) is interpolated
by two and delivered as 14-bit words for an external dual DAC.

There is no channel coding, and only QPSK and the PUSC permutation are built. The frame is a
single fixed burst, with no FCH or DL-MAP.

The design is fully pipelined and driven from a single bit source, which produces one bit
per baseband clock. Most of the work is reordering: subcarriers are permuted, grouped,
inverted and moved around. So the chain is a row of **memory stages**. Each stage writes one
symbol (or one pair of symbols) into one bank of a two-bank RAM while the previous one is
read out of the other bank. The reordering is done by the address used on one of the two
sides.

## Signal chain

All stages run on `clk_bb` (22.4 MHz), except the interpolation filters, which run on
`clk_dac` (44.8 MHz).

| Stage | Module | What happens |
|---|---|---|
| Bit source | `prbs_pn15` + control in `wimax_mimo_tx` | PN15 (x^15+x^14+1), one bit per clock, in bursts of one symbol pair (5760 bits); restarted every 23 pairs, so every frame carries the same 132480 bits |
| Mapping | `qpsk_mapper` | two bits give one QPSK point; the first bit sets I, the second sets Q; 0 gives +16384, 1 gives -16384 |
| Subchannelization | `subchannelization` | the stream alternates between the two symbols of a pair in groups of 24: stream symbol n goes to symbol (n/24) mod 2, data carrier (n/48)*24 + n mod 24 |
| Space-time coding | `stbc_encoder` | per carrier: antenna 0 sends (S0, -S1*), antenna 1 sends (S1, S0*) over the two symbols of the pair |
| Permutation | `pusc_permutation`, `pusc_perm_index` | each symbol is stored at the carrier given by the PUSC formula (below) |
| Clusters | `cluster_renumbering` | logical clusters of 12 data carriers are read in physical order through the renumbering table |
| Pilots, DC, guards | `pilot_insertion` | the 2048 carriers are read in iFFT order; pilots, the DC null and the guard nulls are inserted on the fly |
| Randomization | `subcarrier_weighting` | used carriers whose x^11+x^9+1 sequence bit is 1 are negated |
| iFFT | `ifft_r2sdf`, `r2sdf_stage` | 11-stage radix-2 single-delay-feedback pipeline, one sample per clock, output in bit-reversed order |
| Cyclic prefix | `cp_insertion` | undoes the bit reversal on write; reads samples 1792..2047, then 0..2047 |
| Output FIFO | `tx_fifo` | 32768 words per antenna |
| Framing | `frame_controller`, `preamble_ram` | silence, preamble, then 46 symbols popped from both FIFOs in lock step |
| Interpolation | `interp_fir_x2` (four instances) | x2 interpolation with a 76-tap filter on the 44.8 MHz clock; 14-bit output |

Shared types and constants are in `wimax_pkg`:
- `cplx_t` is a 16-bit re/im pair.
- `cpair_t` holds the two symbols of a pair.
- The package also holds the OFDM numbers and small helpers: saturating negation, conjugate, 11-bit bit reversal.

## The numbers

| Quantity | Value | Notes |
|---|---|---|
| FFT size | 2048 | 20 MHz channel |
| Data carriers | 1440 per symbol | 60 subchannels x 24; 2880 bits per symbol |
| Clusters | 120 of 14 carriers | 12 data + 2 pilots |
| Used carriers | 1681 | logical positions 184..1864 including DC at 1024; guards 184 left, 183 right |
| Cyclic prefix | 256 samples | symbol = 2304 samples |
| Frame | 1 preamble + 46 data symbols | 108288 samples; the silence has the same length |
| Bits per frame | 132480 | 23 symbol pairs |
| Sample widths | 16-bit I and Q through the chain; 14-bit DAC words | |

## Memory stages and the burst handshake

This is the part that needs the most care when changing the design.

`adaptive_memory_block` is two banks of `DEPTH` words with a full flag per bank:
- The writer fills the free bank and marks it full with `wr_last`.
- The reader empties the full bank and frees it with `rd_last`.
- Read data is registered, so it is valid one clock after `rd_en`.
- `wr_ready` means the bank the writer would use next is free. `rd_avail` means the bank the reader would use next is full.
- Two assertions catch protocol errors: a write into a full bank, and a read from an empty one.

Each stage puts a small controller around this block. The controller produces the address on
the reordering side and counts linearly on the other side.

Handing data from one stage to the next is **burst-level**:
- A stage starts a read burst (a whole symbol, or a whole pair) only when it has a full bank
  and the next stage shows `in_ready`.
- After that, the burst runs to the end without looking at `in_ready` again.
- Because the next stage's ready flag lags behind the words still in flight, every stage waits
  4 clocks after each burst before it samples ready again. The bit source waits 3 clocks.
- Without this cool-down, a stage could start a second burst into a bank that is about to be
  marked full.

Back-pressure therefore travels upstream one burst at a time:
1. When the FIFO is full, the CP stage waits.
2. Then the iFFT runs out of credits and the pilot stage waits.
3. The stall passes up through the other stages until the bit source stops.

The top reports this on `src_stall` and `fifo_stall`.

## Rate budget

The source makes one bit per clock, so one symbol takes 2880 clocks to produce. The output
consumes one sample per clock, so a symbol leaves in 2304 clocks. The chain is therefore
slower than the air interface during a frame. It catches up because every frame is followed
by a silence of the same length.

- Over a whole frame the output gets ahead of production by 46 x 576 = 26496 samples.
- That shortfall is covered by what is buffered when the frame starts:
  - 14 symbols in each 32768-word FIFO;
  - about 19 more in the stage banks.
- The end-to-end test runs two complete frames at the default sizes and sees no underrun.
- If the FIFO is ever empty during the data part, the frame controller sends a zero sample
  and counts it in `underruns`.

## iFFT flow control

The R2SDF pipeline only moves when it is fed. Flow control works like this:
- **Windows.** The pipeline works in windows of 2048 advances, aligned to input symbols.
- **Taking a symbol.** At a window start it takes a new symbol if one is offered and a credit
  is left. The upstream must then deliver the whole symbol without a gap.
- **Latency.** It is 2058 advances (2047 + one register per stage). A symbol's samples are
  therefore only fully out 10 samples into the window after the next one.
- **Credits.** They count symbols taken and not yet released by the CP stage (`credit_ret`,
  driven by the CP stage's `buf_free`). The CP stage has two banks, so three outstanding
  symbols can never block an output sample; `CREDITS = 3`.
- **Flush.** The last symbol before a pause stays inside until more input arrives. When the
  CP stage has read everything it holds but samples are still inside, the iFFT waits
  `FLUSH_WAIT` (16) clocks and then runs a window of zeros to push them out. Every sample
  carries a "real" flag, so flush zeros are never delivered.
- **Committed symbols.** `in_ready` falls a few clocks before a flush can start. A symbol the
  upstream has already committed to is therefore never shut out.

Each butterfly stage has these properties:
- Fixed twiddle tables, generated at elaboration from `$cos`/`$sin` with 15 fractional bits.
- A halving with round-half-to-even, so the 1/2048 scaling adds no DC bias.
- An output register.

`tb_ifft_r2sdf` checks the transform against a floating-point DFT and checks the latency.

## Carrier mapping details

**Permutation.** The carrier address is computed combinationally by `pusc_perm_index`.
- Data index `j*24 + k` (subchannel j, position k) goes to `MG_base + N*n_k + permbase[(s + n_k) mod N]`, where `n_k = (k + 13*s) mod 24`.
- s is the subchannel number inside its major group.
- N is 12 for even major groups and 8 for odd ones.
- The groups hold 12, 8, 12, 8, 12 and 8 subchannels, starting at data carriers 0, 288, 480, 768, 960 and 1248.
- permbase is {6,9,4,8,10,11,5,2,7,3,1,0} for N = 12 and {7,4,0,2,1,5,3,6} for N = 8.
- The cell ID is taken as 0.

**Clusters.** Physical cluster P takes the data of logical cluster `RENUM[P]` (a 120-entry
table in `cluster_renumbering`).

**Pilots.** In every 14-carrier cluster the pilots sit at offsets 4 and 8 in the even symbol
of a pair, and at offsets 0 and 12 in the odd symbol. They carry +30893, which is 4/3 of the
QPSK point's magnitude, on the real axis. The pilot stage reads positions in iFFT order,
logical carrier `f xor 1024`, so DC lands at iFFT input 0.

**Randomization.** The weighting mask comes from x^11+x^9+1 with all-ones seed, stepped once
per carrier from 184 to 1864. It is computed at elaboration.

## Frame timing

`frame_controller` produces one sample per clock on both antennas, repeating this pattern:
1. `SILENCE_LEN` = 108288 zero samples.
2. The 2304-sample preamble from `preamble_ram`.
3. 46 x 2304 samples popped from both FIFOs in lock step.

`frame_start` pulses with the first preamble sample at the output. The preamble is computed
off-line and written by the host through `pre_we`, `pre_ant`, `pre_addr` and `pre_data`. The
RAMs have no initial contents.

## Interpolation and the second clock

There is one `interp_fir_x2` per real stream: four in all. Each is a 76-tap symmetric
low-pass filter:
- Kaiser window, beta 7.857 (80 dB), cut-off at a quarter of the 44.8 MHz rate.
- Coefficients with 16 fractional bits, computed at elaboration.
- It is built as a direct two-phase multiply-accumulate.
- The sum is shifted to a 28-bit result (`dout_full`). Bits 25..12 of that result are
  saturated to the 14-bit DAC word, which leaves 2 bits of head-room below full scale.

`clk_dac` must be exactly twice `clk_bb` and edge-aligned with it.
- On the `clk_bb` side, a toggle flag changes with every new baseband sample.
- On the `clk_dac` side, a change of the flag becomes the filter's `in_valid`.
- Each baseband word is stable for two `clk_dac` cycles, so no FIFO is needed.

## Own choices and departures

The following are not fixed by the description this design was built from. They were taken
from the IEEE 802.16e standard or chosen here:
- the PN15 polynomial and seed;
- the pilot offsets and value;
- the permbase tables;
- the renumbering table;
- the 256-sample prefix;
- the randomizer polynomial.

The following are own choices, mainly of architecture and widths:
- the QPSK amplitude;
- the iFFT architecture, scaling and flow control;
- the FIFO depth;
- every handshake.

The interpolation filter is a plain multiply-accumulate. The original implementation used a
distributed-arithmetic FIR core.

Outside the RTL are the DAC5687 dual DACs (with their x8 interpolation and mixers to the
67.2 MHz IF), the programmable gain amplifiers and the RF up-conversion. `dac_i` and `dac_q`
are the ports where they connect.

With its default sizes, the top synthesizes (yosys, coarse) to about 4.17 Mbit of memory and
about 2000 flip-flop bits outside the memories. Most of the memory is in the two output
FIFOs.

## Verification

Every module has a self-checking testbench in `tb/` that computes its expected values
independently. Each testbench ends with a line `TB_RESULT checks=N failures=M`.

`tb_wimax_mimo_tx` runs the complete transmitter at its default sizes for two full frames:
- about 435,000 baseband clocks;
- under a minute with verilator.

It holds its own floating-point model of the whole carrier mapping, from PN15 to randomization.

For every data symbol of both frames and both antennas it checks:
- that the prefix repeats the symbol's end;
- a DFT of the symbol body against the expected carriers: all 2048 carriers for the first
  symbol pair, 32 random ones otherwise, within 2 % of the QPSK amplitude.

It also checks:
- that every bit-source burst is one symbol pair on consecutive clocks (one bit per clock);
- the silence lengths;
- the preamble;
- the DAC streams against a second model of the filter.

It fails if any of these never happened:
- a source stall;
- a FIFO-full stall;
- an iFFT flush.

It also fails on any underrun.

To build and run a testbench with plain verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/wimax_pkg.sv tb/tb_wimax_mimo_tx.sv
    ./obj_dir/Vtb_wimax_mimo_tx

Replace the last file with any other `tb/tb_<module>.sv` to test a single block. The modules
are found through `-y`, one module per file.
