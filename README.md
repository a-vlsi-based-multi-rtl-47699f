# Multi-level lossless ECG compressor

A wearable ECG node spends most of its energy on the radio, so fewer bits sent
means longer battery life. This compressor shrinks an 11-bit ECG sample stream
without loss, using only adders, shifters, comparators and counters. It works
in two levels:

1. **Adaptive Golomb-Rice coding of the first difference.** The difference
   D(n) = x(n) - x(n-1) of an ECG sits near zero, except around the P wave, the
   QRS complex and the T wave. The samples are grouped into packets of 8. For
   each packet the mean of |D| is compared with three thresholds, and this
   picks a divisor of 8, 16 or 32 (or none). Each D is split into a quotient
   and a remainder by that power of two and sent as a Golomb-Rice codeword.
   Repeated codewords inside a packet are run-length coded.
2. **Bitmask dictionary coding.** The resulting bitstream is cut into 8-bit
   words. A word that equals one of four dictionary entries, or differs from
   one only inside a 2-bit field, is replaced by a short reference. This level
   can be bypassed.

The datapath of level 1 follows a published architecture: two ping-pong
buffers, a shift register and subtractor for the derivative, an
absolute-value unit, an accumulator with a terminal counter, a mean shifter, a
threshold comparator, and a conditional shifter with a "constant 1"
subtractor and a mask. That architecture does not specify the bitstream
format, the run-length and dictionary details, the handshakes or the
sequencing. Those are this design's own, and they are documented below. They
are fixed in the RTL and the reference model and tested end to end.

## Block chain

```
sample ─► ping-pong buffer 1 ─► packet_processor ─► ping-pong buffer 2 ─► rle_golomb_packager ─► bitmask_dict ─► out_bit
 (11 b)   2 banks x 8 x 11 b    SR1/Sub, Abs,       2 banks x 8 x        header, Golomb-Rice,    8-bit words,
                                ACC/TC/Reg1,        {code,Q,R}           runs; 1 bit/cycle       4-entry dictionary,
                                Shifter 1, Comp,                                                 or bypass
                                conditional shifter
```

| module | role |
|---|---|
| `ecg_pkg` | widths, `div_code_e`, the buffer-2 entry struct `qr_t`, `zigzag()`, `code_to_k()` |
| `pingpong_buffer` | two banks of `DEPTH` words. The writer fills one bank while the reader holds the other |
| `sample_diff` | SR1 (previous sample) and subtractor: D(n) |
| `abs_unit` | two's-complement magnitude |
| `packet_mean` | ACC with Reg 1 and the terminal counter. It gives floor(sum of 8 / 8) |
| `threshold_comp` | mean vs th1/th2/th3, giving {C1,C0} |
| `cond_shifter` | divisor = 2 << (k-1), mask = divisor-1, R = D & mask, Q = D >>> k |
| `packet_processor` | sequences one packet from buffer 1 into buffer 2 |
| `rle_golomb_packager` | serialises a packet: header, codewords, run marks |
| `bitmask_dict` | second level; dictionary loadable at run time |
| `ecg_compressor_top` | the chain above |

## Divisor selection

| packet mean M of \|D\| | {C1,C0} | divisor | k | remainder bits |
|---|---|---|---|---|
| M < th1 | 01 | 8 | 3 | 3 |
| th1 ≤ M < th2 | 10 | 16 | 4 | 4 |
| th2 ≤ M < th3 | 11 | 32 | 5 | 5 |
| M ≥ th3 | 00 | 1 (no shift) | 0 | 0 |

The thresholds are inputs and must satisfy th1 < th2 < th3. The original
description leaves their values open: they come from the largest |D| expected
in the low-, medium- and high-amplitude parts of the signal. The tests use
th1 = 2, th2 = 5, th3 = 100, which makes every code occur on the synthetic
signal. Code 00 means "no shift". It is the case for a packet whose mean
reaches the top threshold. With k = 0 a codeword would grow with |D|, so the
escape described below bounds it.

The shift is arithmetic, so Q = floor(D / 2^k) and D = Q·2^k + R also holds
for negative D.

## Sequencing of a packet (packet_processor)

The divisor of a packet depends on the mean of *that* packet. So each packet
is read from buffer 1 twice:

| state | cycles | work |
|---|---|---|
| IDLE | 1 | wait for a full bank; reload SR1 with the last sample of the previous packet |
| MEAN | 8 | D, \|D\|, accumulate; the mean is registered after the 8th add |
| CMP | 1 | mean vs thresholds → code; reload SR1 again |
| DIV | 8 | D again, split into Q and R, write {code, Q, R} to buffer 2 |
| DONE | 1 | release the buffer-1 bank |

One packet takes **19 cycles**. The DIV state waits (the `stall` output) while
both banks of buffer 2 are full. SR1 starts at 0 after reset, so the first D
of a stream is the first sample itself.

## Level-1 bitstream (rle_golomb_packager)

All fields are sent MSB first, one bit per cycle on a valid/ready serial
port. For each packet:

```
header   : {C1,C0}                                    2 bits
then, for each maximal run of L equal symbols (same D) in the packet:
  L = 1  : CW
  L >= 2 : CW CW n      n = L-2, 3 bits (runs never cross a packet)
```

A symbol that appears twice in a row marks a run, and the count that follows
says how many more copies there are. This is the run-length form in which the
repeated character itself is the escape. It costs nothing for lone symbols.

A codeword CW for a symbol (Q, R), with u = zigzag(Q) (0, -1, 1, -2, … → 0, 1,
2, 3, …):

```
u < 16  : u ones, one 0, then R in k bits                 (u + 1 + k bits)
u >= 16 : 16 ones, then D as 12-bit two's complement     (28 bits, escape)
```

**Decoding.** Read the 2-bit header to get k. Then repeat until 8 samples are
out: decode a codeword. If it equals the previous codeword and that one did
not close a run, read 3 more bits n and output n+1 further copies. Otherwise
output one. Each output D adds to the running sample value, which starts at
0. `tb/ecg_ref_pkg.sv` holds an encoder and a decoder written independently
of the RTL.

## Level-2 code (bitmask_dict)

The level-1 bits are grouped into 8-bit words (first bit = MSB). Each word
becomes:

| case | code | bits |
|---|---|---|
| equals entry i | `0 0 i[1:0]` | 4 |
| equals entry i XOR (m << 2p), m ≠ 0 | `0 1 p[1:0] m[1:0] i[1:0]` | 8 |
| otherwise | `1 word[7:0]` | 9 |

An exact match beats a bitmask match, and the lowest index wins. The
dictionary resets to {00, 08, 80, FF} (entries 0..3). It can be rewritten
through `dict_we/dict_addr/dict_data`. Choosing good entries is up to the
host. The tests load the four most frequent words of the level-1 stream.
`flush` pads a last partial word with zeros and codes it. `dic_en` is sampled
only between words. When it is low, the stage is a wire: bits and ready pass
straight through.

While a word is collected (8 input bits) and coded (1 cycle plus up to 9
output bits), the input is held off. This level therefore takes about 2
cycles per level-1 bit.

## Top-level interface (ecg_compressor_top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `sample`, `sample_valid` | in | 11, 1 | one ECG sample per valid cycle |
| `sample_ready` | out | 1 | low only when both banks of buffer 1 are full |
| `overflow` | out | 1 | pulse: a sample was offered while not ready and is lost |
| `th1`, `th2`, `th3` | in | 11 | thresholds on the packet mean |
| `dic_en`, `flush` | in | 1 | dictionary level on; flush partial word |
| `dict_we`, `dict_addr`, `dict_data` | in | 1, 2, 8 | dictionary write port |
| `out_bit`, `out_valid`, `out_ready` | out/out/in | 1 | compressed serial stream |
| `code`, `mean`, `stall`, `pp1_bank`, `pp2_bank`, `run_evt`, `esc_evt`, `hit_evt`, `mask_evt`, `miss_evt`, `dic_mode` | out | | observation |

**Throughput.** MIT-BIH-style signals come at 360 samples/s. Even at a few
MHz, the compressor is idle nearly all the time. In simulation, one sample
every 32 cycles kept up with both levels on. At one sample every 8 cycles, the
dictionary level fell behind and samples overflowed. The level-1 path alone is
bounded by 19 cycles per 8 samples, plus the output bits.

## Measured on a synthetic ECG

The synthetic signal has 11-bit samples around mid-scale, one beat every 90
samples, small noise, and flat stretches. Thresholds are 2/5/100. For one
minute of signal (21,600 samples):

| output | bits | ratio (11·N / bits) |
|---|---|---|
| level 1 only | 106,879 | 2.22 |
| level 1 + dictionary | 102,872 | 2.31 |

These figures come from the test signal, not from a clinical record, and
depend on the thresholds and the dictionary.

## Where this design departs from, or adds to, the original description

- The bit formats of both levels, the zigzag mapping, the escape, the run
  field and the dictionary, word and mask sizes are all this design's own.
- Run-length coding sits inside the Golomb stage, over codewords of a packet.
  The original chain names only derivative, mean, Golomb coding and dictionary
  compression. Run-length coding is mentioned as part of the scheme without a
  place in it.
- The "no shift" code 00 is read as k = 0 for packets whose mean reaches th3.
- The packet is read twice from buffer 1; the original gives no sequencing.
- The dictionary is loaded from outside. No hardware picks its entries.
- The original reports an FPGA implementation at 36 MHz. No timing target is
  built into this RTL.
- The test-data source, which replays MIT-BIH records, is not included. The
  testbenches generate their own signal.

## Simulation

Each `tb/tb_<module>.sv` is a self-checking testbench. It ends with
`TB_RESULT checks=N failures=M` and has a watchdog. The end-to-end tests import
`tb/ecg_ref_pkg.sv`, the reference encoder and decoder. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ecg_pkg.sv tb/ecg_ref_pkg.sv rtl/*.sv tb/tb_ecg_compressor_top.sv \
    --top-module tb_ecg_compressor_top -o sim
./obj_dir/sim
```

- `tb_ecg_compressor_top` runs 720 samples at default sizes, with random and
  long output back-pressure, dictionary off and then on. It compares the
  stream bit for bit with the reference, decodes it back to the samples, and
  requires every mechanism to occur: bank swaps, all four codes, processor
  stalls, runs, escapes, all three dictionary outcomes, bypass, mode switch
  and back-pressure.
- `tb_workload_1min` runs one minute of signal through both levels and
  prints the ratios above.
- `tb_packet_processor` checks the 19-cycle packet time, the mean, the code
  and every (Q,R).
- The unit testbenches check `abs_unit` and `cond_shifter` exhaustively over
  all D. The others use random stimulus.
