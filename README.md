# FFT-1920: a non-power-of-two FFT by the Prime Factor Algorithm

Digital Radio Mondiale (DRM) receivers demodulate COFDM symbols with FFTs
whose lengths are not powers of two. The largest of them has 1920 points. This
RTL computes that 1920-point forward DFT on 16-bit complex samples and gives
24-bit results. It does not use a power-of-two FFT with padding. It splits the
transform into two co-prime factors, 1920 = 128 x 15, with the Prime Factor
Algorithm (PFA):

- 128 small 15-point DFTs, one per row of a 128 x 15 array;
- then 15 128-point FFTs, one per column;
- and **no twiddle multiplications between the two passes**.

The two passes are connected by a real RAM and an imaginary RAM. A write
address counter fills them in plain sequential order. A read address FIFO
holds the order in which the second pass must read them. The FIFO is loaded
once and then recirculates.

The structure follows the data flow of the paper *Implementing Non
Power-of-Two FFTs on Coarse-Grain Reconfigurable Architectures*. That paper
mapped the flow onto two reconfigurable processors (PACT's XPP and the
Montium tile). Here the flow is written as a dedicated, synthesizable
datapath. The reconfigurable fabrics themselves are not part of this RTL.

```
 in_re/in_im ──► FFT-15 ──► real RAM ─────┐
 (PFA order)      engine     imag RAM ─────┼──► FFT-128 ──► out_re/out_im, out_index
                    │          ▲    ▲      │     engine
                    └─────► write   read address FIFO ◄─┐  (pops are written back:
                           address       │               │   the sequence repeats)
                           counter       └───────────────┘
```

## The index maps: where the reordering happens

This is the part that needs the most care. With N1 = 128 and N2 = 15 (which
are co-prime), the design uses two index maps:

| map | formula |
|---|---|
| input, Good's map | n = (15·n1 + 128·n2) mod 1920,  n1 = 0..127, n2 = 0..14 |
| output, CRT map | k = (1665·k1 + 256·k2) mod 1920,  k1 = 0..127, k2 = 0..14 |

Here 1665 = 15·(15⁻¹ mod 128) = 15·111 and 256 = 128·(128⁻¹ mod 15) = 128·2.
With these maps, X(k) is the 128-point DFT over n1 of the 15-point DFTs over n2.
No twiddle factors are needed between the passes.

The reordering happens in four places:

1. **Input.** The design expects the frame already in PFA order. Sample number
   15·n1 + n2 of the stream must carry x((15·n1 + 128·n2) mod 1920). Each group
   of 15 consecutive samples is then the input of one FFT-15. Whatever feeds
   the design (a DMA, a host) must do this permutation. The testbenches show
   how.
2. **RAM write.** FFT-15 number n1 writes its result k2 to address
   15·n1 + k2. The write address counter just counts 0..1919.
3. **RAM read.** FFT-128 number k2 needs column k2: addresses 15·n1 + k2 for
   n1 = 0..127. The FIFO holds this sequence for k2 = 0..14, 1920 addresses
   in all. After reset, `read_seq_init` fills it in 1920 cycles
   (`init_done` goes high). After that every popped address is pushed back,
   so the FIFO never needs refilling.
4. **Output.** Results leave column by column, bin k1 = 0..127 within each
   column. They are *not* put back into natural order. Instead every result
   carries its frequency index on `out_index`. Inside a column the index steps
   by 1665 mod 1920; from one column to the next its start steps by 256 mod
   1920. Two small modular adders do this. Each index 0..1919 appears exactly
   once per frame, and `out_last` marks the 1920th result.

## Sequencing of a frame

`fft1920_top` runs in three phases:

- **INIT.** The FIFO is filled after reset. `in_ready` stays low.
- **FFT-15 pass.** 1920 input samples are taken, and the engine's results are
  written to the RAMs as they appear. The phase ends with the 1920th RAM write.
- **FFT-128 pass.** For each of the 15 columns, 128 addresses are popped and
  the RAMs are read. The RAM read has one cycle of latency; the data goes
  straight into the FFT-128 engine's input. Once the engine has taken its 128
  words, the next column waits until the engine is ready again. With the
  default engine this is as soon as the previous column has moved from its
  input bank into its working memory, so the reads of a column overlap the
  butterflies of the one before.

After the 15th column has been read, the RAMs are free. The next frame's
FFT-15 pass then starts while the last FFT-128 is still computing and
draining. No other overlap exists: a single RAM pair holds one frame.
Assertions check that no FFT-15 result is written during the FFT-128 pass
and that the FIFO stays full.

Cycle counts, measured and checked by the end-to-end testbenches (no stalls,
first input to last output of a frame):

| engines | FFT-15 pass | FFT-128 pass | frame |
|---|---|---|---|
| pairwise FFT-15 + radix-2 FFT-128 (default) | 15 + 128·49 + 14 | 130 + 15·449 + 128 | **13 294** |
| PFA FFT-15 + radix-4 based FFT-128 | 128·23 + 14 | 15·417 | **9 213** |

With the default engines both passes are limited by computation. The FFT-15
engine computes back to back (49 cycles each), and the FFT-128 engine takes a
column every 449 cycles (448 butterflies and one copy cycle). The reads of the
first column and the outputs of the last one add 130 and 128 cycles. The
alternative engines have single banks, so each block there is loaded,
computed and drained one step after another.

For comparison, the published mappings needed 14 033 cycles (Montium) and
13 248 cycles (XPP) per FFT-1920. The default engines follow the Montium
schedules (49 cycles per FFT-15, one radix-2 butterfly per cycle) and come
out close to both figures.

## The 15-point engines

### `fft15`: pairwise DFT (default)

For odd N, cos(2πnk/N) is even in n and sin(2πnk/N) is odd in n. With
s_n = x(n) + x(15−n) and d_n = x(n) − x(15−n), n = 1..7:

```
X(k)    = x(0) + Σ s_n cos(2πnk/15) − j Σ d_n sin(2πnk/15)
X(15−k) = x(0) + Σ s_n cos(2πnk/15) + j Σ d_n sin(2πnk/15)      k = 1..7
X(0)    = x(0) + Σ s_n
```

The two outputs of a pair share the same four real sums: Re s·cos, Im s·cos,
Im d·sin and Re d·sin. The engine has four multiply-accumulate lanes that
handle one n per cycle, so a pair takes 7 cycles and the seven pairs take 49
cycles. A fifth adder lane adds up X(0) during the first pair. This is the
schedule described for the Montium mapping. It needs about a quarter of the
multiplications of a plain 15-point DFT.

Timing: 15 input cycles, then 49 compute cycles. The first result comes 50
cycles after the last input. There are two input banks and two output banks.
The next block loads and the previous one drains in natural order while a
block is computed. With input fast enough, one block is computed every 49
cycles.

The sum-of-differences term carries a factor −j. Without it the pair
formulas would not equal the DFT for complex inputs. The testbench checks the
engine against a floating-point DFT.

### `fft15_pfa`: five FFT-3 and three FFT-5

This is the alternative used in the XPP mapping. The PFA is applied once more,
with 15 = 3 × 5:

- input map x((5·n1 + 3·n2) mod 15);
- output map k = (10·k1 + 6·k2) mod 15;
- five FFT-3 (one per cycle), then three FFT-5 (one per cycle).

Both small transforms use the symmetric forms. The FFT-3 needs one constant,
sin(2π/3). The FFT-5 needs four: −1.25, (cos u − cos 2u)/2, sin u and sin 2u,
with u = 2π/5. The FFT-3 results keep two extra fraction bits, and each
result is rounded once. The ports are the same as `fft15`. Timing: 8 compute
cycles, first result 9 cycles after the last input, one block every 23 cycles.

## The 128-point engines

### `fft128`: radix-2 (default)

This is a decimation-in-time engine. The input is written at bit-reversed
addresses of a 128-word register array. Then 7 stages of 64 butterflies run,
one butterfly per cycle: 448 cycles. The array has two read and two write
ports, so each butterfly reads, multiplies, adds and writes back in one cycle.
The input is loaded into a separate input bank, and the results go to a
separate output bank. Each of these moves takes one cycle of whole-array
copying, so loading and draining overlap the butterflies. The first result
comes 451 cycles after the last input, and one transform is taken every 449
cycles.
In stage st, butterfly b uses these words and twiddle:

| | value |
|---|---|
| top word | (b >> st)·2^(st+1) + (b mod 2^st) |
| bottom word | top + 2^st |
| twiddle | W128^((b mod 2^st)·2^(6−st)) |

The length is a parameter (`LOG2N`). The results leave in natural order.

### `fft128_r4`: two radix-4 FFT-64 and 64 FFT-2

This is the alternative used in the XPP mapping, with the same ports:

- The even samples go to words 0..63 and the odd samples to words 64..127,
  each half at base-4 digit-reversed addresses.
- Each half gets a 3-stage radix-4 FFT-64: 2 × 3 × 16 butterflies, one per
  cycle.
- A final pass combines word k and word 64+k with W128^k. X(k) goes to word k
  and X(k+64) to word 64+k.

That makes 160 compute cycles and one transform every 416 cycles.

## Fixed-point format

- Input: 16-bit signed (`IN_W`). Internal words, RAMs and output: 24-bit
  signed (`DATA_W`).
- Coefficients: 16-bit signed with 14 fraction bits, so ±1.0 is exact. They
  are computed at elaboration time from `$cos`/`$sin` in `fft_pkg`
  (`cos_q(m,n) = round(2^14·cos(2πm/n))`). The RTL holds no tables of numbers.
- The FFT-15 engines keep their full growth: at most 15× more than the input,
  which fits in 20 bits.
- The FFT-128 engines scale by 1/16 in total. `fft128` halves the outputs of
  its first four stages (`SCALE_STAGES`). `fft128_r4` quarters the outputs of
  its first two radix-4 stages. **The top's output is X(k)/16.** With 16-bit
  inputs no intermediate word can overflow 24 bits.
- Rounding is round-half-up (add half, then shift) after each twiddle
  multiply and each scaling step.

Accuracy measured against a double-precision DFT-1920 (output LSBs):

| input | peak output | max error, default engines | max error, alternative engines |
|---|---|---|---|
| full-scale random | ~2·10^5 | 11–12 | 8–9 |
| 20000-amplitude single tone | 2.4·10^6 | 43 | 30 |

## Interface of `fft1920_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous reset, active low |
| in_valid / in_ready | in / out | 1 | input handshake; a sample moves when both are high at a clock edge |
| in_re, in_im | in | 16 | signed input sample, in PFA order (see above) |
| out_valid / out_ready | out / in | 1 | output handshake |
| out_re, out_im | out | 24 | signed X(out_index)/16 |
| out_index | out | 11 | frequency index k of the result |
| out_last | out | 1 | last result of the frame |
| init_done | out | 1 | read address FIFO filled; input is accepted after this |

Parameters: `IN_W` (16) and `DATA_W` (24) set the widths. `FFT15_ALG`
(`FFT15_PAIRWISE` or `FFT15_PFA`) and `FFT128_ALG` (`FFT128_RADIX2` or
`FFT128_R4`) choose the engines. Both enums are in `fft_pkg`. The lengths
1920 = 128 × 15 are fixed by the engines.

All streams are valid/ready, and `out_ready` may be dropped at any time.
`in_ready` is low in these cases:

- during INIT;
- while the FFT-15 engine cannot take a sample: with the default engine,
  when both of its input banks are full; with `fft15_pfa`, while it computes;
- once 1920 samples of the frame have been taken, until the FFT-128 pass has
  read the whole frame out of the RAMs.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | sizes, formats, coefficient functions, index-map functions, engine enums |
| `rtl/fft1920_top.sv` | the flow, phase sequencing, output index generation |
| `rtl/fft15.sv`, `rtl/fft15_pfa.sv` | 15-point engines |
| `rtl/fft128.sv`, `rtl/fft128_r4.sv` | 128-point engines |
| `rtl/sample_ram.sv` | one intermediate RAM, 1920 × 24, registered read |
| `rtl/write_addr_counter.sv` | sequential write address |
| `rtl/read_addr_fifo.sv` | recirculating read address FIFO, 1920 × 11 |
| `rtl/read_seq_init.sv` | fills the FIFO after reset |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two end-to-end ones |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a cycle watchdog. Every result is compared with a
floating-point DFT computed inside the testbench. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fft_pkg.sv tb/tb_fft1920_top.sv --top-module tb_fft1920_top
./obj_dir/Vtb_fft1920_top
```

- `tb_fft1920_top` runs the design with all parameters at their defaults,
  through three frames: a tone, random data, and random data with random input
  gaps and output back-pressure. It takes under a second.
- `tb_fft1920_xpp` does the same with the alternative engines.
- Both also fail if any of these mechanisms never happened: input gaps,
  refused input, output back-pressure, reuse of the recirculated FIFO, and
  overlap of a new frame with the last FFT-128.
- The block testbenches also check the cycle counts given above.

Replace the top-level file with another block's testbench to run that block.

## Limits and departures

- The source is the paper's data-flow figure and its prose. The PFA maps, the
  sequencing, all widths except 16-bit in and 24-bit out, the scaling,
  rounding, handshakes and reset were filled in for this RTL.
- Input reordering into PFA order is left to the producer, as in the original
  flow, where the input arrived as streams. Output is tagged with its index,
  not reordered.
- Only the forward 1920-point transform is built. The receiver needs 18 FFT
  and IFFT sizes, but those sizes are not given.
- The default engines take 13 294 cycles per frame; see "Sequencing of a
  frame". The triple register banks of `fft128` cost area (3 × 128 complex
  words) that a RAM-based design would avoid.
- The reconfigurable platforms (the XPP array with its ALU and RAM elements,
  network and configuration manager; the Montium ALUs, memories, address
  generators, crossbar, decoders, sequencer and communication unit) are not
  modelled. Only the FFT computation mapped onto them is.
