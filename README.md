# 128-point FFT/IFFT for a multiband-OFDM UWB receiver and transmitter

An 802.15.3a multiband-OFDM UWB physical layer sends one 128-subcarrier OFDM
symbol every 242.42 ns: a 528 Msample/s stream. A one-sample-per-cycle FFT
would need a 528 MHz clock. This design instead takes **four complex samples
per cycle at 132 MHz** and finishes a whole 128-point transform every
**32 cycles**, with no idle cycles between symbols. The same hardware also
does the inverse transform: in IFFT mode only the output order changes.

The main points:

* 5-bit complex input, 8-bit complex output, 8-bit internal word length.
* A decimation-in-frequency transform: one radix-2 stage, then two radix-8
  passes (2 × 8 × 8 = 128).
* One 128-sample register set that every stage updates in place. Symbols
  still stream back to back.
* An optional reorder buffer (natural order, and IFFT mode) and an optional
  8-to-4 output buffer. Together they give four output configurations.
* Default configuration: 4 samples in, 4 samples out in natural order, and
  78 cycles from a symbol's first input beat to its first output beat.

## Algorithm

With `W_N = exp(-j2π/N)`, the 128-point DFT is split by one radix-2
decimation-in-frequency step:

    g(n) = x(n) + x(n+64)                  X(2k)   = DFT64{g}(k)
    h(n) = (x(n) - x(n+64)) · W128^n       X(2k+1) = DFT64{h}(k)

Each 64-point DFT is an 8 × 8 transform. Write `n = n1 + 8·n2` and
`k = 8·k2 + l`:

1. A radix-8 butterfly over `n2`, for each `n1`, gives `Y(l, n1)`.
2. `Y(l, n1)` is multiplied by `W64^(l·n1)`. Lane 0 needs no multiplier, so
   seven complex multipliers are used.
3. A radix-8 butterfly over `n1`, for each `l`, gives `X64(8·k2 + l)`.

**The radix-8 butterfly** (`radix8_bf`) is built radix-2³ style: three
layers of four radix-2 butterflies. The only non-trivial constants are the
`W8^1` and `W8^3` rotations, both of which need `√2/2`. That multiplier
(`w8_mult`) uses shifts and adds only: `√2/2 ≈ 45/64 = 1/2 + 1/8 + 1/16 + 1/64`.
The butterfly has three pipeline registers:

* after the first layer;
* inside the `√2/2` multiplier;
* at the output.

Latency is 3 cycles.

**General twiddles** use four-multiplier complex multipliers (`cmplx_mult`),
with 3 cycles of latency. `twiddle_rom` computes the 8-bit coefficients
(`1.0 = 64`) from a 33-entry quarter-wave cosine table,
`round(64·cos(2πk/128))` for k = 0..32, by symmetry.

## Datapath of the core (`fft128_core`)

A symbol enters as 32 beats of 4 samples. Beat `b` carries `x(4b..4b+3)`.

| Cycles (from first beat) | What happens |
|---|---|
| 0–15  | Beats 0..15 (samples 0..63) go into input buffer **B1**, a 16 × 40-bit single-port RAM. |
| 16–31 | Each new beat `x(n+64..)` is paired with `x(n..)` read back from B1. The radix-2 stage (4 butterflies, 4 multipliers, `radix2_stage`) writes 4 `g` and 4 `h` values per cycle into register set **B2**. |
| next 16 | First radix-8 pass. B2 is read 8 samples per cycle (one `n1` group). The results go through the 7 twiddle multipliers and are written back in place. |
| next 16 | Second radix-8 pass. B2 is read again, and the core outputs 8 samples per cycle. |

The core's output order is the decimation-in-frequency order: in output
cycle `t`, lane `k` carries `X(16k + 2(t mod 8) + t/8)`. So the even bins
come out in cycles 0..7 and the odd bins in cycles 8..15. The first output
appears 56 cycles after the first input beat.

B2 is made of flip-flops (`b2_regfile`) because it needs 8 reads and up to
16 writes in one cycle. A RAM cannot supply that.

### The in-place schedule and the rotating slot map

This is the least obvious part of the design. With symbols back to back,
three things use B2 in the same window:

* the **second** radix-8 pass of symbol `s` reads B2;
* the radix-2 stage of symbol `s+1` writes B2;
* the first radix-8 pass of symbol `s+1` will follow.

A single 128-entry store can only be shared this way if, in each cycle, the
slots the radix-2 stage writes are exactly the slots the second pass reads
in that cycle. A read sees the old value, so the slot is freed and refilled
in the same cycle.

The access patterns, as 7-bit logical addresses `{half, n}`:

* **Radix-2 stage**, cycle `c`: writes `{0, c, i}` and `{1, c, i}` for
  `i = 0..3`.
* **First pass**, group `c`: reads and writes `{c[3], p, c[2:0]}` for
  `p = 0..7`.
* **Second pass**, cycle `c`: reads `{c[3], c[2:0], p}` for `p = 0..7`.

Consider the top five bits of each address:

* the second pass reads fields `{c[3:0], p[2]}`;
* the radix-2 stage writes fields `{half, c[3:0]}`.

One is a one-bit rotation of the other. So each symbol stores logical
address `a` in a physical slot with a symbol-specific map:

    slot = { rotl^r(a[6:2]), a[1:0] },   r = symbol number mod 5

Each symbol uses the previous symbol's map rotated once more. A 5-bit field
returns to itself after five rotations, so there are five maps. The map
number travels down the pipeline with the data:

* the radix-2 stage carries it as a tag;
* the pass controller latches it when a symbol's last radix-2 group
  completes.

`b2_regfile` has an assertion that its two write groups never address the
same slot in one cycle. It holds for any mix of back-to-back and gapped
symbols.

The first pass writes back to the slots it read, 6 cycles later (3 cycles in
the butterfly, 3 in the multiplier). The second pass starts when the first
pass has read all 16 groups. By the time the second pass reaches a group,
its data has already been written back.

## Fixed-point scaling

Five requantisation points, each keeping 8-bit components. All round half
up and **saturate** instead of wrapping:

| Point | After                 | Value kept          |
|-------|-----------------------|---------------------|
| A     | radix-2 butterfly     | `x(n) ± x(n+64)`, LSB 1 |
| B     | W128 twiddle          | `h·W128^n`, LSB 1/2 (one fraction bit) |
| C     | first radix-8 pass    | sum / 2, LSB 1 |
| D     | W64 twiddle           | LSB 1 |
| E     | second radix-8 pass   | sum / 2, LSB 2 |

The output is therefore **X(k)/2** in 8 bits. Any clip raises the `sat`
output for a cycle.

Measured against an exact floating-point DFT:

| Input | SQNR |
|---|---|
| Random input up to about ±11 | about 31 dB |
| Uniformly random full-range 5-bit input (±16) | 24.6 dB |
| QPSK OFDM symbol through the IFFT | 31.4 dB (EVM −31.4 dB) |

With full-range input, about 1.6% of the outputs exceed ±127 and are
clipped, which causes the lower figure.

## Reorder buffer (`reorder_buffer`)

The reorder buffer turns the core's 16 × 8 output into natural order. It has
eight 16-word single-port RAMs. In core cycle `t`, lane `j` is written at
address `t` into:

* RAM `(j + t) mod 8` for `t < 8`;
* RAM `(j + 15 − t) mod 8` for `t ≥ 8`.

An input rotate multiplexer does this. With this pattern, any 8 consecutive
bins lie in 8 different RAMs, so the symbol can be read back in 16 cycles
with one address per RAM. An output rotate multiplexer then restores the
lane order. Latency is 19 cycles: 16 write cycles, the RAM read and the
input and output registers.

**IFFT mode.** Here output `n` must be `X((128 − n) mod 128)`. The buffer
reads the sets in reverse order and reverses the lanes. One sample per lane
group belongs to the set read in the previous cycle and comes from a holding
register. For the first read, `X(0)` is kept aside while the symbol is being
written. This makes the core's forward transform `128·IDFT` without touching
the core. The mode is set per symbol by the top-level `ifft` input.

**`SPLIT = 1` order.** When the output buffer follows, the reorder buffer
reads `{4m..4m+3}` on lanes 0..3 and `{64+4m..64+4m+3}` on lanes 4..7. The
interleaving also keeps these sets conflict-free. In this case `X(64)` is
also pre-buffered for IFFT mode.

## Output buffer (`output_buffer`)

The output buffer narrows the 8-lane burst (16 cycles) to 4 lanes
(32 cycles):

* lanes 0..3 go straight out during the burst;
* lanes 4..7 are stored in one 16 × 64-bit RAM and follow in the next
  16 cycles.

The output is therefore one continuous 32-cycle stream per symbol. Latency
is 3 cycles.

## Top level and configurations (`fft128_top`)

Ports:

* **Input side:** `in_valid`, `in_data[4]`, each a 5-bit `{re, im}`.
* **Mode:** `ifft`, sampled on a symbol's first beat.
* **Output side:** `out_valid`, `out_first`, `out_data[4 or 8]`, each an
  8-bit `{re, im}`.
* **Status:** `sat`.

A small FIFO carries each symbol's mode to the reorder buffer.

| `USE_REORDER` | `USE_OUTBUF` | Output                   | Latency |
|:---:|:---:|--------------------------------|--------:|
| 0 | 0 | 8 lanes, DIF order             | 56 |
| 0 | 1 | 4 lanes, out of order          | 59 |
| 1 | 0 | 8 lanes, natural order         | 75 |
| 1 | 1 | 4 lanes, natural order (default) | 78 |

Without the reorder buffer, `ifft` has no effect: IFFT ordering is done only
in the reorder buffer. Shared types and the fixed-point helpers (round and
saturate, twiddle function) are in `fft_pkg`.

## Where this departs from the reference design

* **Latency.** The reference design reports 50 / 54 / 70 / 73 cycles; this
  RTL takes 56 / 59 / 75 / 78. The extra 6 cycles are in the core: the
  radix-2 stage is pipelined through its own multipliers, and the first
  radix-8 pass starts only after the radix-2 stage has finished. The reorder
  and output buffer latencies (19 and 3) are as specified.
* **Multiplier count.** The reference design shares four of the seven
  complex multipliers between the radix-2 twiddles and the first radix-8
  pass. Here the radix-2 stage has its own four, 11 in total. Sharing would
  need the two stages interleaved cycle by cycle, which this schedule does
  not do.
* **√2/2 multiplier.** The multiplier uses full-width adders with a
  pipeline register in the middle, not reduced 6-, 8- and 9-bit adders. Its
  result is rounded to the butterfly's internal width.
* **Word-length result.** The 8-bit scaling is the reference design's.
  Against fully random full-range input, this RTL gives 24.6 dB rather than
  the reported 31.56 dB. The reported figure's input statistics are not
  known; for inputs that do not clip, the measured ~31 dB agrees.
* **Not included.** The serial-to-parallel and parallel-to-serial circuits
  used for an FPGA test setup are not part of this design.

## Simulating

Everything is plain SystemVerilog-2017. Name the packages first; Verilator
finds each module in `rtl/` by its file name. Example, for the end-to-end
test:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/fft_pkg.sv tb/fft_tb_pkg.sv tb/tb_fft128_top.sv -o sim
    ./obj_dir/sim +verilator+rand+reset+2

Every testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog. The references are computed independently: an exact
floating-point DFT in `fft_tb_pkg`, or direct models of each unit.

| Testbench | What it checks |
|---|---|
| `tb_sp_ram`, `tb_twiddle_rom`, `tb_cmplx_mult`, `tb_w8_mult`, `tb_radix8_bf` | Arithmetic units against integer or real models, including rounding and saturation. |
| `tb_input_buffer`, `tb_radix2_stage`, `tb_b2_regfile` | The front end and the register set. |
| `tb_fft128_core` | The core: DIF output order, 56-cycle latency, streaming. |
| `tb_reorder_buffer` | Both orders, FFT and IFFT mode, back-to-back bursts. |
| `tb_output_buffer` | 8-to-4 streaming, 3-cycle latency. |
| `tb_fft128_top` | 12 symbols through the default configuration: FFT and IFFT mode, back to back and after gaps, a saturating DC symbol, all five slot maps. Checks each output within 6 LSB, the SQNR and the 78-cycle latency, and counts each mechanism. |
| `tb_fft128_top_cfg` | The three other configurations side by side: output order and lanes, 56 / 59 / 75-cycle latency, FFT and IFFT mode. |
| `tb_workload_uwb` | 800 random full-range symbols, 40 QPSK OFDM symbols in IFFT mode (122 used subcarriers), and a saturating sine. Reports SQNR and EVM. |

Two-state simulation starts undriven registers at random values. All
control state is reset, and the testbenches ignore the outputs until reset
has been applied.
