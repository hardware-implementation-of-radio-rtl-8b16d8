# Fast digital detection and demodulation of radio signals

This RTL takes samples of an intermediate-frequency carrier, two or four per
carrier period, and turns them into demodulated data for several signal
formats at once:

- coherent binary PSK;
- coherent four-position PSK;
- a noncoherent energy detector;
- differential PSK (DPSK);
- "integrally" coded binary PSK, where a whole codeword of K PSK symbols is
  decided at once.

The front end costs only a few additions per carrier period. It has no
multipliers and no local oscillator. Sampling the carrier at
fixed points of its period lets a subtraction replace mixing with a reference.
The sum over a symbol of N = 2^n periods is then computed with n adders
instead of N.

The sampling clock must be locked to the carrier (a clock pulse generator
places the sampling instants). That generator and the ADC are outside this RTL.
The design starts at the ADC output.

## Signal flow

```
            adc_valid (sampling strobe)        sync (first sample of a codeword)
                 |                                   |
adc_data ──► sample_timing: phase 0..3, tag {last period of symbol?, symbol #}
   │
   ├─(s1,s3 only)─► BA1: MS2 ─► SUB (s1-s2) ─► fast_sum ─► y ──► bpsk_demod
   │
   └─────────────► BA2: MS4 ─┬► SUB0 (s1-s3) ─► fast_sum (QPC0) ─► y0 ─┐
                             └► SUB1 (s2-s4) ─► fast_sum (QPC1) ─► y1 ─┤
                                                                      ├─► qpsk_demod
                                                                      ├─► nc_detector
                                                                      ├─► dpsk_demod
                                                                      └─► icpsk_demod:
                           CU_0k, CU_1k (k = 1..M) ─► QT_k ─► max choice ─► s_I
```

`radio_top` is this whole picture. It shares one sampling grid and one BA2
among all BA2-based decision blocks. Every output is computed all the time;
which one is meaningful depends on the signal actually being received.

## Sampling and the two basic algorithms

The carrier is s(t) = S·sin(2π f0 t + φ). With four samples per period, at
0.25, 0.5, 0.75 and 1.0 T0:

| sample | value     |
|--------|-----------|
| s1     | S·cos φ   |
| s2     | −S·sin φ  |
| s3     | −S·cos φ  |
| s4     | S·sin φ   |

- **BA2** (quadrature): s1 − s3 = 2S·cos φ and s2 − s4 = −2S·sin φ. These are
  the two quadrature components of the carrier. Any DC offset of the ADC
  cancels out.
- **BA1** (coherent): uses only the 0.25 T0 and 0.75 T0 samples. In the top
  these are s1 and s3 of the four-sample grid, so its response equals y0 of
  BA2.

Summed over the N periods of a symbol:

- y = y0 = 2NS·cos φ
- y1 = −2NS·sin φ

`ms_shift_reg` is MS2/MS4, the shift register that holds one period's
samples. `period_subtractor` is SUB. Both are registered.

## The fast sliding sum (fast_sum, fast_sum_stage)

This is the core of the design. Adding N = 512 differences every period would
take 512 additions. Instead, n = log2 N stages are chained. Stage k holds a
delay line MR_k of 2^(k−1) cells, clocked once per period, and an adder SUM_k:

    x_k(i) = x_(k−1)(i) + x_(k−1)(i − 2^(k−1))

- Stage 1 gives the sum of 2 consecutive differences.
- Stage 2 gives the sum of 4 (two overlapping pairs, 2 periods apart).
- After n stages the output is the sum of the last N differences:

      y(i) = Σ_{j=0}^{N−1} x(i − j)

That is n additions per period and N − 1 delay cells in total. The output is a
*sliding* sum: it is valid every period and covers the last N periods. The
decision blocks read it at the period that closes a symbol. At that point it
covers exactly that symbol, as long as the symbol started N periods earlier,
which the frame timing guarantees.

Each stage widens the value by one bit. The output has ADC_W + 1 + n bits
(20 bits at the defaults) and cannot overflow. Each stage registers its sum,
so the chain has a latency of n clocks and accepts one input per clock. The
delay lines are register arrays that reset to zero. Synthesis maps them to
memory (about 28 kbit at the defaults).

## Frame timing: sync and tags

`sample_timing` counts accepted samples into three levels:

- the phase inside the carrier period (0..3);
- the period inside the symbol (0..N−1);
- the symbol inside the codeword (0..K−1).

`sync` is a one-clock pulse given with the first sample of a codeword. In that
clock the counters read zero, so that sample is s1 of period 0 of symbol 0. A
codeword cut short by an early `sync` is dropped:

- its unfinished symbol never produces a decision;
- its codeword never reaches the correlators' dump point.

Each period carries a 9-bit tag, `radio_pkg::tag_t`:

- `sym_last`: this period closes a symbol;
- `sym_idx`: the symbol's number in the codeword.

The tag is delayed alongside the data through MS, SUB and every sum stage.
Decision blocks therefore need no counters of their own and never confuse
pipeline latency with symbol boundaries.

## Decision blocks

The detector acts on every period's response; the others act on the response
at a symbol's last period. Bit mappings are this design's own choice.

- **bpsk_demod**: bit = (y < 0), i.e. 1 for carrier phase π. One clock of
  latency.
- **qpsk_demod**: dibit = {y0 < 0, y1 < 0}. Each phase quadrant gives its own
  dibit, and neighbouring quadrants differ in one bit.
- **nc_detector**: z_i = ⌊√(y0,i² + y1,i²)⌋ and detect = z_i > `threshold`,
  for every period i. z does not depend on the carrier phase. Because y0 and
  y1 slide, z_i is the envelope over the last N periods. It is reported with
  the period's tag; the outputs with `sym_last` = 1 are the symbol-aligned
  ones. The square root is pipelined (`isqrt_pipe`, one stage per result bit)
  so it takes a new value every clock; z follows its period by Y_W + 1 clocks.
- **dpsk_demod**: compares the current symbol with the previous one through
  d = y0·p0 + y1·p1 = |y||p|·cos Δφ. bit = (d < 0), i.e. 1 for a phase step of
  π. There is no output for the first symbol after reset.
- **icpsk_demod**: the coded-PSK demodulator. A codeword is K PSK symbols
  whose phases follow one of M binary code sequences a_ik = ±1. Its parts:
  - `code_correlator` (CU): one per code and quadrature channel. It
    accumulates ±y per symbol and dumps u = Σ a_ik·y_i after symbol K−1.
  - `quad_converter` (QT): z_k = ⌊√(u0k² + u1k²)⌋, with a bit-serial square
    root (`isqrt`, one result bit per clock).
  - `max_choice` (CDM): picks the codeword number s_I with the largest z_k.
    Ties go to the lower number.

  The decision needs no knowledge of the carrier phase. It arrives
  U_W + 3 clocks after the last symbol, where U_W = Y_W + ⌈log2(K+1)⌉.

### Code tables

Code tables are computed at elaboration in `radio_pkg` and selected by
`CODE_FAMILY`. A chip value of 1 means a = +1.

- `CODE_MSEQ` (default): codeword 0 is the maximal-length sequence of a
  primitive polynomial, started from all ones (x^6 + x + 1 for K = 63).
  Codeword 1 is its time reversal. Further codewords are cyclic shifts of
  these two by codeword/2 chips.
- `CODE_WALSH`: rows of the Sylvester–Hadamard matrix. K must be a power of
  two and M ≤ K.
- `CODE_HAMMING74`: the (7,4) Hamming code, K = 7 and M ≤ 16. Chips 0..3 are
  the data bits; chips 4..6 are d0^d1^d3, d0^d2^d3 and d1^d2^d3.

  A noncoherent receiver gives a codeword and its complement the same z. This
  code contains complementary pairs (for example 0000000 and 1111111), so
  such a pair always ties and the lower number is reported.

## Parameters of radio_top

| parameter     | default     | meaning |
|---------------|-------------|---------|
| `ADC_W`       | 10          | ADC resolution. The intended range is 8–10 bits; 10 is used. |
| `N`           | 512         | Periods per symbol, a power of two. The intended range is 64–512; 512 is used. |
| `K`           | 63          | Symbols per codeword, at most 255. |
| `M`           | 2           | Number of codewords. |
| `CODE_FAMILY` | `CODE_MSEQ` | Code table of the coded-PSK demodulator. |

Synthesis at the defaults gives about 3.2k flip-flops, plus about 28 kbit of
delay-line storage in the three sum chains (BA1, QPC0, QPC1). About 1.7k of
the flip-flops are the detector's square-root pipeline.

## Interface and timing of radio_top

- **Clock and reset:** one clock; synchronous active-high `rst`.
- **Samples:** `adc_valid` qualifies `adc_data` (two's complement), at most
  one sample per clock. Gaps of any length are allowed.
- **Outputs:** each decision output family has a one-clock `*_valid` pulse.
  The bit decisions also give the symbol number (`*_sym`).
  - `det_z`/`det_tag`/`det_detect` follow each period by Y_W + 1 clocks.
  - `code_idx`, `code_z` and `code_z_all[M]` follow a codeword by U_W + 3
    clocks.
- **Rates:** one detector output per period; one bit decision per symbol (N
  periods); one codeword decision per K symbols. A codeword lasts 4NK sample
  clocks, far more than a QT's latency, so no bit-serial unit can be asked
  for a result while it is still busy. Assertions check this.

## How it relates to the original algorithm description

These parts follow the published description:

- the sampling grids;
- MS2/MS4, SUB, SUB0/SUB1;
- the SUM/MR stage structure, with 2^(k−1) cells in stage k;
- the use of BA1 for coherent BPSK;
- the use of BA2 for coherent four-position PSK;
- √(y0,i² + y1,i²) for the noncoherent detector, for every period i;
- the comparison of adjacent symbols for DPSK;
- the CU / QT / maximum-choice structure and its equations;
- the default sizes (10-bit ADC, N = 512, two 63-chip M-sequence codes).

These are this design's own choices, because the description gives only the
function or nothing at all:

- single-clock timing with a sample strobe;
- the sync/tag framing;
- all register stages and widths;
- the bit mappings;
- the detector threshold as an input;
- the DPSK dot product;
- the serial accumulate-and-dump correlators;
- the square-root circuits (pipelined in the detector, bit-serial in QT);
- tie-breaking;
- which sequences form the code tables;
- sharing one sampling grid and one BA2 in the universal top.

Not built:

- **ADC and clock pulse generator:** the ADC is analog, and the way the
  generator locks to the received carrier is not specified.
- **QAM demodulator:** named only; no constellation or decision levels are
  given.
- **FM demodulator:** said to be built from two BA2, with no further detail.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
outputs with values computed independently in the testbench, checks the
stated latencies, and ends with `TB_RESULT checks=N failures=M`.

| testbench | what it runs |
|-----------|--------------|
| `tb_sample_timing` … `tb_isqrt_pipe` | One block each, with random stimulus, edge values and gaps. |
| `tb_radio_top` | End to end at N = 8, K = 7, M = 2. |
| `tb_radio_top_full` | End to end at the default sizes: six codewords of 63 × 512 × 4 samples. |
| `tb_workloads` | End to end with 15- and 31-chip M-sequences, the Hamming (7,4) code with 16 codewords, and 16-chip Walsh codes (N = 64). It uses `radio_top_env`. |

The end-to-end runs generate a sampled carrier with a DC offset and noise.
They send coded-PSK codewords at random carrier phase, plus coherent BPSK,
QPSK and noise-only codewords. Every output is checked against a model built
from the generated samples (for the detector: every period's envelope over the
last N periods, across symbol and codeword boundaries), and the transmitted data must come back. Each
mechanism must occur at least once, and each occurrence is counted:

- a `sync` restart in mid-codeword;
- sample gaps and back-to-back samples;
- both detector outcomes;
- both DPSK values;
- every codeword decision.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/radio_pkg.sv tb/tb_radio_top_full.sv --top-module tb_radio_top_full
./obj_dir/Vtb_radio_top_full
```

The full-size run takes a few seconds.

## Files

- `rtl/radio_pkg.sv`: the tag type, code families and code-table functions.
- `rtl/sample_timing.sv`, `ms_shift_reg.sv`, `period_subtractor.sv`,
  `fast_sum_stage.sv`, `fast_sum.sv`, `ba1.sv`, `ba2.sv`: the front end.
- `rtl/bpsk_demod.sv`, `qpsk_demod.sv`, `nc_detector.sv`, `dpsk_demod.sv`,
  `isqrt_pipe.sv`: the per-period and per-symbol decisions.
- `rtl/code_correlator.sv`, `quad_converter.sv`, `isqrt.sv`, `max_choice.sv`,
  `icpsk_demod.sv`: the coded-PSK demodulator.
- `rtl/radio_top.sv`: the universal device.
