# Recursive all-lag odd correlator

This block correlates a stream of samples against all N cyclic lags of a
length-N reference code at once. It produces a new vector of N correlation
values for every input sample. The values are *odd* correlations: the part of
the code that wraps around the end of each lag enters with its sign inverted.
The hardware cost grows linearly with N (N multipliers, N+1 adders, 2N
registers, one negator). Building it as N separate parallel correlators would
cost order N².

## Why odd correlations

A direct-sequence spread-spectrum receiver acquires code timing by correlating
the received samples with every lag of its code and picking the largest
magnitude. For an unmodulated signal, the ordinary (*even*) cyclic correlation
over N samples is enough. With antipodal data modulation, the sign of the signal
can flip at a symbol boundary inside the N-sample window. The even correlation
then loses its peak. The odd correlation inverts the wrapped part of the code,
which exactly undoes such a flip: the lag whose code period starts at the flip
still shows the full peak N·A (amplitude A, ±1 chips). A receiver that has both
the even and the odd vector can therefore acquire after N samples, whether or
not a transition fell in the window. This RTL provides the odd vector. The even
correlator and the peak search belong to the surrounding receiver and are not
part of it.

## What is computed

With the code c_0 … c_{N-1} and the window d_n = [d_{n-N+1}, …, d_{n-1}, d_n],
lag m of the output is

    r̄_{m,n} = Σ_{k≥m} c_{k-m} · d_{n-N+1+k}  −  Σ_{k<m} c_{N+k-m} · d_{n-N+1+k}

Row m of the N×N matrix C̄ is the code rotated right by m places, with the m
wrapped-around entries negated.

## The recursion

Let S̄ be the *inverting end-around shift*. It moves every element of a vector up
one place: element i takes element i+1. The old element 0 is negated and goes
into element N-1. Applying it N times negates the vector. The columns of C̄ are
successive S̄-shifts of one another, and so the whole vector obeys

    r̄_n = S̄ r̄_{n-1} + (d_n + d_{n-N}) · [c_{N-1}, c_{N-2}, …, c_1, c_0]^T

Each new sample adds one scaled copy of the reversed code to the shifted previous
vector. The sample that leaves the window, d_{n-N}, enters with a plus sign, not a
minus sign. This is because of the sign inversion: N shifts turn its old
contribution into its negative, and adding it once more cancels it. The
recursion is exact only if it starts from zero. The output registers and the
sample history must be zero before the first sample, which the reset and
`clear` ensure. From then on, every stored value is an exact odd correlation.
Before N samples have arrived, the missing older samples count as zero.

## Datapath

```
 d_in ──┬─────────────────────────────┐
        │                             ▼
        └─► [ sample_shift_register ]─► d_{n-N} ─► (+) input_adder ─► e_n
                                                         │
                       code ─► [ code_multiplier_bank ]◄─┘   p_i = e_n · c_{N-1-i}
                                        │ p_0 … p_{N-1}
                                        ▼
   [ inverting_rotation_accumulator ]  r_i ← r_{i+1} + p_i   (i < N-1)
                                       r_{N-1} ← −r_0 + p_{N-1}
```

| module | role | hardware |
|---|---|---|
| `sample_shift_register` | the last N samples. Its final stage gives d_{n-N} while d_n is on the input | N × DW flip-flops |
| `input_adder` | e_n = d_n + d_{n-N}, at full precision | 1 adder |
| `code_multiplier_bank` | e_n times every chip of the reversed code | N multipliers |
| `inverting_rotation_accumulator` | output storage, updated by S̄ r̄ + p | N adders, 1 negator, N × AW flip-flops |
| `recursive_odd_correlator` | top: wiring, valid flag, sample count | small counter |
| `oddcorr_pkg` | default sizes and the accumulator-width formula | — |

The whole update is one clock deep. It runs from the sample input and the last
shift-register stage, through the adder and multipliers, to the accumulator
adders and into the output registers. The critical path is one adder, one
DW+1 × CW multiplier and one AW-bit adder. As N grows, only AW grows, and only
logarithmically; the fan-out of e_n grows linearly.

## Interface and timing (`recursive_odd_correlator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low. Zeroes all state |
| `clear` | in | 1 | synchronous clear of all state. It has priority over `in_valid` |
| `code[N]` | in | CW each | reference code, `code[k]` = c_k, signed |
| `in_valid` | in | 1 | `d_in` carries a new sample this cycle |
| `d_in` | in | DW | sample, signed |
| `out_valid` | out | 1 | `r_bar` was updated at the last edge |
| `r_full` | out | 1 | at least N samples taken since reset or clear |
| `r_bar[N]` | out | AW each | `r_bar[m]` = odd correlation at lag m |

- There is one sample per clock at most. There is no back-pressure: every sample
  offered with `in_valid` is taken. When `in_valid` is low, all state holds.
- r̄_n appears in `r_bar` on the clock edge that takes d_n, so the latency is one
  cycle. It stays there until the next sample. `out_valid` is `in_valid` delayed
  by one cycle.
- `code` must not change while the correlator runs, because the stored vector was
  built with the old code. Change it only while no sample has been taken since
  reset or `clear`; the assertion `a_code_stable` flags any other change.
- `r_full` marks the point from which `r_bar` is the correlation of N real
  samples (r̄_N onward).

## Sizes and number range

| parameter | default | meaning |
|---|---|---|
| `N` | 31 | code length = number of lags (e.g. one m-sequence period at one sample per chip) |
| `DW` | 8 | sample width, two's complement |
| `CW` | 2 | chip width, two's complement (holds ±1; use more bits for multi-level codes) |
| `AW` | DW + CW + ⌈log2 N⌉ = 15 | width of each stored value (derived, not settable) |

The method works for any N, sample width or chip width. The defaults above are
this design's choices. Because every stored value is an exact correlation,
|r̄| ≤ N · 2^(DW-1) · 2^(CW-1). AW is chosen to hold that bound, so the
accumulators never overflow. The additions wrap modulo 2^AW in any case, so an
intermediate wrap could not corrupt a final result that fits.

## Choices not fixed by the method

- How the code gets in: here it is a static input vector. A loadable code
  register or a code generator would go in front of `code`.
- The handshake (`in_valid`/`out_valid`), the synchronous `clear`, the
  asynchronous reset style and the `r_full` flag.
- Widths, and the choice to compute the whole update in a single cycle without
  pipelining. A faster clock would need a register after the multipliers. The
  recursion tolerates that only if the feedback loop (the accumulator adders and
  the rotation) stays one cycle deep.
- The default N = 31.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=… failures=…`, and each has a cycle watchdog.

- `tb_input_adder`: every pair of 8-bit samples.
- `tb_code_multiplier_bank`: random and extreme operands, including chip value −2.
  It checks that the code is applied in reverse order.
- `tb_sample_shift_register`: random samples, stalls and a mid-run clear,
  against a software history.
- `tb_inverting_rotation_accumulator`: random products, stalls and a clear,
  against a software model of S̄ r̄ + p. It confirms that the negated wrap path
  carried nonzero values.
- `tb_recursive_odd_correlator` runs the top at its default sizes. After every
  sample it compares all 31 lags with the correlation computed directly from its
  definition, and it checks the one-cycle latency and `r_full`. It has three runs:
  1. an m-sequence code with random full-range data;
  2. a random code that uses every chip value;
  3. an acquisition scenario: a phase-shifted m-sequence, modulated by random ±1
     symbols of one code period, with amplitude 100.

  In run 3, the largest |r̄| must be at the lag where the code period starts,
  with magnitude 31 · 100, whenever the window spans a symbol transition. The
  testbench counts stalls, nonzero wrap-arounds, nonzero d_{n-N} terms, clears,
  `r_full` edges, code changes and acquisitions. Each must happen at least once.

To simulate with Verilator (package first, `-y rtl` for the modules):

```
verilator --binary --timing --assert -y rtl -y tb rtl/oddcorr_pkg.sv \
    tb/tb_recursive_odd_correlator.sv --top-module tb_recursive_odd_correlator
./obj_dir/Vtb_recursive_odd_correlator
```

The same command works for the other testbenches, with their names substituted.
The testbenches do not depend on X or Z values, so they also run on two-state
simulators. To change the size, override `N`, `DW` and `CW` on
`recursive_odd_correlator`. The testbench takes its sizes from `oddcorr_pkg`, so
editing the defaults there resizes both.
