# Systolic vector-quantisation encoder (squared-error distortion)

A vector quantiser replaces each K-sample input vector X by the index of the
nearest of N stored codewords C_0 .. C_{N-1}, where "nearest" means the
smallest squared error

    d(X, C_i) = sum_{n=1..K} (x_n - c_{i,n})^2 .

The encoder has to compute N distortions per input vector and pick the
smallest. This RTL does it with a systolic array: input vectors stream down
through a K x N grid of squared-error cells while the codebook streams up
through it, so that every input vector meets every codeword once. A column of
N comparing cells keeps the running minimum. The chip never receives codeword
identifiers. It knows only in which row the minimum occurred, and it turns
that row number into a codeword index with one mod-N counter and one adder
(the "index offset" idea). This keeps the pin count low: two sample streams
come in and one index goes out.

At the default size (K = 3, N = 4, 8-bit samples) the encoder delivers one
index every two phi2 periods. A vector takes K + N + 1 = 8 periods from
entering the array to leaving as an index. Filling the idle slots of the
streams raises this to one index per period.

## Data flow through the array

```
           x stream (serial)            c stream (serial)
                |                              |
        vq_sample_buffer (phi1)        vq_sample_buffer (phi1)
                |  one vector / phi2           |
        vq_delay_wedge (col n: n delays)   vq_delay_wedge
                |                              |
                v  row 0                       ^  row N-1
   0 -> [se]->[se]-> .. ->[se] -> cmp 0        |
   0 -> [se]->[se]-> .. ->[se] -> cmp 1        |
          ...   (x moves down, c moves up)     |
   0 -> [se]->[se]-> .. ->[se] -> cmp N-1 -----+
                                   |
                     (row id + mod-N counter) mod N  ->  index
```

* **Squared-error cell** (`vq_se_cell`). It registers `a' = a + (x-u)^2`,
  passes `x` down and passes `u` up, once per phi2 period. Each row adds up
  the K terms of one distortion from left to right, so row r's right-hand
  output is the complete distortion of the pair that met in row r.
* **Skew.** The partial sum moves one column per period. Component n of both
  streams must therefore arrive n periods after component 0. Two identical
  delay wedges (`vq_delay_wedge`) do this with 0, 1, .., K-1 registers per
  column.
* **Counter-flow and the zero slots.** The two streams move in opposite
  directions, one row per period each, so they close in on each other at two
  rows per period. If vectors in each stream are two slots apart, an input
  vector meets a new codeword in every row. If they were adjacent, half of
  the pairs would cross between two registers and never meet. This is why
  every other slot of both streams is a zero vector at 50 % efficiency.
* **Meeting rule.** Count stream slots from reset. Input slot s and codeword
  slot q meet in row r (0 = top) exactly when `q = s + 2r - (N-1)`. All
  timing in the design follows from this rule.
* **Comparing cells** (`vq_compare_cell`, `vq_index_selector`). Cell r holds
  the fixed identifier r. It registers `(b, i_b)` from the cell above if
  `b < c`, and otherwise its own row's distortion `c` with identifier r. A
  tie therefore goes to the lower row. An input vector reaches row r one
  period after row r-1, and so does its running minimum, so each vector's
  minimum ripples down the column in step with it. Cell 0 is fed the largest
  distortion value from above.

## The index offset

The codebook recirculates in the codeword stream in the order C_0, C_1, ..,
C_{N-1}, C_0, .. . Because of the meeting rule, input vector j (j = 0, 1, ..)
meets codewords j, j+1, .., j+N-1 (mod N) in rows 0 .. N-1. A win in row r
therefore means codeword `(r + j) mod N`. The offset j increases by one for
each input vector, and input vectors are two phi2 periods apart. So one mod-N
counter stepped at half the phi2 rate gives the offset, and one adder applies
it. For N a power of two the adder is a plain log2 N-bit adder that wraps by
itself. Other N are supported by subtracting N on overflow.

The counter must show offset 0 when the first vector's row id reaches the
adder. This depends on where the counter starts and on the phase of its
half-rate enable. The convention here is:

* phi2 period 0 starts at reset release;
* the counter holds its initial value INIT in periods 0 and 1;
* it steps at the end of every odd period (1, 3, 5, ..).

Under this convention, `INIT = N - floor(K/2)` is the correct value for every
K and N. For the default size it is 3. `vq_index_offset` keeps INIT as a
parameter with this default.

## Stream format and timing (`vq_encoder_top`)

Samples enter on `x_sample` and `c_sample`, one per `clk` cycle, component 1
first. K consecutive samples form one slot, and slot 0 begins with the first
clock edge after `rst_n` rises. The host lays out the streams as follows:

| slot | codeword stream | input stream, 50 % | input stream, 100 % |
|---|---|---|---|
| even 2m | C_(m mod N) | vector if 2m >= N-1 and 2m - (N-1) is even, else zero | vector if 2m >= N-1 |
| odd 2m+1 | zero (50 %) or C_((m + K mod 2) mod N) (100 %) | vector if 2m+1 >= N-1 and 2m+1 - (N-1) is even, else zero | vector if 2m+1 >= N-1 |

In words: the codebook recirculates in the even slots. The input stream is
N-1 slots late, so that input vector 0 meets C_0 in row 0. For 100 %
efficiency, the odd codeword slots carry the codebook advanced by one for odd
K (C_0, C_1, C_1, C_2, C_2, .. for K = 3), or not advanced for even K. With
that ordering the same half-rate counter also gives the correct offset for
the extra input vectors (input slots N+2j).

Latency and rate:

* An input vector in slot s reaches row 0 in phi2 period s+1. Its index and
  distortion are on `index` / `min_dist` during period s + N + K + 2, which is
  K + N + 1 periods after it entered the array.
* `index` and `min_dist` change once per phi2 period.
* `result_valid` pulses in the first clock cycle of every period, starting at
  period 2N + K + 1, the first period that can hold a real result.
* At 50 % efficiency every second period holds a real result. At 100 %
  efficiency every period does.
* Results that depend on zero-filled codeword slots are meaningless. Only the
  host knows which these are, from the table above.

## Clocking

The encoder uses three rates:

* phi1 for the sample buffers, at K times the phi2 rate;
* phi2 for the array, the comparing cells and the adder;
* phi2/2 for the offset counter.

All of them run from the single clock `clk`, which acts as phi1.
`vq_phase_gen` counts K clock cycles per phi2 period. It produces a phi2
enable (`phi2_tick`, the last cycle of a period) and a phi2/2 enable
(`half_tick`, the phi2 enable of odd periods). Everything is clocked on the
rising edge.

`vq_sample_buffer` shifts samples in at the full clock rate. When the K-th
sample arrives, it loads that sample and the K-1 stored ones into a separate
output register. This lets samples arrive back to back, and the array sees a
vector that stays stable for the whole next period.

## Modules

| file | role |
|---|---|
| `rtl/vq_pkg.sv` | default sizes, distortion and identifier width functions |
| `rtl/vq_encoder_top.sv` | the complete encoder |
| `rtl/vq_phase_gen.sv` | phi2 and phi2/2 enables from the clock |
| `rtl/vq_sample_buffer.sv` | serial-to-parallel buffer, one per stream |
| `rtl/vq_delay_wedge.sv` | per-column skew, one per stream |
| `rtl/vq_distortion_array.sv` | K x N array of `vq_se_cell` |
| `rtl/vq_se_cell.sv` | squared-error cell |
| `rtl/vq_index_selector.sv` | column of N `vq_compare_cell` |
| `rtl/vq_compare_cell.sv` | comparing cell |
| `rtl/vq_index_offset.sv` | mod-N counter and offset adder |

Parameters of the top: `K` (vector length, default 3), `N` (codebook size,
default 4, at least 2), `W` (sample width, default 8) and `METRIC`
(`vq_pkg::DIST_SQUARED`, the default, or `vq_pkg::DIST_ABSOLUTE`). The
absolute-error setting changes only the cell function, to `a' = a + |x-u|`.
The encoder then matches vectors under the absolute-value distortion
measure, with the same structure and timing. Samples are signed.
Distortions are `2W + ceil(log2 K)` bits wide, enough for any input, so no
sum can overflow. `index` is `ceil(log2 N)` bits wide. Size: at the
defaults, the encoder synthesises to about 580 flip-flops.

## Choices made in this RTL

The cell functions, the array shape, the data directions, the zero slots, the
delay wedges, the counter at half rate with initial value N - floor(K/2), and
the K + N + 1 latency all follow the architecture this design implements. The
following are this design's own choices:

* Signed 8-bit samples, with widths sized so that nothing overflows.
* A single clock with enables instead of three clocks.
* An asynchronous active-low reset that clears every register. The offset
  counter is the exception: it resets to INIT.
* 0-based row identifiers and codeword indices (rows are often numbered from
  1). This makes the log2 N-bit adder wrap naturally.
* A largest-value input on the top comparing cell.
* The sample buffer's separate output register.
* The `min_dist` and `result_valid` outputs. The architecture's only output
  is the index.
* The codeword order in the odd codeword slots for 100 % efficiency with
  even K. The odd-K order matches the architecture; the even-K order was
  derived from the counter timing and confirmed in simulation.

Not included:

* pipelining inside the squared-error cell;
* the option of moving the counter and adder into the decoder;
* the decoder itself, which is a codebook lookup.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and includes a watchdog.

* `tb_vq_encoder_top` runs the encoder at its default size. The first part
  of the run is in 50 % efficiency format and the rest in 100 % format. The
  codebook is random, with one duplicated codeword so that ties occur. Most
  input vectors are a codeword plus small noise.
  * The expected index and distortion of every vector are computed from the
    stream contents with the meeting rule above.
  * Each is checked in its exact output period, which also checks the
    latency and the rate.
  * The run fails unless each of the following occurred at least once:
    results in both modes, offset wrap-around, ties, and each comparing cell
    winning.
* `tb_vq_encoder_k4n8` repeats the end-to-end test with K = 4, N = 8 and
  W = 10. An even K exercises the other branch of the offset rules. Both
  end-to-end benches share `tb/vq_encoder_check.svh`.
* `tb_vq_encoder_abs` repeats the default-size test with the absolute-error
  cell function.
* The unit benches cover the following:
  * the cell arithmetic at extreme sample values, for both measures;
  * the comparing rule and its ties;
  * the array's meeting rule with random enables;
  * the selector's minimum and argmin;
  * the counter sequence and mod-N addition, also with N = 6;
  * the buffer load and the wedge delays, also with K = 4 and K = 5;
  * the enable pattern of the phase generator.
* Concurrent assertions in `vq_index_offset` and `vq_phase_gen` check that
  the counter enable falls on a phi2 edge and that values stay in range.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/vq_pkg.sv \
    tb/tb_vq_encoder_top.sv --top-module tb_vq_encoder_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every testbench finishes in
well under a second.
