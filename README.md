# Parallel turbo decoder with overlapping half-iterations

A turbo decoder alternates between two half-iterations. One decodes the
first constituent code in natural order. The other decodes the second code
in the order given by the interleaver. Each half-iteration begins with
clocks that produce no results: memory reads, the pipeline, and the start of
the path-metric recursion. A deep pipeline with a short sub-block per
decoder loses a large share of its clocks this way. With 32 decoders and a
4096-bit block, each decoder gets only 128 trellis stages, or 32 clocks at
four stages per clock.

This design removes that idle time. It starts the next half-iteration while
the current one is still producing results. For that to be safe, the data
read early by the new half-iteration must not be data the old one is still
about to write. The design gets this from two things:

* a restriction on the QPP interleaver parameters; and
* a window order, W0, W2, W1, W3, that processes the even windows of a
  sub-block before the odd ones.

With four windows per decoder, every unit is busy on every clock. A
half-iteration takes 32 clocks instead of 48, so the efficiency rises from
66.7 % to 100 %.

Configuration at the default parameters:

| Item | Default |
| --- | --- |
| Code | LTE rate-1/3 turbo code, 8-state, circular (tail-biting) trellis |
| Block size N | 4096 |
| SISO decoders P | 32, each radix-2^4 (four trellis stages per clock) |
| Window length L | 32 |
| Sub-block | 128 stages = 4 windows of 8 clocks |
| Channel values | 5 bits |
| Path metrics | 8 bits |
| Extrinsic values | 6 bits |

At 175 MHz and 8 iterations:

* overlapping mode: 528 clocks per block, about 1.36 Gb/s;
* normal mode: 768 clocks per block, 933 Mb/s.

## 1. Why overlapping is possible: window parity classes

Write a position as x = sL + j: window s, offset j. The QPP interleaver is
F(x) = f1·x + f2·x² mod N. Interleaved position x lands in natural window Q_s.
If f1 is odd and f2 is even, the parity of Q_s depends only on s plus one
carry term. The following conditions make that carry term even for every j:

    L | (f1 - 1),   L | f2,   (f1 - 1)/L ≡ f2/L  (mod 2)        (Proposition 1)

With them, Q_s ≡ s (mod 2). Interleaved window s then touches only natural
windows of the same parity, and the reverse holds too. Two more conditions
come with this:

* 2L | N, so every sub-block has an even number of windows;
* the windows of the whole block are numbered across all sub-blocks. The
  sub-block size M = N/P is a multiple of 2L, so window w of every decoder
  has the same parity.

Examples:

| Pair (f1, f2) | Proposition 1 | Overlap |
| --- | --- | --- |
| (449, 384) | yes | allowed |
| (2113, 128) | yes | allowed |
| (31, 64), the standard's pair for N = 4096 | no: 30 is not a multiple of 32 | refused, normal schedule |

`qpp_param_check` evaluates these conditions in hardware from the `f1_i` and
`f2_i` inputs. It also checks a companion set for the circular trellis:

    L | (f1 + 1),   L | f2,   (f1 + 1)/L ≡ f2/L  (mod 2)        (Proposition 2)

(191, 128) is an example. Here the parity classes are swapped, but only
after the interleaved sequence is rotated by one position: it is decoded as
x̃1, x̃2, …, x̃N−1, x̃0. A tail-biting trellis is a loop, so the rotation
changes where the windows start but not the result. Rotated interleaved
window s then touches only natural windows of the opposite parity.

## 2. The schedule

Each half-iteration issues one read command per clock for all P decoders at
once. The windows go in the order W0, W2, W1, W3, eight clocks each. The
natural and interleaved half-iterations alternate.

Timeline of one half-iteration, in clocks after its first read:

| Window | Read | Results written |
| --- | --- | --- |
| W0 | 0–7 | 8–24 |
| W2 | 8–15 | 16–32 |
| W1 | 16–23 | 24–40 |
| W3 | 24–31 | 32–48 |

In overlapping mode the next half-iteration starts reading at clock 32:

* W0' and W2' are read in clocks 32–47. Under Proposition 1 they touch only
  the even windows of the previous half-iteration. Those were complete by
  clock 32.
* W1' and W3' start reading at clock 48. The odd windows of the previous
  half-iteration were complete by clock 48.

So no read ever sees a stale value. The time one window group takes equals
the pipeline it must hide (16 clocks). That equality is why four windows
give exactly 100 %.

In normal mode the controller waits the full 16-clock drain after the last
read. A half-iteration then takes 48 clocks.

With two windows per decoder (N/P = 2L), one window group lasts only
8 clocks. The controller therefore inserts max(0, 16 − 4·NWIN) = 8 idle
clocks between overlapping half-iterations. That gives 24 clocks per
half-iteration (66.7 %) against 32 in normal mode (50 %).

For Proposition-2 pairs the interleaved half-iterations take their windows
in the order W1, W3, W0, W2, which is the window index with its low bit
inverted. Each half-iteration still starts with the windows the previous one
finished first. The timing is the same as above.

The decoding time is:

    (period) × (2·iterations − 1) + NWIN·8 + 16   clocks

where period is 32 or 48 for four windows, and 24 or 32 for two windows.
The testbenches check this to the clock.

The normal schedule is used, and decodes correctly, when the pair fails
both propositions (`overlap_ok_o` is 0) or when `overlap_req_i` is 0.
`overlap_o` reports the mode that was chosen, and `rotated_o` whether the
rotated variant is in use. A pair the memory cannot
serve (`supported_o` = 0, see section 4) is not decoded at all: `start_i`
is ignored.

## 3. Pipeline and latencies

Latencies are counted from the read command (`schedule_ctrl`):

| Delay | Clocks | Stages |
| --- | --- | --- |
| δa | 4 | address register, memory, network register, SISO input register |
| τa | 10 | 8 clocks of forward recursion over the window, then the backward recursion starts and the LLR unit adds 2 registers |
| δb | 2 | two write registers after the write network |

The sum δa + τa + δb is the 16-clock drain. The extrinsic write of a
window's stage comes out of the backward pass in reverse order. The write
address is therefore the read command delayed by 13 clocks, with its
clock-within-window mirrored (7 − step). An assertion in the top checks that
the delayed command and the SISO outputs stay in step.

## 4. Memory banks and the barrel-shift networks

There are three memories. Each has P banks (one per decoder) of M words.
Each bank is split into four columns by address mod 4, one column per
trellis stage handled in a clock. On every clock each decoder therefore
reads four consecutive stages from four different columns.

| Memory | Width | Contents |
| --- | --- | --- |
| systematic | 5 bits | channel value |
| parity 1, parity 2 | 5 bits each | Parity 2 is stored at its interleaved index, so both half-iterations read their parity straight from the decoder's own bank, with no network. In the rotated mode it is stored one address lower. |
| extrinsic | 7 bits | {extrinsic, decision}, kept in natural order |

In the interleaved half-iteration, lane p of stage x + k reads natural
address F(x + k + pM), or F(x + k + 1 + pM) in the rotated mode:

* bank = F(x + k) div M + c·p (mod P), with c = f1 + 2·f2·(x + k) mod P;
* word and column are the same for all lanes.

When c = ±1 for all x, the P requests form one rotation of the banks
(c = +1) or one reflected rotation (c = −1). The design supports exactly the
pairs that satisfy both of these:

* f1 ≡ ±1 (mod P);
* f2 ≡ 0 (mod max(P/2, 4)). The 4 comes from the columns.

`supported_o` shows whether a pair qualifies. All the pairs named in this text do:
(449, 384), (2113, 128), (191, 128) and (31, 64). `err_o` is sticky and would
flag an access that could not be routed. No tested run raises it.

`barrel_shift_net` is a log2(P)-stage rotator followed by an optional
reflection j → −j. The networks are:

* reads (systematic and extrinsic together): one network per column;
* writes: one network per column, using the inverse rotation.

## 5. The SISO decoder

`siso_decoder` runs max-log-MAP over a 128-stage sub-block, four stages per
clock. It needs no dummy backward recursion. Instead, each window starts
from metrics stored at the end of the previous pass:

* Forward path: input register, then a branch metric unit (`branch_metric_unit`),
  then a radix-16 ACS (`acs_radix16`, four chained radix-2 steps with
  normalisation). It takes one clock per four stages. The alpha of each clock
  is kept in `window_buffer`, and the inputs in a second `window_buffer`.
* Backward path: runs exactly 8 clocks behind the forward path, over the same
  window in reverse, with its own branch metric unit and ACS.
* `llr_unit` combines the stored alpha, the beta and the branch metrics into
  four LLRs. It subtracts the systematic and a-priori inputs, which gives the
  extrinsic value, and outputs the sign as the decision.
* `boundary_metric_buffer` (one for alpha, one for beta) stores the metrics
  at every window boundary, separately for the natural and the interleaved
  half-iteration.
* At a sub-block edge the metric goes to the neighbouring decoder: alpha to
  decoder p + 1 and beta to decoder p − 1. The chain is circular, which
  matches the tail-biting trellis. The first pass of a block starts from all-zero
  metrics.

Because every window starts from stored metrics, windows can run in any
order. This freedom is what the W0, W2, W1, W3 schedule relies on.

Numbers:

* path metrics are 8-bit, at most 0, normalised by subtracting the maximum
  and saturated;
* branch metrics use sys + a-priori and the parity channel value;
* extrinsic values are saturated to 6 bits;
* in the first half-iteration the a-priori input is forced to zero, so the
  extrinsic memory needs no clearing.

## 6. Using the top

The top is `turbo_decoder_top`, with parameters `N`, `P` and `L`. The
requirements are:

* N must be a power of two;
* N/P must be a multiple of 2L.

Steps:

1. While idle, set `f1_i`, `f2_i`, `iters_i` (1–15) and `overlap_req_i`.
   Keep them until decoding ends. For Proposition-2 pairs they decide where
   the second parity is stored during loading.
2. Load the block through `ld_we_i`, `ld_addr_i`, `ld_sys_i`, `ld_par1_i`
   and `ld_par2_i`, one position per clock. `ld_par2_i` at address i is the
   second encoder's parity at interleaved position i. Channel values are
   signed 5-bit, and positive means bit 0.
3. Pulse `start_i`. `busy_o` rises, and `done_o` pulses when every decision
   is in memory.
4. Read decisions through `rd_addr_i`. `rd_dec_o` follows two clocks later.

## 7. Departures and limits

* **The rotated variant is this design's reading** of a schedule the
  published design only outlines. It rotates the interleaved sequence rather
  than the natural one.
* **Memory organisation is this design's own.** So are the column split, the
  supported-pair rule, the host ports and the 6-bit extrinsic width. The
  published design names a barrel-shift network but does not detail the
  memories.
* **The "two-stage technique"** that the published design uses to cut
  overhead is not described well enough to build, and is absent.
* **Quantisation is fixed** by package constants (5-bit input, 8-bit
  metrics). The 6-bit input / 9-bit metric variant would need `CH_W` and
  `PM_W` changed in `turbo_pkg` and has not been simulated.
* **No early stopping.** The iteration count is an input.
* **Decoding quality** is checked only by decoding random blocks with mild
  noise and a few weak sign errors to zero bit errors. No BER curves were run.
* **Size and speed.** Coarse synthesis of the default top gives about 80 k
  word-level cells, 51 k flip-flop bits and 254 k memory bits (held as
  register arrays). The 175 MHz clock is the published figure, not a timing
  result of this RTL.

## 8. Files

| File | Contents |
| --- | --- |
| `rtl/turbo_pkg.sv` | widths, types, trellis functions, saturation |
| `rtl/turbo_decoder_top.sv` | the parallel decoder |
| `rtl/schedule_ctrl.sv` | read commands, window order, both schedules |
| `rtl/qpp_param_check.sv` | Proposition-1 and supported-pair checks |
| `rtl/qpp_addr_gen.sv` | bank/column/word and rotation for four stages |
| `rtl/barrel_shift_net.sv` | rotation with optional reflection |
| `rtl/ram_1r1w.sv` | one memory column, one read and one write port |
| `rtl/siso_decoder.sv` | radix-2^4 SISO with boundary metrics |
| `rtl/branch_metric_unit.sv`, `rtl/acs_radix16.sv`, `rtl/llr_unit.sv` | SISO data path |
| `rtl/window_buffer.sv`, `rtl/boundary_metric_buffer.sv` | SISO storage |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_turbo_decoder_top.sv` | end-to-end test, N = 512, P = 4 (four windows per decoder) |
| `tb/tb_turbo_decoder_two_win.sv` | end-to-end test, N = 256, P = 4 (two windows, 24-clock overlap) |
| `tb/tb_turbo_decoder_full.sv` | the same end-to-end test at the defaults, N = 4096, P = 32 |

The end-to-end benches run five decodes:

* (449, 384), overlapping;
* (2113, 128), normal;
* (31, 64), with overlap requested and refused;
* a short clean run;
* (191, 128), overlapping on the rotated sequence.

For each decode they:

* encode random bits with their own encoder and interleaver model;
* check every decision and the exact clock count;
* keep a scoreboard of the extrinsic memory. Every read must see the value
  of the previous half-iteration, with no read-before-write.

They also count each mechanism and count a failure for any that never
occurred:

* overlapping runs;
* rotated runs;
* normal runs;
* a refused overlap;
* reflected network accesses;
* clocks on which one half-iteration reads while the previous one writes.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog.

To simulate with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/turbo_pkg.sv rtl/*.sv \
        tb/tb_turbo_decoder_top.sv --top-module tb_turbo_decoder_top -Mdir obj
    ./obj/Vtb_turbo_decoder_top

Substitute any other bench name. The full-size bench takes about a minute
to compile and a second to run.
