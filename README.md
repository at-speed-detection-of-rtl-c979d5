# At-speed delay-fault test for a handshake link between two clock domains

In a GALS system (globally asynchronous, locally synchronous) each domain
runs on its own clock, and domains exchange words over long links. A link
has a data bus plus two handshake wires: **Write**, from sender to receiver,
and **Ready To Receive (RTR)**, from receiver to sender. The sender puts a
word on Data and then raises Write. The receiver takes the word when it sees
Write. This is correct only if every data line reaches the receiver before
Write does.

Crosstalk and process variation can make one data line slower than Write.
Call the margin `t_l`: the time from the arrival of the data to the arrival
of Write at the receiver. A negative `t_l` is a **delay fault** that can
corrupt transfers. Such a fault shows up only at the real clock rate. A
slow-speed test misses it.

This RTL adds an at-speed test for that fault to an ordinary four-phase
link. The test needs no delay lines and no calibrated timing. The receiver
uses only its own clock, the expected test word, and repetition. The test is
*conservative*: a faulty link is never passed. A good link with a very small
margin can be rejected, and the probability of that falls as the repetition
limit rises.

## The two reads

At each experiment the receiver samples the data lines at two active clock
edges. The **first read** is at the last edge before Write is seen. The
**second read** is at the first edge where Write is seen. Each read is
compared with the word the sender should have sent.

| first read | second read | meaning | verdict |
|---|---|---|---|
| correct | — | the data came before the edge that preceded Write, so `t_l > 0` | `FAULT_IS_ABSENT` |
| wrong | wrong | the data came after the edge that saw Write, so `t_l < 0` | `FAULT_IS_PRESENT` |
| wrong | correct | both arrivals fell between the same two edges; either order is possible | undecided: repeat |

The receiver period is `T_R`. If `|t_l| >= T_R`, one experiment always
decides. If `|t_l|` is smaller, an experiment decides only when a clock edge
falls between the two arrivals. For a random arrival phase this happens with
probability `|t_l| / T_R`. The two clocks are unrelated, so the phase changes
between experiments, and repeating the experiment eventually decides.
The receiver gives up after `max_experiments` undecided experiments and
reports `FAULT_IS_PRESENT`. That is the only way a good link can be
rejected.

The limit sets the trade-off. Analysis of the method gives these give-up
limits `l` for a chosen fault probability `P_f`, with the share of
undecidable chips set to `P_f / 10`:

| nominal `t_l / T_R` | `P_f` = 0.1 | 0.01 | 0.001 |
|---|---|---|---|
| 1   | 13  | 124  | 273  |
| 0.5 | 91  | 223  | 619  |
| 0.1 | 448 | 1178 | 2244 |

The average number of experiments per test is far lower than the limit:
about 1.4 to 24 over those cases. The 12-bit `max_experiments` input covers
every limit in the table.

**How the receiver sees Write.** Write is asynchronous to the receiver, so it
must pass a synchronizer. The data must stay lined up with it, or the two
reads would no longer sit on either side of Write's arrival. `link_rx_tester`
therefore samples Write and all data lines in the **same first rank of
flops**, then passes them through a second rank together. This rank is the
two-flop synchronizer for Write and a matched delay for Data. The decision
logic then works on a pair (Write, Data) that was sampled at the same edge,
two cycles earlier. A first-rank data flop can go metastable, but only in
the cases the test is meant to catch: any value it resolves to is a valid
"late" or "on time" observation.

**The arrival phase is not uniform.** The probability `|t_l| / T_R` assumes
that Write arrives at a uniformly random phase of the receiver clock. In a
four-phase loop this is only roughly true. RTR leaves the receiver on one of
its own clock edges. The sender answers a fixed number of its own cycles
later. So the arrival phase of Write is partly tied to the receiver clock
grid. With two perfectly stable clocks the loop can lock, and then every
experiment gives the same outcome. The workload testbench puts random jitter
on the sender clock, as a real independent oscillator has. With it, the
measured mean number of experiments follows the expected trend but is not
equal to `T_R / |t_l|`. For example, at `t_l / T_R = 0.1` it is about 4 to 5,
not 10. In a real chip, oscillator jitter and drift supply the randomness.

## Test words

The worst case for a data line is when all its neighbours switch the other
way at the same moment, which gives the most crosstalk. Only one line, or a
few, can be tested this way at once. A test therefore names its **victim
lines** with `victim_mask`. `test_pattern_gen` forms the word:

    pattern(mask, phase) = phase ? mask : ~mask

Experiment `j` of a test (counting from 0) sends `pattern(mask, 1)` when `j`
is even and `pattern(mask, 0)` when `j` is odd. Before the first experiment
the lines hold `pattern(mask, 0)`, the *setup word*. So in every experiment
each victim switches and every other line switches the opposite way. Every
line switches every time, so a slow line anywhere on the bus is caught,
whichever line is the victim. The receiver compares the whole word.

The expected word never crosses the link under test. Each end has its own
`test_pattern_gen`, its own experiment parity and the same `victim_mask`. The
two ends stay in step because every experiment is exactly one handshake.

## Blocks

| module | domain | role |
|---|---|---|
| `gals_link_top` | both | sender, link wires and receiver joined together; the clocks and resets are inputs |
| `link_tx` | A | sending end: four-phase handshake, functional words or test words |
| `link_rx_tester` | B | receiving end: four-phase handshake, the two-read test, the repeat and give-up rule, the verdict |
| `test_pattern_gen` | both | victim-against-aggressors test word |
| `gals_link_wires` | — | **behavioural timing model** of the wires: fixed delays for Write, Data and RTR, with one data line optionally slower (the fault). It is not synthesizable logic. In silicon these are just wires. |
| `sync2` | A | two-flop synchronizer for RTR |
| `gals_dft_pkg` | — | `test_result_e` (`MIGHT_BE_FAULTY`, `FAULT_IS_ABSENT`, `FAULT_IS_PRESENT`) and the default widths |

Each domain's clock generator is outside the design. `gals_link_top` takes
`clk_a` and `clk_b` as inputs.

### Handshake and timing

`link_tx` runs the handshake in this order. RTR rises. `link_tx` sees it
through `sync2` and loads Data on the third clock-A edge. Write rises
`SETUP_CYCLES` (default 1) edges later. The receiver drops RTR. Write falls
on the third edge after that. Data is held until the next transfer. On a
link with equal wire delays, the nominal margin is therefore
`t_l = SETUP_CYCLES × T_A`.

`link_rx_tester` raises RTR. It waits until the synchronized Write is high
and takes the word. It drops RTR, waits for Write to fall, and then starts
again. The word goes to the receiver's output in functional mode, or to the
test logic in test mode. The receiver sees Write two clock-B cycles after
sampling it. Assertions check two handshake rules: Data does not change
while Write is high, and RTR is not raised while Write is still seen high.

### Running a test

Each domain has its own control inputs (`a_*` and `b_*` on the top). They
would come from that domain's test access.

1. Stop feeding functional words (`a_in_valid` = 0). Raise `b_test_mode`,
   then `a_test_mode`. The receiver withdraws an RTR that is still
   unanswered.
2. Set the same `victim_mask` on both ends. Pulse `a_test_start` to put the
   setup word on the lines.
3. Set `b_max_experiments` and pulse `b_test_start`.
4. Wait for `b_test_done`. Read `b_test_result`, and `b_experiments` for
   the number of experiments made. The handshake of the deciding experiment
   is always completed, so the next test can start at once.
5. To go back to functional traffic, lower `a_test_mode` first, then
   `b_test_mode`.

If `max_experiments` is 0, the verdict is `FAULT_IS_PRESENT` at once and no
handshake takes place.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 32 | data bus width (this design's choice) |
| `CNT_W` | 12 | width of `max_experiments` and `experiments` |
| `SETUP_CYCLES` | 1 | clock-A cycles from Data to Write at the sender |
| `WRITE_DELAY_NS`, `DATA_DELAY_NS`, `RTR_DELAY_NS` | 1.0 | wire delays (simulation only) |
| `SLOW_LINE`, `SLOW_EXTRA_NS` | -1, 0.0 | the data line given an extra delay (-1: none), and that delay |

## Where this departs from the method or adds to it

- **Second-read condition.** The method's pseudocode declares the fault
  present when the second read *equals* the expected word. The method's
  prose, its probability model and its timing diagram all say the opposite:
  a wrong second read means a fault. The RTL follows the prose. The
  equality form would reject every good link whose margin is below one
  clock period, and would catch a late line only through the give-up rule.
- **End of a test.** As written, the algorithm stops with RTR still high.
  Here the handshake of the deciding experiment is finished, so the sender
  is left idle.
- **Stale first read.** If Write were seen at the very first edge of an
  experiment, the first read would hold an old value. The first read is
  preset to a word that cannot match, so such an experiment cannot pass.
- **Own choices.** These are not specified by the method: the bus width,
  the reset values (asynchronous active-low, everything low), the
  synchronizers and the aligned sampling, the test-word pattern, the
  functional mode, the mode-switch procedure and the result encoding.
- **Wire model.** The extra delay of the slow line applies to every
  transition. Real crosstalk delay depends on the pattern.
- **Not built.** The method could be combined with functional testing of the
  link and run on-line. Both are only suggested as extensions and are not
  built here. The rest of each switch (routers, buffers) is not part of this
  design.

## Simulation

Any testbench builds with plain Verilator 5 from the directory that holds
`rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
        rtl/gals_dft_pkg.sv tb/tb_gals_link_top.sv --top-module tb_gals_link_top -Mdir obj
    ./obj/Vtb_gals_link_top

Each testbench checks itself and ends with a line of the form
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_test_pattern_gen` | the test word, bit by bit, for walking, multi-line and random masks |
| `tb_gals_link_wires` | each wire's delay and the slow line's extra delay |
| `tb_link_tx` | functional words, setup and test-word sequence, Data-to-Write setup, handshake cycle counts, no send without a word |
| `tb_link_rx_tester` | drives Write and Data at chosen times around the receiver's edges and predicts each verdict from those times alone: every outcome, repeat, give-up, limit 0, 40 random tests, functional reception with back-pressure |
| `tb_gals_link_top` | four complete links with different wire delays (good; a line 25 ns late; a line slightly late; `t_l` = 0) on unrelated clocks: functional traffic, mode switches both ways, tests of every line, detection, repetition and give-up, each counted |
| `tb_link_test_workloads` | the analysis cases `t_l / T_R` = 1, 0.5, 0.1 with their give-up limits for `P_f` = 0.1, plus a bad link at -0.5: verdicts, no give-ups, and the trend of the mean number of experiments |
| `tb_link_fault_effects` | the effect of each kind of late wire on functional traffic: a late Write or RTR only slows the burst (24 words: about 3.5 µs against 2.6 µs), a late data line corrupts words; the delay test then passes the late-Write link and fails the late-data link |
| `tb_gals_link_top_full` | the top at its defaults (32 bits): functional words, a test of all 32 lines with a limit of 2244, then functional words again |

All of these pass. Each unit testbench also fails against a deliberately
broken copy of its module. The broken copies were: the aggressors not
inverted, Write raised early, the printed equality test for the second read,
the slow line's delay ignored, and the wires bypassed.

`gals_link_wires` uses `#` delays, so simulate with `--timing`. Synthesis
tools ignore the delays and see plain wires.
