# Algorithms to hardware: an exchange sorter, a prime tester, and flip-flop timing

This RTL covers three small designs. Each shows one step in turning an algorithm, or a
timing rule, into hardware:

* **An exchange sorter.** It sorts K words in a register file. The loop nest of a
  textbook sort is turned into an ASMD chart (algorithmic state machine with datapath),
  then split into a controller and a datapath that talk through named control and status
  signals.
* **A prime tester (isPrime).** It decides by trial division whether a W-bit number is
  prime. It is split the same way. Its test checks the result for every input and
  matches the exact cycle timing of each result.
* **A D flip-flop timing model.** This behavioural flip-flop models setup time, hold time
  and clock-to-Q delay, and it reports violations. Its test works through a classic
  timing exercise: the minimum clock period of a register–AND–NOR–register path, and the
  time window in which an input may change.

The three share nothing but the clock and reset. `dcs_top` places them side by side.

## Controller and datapath split

Both algorithmic designs follow the same method:

1. Write the algorithm with explicit registers.
2. Draw an ASMD chart. Each state box is one clock cycle. Moore outputs (the ones that
   depend only on the state) sit in the state box. Conditional (Mealy) outputs sit in
   ovals after decision boxes.
3. Build a datapath that can perform every register transfer in the chart.
4. Build a controller that issues those transfers as control signals and reads the
   datapath's status signals.

Both designs use the usual handshake:

* `ready` is high while the design is idle.
* `start`, sampled while idle, begins a run.
* `done` is high when the run is finished, and stays high while `start` is still high.
* The design returns to idle once `start` is low. This keeps a long `start` pulse from
  starting a second run.
* `reset` is synchronous and active high.

The control and status signals travel as packed structs. They are defined in
`sort_pkg` and `isprime_pkg`, under the names used on the charts.

## The exchange sorter

### Algorithm

```
for i = 0 .. K-2
    A = Reg[i]
    for j = i+1 .. K-1
        B = Reg[j]
        if B < A:  Reg[i] = B;  Reg[j] = A
        A = Reg[i]
```

After outer pass `i`, the smallest remaining word is at index `i`. Words are unsigned
and are sorted smallest first. Equal words are never swapped.

### Datapath (`sort_datapath`, `sort_regfile`)

| Part | Function |
|---|---|
| `sort_regfile` | K × N words. One synchronous write port. A combinational read port for the algorithm, and a second one for reading results out. |
| counter `i` | `Init_i`: i ← 0. `Incr_i`: i ← i+1. `i_done` = (i == K−2). |
| counter `j` | `Init_j`: j ← i+1. `Incr_j`: j ← j+1. `j_done` = (j == K−1). |
| register `A` | `Load_A`: A ← Reg[i] |
| register `B` | `Load_B`: B ← Reg[j]. The read address is `j` when `Load_B` is high and `i` otherwise. |
| store | `Store_B` writes Reg[i] ← B. `Store_A` writes Reg[j] ← A. The file is written when either is high. |
| compare | `B_lt_A` = B < A |

The algorithm's read must be combinational. The state that asserts `Load_A` must
capture `Reg[i]` at the end of that same cycle.

### Controller (`sort_control`)

| State | Outputs | Next state |
|---|---|---|
| S_idle | Ready. `Init_i` if Start. | S_A if Start |
| S_A | Load_A, Init_j | S_B |
| S_B | Load_B | S_compare |
| S_compare | `Store_B` if B_lt_A | S_swap if B_lt_A, otherwise S_loops |
| S_swap | Store_A | S_loops |
| S_loops | Load_A. `Incr_j` if not j_done. `Incr_i` if j_done and not i_done. | S_B, S_A or S_done |
| S_done | Done | S_idle when Start is low |

Why the swap splits across two states: `Store_B` overwrites Reg[i] while A still holds
the old Reg[i]. `Store_A` then writes that old value to Reg[j] one cycle later. S_loops
always reloads A from Reg[i]. After a swap, that is the new, smaller word.

### Timing

With `s` swaps, Done rises **(K−1) + 3·K(K−1)/2 + s** clock edges after the edge that
samples Start:

* one S_A cycle per outer pass;
* three cycles per comparison;
* one more cycle per swap.

For K = 8 that is 91 to 119 cycles. The tests check this count exactly.

### Ports added for use

The algorithm alone gives no way to put words in or take them out. `sorter` therefore
has two extra ports:

* a load port (`ld_we`, `ld_addr`, `ld_data`). It is honoured only while `ready` is
  high, so writes during a sort are ignored.
* a read-back port (`rd_addr`, `rd_data`).

## The prime tester (isPrime)

The algorithm:

* If N < 3, the result is (N == 2).
* Otherwise, try F = 2, 3, … up to N/2. The first F that divides N gives P = 0. If no F
  divides N, P = 1.

Registers in `isprime_datapath`:

* `N`: a copy of `num` taken at Start, so the input may change while the test runs.
* `F`: the trial factor, W+1 bits wide so it cannot wrap.
* `P`: the result.

The controller has three states: S_idle, S_check and S_done. Each visit to S_check makes
one decision, in this order:

| Condition | Control signal | Effect | Next state |
|---|---|---|---|
| `N_lt_3` | `Special` | P ← (N == 2) | S_done |
| `NmodF_zero` | `Clr_P` | P ← 0 | S_done |
| `F_gt_halfN` (F > ⌊N/2⌋) | `Set_P` | P ← 1 | S_done |
| none of these | `Incr_F` | F ← F+1 | S_check again |

The remainder is a plain combinational `%`. Expect that divider to set the critical path
when W is large.

Timing: let m = 1 when N < 3, and otherwise the number of factors tried. Done rises
m + 1 edges after the edge that samples Start. Ready returns one edge later.

Example: with a 20 ns clock and a test that restarts as soon as Ready returns, the
results for 0 … 15 appear at 90, 150, 210, 270, 330, 410, 470, 570, 630, 710, 770, 910,
970, 1130, 1190 and 1270 ns. `isprime_tb` checks those times.

The default is W = 4. Any W ≥ 2 works; the test also runs W = 10 over all 1024 inputs.

## Flip-flop timing (`timed_dff`)

`timed_dff` is a simulation model and is not synthesizable. It has three parameters:

| Parameter | Meaning | Default |
|---|---|---|
| `T_SU` | setup time | 12 ns |
| `T_H` | hold time | 18 ns |
| `T_CO` | clock-to-Q delay | 8 ns |

On each rising edge it captures D and drives Q and Qn `T_CO` later. It also checks every
change of D:

* A change less than `T_SU` before an edge sets `setup_viol`.
* A change less than `T_H` after an edge sets `hold_viol`.
* A change exactly on either limit is allowed.

The flags stay set until `clr` is pulsed. On a violation, a real flip-flop could capture
either value or go metastable. This model still captures D and only raises the flag.

An input that changes `t` after an edge is safe when t_h ≤ t ≤ T − t_su. Two results
follow from this:

* **Minimum period.** The longest register-to-register path sets it:
  t_co + logic + t_su ≤ T. For a path through an AND gate (25 ns) and a NOR gate
  (20 ns): 8 + 25 + 20 + 12 = 65 ns.
* **Input window.** An input that reaches one register through the AND (25 ns) and
  another through AND then NOR (45 ns) must satisfy both windows, taken modulo the
  period. At T = 65 ns that leaves t_in in [0, 8] or [58, 65).

`timed_dff_tb` builds these paths from delays around four model instances and checks:

* T = 65 ns passes.
* T = 64 ns gives a setup violation.
* A sweep of t_in from 0 to 64 ns finds exactly those two windows.

Worked-example statements of this window often write the ends as open, [0, 8) and
(58, 65]. The model follows the inclusive inequalities.

## Top level (`dcs_top`)

| Parameter | Meaning | Default |
|---|---|---|
| `K` | number of words in the sorter | 8 |
| `N` | bits per word | 8 |
| `W` | width of isPrime's input | 4 |

The ports are grouped by design:

* `srt_*` for the sorter;
* `prm_*` for isPrime;
* `ff_*` for the flip-flop model.

`clk` is shared by all three. `reset` is shared by the sorter and isPrime.

Synthesis tools keep only the ports of `timed_dff`, because it is built from delays and
time stamps. Instantiate `sorter` or `isprime` directly when only synthesizable logic is
wanted.

## Simulating

Every test is self-checking and ends with a line `TB_RESULT checks=<n> failures=<n>`.
With Verilator 5, for example:

```
verilator --binary --timing --assert --top-module sorter_tb -Irtl -Itb \
    rtl/sort_pkg.sv rtl/isprime_pkg.sv tb/sorter_tb.sv
./obj_dir/Vsorter_tb
```

| Test | What it checks |
|---|---|
| `sort_regfile_tb` | Write port, both read ports, write enable |
| `sort_datapath_tb` | Counters, i_done/j_done, address multiplexers, B_lt_A, the two-step swap (control driven directly) |
| `sort_control_tb` | The control word in every state over a full K = 4 loop nest, the cycle count, reset |
| `sorter_tb` | 300 sorts (random, many duplicates, sorted, reversed), the exact cycle count, load-port lockout |
| `isprime_datapath_tb` | Status signals for every N and F, every write of P |
| `isprime_control_tb` | Each exit of S_check, repeated Incr_F, the Done/Start handshake |
| `isprime_tb` | All 16 inputs at W = 4 with exact result times, then all 1024 inputs at W = 10 |
| `timed_dff_tb` | Clock-to-Q, setup and hold flags, minimum period, input-window sweep |
| `dcs_top_tb` | All three designs at once at the default parameters. It counts each mechanism (swap, no swap, next j, next i, Done held, Special, Clr_P, Set_P, Incr_F, setup and hold violation, clean capture) and fails if any never happened. |

## What is this design's own choice

The source material fixes the algorithms, the ASMD charts, the register transfers, the
signal names and the flip-flop times. The following were chosen here:

* **Sizes:** K = 8 and N = 8. No sizes are given for the sorter.
* **Sorter I/O:** the load and read-back ports.
* **Comparisons:** the sorter compares unsigned values.
* **Encodings:** binary state encoding in both controllers.
* **Resets:** the datapath registers are reset too. The sorter's register file is not
  reset.
* **isPrime arithmetic:** a combinational divider for N % F.
* **Flip-flop model:** the violation flags, `clr`, and capturing D on a violation.

Two parts are left out:

* The gate-level circuit of the timing example. Only its gate delays and path sums are
  known, not its connections. The tests model it as plain path delays.
* The gate-level structure of the edge-triggered flip-flop. It is represented only by
  the `timed_dff` model.
