# Clustered handshake control in SystemVerilog

Handshake circuits are asynchronous circuits built by syntax-directed
translation. A language such as Balsa compiles each construct of a program
into a small *handshake component*, and components talk to each other over
request/acknowledge channels. The translation is simple and predictable, but
the resulting control is large. Every `;`, `||` or `loop` becomes its own
component with its own gates, even when three of them sit in a row.

The fix modelled here is *clustering*. Neighbouring control components that
have no data ports are merged into one cluster. The behaviour of the cluster
is the composition of its parts' behaviours, with the channels between them
hidden. That behaviour is then synthesised as a single speed-independent
(SI) controller with its own state signals. The internal channels and their
handshakes disappear, and the cluster usually needs far fewer gates than the
components it replaces.

This repository holds:

* a library of the control components considered for clustering (Synch,
  SequenceOptimised, Concur, DecisionWait, Fork, Call), plus the Loop, Fetch
  and Variable components used by the example;
* the worked example, **two synchronized buffers** (`seq_par`), whose three
  control components are replaced by the gate-level controller **Cluster0**;
* a small three-input controller that shows why state-coding signals are
  needed (`csc_example_ctrl`);
* self-checking testbenches for all of the above.

## 1. Channels and the timing model

### Four-phase channels

Every channel is a four-phase (return-to-zero) handshake:

```
active side   req  ___/¯¯¯¯¯¯¯¯¯\_______
passive side  ack  _______/¯¯¯¯¯¯¯¯¯\___
```

The active side raises `req`. The passive side answers by raising `ack`.
Then `req` falls, and finally `ack` falls. On a *push* channel the data
travels with the request and is valid while `req` is high. On a *pull*
channel the data travels with the acknowledge and is valid while `ack` is
high. Ports are named `*_req` / `*_ack`. Vectors of ports, as in
`out_req[N-1:0]`, are indexed like the component's port numbers 1, 2, …

`hs_check` (rtl) holds two assertions for one channel:

* `req` may change only while `req == ack`;
* `ack` may change only while `ack != req`.

`seq_par` binds one `hs_check` to every internal channel.

### Why there is a clock

The circuits are asynchronous, but this RTL is meant to be simulated with
a cycle-based simulator and read by synthesis tools. So each handshake wire
is the output of a flip-flop on a free-running clock `clk`. One clock period
stands for one arbitrary gate delay. Speed-independent control works for any
positive gate delays, so this timing is one legal execution of the circuit.
The order of handshake events is what a clockless realisation would produce;
only the absolute timing is quantised.

Things to keep in mind:

* Every component reacts to an input edge one clock later. A chain of k
  components adds k clocks. The clock is not part of the specified
  behaviour, and no cycle counts are specified.
* The environment may respond after any number of clocks, including zero.
  The testbenches randomise every response delay.
* `rst_n` is an asynchronous, active-low reset. It puts every channel in its
  idle state with all wires at 0. The gate-level clusters reset their state
  signals to the values that the idle state needs.

## 2. The component library

Each component is described by a term in handshake notation:

* `a : B` means port a encloses B: a's request starts B, and a is
  acknowledged when B is done.
* `;` means sequence, `||` means concurrency, `,` means concurrency with
  synchronised phases, `|` means choice, and `#[...]` means repeat forever.

All library components take a parameter `N`, the number of ports on the
repeated side. It defaults to 2.

| Module | Component | Term | What it does |
|---|---|---|---|
| `hs_synch` | Synch | `#[0:1:2]` | Requests the output once all N passive inputs have requested, and returns the output acknowledge to every input. The request join is a Muller C-element. |
| `hs_sequence_optimised` | SequenceOptimised | `#[0:[1;2]]` | Runs the outputs one after another. Every output but the last runs its full cycle. The last one only completes its up phase; then port 0 is acknowledged, and the last output's down phase overlaps port 0's down phase. |
| `hs_concur` | Concur | `#[0:[1\|\|2]]` | Requests all outputs at once. Each output runs its full four-phase cycle on its own. Port 0 is acknowledged when all of them are back at zero. |
| `hs_fork` | Fork | `#[0:[1,2]]` | The up phases of all outputs run together, then port 0 is acknowledged. The down phases also run together, then port 0's acknowledge falls. |
| `hs_decision_wait` | DecisionWait | `#[0:[1:3\|2:4]]` | Once activated, waits for one of the N inputs. Input i encloses output i, and port 0 is acknowledged once input i has been (one step later on both edges). |
| `hs_call` | Call | `#[[0:2\|1:2]]` | N callers share one output. The output's handshake is returned to whichever caller requested. |
| `hs_loop` | Loop | `#[0:#[1]]` | Once activated, handshakes on its output forever. It never acknowledges the activation. |
| `hs_fetch` | Fetch | `0 : (1 -> 2)` | Pulls a word from its input channel and pushes it on its output channel. It has no storage: the output data is the input data, which stays valid for as long as the output request is high. |
| `hs_variable` | Variable | — | A register with one push write port and `R` pull read ports. |

The full event order of each component is given in the opening comment of
its file.

### Choices

DecisionWait and Call expect *one* requester at a time. That is what the
choice operator `|` means. If two inputs request together, these modules
serve the lowest index first and the other waits its turn, so nothing is
lost. The original components leave this case undefined; the tie-break is a
choice made here.

### State that separates choices

In the gate-level versions of DecisionWait and Call, extra state signals are
needed. They remember which branch was taken, so that "called from 0" and
"called from 1" have different codes. Here that memory is the `sel`
register.

### Consistency

DecisionWait withdraws output i only after both the activation request and
input i's request have fallen. This keeps the rising and falling edges of
every port alternating, whatever order the environment lowers them in.

## 3. Two synchronized buffers (`seq_par`)

The program is:

```
loop
  ( i1 -> x1  ||  i2 -> x2 ) ;
  ( o1 <- x1  ||  o2 <- x2 )
end
```

`x1` and `x2` are byte variables. The two buffers take their inputs
together, then deliver their outputs together, forever.

### Netlist before clustering

Channel numbers are those of the compiled netlist:

```
act(1) ─ Loop ─(16)─ SequenceOptimised ─┬─(15)─ Concur ─┬─(14)─ Fetch i1(2) -> x1(13)
                                        │               └─(12)─ Fetch i2(4) -> x2(11)
                                        └─(10)─ Concur ─┬─ (9)─ Fetch x1(8) -> o1(3)
                                                        └─ (7)─ Fetch x2(6) -> o2(5)
```

### After clustering

SequenceOptimised and the two Concurs become one component, **Cluster0**
(`seq_par_cluster0`), on channels 16, 14, 12, 9 and 7. Channels 15 and 10
no longer exist. Cluster0's ports are named for their role:

| Port | Channel | Starts |
|---|---|---|
| `act` | 16 | – (activation from Loop) |
| `rd1` | 14 | fetch i1 → x1 |
| `rd2` | 12 | fetch i2 → x2 |
| `wr1` | 9 | fetch x1 → o1 |
| `wr2` | 7 | fetch x2 → o2 |

Seen from its ports, one activation of Cluster0 does this:

```
act_req+ ; (rd1 req+ ack+ req- ack-  ||  rd2 req+ ack+ req- ack-) ;
           (wr1 req+ ack+ req- ack-  ||  wr2 req+ ack+ req- ack-) ;
act_ack+ ; act_req- ; act_ack-
```

### Inside Cluster0

Cluster0 is a mapped gate netlist, reproduced gate by gate. There are eight
non-input signals: `act_ack`, `rd1_req`, `rd2_req`, `wr1_req`, `wr2_req`,
and the three state-coding signals `csc1`, `csc2` and `csc3`. Twelve inverter,
NAND, NOR and AND nodes sit between them; they keep the numbers `x191` … `x324`
from the mapped netlist. Read as set/reset behaviour, the logic is:

| Signal | Equation | Meaning |
|---|---|---|
| `csc2` | `~act_req \| (csc2 & ~csc3)` | "idle / read phase not yet acknowledged". It is 1 whenever `act_req` is 0, and it falls once `rd2` has been acknowledged. |
| `csc1` | `rd1_ack \| (csc1 & ~wr2_ack)` | "rd1 has been served". Set by `rd1_ack`, cleared when `wr2` is acknowledged. |
| `csc3` | `rd2_ack \| (csc3 & ~wr1_ack)` | "rd2 has been served". Set by `rd2_ack`, cleared when `wr1` is acknowledged. |
| `rd1_req` | `~csc1 & (rd1_req \| (csc2 & act_req))` | Raised by the activation, held until `rd1` is served. |
| `rd2_req` | `csc2 & (csc1 \| rd1_req)` | Follows `rd1_req`, held until `csc2` falls. |
| `wr1_req` | `csc3 & ~rd1_req & ~rd1_ack & ~rd2_ack` | Starts when both reads are back at zero. |
| `wr2_req` | `csc1 & (wr1_req \| (~csc2 & ~csc3))` | Follows `wr1_req`, held until `csc3` clears. |
| `act_ack` | `~(csc1\|csc2\|csc3\|wr1_ack\|wr2_ack)` | All state cleared and both writes are back at zero. |

Without the three state signals, several reachable states would have the
same values on the ports but need different next moves. One example is the
moment just before the reads and the moment just before the writes. The
`csc` signals give each such state its own code.

In the RTL each of the eight signals is a flip-flop, which is one gate with a
one-clock delay. The numbered nodes are combinational. Reset gives
`csc2 = 1`, with every other signal 0. That is the only idle state the
equations hold steady: `act_ack` would rise if all three `csc` signals were
0.

### One iteration, event by event

Each step below is at least one clock:

1. `act_req+` (from Loop) sets `rd1_req`. Then `rd2_req` rises.
2. `rd1_ack+` sets `csc1`, and `rd1_req` falls. `rd2_ack+` sets `csc3`,
   which clears `csc2`, and `rd2_req` falls. These two branches interleave
   freely.
3. Once `rd1_ack` and `rd2_ack` are both 0 again, `wr1_req` rises, followed
   by `wr2_req`.
4. `wr1_ack+` clears `csc3`, and `wr1_req` falls. `wr2_ack+` clears `csc1`,
   and `wr2_req` falls.
5. With all `csc` signals 0 and both write acknowledges low, `act_ack` rises.
   Loop lowers `act_req`. That sets `csc2` again, and `act_ack` falls.

### Data path

The data path is unchanged by clustering:

* The input fetches pull a word from `i1`/`i2` and push it into the
  variables `x1`/`x2`.
* The output fetches pull from the variables and push to `o1`/`o2`.

`act_ack` of `seq_par` stays 0 forever, because the body is an endless
loop.

## 4. A state-coding example (`csc_example_ctrl`)

This is a controller with inputs a, b, c and outputs x, y. Its cyclic
specification is:

```
(a+ || b+) ; (x+ || y+) ; c+ ; x- ; c- ; (x+ || y-) ; b- ; (x- || y+) ; a- ; y-
```

It cannot be built as it stands, because the same code of (a b c x y)
appears with different required moves. For example, code 11001 occurs after
y+ alone, where x must rise. It also occurs after c-, where x must rise and y
must fall.

An internal signal `csc0` resolves this:

* `csc0` rises after c+ and before x-.
* `csc0` falls together with a-.
* y- waits for both a- and `csc0`-.

The resulting equations are:

```
x    = a b (~c + x ~csc0)
y    = a b ~csc0 + csc0 (~b + c) + a ~b y
csc0 = c x y + csc0 (x + ~y + b)
```

The specification comes from the original work. The position of `csc0` and
the equations were derived for this implementation. A different position
would give different, equally valid equations.

## 5. Top level (`hs_top`)

`hs_top` places three unrelated parts side by side. Each has its own ports:

| Prefix | Part |
|---|---|
| `sp_*` | `seq_par` (activation, the i1/i2 pull channels, the o1/o2 push channels) |
| `syn_*`, `seq_*`, `con_*`, `dw_*`, `frk_*`, `cal_*` | one instance each of Synch, SequenceOptimised, Concur, DecisionWait, Fork and Call |
| `ex_*` | `csc_example_ctrl` |

It has two parameters:

* `W`: the buffer word width. Default 8 (a Balsa byte).
* `N`: the number of ports per library component. Default 2.

Files:

* `rtl/hs_pkg.sv` holds the shared constants.
* Each other module is in `rtl/<module>.sv`.

## 6. Verification

Each module has a testbench `tb/tb_<module>.sv` that checks itself and ends
with `TB_RESULT checks=<n> failures=<m>`. The testbenches surround the
design with random-delay drivers (`tb_hs_drv`), responders (`tb_hs_resp`) and
independent four-phase monitors (`tb_hs_mon`). On top of the four-phase rules,
each testbench checks its component's defining ordering, for example:

* SequenceOptimised: the next output starts only after the previous one has
  finished.
* Cluster0: the writes start only after both reads of the same activation
  are complete.
* All data paths: every word arrives intact and in order.

Each testbench also requires that the concurrency or choice it tests actually
happened: overlapping branches, both choices, and simultaneous callers.

`tb_clustering_equiv` runs `seq_par` next to the same buffers built from the
unclustered components (Loop, SequenceOptimised and two Concurs, in helper
`tb_seq_par_hcnet`). Both get the same word streams. Both must deliver them
intact, in order, and with the same synchronization. The testbench prints the
average clocks per iteration of each version for comparison.

`tb_hs_top` runs the whole top at its default parameters. It runs 40
iterations of the buffers and activity on every library component, and
counts each mechanism.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/hs_pkg.sv tb/tb_hs_top.sv --top-module tb_hs_top -Mdir obj_top
./obj_top/Vtb_hs_top
```

To run any other testbench, replace `tb_hs_top` with its name. All
testbenches finish in well under a second of simulated run time.

## 7. How far to trust it, and where it departs from the original

**Taken from the original work:**

* the component behaviours (event orders) of Synch, SequenceOptimised,
  Concur, DecisionWait, Fork and Call;
* the structure of the two-buffer example and its byte width;
* the complete gate netlist of Cluster0;
* the specification of the example controller.

**Choices made here:**

* the clocked timing model described in section 1;
* the reset values;
* the tie-breaks when a choice component sees two requests at once;
* the insides of Loop, Fetch and Variable, which the original only names.
  They follow the usual Balsa meaning.
* the position of `csc0` in the example controller.

**Readings of unclear points:**

* The event order of Concur was read as
  `0r+ ; (branches) ; 0a+ ; 0r- ; 0a-`.
* Synch was built as the usual C-element join, because its full event order
  is not spelled out.

**Not included:** the clustered controllers of the larger benchmark circuits
(an arbiter tree, a population counter, a shifter, the SSEM processor and a
stack). Only their sizes and areas are known, not their netlists or
equations. The reported area savings (for example, a three-component cluster
dropping from 408 to 104 area units) are therefore not reproduced, and the
synthesis results of this RTL are not comparable to them.

**Verified:** every testbench passes with Verilator 5. For each module, a
copy with one deliberate bug made its testbench fail. The RTL lints cleanly
apart from two kinds of warning:

* an asynchronous reset that the assertions also sample;
* an unused package constant in files that do not need it.

`hs_loop` drives its `act_ack` at a constant 0 on purpose.
