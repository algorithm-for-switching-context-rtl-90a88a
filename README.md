# Switching-context co-processor built from a CDFG Petri net

A hardware function that is too big for one FPGA can still run on it if it
is cut *in time*: the function's control/data-flow graph is split into
**contexts**. Each context fits the device and is loaded, run and unloaded in
turn. The work still to be done, and the values already computed, pass from
one context to the next through a memory buffer.

This RTL implements that scheme at the register-transfer level:

* the control flow is a safe timed Petri net. Each **place** becomes a
  flip-flop holding a token, and each **transition** becomes an AND gate that
  fires the matching datapath operation;
* each context has an **Interface In**, an **Interface Out** and an
  **end-of-context detector**. The input interface loads the context's
  starting marking and input data, and the output interface reads back its
  final marking and results. The end-of-context detector raises the
  interrupt `IntSw` when the context has finished;
* a **switching controller** follows a context schedule. It reconfigures an
  FPGA, copies state from the buffer into the context, runs it until
  `IntSw`, then copies its state back to the buffer;
* two FPGAs form a **two-stage pipeline**. While one runs context C_i, the
  other is being reconfigured with C_i+1, so reconfiguration time is hidden
  behind execution.

The process used to exercise the design is

```c
int f(int a, int b) { int x, y; x = a + b; if (x < 0) y = a * x; else y = x * b; return y; }
```

It is split into two contexts: C1 = {t0, t1, t2} and C2 = {t3, t4}.

## The Petri net of the example and its two contexts

```
        p0 (token at start)
        |
        t0   x := a + b
        |
        p1
       /  \
  t1 [x<0]  t2 [else]
      |       |
      p2      p3           <- end of C1, start of C2
      |       |
  t3 y:=a*x  t4 y:=x*b
       \     /
         p4                <- end of C2
```

| context | transitions | input places | output places | input data | output data | run time |
|---|---|---|---|---|---|---|
| C1 (`ctx_c1`) | t0, t1, t2 | p0 | p2, p3 | a, b | x | 2 cycles |
| C2 (`ctx_c2`) | t3, t4 | p2, p3 | p4 | a, b, x | y | 1 cycle |

Places p2 and p3 are shared by the two contexts. Each context has its own
copy: C1 ends with a token in one of them, that bit goes through the buffer,
and C2 starts from it. Each transition takes one clock cycle. A context's run
time is therefore the length of its longest transition path, from the first
cycle in which `run` is high to the cycle in which `IntSw` rises.

Variables are 16 bits wide, the width of a C `int` on a small
microcontroller. The product keeps the low 16 bits. t3 and t4 can never fire
together, so C2 has a single multiplier whose first operand is switched
between `a` and `b`.

## From net to circuit (`pn_place`, `pn_transition`)

* `pn_place`: `q' = (q AND NOT any-output-fires) OR any-input-fires`. That
  is one flip-flop, one AND2 and m+n-1 OR2 gates for n input and m output
  transitions. Since the net is safe, a place cannot receive a second token.
  The design adds two ports: a synchronous clear, used at reconfiguration,
  and a load port through which Interface In sets the starting marking.
* `pn_transition`: an AND of all input places and all guards. The guards
  come from the datapath (here the sign bit of `x`). Every transition also
  has a `run` guard, so a context does nothing until the controller has
  finished loading it.

## Knowing when a context is finished (`end_ctx_detect`)

A context cannot just watch its output places. Take C2: whether it has
finished depends on which of p2 and p3 held the token at the start, and its
own places lose that token as it runs. The **IMHF** (initial-marking hold
flip-flops) capture the input-place marking as it is written in and keep it
for the whole run.

A combinational matcher compares `{output-place marking, IMHF}` with a list
of end patterns. The patterns are a module parameter, produced together with
the partitioning:

* C1: p0 held, and {p3,p2} = 01 or 10.
* C2: {p3,p2} held = 01 or 10, and p4 = 1.

`IntSw` is high while a pattern matches. If a context is loaded with no
starting token, no pattern ever matches and `IntSw` never rises. The
testbenches check this case.

## Crossing a context boundary (`ctx_if_in`, `ctx_if_out`, `mem_buffer`)

State moves over an 8-bit bus, one word per clock cycle.

* Interface In decodes a word address into per-bit write enables. Places,
  IMHF and data registers load directly from it, so a written word is in
  place on the next clock edge.
* Interface Out is a word multiplexer with an asynchronous read.

Word 0 of each interface holds the place bits. The variables follow, each in
whole bytes with the low byte first:

| context | input words | output words |
|---|---|---|
| C1 | 0:{p0} 1-2:a 3-4:b | 0:{p3,p2} 1-2:x |
| C2 | 0:{p3,p2} 1-2:a 3-4:b 5-6:x | 0:{p4} 1-2:y |

The buffer (`mem_buffer`, 256 x 8, asynchronous read) is divided into
16-byte regions, one per invocation of `f`:

| byte | 0 | 1-2 | 3-4 | 5 | 6-7 | 8 | 9-10 |
|---|---|---|---|---|---|---|---|
| content | p0 token | a | b | {p3,p2} | x | p4 token | y |

The functions `in_ofs` and `out_ofs` in `mc_pkg` map each context's
interface words to region offsets.

## Switching and the two-stage pipeline (`switch_ctrl`, `fpga_slot`)

This is the part that needs the most care.

### The FPGA model

`fpga_slot` stands for one static-reconfigurable FPGA.

* A configuration request makes the slot unavailable for `T_REC` cycles.
  The default is 160000 cycles: 16 ms at a 10 MHz clock. The slot raises
  `cfg_last` in the last of those cycles.
* When reconfiguration ends, the new context starts with every flip-flop
  cleared.
* Inside, all contexts are present and one is selected. The others are held
  cleared and disconnected. This is a simulation model of loading a
  bitstream, not a claim about how the device does it.

### The schedule

The controller runs a schedule of up to `MAX_SCHED` = 4 entries. Each entry
is `{context, buffer region base}`. For each entry it goes through these
states:

```
CFG  -> XIN -> EXEC -> XOUT
(reconfigure)  (write input words)  (run until IntSw)  (read output words)
```

In **single-FPGA mode** (`two_stage = 0`) only slot 0 is used, and every
switch costs reconfiguration plus transfer. The busy time is

```
T = sum_i ( T_rec + in_i + T_Ci + 1 + out_i )
```

In **two-stage mode** (`two_stage = 1`), the controller asks the other slot
to reconfigure with C_i+1 in the last input-transfer cycle of C_i, so
reconfiguration and execution overlap. EXEC then ends only when two things
hold: C_i has raised `IntSw`, and the other slot is ready. The controller
reads C_i's outputs from one slot and writes C_i+1's inputs into the other.
The slots alternate: contexts 1 and 3 run on slot 0, contexts 2 and 4 on
slot 1.

```
T = T_rec + T_D0 + sum_{i=1..N-1} ( max(T_rec, T_Ci) + 1 + T_Di ) + T_CN + 1 + T_DN
```

In this formula:

* T_D0 is the number of input words of C1;
* T_Di is the number of output words of C_i plus the input words of C_i+1;
* T_DN is the number of output words of the last context;
* the `+1` per context is the cycle in which `IntSw` is taken. Without it,
  this is the textbook formula for the scheme.

When every context runs at least as long as a reconfiguration, the
`max(...)` terms reduce to the execution times. Then only the first
reconfiguration is exposed.

In the example, contexts take 1 to 2 cycles and reconfiguration takes
160000. The pipeline therefore saves almost nothing: 640041 cycles against
640046 for the four-context schedule. The gain grows with the contexts' run
time. `tb_mc_top` uses a 1-cycle reconfiguration to show the case where the
switch waits on execution.

### Host side and handshake

`start` is sampled while the controller is idle. `two_stage`, `sched_len`
and `sched` must be held until `done`, a one-cycle pulse. `busy` is high for
exactly the number of cycles given by the formulas above. While `busy` is
high, the controller owns the buffer and the host's writes are ignored. An
assertion flags a start with an empty schedule.

## Using `mc_top`

1. Hold `busy` low. For each invocation k, write into region base 16k:
   * byte 0 = 1 (the token of p0);
   * bytes 1-2 = `a`, low byte first;
   * bytes 3-4 = `b`, low byte first.
2. Set `sched[2k] = {CTX_C1, 16k}` and `sched[2k+1] = {CTX_C2, 16k}`, and
   set `sched_len`.
3. Pulse `start` and wait for `done`.
4. Read `y` from bytes 9-10 of the region. Byte 8 is 1 once the run has
   completed.

| parameter | default | meaning |
|---|---|---|
| `T_REC` | 160000 | reconfiguration time in cycles (16 ms at an assumed 10 MHz) |
| `MAX_SCHED` | 4 | schedule entries (four contexts, as in the pipeline picture of the scheme) |
| `BUF_DEPTH` | 256 | buffer bytes (own choice) |

The bus width (8), variable width (16) and interface layout are in
`mc_pkg`.

## Simulation

Every testbench checks itself. It prints one line,
`TB_RESULT checks=N failures=M`, and has a watchdog. From the directory
holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/mc_pkg.sv tb/tb_mc_top.sv --top-module tb_mc_top -o sim && ./obj_dir/sim
```

For another bench, replace `tb_mc_top` with its name.

| testbench | what it shows |
|---|---|
| `tb_mc_top` | Two copies of the top run side by side. In one, reconfiguration (4 cycles) is longer than any context; in the other (1 cycle) it is shorter than C1. Random inputs are used in both modes. It checks results, the exact cycle count and that host writes during a run are ignored. It counts reconfigurations, ends of context, both branches, both products, overlap, and both kinds of wait. |
| `tb_mc_top_full` | The top at its default sizes, with 160000-cycle reconfiguration. It runs four contexts in each mode in about a second of simulation. |
| `tb_switch_ctrl` | Random schedules of 1 to 4 contexts on real slots. It checks the order of configuration requests, the slot alternation and the cycle-count formulas. |
| `tb_fpga_slot` | Reconfiguration timing, clearing and selection of contexts. |
| `tb_ctx_c1`, `tb_ctx_c2` | Each context alone: results, end timing (2 and 1 cycles), no progress without `run`, no end without a starting token. |
| `tb_end_ctx_detect`, `tb_ctx_if_in`, `tb_ctx_if_out`, `tb_mem_buffer`, `tb_pn_place`, `tb_pn_transition` | Cell tests against reference models. |

## How far to trust it, and where it departs from the scheme

* **The switching routine is hardware here.** In the scheme it is software
  on a host microcontroller, started by the `IntSw` interrupt. It is built
  as a state machine that moves one word per clock, so the timing follows
  that choice, not the speed of any processor.
* **Reconfiguration is modelled.** It is simulated by selecting among
  contexts that are always present (see `fpga_slot`). Real bitstreams,
  configuration ports and device areas are outside this RTL.
* **Only the small example is built.** The larger application of the scheme
  is a numerical solver of a differential equation, with 40 places and
  39 transitions in 3 or 4 contexts of at most 5000 gates each. Its net,
  f(x) and context contents are not available, so it is not implemented.
  The schedule and buffer would hold its 3 or 4 contexts and 45 to 56 bytes
  of traffic. However, the 3-bit interface word index limits a context to
  8 words per direction.
* **Partitioning is done offline.** The algorithm that groups transitions
  into contexts, and its area and time estimates, are design-time software.
  Their results for the example appear as constants: the context contents,
  the buffer maps in `mc_pkg` and the end patterns in each context.
* **Own choices, not taken from the scheme:**
  * 16-bit variables and an 8-bit bus;
  * the `run` guard on every transition;
  * one cycle per transition;
  * byte layouts;
  * the 256-byte buffer;
  * the schedule format;
  * the 10 MHz clock used to turn 16 ms into cycles;
  * host access to the buffer only while idle.
* **Lint.** The remaining lint messages are unused-signal notes: IMHF
  outputs and the slot's `loaded` output, which are left for observation.
