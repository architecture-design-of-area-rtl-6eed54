# SRAM-based multi-symbol state stage for an H.264/AVC CABAC arithmetic encoder

CABAC, the arithmetic coder of H.264/AVC main and high profiles, gives every
binary symbol a *context* (ctx). There are 460 contexts. Each one keeps an
adaptive probability state {state, MPS}: a 6-bit state index and the value of
the most probable symbol. Coding a symbol means reading its context's pair,
using it to split the coding interval, updating it and writing it back. The
next symbol may have the same context, so it may need the pair that has just
been updated.

Keeping 460 pairs in flip-flops makes this read-update-write loop trivial,
but it costs most of the encoder's area: hundreds of scattered registers and
wide multiplexers, for only a handful of pairs used per cycle. SRAM is much
denser, but it brings two problems:

* **Latency bubbles.** An SRAM access with registered inputs and outputs
  splits the work into address generation, read, update and write. A symbol
  that follows another with the same context would have to wait two cycles
  for the write, which limits a naive design to 1/3 symbol per cycle.
* **Too few ports.** Coding S symbols per cycle needs S reads and S writes
  per cycle, but an SRAM has at most two ports.

This RTL implements the architecture described in *Architecture Design of
Area-Efficient SRAM-Based Multi-Symbol Arithmetic Encoder in H.264/AVC*. It
is the **state stage** of that encoder. It takes up to S symbols per cycle
(ctx, bin, bypass flag) and delivers them in order, each with the
{state, MPS} it must be coded with. The pairs live in B two-port SRAM banks.
Four techniques recover the throughput:

1. **Data forwarding.** In-flight symbols pass updated pairs to younger
   symbols of the same context through registers. This removes the bubbles:
   one symbol per cycle, for any context sequence.
2. **Modular banks.** Context ctx is stored in bank `ctx % B` at word
   `ctx / B`. Neighbouring symbols tend to have consecutive contexts, so they
   tend to land in different banks.
3. **Throw-backward / catch-forward.** An update that a younger symbol of the
   same context catches is not written to SRAM. A symbol that catches a
   forwarded pair does not read SRAM. Repeated contexts, which are common,
   then save ports instead of costing them.
4. **Read/write isolation.** Reads and updates go ahead for every symbol that
   can do them, not just for the symbols that advance this cycle. This
   prepares later cycles.

The default build is four symbols per cycle with four banks. The same RTL,
with `S`/`B` set to 1/1 or 2/2, gives the one- and two-symbol versions.

## The window: AG, read and update stages

`state_stage_ctrl` holds a window of `3*S` symbol slots. Slot 0 is the oldest.

```
 slot:   3S-1 ... 2S | 2S-1 ... S | S-1 ... 0
 stage:  AG          | read       | update      --> out_sym (registered)
         new symbols enter here                   oldest symbols leave here
```

Every cycle the whole window moves `shift` places towards slot 0, where
`0 <= shift <= S`:

* the `shift` oldest symbols leave the update stage;
* the symbols behind them move down;
* up to `shift` new symbols enter the freed slots at the young end of the AG
  stage.

A freed slot that gets no new symbol holds a bubble. A bubble counts as
trivially readable and writable.

`shift` is `min(read_num, write_num)`:

* **read_num** counts the AG-stage slots, from the oldest, that are
  *readable*. A slot is readable if its symbol needs no SRAM read (bypass or
  termination, pair already known, or a read already in flight), will be
  served by forwarding, or was granted a read port this cycle.
* **write_num** counts the update-stage slots, from slot 0, that are
  *writable*. A slot is writable if its symbol has been updated and its new
  pair has gone somewhere: thrown to a younger symbol or written to its bank.
  Bypass and termination symbols need no update.

These two rules give the stage's timing guarantee. A symbol moves from AG to
read only once its pair is on its way, and it leaves the update stage only
once its new pair is safe. A read issued from the AG stage returns two cycles
later. A symbol needs at least two cycles to get from AG to update, so SRAM
data never arrives after it is needed.

## Where each symbol's {state, MPS} comes from

This is the heart of the design. Each slot carries its own pair register
(`st`) and three flags:

* `have`: `st` holds the pair this symbol must be coded with;
* `age`: an SRAM read is in flight; the data arrives when `age` is 1;
* `done`: the symbol is updated and its new pair is disposed of.

Every cycle, each slot's context is compared with every older slot in the
window. A *regular* symbol is one that is not bypass or termination. A
regular symbol gets its pair from the first rule that applies:

1. **Constant.** A bypass symbol, or a termination symbol (ctx 276), uses
   {63, 0} and never touches the SRAM.
2. **Register path.** An older regular symbol with the same context is still
   in the window. The symbol takes the pair of the **nearest** such symbol at
   the moment that symbol is updated. This covers symbols that were updated
   earlier but have not left yet. The pair is caught in whatever stage the
   younger symbol is. In the update stage this forwarding is combinational:
   a chain of S `state_update` units lets several symbols of one context be
   updated in the same cycle.
3. **SRAM path.** No older symbol of the context is in flight. The symbol
   requests a read of bank `ctx % B` while in the AG stage.

**Why the SRAM copy is never stale.** A symbol reads SRAM only when no older
symbol of its context is in the window. Every older symbol of that context
has therefore already left. A symbol leaves only after its update is
disposed of: either written (the write reaches the array at the falling edge
of the next cycle), or thrown to a younger symbol of the same context that
is still in the window. The read reaches the array one falling edge later
than that write at the earliest. So a read and a write of the same word
never share a falling edge. The bank returns the old word in that case
anyway.

**Disposing of an update.**

* With throw-backward/catch-forward on (`THROW_CATCH=1`), an updated pair
  that has a younger same-context symbol in the window is thrown to it and
  not written.
* Otherwise, and always when `THROW_CATCH=0`, it needs the bank's write
  port.

With `THROW_CATCH=0`, every regular symbol also reads SRAM. Forwarding still
decides the value, and SRAM data that arrives for a symbol with an older
same-context symbol in flight is ignored. This is the "modular banks only"
configuration.

**Port arbitration.** Each bank has one read port and one write port per
cycle. Both go to the oldest requester.

* With `RW_ISOLATION=1`, a symbol further back may take a free port even if
  an older symbol could not get one. It then reads or updates early, and
  this shows as `early_rd` / `early_wr` events.
* With `RW_ISOLATION=0`, only the symbols that advance this cycle read or
  update.

## Interface and timing (`sram_mae`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (clears the window, not the SRAM) |
| `in_num`, `in_sym[S]` | in | `in_sym[0..in_num-1]` are offered symbols, lane 0 oldest; `sym_in_t` = {ctx[8:0], bin, bypass} |
| `in_take` | out | how many offered symbols are accepted at this clock edge: `min(in_num, shift)`, combinational |
| `out_num`, `out_sym[S]` | out | registered; `out_sym[0..out_num-1]` leave in order with `ps` = {state, MPS} before update, and a `term` flag |
| `init_we`, `init_ctx`, `init_ps` | in | load one context's initial pair per cycle; only while `busy` is low and nothing is offered |
| `ev` | out | registered event counts of the previous cycle (`mae_ev_t`) |
| `busy` | out | symbols in flight |

Parameters:

* `S`: symbols per cycle (default 4).
* `B`: number of banks (default 4). Any value from 1 to 460 is accepted; the
  bank depth is `ceil(460/B)`.
* `THROW_CATCH` (default 1) and `RW_ISOLATION` (default 1): switch the two
  port-saving techniques.

Timing:

* **Full rate.** When no two symbols of a cycle need the same bank port,
  `shift = S` every cycle.
* **Latency.** A symbol accepted at clock edge *e* is on `out_sym` after edge
  *e*+3: one cycle each in AG, read and update.
* **One symbol per cycle.** With `S=1` the stage always accepts one symbol
  per cycle, whatever the contexts.
* **No back-pressure on the output.** The consumer, the range/low stage,
  must take up to S symbols per cycle.
* **Context initialisation.** The initial pairs depend on the slice QP and
  are computed outside. They go through the bank write ports; the last one
  reaches the array one cycle after it is presented.

`ctx_sram_bank` models one bank as an integrator would wrap an SRAM macro:

* address, write data and enables are registered on the rising edge;
* the array is read and written on the falling edge;
* read data is registered again on the rising edge.

Read data is valid during the second cycle after the request.

## Throughput

`tb/tb_bank_sweep.sv` runs the same synthetic stream through 48
configurations: 2-symbol stages with 1 to 6 banks and 4-symbol stages with
1 to 10 banks, each with the three technique sets. The stream mixes runs of
equal and consecutive contexts, a hot set of contexts, random contexts,
bypass and termination symbols, and the input always offers S symbols.

Throughput loss is `1 - (symbols per cycle)/S`. For example:

| configuration | banks only | + throw/catch | + isolation |
|---|---|---|---|
| S=2, B=2 | 33.0 % | 8.1 % | 7.5 % |
| S=4, B=4 | 59.6 % | 17.6 % | 14.8 % |
| S=4, B=8 | 55.7 % | 8.3 % | 7.2 % |

The published measurements on coded video are 25 %, 16 % and 8.2 % for two
symbols with two banks, and 51 %, 36 % and 17 % for four symbols with four
banks. They correspond to 1.84 and 3.32 symbols per cycle. The synthetic
stream follows the same trends, but its numbers depend on how it was made
and are not a substitute for real bitstreams.

## What is not here, and where this RTL departs from the description

* **Other CABAC parts are absent.** The range/low coding stage (rangeLPS
  lookup, interval update, renormalisation, bit output) is not included.
  Neither are binarization and context modelling. The symbols and their
  pairs enter and leave on ports where those parts would connect.
* **Transition rules come from the standard.** `state_update` implements the
  H.264/AVC state transition: MPS moves up to a cap of 62; LPS follows the
  transIdxLPS table; an LPS in state 0 flips the MPS. The architecture
  description only names the update.
* **General register path.** The one-symbol design described uses about two
  pair registers, two comparators and three multiplexers. This RTL uses one
  general structure for any `S`, at some extra cost:
  * a pair register and three small flags in every window slot;
  * a context comparator between every pair of slots (`3S(3S-1)/2` of them).
* **Early reads with a pending older match.** In the description, read/write
  isolation may read a symbol "in advance" even when an older symbol has the
  same context, and the forwarded value later overrides it. Here that only
  happens with `THROW_CATCH=0`. With `THROW_CATCH=1` such a symbol simply
  waits for the forwarded pair and uses no read port.
* **Own choices.** The in/out handshake, bubbles, context initialisation
  port, reset, event outputs and the word mapping `ctx / B` are this
  design's own; the description does not cover them.
* **Bubbles slow a colliding start.** The whole window moves by `shift`, so
  bubbles ahead of a symbol also move only `shift` places. When ports
  collide (for example `B < S`), the first symbols after an idle period take
  longer than three cycles to come out.
* **Area and timing are not reproduced.** The published area and
  critical-path figures belong to a 0.18 µm standard-cell implementation
  with real SRAM macros. Here the banks are behavioural arrays.

## Files

| file | contents |
|---|---|
| `rtl/mae_pkg.sv` | types (`pstate_t`, `sym_in_t`, `sym_out_t`, `mae_ev_t`), constants, `ctx_bank()` / `ctx_word()` |
| `rtl/sram_mae.sv` | top: control, B banks, initialisation path |
| `rtl/state_stage_ctrl.sv` | window, comparisons, forwarding, port scheduling, shift |
| `rtl/ctx_sram_bank.sv` | one two-port bank with registered I/O |
| `rtl/state_update.sv` | {state, MPS} transition for one symbol |
| `tb/mae_tb_pkg.sv` | sequential reference model of the transition |
| `tb/mae_env.sv` | stimulus, in-order reference check, event counting for one `sram_mae` |
| `tb/tb_sram_mae.sv` | default configuration, end to end (about 20 000 symbols) |
| `tb/tb_state_stage_ctrl.sv` | six configurations, including S=1 full-rate and both techniques off |
| `tb/tb_ctx_sram_bank.sv`, `tb/tb_state_update.sv` | unit tests |
| `tb/tb_bank_sweep.sv` | throughput loss over banks and technique sets |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`mae_env` does the following:

* loads every context with a random pair;
* streams four phases: full rate, mixed, bank pressure, and a read-back of
  every context;
* compares each symbol leaving the stage, and its pair, with a sequential
  reference model.

It also checks:

* S accepted symbols every cycle in the full-rate phase when `S <= B`;
* the three-cycle latency;
* that each mechanism happened at least once: SRAM read and write,
  register-path catch, throw, read and write port collision, stall, early
  read and write, bypass, termination, and input bubbles.

Assertions in the RTL check two things: a symbol never leaves un-updated,
and initialisation happens only while idle.

To simulate with Verilator 5, run from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mae_pkg.sv tb/mae_tb_pkg.sv tb/tb_sram_mae.sv --top-module tb_sram_mae
./obj_dir/Vtb_sram_mae
```

Replace `tb_sram_mae` with any other testbench name. The bank sweep takes
about two minutes to compile.
