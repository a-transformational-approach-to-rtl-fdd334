# Software-pipelined self-timed circuits: factorial and integer square root

A loop that carries an *accumulating parameter* (the `a` in
`fact(n, a) = fact(n-1, n*a)`) does not need that parameter to decide
whether to go round again. If the parameter is moved into a process of its
own, the loop can start its next iteration while the previous update of the
parameter is still being computed. This is software pipelining obtained by a
program transformation, and in a self-timed (handshake) circuit it comes for
free: the two processes simply run concurrently and meet only on channels.

This repository holds SystemVerilog for three circuits built that way, or
used to explain how such circuits are produced:

* **Pipelined factorial**: a driver process `factpipe` counts `n` down and
  sends each value to an accumulator process `pa`, which multiplies in the
  background (`fact_system`). An unpipelined variant of the same circuit
  serves as a baseline for comparison.
* **Pipelined integer square root**: a multiplier-free square root whose
  loop variable `v` lives in its own process `pv` (`psqrt`).
* **Refined process `S[x] <= p?y -> S[f(x,y)]`**: the circuit an input
  rendezvous and a register transfer expand into: a broadcast C-element, a
  register per receiver, a completion tree, argument/result registers around a
  function block (`refine_example`).

`shilpa_top` places all three side by side.

## Signalling: two-phase handshakes with bundled data

Every connection between blocks is a *channel*: a request wire, an
acknowledge wire and, if it carries a value, a data bus.

* An event is a **toggle** of a wire, not a level. A sender toggles `req`;
  the receiver answers by toggling `ack`. A request is pending while
  `req != ack`; the channel is idle when they are equal.
* The data bus is **bundled** with the request: it is stable from the request
  toggle until the acknowledge toggle.
* Control flow is made of events too. A C-element joins two events (its
  output toggles once both inputs have). An XOR merges events from mutually
  exclusive places (its output toggles when any input does). A test block
  such as `tog_zero` answers a request with a toggle on one of two outputs,
  `t` or `f`, which steers the event into one branch of a choice.

The original circuits are delay-insensitive in their control. Here they are
modelled **synchronously**: every state-holding element (C-element,
register, test, function block, controller) is a flip-flop stage on one
clock `clk`, and only the XOR merge is combinational. Each element therefore
costs one clock of delay, the bundling constraint is met by construction,
and the design simulates in any cycle-based simulator and synthesizes to
ordinary flip-flop logic. The protocol on the wires, toggle for toggle, is
that of the self-timed circuit; the timing is not. All blocks share an
active-low synchronous clear (`clr_n`, called `CLR` in `factpipe`), which sets
every request/acknowledge wire to 0 and so puts every channel in its idle
phase.

## Element library

| module | pins | behaviour |
|---|---|---|
| `tog_celem` | `a`, `b`, `out`, `mc_n` | Muller C-element: `out` takes the inputs' value when they agree. `mc_n` is the master clear. |
| `tog_xor` | `in[N]`, `out` | merge: `out = ^in` |
| `tog_reg` | `req`/`ack`, `d`/`q` | a `req` toggle loads `d` and toggles `ack` (the "reg8" of the netlists; width `W`) |
| `tog_amux` | A: `areq a aack`, B: `breq b back`, C: `creq c cack` | passes channel A or B on to C and returns C's acknowledge to the requester |
| `tog_zero` | `a`, `req`, `t`, `f` | on `req`, toggles `t` if `a == 0`, else `f` |
| `tog_decr` | `a`, `req`, `y`, `ack` | on `req`, `y = a - 1`, then `ack` |
| `tog_fab` | `a`, `b`, `req`, `y`, `ack` | function action block with one fixed operation `OP`: `2a`, `4a`, `a/2`, `a/4`, `-a` or `a+b` |
| `tog_test` | `a`, `b`, `req`, `t`, `f` | two-way test `OP`: `a < b`, `a <= 2` or `a > 0` (signed) |
| `bcell` | `ctl`, `in[N]`, `out[N]` | broadcast C-element: `out[i]` fires when both `in[i]` (receiver `i` ready) and `ctl` (sender) have toggled |
| `ctree` | `in[N]`, `out` | completion tree of C-elements: `out` fires when all inputs have; latency `ceil(log2 N)` |

## The pipelined factorial

The starting point is the tail-recursive definition

    fact[n,a] <= (n=0) -> result!a -> again?n -> fact[n,1]
               | (n/=0) -> fact[n-1, n*a]

Moving `a` into its own process and removing it from the loop gives two
processes:

    factpipe[n] <= (n=0)  -> senda! -> again?n -> factpipe[n]
                 | (n/=0) -> mult!n -> factpipe[n-1]
    pa[a]       <= mult?n -> pa[n*a]
                 | senda? -> result!a -> pa[1]

`factpipe` never waits for a product. It hands `n` to `pa` and decrements at
once.

**`factpipe`** is a netlist of library elements:

```
 START ─┐
 AACK ──┼─XOR3──► ZERO.req   ZERO.a = register n = MULT_DATA
 BACK ──┘         ZERO.t ──► SENDA_OUT        ZERO.f ──► MULT_OUT
 SENDA_IN, AGAIN_IN ──► C ──► AMUX.breq   (AMUX.b = AGAIN_DATA)
 MULT_IN ──► decr.req (decr.a = n) ──► decr.ack ──► result reg.req
 result reg.ack/q ──► AMUX.areq/a
 AMUX.creq/c ──► register n ──► reg n.ack ──► AMUX.cack
 AMUX.back = AGAIN_OUT
```

One toggle on `START` makes `ZERO` test `n`. If `n /= 0`, `F` requests
`mult!n`. Its acknowledge `MULT_IN` starts the decrementer, and `n-1` goes
through the result register and AMUX input A back into register `n`. The AMUX
acknowledge `AACK` re-enters the XOR, which is the tail call. If `n = 0`, `T`
requests `senda!`. The C-element waits for both the acknowledge `SENDA_IN` and
a new argument on `AGAIN_IN`, loads `AGAIN_DATA` through AMUX input B, and
`BACK` acknowledges the argument (`AGAIN_OUT`) and re-enters the XOR.

**`fact_pa`** is a small controller. On `mult` it latches `n`, acknowledges
immediately and multiplies in `MUL_LAT` clocks (default 1). It does not serve
another request until the product is in `a`. On `senda` it acknowledges,
offers `a` on `result`, and resets `a` to 1 once the result is taken. While
`pa` multiplies, `factpipe` already runs its decrement and zero test. The
testbenches measure this overlap.

**`fact_system`** joins the two. After clear, `n = 0` and `a = 1`, so the
first `start` toggle delivers `0! = 1`. Every argument on `again` then
produces `n!` on `result`, modulo `2**ACC_W`. `n` is 8 bits. `ACC_W = 32`
gives exact results up to `12!`.

### What the pipelining buys

Setting `PIPELINED = 0` on `fact_system` gives the unpipelined version of
the same pair of processes, built from the same elements:

    fact[n,a] <= (n/=0) -> mult!(n,a) -> rslt?w -> fact[n-1,w] | ...
    pa[]      <= mult?(x,y) -> rslt!(x*y) -> pa[]

`pa` then returns the `mult` acknowledge only when the product is ready, so
the decrement (which that acknowledge starts) waits for the multiply. `a`
stays in `pa` instead of travelling to the driver and back. The order of
events is the same.

`fact_pipeline_tb` runs `n = 0..12` through both versions side by side. The
clocks from an `again` request to its result are:

| n  | latency 1: pipelined / not | latency 4: pipelined / not | latency 8: pipelined / not |
|----|----------|-----------|-----------|
| 0  |  6 / 6   |  6 / 6    |  6 / 6    |
| 1  | 13 / 14  | 13 / 17   | 15 / 21   |
| 5  | 41 / 46  | 41 / 61   | 51 / 81   |
| 12 | 90 / 102 | 90 / 138  | 114 / 186 |

Each nonzero step costs `7 + MUL_LAT` clocks unpipelined. Pipelined it costs
`max(7, MUL_LAT + 1)`. The multiply is hidden behind the seven-clock loop
until it outgrows it. The loop is the zero test, `pa`'s acknowledge, the
decrement, the result register, the AMUX, register `n`, and the AMUX
acknowledge.

## The pipelined integer square root

The algorithm uses only shifts, additions and comparisons:

    w = 2; while (2a >= w) w = 4w;  u = -a; v = w/2;
    while (w > 2) { w = w/4; v = (v-w)/2; t = u+v;
                    if (t <= 0) { u = t; v = v+w; } }
    z = (v-1)/2                       -- z = floor(sqrt(a))

`v` is an accumulating parameter of the loop, so it gets its own process:

* **`sqrt_getw`** takes `a` on `get_number`. It compares `2a < w` and
  multiplies `w` by 4 until the test holds. It then sends `v = w/2` to `pv`
  on `initv` and starts the loop on channel `go` with `w` and `u = -a`. It
  takes the next `a` once the loop has finished.
* **`sqrt_after_getw`** runs the loop on `w`, `t` and `u`. Each turn it sets
  `w := w/4` and sends `w` on `div2minusvw` (pv: `v := (v-w)/2`). It then
  asks for `v` on `vport` and receives it on `vportack`, and computes
  `t = u + v`. If `t <= 0` it sets `u := t` and sends `w` on `addw`
  (pv: `v := v+w`). When `w <= 2` it sends `send_final_answer`.
* **`sqrt_pv`** serves its five input channels as a guarded choice. It
  answers `vport` with `v` on `vportack`, and `send_final_answer` with
  `(v-1)/2` on `final_answer`.

`sqrt_getw` and `sqrt_after_getw` are netlists of library elements, like
`factpipe`. Each assignment in the process text becomes a function block
(`tog_fab`). Each test becomes a `tog_test` whose `t`/`f` events choose the
branch. A variable loaded from two places (`w` from `go` or from `w/4`, and
`u` from `go` or from `t`) sits behind a `tog_amux`. The points where the loop
is re-entered (start, `t > 0`, `addw` acknowledged) meet in one XOR. In
`sqrt_getw`, a C-element joins each `get_number` request with the *inverted*
acknowledge of `go`. The first request therefore passes at once, and each
later one waits until the previous loop is done.

In this clocked model the first `initv` follows a `get_number` request after
`8 + 5k` clocks, where `k` is the number of times-4 steps. Each step is five
elements: the test, `times4`, the AMUX, the register, and the AMUX
acknowledge.

Because `pv` acknowledges `addw` as soon as it has `w`, the loop goes on to
its next `w/4` and test without waiting for the addition. Because the loop
acknowledges `go` once `pv` has accepted `send_final_answer`, `getw` already
searches for the next `w` while `pv` is still delivering the previous
answer.

The datapath is 16 bits of two's complement (`W = 16`). `w` must stay
representable, which limits the input to **`a <= 4095`**. Every value in that
range is checked in simulation.

## Refined input action and register transfer

`input_channel` is the expansion of an input rendezvous `p?y` shared by `N`
receivers:

* The sender drives `data` and toggles `ctl`.
* Receiver `i` toggles `rdy[i]` when it reaches the input.
* `bcell` fires `out[i]` when both have toggled. This loads receiver `i`'s
  register `y[i]`, whose acknowledge goes to `ctree`.
* The tree's output `done` tells the sender that every receiver has latched
  the value.
* With `BROADCAST = 0` (multicast), receiver `i` is released by its own
  register's acknowledge. With `BROADCAST = 1`, all receivers are released
  by `done` together.

`rt_update` is the expansion of `x <- f(x, y)`:

1. The argument registers `arg_1 <- x` and `arg_2 <- y` load in parallel.
2. A C-element joins their acknowledges into `fab_init`.
3. The function block answers on `fab_done` with `fab_r`, which loads the
   result register.
4. That register loads `x`.
5. The write of `x` is the `done` event.

`f` is arbitrary, so the function block sits outside the module. The loop
takes 3 clocks plus the function block's time. `refine_example` connects
the two modules into the process `S`, with an XOR merging `start` and the
tail call into `S`'s "ready" event.

## Top level

`shilpa_top` has ports `fact_*` (start, `again`, `result`, `mul_busy`),
`sqrt_*` (`get_number`, `final_answer`) and `ex_*` (channel `p`, the other
receivers of `p`, and the function block of `S`). Parameters: `FACT_W = 8`,
`ACC_W = 32`, `MUL_LAT = 1`, `SQRT_W = 16`, `EX_W = 8`, `EX_N = 2`. The shared
widths are in `shilpa_pkg`.

## Simulation

Every module has a self-checking testbench `tb/<module>_tb.sv`, and
`tb/fact_pipeline_tb.sv` compares the pipelined and unpipelined factorial.
Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if the
design hangs. To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/shilpa_pkg.sv tb/psqrt_tb.sv --top-module psqrt_tb
    ./obj_dir/Vpsqrt_tb

`shilpa_top_tb` runs all three circuits at the default sizes. It computes
factorials of 0..12 and random arguments, the square root of every `a` in
0..4095, and 40 transfers through `S`. It also counts each mechanism and
requires it at least once: the `n /= 0` and `n = 0` branches, multiplication
overlapping the decrement, the times-4 step, both outcomes of `t > 0`, and a
multicast receiver released before the sender's `done`. The reference values
(`n!`, `floor(sqrt(a))`, the `f` models) are computed in the testbenches,
independently of the RTL.

## How closely this follows the source design

Taken from the source design:

* the process descriptions of both circuits;
* the element set and pin names of the factorial netlist, and its 8-bit
  width;
* the 16-bit width and channel names of the square root;
* the structure of the refined input channel and of the register-transfer
  sequence.

This implementation's own choices:

* **Clocked model.** A one-clock-per-element synchronous model stands in for
  the self-timed gates, so absolute speed and any delay-dependent behaviour
  of the original are not represented.
* **Wiring of the square root.** For the square root, the source design
  fixes the element types (registers, AMUXes, function blocks, an `LT` test,
  C-elements, XORs) and the port names. It does not describe how they are
  connected. `sqrt_getw` and `sqrt_after_getw` use those element types,
  wired as the process text requires. This wiring is derived here, not
  copied.
* **Controllers.** `fact_pa` and `sqrt_pv`, whose circuits are not given at
  all, are written as small controllers from their process descriptions.
* **`AGAIN_OUT`.** The source description does not say which element drives
  `AGAIN_OUT`, the acknowledge of `again?n`. In `factpipe` it is taken to be
  the AMUX's B-side acknowledge, which follows the load of the new `n`.
* **Sizes and timing of `pa`.** The accumulator width (32), the multiplier
  (a plain product after `MUL_LAT` clocks) and the input limit of the square
  root (`a <= 4095`) are not specified by the source.
* **Request order.** Where a guarded choice or the AMUX could see two
  requests at once, a fixed priority is used. The surrounding processes never
  do this.
* **No unpipelined square root.** The unpipelined square-root loop, which
  keeps `v` as a loop variable, is not built. In this model `pv` updates `v`
  in the same clock in which it takes the request, so the loop would not
  wait any longer without pipelining, and the comparison would show nothing.
  The testbenches check the pipelined circuit against a plain search for
  `floor(sqrt(a))`.
* **`bcell` and `ctree` sizes.** `N` defaults to 2, and `ctree` is a
  balanced tree of two-input C-elements.
