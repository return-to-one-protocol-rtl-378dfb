# Return-to-One dual-rail QDI logic

Quasi-delay-insensitive (QDI) circuits send data as dual-rail words in a
4-phase protocol. Every data word is followed by a *spacer*, a non-code value
that all wires return to before the next word. The spacer is usually all-0s.
Most of the state in such circuits sits in C-elements. A C-element whose output
is 0 leaks much more than one whose output is 1: in 65 nm CMOS, measured
spacer-state leakage drops by roughly 35-50 %.

So this design uses the **all-1s spacer** instead, called Return-to-One (RTO).
Every register and every DIMS gate idles with its C-elements at 1. A valid
word appears when one rail per bit **falls**, and it is withdrawn when that
rail rises again. The circuit changes very little:

* registers are built from *settable* C-elements, and their request is active low;
* DIMS logic uses AND gates where the all-0s version uses OR gates, and the
  output rails are relabelled.

Each valid word still costs one falling and one rising edge per rail, so speed
and dynamic power are unchanged.

This repository holds synthesizable SystemVerilog for these building blocks:

* the C-element;
* the settable C-element;
* the RTO dual-rail register;
* the RTO DIMS half adder;
* a pipeline stage that joins the register and the half adder.

Each has a self-checking testbench.

## Code words

A dual-rail bit `dr_t` (see `rtl/rto_pkg.sv`) is a packed pair `{t, f}`:

| value     | t | f | note                       |
|-----------|---|---|----------------------------|
| spacer    | 1 | 1 | idle value under RTO       |
| logical 0 | 0 | 1 | the t rail falls to send 0 |
| logical 1 | 1 | 0 | the f rail falls to send 1 |
| invalid   | 0 | 0 | never legal under RTO      |

The valid words are the ordinary dual-rail ones. Only the spacer has changed.
`rto_encode`, `rto_decode`, `rto_is_valid` and `rto_is_spacer` convert and
classify these words.

A channel always alternates: spacer → valid → spacer → valid. The 4-phase
handshake looks like this:

1. The sender puts a valid word on the wires.
2. The receiver acknowledges it.
3. The sender returns the wires to the spacer.
4. The receiver withdraws its acknowledge.

Because the spacer is all-1s, in steps 2 and 4 the request/acknowledge of a
register is active low.

## C-elements

`c_element` is the two-input Muller C-element. Its output is 0 when both inputs
are 0 and 1 when both are 1. When the inputs differ, the output holds its last
value. It is written as a latch with enable `a == b` and data `a`. The latch
that lint and synthesis report is intended: it is the element's state keeper.
This element has no reset. It takes a defined value the first time its inputs
agree, which in RTO logic happens as soon as the inputs carry the spacer.

`c_element_set` adds an asynchronous, dominant, active-high `set` that forces
the output to 1. At transistor level, a series PMOS on `set` cuts the pull-up
network off, and an NMOS on `set` pulls the internal node low, so the output
inverter drives 1. An RTO circuit needs this element to start in the spacer.
The all-0s design uses a resettable C-element instead.

The three transistor topologies compared for leakage (Sutherland, Martin and
van Berkel) have identical logic behaviour. They exist here only as this logic
function. Their electrical differences cannot be expressed in RTL.

## Dual-rail register (`rto_dr_register`)

The register holds N dual-rail bits with 2·N settable C-elements, one per rail.
Each C-element joins one data rail with the shared active-low request `req_n`:

* `req_n = 0`: a valid word on `d` passes to `q`.
* `req_n = 1`: the spacer on `d` passes to `q`.
* Data and request disagree: the rail holds. So a captured word stays in the
  register after the input has gone back to the spacer, until `req_n` rises.
  And `q` stays at the spacer while new data waits for `req_n` to fall.
* `rst` (active high) sets every C-element, so `q` becomes the spacer.

The register does not care which code it carries, because it works rail by
rail. The same module works for any m-of-n code whose spacer is all-1s. Group
the rails as you need.

`N` defaults to 8. That is a free choice, as is the polarity of `rst`.

## DIMS half adder (`rto_dims_half_adder`)

This is the least obvious part. In delay-insensitive minterm synthesis (DIMS),
one C-element per input combination detects that minterm. Under RTO the active
rail is the low one, so minterm `Mab` falls exactly when A = a and B = b are
both present:

```
M00 = C(A.t, B.t)   M01 = C(A.t, B.f)   M10 = C(A.f, B.t)   M11 = C(A.f, B.f)
```

An output rail must fall when any of its minterms falls, so the OR gates of
the all-0s version become AND gates:

```
S.t = M00 & M11          (sum   = 0)     S.f = M01 & M10   (sum   = 1)
C.t = M00 & M01 & M10    (carry = 0)     C.f = M11         (carry = 1)
```

Compared with the all-0s half adder, `S = OR(M00, M11)` now drives the *true*
rail of the sum rather than its false rail, and likewise for the carry.
This is the true/false swap of the outputs. The reason is that under RTO the
t rail falling means 0.

For the result to be a half adder with the code words above, the minterm
C-elements must take their inputs as listed: M00 on the two t rails, M11 on
the two f rails. A common drawing of the RTO half adder keeps the minterm
inputs of the all-0s version (M00 on A.f/B.f). If it also swaps the outputs, its
carry comes out wrong. This RTL uses the consistent wiring, and the testbench
checks it against A xor B and A and B for all four operand pairs.

The minterm C-elements hold, so the outputs have these properties:

* they stay at the spacer until both operands are valid;
* they stay valid until both operands are back at the spacer;
* they never show the all-0s word.

## Pipeline stage (`rto_ha_stage`, the top)

```
 a,b ──► rto_dr_register(N=2) ──a_q,b_q──► rto_dims_half_adder ──► rto_dr_register(N=2) ──► s,c
             ▲ req_in_n                                                ▲ req_out_n
             rst ─────────────────────────────────────────────────────┘
```

The stage is a 2-bit input register for A and B, the half adder, and a 2-bit
output register for the sum and carry. It has no completion detection, so the
environment drives both requests as ports. In a larger pipeline, the next
stage's acknowledge would drive them.

One complete operation:

| step | action                           | result                              |
|------|----------------------------------|-------------------------------------|
| 1    | valid words on `a`, `b`          | nothing moves while `req_in_n` = 1  |
| 2    | `req_in_n` ← 0                   | operands captured; adder evaluates  |
| 3    | `req_out_n` ← 0                  | sum and carry captured on `s`, `c`  |
| 4    | `a`, `b` ← spacer                | input register keeps the operands   |
| 5    | `req_in_n` ← 1                   | adder returns to spacer; `s`, `c` kept |
| 6    | `req_out_n` ← 1                  | whole stage back at the all-1s spacer |

Steps 1 and 2 may happen in either order. The testbench exercises both.

## Timing model

There is no clock. Every C-element responds in zero time once its inputs agree,
and every gate responds in zero time. Testbenches move one input per time unit
and check the settled values. Delay insensitivity cannot be shown in this
model: the RTL captures logic behaviour, not gate delays.

The monitor `tb/rto_channel_monitor.sv` samples each checked pair a quarter time
unit after it changes. It fails on a valid → valid step or an all-0s word.

## Verification

| testbench                   | what it checks                                                                                   |
|-----------------------------|--------------------------------------------------------------------------------------------------|
| `tb_c_element`              | full tour of the state graph, then a 2000-step random walk; holds after 0 and after 1 counted      |
| `tb_c_element_set`          | set dominates every input pair; 1 is kept after release; random walk with set pulses               |
| `tb_rto_dr_register`        | 500 random 8-bit words through full RTO cycles: wait, capture, keep, release; resets mid-cycle     |
| `tb_rto_dims_half_adder`    | all pairs, either operand first, either operand leaving first, then 1000 random ones; protocol monitor on S and C |
| `tb_rto_ha_stage`           | about 1000 end-to-end operations at the default configuration; mechanism counters; monitors on all outputs |

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Every testbench also fails when its module is broken in one significant way.

To simulate with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
  rtl/rto_pkg.sv tb/tb_rto_ha_stage.sv --top-module tb_rto_ha_stage
./obj_dir/Vtb_rto_ha_stage
```

Replace the testbench name to run any other testbench. Lint with
`verilator --lint-only -Wall -y rtl rtl/rto_pkg.sv rtl/<module>.sv`.

Lint reports latches in both C-element modules; these are intended. Verilator
also claims to find no latch in `c_element_set`, and it flags non-blocking assignments in
a latch; neither changes the behaviour.

## Departures and limits

* **Half-adder wiring.** The minterm inputs are chosen for consistency with
  the swapped outputs (see above). They differ from the usual drawing of the
  RTO DIMS half adder.
* **Free choices** made in this design:
  * the register width (8);
  * active-high `rst`;
  * the composition of the pipeline stage;
  * external requests rather than completion detection.
* **Not modelled.** The leakage figures behind RTO are electrical: transistor
  topologies, static power, 65 nm characterisation. RTL cannot show the saving.
  It can only guarantee that every C-element idles at 1.
* **Other codes.** Only dual-rail (1-of-2) logic is built. The register works
  unchanged for other m-of-n codes. DIMS gates for other codes follow the same
  rule: the minterm is active low, AND gates merge minterms, and each output
  rail falls for its value.
