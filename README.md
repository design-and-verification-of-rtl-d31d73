# Speed-independent multiphase buck controller

A buck converter is controlled by a stream of small decisions: switch the
high-side PMOS on when the output sags, switch it off when the coil current
gets too high, switch the low-side NMOS on to let the current run down, and
switch the NMOS off before the current reverses. A clocked controller takes
these decisions at its sampling clock, so it reacts a clock period late,
burns power while the converter idles, and must synchronise asynchronous
comparator outputs.

This controller has **no clock**. Every decision is an event: a comparator
output changes, a gate driver acknowledges, a timer expires. The control is
built from small speed-independent components that talk over four-phase
request/acknowledge handshakes, so it reacts within a few gate delays and is
quiet when nothing happens. It drives an N-phase converter: in normal
operation the phases take turns, and under high load all of them charge at
once.

The RTL is written at the level of set/reset latches, C-elements and a
mutual-exclusion element, so it can be simulated with plain `verilator`.

## The converter and its signals

Each phase `k` has a PMOS (on when `gp[k]` is high) and an NMOS (on when
`gn[k]` is high) that drive one coil into a shared output capacitor. The
controller's inputs are comparator levels:

| signal | compares | meaning when high |
|---|---|---|
| `uv` | output voltage vs. V_ref | under-voltage: the output needs charge (shared) |
| `hl` | output voltage vs. V_min (< V_ref) | high load: the output is falling despite normal operation (shared) |
| `oc[k]` | coil current vs. I_max | over-current: stop charging this phase |
| `zc[k]` | switching node vs. V_0 | zero crossing: the coil current has run down to zero |
| `gp_ack[k]`, `gn_ack[k]` | gate voltages vs. thresholds | the transistor really is on |

The gate acknowledgements make the drivers part of the handshake: the NMOS
is switched on only after `gp_ack` has fallen and the PMOS only after
`gn_ack` has fallen, so the two transistors of a phase are never on together,
whatever the driver delays.

## One charge cycle

A phase goes through the same cycle every time it is asked to charge:

1. Wait for under-voltage (`uv`).
2. Switch the NMOS off (if it is on), then the PMOS on.
3. Keep the PMOS on until over-current (`oc`), **and at least PMIN**.
4. Switch the PMOS off, then the NMOS on, for **at least NMIN**.
5. Leave the NMOS on until either the next under-voltage of this phase or a
   zero crossing (`zc`), whichever comes first.

Point 5 produces three cases, which are the heart of the charging logic:

* **no ZC**: the next under-voltage comes while the current is still
  flowing; the NMOS is switched off by the under-voltage (continuous
  conduction).
* **early ZC**: the current reaches zero before the next under-voltage; the
  NMOS is switched off at the zero crossing (once NMIN has passed) and both
  transistors stay off until the under-voltage.
* **late ZC**: the under-voltage comes first, and the zero-crossing
  comparator fires only afterwards, while the PMOS is already on. That `zc`
  pulse is stale and must be ignored.

## Architecture

```
buck_controller                       token ring of PHASES stages
 ├─ get[0] = nrst & ~pass[N-1]        "init": starts the token, closes the ring
 └─ stage[k]  (get[k] = pass[k-1])
     ├─ activation                    when should this phase charge?
     │   ├─ token_control + delay_timer (TOKEN_TIMER)
     │   ├─ hl_handler + wait_element (HL_WAIT)
     │   └─ opportunistic_merge       two request sources -> one channel
     └─ charging                      one charge cycle per request
         ├─ wait_element (UV_WAIT)
         ├─ uv_handler                waits for uv
         ├─ zc_handler                sorts no / late / early ZC
         ├─ oc_handler                PMOS on until oc, then NMOS on
         ├─ min_control + delay_timer (PMIN_CONTROL, PMIN_TIMER)  -> gp/gp_ack
         └─ min_control + delay_timer (NMIN_CONTROL, NMIN_TIMER)  -> gn/gn_ack
```

`activation` and `charging` talk over a single request/acknowledge pair:
`ro+` asks for one charge cycle, `ao+` says it is done (the PMOS interval is
over and the NMOS is on).

### Token ring (normal mode)

`get`/`pass` form a four-phase ring with one inversion at the init gate.
When `nrst` rises, a rising wave runs round the ring; when it reaches the
end, `get[0]` falls and a falling wave follows. On the rising wave each stage
asks its phase for one charge cycle and holds the token until that cycle has
been acknowledged *and* its token timer has expired. On the falling wave a
stage only clears its timer. The effect is that phases are activated one
after another, each responding to the next under-voltage, while the previous
phase may still be in its NMOS interval: phases overlap.

### High-load mode

While `hl` is high, every stage's `hl_handler` asks for charge cycles back to
back, regardless of the token, so all phases respond to each under-voltage
together. `opportunistic_merge` combines these requests with the token
requests: every request pending when the charge cycle is acknowledged is
acknowledged by that same cycle, so a token that arrives while a high-load
request is waiting costs no extra cycle.

## The handshake components

All channels are four-phase, active high: `r+ a+ r- a-`. Names follow each
component's own view: `ri/ai` is the channel it serves, `ro/ao` the channel
it drives.

### WAIT (`wait_element`, with `mutex`)

Waits, while `ctrl` is high, for the input `sig` to be high and reports it
on `san`; `san` then stays high until `ctrl` falls, even if `sig` drops.
This turns a comparator level that may come and go at any time into a clean
handshake. Inside is a mutual-exclusion element arbitrating between "`sig`
is low" (the inverted `sig`) and `ctrl`; its grant to `ctrl` is `san`. The
arbitration is what makes a short or simultaneous `sig` pulse safe.

### ZC_HANDLER (`zc_handler`)

The gate-level speed-independent circuit, as published for this component:

```
n1   = NOR3(ri, zc, ro)
ro   = OAI22(n1, csc0, ~ao, ri)      (reset low)
csc0 = SR latch: set ao, reset n1   (set wins)
ai   = AND2(csc0, ~ao)
```

Its behaviour, towards the UV handler (`ri/ai`) and the OC handler
(`ro/ao`):

* late or no ZC: `ri+ ro+ ao+ ro- ao- ai+ ri- ai-`; a `zc` pulse in this
  window changes nothing except that `ai-` waits for `zc-`.
* early ZC: `zc+ ro+` *before* `ri+`: the OC handler switches the NMOS off
  at once. `ro-` then waits for both `ri+` (the under-voltage) and `ao+`.

So towards the OC handler, `ro+` means "NMOS off" and `ro-` means "charge
now".

### OC_HANDLER (`oc_handler`)

Reads the ZC handler's `ro/ao` as above:

* `ri+`: switch the NMOS off (`rn-`, allowed only once NMIN has passed,
  i.e. `an` is high), wait for `an-`, then `ai+`.
* `ri-`: PMOS on (`rp+`); once PMIN has passed (`ap+`) and `oc` is high,
  PMOS off (`rp-`); once it is off (`ap-`), NMOS on (`rn+`) and `ai-`.

`ai-` comes as soon as the NMOS is requested, not after NMIN. This returns
the ZC handler to its idle state at once, so a zero crossing during NMIN is
treated as an early ZC and the NMOS is switched off as soon as NMIN ends. If
the acknowledgement waited for NMIN, such a zero crossing would fall into the
ZC handler's late-ZC window and be ignored. The NMOS would then stay on with
reversing current, and the phase could stall.

```
s  = latch(set ap & oc, reset ri)          over-current seen
rp = ~ri & ai & ~s
rn = latch(set s & ~ap & ~ri, reset ri & an)
ai = latch(set ri & ~rn & ~an, reset ~ri & rn)
```

### PMIN/NMIN_CONTROL (`min_control`) and timers (`delay_timer`)

`min_control` passes the request to the gate and to the timer and
acknowledges through a C-element of the gate acknowledgement and the timer:
`ai` rises when the transistor is on *and* the minimum time has passed, and
falls when both have been withdrawn. `delay_timer` is a behavioural delay
(`r+` → `a+` after `DELAY_NS`, `r-` → `a-` after 1 ns). In silicon it would
be an analogue or delay-line timer; this model is not synthesizable.

### UV_HANDLER, TOKEN_CONTROL, HL_HANDLER, OPPORTUNISTIC_MERGE

These four have only their names and connections in the source design. Their
logic here is the simplest that fits the protocols above; each file gives its
equations.

| block | equations |
|---|---|
| `uv_handler` | `wuv = ri & ~ao`; `ro = latch(set uv, reset ~ri)`; `ai = ao & ~uv` |
| `token_control` | `done = latch(set ao, reset ~ri)`; `ro = ri & ~done`; `rd = ri`; `ai = latch(set ad & done & ~ao, reset ~ri & ~ad & ~ao)` |
| `hl_handler` | `whl = ~ro & ~ao`; `ro = latch(set hl & ~ao, reset ao & ~hl)` |
| `opportunistic_merge` | `pend = ri1&~ai1 \| ri2&~ai2`; `aik = latch(set rik & ro & ao, reset ~rik & ~ao)`; `ro = latch(set ~ao & pend, reset ao & ~pend)` |

## Writing asynchronous logic in SystemVerilog

* State lives in `always_latch` set/reset latches, C-elements and the ZC
  handler's feedback loop. There are no flip-flops and no clock. Synthesis
  reports latches. Lint tools report combinational loops wherever a
  request and its acknowledgement close a cycle between blocks. Both are
  intended, and every file says so in its header.
* Every state element has an active-low `nrst`, which puts the whole
  controller in its idle state: all gates off, ring empty. Releasing `nrst`
  launches the token.
* The mutual-exclusion element is a behavioural latch process with a fixed
  tie rule (the "`sig` low" side wins). A two-state, zero-delay simulator
  cannot model metastability resolution, so the real element's analogue
  filter is not reproduced.
* Gates have zero delay in simulation. Speed independence means correct
  operation does not depend on gate delays, but a zero-delay simulation is a
  single delay assignment, not a proof. The source design verified its
  components formally at the signal-transition-graph and circuit levels;
  that verification is not repeated here.
* Assertions (`assert final`) check that the mutex never grants both sides
  and that the OC handler never requests PMOS and NMOS together.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `PHASES` | 4 | `buck_controller` | number of phases / ring stages |
| `PMIN_NS` | 20 | `buck_controller`, `stage`, `charging` | minimum PMOS on-time, ns |
| `NMIN_NS` | 20 | same | minimum NMOS on-time, ns |
| `TOKEN_NS` | 25 | `buck_controller`, `stage`, `activation` | minimum time a stage holds the token, ns |
| `DELAY_NS` | 20 | `delay_timer` | timer delay, ns |

None of these values is given in the source design; they are chosen here for
a converter switching every ~100-300 ns (defaults in `rtl/buck_pkg.sv`).

## Verification

Every block has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
prints `TB_RESULT checks=N failures=M`. The unit tests play the neighbouring
blocks by hand and walk through each handshake. Examples: all three ZC cases
for `zc_handler`; over-current before and after PMIN for `oc_handler`;
coinciding and late requests for `opportunistic_merge`. They also check
minimum-time latencies in ns. `tb_zc_handler` adds a random part: over
2000 charge cycles the environment fires, at random, any input event the
handshake allows at that moment (ri, ao and zc edges in every legal order,
including zc pulses that straddle the request). After each event it compares
`ro` and `ai` with a reference written from the specification, and it fails
if the handler ever reaches a state where no input event is allowed.
`tb_opportunistic_merge` adds a similar random part. Two requesters make
300 requests each, and the output is acknowledged after a random delay. The
test checks the four-phase rules on every edge. It also checks that each
output handshake serves at least one request, that every request is served
exactly once, and that some handshakes are shared. A typical run serves
about 600 requests with about 430 output handshakes.
`tb_hl_handler` toggles `hl` 400 times with random widths, some only 1 ns
long, through a WAIT element. It checks that a request appears only if `hl`
was high after the handler last started waiting. It also checks that
requests keep coming while `hl` stays high.
`tb_charging` ends with 1000 charge requests against comparators that fire
at random times. Under-voltage pulses have random widths and spacing. The
over-current comes a random time into the PMOS interval. Zero-crossing
pulses come a random time into the NMOS interval, and now and then after
the NMOS is already off. Over a run, the NMOS is switched off about 350 times
by an under-voltage and about 650 times by a zero crossing, and about 200
stale zero crossings arrive while the PMOS is on. The test checks that each
request gets exactly one PMOS interval and ends with the NMOS on. It checks
that the PMOS switches on only for a pending request and off only after an
over-current. It checks that the NMOS switches off only after an
under-voltage or a zero crossing. It also checks that no request waits for
ever.
`tb_activation` ends with 500 tokens. The ring side, `hl` and the charge
acknowledgement are all driven with random delays. For every token it
checks that `pass` rises only while `get` is high and no earlier than the
token timer. It also checks that at least one complete charge handshake,
acknowledged after `get` rose, comes before `pass`. Every charge request
must come from the token or from high load.

`tb_buck_controller` runs the whole controller at its default parameters.
It closes the loop around a behavioural four-phase power stage: VIN = 3.3 V,
L = 200 nH per phase, C = 10 uF, I_max = 1 A, V_ref = 1.0 V, V_min = 0.9 V,
1 ns Euler steps, 3 ns gate drivers and a 12 ns zero-crossing comparator.
It steps the load through medium (2 Ω), light (10 Ω), heavy (0.4 Ω) and
medium again. A last interval sets the zero-crossing reference above the
peak current, so `zc` trips inside NMIN. Results of one run (90 us simulated,
well under a second):

| interval | output voltage |
|---|---|
| start-up + 2 Ω | 0.999-1.068 V (start-up overshoot) |
| 10 Ω | 1.000-1.012 V |
| 0.4 Ω (high-load mode) | 0.899-0.930 V |
| 2 Ω | 0.999-1.013 V |

Over the run there were 530 charge cycles, 293 no-ZC and 237 early-ZC
NMOS turn-offs, 1 late ZC, 42 PMOS intervals stretched to PMIN, 9 NMOS
intervals held to NMIN, 129 high-load cycles, 141 overlapping phase starts
and 50 merged requests. The testbench fails if any of these never happens,
if a phase ever has both transistors on, if a minimum on-time is violated,
or if the output leaves its window. Under heavy load the output settles at
the high-load threshold (0.9 V), the level at which all phases charge
together. The late-ZC case occurs only once in this run: it needs an
under-voltage within the comparator delay of a zero crossing.

`tb_buck_stress` runs the same power stage with three phases instead of
four. Every gate-driver edge gets a random delay of 1-8 ns and every
zero-crossing comparator edge a random delay of 0-25 ns. After start-up the
load jumps every 5 us to a random value among 10, 5, 2 and 1 Ω, sixteen
times. It checks the same safety rules (no shoot-through, PMIN and NMIN
respected). In each interval the output must stay within 0.85-1.15 V and the
token must keep moving. Across several seeds the output stayed within
0.995-1.014 V.

For each block there is also a copy with one deliberate bug. Its testbench
catches every one of them.

## Simulating

Verilator 5 with `--timing` (the timers and testbenches use delays):

```
verilator --binary --timing --assert -Irtl rtl/buck_pkg.sv \
    tb/tb_buck_controller.sv --top-module tb_buck_controller -y rtl
./obj_dir/Vtb_buck_controller
```

Replace the testbench name to run any other block's test. Expect
`UNOPTFLAT` (combinational loop) warnings for the reasons above. Use
`-Wno-fatal` or `-Wno-UNOPTFLAT` if your build stops on them.

## Departures from the source design and open points

* **Invented insides.** The source design gives gate-level insides only for
  ZC_HANDLER and WAIT, which are followed here. It gives the behaviour of
  OC_HANDLER, PMIN/NMIN_CONTROL and the ring, and only names and connections
  for UV_HANDLER, TOKEN_CONTROL, HL_HANDLER and OPPORTUNISTIC_MERGE. Those
  are this design's own logic and have not been formally checked for speed
  independence.
* **Token ring policy.** Asking for a charge only on the rising wave, and
  passing the token only after the charge is acknowledged, is a choice made
  here.
* **Reset.** `nrst` goes to every block; the source design shows it only at
  the ring's init gate and as a reset on the ZC handler's `ro`.
* **Timers.** PMIN, NMIN and the token timer are behavioural delays with
  assumed values. The source design notes that timers used mutually
  exclusively could be shared; here each has its own.
* **Mutex.** It is behavioural, not the published transistor-level element.
* **Analogue parts.** The power stage, comparators and gate drivers are not
  RTL; a behavioural model of them exists only inside the two end-to-end
  testbenches (`tb_buck_controller`, `tb_buck_stress`).
