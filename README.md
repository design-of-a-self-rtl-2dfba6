# Asynchronous clock switch for self-timed ring clocks

Two locally synchronous blocks that each run from their own ring-oscillator
clock have to exchange data safely. Instead of a FIFO between them, or a
clock that is paused while data crosses, this design makes the faster clock
slow down to the slower one for as long as the exchange lasts. Neither clock
is ever stopped, and the change happens only at a completed clock phase.

The trick works because the clock source is a *self-timed ring* (STR): a
loop of Muller C-elements in which every stage waits for its neighbour
before it switches. A ring like that can be slowed from outside just by
holding back one of its handshake signals. A small *asynchronous switch* sits
in the ring's feedback path. While the `com` input is high, it makes the
ring's last stage also wait for the partner domain's clock.

## Blocks

| Module | What it is | File |
|---|---|---|
| `gals_sync_node` | top: ring + switch, one domain's clock node | `rtl/gals_sync_node.sv` |
| `async_switch` | the switch: C1, C2, mux, two flip-flops, OR, buffer | `rtl/async_switch.sv` |
| `c_element` | two-input Muller C-element | `rtl/c_element.sv` |
| `str_ring` | self-timed ring oscillator, **timed behavioural model** | `rtl/str_ring.sv` |

Only `async_switch` and `c_element` are synthesizable logic. The ring is a
behavioural model: what it does depends on analog gate delays, which the
model describes with timed events. In silicon it would be a hand-placed
macro made of C-elements and inverters.

## The self-timed ring

Stage *i* is a C-element. Its *forward* input is the output of stage *i−1*.
Its *reverse* input is the inverted output of stage *i+1*. A C-element copies
its inputs when they agree and otherwise holds its value, so a stage switches
only when its predecessor offers a new value (a *token*) and its successor
has taken the previous one (a *bubble*). The tokens chase each other round
the loop. Each stage toggles once per token that passes, so the period of
every stage output is

    T = 2 · N · D / NT      (token-limited ring, stage delay D, NT tokens)

The default ring has N = 26 stages, 2 tokens and D = 0.2 ns, so T = 5.2 ns.
The tokens are placed by the set/reset pattern `INIT`, which `rst` loads:
the low 13 stages are set and the high 13 are reset, which puts the two
tokens half a ring apart. With 8 stages the same delays give 1.6 ns.

The loop is opened at two points, so that the switch can sit in it:

* `first_req_in`: the forward input of stage 0. Normally this is the last
  stage's output `ring_out_req`, which is also the domain clock.
* `ring_out_ack`: the reverse input of the last stage. Normally this is
  `ack`, the inverted output of stage 0.

### Stage delay model

A stage's delay depends on when its two inputs arrived (the Charlie effect)
and on how recently its output last switched (drafting). Let t_f and t_r be
the arrival times of the forward and reverse inputs, and let t_out be the
stage's last output change. Then

    s  = (t_f − t_r)/2,   t_m = (t_f + t_r)/2,   y = t_m − t_out
    output time = t_m + D_mean + sqrt(D_charlie² + (s − s_min)²) − B·exp(−y/A)
    D_mean = (D_ff + D_rr)/2,   s_min = (D_rr − D_ff)/2

A forward event that arrives alone propagates in `D_FF`, and a reverse event
that arrives alone propagates in `D_RR`. Inputs that arrive close together
take longer. Output events that follow each other closely are slightly
faster. The exponential form of the drafting term is this model's choice.
All delay values are parameters. Their defaults (0.2 / 0.2 / 0.03 / 0.3 /
0.01 ns) are assumptions, chosen to match the C-element delays and the
5.2 ns clock that the design targets.

## The asynchronous switch

```
 ring_out_req ──┬──────────────┬─────────────── clock, req_anoc
                │              │
              [C1]──► first_stage_req
               (both inputs = ring_out_req)
                      com ─► DFF1 (falling edge of clock) ─┬─► DFF2 (rising edge)
                                                           │       │
                                                           └─[OR]──┘──► sel
 ack_anoc ─[buf]─► mux "1" ┐
 ack_from_ring ──► mux "0" ┴─► mux ─► [C2] ─► ring_out_ack
 ack_from_ring ───────────────────────┘
```

* **C1** has both inputs on `ring_out_req`, so it acts as a buffer (a gate
  of the same kind and delay as C2). It returns the last stage's output to
  the first stage.
* **C2** drives the last stage's reverse input. One of its inputs is always
  the ring's own acknowledge. The other input is the mux output.
  * `sel = 0`: both inputs are the ring's acknowledge. C2 is transparent and
    the ring runs at its own rate.
  * `sel = 1`: the second input is the partner clock `ack_anoc`. C2 changes
    only after both the ring and the partner have made the same transition.
    The ring's last stage then moves once per half-period of whichever clock
    is slower. If the partner is slower, the domain clock locks to it with a
    phase delay of about one stage. If the partner is faster, the ring keeps
    its own period, which stretches a little whenever C2 has to wait for the
    partner's level.
* **Select timing**: DFF1 samples `com` on the falling clock edge, and DFF2
  re-samples DFF1 on the next rising edge. `sel = DFF1 | DFF2`.
  * When `com` rises, `sel` rises just after the next falling edge, once the
    current high phase has completed.
  * When `com` falls, DFF1 clears at a falling edge, but DFF2 keeps `sel`
    high until the following rising edge.

  Either way, the mux only switches right after a clock edge, never in the
  middle of a phase. Two assertions in `async_switch` check this rule: `sel`
  may rise only while the clock is low and fall only while it is high.

## Measured behaviour

`tb_gals_sync_node` runs the default node against partner clocks of several
periods P2:

| P2 (ns) | new clock period (ns) | delay after partner edge |
|---|---|---|
| none (free running) | 5.200 | – |
| 1, 2 | 5.200 | – |
| 5 | 5.209 (average) | – |
| 6, 15, 30, 60 | 6.000, 15.000, 30.000, 60.000 | 0.20 ns |

`tb_node_fast_ring` does the same with an 8-stage ring (1.6 ns). Against
20 ns and 60 ns partners, it locks to 20.000 ns and 60.000 ns.

## Where this RTL departs from the original circuit

* **Gate delays.** The RTL C-elements and the mux have zero delay. The
  original circuit measured about 0.2 ns through C2, 0.2 ns through C1, and
  1.2 ns from `com` to `sel`. It also reported a lock delay of about 0.4 ns.
  Here the lock delay is 0.2 ns, which is only the ring stage's own delay.
* **Ring size and delays** are this design's own choice. No stage count,
  token count or delay value was specified for the original ring, beyond a
  free-running period of about 5.2 ns (and 1.7 ns in a second setup).
* **Duty cycle after a long lock.** While the ring is locked to a much
  slower partner, its two tokens gather in front of the last stage. After
  release they keep that spacing: the period returns to 5.2 ns, but the high
  and low phases become unequal (shortest phase about 0.43 ns in the test).
  With so few tokens, the Charlie effect in this model spreads them out again
  only very slowly. The original circuit was described as oscillating evenly
  spaced.
* **`req_anoc`** is this domain's clock, passed on to the partner. How the
  original circuit drives it is not specified.
* **The buffer on `ack_anoc`** is a plain buffer. The mux already ignores
  `ack_anoc` while `sel = 0`.
* **Reset.** `rst` is active high. It loads the ring's set/reset pattern and
  asynchronously clears both switch flip-flops. A reset scheme was not part
  of the original description.
* **Not included.** The domain's synchronous logic and its data in/out port
  are outside the node. They only use `clock`. The arrangement with two rings
  sharing one switch is not built, because how its signals connect inside the
  switch is not specified. The node is meant to be tested the way it is here:
  a plain clock on the partner side, and a ring on this side.

## Simulating

Everything is SystemVerilog 2017 and runs in two-state Verilator with timing
support. Each testbench prints `TB_RESULT checks=N failures=M`.
`-Wno-fatal` is needed because Verilator warns (ZERODLY) about the ring
model's computed delays and the testbenches' computed waits. Those delays
are never zero at run time.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gals_sync_node \
  -y rtl tb/tb_gals_sync_node.sv && ./obj_dir/Vtb_gals_sync_node
```

| Testbench | What it checks |
|---|---|
| `tb_c_element` | every transition, plus random inputs, against a reference |
| `tb_str_ring` | ideal 13-stage ring period exactly 2.6 ns; default period 5.2 ns ± 3%; token count constant; equal toggle counts on all stages; reset holds |
| `tb_async_switch` | open loop with random acknowledges: C2 against a reference C-element, `sel` edge timing, forward path |
| `tb_gals_sync_node` | full default node: free-running period, lock to slower partners, own rate against faster ones, rate restored after release, `sel` latency, no runt clock phase |
| `tb_node_fast_ring` | 8-stage ring (1.6 ns) locking to 20 ns and 60 ns partners |

The asynchronous resets respond to a rising edge. A testbench must therefore
drive `rst` low and then high; simply starting it at 1 is not enough, because
two-state simulation begins with random values.

To change the clock, set `NSTAGES` and `INIT`, which decide the number of
tokens (stage boundaries where neighbouring `INIT` bits differ), and the
delay parameters on `gals_sync_node`. The ring oscillates as long as the
token count is even and non-zero and at least one bubble is left.
