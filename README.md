# Coarse-grained clock gating for dataflow actors

A streaming application that is built as a dataflow network consists of
*actors* that talk only through lossless, order-preserving FIFO queues. An
actor whose output queues are full cannot fire. It just waits, and its clock
toggles for nothing. This RTL stops that clock. Each actor gets a
*clock enabler* that watches the full (F) and almost-full (AF) flags of the
actor's output queues. It turns the actor's clock off through a global clock
buffer with enable, and turns it back on once a consumer has made room. No
token is lost and the order of the tokens does not change. The actor still
blocks on full queues as it always did. Gating only removes the clock edges in
which it could not have done anything anyway.

The technique does not depend on what the actors compute. So this repository
contains everything around an actor, and not the actors themselves: the clock
enabler, the queues, the fanout that copies one output port into several
queues, and an *actor slot* (`clock_gated_actor`) that wires them up around
one actor. Actors plug into the slot's ports and run on its `actor_clk`
output.

## The actor slot

```
                      in_wclk           actor_clk                q_rclk[p][i]
                        |                  |                         |
 upstream --wr/wdata--> [ input queue ] --rd/rdata--> ACTOR --wr--> fanout p --> [ queue p.0 ] --> consumer
 in_full/in_afull <-----  (W)     (R)                         |              --> [ queue p.1 ] --> consumer
 (to upstream enabler)                                        '-- port q ------> [ queue q.0 ] --> consumer
                                                                                      |  F, AF of every
                                                                                      v  output queue
                               clk (free running) --> [ clock enabler ] --> actor_clk
```

`actor_clk` clocks three things: the actor, the read side of its input queue,
and the write side of its output queues. The other side of each queue belongs
to the neighbouring actor. The input queue's F/AF are brought out as
`in_full`/`in_afull` for the upstream actor's clock enabler.
`in_wclk_src` is the free-running source of the upstream clock. `cg_sel`
selects whether this actor is gated at all. With `cg_sel` low, `actor_clk`
never stops. In a whole network there is one slot per actor, and each gated
actor uses one global clock buffer.

## The clock enabling controller (`cg_controller`)

There is one controller per output queue. It is a five-state Moore machine
on the free-running clock. Its output EN asks for the actor's clock to run.
AF means "at most one free slot", so AF is also high while the queue is full.

| state          | EN | !F & !AF  | !F & AF         | F & AF          |
|----------------|----|-----------|-----------------|-----------------|
| INIT (reset)   | 1  | SPACE     | INIT            | INIT            |
| SPACE          | 1  | SPACE     | AFULL_DISABLE   | FULL (*)        |
| AFULL_DISABLE  | 0  | SPACE     | AFULL_DISABLE   | FULL            |
| FULL           | 0  | SPACE (*) | AFULL_ENABLE    | FULL            |
| AFULL_ENABLE   | 1  | SPACE     | AFULL_ENABLE    | FULL            |

The controller drops EN one slot *before* the queue is full
(AFULL_DISABLE). This covers the delay of the enable path, and the actor can
still use the last slot in the edges that follow. When the queue is full and
a token is taken out, the queue becomes almost full again. The controller then
moves to AFULL_ENABLE and the clock comes back so the actor can refill the
slot. The two entries marked (*) are flag jumps of more than one slot between
two samples. They cannot happen with one reader and one writer on the same
source clock, and their targets are this design's choice. F without AF is
treated as F & AF.

## Combining queues: AND within a fanout, OR across ports (`clock_enabler`)

The enables of the controllers are combined before they reach the clock
buffer:

* **AND over the queues of one fanout.** A fanout writes each token into all
  of its queues at once, so the port is blocked as soon as any one of them is
  full.
* **OR over the actor's output ports.** If one port is blocked and another
  is not, the actor may still have work for the free port. A downstream actor
  may also need more tokens from that port before it can produce the token
  that unblocks the first port. Stopping the clock there could deadlock the
  network. So the clock stops only when every port is blocked.

`FANOUT[p]` gives the number of queues on port `p`. Three cases follow from
it:

* One port with a fanout (`NUM_PORTS=1, FANOUT='{2,...}'`) gives a pure AND.
* Ports that each drive one queue (`FANOUT='{1,1,...}'`) give a pure OR.
* The default, `'{2,1,...}'`, is an AND feeding an OR: port 0 fans out to
  two queues, port 1 drives one queue.

The combined enable goes through a flip-flop on the free-running clock, and
then to the enable of the clock buffer. The flip-flop makes the enable change
right after a rising edge only. The buffer latches the enable while the clock
is low, so a pulse is never cut short. Timing, counted in rising edges of
`clk`:

* edge *n*: a controller takes in a flag change and moves state (EN changes).
* edge *n+1*: the enable flip-flop follows.
* edge *n+2*: the first pulse is missing from `actor_clk` (or the first pulse
  is back, when re-enabling). A stopped `actor_clk` rests low.

`bufgce` is a behavioural model of the FPGA's global clock buffer with
enable: a latch that is transparent while the clock is low, followed by an
AND gate. The latch is intended. On an FPGA the vendor primitive replaces
this model.

## Queues (`async_queue`)

Each queue has a write clock and a read clock, so producer and consumer can
be gated independently. It is written on `wclk`, and `rdata` always shows the
oldest token (first word fall through). It gives `full`, `almost_full`
(`count >= DEPTH-1`), `empty` and `count`. Assertions flag a write while full
and a read while empty.

The hard part is where the flags live. When the writer's clock is stopped
because the queue is full, the controller must still see the queue drain.
Otherwise the writer would stay off for ever. A flag register clocked by the
(stopped) write clock would never notice the reader, so the flags must not
depend on that clock. `SYNC_STAGES` selects one of two ways:

* **`SYNC_STAGES = 0` (default).** Every clock in the network is a gated copy
  of one source clock. The flags are decoded straight from the two pointer
  registers, with no synchronizers. Both pointers change right after the same
  source edges, so the flags are exact and settle within one source period.
* **`SYNC_STAGES >= 2`.** This is for queues between unrelated clocks. Each
  pointer is also kept in gray code and passes through `SYNC_STAGES`
  flip-flops into the other side. The write-side flags and `count` are
  clocked by `wclk_src`, the free-running source of the gated write clock.
  `empty` is clocked by the read clock. Both views lag the other side, and
  they err only on the safe side: `full` or `empty` may stay high a few
  cycles too long, never the reverse.

## Fanout (`fanout`)

The fanout copies each token of one actor port into N queues in the same
cycle. The port reports full while any of them is full, so the actor holds
the token until every branch has room.

## Parameters

| parameter    | default               | meaning                                    |
|--------------|-----------------------|--------------------------------------------|
| `WIDTH`      | 32                    | token width (chosen, not prescribed)       |
| `DEPTH`      | 16                    | queue slots, power of two (chosen)         |
| `SYNC_STAGES`| 0                     | queue clocking: 0 one source, >=2 unrelated|
| `NUM_PORTS`  | 2                     | output ports of the actor                  |
| `MAX_FANOUT` | 2                     | width of the per-port flag vectors         |
| `FANOUT`     | `'{2,1,0,0,0,0,0,0}`  | queues per port; 0 means unused            |

The queue depths would normally come from a profiling step that sizes every
FIFO from the critical path of the application. That is a design-time tool
and is not part of this RTL. Set `DEPTH` from it.

## How far it can be trusted

All blocks have self-checking testbenches in `tb/`, each compared against a
reference model written separately from the RTL.

* `tb_cg_controller` walks the state diagram and then a 2000-step random
  fill-level walk.
* `tb_bufgce` checks that the gated clock has no runt pulses and the right
  number of pulses.
* `tb_clock_enabler` (the default AND+OR configuration) and
  `tb_clock_enabler_configs` (pure AND, pure OR) check the registered enable
  and every pulse of the gated clock.
* `tb_async_queue` uses independently gated read and write clocks.
* `tb_async_queue_cdc` uses two unrelated, randomly gated clocks with
  `SYNC_STAGES = 2`, and checks that every flag is safe.
* `tb_fanout` checks the broadcast and the stall.
* `tb_clock_gated_actor` is the end-to-end test at default parameters. It
  places a behavioural actor (`tb/actor_model.sv`) in the slot and runs five
  phases:
  * full-rate streaming, checking one firing per cycle and no gating;
  * port 0 blocked while port 1 flows, where the OR keeps the clock;
  * both ports blocked, where the clock is gated and re-enabled;
  * gating deselected;
  * drain, where every token must arrive, in order.

  The test counts each mechanism (gating, re-enable, every controller state,
  OR keep-alive, fanout stall, deselection, upstream back-pressure) and fails
  if one never happened.
* `tb_clock_gated_actor_cdc` runs the slot with its consumers on an unrelated
  clock, and checks gating, re-enabling and lossless delivery across that
  boundary.
* `tb_activation_rate` runs throttled output against an identical ungated
  slot and reports the activation rate of the gated clock.

Results of one run of `tb_activation_rate`, 4000 cycles per rate:

| consumer rate | one port, fanout 2: activation | default slot: activation |
|---------------|--------------------------------|--------------------------|
| 100 %         | 100 %                          | 100 %                    |
| 50 %          | 58 %                           | 96 %                     |
| 25 %          | 39 %                           | 98.5 %                   |
| 10 %          | 21.5 %                         | 100 %                    |

The default slot's column shows what the OR across ports costs. With the
test actor, one port is nearly always free while the other is blocked, so
that slot is seldom gated.

Throughput is not completely untouched either. After a token leaves a full
queue, the clock returns two cycles later. In a fanout, one branch can run
dry while the other branch holds the actor stopped, and its consumer then
waits. The measured loss is 0 to 4 tokens in 2000, and the test allows up to
1 %. Actors on a network's critical path are best left ungated
(`cg_sel = 0`). An ungated actor has no such delay.

## Departures and open points

* The actors are not included. Their signals are ports of the slot.
* `bufgce` is a model of a vendor primitive.
* The queues' internal structure and both clocking modes are this design's
  own. The default mode assumes a single source clock (see above).
* The two (*) transitions of the controller, the reset values (INIT, clock
  enabled) and the asynchronous active-high reset are this design's choices.
* Each slot has one input queue. An actor with several inputs needs more
  input queues, which only add read ports on `actor_clk`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --Mdir obj_dir -y rtl -y tb \
    rtl/cg_pkg.sv tb/tb_clock_gated_actor.sv --top-module tb_clock_gated_actor
./obj_dir/Vtb_clock_gated_actor
```

To run another test, replace the testbench file and the top module name.
Every testbench ends by printing `TB_RESULT checks=N failures=M`.
