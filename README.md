# Multichannel arbiter from cross-coupled NOR gates

Several independent devices (sources) want to talk to one shared device (a
receiver, such as a printer or a common memory), and must never drive it at the
same time. The arbiter here is about as small as one can be: one NOR gate per
source. Each gate takes its source's active-low request and the outputs of all
the other gates. The first source to pull its request low gets a 1 on its gate.
That 1 forces every other gate to 0 and so locks the others out. The lock lasts
as long as that source keeps its request low. When it lets go, one of the
waiting sources takes over, or the receiver goes back to idle.

For two sources this ring is an RS flip-flop built from two NOR gates. The
arbiter uses the input state that is normally forbidden for an RS flip-flop
(both R and S active, both outputs 0) as its idle state.

This repository implements the scheme in synthesizable SystemVerilog:

* a two-channel arbiter in its RS flip-flop form;
* an N-channel arbiter (four channels by default);
* the gates that route each source's data to the receiver and the receiver's
  acknowledge back;
* a top level that holds a two-channel system and a four-channel system side
  by side.

## Signals and polarity

| signal | level | meaning |
|---|---|---|
| demand (DEM, DEMAND*i*) | active **low** | source *i* asks for the receiver; it holds the line low for its whole session |
| grant / READY | active **high** | source *i* owns the receiver; its channel is open |
| DATA | as sent | passed to the receiver only from the granted source |
| ACK | as sent | passed back only to the granted source |

When no source demands, every grant is 0. The receiver then sees all-zero data,
and no source sees ACK.

## The two-channel form (`rs_arbiter`)

Source S1 drives the R input and source S2 drives S. Output Q grants S1 and
Qbar grants S2. This is the sequence the testbench reproduces:

1. R falls, so Q rises.
2. S pulses low and high while R stays low. Nothing changes, because Q holds.
3. R rises while S is low. Q falls and Qbar rises on the same clock edge.
4. R pulses while S stays low. Nothing changes.
5. S rises, so Qbar falls and the arbiter is idle again.

## The N-channel form (`nor_arbiter`)

This is the same rule for N sources. A source that holds the grant keeps it
while its demand stays low. When it releases, the grant goes to one waiting
source, or to none if no source is waiting. At most one grant is ever high.
Assertions inside the module check three rules:

* at most one grant is high (`$onehot0`);
* the holder keeps the grant while it demands;
* no grant goes to a source that is not demanding.

## From an asynchronous latch to a clocked arbiter

This is the part that needs the most care. The original circuit has no clock.
When two requests arrive together, the winner is whichever NOR gate happens to
switch faster. That depends on manufacturing spread, not on anything in the
design. A loop of gates like that cannot be synthesized as ordinary logic, and
the tie cannot be reproduced. This implementation keeps the behaviour and
changes the mechanism:

* **State in flip-flops.** The gate outputs become N flip-flops (`grant`, or
  `q`/`q_bar`), updated on the rising clock edge by the rule above. There is
  no combinational loop.
* **Fixed tie-break.** On simultaneous requests, or when several sources wait
  at a release, the lowest-numbered source wins (S1 over S2 in the two-channel
  form). This takes the place of "the fastest gate wins". It corresponds to a
  ring whose gate delays rise with the source number.
* **Synchronizers.** The sources run independently of the arbiter's clock.
  Each demand line therefore passes through `SYNC_STAGES` flip-flops
  (`demand_sync`). These flip-flops reset to the idle level 1.
* **Direct hand-over.** The release of one source and the grant to the next
  happen on the same edge. A grant never overlaps another grant, and no idle
  cycle is added between them.
* **Reset.** An asynchronous, active-low reset gives the idle state: no grant.

**Latency.** A demand or release that is stable at the input shows on the
grant `SYNC_STAGES + 1` rising edges later. That is 3 edges with the default
`SYNC_STAGES = 2`. A source should hold a release for at least that long before
it demands again, or the release is not seen. Data and ACK pass through the
switch with no clock delay.

**The gate-level ring.** `tb/nor_ring_model.sv` is a gate-level model of the
asynchronous ring, with a delay for each NOR gate. It is for simulation only.
`tb/nor_ring_compare_tb.sv` drives this model and `nor_arbiter` with the same
demand patterns and checks that both grant the same source. The check fails if
the model's delays are ordered the other way round, which shows that the tie
really does come down to gate speed.

## Data and acknowledge gating (`channel_switch`)

The data and ACK paths are combinational:

* one AND gate per source passes that source's data only while its grant is
  high;
* one OR gate merges the gated data into the receiver;
* one AND gate per source passes the receiver's ACK back only to the granted
  source.

Data is `DATA_W` bits wide per source, with a default of 1 (one line per
source). The module is written for any N. The top uses it with N = 2 and N = 4.

## Top level (`arbiter_top`)

The two systems share only `clk` and `rst_n`.

| port | dir | width | use |
|---|---|---|---|
| `dem2_n` | in | 2 | DEM of S1 (bit 0, R input) and S2 (bit 1, S input) |
| `data2` | in | 2 x DATA_W | DATA of S1, S2 |
| `ready2` | out | 2 | READY: Q to S1, Qbar to S2 |
| `ack2` | out | 2 | ACK to S1, S2 |
| `rcv2_data` / `rcv2_ack` | out / in | DATA_W / 1 | receiver of the two-channel system |
| `dem4_n` | in | 4 | DEMAND1..DEMAND4 |
| `data4` | in | 4 x DATA_W | DATA1..DATA4 |
| `ready4` | out | 4 | grant of each source |
| `ack4` | out | 4 | ACK to each source |
| `rcv4_data` / `rcv4_ack` | out / in | DATA_W / 1 | receiver (printer) of the four-channel system |

Parameters: `DATA_W = 1` and `SYNC_STAGES = 2`. The number of channels in
`nor_arbiter` (`N`) defaults to 4 and can be set to any value of 2 or more.

## Departures from the gate-level scheme

These choices belong to this implementation, not to the original circuit:

* the clock, the synchronizers and the resulting latency of `SYNC_STAGES + 1`
  edges;
* the fixed lowest-index tie-break;
* the ACK return path on all four channels of the four-channel system (the
  four-channel drawing shows only the data path);
* the `DATA_W` parameter;
* the reset.

The original circuit has one more variant that is not built here. It uses NAND
gates with every level inverted, for controlling analogue switches.

## Files

| file | content |
|---|---|
| `rtl/demand_sync.sv` | per-line synchronizer for the active-low demand lines |
| `rtl/rs_arbiter.sv` | two-channel RS flip-flop arbiter |
| `rtl/nor_arbiter.sv` | N-channel arbiter |
| `rtl/channel_switch.sv` | data AND/OR and ACK AND gating |
| `rtl/arbiter_top.sv` | two-channel and four-channel systems |
| `tb/*_tb.sv` | self-checking testbenches, one per module |
| `tb/nor_ring_model.sv` | gate-delay model of the asynchronous ring (simulation only) |
| `tb/nor_ring_compare_tb.sv` | clocked arbiter against the ring model |

## Simulating

Every testbench checks itself and ends with the line
`TB_RESULT checks=<n> failures=<n>`. A watchdog ends a testbench that hangs and
counts it as a failure. To run one with Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  -y rtl -y tb +libext+.sv tb/arbiter_top_tb.sv -o sim --Mdir obj_arbiter_top
./obj_arbiter_top/sim
```

Replace `arbiter_top_tb` with `nor_arbiter_tb`, `rs_arbiter_tb`,
`channel_switch_tb` or `nor_ring_compare_tb` to run the others.

What each testbench covers:

* **`rs_arbiter_tb`** walks through the five-step sequence above. It checks
  each output one edge before and exactly at the latency. It then runs random
  patterns against a reference model.
* **`nor_arbiter_tb`** does the same for four channels. It checks the latency,
  hold, hand-over, simultaneous request and return to idle.
* **`channel_switch_tb`** tries every grant pattern with random data and ACK.
* **`arbiter_top_tb`** runs both systems at their default parameters.
  * Six source processes each complete 25 sessions: demand, wait for READY,
    work, release.
  * Every cycle, READY, receiver data and ACK are compared with a reference
    model.
  * Each mechanism must occur at least once: a grant from idle, a hold against
    a competing demand, a hand-over, a simultaneous request, a return to idle
    and an ACK delivered to the holder. One that never occurs counts as a
    failure.

## How far to trust it

The RTL has no memories, no wide arithmetic and no loops, and passes lint
cleanly apart from one kind of warning. Verilator reports `SYNCASYNCNET` on
`rst_n`, because the reset is both an asynchronous flip-flop reset and the
`disable iff` of the assertions. That warning is expected and harmless.

The things to review before use are the behavioural choices listed under
"Departures". The most important is the tie-break. Where a fair arbiter is
needed, a fixed priority lets a low-numbered source that keeps re-requesting
shut out higher-numbered ones whenever they wait at a release. The original
circuit does the same, because its winner is also fixed, by gate speed.
