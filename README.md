# Asynchronous bypass channel (ABC) network-on-chip

In a multi-synchronous chip, every processing element runs on its own clock. All clocks share one frequency but their phases are unrelated. A conventional router re-synchronises every flit at every hop, which costs two or three cycles per hop. An ABC router skips this for packets that go straight through it. When the straight path is idle, the output port is fed by the *incoming* flit and the *incoming* clock. The flit then crosses the router through combinational logic only, with no latch and no synchronizer. Synchronization happens only where a packet turns, where it leaves the network, or where it meets congestion.

Straight paths are common because of the topology, a **double chain**:

- Every router sits on two chains that each snake through all 49 nodes of a 7×7 grid.
- The **red** chain runs along the rows and reverses direction at each row end.
- The **blue** chain runs along the columns in the same way.
- A packet goes straight along one chain, or goes blue first and then turns once onto red.

This repository is synthesizable SystemVerilog for the whole 7×7 network: routers, routing, flow control and clock switching. It also has a self-checking testbench for every module.

## Network and routing (`abc_noc`, `abc_route_gen`)

Node (r,c) has these chain positions:

    red  position = r*7 + (r even ? c : 6-c)
    blue position = c*7 + (c even ? r : 6-r)

Each router has four network ports plus the local port. The network ports are numbered 0 blue+, 1 blue-, 2 red+ and 3 red-. "+" is the direction of increasing chain position. Input port p of a router is fed by output port p^1 of the neighbour on that side. The two ends of each chain have no neighbour on one side. Their ports are tied off, and those outputs never try to enter bypass mode.

Routes are computed at the source and carried in the header:

- Between any two nodes there are three legal paths: straight on blue, straight on red, or blue and then one turn onto red.
- Red never turns back to blue, which keeps the network free of deadlock.
- `abc_route_gen` estimates the no-load latency of each path in link delays. The estimate is the hop count, plus 4 for a turn. A turn costs 3 cycles and a link 0.75 cycle, so a turn costs 3/0.75 = 4 links.
- The cheapest path wins. Ties go to the turn path first, then to blue before red.
- Example: from (0,4) to (1,1) the route is `11 10 01 01 00`. That is blue+, turn to red+, straight, straight, arrive.

### Flit format (128 bits)

| bits | header | body / tail |
|---|---|---|
| 127 | valid | valid |
| 126:125 | type `10` | type `00` body, `01` tail |
| 124:0 | route codes, current hop in 124:123 | payload |

Each output shifts the header's route field left by two bits. This is pure wiring, so the code for the next router is always in bits 124:123. What each code means depends on where it is read:

| where the code is read | `11` | `10` | `01` | `00` |
|---|---|---|---|---|
| local input (first code) | blue+ | red+ | blue- | red- |
| blue input | turn to red- | turn to red+ | straight | eject |
| red input | eject | eject | straight | eject |

## Inside a router (`abc_router`)

```
 input units ──straight──► output block A (blue+, blue-)   ──► flit + clock + credits
 (decode code)──straight──► output block B (red+, red-)    ──►
              ──turn──────► block B turn bi-FIFOs
              ──eject─────► block C (abc_eject_unit) ──► local element
 local element ─► abc_inject_unit (route, local FIFO) ──► any output block
```

An input unit (`abc_input_unit`) decodes the header code and steers the whole packet. It remembers the target from the header until the tail. All data writes happen in the clock that arrived with the flit.

### Output block: the bypass and FIFO modes (`abc_out_unit`)

Each network output has the following sources:

- The **ABC path**: the straight input's flit, combinational, with its header shifted.
- The **straight sync-FIFO → straight bi-FIFO** (`abc_sync_fifo`, `abc_bi_fifo`).
- Two **turn bi-FIFOs**, in red outputs only, one from each blue input.
- The head of the **local FIFO**.

Every straight flit is written into the sync-FIFO (incoming clock) at the same edge that offers it to the bypass. Each entry is tagged with whether the bypass carried it. Tagged entries are thrown away. Untagged ones move on into the straight bi-FIFO, which the local clock reads. So a flit that could not be bypassed is never lost, and a flit that was bypassed is never sent twice.

The port has two stable modes:

- **ABC mode.** The output clock is the incoming clock and the output flit is the bypass flit. Forwarding takes zero cycles: the flit leaves on the same incoming edge that brought it.
- **FIFO mode.** The output clock is the local clock. A round-robin arbiter (`abc_out_unit`, Dcontrol) chooses among straight, local, turn-from-blue+ and turn-from-blue-.
  - The choice is made per packet, so packets never interleave.
  - The flit goes through one output register.
  - Just after leaving ABC mode, the straight bi-FIFO gets priority, so older straight flits leave first.

### Mode FSM (`abc_out_fsm`)

States: FIFO, ABC, and transition states 1–9.

- **FIFO → 3 → 4 → 5 → 6 → 7 → 8 → 9 → ABC.** The port tries this when:
  - it has nothing to send,
  - no packet is half sent,
  - every downstream buffer has credit,
  - a straight input link exists.
  - States 3–4 check that this stays true.
  - Through states 5–8 the local clock is dropped and the incoming clock is requested. State 8 waits until the incoming side reports its gate open.
  - State 9 switches the data path to the bypass.
- **ABC → 1 → 2 → FIFO.** This happens when a turn or local packet appears, or when the incoming side closes its gate because a straight flit has no credit.
  - State 1 asks for the local clock again, but only once the incoming gate is confirmed closed.
  - State 2 gives the straight bi-FIFO priority.
- **Aborts.** If the conditions fail in state 3 or 4, the FSM returns to FIFO at once. If they fail in states 5–9, it leaves through 1 and 2 and raises `thrash` for one cycle (an aborted switch).

### Clock control (`abc_ccontrol`) — the part to read carefully

The output clock is

    clk_out = (loc_on & clk_local) | (in_on & clk_in) | (~loc_on & ~in_on)

so it is **held high** while neither source is enabled.

- Each enable is a flip-flop on the rising edge of the clock it gates. It therefore changes only while that clock is high, and switching a source on or off never creates a short pulse.
- `loc_on` follows the FSM directly.
- `in_on` is a three-state machine (OFF, ON, DONE) in the incoming clock:
  - The FSM's request reaches it through a two flip-flop synchronizer.
  - It opens only if the sync-FIFO is empty, no straight flit is arriving, and all credits are available.
  - It closes at once when an arriving straight flit has no credit. That flit stays in the sync-FIFO and later leaves through the bi-FIFO.
- The FSM and `in_on` run a four-phase request/acknowledge handshake through synchronizers. The FSM keeps the request until the incoming side acknowledges it. The FSM re-enables the local clock only after the incoming side reports that it has fully let go.
- Result: the two gates are never on together, whatever the phase between the clocks. An assertion checks this.
- In this simulation, the held-high gap between clocks always lasts at least the synchronizer delay, which is more than one full period.

### Credits (`abc_credit_ctrl`)

Each output counts the free space in every downstream buffer it can fill:

- the straight buffer,
- the two turn buffers (blue outputs only, because only blue turns to red),
- the ejection buffer.

Free space for buffer t is `avail[t] = DEPTH − (sent[t] − returned[t])`. The returned counts travel back as 5-bit **gray-coded running counts**, one per buffer. They pass a two flip-flop synchronizer into the output clock. The counters run on the forwarded output clock, which is the clock the flits are sent with.

A bypassed flit is credited back at once, in the incoming clock (`cr_str_abc`). A buffered straight flit is credited when the bi-FIFO gives it up (`cr_str_fifo`). The straight count is the sum of the two.

Because a straight flit may have to fall back to the FIFO path at any moment, the sender reserves a straight-buffer credit for every straight flit, bypassed or not.

### Local injection and ejection

- **`abc_inject_unit`** takes flits from the element with a valid/ready handshake. The destination comes as row/column next to the header flit. The unit writes the computed route into the header and stores the flits in one local FIFO, which all outputs share. It offers the head packet only to the output named by the first code.
- **`abc_eject_unit`** has one bi-FIFO per network input. Each is written in that input's clock and read in the local clock. The unit delivers whole packets in round-robin order over a valid/ready handshake and returns ejection credits.

## Where this design departs from the description it follows

- **Buffers.** 12 bi-FIFOs per router instead of 10. The original shares two FIFOs between the ejection block and the two red output blocks without saying how. Here every reader has its own FIFO.
- **Credits.**
  - Ejection buffers also get credits, so blue outputs keep four counters and red outputs two. The original has three and one, and gives ejection no flow control.
  - Credits travel as gray counts, not as single-bit pulses. A pulse cannot be synchronized safely between two clocks of the same frequency and any phase.
- **FSM.** State 8 (wait for the incoming gate) and state 1 (wait for it to close) may last more than one local cycle. The original calls all transition states one-cycle states; the waits are what make the clock switch safe for any clock phase.
- **Routing tie-break.** The tie-break rule is this design's own; it reproduces the printed example. The routing follows the latency estimate (hops vs. hops + 4). The simpler "stay on the chain for five hops or fewer" rule of thumb gives different choices for long distances.
- **Sync-FIFO.** The sync-FIFO tagging is this design's own mechanism for "flush if bypassed, forward otherwise".
- **Sizes not given in the original.**
  - Sync-FIFO depth 4.
  - Local FIFO depth 8.
  - 5-bit credit counters.
  - A single asynchronous active-low reset.
- **Not built.** Skew buffers every *n* hops (suggested only for larger chips), the on/off flow-control alternative, and the baseline mesh router.

## Parameters

| parameter | default | where |
|---|---|---|
| `ROWS`, `COLS` | 7, 7 | `abc_noc`, `abc_router`, `abc_route_gen` |
| `DEPTH` (bi-FIFO, local FIFO, credit limit) | 8 | all |
| `FLIT_W` | 128 | `abc_pkg` |
| `TURN_EXTRA` (turn cost in link delays) | 4 | `abc_route_gen` |
| sync-FIFO depth | 4 | `abc_sync_fifo` |
| `CNT_W` (credit count width) | 5 | `abc_pkg` |

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops by itself. A watchdog ends a hung run. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/abc_pkg.sv rtl/abc_*.sv \
    tb/tb_abc_noc.sv --top-module tb_abc_noc -Mdir obj_noc
obj_noc/Vtb_abc_noc
```

Replace `tb_abc_noc` with any testbench in `tb/`. Add `+verilator+rand+reset+2` to start the state that is not reset at random values.

The testbenches seen passing:

| testbench | what it shows | result |
|---|---|---|
| `tb_abc_noc` | full 7×7 network, default parameters, 49 phase-shifted clocks, uniform random traffic at 2 % and 30 %; every packet delivered once, in order per source/destination, to the right node | 1470 packets, 0 failures; 5953 bypassed and 19154 buffered flit hops, 805 entries into ABC mode, 845 aborted switches, 706 turns, 30 credit stops |
| `tb_abc_noc_patterns` | full network, transpose then bit complement (partner (6-r, 6-c)), 3 % packet-start probability per node and cycle | 1152 packets, 0 failures; mean latency 69 cycles for transpose, 37 for bit complement |
| `tb_abc_router` | one router with all neighbours modelled: straight, turn, eject, local; local routes walked to their destination | 0 failures |
| `tb_abc_out_unit` | one red output: zero-cycle bypass, FIFO mode, order, no interleaving, credits never overrun | 0 failures |
| `tb_abc_out_fsm` | exact state sequences, aborts, thrash | 0 failures |
| `tb_abc_ccontrol` | clock never carries both sources, gap before a switch, stop on missing credit | 0 failures |
| `tb_abc_route_gen` | all 49×48 pairs reach their destination, cost is minimal, tie-break, printed example | 0 failures |
| `tb_abc_bi_fifo`, `tb_abc_sync_fifo`, `tb_abc_sync2`, `tb_abc_credit_ctrl`, `tb_abc_input_unit`, `tb_abc_inject_unit`, `tb_abc_eject_unit` | block behaviour against reference models | 0 failures |

Each full-network test runs in about half a minute.

## Limits and things to know

- **Timing is ideal.** Link and gate delays are zero in simulation. The safety of the bypass on silicon depends on the flit and its clock staying aligned along the path, which needs skew-matched layout. Nothing here models that.
- **Synchronizers are plain two-flop chains.** Metastability is not modelled.
- **Mode switches can stall along a chain.** To enter ABC mode, a port needs edges of its incoming clock. That clock is the forwarded output clock of the upstream port, and it is held high while that port is switching. When several ports along one chain try to switch at the same time, each waits for the one upstream of it. A port whose switch is aborted (a turn or local packet arrived meanwhile) must then wait for the incoming side to acknowledge before it can use its local clock again. No flit is lost, but a packet can wait there for up to about 200 cycles. This is the main cause of the high mean latency of transpose traffic: every transpose packet turns at a diagonal node and often meets a port in the middle of a switch. A possible fix is to start a switch only after the incoming clock has ticked recently, or to let an abort cancel a request that the incoming side has not yet seen. Neither is built.
- **Traces.** No trace-driven testbench exists. The routing unit is checked for every source/destination pair, so every traffic pattern uses only routes that are already verified.
