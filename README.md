# Asynchronous SDM network-on-chip that survives stuck-at faults on its links

This is a 2D-mesh network-on-chip built from quasi-delay-insensitive (QDI)
asynchronous logic. Its links are 4-phase 1-of-4 pipelines. In such a link a
wire stuck at 0 or 1 does more than corrupt data: it stops the handshake. The
packet crossing the link then freezes, and every router on its path freezes
with it. This design finds such a link and gets the network running again:

* **Spatial division multiplexing (SDM).** Every link and buffer is split
  into `VN` independent virtual circuits (VCs), each `DW/VN` bits wide.
  Because the circuits are separate wires, one broken wire affects only one
  circuit.
* **Detection from the shape of the deadlock.** Once a fault has frozen a
  path, the pipeline stages after the faulty wire all show the same ack
  value. The stages before it show alternating ack values. Every input VC
  runs a small clocked state machine. Over two to four time-out periods it
  checks that nothing has moved and that its own buffer shows the
  "just after the fault" pattern. It then asks the upstream router's output
  VC whether that VC shows the "just before the fault" pattern. If both
  agree, the circuit between them is faulty.
* **Recovery.** The upstream allocator stops using the faulty circuit.
  Later packets take the other circuits of the same link. The frozen packet
  is then cleared in two halves. *Drain*: a sink at the upstream output
  swallows the rest of the packet, so the routers before the fault are
  released. *Release*: a fake tail flit made at the downstream input frees
  the routers after the fault. If the wire later works again, the circuit is
  unblocked.

The defaults are the evaluated network: 4x4 routers, `DW = 64`, `VN = 2`,
two input-buffer stages, one output-buffer stage, and a time-out of 67 cycles
of the detection clock (1.5 MHz from 100 MHz).

## How the asynchronous logic is written

The routers are QDI circuits. They are built from C-elements, C-element
latches, completion detectors and arbiters. They have no clock. In this
RTL every **state-holding** asynchronous element is a flip-flop on a free
element clock, `eclk`. Combinational gates (OR completion, multiplexers,
AND-OR crossbar) stay combinational. A C-element with inputs `a` and `b`
works like this:

```
always_ff @(posedge eclk) if (a && b) q <= 1; else if (!a && !b) q <= 0;
```

A QDI circuit works for any delay of its elements, so this is one legal
timing of the same circuit: every element takes exactly one `eclk`. The
result has no combinational loops, is synthesizable, and simulates
deterministically in a two-state cycle simulator. A silicon implementation
would use real C-elements and mutexes, and `eclk` would go away.

The fault-detection state machines and the time-out counters run on a
second clock, `clk`, unrelated to `eclk`. They sample asynchronous signals
without synchronizers. That is safe here because a decision needs a whole
time-out period without any transition first, and a sample taken during a
change only sends the machine back to `Idle` or to a re-check.

## Words, flits and packets

* A VC carries `ND = DW/VN/2` digits. Each digit is a 1-of-4 code: four
  rails, and the one that is high gives the value 0..3. A spacer has every
  rail low. Rails `[4k+3:4k]` are digit `k`. Ports carry the rails as
  `2*DW/VN` bits.
* `eop` is one extra wire. A **tail flit** is `eop` high with every rail
  low. A stage holds a complete word when every digit has a rail high, or
  when `eop` is high.
* **Head flit:** digit 0 is the destination x and digit 1 the destination y.
  So the address format covers meshes up to 4x4. The other digits are free
  for the sender.
* **Packet:** head, body flits, tail. The evaluated traffic is 64-byte
  packets, which is 16 body flits of 32 bits at `DW = 64`, `VN = 2`.
  Switching is wormhole. Routing is XY: first along x (East is x+1), then
  along y (North is y+1).

## Router (`sdm_router`)

There are five ports: South, West, North, East and Local. Port `p`, VC `v` is
channel `p*VN + v`.

**Input VC (`input_vc`).** This is a chain of `qdi_stage`s: Stage 1 faces the
link and Stage 0 faces the crossbar.
* `xy_controller` reads the head flit waiting in front of Stage 0 and raises
  a one-hot request `rt_r`.
* `buffer_controller` keeps Stage 0 closed (`acken = 1`) until the
  allocator answers with `rt_ack`. It then opens Stage 0 for the packet.
  It closes Stage 0 again once the output has taken the tail flit
  (`ackeop = C(eop, cia)`). After the tail is withdrawn it resets the XY
  controller, which drops the request and releases the path.
* The controller's equations come from its transition graph:
  `rt_en = !rt_ack`, `acken = !rt_ack | c`, `rt_rst = c & !ackeop`, with
  `c = C(rt_ack, ackeop)`.

**Switch allocator (`switch_allocator`)**, one per output port. This is a
multi-resource arbiter. It grants a waiting request one ready output VC by
setting one tile of a request-by-VC matrix.
* `vc_busy` is the column OR and `rt_ack` the row OR.
* A tile clears when its request drops.
* A VC whose `vc_rdy` is low is never granted.

**Crossbar (`crossbar`).** An AND-OR switch of `5*VN` by `5*VN` channels.
Rails go forward and acks go back along the configured tiles.

**Output VC (`output_vc`).** One `qdi_stage` that drives the link, plus the
upstream half of the link monitor (described next).

## Finding the faulty circuit

Each link circuit has four extra wires. `err_r` and `err_conf` run from the
downstream input VC to the upstream output VC. `TranDeto` and `AckSeqo`
run back.

**Downstream side (`ivc_fault_detector`).** Three transition detectors watch
`rt_ack`, `ipdia` (the ack into Stage 1) and `ipdoa` (the ack from the
crossbar into Stage 0). `TranDeti` is their OR. A case checker raises
`AckSeqi` when the input VC looks like the first router after a fault:

| case | condition | meaning |
|---|---|---|
| 1 | `rt_ack & (ipdia == ipdoa)` | path granted, neighbouring acks stuck equal |
| 2 | `!rt_ack & !ipdia & !ipdoa` | head never completed (an idle VC looks the same) |
| 3 | `!rt_ack & ipeop & !ipdoa` | fake tail made by a stuck `eop` wire |

**Upstream side (`output_vc`).**
* `AckSeqo = err_r & ((opdia == opdoa) | !vc_busy)`. It is high when the
  output VC is *not* in the pre-fault pattern, because its acks are equal
  or it is idle.
* `TranDeto` is a transition detector on the link ack `opdoa`, enabled by
  `err_r`.

**State machine.** Its state is `{err_conf, err_r, start}`:

| state | code | next |
|---|---|---|
| Idle | 000 | time-out → Start |
| Start | 001 | time-out: `!TranDeti & AckSeqi` → Enquiry, else → Idle |
| Enquiry | 011 | `AckSeqo` → Idle at the next `clk` edge; time-out: `!TranDeto & !act2` → Confirm, else → Idle |
| Confirm | 111 | time-out with `TranDeto | act2` → Idle (the fault has gone) |

Congestion does not trigger it. A packet that is only waiting shows
alternating acks, or its upstream VC shows equal acks. An idle VC passes
Start but is sent back from Enquiry because its upstream VC is not busy.
The time-out period must be longer than the time a packet needs to cross a
router.

## Recovering

When `err_conf` rises:

* **Blocking (upstream `output_vc`).** An asymmetric C-element sits in front
  of the `vc_rdy` inverter. It rises with `vc_busy` and falls only when both
  `vc_busy` and `err_conf` are low. The circuit therefore stays not-ready for
  as long as the fault is confirmed, even after its packet has gone.
* **Drain (upstream `output_vc`).** A multiplexer forces spacer onto the
  faulty link. The upstream ack is taken from a completion-detector sink
  (`qdi_cd`). The flits still queued upstream run into the sink, and their
  tail releases the upstream routers one by one.
* **Release (downstream `input_vc`).** Three multiplexers in front of
  Stage 0 take effect:
  * the rails are forced to spacer, which flushes any partial word;
  * `eop` comes from `eop_generator`;
  * Stage 1 is acknowledged by a sink.

  `eop_generator` computes `eop_err = C+(!C(acken, cia), err_conf)`. If the
  controller stopped in the middle of a packet, `eop_err` rises: this is a
  fake tail, and it frees the downstream routers. If it stopped on a tail
  that a stuck wire will not let go, `eop_err` stays low and withdraws that
  tail.
* **Resume.** When the wire works again, the sink and link acks start moving
  again. `TranDeto` or `act2` then sees a transition, and the next time-out
  returns the machine to Idle. This clears `err_conf` and unblocks the
  circuit.

The local ports and the mesh edge are not monitored. Their `AckSeqo` input is
tied high, so they never confirm.

## Top level (`sdm_noc`)

| port | meaning |
|---|---|
| `eclk`, `clk`, `rst_n` | element clock, detection clock, asynchronous active-low reset |
| `lin_d/lin_eop` → `lin_ack` | local injection, `[router][vc]`, router `n` at `(n % NX, n / NX)` |
| `lout_d/lout_eop` ← `lout_ack` | local ejection |
| `fault_sa0`, `fault_sa1` | `[router][dir][vc][bit]` force a wire of the link leaving `router` towards `dir` (0 S, 1 W, 2 N, 3 E). Bits `[2*DW/VN-1:0]` are rails, bit `2*DW/VN` is `eop` and the next bit is the returning ack. Tie to 0 in use. |
| `err_conf` | `[router][port][vc]` Confirm state of every input VC |

Parameters: `NX`, `NY` (4, 4), `DW` (64), `VN` (2), `IN_STAGES` (2),
`OUT_STAGES` (1), `TIMEOUT_CYCLES` (67; the fault experiment uses a 10 us
time-out, which is 1000 at 100 MHz). `DW/VN/2` must be at least 2 for the
address digits. The other evaluated configurations are all legal: `DW` 32,
64 or 128 with `VN` 2 or 4.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each prints `TB_RESULT checks=N failures=M`. Run one with:

```
verilator --binary --timing -Irtl rtl/sdm_pkg.sv tb/tb_sdm_noc.sv --top-module tb_sdm_noc
./obj_dir/Vtb_sdm_noc
```

`tb_sdm_noc` runs the mesh at its default size. It takes about 10 s after
the build and has three phases:
1. Uniform random traffic of 64-byte packets, 96 packets. All of them must
   arrive intact.
2. A stuck-at-1 on a rail of circuit 0 of the East link of router (1,2),
   inserted while a packet is on it. The fault must be confirmed, the
   sources must finish, at most the one packet caught by the fault may be
   lost, and later packets must arrive intact over circuit 1.
3. The fault is removed. The circuit must be unblocked and must carry
   packets again.

The testbench also counts how often each mechanism happened: allocation of
a link's second circuit, allocation contention, the early exit from Enquiry,
confirmation, Drain, Release and resume. It fails if any count is zero. It
also checks the detection latency. Confirmation must come two to four
time-out periods after the last ack transition on the circuit, which marks
the onset of the deadlock. It came after 3.8 periods.

`tb_sdm_noc_to1000` repeats that test with `TIMEOUT_CYCLES = 1000`, the 10 us
time-out of the fault experiment. There, confirmation came after 2.6
time-out periods.

`tb_sdm_noc_vn4` runs the same mesh with `DW = 32`, `VN = 4`. Each circuit
is then 8 bits wide, so a 64-byte packet has 64 body flits, and every link
has four circuits. It checks 192 random packets, then confirmation of and
recovery from a stuck-at-0 rail on circuit 2 of the same link. The other
width settings need only a different `DW` and `VN` on `sdm_noc`.

`tb_sdm_router` runs one router with all ten input channels injecting
packets at once and checks that each packet leaves by its XY port intact.
The unit testbenches check the handshake rules of each element.

## Departures and limits

* The element clock (above) replaces the unclocked timing of the QDI
  circuits.
* The transition detector is two flip-flops with the same behaviour as the
  original two-C-element circuit: output 1 when disabled, and set by any
  change. Its flag is sticky.
* `AckSeqo` is a plain AND with `err_r`, not an asymmetric C-element. The
  return from Enquiry to Idle happens at the next `clk` edge, not through an
  asynchronous reset of the state flip-flops.
* The allocator's two mutex arbiters are replaced by a round-robin choice of
  request and the lowest ready VC, one grant per `eclk`.
* Only the function of the crossbar and the XY controller is given; their
  insides here are the simplest circuits that do the job. The head-flit
  address format, the port numbering, the direction convention (East = x+1,
  North = y+1) and all reset values are this design's own choices.
* Time-out default: 67 cycles comes from a 1.5 MHz time-out tick driven by a
  100 MHz clock. The time-out must outlast a packet's transit through one
  router. The testbenches therefore run `clk` ten times slower than `eclk`,
  so a time-out is 670 `eclk` cycles. When changing the clock ratio or the
  packet length, keep this rule.
* Not included: the unprotected baseline router, the traffic-generating
  cores, and any measurement of area, energy or saturation throughput.
* Faults inside the routers and on the fault-detection wires are not
  covered. Two faults whose frozen paths cross, or faults that block every
  circuit of a link, are not recovered.
