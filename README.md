# STR: a surrounding test ring for built-in self-recovery of a 2D-mesh network-on-chip

A mesh network-on-chip can lose a whole router to one manufacturing defect,
and every packet routed through that router is lost with it. This design
fixes only what is actually broken. Each router is seen as **20 datapaths**
(every input port to every other output port: N, E, S, W, Local). At
power-up a ring of test modules around the mesh sends test packets through
every datapath and finds which datapaths, input FIFOs and output MUXs are
broken. It then writes isolation masks into the faulty routers. Those
routers keep forwarding traffic on the datapaths that still work.

The SystemVerilog here is synthesizable and parameterised by the mesh size
`N` and the FIFO depth `D`. By default it builds a 4×4 mesh with 4-flit input
buffers and 34-bit flits:
- 16 routers;
- 16 test modules;
- one controller.

## The pieces

```
            TM   TM   TM   TM              (north side, y = N+1)
       TM  [R]--[R]--[R]--[R]  TM
       TM  [R]--[R]--[R]--[R]  TM          routers at x, y = 1..N
       TM  [R]--[R]--[R]--[R]  TM          each with a redirector at its
       TM  [R]--[R]--[R]--[R]  TM          local port and an IP port pair
     CTRL   TM   TM   TM   TM              (south side, y = 0)
```

| Module | Role |
|---|---|
| `str_top` | the whole system: mesh, 4N test modules, controller, through-path search |
| `str_mesh` | N×N routers and their redirectors, wired as a mesh; boundary ports go to the TMs |
| `str_router` | 5-port wormhole router, X-Y routing, round-robin, no virtual channels, with isolation cells |
| `str_fifo`, `str_addr_decoder`, `str_routing_logic`, `str_arbiter`, `str_mux4` | router parts: D-flit input buffer, header decoder, dimension-order route, 4×1 round-robin arbiter with wormhole lock, 4-to-1 output MUX |
| `str_iso_cell` | isolation cell: a mask register ANDed into a request. It is used as the RII (request-in isolation, 20 per router) and the ROI (request-out isolation, 5 per router) |
| `str_redirector` | sits at each router's local port. It turns Source/Sink test packets around so they leave the router again. All other traffic it passes to and from the IP |
| `str_tm` | test module: `str_tprom` (test patterns and this TM's schedule), `str_pkt_gen`, `str_pkt_sender`, `str_ora` (response check), `str_sr` (its segment of the result ring) |
| `str_ctrl` | controller: sequences the test, collects results, diagnoses, sends fault-isolation packets. Uses `str_path_mask` |
| `str_tp_search` | through-path search: how far a packet can run straight across isolated routers |
| `str_pkg` | flit and header types, port numbering, the test schedule as functions |

Coordinates:
- Routers sit at `(x, y)`, with `x, y = 1..N` and `y` growing north.
- A test module (TM) sits at `x = 0` (west), `x = N+1` (east), `y = 0` (south) or `y = N+1` (north), facing the boundary port of one router.
- A corner router has two TMs.

The controller sits at the south-west corner. It connects to both ends of a
shift-register ring that runs through every TM:
- up the west side, east along the north side, down the east side, and west along the south side;
- the ring index is `str_pkg::tm_index(side, pos, N)`.

The controller also broadcasts one command word (`tm_cmd_t`) to all TMs.

## Flits and packets

A flit is 34 bits: a 2-bit type (body, tail, head, single) and a 32-bit payload.

A head flit's payload holds:
- the packet kind (data, Thru/Turn test, Source/Sink test, fault isolation);
- a "route Y first" bit;
- three 4-bit coordinate pairs: destination, source, and an auxiliary pair.

The auxiliary pair is used two ways:
- In a test packet, it names the router where the packet is meant to turn.
- In a Source/Sink packet, it holds the final receiving TM.

Packet formats:

| Packet | Flits |
|---|---|
| Test | a head and then `2D` pattern flits, the last of which is the tail (`2D+1` flits) |
| Fault-isolation (FI) | a head and one tail flit carrying 25 mask bits: 20 RII enables in Table-2 order, then 5 ROI enables |

## Testing a FIFO and a MUX with two pattern sets

Every pattern flit is all-0 or all-1. A packet carries the set `X` and then
its complement `X'`:
- `X = 0,1,1,0,1,0,0,1,…`: bit `i` is the parity of `i`, the Thue-Morse sequence.
- `X'` flips every bit of `X`.

So at every 2-to-1 stage of the FIFO's read MUX, the two inputs differ. The
step from `X` to `X'` also toggles every storage bit. A stuck-at fault in a
FIFO register, in its read MUX or in the output crossbar therefore corrupts
at least one flit.

The receiving TM's ORA (output response analyzer) compares each flit
exactly with the pattern in its own ROM. It also checks:
- the head flit is a test packet addressed to this TM;
- the packet has exactly `2D+1` flits.

## The test schedule (`str_pkg`)

Every test packet goes from one TM to another. The packets of one round never
share a router output, so a round has no contention. There are `12N` rounds;
in each round, every TM on the sending side sends one packet.

- **Thru/Turn rounds** (`0 … 8N-1`):
  - round `r` works on diagonal `k = r/8`, the routers with `(x − y) mod N = k`;
  - it tests turn type `r%8`, in the order WN, WS, EN, ES, NE, NW, SE, SW;
  - a packet runs straight to its diagonal router, turns there, and runs straight to a TM on another side;
  - it therefore tests one Turn datapath, plus the Thru datapaths of every router it passes;
  - west/east senders route X-first; north/south senders set the Y-first header bit;
  - total: `8N²` packets.
- **Source/Sink rounds** (`8N … 12N-1`):
  - the four directions W→E, E→W, N→S, S→N, each swept over all `N` columns or rows;
  - the packet is addressed to a router, enters it, and leaves it through the local output port;
  - the redirector at that port rewrites the header: the new destination is the opposite TM and the new source is the router;
  - it then sends the packet back in through the local input;
  - one packet thus tests a Sink datapath (`WL`, say) and a Source datapath (`LE`);
  - total: `4N²` packets.

Every datapath of every router is crossed by at least one packet. `tb_str_path_mask` checks this.

A round lasts `(2D+1) + H·L + 4` cycles, plus two cycles of command overhead:
- `2D+1` cycles: the packet length;
- `H = 2N+2`: the longest hop count;
- `L = 1`: cycles per hop;
- `4`: a margin.

At `N = D = 4` this gives 25 cycles per round. The 48 rounds take 1200 cycles.

## Collection, diagnosis and isolation (`str_ctrl`)

1. **Collect.** Each TM keeps one result bit per round: 1 means it expected a packet and received it intact. The controller loads all result bits into the shift registers. It then clocks the ring `4N·SRW` times, where `SRW = max(12N, 34)`. This takes 768 cycles at the defaults.
2. **Diagnose.** Every datapath starts out faulty. The controller then replays the schedule, one packet per cycle. For every packet whose receiver reported a pass, `str_path_mask` marks the datapaths it crossed as fault-free. Components follow from the datapaths (Table 4 of the 20-path model):
   - an input FIFO is faulty when all four datapaths out of it failed;
   - an output MUX is faulty when all four datapaths into it failed.
3. **Masks.** The masks are computed as follows:
   - `ROI(o) = MUX o good`;
   - `RII(i,o) = FIFO i good AND (datapath i→o passed OR MUX o faulty)`.

   So a faulty FIFO clears four RIIs and a faulty MUX clears one ROI. A single broken MUX leg clears only its own RII.
4. **Isolate.** For each router whose masks are not all ones, the controller picks a delivery TM:
   - candidates are tried in the order west, north, east, south;
   - the chosen TM must have a straight path to the router whose Thru datapaths all passed the test.

   It then delivers the FI packet:
   - it shifts an FI slot (valid, x, y, 25 mask bits) around the ring into that TM;
   - it pulses `fi_go`;
   - the TM sends an FI packet;
   - the addressed router takes the packet off its input link before the FIFO and writes its masks.

   A router that no such path reaches is counted in `unreachable`.

The diagnosis is only as sharp as the schedule. One packet crosses several
datapaths, so a failing packet makes all of them suspect. A datapath stays
marked faulty unless some other packet clears it. In the end-to-end test
below, 4 faults make 13 datapaths really faulty. All 13 are isolated, and 31
good datapaths stay suspect as well. The design errs on the safe side: it
never enables a broken path.

## Isolation in the router

Each input's routing logic raises one request per output.
- Each request passes through its RII before it reaches that output's arbiter.
- The arbiter's grant passes through the output's ROI before it becomes the output valid. The grant also selects the MUX leg.

Clearing an RII hides one input from one output. Clearing an ROI shuts an output.

The masks reset to "enabled", so the network works before and without recovery.

## Through paths (`str_tp_search`)

A fault-tolerant routing function can still send a packet straight across
faulty routers, as long as their straight datapath is enabled. For every
router and direction (N, E, S, W), `str_tp_search` gives `reach`: the number
of consecutive routers in that direction whose straight datapath is enabled.
A straight path to a router `k` hops away is usable iff `reach ≥ k-1`. The
top exposes it as `tp_reach`. The routers here route plain X-Y and do not use
it.

## Timing at a glance

| Phase | Cycles |
|---|---|
| Hop through an empty router | 1 |
| Test phase | 12N rounds × 25 = 1200 |
| Collection | 768 |
| Diagnosis | 12N² ≈ 200 |
| Isolation | about 2N+8 per faulty router, plus one ring pass per FI packet |

At the defaults with no faults, the whole flow from `bisr_start` to
`bisr_done` takes about 2180 cycles.

## Departures from the source design

- **No fault-tolerant routing.** The original pairs the ring with "through-path" versions of three fault-tolerant routing algorithms from the literature. Their base rules are not reproduced here. Routers route X-Y, so traffic whose X-Y route crosses an isolated datapath waits at the mask. Only the through-path search is provided.
- **Test time.** The original reports under 200 test cycles for a 4×4 mesh. This schedule tests the eight turn types of a diagonal in separate rounds and pads every round. It needs 1200 cycles for the test phase, plus collection.
- **Own choices, not given by the source:**
  - the component rule (a FIFO is faulty when all four of its datapaths fail; likewise a MUX);
  - the FI packet format, and its capture on the link;
  - Y-first routing for test packets from north/south TMs;
  - the header layout;
  - the valid/ready handshake;
  - the broadcast command word;
  - the ring order;
  - the shift-register length;
  - the choice of the TM that delivers an FI packet.
- **Fault-emulation hooks.** The `fault` inputs (type `fault_inj_t`) force payload bit 31 to 0 at a chosen FIFO output, MUX output or MUX leg. They exist to exercise the flow. Tie them to zero in a real design.
- **IPs idle during recovery.** IPs must stay idle while `bisr_busy` is high.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it runs |
|---|---|
| `tb_str_top` | the full flow at the default size. Run 1 is fault-free. Run 2 injects four faults and then checks the diagnosis, the masks, the through paths and traffic. It counts each mechanism: test rounds, redirector loop-backs, ring shifts, FI packets, contention, RII and ROI blocking, cut through paths |
| `tb_str_sizes` | self-recovery of a 3×3 mesh with one faulty router and of an 8×8 mesh with four (about 60,000 cycles; the model takes about two minutes to build) |
| `tb_str_ctrl` | a 4×4 controller against a model of the ring with one failing Source/Sink packet |
| the other testbenches | one block each |

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/str_pkg.sv tb/tb_str_top.sv \
          --top-module tb_str_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_str_top` with any other testbench name to run that testbench.

The end-to-end test runs in well under a second. The mesh size is the `N`
parameter of `str_top`. Coordinates are 4 bits wide, so meshes up to 14×14
fit.
