# Collision-free permutation network on chip: a 16x16 circuit-switched Clos NoC with self-repairing links

This design connects 16 processing cores through a three-stage Clos network
built from 4x4 switches. Traffic is **circuit switched**, with no packet
buffers. A source first sets up a dedicated path to its destination. It then
streams data over that path and finally releases it. Any permutation of
sources onto destinations can run at the same time without collisions.
Paths are found at run time by a **probe** that walks through the network:

- At the first stage the probe may take any of four routes.
- If a route turns out to be blocked, the first-stage switch **backtracks** and
  tries the next one.
- Only when all four routes are blocked does the source get a "blocked" answer.
  It then retries later.

The wires between the middle and the output stage are protected against wire
faults:

- Each 16-bit word is sent as four Hamming(7,4) codewords, so a single wrong
  wire per codeword is corrected on the fly.
- Two **spare wires** per link take over from wires found to be permanently
  faulty.
- Faulty wires are found in two ways: the syndromes of the received data
  (**syndrome storing-based detection, SSD**), and a periodic **in-line test
  (ILT)**. The ILT moves live data off a pair of wires, tests that pair with
  known patterns and then moves the data back.
- All reconfiguration happens while data keeps flowing.

Everything is plain synthesizable SystemVerilog. There is one package
(`noc_pkg`) and one module per file in `rtl/`. A self-checking testbench for
every module is in `tb/`.

## Network structure and addressing

```
 sources 0..15        input stage         middle stage        output stage      destinations
 (port 4i+p)     g_in[i] (i = 0..3)    g_mid[j] (j = 0..3)   g_out[k] (k = 0..3)  (port 4k+l)
                  out j  ──────────►  in i
                                       out k ── adaptive link 4j+k ──► in j
                                                                        out l ──►
```

| stage | switches | how an input control chooses its output |
|---|---|---|
| input  | 4 x 4x4 | any output (all four lead to the destination through different middle switches); tries them in turn, starting at its own input index |
| middle | 4 x 4x4 | `dest[3:2]`, the output switch that serves the destination |
| output | 4 x 4x4 | `dest[1:0]`, the destination port on that switch |

Port addresses are 4 bits (`0000`..`1111`). With four middle switches and
4x4 switches (m = n = 4), the network is *rearrangeable*: every permutation has
a set of disjoint paths. But setting paths up one after another can block a
later one. The design does not precompute paths. A blocked setup comes back
to the source as Back, and the source retries once other circuits have moved.

## The link handshake and the life of a circuit

Every link between two switches, and every network port, carries three signal
groups:

| signal | width | direction | meaning |
|---|---|---|---|
| `req`  | 1  | downstream | 1: request a connection / keep it; 0: release it |
| `data` | 16 | downstream | during setup: the probe (destination in bits 3:0, rest 0); after Ack: payload |
| `ans`  | 2  | upstream   | `00` no answer yet, `01` Ack, `10` Back (blocked), `11` nAck (destination not ready) |

**Setup.** A source raises `req` and puts the destination address on `data`.
It holds both until an answer arrives. In each switch the input control (IC)
for that input does the following:

1. Sees `req` rise and reads the address from the data lines. The probe travels
   on the data wires; there is no separate address bus.
2. Picks a candidate output and checks the output's busy flag on the status
   bus. If the output is free, it requests it from the arbiter.
3. The arbiter grants each free output to at most one IC per cycle; the lowest
   IC index wins. The granted output control (OC) becomes busy and raises
   `req` on the next link. The crossbar now connects the IC's data to that
   output, so the probe moves on.
4. From then on, the grant bus routes the answer from that output back to the
   IC, and the IC passes it upstream.

**Backtracking.** An IC can fail to get its output: the output is busy, another
IC won the arbitration, or a Back comes up from downstream. In the first stage
the IC then drops what it holds and moves to its next output. In the middle
and output stages there is no alternative, so the IC answers Back. A
first-stage IC answers Back only after all four outputs have failed. While it
is still searching, a Back from downstream is not passed upstream. Once an IC
has answered Back it keeps doing so until its `req` falls.

**Transfer.** The destination answers Ack when it accepts the circuit, or nAck
while it is not ready. The answer travels back through the switches without
being registered. After the source sees Ack it sends one payload word per
clock. The words reach the destination in the same clock: the connected path
is purely combinational.

**Release.** The source drops `req`. Each switch frees its output one clock
later, so `req` falls stage by stage, one clock per stage. A released link
always shows `req = 0` for at least one clock before it can be taken again.

**Timing of an uncontended setup.** `req` rises at clock edge 0:

| clock edge | event |
|---|---|
| 1 | the IC has read the probe and requests its output |
| 2 | the OC is busy, and `req_out` is high on the next link |
| 3 each further switch | the same two clocks again |
| last | the destination registers its Ack |

Through one switch straight to a destination, the source samples Ack at edge 4.
Through the whole network, when the destination answers at once, this takes
about 7 clocks.

## Inside a switch

`clos_switch` has a data part and a control part:

- **Data part:** `crossbar`, one multiplexer per output. A busy output
  carries its owner's data; a free output drives 0.
- **Control part:**
  - four `input_control`s, each a four-state FSM: idle, routing, connected,
    blocked;
  - four `output_control`s, each a busy flag plus the owner's index;
  - one `switch_arbiter`.

The parameter `STAGE` (`STAGE_IN`, `STAGE_MID`, `STAGE_OUT`) turns the same
switch into the three kinds needed for the three stages. Only the IC's routing
rule and its permission to backtrack differ.

## Self-adaptive links

Each of the 16 middle-to-output connections uses an `adaptive_link` for its
data word. `req` and `ans` bypass it.

```
 din ─► link_encoder ─► tx_reconfig ─► phy_tx ══ wires ══ phy_rx ─► rx_reconfig ─► link_decoder ─► dout
         (4 x H(7,4))        ▲   ▲                                   │    │            │ syndromes, error vector
                            tpg  └──────── link_ctrl (dis, tst) ─────┘    └─ test_out   ▼
                                                ▲                                      ssd x 4
                                                └──────────── permanent error ─────────┘
```

**Code.** The 16-bit word is split into four nibbles. Each nibble is encoded
with the Hamming(7,4) code of `noc_pkg`:

- generator rows `1000110 0100101 0010011 0001111`;
- parity-check rows `1101100 1011010 0111001`.

This gives 28 code lines. The decoder computes the syndrome `S = u·Hᵀ` of
each codeword. It then flips the bit whose H column equals S. For example,
the received word `0110111` has syndrome `001`, so the last bit is flipped.

**Wire mapping.** A link has 30 physical wires: 28 code lines plus 2 spares.
`link_ctrl` holds two masks:

- `dis`: wires flagged faulty;
- `tst`: wires currently under in-line test.

Code line k goes on the k-th wire that is in neither mask. When a wire drops
out, the lines above it shift by one towards the spare end.
`tx_reconfig` and `rx_reconfig` use the same masks in the same clock, and the
data path is combinational. So a change of configuration never corrupts or
delays a word.

**In-line test (ILT).** A round starts every `ILT_PERIOD` clocks, or when
`ilt_trigger` is pulsed. It visits the windows {0,1}, {1,2}, ..., {28,29}, {29}.
A window takes 5 clocks, so a round takes 150 clocks:

1. One clock: the wires of the window are taken out of the data mapping, and
   the data shifts onto spares.
2. Four clocks: the test pattern generator (`tpg`) drives 01, 10, 11, 00 on
   them. The patterns 01 and 10 expose a short between the two wires; 11 and
   00 expose a wire stuck at either value.
3. At the end of the window, every tested wire that showed a mismatch is
   disabled. Every tested wire that did not is enabled again.

A working wire may enter the window only while a spare is free to carry its
data. This one rule gives the whole schedule:

| spares free | what a window tests |
|---|---|
| 2 | both wires (pair test, finds shorts) |
| 1 | one wire only (finds stuck wires, not shorts), unless its neighbour is already disabled, in which case the pair |
| 0 | only wires that are already disabled. A wire whose fault has gone away (an intermittent error) is recovered this way |

**Syndrome storing-based detection (SSD).** One `ssd` per codeword watches
the syndromes of valid words. It holds:

- a register with the last syndrome;
- a comparator for "equal and nonzero";
- a counter that saturates at 7.

It reports a permanent error on the ninth identical nonzero syndrome in a row.
`link_ctrl` then takes the code line named by the decoder's error vector. It
maps that line to the physical wire that carries it and disables the wire,
provided a spare is free. If an ILT window is in progress, this waits for the
window to finish. Every change of `dis` pulses `busy`, which clears all SSD
counters.

A stuck wire is only visible when the data disagrees with the stuck value, so
SSD detection depends on the data. A stuck spare wire carries no data, so only
the ILT can find it.

`low_spare` warns the system above that a link has only one spare left.
`no_spare` tells it that the link has used both.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `PORTS`, `RADIX`, `ADDR_W`, `DATA_W` | 16, 4, 4, 16 | `noc_pkg` | network size, switch size, address and data width |
| `NS` | 2 | `clos_noc_top`, `adaptive_link`, `link_ctrl` | spare wires per link |
| `ILT_PERIOD` | 4096 | same | clocks between ILT rounds |
| `NW` | 30 | derived | wires per link = 4 x 7 + `NS` |
| `CNT_MAX` | 7 | `ssd` | counter limit; an error is reported on `CNT_MAX + 2` identical syndromes |

The network size is fixed by the package constants: 4x4 switches and 4-bit
addresses. Changing `DATA_W` to another multiple of 4 changes the link width
with it.

## Top-level ports (`clos_noc_top`)

- **Network ports:** `src_req`, `src_data` and `src_ans` for the 16 sources;
  `dst_req`, `dst_data` and `dst_ans` for the 16 destinations. All are
  unpacked arrays indexed by port number.
- **Link wires:** `lnk_tx[16]` and `lnk_rx[16]`, each `NW` bits wide. These are
  the physical wires of the 16 links. Connect `lnk_rx = lnk_tx` for a
  fault-free chip, or put a fault model between them, as the testbench does.
- **Status and events:**
  - `lnk_dis`: wires flagged faulty on each link;
  - `lnk_low_spare`: the link has one spare left;
  - `lnk_no_spare`: the link has used both spares;
  - `lnk_corrected`: a single error was corrected this cycle;
  - `lnk_ilt_active`: an ILT round is running;
  - `ev_backtrack`, `ev_ilt_disable`, `ev_ilt_recover`, `ev_ssd_disable`:
    one-clock event pulses.
- `ilt_trigger` starts an ILT round on all links.
- `rst` is an active-high asynchronous reset. While it is high, every output
  control is free and every output is 0.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/noc_pkg.sv tb/tb_clos_noc_top.sv \
          --top-module tb_clos_noc_top -Mdir obj && obj/Vtb_clos_noc_top
```

Replace `tb_clos_noc_top` with any other testbench in `tb/`.

| testbench | what it establishes |
|---|---|
| `tb_clos_noc_top` | The whole network at default parameters. It runs 24 rounds of full and partial random permutations: every source sets up, streams 2–8 words and releases, retrying after Back. Destinations sometimes stall with nAck. Stuck-at faults are injected on seven links during traffic. It checks probe addresses, that every word reaches the right destination from the right source, and that words sent equal words received. It counts each mechanism and fails if any never happens: setup, Back, backtracking, nAck stall, corrected error, SSD disable, ILT disable, ILT recovery, low_spare, no_spare. It runs in about 25 s. |
| `tb_clos_noc_perm` | Full permutations with all sixteen setups issued in the same clock, at default parameters. Identity, `dest = src + 4` and `dest = src XOR 5` need no rearrangement. For these, every circuit must be set up at the first try with no Back, and every source must see Ack on the 8th clock edge after it raises Req. Release must reach every destination exactly 3 clocks after the sources drop Req. Ten random full permutations then run with retries, and the testbench prints how many setup attempts and clocks each took (typically 18 attempts and 25–33 clocks). |
| `tb_clos_switch` | An input-stage and an output-stage switch with random sources and sinks. It checks routing, payload integrity, Back, nAck and backtracking, and the exact uncontended setup latency. |
| `tb_input_control` | The IC FSM of all three kinds against a cycle-level reference model under random stimulus. It also checks that the first stage answers Back only after four attempts. |
| `tb_switch_arbiter`, `tb_output_control`, `tb_crossbar` | Precedence and grant-bus routing; the busy/owner register; the multiplexers. |
| `tb_link_encoder`, `tb_link_decoder` | Against codewords built from the generator rows; the syndrome is the H column of the wrong bit; all single errors are corrected. |
| `tb_ssd` | Detection exactly on the ninth identical nonzero syndrome, including idle cycles, busy pulses and random streams. |
| `tb_tpg`, `tb_tx_reconfig`, `tb_rx_reconfig` | Pattern sequence; wire mapping against an independent model. |
| `tb_link_ctrl` | ILT round length (150 clocks); finding stuck wires; low_spare and no_spare; recovery of healed wires; SSD-to-wire mapping through a shifted configuration; an SSD report dropped without spares; the period timer. |
| `tb_adaptive_link` | The word is correct in every cycle while faults appear, the SSD and the ILT reconfigure, and wires recover. |

## How far to trust it, and where it is this design's own

These parts follow the published architecture that this RTL implements:

- the topology and addressing;
- the Req/Ans codes and the three-phase circuit switching;
- the IC/OC/arbiter/crossbar partition and the bus roles;
- the Hamming(7,4) matrices;
- the SSD structure and its nine-sample observation period;
- the ILT procedure, with its pair test, single-wire test and retest of
  disabled wires.

These are choices made here, where the published description leaves the
detail open:

- **Switch kinds and search.** The three switch kinds are taken to be the
  three stages' routing rules. The search order of the backtracking search is
  own-index-first, and its pacing is one output per clock.
- **Arbiter precedence.** The lowest index wins.
- **Answer codes and timing.** `ans = 00` means "no answer yet". The data and
  answer paths through a switch are not registered.
- **Where the links are and what they carry.** The links are placed on the
  middle-to-output connections only. `req` and `ans` are not encoded.
- **Link sizes and wire mapping.** The 16-bit word is cut into four (7,4)
  codewords. There are two spares and an ILT period of 4096. The mapping is
  k-th usable wire.
- **Test patterns and windows.** The patterns are 01, 10, 11 and 00. The test
  windows step one wire at a time.
- **One shared controller.** Both ends of a link take their configuration from
  one register in one controller. No reconfiguration messages pass between
  transmitter and receiver.
- **Both detectors at once.** SSD and ILT are active together.

Known limits:

- Hamming(7,4) only corrects. Two wrong wires in one codeword are miscorrected
  without warning until one of them is found and disabled. For the same
  reason, an ILT round cannot be triggered by "an error beyond the code's
  capability". `ilt_trigger` is an input instead.
- A path setup that is blocked is reported to the source as Back. The network
  does not rearrange existing circuits to make room, so a full permutation may
  need several retries.
- Timing closure, area and power were not studied. The combinational path
  through three switches and a link is long.
- The processing cores and their network interfaces are not part of this RTL.
  Their behaviour exists only as models in the testbenches.
