# An 8-bit packet switch element in SystemVerilog

A 2x2 switching element for self-routing banyan fabrics that carry fixed-size
packets and can replicate broadcast packets. Each element has two inputs (A, B)
and two outputs (0, 1). Every input can hold two whole packets, and a packet
whose output is free goes straight through ("cut-through") with a fixed delay
of 24 clocks. Neighbouring elements use one grant wire per link, so a packet is
only sent when the receiver has room for it. The same element serves three
networks, chosen by a mode input:

* **Routing network (RN).** A packet goes to output 0 or 1 depending on one bit
  of its link number. That bit is the element's stage number `sn`, where the
  last stage is stage 0.
* **Copy network (CN).** A broadcast packet with fanout FAN is copied to both
  outputs when FAN > 2^sn. The two copies carry the fanout split in halves.
  All other packets may take either output.
* **Distribution network (DN).** Every packet may take either output. An
  output toggle spreads the packets evenly.

A fabric is a banyan of these elements. `tb/tb_fabric.sv` wires 12 of them
into an 8x8 network, which shows how they connect.

## Packets

A packet is exactly 80 words long. Each word is 9 bits: data in bits 8:1 and
odd parity in bit 0. The element reads only the first four words:

| word | contents |
|------|----------|
| 0 | routing control RC in data bits 7:5: `000` empty slot, `001` point-to-point, `010` broadcast, `100` test |
| 1 | link number (point-to-point), fanout FAN (broadcast), or this network's path word (test) |
| 2, 3 | channel number. The lowest bit of word 3 (the BCN bit) decides which copy gets the larger half of an odd fanout |

Packets arrive on `udA`/`udB`. Word 0 is present in the clock in which
packet-time `pt` is high, and the remaining words follow one per clock. Only
the element itself changes a header:

* **Copies.** Word 1 of a copied packet is rewritten to FAN/2 on one output
  and (FAN+1)/2 on the other. If the BCN bit is odd, output 0 gets FAN/2.
  After the last copy-network stage, every copy has fanout 1.
* **Test packets with `rrf`.** Words 1, 2 and 3 are rotated, so they leave as
  2, 3, 1. Each network stage then finds its own path word in word 1.
* **Bad headers.** A header with an invalid RC, or a parity error in a
  non-empty RC word, is handled as point-to-point and never copied. It also
  sets `err`.

## The packet cycle

Everything is timed from `pt`. The element runs in packet cycles of at least
80 clocks. In one cycle each input decides what to do with the packet now
arriving:

* cut it through,
* store it in a free buffer, or
* send an older stored packet instead.

The outputs are granted by one arbiter. The grants that go upstream and
downstream always refer to the *next* packet cycle.

The timing control circuit (`tcc`) counts clocks from `pt` and decodes
strobes. Strobe `t_i` is high i+1 clocks after `pt`. The schedule is the
heart of the design:

| strobe | clock after pt | what happens |
|--------|----------------|--------------|
| t1, t2, t4 | 2, 3, 5 | words 0, 1, 3 pass the header tap (after stage 2 of the 21-stage input register). RC, FAN and the BCN bit are loaded |
| t3 | 4 | word 2 passes the tap. The test register loads from it (test access only) |
| t16 | 17 | each input presents one request vector. The arbiter answers with enables. The input's control register (CTLREG) latches the PLA decision and the enables. The upstream grants `ugA`/`ugB` change. The arbiter's last-used bits are updated. Downstream grants `dg0`/`dg1` must be valid here |
| t19 | 20 | the buffer shift selects and the path select take effect. From the next clock, word 0 leaves the input register |
| tshift | 21 to 100 | 80-clock window in which a selected buffer shifts. A buffer that shifts for the whole window sends its old packet and takes in the new one at the same time |
| t20 | 21 | the output enables, copy, test and BCN bit take effect. Word 0 is now in the one-word delay stage D |
| t22, trot | 23, 23 to 24 | word 1 is rewritten (copies) or held back (rotation). The buffer control registers learn what entered the buffers |

Word 0 leaves the output register on `dd0`/`dd1` at clock 24. That total is
21 clocks in the input register, 1 in D and 2 in the output register. A
packet sent from a buffer has the same 24-clock offset from its own cycle's
`pt`. The shift window is the only activity that runs into the next cycle.
That is why cycles must be at least 80 clocks apart.

## Input circuit (`ipc`)

Each input has four parts:

* an input shift register (`isrp`),
* two 80-word buffer shift registers (`bsr`),
* an input control circuit (`icc`),
* a header modification circuit (`hmc`).

A 3-to-1 path multiplexor selects what goes out: BSR0, the cut-through path
(the input register output) or BSR1.

### Input control and the buffer PLA (`icc`, `icc_pla`, `hdr_dec`)

The header decoder turns RC, FAN or the link number, `om` and `sn` into a
request vector `r = {need, p1, p0}`:

| r | request |
|---|---------|
| `000` | none |
| `100` | either output |
| `101` | output 0 |
| `110` | output 1 |
| `111` | both outputs (a copy) |

The decoder also produces the copy and test bits.

Two buffer control registers, BCR0 and BCR1, hold the decoded header of the
packet stored in each buffer. A bit `fb` records which buffer holds the older
packet.

The PLA sees five inputs:

* whether an enable came back,
* which of the incoming packet, BSR1 and BSR0 want an output,
* `fb`.

From these it chooses the shift selects, the path, the new `fb` and the
upstream grant. Two rules govern it:

1. **Oldest first.** Only one request is presented per cycle: the older
   stored packet if there is one, otherwise the incoming packet. Packets from
   one input therefore leave in arrival order.
2. **Store when refused.** A refused incoming packet goes into a free buffer,
   BSR0 first. When a stored packet is sent, its buffer takes in the incoming
   packet during the same 80 clocks.

`ug` is low exactly when both buffers will be occupied, so an upstream
neighbour only sends when there is room.

### Header modification and the crosspoint (`hmc`)

The selected word passes the delay stage D. Each output port has a
multiplexor that chooses among four words:

* D (the normal case),
* FAN/2 from D, where parity is kept by an exclusive-or of the parity bit and
  the shifted-out bit,
* (FAN+1)/2 from D, with parity recomputed,
* the undelayed word, used for the rotation: D holds word 1 for two clocks
  while words 2 and 3 pass.

Input A's circuit owns output 0 and input B's owns output 1. Each circuit
gates the word for its own port into the output register with its enable. It
hands the word for the other port to the other circuit (`tp` -> `op`), which
ORs it in. At most one input is enabled per port, so together the two
circuits form a 2x2 crosspoint. Outside the 80-word window the outputs carry
zeros.

## Output arbitration (`occ`)

The arbiter gives the two outputs to the two request vectors. It uses the
downstream grants and two last-used bits:

* `uI`: which input won the last tie,
* `uO`: which output last took an either-output packet.

The rules are:

* A specific-port request beats an either-port request.
* A both-ports request beats an either-port request. It is granted only when
  both ports are free; the element never sends half a copy.
* Two requests for the same single port, or two both-ports requests, go to
  the input that did not win the last such tie. `uI` then records the winner,
  so no input starves.
* A lone either-port request with both ports free goes to the port not used
  last, and `uO` toggles.
* Two either-port requests with both ports free get one port each, by `uO`.
* A port whose downstream grant is low is never enabled.

`tb/tb_occ.sv` holds the full policy as a table over all 1024 input
combinations.

## Errors (`pse_err`)

A parity error on any word of a non-empty packet sets the sticky flag `err`.
So does an invalid RC. `srst` or `hrst` clears it. Parity is reported but not
repaired, and the faulty word is forwarded unchanged.

## Test access

The element brings out the following test pins. They are included in the
RTL, and the end-to-end test exercises every one.

* **Observation `tdA`/`tdB`.** `tm` selects what they show:
  * `00`: the PLA outputs `{s1, s0, bsel, nfb, oe2..0}`
  * `01`: the request vector on bits 7:5, then the enable, the PLA's three
    request inputs and `fb`
  * `10`: the FAN register
  * `11`: the RC register
* **`ten`.** The request, copy and test bits are taken from a test register
  instead of the decoder. This RTL loads that register from data bits 4:0 of
  word 2 (`{need, p1, p0, copy, test}`).
* **`tld`.** The four BCRs shift as one 24-bit serial chain:
  `tsi` -> B.BCR0 -> B.BCR1 -> A.BCR0 -> A.BCR1 -> `tso`.
* **`tsten`.** External control replaces the control logic:
  * `tsi0`/`tsi1` shift BSR0/BSR1 of both inputs on every clock they are high,
  * `tbi` selects the path of both inputs,
  * `tpiA`/`tpiB` give the output enables,
  * `tmei` selects the output multiplexors: `00` FAN/2, `01` (FAN+1)/2,
    `10` delayed, `11` undelayed.

  Meanwhile `tsoA/B`, `tboA/B` and `tpoA/B` show what the control logic would
  drive.

## Top-level interface (`pse`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock. Everything acts on the rising edge |
| `hrst` | in | 1 | hard reset, synchronous. Strobes stay off until the next `pt` |
| `srst` | in | 1 | clears `err` |
| `pt` | in | 1 | packet-time: word 0 is on `udA`/`udB` |
| `om` | in | 2 | `01` RN, `10` DN, `11` CN (`00` behaves as RN) |
| `sn` | in | 3 | stage number. 0 is the last stage |
| `rrf` | in | 1 | rotate words 1..3 of test packets |
| `udA`, `udB` | in | 9 | upstream data |
| `ugA`, `ugB` | out | 1 | upstream grants for the next packet cycle. They change 17 clocks after `pt` |
| `dd0`, `dd1` | out | 9 | downstream data |
| `dg0`, `dg1` | in | 1 | downstream grants, sampled 17 clocks after `pt` |
| `err` | out | 1 | sticky parity or RC error |
| test pins | | | see above |

In a fabric, each stage's `pt` is the previous stage's `pt` delayed 24
clocks. A stage's `dg` inputs are the `ug` outputs of the elements it feeds.

Parameter `DEPTH` (default 80) is the buffer length. It must equal the packet
length `PKT_WORDS` in `rtl/pse_pkg.sv`. Only the tests change it.

## Where this RTL departs from the original chip

* **Clocking.** One rising-edge clock and a synchronous hard reset replace
  the original two-phase non-overlapping clock, its third phase, and the
  dynamic/static shift registers. The clock drivers of the long shift
  registers and the pad ring are not modelled. The watchdog-timer pin of the
  original pin list is not built.
* **Strobe clocks.** Only the strobe names and their order are given by the
  original design. The clock numbers in the table above are chosen so that
  the 21-stage input register and the 24-clock cut-through work out.
* **Arbiter last-used bits.** These are latched together with the decision at
  t16, not a few clocks later at t20. Both are only used in the next cycle, so
  the behaviour is the same.
* **Request presentation.** When both buffers hold packets but the last
  decision was a refusal, the PLA always presents the older packet. The
  original state table would present BSR0 in one such row. This choice keeps
  arrival order.
* **Arbiter tie groups.** In three groups of tie rows, the original policy
  table's enable columns contradict its own definition of `uI` and its update
  column. The RTL follows the definition: after a tie, the other input is
  favoured.
* **One output toggle.** The arbiter keeps a single output toggle `uO`
  for the whole element, as its policy table defines. The overview of the
  original design speaks of a favoured-output bit per input.
* **Request codes.** The codes for "port 0" and "port 1" are printed both
  ways in different places of the original. This RTL uses `101` = port 0 and
  `110` = port 1 in `{need, p1, p0}` order.
* **Test register and `td`.** How the test register is loaded, and the order
  of the `td` bits below bit 5, are this design's own.
* **Zero words between packets.** Output words are forced to zero outside a
  packet's 80-word window.

## Files

* `rtl/pse_pkg.sv`: sizes, word/request/strobe types, parity helpers
* `rtl/pse.sv`: top; `ipc.sv` one input; `isrp.sv`, `bsr.sv` shift registers
* `rtl/icc.sv`, `icc_pla.sv`, `hdr_dec.sv`: input control
* `rtl/hmc.sv`: header modification and output register
* `rtl/occ.sv`: output arbiter; `tcc.sv` timing; `pse_err.sv` error flag
* `tb/tb_<block>.sv`: one self-checking test per block
* `tb/tb_pse.sv`: end-to-end test of one element at full size
* `tb/tb_fabric.sv`: 8x8 fabric in RN, CN and DN mode

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing -Irtl rtl/pse_pkg.sv \
    $(ls rtl/*.sv | grep -v pse_pkg) tb/tb_pse.sv --top-module tb_pse -o sim
./obj_dir/sim
```

Replace `tb_pse` with any other testbench name. The package must come first.
The testbenches use `$urandom` and are self-checking; the simulator needs no
options beyond these.

What the tests cover:

* **`tb_pse`** runs the element with default sizes through RN, CN and DN
  traffic at several stage numbers, with rotated test packets, parity and
  header errors, and the test pins. Its scoreboard checks:
  * every packet's contents,
  * its allowed port and the downstream grant,
  * the 24-clock start,
  * arrival order.

  It also counts each mechanism and fails if one never occurred: cut-through,
  storing, both buffers full, sending from each buffer, copy, rotation,
  refusal, tie-break, output toggle, errors, soft reset, and each test
  feature.
* **`tb_fabric`** runs an 8x8 fabric in RN, CN and DN mode and checks that:
  * each point-to-point packet reaches the output equal to its link number,
  * a broadcast packet with fanout F leaves as exactly F copies on F
    different outputs, each with fanout 1,
  * in DN mode every packet leaves exactly once, unchanged,
  * a test packet reaches the output named by its word 1 in every mode, with
    words 1..3 rotated by the last stage (`rrf` set there).
