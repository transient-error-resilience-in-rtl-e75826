# Crosstalk-avoiding, error-correcting links for a network-on-chip

In a network-on-chip (NoC), switches pass 32-bit flits to each other over long
bundles of closely spaced wires. Two things go wrong on those wires.

- **Crosstalk.** A wire switching while both neighbours switch the other way
  sees a load of `(1+4λ)·C_L`, where λ is the ratio of coupling to bulk
  capacitance. That makes it slow and power-hungry.
- **Transient bit flips.** Noise, particle hits and timing violations flip
  single bits.

Coding the link data attacks both problems. If every bit is driven on two
adjacent wires, neighbours mostly switch together and the worst-case load falls
to `(1+2λ)·C_L`. Adding redundancy to correct errors allows a lower voltage
swing for the same residual error rate. Energy depends on the square of the
swing, so this saving outweighs the cost of the extra wires and the codec.

The central scheme here is **CADEC** (crosstalk avoidance, double error
correction):

1. The flit is coded with a (38,32) Hamming code.
2. Every Hamming bit is duplicated onto a pair of adjacent wires.
3. One overall parity wire is added.

The result is 77 wires with minimum distance 7. The decoder corrects any two
wire errors and asks for a retransmission when it sees a pattern it cannot
repair.

For comparison, and because they are useful on their own, the repository also
implements:

- the detect-and-retransmit Hamming scheme (ED);
- three single-error-correcting joint codes (DAP, BSC, MDR);
- three crosstalk-only codes (FOC, FTC, FPC);
- a multi-hop path in which only header flits are decoded at intermediate
  switches.

All RTL is synthesizable SystemVerilog-2017.

## Link words

Every scheme turns a 32-bit flit into a word on `W` wires
(`noc_code_pkg::coded_width`):

| scheme | W  | corrects | crosstalk bound | wire map |
|--------|----|----------|-----------------|----------|
| CADEC  | 77 | 2 errors, retransmits some heavier patterns | (1+2λ) | Hamming bit i on wires 2i, 2i+1; parity of the 38 Hamming bits on wire 76 |
| ED     | 38 | none, retransmits on any detected error | (1+4λ) | (38,32) Hamming word |
| DAP    | 65 | 1 | (1+2λ) | flit bit i on wires 2i, 2i+1; parity on 64 |
| BSC    | 65 | 1 | (1+2λ) | as DAP on odd flits; on even flits the pairs move up one wire and the parity goes to wire 0 |
| MDR    | 66 | 1 | (1+2λ) | as DAP, parity on both 64 and 65 |
| FOC    | 40 | 0 | (1+3λ) | eight 4→5 groups side by side |
| FTC    | 54 | 0 | (1+2λ) | eleven 3→4 groups, grounded shield wire between groups |
| FPC    | 55 | 0 | (1+2λ) | eleven 4→5 groups, boundary bit repeated (see below) |

### The (38,32) Hamming code

The Hamming code uses the positional layout. Codeword position `p` = 1…38 is
bit `p-1`. Check bits sit at positions 1, 2, 4, 8, 16 and 32. The data bits
fill the other positions in ascending order.

The syndrome of a received word is the XOR of the positions of its one-bits:

- 0 for a codeword;
- the position of a single flipped bit;
- never 0 for two flipped bits.

A syndrome of 39…63 cannot come from one error, because the code is shortened
from 63 bits.

## How the CADEC decoder works

Call the odd wires copy **A**, the even wires copy **B** and wire 76 the sent
parity **p**. `cadec_dec` works in two stages.

1. **Choose a copy.**
   - If `parity(A) ≠ parity(B)`, exactly one copy's parity equals `p`; take
     that copy.
   - If the parities are equal, compute the Hamming syndrome of A. Take A if
     the syndrome is zero, otherwise take B.
2. **Repair the chosen copy.** A single-error-correcting Hamming decoder
   repairs it.

**Why any two errors are corrected.** Let `a`, `b` and `e` be the error counts
in A, B and p, with `a+b+e ≤ 2`.

- **Parities differ** (`a+b` is odd). The cases are `(1,0,e)` and `(0,1,e)`.
  - With `e=0`, the clean copy matches `p`.
  - With `e=1`, the copy holding the single error matches the flipped `p`.
    Stage 2 repairs it.
- **Parities agree** (`a+b` even). The cases are `(0,0,e)`, `(1,1,0)`, `(2,0,0)`
  and `(0,2,0)`.
  - A is clean exactly when its syndrome is zero, because the Hamming code
    detects up to two errors. A clean A is taken.
  - Otherwise B is taken. B then holds at most one error.

**Cost.** The syndrome of A is needed only when the copy parities agree. With
one error, the most likely case, they differ, so the double-error detector
stays idle. The `ded_used` output shows which path was taken.

**Retransmission.** `uncorrectable` is raised when the stage-2 syndrome points
outside the 38 positions. The link then requests a retransmission. This
detection is not complete. A pattern of three or more errors can also leave a
valid-looking syndrome and be miscorrected silently. The testbenches use a
four-wire pattern (both copies of Hamming positions 7 and 32) that is always
flagged.

## Retransmission (CADEC and ED links)

`coded_link` is a two-stage pipeline:

```
            sender switch                  link wires            receiver switch
in ─► rtx_sender ─► encoder ─► [tx_q] ──── XOR err_i ────► decoder ─► arq_receiver ─► [out]
          ▲                                                                  │
          └──────────────────────────── arq (registered) ◄──────────────────┘
```

A flit accepted at clock edge `n` is in `tx_q` after edge `n`. It is decoded
and delivered after edge `n+1`, two cycles end to end. The encoder and the decoder each get their own stage. Coding therefore
adds latency but never lowers throughput, provided each codec fits in a clock
cycle.

If the decoder flags the flit, the following happens:

1. `arq_receiver` pulses `arq` after edge `n+1` and drops the next slot. That
   slot was sent before the sender could react.
2. `rtx_sender` sees `arq` in the cycle after edge `n+1`.
3. At edge `n+2` it starts to re-send its two-entry history, oldest first
   (go-back-N over a round trip of `RTT = 2` cycles). `in_ready` is low during
   the replay.
4. An ARQ that arrives during a replay restarts it.

Without errors the link takes one flit per cycle, so the two-flit buffer is
enough for full throughput.

Assumptions of this scheme:

- The `valid` and `arq` control wires are error free.
- The downstream switch always accepts a flit.

## Crosstalk-only codes and their group boundaries

Wide links are coded in small groups. The point to watch is the wires where two
groups meet.

- **FOC** (no 010→101 or 101→010 on any three wires). Groups can simply abut;
  the 4→5 code keeps the condition across boundaries. The mapping is
  `c0 = d1 | d2&~d3`, `c1 = d2&~d3`, `c2 = d0`, `c3 = d2&d3`,
  `c4 = d1&d2 | d3`. This matches the FOC code table. The shorter form
  `c0 = d1 | d2&d3`, which is sometimes given, is not injective: 1100 and 1110
  collide.
- **FTC** (adjacent wires never switch in opposite directions). Uses 3→4 groups
  with a grounded shield wire between groups. Eleven groups are needed for 32
  bits; the 33rd input is 0.
- **FPC** (no word contains 010 or 101). Plain concatenation of 5-bit words
  breaks the rule at boundaries. Instead, the top data bit of one group is fed
  again as the bottom data bit of the next group. The code puts data bits 0 and
  3 directly on its edge wires, so the two wires at every boundary are equal.
  Group 0 carries flit bits 3:0 and group `i` carries bits `3i+3:3i+1`. Eleven
  groups (55 wires) cover 32 bits.

The decoders invert each group by searching its 8- or 16-entry table. That
table is the same function the encoder uses (`noc_code_pkg`).

## Header-only coding over several hops

Payload flits carry no routing information. They can therefore stay coded from
source to destination, and only the header flit needs decoding at intermediate
switches for routing. The header carries a flit count, so payload flits need no
type field.

Every flit, header or payload, carries a packet id. A switch must link each
payload flit to its packet without decoding it. It therefore compares ids in
coded form. This works only if the coded wires of the id depend on nothing but
the id. The id is therefore placed on exactly the data bits of code group 0:

| scheme   | id bits | coded id wires | flit count in header |
|----------|---------|----------------|----------------------|
| FOC, FPC | 3:0     | 4:0            | bits 8:4             |
| FTC      | 2:0     | 3:0            | bits 7:3             |

(`pid_width`/`pid_wires` in `noc_code_pkg`; `CNT_W = 5`.)

For FPC this choice matters. Group 1 reuses flit bit 3 as its own bottom bit,
but the wires of group 0 still depend only on bits 3:0.

`hdr_coded_path` works as follows:

- An FPC encoder sits at the source.
- `PATH_HOPS = 3` `hdr_hop_codec` stages follow, one per intermediate switch.
  Each keeps a down-counter of the payload flits still expected.
  - When the counter is zero, the arriving flit is the header. The stage:
    - decodes it and shows it on `hdr_valid`/`hdr_data`;
    - loads the counter from the count field;
    - keeps the header's coded id wires;
    - forwards a re-encoded (clean) header.
  - Otherwise the flit is payload. It is forwarded untouched and the counter
    decrements. `pid_mismatch` pulses if its coded id wires differ from the
    kept ones.
- A decoder sits at the destination.

The latency is `PATH_HOPS + 2` cycles. `hdr_valid` and `pid_mismatch` appear
together with the flit at the hop's output. The counting relies on the flits of
one packet following each other on a link, as in wormhole switching. What a
switch does with a mismatching flit is part of the switch, which is not
included here.

## Files and hierarchy

```
noc_coding_top                      top: 8 coded links + header-only path
├── coded_link #(SCHEME) ×8         pipelined link, ARQ for CADEC/ED
│   ├── rtx_sender, arq_receiver    retransmission (CADEC, ED only)
│   ├── cadec_enc ─ hamming_enc
│   ├── cadec_dec ─ hamming_syndrome, hamming_sec_dec
│   ├── hamming_enc + ed_dec        ED
│   ├── dap_enc/dap_dec, bsc_enc/bsc_dec, mdr_enc/mdr_dec
│   └── foc_*, ftc_*, fpc_*
└── hdr_coded_path ─ hdr_hop_codec ×PATH_HOPS, fpc_enc/fpc_dec
noc_code_pkg                        widths, scheme enum, group code functions
```

### Top-level ports

The per-link ports are arrays indexed by `scheme_e`: 0 CADEC, 1 ED, 2 DAP,
3 BSC, 4 MDR, 5 FOC, 6 FTC, 7 FPC.

- `in_valid`/`in_data`/`in_ready`: valid/ready handshake on the input.
- `err`: error mask XORed onto the wires. It is 77 bits wide; a link uses its
  low `W` bits.
- `link`: the wires as driven.
- `out_valid`/`out_data`: the delivered flit.
- `arq`, `corr`, `replay`: ARQ pulse, error repaired, replay in progress.
- `hp_*`: the header-only path, including `hp_pid_mismatch` per hop.

All flip-flops reset asynchronously on `rst_n` low.

The encoders and decoders are combinational. Every pipeline register lives in
`coded_link`, `bsc_enc`/`bsc_dec` (the phase bit), `rtx_sender`,
`arq_receiver` and the `hdr_*` modules.

## Simulation

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. A failure count above zero, or a watchdog
message, means a problem. Every testbench builds the same way from the
repository root. Replace `tb_noc_coding_top` with the testbench's name:

```
T=tb_noc_coding_top
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/noc_code_pkg.sv tb/tb_ref_pkg.sv tb/$T.sv \
  --top-module $T -o sim && obj_dir/sim
```

`-y rtl` lets verilator find each module in `rtl/<module>.sv`. The packages
must be listed first. Every testbench finishes in seconds. The end-to-end one
runs the top with all parameters at their defaults.

| testbench | covers |
|-----------|--------|
| `tb_hamming` | encoder against a parity-check-matrix model; all single errors corrected; double errors never look clean |
| `tb_cadec` | encoder against a model; every 1- and 2-wire error pattern on six flits corrected; both selection paths used; uncorrectable pattern flagged |
| `tb_ed` | every 1- and 2-wire error detected |
| `tb_dap`, `tb_mdr`, `tb_bsc` | DAP and MDR layout on the example flit 0010; every single-wire error corrected; BSC parity moving end to end with each flit, unaffected by idle cycles, and no shared pair boundary between consecutive flits |
| `tb_foc`, `tb_ftc`, `tb_fpc` | code tables, the crosstalk condition over the whole link word across random flit sequences, round trip |
| `tb_rtx_sender`, `tb_arq_receiver` | go-back-N: in-order, loss-free delivery under random ARQs, including ARQ during replay |
| `tb_hdr_coded_path` | header-only path: in-order delivery at `HOPS+2` latency; headers decoded at every hop; payload words untouched; every payload flit with a wrong packet id flagged at every hop, and no other flit |
| `tb_noc_coding_top` | all links and the path at default sizes, 6000 cycles. It injects errors within each code's capability. Each link's scoreboard checks order and data, and a 2-cycle latency on links without ARQ. It counts corrections, CADEC double corrections, ARQs, ARQ-in-replay, stalls and idle cycles, and fails if any of these never occurred. 16-flit messages run on the header-only path; some payload flits carry a wrong packet id, which must be flagged at every hop. |

### How far it can be trusted

- **Exhaustive checks.** Within the tested patterns, coverage is exhaustive for
  small error counts. Every single and double wire error on CADEC and ED words
  is tried on several flits, and every single wire error on the SEC codes.
  The FOC and FPC groups are compared entry by entry with literal code
  tables. FTC has no table to compare against, so its eight code words are
  checked to be distinct and to satisfy the transition rule.
- **Random tests.** Everything sequential is tested with long random streams
  against queue-based scoreboards. The retransmission protocol, the BSC phase
  and the header counters all belong here.
- **Assertions.** Assertions guard the handshake rules of the sender, the
  receiver and the hop codec.
- **Simulation only.** All this is two-state simulation. There is no formal
  proof.
- **Synthesis.** The design synthesises with yosys (roughly 3,800 cells and
  1,250 flip-flops for the whole top). It has not been timed against a cell
  library.
- **Untested error patterns.** Error patterns beyond each code's guarantee
  are not tested, apart from the one four-wire CADEC pattern that must cause a
  retransmission. That means three or more errors on CADEC, and two or more on
  DAP/BSC/MDR. What happens to them is a property of the codes, not something
  this RTL improves.

## Design choices and departures

- **Wire orders.** Duplicate pairs on wires `2i`/`2i+1` and parity on the top
  wire follow the usual DAP drawing. The CADEC wire order is chosen the same
  way.
- **MDR.** MDR uses 66 wires (two parity copies). Its decoder uses the second
  parity copy: when the two parity wires disagree, the data copies are clean.
  Some descriptions count MDR as 65 wires.
- **BSC.** The BSC phase toggles per transmitted flit, not per clock, so an idle
  link cannot desynchronise sender and receiver. The first flit after reset has
  its parity on the top wire.
- **CADEC wire arrangement.** CADEC is built with the DAP arrangement only.
  Its Hamming copies could instead be laid out with the BSC alternation; that
  variant is not built.
- **Retransmission on single-error-correcting links.** DAP, BSC and MDR links
  have no retransmission. A distance-3 code cannot tell every two-error flit
  from a correctable one, so these links miscorrect some multi-error flits.
  Retransmission for them would be an extension.
- **CADEC copy selection.** When the copy parities agree, copy A is the one
  checked by the syndrome.
- **CADEC retransmission.** The retransmit condition (invalid final syndrome)
  is this design's own. The correction logic follows the CADEC algorithm.
- **Retransmission protocol.** Go-back-N with an `RTT`-deep buffer is this
  design's own. The scheme only requires switch-to-switch, flit-level
  retransmission.
- **Header-only path fields.** Positions and widths of the packet-id and
  flit-count fields are this design's own. The switch's use of the
  mismatch flag is not modelled.
- **Link errors.** Errors are modelled as an XOR mask on the link wires. The
  wires' analog behaviour (delay, energy, voltage swing) is outside the RTL.

## Not included

- **The switch.** Input arbitration, routing (dimension-order or
  least-common-ancestor) and output arbitration are absent, so there are no
  64-core Mesh, Folded-Torus or Butterfly-Fat-Tree networks either. The links
  expose their switch-side ports at the top instead.
- **Energy, timing and area.** Codec delays in FO4, gate counts and the energy
  models are evaluation results, not logic. No logic size depends on them.
