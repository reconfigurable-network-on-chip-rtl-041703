# Reconfigurable security for a mesh network-on-chip

A system-on-chip for IoT devices has to live for years with threats, workloads
and power budgets that change. Fixed on-chip security is then either too weak or
too costly. This design makes the security of the on-chip network something
you choose **at run time**. Each network interface (NI) can run one of four
tiers:

| tier | what every packet gets | cost |
|------|------------------------|------|
| 0 | nothing: plaintext | none |
| 1 | counter-mode AES-128 encryption of the payload | one AES block (12 cycles) per 128-bit flit |
| 2 | tier 1 plus a 128-bit Galois-hash tag over header and ciphertext, checked before delivery | one extra tag flit, receiver buffers the packet |
| 3 | tier 2 plus flooding-DoS detection in every router and localization of the attacking IP | monitors in routers, latency curves in NIs |

A central **runtime security engine** (RSE) picks the tier. It periodically
polls every node (the *security heartbeat*) for battery level, congestion and
attack flags. Nodes can also interrupt it when their router detects an
attack. It pushes the chosen configuration and the keys to all nodes. This
control traffic runs on its own **service NoC**, a second physical mesh, so it
never competes with data.

The RTL is synthesizable SystemVerilog-2017. Its default size is an 8x8 mesh
(64 nodes). Everything is parameterised, and the testbenches also run 2x2 and
4x4 versions.

## Block map

```
noc_sec_top
 ├─ noc_mesh (data NoC, 130-bit flits)    ── noc_router x N ── sync_fifo
 ├─ noc_mesh (service NoC, 66-bit flits)  ── noc_router x N
 ├─ rse                                     runtime security engine (one node)
 └─ per node
     ├─ ni                                  network interface
     │   ├─ ni_tx_sec ── aes128_enc, gf128_mul
     │   ├─ ni_rx_sec ── aes128_enc, gf128_mul
     │   ├─ sync_fifo                        ejection buffer
     │   ├─ rrg                              reconfiguration registers
     │   ├─ sag                              security agent
     │   ├─ dlc_unit                         destination latency curve
     │   ├─ dos_localizer                    localization event handlers
     │   └─ svc_port                         service-NoC access, shared by sag / localizer / rse
     └─ pac_monitor                          DoS detection on the router's packet arrivals
```

Shared types are in `nocsec_pkg` (node ids, flit, header and service-message
structs, tier enums, XY helpers, a bit-serial GF(2^128) reference
function). `aes_pkg` holds the AES round functions. It computes the S-box at
elaboration from the field inverse and the affine map, so no table file is
needed.

## Packets and the tier-1/2 cryptography

This part takes the most care to read.

**Packet format on the data NoC.** A flit is `{head, tail, data[127:0]}`, and
every payload flit carries exactly one cipher block. A packet is:

1. a **header flit**, always plaintext. Routers find the destination in its
   low 6 bits. `data_hdr_t` (LSB first) holds dst, src, tier at injection,
   hop count, 14 reserved bits, a 32-bit per-source sequence number, a 32-bit
   injection time stamp and 32 bits the IP may use freely (address, opcode…);
2. 1 to N **body flits**: plaintext at tier 0, ciphertext at tiers 1-3;
3. at tiers 2/3, one **tag flit**.

**Nonce.** `IV = salt[57:0] || src || seq` (96 bits). The 64-bit salt comes
with the key. The source and the sequence number make every IV unique per key,
and the receiver rebuilds the IV from the header alone.

**Counter blocks.** Block q of a packet (q = 1, 2, …) is encrypted as
`C_q = P_q xor E_K(IV || q)`. `E_K(IV || 0)` masks the tag. This numbering
starts one lower than NIST GCM. Parameter `CTR_BASE = 1` switches to NIST
numbering; the tests use it to compare against the published GCM vectors.

**Tag.** With `H = E_K(0^128)`, recomputed after every rekey:

```
X = 0
X = (X xor header)    * H      -- the header is the associated data, one block
X = (X xor C_q)       * H      -- for every ciphertext block
X = (X xor {64'd128, 64'(128 * nblocks)}) * H
T = X xor E_K(IV || 0)
```

This is the GCM construction with a 128-bit header as associated data and a
full 128-bit tag.

**Hardware and timing.**

- `aes128_enc` is iterative: one round per cycle with the key schedule
  computed on the fly. `done` comes 12 cycles after `start`.
- `gf128_mul` is digit-serial, 16 bits per cycle, 8 cycles per product.
- Each of `ni_tx_sec` and `ni_rx_sec` has one AES core and one multiplier.
  The hash of block q runs while the AES works on block q+1, so at tier 1/2
  the NI moves one block per 13 cycles.

**Receiver.**

- Untagged packets (tier 0/1 headers) stream straight to the IP.
- Tagged packets are held in a `MAX_BLK`-block buffer (default 4). They are
  released only after the tag matches, so a forged or altered packet never
  reaches the IP.
- A packet is dropped (`pkt_drop`) when its tag is wrong, when it is longer
  than `MAX_BLK`, or when it has no tag while the receiver itself is at tier
  ≥ 2. The last case covers packets caught in flight across a tier 1→2
  switch.
- Retransmission after a drop is left to the IPs.
- The header's tier field, not the receiver's current tier, decides how a
  packet is decrypted. A reconfiguration therefore never breaks packets
  already in flight, apart from the drop rule above.

**IP interface.**

- Transmit: `ip_valid/ip_ready` beats of 128 bits, with `ip_last` on the final
  beat. `ip_dst` and `ip_user` are read at the first beat.
- Receive: the same handshake, plus the full header on `ip_hdr`.

## Reconfiguration: RSE, SAG, RRG and the service NoC

Every service message is one flit (`svc_msg_t`: dst, src, 4-bit type, 48-bit
data):

| type | direction | meaning |
|------|-----------|---------|
| HB_REQ / HB_RESP | RSE → node → RSE | heartbeat; answer carries `{attacked, congested, battery[7:0]}` |
| ATTACK_IRQ | node → RSE | the router's DoS monitor flagged an attack (tier 3 only, once per attack) |
| CFG | RSE → node | `sec_cfg_t`: tier, DoS tier (detect only / detect+localize), detection sleep interval, learn (profiling) bit |
| KEY_WORD, KEY_COMMIT | RSE → node | key words 0-3 and salt words 4-5, then commit |
| QUERY, QREPLY, DIAG, MIP | node ↔ node | localization, below |

- **`rrg`** holds the active configuration. Key words are staged and become
  active only on commit, which pulses `rekey` so the NI recomputes H.
- **`sag`** answers heartbeats, raises the interrupt and turns CFG/KEY
  messages into register writes. A CFG write also clears the router's attack
  flag.
- **`rse`** after reset sends the key to every node, then the configuration.
  Every `HB_PERIOD` cycles it polls all nodes and collects answers for
  `HB_WAIT` cycles. Its policy, in priority order:
  1. an attack was seen → tier 3 with localization;
  2. the lowest battery is below `BATT_LOW` → tier 1;
  3. some node is congested → tier 3, detection only;
  4. otherwise → the configuration on the `base_cfg` input.

  The attack condition expires after one full heartbeat round without
  reports. The policy is this design's own example, and it is easy to
  replace: it is one `always_comb`.
- **`svc_port`** shares a node's service-NoC port among agent, localizer and
  (at one node) the engine. It uses round-robin injection under credits.
  Ejected messages are steered by type, and every client always accepts.

The security engine distributes one network-wide key and salt. Where the key
comes from (a key store, a TRNG) is outside the design: it is the
`master_key`/`master_salt` input.

## Tier 3: DoS detection and localization

**Detection (`pac_monitor`, one per router).** The router reports how many
packets (head flits) entered its buffers each cycle.

- The monitor keeps sliding-window counts of arrivals over 8 window lengths
  (32, 64, … 256 cycles). This is a packet arrival curve.
- While the configuration's learn bit is set, it records the largest count
  seen per window. That is the upper bound learnt from normal traffic.
- Afterwards, a count above its bound sets a sticky `attacked` flag.
- Until a profile exists, nothing is flagged.
- With a non-zero detection interval (`det_sleep`), the monitor alternates
  between `ACTIVE_CYCLES` of watching and `det_sleep` cycles of sleep, which
  trades detection time for energy. The default is 0: always active.

**Latency curve (`dlc_unit`, one per NI).** For every arriving packet the NI
reports source, hop count and latency (from the header time stamp).

- Per hop count, the unit keeps an exponential moving mean and variance
  (weight 1/8; mean in Q4, variance in Q8) while learning.
- Afterwards, a packet later than mean + 1.96σ is *suspicious*, and its source
  becomes the candidate attacker.
- The test is done squared (`256·d² > 983·max(var, VAR_MIN)`), so no square
  root is needed.

**Localization (`dos_localizer`, one per node).** These are event handlers
that talk over the service NoC:

1. A node whose router is flagged *and* that has a candidate S sends QUERY to
   S.
2. If S answers that it is congested, the node sends a diagnostic `<S, D>` to
   every node on the XY path from S to itself.
3. Each receiver notes the port the path enters through. The flag is 1 if S
   is the receiver itself, and 2 otherwise ("I only lie on a congested
   path").
4. After `TIMEOUT` cycles, a node with a flag of 1 knows its own IP is the
   source. It broadcasts MIP naming itself to every node (`mip_valid`, `mip`),
   and the flags are cleared.

The end-to-end test shows the whole chain: flooding from node 9 to a slow node
13 trips the PAC bound, node 13's curve names node 9, node 9 reports
congestion, and node 9 ends up announcing itself.

## The network

`noc_router` is a five-port wormhole router:

- XY routing, credit-based flow control and round-robin switch allocation.
- Input FIFOs of `DEPTH` flits (default 4); no virtual channels.
- One hop at zero load takes 4 cycles: a three-stage pipeline (buffer + route,
  switch allocation, switch traversal) plus one link cycle.
- Port numbering: 0 local, 1 north (y−1), 2 east (x+1), 3 south (y+1),
  4 west (x−1).

`noc_mesh` tiles NX×NY routers and exposes each node's local port and the
router's arrival and occupancy counts. The top uses it twice. Node n sits at
`(y, x) = (n / NX, n % NX)`, and all per-node top-level ports are arrays
indexed by n.

The NI injects under credits (as many as the router's input buffer) and ejects
into a 4-flit FIFO that returns credits when it pops.

## Using the top

Drive `base_cfg` with the configuration you want. The engine distributes the
key and configuration by itself after reset (`rse_key_done`, `rse_cfg_sent`).
From then on, each IP port can send. `node_tier[n]` shows what each node
currently runs. `rekey_req` re-sends the key. Lower a node's `battery` input
to see the policy react at the next heartbeat.

Outside the design, and therefore ports:

- the IPs themselves;
- the battery sensors;
- the key source.

The congestion flag is the router's buffer occupancy compared with `CONG_TH`.
It stands in for a congestion sensor.

## Simulation

With Verilator 5 (two-state, so everything that is read is reset):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_noc_sec_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/nocsec_pkg.sv rtl/aes_pkg.sv tb/tb_noc_sec_top.sv
./obj_dir/Vtb_noc_sec_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| tb_aes128_enc | FIPS-197 vectors, H for the all-zero key, 12-cycle latency |
| tb_gf128_mul | GCM test-case products, random operands against the bit-serial reference, 8-cycle latency |
| tb_ni_tx_sec | flits against precomputed vectors with the NIST numbering, H, tier 0/1/2 formats, 13-cycle block spacing |
| tb_ni_rx_sec | transmit→receive loopback, tampered ciphertext, forged tag, untagged packet at tier 2, streaming tiers, slow IP |
| tb_noc_router | routing in all directions, 4-cycle hop latency, wormhole locking, credit stalls |
| tb_noc_mesh | 4x4 random traffic, in-order delivery, zero-load latency over 6 hops |
| tb_pac_monitor | learning bounds, replaying normal traffic without alarm, flood detection, clear, sleep schedule |
| tb_dlc_unit | learning, late-packet detection, candidate capture |
| tb_dos_localizer | query/reply, diagnostic path, flags, timeout and broadcast on a line of four nodes |
| tb_rrg, tb_sag, tb_rse | register staging, message handling, heartbeat period, policy and key distribution on 2x2 |
| tb_ni | two NIs back to back: key/config over the service link, tier-2 packets both ways, drop at a tier mismatch, heartbeat |
| tb_noc_sec_top | 4x4 end to end: all tiers, encryption seen on the wire, heartbeat, battery and congestion policy, detection, interrupt, localization of the attacker, drops at tier changes, rekey |
| tb_noc_sec_full | the default 8x8 top: key and configuration to 64 nodes, tier-2 packets corner to corner (14 hops) and back |
| tb_noc_sec_patterns | the default 8x8 top at tier 2: top-row sources to bottom-row destinations under uniform random, tornado, bit complement, bit reverse, bit rotation and transpose traffic; every packet delivered with its tag verified, mean latency printed per pattern |

The two 8x8 tests take about 3-4 minutes each to compile and seconds to run.

## Where this departs from the architecture, and what to trust

- **Trust.**
  - The AES and GHASH datapaths are checked against published vectors.
  - The router is cycle-checked.
  - The detection and localization chain is shown working in one attack
    scenario on a 4x4 mesh. It has not been characterised over many attacker
    and victim placements, or against false alarms under heavy legitimate
    traffic.
- **Latency curves are learnt on chip** as moving averages. The architecture
  stores one precomputed mean + 1.96σ threshold (4 bytes) per hop count.
  This design keeps mean and variance, about 120 bytes per NI.
- **PAC bounds are learnt on chip** during a profiling phase (learn bit), not
  loaded from offline analysis. A write port for offline bounds exists on
  `pac_monitor` but is tied off at the top.
- **Choices the architecture leaves open are this design's own:** the
  security policy, the heartbeat period, message formats, header layout, IV
  composition, tag length (128 bits), window lengths, localization timeout,
  congestion threshold, and buffer depths.
- **One key for the whole network.** There are no per-pair session keys.
- **Throughput.** One shared AES core per direction per NI means 13
  cycles/block. The architecture's 12-cycle figure is a latency; a pipelined
  AES would raise throughput at a large area cost.
- **Packets in flight.** The largest tagged packet is `MAX_BLK` blocks
  (default 4, one 64-byte cache line). Longer packets must be split by the
  IP. Measured in-flight peaks of about 630 packets exceed the buffering of
  the default mesh once packets carry headers and tags; the excess waits at
  the sources.
- **Not designed here:** the IPs, memory controllers, sensors and the key
  source.
