# P-Sec: packet security for a network-on-chip

A network-on-chip (NoC) built from third-party or untrusted IP can carry a
hardware trojan on a link or in a router. A trojan like that can flip bits
in passing packets: to corrupt data, to probe how a crypto core reacts to
faults, or to send a copy of a packet to a rogue core. Ordinary link codes
(parity, SECDED, CRC) guard against random faults. They do not stop an
attacker who knows the code, because such an attacker can pick an error
pattern that turns one valid codeword into another.

P-Sec moves the protection to the network interfaces (NIs), end to end:

* **Non-critical traffic** carries CRC-32 over its 204-bit payload. This is
  cheap and catches natural faults.
* **Security-critical traffic** (P-Sec on) carries an **algebraic
  manipulation detection (AMD) code**. The code is either over the whole
  payload (packet level) or over each 64-bit flit (flit level). An AMD
  codeword includes a fresh random number that the attacker never sees, so
  any chosen error pattern goes unnoticed only with a small, fixed
  probability.
* **Every header** (source, destination, encoding, type, signature) has its
  own small AMD code. The receiving NI therefore knows whether the packet
  really is for it and really comes from the source it names.
* A **signature** (a sequence number per source/destination pair) exposes
  duplicated or replayed packets.
* The routers use a **prioritized random arbiter**. Virtual channels that
  carry AMD traffic win contended outputs more often, so secure traffic
  keeps moving through a loaded or attacked network.

This repository holds synthesizable SystemVerilog of that scheme: the
encoders and checkers, both halves of the network interface, a
concentrated-mesh router, and the full network of 64 cores on a 4×4 mesh.
It also holds self-checking testbenches for each of them.

## Structure

```
psec_noc                    4x4 concentrated mesh, 64 cores (top)
├── psec_ni  x64            network interface of one core
│   ├── lfsr_rng            random numbers for the AMD codes
│   ├── psec_ni_tx          send half: mode FSM, encoders, flit sequencing, nacks
│   │   ├── amd_encoder     header  AMD (23,7,7), combinational
│   │   ├── amd_encoder     packet  AMD (204,17,17), 2-stage pipeline
│   │   ├── amd_encoder     flit    AMD (64,8,8), combinational
│   │   └── crc32_gen       CRC-32 over the payload
│   └── psec_ni_rx          receive half: reassembly, five checks, drop/nack
│       ├── amd_decoder x3  header, packet, flit
│       └── crc32_gen
└── psec_router x16         4 local + 4 mesh ports, 2 VCs per input, XY routing
    ├── flit_fifo           VC buffers
    ├── prio_rand_arbiter   one per output
    └── lfsr_rng
psec_pkg                    shared sizes, header/flit structs, enums
```

## AMD codes: how they work

All three AMD codes come from one parameterized pair, `amd_encoder` and
`amd_decoder`. The data word `y` (K bits) is cut into `b` symbols
`y1 … yb` of `m` bits each, zero-padded where needed. `x` is a random
`m`-bit number, fresh for each codeword. All arithmetic is in GF(2^m).

```
pi = y1 ^ y2 ^ ... ^ yb ^ x
f  = y1·x + y2·x^2 + ... + yb·x^b + x^D      D = b+2 if b is even, b+3 if b is odd
codeword C = (y, pi, f)
```

`x` is never sent in the clear: `pi` hides it under the XOR of the data
symbols. The checker recovers `x = pi ^ y1 ^ … ^ yb`, recomputes `f(y, x)`,
and flags the word if the result differs from the `f` it received. An
attacker adds an error `(ey, epi, ef)` without knowing `x`. To pass the
check the error must satisfy a nonzero polynomial equation in `x` of degree
at most `D`. At most `D` of the `2^m` values of `x` solve it, so the error
is missed with probability of roughly `D·2^-m`. No error pattern is safe
for the attacker, which is the difference from CRC or SECDED. The
testbenches show it: `tb_psec_ni_rx` and `tb_psec_noc` send an error that
is itself a CRC codeword (12 payload bits plus the matching 32 CRC bits).
It passes the CRC check silently. The same kind of attack on an AMD packet
is caught.

| use    | code          | m  | b  | padded y | D  | redundancy  | latency  |
|--------|---------------|----|----|----------|----|-------------|----------|
| packet | (204,17,17)   | 17 | 12 | 204      | 14 | 34 bits     | 2 cycles |
| flit   | (64,8,8)      | 8  | 8  | 64       | 10 | 16 bits     | 0        |
| header | (23,7,7)      | 7  | 4  | 28       | 6  | 14 bits     | 0        |

`f` is evaluated by Horner's rule: `h = x^(D-b) + yb`, then
`h = y(i) + x·h` for i = b-1 … 1, and finally `f = x·h`. That is `b`
multiplications in a chain. `LATENCY` splits the chain evenly into register
stages. The packet code uses two stages, which is the two-cycle encoding
penalty of packet-level P-Sec. The flit and header codes are combinational,
so they add no cycle. The checker reuses the encoder with the recovered
`x` and delays the received `f` to match. The field polynomials are
x^17+x^3+1, x^8+x^4+x^3+x+1 and x^7+x+1.

## Packet format

Every packet is five flits: a head flit and four body flits. Nack packets
are the exception: they are a single head-tail flit. A link flit (`flit_t`,
82 bits) is `{type[1:0], data[63:0], chk[15:0]}`.

* **Head flit data:** `{27'b0, f7, pi7, header[22:0]}`. The header is
  `{src[5:0], dst[5:0], enc[1:0], type[1:0], sig[6:0]}`. `enc` is the
  encoding of the packet: 0 CRC, 1 AMD packet, 2 AMD flit. The routers
  read `enc` as the "secure" flag. `type` is 0 for data and 1 for nack.
* **Body flits:** a 256-bit block, least significant word first:
  * CRC mode: `{20'b0, crc32, payload}`
  * AMD packet mode: `{18'b0, f17, pi17, payload}`
  * AMD flit mode: `{52'b0, payload}`
* **`chk`:** `{pi8, f8}` of the flit's 64 data bits in flit mode, and zero
  otherwise. Every flit of a flit-mode packet carries it, the head flit
  included.

CRC-32 uses generator 0x04C11DB7 with an all-ones preset. Data is taken
most significant bit first, with no reflection and no final inversion (the
variant whose check value for "123456789" is 0x0376E6E7).

## Network interface

### Send half and the encoding-mode state machine (`psec_ni_tx`)

The NI starts in CRC mode. When the core sets `psec_on` the NI moves to AMD
mode: packet level, or flit level if `flit_level` is also set. Clearing
`psec_on` returns it to CRC. The mode is sampled only when a packet is
accepted (`tx_valid && tx_ready`), so it never changes inside a packet, and
`mode_switch` pulses on each change. When a packet is accepted, the NI:

1. builds the header, with the next signature for that destination, and
   encodes it with AMD (23,7,7);
2. in AMD packet mode, starts the 2-stage packet encoder and waits for it;
3. sends the five flits on the injection link (`out_valid`/`out_ready`).
   Each flit stays stable while it is stalled. In flit mode each flit gets
   its own AMD check with a fresh `x`.

The first flit leaves one cycle after acceptance in CRC or flit mode, and
three cycles after it in AMD packet mode. A nack requested by the receive
half goes out before any waiting core packet, as a CRC-mode head-tail flit.

### Receive half (`psec_ni_rx`)

The receive half takes flits until the tail, then stops the link
(`in_ready` low) while it checks the packet. The verdict is a one-cycle
pulse on exactly one of `rx_valid`, `rx_nack` or `rx_drop`. It comes 4
cycles (PKT_LAT + 2) after the tail flit is accepted. The checks run in
this order. The first one that fails sets `rx_drop_reason`:

| check                      | failure means                                  | nack to source |
|----------------------------|------------------------------------------------|----------------|
| header AMD                 | header altered; `src` cannot be trusted        | no             |
| `dst` = own `node_id`      | authentic packet at the wrong core (misrouted or stolen) | yes  |
| flit AMD (flit mode)       | a flit was altered                             | yes            |
| CRC-32 or packet AMD, length | payload altered                              | yes            |
| signature fresh            | duplicate or replay of an accepted packet      | no             |

A signature is fresh when it is 1 to 63 steps (modulo 128) ahead of the
last one accepted from the same source. Gaps left by dropped packets are
therefore tolerated. Nacks are never sent about nack packets. The nack
queue holds one entry: a second nack that arrives while the first waits is
discarded and reported on `nack_lost`. A received good nack is reported to
the core on `rx_nack` with the nacking core in `rx_src`. Retransmission is
left to the core.

## Router and prioritized arbitration (`psec_router`, `prio_rand_arbiter`)

Each router has `CONC` = 4 local ports and, in a mesh, four more ports:
east, west, north and south. Core `d` sits at local port `d mod 4` of
router `d / 4`. Router `r` is at `(r mod 4, r / 4)` and learns its position
from the `my_x`/`my_y` straps. Each input sends packets whose header says
AMD to a secure virtual channel and CRC packets to a normal one. Body flits
follow their head. Each channel has a 4-flit FIFO. A head flit at the front
of a FIFO requests the output given by XY routing. Each output has an
arbiter over the 2×P input channels. A grant locks the output until the
tail flit passes (wormhole switching): one cycle to arbitrate, then one
flit per cycle.

The arbiter draws at random and weights the secure channels. If a secure
request is pending, the draw is limited to the secure requesters with
probability `SEC_PROB/256` (192/256 by default). Otherwise it covers all
requesters. Inside the chosen pool, the first requester at or after a
random start index wins. With no secure traffic it is a plain random
arbiter. `tb_prio_rand_arbiter` measures about 81 % wins for one secure
requester against three normal ones, where a fair draw would give 25 %.
`prio_event` pulses whenever a secure channel wins an output that a normal
channel also wanted.

## Attack hooks

The top level has ports that model the attacker. They are tied to zero in
normal use.

* **Compromised links:** `fault_inj_mask[c]` / `fault_inj_flit[c]` act on
  core c's injection link, and `fault_ej_*` on its ejection link. The
  80-bit mask is XORed into `{data, chk}` of the flit at position
  `fault_*_flit` of every packet on that link (0 = head).
* **Compromised router:** while `ht_en[r]` is set, router `r` sends head
  flits addressed to `ht_target[r]` out of port `ht_port[r]`. This delivers
  them whole to a rogue core. The rogue NI sees an authentic header with
  another destination, drops the packet and nacks the source.

## Parameters

| module        | parameter   | default | meaning                                     |
|---------------|-------------|---------|---------------------------------------------|
| psec_noc      | MESH_X, MESH_Y | 4, 4 | mesh size                                   |
| psec_noc      | CONC        | 4       | cores per router                            |
| psec_noc      | BUF_DEPTH   | 4       | flits per VC buffer                         |
| psec_noc      | PKT_LAT     | 2       | pipeline stages of packet AMD encode/check  |
| psec_router   | SEC_PROB    | 192     | weight of secure VCs, out of 256            |
| amd_encoder/decoder | M, B, K, LATENCY, POLY | 17, 12, 204, 2, x^17+x^3+1 | code and pipeline |
| crc32_gen     | DW, POLY, INIT | 204, 0x04C11DB7, all ones |                           |

The code sizes, the 64-bit flit, the 204-bit payload and the mesh size are
fixed in `psec_pkg` and in the top's defaults. Core IDs are 6 bits, so a
network can have at most 64 cores.

## Simulation

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops on its own, with a watchdog. Any
of them builds with plain verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/psec_pkg.sv tb/psec_ref_pkg.sv tb/tb_psec_noc.sv --top-module tb_psec_noc
./obj_dir/Vtb_psec_noc
```

| testbench              | what it checks |
|------------------------|----------------|
| tb_amd_encoder         | all three codes against a term-by-term reference, plus the 2-cycle pipeline |
| tb_amd_decoder         | valid and corrupted words; the expected verdict comes from the reference, so even the rare undetectable errors are predicted |
| tb_crc32_gen           | long-division reference and the published check value |
| tb_lfsr_rng            | every step against a Fibonacci-form model; no zero state, no short period |
| tb_prio_rand_arbiter   | every grant against a reference, plus the secure-share and fairness statistics |
| tb_psec_ni_tx          | every flit decoded in all modes, mode FSM, nack priority, the 2-cycle penalty, back-pressure |
| tb_psec_ni_rx          | delivery in all modes and every drop reason; nack rules; CRC fooled versus AMD not fooled |
| tb_psec_ni             | loopback through a faulty wire, with the nack returning |
| tb_psec_router         | whole, ordered, non-interleaved packets; XY ports for all 64 cores; trojan redirect; secure VC favoured |
| tb_psec_noc            | the full 64-core network with no parameter override: the three attack scenarios, flit and destination drops, nacks, contention, and 256 random all-to-all packets in random modes |

The reference models in `tb/psec_ref_pkg.sv` are written independently of
the RTL. GF products are formed as a carry-less product followed by
reduction, `f` is computed from explicit powers of `x`, and CRC as a
polynomial remainder. The full-network testbench takes about four minutes,
most of it C++ compilation.

## Where this design goes beyond or departs from the P-Sec description

The P-Sec description gives the AMD construction, the code sizes, the
default-CRC / on-demand-AMD policy, the AMD-protected header with its
fields, the destination and signature checks with drop and nack, the
prioritized random arbitration, the two-cycle packet penalty and the
64-core 4×4 concentrated mesh. The following are this design's own
choices, or places where it departs:

* **Chosen here:** field and CRC polynomials, header field widths, the
  flit and packet layouts, the signature as a sequence number, the
  freshness window, the check order, and which failures trigger a nack.
* **Also chosen here:** two VCs per input, 4-flit buffers, XY wormhole
  routing, and the weighting rule of the arbiter.
* **Header code (23,7,7):** `y = b·m` needs `b = 4`, with the header
  padded to 28 bits. The stated detection probability `1-(3+1)·2^-7`
  instead suggests `b = 3`, which cannot hold 23 bits. This design uses
  `b = 4`, so `D = 6`.
* **Router encoding:** the proposal calls the router "configurable" and
  notes that flit-level AMD could also protect router-to-router hops. It
  also names "path sensitization". Neither is specified, and neither is
  built: the routers forward flits unchanged, and all encoding and
  checking happens in the NIs.
* **Compromised router:** the proposal's stolen-packet scenario has the
  router duplicate the packet. The hook here redirects it instead. The
  receiving NI's response is the same.
* **Random numbers** come from 32-bit LFSRs. A real design needs a true
  random source for the AMD `x`, because an attacker who can predict `x`
  can forge codewords. `lfsr_rng` has the port to swap in.
* **Not covered:** power, area and timing figures depend on a cell library
  and are not reproduced. The 2-cycle packet latency matches the described
  pipeline. Whether the combinational flit and header codes close timing at
  2 GHz is not checked.
* **End-to-end limits:** the duplicate-signature drop is exercised at NI
  level (`tb_psec_ni_rx`). The network-level hooks cannot replay a packet.
