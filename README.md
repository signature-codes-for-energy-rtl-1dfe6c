# Sig-NoC: signature-coded packets over transition-signaled NoC links

On a many-core chip most of the dynamic energy of the on-chip network is
spent charging and discharging link wires. Sig-NoC attacks that energy with
two ideas that work together:

1. **Transition signaling on every link.** A 1 is sent as a toggle of the
   wire and a 0 as no change. A link then switches exactly once per 1 it
   carries, whatever the wire held before. The link energy of a packet is
   therefore fixed by the packet's content alone and is the same on every hop.
   The source can compute it before the packet leaves.
2. **Signature coding at the source.** Because energy is now "number of 1s",
   the source reduces the 1s of each data packet. For each of the eight bit
   positions of a byte it checks whether most of the packet's 68 bytes have a
   1 there. The eight answers form an 8-bit *signature*. Every byte is XORed
   with the signature, and the signature travels in spare bits of the head
   flit. The destination XORs it back out. Routers never decode anything:
   coding is done once at the source and undone once at the destination, so it
   adds no per-hop delay and no extra wires.

This RTL implements the scheme as published by M. Dehyadegari ("Signature
Codes for Energy-Efficient Data Movement in On-chip Networks", JComSec, 2020).
It builds it into a complete, simulable 4x4 mesh network. The coding
mechanisms follow that description closely. The router around them (routing,
buffering, flow control) is described there only in outline, and its details
are this design's own. See [What is original and what is chosen](#what-is-original-and-what-is-chosen).

## Packets and flits

Flits are 34 bits wide. The two leftmost bits give the flit type; the other
32 bits are payload.

| flit | type bits [33:32] | payload [31:0] |
|------|-------------------|----------------|
| head | `01` | reserved [31:16], mode [15:12], src [11:6], dest [5:0] |
| body | `10` | 32 bits of cache-block data |
| tail | `00` | block address (data packet) or metadata (message packet) |

- A **data packet** is a head flit, 16 body flits and a tail flit, so 64 data
  bytes plus a 4-byte address (68 bytes) follow the head.
- A **message packet** (requests, acknowledgements) is a head flit and a tail
  flit.

The signature occupies head payload bits [23:16], the low byte of the
reserved field. Node `n` is at `x = n % MESH_X`, `y = n / MESH_X`. All field
positions are in `rtl/signoc_pkg.sv`.

## Signature coding

`signature_gen` holds one up-counter per signature bit. As the 17 payload
words of a data packet stream in, counter *i* adds up the 1s in bit *i* of
all four bytes of each word. When the packet is complete:

```
sig[i] = 1  if  cnt[i] > (bytes counted) / 2        (68 bytes: cnt[i] > 34)
coded byte = original byte XOR sig
```

After coding, at most half of the bytes have a 1 in any bit position. A bit
position with *c* ones out of *N* bytes keeps `min(c, N-c)` ones. The
signature bit sent in the head costs one 1 and is set only when `c > N/2`, so
it saves at least `2c - N >= 2`. Coding a data packet therefore never adds
1s, and the encoder applies it to every data packet without a separate
decision. Message packets go out with signature 0, which the decoder's XOR
leaves unchanged.

A four-nibble example (bit 3 is the top row):

```
nibbles     1101 0110 1100 1110
counters    bit3=3 bit2=4 bit1=2 bit0=1      threshold "> 2"
signature   1100
codewords   0001 1010 0000 0010      (10 ones -> 4 ones, +2 for the signature)
```

`tb_signature_gen` checks this example as well as random 68-byte packets.

### Source encoder (`sig_encoder`)

The head flit leaves first but must carry the signature of the flits behind
it, so the encoder works in two phases:

1. **Collect.** It accepts the packet from the core (valid/ready). It stores
   the head and the up to 17 body/tail words, and feeds the words to the
   counters.
2. **Send.** It emits the head with the signature written into bits [23:16].
   It then emits each stored word XORed with the signature in every byte.

With no stalls, a data packet takes 18 cycles to collect. Its head flit is
offered in the cycle after the tail was taken, and the packet leaves in 18
more cycles. The encoder handles one packet at a time, so it accepts no new
flit while sending.

In the cycle the head flit leaves, `est_valid` pulses and `est_ones` gives the
number of 1s in the whole coded packet (all 34 bits of all flits). The value
is computed from the counters, with no second pass over the data. Under
transition signaling this is exactly the number of wire transitions the
packet causes on each link it crosses. This is the source-side energy
estimate.

### Destination decoder (`sig_decoder`)

The decoder latches the signature from each head flit. It XORs the signature
into every byte of the following body and tail flits, and clears the
signature field of the head. It is purely combinational apart from the
signature register, and adds no latency.

## Transition-signaling links

`tsig_encoder` is a register that drives the wires, `b <= b ^ s`.
`tsig_decoder` keeps the previous wire value and outputs `s = b ^ b_prev`.
`noc_link` combines one of each with two plain control wires:

- `valid` is registered alongside the data.
- `credit` runs back from the receiver to the sender, combinationally.

While no flit is sent, the encoder input is forced to zero and the wires stay
still. A flit sent at cycle *t* appears, already decoded, at the far end at
cycle *t+1*. All 34 bits (type bits included) are transition coded. The
`wires` output exposes the raw wire state so that switching activity can be
measured.

Every link uses this scheme: router to router, core interface to router, and
router to core interface.

## The network

`signoc_noc` (the top) instantiates `MESH_X x MESH_Y` nodes. Each node has:

- a `sig_encoder` with a credit counter, feeding an injection `noc_link` into
  the router's local port;
- a `noc_router`;
- an ejection `noc_link` from the router's local port into a `sig_decoder`;
- two `noc_link`s (one each way) to the east neighbour and two to the south
  neighbour.

`noc_router` has five ports (local, north, east, south, west):

- **Input buffers** (`flit_fifo`): four flits deep by default. Each buffer
  returns a credit upstream when it pops a flit.
- **Route computation**: dimension order, X first, then Y. It is applied to
  the head flit. Body and tail flits follow the port their head took.
- **Allocator** (`noc_allocator`): for each output, a round-robin choice among
  the head flits that request it. A granted output stays reserved for that
  input until the tail flit passes (wormhole switching). A flit moves only if
  the output has a credit.
- **Crossbar** (`noc_crossbar`): one multiplexer per output. Idle outputs are
  driven to zero.

A flit spends one cycle in each router and one on each link. The minimum
latency from the encoder's head flit to delivery at the destination core is
`3 + 2*hops` cycles, counting the injection and ejection links.

Top-level ports, all indexed by node: `inj_flit/inj_valid/inj_ready` (from
the core), `ej_flit/ej_valid` (to the core, always accepted) and
`est_ones/est_valid` (energy estimate per injected packet).

## What is original and what is chosen

These parts follow the published scheme:

- the 34-bit flit with 2 type bits;
- the head/body/tail structure, the 16 body flits and the field order of the
  head;
- the transition encoder and decoder (XOR plus one register at each end);
- the counter-per-bit-position signature with a majority threshold;
- the 8-bit signature over 68 bytes, carried in the head's reserved bits;
- coding only at the source and decoding only at the destination;
- the 4x4 mesh size.

These are this design's choices, because the scheme leaves them open:

- field widths (6-bit node numbers, 4-bit mode), the signature position
  [23:16], and the meaning of the mode field (passed through unchanged);
- the threshold "more than half" for 68 bytes (a 34/34 tie gives 0);
- the collect-then-send encoder and the way the energy estimate is formed.
  The encoder stores a whole packet (17 x 32 bits) so that the head can carry
  the signature. The published encoder cost (321 um^2 at 22 nm) is far below
  what such a buffer takes, so the original probably reuses packet storage
  that already exists in the network interface. Here the buffer is counted as
  part of the encoder;
- that message packets are not coded;
- the router as a whole: X-then-Y routing, wormhole switching, credit flow
  control, 4-flit buffers, round-robin allocation, one-cycle router and link
  stages;
- **one virtual channel per port.** The scheme's router has a virtual channel
  allocator, but no channel count or policy is given. `noc_allocator`
  therefore reserves whole output ports. This is the main place where the
  router is simpler than the one in the evaluated system.

Not included:

- The cores, L1/L2 caches, the MSI directory controllers at the mesh corners
  and the DRAM controllers. The system is evaluated with them, but they are
  not part of the network design. Their traffic enters and leaves through the
  per-node `inj_*`/`ej_*` ports.
- The bus-invert and plain binary baselines the scheme is compared against.

## Files

| file | contents |
|------|----------|
| `rtl/signoc_pkg.sv` | flit type, field positions, port numbers, helper functions |
| `rtl/tsig_encoder.sv`, `rtl/tsig_decoder.sv` | transition-signaling ends of a link |
| `rtl/noc_link.sv` | one link: encoder, wires, decoder, valid, credit |
| `rtl/signature_gen.sv` | per-bit-position counters and majority compare |
| `rtl/sig_encoder.sv` | source encoder and energy estimate |
| `rtl/sig_decoder.sv` | destination decoder |
| `rtl/flit_fifo.sv`, `rtl/credit_cnt.sv` | input buffer, credit counter |
| `rtl/noc_allocator.sv`, `rtl/noc_crossbar.sv`, `rtl/noc_router.sv` | router |
| `rtl/signoc_noc.sv` | the mesh (top) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two below |
| `tb/tb_signoc_pkg.sv` | reference model: packet generators, signature, coding, 1s count |

Assertions in the RTL check the handshake rules: no buffer overflow, no flit
sent without a credit, no excess credits, one grant per input, and a packet
always closed by a tail flit.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one
also has a watchdog that counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/signoc_pkg.sv tb/tb_signoc_pkg.sv tb/tb_signoc_noc.sv \
    --top-module tb_signoc_noc -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_<module>.sv` and its top module name to run another
testbench. All of them run in seconds.

`tb_signoc_noc` runs the full 4x4 mesh at its default parameters. All 16
cores send 24 packets each: a mix of data and message packets with random
densities of 1s and random destinations, injected concurrently. It checks:

- every delivered flit, in order per source/destination pair;
- every energy estimate;
- that the wire transitions counted on all links of the mesh equal the sum,
  over packets, of (coded 1s) x (hops + 2);
- that no head flit arrives faster than `3 + 2*hops` cycles after leaving its
  encoder, and that some arrive exactly then.

It also requires that these events occur: data packets with a nonzero
signature, message packets, injection back-pressure, router stalls, and
traffic in all four link directions. A typical run reduces the 1s of the
traffic by about 45%.

`tb_signoc_noc_8x8` runs the same checks on the 8x8 configuration.

`tb_sig_density_sweep` sends random data packets, with each bit set with
probability 0.1 ... 1.0, through encoder, link and decoder. It prints the
link energy relative to uncoded transition signaling. There is no saving up
to about 30% ones, and the saving rises steeply above 50%. Because of the
head and type bits, about 5% of the energy remains at 100% ones:

```
p(1)   0.1-0.3  0.4   0.5   0.6   0.7   0.8   0.9   1.0
ratio  1.00     0.99  0.92  0.72  0.49  0.31  0.16  0.05
```

## Changing it

- Mesh size: `signoc_noc #(.MESH_X(8), .MESH_Y(8))` builds the 8x8
  configuration. The node fields are 6 bits, enough for 64 nodes. Wider
  meshes need a larger `NODE_W` in `signoc_pkg`, which moves the mode field
  and the signature up in the head.
- Buffer depth: `BUF_DEPTH`, used by both the buffers and the credit counters.
- Packet length: `BODY_FLITS` in `signoc_pkg`. The counter width in
  `signature_gen` follows from the number of bytes.
- Message packets can be coded too by changing `sig_used` in `sig_encoder`.
  For them the majority rule also never adds 1s.
