# End-to-end burst-error correction for a mesh network-on-chip

Long, closely spaced on-chip wires pick up bit flips from crosstalk, supply
noise and particle strikes. These flips tend to come as short bursts of
neighbouring bits rather than as isolated single-bit errors. A plain
Hamming or Hsiao SEC-DED code fixes one bit and gives up on two. The codes
that fix bursts usually cost more redundant bits than there are data bits.

This design protects every 64-bit flit of a mesh network-on-chip with 32
check bits (a 96-bit codeword, code rate 2/3):

* the flit is cut into four 16-bit rows;
* each row is encoded on its own with a (24,16) **SEC-DED-TAEC-6AED** code;
* per row, that code corrects any single-bit error and any burst of two or
  three adjacent bits, and it detects bursts of four to six adjacent bits;
* per flit, that is up to twelve corrected bit errors (a triple burst in
  every row) and up to 24 detected adjacent errors.

Encoding and decoding happen only in the network interfaces (NI), at the
source and at the destination. Routers forward the 96-bit codeword without
touching it. A flit that picks up errors anywhere on its way is repaired
once, when it leaves the network.

The RTL contains:

* the (24,16) codec;
* the 64/96-bit flit codec;
* the NI, with its pack and unpack units;
* a five-port virtual-channel router;
* the 8 × 8 mesh that ties them together.

The original description of the scheme defines the code, the flit codec
and the placement of the codec. It also gives the router configuration
(five ports, four virtual channels of four flits, XY routing). This design
fills in what that description leaves open: flow control, packet format,
the allocators, and how errors are reported. Those choices are listed in
[Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## The (24,16) SEC-DED-TAEC-6AED code

### Parity-check matrix

The code has 16 data bits d1..d16 and 8 check bits c1..c8. Its 8 × 24
parity-check matrix H has two parts:

* **Bottom five rows (c4..c8).** A 5 × 5 identity matrix repeated along the
  codeword and cut off at 24 columns. Column p therefore has its bottom one
  in row p mod 5.
* **Top three rows (c1..c3).** These make every column, and every XOR of
  two or three neighbouring columns, distinct.

Because of the identity blocks, a burst of w ≤ 5 adjacent bits always sets
exactly w distinct bottom rows. So the bottom part of the syndrome already
tells singles, doubles and triples apart. The top part then says where the
error is.

The codeword interleaves check and data bits (position 1 on the left):

```
position  1  2  3  4  5  6  7  8  9 10 11 12 13 14 15 16 17  18  19  20  21 22  23  24
bit      c1 d1 d2 d3 d4 c4 d5 c6 d6 c8 d7 c5 c3 c7 d8 d9 d10 d11 d12 d13 d14 c2 d15 d16

H row 1   1  1  1  1  1  0  1  0  1  0  0  0  0  0  0  0  0   0   0   0   1  0   1   0
H row 2   0  1  0  1  0  0  0  0  0  0  0  0  0  0  0  1  0   1   0   1   0  1   0   1
H row 3   0  0  0  0  0  0  0  0  0  0  1  0  1  0  1  0  1   0   1   0   1  0   1   0
H row 4   1  0  0  0  0  1  0  0  0  0  1  0  0  0  0  1  0   0   0   0   1  0   0   0
H row 5   0  1  0  0  0  0  1  0  0  0  0  1  0  0  0  0  1   0   0   0   0  1   0   0
H row 6   0  0  1  0  0  0  0  1  0  0  0  0  1  0  0  0  0   1   0   0   0  0   1   0
H row 7   0  0  0  1  0  0  0  0  1  0  0  0  0  1  0  0  0   0   1   0   0  0   0   1
H row 8   0  0  0  0  1  0  0  0  0  1  0  0  0  0  1  0  0   0   0   1   0  0   0   0
```

### Encoding

Each check bit sits in a column of its own. The encoder (`taec_enc16`) is
therefore just eight XOR trees:

```
c1 = d1^d2^d3^d4^d5^d6^d14^d15      c5 = d1^d5^d10^c2
c2 = d1^d3^d9^d11^d13^d16           c6 = d2^c3^d11^d15
c3 = d7^d8^d10^d12^d14^d15          c7 = d3^d6^d12^d16
c4 = c1^d7^d9^d14                   c8 = d4^d8^d13
```

Example: d = 1010 1010 1010 1010 gives check bits c1..c8 = 010 01011. The
codeword is then 01010 01001 11010 10101 0110.

### Decoding

The decoder (`taec_dec16`) works in three steps:

1. It forms the syndrome S = H·rc as the XOR of the columns of all set bits.
2. The syndrome decoder (`taec_syndrome_decoder`) compares S with 69
   patterns:
   * 24 single columns;
   * 23 XORs of two adjacent columns;
   * 22 XORs of three adjacent columns.

   Bit i is marked in the error-location vector E_LOC if any of the six
   patterns that cover it matches: the single at i, the doubles (i-1,i) and
   (i,i+1), and the triples (i-2..i), (i-1..i+1) and (i..i+2). Each bit is
   the OR of six comparators.
3. It flips the marked bits (u = rc ^ E_LOC) and reads out the data bits.

Continuing the example, errors at positions 4, 5 and 6 give S = 0101 0011.
S equals the XOR of columns 4, 5 and 6, so those three bits are flipped
back.

### Properties of the code

All of these were checked exhaustively against the matrix above:

* the 69 correctable syndromes are all different;
* every burst of 4, 5 or 6 adjacent bits gives a nonzero syndrome that
  matches none of them. The decoder flags it as uncorrectable and leaves the
  data as it is;
* no double error is ever taken for a single-bit error;
* 41 of the 276 non-adjacent double errors have the syndrome of some
  adjacent double or triple error. They are miscorrected, which is the
  price of burst correction in 8 check bits;
* 805 of the 2002 non-adjacent triple errors (40.2 %) end up with a zero or
  correctable syndrome. The published miscorrection rate for this code is
  39.4 %. The small gap may come from a different way of counting; it could
  also mean the top three rows here differ in some column from the
  original's while keeping every property listed above.

## Flit codec

* `flit_encoder`: four `taec_enc16` in parallel. Row A is `data_i[15:0]`
  and goes to `code_o[23:0]`; row B is `data_i[31:16]` and goes to
  `code_o[47:24]`; and so on.
* `flit_decoder`: four `taec_dec16` in parallel, on the same row mapping.
  Per row it reports `corrected_o` (an error was fixed) and
  `uncorrectable_o` (an error was seen but could not be fixed).

The rows are independent, so errors in different rows never interact. A
flit with a three-bit burst in every row (twelve bit errors) comes out
clean. Both codecs are purely combinational.

## Network

### Mesh (`noc_mesh`, the top)

The mesh has `MESH_X × MESH_Y` nodes (default 8 × 8). Node (x,y) has index
y·MESH_X + x and holds one router and one NI. Router links:

* north goes to (x,y+1) and east to (x+1,y);
* ports on the edge of the mesh are tied off.

The processing elements are not part of the design. Each node brings its PE
side out as ports:

* `pe_tx_i` / `pe_tx_ready_o`: words to send;
* `pe_rx_o`: decoded flits received, with status.

`fault_mask_i[n]` is XORed onto the codeword of every flit that enters node
n's NI from its router. It stands for the errors a flit collects on its
path, and makes the codec observable in simulation. Tie it to zero in
normal use.

### Flits and flow control (`noc_pkg`)

A flit in the network is the 96-bit codeword plus an unencoded side band
(`flit_t`): head and tail markers, destination coordinates (4 bits each)
and VC number. Routers need the side band to route, and they never decode
the codeword. Note that the side band is therefore **not protected** by the
code.

Flow control uses credits. Every sender keeps a count of free buffer slots
for each VC of the receiver. Every receiver returns one credit for each
flit it removes from a buffer. A VC belongs to one packet from its head
flit to its tail flit.

### Router (`noc_router`)

The router has five ports: local, north, east, south and west. Each input
port has four VCs (`vc_fifo`), each four flits deep. All stages are
evaluated together in one cycle, and the winner is written into the output
register, which serves as the output buffer. The stages:

1. **Route computation.** XY dimension order: first along x, then along y,
   taken from the head flit.
2. **VC allocation.** Each output port grants one waiting head flit per
   cycle, round robin over the 20 input VCs. The winner gets the
   lowest-numbered free output VC.
3. **Switch allocation.** Each input port picks one ready VC (round robin).
   A VC is ready when it holds an output VC that has a credit, or is being
   granted one in this same cycle. Each output port then picks one of the
   input ports requesting it (round robin).
4. **Switch traversal.** The flit goes to the output register with its new
   VC number, and a credit goes back upstream. When the tail flit leaves,
   its output VC is freed.

A flit buffered at one clock edge can be in the output register at the
next, when nothing competes with it. That makes two edges from input link
to output link, for head flits as for body flits. A head flit that loses VC
allocation tries again in the next cycle.

### Network interface (`noc_ni`, `ni_pack`, `ni_unpack`)

**Injection side.** The PE offers one 64-bit word per cycle on a
valid/ready handshake, with a destination and a `last` marker. The pack
unit works as follows:

* the first word of a packet becomes the head flit, the word marked last
  the tail flit, and a single word is both;
* at the start of each packet it claims the lowest free VC of the router's
  local input port, and keeps that VC until the tail has been sent;
* it counts credits and holds `ready` low while the chosen VC has none.

The flit is registered, and on its way to the router it passes through the
flit encoder.

**Ejection side.** Flits from the router pass through the flit decoder
into the unpack unit, which:

* registers each flit for the PE with its head/tail markers, VC and per-row
  status;
* returns a credit at once, because the PE is assumed always to accept;
* keeps a status for each VC, because packets on different VCs can
  interleave at the ejection port. With each tail flit it reports whether
  any flit of that packet was corrected (`pkt_corrected`) or had an
  uncorrectable error (`pkt_uncorrectable`).

Retransmission is not part of the design. An uncorrectable packet is
delivered with its flag set, and what to do with it is up to the receiver.

## Where this design makes its own choices

These parts are not fixed by the original description of the scheme:

* **Numbering and ordering.**
  * Port bit numbering: `data[k-1]` is d_k and `code[p-1]` is codeword
    position p.
  * Row order within the flit.
* **Extra outputs.**
  * The detected-uncorrectable output and the per-row and per-packet error
    status.
  * `fault_mask_i`.
* **Router details.**
  * The unencoded routing side band.
  * Credit-based flow control.
  * Round-robin separable allocators.
  * Asynchronous active-low reset everywhere.
  * The output register as output buffer.
* **NI details.**
  * The packet format (a packet is the words up to the one marked last).
  * VC selection and the handshakes in the NI.

The NI has no detectors on the router input ports, no multiplexer, no
send/receive controllers and no asynchronous FIFO. Leaving these out is
part of the scheme itself: the NI and the routers share one clock.

## Simulating

All files are SystemVerilog 2017. Packages must be read first:
`rtl/ecc_pkg.sv`, then `rtl/noc_pkg.sv`, and for the testbenches that use
them `tb/tb_ecc_pkg.sv` and `tb/tb_fault_pkg.sv`. Example with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module noc_mesh_tb \
  -y rtl -y tb +libext+.sv rtl/ecc_pkg.sv rtl/noc_pkg.sv tb/tb_fault_pkg.sv \
  tb/noc_mesh_tb.sv -o sim && obj_dir/sim
```

Every testbench checks its results itself and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `taec_enc16_tb` | The printed encoding examples. For random data: zero syndrome under a separately written H, and data bits in place. |
| `taec_syndrome_decoder_tb` | Every single, double and triple adjacent pattern. All 4..6-bit bursts detected. No double error taken for a single. |
| `taec_dec16_tb` | Worked example. For random words: all 69 correctable patterns corrected, all 4..6-bit bursts flagged. |
| `flit_encoder_tb` | The 64 → 96-bit example flit. Random flits row by row. |
| `flit_decoder_tb` | The example flit with twelve errors and its four syndromes. Random error mixes per row. |
| `vc_fifo_tb` | Random push/pop against a queue model. |
| `noc_router_tb` | One router with traffic on all five ports. XY output port, packet order per VC, delivery, two-edge latency from input link to output link. Credit stalls and interleaving happen. |
| `ni_pack_tb` | Head/tail, destination, VC per packet, credit limit, stalls. |
| `ni_unpack_tb` | Pass-through, credit return, per-packet status with interleaved VCs. |
| `noc_ni_tb` | NI looped back through injected errors: data and status for every word. |
| `noc_mesh_tb` | 4 × 4 mesh, end to end (details below). |
| `noc_mesh_full_tb` | The same checks on the default 8 × 8 mesh. |

The two mesh testbenches run four traffic phases:

* uniform random at 0.1 and at 1.0 flit/node/cycle;
* shuffle (destination = source index rotated left by one bit) at 0.3;
* transpose at 0.3.

Errors are injected into the flits as they eject: single bits, adjacent
pairs, adjacent triples, all four rows at once, and 4..6-bit bursts. The
testbenches check that:

* every flit reaches the right node;
* flits arrive in order within their packet;
* data is correct after correction;
* the status flags match the injected errors.

They also require that corrections, twelve-bit corrections, detected-only
errors, PE stalls, interleaving at the ejection port and local delivery
each happen at least once. The 8 × 8 run sends about 120 packets per node,
far fewer than a full performance study would.

The largest size simulated is the full default 8 × 8 mesh.
`noc_mesh_full_tb` runs it with no parameter overrides and passes 19118
checks, with every required mechanism seen. Building it takes Verilator
ten to twenty minutes of C++ compilation, depending on the number of build
jobs. Each router is specialised for its coordinates, so there are 64
distinct router modules. The simulation itself takes about a second. For
quick iterations, use the 4 × 4 `noc_mesh_tb`.
