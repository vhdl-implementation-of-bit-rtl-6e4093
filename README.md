# Bluetooth baseband bit processes: HEC, CRC and data whitening

Before a Bluetooth packet goes out, the baseband runs a chain of serial bit
operations over it. A header error check (HEC) is appended to the 10-bit
packet header. A 16-bit CRC is appended to the payload. Then header, HEC,
payload and CRC are XORed with a pseudo-random whitening sequence, which
breaks up long runs and keeps the DC balance of the radio signal. The
receiver undoes the whitening and checks both codes.

All three operations are linear feedback shift registers (LFSRs) that take
one bit per clock. This RTL builds each one as a small block with a
read/write control. It then chains the blocks into a transmit datapath and a
receive datapath that handle one complete packet each. A top module places
the two side by side.

```
 transmit                                        receive
 hdr[9:0] ─► hec_gen ─┐                          rx_bit ─► data_whitening ─┬─► hec_gen (check) ─► hdr, hec_ok
                      ├─► data_whitening ─► tx_bit         (de-whitening)  └─► crc_gen (check) ─► pl_bit, crc_ok
 pl_bit ──► crc_gen ──┘
```

FEC coding, payload encryption and the radio sit between `tx_bit` and
`rx_bit` in a real device. They are not part of this design: the top brings
both ends out as ports, and the end-to-end testbench connects them directly.

## The LFSR dividers (`hec_gen`, `crc_gen`)

Both blocks compute the remainder of a polynomial division over GF(2).

| block     | register | generator polynomial                                      | preload                          |
|-----------|----------|-----------------------------------------------------------|----------------------------------|
| `hec_gen` | 8 bits   | (D+1)(D^7+D^4+D^3+D^2+1) = D^8+D^7+D^5+D^2+D+1             | UAP in positions 0..7            |
| `crc_gen` | 16 bits  | D^16+D^12+D^5+1                                           | UAP in positions 0..7, zeros in 8..15 |

The UAP is the 8-bit "upper address part" of the Bluetooth device address.
Register position *i* holds the coefficient of D^i. Position 0 is the
left-most element and bit 0 of the UAP goes there. The bit fed back is the
top position XORed with the incoming data bit. It is added into every
position where the generator has a 1 (Galois form). The polynomial constants
live in `bt_pkg`.

Each block has three modes, chosen by `init` and `rw` while `en` is 1:

* **preload** (`init = 1`): one cycle, loads the UAP (or a default check
  initialisation value) in parallel.
* **write** (`rw = RW_WRITE`): shifts `din` into the divider, LSB of the
  field first. `dout` repeats `din`, so a transmitter can send the data bits
  straight through the block.
* **read** (`rw = RW_READ`): sends the remainder out right to left. The HEC
  comes out as position 7, 6, …, 0 and the CRC as position 15, …, 0. Feedback
  is off and zeros shift in.

The receiver uses the same block as a checker. It preloads the same UAP and
writes the data bits followed by the received check bits, in the order they
arrived. If nothing was corrupted the register ends up all zero, which the
`zero` output flags. This works because reading the register out
highest-position first appends the remainder R(D) as the lowest-order terms
of the codeword. Dividing the codeword then gives D^W·(R + R) = 0 (W is the
register width). Any single-bit error gives a non-zero remainder.

`en = 0` freezes the register. This is where the design gates its clocks:
no state changes while a block is idle or stalled. It is written as a clock
enable, and a synthesis flow can map it to integrated clock-gating cells.

## Whitening (`data_whitening`)

A 7-bit LFSR with generator D^7 + D^4 + 1. On each step the bit in position
6 goes back into position 0 and is also XORed into position 4. The other bits
move one place right. The whitened bit is `din XOR position 6`.

The starting value comes from the six low bits of the Bluetooth master
clock: CLK1 in position 0 up to CLK6 in position 5, with a 1 in position 6.
The register is filled serially. With `rw = RW_WRITE` the feedback and the XOR
are bypassed, and `dinz` shifts into position 0. Seven writes in the order
1, CLK6, CLK5, …, CLK1 leave the required pattern. Then `rw = RW_READ`
whitens one bit per enabled clock.

Within a packet, the whitening LFSR is started once, before the first header
bit. It runs through header, HEC, payload and CRC without being restarted.
`en = 0` pauses it. The output stays `din XOR` the held position-6 bit, so a
bit that waits on a stalled link does not change. In write mode with
`en = 0`, `dout` is `din` unchanged. That mode is for stretches of a packet
that must not be whitened. De-whitening is the same operation with the same
starting value.

The sequence has period 127, because the polynomial is primitive.

## Transmit datapath (`bt_tx_datapath`)

A `start` pulse samples the packet set-up: `uap`, `clk_bits` (CLK6..CLK1),
the 10-bit header `hdr` and the payload length `pl_len` in bits. The block
then steps through:

| phase | cycles / bits | what happens |
|-------|---------------|--------------|
| WINIT | 7 cycles      | HEC ← UAP and CRC ← {0, UAP} in the first cycle; whitening LFSR loaded with 1, CLK6..CLK1 |
| HDR   | 10 bits       | header bits, LSB first, through the HEC divider and the whitener |
| HEC   | 8 bits        | HEC read out through the whitener |
| PL    | `pl_len` bits | payload bits from `pl_bit`, through the CRC divider and the whitener |
| CRC   | 16 bits       | CRC read out through the whitener |

With `pl_len = 0` the packet ends after the HEC, with no payload and no CRC.
`done` pulses once, one cycle after the last bit is taken.

Flow control uses valid/ready. A bit leaves on `tx_bit` in each cycle where
`tx_valid` and `tx_ready` are both 1. During PL, `tx_valid` follows
`pl_valid`, and `pl_ready` says that the offered payload bit is taken in this
cycle. While `tx_ready` or `pl_valid` is low, every LFSR enable is low.
The packet then resumes exactly where it stopped. Two assertions check the
handshake rules:

* an offered header, HEC or CRC bit holds until it is taken;
* `pl_ready` is raised only in the payload phase.

Timing without stalls: the first `tx_bit` is offered 7 cycles after the
edge that samples `start`, and one bit follows per clock after that. `done` comes 7 + 18 + N + 16 + 1
cycles after start for an N-bit payload, or 7 + 18 + 1 cycles without one.

## Receive datapath (`bt_rx_datapath`)

The receive datapath has the same set-up inputs, apart from the header. A
start pulse runs the same 7-cycle whitening initialisation. After that,
every cycle with `rx_valid = 1` takes one received bit and de-whitens it:

* **first 18 bits (header + HEC):** go into the HEC checker. The first 10 are
  also collected as `hdr`. One cycle after the 18th bit, `hdr_valid` pulses,
  with `hdr` and `hec_ok` valid. They hold until the next start.
* **next `pl_len` bits:** come out de-whitened on `pl_bit`/`pl_valid` and
  go into the CRC checker.
* **last 16 bits:** the received CRC, also into the CRC checker.

`done` pulses after the last bit, with `crc_ok` valid. For a packet without
payload, `crc_ok` is 1. A failed HEC does not stop the block: it still takes
the rest of the packet, and the caller decides whether to drop it. The
receiver gets the payload length from outside. In a full baseband it would
come from the packet type in the header.

## Top (`bt_bitstream_datapath`)

The top instantiates one transmit and one receive datapath, with a shared
clock and reset. All their ports are brought out with `tx_` and `rx_`
prefixes. `LEN_W` (default 13) sets the width of the payload length. The
default covers payloads up to 8191 bits. That is enough for the largest
Bluetooth packets: 1023 bytes including the payload header, or 8184 bits.

## Where this RTL goes beyond, or stops short of, the source description

The source design fixes these parts:

* the three polynomials;
* the preload values and their bit placement;
* the read-out order;
* the serial initialisation of the whitener with feedback bypassed;
* the whitening that continues from header into payload;
* the pause of the whitener;
* the order of the processes.

It says that clock gating saves power when the circuit is idle, but not how
it is built. Here it is a clock enable.

This design's own choices:

* the parallel UAP preload of `hec_gen` and `crc_gen`;
* `dout` passing `din` through in write mode;
* the `zero` flag;
* asynchronous active-low reset everywhere;
* the packet state machines;
* the valid/ready handshakes and the stall behaviour;
* the payload-length inputs;
* `LEN_W`.

Not built:

* **FEC encoding/decoding:** no code is specified.
* **Payload encryption/decryption:** only named, no cipher given.
* **RF interface.**
* **Header fields:** the datapath treats the 10 header bits as opaque and
  does not decode the packet type.
* **Enhanced Data Rate:** guard, synchronisation and trailer portions are
  not inserted. The whitener's pause mode is what such a sequencer would use.

The source reports FPGA propagation delays of about 3–5 ns for each of the
three circuits. Those figures are not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog. The expected
values come from `tb/bt_ref_pkg.sv`, which does not model shift registers.
It computes remainders by polynomial long division:
(S0·D^n + D^W·M(D)) mod g(D) for a preload S0 and message M. Whitening bits
are the D^6 coefficient of S0·D^j mod (D^7+D^4+1).
`build_packet` produces the complete whitened bit string of a packet.

| testbench | what it checks |
|-----------|----------------|
| `tb_hec_gen` | HEC of random headers and UAPs; zero remainder on receive; every single-bit error detected; hold with `en = 0` |
| `tb_crc_gen` | CRC of random payloads of 0–64 bits; zero remainder; single and double adjacent errors detected |
| `tb_data_whitening` | sequence against the reference for random clock values; pauses; de-whitening recovers the data; period exactly 127 |
| `tb_bt_tx_datapath` | every transmitted bit of random packets, with random `tx_ready`/`pl_valid` stalls; held bits; start-to-done latency |
| `tb_bt_rx_datapath` | header, payload, `hec_ok`/`crc_ok` for clean packets and packets with one flipped bit; gaps in `rx_valid`; latency |
| `tb_bt_bitstream_datapath` | TX looped into RX at default parameters, including one 8191-bit payload. It counts packets with and without payload, TX stalls, payload gaps, RX pauses, and detected HEC and CRC failures, and fails if any of them never occurs |

To run one with plain Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bt_pkg.sv tb/bt_ref_pkg.sv rtl/hec_gen.sv rtl/crc_gen.sv \
  rtl/data_whitening.sv rtl/bt_tx_datapath.sv rtl/bt_rx_datapath.sv \
  rtl/bt_bitstream_datapath.sv tb/tb_bt_bitstream_datapath.sv \
  --top-module tb_bt_bitstream_datapath -Mdir obj
./obj/Vtb_bt_bitstream_datapath
```

For a single block, list `rtl/bt_pkg.sv`, `tb/bt_ref_pkg.sv`, the block's
file (and the blocks it instantiates) and its testbench. Every testbench
finishes in well under a second.

To change a polynomial or a width, edit `bt_pkg`. The testbenches compute
their expected values from their own copies of the generators in
`bt_ref_pkg` (`G_HEC`, `G_CRC`, and 0x91 for whitening), so update those to
match.

## Files

* `rtl/bt_pkg.sv`: widths, polynomials and the read/write mode type
* `rtl/hec_gen.sv`, `rtl/crc_gen.sv`, `rtl/data_whitening.sv`: the bit-process blocks
* `rtl/bt_tx_datapath.sv`, `rtl/bt_rx_datapath.sv`: packet sequencing
* `rtl/bt_bitstream_datapath.sv`: top
* `tb/bt_ref_pkg.sv`: reference polynomial arithmetic
* `tb/tb_*.sv`: testbenches
