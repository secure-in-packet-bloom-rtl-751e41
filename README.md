# zFormation forwarding node in SystemVerilog

This is the user data path of a forwarding node for source-routed packets
that carry an in-packet Bloom filter (iBF). The node does not keep a table
of fixed link identifiers. For each packet it computes one identifier per
outgoing link from a per-packet nonce I: it evaluates F3(K3, I xor O2[link])
and turns the first 40 output bits into five 8-bit indices of a 256-bit
mask. The packet leaves on every link whose mask is fully contained in the
iBF, minus the link it came in on. It is dropped when the ethertype is not
0xACDC, when the TTL is 0, or when the iBF has more ones than a set limit.
On forwarded copies the TTL is decremented.

F3 is either AES-128, which takes 12 clocks, or the Moustique
self-synchronizing stream cipher, which takes 40 clocks for 40 bits. A
parameter selects which. The pipeline follows the NetFPGA reference
pipeline, and so do its buses: a 64-bit packet bus with 8 control bits, and
a chained 32-bit register bus. The clock is 125 MHz.

Top module: `zformation_top` (`rtl/zformation_top.sv`).

## Structure

```
rx frame streams (8)                                  tx frame streams (8)
  |                                                          ^
rx_queue x8 --> input_arbiter --> output_queues --------> tx_queue x8
                                    |  packet store (FIFO)
                                    |  output_port_selector
                                    |    zf_registers (K3, O2 x4, status, counters)
                                    |    4 x aes_cipher_top  or  4 x moustique(_core)
                                    |    do_zfiltering, bit_counter,
                                    |    ethertype / TTL checks, combine
                                    |  decision FIFO, copy to output queues
reg_in --------------------------------> reg_out (chained register bus)
```

Queues 0, 2, 4, 6 are the four Ethernet ports and 1, 3, 5, 7 the host
(DMA) ports. Ethernet link l is queue 2l.

### Receive and transmit queues (`rx_queue`, `tx_queue`)
`rx_queue` collects a whole frame and then sends it on the packet bus.
First comes an I/O-queue module header with ctrl 0xFF. It holds a one-hot
destination, the length in words, the source port and the length in bytes.
The frame words follow with ctrl 0. The last word carries a byte mask in
ctrl: 0x80 means 1 valid byte, and each extra byte shifts the bit one place
right. `tx_queue` removes the module headers and hands the frame words to
the MAC side, again with a valid/ready handshake.

### Input arbiter (`input_arbiter`)
Each input has a small FIFO. The arbiter serves the inputs round robin and
passes one whole packet at a time.

### Output queues (`output_queues`)
Each packet goes into a packet store and, in the same cycle, to the output
port selector. Decisions are queued in packet order. A reader takes the
next decision and streams the packet out of the store. It writes the packet
into every selected output queue at once, with the header's destination
field and the TTL byte rewritten. A dropped packet is read out and
discarded.

### Output port selector (`output_port_selector`)
This block parses the header as the packet goes by. The positions are
frame (Ethernet) words of 8 bytes:

| word | contents |
|------|----------|
| 0-1  | MAC addresses; ethertype in bytes 12-13 (word 1, data[31:16]) |
| 1    | next-header and header-length bytes 14-15 |
| 2-5  | nonce I (256 bits), bytes 16-47 |
| 6    | next header, header length, d (bytes 48-51); TTL at byte 52 (data[31:24]); 3 reserved bytes |
| 7-10 | Bloom filter (256 bits), bytes 56-87; payload from byte 88 |

With AES, the four cipher instances start once nonce words 2 and 3 are in.
Each one encrypts (I xor O2[l])[255:128] under K3[255:128]. With Moustique,
the instances start on nonce word 2. Each one decrypts the first 40 bits of
I xor O2[l] bit by bit under K3[255:160]. `do_zfiltering` builds the 5-hot
masks and matches them against the iBF in one registered clock. Output byte
j (most significant first) is an index p, and it sets iBF bit 255-p. That
is byte p/8, bit 7-(p mod 8) of the filter field. `bit_counter` adds 64
filter bits per clock. The combine step removes the incoming Ethernet link
and clears the selection if any check fails.

Decision timing, counting from the cycle in which the word is on the bus:
- AES: 15 clocks after nonce word 3, i.e. 1 clock to load, 12 for the
  cipher, 1 to latch, 1 to match.
- Moustique: 43 clocks after nonce word 2.
- In both cases the decision is at least 3 clocks after the last filter
  word.

The next packet is held off until the decision is out.

### Ciphers (`aes_cipher_top`, `moustique`, `moustique_core`)
`aes_cipher_top` is an iterative AES-128 with one round per clock. `done`
comes in the 12th clock after `ld`. The S-box is computed during
elaboration from the field inverse and the affine map.

`moustique_core` is the Moustique cipher function. It has a 128-bit
conditional complementing shift register in 96 cells, five 53-bit stages,
a 12-bit stage and a 3-bit stage, and puts out one keystream bit per clock.

`moustique` wraps the core:
- After any key write it feeds the 105-bit IV for 105 clocks and keeps a
  snapshot of the state reached.
- Each `start_moustique` restarts from that snapshot and decrypts 40 bits.
- `decrypted_data_ready` pulses in the 40th clock.

### Registers (`zf_registers`)
The register block answers 64 words at `BASE_ADDR` (default 0x040000).
Words are most significant first.

| word | contents |
|------|----------|
| 0-7 | K3 |
| 8+8l .. 15+8l | O2 of link l |
| 40 | status; bit 0 = cipher initialized |
| 41 | forwarded packet count |
| 42 | dropped packet count |

Requests for other addresses pass through one clock later, unchanged.

### Package and helpers (`zf_pkg`, `sync_fifo`)
`zf_pkg` holds the bus types, the header word map, the register map, the
AES helpers and the Moustique tables. `sync_fifo` is the show-ahead FIFO
that all queues use.

## Parameters of the top

| parameter | default | meaning |
|-----------|---------|---------|
| CIPHER | CIPHER_AES | F3: CIPHER_AES or CIPHER_MOUSTIQUE |
| MAX_ONES | 128 | largest number of ones an accepted iBF may have |
| BASE_ADDR | 23'h040000 | register window base |
| RXQ_DEPTH / TXQ_DEPTH | 512 | receive / transmit queue depth in words |
| IA_DEPTH | 32 | arbiter input FIFO depth |
| BUF_DEPTH | 1024 | packet store depth in bus words |
| OQ_DEPTH | 512 | output queue depth in bus words |

m = 256, k = 5, four links and 256-bit K3 / O2 are package constants.

## Testbenches

Each block has a self-checking testbench in `tb/`, named `tb_<block>.sv`.
Each one ends with a `TB_RESULT checks=N failures=M` line. The model in
`tb/tb_zf_model.sv` provides independent behavioural AES-128 and Moustique
implementations and a packet builder.

- `tb_zformation_top` runs an AES node with default parameters and a
  Moustique node. It counts each mechanism and requires each to happen.
- `tb_zformation_full` runs one node with every parameter at its default.

The cipher testbenches check the FIPS-197 vectors and Moustique answers
from an independent model. They also check Moustique's
self-synchronization after 114 bits.

## Where this design departs from the reference description

- The packet store is an on-chip FIFO, not the board SRAM. The MACs, the
  DMA engine and the SRAM/DDR controllers are outside this design. Their
  frame streams and the register bus are the top's ports.
- The reference timing diagrams match the filter against the mask 64 bits
  at a time, as the filter words arrive. Here the whole filter is matched in
  one clock once it is complete. The result is the same; the decision comes
  a few clocks later.
- How I, O2 and K3 are cut down to the cipher width is a choice made here,
  and so is the bit order of the mask indices:
  - AES uses the first 128 bits of I xor O2 and of K3.
  - Moustique uses the first 40 bits of I xor O2 and the first 96 bits of
    K3.
- The Moustique IV value is a parameter, default zero. Every packet starts
  from the post-IV state, so a link identifier depends only on the packet
  and the keys.
- The ones limit (128), the register map, the status and counter registers,
  the queue depths and round-robin arbitration are choices made here.
- The d field and the next-header and header-length bytes are carried
  through but not checked. A packet too short to hold the whole header is dropped.
- Only one packet is being decided at a time. The next packet waits at the
  arbiter until the previous decision is out, up to about 46 clocks with
  Moustique. With AES, four 1 Gb/s links at full load are kept up with
  even for minimum-size forwarding packets. With Moustique they are only
  kept up with for packets of about 184 bytes or more.
- Packets from the host queues are forwarded on every matching link. Only
  packets from an Ethernet port have a link excluded.

## Outside this design

The Gigabit Ethernet MACs, the PCI/DMA host interface, the SRAM/DDR
controllers and the host software that derives K3 and O2 (HMAC-SHA-256)
are not part of this RTL. The MAC and DMA sides meet the design at the
`rx_*` / `tx_*` frame streams of the top, and the host at the register bus
(`reg_in` / `reg_out`).

## Simulating

Every testbench needs the package files first, then the RTL, then the
testbench. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/zf_pkg.sv tb/tb_zf_model.sv $(ls rtl/*.sv | grep -v zf_pkg) \
  tb/tb_zformation_top.sv \
  --top-module tb_zformation_top -o sim
obj_dir/sim
```

The packages come first because the other files import them. The run prints `TB_RESULT checks=N failures=0` on success.
The large testbenches (`tb_output_port_selector`, `tb_zformation_top`) take
about a minute to build and run.
