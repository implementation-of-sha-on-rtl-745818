# SHA-1 hash core with an SPI serial interface

This design computes SHA-1 message digests in hardware. A host, such as a PC with a USB-to-SPI
adapter, talks to it over an ordinary four-wire SPI link. The host streams in a message of any
length. The core pads it, cuts it into 512-bit blocks and runs the 80 SHA-1 rounds on each block
at one round per clock. The host then reads back the 160-bit digest. Because only four pins are
used, a small FPGA is enough, and the core can be driven remotely without a parallel bus.

All of `rtl/` is synthesizable SystemVerilog (IEEE 1800-2017). Each file opens with a comment on
what the module does and on its timing.

## Data path at a glance

```
 SPI pins ──► spi_slave ──► sha1_spi_ctrl ──► sha1_padder ──► sha1_core ──► digest
 (SCK, CS_N,   bytes          commands,        512-bit          ├─ sha1_msg_schedule (W_t)
  MOSI, MISO)  ◄── status / digest bytes ────────────────────   └─ sha1_f_k ─ sha1_ch
                                                                            ├ sha1_parity
                                                                            └ sha1_maj
```

| module | role |
|---|---|
| `sha1_spi_top` | top level: wires the four blocks below to the SPI pins |
| `spi_slave` | SPI mode-0 byte shifter, oversampled in the system clock domain |
| `sha1_spi_ctrl` | command decoder: INIT / DATA / FINISH / STATUS / DIGEST |
| `sha1_padder` | SHA-1 padding, 64-bit length counter, 64-byte block buffer |
| `sha1_core` | working variables A..E, chaining value H0..H4, round FSM |
| `sha1_msg_schedule` | 16-word window that produces W_0..W_79 |
| `sha1_f_k` | picks f(t) and K_t for each group of 20 rounds |
| `sha1_ch`, `sha1_parity`, `sha1_maj` | the three SHA-1 bitwise functions |
| `sha1_pkg` | word/block/digest types, K and H(0) constants, `rotl`, SPI command codes |

## The compression core (`sha1_core`)

The core is iterative: one 32-bit round data path, used 80 times per block.

* **Accept (1 clock).** A block is taken when `blk_valid && blk_ready`. A..E are loaded from
  H0..H4. All 16 message words are copied into the scheduler's window in parallel.
* **Rounds (80 clocks).** Each clock computes
  `T = ROTL5(A) + f(t;B,C,D) + E + W_t + K_t` and shifts the variables:
  `E←D, D←C, C←ROTL30(B), B←A, A←T`.
  This is a five-operand 32-bit sum, and it is the critical path.
* **Update (1 clock).** `Hi ← Hi + {A,B,C,D,E}[i]`. If the block was flagged last, `done`
  pulses and `digest_valid` is set.

So a block costs **82 clocks**, and a new block can be accepted 82 clocks after the previous
one. `init` restores H(0) = 67452301 EFCDAB89 98BADCFE 10325476 C3D2E1F0 and abandons any block
in progress. Folding the update into round 79 would save one clock per block but lengthen the
critical path. This design keeps them separate.

### Message schedule (`sha1_msg_schedule`)

Only the last 16 schedule words are ever needed, so the schedule is a 16-deep window of 32-bit
registers rather than 80 stored words. `win[0]` is the current W_t. When the window advances,
every word moves down by one. The new top word is
`ROTL1(win[13] ^ win[8] ^ win[2] ^ win[0])`, which is the standard recurrence
`W_s = ROTL1(W_{s-3} ^ W_{s-8} ^ W_{s-14} ^ W_{s-16})` evaluated for s = t+16.
Rounds 0..15 therefore read the message words unchanged, and rounds 16..79 read computed words.
A multiplexer in front of the window chooses between a parallel load of a new block and this
feedback.

### Round function and constants (`sha1_f_k`)

| rounds | f(B,C,D) | K_t |
|---|---|---|
| 0–19 | Ch = (B∧C) ⊕ (¬B∧D) | 5A827999 |
| 20–39 | Parity = B ⊕ C ⊕ D | 6ED9EBA1 |
| 40–59 | Maj = (B∧C) ⊕ (B∧D) ⊕ (C∧D) | 8F1BBCDC |
| 60–79 | Parity | CA62C1D6 |

All three functions are evaluated in parallel, and a 4-way multiplexer picks the result by round
group. The two Parity groups share one instance. Each function sits in its own small module
(`sha1_ch`, `sha1_parity`, `sha1_maj`) and is built as the AND/XOR gate network of its formula.

## Padding (`sha1_padder`)

SHA-1 hashes the message M of l bits extended by a 1 bit, then k zero bits with
l + 1 + k ≡ 448 (mod 512), then l as a 64-bit big-endian number. The padder does this in
hardware, so the host sends only the raw message:

* Bytes are written into a 64-byte buffer, one per clock, and a 64-bit counter adds 8 to l for
  each byte. When the buffer is full it is offered to the core as a non-final block.
* On FINISH, byte 80h is written after the last message byte and the rest of the buffer is
  cleared, all in one clock.
  * If at most 55 message bytes were in the buffer, the length goes into bytes 56..63 and the
    block is offered as the last one.
  * Otherwise that block is offered first, and then a second block of zeros ending in the
    length follows. This is the "extra padding block" case, for example a 56-byte message.
* After the last block the padder accepts nothing until INIT (or reset).

Messages are whole bytes, so the bit-granular lengths of the SHA-1 definition are supported only
in multiples of 8. The 1 bit is always the top bit of a byte. Byte 0 of the message is the most
significant byte of word 0 (SHA-1's big-endian convention).

## Serial interface (`spi_slave`, `sha1_spi_ctrl`)

**Electrical/timing.** SPI mode 0 (SCK idle low, sample on the rising edge, shift on the falling
edge), MSB first, 8-bit frames. SCK, CS_N and MOSI pass through two-flop synchronisers, and SCK
edges are detected in the `clk` domain. Keep **SCK ≤ clk/8** so that each half period of SCK
covers the synchroniser and response delay. MISO is driven low while CS_N is high; add an
external tri-state buffer if the bus is shared.

**Protocol.** Every transaction (CS_N low … high) starts with a command byte. While the command
byte comes in, the slave always shifts out the status byte.

| code | command | what follows |
|---|---|---|
| 01 | INIT | start a new message; H ← H(0), padder emptied, overrun cleared |
| 02 | DATA | every further byte of the transaction is a message byte |
| 03 | FINISH | end of message; padding and the last block(s) are processed |
| 04 | STATUS | every further byte returned is the status byte |
| 05 | DIGEST | the next 20 bytes returned are H0..H4, most significant byte first |

Status byte: bit 0 `done` (digest valid), bit 1 `busy`, bit 2 `overrun`, bit 3 `accepting`
(the padder takes message bytes). Unknown commands are ignored until CS_N rises.

A typical session is: `01`, then `02 m0 m1 …` (as many DATA transactions as wanted), then `03`.
Poll `04 xx` until bit 0 is set, then send `05` plus 20 dummy bytes and read the digest.

**Flow control.** Each received message byte waits in a one-byte register until the padder
takes it. At SCK ≤ clk/8 a byte takes at least 64 clocks to arrive, and the padder is blocked
for at most one block time (82 clocks) while the core is busy. In normal use no byte is lost.
A byte that does find the register still full is dropped and sets `overrun`. This also happens
to bytes sent after FINISH without a new INIT. The host should check `overrun` before trusting
a digest. FINISH is held back until every held byte has reached the padder.

**Throughput.** The link, not the core, sets the rate: a 512-bit block needs 512 SCK periods, at
least 4096 clocks, while the core hashes it in 82.

## What comes from the original design and what is new here

Taken from the original SHA-1-over-SPI FPGA design this RTL implements:

* the SHA-1 algorithm as described: round equations, the three functions with their gate
  structure, the round-group table, the constants, H(0), the padding rule and the schedule
  recurrence;
* the iterative architecture: a register chain A→E with ROTL5/ROTL30, the adder tree, and a
  16-word schedule register with XOR taps, ROTL1 feedback and an input multiplexer;
* the preprocessing → schedule → hash calculation flow;
* the idea of a core remotely controlled over a standard single-bit SPI link.

Choices of this RTL, where the original design gives no detail:

* the whole SPI protocol (mode, commands, status byte, overrun handling), and the MISO
  behaviour while deselected;
* hardware padding at byte granularity;
* parallel block load into the scheduler;
* one round per clock, with separate accept and update clocks (82 clocks per block);
* valid/ready handshakes between blocks;
* asynchronous active-low reset (reset acts like INIT);
* a single system clock with SCK oversampled.

Deviations to be aware of:

* The original design was reported as an implementation on a Xilinx Spartan-II XC2S200 with 1632 flip-flops and
  a 79.3 MHz maximum clock. A generic synthesis of this RTL gives 1488 flip-flop bits:
  160 for H, 160 for A..E, 512 for the schedule, 512 for the padding buffer, 64 for the length,
  and the rest for control and SPI. Timing on any particular FPGA has not been checked.
* Ch is the standard (x∧y) ⊕ (¬x∧z).
* The original datapath drawing shows Maj in the round-function position. Here f changes with
  the round group (Ch, Parity, Maj, Parity), as SHA-1 requires.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The reference model
`tb/sha1_ref_pkg.sv` is a plain behavioural SHA-1 written from the standard: a full 80-word
schedule array and OR forms of Ch and Maj. The testbenches also compare against the published
FIPS 180 vectors: `abc` → a9993e36…d0d89d, the 448-bit two-block string → 84983e44…4670f1, and
the empty message → da39a3ee…d80709.

| testbench | what it covers |
|---|---|
| `tb_sha1_ch`, `tb_sha1_parity`, `tb_sha1_maj` | all 8 input combinations per bit, 2000 random words |
| `tb_sha1_f_k` | all 80 rounds, function and constant |
| `tb_sha1_msg_schedule` | 80 words of 21 blocks against the expanded schedule, with stalls |
| `tb_sha1_core` | FIPS vectors, 40 random messages, 82-clock block timing, init abort |
| `tb_sha1_padder` | every padding boundary (0, 55, 56, 63, 64, 119, 120 … bytes), back-pressure, 1 byte/clock |
| `tb_spi_slave` | random bidirectional transactions against an SPI master model |
| `tb_sha1_spi_ctrl` | command decoding, overrun, FINISH ordering, digest byte order |
| `tb_sha1_long_message` | padder + core on one million bytes of 'a' (FIPS long vector, 15,626 blocks), 82 clocks per block sustained |
| `tb_sha1_spi_top` | end to end over SPI at the default configuration; counts each mechanism: multi-block, extra padding block, padder waiting for the core, busy polls, overrun, aborted message, digest pin |

`tb/spi_host.sv` is a behavioural SPI master that stands in for the host computer.

Run one with plain Verilator, for example the full design:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sha1_pkg.sv tb/sha1_ref_pkg.sv \
    tb/tb_sha1_spi_top.sv --top-module tb_sha1_spi_top
./obj_dir/Vtb_sha1_spi_top
```

Replace the testbench name for the other blocks. The end-to-end test takes well under a second.

What is not verified: messages longer than a few hundred bytes over the SPI link (the long
message runs through padder and core directly), bit lengths that are
not whole bytes (not supported), and timing closure on real hardware.
