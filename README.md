# One-time-pad encryption and CRC integrity for off-chip memory

An embedded processor that keeps its code and data in an external SDRAM exposes
everything on the memory bus: an attacker with a probe can read it, and with a
little more equipment can change it. This core sits between the processor's
caches and the SDRAM controller and gives every cache line that leaves the chip
two protections:

* **Confidentiality.** The line is XORed with a one-time pad before it is
  written. The pad is AES-128 of the line's address and a per-line time stamp,
  under a key that never leaves the chip.
* **Integrity.** A CRC of the plaintext is kept on chip. When the line is read
  back and decrypted, its CRC is recomputed and compared. By default this is a
  CRC-32 per line. It can also be a CRC-8 per word, as described below.

The on-chip stores (time stamps and CRC tags) are assumed to sit in a trusted
zone that the attacker cannot reach. Everything off chip is ciphertext.

## Why a pad, and not AES on the data

If AES were applied to the data itself, a read could only start decrypting once
the line had arrived from SDRAM, and the full AES latency would be added to
every cache miss. The pad depends only on things the core already knows when the
request arrives: the address and the time stamp. So the pad is computed *while*
the SDRAM is still fetching the line, and decryption costs one XOR. The price
is on-chip memory: one time stamp per writable line and one tag per line.

## What the three inputs of the pad defeat

The AES input block is `{TS (32 bits), line byte address (32 bits), padding (64 bits)}`.
Each field defeats one attack on the external memory:

| attack | what the attacker does | why it fails |
|---|---|---|
| spoofing | puts arbitrary values on the bus or in SDRAM | the decrypted line no longer matches its stored CRC |
| relocation | copies a valid ciphertext line to another address | the pad depends on the address, so it decrypts to garbage there |
| replay | puts back an older ciphertext of the same line | the time stamp has moved on since, so the pad is different |

The time stamp of a line is incremented on every write, so a pad is never used
twice for different data. Code lines never change, so they need no time stamp.
The lower `RO_BYTES` of memory is treated as read-only code and uses TS = 0. The
upper part is read-write data, with one 32-bit time stamp per line. A CRC can
be forged by someone who can see the plaintext. Here the attacker only ever
sees ciphertext, and a modified ciphertext passes the check with probability
2^-32.

In the default configuration, the 128-bit pad covers a 256-bit line twice:
word *k* of the line (*k* = 0..7) is XORed with pad bits `[32*(k mod 4) +: 32]`.
An observer can therefore tell that ciphertext words *k* and *k*+4 were
encrypted with the same pad, and learn the XOR of their plaintexts. The
`NUM_AES = 2` configuration below removes this weakness.

## Line write and line read

```
line write                                   line read
 1 tag = CRC32(plaintext)                     1 TS  <- time-stamp store
 2 TS  = TS + 1      (read-write lines)       2 tag <- tag store
 3 pad = AES_K{TS, address, padding}          3 pad = AES_K{TS, address, padding}   } in
 4 ciphertext = plaintext ^ {pad, pad}        4 ciphertext <- SDRAM                  } parallel
 5 ciphertext -> SDRAM                        5 plaintext = ciphertext ^ {pad, pad}
 6 TS  -> time-stamp store                    6 error = CRC32(plaintext) != tag
 7 tag -> tag store                           7 plaintext, error -> cache
```

### Timing

With a 12-clock pad generator (11 clocks of AES, one round per clock, plus the
XOR):

* **Write.** The first ciphertext word leaves for the SDRAM 12 clocks after the
  cache request. The pad generator starts in clock 1, once the time stamp has
  been read. The seven remaining plaintext words are buffered while it runs.
* **Read, slow SDRAM** (the normal case). The pad is ready before the data.
  The whole line must be in before its CRC can be checked. After the last word
  come three single-clock stages: XOR, CRC, compare. The first plaintext word
  therefore reaches the cache 7 + 1 + 3 = **11 clocks after the first SDRAM
  word**. A core that decrypted with AES after the fetch would add the whole
  AES time on top of the fetch instead.
* **Read, fast SDRAM.** If the line is in before the pad, the core waits for
  the pad. The first plaintext word then comes 16 clocks after the request:
  12 clocks of pad, then XOR, CRC and compare, and one more clock to the output.

## Three configurations

Two parameters of `otp_core` trade logic, on-chip memory and read latency
against each other. The defaults give the first row of the table.

| `NUM_AES` | `CRC8_PIPELINED` | name | on-chip store (512 KB memory) | added read latency | added write latency |
|---|---|---|---|---|---|
| 1 | 0 | OTP128 + CRC32 | 32 KB TS + 64 KB tags = 96 KB (18.75 %) | 11 | 12 |
| 1 | 1 | OTP128 + CRC8 (pipelined) | 32 KB TS + 128 KB tags = 160 KB (31.25 %) | 3 | 12 |
| 2 | 0 | OTP256 + CRC32 | 96 KB, as the default | 11 | 12 |

The two parameters can also be combined.

**`NUM_AES = 2` (OTP256).** Two AES cores run side by side. Both use the
line's time stamp, but each uses the address of its own 16-byte half of the
line (`base` and `base + 16`). The 256-bit pad then has no repeated part. No
extra time stamps are needed and the timing is unchanged. The cost is a second
AES core.

**`CRC8_PIPELINED = 1`.** The tag is a CRC-8 of each 32-bit word, so each
line has eight tags, 64 bits in all. This costs twice the tag memory of a
line CRC-32. In return, a read no longer waits for the whole line:

* Each word passes through XOR, CRC-8 and compare, one clock each, as soon as
  it arrives.
* Each word reaches the cache 3 clocks after it leaves the SDRAM. If the SDRAM
  is faster than the pad generator, the first word comes 15 clocks after the
  request instead.
* Each word carries its own `cache_rerr`. A changed word is flagged on its own;
  a relocated or replayed line is flagged word by word.
* The read data beats follow the SDRAM beats. They are consecutive only if the
  SDRAM's beats are.

The price is a weaker check: a modified word passes with probability 2^-8
instead of 2^-32.

## Blocks

| module | role |
|---|---|
| `otp_core` | top: the blocks below wired together, per the configuration parameters |
| `otp_control` | request sequencing, time-stamp increment, XOR, CRC compare, clear sweep, cache and SDRAM ports |
| `aes128_encrypt` | iterative AES-128 encryptor (FIPS-197), one round per clock, round keys expanded on the fly; 11-clock latency; `NUM_AES` copies |
| `crc32_line` | CRC-32 of a 256-bit line in one registered clock (default tag unit) |
| `crc8_word` | CRC-8 (generator 0x07) of a 32-bit word in one registered clock (tag unit when `CRC8_PIPELINED = 1`) |
| `ts_memory` | 8192 x 32-bit time stamps, one per read-write line (32 KB) |
| `crc_memory` | 16384 tags, one per line: 32 bits (64 KB), or 64 bits with `CRC8_PIPELINED` (128 KB) |
| `otp_pkg` | widths, types, GF(2^8) helpers and the S-box, computed at elaboration |

In general, the on-chip stores hold:

```
time stamps = (read-write bytes / 32) * 32 bits
tags        = (total bytes / 32)      * 32 bits    (64 bits with CRC8_PIPELINED)
```

The S-box ROM is not a data file. `otp_pkg::sbox_table()` builds it from the
GF(2^8) inverse, using power and log tables of the generator 3, followed by the
AES affine map.

## Ports and handshakes

All signals are synchronous to `clk`. `rst_n` is a synchronous, active-low reset.

**Cache side (32-bit).**
* A request is taken in a clock where `cache_req_valid && cache_req_ready`.
  `cache_req_addr` is a byte address. Its low five bits are ignored.
* **Write.** Word 0 of the line comes with the request on `cache_wdata`. Words
  1 to 7 follow in order, one per clock in which `cache_wvalid` is high.
  `cache_wdone` pulses when the line is in SDRAM and its tag is stored.
* **Read.** Eight words come back in order with `cache_rvalid`. With the line
  CRC they come on eight consecutive clocks, and `cache_rerr` is high on all
  eight if the check failed. With word CRCs, `cache_rerr` marks each failing
  word. `integrity_alarm` pulses once per line, with the first flagged word. The decrypted data is
  delivered even then. Deciding what to do with a failed check is left to the
  system.
* `cache_req_ready` is low while a line is in progress. It is also low for
  `MEM_BYTES/32` clocks after reset, while the core clears both stores. After
  the clear, a line that was never written fails its check.

**SDRAM side (32-bit)**, which an SDRAM controller must provide:
* `mem_req_valid/ready/we/addr` carry one line request. The address is
  32-byte aligned.
* **Write.** Ciphertext word 0 travels with the request. Words 1 to 7 follow
  with `mem_wvalid`, and the controller must accept one whenever it is offered.
* **Read.** The controller returns eight words with `mem_rvalid`. Gaps between
  them are allowed.

**Key.** `aes_key` is a plain 128-bit input. Where the key is stored and how it
is loaded is left to the system.

**Parameters of `otp_core`.**
* `MEM_BYTES` (524288) and `RO_BYTES` (262144) must be powers of two, with
  `RO_BYTES < MEM_BYTES`.
* `PAD_VALUE` is the 64-bit constant that fills the AES block. It is public and
  does not affect security.
* `NUM_AES` (1 or 2) and `CRC8_PIPELINED` (0 or 1) select the configuration,
  as described above.

## Departures and choices to be aware of

* The pad generator, CRC unit, RAM organisation, handshakes and clear sweep are
  this design's own. The algorithms, sizes, pad layout and cycle counts follow
  the reference system, a soft processor with 256-bit cache lines on a 32-bit
  SDRAM bus.
* CRC generators: the standard CRC-32 (0x04C11DB7, reflected, init and final
  XOR 0xFFFFFFFF), and CRC-8 with generator 0x07, init 0. Byte *k* is
  `line[8k +: 8]`.
* The AES core computes one full round per clock. It has twenty S-box ROMs,
  5 KB in all: sixteen for the state and four for the key schedule. The
  reference implementation's S-box memory was about half that, so its core was
  probably organised differently, for example with a narrower datapath. The
  11-clock latency, which fits the reference system's 12-clock pad time, was
  kept.
* Writes to the read-only region are accepted with TS = 0, so that code can be
  loaded. A second write to the same read-only line reuses its pad.
* Time stamps are 32 bits and wrap without warning.
* The SDRAM request goes out one clock after the cache request, because the
  request is registered.
* The on-chip stores are single-port RAMs with a one-clock read. On an FPGA they
  map onto block RAM. They have no reset of their own: the clear sweep
  initialises them.

## Simulating

Each testbench is self-checking and ends with `TB_RESULT checks=N failures=M`.
With verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/otp_pkg.sv \
          tb/tb_otp_core.sv --top-module tb_otp_core
./obj_dir/Vtb_otp_core
```

| testbench | what it shows |
|---|---|
| `tb_aes128_encrypt` | FIPS-197 and SP 800-38A known answers, 11-clock latency, restart |
| `tb_crc32_line` | agreement with a bit-serial reference written in the opposite bit order; CRC of 32 zero bytes = 0x190A55AD |
| `tb_ts_memory`, `tb_crc_memory` | random write/read against a shadow copy at full depth; read-before-write |
| `tb_otp_control` | the sequencer with a stand-in pad generator whose pads the bench can predict: exact ciphertext, stored time stamps and tags, 12/11-clock latencies, waiting for a late pad, all three attacks |
| `tb_crc8_word` | agreement with a polynomial long division; CRC-8 of "1234" = 0xC2 |
| `tb_otp_core` | whole core at its full default size against a behavioural SDRAM (`tb/sdram_model.sv`): ciphertext checked against a second AES instance, attacks, random traffic with random SDRAM latency, and a count of every mechanism |
| `tb_otp_core_pipelined` | the same for `CRC8_PIPELINED = 1`: 3-clock per-word latency, a single changed word flagged on its own |
| `tb_otp_core_otp256` | the same for `NUM_AES = 2`: separate pads for the two halves of a line |

`tb/sdram_model.sv` models an SDRAM and its controller. Its read latency can be
set at run time. Testbenches reach into its `words` array to act as the
attacker.
