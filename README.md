# Post-quantum secure boot: an XMSS signature verification unit

A secure boot chain is only as strong as the signature scheme that checks
each stage. RSA and elliptic-curve signatures fall to a large quantum
computer. Hash-based signatures do not: their security rests on SHA-256
alone. This RTL is a **signature verification unit (SVU)** that checks boot
images with **XMSS** (the eXtended Merkle Signature Scheme, RFC 8391). It is
written entirely as hardware, so no software sits between power-on and the
first verified instruction.

At reset the SVU holds the cores. It reads the zero-stage image from
memory over AXI and verifies its XMSS signature against a public key that
comes from one-time-programmable memory. Only then does it let the cores
run. Each verified stage carries the public key for the next stage. Boot
software asks the SVU, through AXI4-Lite registers, to check that next
stage. A failure either aborts the cores or raises an interrupt.

The default parameter set is **XMSS-SHA2_10_256**:

- n = 32-byte hashes
- Winternitz parameter w = 16 (4-bit digits)
- l = 67 hash chains (64 message digits and 3 checksum digits)
- Merkle tree height h = 10

A signature check takes about 26,000 to 28,000 clock cycles with the
default 8 parallel chain engines. That is about 0.27 ms at 100 MHz.

## How an XMSS signature is checked

A signed message is laid out as

    sm = idx (4 B) || R (32 B) || sig (67 x 32 B) || auth (10 x 32 B) || message

and the public key is `root (32 B) || seed (32 B)`. Verification recomputes
the Merkle root from the signature and compares it with `root`:

1. **Message digest.** The unit computes
   `D = SHA-256(toByte(2,32) || R || root || toByte(idx,32) || message)`.
   The 64 nibbles of D are digits `d[0..63]`. The checksum `sum(15 - d[i])`
   fits in 12 bits and supplies three more digits, `d[64..66]`.
2. **WOTS public key.** Signature component `sig[i]` is chain `i`, already
   walked `d[i]` steps from a secret start value. Each component is walked
   the remaining `15 - d[i]` steps with the chain function F. The end points
   are the 67 components of the one-time public key. This step is about 500
   F calls in total.
3. **L-tree.** The 67 components are hashed pairwise with the tree function
   H, level by level (67, 34, 17, 9, 5, 3, 2, 1 nodes). An odd last node
   moves up unchanged. The result is one leaf of the Merkle tree (66 H
   calls).
4. **Merkle root.** The leaf is hashed with `auth[0..9]` up the 10 levels
   of the tree. Bit k of `idx` decides whether the node is the left or the
   right child at height k.

F and H are keyed and masked. Every call first derives a key and one or two
bitmasks with `PRF(seed, ADRS) = SHA-256(toByte(3,32) || seed || ADRS)`.
ADRS is a 32-byte address. It says where in the structure the call sits:
leaf, chain and step for F; tree level and index for H.

## The hash economy: why a call costs 4 or 6 compressions

Everything reduces to the SHA-256 compression function, one 512-bit block
per call. A PRF message is 96 bytes, two blocks after padding. Its first
block, `toByte(3,32) || seed`, is the same for the whole verification. The
verifier compresses that block once at the start and keeps the chaining
value as `seed_state`. After that, every PRF costs a single compression.
The remaining block cost follows:

| function | PRF calls | message blocks | compressions |
|----------|-----------|----------------|--------------|
| F (`thash_f`) | key, mask | `toByte(0,32) \|\| KEY`, `(x ^ BM) \|\| padding` | 4 (instead of 6) |
| H (`thash_h`) | key, 2 masks | `toByte(1,32) \|\| KEY`, `(L ^ BM0) \|\| (R ^ BM1)`, padding | 6 (instead of 9) |

Because the padding blocks have fixed lengths (768 and 1024 bits), they are
constants in `xmss_pkg`.

## Architecture

```
                 AXI4-Lite                          AXI4 read
                     |                                 ^
               +-----v-----+     +----------------+    |
  otp_pk ----->|   boot    |---->|   svu_dma      |----+
               | sequencer |     +-------+--------+
  core_run <---|           |             | 32-bit words
  boot_abort<--|           |     +-------v--------+
  irq <--------+-----^-----+     |   sm_loader    | idx, R, sig, auth, message, next key
                     |           +-------+--------+
                     |                   |
               +-----+-------------------v--------------------------------+
               | xmss_verify                                              |
               |  shared sha256_core <- seed precompute / message_digest  |
               |                        / ltree / merkle_root             |
               |  sig buffer -> wots_pk_from_sig (M x build_wots_chain,   |
               |                each with thash_f + its own sha256_core)  |
               |            -> pk BRAM (dual port) -> ltree -> merkle_root|
               +----------------------------------------------------------+
```

### SHA-256 kernels

`sha256_core` is a compression-only kernel that does two rounds per clock.
It slides a 16-word message-schedule window and produces two new schedule
words per cycle. A call takes 34 cycles from the start pulse to the done
pulse. The result stays on the output until the next start.

The design has M + 1 kernels:

- **One shared kernel.** The seed precompute, the message digest, the
  L-tree and the Merkle-root unit use it one after another. `xmss_verify`
  switches its request port by phase.
- **One kernel per chain engine.** The chain walk is the only step worth
  parallelising, so each engine has its own.

### Chain engines and dispatcher

`build_wots_chain` walks one chain. It is loaded with `(sig_i, d_i, i)`,
applies `thash_f` with hash addresses `d_i .. 14`, and reports
`(pk_i, i)`. A digit of 15 needs no step.

`wots_pk_from_sig` reads the signature buffer and hands the 67 chains, in
index order, to the lowest free engine. Chains end in a data-dependent
order. A finished result waits in its engine until the collector writes it
to the public-key BRAM at address `i`. The collector writes one result per
cycle, lowest engine first. An engine takes new work only after its result
has been written. The WOTS step ends when all 67 components are in the
BRAM.

### L-tree in place

`ltree` keeps the whole tree inside the 67-entry dual-port BRAM:

- Siblings `2i` and `2i+1` are read through ports A and B in the same cycle.
- The parent is written back to address `i`.
- An odd last node is copied to address `floor(len/2)`.
- The next level then uses the first `ceil(len/2)` entries.

No second buffer is needed.

### Merkle root and the result

`merkle_root` reads `auth[k]` from its own buffer and orders the two
children by bit k of the leaf index. The tree index at height k is
`idx >> (k+1)`.

`xmss_verify` compares the result with the public root and reports `valid`
and `computed_root`.

### The SVU around the verifier

- **`svu_dma`** issues INCR bursts of 32-bit beats. A burst is at most 16
  beats and never crosses a 64-byte boundary. Only one burst is outstanding
  at a time. The R channel is passed straight through as a word stream, so
  back-pressure from the verifier becomes RREADY low.
- **`sm_loader`** unpacks the stream. It latches `idx` and `R` and then
  starts the verifier, which can precompute and hash the fixed part of the
  digest input while the signature is still arriving. It gathers eight
  words into each 256-bit signature or auth-path node. It forwards the
  message words and keeps the last 64 message bytes as the next stage's
  key.
- **`boot_sequencer`** reads a 4-byte header (the message length), then the
  2500 + length bytes of sm, and waits for the verifier. It counts the
  cycles from the verifier's start to its result.
- **`svu_regs`** is the AXI4-Lite register file.

| offset | register | access |
|--------|----------|--------|
| 0x00 | CTRL: bit 0 start (self-clearing), bit 1 abort on failure | W / RW |
| 0x04 | STATUS: busy, done, pass, aborted, stages verified [15:8] | R |
| 0x08 | IMG_ADDR: image address of the next stage | RW |
| 0x0C | CYCLES: verifier cycles of the last check | R |
| 0x20-0x3C | ROOT: computed root, most significant word first | R |

### Boot stage image

Images must be word-aligned in memory. Each image is laid out as follows:

    length (4 B, big-endian) || idx (4 B, big-endian) || R || sig || auth || message
    message = payload ... || next_root (32 B) || next_seed (32 B)

The zero-stage image sits at the parameter `ZSBL_IMG_ADDR` and is checked
with the OTP key. Its failure always aborts the cores. A later failure
aborts the cores when CTRL bit 1 is set. Otherwise it raises `irq` and
leaves the decision to low-level software. After an abort the unit takes
no further request until reset.

## Timing

These are the cycle counts measured in simulation. The reference column
gives the counts published for the original FPGA implementation, which
used a 41-cycle SHA-256 call.

| step | this RTL | reference |
|------|----------|-----------|
| one SHA-256 compression | 34 | 41 |
| WOTS public key, 1 engine | 83,928 | 129,851 |
| WOTS public key, 3 engines | 28,129 | (2: 71,523; 4: 42,807) |
| L-tree (66 H calls) | 14,215 | 26,665 |
| Merkle root (10 H calls) | 2,153 | 4,753 |
| full verification, 8 engines | 26,000-28,000 | 51,725 |

The WOTS and total counts depend on the digits of the digest, and so on
the message. The totals count from the verifier's start to its result and
exclude the DMA transfer. The published FPGA resource numbers (LUTs and
flip-flops on a Kintex-7) have not been reproduced.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `svu_top`, `xmss_verify`, `wots_pk_from_sig` | `M` | 8 | parallel chain engines (1, 2 and 4 were also evaluated) |
| `svu_top` | `NCORES` | 2 | width of `core_run` |
| `svu_top`, `boot_sequencer` | `ZSBL_IMG_ADDR` | `32'h0001_0000` | address of the zero-stage image |
| `xmss_pkg` | `LEN`, `TREE_H`, ... | 67, 10 | XMSS-SHA2_10_256 |

Only M and the addresses are meant to be changed. The hash size, w and l
are fixed by `xmss_pkg` and by the buffer and digit widths.

## Where this RTL departs from the published design, or fills gaps

- **SHA-256 kernel.** This kernel is faster than the published one (two
  rounds per cycle), so every step finishes in fewer cycles than quoted.
- **Authentication path.** The path is taken as 10 nodes of 32 bytes, the
  size XMSS needs. The published layout of sm gives it as 10 bytes, which
  cannot hold the tree.
- **Digest prefix.** The prefix of the message digest is `toByte(2,32)`,
  as in RFC 8391.
- **Interfaces chosen here.** The image format, the register map, the DMA
  burst policy, the word stream and the abort/interrupt choice are this
  design's own.
- **Fault countermeasures.** Redundancy in space and time against
  fault-injection bypass is mentioned for the original design but not
  described. It is not implemented: a single glitch on `valid` or
  `core_run` is not detected.
- **Platform.** The SoC around the SVU is not included: RISC-V cores,
  TileLink and AXI fabrics, MPU with AES-GCM, key management unit with
  OTP, PUF and TRNG, boot ROM, memory controller and peripherals. The SVU
  brings out its AXI ports, the OTP key inputs and the core controls.
- **No interoperability test.** The hash addressing and the domain
  prefixes follow RFC 8391. They have been checked only against the
  behavioural model in `tb/xmss_ref_pkg.sv`, written independently of the
  RTL from the same standard, and not against official XMSS test vectors.

## Files

`rtl/` holds one module or package per file:

- `xmss_pkg.sv`: constants, types, padding, ADRS and round constants
- `sha256_core.sv`
- `thash_f.sv`, `thash_h.sv`
- `message_digest.sv`, `wots_checksum.sv`
- `build_wots_chain.sv`, `wots_pk_from_sig.sv`
- `dp_bram.sv`, `sdp_ram.sv`
- `ltree.sv`, `merkle_root.sv`
- `xmss_verify.sv`
- `svu_dma.sv`, `sm_loader.sv`, `svu_regs.sv`, `boot_sequencer.sv`
- `svu_top.sv`

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`.
The one exception is `sm_loader`, which is tested through `tb_svu_top`.
There are also two shared files:

- `xmss_ref_pkg.sv` is a behavioural SHA-256 and XMSS model. It generates
  keys and signatures from random secret values, so no test vectors are
  stored.
- `axi_mem_model.sv` is a sparse AXI4 read memory with random stalls.

Each testbench prints `TB_RESULT checks=N failures=F` and stops itself with
a watchdog. `tb_svu_top` runs the whole unit at its default parameters. It
boots a three-stage chain, fails a tampered stage with and without abort,
and boots again with a wrong OTP key.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/xmss_pkg.sv tb/xmss_ref_pkg.sv tb/tb_svu_top.sv --top-module tb_svu_top
./obj_dir/Vtb_svu_top
```

Replace `tb_svu_top` with any other testbench name. Verilator finds the
remaining modules through `-I`. The build gives no warnings. Building
`tb_svu_top` takes about two minutes, and the simulation itself then runs
in under a second. It prints the cycle count of each verification and
ends with `TB_RESULT checks=21 failures=0`.
