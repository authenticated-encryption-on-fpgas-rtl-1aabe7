# AES-based authenticated encryption cores for FPGAs

Authenticated encryption keeps data secret and proves it has not been
changed. This library has seven SystemVerilog cores for it, built for
two very different places on an FPGA:

* **Reconfigurable fabric, high speed.** Used for network links such as
  VPN gateways at tens of Gbit/s. There are three AES-GCM cores and one
  AEGIS-128 core that take a 128-bit block (or four) every clock.
* **Static, non-reprogrammable logic, low cost.** Used to decrypt and
  check a configuration bitstream before it is loaded. There are three
  small cores, for AES-CCM, AES-GCM and AEGIS-128, built around one
  32-bit AES datapath. They spend tens of clocks per block and give a
  `tag_ok` flag that a configuration controller can act on.

All cores use 128-bit keys and 128-bit blocks. Their interfaces follow
one pattern, so once one core is understood the others are easy to use.

## Common stream interface

* **Starting a message.** Pulse `start` for one clock. At the same time
  put the message's settings on the inputs: IV, block counts (`n_aad` or
  `n_hdr`, and `n_data`), `decrypt`, and where present `key` and
  `tag_in`. The core latches them and raises `busy`.
* **Input blocks.** They come in order through `in_valid` / `in_ready`:
  first the associated-data blocks, then the text blocks. A block is
  taken in a clock when both are high. `in_ready` never depends on
  `in_valid`.
* **Output blocks.** Each ciphertext or plaintext block appears on
  `out_block` for one clock, marked by `out_valid`. There is no output
  back-pressure.
* **The tag.** The 128-bit tag appears on `tag` for one clock with
  `tag_valid`. The compact cores also set `tag_ok = (tag == tag_in)`.
  When decrypting, a caller must throw away the released plaintext
  unless `tag_ok` is set.
* **Byte order.** Byte 0 of a block is bits [127:120]. Counts are in
  whole 128-bit blocks (512-bit groups for the 4-parallel core). Partial
  blocks and truncated tags are not supported.

Reset is asynchronous and active low (`rst_n`). Every register is reset.

## GHASH without feedback: `ghash_koa`, `koa_mul_pipe`, `aes_gcm_koa`

This is the hardest part of the library to follow.

**Why the obvious design is slow.** GCM authenticates a message with
X_i = (X_{i-1} xor C_i)·H in GF(2^128). Each step needs the previous
result. A pipelined multiplier therefore stalls: a new block can enter
only once the previous product is out.

**Removing the feedback.** The recurrence unrolls to
X_n = C_1·H^n xor C_2·H^(n-1) xor … xor C_n·H. Every term is
independent of the others.

**The power memory.** `ghash_koa` keeps H in a register and H^2 … H^64 in
a memory. It fills the memory after a key change by feeding the
multiplier's output back to its input: 63 products, 4 clocks each, 252
clocks in all. A 6-bit counter addresses the memory. It counts up while
filling and counts down from n while hashing.

**Hashing a packet.** Each arriving block is paired with its own power
of H. The products stream through the multiplier and are XORed into an
accumulator. A packet of n ≤ 64 blocks takes one block per clock. Its
result is valid 5 clock cycles after the cycle of the last block:
4 multiplier stages plus the accumulator register.

**The multiplier.** `koa_mul_pipe` is a two-level Karatsuba–Ofman
multiplier. The first level splits the operands into 64-bit halves, the
second into 32-bit quarters. This needs nine 32×32 carry-less products
instead of sixteen. The four pipeline stages are:

1. pre-additions (XORs);
2. the nine products;
3. Karatsuba recombination into a 255-bit product;
4. reduction modulo x^128 + x^7 + x^2 + x + 1.

GCM's reflected bit order is handled by reversing bits at the edges.

**The full GCM core.** `aes_gcm_koa` adds a pipelined AES with a
run-time key schedule (`aes_key_sched`, 11 clocks). The same pipeline
computes H = E(K, 0) and then the counter keystream. A key change takes
about 280 clocks, needs no rebuild, and `ready` shows when it is done.

Message limits: a message holds at most 63 blocks, because the length
block also goes through GHASH. The tag waits until E(K, CTR0) has left
the pipeline, so empty messages are handled correctly.

## Key-synthesized GCM: `aes_gcm_ks`, `aes_gcm_par4_ks`

**The idea.** When the key changes rarely (a VPN link, for example), the
key can be a synthesis parameter. All eleven AES round keys and H are then
constants. These are computed at elaboration by functions in `aes_pkg`.

* The AES pipeline (`aes128_pipe_ks`) XORs constants, which removes the
  round-key registers.
* The GHASH multiplier (`gf128_mul_fixed`) is a constant-operand
  multiplier: the product is an XOR of the rows T[i] = H·x^i selected by
  the bits of the other operand.
* Because this multiplier is combinational, GHASH keeps its feedback and
  still takes one block per clock.

**The 4-parallel core.** `aes_gcm_par4_ks` reaches 512 bits per clock:
four AES pipelines on consecutive counters, and `ghash_par4_fixed` with
the constant operands H^4, H^3, H^2 and H. This works because
X_{i+4} = (X_i xor C_1)·H^4 xor C_2·H^3 xor C_3·H^2 xor C_4·H. The final
length block goes alone on the last lane.

**Key changes.** A new key means rebuilding with a new `KEY` parameter.
The default key is 000102…0f, so H = c6a13b37878f5b826f4f8162a1c8d879.

## AEGIS-128: `aegis128_fast`, `aegis128_lc`

**The cipher.** AEGIS-128 has a 640-bit state of five words. One update
applies five AES rounds in parallel, each keyed by a neighbouring word,
and absorbs one message block.

**Schedule.** The same in both cores:

* initialization: 10 updates, with message blocks K, K xor IV, …;
* one update per text block;
* finalization: 7 updates, with S3 xor (len(AD) ‖ len(M)) as 64-bit
  little-endian bit counts.

The tag is S0 xor S1 xor S2 xor S3 xor S4. Associated data is not
supported.

**Fast core.** `aegis128_fast` has five `aes_round` instances and does
one update per clock.

**Compact core.** `aegis128_lc` has one quarter round: four S-boxes and
one MixColumns.

* It updates one 32-bit column per clock, the words in the order S4, S3,
  S2, S1, S0, each in place. When word j is written, its source word j−1
  is still old.
* S0's source is the old S4, so a 128-bit register keeps a copy of it.
* One update takes 20 clocks. The next update starts in the clock that
  writes the last column of the previous one.
* Totals: initialization 200 clocks, 20 clocks per block, finalization
  140 clocks.

## Compact AES and the low-cost modes

**The AES.** `aes128_quarter` is AES-128 on a 32-bit datapath with four
S-boxes. These S-boxes are shared between the key schedule and the data:

* each round spends one clock on the next round key and four clocks on
  the four State columns;
* 5 clocks per round, 50 per block, plus one loading clock.

**The multiplier.** `gf128_mul_hybrid` multiplies in 32 clocks, 4 bits
per clock, and fits inside the AES block time.

**The low-cost modes.**

* `aes_gcm_lc` hashes each ciphertext block while the AES works on the
  next counter. A block costs 51 clocks, and nothing is stored.
* `aes_ccm_lc` is not online, because its MAC covers the plaintext and
  only one AES is available. It keeps the plaintext in a block memory
  (`MEM_DEPTH` = 64 blocks by default). Each text block costs two AES
  operations: one for CTR and one for CBC-MAC.
  * Decrypt: CTR, store the plaintext, then CBC-MAC over the stored
    blocks.
  * Encrypt: CBC-MAC while storing, then CTR.
  * The caller formats B0 and the associated data into header blocks and
    supplies the counter block A0 (`ctr0`).

## Where this RTL departs from the description it follows

* **AEGIS finalization** uses 7 updates, as the AEGIS-128 definition
  requires. The original description counts 6 updates: 6 clocks for the
  fast core, 120 clocks for the compact one. This design takes 7 and 140.
* **`aes128_quarter`** needs one loading clock before its 50 round
  clocks. So `aes_gcm_lc` takes 51 clocks per block, not 50.
* **S-boxes** are LUTs only. The BRAM and composite-field variants were
  alternatives in the evaluation and are not included.
* **CCM memory depth** (64 blocks) is this design's choice. A whole
  bitstream of several MB would need a far larger memory or an external
  one.
* **Not built:** the parts around the cores. These are the external
  non-volatile memory, the FPGA configuration memory, the vendor's
  bitstream decryptor, and the key-exchange protocol run by servers.

## Files

* `rtl/aes_pkg.sv` holds the shared types and the elaboration-time
  functions: S-box generation, key expansion, GF(2^128) products, and
  the AEGIS constants. It must be compiled first.
* `rtl/ae_top.sv` places all seven cores side by side. Their ports carry
  the prefixes `ks_`, `p4_`, `koa_`, `ag_`, `ccm_`, `gcm_` and `agl_`.
* Every module has its own self-checking testbench, `tb/tb_<module>.sv`.
  Each one prints `TB_RESULT checks=… failures=…`.
* The testbenches use `tb/ae_ref_pkg.sv`, a set of independent reference
  models: byte-wise AES, schoolbook GF(2^128) products, and GCM, CCM and
  AEGIS-128 written from their definitions.
* Published test vectors are checked as well: FIPS-197 and the GCM
  specification's test cases 2 and 3.

To simulate one block with Verilator:

    verilator --binary --timing -Wno-fatal --top-module tb_aes_gcm_koa \
        rtl/aes_pkg.sv $(ls rtl/*.sv | grep -v aes_pkg) \
        tb/ae_ref_pkg.sv tb/tb_aes_gcm_koa.sv
    ./obj_dir/Vtb_aes_gcm_koa

The package must come first; every other RTL file can be given in any
order, since unused modules cost nothing. The top-level test,
`tb/tb_ae_top.sv`, takes a few minutes to compile.

`tb/tb_ae_top.sv` runs every core end to end at the default sizes. It
counts each mechanism (streaming, 512-bit groups, key set-up and key
change, decryption, back-pressure, input gaps, accepted and rejected
tags, CCM storage) and fails if any of them never happened.
