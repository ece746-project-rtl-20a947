# AES-128 counter mode as a stream cipher

This design turns the AES-128 block cipher into a stream cipher. It encrypts
a sequence of counter blocks IS_1 = IV, IS_2 = IV + 1, ... and XORs the
resulting keystream with the data, a few bits per clock. Counter mode suits
this for two reasons. Encryption and decryption are the same circuit (an XOR
with the same keystream). And the next cipher input never depends on a cipher
output, so the AES core can run ahead of the data, be pipelined, or be folded
into a narrow datapath without feedback stalls. Feedback modes such as OFB and
CFB have to wait for each block before starting the next, and ECB needs a
separate decryption circuit, so this design has neither.

The outside of the cipher is an eSTREAM-style handshake: the key and the IV
are programmed over a `key_iv` bus, and data then streams through
`data_in`/`data_out`. Inside, the AES engine can be chosen by parameter:

| `ARCH`           | datapath | AES S-boxes | clocks per 128-bit block | round keys |
|------------------|----------|-------------|--------------------------|------------|
| `ARCH_ITERATIVE` (default) | 128 bit, one round per clock | 16 | 11 | on the fly (default) or 11 x 128-bit memory |
| `ARCH_PIPELINED` | 10 unrolled rounds, register per round | 160 | 1 (latency 11) | 11 x 128-bit memory |
| `ARCH_COMPACT`, `COMPACT_W` = 64 / 32 / 8 | 64 / 32 / 8 bit | 8 / 4 / 1 | 21 / 41 / 321 | on the fly |

The key schedule adds four S-boxes to each core. Every S-box can be a
256-entry lookup table (`SBOX_LUT`, the default) or pure logic
(`SBOX_LOGIC`).

## Using the cipher

Ports of the top module `aes_ctr_stream`. They keep the eSTREAM interface
names. All are synchronous to `clk`, and `reset` is synchronous and
active-high.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `reset` | in | 1 | clock, synchronous active-high reset |
| `key_iv_ready` | out | 1 | 1 while the cipher accepts key and IV words |
| `key_iv_write` | in | 1 | `key_iv` holds a word this clock |
| `key_iv` | in | `K_W` (32) | key words, then IV words, most significant first |
| `data_in_ready` | out | 1 | keystream is available; data may be sent |
| `data_in_write` | in | 1 | `data_in` holds a word this clock |
| `data_in` | in | `D_W` (32) | plaintext (encrypt) or ciphertext (decrypt) |
| `write` | out | 1 | `data_out` is valid |
| `data_out` | out | `D_W` (32) | `data_in` XOR keystream, one clock after `data_in` |

A session works like this:

1. After reset `key_iv_ready` is 1. Send 128/`K_W` key words and then
   128/`K_W` IV words, one per clock with `key_iv_write` = 1. Gaps are
   allowed. `key_iv_ready` falls in the clock after the last IV word, and
   from then on the loader ignores `key_iv`.
2. The cipher sets itself up. It loads the key (expanding the round key
   memory when that is used), loads the counter with the IV and encrypts the
   first counter block. `data_in_ready` rises 15 clocks after the last
   key/IV word with the default configuration. That is 25 clocks with the
   key memory or the pipelined core, 45 with the 32-bit compact core and 325
   with the 8-bit one.
3. Each clock in which both `data_in_ready` and `data_in_write` are 1, one
   `D_W`-bit word is consumed. Its XOR with the next keystream bits appears
   on `data_out` with `write` = 1 in the next clock. Within a 128-bit
   keystream block, the most significant bits (AES byte 0) are used first.
4. Only send while `data_in_ready` is 1. An assertion flags a write without
   it. `data_in_ready` falls whenever the buffered keystream runs out. With
   the default 32-bit bus the iterative core makes 128 bits per 11 clocks,
   so a sender that never pauses is held to about 11.6 bits per clock.

To decrypt, load the same key and IV and feed the ciphertext. The only way
to re-key is a reset.

The counter is a full 128-bit number incremented by one per block, wrapping
at 2^128. Keys, IVs and blocks follow the FIPS-197 byte order: byte 0 is in
bits [127:120]. With key `2b7e151628aed2a6abf7158809cf4f3c` and IV
`f0f1f2f3f4f5f6f7f8f9fafbfcfdfeff`, the first ciphertext block of the
plaintext `6bc1bee22e409f96e93d7e117393172a` is
`874d6191b620e3261bef6864990db6ce`. This is the NIST SP 800-38A CTR example,
which the end-to-end test checks.

## How the keystream is kept flowing

The top has three parts. The **key/IV loader** (`keyiv_loader`) collects the
key and IV. The **counter** (`ctr_counter`) holds IS_i. The **keystream
buffer** (`keystream_buffer`) is a small queue of finished keystream blocks
(`KS_DEPTH`, default 2) that holds the data XOR and the output register.

The logic that issues counter blocks uses credits. It starts a block only if
the buffer will have a free slot for its result, counting blocks that are
still inside the core (`free > inflight`). As a result the core never
produces a block it cannot store. With double buffering, the iterative core
computes the next block while the current one is being used. At
`D_W` = 8 (16 clocks per block on the bus, 11 in the core) the stream never
stalls. At `D_W` = 32 it stalls once per block when the sender never pauses.
The pipelined core returns a result 11 clocks after issue, so it needs
`KS_DEPTH` >= 14 to keep 128 bits per clock flowing.

## The AES engines

The AES algorithm is the standard FIPS-197 AES-128. The package `aes_pkg`
holds the linear parts (xtime, ShiftRows, MixColumns, RotWord) and the
shared types.

* **`aes_round`** is one full-width round: 16 S-boxes, ShiftRows, MixColumns
  (skipped when `final_round`) and AddRoundKey. It is combinational.
* **`aes_enc_iter`** uses one `aes_round` for all ten rounds. The initial
  AddRoundKey happens in the start cycle, then one round per clock.
  `done` comes 11 clocks after the start cycle, and the next block may start
  in the `done` cycle.
* **`aes_enc_pipe`** unrolls the ten rounds, with a register after the
  initial AddRoundKey and after each round. It takes one block per clock and
  gives its result 11 clocks later, with no back-pressure. It needs all
  eleven round keys in every clock, so it always uses the key memory.
* **`aes_enc_compact`** folds each round over several clocks through a W-bit
  slice:
  * W = 32: one column per clock (4 S-boxes and one MixColumn).
  * W = 64: two columns per clock.
  * W = 8: one S-box. For each column, four clocks substitute its bytes into
    a 32-bit column buffer. Four more clocks compute the MixColumns result
    one byte at a time.

  The trick that avoids a second state register: SubBytes is byte-wise, so
  it commutes with ShiftRows. The state register is therefore kept
  *pre-shifted*. ShiftRows is applied as wiring when a block is loaded and
  at the end of every round, and each column is then updated in place.

Round keys come from one of two modules:

* **`aes_key_otf`** (on the fly) keeps only the cipher key and the current
  round key. It steps to the next round key in the clock each round runs,
  and rewinds to the cipher key for the next block. That is 264 flip-flops,
  plus 4 key-schedule S-boxes.
* **`aes_key_mem`** expands the key once into an 11 x 128-bit memory, one
  round key per clock. It is ready 11 clocks after the load cycle, and is
  read by round index (asynchronously) or all at once.

Both use `aes_key_step`, one key-expansion step.

S-boxes come from `aes_sbox`, a wrapper that picks one of two variants:

* **`aes_sbox_lut`** is a 256 x 8 ROM. Its contents are computed at
  elaboration by a constant function, not typed in.
* **`aes_sbox_logic`** computes the S-box without a table. It takes the
  GF(2^8) inverse as x^254, using an addition chain of four general
  multipliers and eight squarings:
  x^2, x^3 = x^2·x, x^12 = (x^3)^4, x^15 = x^12·x^3, x^240 = (x^15)^16,
  x^252 = x^240·x^12, x^254 = x^252·x^2. The AES affine map follows
  (b XOR rotl(b,1..4) XOR 0x63). The lookup table holds the same mapping.

## Where this design makes its own choices

These points are not fixed by the specification this design implements:

* Bus widths. `K_W` = 32 and `D_W` = 32 are defaults chosen here. Each must
  divide 128.
* The handshake. A word moves in every clock with `*_write` = 1. `data_out`
  follows one clock after `data_in`. `data_in_ready` is "keystream
  available", so it also signals stalls. Re-keying needs a reset.
* The counter is a full 128-bit increment, not the 32-bit block counter
  layout of RFC 3686.
* Timing and structure of the cores: 11 clocks per block in the iterative
  core, one pipeline stage per round, and the folding scheme and latencies of
  the compact core.
* The logic S-box is an exponentiation-based inverter. A composite-field
  GF((2^4)^2) inverter is smaller and would be the usual choice for area.
  Both give the same mapping.
* The on-the-fly key generator steps a full 128-bit round key once per round.
  It does not share S-boxes with the datapath, including in the compact core.
* The keystream buffer and its credit-based issue control.

## Known gaps

* The pipelined versions of the compact cores are not built. Those versions
  have pipeline registers inside the logic S-box. All S-boxes here are
  combinational.
* The pipelined 128-bit core always uses the key memory. A per-stage
  on-the-fly key schedule is not built.
* No FPGA results (slices, clock rate, throughput per slice) come with this
  RTL.

## Files

`rtl/` holds one module or package per file. The top is `aes_ctr_stream.sv`.
`tb/` holds a self-checking testbench per module. `tb/aes_ref_pkg.sv` is an
independent behavioural AES model: it finds the S-box by searching for the
inverse and uses byte arrays. Expected values come from this model and from
the published FIPS-197 (Appendix B, C.1) and NIST SP 800-38A (F.5.1) vectors.

* `tb_aes_ctr_stream` runs the whole cipher at its default parameters. It
  runs the SP 800-38A example, a measurement of the sustained rate, and a
  random stream with random pauses. It checks that a stall, a full keystream
  buffer and a counter carry each occur at least once.
* `tb_aes_ctr_stream_variants` runs the same test on the pipelined core, on
  the key memory with logic S-boxes, on other bus widths, and on the compact
  core at W = 8, 32 and 64.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

To simulate with Verilator (5.x), for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_ctr_stream.sv \
  --top-module tb_aes_ctr_stream -o sim && ./obj_dir/sim
```

Replace the testbench name to run another one. To lint a module:
`verilator --lint-only -Wall -Irtl -y rtl rtl/aes_pkg.sv rtl/<module>.sv`.
The only lint warning left is the unused package constant `NRK` in modules
that do not use it.
