# Pipelined AES-128 encryption core with a split SOP/ROM S-box

This is a fully unrolled AES-128 encryption core that takes one 128-bit block
per clock. Each of the ten rounds has its own hardware, and a register sits
after every round. The key schedule is unrolled the same way, so every block
can use a different key.

What sets it apart is the S-box, the 8-bit substitution table that AES applies
to every state byte. It uses 200 of them: 16 per round and 4 per key-expansion
step. This S-box is not one 256-entry lookup table. It is built from sixteen
small sub-blocks, each covering sixteen consecutive input values. In each
sub-block:

- four 4-input sum-of-products (SOP) functions make the upper output nibble;
- a 16 x 4-bit ROM makes the lower output nibble.

The idea behind the split is that small tables map well to memory and wider
functions map well to logic. A 16:1 multiplexer then picks the right
sub-block's result.

## The S-box (`sbox_subblock`, `sbox8`)

```
            din[3:0] ──┬──────────────┬─── ... ──┐
                       v              v          v
                 sub-block 0    sub-block 1 ... sub-block 15
                 (inputs 00-0F) (10-1F)        (F0-FF)
                 SOP x4 -> [7:4]
                 ROM16x4 -> [3:0]
                       │              │          │
                       └──────> 16:1 MUX <───────┘
                                   ^ select = din[7:4]
                                   v
                                 dout
```

`sbox_subblock #(RANGE)` serves the inputs `16*RANGE + n` for `n = 0..15`:

- Output bit `4+k` (for `k = 0..3`) is a Boolean function of the 4-bit `n`.
  It is written in canonical SOP form: the OR of those minterms of `n` where
  the bit is 1. A minterm is the AND of the four input bits, each taken true
  or inverted. Synthesis reduces these to the minimal product terms that a
  Karnaugh map would give.
- Output bits 3:0 come from a 16-entry ROM addressed by `n`.

The minterm lists and ROM contents are not typed in by hand. They are derived
at elaboration time from `SBOX_TABLE` in `aes_pkg`. That table is the
FIPS-197 S-box, defined by this formula:

    S(x) = A(x^-1) ^ 0x63,   x^-1 the inverse in GF(2^8) mod x^8+x^4+x^3+x+1 (0^-1 = 0)
    A(b) = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4)

`sbox8` instantiates the sixteen sub-blocks and adds the multiplexer. It is
purely combinational.

## Round structure

All round modules are combinational. Byte 0 of a 128-bit vector is in bits
127:120, and byte `i` is row `i%4`, column `i/4` (the FIPS-197 layout).

| module            | does                                                    |
|-------------------|---------------------------------------------------------|
| `aes_subbytes`    | 16 parallel `sbox8`                                     |
| `aes_shiftrows`   | row `r` rotated left by `r` bytes (wiring only)         |
| `aes_mixcolumns`  | each column times [2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2] over GF(2^8), built from `xtime` |
| `aes_addroundkey` | XOR with the round key                                  |
| `aes_round`       | SubBytes -> ShiftRows -> MixColumns -> AddRoundKey (rounds 1-9) |
| `aes_subround`    | SubBytes -> ShiftRows -> AddRoundKey (round 10)         |
| `aes_key_expand`  | one AES-128 key-schedule step: `t = SubWord(RotWord(w3)) ^ rcon`, then `w0'=w0^t`, `w1'=w1^w0'`, `w2'=w2^w1'`, `w3'=w3^w2'` |

MixColumns uses no S-box. It needs only multiplication by 2 and 3 in GF(2^8),
which is a shift and a few XORs.

## The pipeline (`aes128_top`)

```
plaintext ─XOR─> [round 1 ] ─reg─> [round 2 ] ─reg─> ... [round 9 ] ─reg─> [sub-round 10] ─reg─> ciphertext
key ───────┴───> [expand 1] ─reg─> [expand 2] ─reg─> ... [expand 9] ─reg─> [expand 10   ] ─┘
```

- **Stage 1** holds the initial AddRoundKey, key-expansion step 1 and round 1.
- **Stage k** holds key-expansion step `k` and round `k`. Each step's round
  constant `rcon = x^(k-1)` is fixed when the design is elaborated.
- **Registers:** the state, the round key and a valid bit are registered at
  the end of every stage. The state and key registers load only when the
  stage's input is valid.

Interface:

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | clock |
| `rst_n`       | in  | 1     | synchronous, active low; clears only the valid bits |
| `in_valid`    | in  | 1     | `plaintext` and `key` are taken on this clock edge |
| `plaintext`   | in  | 128   | input block |
| `key`         | in  | 128   | cipher key for this block |
| `out_valid`   | out | 1     | `ciphertext` is valid |
| `ciphertext`  | out | 128   | encrypted block |

Timing:

- A block presented with `in_valid` before clock edge `e` appears on
  `ciphertext` after edge `e+9`, with `out_valid` high. That is a latency of
  10 clocks.
- A new block can be presented on every clock.
- There is no back-pressure: the consumer must take every output.
- An asserted reset discards all blocks in flight.

Parameter: `NR` (default 10) is the number of unrolled rounds. Only 10 gives
AES-128. Other values only change the structure and do not give a standard
cipher.

## What is assumed, and where this departs from the source description

- **S-box contents.** The S-box follows FIPS-197 exactly. In the description
  this design is based on, a few example table entries (for inputs 00, FE and
  FF) do not match FIPS-197, while others (01 -> 7C, 02 -> 77) do. The
  standard values are used because the core is meant to be AES.
- **SOP minimisation.** The minimised product terms of the SOP functions are
  not given. The canonical SOP form is used and synthesis minimises it.
- **Pipelining.** Where the pipeline registers sit, the valid/reset handshake
  and the 10-clock latency are choices of this design. The source gives only
  combinational delays for the S-box, round, sub-round, key scheduler and
  whole core.
- **S-box use count.** The source counts one S-box use per round for the key
  schedule and four for MixColumns. Here the key schedule uses four S-boxes
  per step (one 32-bit SubWord), and MixColumns uses none, as the standard
  requires.
- **Encryption only.** There is no decryption path, and there is no AES-192
  or AES-256.
- **Pin count.** The source reports a much larger I/O count (1664 pins) for
  its implementation. This core has 385 I/O bits.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/aes_ref_pkg.sv`, a separate AES model. It computes the S-box from the
GF(2^8) inverse (as `a^254`) rather than from a table, and it works on a 4x4
byte matrix and 32-bit key words.

- `sbox_subblock_tb`: all 16 sub-ranges and all 16 nibbles. The SOP half and
  the ROM half are checked separately.
- `sbox8_tb`: all 256 inputs.
- Each transformation and round testbench checks:
  - the FIPS-197 Appendix B intermediate values for round 1 and round 10;
  - 500 random vectors.
- `aes_key_expand_tb`: the FIPS-197 key `2b7e1516...`, with round keys 1 and
  10 checked against the published values, plus random keys and steps.
- `aes128_top_tb`: the full core at default parameters. It checks:
  - the FIPS-197 Appendix B and C.1 vectors;
  - 200 back-to-back blocks with a new key on every block;
  - 300 cycles with random idle cycles (bubbles) and repeated keys;
  - a reset in the middle of a stream;
  - the ciphertext of every block, and that its latency is exactly 10 clocks.

  It also counts back-to-back issues, bubbles, key changes and reset flushes,
  and fails if any of them never occurs.

To simulate with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert --top-module aes128_top_tb \
  -y rtl -y tb +libext+.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/aes128_top_tb.sv
./obj_dir/Vaes128_top_tb
```

Replace `aes128_top_tb` with any other testbench name to run it. The full
core has 200 S-boxes, so the Verilator build of the top-level testbench takes
a few minutes. The simulation itself takes seconds.

## Files

- `rtl/aes_pkg.sv`: shared types, the S-box table, `xtime`, `rcon_of`.
- `rtl/sbox_subblock.sv`, `rtl/sbox8.sv`: the S-box.
- `rtl/aes_subbytes.sv`, `rtl/aes_shiftrows.sv`, `rtl/aes_mixcolumns.sv`,
  `rtl/aes_addroundkey.sv`: the four round transformations.
- `rtl/aes_round.sv`, `rtl/aes_subround.sv`: the full round and the final
  round.
- `rtl/aes_key_expand.sv`: one key-schedule step.
- `rtl/aes128_top.sv`: the pipelined core.
- `tb/`: one testbench per module, plus the reference model `aes_ref_pkg.sv`.
