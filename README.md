# Single-round AES-128 encryption core

This core computes the first round of AES-128 encryption in hardware. It
takes a 128-bit plaintext and a 128-bit cipher key and returns the AES state
at the end of round 1. That covers the initial AddRoundKey followed by one
full round: SubBytes, ShiftRows, MixColumns and AddRoundKey with round key 1.
Plaintext comes in and the result goes out over a 32-bit bus, one 128-bit
block in four clock cycles each way.

A single round is **not** AES encryption. Full AES-128 runs ten rounds, and
one round offers almost no security. The core reproduces the published
hardware it follows, which was built as a fast single-round demonstrator.
It is useful as a round datapath, as a teaching example, or as the basis of
an iterated ten-round core. With the key and plaintext of the AES standard's
example it gives the standard's round-1 state:

| | value |
|---|---|
| plaintext | `3243f6a8 885a308d 313198a2 e0370734` |
| cipher key | `2b7e1516 28aed2a6 abf71588 09cf4f3c` |
| round key 1 | `a0fafe17 88542cb1 23a33939 2a6c7605` |
| output | `a49c7ff2 689f352b 6b5bea43 026a5049` |

## The state and its byte order

AES works on a 4 x 4 matrix of bytes, the *state*. It is filled column by
column: input byte *n* becomes entry S(r,c) with n = r + 4c. Every 128-bit
vector in this RTL stores byte 0 in bits [127:120] and byte 15 in bits
[7:0], so hexadecimal values read in the same order as AES test vectors.
The type is `aes_state_t`, a packed array of 16 bytes. Because element 15
is the most significant, byte *n* sits at element 15-n.
`aes_pkg::state_pos(r, c)` returns the element index of S(r,c). Every
transformation indexes the state through it, so no code repeats the
reversal.

On the 32-bit bus, each word is one column of the state. The first word is
column 0, i.e. bytes 0 to 3.

## Datapath

```
 ptin[31:0] --> word_deserializer --128--> aes_round_datapath --128--> word_serializer --> ctout[31:0]
 pt_valid         (shift register)            |                         (shift register)    ct_valid
 key[127:0] --> key register (taken with word 4) --+
```

`aes_round_datapath` is purely combinational. Its stages, in order:

1. `add_round_key`: state XOR cipher key.
2. `sub_bytes`: 16 `aes_sbox` instances, one per byte.
3. `shift_rows`: row r rotates left by r bytes. This is wiring only.
4. `mix_columns`: each column is multiplied by the circulant matrix
   `02 03 01 01 / 01 02 03 01 / 01 01 02 03 / 03 01 01 02` over GF(2^8).
5. `add_round_key`: the result XOR round key 1.

`key_expand_step` produces round key 1 from the cipher key at the same time
as stages 1 to 4. It uses RotWord, then SubWord through four more S-boxes,
then XORs in Rcon = {01,00,00,00}. That gives the first new word; each of the
other three new words is the previous new word XOR the matching old word.
Its `RCON` parameter selects the round constant, so the same module serves
any later round of an iterated core.

The whole round lies between two register stages: the input block register
and the output shift register. That path is the critical path: one 128-bit
XOR, one S-box, MixColumns and a final XOR. The key schedule's S-box works
in parallel with the state's S-box, so it adds no depth.

### The S-box is computed, not stored

`aes_sbox` follows the two-step definition of the substitution:

* **Inversion.** The multiplicative inverse in GF(2^8) modulo
  x^8 + x^4 + x^3 + x + 1 is formed as x^254. The core squares x repeatedly
  to get x^2, x^4, ..., x^128 and multiplies these seven powers together.
  Since x^255 = 1 for any non-zero x, the product is x^-1, and 0 maps to 0.
* **Affine transform.** The result is multiplied by a fixed 8 x 8 bit matrix
  and XORed with 0x63. Row i of the matrix has ones in columns i, i+4, i+5,
  i+6 and i+7 (mod 8). `AFFINE_ROW` holds the rows as bytes, and each output
  bit is the parity of one row ANDed with the inverse.

The published design seems to have kept the S-box as a table in FPGA block
RAM. A 256-entry ROM built from the same formula would be a drop-in
replacement with the same ports (`din`, `dout`). After generic synthesis,
one S-box is about 375 word-level cells. The whole core, with 20 S-boxes,
is about 7,700.

## Word interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; everything is rising-edge |
| `rstn` | in | 1 | asynchronous reset, active low |
| `key` | in | 128 | cipher key; sampled on the cycle of the 4th plaintext word |
| `pt_valid` | in | 1 | `ptin` holds a plaintext word |
| `ptin` | in | 32 | plaintext word, column 0 first |
| `ct_valid` | out | 1 | `ctout` holds a result word |
| `ctout` | out | 32 | result word, column 0 first |

The input port (`word_deserializer`) shifts each valid word into a 128-bit
register and counts words modulo 4. `pt_valid` may drop between words: idle
cycles pause the count. When the edge at which the fourth word is sampled
arrives (call it e), the block is complete, and the key is registered at the
same edge. The block then crosses the round logic during the next cycle. At
edge e+1 the result is loaded into `word_serializer`, which puts column 0
on `ctout` and raises `ct_valid`. Columns 1, 2 and 3 follow on the next
three cycles.

```
edge         e-3   e-2   e-1    e    e+1   e+2   e+3   e+4   e+5
ptin/valid   w0    w1    w2    w3
block                                 [full block registered at e]
ctout/valid                           c0    c1    c2    c3
```

Each word in the diagram appears just after the edge it is listed under.
So a testbench that samples at rising edges sees `c0` at edge e+2. A new
block may start right behind the previous one. With one word per cycle the
core then accepts a block every four cycles and the output words form an
unbroken stream. The output port loads a new block exactly on the cycle its
fourth word is shown. A concurrent assertion in `word_serializer`
(`a_no_overrun`) flags any load earlier than that, which the top level
cannot produce.

Reset clears the word counter, the strobes, the key register and both shift
registers. A partly received block is dropped.

## What follows the source and what is this design's own

Taken from the published single-round design:

* the order of the transformations;
* the AES-128 key length;
* the signal names `clk`, `rstn`, `ptin[31:0]` and `ctout[31:0]`;
* the transfer of plaintext and result as four 32-bit words;
* the round-1 test vector above.

MixColumns uses the circulant matrix of the AES standard. With it the core
reproduces the published round-1 output.

This design's own choices, which the source leaves open:

* the key arrives on a 128-bit port, because the source does not show how
  the key enters;
* the `pt_valid`/`ct_valid` strobes and the gap-tolerant input;
* the asynchronous active-low reset;
* the two-edge latency;
* computing the S-box instead of storing it;
* computing round key 1 combinationally rather than storing a key schedule.

Not built:

* the 192- and 256-bit key schedules, which are described only as
  background;
* the ten-round version, which is named only as future work;
* decryption.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | state types, `state_pos`, `xtime`, `gf_mul` |
| `rtl/aes_sbox.sv` | one S-box: inversion as x^254, then the affine transform |
| `rtl/sub_bytes.sv` | 16 S-boxes |
| `rtl/shift_rows.sv` | row rotations |
| `rtl/mix_columns.sv` | column mixing |
| `rtl/add_round_key.sv` | 128-bit XOR |
| `rtl/key_expand_step.sv` | one AES-128 key schedule step, parameter `RCON` |
| `rtl/aes_round_datapath.sv` | initial key addition + round 1, combinational; parameter `ROUND_RCON` |
| `rtl/word_deserializer.sv` | 4 x 32-bit words to 128 bits |
| `rtl/word_serializer.sv` | 128 bits to 4 x 32-bit words |
| `rtl/aes_single_round_top.sv` | top level |
| `tb/aes_ref_pkg.sv` | reference model used by all testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

`tb/aes_ref_pkg.sv` is a separate model of every step, written in a
different way from the RTL:

* multiplication by carry-less product and reduction;
* the S-box inverse found by search and the affine step in rotate-and-XOR
  form;
* the state held as a plain byte array.

Each testbench compares its module with this model on random inputs. Most
also check published AES values:

* S-box entries;
* the intermediate states of the standard's round 1;
* a known MixColumns column;
* round keys 1 and 2 of the standard's key expansion;
* the round-1 states of both FIPS-197 example vectors.

`tb_aes_single_round_top` drives the whole core at its only size. It sends:

* the example block;
* 20 blocks back to back under one key;
* 20 blocks with random idle cycles between words and a new key each time;
* a reset in the middle of a block.

It checks every output word and checks that each block's first word arrives
exactly at edge e+2. It also counts each of these situations and fails if
one never happened. Every testbench prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

To simulate one testbench with Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_single_round_top.sv \
    --top-module tb_aes_single_round_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The simulator picks up
modules from `rtl/` through `-Irtl`.

## Size

Generic synthesis gives:

* 390 flip-flops: 128 for the input block, 128 for the key, 128 for the
  output shift register and 6 for control;
* about 7,700 word-level cells, almost all of them in the 20 S-boxes.

For scale, the published FPGA build used 808 flip-flops and 1,565 slices of
a Spartan-3E XC3S500E. That count is not comparable one to one, since it
includes that design's own registers and S-box tables.
