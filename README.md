# Dragon stream cipher core

Dragon is a word-oriented stream cipher. It turns a 128-bit key and a 128-bit
initialization vector (IV) into a stream of 64-bit keystream words. Data is
encrypted by XORing it with the keystream, and decrypted by XORing it again
with the same keystream, regenerated at the receiver from the same key and IV.
The cipher has two parts: a large nonlinear feedback register (1024 bits of
state, plus a 64-bit counter M) and one nonlinear function F. F is used both to
update the state and to filter it into output.

This RTL builds the cipher as a fast, fully parallel datapath aimed at small
FPGA-based nodes such as wireless sensor motes. The whole F-function is
evaluated within one clock cycle, so the core runs one key-setup iteration per
clock and produces one 64-bit keystream word per clock. It consists of:

* **Key/IV setup** (`dragon_keyinit`). It loads a starting state built from
  the key and IV, then runs sixteen F iterations.
* **Keystream generation** (`dragon_keygen`). It takes over the final state
  and produces `a'||e'` from each F evaluation.
* **XOR combiner** (`dragon_xor`). It applies the keystream to a stream of
  64-bit data words.

> **The S-box contents are a stand-in.** F uses two 256-entry × 32-bit
> tables, S1 and S2. This RTL fills them by default from a fixed integer hash
> (`dragon_pkg::sbox_value`), not from the published Dragon tables. So the
> default build has Dragon's exact structure but does **not** produce the
> standard Dragon keystream. To get the standard cipher, give the two hex
> files of the published tables (256 words each, one per line) as the
> `S1_FILE` and `S2_FILE` parameters of `dragon_top`. Nothing else changes.
> The testbenches check against a reference model that uses the same stand-in
> tables. They prove that the structure is right, not that the output matches
> published test vectors.

## The state and its two views

The 1024-bit state register is read two ways:

* During key/IV setup it is eight 128-bit words, **W0..W7**.
* During keystream generation it is thirty-two 32-bit words, **B0..B31**.

Both views are the same bits. W0 is the most significant 128 bits, and B0 is
the most significant 32 bits of W0. In general, B(4i)..B(4i+3) are Wi from its
top word down. In `dragon_pkg` this is written as two packed types with
ascending indices: `wstate_t` is `qword_t [0:7]` and `bstate_t` is
`word_t [0:31]`. Element 0 is therefore the most significant part, and
`bstate_t'(w)` converts one view to the other. Throughout, `x||y` puts x in
the upper bits. Verilator warns about the ascending ranges (ASCRANGE); this is
intended.

## The F-function (`dragon_f`)

F maps six 32-bit words a..f to six words a'..f' through three layers. All of
it is combinational. `+` is addition modulo 2^32.

```
pre-mixing    b1 = a ^ b        d1 = c ^ d        f1 = e ^ f
              c1 = c + b1       e1 = e + d1       a1 = a + f1
S-box layer   d2 = d1 ^ G1(a1)  f2 = f1 ^ G2(c1)  b2 = b1 ^ G3(e1)
              a2 = a1 ^ H1(b2)  c2 = c1 ^ H2(d2)  e2 = e1 ^ H3(f2)
post-mixing   d' = d2 + a2      f' = f2 + c2      b' = b2 + e2
              c' = c2 ^ b'      e' = e2 ^ d'      a' = a2 ^ f'
```

The S-box layer has two levels. The H functions read words that the G
functions have just changed. The longest path is therefore:

adder → G (table lookup and XOR) → H (table lookup and XOR) → adder → XOR

That path, plus the 1024-bit register around it, sets the clock rate.

### G and H (`dragon_gh`) and the S-boxes (`dragon_sbox`)

Each of the six functions splits its input into bytes. x0 is bits 31:24 and x3
is bits 7:0. It looks up each byte in S1 or S2 and XORs the four 32-bit
results:

| function | x0 | x1 | x2 | x3 |
|----------|----|----|----|----|
| G1 | S1 | S1 | S1 | S2 |
| G2 | S1 | S1 | S2 | S1 |
| G3 | S1 | S2 | S1 | S1 |
| H1 | S2 | S2 | S2 | S1 |
| H2 | S2 | S2 | S1 | S2 |
| H3 | S2 | S1 | S2 | S2 |

`dragon_pkg::gh_sbox()` encodes this table.

Taking x0 to be the most significant byte is this design's reading. If the
reference tables assume the other byte order, change the single `addr` slice
in `dragon_gh`.

Every lookup has its own copy of its table, read asynchronously. That is what
lets F finish within one cycle:

* F needs 24 table copies.
* The core holds 48, because setup and generation each have their own F.

The two distinct tables hold 2 KB of data. The replicated copies take
48 × 1 KB. On an FPGA they become LUT logic or distributed RAM.

## Key/IV setup (`dragon_r1`, `dragon_keyinit`)

`dragon_r1` builds the starting state. K' and IV' are K and IV with their two
64-bit halves swapped:

```
W0..W7 = K | K'^IV' | IV | K^IV' | K' | K^IV | IV' | K'^IV
M      = 0x0000447261676F6E            ("Dragon" in ASCII)
```

`dragon_keyinit` then performs sixteen iterations, one per clock:

```
a||b||c||d = W0 ^ W6 ^ W7     e||f = M
(a',b',c',d',e',f') = F(a,b,c,d,e,f)
W0..W7 <= ((a'||b'||c'||d') ^ W4) | W0 .. W6     -- shift by one 128-bit word
M      <= e'||f'
```

A 5-bit down-counter, loaded with 16, ends the setup.

Timing:

* `start` is sampled at a clock edge. The R1 state is loaded at that edge.
* The next sixteen edges perform the iterations.
* `done` is high for the one cycle after the last iteration.
* `busy` covers the iterations.
* A `start` during a setup restarts it.

## Keystream generation (`dragon_r2`, `dragon_keygen`)

When setup finishes, W0..W7 and M are copied into the generator as B0..B31
and M. Each iteration works as follows, with M = M1||M2:

```
a = B0   b = B9   c = B16   d = B19   e = B30 ^ M1   f = B31 ^ M2     (dragon_r2)
(a',b',c',d',e',f') = F(a,b,c,d,e,f)
keystream word k = a'||e'
B0 <= b'   B1 <= c'   Bi <= B(i-2) for i = 2..31   -- shift by two words
M  <= M + 1
```

The keystream word is formed combinationally from the registered state, so it
is available before it is used. `advance` performs the iteration. `load`
takes a new state. `clear` marks the keystream invalid, which the top does
when a new setup begins.

## Using `dragon_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `init_start` | in | 1 | pulse to start a key/IV setup (re-keys at any time) |
| `key`, `iv` | in | 128 | must be stable in the `init_start` cycle |
| `init_busy` | out | 1 | setup iterations running |
| `ks_ready` | out | 1 | keystream available; equals `data_in_ready` |
| `keystream` | out | 64 | the word the next accepted data word will be XORed with |
| `data_in_valid` / `data_in_ready` / `data_in` | in/out/in | 1/1/64 | data handshake; a word is taken when valid and ready are both high |
| `data_out_valid` / `data_out` | out | 1/64 | `data_in ^ keystream`, one cycle after acceptance; no back-pressure |

Timing:

* `ks_ready` rises 17 clock edges after the edge that samples `init_start`.
  That is the load edge, 16 iterations, and the hand-over to the generator.
* After that the core accepts one data word per clock. 48 bytes (six words)
  take six cycles.
* The generator only steps on an accepted word. Gaps in the input stall it
  without skipping keystream.
* Sender and receiver are the same core: one is fed plaintext, the other
  ciphertext.

`S1_FILE` and `S2_FILE` (default empty) select the S-box contents; see the
note at the top.

## Where this design differs from the hardware it is based on

The structure follows the published description closely. That includes the R1
block, the separate setup and generation datapaths each with their own F, a
1024-bit state register, table-based S-boxes, F in one clock cycle, and
sixteen setup iterations. Where the description was silent or inconsistent,
the following choices were made:

* **S-box contents**: a stand-in fill, not the published tables (see above).
* **Key setup time**: the reported implementation needs 34 cycles (340 ns at
  100 MHz). This core needs 17, because it does one iteration per clock. The
  extra cycles of the original are not explained.
* **Encryption time**: the reported figure is 32 cycles for 48 bytes
  (150.92 MB/s at 100 MHz). This core takes 64-bit words with a valid/ready
  handshake, one word per clock, so 48 bytes take 6 cycles.
* **Second counter**: the original counted keystream words with a second
  counter. Here the data handshake controls the generator instead.
* **Keystream word**: the output is `a'||e'`, as in the cipher's algorithm.
  One prose passage names e' and f' instead.
* **G/H combining**: G and H combine their four lookups with XOR, as in
  their defining equations. One prose passage says addition.
* **Re-keying**: `init_start` at any time discards the current keystream and
  starts a new setup.
* **Reset**: synchronous and active-low.
* **Not built**: the 256-bit key and IV variant of the cipher. The original
  hardware also implements only the 128-bit case.
* **Not reproduced**: the published simulation used key = IV =
  `0x00001111222233334444555566667777`. Its keystream cannot be reproduced
  without the published S-boxes. The end-to-end testbench uses this key and
  IV, but checks the result against the reference model.

## Files

`rtl/`:

| file | content |
|------|---------|
| `dragon_pkg.sv` | types, constants, G/H S-box map, stand-in S-box fill, half-swap |
| `dragon_sbox.sv` | one 256 × 32 look-up table |
| `dragon_gh.sv` | one of G1..G3, H1..H3 (4 S-boxes + XOR) |
| `dragon_f.sv` | the F-function (6 × `dragon_gh`) |
| `dragon_r1.sv` | starting state from key and IV |
| `dragon_keyinit.sv` | key/IV setup: R1, F, W register, M, round counter |
| `dragon_r2.sv` | keystream tap selection and counter mixing |
| `dragon_keygen.sv` | keystream generator: R2, F, B register, M |
| `dragon_xor.sv` | data XOR keystream with valid/ready handshake |
| `dragon_top.sv` | the complete core |

`tb/`:

* Each module has a self-checking testbench, `tb_<module>.sv`.
* `dragon_ref_pkg.sv` is an independent behavioural model of the whole
  cipher.
* `tb_dragon_top.sv` is the end-to-end test. It runs two cores (sender and
  receiver) at default parameters. It covers setup latency, back-to-back
  48-byte encryption, random input gaps, data offered before the keystream is
  ready, and re-keying in mid-stream. It fails if any of these never happens.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

Run from the directory that holds `rtl/` and `tb/`, for example for the whole
core:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dragon_pkg.sv tb/dragon_ref_pkg.sv tb/tb_dragon_top.sv \
  --top-module tb_dragon_top -Mdir obj_top
./obj_top/Vtb_dragon_top
```

Use the same command with any other `tb_dragon_*.sv` and its module name. The
simulations finish within seconds. `verilator --lint-only -Wall` accepts all
of `rtl/`. The remaining warnings are the intended ascending ranges, package
constants unused by some modules, and state bits not tapped by `dragon_r2`.
