# PRINCE block cipher: iterative core with one shared round unit, plus a masked variant

PRINCE is a 64-bit block cipher with a 128-bit key. It was designed for low latency, as a
fully unrolled circuit of twelve rounds. This RTL takes the opposite trade-off. A single
round unit is reused under the control of a step counter. That unit holds one copy each of
the four cipher layers:

- the M' matrix layer;
- ShiftRows or its inverse;
- the round-key and round-constant addition;
- the S-box layer or its inverse.

Forward and backward rounds use the same four layers, only chained in opposite orders. A
multiplexer ring picks the order each cycle, so one copy of the layers serves all twelve
steps. One block takes 12 clock cycles, which is 64/12 ≈ 5.33 bits per clock.

A second core has the same architecture and adds a fixed random mask around every S-box
layer. The mask is meant as a countermeasure against power analysis. It comes from a
64-bit register that moves through the linear layers in step with the state.

Both cores sit side by side in `prince_top`.

## The cipher in one paragraph

Let `k = k0 || k1`, and derive `k0' = (k0 >>> 1) ^ (k0 >> 63)`. The block is whitened
with `k0` on input and with `k0'` on output. Between the two whitenings runs PRINCEcore,
which uses `k1` and the constants `RC0..RC11`:

1. Add `k1 ^ RC0`.
2. Run five forward rounds `Ri`. Each round is: S-box layer, then `M = SR ∘ M'`, then add
   `k1 ^ RCi`.
3. Run the middle layer: S, then M', then S⁻¹.
4. Run five backward rounds `Ri'`. Each round is: add `k1 ^ RCi`, then `M⁻¹ = M' ∘ SR⁻¹`,
   then S⁻¹.
5. Add `k1 ^ RC11`.

Three properties of the cipher matter for this design:

- M' is an involution.
- `RCi ^ RC(11-i)` is the constant α for every i.
- Decryption is therefore encryption with `k0` and `k0'` swapped and `k1` replaced by
  `k1 ^ α`. The cores use this to decrypt on the same datapath.

**Bit order.** Every 64-bit word is stored with the first hex digit of the usual notation
in bits `[63:60]`. So nibble `n` is `[63-4n -: 4]`. Bit `i` of the cipher's own numbering
(0 = leftmost) is bit `[63-i]`.

## The step schedule (the part to understand first)

The round is rotated. The S-box layer sits at the *end* of a forward step and at the
*start* of a backward step. With that rotation, every step uses the four layers in one of
two fixed orders:

```
forward  (steps 0..6):  M'  -> SR    -> add(k1^RC) -> S
backward (steps 7..12): S^-1 -> add(k1^RC) -> SR^-1 -> M'
```

Any layer can be switched off, and then it passes its input through. The 4-bit counter
`step` selects the order, which layers are on, and the round constant:

| step | kind  | active layers                   | constant | what it covers                     |
|------|-------|---------------------------------|----------|------------------------------------|
| 0    | INIT  | add, S                          | RC0      | first key/RC addition, S of R1     |
| 1–5  | FWD   | M', SR, add, S                  | RC1–RC5  | rest of R1..R5, S of next round    |
| 6    | MID   | M'                              | –        | M' of the middle layer             |
| 7–11 | BWD   | S⁻¹, add, SR⁻¹, M'              | RC6–RC10 | S⁻¹ of middle/previous, R6'..R10'  |
| 12   | FINAL | S⁻¹, add                        | RC11     | last S⁻¹ and RC11 addition         |

Steps 0 to 11 are register updates, so 12 clock edges pass per block. Step 12 is not
clocked. When the counter rests at 12, the same round unit computes the last layer
combinationally. The core then XORs in the output whitening key, and the result appears on
`data_o`. This is why the result depends on `key_i` after the run has ended.

The order select in `prince_round` is a ring of multiplexers. Two examples:

- The M' input comes from the core's state in forward order, and from the ShiftRows
  output in backward order.
- The ShiftRows input comes from the M' output in forward order, and from the adder in
  backward order.

As drawn, the ring is a combinational loop. The path is never sensitised, because the
select fixes one order at a time. Verilator reports it as `UNOPTFLAT`. Simulation is
still correct; it only costs some simulation speed. Removing the ring would mean
duplicating the layers, which defeats the purpose of the design.

## Interface and timing (both cores)

| port        | dir | width | meaning                                                           |
|-------------|-----|-------|-------------------------------------------------------------------|
| `clk_i`     | in  | 1     | clock, rising edge                                                |
| `rst_ni`    | in  | 1     | synchronous reset, active low                                     |
| `start_i`   | in  | 1     | start a block; taken when `busy_o` is low, ignored otherwise      |
| `decrypt_i` | in  | 1     | 0 encrypt, 1 decrypt                                              |
| `key_i`     | in  | 128   | `{k0, k1}`                                                        |
| `mask_i`    | in  | 64    | masked core only: mask, sampled with `start_i`                    |
| `data_i`    | in  | 64    | plaintext or ciphertext, sampled with `start_i`                   |
| `busy_o`    | out | 1     | steps 1..11 running                                               |
| `done_o`    | out | 1     | result valid; rises on the 12th edge after start, stays high until the next start |
| `data_o`    | out | 64    | result                                                            |

- **Key is not registered.** The key has no register, which saves 128 flip-flops. So
  `key_i` and `decrypt_i` must stay stable from `start_i` until the result has been read.
  An assertion (`a_key_stable`) checks this while the core is busy.
- **Latency assertion.** A second assertion (`a_latency`) checks that `done_o` is high
  `CYCLES_PER_BLOCK` (12) edges after a block is taken.
- **Back-to-back blocks.** A new `start_i` may be given in the same cycle that `done_o`
  is high, so blocks can follow each other every 12 cycles.

In `prince_top` the plain core's ports are prefixed `enc_` and the masked core's ports
`msk_`. The two cores share only clock and reset.

## The masked core

`prince_masked_subcell` masks the S-box layer without storing one recomputed table per
mask. It keeps the plain table and puts XOR layers around it:

```
masked  = x ^ R            add the mask
s_in    = masked ^ R       masked S-box: unmask the input,
s_out   = S(s_in)          plain table,
remask  = s_out ^ R        remask the output
out     = remask ^ R       compensation
```

`R` is a 64-bit word, one mask nibble per S-box. `prince_masked_round` gives the mask its
own M' and ShiftRows units, driven by the same enables and the same order as the state's:

- Forward steps mask their S-boxes with `SR(M'(R))`, which is also the next mask.
- Backward steps mask their S⁻¹ with the current `R`, and the next mask is
  `M'(SR⁻¹(R))`.
- The middle step applies M' only.

As a result, each S-box layer sees a different mask, all derived from the single fixed
mask loaded with the block. The ciphertext is the same as unmasked PRINCE for every mask
value. The testbenches check this property.

**How far to trust the masking.** The mask XORs cancel as Boolean functions, and the state
register holds unmasked values between rounds. The masking therefore protects only the
wiring inside the S-box unit, and only if synthesis keeps the XOR layers. An optimising
tool is free to remove them. Nothing in this RTL forces them to stay. Treat the masked
core as a functional model of the scheme. It is not a verified side-channel
countermeasure: real protection needs the register and the S-box inputs to carry masked
values, and needs keep/dont-touch constraints in the implementation flow.

## Files

| file                             | contents                                                        |
|----------------------------------|-----------------------------------------------------------------|
| `rtl/prince_pkg.sv`              | word types, S-box and inverse, SR permutations, RC0..RC11, α, step numbering, `k0'` |
| `rtl/prince_mprime.sv`           | M' layer: each output bit is the XOR of three input bits        |
| `rtl/prince_shiftrows.sv`        | SR / SR⁻¹ with a select input                                   |
| `rtl/prince_subcell.sv`          | 16 S-boxes, S / S⁻¹ with a select input                         |
| `rtl/prince_round.sv`            | shared-layer round with forward/backward chaining               |
| `rtl/prince_core.sv`             | step counter, state register, whitening, α-reflection decryption |
| `rtl/prince_masked_subcell.sv`   | S-box layer with mask add / compensation                        |
| `rtl/prince_masked_round.sv`     | round with the mask carried through its own linear layers       |
| `rtl/prince_masked_core.sv`      | controller with state and mask registers                        |
| `rtl/prince_top.sv`              | both cores side by side                                         |
| `tb/prince_ref_pkg.sv`           | textbook software model of PRINCE (the independent reference)   |
| `tb/tb_*.sv`                     | one self-checking testbench per module                          |

**Formula behind M'.** For output block `b` (16 bits), nibble `r`, bit `c`, XOR bit `c`
of input nibbles `4b+k` over the three `k` with `(r + k + h) mod 4 ≠ c`. Here `h = 0` for
blocks 0 and 3 (the matrix M̂0) and `h = 1` for blocks 1 and 2 (M̂1). For example,
output bit 0 is `s4 ^ s8 ^ s12` and output bit 63 is `s55 ^ s59 ^ s63`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog ends
the run with a failure if it hangs. Example for the whole design:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/prince_pkg.sv tb/prince_ref_pkg.sv tb/tb_prince_top.sv \
  --top-module tb_prince_top -o sim && ./obj_dir/sim
```

The packages are listed first so they are compiled before their users. `-y` lets
Verilator find each module in the file of the same name. For another module, swap in its
testbench, for example `tb/tb_prince_core.sv` with `--top-module tb_prince_core`.

What each testbench checks:

- **Layer testbenches.** Every S-box value in every position. Every M' column (64 unit
  vectors). SR and SR⁻¹ on a hand-worked word. The inverse and involution identities.
  Random words compared with `prince_ref_pkg`.
- **`tb_prince_round`.** Each of the 13 steps against the reference layers. It also
  chains the steps by hand and reproduces the five published test vectors:

  | plaintext          | k0                 | k1                 | ciphertext         |
  |--------------------|--------------------|--------------------|--------------------|
  | `0000000000000000` | `0000000000000000` | `0000000000000000` | `818665aa0d02dfda` |
  | `ffffffffffffffff` | `0000000000000000` | `0000000000000000` | `604ae6ca03c20ada` |
  | `0000000000000000` | `ffffffffffffffff` | `0000000000000000` | `9fb51935fc3df524` |
  | `0000000000000000` | `0000000000000000` | `ffffffffffffffff` | `78a54cbe737bb7ef` |
  | `0123456789abcdef` | `0000000000000000` | `fedcba9876543210` | `ae25ad3ca8fa9ccf` |

- **`tb_prince_core` and `tb_prince_masked_core`.** The same vectors, encrypted and
  decrypted. Random blocks and keys in both directions. A latency of exactly 12 cycles.
  A start request while busy, which must be ignored. Back-to-back blocks. The masked core's
  testbench also follows the internal mask register step by step.
- **`tb_prince_top`.** Runs both cores at the same time at the default configuration
  (the design has no size parameters). It counts each mechanism: encryption, decryption,
  ignored start, back-to-back start, non-zero mask, and both cores busy together. It
  fails if any of them never happened. It also encrypts the all-zero block and keys
  under a non-zero mask and expects `818665aa0d02dfda`.

The reference model computes decryption as the literal inverse of every layer. It does not
use the α-reflection, so the cores' decryption path is checked against an independent
method.

## What follows the source description and what is this design's own

**Follows the source description:**

- The four layers as units with a direction select.
- One shared round unit whose chaining order is chosen by a forward/backward tag derived
  from the round number.
- Counter control and 12 cycles per block.
- M' built as three-input XORs.
- The masking sequence "add mask, masked S-box, compensate".
- The mask moved through M' and ShiftRows together with the state.

**Own choices:**

- **Step table.** The split into INIT / FWD / MID / BWD / FINAL steps, so that whitening,
  middle layer and last layer reuse the same unit.
- **Combinational last layer.** This is what keeps the count at 12 cycles.
- **Handshake.** start / busy / done.
- **Reset.** Synchronous and active low.
- **Unregistered key.** The key is not registered and must be held by the caller.
- **Decryption.** By α-reflection.
- **Mask handling.** The mask is sampled with every block, and the mask word has one
  nibble per S-box.
- **Values from the PRINCE definition.** The round constants, the ShiftRows permutation
  and the `k0'` derivation come from the cipher's definition. The five test vectors above
  confirm them.

**Departures and limits:**

- **The baseline is not included.** The comparison design, an un-optimised PRINCE, is
  not part of this RTL.
- **Register count.** The reference FPGA results for this design report about 5,300
  flip-flops. The cores here need only 70 (plain) and 134 (masked) flip-flops. Those
  figures must include logic around the cipher and cannot be compared with this RTL.
  Their LUT columns are also inconsistent between the summary and the detailed reports.
  The only performance claim carried over is the 12 cycles per block. At the reported
  102.459 MHz that is 102.459 × 64 / 12 ≈ 546 Mbit/s.
- **Mask not kept through synthesis.** See the masked-core section: a synthesis tool may
  remove the mask.
