# MM-128: a 128-bit block cipher built from F2/4 controlled elements

MM-128 is a block cipher made for FPGAs. Its nonlinear layer is a set of
*data-dependent operations*. These are networks of tiny controlled
substitutions, and part of the data being encrypted decides which
substitution each one applies. The basic cell is the controlled element
**F2/4**. It takes 2 data bits and 4 control bits, so its two outputs are
6-input Boolean functions, and each fits one 6-input FPGA lookup table.
Twelve such cells in three layers make an 8-bit network, **F8/48**. Rows of
those networks make the 32-bit and 64-bit operations of the cipher round.

The cipher takes a 128-bit block and a 256-bit key (four 64-bit subkeys,
K1..K4), and runs eight rounds. There is no key expansion: each round uses
two of the four subkeys directly, picked from a fixed table. Encryption and
decryption share one datapath. Only the subkey table and a one-bit mode
`e` change between them. The core computes one round per clock, so it
handles one block every 8 clocks. A new key or mode can come with every block
at no extra cost.

This RTL follows the published description of MM-128 in its building
blocks, round loop, subkey schedule and timing. Two parts are this design's
own and do not reproduce the original: the composition of the operations
inside the round, and the wiring between the layers of F8/48. They are
listed under "Where this design departs from the original". As a result,
the ciphertexts are not those of the original MM-128.
Use this code as a model of the architecture, not as a compatible or vetted
cipher.

## The controlled element F2/4 (`ce_f24`)

F2/4 maps the 2-bit input (x1,x2) through one of sixteen 2×2 S-boxes
("modifications") F(0)..F(15). The 4-bit control vector V = (v1,v2,v3,v4)
chooses which one, with v1 as the most significant bit. The
selection criteria are:

* every modification is a bijection, and also an **involution** (F(i)(F(i)(x)) = x);
* y1, y2 and y1⊕y2, each seen as a function of all six inputs, have high
  nonlinearity (distance from the nearest affine function).

A 2-bit map has exactly ten involutions. In `mm128_pkg` they are named a..j:

| label | map on {x1,x2} = 0..3 | label | map |
|---|---|---|---|
| a | 0↔1, 2↔3 (invert x2) | f | 0↔3, 1↔2 (invert both) |
| b | 1↔3 | g | 0↔3 |
| c | identity | h | 0↔2 |
| d | 1↔2 (exchange x1, x2) | i | 0↔1 |
| e | 2↔3 | j | 0↔2, 1↔3 (invert x1) |

The element used in the cipher has the modification sequence
`a b d e g h i j b d e f g h i g` for V = 0..15. The sequence is the
original's. The link between letters and maps is a reconstruction, made in
two steps. First, 480 of the 10! possible assignments give this element the
published nonlinearities NL(y1) = 22, NL(y2) = 22 and NL(y1⊕y2) = 24.
Second, among those 480, the table uses the assignment whose differential
behaviour comes closest to the published one. That behaviour is the
probability that the output difference has weight k, given a control
difference of weight i and an input difference of weight j. With this
assignment the rows i = 0 and i = 4 match exactly, and every other entry is
within 0.08. None of the 480 matches every entry. `tb_ce_f24` measures the
nonlinearities with a Walsh transform over the element's 64-entry truth table,
and recomputes the differential table from the same outputs.

## Controlled networks F8/48 and F8/48⁻¹

`cspn_f8_48` has three active layers with four F2/4 elements each. That
gives 8 data bits and 3 × 4 × 4 = 48 control bits. Between the layers is
fixed wiring, here an 8-point butterfly. The elements of layer 1 pair bits
at distance 1 (7,6), (5,4), …. Layer 2 pairs bits at distance 2, and layer 3
at distance 4. So every output bit depends on every input bit.

| layer | control bits | pairs (x1, x2) |
|---|---|---|
| 1 | v[47:32] | (7,6) (5,4) (3,2) (1,0) |
| 2 | v[31:16] | (7,5) (6,4) (3,1) (2,0) |
| 3 | v[15:0]  | (7,3) (6,2) (5,1) (4,0) |

Element k of a layer (listed left to right above) takes the nibble
`v[47-16*l-4*k -: 4]`.

Every modification is its own inverse. So the inverse network
`cspn_f8_48_inv` is the same three layers run backwards: layer 3 first,
then 2, then 1, each with its own control nibbles. Given the **same**
48-bit control vector, F8/48⁻¹ undoes F8/48. No second set of S-box tables
is needed.

## Wide operations, the extension box E and the involution I1

* `cspn_f32_192` (F32/192) is four F8/48 boxes side by side, and
  `cspn_f64_384` (F64/384) is eight. Box k handles byte k, counted from the
  most significant byte, and takes the k-th 48-bit slice of the control
  vector, again counted from the top. With the parameter `INVERSE = 1` the
  module uses F8/48⁻¹ boxes and computes F32/192⁻¹ or F64/384⁻¹.
* `ext_e` stretches 32 bits to the 192 control bits of F32/192:
  E(X) = (X, X⋘2, X⋘4, X⋘6, X⋘8, X⋘10). X⋘b rotates X left by b bits,
  and X takes the top 32 bits of the result.
* `perm_i1` is the fixed 64-bit involution I1. It swaps bit positions
  8r+c+1 and 8c+r+1, counting positions 1..64 from the MSB. This is the
  transpose of the block seen as 8×8 bits: output byte k collects bit k of
  every input byte. It mixes bytes that the F8/48 boxes handle separately.

## The round (`crypt_round`)

The cipher loop is:

```
(L, R) = X                                   64-bit halves, L in the upper half
for j = 1..7:  (L, R) = Crypt_e(L, R, Q_j, U_j);  (L, R) = (R, L)
               (L, R) = Crypt_e(L, R, Q_8, U_8)
Y = (L ^ Q_9, R ^ U_9)                       final transformation
```

All of this loop is original, as is the list of operations in the round:
F32/192 and F32/192⁻¹ in the left branch, F64/384 and F64/384⁻¹ in the right
branch, E and I1. How those operations are composed is this design's own:

```
L ^= Q;  R ^= U                                   key mixing
La = L[63:32]   Lb = L[31:0]                      La is not changed by the round
W1 = E(La)            W2 = E(La<<<16)                          192 bits each
V1 = (E(La<<<8), E(La<<<24))   V2 = (E(La<<<4), E(La<<<20))   384 bits each
Lb = F32/192⁻¹[Wb]( F32/192[Wa](Lb) )
R  = F64/384⁻¹[Vb]( I1( F64/384[Va](R) ) )
(Wa,Wb,Va,Vb) = (W1,W2,V1,V2) if e = 0,  (W2,W1,V2,V1) if e = 1
```

The decryption trick is the hardest part to see. Every control vector comes
from La, and the round leaves La unchanged. So the decryption round can
rebuild the same W1, W2, V1 and V2 from its own input. Take the left branch
with e = 0, x → F⁻¹[W2](F[W1](x)). Its inverse is
x → F⁻¹[W1](F[W2](x)), which is the same circuit with W1 and W2 exchanged.
The right branch works the same way, because I1 is its own inverse. So
with e = 1 the round body (everything after the key XOR) is exactly the inverse
of the e = 0 body. The cost is one 2:1 multiplexer per control bit.

All key material enters by XOR at the start of each round, and the final
transformation adds one more XOR. So running the same loop backwards only
needs the subkeys in reverse round order, with Q and U exchanged. The reason
is that moving the half swap across a key XOR exchanges the two halves of
the key. That is the rule behind the decryption half of the subkey table.

One round is one combinational path: a 64-bit XOR, a 2:1 control
multiplexer, then two F64/384 levels (six F2/4 lookups deep) with I1 between
them. The left branch (two F32/192 levels) has the same depth and runs in
parallel.

## Subkey schedule (`key_schedule`)

Kn means subkey n of K = (K1,K2,K3,K4). K1 is in the top 64 bits.

| j | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|
| Q, e=0 | K1 | K2 | K3 | K4 | K4 | K1 | K3 | K4 | K1 |
| U, e=0 | K3 | K4 | K2 | K1 | K2 | K3 | K2 | K3 | K2 |
| Q, e=1 | K1 | K3 | K2 | K3 | K2 | K1 | K2 | K4 | **K1** |
| U, e=1 | K2 | K4 | K3 | K1 | K4 | K4 | K3 | K2 | **K3** |

The published table gives (K3, K1) for the last decryption column. Every
other decryption column j is encryption column 10−j with Q and U exchanged,
or unchanged for j = 1 (the first decryption round removes the final
whitening). The last decryption XOR has to remove the whitening of
encryption round 1, (Q1, U1) = (K1, K3). So this design uses (K1, K3) there.

## The core (`mm128`) and its timing

```
clk, rst_n                synchronous active-low reset
in_valid / in_ready       block, key and mode are taken on an edge with both high
in_block[127:0]           X = (L, R)
in_key[255:0]             (K1, K2, K3, K4)
in_decrypt                e: 0 encrypt, 1 decrypt
out_valid                 one-cycle pulse
out_block[127:0]          result, held until the next one
```

Block, key and mode are registered together, so each block may use its own
key and direction. The core then runs rounds 1 to 8, one per clock. The
result is registered at the 8th edge after the block was taken. `in_ready`
is high while the core is idle and also while it computes round 8. So a
waiting block is taken on the same edge that stores the previous result.
Back-to-back blocks leave exactly 8 clocks apart, which is 16 bits per
clock. For example, the published Virtex-5 result of 420.2 MHz gives
128 × 420.2 / 8 = 6723 Mbit/s, the published data rate. The output has
no back-pressure: a consumer must take `out_block` before the next
`out_valid`.

## Where this design departs from the original

* **Round composition.** The order of operations inside Crypt is this
  design's own, and so is the source of each control vector (above). Diffusion and
  differential behaviour are therefore not those published for MM-128, and
  this round has not been analysed for security.
* **F8/48 wiring.** The butterfly between layers is an assumption.
* **F2/4 letters.** The link between letters and maps was reconstructed from
  the published nonlinearity and differential figures of the element used
  (see above). The published differential entries for control differences
  of weight 1 to 3 are only approximated, to within 0.08.
* **Subkey table.** One decryption entry, j = 9, differs from the
  published table (see above).
* **Bit order.** Bit order is not specified anywhere in the original. This
  design reads x1, position 1 and K1 as the most significant bits
  everywhere.
* **Not reproduced.** Clock frequency and area (95 CLBs on Virtex-5) depend on the FPGA
  mapping and are not checked either.

## Files

| file | contents |
|---|---|
| `rtl/mm128_pkg.sv` | types, round count, the ten involutions, the F2/4 modification set |
| `rtl/ce_f24.sv` | controlled element F2/4 |
| `rtl/cspn_f8_48.sv`, `rtl/cspn_f8_48_inv.sv` | F8/48 and its inverse |
| `rtl/cspn_f32_192.sv`, `rtl/cspn_f64_384.sv` | 4 and 8 boxes side by side, `INVERSE` selects the inverse |
| `rtl/ext_e.sv`, `rtl/perm_i1.sv` | extension box E, involution I1 |
| `rtl/key_schedule.sv` | subkey table |
| `rtl/crypt_round.sv` | one round with swap or final transformation |
| `rtl/mm128.sv` | the iterative core (top) |
| `tb/mm128_ref_pkg.sv` | bit-level reference model used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares its block with `tb/mm128_ref_pkg.sv`. That model is
written separately from the RTL: F2/4 is given there as two 64-bit truth
tables, and the networks are plain loops over bit positions. The testbenches
also check properties that need no model:

* `tb_ce_f24` runs all 64 inputs. It checks involution and balance, that
  the nonlinearities are 22-22-24, and the differential table described
  above.
* The network testbenches check that each inverse undoes its forward
  operation for thousands of random control vectors.
* `tb_perm_i1` checks I1 against its list of transpositions, written out
  position by position.
* `tb_key_schedule` checks every table entry.
* `tb_crypt_round` checks known-answer vectors. It also checks that the
  e = 1 round body inverts the e = 0 body.
* `tb_mm128` runs the full core with its default configuration. It covers
  six known-answer vectors, encrypting and decrypting each. The vectors come
  from an independent software model of this exact datapath, so they check
  this design, not the original cipher. It then runs 60 random blocks with
  random keys and modes, mostly back to back, and ten encrypt-then-decrypt
  round trips. It checks an 8-clock latency and an 8-clock spacing between
  results. It also counts how often a block is taken during round 8, a block
  is taken from idle, the mode changes and the key changes, and fails if any
  of these never happens.

Each testbench prints `TB_RESULT checks=N failures=M`, and has a
watchdog that fails the run if it hangs.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -Itb rtl/mm128_pkg.sv tb/mm128_ref_pkg.sv \
          tb/tb_mm128.sv --top-module tb_mm128 -o sim
obj_dir/sim
```

For another block, swap in its testbench (`tb/tb_crypt_round.sv`,
`tb/tb_ce_f24.sv`, …). The two packages always come first. To change the
F2/4 element, edit `F24_SET` in `rtl/mm128_pkg.sv`. Then update the truth
tables `F1_TT`/`F2_TT` in `tb/mm128_ref_pkg.sv` (bit 4·V + {x1,x2} holds y1
or y2) and the known-answer vectors.
