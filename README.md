# Rotational-symmetry AES for minimal-area FPGAs

This RTL implements AES-128 encryption cores built to use as few FPGA look-up
tables as possible. Area is traded for latency. The central trick is in the
S-box. Inversion in GF(2^8) is a power map (x -> x^254). When a field element
is written in a *normal basis* {β, β², β⁴, …, β¹²⁸}, squaring becomes a cyclic
rotation of its 8 coordinates. Any power map therefore commutes with rotation.
As a result, all eight output bits of the map are the *same* 8-input Boolean
function S*, applied to rotated copies of the input:

    y_i = S*(rot(x, i))

This lets the S-box keep its input in an 8-bit register, rotate it once per
clock, and produce one output bit per cycle from a single 8-to-1 function.
That function is 4 six-input LUTs on a Xilinx device, instead of the 32 LUTs
of a full table. Basis changes go in front (`p2n`: polynomial -> normal) and
behind (`n2p`: normal -> polynomial, merged with the AES affine map).

Three designs are included:

| design | module | latency |
|---|---|---|
| unprotected S-box, byte-parallel load | `sbox_rs_parallel` | 8 cycles |
| unprotected bit-serial AES-128 | `aes_bitserial` (`SHARES=1`) | 4384 cycles/block |
| first-order masked bit-serial AES-128 | `aes_masked` | 6384 cycles/block |

`rotsym_top` puts the three side by side. They share only the clock and reset.

## The S-box datapaths

### Field, bases and tables

The field is the AES field: modulus x⁸+x⁴+x³+x+1, generator α = 2. Bit i of a
normal-basis vector is the coefficient of β^(2^i). In this RTL, one rotation
step (`rs_pkg::rot1`, bit 0 moves to bit 7) takes the square root of the
element. With that direction, S* applied after k rotations gives coordinate
k of the result. The output bits therefore appear in the order 0, 1, …, 7.

Nothing in `rs_pkg` is a pasted table. From β, the package computes the
following at elaboration time with constant functions:

* the `p2n` matrix, by inverting the matrix whose columns are β^(2^i);
* the `n2p` matrix: the basis change back, multiplied by the linear part of
  the AES affine map (bit i = b_i ⊕ b_{i+4} ⊕ b_{i+5} ⊕ b_{i+6} ⊕ b_{i+7});
* S*, as a 256-entry truth table: coordinate 0 of x^e for every input.

The constant 0x63 of the affine map is added separately. The generators are
β = 145 for the byte-parallel S-box, β = 133 for the bit-serial one and
β = 205 for the masked one. These values were selected to keep the LUT cost
of the linear layers low. Any β that generates a normal basis gives correct
results. To try another one, change the `BETA` parameter.

### Byte-parallel load (`sbox_rs_parallel`)

* The `start` cycle loads `p2n(x)` into R1.
* For the next 7 cycles, R1 rotates and the S* bit enters a 7-bit register
  R2.
* In the 8th cycle, the eighth S* bit goes straight into `n2p` without being
  registered. `y` is then valid and `done` is high.
* A new `start` may follow in the cycle after `done`.

### Bit-serial load (`sbox_rs_serial`)

Input and output are serial, LSB first. Phases are counted from `start` = 0:

| phase | action |
|---|---|
| 0–6 | input bits shift into R1 |
| 7 | the last bit arrives and `p2n` is applied as it is loaded |
| 8–15 | R1 rotates; S* bits shift into R2 |
| 15 | `n2p` ⊕ 0x63 is written into R2 |
| 16–23 | result leaves R2 LSB first (`y_valid`) |

The output register drains while the next input loads, so the S-box accepts
a new byte every 16 cycles.

## The masked S-box

### Decomposition

The masked S-box uses 254 = 49 · 26 (mod 255), so x²⁵⁴ = (x⁴⁹)²⁶. Both power
maps have algebraic degree 3. In the β = 205 normal basis, each of them is
again one Boolean function: G* for x⁴⁹ and F* for x²⁶. Both are evaluated by
a single shared block, `fg_masked`, which has a select input. Each function is
split into two cubic parts, F = Fᴬ ⊕ Fᴮ and G = Gᴬ ⊕ Gᴮ. The monomial lists
are the `F_MONS`/`G_MONS` parameters of `fg_part`, with variable classes
`RHO`.

### Sharing (`fg_part`)

A cubic monomial over 2-share inputs has 2³ = 8 terms. Each term is one
choice of share for each of its three variable classes. The variables of
each part are grouped into three classes (ρ = 0, 1, 2), plus a class 3. The
8 output shares are then indexed by a 3-bit row j = {a, b, c}:

* class 0 uses share a, class 1 uses share b, class 2 uses share c;
* class 3 uses share a ⊕ b ⊕ c.

This gives each output share a dependency on exactly one share of every input
bit. The result is a correct, non-complete sharing, which is what first-order
glitch robustness requires.

Lower-degree monomials must appear in an odd number of rows to be counted
once. They are placed only in the rows where their unused classes select
share 0.

The six cross-domain shares (rows 1–6) are refreshed with three fresh bits in
the pattern r0, r1, r2, r2, r1, r0. The 8 shares are then registered, and
compressed to two shares by XORing rows 0–3 and rows 4–7. `fg_masked` adds
the two parts together. The result is one output bit per cycle, one cycle
after the input, and uses 6 random bits per cycle.

### Timing (`sbox_masked`)

Latency is 26 cycles. Phases are counted from `start` = 0:

| phase | action |
|---|---|
| 0–7 | both input shares shift into R1; `p2n` at 7 |
| 8–15 | R1 rotates through G* (`sel` = 1); results enter R2 one cycle later |
| 16 | R1 ← {last G* bit, R2[7:1]} (write-back of x⁴⁹) |
| 17–24 | R1 rotates through F* (`sel` = 0) |
| 25 | `n2p` into R2; 0x63 is added to share 0 only |
| 26–33 | result leaves R2 LSB first |

### Pre-charge (`precharge_reg`)

A rotation of R1 changes all eight inputs of the nonlinear block at once. The
transient glitches can combine shares of the same variable. To prevent this,
the F*/G* input passes through a register that captures R1 on the falling
clock edge and is cleared asynchronously while the clock is high. The clear
input is tied to the clock. Each new value therefore starts from all-zero
inputs, half a cycle after R1 has settled.

This is the only place in the design where the clock drives logic. Static
timing and CDC tools will flag it; that is intended.

## The bit-serial AES core (`aes_bitserial`)

### Storage

The state and the key are each stored as four rows of 32-bit shift registers
(`srl32`, the LUT shift-register primitive). Each row has its own shift enable
and an addressable read port.

Row i holds bytes (i, 0), (i, 1), (i, 2), (i, 3) of the AES state matrix,
each byte LSB first. Its serial output is bit 0 of column 0. The input of
each row is chosen by a small multiplexer:

* **state rows:** recirculate, plaintext, S-box output, MixColumns output;
* **key rows:** recirculate, key, `row ⊕ S-box ⊕ rcon`, `row ⊕ read-port`.

The key-row input with the read port at address 24 reads the same bit of the
previous column. This implements w_j ^= w_{j-1} in place.

### Operations

* **ShiftRows:** row i shifts 8·i times while the other rows hold, which
  takes 24 cycles.
* **MixColumns** (`mixcol_serial`): bit-serial over 32 cycles. Bit b of
  2·a is `a[b-1] ⊕ (a[7] & 0x1b[b])`. The MSB of each byte is read through
  the rows' read port (address 7) before the byte's bits arrive. The previous
  bit and the MSB are held in 8 flip-flops.
* **S-box sharing:** one bit-serial S-box serves both the round function and
  the key schedule. AddRoundKey sits in front of it: the S-box input is
  state ⊕ key.

### Schedule (`aes_ctrl`)

A block is processed in phases. With S-box latency L (16, or 26 for the
masked core):

| phase | cycles | what happens |
|---|---|---|
| LOAD | 128 | plaintext and key bits, byte 0 first, LSB first; `load_req` high |
| SUB | 16·L + 8 | for each of the 16 bytes: state ⊕ key → S-box. The result of byte p−1 shifts back into its row while byte p is fed in. The key rows shift along, so they stay aligned |
| KEY | 4·L + 8 | SubWord(RotWord(w3)): the four bytes of column 3 are read through the read ports and sent through the S-box; results are added (with rcon in row 0) into column 0 |
| ACC | 24 | w1 ^= w0, w2 ^= w1, w3 ^= w2 in all rows at once |
| SR | 24 | ShiftRows |
| MC | 32 | MixColumns (rounds 1–9 only) |
| OUT | 128 | ciphertext = state ⊕ last round key, same bit order as the input; `ct_valid` high, `done` on the last bit |

SUB through MC repeat for rounds 1–10. The round key used in SUB is the
previous round's key (round key 0 is the cipher key). The final key addition
happens at the output.

Totals:

* unprotected: 128 + 10·(264 + 72 + 48) + 9·32 + 128 = **4384 cycles**;
* masked: 128 + 10·(424 + 112 + 48) + 9·32 + 128 = **6384 cycles**.

### Interface

1. Pulse `start` for one cycle.
2. From the next cycle, drive one plaintext and one key bit per cycle while
   `load_req` is high (128 cycles). Byte n of the block (FIPS-197 order), bit
   b is taken in cycle 8n + b of the load phase.
3. Read the ciphertext in the same order while `ct_valid` is high.

Inputs are sampled on the rising edge. The core is busy until `done`, and
starts are ignored while it is busy.

## The masked AES core (`aes_masked`)

`aes_masked` uses `aes_bitserial` with `SHARES = 2`:

* the state and key arrays, the MixColumns unit and the multiplexers are
  duplicated per share;
* the round constant enters share 0 only;
* the S-box is `sbox_masked`.

Plaintext and key are supplied as two shares, `pt_i[0] ⊕ pt_i[1]`, and the
ciphertext comes out as two shares. The six fresh random bits per cycle come
from six 31-bit LFSRs (`lfsr_prng`, x³¹ + x²⁸ + 1, one per bit, distinct
seeds). The LFSRs step on the falling clock edge so that their outputs are
stable before the rising edge that registers the F*/G* shares.

With `MASK_KEY = 0`, the key schedule is kept in a single share, which is
cheaper. The interface does not change:

* the two key shares are XORed while loading;
* only one key array is built;
* the two S-box output shares are XORed before they enter it;
* the round key is added to share 0 only.

This protects the data path but not the key schedule.

`prng_en` = 0 freezes the LFSRs. The ciphertext stays correct, but the
randomness is then constant. This mode exists for testing; it is not
secure.

## Departures from the published design

* **Cycle counts.** The round schedule above is this design's own. The
  published bit-serial cores take 4852 (unprotected) and 6852 (masked)
  cycles. These cores take 4384 and 6384, including 128 cycles to shift the
  ciphertext out. No claim is made that the published controller is
  reproduced. The LUT and flip-flop counts are likewise not those of the
  published Spartan-6 implementations.
* **Order of F* and G*.** The masked S-box evaluates x⁴⁹ first and then raises
  the result to the 26th power. The two maps commute, so the other order
  works equally well.
* **Derived matrices.** `p2n`, `n2p` and the S* truth tables are computed from
  β rather than listed. The F*/G* monomial lists are given explicitly and are
  checked against the field by `tb_fg_masked`.
* **Row inputs.** In the published datapath, plaintext, S-box results and
  key enter through the last row only, and each row feeds the next, so the
  arrays shift as one chain. Here every row has its own input multiplexer with
  all sources, and the controller addresses rows directly. This costs a few
  multiplexer inputs and keeps the schedule simple.
* **Read ports.** The state array reads bit 7 of the head byte (for
  MixColumns). The key array reads at address 24 (the previous column) and at
  16–31 (column 3, for the S-box). This fixes a concrete bit layout that the
  published description leaves open.
* **Round constant.** The round constant is generated by doubling in the
  controller, not stored.
* **Byte-serial AES.** A byte-serial AES that uses the byte-parallel S-box is
  also described in the literature. Only its S-box (`sbox_rs_parallel`) is
  included here.
* **Reset.** Reset is synchronous and active low. `srl32` rows have no reset;
  the load phase overwrites them completely.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>`, has a watchdog and ends with `$finish`.
With Verilator 5:

    verilator --binary --timing --assert \
      rtl/rs_pkg.sv rtl/aes_bs_pkg.sv tb/tb_ref_pkg.sv \
      rtl/srl32.sv rtl/mixcol_serial.sv rtl/state_array.sv rtl/key_array.sv \
      rtl/aes_ctrl.sv rtl/sbox_rs_serial.sv rtl/sbox_rs_parallel.sv \
      rtl/fg_part.sv rtl/fg_masked.sv rtl/precharge_reg.sv rtl/sbox_masked.sv \
      rtl/lfsr_prng.sv rtl/aes_bitserial.sv rtl/aes_masked.sv rtl/rotsym_top.sv \
      tb/tb_rotsym_top.sv --top-module tb_rotsym_top
    ./obj_dir/Vtb_rotsym_top

For any other testbench, replace the last file and the top module.
`tb_ref_pkg` contains the software reference: GF(2⁸) arithmetic, the S-box,
AES-128 and normal-basis power maps.

| testbench | what it checks |
|---|---|
| `tb_sbox_rs_parallel` | all 256 inputs, latency and `done` |
| `tb_sbox_rs_serial` | all 256 inputs back to back, 16-cycle spacing |
| `tb_fg_masked` | F* and G* on all inputs with random shares and randomness, against x²⁶ / x⁴⁹ in the β = 205 basis |
| `tb_precharge_reg` | zero while the clock is high, falling-edge value while low |
| `tb_sbox_masked` | all inputs with random shares; the output shares are masked |
| `tb_srl32`, `tb_mixcol_serial`, `tb_lfsr_prng` | against behavioural models |
| `tb_state_array`, `tb_key_array` | load, ShiftRows, MixColumns, one key-schedule round, against byte-level models |
| `tb_aes_ctrl` | phase order and lengths, S-box starts, round constants, at L = 16 and 26 |
| `tb_aes_bitserial`, `tb_aes_masked` | FIPS-197 vector and random blocks, cycle counts; the masked core with both key-schedule options; the masked ciphertext's share 0 is not the plain ciphertext |
| `tb_rotsym_top` | both cores and the S-box at once, at default parameters; see below |

`tb_rotsym_top` also counts each mechanism and fails if one never happens:

* S-box calls from the round function and from the key schedule;
* ShiftRows and MixColumns cycles (MixColumns must never run in round 10);
* G* and F* cycles of the masked S-box;
* cleared nonlinear inputs during every high clock phase;
* randomness changes with the PRNGs enabled, and none with them disabled.

The whole suite runs in a few seconds.

Simulation shows functional correctness only. Side-channel security depends
on placement, routing and the physical behaviour of the pre-charge register,
none of which simulation can show.
