# Second-order threshold AES-128 for large FPGAs

This is synthesizable SystemVerilog for two AES-128 encryption cores protected
against side-channel attacks up to second order. They do not save area. They
spend it on purpose, because data-centre FPGAs have millions of LUTs, so that
each S-box costs only two clock cycles and no long combinational chains.

* **Iterative core** (`ti_aes_iterative`): two cycles per round, 20 cycles per
  block, 40 masked gadgets. Two blocks can be in flight at once.
* **Pipelined core** (`ti_aes_pipelined`): AES fully unrolled into 30 stages,
  with 400 masked gadgets. It accepts a new block, under any key, in every
  clock cycle.

`aes_ti_top` places both cores side by side. They share only the clock and
the reset.

## The masking scheme

### Shares

Every secret byte is carried as **10 Boolean shares**. Its value is the XOR of
the shares. Plaintext and key must arrive already shared, and the ciphertext
leaves shared. `ti_unmask` is an XOR tree that collapses the ciphertext,
which is public. The top also brings out that collapsed value on
`*_ct_plain`. The linear parts of AES act on each share separately:
AddRoundKey, ShiftRows, MixColumns and the key-schedule XORs. The round
constant, which is public, goes into share 0 only; the affine constant 0x63
is part of the shared function computed by the second S-box gadget.

### Splitting the S-box into two cubic halves

The AES S-box is `A(x^254)` in GF(2^8), where `A` is the affine map. The
design uses

    x^254 = (x^26)^49            (26*49 = 1274 = 254 mod 255)

Both exponents have binary weight 3, so `x -> x^26` and `x -> x^49` are
Boolean functions of algebraic degree 3. A degree-3 function can be shared in
a single combinational layer (a "threshold implementation", TI) if every
output share reads only a suitable subset of the input shares. The S-box
therefore becomes two gadgets:

* **SBOX_26** = `ti_cubic_gadget #(.EXPONENT(26), .AFFINE(0))`
* **SBOX_49** = `ti_cubic_gadget #(.EXPONENT(49), .AFFINE(1))`. It computes
  `A(y^49)`. Being affine, `A` does not raise the degree.

Between the two gadgets the shares are refreshed and registered. That
register is what gives each S-box its latency of two cycles.

### Non-completeness: the covering set

The security argument needs d = 2: any two output shares of a gadget taken
together must still miss at least one input share. With degree t = 3, every
product `x_i * x_j * x_k` of three input shares must also be computed inside
one output share. Both conditions are met by a covering set: ten sets of six
share indices, `COVER[0..9]` in `aes_ti_pkg`. Output share k may read only
the shares in `COVER[k]`.

* Every set of three share indices lies inside some `COVER[k]`.
* No two sets together contain all ten shares.

`tb_ti_cubic_gadget` checks both properties. It also checks by simulation
that flipping an input share outside `COVER[k]` never changes output share k.
The sets are this design's own. The original work states only that a
10-in/10-out solution exists. Its 7-share optimum would need 35 output
shares, and 9 shares would give 12 output shares and an irregular datapath.

### How a gadget is computed

Conceptually, the gadget takes the algebraic normal form (ANF) of the
function and shares every monomial over the 10 input shares. Each resulting
cross term goes to the first output share whose `COVER` set holds all of that
term's share indices. Writing out all those monomials term by term would be
impractical. Instead, the RTL uses an identity. For a cubic `F`, the XOR of all
cross terms whose share indices form exactly the set T is

    g_T = XOR over U subset of T of F(XOR of x_u for u in U)

and `g_T = 0` for |T| > 3. Each output share is therefore an XOR of 8-bit
table look-ups `F(x_a ^ x_b ^ x_c)` over the 175 share subsets U of size 1
to 3. Output share k takes the subsets that lie under an odd number of the
sets T it owns. The selection matrix `CSEL` and the 256-entry tables are
computed at elaboration time by functions in `aes_ti_pkg`, from
GF(2^8) arithmetic. No data files are involved. The result is the same Boolean
function as the term-by-term construction. Every look-up reads only shares
inside its output share's `COVER` set, so non-completeness holds structurally.

### Refresh

`ti_refresh` re-randomises a shared byte after each gadget, before the
register, and after the round's linear layer. Every data bit gets
**12 random bits** (f(s) = 12), so 96 bits per byte. Bits 0..9 form a ring:
share i receives `r[i] ^ r[i+1 mod 10]`. Bits 10 and 11 are chords, onto
shares 0/5 and 2/7. Each random bit enters exactly two shares, so the value
is unchanged. Only the number 12 comes from the original work. The wiring is
this design's own choice, and it has not been evaluated for leakage.

The randomness comes in on ports (`rnd`, `rnd_round`, `rnd_final`). It must
come from a true random source outside this RTL and be fresh every cycle. The
iterative core needs 3,840 bits per cycle and the pipeline 53,760. The field
layout is given by the structs `iter_rnd_t`, `pipe_round_rnd_t` and
`pipe_final_rnd_t`.

## Iterative core

One shared byte lane of the datapath, per cycle:

    cycle 1:  reg_a ^ round key -> SBOX_26 -> refresh -> reg_b
    cycle 2:  reg_b -> SBOX_49 -> ShiftRows -> MixColumns(en) -> refresh -> reg_a

There are 16 state lanes. The key schedule runs beside them at the same pace:
RotWord of the last key word feeds 4 SBOX_26 gadgets, then a refresh, the key
register b, 4 SBOX_49 gadgets and a refresh. The XOR layer (`ti_key_xorlayer`,
`w0' = w0 ^ t ^ rcon`, `w1' = w1 ^ w0'`, ...) then writes the next round key
into the key register. MixColumns has an enable, so the final round needs no
third multiplexer input. The ciphertext is the XOR of reg_a and the key
register after the tenth round: the AddRoundKey at reg_a's output.

**Two blocks in flight.** A block stays in one of the two registers for a
single cycle, so the other register is free for a second block. `ti_iter_ctrl`
runs this schedule:

| cycle (`cyc`)        | slot A              | slot B                 | key register |
|----------------------|---------------------|------------------------|--------------|
| 0                    | reg_a, round 0 first half | loaded (optional) | k0           |
| 2r / 2r+1            | round r             | one stage behind       | k_r; k_{r+1} loaded at end of 2r+1 |
| 19                   | last round, MixColumns off | -              | k10 loaded   |
| 20                   | **ciphertext out**  | last round, MixColumns off | k10      |
| 21                   | -                   | **ciphertext out**     | -            |

Both slots use the same key. A block taken at clock edge e has its ciphertext
on `ct` with `ct_valid` after edge e + 20, that is 21 cycles after the cycle
it was presented in. The interface is valid/ready:

* `in_ready` is high when the core is idle.
* `in_ready` is also high in the cycle right after slot A was taken, for
  slot B.
* `in_ready` is also high in the cycle of the last output, so a new operation
  can overlap it.

`ct_slot` says which slot is on the output.

## Pipelined core

The pipeline has 30 stages:

* **Stage 0** (combinational): plaintext XOR key.
* **Main rounds 1-9** (`ti_pipe_round`), three register stages each:
  * **a**: SBOX_26 and refresh, on the 16 state lanes and the 4 RotWord key
    lanes.
  * **b**: SBOX_49 and refresh.
  * **c**: ShiftRows and MixColumns. The output of the XOR layer, the next
    round key, is added to the state, which is then refreshed. The key lanes
    are refreshed for the next round.
* **Final round** (`ti_pipe_final`): stage fa is SBOX_26 and refresh. Stage
  fb is SBOX_49, then ShiftRows, then XOR with round key 10. It has no
  MixColumns and no refresh.

Each stage holds at most one gadget layer plus XORs, so the critical path is
close to that of a single gadget. The full round key travels through every
register beside the state, so each block may use its own key. There are
29 register layers: a block presented in cycle 1 leaves in cycle 30, and a
new block can enter every cycle. A valid bit travels with each block. The
pipeline never stalls.

## Where this design departs from, or fills in, the original description

* **Covering set, refresh wiring, table-based gadget evaluation**: this
  design's own, as explained above.
* **Randomness per refresh.** The published figures give each byte refresh
  `8*f(s)` random bits. The published per-block total of 600 bytes counts
  only `f(s)` per refresh. This design follows the figures. The iterative core
  therefore consumes 3,840 bits per cycle, not 480.
* **Key-path refresh after the XOR layer.** The refresh of key lane j after
  the XOR layer is done by refreshing the S-box output of lane j before it
  enters the XOR chain. This adds one mask to byte j of all four key words.
  The pipeline evaluates the XOR layer twice: once unrefreshed, for the
  state, and once refreshed, for the next round.
* **Latencies.** The iterative core: 20 cycles from load to output, as
  published. The pipeline: 30 stages, but stage 0 has no register, so it has
  29 register layers. No extra output register was added to make the count
  30.
* **Key register b of the iterative core** holds only the four S-box lanes,
  which is 320 bits, not a full 1,280-bit copy of the key. The XOR layer reads
  the round key, which is still in key register a. The function is the same
  and fewer flip-flops are needed. The published description counts four
  full-width registers.
* **Handshake, reset, valid bits**: this design's own. Reset is synchronous
  and active low, and resets only the control and valid flags. The data
  registers have no reset.
* **Not included**: the masking of plaintext and key (assumed done
  upstream), the random number generator, and the FPGA mapping itself. The
  published LUT counts and clock rates come from a vendor synthesis of the
  gadgets, and this RTL makes no claim to reproduce them.

## Files

| file | contents |
|------|----------|
| `rtl/aes_ti_pkg.sv` | share types, randomness structs, covering set, GF(2^8) and table functions, ShiftRows/MixColumns helpers |
| `rtl/ti_cubic_gadget.sv` | SBOX_26 / SBOX_49 threshold gadget |
| `rtl/ti_refresh.sv` | 12-bit-per-bit refresh of a shared byte |
| `rtl/ti_shiftrows.sv`, `rtl/ti_mixcolumns.sv`, `rtl/ti_key_xorlayer.sv` | linear layers on shares |
| `rtl/ti_iter_ctrl.sv`, `rtl/ti_aes_iterative.sv` | iterative core |
| `rtl/ti_pipe_round.sv`, `rtl/ti_pipe_final.sv`, `rtl/ti_aes_pipelined.sv` | pipelined core |
| `rtl/ti_unmask.sv` | XOR-tree collapse |
| `rtl/aes_ti_top.sv` | both cores |
| `tb/aes_ref_pkg.sv` | plain AES-128 reference model and random sharing helpers |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build one with Verilator 5, for example:

    verilator --binary --timing --assert -j 4 -Mdir obj \
        rtl/*.sv tb/aes_ref_pkg.sv tb/tb_aes_ti_top.sv --top-module tb_aes_ti_top
    ./obj/Vtb_aes_ti_top

The testbenches compare against `aes_ref_pkg`. That model is written
independently of the RTL: the S-box comes from an inverse search and the
bit-wise affine map. They also use the FIPS-197 example vectors (C.1 cipher,
A.1 key expansion) and random blocks under random sharings and fresh
randomness. `tb_aes_ti_top` runs both cores at full size at the same time. It
checks:

* every ciphertext and every latency;
* the iterative core's single-block, two-block, refused-while-busy and
  overlapped-start cases;
* the pipeline's back-to-back and gap cases.

The full design takes several minutes to build (the C++ compile of the 440
gadgets dominates), and the simulation takes seconds.

**How far it has been verified.** All blocks have been verified functionally,
and the non-completeness of the gadgets has been verified structurally. No
leakage assessment has been done, such as a t-test on simulated or measured
traces. The refresh wiring in particular is an unevaluated choice.

## Changing it

* The share count `NS` and the covering set `COVER` belong together. Changing
  `NS` needs a new covering set with the two properties above. The share-subset
  tables (`CSEL`) are derived from it automatically.
* `RB` (random bits per shared bit) can be raised. `ti_refresh` adds each bit
  beyond `NS` as a chord between shares `2m` and `2m + NS/2`.
* Table look-ups can be replaced by any other implementation of
  `pow_table`. Every look-up is on a sum of at most three shares.
