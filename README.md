# QARMA-128 with concurrent error detection

QARMA is a lightweight tweakable block cipher. It is used for memory encryption
and pointer authentication. This RTL implements the 128-bit member, QARMA-128,
as an unrolled pipeline. The pipeline accepts one block per clock and can
encrypt or decrypt each block. Every operation that could silently corrupt a
ciphertext has a cheap check beside it:

* Every S-box has a predicted signature. Three variants are provided: a one-bit
  parity, an interleaved parity and a CRC-3.
* Every S-box is also recomputed with its two input nibbles swapped.
* Every MixColumns has a column-parity check.
* Every tweakey addition has a cell-parity check.

The flags of each check travel down the pipeline with their block. They come
out next to the result. A flag that is set means the block was computed by
faulty hardware, whether the fault was natural (an SEU or a defect) or injected
on purpose.

## The cipher as built

The state is sixteen 8-bit cells, s0 to s15. Cell 0 is the most significant
byte. The cells form a 4x4 array in row-major order. The 256-bit key is
`w0 || k0`: `w0` is the whitening key and `k0` is the core key. The
orthomorphism `o(x) = (x >>> 1) ^ (x >> 127)` gives the second whitening key,
`w1 = o(w0)`.

A forward round `F` does four things in order:

1. AddRoundTweakey: XOR with the core key, the current tweak and a round
   constant.
2. ShuffleCells: `tau = [0,11,6,13,10,1,12,7,5,14,3,8,15,4,9,2]`.
3. MixColumns: each column is multiplied by the involutory matrix
   `M8 = circ(0, rho, rho^4, rho^5)`, where `rho^i` rotates a cell left by
   `i` bits.
4. SubCells: an 8-bit S-box on every cell.

A backward round `F'` is the exact inverse: S, M, tau^-1, then the tweakey
addition. The S-box and M are both involutions, so a backward round reuses the
same hardware as a forward one.

The tweak is updated once per round. The step permutes the cells by
`h = [6,5,14,15,0,1,2,3,7,12,13,4,8,9,10,11]`. Cells 0, 1, 3, 4, 8, 11 and 13
are then clocked through the LFSR `(b7..b0) -> (b0^b2, b7..b1)`.

| pipeline stage | operation | key material |
|---|---|---|
| 0 | `P ^ w0`, short forward round (tweakey add, S) | `k0 ^ T` |
| 1 .. r-1 | forward round i | `k0 ^ T_i ^ c_i` |
| r | central forward round | `w1 ^ T_r` |
| r+1 | pseudo-reflector `tau^-1(Q·tau(x) ^ k1)`, then central backward round | `k1`, then `w0 ^ T_r` |
| r+2 .. 2r | backward round i = r-1 .. 1 | `k0 ^ alpha ^ T_i ^ c_i` |
| 2r+1 | short backward round (S, tweakey add), then `^ w1` | `k0 ^ alpha ^ T` |

`T_i` is the tweak after `i` update steps. Backward stages apply the inverse
update. `Q` is the same matrix as `M8`. For encryption, `k1 = k0`.

Decryption uses the same stages with rearranged keys: `w0` and `w1` are
swapped, the core key becomes `k0 ^ alpha` and the reflector key becomes
`Q·k0`. The tweak is unchanged. The rearrangement happens in
`qarma_keysched`. It works because adding `alpha` swaps the forward and
backward round keys, and because `Q` is an involution.

## The 8-bit S-box and its checks

The 8-bit S-box is two copies of the 4-bit involution
`sigma = [A,D,E,6,F,7,3,5,9,8,0,C,B,1,2,4]`, one per nibble. Two
constructions are provided.

**Logic gates (`qarma_sigma4`), the default.** Each output bit is a short
sum of products with one XOR. Here `~` is NOT, `|` is OR and `^` is XOR:

```
nu0 = mu2(~mu1 | ~mu3) | ~mu1(mu3 ^ mu0)
nu1 = ~mu0(~mu3 | mu2) | ~mu3(mu1 ^ mu2)
nu2 = mu0(~mu3 | mu1)  | ~mu3(mu1 ^ mu2)
nu3 = ~mu1(~mu2 | ~mu0) | ~mu2(~mu3 ^ mu0)
```

**Table (`qarma_sbox4_lut`, `USE_LUT = 1`).** This suits FPGAs and
memory-based builds. Each of the 16 words holds `sigma(x)` together with its
six check bits, so reading the output also reads its signature.

### Signature prediction

`qarma_sig_pred` predicts the check bits of the S-box output from the
S-box input. It is a separate two-level circuit that never computes the output
itself. The checker then computes the same bits from the actual output and
compares. Each scheme raises its own flag for each nibble:

| scheme | check bits of output `nu` | catches |
|---|---|---|
| one-bit signature | `p0 = nu0^nu1^nu2^nu3` | odd-weight errors |
| interleaved | `p1 = nu0^nu2`, `p2 = nu1^nu3` | bursts of adjacent bits |
| CRC-3 | remainder of `nu(x)` mod `x^3+x+1`: `nu0^nu3`, `nu1^nu3`, `nu2` | most multi-bit errors |

The predicted bits in terms of the input are:

```
p0 = mu3 mu2 | ~mu1 mu0 | ~mu3 ~mu2 mu1 ~mu0
p1 = ~mu3 ~mu2 mu1 | (mu3 ^ mu1) ~mu0 | mu3 mu1 mu0 | mu3 mu2 ~mu1
p2 = ~mu2 mu0 | mu3 ~mu2 ~mu1 | ~mu3 ~mu1 mu0 | mu2 mu1 ~mu0
p3 = ~mu2(mu3 ^ ~mu0) | mu2(~mu3 mu1 | ~mu1 mu0)
p4 = ~mu2 mu0 | ~mu1(mu3 ~mu2 | ~mu3 mu0) | mu2 mu1 ~mu0
p5 = mu0(~mu3 | mu1) | ~mu3(mu2 ^ mu1)
```

The testbenches check all of these exhaustively against the sigma table.

### Recomputation with swapped operands

`qarma_sbox8_recomp` does not depend on how the S-box is built. It swaps the
input nibbles and passes them through a second pair of sigma instances. It then
swaps the result back and compares it with the output of the S-box under test.
A fault in either instance of the checked S-box meets a different, fault-free
instance in the recomputation. So the check catches every fault that changes
the output, whether transient or permanent.

Here the recomputation uses its own sigma pair in the same cycle. A
time-redundant version would reuse the S-box under test in a second cycle,
which halves the throughput unless the design is sub-pipelined.

### MixColumns and tweakey checks

A rotation keeps a cell's parity, and every input cell of a column reaches
exactly three output cells of that column. So the parity of an output column
equals the parity of the input column. `qarma_mixcol_ed` compares the two
parities for each column, and the reflector's `Q` is checked the same way. XOR
is linear, so `qarma_ark_ed` predicts the parity of each output cell from the
parities of its four operands. Both checks miss errors of even weight.

## Interface of `qarma128_ed`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset that clears only the valid bits |
| `in_valid` | in | 1 | a block is presented this cycle |
| `in_decrypt` | in | 1 | 0 = encrypt, 1 = decrypt |
| `in_data` | in | 128 | plaintext or ciphertext |
| `in_tweak` | in | 128 | tweak |
| `in_key` | in | 256 | `{w0, k0}` |
| `fault` | in | `fault_t` | fault injection: stage, site (S-box input / MixColumns output / tweakey output), cell, stuck-at-0 and stuck-at-1 masks; hold `fault.en` low in use |
| `out_valid`, `out_data` | out | 1, 128 | result, exactly `2R+2` cycles after its input |
| `out_err` | out | `ed_flags_t` | `{par, ilv, crc, rec, mc, ark}`, each ORed over all stages the block passed |

There is no back-pressure, and a new block may enter every cycle. Key, tweak
and mode travel with each block.

The parameters are:

* `R`: number of rounds on each side. Default 11, giving 24 stages.
* `USE_LUT`: 0 for gate S-boxes, 1 for table S-boxes.
* `ED_EN`: a mask that enables the schemes one by one. A disabled flag stays 0,
  and synthesis then removes its checking logic. This gives the single-scheme
  configurations.

## Choices of this implementation

These points are not fixed by the published construction, or were read in one
particular way:

* **Round count.** `R = 11` is the value usually recommended for QARMA-128. It
  can be set from 2 to 12.
* **Round constants and alpha.** These are consecutive 128-bit words of the
  fractional hexadecimal digits of pi: `alpha` is word 0, `c_i` is word `i` and
  `c_0 = 0`. The pipeline is self-consistent and decrypts what it encrypts.
  It has not been checked against reference QARMA-128 test vectors, and other
  implementations will give different ciphertexts until the reference
  constants are put in `qarma_pkg`.
* **Tweak LFSR.** The LFSR polynomial `(b0^b2, b7..b1)` is the one of the QARMA
  family. Which cells it updates is fixed by the construction.
* **8-bit S-box.** It is sigma on each nibble. One description of the QARMA-128
  S-box mentions rotated wiring between the two 4-bit S-boxes. That wiring is
  not modelled here, because the nibble-swap recomputation only gives the same
  result when both halves are the same sigma.
* **Decryption tweak.** Decryption uses the tweak as given. A description that
  multiplies the tweak by Q in decryption was not followed, because on this
  datapath only the unchanged tweak inverts encryption.
* **Pipelining.** The reference FPGA results imply one block per clock. One
  register per round is this design's choice. The checks are computed in the
  same cycle as the round they watch. This adds logic depth but no cycles.
  There are no extra sub-round registers between the S-boxes and their
  checkers. Such registers would shorten the clock period at the cost of
  latency.
* **Check granularity.** The parity checks on MixColumns and on the tweakey
  addition are one bit per column and one bit per cell.
* **Fault port.** The `fault` port exists for evaluation. On the gate S-box it
  forces the sigma inputs while the predictor sees the clean input. On the
  table S-box it forces the bits read out of the table.

## Measured fault coverage

`tb_qarma_coverage` runs a stuck-at campaign on one 8-bit S-box:

* **Single stuck-at faults on the outputs.** All 2048 faults that change the
  output are caught by the one-bit, interleaved and CRC-3 signatures.
* **Single stuck-at faults on the inputs.** All 2048 faults that change the
  output are caught by the recomputation.
* **50,000 random multiple stuck-at faults on the inputs.** The shares of
  output-changing faults caught are:
  * one-bit signature: 64.3 %
  * interleaved signature: 89.3 %
  * CRC-3: 97.6 %
  * recomputation: 100 %

These numbers depend on the fault distribution, which is uniform over 2 to 8
forced bits here.

## Files and simulation

`rtl/`: `qarma_pkg` (types, constants, tau, h, M8), `qarma_sigma4`,
`qarma_sbox4_lut`, `qarma_sig_pred`, `qarma_sbox8_ed`, `qarma_sbox8_recomp`,
`qarma_subcells`, `qarma_mixcol_ed`, `qarma_ark_ed`, `qarma_tweak_upd`,
`qarma_keysched`, `qarma_fwd_round`, `qarma_bwd_round`, `qarma_reflector` and
the top `qarma128_ed`.

`tb/`: one self-checking testbench per module (`tb_<module>`). Also:

* `tb_qarma128_variants`: all scheme configurations side by side, at R = 2.
* `tb_qarma_coverage`: the fault campaign.
* `qarma_ref_pkg`: a behavioural reference model. It writes decryption as the
  literal inverse of encryption, not through the key rearrangement.

`tb_qarma128_ed` runs the top at its default size. It streams 200 random
blocks, decrypts the ciphertexts, checks the 24-cycle latency and injects 600
faults. Every testbench prints `TB_RESULT checks=N failures=M`.

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/qarma_pkg.sv \
          tb/tb_qarma128_ed.sv --top-module tb_qarma128_ed -o sim
./obj_dir/sim
```
