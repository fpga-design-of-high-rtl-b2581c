# Layered QC-LDPC decoder with imprecise offset min-sum check nodes

This is a fully layer-parallel decoder for a rate-1/2, (3,6)-regular
quasi-cyclic LDPC code of length 1296. Its main idea sits in the check-node
rule. Offset min-sum (OMS) with an offset of 1 subtracts 1 from every
check-to-variable magnitude. This design instead clears the least
significant bit of the magnitude. That is "partially offset" min-sum
(POMS): odd minima lose 1, even minima are unchanged.

Clearing that bit has three effects:

* Check-node messages become 3 bits (sign + 2-bit magnitude) instead of 4.
  The message memory and the wiring shrink by a quarter.
* The minimum of 2-bit values needs no comparator tree. A few AND gates
  compute it.
* In the imprecise variant (I-POMS) even the last correction signal is
  dropped. The whole magnitude path of a degree-6 check node is then two
  small AND networks.

I-POMS is the default check-node unit. POMS is selected with a parameter.

One frame takes 20 iterations × 3 layers × 2 cycles = 120 clock cycles.
Throughput is therefore 1296 · f / 120 bits per second. At 223 MHz that is
2.41 Gb/s; at 181 MHz it is 1.95 Gb/s. These clock rates are the ones
reported for an FPGA implementation of this architecture. They were not
measured for this RTL.

## The check-node rule

Each check node has degree 6. Each of its incoming messages α is first
clipped to the 4-bit range −7..+7. The node keeps only the sign of the
clipped value and `a = |α_sat| >> 1`, a 2-bit value from 0 to 3. For
edge n, the outgoing message is:

* sign: the XOR of the other five signs;
* magnitude: `2 · min(a of the other five)` for POMS.

The magnitude is stored as the 2-bit value `min`. Its implied LSB is 0.

**Exact minimum from ANDs (POMS, `cnu_poms`).** Over the other five inputs,
define three signals:

* `AndMsb`: the AND of bit 1 of each input.
* `AndLsb`: the AND of bit 0 of each input.
* `Detect_0`: 0 if any of them is zero, 1 otherwise.

The magnitude is then:

| Detect_0 | AndMsb | AndLsb | magnitude | why |
|---|---|---|---|---|
| 1 | 0 | 0 | `01` | no zero, some input has MSB 0 (a 1), some has LSB 0 (a 2): min is 1 |
| any other combination | | | `{AndMsb, AndLsb}` | the ANDs are the minimum |

Every combination gives the exact minimum. `tb_cnu_poms` checks this for
all 2^18 input patterns.

**Imprecise minimum (I-POMS, `cnu_ipoms`).** The I-POMS unit drops
`Detect_0`. It first remaps each input with `a* = (a == 2) ? 1 : a`. In
gates, that is `a*[1] = a[1] & a[0]` and `a*[0] = a[1] | a[0]`. The
magnitude is then `{AND of other a*[1], AND of other a*[0]}`. This equals
the POMS magnitude except in one case: every other input is ≥ 2 and at
least one of them is exactly 2. There, I-POMS gives 1 where POMS gives 2.

**Gate sharing.** The six "AND of all but me" products of one bit come from
`and_excl`. It uses a prefix chain and a suffix chain and needs 12 two-input
ANDs for six inputs. I-POMS needs two such circuits, so 24 AND gates, plus
the a → a* remap. POMS needs three.

## Numbers and saturation

| quantity | width | range / encoding |
|---|---|---|
| channel LLR (loaded) | 4 bits | two's complement, −8..7; positive means bit 0 |
| a-posteriori LLR γ | 6 bits | two's complement, saturated to ±31 |
| variable-to-check α = γ − β | 6 bits | saturated subtraction (`vnu`) |
| CNU input | 3 bits | sign + `min(|α|,7) >> 1` (`sat`) |
| check-to-variable β | 3 bits | sign + 2-bit magnitude; value ±2·mag (`ldpc_pkg::beta_t`) |
| γ update = α + β | 6 bits | saturated addition (`ap_llr`) |

Before `vnu` and `ap_llr` use a 3-bit β, they widen it to 4 bits by
appending a zero LSB. A zero α counts as positive.

With 4-bit channel LLRs and β of at most ±6 per layer, |γ| stays at 26 or
below. The 6-bit saturation logic is still present, and it is tested in
the unit benches.

## Layered schedule and data path

The parity-check matrix comes from a 12 × 24 base matrix expanded by
Z = 54. Each base entry is a 54 × 54 cyclically shifted identity. The 12
base rows form 3 layers of 4 rows. Every base column has exactly one entry
in each layer, and every base row has six.

A whole layer is processed at once:

* 4 × 54 = 216 check nodes;
* 24 × 54 = 1296 edges;
* every variable node exactly once.

```
 gamma_memory ──► per_r ──► bs_r ×24 ──► vnu ×24 ──► sat ×24 ──► 216 CNUs
   (1296×6b)     (by layer)  (shift)    γ−β            clip      (POMS/I-POMS)
      ▲                                  ▲  │                          │ β_new
      │                                  │  └──────► ap_llr ×24 ◄──────┤
      │                           beta_memory          │ α+β_new       │
      │                           (3 × 3888b)          ▼               ▼
      └──── per_w ◄── bs_w ×24 ◄────────────── result registers ◄──────┘
```

**Slots.** The 24 processing lanes ("slots") are numbered k = 6r + e: base
row r (0..3) of the current layer, and edge e (0..5) of that row.

**Read side.** While layer l is processed:

* `per_r` routes column block `COL(l,k)` to slot k.
* `bs_r` rotates the slot's 54 values by the circulant shift:
  `out[i] = in[(i+s) mod 54]`. Lane i then holds the variable that check
  node i of that row block uses.
* The check node for base row r, lane i, takes lane i of slots 6r..6r+5.

**Write side.** `bs_w` and `per_w` undo the rotation and the permutation.

**Message memory.** Messages in `beta_memory` stay in slot order, so they
need neither rotation nor permutation. This is one of the savings the
3-bit messages bring: only the γ path has shifters.

**Two cycles per layer.** The controller (`controller`) drives two enables:

1. `En_read` cycle: γ is read from registers. β is read from
   `beta_memory`, whose synchronous-read address was issued one cycle
   earlier. The whole chain VNU → SAT → CNU → AP-LLR settles, and the new γ
   (still in slot order) and the new β are registered.
2. `En_write` cycle: the registered γ goes through `bs_w` and `per_w` into
   `gamma_memory`, and β is written to this layer's word of `beta_memory`.
   In the same cycle, the next layer's β word is read.

The critical path is the read cycle:

```
per_r mux → barrel shifter → 6-bit subtractor → clip → AND network → 6-bit adder
```

The write cycle holds only the inverse shifter and mux. `gamma_memory` is a
register array (7776 bits), because it is read in the cycle right after it
is written. `beta_memory` holds one 3888-bit word per layer, 11664 bits in
all, which maps naturally onto block RAM. Counting its output register as flip-flops, the design has about 23,340 of them: γ memory 7776, result registers 7776 + 3888, β read register 3888, and the controller. This is close to the 23,352 slice registers reported for the FPGA implementation.

**Initial messages.** The initial value β = 0 is not written into the
memory. Instead, the controller's `first_iter` flag replaces the read
messages with zeros during the first iteration. This lets frames run back
to back without a clearing pass.

## Base matrix

The architecture fixes the shape of the base matrix, but this design
chooses its entries. They are defined by formula in `ldpc_pkg`:

```
COL(l,k)   = (k · {1,5,7}[l] + {0,1,3}[l]) mod 24          column block of slot k in layer l
SHIFT(l,k) = (7 · COL(l,k) · (l+1) + 11·l + 5·k) mod Z     circulant shift
```

The multipliers 1, 5 and 7 are coprime with 24. Each layer therefore uses
every column block once, and `per_r`/`per_w` are true permutations. The
resulting 648 × 1296 matrix has no 4-cycles.

To decode a different code with the same shape, replace `col_of` and
`shift_of`. The permutation networks and the shift lookup in
`ldpc_decoder` are generated from those two functions. The testbench's
reference model also uses them.

## Interface and timing (`ldpc_decoder`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset (controller only) |
| `load_i`, `load_blk_i[4:0]`, `load_llr_i[Z]` | in | write the 54 channel LLRs of column block `load_blk_i` (code bits 54·blk … 54·blk+53); idle only |
| `start_i` | in | start decoding the loaded frame; idle only |
| `busy_o` | out | high for exactly 120 cycles, from the cycle after `start_i` |
| `done_o` | out | one-cycle pulse after the last write |
| `app_llr_o[24][Z]` | out | a-posteriori LLRs; `[c][i]` is code bit 54·c + i |
| `hard_o[24]` | out | hard decisions, 1 where the LLR is negative |

A frame is handled in four steps:

1. Load the frame: 24 cycles, one column block per cycle.
2. Pulse `start_i`.
3. Wait for `done_o`.
4. Read the outputs. They stay valid until the next load or start.

Assertions in the top flag a load or start while busy.

Parameters:

* `Z` (default 54): expansion factor. Smaller values give a smaller code
  for quick experiments.
* `N_ITER` (default 20): iterations per frame.
* `IMPRECISE` (default 1): 1 selects I-POMS, 0 selects POMS.

The constants in `ldpc_pkg` fix the code shape:

* 24 base columns;
* 3 layers of 4 rows;
* check-node degree 6;
* bit widths 6/4/3.

## Choices made here that the architecture leaves open

The architecture leaves these points open:

* the base-matrix entries (see above);
* the load/start/done interface and the bit ordering of the outputs;
* symmetric saturation (±31, ±7);
* the sign of a zero message (positive);
* the circulant direction convention;
* the logarithmic barrel shifters (stage b rotates by 2^b mod Z);
* the register-based γ memory, the synchronous-read β memory, and the
  first-iteration zeroing in place of clearing;
* the fixed iteration count (there is no early stop on a satisfied
  syndrome).

The MS and OMS decoders are the reference points that POMS and I-POMS are
measured against. They are not included. The resource and clock figures
quoted above belong to an FPGA implementation and have not been reproduced
with this RTL.

## Verification

Each block has a self-checking bench in `tb/`. Each bench prints
`TB_RESULT checks=… failures=…`.

* `tb_cnu_poms`, `tb_cnu_ipoms`: every one of the 2^18 input patterns,
  checked against a loop-computed minimum. The I-POMS bench also checks
  that it deviates from the exact minimum exactly in the predicted case.
* `tb_sat`, `tb_vnu`, `tb_ap_llr`: exhaustive over the value ranges,
  including saturation.
* `tb_bs_r`, `tb_bs_w`: every shift at Z = 54, plus a check that `bs_w`
  inverts `bs_r`.
* `tb_per_r`, `tb_per_w`: every layer mapping, checked against the
  formula, plus the round trip through both networks.
* `tb_gamma_memory`, `tb_beta_memory`, `tb_controller`: load and write
  behaviour, read latency, and a cycle-by-cycle check of the control
  sequence, including 120 busy cycles and `start` ignored while busy.
* `tb_ldpc_decoder`: full size, with an I-POMS decoder and a POMS decoder
  side by side. Three frames are decoded back to back: a noisy all-zero
  codeword, random LLRs, and strong LLRs. Every output LLR of both decoders
  is compared with `ldpc_ref_pkg`. That package is a plain
  check-node-by-check-node software model of layered POMS/I-POMS, which
  shares only the base-matrix functions with the RTL.
  - It checks the 120-cycle decode time.
  - It checks that the noisy codeword decodes to all zeros.
  - It counts how often each mechanism fired, and fails if one never did:
    4-bit clipping, the POMS `Detect_0` case, an I-POMS deviation, an odd
    minimum (the partial offset), negative messages, and a
    frame decoded over stale messages.
* `tb_ldpc_fer`: a small error-rate run. The all-zero codeword is sent as
  BPSK over Gaussian noise at Eb/N0 = 2.0, 2.5 and 3.0 dB, 8 frames per
  point. The LLRs are 2y/σ², rounded to 4 bits. Both rules are decoded and
  checked against the model, and bit/frame error counts are printed. With
  this design's base matrix, 2.0 dB left 2 of 8 frames in error for POMS
  and 6 of 8 for I-POMS. At 2.5 dB and above, no errors remained.
* `tb_ldpc_decoder_full`: one complete decode with the decoder at its
  default parameters, checked against the model.

Running a bench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv \
    tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder -o sim && ./obj_dir/sim
```

Unit benches need only `rtl/ldpc_pkg.sv` ahead of the bench file. The
full-size decoder takes a few minutes to compile; simulating it takes well
under a second.
