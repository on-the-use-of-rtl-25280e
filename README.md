# Hard-decision LDPC decoding for 2-bit MLC NAND flash

Soft-decision LDPC decoders in flash controllers need several sensing passes per
read to gather soft information. That is slow. This design corrects the
codewords with a bit-flipping (BF) decoder instead. It needs one hard read per
page, runs one full decoding iteration per clock, and gets extra correcting
power from a property of MLC flash: stored charge only leaks away.

With 2 bits per cell and Gray-coded states ordered by stored charge

    11  <  10  <  00  <  01        (erased ... most charge)

a retention error moves a cell exactly one state down. Some read values can
therefore be trusted. `01` cannot be produced by leakage at all. `00` can only
have been `01`, so its MSB is correct. `10` can only have been `00`, so its LSB
is correct. `11` can only have been `10`, so its MSB is correct. Before
decoding, a small combinational pre-processor marks each such bit as
*reliable*. The decoder then never flips a reliable bit. This is the "adapted"
decoder: A-GDBF, or A-PGDBF for the probabilistic version.

| read (MSB LSB) | MSB reliable | LSB reliable |
|---|---|---|
| 0 1 | yes | yes |
| 0 0 | yes | no |
| 1 0 | no | yes |
| 1 1 | yes | no |

so `I_MSB = ~(MSB & ~LSB)` and `I_LSB = MSB ^ LSB`.

## Data path

```
 flash cells ──(MSB,LSB) x 8 per beat──► preproc ──y[N], I[N]──► abf_decoder ──► decoded word
  (valid/ready)                        8 x rel_unit              N x vn_unit
                                       codeword buffers          M x cn_unit
                                                                 max_finder
                                                                 bernoulli_rng
```

`mlc_bf_system` is the top. It chains the pre-processor and the decoder. The
flash array is not part of the RTL. `tb/mlc_flash_model.sv` is a behavioural
model of it for simulation.

## The code

The default code has length N = 1296 and rate 0.75, and it is regular. Every
bit is in d_v = 3 checks and every check covers d_c = 12 bits, so there are
M = 324 checks. The matrix H is a 3 × 12 array of 108 × 108 circulant
permutation matrices. Block (i, j) is the identity rotated by
`s(i,j) = (i·j) mod 108`. This array-code construction has no 4-cycles at this
size. H is the design's own choice, because no particular matrix was given.
The rows of each block row add up to the all-ones vector, so some checks are
linearly dependent: H has rank 320. The true dimension is therefore 976
instead of 972, a rate of 0.753.

Its minimum distance is small: weight-6 codewords exist, as in every
column-weight-3 array code. At higher error rates a decoder can therefore
converge to a wrong codeword that is six bits away, and still report success.
Use a stronger matrix for error-rate studies.

`rtl/ldpc_pkg.sv` holds the geometry and the two index functions that wire the
Tanner graph at elaboration time:

- `cn_nbr(m,k)` gives the VN on edge k of check m.
- `vn_nbr(n,e)` gives the check on edge e of VN n.

To use a different quasi-cyclic code, change `shift()` and the `Z`/`DV`/`DC`
parameters.

## The decoder (`abf_decoder`): one iteration per clock

All N variable nodes and M check nodes exist in hardware, wired along the graph.
In each clock of a decode:

1. **Check nodes** (`cn_unit`): `c_m = XOR` of the check's 12 VN values. If
   every `c_m` is 0, the word is a codeword and the decode ends with
   `success = 1`.
2. **Energy** (`vn_unit`): `E_n = (v_n XOR y_n) + Σ c_m` over the bit's 3
   checks. `y_n` is the value read from the flash. The energy lies between 0
   and 4 and is held in 3 bits.
3. **Maximum** (`max_finder`): `E_max = max_n E_n` over all N bits, reliable bits
   included. There are only 8 possible levels. The finder therefore ORs a
   "level present" flag per level over all N inputs and takes the highest
   level that is set. This is much smaller than a comparator tree.
4. **Flip**: bit n flips when `I_n = 0`, `E_n = E_max` and, in probabilistic
   mode, its random bit `R_n = 1`. In deterministic mode (GDBF) `R_n` is
   ignored.

The random bits come from `bernoulli_rng`, which has one 16-bit xorshift
generator per VN. It outputs `R_n = (low 8 bits of state) < p_thr`, so
`p = p_thr / 256`. The generators are seeded from `seed` and the VN index when a
decode starts, and they advance once per flip step. Only the Bernoulli(p)
behaviour is prescribed. The generator type is the design's own choice.

**Why the probabilistic flip and the reliability flag matter.** Plain GDBF can
oscillate on small trapping sets. It flips the wrong bits together with the
right ones and comes back to the same state two iterations later. Random
flipping breaks that symmetry. A reliable bit can never be one of the wrong
bits that gets flipped, so some oscillations disappear completely. The
end-to-end testbench counts codewords that the adapted decoder corrects and
the plain one does not.

### Timing

| event | clock |
|---|---|
| `start` seen while idle | load: `v = y`, latch `I`, mode and `p`, seed the generators |
| each following clock | one iteration (syndrome check plus flips) |
| syndrome zero after k flip steps | `done` pulses, registered at the (k+1)-th clock after the load |
| still non-zero after `IT_MAX` flip steps | `done` with `success = 0`, `iters = IT_MAX` |

Throughput is therefore one clock per iteration plus one clock for the final
syndrome check and one clock to load.

`IT_MAX` defaults to 300. This is the design's own choice: no iteration limit
was specified.

`iters` and `v` hold until the next `start`. A `start` while busy is ignored.

With `rel` held at zero (`cfg_use_rel = 0` at the top), the same hardware runs
the non-adapted GDBF / PGDBF decoders. This is useful for comparisons.

## The pre-processor (`preproc`)

Cells arrive 8 per beat on a valid/ready stream. Each lane has a `rel_unit`.
Bits and reliability flags are shifted into two N-bit buffers, one beat at a
time. There are two
page layouts, chosen by `cfg_shared` with the first beat of each codeword:

- **Separate codewords** (`cfg_shared = 0`): the MSB page and the LSB page hold
  different codewords. N cells (162 beats) are read, and the page chosen by
  `cfg_sel_msb` is kept together with its flags. The LSB page is the harder of
  the two because two of the three leakage transitions change the LSB.
- **Shared codeword** (`cfg_shared = 1`): both bits of a cell belong to one
  codeword. N/2 cells (81 beats) are read. Cell i gives codeword bits 2i (MSB)
  and 2i+1 (LSB). This bit order is the design's own choice.

When the last beat is taken, `out_valid` rises. The buffers hold, and
`in_ready` stays low, until the decoder takes the codeword. The decoder copies
the word into its VN registers at load. The next codeword can therefore stream
in while the previous one is still being decoded. The cell stream only stalls
when a second codeword is waiting and a third one arrives.

The number of lanes (`CELLS_PER_BEAT`, default 8) is the design's own choice.
It can be any divisor of N/2, from 1 (one unit used serially) up to N/2.

## Top-level ports (`mlc_bf_system`)

| port | meaning |
|---|---|
| `cfg_shared`, `cfg_sel_msb` | page layout and page to decode. Sampled with the first beat. |
| `cfg_prob`, `cfg_p` | 1 = A-PGDBF with `p = cfg_p/256`, 0 = A-GDBF. Sampled at decoder start. |
| `cfg_use_rel` | 1 = adapted decoder, 0 = plain GDBF/PGDBF. Sampled at decoder start. |
| `cfg_seed` | seed of the random generators. Sampled at decoder start. |
| `cell_valid/ready/msb/lsb` | cell read stream, `CELLS_PER_BEAT` cells per beat |
| `dec_done`, `dec_success`, `dec_iters`, `dec_word` | result, one `dec_done` pulse per codeword |
| `busy` | a codeword is waiting for the decoder or being decoded |

The decoder starts on the clock after the pre-processor holds a full codeword,
as long as the decoder is idle. A codeword streamed into an idle system
therefore gives `dec_done` `iters + 2` clocks after its last beat is accepted.

## Parameters

| parameter | default | note |
|---|---|---|
| `Z` | 108 | circulant size. N = 12·Z, M = 3·Z. |
| `DV`, `DC` | 3, 12 | column and row weight of H |
| `IT_MAX` | 300 | maximum number of flip iterations (design's choice) |
| `PW` | 8 | width of the flip probability |
| `CELLS_PER_BEAT` | 8 | parallel reliability units (design's choice) |

Everything in the decoder is fully parallel. Area grows linearly with N: about
N × (3 flip-flops plus a 16-bit generator) plus M 12-input XORs. The decoder
logic between registers is one parity level, a 3-bit adder, the max-finder OR
tree over N inputs, and a compare.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_rel_unit` | all four read values against flags derived from the leakage order |
| `tb_cn_unit` | parity of random vectors |
| `tb_max_finder` | N = 1296 random and single-peak energy vectors |
| `tb_vn_unit` | energy and flip rule against a cycle model (load, reliability, mode, random bit) |
| `tb_bernoulli_rng` | rate of ones for p ∈ {0, 1/8, 1/2, 0.78, 0.996} within ±0.01; reseed reproducibility; hold when not stepped |
| `tb_preproc` | default size (8 lanes) and a serial instance (1 lane, N = 64). Checks both layouts, random gaps, beat count, hold until acknowledged. |
| `tb_abf_decoder` | N = 324 (Z = 27). GDBF must match a reference model exactly (result, iteration count, word, clock count). PGDBF results must be codewords with reliable bits untouched. p = 0 must never flip. |
| `tb_mlc_bf_system` | full default size. Random codewords are written to the flash model, aged, read and decoded. |

The end-to-end test checks each decode against the independent reference
decoder in `tb/tb_code_pkg.sv`. That package builds H from its definition and
makes random codewords by Gaussian elimination over GF(2). The test also checks
latency, and it requires at least one occurrence of each of the following:

- both layouts and both pages;
- all three decoder modes;
- successful and failed decodes;
- stalls on the cell stream;
- streaming that overlaps a decode;
- a codeword only the adapted decoder corrects.

`tb_ber_workload` is a longer run at the default size. It writes 120 random
codeword pairs per error rate into the flash model and ages them. It then
decodes the LSB page four times from the same cells: A-PGDBF, A-GDBF, PGDBF
and GDBF. It checks each result and prints frame errors, bit errors and average
clocks per codeword. Typical output:

| raw LSB BER | A-PGDBF | A-GDBF | PGDBF | GDBF |
|---|---|---|---|---|
| 2e-3: failed frames / avg clocks | 1 / 4.3 | 0 / 3.1 | 0 / 4.2 | 0 / 3.1 |
| 5e-3: failed frames / avg clocks | 1 / 8.3 | 4 / 13.6 | 3 / 9.2 | 9 / 26.1 |

"Clocks" counts from the last cell beat to the result. This is iterations
plus 2. At 5e-3 the reliability flags cut plain GDBF's failures by more than
half. The remaining A-PGDBF failures are convergences to a neighbouring
codeword (see the code section), not decoder stalls. 120 frames are far too few
for the 1e-8 range of output error rates. These runs show trends only.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert rtl/ldpc_pkg.sv rtl/*.sv \
    tb/tb_code_pkg.sv tb/mlc_flash_model.sv tb/tb_mlc_bf_system.sv \
    --top-module tb_mlc_bf_system -o sim && ./obj_dir/sim
```

The other testbenches need only their module, its sub-modules and
`rtl/ldpc_pkg.sv`. Some also need helper files from `tb/`:

- `tb_abf_decoder` needs `tb/tb_code_pkg.sv`.
- `tb_preproc` needs `tb/preproc_check.sv`.
- `tb_ber_workload` needs the same helper files as `tb_mlc_bf_system`.

## Where this design goes beyond, or departs from, the algorithm as described

- **Parity-check matrix.** The circulant shifts are the design's own choice,
  not a specific published matrix. Error-rate figures obtained with another
  N = 1296 rate-3/4 code will differ.
- **Iteration count.** A decode stops after `IT_MAX` flip steps. It does not
  make one last unchecked flip.
- **Maximum energy.** The maximum is taken over all bits, reliable ones
  included, as the algorithm states. If the only maximum-energy bits are
  reliable, no bit flips in that iteration. In PGDBF mode the random bits
  change on the next iteration. In GDBF mode the decoder is stuck and runs to
  `IT_MAX`.
- **Flip probability.** `p` is quantised to multiples of 1/256. The random
  source is pseudo-random with a period of 65535 per VN.
- **Not included:**
  - the flash array itself (a behavioural model exists for simulation only);
  - the encoder;
  - any soft-decision decoder (min-sum is only a point of comparison for this
    design).
