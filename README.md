# Decimal Matrix Code (DMC) protected memory, 32-bit

Radiation can flip several neighbouring memory cells at once (a multiple cell
upset, MCU). A plain SEC-DED Hamming code corrects one bit per word, so a burst
of flipped cells defeats it. The Decimal Matrix Code fixes this. It arranges
the data word as a small matrix of 4-bit symbols and protects it with two
kinds of check bits:

- **horizontal check bits (H):** integer sums of symbol pairs in a row;
- **vertical check bits (V):** the XOR of the two rows.

A burst that stays inside one symbol changes that symbol's sum and its
column's parity. The two mismatches cross at that symbol. The vertical
mismatch also says exactly which of its bits are wrong.

This RTL implements the 32-bit code and a small memory protected by it. The
memory uses the **encoder-reuse technique**: the encoder that builds the check
bits on a write also rebuilds them from the fetched data on a read. The decoder
therefore has no second copy of the encoder.

## The symbol matrix and the check bits

The 32-bit word `D` is cut into eight 4-bit symbols, `S_s = D[4s+3:4s]`. They
sit in 2 rows by 4 columns:

```
            col 3       col 2       col 1      col 0
row 0     D15..D12    D11..D8     D7..D4     D3..D0      (S3 S2 S1 S0)
row 1     D31..D28    D27..D24    D23..D20   D19..D16    (S7 S6 S5 S4)
```

**Horizontal bits (20).** In each row, the symbols of columns `c` and `c+2` are
added as unsigned integers. The 5-bit sum keeps the carry.

```
H[4:0]   = S2 + S0 = D11..D8  + D3..D0
H[9:5]   = S3 + S1 = D15..D12 + D7..D4
H[14:10] = S6 + S4 = D27..D24 + D19..D16
H[19:15] = S7 + S5 = D31..D28 + D23..D20
```

The literature calls this "decimal" addition because each symbol is treated
as a whole number. It is ordinary binary addition, not BCD.

**Vertical bits (16).** There is one parity bit per column bit:
`V[i] = D[i] ^ D[i+16]`.

The stored codeword is 32 + 20 + 16 = 68 bits. In a memory word it is laid out
as `{H[19:0], V[15:0], D[31:0]}` (type `codeword_t` in `dmc_pkg`).

Two examples, both checked by the testbenches:

| data       | H groups (19:15 … 4:0)    | H       | V      |
|------------|---------------------------|---------|--------|
| `CA35566A` | 01111 01111 01011 10000   | `7BD70` | `9C5F` |
| `F5AFF6AC` | 11001 10100 11001 10010   | `CD332` | `0303` |

## Decoding: syndromes, location, correction

On a read, the stored data `D'` is encoded again to give `H'` and `V'`.

1. **Comparator.** It forms the syndromes with XOR:
   `H_syn = H ^ H'` and `V_syn = V ^ V'`.
   Any non-zero bit means the stored word was hit (`err_detected`).
2. **Syndrome calculator.** It cuts `V_syn` into four 4-bit column groups and
   `H_syn` into four 5-bit adder groups. It reduces each group to a "non-zero"
   flag.
3. **Error locator.** Every symbol lies on exactly one horizontal group and
   one vertical group. A symbol is marked bad when both of its groups are
   non-zero:

   | symbol | data      | H group      | V group       |
   |--------|-----------|--------------|---------------|
   | S0     | D3..D0    | H_syn[4:0]   | V_syn[3:0]    |
   | S1     | D7..D4    | H_syn[9:5]   | V_syn[7:4]    |
   | S2     | D11..D8   | H_syn[4:0]   | V_syn[11:8]   |
   | S3     | D15..D12  | H_syn[9:5]   | V_syn[15:12]  |
   | S4     | D19..D16  | H_syn[14:10] | V_syn[3:0]    |
   | S5     | D23..D20  | H_syn[19:15] | V_syn[7:4]    |
   | S6     | D27..D24  | H_syn[14:10] | V_syn[11:8]   |
   | S7     | D31..D28  | H_syn[19:15] | V_syn[15:12]  |

4. **Error corrector.** A marked symbol is XORed with the `V_syn` group of its
   column: `S_s = S'_s ^ V_syn[4c+3:4c]`. The vertical syndrome holds exactly
   the flipped bits of that symbol, as long as the other symbol in the same
   column is intact.

### What the code corrects, and where it fails

These follow from the rules above. The end-to-end testbench compares the
hardware against an independent model in every case.

- **Any error inside one symbol** is corrected, from 1 to 4 bits and in any
  pattern. A single symbol changes its sum by a non-zero amount, so its H
  group is always non-zero.
- **Several bad symbols are corrected** when no false crossing appears. For
  example, S0 and S5 share neither an H group nor a V group, so both are
  corrected. If S0 and S6 are both bad, groups H0, H2, V0 and V2 all light up.
  S2 and S4 are then marked too and are mis-corrected.
- **Errors only in the H bits, or only in the V bits,** never touch the data.
  They only set `err_detected`.
- **Errors in both H and V but not in the data** make a crossing and cause a
  mis-correction. So do two symbols in one column hit with the same pattern:
  their V groups cancel, and the error is detected but not corrected. The same
  happens when two symbols under one adder change by opposite amounts, so
  their H group cancels.
- There is no separate "uncorrectable" flag. `err_detected` together with
  `sym_err` is all the decoder reports.

Because the comparator uses XOR, the H syndrome only says *that* a sum
differs, not by how much. Classic DMC decoders use a decimal subtractor here.
The location and correction rules above need only the "non-zero" fact, so XOR
is enough and cheaper.

## Encoder reuse in the memory (`dmc_fault_tolerant_memory`)

```
 wdata ──┐
         ├─ mux (we) ── dmc_encoder ── H,V ──┬── {H,V,wdata} ──> write port
 D' ─────┘                                   │
   ^                                         └── H',V' ──> dmc_decoder ──> rdata
   └──────────── dmc_codeword_memory (read port, {H,V,D'}) ──────┘
```

A single `dmc_encoder` is shared. On a write it encodes `wdata`. Otherwise it
encodes the data fetched from `addr`. The mux is steered by `we`, so a cycle is
either a write or a read. If both are requested, the write wins and no read
result comes out.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the output registers (not of the array) |
| `we` | in | 1 | write `wdata` (encode) at `addr`; has priority |
| `re` | in | 1 | read (decode) `addr` |
| `addr` | in | AW | word address |
| `wdata` | in | 32 | data to store |
| `upset`, `upset_addr`, `upset_mask` | in | 1, AW, 68 | flip the stored codeword bits set in the mask, modelling an SEU/MCU; the mask uses the `{H,V,D}` layout |
| `rvalid` | out | 1 | high for one cycle, one clock after `re` |
| `rdata` | out | 32 | corrected data |
| `err_detected` | out | 1 | the fetched codeword had a non-zero syndrome |
| `sym_err` | out | 8 | symbols that were corrected |
| `enc_h`, `enc_v` | out | 20, 16 | check bits of the last word written (for display and debug) |

**Timing.** A write takes effect at the clock edge. The array is read
asynchronously, like distributed RAM. The read decode is combinational, and
the result is registered: `rdata`, `err_detected` and `sym_err` are valid
together with `rvalid`, one cycle after `re`. An upset and a write to the same
word in the same cycle leave the written value. The read path from the array
through the encoder, comparator, locator and corrector is one combinational
stage, and a long one. If timing is tight, register the fetched codeword first.

Parameters: `DEPTH` is the number of words (default 16), and `AW` is its
address width. The code sizes (32/4/2×4/20/16) are constants in `dmc_pkg`,
because the check equations are specific to this arrangement.

## Files

| file | content |
|---|---|
| `rtl/dmc_pkg.sv` | sizes, `codeword_t`, `syn_flags_t`, symbol→group mapping functions |
| `rtl/dmc_decimal_adder.sv` | 4-bit + 4-bit → 5-bit symbol adder |
| `rtl/dmc_encoder.sv` | four adders and the row XOR: H and V |
| `rtl/dmc_comparator.sv` | `H ^ H'`, `V ^ V'` |
| `rtl/dmc_syndrome_calc.sv` | grouping and per-group non-zero flags, `err_detected` |
| `rtl/dmc_error_locator.sv` | symbol-error flags from crossing groups |
| `rtl/dmc_error_corrector.sv` | XOR repair of the marked symbols |
| `rtl/dmc_decoder.sv` | comparator → syndrome calculator → locator → corrector; takes H', V' from outside |
| `rtl/dmc_codeword_memory.sv` | 68-bit codeword array with an upset port |
| `rtl/dmc_fault_tolerant_memory.sv` | top: shared encoder, memory, decoder |
| `tb/dmc_ref_pkg.sv` | reference encoder/decoder written from the equations and the location table |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog
if it hangs. For example, the end-to-end test, run from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dmc_pkg.sv tb/dmc_ref_pkg.sv tb/tb_dmc_fault_tolerant_memory.sv \
  --top-module tb_dmc_fault_tolerant_memory -o sim
./obj_dir/sim
```

For the other testbenches, replace the testbench file and top name.
`-Irtl -Itb` lets verilator find the modules by file name.

Coverage:

- **Leaf modules.** The adder and locator tests are exhaustive. The encoder
  test covers both examples and random words. The comparator, syndrome
  calculator and corrector tests are random, with directed single-bit cases.
- **Decoder.** Every single-bit flip of the 68-bit codeword, every burst
  pattern in every symbol, and random multi-symbol errors against the model.
- **End-to-end test.** It runs at the default `DEPTH` and mixes clean reads,
  single-bit upsets, in-symbol bursts, two-symbol upsets, H-only and V-only
  upsets, random masks, and write/read collisions. It also checks the
  one-cycle latency, and it fails if any of those cases never occurred.

## Design choices beyond the code itself

The code, its equations, the syndrome grouping, the error-location map and
encoder reuse define the scheme. The following were chosen here:

- The memory depth (16 words) and a single port with write priority.
- Asynchronous array read with a registered result (one-cycle read latency)
  and `rvalid`.
- The mux that switches the shared encoder.
- The reset, which clears only the output registers.
- The location rule "both crossing groups non-zero" and the XOR repair with
  the column syndrome.
- The upset port for modelling strikes.
- The `{H,V,D}` order of a stored word.

Not included: the board-level demonstration around the code, meaning an LCD
that shows the reset, encoder-input and decoder-output modes, and the means of
entering data.
