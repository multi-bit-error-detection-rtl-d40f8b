# Decimal matrix code for a 32-bit protected memory

Radiation hits on memory cells increasingly flip several neighbouring bits at
once (multiple cell upsets). A plain Hamming code repairs only one bit per
word. This design protects each 32-bit word with 14 check bits (a 46-bit
stored word). It repairs any single-bit error and any burst that fills one
row of the data matrix (four adjacent bits). It also repairs part of the
shorter bursts within a row. All encoding and decoding is XOR logic with no
iteration, so encoder and decoder are purely combinational.

## The code

The 32 data bits are written row by row into an 8 x 4 matrix: bit `D(4r+c)`
sits in row `r`, column `c`.

```
        col0 col1 col2 col3
row 0    D0   D1   D2   D3     \  rows k and k+4 share
row 1    D4   D5   D6   D7      | the check-bit pair
row 2    D8   D9   D10  D11     | M2k / M2k+1
row 3    D12  D13  D14  D15    /
row 4    D16  D17  D18  D19
row 5    D20  D21  D22  D23
row 6    D24  D25  D26  D27
row 7    D28  D29  D30  D31
         V0   V1   V2   V3     column parities
```

The 14 check bits are:

| bit        | equation                                                    |
|------------|-------------------------------------------------------------|
| `V(c)`     | XOR of the 8 bits of column `c`                             |
| `M(2k)`    | XOR of columns 0, 1, 2 of rows `k` and `k+4` (k = 0..3)     |
| `M(2k+1)`  | XOR of columns 1, 3 of rows `k` and `k+4`                   |
| `M8`       | `D0^D5^D10^D15^D20^D23^D29^D30`                             |
| `M9`       | `D3^D6^D9^D12^D17^D18^D24^D27`                              |

For example `M0 = D0^D1^D2^D16^D17^D18` and `M1 = D1^D3^D17^D19`.

`M8` and `M9` follow two interleaved diagonal strands through the matrix,
shaped like a double helix. Their bits are chosen for one property: for
every row pair (k, k+4) and every column, exactly one of the two bits lies
on a strand. That lets the decoder tell row `k` from row `k+4`, even though
both rows feed the same `M` pair.

The stored codeword is `{M9..M0, V3..V0, D31..D0}`. The code is systematic:
the data bits are stored unchanged.

## How the decoder locates an error

1. It recomputes all 14 check bits from the received data and XORs them with
   the received check bits. This gives a 4-bit V syndrome and a 10-bit M
   syndrome.
2. The V syndrome is taken as the error's **column pattern** `e`. A 1 in
   column `c` means an odd number of flips in that column. The decoder
   assumes all data flips sit in one row.
3. For each of the 8 rows, it predicts the M syndrome that pattern `e` in
   that row would cause. That is the row pair's `M(2k)`/`M(2k+1)` bits plus
   `M8` and `M9` for the row's strand bits.
4. If **exactly one** row's prediction equals the observed M syndrome, the
   decoder XORs that row with `e`.

Every outcome is reported in `dmc_status_t`:

| flag              | meaning                                                              |
|-------------------|----------------------------------------------------------------------|
| `err_detected`    | syndrome not zero                                                    |
| `corrected`       | one row was located and repaired                                     |
| `check_bit_error` | syndrome of weight one: a single check bit flipped, data is intact   |
| `uncorrectable`   | any other non-zero syndrome; data is returned as read                |

The weight-one rule works because every data bit enters one `V` equation
and at least one `M` equation. A data error therefore always disturbs two or
more syndrome bits.

### What it can and cannot repair

These numbers come from exhaustive tests in `tb/tb_dmc_decoder.sv`:

- **All 32 single-bit data errors** are corrected. All 14 single check-bit
  errors are recognised and leave the data alone.
- **All 8 four-bit bursts that fill a row** are corrected.
- **Three-bit bursts** covering columns 0-2 are corrected in every row.
  Bursts covering columns 1-3 are never corrected, because both `M` bits of
  the pair and the strands cancel out.
- **Two-bit bursts:** 12 of the 24 adjacent in-row pairs are located. The
  others give the same syndrome for row `k` and row `k+4`, so they are
  flagged uncorrectable.
- **Two flips in one column** cancel in the V syndrome, so they cannot be
  located. They are flagged uncorrectable, or, if they produce a single
  syndrome bit, they are taken for a check-bit error.
- **Errors hitting data and check bits together** are in general not
  repaired. The check bits have no protection of their own.

An uncorrectable word is passed through unchanged. Acting on the flag is up
to the system.

## Modules

| file                     | role |
|--------------------------|------|
| `rtl/dmc_pkg.sv`         | sizes, `codeword_t`, `syndrome_t`, `dmc_status_t`, and the check-bit functions `calc_v`, `calc_m`, `encode` |
| `rtl/dmc_encoder.sv`     | 32-bit data to 46-bit codeword, combinational |
| `rtl/dmc_decoder.sv`     | syndrome, row search, correction and flags, combinational |
| `rtl/dmc_codeword_mem.sv`| `DEPTH` x 46-bit array: one write port, one registered read port, and an upset port |
| `rtl/dmc_protected_mem.sv` | top: encoder, then memory, then decoder |

### Top-level interface and timing (`dmc_protected_mem`, parameter `DEPTH = 16`)

- **Write:** `wr_en`, `wr_addr`, `wr_data`. The data is encoded
  combinationally and stored on the rising edge of `clk`.
- **Read:** `rd_en`, `rd_addr`. One clock later, `rd_valid` is high. In the
  same cycle `rd_data` (corrected), `rd_status` and `rd_syndrome` are valid.
  The decoder sits combinationally after the read register.
- **Upset:** `upset_en`, `upset_addr`, `upset_mask`. On the clock edge, the
  stored codeword at `upset_addr` is XORed with the 46-bit mask. This models
  radiation hitting cells. If the upset hits the word being written in the
  same cycle, the flips apply to the new data.
- **Reset:** `rst_n` is active low and synchronous. It clears the read
  register and `rd_valid`. The array itself is not reset, like an SRAM.

The corrected data is not written back into the array (no scrubbing). A
word read twice is corrected twice.

## Where this design makes its own choices

The code's layout, `V`, `M0`/`M2k` and the two strand equations follow the
published decimal matrix code. These points are this design's own:

- **`M(2k+1)` uses columns 1 and 3.** The published worked examples
  constrain this bit. A `D0` flip must not disturb `M1`, a `D3` flip must,
  and `D0+D1+D2` must. Columns {1, 3} is the one choice consistent with
  those examples that also keeps adjacent column pairs distinguishable.
- **Which row pair each `M` pair covers.** `M2k`/`M2k+1` cover rows `k` and
  `k+4`, by extending the pattern of `M0` (rows 0 and 4).
- **The decoding procedure.** The source describes it only through
  examples. The uniqueness test, the weight-one check-bit rule and the
  `uncorrectable` flag are additions of this design.
- **Memory organisation.** Depth, single write and read ports, one-cycle
  read latency, the upset port and the absence of write-back are all
  choices of this design. The source only says the codewords are stored in
  a memory.
- **Codeword bit order.** This is a free choice.

Not included: the 52-bit matrix code that serves as the comparison point,
and the FPGA area, power and delay figures. Those belong to a vendor tool
flow.

## Simulating

Each testbench is self-checking and ends with a `TB_RESULT checks=N failures=M` line:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dmc_pkg.sv tb/dmc_ref_pkg.sv rtl/dmc_encoder.sv rtl/dmc_decoder.sv \
  rtl/dmc_codeword_mem.sv rtl/dmc_protected_mem.sv tb/tb_dmc_protected_mem.sv \
  --top tb_dmc_protected_mem -Mdir obj && obj/Vtb_dmc_protected_mem
```

To run another testbench, swap in `tb_dmc_encoder`, `tb_dmc_decoder` or
`tb_dmc_codeword_mem`.

- `tb/dmc_ref_pkg.sv` is a separate reference model. It builds each check
  bit from a per-bit signature table, and it decodes by brute force: it
  encodes the candidate error in each row in turn.
- `tb_dmc_decoder` runs every single-bit error and every adjacent burst, the
  published examples with their expected syndromes, and 3000 random errors.
  It prints how many bursts of each length were located.
- `tb_dmc_protected_mem` runs the top at its default size through 400
  write / upset / read rounds over all addresses. It checks the read
  latency. It requires each decoder outcome (clean, single-bit fix, burst
  fix, check-bit error, uncorrectable) to occur at least once.

The reference model keeps its loop bounds in package variables, not
constants. This stops the simulator from unrolling the loops, which keeps
the generated C++ small and quick to compile.

## Changing it

- **Matrix shape.** The package sizes (`ROWS`, `COLS`), the column masks
  `M_EVEN_COLS` / `M_ODD_COLS` and the strand masks `M8_MASK` / `M9_MASK`
  describe the 8 x 4 code. Another shape needs new strand masks with the
  same one-bit-per-column-per-row-pair property.
- **Memory depth.** Set the `DEPTH` parameter on the top.
- **Registering.** The decoder is one combinational stage after the read
  register. To add an output register, wrap `dmc_decoder` in a flop stage in
  the top; `rd_valid` then needs one more delay stage.
