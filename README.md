# Multiplier-less two-level 9/7 wavelet transform with carry-select adders

This is a streaming hardware implementation of the 9/7 discrete wavelet transform (DWT) for 4-bit samples. It computes two decomposition levels and uses no multiplier. The filters rest on two ideas:

* **Symmetric folding.** Both 9/7 analysis filters are symmetric. Samples that share a coefficient are added first, so the 9-tap low-pass filter needs five constant products and the 7-tap high-pass filter four.
* **Modified distributed arithmetic (MDA).** Each constant coefficient is an 8-bit two's-complement word. The inner product is taken bit plane by bit plane. Row *k* is the sum of the pre-added inputs whose coefficient has bit *k* set. The eight rows are then combined with weights 2^k, and the sign row is subtracted. The result needs only adders.

Every adder in the datapath is a square-root **carry-select adder (CSLA)**. Its ripple stages are built from a four-gate **modified XOR** cell that also serves as a half adder.

The RTL follows a published architecture: a shift register feeding pre-adders, two MDA units and a modified CSLA. It adds the details that description leaves open, such as word lengths, the high-pass coefficients, reset and decimation. These are listed under [Design choices and departures](#design-choices-and-departures).

## Data flow

```
 e1 (4 bit, 0..15)
   |
   v
 +-------------------------- dwt_1d (level 1) --------------------------+
 | shift_reg: X(n-1)..X(n-8)                                            |
 | pre-adders (MCSLA)  m1..m5  /  r1..r4                                |
 | mda (low-pass, 5 inputs)      mda (high-pass, 4 inputs)              |
 | downsampler: keep every 2nd result pair                             |
 +--------------------------------+----------------------+-------------+
                         low (13 b)|            high (13 b)|
                                   +------ sel mux -------+
                                           | /4 (>>> 2)
                                           v  11 bit
 +----------------- dwt_1d (level 2, advances on level-1 strobe) -------+
 |  same structure, 11-bit input, 19-bit results                        |
 +--------------------------------+----------------------+-------------+
                                  v                      v
                                 yl1 (19 b)             yh1 (19 b)     + y_valid
```

The window holds nine samples, X(n) (the live input) and X(n-1) to X(n-8) (the register stages). The pre-adders form:

| low-pass input | value         | coefficient | high-pass input | value         | coefficient |
|----------------|---------------|-------------|-----------------|---------------|-------------|
| m1 (u1)        | X(n) + X(n-8)   | 77          | r1              | X(n) + X(n-6)   | 6           |
| m2 (u2)        | X(n-1) + X(n-7) | 34          | r2              | X(n-1) + X(n-5) | -4          |
| m3 (u3)        | X(n-2) + X(n-6) | -10         | r3              | X(n-2) + X(n-4) | -38         |
| m4 (u4)        | X(n-3) + X(n-5) | -2          | r4              | X(n-3)          | 72          |
| m5 (u5)        | X(n-4)          | 3           |                 |                 |             |

The low-pass window is centred on X(n-4) and the high-pass window on X(n-3). After decimation the low band therefore keeps the even samples and the high band the odd ones.

## The MDA unit (`mda`)

This is the least obvious part of the design. With coefficients c_j written as 8-bit two's-complement words c_j = -2^7 b_j7 + sum_{k<7} 2^k b_jk, the inner product is

```
y = sum_j c_j u_j
  = sum_{k=0..6} 2^k * ( sum_j b_jk u_j )  -  2^7 * ( sum_j b_j7 u_j )
                         \____ row k ____/              \_ row 7 _/
```

For the low-pass set (77, 34, -10, -2, 3) the bit matrix, from bit 0 upwards, is

| bit | u1 u2 u3 u4 u5 | row sum            |
|-----|----------------|--------------------|
| 0   | 1  0  0  0  1  | u1 + u5            |
| 1   | 0  1  1  1  1  | u2 + u3 + u4 + u5  |
| 2   | 1  0  1  1  0  | u1 + u3 + u4       |
| 3   | 1  0  0  1  0  | u1 + u4            |
| 4   | 0  0  1  1  0  | u3 + u4            |
| 5   | 0  1  1  1  0  | u2 + u3 + u4       |
| 6   | 1  0  1  1  0  | u1 + u3 + u4       |
| 7   | 0  0  1  1  0  | u3 + u4  (sign row, subtracted) |

Because the coefficients are elaboration-time parameters, the generate loops build exactly the adders that the set bits need. A clear bit costs no hardware, and an all-zero row is skipped. Every sum is sign-extended to one common MCSLA width (`csla_fit` of the exact result width). The sign row is subtracted by adding its bitwise inverse with a carry in of 1. `OUT_W` keeps the low bits of the exact result, and the caller must size it so that nothing is lost. No lookup table is stored. Each row is a short adder chain, and the unit is purely combinational.

The coefficients are a parameter (`COEFS`, coefficient *j* in bits `[8j +: 8]`), so the same unit serves both filters and any other 8-bit constant set.

## The adders

* **`mxor`**: the modified XOR, s = NOT(a AND b) AND (a OR b). It takes four gates: AND and OR in parallel, an inverter, then an AND. The first AND is the half-adder carry, so the cell is a complete half adder.
* **`mxor_fa`**: a full adder made from two `mxor` half adders plus an OR for the carry, nine gates in all.
* **`rca`**: a ripple chain of `mxor_fa`.
* **`mcsla`**: a square-root carry-select adder. The lowest two bits ripple. Each higher group has two ripple adders, one assuming carry in 0 and one carry in 1, and a multiplexer driven by the real carry selects the result. The group sizes are fixed per width:

  | width | groups (LSB first, first group ripples) |
  |-------|------------------------------------------|
  | 4     | 2, 2                                     |
  | 8     | 2, 2, 4                                  |
  | 16    | 2, 2, 3, 4, 5                            |
  | 32    | 2, 2, 3, 4, 6, 7, 8                      |
  | 64    | 2, 2, 3, 4, 5, 6, 7, 8, 8, 9, 10         |

  Only these five widths are allowed; an elaboration-time assertion rejects others. Narrower sums are sign-extended to the next width in the table, and synthesis removes the unused top bits.

## Number formats and word lengths

| signal | format | why it cannot overflow |
|--------|--------|------------------------|
| `e1` | 4-bit unsigned, 0..15 | - |
| level-1 input | 5-bit signed (zero sign bit added) | - |
| level-1 `yl`, `yh` | 13-bit signed | low: -360..3375, high: -1260..1260 |
| level-2 input | 11-bit signed = level-1 band >>> 2 | 13 - 2 bits |
| `yl1`, `yh1` | 19-bit signed | \|y\| <= 1024 * 249 < 2^18 for any 11-bit input |

The shift right by two (floor division by 4) between the levels is what lets the level-2 results fit in 19 bits. The low-pass coefficients carry a scale of 128 and the high-pass coefficients a scale of 64. A DC input of value *v* therefore gives 201*v* on the level-1 low band, for the coefficient placement used here (see below), and exactly 0 on the high band.

## Interface and timing of the top (`second_level_2d`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; one input sample per cycle, no stall |
| `rst_n` | in | 1 | synchronous, active low; clears all delay lines and decimation phases |
| `sel` | in | 1 | 0: split the level-1 low band again (outputs LL / LH); 1: split the level-1 high band (HL / HH) |
| `e1` | in | 4 | input sample |
| `yl1`, `yh1` | out | 19 | level-2 low-pass and high-pass results, signed |
| `y_valid` | out | 1 | one-cycle strobe when `yl1`/`yh1` are new (every fourth clock); they hold in between |

Timing, with samples counted n = 0, 1, 2, ... from the first clock edge after reset:

* Level 1 computes both filters for every sample. The `downsampler` registers the pair of every even sample, so it is visible one clock later with a strobe.
* `sel` is sampled at the edge where level 2 takes a level-1 pair. If `sel` changes mid-stream, the level-2 delay line holds samples from both bands until it refills. The reference model in the testbench reproduces this exactly.
* Level 2 shifts only on level-1 strobes. It keeps every second level-1 pair, and its result appears one clock after that pair was taken. Samples up to n = 4q thus produce a `y_valid` strobe two clocks after sample 4q was applied.
* Every delay line starts from zeros after reset, so the first outputs are those of a zero-padded history. There is no symmetric border extension.

The critical path is combinational: pre-adder, MDA row chain (up to four adders), then the weighted combination of eight rows. The only registers are the delay lines and the decimator outputs. Generic synthesis of the top gives about 10k gate-level cells and 188 flip-flop bits.

## Design choices and departures

These points go beyond, or differ from, the published description:

* **Coefficient placement.** As published, the low-pass coefficient vector [77, 34, -10, -2, 3] multiplies u1..u5 in that order. The largest coefficient therefore falls on the outermost pair X(n)+X(n-8), and 3 on the centre tap. This RTL keeps that order. The textbook CDF 9/7 low-pass filter puts 77 (0.6029 * 128) on the centre. For it, override `LPS_COEF` of `dwt_1d` with `{8'sd77, 8'sd34, -8'sd10, -8'sd2, 8'sd3}`; the vector is packed u5 first.
* **High-pass coefficients** are not given in the source. This design uses the 9/7 analysis high-pass filter (1.115087, -0.591272, -0.057544, 0.091272 from the centre out) scaled by 64 to fit the 8-bit coefficient word: 72, -38, -4, 6. The centre value is rounded up from 71.4 so that the DC gain is exactly zero. The high-pass taps r1..r4 follow the published block diagram.
* **Meaning of `sel`.** The published top has a `sel` input but does not say what it does. Here it chooses which level-1 band the second level splits.
* **Reference outputs.** For a constant input 0011 with `sel` = 0, the published waveform shows yh1 = 1111101000000000000 (-12288) and yl1 = 0000011000000000000 (12288). This design settles at yh1 = 0 and yl1 = 30150 (603 on level 1, 150 into level 2, 150 * 201). The difference comes from the unpublished high-pass coefficients and level scaling, so the published numbers are not reproduced.
* **Word lengths:** 13-bit level-1 results and the divide-by-4 between levels are this design's choice. The 4-bit input and the 19-bit outputs are the published ones.
* **Decimation.** The published overview shows a down-sampler in front of the filters. Here the filters run on every sample and every second result pair is kept, which gives the same results.
* **2-D structure.** The two levels are two cascaded one-dimensional filter stages on a single sample stream. No transpose or line memory is built, so images must be fed row by row (or column by column) by the surrounding system.
* **Adder choice.** The source also mentions a Brent-Kung adder in passing. All additions here use the modified CSLA, which is the adder the architecture is built around.
* **Added signals:** `rst_n` and `y_valid`, and on `dwt_1d` an `in_valid` input, which level 2 needs.
* The published FPGA figures (224 registers on a Virtex-4) are not matched exactly: this RTL keeps 188 flip-flop bits after generic synthesis.

## Files

| file | content |
|------|---------|
| `rtl/dwt_pkg.sv` | coefficient sets, CSLA group table and helper functions |
| `rtl/mxor.sv`, `rtl/mxor_fa.sv`, `rtl/rca.sv`, `rtl/mcsla.sv` | adder hierarchy |
| `rtl/dff2.sv`, `rtl/shift_reg.sv` | 8-stage delay line |
| `rtl/mda.sv` | bit-plane multiplier-less inner product |
| `rtl/downsampler.sv` | decimation by two |
| `rtl/dwt_1d.sv` | one DWT level (both filters) |
| `rtl/second_level_2d.sv` | top: two levels with band select |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Verification

Each testbench checks its module against values computed independently: integer arithmetic, truth tables or a behavioural reference model. It ends by printing `TB_RESULT checks=N failures=M`.

* The adder cells are checked exhaustively, and `mcsla` at all five widths with random operands and carry chains through every group.
* `tb_shift_reg` replays the constant 0000 then 0011 run and checks that each stage takes the new value one clock after the previous one. It then runs random data with a random enable.
* `tb_mda` checks both coefficient sets against integer dot products, extreme inputs included.
* `tb_dwt_1d` runs a level-1-sized and a level-2-sized filter with a random input strobe. It checks every kept output and its one-clock latency.
* `tb_second_level_2d` runs the top at its default size. It covers the constant-input run, 4000 random samples with random `sel` switches and mid-stream resets, all against a cycle-level reference. It checks the one-strobe-per-four-clocks rate, and counts that level-1 and level-2 decimation, both `sel` settings, `sel` switches and resets all occurred.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dwt_pkg.sv \
    tb/tb_second_level_2d.sv --top-module tb_second_level_2d -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.
