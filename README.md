# Compressed-sensing CMOS image sensor with per-column sigma-delta ADCs

This is RTL for a 256 x 256 CMOS image sensor that can take compressed
measurements of a scene in a single exposure. The trick is in the column
ADCs. An incremental first-order sigma-delta ADC with its integrator reset
at the start only counts how often the integrated input crossed full scale,
so its final code depends on the *sum* of the inputs it saw, not on their
order. Give an ADC a different pixel voltage on every clock, or a fixed
reference voltage Vg when a pixel is not wanted, and the code at the end is a
quantised random linear combination of pixels. That is exactly one
compressed-sensing measurement `y = phi . x`. No extra analog summing is
needed, and the same ADCs do normal capture when the selection is bypassed.

The array is cut into 16 x 16 pixel blocks. Every block is measured with the
same binary matrix `Phi_BLK` of size m x 256, with m = 64, 32 or 16 samples
per block. That gives a compression ratio CR = m / 256 of 1/4, 1/8 or 1/16.
Fewer conversions per frame means a proportionally higher frame rate at
about the same power: 120 fps normal, and 480, 960 or 1920 fps compressed.
Reconstruction of the image from the measurements is done off chip and is not
part of this RTL.

## How one measurement is formed

One conversion slot reads a group of G blocks from one block row in
parallel, with G = 4, 8 or 16 for CR = 1/4, 1/8, 1/16. The 256 ADCs are split
into G segments of m consecutive ADCs, one segment per block. At CR = 1/4,
slot 0 of block row k reads blocks (k,0), (k,4), (k,8) and (k,12) on ADCs
0-63, 64-127, 128-191 and 192-255. Slot 1 reads (k,1), (k,5), (k,9), (k,13),
and so on.

For 128 clocks (the coarse conversion), each ADC gets one input per clock:

* **Rows.** Pixel row `r = n / 8` of the block is used during clocks
  n = 8r .. 8r+7, so all 16 rows of the block pass in 128 clocks.
* **CSEL, the column pick.** A one-hot code `CSEL[0:15]` visits 8 of the 16
  columns of the current row in increasing order, one per clock. It comes
  from `csel_gen`, so p_n is the hot position on clock n.
* **Column selectors.** Four ADCs share one 16:1 column selector. Within a
  segment, selector `s = (j mod m) / 4` sees CSEL rotated by s. ADC j
  therefore looks at block column `(p_n + s) mod 16`. The rotation spreads
  the selectors over different columns on the same clock.
* **Signal selectors.** Each ADC has its own bit stream `BS[(j mod m)+1]`
  from `bs_gen`. When the bit is 1 the ADC input `ADI_j` is the selected
  pixel; when it is 0 it is Vg (700 mV).

So entry (j mod m, 16r + c) of `Phi_BLK` is 1 when, on one of clocks 8r..8r+7,
`(p_n + s) mod 16 = c` and `BS_n[j mod m] = 1`. About half of the 128 inputs
are pixels, so each sample averages about 64 of the 256 block pixels. Because
the rotation and the BS index restart in every segment, all blocks use the
same matrix. The matrix depends only on the two seeds (`csel_seed`,
`bs_seed`), so the reconstruction software can rebuild it from the generator
rules below.

**Converter arithmetic.** Let S be the sum of the 128 inputs in microvolts
and FS = 4096 x 242 uV = 991.232 mV. The coarse phase counts
`floor(S / FS)` ones and leaves a residue `S - count * FS` in [0, FS) on the
integrator. The residue is moved to a hold capacitor, the integrator is
reset, and 32 fine cycles on that residue give 5 more bits. Together:

    code(S) = 32 * coarse + fine = floor(32 * S / FS)      (12 bit)

**Digital CDS.** Each slot converts twice with the same matrix, reloading
both seeds. First comes the reset level, with the counters counting up, then
the signal level after the charge transfer, with the counters counting down.
The result is

    dout = clamp(code(S_reset) - code(S_signal), 0, 4095)

Vg contributes equally to both sums and cancels. In normal capture each ADC
sees its own column for all 128 clocks, and dout is the pixel's signal swing
at 242 uV per LSB.

### The pattern generators

* `bs_gen` is a 64-stage linear-feedback shift register. It uses
  right-shift order `bs <= {bs[62:0], bs[63]^bs[62]^bs[60]^bs[59]}` and its
  stages are the streams, with `bs[0]` being BS[1]. Stream j+1 is stream j
  one clock late. The register is loaded with the seed (zero becomes all
  ones) and steps once per coarse clock.
* `csel_gen` holds a 16-bit LFSR. The step is `s <= {s[14:0], s[15]^s[14]^s[12]^s[3]}`.
  For each row it advances 16 steps and takes the state w as a column mask.
  If w has 8 or more ones, the lowest 8 ones are kept. If it has fewer, the
  lowest zero positions are added until 8 are set. The row's columns are then
  visited from low to high. A zero seed is replaced by all ones.

## Modes and frame timing

| `cr`    | blocks per slot | ADCs per block (m) | slots per frame | clocks per frame |
|---------|-----------------|--------------------|-----------------|------------------|
| `CR_1`  | one pixel row   | 1 per column       | 256             | 87,552           |
| `CR_4`  | 4               | 64                 | 64              | 21,888           |
| `CR_8`  | 8               | 32                 | 32              | 10,944           |
| `CR_16` | 16              | 16                 | 16              | 5,472            |

Every slot takes 342 clocks, so frame time scales exactly with the
compression ratio. A slot in the original design lasts about 28.9 us, which
puts the clock near 11.8 MHz. At that clock the four modes reach 135, 540,
1081 and 2163 frames/s, above the 120/480/960/1920 fps targets.

One slot, from `readout_ctrl` (clocks in brackets):

| step   | reset level                    | signal level                |
|--------|--------------------------------|-----------------------------|
| PULSE  | RST of the group, clear counters, reload seeds [1] | TRG of the group, reload seeds [1] |
| PRE    | first two rows selected and settling, ADR on last clock [SETTLE+3] | same |
| COARSE | ADCK, CSEL/BS step, row advances every 8 clocks [128] | same, counters count down |
| HOLD   | ADS: residue to the hold capacitor [1] | same |
| FRST   | ADR [1]                        | same                        |
| FINE   | ADCK with ADF [32]             | same                        |
| then   |                                | LATCH [1], scanner start [1] |

**Interleaved rows.** Each column has two vertical lines, one for even rows
and one for odd rows. While row r is converted from one line, row r+1 is
already selected on the other and has 8 clocks to settle. The pixel model
keeps a line at its old voltage for SETTLE clocks after any change, so
without this overlap the first clocks of every row would read stale values.

**Scan-out.** The 256 codes are latched at the end of a slot and shifted
out by `column_scanner` during the next slot, one per clock. Each code comes
with `dout_adc` (j) and `dout_slot`. In CS mode the code is sample
`(j mod m) + 1` of block row `slot / (16/G)`, block column
`slot mod (16/G) + (j / m) * (16/G)`. In normal mode it is pixel
(`slot`, j).

## Files

| file | part | kind |
|------|------|------|
| `rtl/cs_pkg.sv` | sizes, voltage scale, `cr_e`, segment helpers | package |
| `rtl/cis_cs_top.sv` | the sensor | top |
| `rtl/readout_ctrl.sv` | slot/phase sequencer, ADC control | RTL |
| `rtl/row_selector.sv` | SEL[0:255], RST_k[0:3], TRG_k[0:3] decoder | RTL |
| `rtl/pixel_array.sv` | 4-T pixels, two vertical lines per column, settling | behavioural model |
| `rtl/col_block_selector.sv` | routes each segment's block lines, bypass lines | RTL |
| `rtl/cs_mux.sv` | rotated column selectors and BS/Vg signal selectors | RTL (analog switches as a code mux) |
| `rtl/csel_gen.sv`, `rtl/bs_gen.sv` | pattern generators | RTL |
| `rtl/sd_modulator.sv` | incremental sigma-delta modulator, coarse + fine | behavioural model |
| `rtl/decimation_filter.sv` | 8-bit/6-bit up/down counters, CDS, latch | RTL |
| `rtl/column_scanner.sv` | serial output | RTL |

Analog quantities are carried as 20-bit unsigned microvolt codes (`volt_t`),
measured from the ADC low reference. The pixel array and the modulator are
behavioural models and are not meant for synthesis as they stand. Their
integer arithmetic is nevertheless synthesizable, and they have the ports of
the real parts. The scene enters the top as `light[row][col]`, the signal
swing of each pixel in uV (0 to about 500 mV).

## What is taken from the original design and what is not

Taken from it:

* 256 x 256 array and 16 x 16 blocks.
* m = 64/32/16 samples per block and the group order (k,b), (k,b+4), ...
* 8 of 16 pixels per row through a one-hot CSEL.
* Rotated CSEL per column selector, with 4 ADCs per selector.
* BS/Vg signal selection with Vg = 700 mV.
* Two vertical lines per column for even and odd rows, with interleaved
  settling.
* Incremental conversion with 128 coarse and 32 fine cycles and residue
  feedback.
* 8-bit and 6-bit up/down counters with CDS.
* 12-bit output at 242 uV/LSB.
* CDS done with the same matrix for reset and signal.

This implementation's own choices:

* Insides of both pattern generators: LFSR lengths, taps and the keep-8
  rule. The published example matrix is not reproduced.
* The ideal modulator arithmetic. It has no noise, no residue-gain error and
  a decision threshold at full scale, so the measured DNL/INL of the real
  converter does not appear.
* The clock counts of the non-converting steps, and SETTLE = 4.
* The RST/TRG line mapping, where line g drives block columns l mod 4 = g.
* Counting direction for CDS, and clamping to 0..4095.
* Normal capture reads one row per slot and resets/transfers the block row
  each time. The pixel model treats the scene as static and does not deplete
  charge, which makes that legitimate in simulation only. A real per-block
  TRG would empty the other rows' photodiodes.
* The output format of the scanner.
* The top/bottom split of the column circuits is a layout matter and is not
  represented. Colour operation, which would take a different CS-MUX program,
  is not built either.

## Simulation

Each testbench compares against values computed independently in the
testbench, counts checks, and prints `TB_RESULT checks=N failures=M`. The
end-to-end test `tb/tb_cis_cs_top.sv` runs the full-size sensor with default
parameters for four frames: normal, 1/4, 1/8 and 1/16. It checks all of the
about 94,000 output codes against a reference model of the converter and
both generators. It also checks slot counts, constant slot length, and that
bypass, each ratio, mode switches, Vg insertion and two-row selection all
occurred. It runs in a few seconds after compilation.

    verilator --binary --timing --assert -Irtl rtl/cs_pkg.sv tb/tb_cis_cs_top.sv \
        --top-module tb_cis_cs_top -Mdir obj && ./obj/Vtb_cis_cs_top

The block testbenches run the same way: `tb/tb_<module>.sv` with top
`tb_<module>`. Each file in `rtl/` starts with a comment giving its function,
interface and timing.

To change the matrix, change the seeds. To change the settling model, change
`SETTLE` on the top. The fixed sizes (array, block, cycle counts) live in
`cs_pkg`. The segment mapping assumes 256 columns and 16 block columns.
