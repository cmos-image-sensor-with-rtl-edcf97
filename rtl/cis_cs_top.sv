// cis_cs_top: 256 x 256 CMOS image sensor with per-column sigma-delta ADCs
// and programmable single-shot compressed sensing.
//
// Signal path: pixel_array -> col_block_selector -> cs_mux -> 256 x
// (sd_modulator -> decimation_filter) -> column_scanner -> dout.
// Control: readout_ctrl drives row_selector (SEL, RST, TRG), the pattern
// generators csel_gen and bs_gen, the ADC phases and the scanner.
//
// In normal capture (cr = CR_1) every column is converted on its own ADC,
// one pixel row per slot, and dout carries pixel values (reset minus signal,
// 242 uV per LSB). In compressed sensing (CR_4, CR_8, CR_16) each ADC
// averages, over 128 clocks, the pixels its CSEL/BS pattern selects from one
// 16 x 16 block (Vg when not selected); each block yields m = 64, 32 or 16
// samples and all blocks share the same m x 256 binary matrix, set by the two
// seeds. For a slot, dout_adc j carries sample (j % m) + 1 of block column
// b + (j / m) * (16 / G) of block row k, with k = slot / (16 / G) and
// b = slot % (16 / G), G = 4, 8 or 16 blocks read per slot.
//
// Interface: light is the scene (signal swing per pixel in uV, from the pixel
// array model). Pulse frame_start with cr and the seeds stable; codes stream
// out on dout/dout_valid/dout_adc/dout_slot, 256 per slot, and frame_done
// pulses after the last. The pixel array and the modulators are behavioural
// models of analog parts; the rest is synthesizable logic.
module cis_cs_top
  import cs_pkg::*;
#(
  parameter int unsigned SETTLE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  volt_t             light [ROWS][COLS],
  input  cr_e               cr,
  input  logic [M_MAX-1:0]  bs_seed,
  input  logic [15:0]       csel_seed,
  input  logic              frame_start,
  output logic              busy,
  output logic              frame_done,
  output code_t             dout,
  output logic              dout_valid,
  output logic [7:0]        dout_adc,
  output logic [7:0]        dout_slot
);

  cr_e               cr_q;
  logic [3:0]        blk_row, grp_mask;
  logic [1:0]        grp;
  logic              rst_pulse, trg_pulse, sel_a_en, sel_b_en, row_par;
  logic [7:0]        row_a, row_b, slot;
  logic              gen_load, gen_step;
  logic              adr, adck, adf, ads, dec_clr, dec_down, dec_latch, scan_start, scan_busy;
  logic [ROWS-1:0]   sel;
  logic [NBLK-1:0][3:0] rst_blk, trg_blk;
  volt_t             vl     [2][COLS];
  volt_t             blk_vl [NSELECTORS][BLK];
  volt_t             col_vl [COLS];
  volt_t             adi    [COLS];
  logic [BLK-1:0]    csel;
  logic [M_MAX-1:0]  bs;
  logic [COLS-1:0]   dm;
  code_t             codes  [COLS];

  readout_ctrl #(.SETTLE(SETTLE)) u_ctrl (
    .clk, .rst_n, .frame_start, .cr, .scan_busy, .cr_q, .busy, .frame_done,
    .blk_row, .grp_mask, .grp, .rst_pulse, .trg_pulse, .sel_a_en, .row_a,
    .sel_b_en, .row_b, .row_par, .gen_load, .gen_step, .adr, .adck, .adf, .ads,
    .dec_clr, .dec_down, .dec_latch, .scan_start, .slot
  );

  row_selector u_rowsel (
    .blk_row, .grp_mask, .rst_pulse, .trg_pulse, .sel_a_en, .row_a, .sel_b_en,
    .row_b, .sel, .rst_blk, .trg_blk
  );

  pixel_array #(.SETTLE(SETTLE)) u_pix (
    .clk, .rst_n, .light, .sel, .rst_blk, .trg_blk, .vl
  );

  csel_gen u_csel (
    .clk, .rst_n, .load(gen_load), .seed(csel_seed), .step(gen_step), .csel
  );

  bs_gen #(.M(M_MAX)) u_bs (
    .clk, .rst_n, .load(gen_load), .step(gen_step), .seed(bs_seed), .bs
  );

  col_block_selector u_cbs (
    .vl, .cr(cr_q), .grp, .row_par, .blk_vl, .col_vl
  );

  cs_mux u_mux (
    .blk_vl, .col_vl, .csel, .bs, .cr(cr_q), .adi
  );

  for (genvar j = 0; j < COLS; j++) begin : g_adc
    sd_modulator u_mod (
      .clk, .adi(adi[j]), .adr, .adck, .adf, .ads, .dm(dm[j])
    );
    decimation_filter u_dec (
      .clk, .rst_n, .clr(dec_clr), .adck, .adf, .down(dec_down), .dm(dm[j]),
      .latch(dec_latch), .do_q(codes[j])
    );
  end

  column_scanner u_scan (
    .clk, .rst_n, .start(scan_start), .tag(slot), .codes, .dout, .dout_valid,
    .dout_idx(dout_adc), .dout_tag(dout_slot), .busy(scan_busy)
  );

endmodule
