// cs_mux: compressed-sensing multiplexer (column selectors + signal selectors).
//
// Forms the ADC inputs ADI_j that make each ADC integrate a random binary
// combination of block pixels. ADC j (0..255) belongs to column selector
// c = j / 4 and to segment q = j / m, m being the samples per block
// (64, 32, 16). Within its segment the column selector has index s = (j % m)/4
// and is driven by CSEL rotated by s: line k of the block is switched on when
// CSEL[(k - s) mod 16] is hot, so the selected column is (p + s) mod 16 for
// hot position p. Four ADCs share a column selector; each has a signal
// selector that passes the selected pixel when its bit stream BS[(j % m) + 1]
// is 1 and the reference Vg when it is 0. In normal capture (CR = 1) the
// multiplexer is bypassed: ADI_j is column j's own vertical line.
//
// Combinational; in silicon these are analog switches, here the voltages
// are microvolt codes. The rotation by selector index and the 4 ADCs per
// selector follow the CS-MUX schematic; restarting the rotation and BS index
// in every segment, so that every block uses the same matrix, is this
// implementation's reading of the programmable segmentation.
module cs_mux
  import cs_pkg::*;
#(
  parameter int unsigned VG = VG_UV
) (
  input  volt_t              blk_vl [NSELECTORS][BLK],
  input  volt_t              col_vl [COLS],
  input  logic [BLK-1:0]     csel,
  input  logic [M_MAX-1:0]   bs,
  input  cr_e                cr,
  output volt_t              adi    [COLS]
);

  int unsigned m;
  assign m = samples_per_block(cr);

  for (genvar j = 0; j < COLS; j++) begin : g_adi
    int unsigned s;
    volt_t       pix;
    always_comb begin
      s   = (j % m) / 4;
      pix = '0;
      // column selector: rotated one-hot switches on the 16 block lines
      for (int unsigned k = 0; k < BLK; k++)
        if (csel[(k + BLK - s) % BLK]) pix |= blk_vl[j / 4][k];
      // signal selector, or bypass in normal capture
      if (cr == CR_1)     adi[j] = col_vl[j];
      else if (bs[j % m]) adi[j] = pix;
      else                adi[j] = volt_t'(VG);
    end
  end

  // CSEL must be one-hot whenever a selector is in use.
  always_comb
    if (cr != CR_1) assert ((csel & (csel - 1'b1)) == '0) else $error("cs_mux: CSEL not one-hot: %b", csel);

endmodule
