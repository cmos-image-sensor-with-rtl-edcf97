// col_block_selector: column block selector between pixel array and CS-MUX.
//
// In compressed-sensing mode the 256 ADCs are split into segments of m ADCs
// (m = 64, 32, 16 for CR = 1/4, 1/8, 1/16), one segment per block of the
// block group being read. Each segment is fed by m/4 column selectors, and
// every column selector needs the 16 vertical lines of its segment's block.
// For block group b, segment q serves block column l = b + q * (16 / G), G
// being the number of blocks read at once (4, 8 or 16): at CR = 1/4 group 0
// reads blocks 0, 4, 8, 12, as in the readout sequence of the description.
// The line of the current row's parity (VL_{j,0} for even, VL_{j,1} for odd
// rows) is taken. col_vl gives each column its own line for normal capture,
// where the CS-MUX is bypassed.
//
// Combinational. The segment-to-block order (segment q to the q-th block of
// the group, left to right) is this implementation's reading of the block
// diagram, which shows blocks (k,0) and (k,4) on neighbouring segments.
module col_block_selector
  import cs_pkg::*;
(
  input  volt_t      vl      [2][COLS],
  input  cr_e        cr,
  input  logic [1:0] grp,
  input  logic       row_par,
  output volt_t      blk_vl  [NSELECTORS][BLK],
  output volt_t      col_vl  [COLS]
);

  always_comb begin
    int unsigned spq, q, l;
    // At CR = 1 the selectors are unused; they are then given the 1/16 map.
    spq = ((cr == CR_1) ? 16 : samples_per_block(cr)) / 4;
    for (int unsigned c = 0; c < NSELECTORS; c++) begin
      q = c / spq;
      l = (cr == CR_1) ? q : seg_block(cr, int'(grp), q);
      for (int unsigned k = 0; k < BLK; k++)
        blk_vl[c][k] = vl[row_par][BLK * l + k];
    end
    for (int unsigned j = 0; j < COLS; j++)
      col_vl[j] = vl[row_par][j];
  end

endmodule
