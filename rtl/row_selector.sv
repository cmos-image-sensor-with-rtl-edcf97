// row_selector: row block / pixel selector decoder.
//
// Turns the controller's block-row, block-group and pixel-row numbers into the
// array control lines named in the sensor's block diagram: SEL[0:255] (one
// per pixel row), RST_k[0:3] and TRG_k[0:3] (per block row k). Line g of RST_k
// or TRG_k drives the blocks (k,l) with l % 4 == g; grp_mask chooses which of
// the four lines fire, so one pulse can reset 4, 8 or all 16 blocks of a row.
// Two rows can be selected at once (row_a, row_b): the row being converted and
// the next row, which settles on the other vertical line meanwhile.
//
// Purely combinational. The line encoding (l % 4 grouping) follows the
// four-line RST/TRG buses of the diagram; the two-row select port is this
// implementation's way of realising the interleaved row access.
module row_selector
  import cs_pkg::*;
(
  input  logic [3:0]           blk_row,
  input  logic [3:0]           grp_mask,
  input  logic                 rst_pulse,
  input  logic                 trg_pulse,
  input  logic                 sel_a_en,
  input  logic [7:0]           row_a,
  input  logic                 sel_b_en,
  input  logic [7:0]           row_b,
  output logic [ROWS-1:0]      sel,
  output logic [NBLK-1:0][3:0] rst_blk,
  output logic [NBLK-1:0][3:0] trg_blk
);

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      sel[r] = (sel_a_en && row_a == 8'(r)) || (sel_b_en && row_b == 8'(r));
    for (int k = 0; k < NBLK; k++) begin
      rst_blk[k] = (rst_pulse && blk_row == 4'(k)) ? grp_mask : 4'b0;
      trg_blk[k] = (trg_pulse && blk_row == 4'(k)) ? grp_mask : 4'b0;
    end
  end

  // The two selected rows must use different vertical lines.
  always_comb
    if (sel_a_en && sel_b_en)
      assert (row_a[0] != row_b[0]) else $error("row_selector: rows %0d and %0d share a line", row_a, row_b);

endmodule
