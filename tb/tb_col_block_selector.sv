// tb_col_block_selector: fills both vertical lines of every column with
// distinct values and checks, for every compression ratio, block group and
// row parity, that column selector c sees the 16 lines of block column
// b + (c / (m/4)) * (16 / G) and that each column's bypass line is its own.
module tb_col_block_selector;
  import cs_pkg::*;
  volt_t vl [2][COLS];
  volt_t blk_vl [NSELECTORS][BLK];
  volt_t col_vl [COLS];
  cr_e cr; logic [1:0] grp; logic row_par;
  col_block_selector dut (.vl, .cr, .grp, .row_par, .blk_vl, .col_vl);
  int checks = 0, failures = 0;
  initial begin
    for (int p = 0; p < 2; p++) for (int c = 0; c < COLS; c++) vl[p][c] = volt_t'(p * 1000 + c);
    for (int ci = 1; ci < 4; ci++) begin
      int m, nb, gpr;
      cr = cr_e'(ci);
      m = (ci == 1) ? 64 : (ci == 2) ? 32 : 16;
      nb = 256 / m; gpr = 16 / nb;
      for (int b = 0; b < gpr; b++) for (int par = 0; par < 2; par++) begin
        grp = 2'(b); row_par = 1'(par); #1;
        for (int c = 0; c < NSELECTORS; c++) begin
          int l;
          l = b + (c / (m / 4)) * gpr;
          for (int k = 0; k < 16; k++) begin
            checks++;
            if (int'(blk_vl[c][k]) != par * 1000 + 16 * l + k) begin
              failures++;
              if (failures < 5) $display("cr=%0d b=%0d c=%0d k=%0d got %0d", ci, b, c, k, blk_vl[c][k]);
            end
          end
        end
        for (int j = 0; j < COLS; j++) begin
          checks++;
          if (int'(col_vl[j]) != par * 1000 + j) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
