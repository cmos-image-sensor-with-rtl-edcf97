// tb_row_selector: random stimulus on the row/block decoder; checks SEL has
// exactly the enabled rows and RST/TRG fire only on the chosen block row
// with the chosen line mask.
module tb_row_selector;
  import cs_pkg::*;
  logic [3:0] blk_row, grp_mask;
  logic rst_pulse, trg_pulse, sel_a_en, sel_b_en;
  logic [7:0] row_a, row_b;
  logic [ROWS-1:0] sel;
  logic [NBLK-1:0][3:0] rst_blk, trg_blk;
  row_selector dut (.blk_row, .grp_mask, .rst_pulse, .trg_pulse, .sel_a_en, .row_a,
                    .sel_b_en, .row_b, .sel, .rst_blk, .trg_blk);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 2000; t++) begin
      blk_row = 4'($urandom); grp_mask = 4'($urandom);
      rst_pulse = 1'($urandom); trg_pulse = 1'($urandom);
      sel_a_en = 1'($urandom); sel_b_en = 1'($urandom);
      row_a = 8'($urandom); row_b = {row_a[7:1] + 7'($urandom_range(0, 1)), ~row_a[0]};
      #1;
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (sel[r] != ((sel_a_en && r == int'(row_a)) || (sel_b_en && r == int'(row_b)))) failures++;
      end
      for (int k = 0; k < 16; k++) begin
        checks += 2;
        if (rst_blk[k] != ((rst_pulse && k == int'(blk_row)) ? grp_mask : 4'b0)) failures++;
        if (trg_blk[k] != ((trg_pulse && k == int'(blk_row)) ? grp_mask : 4'b0)) failures++;
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
