// tb_cs_mux: random block lines, CSEL positions and BS words; checks every
// ADC input for every compression ratio: the pixel at column (p + s) mod 16
// of its selector's block when its BS bit (index j mod m) is 1, Vg = 700 mV
// when it is 0, and the own column line in normal capture.
module tb_cs_mux;
  import cs_pkg::*;
  volt_t blk_vl [NSELECTORS][BLK];
  volt_t col_vl [COLS];
  volt_t adi [COLS];
  logic [15:0] csel; logic [63:0] bs; cr_e cr;
  cs_mux dut (.blk_vl, .col_vl, .csel, .bs, .cr, .adi);
  int checks = 0, failures = 0, n_vg = 0, n_pix = 0;
  initial begin
    for (int t = 0; t < 200; t++) begin
      int p, m, s, e;
      for (int c = 0; c < NSELECTORS; c++) for (int k = 0; k < 16; k++) blk_vl[c][k] = volt_t'($urandom_range(0, 990000));
      for (int j = 0; j < COLS; j++) col_vl[j] = volt_t'($urandom_range(0, 990000));
      p = $urandom_range(0, 15); csel = 16'(1) << p;
      bs = {$urandom, $urandom};
      cr = cr_e'(t % 4);
      #1;
      m = (cr == CR_4) ? 64 : (cr == CR_8) ? 32 : 16;
      for (int j = 0; j < COLS; j++) begin
        s = (j % m) / 4;
        if (cr == CR_1) e = int'(col_vl[j]);
        else if (bs[j % m]) begin e = int'(blk_vl[j / 4][(p + s) % 16]); n_pix++; end
        else begin e = 700000; n_vg++; end
        checks++;
        if (int'(adi[j]) != e) begin
          failures++;
          if (failures < 5) $display("cr=%0d j=%0d got %0d exp %0d", cr, j, adi[j], e);
        end
      end
    end
    checks++;
    if (n_vg == 0 || n_pix == 0) failures++;
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
