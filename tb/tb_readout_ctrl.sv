// tb_readout_ctrl: runs one frame in each mode with a scanner stand-in that
// is busy for 256 clocks after each start, and checks the control sequence:
// slots per frame (256, 64, 32, 16) and equal slot length; per slot one RST
// before the reset-level conversion and one TRG before the signal-level one,
// 2 x 128 coarse and 2 x 32 fine ADCK, ADR right before each coarse and each
// fine part, ADS before each fine part, one latch and one scan start; CDS
// direction per level; generator steps only in CS mode; in CS mode the pixel
// row advances every 8 coarse clocks with the next row preselected, and the
// block row, group and RST/TRG line mask follow the slot number.
module tb_readout_ctrl;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, frame_start = 0, scan_busy;
  cr_e cr, cr_q;
  logic busy, frame_done, rst_pulse, trg_pulse, sel_a_en, sel_b_en, row_par;
  logic [3:0] blk_row, grp_mask; logic [1:0] grp; logic [7:0] row_a, row_b, slot;
  logic gen_load, gen_step, adr, adck, adf, ads, dec_clr, dec_down, dec_latch, scan_start;
  readout_ctrl dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int sb_cnt = 0;
  always @(posedge clk) begin
    if (scan_start) sb_cnt <= 256;
    else if (sb_cnt > 0) sb_cnt <= sb_cnt - 1;
  end
  assign scan_busy = (sb_cnt > 0);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (slot %0d)", msg, slot); end
  endtask

  task automatic run(cr_e m_cr, int exp_slots);
    int n_slot, n_rst, n_trg, n_coarse, n_fine, n_adr, n_ads, n_latch, n_step, n_done;
    int phase, ncoarse_ph, cyc, slot_len, last_start;
    bit prev_adr, prev_ads;
    int gpr, k, b, exp_row;
    logic [3:0] exp_mask;
    n_slot = 0; n_rst = 0; n_trg = 0; n_coarse = 0; n_fine = 0; n_adr = 0; n_ads = 0;
    n_latch = 0; n_step = 0; n_done = 0; phase = 0; ncoarse_ph = 0; cyc = 0;
    slot_len = 0; last_start = 0; prev_adr = 0; prev_ads = 0;
    gpr = (m_cr == CR_4) ? 4 : (m_cr == CR_8) ? 2 : 1;
    @(negedge clk); cr = m_cr; frame_start = 1; @(negedge clk); frame_start = 0;
    while (!frame_done) begin
      cyc++;
      if (rst_pulse) begin n_rst++; phase = 0; ncoarse_ph = 0; chk(dec_clr, "clr with RST"); end
      if (trg_pulse) begin n_trg++; phase = 1; ncoarse_ph = 0; end
      if (rst_pulse || trg_pulse) begin
        if (m_cr == CR_1) begin exp_mask = 4'hF; chk(blk_row == slot[7:4], "blk_row normal"); end
        else begin
          k = int'(slot) / gpr; b = int'(slot) % gpr;
          exp_mask = (m_cr == CR_4) ? 4'(1 << b) : (m_cr == CR_8) ? 4'(5 << b) : 4'hF;
          chk(int'(blk_row) == k && int'(grp) == b, "block row / group");
        end
        chk(grp_mask == exp_mask, "line mask");
      end
      if (adck && !adf) begin
        if (ncoarse_ph == 0) chk(prev_adr, "ADR before coarse");
        chk(dec_down == 1'(phase), "CDS direction");
        if (m_cr != CR_1) begin
          exp_row = 16 * (int'(slot) / gpr) + ncoarse_ph / 8;
          chk(int'(row_a) == exp_row && sel_a_en, "row advance");
          chk(sel_b_en == (ncoarse_ph / 8 != 15), "preselect enable");
          if (sel_b_en) chk(int'(row_b) == exp_row + 1, "preselect row");
          chk(gen_step, "generator step");
        end else
          chk(int'(row_a) == int'(slot) && sel_a_en && !sel_b_en, "normal row");
        n_coarse++; ncoarse_ph++;
      end
      if (adck && adf) begin
        if (prev_adr) chk(prev_ads == 0, "order");
        n_fine++;
      end
      if (adck && adf && !prev_adr && n_fine % 32 == 1) chk(0, "ADR before fine");
      if (adr) n_adr++;
      if (ads) n_ads++;
      if (gen_step) n_step++;
      if (dec_latch) n_latch++;
      if (scan_start) begin
        chk(int'(slot) == n_slot, "slot order");
        if (n_slot > 1) chk(cyc - last_start == slot_len, "slot length");
        if (n_slot == 1) slot_len = cyc - last_start;
        last_start = cyc; n_slot++;
      end
      prev_adr = adr; prev_ads = ads;
      @(negedge clk);
    end
    chk(n_slot == exp_slots, "slots");
    chk(n_rst == exp_slots && n_trg == exp_slots, "RST/TRG count");
    chk(n_coarse == 256 * exp_slots && n_fine == 64 * exp_slots, "ADCK count");
    chk(n_adr == 4 * exp_slots && n_ads == 2 * exp_slots, "ADR/ADS count");
    chk(n_latch == exp_slots, "latch count");
    chk(n_step == ((m_cr == CR_1) ? 0 : 256 * exp_slots), "generator steps");
    $display("cr=%s slots=%0d slot length=%0d", m_cr.name(), n_slot, slot_len);
  endtask

  initial begin
    cr = CR_1;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    run(CR_16, 16);
    run(CR_8, 32);
    run(CR_4, 64);
    run(CR_1, 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
