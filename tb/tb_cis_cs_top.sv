// tb_cis_cs_top: end-to-end test of the compressed-sensing image sensor at
// its full size (256 x 256 pixels, 256 ADCs, all parameters at default).
//
// Captures four frames of one synthetic scene: normal capture, then
// compressed sensing at CR = 1/4, 1/8 and 1/16, switching mode between
// frames. Every code on dout is compared with a reference computed here from
// the scene and from this testbench's own models of the CSEL and BS
// generators: an ideal incremental converter gives floor(32 * S / FS) for a
// conversion whose 128 inputs sum to S, and the output is the reset-level
// code minus the signal-level code. Also checked: the number of slots per
// frame (256, 64, 32, 16) and that every slot takes the same number of
// clocks, so frame time scales by 4, 8 and 16 as the frame rates
// 120 / 480 / 960 / 1920 fps require. Counted mechanisms (each must occur):
// CS-MUX bypass, each compression ratio, mode switch, Vg insertion (BS = 0),
// two rows selected at once (interleaved settling).
module tb_cis_cs_top;
  import cs_pkg::*;

  localparam longint FS   = 4096 * 242;
  localparam longint VRST = 900000;
  localparam longint VG   = 700000;
  localparam logic [63:0] BS_SEED   = 64'h9E37_79B9_7F4A_7C15;
  localparam logic [15:0] CSEL_SEED = 16'hACE1;

  logic clk = 0, rst_n = 0;
  volt_t light [ROWS][COLS];
  cr_e   cr;
  logic  frame_start = 0;
  logic  busy, frame_done, dout_valid;
  code_t dout;
  logic [7:0] dout_adc, dout_slot;

  cis_cs_top dut (
    .clk, .rst_n, .light, .cr, .bs_seed(BS_SEED), .csel_seed(CSEL_SEED),
    .frame_start, .busy, .frame_done, .dout, .dout_valid, .dout_adc, .dout_slot
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- reference pattern generators --------------------------------------
  int unsigned ref_p [128];       // hot CSEL position for coarse cycle n
  logic [63:0] ref_bs [128];      // BS[1:64] for coarse cycle n

  function automatic logic [15:0] l16(logic [15:0] s);
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction

  task automatic build_patterns();
    logic [15:0] st = CSEL_SEED;
    logic [63:0] b  = BS_SEED;
    int n = 0;
    for (int row = 0; row < 16; row++) begin
      int cnt1 = 0, taken0 = 0, want0;
      bit chosen [16];
      for (int i = 0; i < 16; i++) st = l16(st);
      for (int i = 0; i < 16; i++) cnt1 += st[i];
      want0 = cnt1 >= 8 ? 0 : 8 - cnt1;
      // keep the first 8 ones, or all ones and the first zeros
      begin
        int got1 = 0;
        for (int i = 0; i < 16; i++) begin
          chosen[i] = 0;
          if (st[i] && got1 < 8) begin chosen[i] = 1; got1++; end
          else if (!st[i] && taken0 < want0) begin chosen[i] = 1; taken0++; end
        end
      end
      for (int i = 0; i < 16; i++) if (chosen[i]) begin ref_p[n] = i; n++; end
    end
    for (int i = 0; i < 128; i++) begin
      ref_bs[i] = b;
      b = {b[62:0], b[63] ^ b[62] ^ b[60] ^ b[59]};
    end
  endtask

  function automatic longint q32(longint s);
    return (32 * s) / FS;
  endfunction

  function automatic int expected(cr_e m_cr, int slot, int j);
    longint sr = 0, ss = 0, d;
    if (m_cr == CR_1) begin
      sr = 128 * VRST;
      ss = 128 * (VRST - longint'(light[slot][j]));
    end else begin
      int m   = (m_cr == CR_4) ? 64 : (m_cr == CR_8) ? 32 : 16;
      int gpr = 16 / (256 / m);
      int k = slot / gpr, b = slot % gpr;
      int l = b + (j / m) * gpr, s = (j % m) / 4;
      for (int n = 0; n < 128; n++) begin
        int row = 16 * k + n / 8;
        int col = 16 * l + (ref_p[n] + s) % 16;
        if (ref_bs[n][j % m]) begin
          sr += VRST;
          ss += VRST - longint'(light[row][col]);
        end else begin
          sr += VG;
          ss += VG;
        end
      end
    end
    d = q32(sr) - q32(ss);
    if (d < 0) d = 0;
    if (d > 4095) d = 4095;
    return int'(d);
  endfunction

  // ---- mechanism counters ------------------------------------------------
  int n_bypass = 0, n_cr4 = 0, n_cr8 = 0, n_cr16 = 0, n_switch = 0, n_vg = 0, n_two_rows = 0;
  always @(posedge clk) begin
    if (dut.u_ctrl.cr_q != CR_1 && dut.adck && !dut.adf && dut.bs != '1) n_vg++;
    if ($countones(dut.sel) == 2) n_two_rows++;
  end

  // ---- output checking -----------------------------------------------------
  cr_e cur_cr;
  int  slots_seen, last_slot, slot_first_cyc, slot_period;
  int  frame_fail_before;
  always @(posedge clk) if (rst_n && dout_valid) begin
    int e;
    e = expected(cur_cr, int'(dout_slot), int'(dout_adc));
    checks++;
    if (int'(dout) != e) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH cr=%s slot=%0d adc=%0d got=%0d exp=%0d", cur_cr.name(), dout_slot, dout_adc, dout, e);
    end
    if (dout_adc == 0) begin
      if (slots_seen > 0) begin
        if (slot_period == 0) slot_period = int'(cyc) - slot_first_cyc;
        else begin
          checks++;
          if (int'(cyc) - slot_first_cyc != slot_period) begin
            failures++;
            $display("slot period changed: %0d vs %0d", int'(cyc) - slot_first_cyc, slot_period);
          end
        end
      end
      slot_first_cyc = int'(cyc);
      checks++;
      if (int'(dout_slot) != slots_seen) begin
        failures++;
        $display("slot order: got %0d expected %0d", dout_slot, slots_seen);
      end
      slots_seen++;
    end
  end

  task automatic run_frame(cr_e m_cr, int exp_slots);
    cur_cr     = m_cr;
    slots_seen = 0;
    frame_fail_before = failures;
    @(negedge clk);
    cr = m_cr;
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    @(posedge frame_done);
    @(negedge clk);
    checks++;
    if (slots_seen != exp_slots) begin
      failures++;
      $display("cr=%s: %0d slots, expected %0d", m_cr.name(), slots_seen, exp_slots);
    end
    $display("frame cr=%s slots=%0d clocks/slot=%0d frame clocks=%0d failures so far=%0d",
             m_cr.name(), slots_seen, slot_period, slots_seen * slot_period, failures);
    case (m_cr)
      CR_1:  n_bypass++;
      CR_4:  n_cr4++;
      CR_8:  n_cr8++;
      CR_16: n_cr16++;
    endcase
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int unsigned h;
        h = (32'(r) * 32'd2654435761) ^ (32'(c) * 32'd40503) ^ 32'h5bd1e995;
        h = h ^ (h >> 13);
        h = h * 32'd1274126177;
        h = h ^ (h >> 16);
        // smooth gradient plus texture, 0 .. 500 mV of swing
        light[r][c] = volt_t'((r + c) * 700 + (h % 150000));
      end
    build_patterns();
    cr = CR_1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_frame(CR_1, 256);
    run_frame(CR_4, 64);
    n_switch++;
    run_frame(CR_8, 32);
    n_switch++;
    run_frame(CR_16, 16);
    n_switch++;
    $display("mechanisms: bypass=%0d cr4=%0d cr8=%0d cr16=%0d switch=%0d vg_cycles=%0d two_row_cycles=%0d",
             n_bypass, n_cr4, n_cr8, n_cr16, n_switch, n_vg, n_two_rows);
    checks += 7;
    if (n_bypass == 0)   begin failures++; $display("never: bypass"); end
    if (n_cr4 == 0)      begin failures++; $display("never: CR 1/4"); end
    if (n_cr8 == 0)      begin failures++; $display("never: CR 1/8"); end
    if (n_cr16 == 0)     begin failures++; $display("never: CR 1/16"); end
    if (n_switch == 0)   begin failures++; $display("never: mode switch"); end
    if (n_vg == 0)       begin failures++; $display("never: Vg insertion"); end
    if (n_two_rows == 0) begin failures++; $display("never: interleaved rows"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
