// readout_ctrl: readout timing controller of the compressed-sensing sensor.
//
// A frame is a sequence of conversion slots. In normal capture (CR = 1) a
// slot is one pixel row, read by all 256 ADCs through the bypassed CS-MUX:
// 256 slots. In compressed sensing a slot is one block group of a block row
// (4, 8 or 16 blocks), read by 16 x 8 = 128 selected pixel accesses per ADC:
// 16 block rows x 4, 2 or 1 groups = 64, 32 or 16 slots. All slots have the
// same length, so frame time scales with the compression ratio.
//
// Each slot converts the pixel reset level, then the signal level (digital
// CDS), each with the same sequence:
//   PULSE  1 clock   RST (reset level) or TRG (signal level) of the blocks,
//                    CSEL and BS generators reloaded with their seeds,
//                    decimation counters cleared (reset level only)
//   PRE    SETTLE+3  first row(s) selected and settling; ADR on the last clock
//   COARSE 128       ADCK; in CS mode CSEL and BS step every clock and the
//                    pixel row advances every 8 clocks; the next row is
//                    selected one row early on the other vertical line
//   HOLD   1         ADS: integrator residue to the hold capacitor
//   FRST   1         ADR
//   FINE   32        ADCK with ADF
// After the signal level, LATCH (1) stores the codes and NEXT (1) starts the
// column scanner with the slot number and moves to the next slot. After the
// last slot the controller waits for the scan to end and pulses frame_done.
// cr is sampled when frame_start is seen.
//
// The row/group order, the CDS order, the 8 clocks per row, the 128 + 32
// modulator cycles and the interleaved row access follow the description;
// the exact clock counts of PULSE, PRE, HOLD, FRST, LATCH and NEXT are this
// implementation's own.
module readout_ctrl
  import cs_pkg::*;
#(
  parameter int unsigned SETTLE = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_start,
  input  cr_e        cr,
  input  logic       scan_busy,
  output cr_e        cr_q,
  output logic       busy,
  output logic       frame_done,
  // row block / pixel selectors
  output logic [3:0] blk_row,
  output logic [3:0] grp_mask,
  output logic [1:0] grp,
  output logic       rst_pulse,
  output logic       trg_pulse,
  output logic       sel_a_en,
  output logic [7:0] row_a,
  output logic       sel_b_en,
  output logic [7:0] row_b,
  output logic       row_par,
  // pattern generators
  output logic       gen_load,
  output logic       gen_step,
  // ADC
  output logic       adr,
  output logic       adck,
  output logic       adf,
  output logic       ads,
  output logic       dec_clr,
  output logic       dec_down,
  output logic       dec_latch,
  // scanner
  output logic       scan_start,
  output logic [7:0] slot
);

  localparam int unsigned PRE_LEN = SETTLE + 3;

  typedef enum logic [3:0] {
    S_IDLE, S_PULSE, S_PRE, S_COARSE, S_HOLD, S_FRST, S_FINE, S_LATCH, S_NEXT, S_DRAIN
  } state_e;

  state_e     st_q;
  logic [7:0] cnt_q;
  logic       phase_q;     // 0 reset level, 1 signal level
  logic [7:0] slot_q;
  logic       done_q;

  logic [8:0] n_slots;
  logic [2:0] gpr;
  logic [3:0] r_in_blk;    // pixel row within the block row
  logic [7:0] base_row;
  logic       cs_mode;

  always_comb begin
    cs_mode  = (cr_q != CR_1);
    gpr      = 3'(groups_per_blkrow(cr_q));
    n_slots  = cs_mode ? 9'(16 * groups_per_blkrow(cr_q)) : 9'(ROWS);
    if (cs_mode) begin
      blk_row = 4'(slot_q / 8'(gpr));
      grp     = 2'(slot_q % 8'(gpr));
    end else begin
      blk_row = slot_q[7:4];
      grp     = 2'd0;
    end
    case (cr_q)
      CR_4:    grp_mask = 4'b0001 << grp;
      CR_8:    grp_mask = (4'b0101 << grp);
      default: grp_mask = 4'b1111;
    endcase
    base_row = {blk_row, 4'd0};
    r_in_blk = (st_q == S_COARSE) ? cnt_q[6:3] : 4'd0;
  end

  // Control outputs decoded from the state.
  always_comb begin
    rst_pulse  = (st_q == S_PULSE) && !phase_q;
    trg_pulse  = (st_q == S_PULSE) &&  phase_q;
    dec_clr    = (st_q == S_PULSE) && !phase_q;
    gen_load   = (st_q == S_PULSE);
    gen_step   = (st_q == S_COARSE) && cs_mode;
    adr        = ((st_q == S_PRE) && cnt_q == 8'(PRE_LEN - 1)) || (st_q == S_FRST);
    adck       = (st_q == S_COARSE) || (st_q == S_FINE);
    adf        = (st_q == S_FINE);
    ads        = (st_q == S_HOLD);
    dec_down   = phase_q;
    dec_latch  = (st_q == S_LATCH);
    scan_start = (st_q == S_NEXT);
    slot       = slot_q;
    busy       = (st_q != S_IDLE);
    frame_done = done_q;
    sel_a_en   = (st_q == S_PULSE) || (st_q == S_PRE) || (st_q == S_COARSE);
    if (cs_mode) begin
      row_a    = base_row + 8'(r_in_blk);
      row_b    = row_a + 8'd1;
      sel_b_en = sel_a_en && (r_in_blk != 4'd15);
    end else begin
      row_a    = slot_q;
      row_b    = slot_q;
      sel_b_en = 1'b0;
    end
    row_par    = row_a[0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st_q    <= S_IDLE;
      cnt_q   <= '0;
      phase_q <= 1'b0;
      slot_q  <= '0;
      cr_q    <= CR_1;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      cnt_q  <= cnt_q + 8'd1;
      unique case (st_q)
        S_IDLE:
          if (frame_start) begin
            cr_q    <= cr;
            slot_q  <= '0;
            phase_q <= 1'b0;
            st_q    <= S_PULSE;
          end
        S_PULSE:  begin st_q <= S_PRE; cnt_q <= '0; end
        S_PRE:    if (cnt_q == 8'(PRE_LEN - 1))  begin st_q <= S_COARSE; cnt_q <= '0; end
        S_COARSE: if (cnt_q == 8'(N_COARSE - 1)) st_q <= S_HOLD;
        S_HOLD:   st_q <= S_FRST;
        S_FRST:   begin st_q <= S_FINE; cnt_q <= '0; end
        S_FINE:
          if (cnt_q == 8'(N_FINE - 1)) begin
            if (!phase_q) begin phase_q <= 1'b1; st_q <= S_PULSE; end
            else          st_q <= S_LATCH;
          end
        S_LATCH:  st_q <= S_NEXT;
        S_NEXT: begin
          phase_q <= 1'b0;
          if (9'(slot_q) == n_slots - 9'd1) st_q <= S_DRAIN;
          else begin
            slot_q <= slot_q + 8'd1;
            st_q   <= S_PULSE;
          end
        end
        S_DRAIN:
          if (!scan_busy) begin
            done_q <= 1'b1;
            st_q   <= S_IDLE;
          end
        default: st_q <= S_IDLE;
      endcase
    end

endmodule
