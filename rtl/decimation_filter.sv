// decimation_filter: per-column decimation counters with digital CDS.
//
// Two up/down counters count the modulator bit D_M: an 8-bit one during the
// coarse cycles (adf = 0) and a 6-bit one during the fine cycles (adf = 1).
// Correlated double sampling is done in the counters: they count up while the
// pixel reset level is converted (down = 0) and down while the signal level is
// converted (down = 1), so they end holding reset minus signal. On latch the
// result 32 * coarse + fine is clamped to 0..4095 and held in the output
// latch, which the column scanner reads while the next conversion runs.
// clr empties both counters before a reset-level conversion.
//
// Counter widths (8 and 6 bits), their split into coarse and fine, up/down
// counting and CDS follow the design description. The counting direction per
// level, the two's-complement treatment, clamping and the latch timing are
// this implementation's choices. Ripple counters are written as synchronous
// counters.
module decimation_filter
  import cs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  adck,
  input  logic  adf,
  input  logic  down,
  input  logic  dm,
  input  logic  latch,
  output code_t do_q
);

  logic signed [7:0] coarse_q;
  logic signed [5:0] fine_q;
  logic signed [13:0] val;

  assign val = 14'(coarse_q) * 14'sd32 + 14'(fine_q);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      coarse_q <= '0;
      fine_q   <= '0;
      do_q     <= '0;
    end else begin
      if (clr) begin
        coarse_q <= '0;
        fine_q   <= '0;
      end else if (adck && dm) begin
        if (!adf) coarse_q <= down ? coarse_q - 8'sd1 : coarse_q + 8'sd1;
        else      fine_q   <= down ? fine_q - 6'sd1   : fine_q + 6'sd1;
      end
      if (latch)
        do_q <= (val < 0) ? '0 : (val > 14'sd4095) ? code_t'(4095) : code_t'(val);
    end

endmodule
