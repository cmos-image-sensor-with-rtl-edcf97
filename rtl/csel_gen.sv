// csel_gen: one-hot column-select code CSEL[0:15] for the column selectors.
//
// For every pixel row of a block, 8 of the 16 columns are picked and visited
// in increasing order, one per ADC clock, by a one-hot code. The pick is
// pseudo-random: a 16-bit LFSR is advanced 16 positions per row and its state
// w chosen as a mask; because exactly 8 columns must be visited (8 x 16 rows =
// 128 coarse cycles), the mask is trimmed or filled: with 8 or more ones in w
// the lowest 8 ones are kept, with fewer the lowest zero positions are added
// until 8 are set.
//
// load restarts the sequence from seed (row 0); step moves to the next picked
// column, and past the 8th to the first column of the next row. csel is
// valid from the cycle after load. The one-hot code, its width and the count
// of 8 per row follow the design description; the LFSR (taps 16, 15, 13, 4)
// and the trimming rule are this implementation's own, as the description
// does not give the generator's insides.
module csel_gen #(
  parameter int unsigned BLK         = 16,
  parameter int unsigned SEL_PER_ROW = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [15:0]    seed,
  input  logic           step,
  output logic [BLK-1:0] csel
);

  logic [15:0]    lfsr_q;
  logic [BLK-1:0] rem_q;    // columns of this row still to visit

  function automatic logic [15:0] adv16(logic [15:0] s);
    logic [15:0] r = s;
    for (int i = 0; i < 16; i++) r = {r[14:0], r[15] ^ r[14] ^ r[12] ^ r[3]};
    return r;
  endfunction

  function automatic logic [BLK-1:0] pick(logic [15:0] w);
    logic [BLK-1:0] m = '0;
    int ones = 0, zeros = 0, k = 0, need0;
    for (int p = 0; p < BLK; p++) k += int'(w[p]);
    need0 = (k >= int'(SEL_PER_ROW)) ? 0 : int'(SEL_PER_ROW) - k;
    for (int p = 0; p < BLK; p++)
      if (w[p]) begin
        if (ones < int'(SEL_PER_ROW)) m[p] = 1'b1;
        ones++;
      end else begin
        if (zeros < need0) m[p] = 1'b1;
        zeros++;
      end
    return m;
  endfunction

  logic [15:0]    seed_nz, nxt;
  logic [BLK-1:0] rem_next;

  assign seed_nz  = (seed == '0) ? 16'hFFFF : seed;
  assign csel     = rem_q & (~rem_q + 1'b1);   // lowest column still to visit
  assign rem_next = rem_q & ~csel;

  // Next row's LFSR state: from the seed on load, else from the current state.
  assign nxt = adv16(load ? seed_nz : lfsr_q);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      lfsr_q <= 16'hFFFF;
      rem_q  <= '0;
    end else if (load || (step && rem_next == '0)) begin
      lfsr_q <= nxt;
      rem_q  <= pick(nxt);
    end else if (step)
      rem_q <= rem_next;

endmodule
