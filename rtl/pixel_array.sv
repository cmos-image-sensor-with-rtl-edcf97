// pixel_array: behavioural model of the 256 x 256 4-T pixel array.
//
// This is a behavioural model of an analog part, not synthesizable logic
// intended for silicon. Each pixel is a pinned photodiode with transfer,
// reset, source-follower and select transistors. As in the described sensor,
// reset (RST) and transfer (TRG) gates are driven per 16 x 16 block and the
// select gate (SEL) per row. RST line rst_blk[k][g] drives the blocks of block
// row k whose block column l satisfies l % 4 == g, so one line serves the
// blocks (k,g), (k,g+4), (k,g+8), (k,g+12) that are read out together.
//
// Each column has two vertical lines: VL_{j,0} serves the even rows and
// VL_{j,1} the odd rows, so that the next row can settle on one line while
// the current row is converted from the other. A line that has just been
// switched to another row, or whose block has just been reset or transferred,
// keeps its old voltage for SETTLE clocks and then takes the new one.
//
// Per block the floating diffusion state is tracked: after RST every pixel of
// the block reads VRST_UV, after TRG it reads VRST_UV - light. The scene
// (light, the signal swing per pixel in uV) is taken as constant over a frame
// and charge depletion on transfer is not modelled. Before the first RST a
// block reads 0 V. The reset level and SETTLE are this model's own values.
//
// Interface: light [ROWS][COLS] (uV), sel[ROWS], rst_blk/trg_blk [16][4];
// output vl[2][COLS] updates on the clock edge.
module pixel_array
  import cs_pkg::*;
#(
  parameter int unsigned SETTLE  = 4,
  parameter int unsigned VRST_UV = 900000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  volt_t             light   [ROWS][COLS],
  input  logic [ROWS-1:0]   sel,
  input  logic [NBLK-1:0][3:0] rst_blk,
  input  logic [NBLK-1:0][3:0] trg_blk,
  output volt_t             vl      [2][COLS]
);

  typedef enum logic [1:0] {FD_UNKNOWN, FD_RESET, FD_XFER} fd_e;

  fd_e fd_q [NBLK][NBLK];  // [block row][block column]

  // Row currently driving each vertical line (0 when none selected).
  logic [7:0] drv_row  [2];
  logic       drv_en   [2];
  logic [7:0] drv_row_q[2];
  logic       drv_en_q [2];
  logic [7:0] settle_q [2];
  logic       any_gate;

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      drv_row[p] = '0;
      drv_en[p]  = 1'b0;
      for (int r = ROWS - 2 + p; r >= 0; r -= 2)
        if (sel[r]) begin
          drv_row[p] = 8'(r);
          drv_en[p]  = 1'b1;
        end
    end
    any_gate = |rst_blk || |trg_blk;
  end

  // Floating-diffusion state per block.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < NBLK; k++)
        for (int l = 0; l < NBLK; l++) fd_q[k][l] <= FD_UNKNOWN;
    end else begin
      for (int k = 0; k < NBLK; k++)
        for (int l = 0; l < NBLK; l++)
          if (rst_blk[k][l%4])      fd_q[k][l] <= FD_RESET;
          else if (trg_blk[k][l%4]) fd_q[k][l] <= FD_XFER;
    end

  // Settling: a change of driving row or a gate pulse restarts the count.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int p = 0; p < 2; p++) begin
        drv_row_q[p] <= '0;
        drv_en_q[p]  <= 1'b0;
        settle_q[p]  <= 8'(SETTLE);
        for (int c = 0; c < COLS; c++) vl[p][c] <= '0;
      end
    end else begin
      for (int p = 0; p < 2; p++) begin
        drv_row_q[p] <= drv_row[p];
        drv_en_q[p]  <= drv_en[p];
        if (any_gate || drv_en[p] != drv_en_q[p] || drv_row[p] != drv_row_q[p])
          settle_q[p] <= 8'(SETTLE);
        else if (settle_q[p] != 0)
          settle_q[p] <= settle_q[p] - 8'd1;
        else if (drv_en[p])
          for (int c = 0; c < COLS; c++) begin
            case (fd_q[int'(drv_row[p]) / BLK][c / BLK])
              FD_RESET: vl[p][c] <= volt_t'(VRST_UV);
              FD_XFER:  vl[p][c] <= volt_t'(VRST_UV) - light[drv_row[p]][c];
              default:  vl[p][c] <= '0;
            endcase
          end
      end
    end

endmodule
