// tb_pixel_array: checks the pixel array model. A block row is reset and
// rows are selected on both vertical lines: each line must keep its old
// value for SETTLE clocks after a change and then show VRST (after RST) or
// VRST - light (after TRG) of the row of its parity; RST/TRG act only on the
// blocks of the chosen lines (l % 4); an unreset block reads 0.
module tb_pixel_array;
  import cs_pkg::*;
  localparam int SETTLE = 4;
  localparam int VRST = 900000;
  logic clk = 0, rst_n = 0;
  volt_t light [ROWS][COLS];
  logic [ROWS-1:0] sel;
  logic [NBLK-1:0][3:0] rst_blk, trg_blk;
  volt_t vl [2][COLS];
  pixel_array #(.SETTLE(SETTLE), .VRST_UV(VRST)) dut (.clk, .rst_n, .light, .sel, .rst_blk, .trg_blk, .vl);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic int exp_v(int row, int col, int state);  // 0 unknown 1 reset 2 xfer
    return state == 1 ? VRST : state == 2 ? VRST - int'(light[row][col]) : 0;
  endfunction

  task automatic check_line(int p, int row, int lmask, int state_in, int state_out, string msg);
    for (int c = 0; c < COLS; c++) begin
      int st;
      st = ((lmask >> ((c / 16) % 4)) & 1) ? state_in : state_out;
      checks++;
      if (int'(vl[p][c]) != exp_v(row, c, st)) begin
        failures++;
        if (failures < 8) $display("%s: line %0d col %0d got %0d exp %0d", msg, p, c, vl[p][c], exp_v(row, c, st));
      end
    end
  endtask

  initial begin
    volt_t old_v;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) light[r][c] = volt_t'($urandom_range(0, 500000));
    sel = '0; rst_blk = '0; trg_blk = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // block row 3, lines 0 and 2: reset, rows 48 and 49 selected
    sel[48] = 1; sel[49] = 1; rst_blk[3] = 4'b0101;
    @(negedge clk); rst_blk = '0;
    repeat (SETTLE + 1) @(negedge clk);
    check_line(0, 48, 4'b0101, 1, 0, "after RST even");
    check_line(1, 49, 4'b0101, 1, 0, "after RST odd");
    // transfer on the same lines
    trg_blk[3] = 4'b0101; @(negedge clk); trg_blk = '0;
    old_v = vl[0][0];
    repeat (SETTLE) @(negedge clk);
    checks++; if (vl[0][0] != old_v) begin failures++; $display("changed before settling"); end
    @(negedge clk);
    check_line(0, 48, 4'b0101, 2, 0, "after TRG even");
    check_line(1, 49, 4'b0101, 2, 0, "after TRG odd");
    // move the odd line to row 51: even line unaffected, odd line settles
    sel[49] = 0; sel[51] = 1;
    @(negedge clk);
    check_line(0, 48, 4'b0101, 2, 0, "even untouched");
    repeat (SETTLE) @(negedge clk);
    checks++; if (int'(vl[1][0]) != exp_v(49, 0, 2)) begin failures++; $display("odd line changed early"); end
    @(negedge clk);
    check_line(1, 51, 4'b0101, 2, 0, "odd line new row");
    // reset the other two lines of the block row too
    rst_blk[3] = 4'b1010; @(negedge clk); rst_blk = '0;
    repeat (SETTLE + 1) @(negedge clk);
    check_line(0, 48, 4'b0101, 2, 1, "mixed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
