// tb_column_scanner: loads 256 random codes, starts a scan and checks that
// each column comes out once, in order, one per clock, with its index and the
// tag, and that valid drops after 256 clocks.
module tb_column_scanner;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dout_valid, busy;
  logic [7:0] tag, dout_idx, dout_tag;
  code_t codes [COLS];
  code_t dout;
  column_scanner dut (.clk, .rst_n, .start, .tag, .codes, .dout, .dout_valid, .dout_idx, .dout_tag, .busy);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int j = 0; j < COLS; j++) codes[j] = code_t'($urandom);
      tag = 8'(rep * 7 + 3);
      start = 1; @(negedge clk); start = 0;
      for (int j = 0; j < COLS; j++) begin
        checks++;
        if (!dout_valid || int'(dout_idx) != j || dout != codes[j] || dout_tag != tag) begin
          failures++;
          if (failures < 5) $display("j=%0d valid=%0d idx=%0d dout=%0d exp %0d", j, dout_valid, dout_idx, dout, codes[j]);
        end
        @(negedge clk);
      end
      checks++;
      if (dout_valid) begin failures++; $display("valid after 256"); end
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
