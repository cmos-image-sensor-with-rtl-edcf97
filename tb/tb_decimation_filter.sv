// tb_decimation_filter: checks the coarse/fine up/down counters and CDS.
//
// Feeds known numbers of D_M ones for the reset level (counting up) and the
// signal level (counting down), in the coarse and the fine phase, and checks
// the latched code 32 * (coarse difference) + (fine difference), clamped to
// 0..4095, and that the latch holds while the counters run again.
module tb_decimation_filter;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, adck = 0, adf = 0, down = 0, dm = 0, latch = 0;
  code_t do_q;
  decimation_filter dut (.clk, .rst_n, .clr, .adck, .adf, .down, .dm, .latch, .do_q);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic feed(input bit f, input int ones, input int total);
    adck = 1; adf = f;
    for (int n = 0; n < total; n++) begin
      dm = (n < ones);
      @(negedge clk);
    end
    adck = 0; dm = 0;
  endtask

  task automatic cds(input int cr, input int fr, input int cs, input int fs);
    int e;
    clr = 1; @(negedge clk); clr = 0;
    down = 0; feed(0, cr, 128); feed(1, fr, 32);
    down = 1; feed(0, cs, 128); feed(1, fs, 32);
    latch = 1; @(negedge clk); latch = 0;
    e = 32 * (cr - cs) + (fr - fs);
    if (e < 0) e = 0;
    if (e > 4095) e = 4095;
    checks++;
    if (int'(do_q) != e) begin failures++; $display("code %0d exp %0d (%0d %0d %0d %0d)", do_q, e, cr, fr, cs, fs); end
    // latch holds during the next conversion
    clr = 1; @(negedge clk); clr = 0; feed(0, 50, 60);
    checks++;
    if (int'(do_q) != e) begin failures++; $display("latch did not hold"); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    cds(120, 10, 30, 25);
    cds(127, 31, 0, 0);
    cds(10, 0, 10, 5);      // negative -> 0
    cds(50, 5, 60, 1);      // negative -> 0
    for (int t = 0; t < 40; t++) begin
      int a, b;
      a = $urandom_range(0, 127); b = $urandom_range(0, a);
      cds(a, $urandom_range(0, 31), b, $urandom_range(0, 31));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
