// tb_bs_gen: checks the BS bit-stream generator against a reference LFSR:
// load, hold without step, step sequence for 300 clocks, the delay relation
// BS[j+1](t) = BS[j](t-1), and zero-seed replacement.
module tb_bs_gen;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [63:0] seed, bs, ref_s, prev;
  bs_gen #(.M(64)) dut (.clk, .rst_n, .load, .step, .seed, .bs);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    seed = 64'h0123_4567_89AB_CDEF;
    load = 1; @(negedge clk); load = 0;
    ref_s = seed;
    checks++; if (bs != ref_s) failures++;
    repeat (3) @(negedge clk);
    checks++; if (bs != ref_s) begin failures++; $display("moved without step"); end
    step = 1;
    for (int n = 0; n < 300; n++) begin
      prev = bs;
      @(negedge clk);
      ref_s = {ref_s[62:0], ref_s[63] ^ ref_s[62] ^ ref_s[60] ^ ref_s[59]};
      checks += 2;
      if (bs != ref_s) begin failures++; $display("step %0d: %h exp %h", n, bs, ref_s); end
      if (bs[63:1] != prev[62:0]) failures++;
    end
    step = 0;
    seed = '0; load = 1; @(negedge clk); load = 0;
    checks++; if (bs != '1) begin failures++; $display("zero seed not replaced"); end
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
