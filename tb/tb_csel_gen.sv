// tb_csel_gen: checks the CSEL generator. For several seeds, 16 rows of 8
// steps each: csel must be one-hot, visit exactly 8 distinct columns per row
// in increasing order, and match a reference built from the same 16-bit LFSR
// (advanced 16 places per row) and the keep-8 rule. Reloading the seed must
// repeat the sequence.
module tb_csel_gen;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [15:0] seed, csel;
  csel_gen dut (.clk, .rst_n, .load, .seed, .step, .csel);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int ref_p [128];
  int got_p [128];

  function automatic void build(logic [15:0] sd);
    logic [15:0] st;
    int n, k, got1, got0, need0;
    st = (sd == 0) ? 16'hFFFF : sd;
    n = 0;
    for (int row = 0; row < 16; row++) begin
      for (int i = 0; i < 16; i++) st = {st[14:0], st[15] ^ st[14] ^ st[12] ^ st[3]};
      k = $countones(st); need0 = (k >= 8) ? 0 : 8 - k; got1 = 0; got0 = 0;
      for (int i = 0; i < 16; i++)
        if (st[i] && got1 < 8) begin got1++; ref_p[n++] = i; end
        else if (!st[i] && got0 < need0) begin got0++; ref_p[n++] = i; end
    end
  endfunction

  task automatic run(logic [15:0] sd);
    build(sd);
    seed = sd; load = 1; @(negedge clk); load = 0;
    for (int n = 0; n < 128; n++) begin
      checks += 2;
      if (!$onehot(csel)) begin failures++; $display("not one-hot %b", csel); end
      got_p[n] = $clog2(csel);
      if (got_p[n] != ref_p[n]) begin failures++; $display("n=%0d col %0d exp %0d", n, got_p[n], ref_p[n]); end
      if (n % 8 != 0) begin
        checks++;
        if (got_p[n] <= got_p[n-1]) begin failures++; $display("not increasing at %0d", n); end
      end
      step = 1; @(negedge clk); step = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(16'hACE1);
    run(16'h0001);
    run(16'h0000);
    for (int t = 0; t < 5; t++) run(16'($urandom));
    run(16'hACE1);
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
