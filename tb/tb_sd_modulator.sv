// tb_sd_modulator: checks the incremental sigma-delta modulator model.
//
// For random input sequences of 128 coarse cycles the number of ones must be
// floor(S / FS) (S = sum of inputs); after storing the residue and 32 fine
// cycles the fine count must be floor(32 * r / FS) with r = S - coarse * FS.
// A constant input and a varying sequence with the same sum must give the
// same coarse and fine counts (averaging and quantising at once).
module tb_sd_modulator;
  import cs_pkg::*;
  localparam longint FS = 4096 * 242;

  logic clk = 0, adr = 0, adck = 0, adf = 0, ads = 0, dm;
  volt_t adi = '0;
  sd_modulator dut (.clk, .adi, .adr, .adck, .adf, .ads, .dm);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int coarse_cnt, fine_cnt;

  task automatic convert(input volt_t seq [128], output int c, output int f);
    c = 0; f = 0;
    @(negedge clk); adr = 1; @(negedge clk); adr = 0;
    for (int n = 0; n < 128; n++) begin
      adi = seq[n]; adck = 1;
      #1 c += int'(dm);
      @(negedge clk);
    end
    adck = 0; ads = 1; @(negedge clk); ads = 0; adr = 1; @(negedge clk); adr = 0;
    adf = 1; adck = 1;
    for (int n = 0; n < 32; n++) begin
      #1 f += int'(dm);
      @(negedge clk);
    end
    adck = 0; adf = 0;
  endtask

  task automatic check_seq(input volt_t seq [128]);
    longint s, r, ec, ef;
    int c, f;
    s = 0;
    for (int n = 0; n < 128; n++) s += longint'(seq[n]);
    ec = s / FS; r = s - ec * FS; ef = (32 * r) / FS;
    convert(seq, c, f);
    checks += 2;
    if (c != int'(ec)) begin failures++; $display("coarse %0d exp %0d", c, ec); end
    if (f != int'(ef)) begin failures++; $display("fine %0d exp %0d", f, ef); end
    coarse_cnt = c; fine_cnt = f;
  endtask

  initial begin
    volt_t seq [128];
    int c0, f0;
    for (int t = 0; t < 40; t++) begin
      for (int n = 0; n < 128; n++) seq[n] = volt_t'($urandom_range(0, 990000));
      check_seq(seq);
    end
    // averaging: constant x and a zero-mean perturbed sequence with equal sum
    for (int t = 0; t < 10; t++) begin
      int unsigned xc, d;
      xc = $urandom_range(200000, 800000);
      for (int n = 0; n < 128; n++) seq[n] = volt_t'(xc);
      check_seq(seq);
      c0 = coarse_cnt; f0 = fine_cnt;
      for (int n = 0; n < 128; n += 2) begin
        d = $urandom_range(0, 150000);
        seq[n] = volt_t'(xc + d); seq[n+1] = volt_t'(xc - d);
      end
      check_seq(seq);
      checks++;
      if (coarse_cnt != c0 || fine_cnt != f0) begin failures++; $display("averaging differs"); end
    end
    // extremes
    for (int n = 0; n < 128; n++) seq[n] = '0;
    check_seq(seq);
    for (int n = 0; n < 128; n++) seq[n] = volt_t'(FS - 1);
    check_seq(seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
