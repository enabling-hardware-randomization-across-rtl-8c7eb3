// tb_rand_modes: the four placement modes of the hierarchy side by side on
// the same access pattern: random modulo (RM), hash (HF), and their skewed
// variants. All must return correct data. A contiguous region of exactly the
// L1 size fits without a conflict miss under unskewed random modulo, because
// it permutes the index within each page; hashing has no such guarantee and
// is expected to lose lines. Miss counts of every mode are printed.
module tb_rand_modes;
  import rc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d [4];
  int   c [4], f [4], p2 [4], tm [4];

  tb_hier_env #(.FN(FN_RM), .SKEWED(1'b0)) e_rm   (.clk, .rst_n, .done(d[0]), .checks(c[0]), .failures(f[0]), .pass2_misses(p2[0]), .total_misses(tm[0]));
  tb_hier_env #(.FN(FN_HF), .SKEWED(1'b0)) e_hf   (.clk, .rst_n, .done(d[1]), .checks(c[1]), .failures(f[1]), .pass2_misses(p2[1]), .total_misses(tm[1]));
  tb_hier_env #(.FN(FN_RM), .SKEWED(1'b1)) e_skrm (.clk, .rst_n, .done(d[2]), .checks(c[2]), .failures(f[2]), .pass2_misses(p2[2]), .total_misses(tm[2]));
  tb_hier_env #(.FN(FN_HF), .SKEWED(1'b1)) e_skhf (.clk, .rst_n, .done(d[3]), .checks(c[3]), .failures(f[3]), .pass2_misses(p2[3]), .total_misses(tm[3]));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int m = 0; m < 4; m++) begin
      checks += c[m] + 1;
      failures += f[m];
      if (c[m] < 1000) begin failures++; $display("FAIL: mode %0d made too few checks", m); end
    end
    checks++;
    if (p2[0] != 0) begin failures++; $display("FAIL: RM lost %0d lines of an L1-sized region", p2[0]); end
    checks++;
    if (p2[1] == 0) begin failures++; $display("FAIL: HF kept an L1-sized region without conflicts"); end
    $display("second-pass L1 misses over 256 lines:  RM=%0d  HF=%0d  Sk_RM=%0d  Sk_HF=%0d", p2[0], p2[1], p2[2], p2[3]);
    $display("total L1 misses:                       RM=%0d  HF=%0d  Sk_RM=%0d  Sk_HF=%0d", tm[0], tm[1], tm[2], tm[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
