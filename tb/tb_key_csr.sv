// tb_key_csr: reset values come from the seed and differ per key,
// privileged writes and reads work, user-mode accesses are refused and
// flagged, other CSR numbers are ignored, key_changed pulses on a write.
module tb_key_csr;
  import rc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NK = 4;
  logic [KEY_W-1:0] seed;
  logic             en, we, hit, illegal, changed;
  logic [11:0]      addr;
  logic [KEY_W-1:0] wdata, rdata;
  priv_e            priv;
  logic [KEY_W-1:0] keys [NK];

  key_csr #(.NKEYS(NK), .BASE(12'h5C0)) dut (
    .clk, .rst_n, .seed, .csr_en(en), .csr_we(we), .csr_addr(addr), .csr_wdata(wdata),
    .csr_priv(priv), .csr_hit(hit), .csr_rdata(rdata), .illegal, .key_changed(changed), .keys);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit w, input logic [11:0] a, input logic [KEY_W-1:0] d, input priv_e p);
    @(negedge clk);
    en = 1; we = w; addr = a; wdata = d; priv = p;
  endtask

  initial begin
    logic [KEY_W-1:0] model [NK];
    logic [KEY_W-1:0] v;
    en = 0; we = 0; addr = 0; wdata = 0; priv = PRV_M;
    seed = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < NK; k++) begin
      model[k] = seed ^ (64'h9E37_79B9_7F4A_7C15 * 64'(k + 1));
      chk(keys[k] == model[k], $sformatf("reset key %0d", k));
    end
    chk(keys[0] != keys[1] && keys[2] != keys[3], "per-way reset keys equal");

    for (int n = 0; n < 60; n++) begin
      automatic int k = $urandom_range(NK + 1);            // one past the range too
      automatic priv_e p = ($urandom_range(2) == 0) ? PRV_U : (($urandom_range(1) == 0) ? PRV_S : PRV_M);
      automatic bit w = $urandom_range(1);
      v = {$urandom, $urandom};
      access(w, 12'h5C0 + 12'(k), v, p);
      #1;
      chk(hit == (k < NK), "hit decode");
      chk(illegal == (k < NK && p == PRV_U), "illegal flag");
      chk(rdata == ((k < NK && p != PRV_U) ? model[k] : '0), $sformatf("read key %0d", k));
      @(posedge clk);
      #1;
      chk(changed == (w && k < NK && p != PRV_U), "key_changed pulse");
      if (w && k < NK && p != PRV_U) model[k] = v;
      for (int j = 0; j < NK; j++) chk(keys[j] == model[j], $sformatf("key %0d after access", j));
      en = 0;
    end
    // an unrelated CSR number below the range
    access(1, 12'h5BF, 64'h1234, PRV_M);
    @(posedge clk); #1;
    chk(keys[0] == model[0] && !changed, "write below range ignored");
    en = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
