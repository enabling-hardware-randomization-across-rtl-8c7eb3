// tb_tlb: fills, hits and misses against a reference list, round-robin
// replacement of the oldest fill, refill of a present page in place, flush.
module tb_tlb;
  import rc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [VPN_W-1:0] lvpn, fvpn;
  logic [PPN_W-1:0] ppn, fppn;
  logic hit, fill, flush;

  tlb #(.NENTRIES(8)) dut (.clk, .rst_n, .lookup_vpn(lvpn), .hit, .ppn,
    .fill_valid(fill), .fill_vpn(fvpn), .fill_ppn(fppn), .flush);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [VPN_W-1:0] mv [$];
  logic [PPN_W-1:0] mp [$];

  task automatic do_fill(input logic [VPN_W-1:0] v, input logic [PPN_W-1:0] p);
    int at = -1;
    @(negedge clk);
    fill = 1; fvpn = v; fppn = p;
    @(negedge clk);
    fill = 0;
    foreach (mv[i]) if (mv[i] == v) at = i;
    if (at >= 0) mp[at] = p;
    else begin
      if (mv.size() == 8) begin void'(mv.pop_front()); void'(mp.pop_front()); end
      mv.push_back(v); mp.push_back(p);
    end
  endtask

  task automatic probe_all();
    foreach (mv[i]) begin
      lvpn = mv[i]; #1;
      chk(hit && ppn == mp[i], $sformatf("lookup vpn %h", mv[i]));
    end
  endtask

  initial begin
    fill = 0; flush = 0; lvpn = 0; fvpn = 0; fppn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    lvpn = 27'h123; #1;
    chk(!hit, "empty after reset");
    for (int n = 0; n < 40; n++) begin
      automatic logic [VPN_W-1:0] v = (n % 7 == 6 && mv.size() > 0) ? mv[$urandom_range(mv.size() - 1)]
                                                         : VPN_W'($urandom);
      do_fill(v, PPN_W'($urandom));
      probe_all();
      chk(mv.size() <= 8, "model size");
    end
    // a page filled long ago is gone
    lvpn = 27'h7FF_FFFF; #1;
    chk(!hit, "unknown page hits");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    foreach (mv[i]) begin lvpn = mv[i]; #1; chk(!hit, "hit after flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
