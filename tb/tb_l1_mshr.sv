// tb_l1_mshr: allocation of the lowest free entry, full/empty flags, stored
// fields (line address, randomized index, way, request), address match and
// freeing in any order.
module tb_l1_mshr;
  import rc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc, free, full, empty, match;
  logic [LADDR_W-1:0] a_laddr, r_laddr, lk;
  logic [L1_IDX_W-1:0] a_idx, r_idx;
  logic [1:0] a_way, r_way;
  cpu_req_t a_req, r_req;
  logic [0:0] a_id, f_id, rd_id;

  l1_mshr #(.NENT(2)) dut (.clk, .rst_n, .alloc, .alloc_laddr(a_laddr), .alloc_rnd_idx(a_idx),
    .alloc_way(a_way), .alloc_req(a_req), .alloc_id(a_id), .full, .empty, .free, .free_id(f_id),
    .read_id(rd_id), .read_laddr(r_laddr), .read_rnd_idx(r_idx), .read_way(r_way), .read_req(r_req),
    .lookup_laddr(lk), .match);

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

  bit                  mvalid [2];
  logic [LADDR_W-1:0]  mladdr [2];
  logic [L1_IDX_W-1:0] midx   [2];
  logic [1:0]          mway   [2];
  cpu_req_t            mreq   [2];

  initial begin
    alloc = 0; free = 0; a_laddr = 0; a_idx = 0; a_way = 0; a_req = '0; f_id = 0; rd_id = 0; lk = 0;
    mvalid[0] = 0; mvalid[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full, "empty after reset");
    for (int n = 0; n < 200; n++) begin
      int exp_id;
      @(negedge clk);
      alloc = 0; free = 0;
      exp_id = !mvalid[0] ? 0 : (!mvalid[1] ? 1 : -1);
      chk(full == (exp_id < 0), "full flag");
      chk(empty == (!mvalid[0] && !mvalid[1]), "empty flag");
      if (exp_id >= 0) chk(a_id == 1'(exp_id), "lowest free entry");
      // read back and match every valid entry
      for (int e = 0; e < 2; e++) if (mvalid[e]) begin
        rd_id = 1'(e); lk = mladdr[e]; #1;
        chk(r_laddr == mladdr[e] && r_idx == midx[e] && r_way == mway[e] && r_req == mreq[e],
            $sformatf("entry %0d contents", e));
        chk(match, "match on held address");
      end
      lk = ~mladdr[0] ^ mladdr[1] ^ 26'h155; #1;
      chk(match == ((mvalid[0] && mladdr[0] == lk) || (mvalid[1] && mladdr[1] == lk)), "match on other address");
      if (exp_id >= 0 && !full && $urandom_range(1)) begin
        alloc = 1; a_laddr = LADDR_W'($urandom); a_idx = L1_IDX_W'($urandom); a_way = 2'($urandom);
        a_req = '{vaddr: {$urandom, $urandom}, write: 1'($urandom), wdata: {$urandom, $urandom}, wmask: 8'($urandom)};
        mvalid[exp_id] = 1; mladdr[exp_id] = a_laddr; midx[exp_id] = a_idx; mway[exp_id] = a_way; mreq[exp_id] = a_req;
      end else if (mvalid[0] || mvalid[1]) begin
        automatic int e = (mvalid[0] && mvalid[1]) ? $urandom_range(1) : (mvalid[0] ? 0 : 1);
        free = 1; f_id = 1'(e); mvalid[e] = 0;
      end
    end
    @(negedge clk); alloc = 0; free = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
