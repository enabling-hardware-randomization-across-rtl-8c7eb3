// tb_hier_env: one complete hierarchy (rand_cache_top) with a memory model
// and page-table walker, driven from core 0 with a fixed access pattern;
// core 1 stays idle. Used by tb_rand_modes to compare placement modes.
//
// Pattern: two passes of loads over a contiguous 16 KiB region (exactly the
// L1 capacity, four virtual pages), then stores and loads with a 4 KiB
// stride over 12 pages, then random accesses. Every load is checked against
// an architectural memory. pass2_misses counts L1 misses of the second
// sequential pass: conflict misses caused by the placement function.
module tb_hier_env
  import rc_pkg::*;
#(
  parameter rnd_fn_e FN     = FN_RM,
  parameter bit      SKEWED = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   pass2_misses,
  output int   total_misses
);

  logic [NCORES-1:0] req_valid, req_ready, resp_valid;
  cpu_req_t          req [NCORES];
  logic [WORD_W-1:0] rdata [NCORES];
  logic [NCORES-1:0] csr_en, csr_we, csr_illegal;
  logic [11:0]       csr_addr [NCORES];
  logic [KEY_W-1:0]  csr_wdata [NCORES], csr_rdata [NCORES];
  priv_e             csr_priv [NCORES];
  logic [NCORES-1:0] tlb_miss, fill_valid, tlb_flush;
  logic [VPN_W-1:0]  miss_vpn [NCORES], fill_vpn [NCORES];
  logic [PPN_W-1:0]  fill_ppn [NCORES];
  logic              mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t          mem_req;
  logic [LINE_W-1:0] mem_resp_data;
  l1_ev_t            l1_ev [NCORES];
  l2_ev_t            l2_ev;
  logic [KEY_W-1:0]  seed;

  rand_cache_top #(.L1_FN(FN), .L1_SKEWED(SKEWED), .L2_FN(FN), .L2_SKEWED(SKEWED)) dut (
    .clk, .rst_n, .seed,
    .cpu_req_valid(req_valid), .cpu_req_ready(req_ready), .cpu_req(req),
    .cpu_resp_valid(resp_valid), .cpu_resp_rdata(rdata),
    .csr_en, .csr_we, .csr_addr, .csr_wdata, .csr_priv, .csr_rdata, .csr_illegal,
    .tlb_miss, .tlb_miss_vpn(miss_vpn), .tlb_fill_valid(fill_valid), .tlb_fill_vpn(fill_vpn),
    .tlb_fill_ppn(fill_ppn), .tlb_flush,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data,
    .l1_ev, .l2_ev);

  function automatic logic [WORD_W-1:0] init_word(input logic [PADDR_W-4:0] wa);
    return {wa, 3'b001} * 64'h9E37_79B9_7F4A_7C15;
  endfunction
  logic [WORD_W-1:0] arch [logic [PADDR_W-4:0]];
  logic [LINE_W-1:0] dram [logic [LADDR_W-1:0]];
  function automatic logic [LINE_W-1:0] dram_line(input logic [LADDR_W-1:0] la);
    logic [LINE_W-1:0] l;
    if (dram.exists(la)) return dram[la];
    for (int w = 0; w < 8; w++) l[w * 64 +: 64] = init_word({la, 3'(w)});
    return l;
  endfunction
  function automatic logic [WORD_W-1:0] arch_word(input logic [PADDR_W-4:0] wa);
    return arch.exists(wa) ? arch[wa] : init_word(wa);
  endfunction
  // virtual page v of core 0 maps to physical page 0x3000 + 3*v
  function automatic logic [PPN_W-1:0] ppn_of(input logic [VPN_W-1:0] vpn);
    return PPN_W'(20'h3000 + 3 * (int'(vpn) - 27'h200));
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %m: %s", what); end
  endtask

  // memory model
  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = '0;
    forever begin
      @(negedge clk);
      if (mem_req_valid) begin
        mem_req_t q;
        q = mem_req;
        mem_req_ready = 1;
        @(negedge clk);
        mem_req_ready = 0;
        if (q.write) dram[q.laddr] = q.data;
        else begin
          repeat (10) @(negedge clk);
          mem_resp_valid = 1;
          mem_resp_data = dram_line(q.laddr);
          @(negedge clk);
          mem_resp_valid = 0;
        end
      end
    end
  end

  // page-table walker for core 0
  initial begin
    fill_valid = '0; tlb_flush = '0;
    for (int c = 0; c < NCORES; c++) begin fill_vpn[c] = '0; fill_ppn[c] = '0; end
    forever begin
      @(negedge clk);
      if (tlb_miss[0] && !fill_valid[0]) begin
        repeat (2) @(negedge clk);
        fill_valid[0] = 1; fill_vpn[0] = miss_vpn[0]; fill_ppn[0] = ppn_of(miss_vpn[0]);
        @(negedge clk);
        fill_valid[0] = 0;
      end
    end
  end

  int misses = 0;
  always @(posedge clk) if (rst_n) misses += int'(l1_ev[0].miss);
  assign total_misses = misses;

  task automatic access(input int vpage, input int line, input int word, input bit wr);
    logic [VPN_W-1:0]   vpn;
    logic [PADDR_W-4:0] wa;
    logic [WORD_W-1:0]  d;
    vpn = VPN_W'(27'h200 + vpage);
    wa  = {ppn_of(vpn), 6'(line), 3'(word)};
    d   = {$urandom, $urandom};
    @(negedge clk);
    req_valid[0] = 1; req[0] = '{vaddr: {vpn, 6'(line), 3'(word), 3'b0}, write: wr, wdata: d, wmask: 8'hFF};
    do @(posedge clk); while (!req_ready[0]);
    @(negedge clk);
    req_valid[0] = 0;
    do @(posedge clk); while (!resp_valid[0]);
    if (wr) arch[wa] = d;
    else chk(rdata[0] == arch_word(wa), $sformatf("load page %0d line %0d", vpage, line));
  endtask

  initial begin
    int m0;
    done = 0; checks = 0; failures = 0; pass2_misses = 0;
    seed = {$urandom, $urandom};
    req_valid = '0; csr_en = '0; csr_we = '0;
    for (int c = 0; c < NCORES; c++) begin
      req[c] = '0; csr_addr[c] = '0; csr_wdata[c] = '0; csr_priv[c] = PRV_S;
    end
    @(posedge rst_n);
    repeat (3) @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      m0 = misses;
      for (int p = 0; p < 4; p++)
        for (int l = 0; l < L1_NSETS; l++) access(p, l, l % 8, 1'b0);
      if (pass == 1) pass2_misses = misses - m0;
    end
    for (int n = 0; n < 400; n++) access(4 + n % 12, (n / 12) % 8, n % 8, n % 3 == 0);
    for (int n = 0; n < 600; n++) access($urandom_range(15), $urandom_range(63), $urandom_range(7), $urandom_range(2) == 0);
    for (int p = 4; p < 16; p++)
      for (int l = 0; l < 8; l++) access(p, l, l % 8, 1'b0);
    done = 1;
  end

endmodule
