// tb_rand_cache_top: end-to-end test of the two-core randomized cache
// hierarchy at its default configuration.
//
// Two core drivers issue loads and stores through their own page tables.
// Some physical pages are shared by both cores, some are mapped twice in one
// core (synonyms), and the working set is larger than the L2. The operating
// system role rekeys L1 and L2 ways through the key CSRs from supervisor
// mode, and a user-mode CSR write is refused. A page-table walker model
// answers TLB misses and a memory model with a 20-cycle read latency sits
// behind the L2. Every load is compared with an architectural memory that
// every store updates (for a word the other core may be writing at the same
// moment, the previous value is accepted too). At the end each word ever
// written is read back, and every mechanism of the hierarchy must have
// happened at least once.
module tb_rand_cache_top;
  import rc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(negedge clk) cyc++;

  localparam int NPP   = 24;    // physical pages in use (1536 lines > L2)
  localparam int NVP   = 28;    // virtual pages per core
  localparam int NOPS  = 4000;  // accesses per core

  logic [KEY_W-1:0]  seed;
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

  rand_cache_top dut (
    .clk, .rst_n, .seed,
    .cpu_req_valid(req_valid), .cpu_req_ready(req_ready), .cpu_req(req),
    .cpu_resp_valid(resp_valid), .cpu_resp_rdata(rdata),
    .csr_en, .csr_we, .csr_addr, .csr_wdata, .csr_priv, .csr_rdata, .csr_illegal,
    .tlb_miss, .tlb_miss_vpn(miss_vpn), .tlb_fill_valid(fill_valid), .tlb_fill_vpn(fill_vpn),
    .tlb_fill_ppn(fill_ppn), .tlb_flush,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data,
    .l1_ev, .l2_ev);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memories ----------------
  function automatic logic [WORD_W-1:0] init_word(input logic [PADDR_W-4:0] wa);
    return {wa, 3'b011} * 64'hD6E8_FEB8_6659_FD93 ^ 64'h0123_4567_89AB_CDEF;
  endfunction
  logic [WORD_W-1:0] arch  [logic [PADDR_W-4:0]];
  logic [WORD_W-1:0] prevw [logic [PADDR_W-4:0]];
  logic [LINE_W-1:0] dram  [logic [LADDR_W-1:0]];
  function automatic logic [WORD_W-1:0] arch_word(input logic [PADDR_W-4:0] wa);
    return arch.exists(wa) ? arch[wa] : init_word(wa);
  endfunction
  function automatic logic [LINE_W-1:0] dram_line(input logic [LADDR_W-1:0] la);
    logic [LINE_W-1:0] l;
    if (dram.exists(la)) return dram[la];
    for (int w = 0; w < 8; w++) l[w * 64 +: 64] = init_word({la, 3'(w)});
    return l;
  endfunction

  int n_mem_rd = 0, n_mem_wr = 0;
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
        if (q.write) begin
          dram[q.laddr] = q.data;
          n_mem_wr++;
        end else begin
          n_mem_rd++;
          repeat (20) @(negedge clk);
          mem_resp_valid = 1;
          mem_resp_data = dram_line(q.laddr);
          @(negedge clk);
          mem_resp_valid = 0;
        end
      end
    end
  end

  // ---------------- page tables ----------------
  // Core c, virtual page v: pages 0..3 are shared by both cores (same
  // physical pages), 24..27 alias pages 0..3 of the same core (synonyms),
  // the rest are private: core 0 uses physical pages 4..13, core 1 14..23.
  function automatic logic [VPN_W-1:0] vpn_of(input int c, input int v);
    return VPN_W'(27'h0400 + c * 27'h10000 + v * 27'h0231);
  endfunction
  function automatic logic [PPN_W-1:0] ppn_of(input int c, input int v);
    int p;
    if (v >= 24)     p = v - 24;
    else if (v < 4)  p = v;
    else             p = 4 + c * 10 + (v - 4) % 10;
    return PPN_W'(20'h8_0000 + p);
  endfunction

  // ---------------- counters ----------------
  int e_l1 [8];
  int e_l2 [7];
  int n_rekey = 0, n_illegal = 0, n_synonym = 0, n_lat = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCORES; c++) begin
      e_l1[0] += int'(l1_ev[c].hit);      e_l1[1] += int'(l1_ev[c].miss);
      e_l1[2] += int'(l1_ev[c].upgrade);  e_l1[3] += int'(l1_ev[c].tlb_miss);
      e_l1[4] += int'(l1_ev[c].fill);     e_l1[5] += int'(l1_ev[c].probe_hit);
      e_l1[6] += int'(l1_ev[c].probe_miss); e_l1[7] += int'(l1_ev[c].writeback);
    end
    e_l2[0] += int'(l2_ev.hit);  e_l2[1] += int'(l2_ev.miss); e_l2[2] += int'(l2_ev.ghost_inv);
    e_l2[3] += int'(l2_ev.inv);  e_l2[4] += int'(l2_ev.down); e_l2[5] += int'(l2_ev.back_inv);
    e_l2[6] += int'(l2_ev.mem_wb);
  end

  logic [NCORES-1:0] done;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    // page-table walker
    initial begin
      fill_valid[c] = 0; fill_vpn[c] = '0; fill_ppn[c] = '0; tlb_flush[c] = 0;
      forever begin
        @(negedge clk);
        if (tlb_miss[c] && !fill_valid[c]) begin
          automatic int f = -1;
          for (int v = 0; v < NVP; v++) if (vpn_of(c, v) == miss_vpn[c]) f = v;
          chk(f >= 0, "walk of an unmapped page");
          repeat (4) @(negedge clk);
          fill_valid[c] = 1; fill_vpn[c] = miss_vpn[c]; fill_ppn[c] = ppn_of(c, f < 0 ? 0 : f);
          @(negedge clk);
          fill_valid[c] = 0;
        end
      end
    end

    task automatic csr_access(input logic [11:0] a, input logic [KEY_W-1:0] d, input priv_e p);
      @(negedge clk);
      csr_en[c] = 1; csr_we[c] = 1; csr_addr[c] = a; csr_wdata[c] = d; csr_priv[c] = p;
      #1;
      if (p == PRV_U) begin
        chk(csr_illegal[c], "user-mode key write not flagged");
        n_illegal++;
      end else chk(!csr_illegal[c], "privileged key write flagged");
      @(negedge clk);
      csr_en[c] = 0; csr_we[c] = 0;
      // read it back
      csr_en[c] = 1; csr_addr[c] = a; csr_priv[c] = PRV_S;
      #1;
      if (p != PRV_U) chk(csr_rdata[c] == d, "key read-back");
      else            chk(csr_rdata[c] != d, "user-mode write took effect");
      @(negedge clk);
      csr_en[c] = 0;
    endtask

    task automatic access(input int v, input int line, input int word, input bit wr);
      logic [VADDR_W-1:0] va;
      logic [PADDR_W-4:0] wa;
      logic [WORD_W-1:0]  d, got;
      int t0, h0, k0;
      va = {vpn_of(c, v), 6'(line), 3'(word), 3'b000};
      wa = {ppn_of(c, v), 6'(line), 3'(word)};
      d  = {$urandom, $urandom};
      @(negedge clk);
      req_valid[c] = 1; req[c] = '{vaddr: va, write: wr, wdata: d, wmask: 8'hFF};
      do @(posedge clk); while (!req_ready[c]);
      t0 = cyc; h0 = e_l1[0]; k0 = e_l1[3] + e_l1[1];
      @(negedge clk);
      req_valid[c] = 0;
      do @(posedge clk); while (!resp_valid[c]);
      got = rdata[c];
      if (wr) begin
        prevw[wa] = arch_word(wa);
        arch[wa] = d;
      end else begin
        chk(got == arch_word(wa) || (prevw.exists(wa) && got == prevw[wa]),
            $sformatf("core %0d load %h (pa word %h): got %h want %h", c, va, wa, got, arch_word(wa)));
      end
      if (e_l1[0] == h0 + 1 && e_l1[3] + e_l1[1] == k0) begin
        chk(cyc - t0 == 3, $sformatf("L1 hit latency %0d", cyc - t0));
        n_lat++;
      end
    endtask

    initial begin
      req_valid[c] = 0; req[c] = '0; csr_en[c] = 0; csr_we[c] = 0; csr_addr[c] = '0;
      csr_wdata[c] = '0; csr_priv[c] = PRV_S; done[c] = 0;
      @(posedge rst_n);
      repeat (4) @(negedge clk);
      for (int n = 0; n < NOPS; n++) begin
        automatic int v, ln;
        automatic int sel = $urandom_range(99);
        if (sel < 35)      v = $urandom_range(3);            // shared pages
        else if (sel < 45) v = 24 + $urandom_range(3);       // synonyms of them
        else               v = 4 + $urandom_range(19);       // private pages
        if (v >= 24) n_synonym++;
        ln = (sel < 45) ? $urandom_range(15) : $urandom_range(63);
        // words: each core stores only to its own half of a line
        if ($urandom_range(2) == 0) access(v, ln, 2 * $urandom_range(3) + c, 1'b1);
        else                        access(v, ln, $urandom_range(7), 1'b0);
        if (n % 1000 == 500) begin
          // the OS changes one L1 way key of this core
          csr_access(CSR_L1_KEY_BASE + 12'($urandom_range(L1_NWAYS - 1)), {$urandom, $urandom}, PRV_S);
          n_rekey++;
        end
        if (n == 1700) csr_access(CSR_L1_KEY_BASE, 64'h0BAD_0BAD, PRV_U);
      end
      done[c] = 1;
    end
  end

  initial begin
    seed = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the L2 is rekeyed right after boot, while it is still empty
    g_core[0].csr_access(CSR_L2_KEY_BASE + 12'd3, {$urandom, $urandom}, PRV_M);
    n_rekey++;
    wait (&done);
    // read back every word written, from core 0 (shared, synonym, own
    // private pages) and core 1 (its private pages)
    foreach (arch[wa]) begin
      automatic int p = int'(wa[PADDR_W-4:9] - 23'(20'h8_0000));
      automatic int ln = int'(wa[8:3]);
      automatic int wd = int'(wa[2:0]);
      if (p < 14) g_core[0].access(p < 4 ? p : p, ln, wd, 1'b0);
      else        g_core[1].access(4 + (p - 14), ln, wd, 1'b0);
    end
    chk(e_l1[0] > 1000, $sformatf("L1 hits %0d", e_l1[0]));
    chk(e_l1[1] > 500,  $sformatf("L1 misses %0d", e_l1[1]));
    chk(e_l1[2] > 0,    $sformatf("L1 upgrades %0d", e_l1[2]));
    chk(e_l1[3] > 0,    $sformatf("TLB misses %0d", e_l1[3]));
    chk(e_l1[4] == e_l1[1], "one refill per L1 miss");
    chk(e_l1[5] > 0,    $sformatf("L1 probe hits %0d", e_l1[5]));
    chk(e_l1[7] > 0,    $sformatf("L1 writebacks %0d", e_l1[7]));
    chk(e_l2[0] > 0,    $sformatf("L2 hits %0d", e_l2[0]));
    chk(e_l2[1] > 0,    $sformatf("L2 misses %0d", e_l2[1]));
    chk(e_l2[2] > 0,    $sformatf("ghost-copy invalidations %0d", e_l2[2]));
    chk(e_l2[3] > 0,    $sformatf("invalidations %0d", e_l2[3]));
    chk(e_l2[4] > 0,    $sformatf("downgrades %0d", e_l2[4]));
    chk(e_l2[5] > 0,    $sformatf("back-invalidations %0d", e_l2[5]));
    chk(e_l2[6] > 0,    $sformatf("memory writebacks %0d", e_l2[6]));
    chk(n_rekey > 0 && n_illegal > 0 && n_synonym > 0 && n_lat > 0, "rekey, illegal, synonym, latency");
    $display("L1: hit=%0d miss=%0d upg=%0d tlb=%0d fill=%0d phit=%0d pmiss=%0d wb=%0d",
             e_l1[0], e_l1[1], e_l1[2], e_l1[3], e_l1[4], e_l1[5], e_l1[6], e_l1[7]);
    $display("L2: hit=%0d miss=%0d ghost=%0d inv=%0d down=%0d back=%0d memwb=%0d  memrd=%0d memwr=%0d",
             e_l2[0], e_l2[1], e_l2[2], e_l2[3], e_l2[4], e_l2[5], e_l2[6], n_mem_rd, n_mem_wr);
    $display("rekeys=%0d illegal=%0d synonym=%0d lat=%0d", n_rekey, n_illegal, n_synonym, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
