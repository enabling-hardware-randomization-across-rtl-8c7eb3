// tb_l1_dcache: one L1 data cache against a behavioural L2 and page-table
// walker written here.
//
// The L2 model keeps line data, remembers at which randomized index the L1
// holds each line, absorbs victims, grants E or S for loads and M for stores
// after the 8-cycle L2 latency, and, as the real L2 does, invalidates an
// older copy the L1 still holds before granting it again. It also injects
// invalidate and downgrade probes, some while a miss request is waiting.
// Loads are checked against an architectural memory model that every store
// updates, so any lost write or stale copy shows up. Keys are changed and
// synonyms (two virtual pages on one physical page) are used so that lines
// are requested again under a new index. The hit latency (3 cycles) and the
// refill index are checked, and every mechanism must have been seen.
module tb_l1_dcache;
  import rc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic             req_valid, req_ready, resp_valid;
  cpu_req_t         req;
  logic [WORD_W-1:0] rdata;
  logic [KEY_W-1:0] keys [L1_NWAYS];
  logic             tlb_miss, fill_valid, tlb_flush;
  logic [VPN_W-1:0] miss_vpn, fill_vpn;
  logic [PPN_W-1:0] fill_ppn;
  logic             acq_valid, acq_ready, grant_valid, probe_valid, probe_ready, pack_valid;
  acq_t             acq;
  grant_t           grant;
  probe_t           probe;
  pack_t            pack;
  l1_ev_t           ev;

  l1_dcache #(.FN(FN_RM), .SKEWED(1'b1)) dut (
    .clk, .rst_n, .cpu_req_valid(req_valid), .cpu_req_ready(req_ready), .cpu_req(req),
    .cpu_resp_valid(resp_valid), .cpu_resp_rdata(rdata), .keys,
    .tlb_miss, .tlb_miss_vpn(miss_vpn), .tlb_fill_valid(fill_valid), .tlb_fill_vpn(fill_vpn),
    .tlb_fill_ppn(fill_ppn), .tlb_flush,
    .acq_valid, .acq_ready, .acq, .grant_valid, .grant, .probe_valid, .probe_ready, .probe,
    .pack_valid, .pack, .ev);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory models ----------------
  function automatic logic [WORD_W-1:0] init_word(input logic [PADDR_W-4:0] wa);
    return {wa, 3'b101} * 64'h9E37_79B9_7F4A_7C15 ^ 64'hDEAD_BEEF_0000_0000;
  endfunction
  function automatic logic [LINE_W-1:0] init_line(input logic [LADDR_W-1:0] la);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < 8; w++) l[w * 64 +: 64] = init_word({la, 3'(w)});
    return l;
  endfunction

  logic [WORD_W-1:0]  arch  [logic [PADDR_W-4:0]];    // architectural memory
  logic [LINE_W-1:0]  l2mem [logic [LADDR_W-1:0]];    // L2 model data
  logic [L1_IDX_W-1:0] held_idx [logic [LADDR_W-1:0]]; // where the L1 holds a line
  mesi_e               held_st  [logic [LADDR_W-1:0]];

  function automatic logic [LINE_W-1:0] l2_line(input logic [LADDR_W-1:0] la);
    return l2mem.exists(la) ? l2mem[la] : init_line(la);
  endfunction
  function automatic logic [WORD_W-1:0] arch_word(input logic [PADDR_W-4:0] wa);
    return arch.exists(wa) ? arch[wa] : init_word(wa);
  endfunction

  // page table: virtual page -> physical page; pages 8..9 alias pages 0..1
  localparam int NVP = 10;
  logic [VPN_W-1:0] vpn_of [NVP];
  logic [PPN_W-1:0] ppn_of [NVP];

  // ---------------- counters ----------------
  int n_hit = 0, n_miss = 0, n_upg = 0, n_tlb = 0, n_fill = 0, n_phit = 0, n_pmiss = 0, n_wb = 0;
  int n_vic = 0, n_vicd = 0, n_ghost = 0, n_probe_in_acq = 0, n_rekey = 0, n_down = 0;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev.hit); n_miss += int'(ev.miss); n_upg += int'(ev.upgrade);
    n_tlb += int'(ev.tlb_miss); n_fill += int'(ev.fill); n_phit += int'(ev.probe_hit);
    n_pmiss += int'(ev.probe_miss); n_wb += int'(ev.writeback);
  end

  // ---------------- page-table walker ----------------
  initial begin
    fill_valid = 0; fill_vpn = 0; fill_ppn = 0;
    forever begin
      @(posedge clk);
      if (tlb_miss && !fill_valid) begin
        automatic int f = -1;
        repeat (3) @(posedge clk);
        for (int p = 0; p < NVP; p++) if (vpn_of[p] == miss_vpn) f = p;
        chk(f >= 0, "walk for unknown page");
        @(negedge clk);
        fill_valid = 1; fill_vpn = miss_vpn; fill_ppn = ppn_of[f < 0 ? 0 : f];
        @(negedge clk);
        fill_valid = 0;
      end
    end
  end

  // ---------------- L2 model ----------------
  task automatic send_probe(input logic [LADDR_W-1:0] la, input logic [L1_IDX_W-1:0] ix,
                            input probe_e k, output pack_t a);
    @(negedge clk);
    probe_valid = 1; probe = '{laddr: la, rnd_idx: ix, kind: k};
    do @(posedge clk); while (!probe_ready);
    @(negedge clk);
    probe_valid = 0;
    while (!pack_valid) @(negedge clk);
    a = pack;
    if (a.hit && a.dirty) l2mem[la] = a.data;
  endtask

  // A probe of a random line the L1 holds, checked against the model.
  task automatic random_probe();
    logic [LADDR_W-1:0] la;
    int n, pick;
    pack_t a;
    probe_e k;
    n = held_idx.num();
    if (n == 0) return;
    pick = $urandom_range(n - 1);
    void'(held_idx.first(la));
    repeat (pick) void'(held_idx.next(la));
    k = ($urandom_range(1) == 0) ? PR_INV : PR_DOWN;
    send_probe(la, held_idx[la], k, a);
    chk(a.hit, $sformatf("probe missed held line %h", la));
    if (held_st[la] != ST_E) chk(a.dirty == (held_st[la] == ST_M), "probe dirty flag");
    for (int w = 0; w < 8; w++)
      chk(l2_line(la)[w * 64 +: 64] == arch_word({la, 3'(w)}), "probe data");
    if (k == PR_INV) begin held_idx.delete(la); held_st.delete(la); end
    else begin held_st[la] = ST_S; n_down++; end
    // a probe with a wrong index finds nothing
    send_probe(la, held_idx.exists(la) ? held_idx[la] + 6'd1 : 6'd0, PR_INV, a);
    chk(!a.hit, "probe at wrong index hit");
  endtask

  initial begin
    acq_t r;
    pack_t a;
    acq_ready = 0; grant_valid = 0; grant = '0; probe_valid = 0; probe = '0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (acq_valid) begin
        int t0;
        if ($urandom_range(9) == 0) begin
          random_probe();
          n_probe_in_acq++;
          @(negedge clk);
          if (!acq_valid) continue;
        end
        acq_ready = 1;
        r = acq;
        t0 = cyc + 1;            // number of the edge that takes the request
        @(negedge clk);
        acq_ready = 0;
        // victim
        if (r.vic_valid) begin
          n_vic++;
          if (r.vic_dirty) n_vicd++;
          chk(held_idx.exists(r.vic_laddr), $sformatf("victim %h not held", r.vic_laddr));
          if (held_st[r.vic_laddr] != ST_E)
            chk(r.vic_dirty == (held_st[r.vic_laddr] == ST_M), "victim dirty flag");
          if (r.vic_dirty) l2mem[r.vic_laddr] = r.vic_data;
          held_idx.delete(r.vic_laddr); held_st.delete(r.vic_laddr);
        end
        // ghost copy under an older index
        if (held_idx.exists(r.laddr)) begin
          send_probe(r.laddr, held_idx[r.laddr], PR_INV, a);
          chk(a.hit, "ghost copy not found at its old index");
          n_ghost++;
          held_idx.delete(r.laddr); held_st.delete(r.laddr);
        end
        while (cyc < t0 + 7) @(negedge clk);
        grant_valid = 1;
        grant.data = l2_line(r.laddr);
        grant.rnd_idx = r.rnd_idx;
        grant.state = r.write ? ST_M : (($urandom_range(2) == 0) ? ST_S : ST_E);
        @(negedge clk);
        chk(cyc - t0 == 8, "model grant latency");
        grant_valid = 0;
        held_idx[r.laddr] = r.rnd_idx;
        held_st[r.laddr] = grant.state;
        // the L1 holds the line, so the L2 copy may be stale from here
      end else if ($urandom_range(400) == 0) begin
        random_probe();
      end
    end
  end

  // ---------------- core driver ----------------
  task automatic access(input int vp, input int line, input int word, input bit wr);
    logic [VADDR_W-1:0] va;
    logic [PADDR_W-4:0] wa;
    logic [WORD_W-1:0]  d;
    logic [7:0]         m;
    int t0, hits0, tlb0;
    va = {vpn_of[vp], 6'(line), 3'(word), 3'b000};
    wa = {ppn_of[vp], 6'(line), 3'(word)};
    d  = {$urandom, $urandom};
    m  = ($urandom_range(3) == 0) ? 8'($urandom) : 8'hFF;
    @(negedge clk);
    req_valid = 1; req = '{vaddr: va, write: wr, wdata: d, wmask: m};
    do @(posedge clk); while (!req_ready);
    t0 = cyc; hits0 = n_hit; tlb0 = n_tlb;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    @(posedge clk);
    if (wr) begin
      logic [WORD_W-1:0] o = arch_word(wa);
      for (int b = 0; b < 8; b++) if (m[b]) o[b * 8 +: 8] = d[b * 8 +: 8];
      arch[wa] = o;
    end else begin
      chk(rdata == arch_word(wa), $sformatf("load va %h: got %h want %h", va, rdata, arch_word(wa)));
    end
    if (n_hit > hits0 && n_tlb == tlb0) chk(cyc - t0 == 3, $sformatf("hit latency %0d", cyc - t0));
  endtask

  initial begin
    req_valid = 0; req = '0; tlb_flush = 0;
    for (int w = 0; w < L1_NWAYS; w++) keys[w] = {$urandom, $urandom};
    for (int p = 0; p < NVP; p++) begin
      vpn_of[p] = VPN_W'(27'h100 + p * 27'h1357);
      ppn_of[p] = (p >= 8) ? PPN_W'(20'h40 + (p - 8)) : PPN_W'(20'h40 + p);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      automatic int vp = (n % 3 != 0) ? $urandom_range(3) : $urandom_range(NVP - 1);
      automatic int ln = (n % 3 == 0) ? $urandom_range(63) : $urandom_range(15);
      access(vp, ln, $urandom_range(7), $urandom_range(2) == 0);
      if (n % 700 == 350) begin
        automatic int w = $urandom_range(L1_NWAYS - 1);
        keys[w] = {$urandom, $urandom};    // the OS rekeys one way
        n_rekey++;
      end
      if (n == 1500) begin
        @(negedge clk); tlb_flush = 1; @(negedge clk); tlb_flush = 0;
      end
    end
    // final read-back of everything touched on the original pages
    for (int vp = 0; vp < 4; vp++)
      for (int ln = 0; ln < 16; ln++) access(vp, ln, $urandom_range(7), 1'b0);

    chk(n_hit > 100,  $sformatf("hits %0d", n_hit));
    chk(n_miss > 50,  $sformatf("misses %0d", n_miss));
    chk(n_upg > 0,    $sformatf("upgrades %0d", n_upg));
    chk(n_tlb > 0,    $sformatf("tlb misses %0d", n_tlb));
    chk(n_fill == n_miss, "one fill per miss");
    chk(n_phit > 0,   $sformatf("probe hits %0d", n_phit));
    chk(n_pmiss > 0,  $sformatf("probe misses %0d", n_pmiss));
    chk(n_wb > 0,     $sformatf("writebacks %0d", n_wb));
    chk(n_ghost > 0,  $sformatf("ghost copies %0d", n_ghost));
    chk(n_probe_in_acq > 0, "probe during miss");
    chk(n_down > 0,   "downgrade probes");
    $display("hits=%0d misses=%0d upgrades=%0d tlb=%0d fills=%0d phit=%0d pmiss=%0d wb=%0d ghost=%0d pacq=%0d rekeys=%0d vic=%0d vicd=%0d",
             n_hit, n_miss, n_upg, n_tlb, n_fill, n_phit, n_pmiss, n_wb, n_ghost, n_probe_in_acq, n_rekey, n_vic, n_vicd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
