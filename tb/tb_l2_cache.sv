// tb_l2_cache: the shared L2 with two behavioural L1 models and a memory
// model written here.
//
// Each L1 model holds up to CAP lines with the randomized index it chose for
// each; it loads, stores (changing its own M copy), upgrades S copies, gives
// up victims with its misses, and sometimes asks again for a line it still
// holds under a new index, as after a key change. It answers probes, and
// checks that each probe carries the index it registered for that line. The
// L2 sees a line space four times its capacity, so it misses, evicts and
// back-invalidates. Checks: every grant returns the latest data (an
// architectural copy is updated on every store), MESI exclusivity across the
// two L1s at every grant, the index echoed with the grant, the 8-cycle hit
// latency, and that each mechanism happened.
module tb_l2_cache;
  import rc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(negedge clk) cyc++;   // stable while the posedge is sampled

  localparam int CAP    = 48;     // lines an L1 model holds at most
  localparam int NLINES = 4096;   // line space touched
  localparam int NOPS   = 1500;   // operations per core

  logic [KEY_W-1:0]  keys [L2_NWAYS];
  logic [NCORES-1:0] acq_valid, acq_ready, grant_valid, probe_valid, probe_ready, pack_valid;
  acq_t              acq  [NCORES];
  pack_t             pack [NCORES];
  grant_t            grant;
  probe_t            probe;
  logic              mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t          mem_req;
  logic [LINE_W-1:0] mem_resp_data;
  l2_ev_t            ev;

  l2_cache #(.FN(FN_HF), .SKEWED(1'b1)) dut (
    .clk, .rst_n, .keys, .acq_valid, .acq_ready, .acq, .grant_valid, .grant,
    .probe_valid, .probe_ready, .probe, .pack_valid, .pack,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data, .ev);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [LINE_W-1:0] init_line(input logic [LADDR_W-1:0] la);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < 8; w++) l[w * 64 +: 64] = {la, 3'(w), 35'h5_1234_5678} ^ 64'hA5A5_5A5A_0F0F_F0F0;
    return l;
  endfunction

  logic [LINE_W-1:0] arch [logic [LADDR_W-1:0]];   // latest value of every line
  logic [LINE_W-1:0] dram [logic [LADDR_W-1:0]];   // memory model contents
  function automatic logic [LINE_W-1:0] arch_line(input logic [LADDR_W-1:0] la);
    return arch.exists(la) ? arch[la] : init_line(la);
  endfunction

  // ---------------- memory model, 12-cycle reads ----------------
  int n_mem_rd = 0, n_mem_wr = 0;
  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = '0;
    forever begin
      @(negedge clk);
      mem_req_ready = 0;
      if (mem_req_valid) begin
        mem_req_t q;
        q = mem_req;
        mem_req_ready = 1;
        @(posedge clk);
        @(negedge clk);
        mem_req_ready = 0;
        if (q.write) begin
          dram[q.laddr] = q.data;
          n_mem_wr++;
        end else begin
          logic [LADDR_W-1:0] la;
          la = q.laddr;
          n_mem_rd++;
          repeat (12) @(negedge clk);
          mem_resp_valid = 1;
          mem_resp_data = dram.exists(la) ? dram[la] : init_line(la);
          @(negedge clk);
          mem_resp_valid = 0;
        end
      end
    end
  end

  // ---------------- event counters ----------------
  int n_hit = 0, n_miss = 0, n_ghost = 0, n_inv = 0, n_down = 0, n_back = 0, n_wb = 0;
  int n_probes = 0, n_lat = 0, n_store_local = 0, n_upg = 0;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev.hit); n_miss += int'(ev.miss); n_ghost += int'(ev.ghost_inv);
    n_inv += int'(ev.inv); n_down += int'(ev.down); n_back += int'(ev.back_inv); n_wb += int'(ev.mem_wb);
    n_probes += $countones(probe_valid & probe_ready);
  end

  logic [NCORES-1:0] done;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    mesi_e               hst  [logic [LADDR_W-1:0]];
    logic [L1_IDX_W-1:0] hidx [logic [LADDR_W-1:0]];
    logic [LINE_W-1:0]   hdat [logic [LADDR_W-1:0]];
    logic [LADDR_W-1:0]  vic_la;
    logic                has_vic;
    bit                  waiting;

    // victim fields follow the model's state until the request is taken
    always @(negedge clk) if (waiting) begin
      acq[c].vic_valid = has_vic && hst.exists(vic_la);
      acq[c].vic_dirty = has_vic && hst.exists(vic_la) && hst[vic_la] == ST_M;
      acq[c].vic_laddr = vic_la;
      acq[c].vic_data  = hdat.exists(vic_la) ? hdat[vic_la] : '0;
    end

    // probe responder
    initial begin
      probe_t p;
      probe_ready[c] = 0; pack_valid[c] = 0; pack[c] = '0;
      forever begin
        @(negedge clk);
        probe_ready[c] = ($urandom_range(3) != 0);
        if (probe_valid[c] && probe_ready[c]) begin
          @(posedge clk);
          p = probe;
          @(negedge clk);
          probe_ready[c] = 0;
          repeat ($urandom_range(2)) @(negedge clk);
          pack[c] = '0;
          if (hst.exists(p.laddr)) begin
            chk(hidx[p.laddr] == p.rnd_idx, $sformatf("core %0d probe index %0d, line held at %0d",
                c, p.rnd_idx, hidx[p.laddr]));
            pack[c].hit   = 1'b1;
            pack[c].dirty = (hst[p.laddr] == ST_M);
            pack[c].data  = hdat[p.laddr];
            if (p.kind == PR_INV) begin
              hst.delete(p.laddr); hidx.delete(p.laddr); hdat.delete(p.laddr);
            end else hst[p.laddr] = ST_S;
          end
          pack_valid[c] = 1;
          @(negedge clk);
          pack_valid[c] = 0;
        end
      end
    end

    task automatic local_store(input logic [LADDR_W-1:0] la);
      logic [LINE_W-1:0] d;
      d = hdat[la];
      d[$urandom_range(7) * 64 +: 64] = {$urandom, $urandom};
      hdat[la] = d;
      hst[la] = ST_M;
      arch[la] = d;
    endtask

    // request generator
    initial begin
      acq_valid[c] = 0; acq[c] = '0; waiting = 0; has_vic = 0; vic_la = '0; done[c] = 0;
      @(posedge rst_n);
      repeat (4) @(negedge clk);
      for (int n = 0; n < NOPS; n++) begin
        automatic logic [LADDR_W-1:0] la = (n % 4 == 0) ? LADDR_W'($urandom_range(15))        // shared hot lines
                                                        : LADDR_W'($urandom_range(NLINES - 1));
        automatic bit wr = ($urandom_range(2) == 0);
        automatic bit ghost = hst.exists(la) && ($urandom_range(5) == 0);
        automatic bit upg = hst.exists(la) && wr && hst[la] == ST_S;
        automatic int t0, p0, m0, k;
        automatic logic [L1_IDX_W-1:0] ix;
        repeat ($urandom_range(3)) @(negedge clk);
        if (hst.exists(la) && !ghost && !upg) begin
          if (wr) begin
            chk(hst[la] == ST_E || hst[la] == ST_M, "store hit without ownership");
            local_store(la);
            n_store_local++;
          end else begin
            chk(hdat[la] == arch_line(la), $sformatf("core %0d stale copy of %h", c, la));
          end
          continue;
        end
        if (upg) n_upg++;
        // victim: the line itself on an upgrade, else a random line when full
        has_vic = 0;
        if (upg) begin
          has_vic = 1; vic_la = la;
        end else if (hst.num() >= CAP) begin
          k = $urandom_range(hst.num() - 1);
          void'(hst.first(vic_la));
          repeat (k) void'(hst.next(vic_la));
          has_vic = (vic_la != la);
        end
        ix = ghost ? hidx[la] + L1_IDX_W'($urandom_range(1, 63)) : L1_IDX_W'($urandom);
        acq[c].laddr = la; acq[c].rnd_idx = ix; acq[c].write = wr;
        waiting = 1;
        @(negedge clk);   // victim fields refreshed
        acq_valid[c] = 1;
        do @(posedge clk); while (!acq_ready[c]);
        t0 = cyc; p0 = n_probes; m0 = n_miss;
        waiting = 0;
        @(negedge clk);
        acq_valid[c] = 0;
        if (acq[c].vic_valid) begin
          hst.delete(vic_la); hidx.delete(vic_la); hdat.delete(vic_la);
        end
        do @(posedge clk); while (!grant_valid[c]);
        // checks at the grant
        chk(grant.rnd_idx == ix, "grant index echo");
        chk(grant.data == arch_line(la), $sformatf("core %0d grant data of %h", c, la));
        chk(grant.state == (wr ? ST_M : grant.state) && grant.state != ST_I, "grant state");
        if (grant.state == ST_M || grant.state == ST_E)
          chk(!g_core[1 - c].hst.exists(la), $sformatf("exclusive grant of %h while the other core holds it", la));
        else
          chk(!g_core[1 - c].hst.exists(la) || g_core[1 - c].hst[la] == ST_S, "shared grant beside an owner");
        chk(!hst.exists(la), "old copy not removed before the grant");
        if (n_probes == p0 && n_miss == m0 && !acq[c].vic_valid) begin
          chk(cyc - t0 == 8, $sformatf("hit latency %0d", cyc - t0));
          n_lat++;
        end
        hst[la] = grant.state; hidx[la] = ix; hdat[la] = grant.data;
        if (wr) local_store(la);
        @(negedge clk);
      end
      done[c] = 1;
    end
  end

  initial begin
    for (int w = 0; w < L2_NWAYS; w++) keys[w] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    chk(n_hit > 100, $sformatf("hits %0d", n_hit));
    chk(n_miss > 100, $sformatf("misses %0d", n_miss));
    chk(n_ghost > 0, $sformatf("ghost invalidations %0d", n_ghost));
    chk(n_inv > 0, $sformatf("invalidations %0d", n_inv));
    chk(n_down > 0, $sformatf("downgrades %0d", n_down));
    chk(n_back > 0, $sformatf("back-invalidations %0d", n_back));
    chk(n_wb > 0, $sformatf("memory writebacks %0d", n_wb));
    chk(n_lat > 0, "hit latency measured");
    chk(n_upg > 0, "upgrades");
    $display("hit=%0d miss=%0d ghost=%0d inv=%0d down=%0d back=%0d wb=%0d lat=%0d upg=%0d local=%0d memrd=%0d memwr=%0d",
             n_hit, n_miss, n_ghost, n_inv, n_down, n_back, n_wb, n_lat, n_upg, n_store_local, n_mem_rd, n_mem_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
