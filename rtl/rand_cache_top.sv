// rand_cache_top: two-level randomized cache hierarchy of a multicore
// RISC-V system.
//
// NCORES private L1 data caches (each with its TLB, MSHR, randomizer and key
// CSRs) share one L2 cache, which is also the last-level cache and holds the
// coherence directory; the L2 has its own randomizer and key CSRs. The cores,
// their page-table walkers, the entropy source and main memory are outside
// and connect through the ports:
//
//   cpu_*    per core: load/store requests (virtual address) and responses
//   csr_*    per core: CSR accesses. CSR_L1_KEY_BASE.. reach that core's L1
//            keys, CSR_L2_KEY_BASE.. the shared L2 keys (lowest core wins if
//            two cores write L2 keys in one cycle). User-mode accesses raise
//            csr_illegal.
//   tlb_*    per core: TLB miss request and fill from the page-table walker
//   mem_*    line-sized read/write requests to main memory, read replies
//   seed     entropy sampled during reset: every boot starts with new keys
//   l1_ev/l2_ev  one-cycle event pulses (hits, misses, probes, ...) for
//            performance counters
//
// Each cache's key registers are a separate key_csr; the L1 caches are built
// skewed with random modulo and the L2 skewed with random modulo by default
// (the FN/SKEWED parameters select the hash function or one shared key).
// Timing: 3-cycle L1 hits, 8-cycle L2 hits, memory latency as supplied.
module rand_cache_top
  import rc_pkg::*;
#(
  parameter rnd_fn_e L1_FN     = FN_RM,
  parameter bit      L1_SKEWED = 1'b1,
  parameter rnd_fn_e L2_FN     = FN_RM,
  parameter bit      L2_SKEWED = 1'b1,
  parameter int      L2_LAT    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [KEY_W-1:0]  seed,
  // cores
  input  logic [NCORES-1:0] cpu_req_valid,
  output logic [NCORES-1:0] cpu_req_ready,
  input  cpu_req_t          cpu_req [NCORES],
  output logic [NCORES-1:0] cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_resp_rdata [NCORES],
  // CSR accesses
  input  logic [NCORES-1:0] csr_en,
  input  logic [NCORES-1:0] csr_we,
  input  logic [11:0]       csr_addr [NCORES],
  input  logic [KEY_W-1:0]  csr_wdata [NCORES],
  input  priv_e             csr_priv [NCORES],
  output logic [KEY_W-1:0]  csr_rdata [NCORES],
  output logic [NCORES-1:0] csr_illegal,
  // page-table walkers
  output logic [NCORES-1:0] tlb_miss,
  output logic [VPN_W-1:0]  tlb_miss_vpn [NCORES],
  input  logic [NCORES-1:0] tlb_fill_valid,
  input  logic [VPN_W-1:0]  tlb_fill_vpn [NCORES],
  input  logic [PPN_W-1:0]  tlb_fill_ppn [NCORES],
  input  logic [NCORES-1:0] tlb_flush,
  // main memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output mem_req_t          mem_req,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_data,
  // events
  output l1_ev_t            l1_ev [NCORES],
  output l2_ev_t            l2_ev
);

  localparam int L1_NKEYS = L1_SKEWED ? L1_NWAYS : 1;
  localparam int L2_NKEYS = L2_SKEWED ? L2_NWAYS : 1;

  logic [NCORES-1:0] acq_valid, acq_ready, grant_valid, probe_valid, probe_ready, pack_valid;
  acq_t              acq  [NCORES];
  pack_t             pack [NCORES];
  grant_t            grant;
  probe_t            probe;

  // ---- L2 key CSRs, shared by all cores ----
  logic [KEY_W-1:0]  l2_keys [L2_NKEYS];
  logic              l2c_en, l2c_we, l2c_hit, l2c_illegal, l2c_changed;
  logic [11:0]       l2c_addr;
  logic [KEY_W-1:0]  l2c_wdata, l2c_rdata;
  priv_e             l2c_priv;
  logic [CORE_W-1:0] l2c_core;
  logic [NCORES-1:0] l2c_sel;

  always_comb begin
    l2c_sel = '0;
    for (int c = 0; c < NCORES; c++)
      l2c_sel[c] = csr_en[c] && (csr_addr[c] >= CSR_L2_KEY_BASE) &&
                   (int'(12'(csr_addr[c] - CSR_L2_KEY_BASE)) < L2_NKEYS);
    l2c_core = '0;
    for (int c = NCORES - 1; c >= 0; c--) if (l2c_sel[c]) l2c_core = CORE_W'(c);
    l2c_en    = |l2c_sel;
    l2c_we    = csr_we[l2c_core];
    l2c_addr  = csr_addr[l2c_core];
    l2c_wdata = csr_wdata[l2c_core];
    l2c_priv  = csr_priv[l2c_core];
  end

  key_csr #(.NKEYS(L2_NKEYS), .BASE(CSR_L2_KEY_BASE)) u_l2_keys (
    .clk, .rst_n, .seed(seed ^ 64'hA5A5_0000_0000_5A5A),
    .csr_en(l2c_en), .csr_we(l2c_we), .csr_addr(l2c_addr), .csr_wdata(l2c_wdata),
    .csr_priv(l2c_priv), .csr_hit(l2c_hit), .csr_rdata(l2c_rdata), .illegal(l2c_illegal),
    .key_changed(l2c_changed), .keys(l2_keys)
  );

  // ---- per-core L1 data caches and their key CSRs ----
  for (genvar c = 0; c < NCORES; c++) begin : g_core
    logic [KEY_W-1:0] l1_keys [L1_NKEYS];
    logic             hit, illegal, changed;
    logic [KEY_W-1:0] rdata;
    logic             own_l2;

    key_csr #(.NKEYS(L1_NKEYS), .BASE(CSR_L1_KEY_BASE)) u_l1_keys (
      .clk, .rst_n, .seed(seed ^ (KEY_W'(c + 1) << 40)),
      .csr_en(csr_en[c]), .csr_we(csr_we[c]), .csr_addr(csr_addr[c]), .csr_wdata(csr_wdata[c]),
      .csr_priv(csr_priv[c]), .csr_hit(hit), .csr_rdata(rdata), .illegal(illegal),
      .key_changed(changed), .keys(l1_keys)
    );

    assign own_l2         = l2c_hit && (int'(l2c_core) == c);
    assign csr_rdata[c]   = hit ? rdata : (own_l2 ? l2c_rdata : '0);
    assign csr_illegal[c] = illegal || (own_l2 && l2c_illegal);

    l1_dcache #(.FN(L1_FN), .SKEWED(L1_SKEWED), .NKEYS(L1_NKEYS)) u_l1 (
      .clk, .rst_n,
      .cpu_req_valid(cpu_req_valid[c]), .cpu_req_ready(cpu_req_ready[c]), .cpu_req(cpu_req[c]),
      .cpu_resp_valid(cpu_resp_valid[c]), .cpu_resp_rdata(cpu_resp_rdata[c]),
      .keys(l1_keys),
      .tlb_miss(tlb_miss[c]), .tlb_miss_vpn(tlb_miss_vpn[c]),
      .tlb_fill_valid(tlb_fill_valid[c]), .tlb_fill_vpn(tlb_fill_vpn[c]),
      .tlb_fill_ppn(tlb_fill_ppn[c]), .tlb_flush(tlb_flush[c]),
      .acq_valid(acq_valid[c]), .acq_ready(acq_ready[c]), .acq(acq[c]),
      .grant_valid(grant_valid[c]), .grant(grant),
      .probe_valid(probe_valid[c]), .probe_ready(probe_ready[c]), .probe(probe),
      .pack_valid(pack_valid[c]), .pack(pack[c]),
      .ev(l1_ev[c])
    );
  end

  l2_cache #(.FN(L2_FN), .SKEWED(L2_SKEWED), .NKEYS(L2_NKEYS), .LAT(L2_LAT)) u_l2 (
    .clk, .rst_n, .keys(l2_keys),
    .acq_valid, .acq_ready, .acq,
    .grant_valid, .grant,
    .probe_valid, .probe_ready, .probe,
    .pack_valid, .pack,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data,
    .ev(l2_ev)
  );

endmodule
