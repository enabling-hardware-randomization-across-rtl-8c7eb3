// l1_dcache: randomized, virtually indexed, physically tagged L1 data cache.
//
// Randomize once. A core request enters with its virtual address. The
// randomizer turns the virtual tag and index bits, together with the cache
// key(s), into one set index per way; the metadata and data of those sets
// are read in the same stage as the TLB lookup. The stored tag is the
// physical page number extended with the original (not randomized) index,
// so two lines that randomize into the same set can never be confused and a
// victim's physical line address is simply {ppn, original index}. A hit way
// is selected by comparing that extended tag with {TLB ppn, request index}.
//
// Indexes travel with the line. On a miss the randomized index of the chosen
// way (the hit way for a store upgrade, the victim way otherwise; with a
// skewed randomizer this selects one of the per-way indexes) is stored in
// the MSHR and sent to the L2 with the request. The refill comes back with
// that index and is written without the randomizer (bypass); L2 probes
// carry the index the L2 directory stored and also bypass the randomizer.
// After a key or page-table change the same line may thus be requested with
// a new index while an old copy still sits under the old one: the L2 removes
// that copy with a probe before it answers.
//
// Pipeline and timing (one request at a time):
//   cycle 0  request accepted (cpu_req_valid && cpu_req_ready)
//   cycle 1  LOOK: randomizer, metadata/data read, TLB lookup
//   cycle 2  CMP:  tag compare, hit-way select, store write
//   cycle 3  cpu_resp_valid for a hit (3-cycle load-to-use latency)
// A miss issues `acq` (held until acq_ready), waits for `grant`, writes the
// line, replays the request and responds. A TLB miss raises tlb_miss until
// the page-table walker fills the TLB. Probes are accepted when idle and
// while a miss or TLB refill is outstanding, and acknowledged on pack_valid
// one cycle after acceptance; they have priority over new core requests.
// MESI states per line; stores to E become M silently, stores to S ask the
// L2 for ownership and release the shared copy in the same message.
//
// From the design: randomize-once indexing, extended tags, index
// propagation through the MSHR, bypass for refills and probes, per-way
// index choice for skewed operation, geometry and latency. This design's
// own: the blocking single-miss controller (the two-entry MSHR holds one miss
// at a time), random replacement from a 16-bit LFSR after empty ways, and carrying the victim
// inside the miss message instead of a separate release channel.
module l1_dcache
  import rc_pkg::*;
#(
  parameter rnd_fn_e FN           = FN_RM,
  parameter bit      SKEWED       = 1'b1,
  parameter int      NKEYS        = SKEWED ? L1_NWAYS : 1,
  parameter int      TLB_ENTRIES  = 8,
  parameter int      MSHR_ENTRIES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // core port
  input  logic             cpu_req_valid,
  output logic             cpu_req_ready,
  input  cpu_req_t         cpu_req,
  output logic             cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_resp_rdata,
  // keys from the key CSRs
  input  logic [KEY_W-1:0] keys [NKEYS],
  // page-table walker port
  output logic             tlb_miss,
  output logic [VPN_W-1:0] tlb_miss_vpn,
  input  logic             tlb_fill_valid,
  input  logic [VPN_W-1:0] tlb_fill_vpn,
  input  logic [PPN_W-1:0] tlb_fill_ppn,
  input  logic             tlb_flush,
  // L2 port
  output logic             acq_valid,
  input  logic             acq_ready,
  output acq_t             acq,
  input  logic             grant_valid,
  input  grant_t           grant,
  input  logic             probe_valid,
  output logic             probe_ready,
  input  probe_t           probe,
  output logic             pack_valid,
  output pack_t            pack,
  output l1_ev_t           ev
);

  localparam int NW = L1_NWAYS;
  localparam int NS = L1_NSETS;
  localparam int MID_W = (MSHR_ENTRIES > 1) ? $clog2(MSHR_ENTRIES) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOK, S_CMP, S_TLB, S_ACQ, S_GNT, S_PROBE, S_RESP
  } state_e;

  state_e   state, ret_state;
  cpu_req_t r_req;
  probe_t   r_probe;

  // ---- arrays: metadata (state, extended tag) and data ----
  mesi_e               m_st   [NW][NS];
  logic [PPN_W-1:0]    m_ppn  [NW][NS];
  logic [L1_IDX_W-1:0] m_oidx [NW][NS];
  logic [LINE_W-1:0]   d_line [NW][NS];

  // ---- request address fields ----
  logic [L1_VTAG_W-1:0] req_vtag;
  logic [L1_IDX_W-1:0]  req_oidx;
  logic [VPN_W-1:0]     req_vpn;
  logic [WSEL_W-1:0]    req_wsel;
  assign req_vtag = r_req.vaddr[VADDR_W-1 -: L1_VTAG_W];
  assign req_oidx = r_req.vaddr[OFF_W +: L1_IDX_W];
  assign req_vpn  = r_req.vaddr[VADDR_W-1 -: VPN_W];
  assign req_wsel = r_req.vaddr[3 +: WSEL_W];

  // ---- randomizer: only core requests pass through it ----
  logic [L1_IDX_W-1:0] ridx [NW];
  randomizer #(
    .TAG_W(L1_VTAG_W), .IDX_W(L1_IDX_W), .NWAYS(NW), .FN(FN), .SKEWED(SKEWED), .NKEYS(NKEYS)
  ) u_rnd (
    .tag(req_vtag), .idx(req_oidx), .keys(keys), .rnd_idx(ridx)
  );

  // ---- TLB ----
  logic             tlb_hit;
  logic [PPN_W-1:0] tlb_ppn;
  tlb #(.NENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n, .lookup_vpn(req_vpn), .hit(tlb_hit), .ppn(tlb_ppn),
    .fill_valid(tlb_fill_valid), .fill_vpn(tlb_fill_vpn), .fill_ppn(tlb_fill_ppn),
    .flush(tlb_flush)
  );
  assign tlb_miss     = (state == S_TLB);
  assign tlb_miss_vpn = req_vpn;

  // ---- LOOK stage registers ----
  logic [L1_IDX_W-1:0] l_ridx [NW];
  mesi_e               l_st   [NW];
  logic [PPN_W-1:0]    l_ppn  [NW];
  logic [L1_IDX_W-1:0] l_oidx [NW];
  logic [LINE_W-1:0]   l_data [NW];
  logic                l_tlb_hit;
  logic [PPN_W-1:0]    l_tlb_ppn;

  // ---- CMP stage ----
  logic [NW-1:0] hit_vec;
  logic          hit;
  logic [1:0]    hit_way;
  logic [LINE_W-1:0] hit_line;
  always_comb begin
    hit_way = '0;
    for (int w = 0; w < NW; w++) begin
      hit_vec[w] = (l_st[w] != ST_I) && (l_ppn[w] == l_tlb_ppn) && (l_oidx[w] == req_oidx);
      if (hit_vec[w]) hit_way = 2'(w);
    end
    hit      = |hit_vec;
    hit_line = l_data[hit_way];
  end

  function automatic logic [LINE_W-1:0] merge_word(input logic [LINE_W-1:0] line,
                                                   input logic [WSEL_W-1:0] wsel,
                                                   input logic [WORD_W-1:0] wdata,
                                                   input logic [WORD_W/8-1:0] wmask);
    logic [LINE_W-1:0] o;
    o = line;
    for (int b = 0; b < WORD_W / 8; b++)
      if (wmask[b]) o[int'(wsel) * WORD_W + b * 8 +: 8] = wdata[b * 8 +: 8];
    return o;
  endfunction

  // ---- random replacement ----
  logic [15:0] lfsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
  end

  logic       store_hit_own;   // store to E/M: done locally
  logic       upgrade;         // store to S: ask for ownership
  logic [1:0] miss_way;
  assign store_hit_own = hit && r_req.write && (l_st[hit_way] == ST_E || l_st[hit_way] == ST_M);
  assign upgrade       = hit && r_req.write && (l_st[hit_way] == ST_S);
  // victim: an empty way if the candidate sets have one, else a random way
  logic       inv_found;
  logic [1:0] inv_way;
  always_comb begin
    inv_found = 1'b0;
    inv_way   = '0;
    for (int w = NW - 1; w >= 0; w--)
      if (l_st[w] == ST_I) begin
        inv_found = 1'b1;
        inv_way   = 2'(w);
      end
  end
  assign miss_way = upgrade ? hit_way : (inv_found ? inv_way : lfsr[1:0]);

  // ---- MSHR ----
  logic [MID_W-1:0]    mshr_id, alloc_id;
  logic                mshr_full, mshr_empty, mshr_match;
  logic [LADDR_W-1:0]  m_laddr;
  logic [L1_IDX_W-1:0] m_ridx;
  logic [1:0]          m_way;
  cpu_req_t            m_req;
  logic                do_alloc, do_free;
  logic [LADDR_W-1:0]  req_laddr;
  assign req_laddr = {l_tlb_ppn, req_oidx};
  assign do_alloc  = (state == S_CMP) && l_tlb_hit && (!hit || upgrade);
  assign do_free   = (state == S_GNT) && grant_valid;

  l1_mshr #(.NENT(MSHR_ENTRIES)) u_mshr (
    .clk, .rst_n,
    .alloc(do_alloc), .alloc_laddr(req_laddr), .alloc_rnd_idx(l_ridx[miss_way]),
    .alloc_way(miss_way), .alloc_req(r_req), .alloc_id(alloc_id),
    .full(mshr_full), .empty(mshr_empty),
    .free(do_free), .free_id(mshr_id),
    .read_id(mshr_id), .read_laddr(m_laddr), .read_rnd_idx(m_ridx), .read_way(m_way),
    .read_req(m_req), .lookup_laddr(req_laddr), .match(mshr_match)
  );

  // ---- miss message, victim read live from the arrays ----
  mesi_e vic_st;
  assign vic_st = m_st[m_way][m_ridx];
  always_comb begin
    acq.laddr     = m_laddr;
    acq.rnd_idx   = m_ridx;
    acq.write     = m_req.write;
    acq.vic_valid = (vic_st != ST_I);
    acq.vic_dirty = (vic_st == ST_M);
    acq.vic_laddr = {m_ppn[m_way][m_ridx], m_oidx[m_way][m_ridx]};
    acq.vic_data  = d_line[m_way][m_ridx];
  end
  assign acq_valid = (state == S_ACQ);

  // ---- refill ----
  logic [LINE_W-1:0] fill_line;
  assign fill_line = m_req.write ? merge_word(grant.data, m_req.vaddr[3 +: WSEL_W], m_req.wdata, m_req.wmask)
                                 : grant.data;

  // ---- probe lookup at the index carried by the probe ----
  logic [NW-1:0] p_vec;
  logic [1:0]    p_way;
  always_comb begin
    p_way = '0;
    for (int w = 0; w < NW; w++) begin
      p_vec[w] = (m_st[w][r_probe.rnd_idx] != ST_I) &&
                 ({m_ppn[w][r_probe.rnd_idx], m_oidx[w][r_probe.rnd_idx]} == r_probe.laddr);
      if (p_vec[w]) p_way = 2'(w);
    end
  end
  assign pack_valid = (state == S_PROBE);
  always_comb begin
    pack.hit   = |p_vec;
    pack.dirty = (|p_vec) && (m_st[p_way][r_probe.rnd_idx] == ST_M);
    pack.data  = d_line[p_way][r_probe.rnd_idx];
  end

  // ---- handshakes ----
  logic probe_ok;
  assign probe_ok    = (state == S_IDLE) || (state == S_ACQ) || (state == S_GNT) || (state == S_TLB);
  assign probe_ready = probe_ok && !(state == S_ACQ && acq_ready) && !(state == S_GNT && grant_valid);
  assign cpu_req_ready = (state == S_IDLE) && !probe_valid;

  // ---- control ----
  logic [WORD_W-1:0] resp_q;
  assign cpu_resp_valid = (state == S_RESP);
  assign cpu_resp_rdata = resp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ret_state <= S_IDLE;
      r_req     <= '0;
      r_probe   <= '0;
      resp_q    <= '0;
      mshr_id   <= '0;
      l_tlb_hit <= 1'b0;
      l_tlb_ppn <= '0;
      for (int w = 0; w < NW; w++) begin
        l_ridx[w] <= '0;
        l_st[w]   <= ST_I;
        l_ppn[w]  <= '0;
        l_oidx[w] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: begin
          if (probe_valid && probe_ready) begin
            r_probe   <= probe;
            ret_state <= S_IDLE;
            state     <= S_PROBE;
          end else if (cpu_req_valid) begin
            r_req <= cpu_req;
            state <= S_LOOK;
          end
        end
        S_LOOK: begin
          for (int w = 0; w < NW; w++) begin
            l_ridx[w] <= ridx[w];
            l_st[w]   <= m_st[w][ridx[w]];
            l_ppn[w]  <= m_ppn[w][ridx[w]];
            l_oidx[w] <= m_oidx[w][ridx[w]];
          end
          l_tlb_hit <= tlb_hit;
          l_tlb_ppn <= tlb_ppn;
          state     <= S_CMP;
        end
        S_CMP: begin
          if (!l_tlb_hit) begin
            state <= S_TLB;
          end else if (hit && !upgrade) begin
            resp_q <= hit_line[int'(req_wsel) * WORD_W +: WORD_W];
            state  <= S_RESP;
          end else begin
            mshr_id <= alloc_id;
            state   <= S_ACQ;
          end
        end
        S_TLB: begin
          if (probe_valid && probe_ready) begin
            r_probe   <= probe;
            ret_state <= S_TLB;
            state     <= S_PROBE;
          end else if (tlb_hit) begin
            state <= S_LOOK;
          end
        end
        S_ACQ: begin
          if (acq_ready) begin
            state <= S_GNT;
          end else if (probe_valid && probe_ready) begin
            r_probe   <= probe;
            ret_state <= S_ACQ;
            state     <= S_PROBE;
          end
        end
        S_GNT: begin
          if (grant_valid) begin
            resp_q <= grant.data[int'(m_req.vaddr[3 +: WSEL_W]) * WORD_W +: WORD_W];
            state  <= S_RESP;
          end else if (probe_valid && probe_ready) begin
            r_probe   <= probe;
            ret_state <= S_GNT;
            state     <= S_PROBE;
          end
        end
        S_PROBE: state <= ret_state;
        S_RESP:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // LOOK-stage data read (no reset: only read behind a valid state)
  always_ff @(posedge clk) begin
    if (state == S_LOOK)
      for (int w = 0; w < NW; w++) l_data[w] <= d_line[w][ridx[w]];
  end

  // ---- metadata writes ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NW; w++)
        for (int s = 0; s < NS; s++) begin
          m_st[w][s] <= ST_I;
        end
    end else begin
      if (state == S_CMP && store_hit_own)
        m_st[hit_way][l_ridx[hit_way]] <= ST_M;
      if (state == S_ACQ && acq_ready)
        m_st[m_way][m_ridx] <= ST_I;
      if (state == S_GNT && grant_valid) begin
        m_st[m_way][grant.rnd_idx] <= m_req.write ? ST_M : grant.state;
      end
      if (state == S_PROBE && (|p_vec))
        m_st[p_way][r_probe.rnd_idx] <= (r_probe.kind == PR_INV) ? ST_I : ST_S;
    end
  end

  // ---- extended tag and data writes (memories, no reset) ----
  always_ff @(posedge clk) begin
    if (state == S_GNT && grant_valid) begin
      m_ppn[m_way][grant.rnd_idx]  <= m_laddr[LADDR_W-1 -: PPN_W];
      m_oidx[m_way][grant.rnd_idx] <= m_laddr[L1_IDX_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_CMP && store_hit_own)
      d_line[hit_way][l_ridx[hit_way]] <= merge_word(hit_line, req_wsel, r_req.wdata, r_req.wmask);
    if (state == S_GNT && grant_valid)
      d_line[m_way][grant.rnd_idx] <= fill_line;
  end

  // ---- events ----
  always_comb begin
    ev            = '0;
    ev.hit        = (state == S_CMP) && l_tlb_hit && hit && !upgrade;
    ev.miss       = do_alloc;
    ev.upgrade    = (state == S_CMP) && l_tlb_hit && upgrade;
    ev.tlb_miss   = (state == S_CMP) && !l_tlb_hit;
    ev.fill       = do_free;
    ev.probe_hit  = (state == S_PROBE) && (|p_vec);
    ev.probe_miss = (state == S_PROBE) && !(|p_vec);
    ev.writeback  = (state == S_ACQ) && acq_ready && acq.vic_valid && acq.vic_dirty;
  end

  // ---- rules ----
  // The refill must come back with the index that was sent.
  a_grant_idx: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_GNT && grant_valid) |-> grant.rnd_idx == m_ridx);
  // One miss at a time: a new miss never finds its line already in flight.
  a_no_dup: assert property (@(posedge clk) disable iff (!rst_n)
    do_alloc |-> (!mshr_match && !mshr_full));
  // A store refill is always an ownership grant.
  a_store_m: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_GNT && grant_valid && m_req.write) |-> grant.state == ST_M);
  // The MSHR is in use exactly while a miss is outstanding.
  a_mshr_use: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE) |-> mshr_empty);

endmodule
