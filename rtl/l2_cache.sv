// l2_cache: randomized shared L2 (last-level) cache with a MESI directory
// that records where each L1 keeps its copy.
//
// Placement. Physical line addresses pass through the L2's own randomizer
// (random modulo or hash, optionally one function per way). The stored tag
// is the complete line address, i.e. the tag extended with the original
// index, so lines that randomize into one set never alias and a victim's
// memory address is read straight from its tag. The randomized index of an
// L2 miss is kept in the miss register (the L2's single MSHR) so the memory
// reply is written to the right set.
//
// Directory. Each line holds, per core, a sharer bit and the randomized L1
// index that core sent with its last request for the line; `excl` marks a
// single holder in E or M. The L2 is inclusive. Every probe it sends to an
// L1 carries the stored L1 index, so the L1 finds the line without
// recomputing an index from an address it no longer has (the L1 index came
// from a virtual address).
//
// Ghost copies. After a key or page-table change a core may ask again for a
// line it already holds under its old L1 index. Before answering, the L2
// invalidates that old copy with a probe at the old index (collecting dirty
// data), and then stores the new index. Everything else is plain MESI:
// a store invalidates other holders, a load downgrades an exclusive holder
// and is granted S when others keep a copy, E otherwise.
//
// Transaction flow (one at a time, cores served round-robin):
//   accept acq -> absorb the victim the L1 gave up -> look up the line ->
//   [miss: pick an empty way, else a random one, back-invalidate its L1 copies, write it back
//   if dirty, read memory] -> probe L1 copies as the directory requires ->
//   grant with data, MESI state and the L1 index.
// The grant is never earlier than LAT cycles after the request was accepted
// (8 for a hit, following the evaluated SoC); misses and probes add their
// own cycles.
//
// From the design: per-line L1 index in the directory, probes indexed with
// it, extended tags, randomized index kept in the MSHR, the ghost-copy
// invalidation, geometry and latency. This design's own: blocking control,
// the message format, inclusion with back-invalidation, and applying the
// ghost-copy invalidation whatever the old copy's state.
// An L2 key change re-places lines filled afterwards only; lines already in
// the L2 are no longer found under the new key, so the L2 should be clean
// and free of L1 copies when its key is changed.
module l2_cache
  import rc_pkg::*;
#(
  parameter rnd_fn_e FN     = FN_RM,
  parameter bit      SKEWED = 1'b1,
  parameter int      NKEYS  = SKEWED ? L2_NWAYS : 1,
  parameter int      LAT    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [KEY_W-1:0]  keys [NKEYS],
  // L1 ports
  input  logic [NCORES-1:0] acq_valid,
  output logic [NCORES-1:0] acq_ready,
  input  acq_t              acq [NCORES],
  output logic [NCORES-1:0] grant_valid,
  output grant_t            grant,
  output logic [NCORES-1:0] probe_valid,
  input  logic [NCORES-1:0] probe_ready,
  output probe_t            probe,
  input  logic [NCORES-1:0] pack_valid,
  input  pack_t             pack [NCORES],
  // memory port
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output mem_req_t          mem_req,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_data,
  output l2_ev_t            ev
);

  localparam int NW = L2_NWAYS;
  localparam int NS = L2_NSETS;

  typedef enum logic [3:0] {
    L_IDLE, L_VIC, L_VICWB, L_LOOK, L_WB, L_FILL, L_FILLW, L_DIR,
    L_PRB, L_PRBW, L_GRANT
  } state_e;

  state_e state, p_ret;

  // ---- arrays ----
  logic                v     [NW][NS];
  logic                dty   [NW][NS];
  logic                excl  [NW][NS];
  logic [NCORES-1:0]   shr   [NW][NS];
  logic [LADDR_W-1:0]  tagl  [NW][NS];
  logic [L1_IDX_W-1:0] l1idx [NW][NS][NCORES];
  logic [LINE_W-1:0]   data  [NW][NS];

  // ---- current transaction ----
  acq_t              r_acq;
  logic [CORE_W-1:0] r_core;
  logic [CORE_W-1:0] rr_next;
  logic [7:0]        cnt;
  logic [2:0]        t_way;        // miss register: way and randomized index
  logic [L2_IDX_W-1:0] t_idx;
  logic [NCORES-1:0] pmask;        // cores still to probe
  probe_e            pkind [NCORES];
  logic              p_back;       // probes caused by an eviction
  logic [CORE_W-1:0] p_core;

  // ---- lookup through the randomizer ----
  logic [LADDR_W-1:0]  lk_laddr;
  logic [L2_IDX_W-1:0] lk_idx [NW];
  logic [NW-1:0]       lk_vec;
  logic [2:0]          lk_way;
  assign lk_laddr = (state == L_VIC) ? r_acq.vic_laddr : r_acq.laddr;

  randomizer #(
    .TAG_W(L2_TAG_W), .IDX_W(L2_IDX_W), .NWAYS(NW), .FN(FN), .SKEWED(SKEWED), .NKEYS(NKEYS)
  ) u_rnd (
    .tag(lk_laddr[LADDR_W-1 -: L2_TAG_W]), .idx(lk_laddr[L2_IDX_W-1:0]), .keys(keys), .rnd_idx(lk_idx)
  );

  always_comb begin
    lk_way = '0;
    for (int w = 0; w < NW; w++) begin
      lk_vec[w] = v[w][lk_idx[w]] && (tagl[w][lk_idx[w]] == lk_laddr);
      if (lk_vec[w]) lk_way = 3'(w);
    end
  end

  logic [15:0] lfsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= 16'h1D2B;
    else        lfsr <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
  end

  // victim way of a miss: an empty way if one of the candidate sets has one,
  // else a random way
  logic [2:0] vw;
  always_comb begin
    vw = lfsr[2:0];
    for (int w = NW - 1; w >= 0; w--) if (!v[w][lk_idx[w]]) vw = 3'(w);
  end

  // ---- arbitration: round robin over the requesting cores ----
  logic              any_acq;
  logic [CORE_W-1:0] pick;
  always_comb begin
    any_acq = 1'b0;
    pick    = '0;
    for (int i = NCORES - 1; i >= 0; i--) begin
      if (acq_valid[(int'(rr_next) + i) % NCORES]) begin
        any_acq = 1'b1;
        pick    = CORE_W'((int'(rr_next) + i) % NCORES);
      end
    end
  end
  always_comb begin
    acq_ready = '0;
    if (state == L_IDLE && any_acq) acq_ready[pick] = 1'b1;
  end

  // ---- directory decision for the target line ----
  logic [NCORES-1:0] d_mask;
  probe_e            d_kind [NCORES];
  logic [NCORES-1:0] others;
  always_comb begin
    for (int k = 0; k < NCORES; k++) begin
      d_mask[k] = 1'b0;
      d_kind[k] = PR_INV;
      if (shr[t_way][t_idx][k]) begin
        if (k == int'(r_core))        d_mask[k] = 1'b1;                 // ghost copy
        else if (r_acq.write)         d_mask[k] = 1'b1;
        else if (excl[t_way][t_idx]) begin d_mask[k] = 1'b1; d_kind[k] = PR_DOWN; end
      end
    end
    others = shr[t_way][t_idx];
    others[r_core] = 1'b0;
  end

  // lowest core left to probe
  logic [CORE_W-1:0] p_first;
  always_comb begin
    p_first = '0;
    for (int k = NCORES - 1; k >= 0; k--) if (pmask[k]) p_first = CORE_W'(k);
  end

  // ---- outputs ----
  always_comb begin
    probe_valid = '0;
    if (state == L_PRB && pmask != '0) probe_valid[p_core] = 1'b1;
    probe.laddr   = tagl[t_way][t_idx];
    probe.rnd_idx = l1idx[t_way][t_idx][p_core];
    probe.kind    = pkind[p_core];
  end

  mesi_e g_state;
  assign g_state = r_acq.write ? ST_M : ((|others) ? ST_S : ST_E);
  logic  g_fire;
  assign g_fire = (state == L_GRANT) && (int'(cnt) >= LAT);
  always_comb begin
    grant_valid = '0;
    if (g_fire) grant_valid[r_core] = 1'b1;
    grant.data    = data[t_way][t_idx];
    grant.state   = g_state;
    grant.rnd_idx = r_acq.rnd_idx;
  end

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '0;
    unique case (state)
      L_VICWB: begin
        mem_req_valid = 1'b1;
        mem_req       = '{write: 1'b1, laddr: r_acq.vic_laddr, data: r_acq.vic_data};
      end
      L_WB: begin
        mem_req_valid = dty[t_way][t_idx];
        mem_req       = '{write: 1'b1, laddr: tagl[t_way][t_idx], data: data[t_way][t_idx]};
      end
      L_FILL: begin
        mem_req_valid = 1'b1;
        mem_req       = '{write: 1'b0, laddr: r_acq.laddr, data: '0};
      end
      default: ;
    endcase
  end

  // ---- control and directory updates ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= L_IDLE;
      p_ret   <= L_IDLE;
      r_acq   <= '0;
      r_core  <= '0;
      rr_next <= '0;
      cnt     <= '0;
      t_way   <= '0;
      t_idx   <= '0;
      pmask   <= '0;
      p_back  <= 1'b0;
      for (int k = 0; k < NCORES; k++) pkind[k] <= PR_INV;
      for (int w = 0; w < NW; w++)
        for (int s = 0; s < NS; s++) begin
          v[w][s]    <= 1'b0;
          dty[w][s]  <= 1'b0;
          excl[w][s] <= 1'b0;
          shr[w][s]  <= '0;
        end
    end else begin
      if (cnt != 8'hFF) cnt <= cnt + 8'd1;
      unique case (state)
        L_IDLE: begin
          if (any_acq) begin
            r_acq   <= acq[pick];
            r_core  <= pick;
            rr_next <= CORE_W'((int'(pick) + 1) % NCORES);
            cnt     <= 8'd1;
            state   <= L_VIC;
          end
        end
        // the L1 gave up its victim: take its data, drop it from the directory
        L_VIC: begin
          if (!r_acq.vic_valid) begin
            state <= L_LOOK;
          end else if (|lk_vec) begin
            if (r_acq.vic_dirty) dty[lk_way][lk_idx[lk_way]] <= 1'b1;
            shr[lk_way][lk_idx[lk_way]][r_core] <= 1'b0;
            excl[lk_way][lk_idx[lk_way]]        <= 1'b0;
            state <= L_LOOK;
          end else begin
            state <= r_acq.vic_dirty ? L_VICWB : L_LOOK;
          end
        end
        L_VICWB: if (mem_req_ready) state <= L_LOOK;
        L_LOOK: begin
          if (|lk_vec) begin
            t_way <= lk_way;
            t_idx <= lk_idx[lk_way];
            state <= L_DIR;
          end else begin
            t_way <= vw;
            t_idx <= lk_idx[vw];
            if (v[vw][lk_idx[vw]]) begin
              pmask  <= shr[vw][lk_idx[vw]];
              for (int k = 0; k < NCORES; k++) pkind[k] <= PR_INV;
              p_back <= 1'b1;
              p_ret  <= L_WB;
              state  <= L_PRB;
            end else begin
              state <= L_FILL;
            end
          end
        end
        L_WB: begin
          if (!dty[t_way][t_idx]) state <= L_FILL;
          else if (mem_req_ready) state <= L_FILL;
        end
        L_FILL: if (mem_req_ready) state <= L_FILLW;
        L_FILLW: begin
          if (mem_resp_valid) begin
            v[t_way][t_idx]    <= 1'b1;
            dty[t_way][t_idx]  <= 1'b0;
            excl[t_way][t_idx] <= 1'b0;
            shr[t_way][t_idx]  <= '0;
            state <= L_DIR;
          end
        end
        L_DIR: begin
          pmask  <= d_mask;
          for (int k = 0; k < NCORES; k++) pkind[k] <= d_kind[k];
          p_back <= 1'b0;
          p_ret  <= L_GRANT;
          state  <= L_PRB;
        end
        L_PRB: begin
          if (pmask == '0) begin
            state <= p_ret;
          end else if (probe_ready[p_core]) begin
            state <= L_PRBW;
          end
        end
        L_PRBW: begin
          if (pack_valid[p_core]) begin
            if (pack[p_core].hit && pack[p_core].dirty) dty[t_way][t_idx] <= 1'b1;
            if (pkind[p_core] == PR_INV) shr[t_way][t_idx][p_core] <= 1'b0;
            excl[t_way][t_idx] <= 1'b0;
            pmask[p_core] <= 1'b0;
            state <= L_PRB;
          end
        end
        L_GRANT: begin
          if (g_fire) begin
            shr[t_way][t_idx][r_core]   <= 1'b1;
            excl[t_way][t_idx]          <= (g_state != ST_S);
            state <= L_IDLE;
          end
        end
        default: state <= L_IDLE;
      endcase
    end
  end

  // the core being probed is the lowest one left
  always_comb p_core = p_first;

  // ---- tag, L1-index and data arrays (memories, no reset: read only
  //      behind a valid bit) ----
  always_ff @(posedge clk) begin
    if (state == L_FILLW && mem_resp_valid)
      tagl[t_way][t_idx] <= r_acq.laddr;
    if (state == L_GRANT && g_fire)
      l1idx[t_way][t_idx][r_core] <= r_acq.rnd_idx;
  end

  always_ff @(posedge clk) begin
    if (state == L_VIC && r_acq.vic_valid && r_acq.vic_dirty && (|lk_vec))
      data[lk_way][lk_idx[lk_way]] <= r_acq.vic_data;
    if (state == L_FILLW && mem_resp_valid)
      data[t_way][t_idx] <= mem_resp_data;
    if (state == L_PRBW && pack_valid[p_core] && pack[p_core].hit && pack[p_core].dirty)
      data[t_way][t_idx] <= pack[p_core].data;
  end

  // ---- events ----
  always_comb begin
    ev           = '0;
    ev.hit       = (state == L_LOOK) && (|lk_vec);
    ev.miss      = (state == L_LOOK) && !(|lk_vec);
    ev.ghost_inv = (state == L_PRB) && (pmask != '0) && probe_ready[p_core] && !p_back && (p_core == r_core);
    ev.inv       = (state == L_PRB) && (pmask != '0) && probe_ready[p_core] && !p_back && (p_core != r_core)
                   && (pkind[p_core] == PR_INV);
    ev.down      = (state == L_PRB) && (pmask != '0) && probe_ready[p_core] && (pkind[p_core] == PR_DOWN);
    ev.back_inv  = (state == L_PRB) && (pmask != '0) && probe_ready[p_core] && p_back;
    ev.mem_wb    = ((state == L_WB) && dty[t_way][t_idx] && mem_req_ready) ||
                   ((state == L_VICWB) && mem_req_ready);
  end

  // ---- rules ----
  // At most one grant per transaction, only to the requester.
  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_valid));
  // A line held exclusively has exactly one holder.
  a_excl: assert property (@(posedge clk) disable iff (!rst_n)
    (state == L_GRANT && g_fire && g_state != ST_S) |-> (others == '0));
  // Probe requests stay up until taken.
  a_probe_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (|(probe_valid & ~probe_ready)) |=> (probe_valid != '0));

endmodule
