// rc_pkg: shared constants and message types of the randomized cache hierarchy.
//
// The hierarchy is a per-core, virtually indexed L1 data cache in front of a
// shared, physically indexed L2 that is also the last-level cache. Both
// levels place lines in sets chosen by a keyed randomization function. The
// L1 computes its randomized set index once, from the virtual address, and
// that index travels with every message that refers to the line afterwards:
// the L2 stores it in its directory and uses it to probe the L1, and refills
// carry it back so the L1 never has to recompute it.
//
// Geometry follows the evaluated SoC: 16 KiB 4-way L1 and 64 KiB 8-way L2,
// both with 64-byte lines. Address widths (39-bit Sv39 virtual, 32-bit
// physical), the 64-bit key width and the two-core count are this design's
// own choices.
package rc_pkg;

  // ---- address geometry ----
  localparam int VADDR_W  = 39;                 // Sv39 virtual address
  localparam int PADDR_W  = 32;                 // physical address
  localparam int PGOFF_W  = 12;                 // 4 KiB pages
  localparam int VPN_W    = VADDR_W - PGOFF_W;  // 27
  localparam int PPN_W    = PADDR_W - PGOFF_W;  // 20
  localparam int OFF_W    = 6;                  // 64-byte lines
  localparam int LINE_W   = 512;                // bits per line
  localparam int WORD_W   = 64;                 // core data word
  localparam int WSEL_W   = 3;                  // word within line
  localparam int LADDR_W  = PADDR_W - OFF_W;    // physical line address, 26
  localparam int KEY_W    = 64;                 // one key CSR

  // ---- L1 data cache: 16 KiB, 4 ways, 64 sets ----
  localparam int L1_NWAYS = 4;
  localparam int L1_NSETS = 64;
  localparam int L1_IDX_W = 6;
  localparam int L1_VTAG_W = VADDR_W - OFF_W - L1_IDX_W; // virtual bits above the index

  // ---- L2 cache: 64 KiB, 8 ways, 128 sets ----
  localparam int L2_NWAYS = 8;
  localparam int L2_NSETS = 128;
  localparam int L2_IDX_W = 7;
  localparam int L2_TAG_W = LADDR_W - L2_IDX_W;           // 19

  localparam int NCORES   = 2;
  localparam int CORE_W   = 1;

  // Custom supervisor read/write CSR numbers of the key registers.
  localparam logic [11:0] CSR_L1_KEY_BASE = 12'h5C0;
  localparam logic [11:0] CSR_L2_KEY_BASE = 12'h5D0;

  // Randomization function of a randomizer.
  typedef enum logic [0:0] {
    FN_RM = 1'b0,   // random modulo: bijective on the index for a fixed tag
    FN_HF = 1'b1    // hash function: index and tag bits mixed together
  } rnd_fn_e;

  // MESI state of an L1 line.
  typedef enum logic [1:0] {
    ST_I = 2'd0,
    ST_S = 2'd1,
    ST_E = 2'd2,
    ST_M = 2'd3
  } mesi_e;

  // Privilege levels as encoded by RISC-V.
  typedef enum logic [1:0] {
    PRV_U = 2'd0,
    PRV_S = 2'd1,
    PRV_M = 2'd3
  } priv_e;

  // Core request to the L1 data cache.
  typedef struct packed {
    logic [VADDR_W-1:0]  vaddr;
    logic                write;
    logic [WORD_W-1:0]   wdata;
    logic [WORD_W/8-1:0] wmask;
  } cpu_req_t;

  // L1 -> L2 miss request. It carries the randomized L1 index chosen for the
  // line, and the line it displaces (victim) so the directory stays exact.
  typedef struct packed {
    logic [LADDR_W-1:0]  laddr;
    logic [L1_IDX_W-1:0] rnd_idx;
    logic                write;      // ask for M (store)
    logic                vic_valid;
    logic                vic_dirty;
    logic [LADDR_W-1:0]  vic_laddr;
    logic [LINE_W-1:0]   vic_data;
  } acq_t;

  // L2 -> L1 refill. rnd_idx is the index the L1 sent, echoed from the
  // directory; the L1 writes the line there without its randomizer.
  typedef struct packed {
    logic [LINE_W-1:0]   data;
    mesi_e               state;
    logic [L1_IDX_W-1:0] rnd_idx;
  } grant_t;

  typedef enum logic [0:0] {
    PR_INV  = 1'b0,  // invalidate the line
    PR_DOWN = 1'b1   // downgrade to shared
  } probe_e;

  // L2 -> L1 coherence probe, indexed with the stored randomized index.
  typedef struct packed {
    logic [LADDR_W-1:0]  laddr;
    logic [L1_IDX_W-1:0] rnd_idx;
    probe_e              kind;
  } probe_t;

  // L1 -> L2 probe acknowledgement.
  typedef struct packed {
    logic              hit;
    logic              dirty;
    logic [LINE_W-1:0] data;
  } pack_t;

  // L2 -> memory request; reads are answered with a line on mem_resp.
  typedef struct packed {
    logic               write;
    logic [LADDR_W-1:0] laddr;
    logic [LINE_W-1:0]  data;
  } mem_req_t;

  // Event pulses of an L1 data cache (one cycle each).
  typedef struct packed {
    logic hit;         // load or store hit
    logic miss;        // request sent to the L2 (includes upgrades)
    logic upgrade;     // store to a shared line
    logic tlb_miss;
    logic fill;        // refill written at the index carried by the grant
    logic probe_hit;   // probe found the line
    logic probe_miss;  // probe found nothing
    logic writeback;   // dirty victim sent with a miss
  } l1_ev_t;

  // Event pulses of the L2 cache.
  typedef struct packed {
    logic hit;
    logic miss;
    logic ghost_inv;   // invalidation of the requester's own older copy
    logic inv;         // invalidation of another core's copy
    logic down;        // downgrade of another core's exclusive copy
    logic back_inv;    // probe caused by an L2 eviction
    logic mem_wb;      // dirty line written to memory
  } l2_ev_t;

endpackage
