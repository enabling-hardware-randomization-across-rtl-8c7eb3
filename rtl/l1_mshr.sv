// l1_mshr: miss status holding registers of the L1 data cache.
//
// Each entry keeps one outstanding miss: the physical line address, the
// randomized L1 index and way the line will be written to, and the core
// request to replay when the refill arrives. The randomized index stored here
// is the one sent to the L2 with the miss, so the refill and every later
// coherence probe find the line without running the randomizer again.
//
// alloc: writes the lowest free entry, returned on alloc_id in the same
//        cycle; allowed only while !full.
// free:  releases entry free_id.
// match: combinational search of the valid entries for lookup_laddr, used to
//        detect a request to a line that is already being fetched.
// Entries are indexed by id, so several misses may be held at once; the
// entry count (2) follows the evaluated SoC.
module l1_mshr
  import rc_pkg::*;
#(
  parameter int NENT = 2,
  parameter int ID_W = (NENT > 1) ? $clog2(NENT) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                alloc,
  input  logic [LADDR_W-1:0]  alloc_laddr,
  input  logic [L1_IDX_W-1:0] alloc_rnd_idx,
  input  logic [1:0]          alloc_way,
  input  cpu_req_t            alloc_req,
  output logic [ID_W-1:0]     alloc_id,
  output logic                full,
  output logic                empty,
  input  logic                free,
  input  logic [ID_W-1:0]     free_id,
  input  logic [ID_W-1:0]     read_id,
  output logic [LADDR_W-1:0]  read_laddr,
  output logic [L1_IDX_W-1:0] read_rnd_idx,
  output logic [1:0]          read_way,
  output cpu_req_t            read_req,
  input  logic [LADDR_W-1:0]  lookup_laddr,
  output logic                match
);

  logic                valid   [NENT];
  logic [LADDR_W-1:0]  laddr   [NENT];
  logic [L1_IDX_W-1:0] rnd_idx [NENT];
  logic [1:0]          way     [NENT];
  cpu_req_t            req     [NENT];

  always_comb begin
    full     = 1'b1;
    empty    = 1'b1;
    alloc_id = '0;
    match    = 1'b0;
    for (int e = NENT - 1; e >= 0; e--) begin
      if (!valid[e]) begin
        full     = 1'b0;
        alloc_id = ID_W'(e);
      end else begin
        empty = 1'b0;
        if (laddr[e] == lookup_laddr) match = 1'b1;
      end
    end
  end

  assign read_laddr   = laddr[read_id];
  assign read_rnd_idx = rnd_idx[read_id];
  assign read_way     = way[read_id];
  assign read_req     = req[read_id];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NENT; e++) valid[e] <= 1'b0;
    end else begin
      if (free) valid[free_id] <= 1'b0;
      if (alloc && !full) begin
        valid[alloc_id]   <= 1'b1;
        laddr[alloc_id]   <= alloc_laddr;
        rnd_idx[alloc_id] <= alloc_rnd_idx;
        way[alloc_id]     <= alloc_way;
        req[alloc_id]     <= alloc_req;
      end
    end
  end

  // Allocating into a full file would lose a miss.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !full);

endmodule
