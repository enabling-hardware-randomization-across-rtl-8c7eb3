// tlb: fully associative data TLB of an L1 data cache.
//
// NENTRIES virtual-page to physical-page translations. The lookup is
// combinational, so the physical page number is ready in the same cycle as
// the set read of the virtually indexed cache and the tag compare can follow
// in the next stage. A miss is reported on `hit`=0; the page-table walker,
// outside this block, answers with a fill that takes the next entry in
// round-robin order (or the entry already holding that page). `flush`
// empties the TLB, as an sfence.vma would.
//
// The entry count (8) follows the evaluated SoC. Full associativity,
// round-robin replacement and the flush input are this design's choices;
// permissions and address-space identifiers are not modelled.
module tlb
  import rc_pkg::*;
#(
  parameter int NENTRIES = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [VPN_W-1:0] lookup_vpn,
  output logic             hit,
  output logic [PPN_W-1:0] ppn,
  input  logic             fill_valid,
  input  logic [VPN_W-1:0] fill_vpn,
  input  logic [PPN_W-1:0] fill_ppn,
  input  logic             flush
);

  localparam int EI_W = (NENTRIES > 1) ? $clog2(NENTRIES) : 1;

  logic             valid [NENTRIES];
  logic [VPN_W-1:0] vpns  [NENTRIES];
  logic [PPN_W-1:0] ppns  [NENTRIES];
  logic [EI_W-1:0]  next;

  always_comb begin
    hit = 1'b0;
    ppn = '0;
    for (int e = 0; e < NENTRIES; e++) begin
      if (valid[e] && vpns[e] == lookup_vpn) begin
        hit = 1'b1;
        ppn = ppns[e];
      end
    end
  end

  // Entry written by a fill: the one already holding the page, else `next`.
  logic            fill_match;
  logic [EI_W-1:0] fill_slot;
  always_comb begin
    fill_match = 1'b0;
    fill_slot  = next;
    for (int e = 0; e < NENTRIES; e++) begin
      if (valid[e] && vpns[e] == fill_vpn) begin
        fill_match = 1'b1;
        fill_slot  = EI_W'(e);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NENTRIES; e++) begin
        valid[e] <= 1'b0;
        vpns[e]  <= '0;
        ppns[e]  <= '0;
      end
      next <= '0;
    end else if (flush) begin
      for (int e = 0; e < NENTRIES; e++) valid[e] <= 1'b0;
      next <= '0;
    end else if (fill_valid) begin
      valid[fill_slot] <= 1'b1;
      vpns[fill_slot]  <= fill_vpn;
      ppns[fill_slot]  <= fill_ppn;
      if (!fill_match) next <= (int'(next) == NENTRIES - 1) ? '0 : next + 1'b1;
    end
  end

endmodule
