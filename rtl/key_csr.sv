// key_csr: key registers of one randomized cache, as control and status
// registers (CSRs) reachable only from a privileged mode.
//
// NKEYS 64-bit keys sit at CSR numbers BASE .. BASE+NKEYS-1: one key for a
// plain randomized cache, one per way for a skewed one. A write or read from
// supervisor or machine mode reaches the key; the same access from user mode
// leaves the key unchanged, returns zero and raises `illegal` for that cycle
// (the core would turn it into an illegal-instruction trap).
//
// At reset every key is loaded from the entropy input `seed`, mixed with the
// key number so that the per-way keys differ, so each boot starts with a new
// cache layout. The written value is visible on `keys` from the next cycle,
// and `key_changed` pulses in that cycle, so the operating system can rekey
// the cache at any time without flushing it.
//
// Privileged-only access, one CSR per key and random reset values follow the
// design; the CSR numbers, the seed mixing and the read-zero behaviour on an
// illegal access are this design's choices.
module key_csr
  import rc_pkg::*;
#(
  parameter int          NKEYS = L1_NWAYS,
  parameter logic [11:0] BASE  = CSR_L1_KEY_BASE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [KEY_W-1:0] seed,         // entropy source, sampled in reset
  input  logic             csr_en,       // a CSR instruction this cycle
  input  logic             csr_we,       // it writes
  input  logic [11:0]      csr_addr,
  input  logic [KEY_W-1:0] csr_wdata,
  input  priv_e            csr_priv,
  output logic             csr_hit,      // csr_addr is one of our keys
  output logic [KEY_W-1:0] csr_rdata,
  output logic             illegal,
  output logic             key_changed,
  output logic [KEY_W-1:0] keys [NKEYS]
);

  localparam logic [KEY_W-1:0] MIX = 64'h9E37_79B9_7F4A_7C15;
  localparam int KI_W = (NKEYS > 1) ? $clog2(NKEYS) : 1;

  logic [11:0] offs;
  logic        allowed;

  assign offs    = csr_addr - BASE;
  assign csr_hit = csr_en && (csr_addr >= BASE) && (int'(offs) < NKEYS);
  assign allowed = (csr_priv != PRV_U);
  assign illegal = csr_hit && !allowed;

  always_comb begin
    csr_rdata = '0;
    if (csr_hit && allowed) csr_rdata = keys[offs[KI_W-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NKEYS; k++) keys[k] <= seed ^ (MIX * KEY_W'(k + 1));
      key_changed <= 1'b0;
    end else begin
      key_changed <= 1'b0;
      if (csr_hit && allowed && csr_we) begin
        keys[offs[KI_W-1:0]] <= csr_wdata;
        key_changed <= 1'b1;
      end
    end
  end

endmodule
