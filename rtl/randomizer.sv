// randomizer: keyed set-index generator of a randomized cache.
//
// For a line address split into tag bits (above the index) and index bits,
// it produces the set index each way must use. Two functions are available:
//
//   FN_RM  random modulo. For a fixed tag the map from the plain index to the
//          random index is a bijection, so lines that differ only in their
//          index bits (a contiguous region) still fall into distinct sets.
//          Built as rotl(idx ^ m, r), where m is the tag folded with the key
//          onto IDX_W bits and r a rotation amount derived from the tag and
//          the upper key bits.
//   FN_HF  hash function. Tag and index bits are XORed with the key, each
//          IDX_W-bit chunk rotated by its position and all chunks folded
//          together, followed by one non-linear step h ^ (rotl(h,1) &
//          ~rotl(h,2)) and a final key whitening. Neighbouring lines may
//          collide, which is the poorer spatial locality of hashing.
//
// With SKEWED=1 every way has its own key (NKEYS = NWAYS) and so its own
// index; with SKEWED=0 one key serves all ways and all outputs are equal.
// Purely combinational: the index is ready in the same cycle as the address,
// in parallel with the tag lookup.
//
// Following the design it belongs to, the function is keyed, applied once per
// request and may be replaced per way. The two concrete formulas are this
// design's own; they keep the properties named for random modulo (uniform,
// bijective per tag) and for hashing (tag and index mixed).
module randomizer
  import rc_pkg::*;
#(
  parameter int      TAG_W  = L1_VTAG_W,
  parameter int      IDX_W  = L1_IDX_W,
  parameter int      NWAYS  = L1_NWAYS,
  parameter rnd_fn_e FN     = FN_RM,
  parameter bit      SKEWED = 1'b1,
  parameter int      NKEYS  = SKEWED ? NWAYS : 1
) (
  input  logic [TAG_W-1:0] tag,
  input  logic [IDX_W-1:0] idx,
  input  logic [KEY_W-1:0] keys    [NKEYS],
  output logic [IDX_W-1:0] rnd_idx [NWAYS]
);

  localparam int IN_W = TAG_W + IDX_W;

  // Fold any number of bits onto IDX_W bits by XOR.
  function automatic logic [IDX_W-1:0] fold_tag(input logic [TAG_W-1:0] v);
    logic [IDX_W-1:0] f;
    f = '0;
    for (int b = 0; b < TAG_W; b++) f[b % IDX_W] ^= v[b];
    return f;
  endfunction

  function automatic logic [IDX_W-1:0] rotl(input logic [IDX_W-1:0] v, input int unsigned r);
    logic [IDX_W-1:0] o;
    for (int b = 0; b < IDX_W; b++) o[(b + r) % IDX_W] = v[b];
    return o;
  endfunction

  function automatic logic [IDX_W-1:0] rm_fn(input logic [TAG_W-1:0] t,
                                             input logic [IDX_W-1:0] i,
                                             input logic [KEY_W-1:0] k);
    logic [IDX_W-1:0] m, rsrc;
    int unsigned r;
    m    = fold_tag(t ^ k[TAG_W-1:0]);
    rsrc = fold_tag(t ^ k[KEY_W-1 -: TAG_W]);
    r    = int'(rsrc) % IDX_W;
    return rotl(i ^ m, r);
  endfunction

  function automatic logic [IDX_W-1:0] hf_fn(input logic [TAG_W-1:0] t,
                                             input logic [IDX_W-1:0] i,
                                             input logic [KEY_W-1:0] k);
    logic [IN_W-1:0]  x;
    logic [IDX_W-1:0] h;
    x = {t, i} ^ k[IN_W-1:0];
    h = '0;
    for (int b = 0; b < IN_W; b++) h[((b % IDX_W) + (b / IDX_W)) % IDX_W] ^= x[b];
    h = h ^ (rotl(h, 1) & ~rotl(h, 2));
    return h ^ k[KEY_W-1 -: IDX_W];
  endfunction

  always_comb begin
    for (int w = 0; w < NWAYS; w++) begin
      if (FN == FN_RM) rnd_idx[w] = rm_fn(tag, idx, keys[SKEWED ? w : 0]);
      else             rnd_idx[w] = hf_fn(tag, idx, keys[SKEWED ? w : 0]);
    end
  end

  initial begin
    assert (IN_W <= KEY_W) else $error("randomizer: address wider than the key");
    assert (NKEYS == (SKEWED ? NWAYS : 1)) else $error("randomizer: NKEYS must match SKEWED");
  end

endmodule
