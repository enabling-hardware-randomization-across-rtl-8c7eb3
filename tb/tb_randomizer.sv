// tb_randomizer: checks both randomization functions against a reference
// model written here independently, and checks the properties the cache
// relies on: random modulo is a bijection on the index for a fixed tag,
// skewed ways get different indexes, unskewed ways share one, changing the
// key changes the mapping, and indexes spread evenly over the sets.
module tb_randomizer;
  import rc_pkg::*;

  localparam int TW = L1_VTAG_W;
  localparam int IW = L1_IDX_W;
  localparam int NW = L1_NWAYS;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [TW-1:0]    tag;
  logic [IW-1:0]    idx;
  logic [KEY_W-1:0] keys4 [NW];
  logic [KEY_W-1:0] keys1 [1];
  logic [IW-1:0]    rm_out [NW];
  logic [IW-1:0]    hf_out [NW];

  randomizer #(.TAG_W(TW), .IDX_W(IW), .NWAYS(NW), .FN(FN_RM), .SKEWED(1'b1)) u_rm (
    .tag, .idx, .keys(keys4), .rnd_idx(rm_out));
  randomizer #(.TAG_W(TW), .IDX_W(IW), .NWAYS(NW), .FN(FN_HF), .SKEWED(1'b0)) u_hf (
    .tag, .idx, .keys(keys1), .rnd_idx(hf_out));

  // reference: XOR-fold by repeated shifting
  function automatic logic [IW-1:0] ref_fold(input logic [TW-1:0] v);
    logic [IW-1:0] f = '0;
    logic [TW+IW-1:0] t = {{IW{1'b0}}, v};
    for (int c = 0; c * IW < TW; c++) begin
      f ^= t[IW-1:0];
      t = t >> IW;
    end
    return f;
  endfunction

  function automatic logic [IW-1:0] ref_rotl(input logic [IW-1:0] v, input int r);
    logic [2*IW-1:0] d = {v, v};
    r = r % IW;
    return d[2*IW-1-r -: IW];
  endfunction

  function automatic logic [IW-1:0] ref_rm(input logic [TW-1:0] t, input logic [IW-1:0] i,
                                           input logic [KEY_W-1:0] k);
    logic [IW-1:0] m = ref_fold(t ^ k[TW-1:0]);
    int r = int'(ref_fold(t ^ k[KEY_W-1:KEY_W-TW])) % IW;
    return ref_rotl(i ^ m, r);
  endfunction

  function automatic logic [IW-1:0] ref_hf(input logic [TW-1:0] t, input logic [IW-1:0] i,
                                           input logic [KEY_W-1:0] k);
    logic [TW+IW-1:0] x = {t, i} ^ k[TW+IW-1:0];
    logic [IW-1:0] h = '0;
    logic [IW-1:0] chunk;
    for (int c = 0; c * IW < TW + IW; c++) begin
      chunk = '0;
      for (int b = 0; b < IW; b++) if (c * IW + b < TW + IW) chunk[b] = x[c * IW + b];
      h ^= ref_rotl(chunk, c);
    end
    h = h ^ (ref_rotl(h, 1) & ~ref_rotl(h, 2));
    return h ^ k[KEY_W-1:KEY_W-IW];
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [L1_NSETS];
    logic [L1_NSETS-1:0] seen;
    logic [IW-1:0] prev_idx;
    int differ;
    for (int w = 0; w < NW; w++) keys4[w] = {$urandom, $urandom};
    keys1[0] = {$urandom, $urandom};

    // 1. reference model, random addresses
    for (int n = 0; n < 300; n++) begin
      tag = TW'({$urandom, $urandom});
      idx = IW'($urandom);
      #1;
      for (int w = 0; w < NW; w++) begin
        chk(rm_out[w] == ref_rm(tag, idx, keys4[w]), $sformatf("RM way %0d tag %h idx %0d", w, tag, idx));
        chk(hf_out[w] == ref_hf(tag, idx, keys1[0]), $sformatf("HF way %0d tag %h idx %0d", w, tag, idx));
      end
    end

    // 2. random modulo: bijective on the index for a fixed tag, every way
    for (int n = 0; n < 8; n++) begin
      tag = TW'({$urandom, $urandom});
      for (int w = 0; w < NW; w++) begin
        seen = '0;
        for (int i = 0; i < L1_NSETS; i++) begin
          idx = IW'(i);
          #1;
          seen[rm_out[w]] = 1'b1;
        end
        chk(&seen, $sformatf("RM not a permutation for tag %h way %0d", tag, w));
      end
    end

    // 3. skewed ways differ, unskewed ways agree
    differ = 0;
    for (int n = 0; n < 64; n++) begin
      tag = TW'({$urandom, $urandom});
      idx = IW'($urandom);
      #1;
      if (rm_out[0] != rm_out[1] || rm_out[1] != rm_out[2] || rm_out[2] != rm_out[3]) differ++;
      chk(hf_out[0] == hf_out[1] && hf_out[2] == hf_out[3] && hf_out[0] == hf_out[3], "unskewed ways differ");
    end
    chk(differ > 48, $sformatf("skewed ways agree too often (%0d of 64 differ)", differ));

    // 4. a new key moves lines
    differ = 0;
    for (int n = 0; n < 64; n++) begin
      tag = TW'({$urandom, $urandom});
      idx = IW'($urandom);
      #1;
      prev_idx = hf_out[0];
      keys1[0] = keys1[0] ^ {$urandom, $urandom};
      #1;
      if (hf_out[0] != prev_idx) differ++;
    end
    chk(differ > 48, $sformatf("rekey moved only %0d of 64 lines", differ));

    // 5. spread: random line addresses over the sets, every set used, none overloaded
    for (int s = 0; s < L1_NSETS; s++) hist[s] = 0;
    for (int n = 0; n < 64 * 64; n++) begin
      tag = TW'({$urandom, $urandom});
      idx = IW'($urandom);
      #1;
      hist[rm_out[2]]++;
    end
    for (int s = 0; s < L1_NSETS; s++)
      chk(hist[s] > 20 && hist[s] < 120, $sformatf("set %0d got %0d of 4096", s, hist[s]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
