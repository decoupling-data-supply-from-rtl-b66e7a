// fv_ref_pkg: reference model of the frequent-value compression scheme, used
// by the compressor, decompressor and top-level testbenches.
// The tables are modelled as per-set recency lists (most recent first), an
// organisation independent of the age counters of the RTL. Encoding follows
// the rules documented in fv_compressor: base scheme = whole-value match,
// extended scheme = integer match on bits [31:k], float whole-value match,
// then float sign/exponent match.
package fv_ref_pkg;
  import desc_pkg::*;

  class fv_model;
    bit ext;
    int unsigned entries, ways, sets, k;
    bit [DATA_W-1:0] val [];
    bit              vld [];
    int              order [][$];   // per set, ways from most to least recent
    bit [FP_SE_W-1:0] se_val [FPC_ENTRIES];
    bit               se_vld [FPC_ENTRIES];
    int               se_order [$];

    function new(bit ext, int unsigned entries = FVC_ENTRIES,
                 int unsigned ways = FVC_WAYS, int unsigned k = FVC_K);
      this.ext = ext; this.entries = entries; this.ways = ways; this.k = k;
      sets  = entries / ways;
      val   = new[entries];
      vld   = new[entries];
      order = new[sets];
      foreach (vld[i]) begin vld[i] = 0; val[i] = 0; end
      foreach (order[s]) for (int w = 0; w < ways; w++) order[s].push_back(w);
      for (int w = 0; w < FPC_ENTRIES; w++) begin
        se_vld[w] = 0; se_val[w] = 0; se_order.push_back(w);
      end
    endfunction

    function int set_of(bit [DATA_W-1:0] v);
      return ext ? int'((v >> k) % sets) : int'(v % sets);
    endfunction

    function void touch(int s, int w);
      foreach (order[s][i]) if (order[s][i] == w) begin order[s].delete(i); break; end
      order[s].push_front(w);
    endfunction

    function void insert(bit [DATA_W-1:0] v);
      int s, w;
      s = set_of(v);
      w = order[s][$];
      val[s*ways+w] = v; vld[s*ways+w] = 1;
      touch(s, w);
    endfunction

    function void se_touch(int w);
      foreach (se_order[i]) if (se_order[i] == w) begin se_order.delete(i); break; end
      se_order.push_front(w);
    endfunction

    function void se_insert(bit [FP_SE_W-1:0] v);
      int w;
      w = se_order[$];
      se_val[w] = v; se_vld[w] = 1;
      se_touch(w);
    endfunction

    function int unsigned idx_bits();
      return $clog2(entries);
    endfunction

    // Encode one item and update the tables as the compressor does.
    function void encode(input bit [DATA_W-1:0] v, input bit fp, input bit fwd,
                         output cmp_kind_e kind, output bit [DATA_W-1:0] payload,
                         output int nbits);
      int s, hw, sw;
      int ind;
      bit full_cmp;
      ind = ext ? 2 : 1;
      kind = CMP_NONE; payload = v; nbits = ind + DATA_W;
      if (fwd) return;
      s = set_of(v);
      hw = -1;
      full_cmp = !ext || fp;
      for (int w = 0; w < ways; w++) begin
        int e;
        e = s*ways + w;
        if (hw < 0 && vld[e] &&
            (full_cmp ? (val[e] == v) : ((val[e] >> k) == (v >> k)))) hw = w;
      end
      sw = -1;
      for (int w = 0; w < FPC_ENTRIES; w++)
        if (sw < 0 && se_vld[w] && se_val[w] == v[DATA_W-1 -: FP_SE_W]) sw = w;
      if (hw >= 0) begin
        int idx;
        idx = s*ways + hw;
        if (!ext)     begin kind = CMP_INT; payload = idx; nbits = ind + idx_bits(); end
        else if (!fp) begin kind = CMP_INT; payload = (idx << k) | (v & ((1 << k) - 1));
                            nbits = ind + idx_bits() + k; end
        else          begin kind = CMP_FP; payload = idx; nbits = ind + idx_bits(); end
        touch(s, hw);
      end else begin
        if (ext && fp && sw >= 0) begin
          kind = CMP_FP_SE;
          payload = (sw << (DATA_W - FP_SE_W)) | (v & ((1 << (DATA_W - FP_SE_W)) - 1));
          nbits = ind + $clog2(FPC_ENTRIES) + DATA_W - FP_SE_W;
          se_touch(sw);
        end else if (ext) begin
          se_insert(v[DATA_W-1 -: FP_SE_W]);
        end
        insert(v);
      end
    endfunction

    // Decode one link word and update the tables as the decompressor does.
    function bit [DATA_W-1:0] decode(cmp_kind_e kind, bit [DATA_W-1:0] payload, bit fwd);
      bit [DATA_W-1:0] v;
      int idx;
      if (fwd) return payload;
      case (kind)
        CMP_INT: begin
          idx = ext ? int'((payload >> k) % entries) : int'(payload % entries);
          v = ext ? ((val[idx] >> k) << k) | (payload & ((1 << k) - 1)) : val[idx];
          touch(idx / ways, idx % ways);
        end
        CMP_FP: begin
          idx = int'(payload % entries);
          v = val[idx];
          touch(idx / ways, idx % ways);
        end
        CMP_FP_SE: begin
          idx = int'(payload >> (DATA_W - FP_SE_W)) % FPC_ENTRIES;
          v = {se_val[idx], payload[DATA_W-FP_SE_W-1:0]};
          se_touch(idx);
          insert(v);
        end
        default: begin
          v = payload;
          if (ext) se_insert(v[DATA_W-1 -: FP_SE_W]);
          insert(v);
        end
      endcase
      return v;
    endfunction
  endclass

  // A value stream with temporal and spatial locality: repeats from a small
  // pool, integers near pool values, floats sharing exponents.
  class value_gen;
    bit [DATA_W-1:0] pool [8];
    function new();
      foreach (pool[i]) pool[i] = $urandom;
      pool[0] = 32'h3f80_0000;  // 1.0f
      pool[1] = 32'h4120_0000;  // 10.0f
    endfunction
    function void next(output bit [DATA_W-1:0] v, output bit fp);
      int r;
      r = $urandom % 10;
      fp = ($urandom % 2) != 0;
      if (r < 4)      v = pool[$urandom % 8];
      else if (r < 7) v = pool[$urandom % 8] ^ ($urandom % 64);
      else if (r < 9) v = {pool[$urandom % 2][31:23], 23'($urandom)};
      else            v = $urandom;
      if ($urandom % 50 == 0) pool[$urandom % 8] = $urandom;
    endfunction
  endclass
endpackage
