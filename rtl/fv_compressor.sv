// fv_compressor: frequent-value compression of the SuppD -> CompD traffic,
// placed between the head of the communication queue and the link.
//
// A frequent-value CAM (FVC, 16 entries, 4 ways) remembers recently sent
// values. A value found in it is sent as its location, set * ways + way
// (4 bits), instead of 32 bits; a value not found replaces the LRU way of its
// set and is sent whole.
//   Base scheme (EXTENDED = 0): 1-bit indicator; the whole 32-bit value is
//     compared; set index = low bits of the value.
//   Extended scheme (EXTENDED = 1, default): 2-bit indicator.
//     Integers compare only bits [31:k] (k = 6) and send index + the k low
//     bits (code 01). Floats compare all 32 bits and send the index (code 10);
//     on a miss, a 4-entry table of the 9 sign/exponent bits is tried and a
//     hit sends its 2-bit index + the 23 mantissa bits (code 11). Code 00 is an
//     uncompressed value. The set index is value bits [k+1:k] for all values.
// The FVC stores full 32-bit values, so a float and an integer entry can
// serve each other whenever their compared bits agree; this is exact because
// the decompressor rebuilds the value from the same entry.
// On every uncompressed value the sign/exponent table also takes bits
// [31:23] into its LRU way: the 2-bit indicator has no spare code to say
// "uncompressed float", so the CompD side cannot tell, and both sides update
// on every uncompressed item to stay in step. Forwarded items (fwd = 1) carry
// a store id, bypass the tables and are sent whole. These three rules are this
// design's choices; the text does not settle them.
//
// Timing: in_ready = link register free; the item is encoded in the cycle it
// is accepted and appears on the link (out_*) the next cycle. Tables update
// on acceptance only, so a stalled link loses no state.
module fv_compressor
  import desc_pkg::*;
#(
  parameter bit          EXTENDED = 1'b1,
  parameter int unsigned ENTRIES  = FVC_ENTRIES,
  parameter int unsigned WAYS     = FVC_WAYS,
  parameter int unsigned K        = FVC_K,
  localparam int unsigned SETS    = ENTRIES / WAYS,
  localparam int unsigned SET_W   = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned IDX_W   = $clog2(ENTRIES),
  localparam int unsigned SE_IDX_W = $clog2(FPC_ENTRIES),
  localparam int unsigned MANT_W  = DATA_W - FP_SE_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  comm_item_t in_item,
  output logic       out_valid,
  input  logic       out_ready,
  output link_word_t out_word
);

  localparam int unsigned IND_W = EXTENDED ? 2 : 1;

  logic [ENTRIES-1:0][DATA_W-1:0]   fvc_val;
  logic [ENTRIES-1:0]               fvc_vld;
  logic [SETS-1:0][WAY_W-1:0]       fvc_victim;
  logic [FPC_ENTRIES-1:0][FP_SE_W-1:0] se_val;
  logic [FPC_ENTRIES-1:0]           se_vld;
  logic [0:0][SE_IDX_W-1:0]         se_victim;

  logic [DATA_W-1:0] v;
  logic [SET_W-1:0]  set;
  logic              hit, se_hit;
  logic [WAY_W-1:0]  hit_way;
  logic [SE_IDX_W-1:0] se_way;
  logic [IDX_W-1:0]  idx;
  link_word_t        enc;
  logic              accept;

  assign v      = in_item.data;
  assign set    = EXTENDED ? v[K +: SET_W] : v[SET_W-1:0];
  assign idx    = IDX_W'(int'(set) * WAYS + int'(hit_way));
  assign accept = in_valid && in_ready;
  assign in_ready = !out_valid || out_ready;

  // Parallel tag compare within the selected set.
  always_comb begin
    hit = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      logic [DATA_W-1:0] e;
      e = fvc_val[int'(set)*WAYS+w];
      if (fvc_vld[int'(set)*WAYS+w] && !hit) begin
        if (EXTENDED && !in_item.fp) begin
          if (e[DATA_W-1:K] == v[DATA_W-1:K]) begin hit = 1'b1; hit_way = WAY_W'(w); end
        end else if (e == v) begin
          hit = 1'b1; hit_way = WAY_W'(w);
        end
      end
    end
    se_hit = 1'b0;
    se_way = '0;
    for (int w = 0; w < FPC_ENTRIES; w++)
      if (se_vld[w] && !se_hit && se_val[w] == v[DATA_W-1 -: FP_SE_W]) begin
        se_hit = 1'b1; se_way = SE_IDX_W'(w);
      end
  end

  always_comb begin
    enc         = '0;
    enc.id      = in_item.id;
    enc.fwd     = in_item.fwd;
    enc.kind    = CMP_NONE;
    enc.payload = v;
    enc.nbits   = 6'(IND_W + DATA_W);
    if (!in_item.fwd) begin
      if (hit && (!EXTENDED || !in_item.fp)) begin
        enc.kind = CMP_INT;
        if (EXTENDED) begin
          enc.payload = DATA_W'({idx, v[K-1:0]});
          enc.nbits   = 6'(IND_W + IDX_W + K);
        end else begin
          enc.payload = DATA_W'(idx);
          enc.nbits   = 6'(IND_W + IDX_W);
        end
      end else if (EXTENDED && hit) begin
        enc.kind    = CMP_FP;
        enc.payload = DATA_W'(idx);
        enc.nbits   = 6'(IND_W + IDX_W);
      end else if (EXTENDED && in_item.fp && se_hit) begin
        enc.kind    = CMP_FP_SE;
        enc.payload = DATA_W'({se_way, v[MANT_W-1:0]});
        enc.nbits   = 6'(IND_W + SE_IDX_W + MANT_W);
      end
    end
  end

  fv_table #(.ENTRIES(ENTRIES), .WAYS(WAYS), .W(DATA_W)) u_fvc (
    .clk, .rst_n,
    .upd_en  (accept && !in_item.fwd),
    .upd_hit (hit && (enc.kind != CMP_NONE) && (enc.kind != CMP_FP_SE)),
    .upd_set (set),
    .upd_way (hit_way),
    .upd_val (v),
    .val_o   (fvc_val),
    .vld_o   (fvc_vld),
    .victim_o(fvc_victim)
  );

  fv_table #(.ENTRIES(FPC_ENTRIES), .WAYS(FPC_ENTRIES), .W(FP_SE_W)) u_se (
    .clk, .rst_n,
    .upd_en  (EXTENDED && accept && !in_item.fwd &&
              (enc.kind == CMP_NONE || enc.kind == CMP_FP_SE)),
    .upd_hit (enc.kind == CMP_FP_SE),
    .upd_set ('0),
    .upd_way (se_way),
    .upd_val (v[DATA_W-1 -: FP_SE_W]),
    .val_o   (se_val),
    .vld_o   (se_vld),
    .victim_o(se_victim)
  );

  // Link register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_word <= enc;
    end
  end

endmodule
