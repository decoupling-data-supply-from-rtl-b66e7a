// fv_decompressor: frequent-value decompression on the CompD side, between
// the link and the communication buffer.
//
// A frequent-value table (FVT) of the same size and set structure as the
// SuppD's frequent-value CAM is kept in step with it; it is never searched,
// only read by the index a compressed item carries and written with the
// value of every uncompressed item (into the LRU way of the value's set).
//   code 00 (none)   : value = payload; FVT and sign/exponent table take it.
//   code 01 (integer): value = FVT[index] (base scheme) or
//                      {FVT[index][31:k], payload low k bits} (extended).
//   code 10 (float)  : value = FVT[index].
//   code 11 (sign/exp): value = {SE[index], 23-bit mantissa}; the full value
//                      is also written into the FVT, as the SuppD did.
// Forwarded items (fwd = 1) pass unchanged and touch no table. The update
// rules mirror fv_compressor exactly; see there for which are this design's
// own.
//
// Timing: one item per cycle; an accepted link word leaves as a decoded item
// on out_* in the next cycle. Tables update on acceptance only.
module fv_decompressor
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
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  link_word_t        in_word,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [ID_W-1:0]   out_id,
  output logic              out_fwd,
  output logic [DATA_W-1:0] out_data
);

  logic [ENTRIES-1:0][DATA_W-1:0]      fvt_val;
  logic [ENTRIES-1:0]                  fvt_vld;
  logic [SETS-1:0][WAY_W-1:0]          fvt_victim;
  logic [FPC_ENTRIES-1:0][FP_SE_W-1:0] se_val;
  logic [FPC_ENTRIES-1:0]              se_vld;
  logic [0:0][SE_IDX_W-1:0]            se_victim;

  logic [IDX_W-1:0]    idx;
  logic [SE_IDX_W-1:0] se_idx;
  logic [DATA_W-1:0]   dec;
  logic                accept, fvt_hit, fvt_upd, se_upd;
  logic [SET_W-1:0]    upd_set;

  assign accept   = in_valid && in_ready;
  assign in_ready = !out_valid || out_ready;
  assign se_idx   = in_word.payload[MANT_W +: SE_IDX_W];

  always_comb begin
    idx = in_word.payload[IDX_W-1:0];
    if (EXTENDED && in_word.kind == CMP_INT) idx = in_word.payload[K +: IDX_W];
    dec = in_word.payload;
    if (!in_word.fwd) begin
      unique case (in_word.kind)
        CMP_INT:
          if (EXTENDED) dec = {fvt_val[idx][DATA_W-1:K], in_word.payload[K-1:0]};
          else          dec = fvt_val[idx];
        CMP_FP:    dec = fvt_val[idx];
        CMP_FP_SE: dec = {se_val[se_idx], in_word.payload[MANT_W-1:0]};
        default:   dec = in_word.payload;
      endcase
    end
  end

  // FVT: touch on index hits, insert the rebuilt value otherwise.
  assign fvt_hit = (in_word.kind == CMP_INT) || (in_word.kind == CMP_FP);
  assign fvt_upd = accept && !in_word.fwd;
  assign se_upd  = EXTENDED && accept && !in_word.fwd &&
                   (in_word.kind == CMP_NONE || in_word.kind == CMP_FP_SE);
  assign upd_set = fvt_hit ? SET_W'(idx / IDX_W'(WAYS))
                           : (EXTENDED ? dec[K +: SET_W] : dec[SET_W-1:0]);

  fv_table #(.ENTRIES(ENTRIES), .WAYS(WAYS), .W(DATA_W)) u_fvt (
    .clk, .rst_n,
    .upd_en  (fvt_upd),
    .upd_hit (fvt_hit),
    .upd_set (upd_set),
    .upd_way (WAY_W'(idx % IDX_W'(WAYS))),
    .upd_val (dec),
    .val_o   (fvt_val),
    .vld_o   (fvt_vld),
    .victim_o(fvt_victim)
  );

  fv_table #(.ENTRIES(FPC_ENTRIES), .WAYS(FPC_ENTRIES), .W(FP_SE_W)) u_se (
    .clk, .rst_n,
    .upd_en  (se_upd),
    .upd_hit (in_word.kind == CMP_FP_SE),
    .upd_set ('0),
    .upd_way (se_idx),
    .upd_val (dec[DATA_W-1 -: FP_SE_W]),
    .val_o   (se_val),
    .vld_o   (se_vld),
    .victim_o(se_victim)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_id    <= '0;
      out_fwd   <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_id   <= in_word.id;
        out_fwd  <= in_word.fwd;
        out_data <= dec;
      end
    end
  end

endmodule
