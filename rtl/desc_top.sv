// desc_top: the decoupled supply-compute (DeSC) communication hardware that
// sits between a supplier device (SuppD, an out-of-order core running the
// memory-access slice of a program) and a computation device (CompD, a core
// or accelerator running the value-computation slice, with no memory access).
//
// Data path SuppD -> CompD:
//   PRODUCE (committed value) ---------------------------+
//   LOAD_PRODUCE (partial commit) -> terminal_load_buffer -+-> comm_queue
//     -> fv_compressor (link register) -> fv_decompressor -> comm_buffer
//     -> CONSUME lookup by program-order id (out of order), release at commit.
// Store path CompD -> SuppD -> memory:
//   STORE_ADDR -> store_address_buffer (address, awaiting bit, forward count)
//   STORE_VAL/STORE_INV -> store_value_buffer -> SAB head -> memory write.
// Decoupled store-to-load forwarding: a LOAD_PRODUCE whose address matches an
// awaiting SAB entry is entered into the terminal load buffer already
// complete, carrying the store's st_id with the Fwd bit set; the CONSUME then
// reads the value from the store value buffer.
//
// Arbitration into the CommQ (one item per cycle, this design's choice):
// a PRODUCE goes first, unless the terminal load buffer's oldest entry has
// reached the reordering limit (block_produce), in which case PRODUCEs wait
// and the terminal load buffer commits.
//
// The SuppD core, the CompD core and the memory hierarchy are outside this
// module; their DeSC-related signals are its ports. Latencies: CommQ push 1
// cycle; CommQ head to CommBuf 2 cycles (compression stage + decompression
// stage) when nothing stalls; CONSUME lookup combinational.
module desc_top
  import desc_pkg::*;
#(
  parameter bit          EXTENDED  = 1'b1,
  parameter int unsigned Q_DEPTH   = COMMQ_DEPTH,
  parameter int unsigned CB_DEPTH  = COMMBUF_DEPTH,
  parameter int unsigned TL_DEPTH  = TLB_DEPTH,
  parameter int unsigned SA_DEPTH  = SAB_DEPTH,
  parameter int unsigned SV_DEPTH  = SVB_DEPTH,
  localparam int unsigned SID_W    = $clog2((SA_DEPTH > SV_DEPTH) ? SA_DEPTH : SV_DEPTH) + 2
) (
  input  logic              clk,
  input  logic              rst_n,

  // ---- SuppD: PRODUCE commit
  input  logic              pr_valid,
  output logic              pr_ready,
  input  logic [ID_W-1:0]   pr_id,
  input  logic              pr_fp,
  input  logic [DATA_W-1:0] pr_data,
  // ---- SuppD: LOAD_PRODUCE partial commit and memory response
  input  logic              lp_valid,
  output logic              lp_ready,
  input  logic [ID_W-1:0]   lp_id,
  input  logic [ADDR_W-1:0] lp_addr,
  input  logic              lp_fp,
  input  logic [TAG_W-1:0]  lp_tag,
  input  logic              lp_done,
  input  logic [DATA_W-1:0] lp_data,
  output logic              lp_fwd,        // this partial commit was forwarded
  input  logic              ld_resp_valid,
  input  logic [TAG_W-1:0]  ld_resp_tag,
  input  logic [DATA_W-1:0] ld_resp_data,
  // ---- SuppD: STORE_ADDR
  input  logic              sa_al_valid,
  output logic              sa_al_ready,
  output logic [SID_W-1:0]  sa_al_st_id,
  input  logic              sa_aw_valid,
  input  logic [SID_W-1:0]  sa_aw_st_id,
  input  logic [ADDR_W-1:0] sa_aw_addr,
  input  logic              sa_rt_valid,
  output logic              sa_rt_ready,
  input  logic              sa_fl_valid,
  input  logic [SID_W-1:0]  sa_fl_st_id,
  // ---- SuppD: ordinary load dependence check
  input  logic [ADDR_W-1:0] dc_addr,
  input  logic [SID_W-1:0]  dc_bound,
  output logic              dc_match,
  output logic              dc_unknown,
  // ---- memory write port
  output logic              mem_valid,
  input  logic              mem_ready,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_data,

  // ---- CompD: CONSUME
  input  logic [ID_W-1:0]   cs_id,
  output logic              cs_hit,
  output logic [DATA_W-1:0] cs_data,
  input  logic              cc_valid,
  input  logic [ID_W-1:0]   cc_id,
  output logic              wake_valid,
  output logic [ID_W-1:0]   wake_id,
  // ---- CompD: STORE_VAL / STORE_INV
  input  logic              sv_al_valid,
  input  logic              sv_al_inv,
  output logic              sv_al_ready,
  output logic [SID_W-1:0]  sv_al_st_id,
  input  logic              sv_wr_valid,
  input  logic [SID_W-1:0]  sv_wr_st_id,
  input  logic [DATA_W-1:0] sv_wr_data,
  input  logic              sv_cm_valid,
  output logic              sv_cm_ready,
  input  logic              sv_fl_valid,
  input  logic [SID_W-1:0]  sv_fl_st_id,

  // ---- observation
  output logic              link_valid,    // an item crosses the link this cycle
  output logic [5:0]        link_nbits,    // its size in link bits (without id/fwd)
  output logic [$clog2(Q_DEPTH):0]  commq_count,
  output logic [$clog2(CB_DEPTH):0] commbuf_count
);

  // ------------------------------------------------------------ SuppD side
  logic       tl_pc_ready, tl_cm_valid, tl_cm_ready, tl_block;
  comm_item_t tl_item, q_push_item, q_out_item;
  logic       q_push_valid, q_push_ready, q_out_valid, q_out_ready;
  logic       fs_hit, fs_cnt_full;
  logic [SID_W-1:0] fs_st_id;
  logic       pr_fire;

  // SAB <-> SVB pairing
  logic              sv_valid, sv_inv, sv_ready, cnt_valid;
  logic [DATA_W-1:0] sv_data;
  logic [FWD_CNT_W-1:0] cnt_val;

  assign lp_ready = tl_pc_ready && !(fs_hit && fs_cnt_full);
  assign lp_fwd   = fs_hit;

  terminal_load_buffer #(.DEPTH(TL_DEPTH), .N(CB_DEPTH)) u_tlb (
    .clk, .rst_n,
    .pc_valid      (lp_valid && lp_ready),
    .pc_ready      (tl_pc_ready),
    .pc_id         (lp_id),
    .pc_tag        (lp_tag),
    .pc_fp         (lp_fp),
    .pc_done       (lp_done || fs_hit),
    .pc_fwd        (fs_hit),
    .pc_data       (fs_hit ? DATA_W'(fs_st_id) : lp_data),
    .resp_valid    (ld_resp_valid),
    .resp_tag      (ld_resp_tag),
    .resp_data     (ld_resp_data),
    .cm_valid      (tl_cm_valid),
    .cm_ready      (tl_cm_ready),
    .cm_item       (tl_item),
    .produce_commit(pr_fire),
    .block_produce (tl_block),
    .count         ()
  );

  // CommQ arbitration: PRODUCE first unless the reordering limit is reached.
  assign pr_ready     = q_push_ready && !tl_block;
  assign pr_fire      = pr_valid && pr_ready;
  assign tl_cm_ready  = q_push_ready && !pr_fire;
  assign q_push_valid = pr_fire || tl_cm_valid;
  always_comb begin
    if (pr_fire) begin
      q_push_item.id   = pr_id;
      q_push_item.fwd  = 1'b0;
      q_push_item.fp   = pr_fp;
      q_push_item.data = pr_data;
    end else begin
      q_push_item = tl_item;
    end
  end

  comm_queue #(.DEPTH(Q_DEPTH)) u_commq (
    .clk, .rst_n,
    .push_valid(q_push_valid),
    .push_ready(q_push_ready),
    .push_item (q_push_item),
    .out_valid (q_out_valid),
    .out_ready (q_out_ready),
    .out_item  (q_out_item),
    .count     (commq_count)
  );

  store_address_buffer #(.DEPTH(SA_DEPTH), .SID_W(SID_W)) u_sab (
    .clk, .rst_n,
    .al_valid   (sa_al_valid),
    .al_ready   (sa_al_ready),
    .al_st_id   (sa_al_st_id),
    .aw_valid   (sa_aw_valid),
    .aw_st_id   (sa_aw_st_id),
    .aw_addr    (sa_aw_addr),
    .rt_valid   (sa_rt_valid),
    .rt_ready   (sa_rt_ready),
    .fl_valid   (sa_fl_valid),
    .fl_st_id   (sa_fl_st_id),
    .fs_addr    (lp_addr),
    .fs_hit     (fs_hit),
    .fs_st_id   (fs_st_id),
    .fs_cnt_full(fs_cnt_full),
    .fs_inc     (lp_valid && lp_ready),
    .dc_addr    (dc_addr),
    .dc_bound   (dc_bound),
    .dc_match   (dc_match),
    .dc_unknown (dc_unknown),
    .sv_valid   (sv_valid),
    .sv_inv     (sv_inv),
    .sv_data    (sv_data),
    .sv_ready   (sv_ready),
    .cnt_valid  (cnt_valid),
    .cnt_out    (cnt_val),
    .mem_valid  (mem_valid),
    .mem_ready  (mem_ready),
    .mem_addr   (mem_addr),
    .mem_data   (mem_data),
    .count      ()
  );

  // ------------------------------------------------------------ link
  logic       lk_valid, lk_ready;
  link_word_t lk_word;

  fv_compressor #(.EXTENDED(EXTENDED)) u_comp (
    .clk, .rst_n,
    .in_valid (q_out_valid),
    .in_ready (q_out_ready),
    .in_item  (q_out_item),
    .out_valid(lk_valid),
    .out_ready(lk_ready),
    .out_word (lk_word)
  );

  assign link_valid = lk_valid && lk_ready;
  assign link_nbits = lk_word.nbits;

  // ------------------------------------------------------------ CompD side
  logic              dq_valid, dq_ready, dq_fwd;
  logic [ID_W-1:0]   dq_id;
  logic [DATA_W-1:0] dq_data;

  fv_decompressor #(.EXTENDED(EXTENDED)) u_decomp (
    .clk, .rst_n,
    .in_valid (lk_valid),
    .in_ready (lk_ready),
    .in_word  (lk_word),
    .out_valid(dq_valid),
    .out_ready(dq_ready),
    .out_id   (dq_id),
    .out_fwd  (dq_fwd),
    .out_data (dq_data)
  );

  logic              cb_hit, cb_fwd, cb_rel_hit, cb_rel_fwd;
  logic [DATA_W-1:0] cb_data, cb_rel_data;

  comm_buffer #(.DEPTH(CB_DEPTH)) u_commbuf (
    .clk, .rst_n,
    .ins_valid  (dq_valid),
    .ins_ready  (dq_ready),
    .ins_id     (dq_id),
    .ins_fwd    (dq_fwd),
    .ins_data   (dq_data),
    .wake_valid (wake_valid),
    .wake_id    (wake_id),
    .lookup_id  (cs_id),
    .lookup_hit (cb_hit),
    .lookup_fwd (cb_fwd),
    .lookup_data(cb_data),
    .rel_valid  (cc_valid),
    .rel_id     (cc_id),
    .rel_hit    (cb_rel_hit),
    .rel_fwd    (cb_rel_fwd),
    .rel_data   (cb_rel_data),
    .count      (commbuf_count)
  );

  logic              svb_rd_valid;
  logic [DATA_W-1:0] svb_rd_data;

  store_value_buffer #(.DEPTH(SV_DEPTH), .SID_W(SID_W)) u_svb (
    .clk, .rst_n,
    .al_valid (sv_al_valid),
    .al_inv   (sv_al_inv),
    .al_ready (sv_al_ready),
    .al_st_id (sv_al_st_id),
    .wr_valid (sv_wr_valid),
    .wr_st_id (sv_wr_st_id),
    .wr_data  (sv_wr_data),
    .cm_valid (sv_cm_valid),
    .cm_ready (sv_cm_ready),
    .sv_valid (sv_valid),
    .sv_inv   (sv_inv),
    .sv_data  (sv_data),
    .sv_ready (sv_ready),
    .cnt_valid(cnt_valid),
    .cnt_in   (cnt_val),
    .rd_st_id (SID_W'(cb_data)),
    .rd_valid (svb_rd_valid),
    .rd_data  (svb_rd_data),
    .use_valid(cc_valid && cb_rel_hit && cb_rel_fwd),
    .use_st_id(SID_W'(cb_rel_data)),
    .fl_valid (sv_fl_valid),
    .fl_st_id (sv_fl_st_id),
    .count    ()
  );

  // CONSUME lookup: a forwarded item is resolved through the SVB.
  assign cs_hit  = cb_hit && (!cb_fwd || svb_rd_valid);
  assign cs_data = cb_fwd ? svb_rd_data : cb_data;

endmodule
