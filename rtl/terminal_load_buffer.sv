// terminal_load_buffer: holds terminal loads (LOAD_PRODUCE) that have left
// the SuppD reorder buffer by a partial commit, until their data is back, and
// then commits them into the communication queue out of program order.
//
// A LOAD_PRODUCE that reaches the head of the SuppD ROB after it has issued
// is moved here (pc_*) even if its memory access has not returned. The entry
// waits for its data, matched by memory tag (resp_*), and then leaves towards
// the CommQ (cm_*) as soon as it is ready, oldest ready entry first. An entry
// whose value is already known when it arrives (pc_done, e.g. a forwarded
// store id) is ready at once.
//
// Deadlock avoidance: every entry has a counter, cleared on entry. When an
// entry commits, every older entry's counter is incremented; when a PRODUCE
// commits to the CommQ (produce_commit), every entry's counter is
// incremented. When the oldest entry's counter reaches N-1 (N = CommBuf
// size), only that entry may commit, and block_produce tells the SuppD to
// hold back PRODUCE commits too, so that the CommBuf always keeps room for the
// oldest unconsumed item. Counters saturate at N-1.
//
// Organisation (this design's choice): a CAM of DEPTH slots; a partial
// commit takes the lowest free slot, and program age is kept in an age
// matrix (older[j][i] = slot j entered before slot i), so any freed slot can
// be reused at once.
//
// Timing: an entry written by pc_* at edge t can commit at the next edge if
// ready; a response at edge t makes the entry committable from cycle t+1.
// cm_valid/cm_item are combinational on the buffer contents; count is the
// number of occupied slots.
module terminal_load_buffer
  import desc_pkg::*;
#(
  parameter int unsigned DEPTH = TLB_DEPTH,
  parameter int unsigned N     = COMMBUF_DEPTH,
  localparam int unsigned PTR_W = $clog2(DEPTH),
  localparam int unsigned CNT_W = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  // partial commit from the SuppD ROB head
  input  logic              pc_valid,
  output logic              pc_ready,
  input  logic [ID_W-1:0]   pc_id,
  input  logic [TAG_W-1:0]  pc_tag,
  input  logic              pc_fp,
  input  logic              pc_done,
  input  logic              pc_fwd,
  input  logic [DATA_W-1:0] pc_data,
  // memory response
  input  logic              resp_valid,
  input  logic [TAG_W-1:0]  resp_tag,
  input  logic [DATA_W-1:0] resp_data,
  // full (out-of-order) commit into the CommQ
  output logic              cm_valid,
  input  logic              cm_ready,
  output comm_item_t        cm_item,
  // reordering limit
  input  logic              produce_commit,
  output logic              block_produce,
  output logic [PTR_W:0]    count
);

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [TAG_W-1:0]  tag;
    logic              fp;
    logic              fwd;
    logic              ready;
    logic [DATA_W-1:0] data;
    logic [CNT_W-1:0]  cnt;
  } tl_entry_t;

  localparam logic [CNT_W-1:0] CNT_MAX = CNT_W'(N-1);

  tl_entry_t                   ent_q [DEPTH];
  logic [DEPTH-1:0]            vld_q;
  logic [DEPTH-1:0][DEPTH-1:0] older_q;     // older_q[j][i]: j is older than i

  logic             oldest_found, oldest_sat, sel_found, free_found;
  logic [PTR_W-1:0] oldest_idx, sel_idx, free_idx;
  logic [PTR_W:0]   used;
  logic             do_alloc, do_commit;
  logic [DEPTH-1:0] rdy;

  always_comb begin
    used = '0;
    for (int i = 0; i < DEPTH; i++) used = used + (PTR_W+1)'(vld_q[i]);
  end
  assign count = used;

  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!vld_q[i]) begin free_found = 1'b1; free_idx = PTR_W'(i); end
  end
  assign pc_ready = free_found;
  assign do_alloc = pc_valid && pc_ready;

  // A response that arrives in the very cycle of the partial commit.
  logic resp_same;
  assign resp_same = resp_valid && resp_tag == pc_tag;

  // Oldest valid entry and oldest ready entry.
  always_comb begin
    for (int i = 0; i < DEPTH; i++) rdy[i] = vld_q[i] && ent_q[i].ready;
    oldest_found = 1'b0;
    oldest_idx   = '0;
    sel_found    = 1'b0;
    sel_idx      = '0;
    for (int i = 0; i < DEPTH; i++) begin
      logic older_valid, older_ready;
      older_valid = 1'b0;
      older_ready = 1'b0;
      for (int j = 0; j < DEPTH; j++) begin
        if (vld_q[j] && older_q[j][i]) older_valid = 1'b1;
        if (rdy[j]   && older_q[j][i]) older_ready = 1'b1;
      end
      if (vld_q[i] && !older_valid) begin oldest_found = 1'b1; oldest_idx = PTR_W'(i); end
      if (rdy[i]   && !older_ready) begin sel_found    = 1'b1; sel_idx    = PTR_W'(i); end
    end
    oldest_sat = oldest_found && (ent_q[oldest_idx].cnt == CNT_MAX);
    // A saturated oldest entry must go first.
    if (oldest_sat) begin
      sel_found = rdy[oldest_idx];
      sel_idx   = oldest_idx;
    end
  end

  assign block_produce = oldest_sat;
  assign cm_valid      = sel_found;
  assign do_commit     = cm_valid && cm_ready;
  always_comb begin
    cm_item.id   = ent_q[sel_idx].id;
    cm_item.fwd  = ent_q[sel_idx].fwd;
    cm_item.fp   = ent_q[sel_idx].fp;
    cm_item.data = ent_q[sel_idx].data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q   <= '0;
      older_q <= '0;
      for (int i = 0; i < DEPTH; i++) ent_q[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        logic [1:0]       inc;
        logic [CNT_W+1:0] sum;
        inc = 2'(produce_commit) + 2'(do_commit && older_q[i][sel_idx]);
        sum = (CNT_W+2)'(ent_q[i].cnt) + (CNT_W+2)'(inc);
        if (vld_q[i]) begin
          ent_q[i].cnt <= (sum >= (CNT_W+2)'(CNT_MAX)) ? CNT_MAX : CNT_W'(sum);
          if (resp_valid && !ent_q[i].ready && ent_q[i].tag == resp_tag) begin
            ent_q[i].ready <= 1'b1;
            ent_q[i].data  <= resp_data;
          end
        end
      end
      if (do_commit) vld_q[sel_idx] <= 1'b0;
      if (do_alloc) begin
        ent_q[free_idx] <= '{id: pc_id, tag: pc_tag, fp: pc_fp, fwd: pc_fwd,
                             ready: pc_done || resp_same,
                             data: pc_done ? pc_data : resp_data, cnt: '0};
        vld_q[free_idx] <= 1'b1;
        // every entry still present is older than the new one
        for (int j = 0; j < DEPTH; j++) begin
          older_q[j][free_idx] <= vld_q[j] && !(do_commit && sel_idx == PTR_W'(j));
          older_q[free_idx][j] <= 1'b0;
        end
      end
    end
  end

  // Tags of entries still waiting for memory are unique.
  logic tag_clash;
  always_comb begin
    tag_clash = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (vld_q[i] && !ent_q[i].ready && ent_q[i].tag == pc_tag) tag_clash = 1'b1;
  end
  assert property (@(posedge clk) disable iff (!rst_n)
                   do_alloc && !pc_done |-> !tag_clash);

endmodule
