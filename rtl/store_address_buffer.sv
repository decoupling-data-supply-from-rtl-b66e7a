// store_address_buffer: the store address buffer (SAB) of the SuppD, a FIFO
// of in-flight stores in program order that can also be searched by address.
//
// A STORE_ADDR reserves the tail entry at dispatch (al_*) and receives its
// store id, st_id, the running count of stores modulo 2^ST_ID_W. The address
// is written when computed (aw_*). When the STORE_ADDR retires from the SuppD
// ROB (rt_valid, in program order) its "awaiting" bit is set: the store now
// only waits for its value. The CompD's STORE_VAL/STORE_INV, committed in
// program order, arrive at the head (sv_*): if the head is awaiting, the
// entry is freed, a STORE_VAL writes (address, value) to memory (mem_*) and a
// STORE_INV writes nothing; if it is not awaiting yet, sv_ready stays low and
// the CompD waits. On freeing, the entry's forward count leaves on cnt_*
// for the CompD's store value buffer (including a forward made in the same
// cycle).
//
// Decoupled store-to-load forwarding: a LOAD_PRODUCE at partial commit
// searches (fs_addr) the awaiting entries for the youngest store to the same
// address. A hit returns its st_id; fs_inc then increments that entry's
// forward counter (Cnt). At partial commit every older STORE_ADDR has
// retired and no younger one has, so "awaiting" marks exactly the older
// stores. When Cnt is at its maximum, fs_cnt_full tells the caller to wait.
// A second search port (dc_*) serves ordinary loads: it reports whether any
// store older than the load's dispatch point (dc_bound, the al_st_id seen when
// the load was dispatched) has the same address or no address yet.
// A flush (fl_*) rolls the tail back to a given st_id, discarding
// mis-speculated, unretired reservations (this design's addition: the text
// does not describe recovery).
//
// Timing: all searches are combinational; every update takes effect at the
// clock edge. DEPTH must be a power of two.
module store_address_buffer
  import desc_pkg::*;
#(
  parameter int unsigned DEPTH = SAB_DEPTH,
  parameter int unsigned SID_W = ST_ID_W,
  parameter int unsigned CNT_W = FWD_CNT_W,
  localparam int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // STORE_ADDR dispatch
  input  logic              al_valid,
  output logic              al_ready,
  output logic [SID_W-1:0]  al_st_id,
  // address ready
  input  logic              aw_valid,
  input  logic [SID_W-1:0]  aw_st_id,
  input  logic [ADDR_W-1:0] aw_addr,
  // STORE_ADDR retire (oldest unretired entry)
  input  logic              rt_valid,
  output logic              rt_ready,
  // rollback of unretired entries
  input  logic              fl_valid,
  input  logic [SID_W-1:0]  fl_st_id,
  // LOAD_PRODUCE forwarding search
  input  logic [ADDR_W-1:0] fs_addr,
  output logic              fs_hit,
  output logic [SID_W-1:0]  fs_st_id,
  output logic              fs_cnt_full,
  input  logic              fs_inc,
  // ordinary load dependence check
  input  logic [ADDR_W-1:0] dc_addr,
  input  logic [SID_W-1:0]  dc_bound,
  output logic              dc_match,
  output logic              dc_unknown,
  // value from the CompD (STORE_VAL / STORE_INV commit)
  input  logic              sv_valid,
  input  logic              sv_inv,
  input  logic [DATA_W-1:0] sv_data,
  output logic              sv_ready,
  // forward count returned to the CompD when an entry leaves
  output logic              cnt_valid,
  output logic [CNT_W-1:0]  cnt_out,
  // memory write
  output logic              mem_valid,
  input  logic              mem_ready,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_data,
  output logic [PTR_W:0]    count
);

  logic [DEPTH-1:0][ADDR_W-1:0] addr_q;
  logic [DEPTH-1:0]             avld_q;
  logic [DEPTH-1:0]             awt_q;
  logic [DEPTH-1:0][CNT_W-1:0]  cnt_q;

  // Free-running store counters: head = removed, rtr = retired, tail = allocated.
  logic [SID_W-1:0] head_q, rtr_q, tail_q;
  logic [SID_W-1:0] used;
  logic [PTR_W-1:0] hidx;

  assign used     = tail_q - head_q;
  assign count    = (PTR_W+1)'(used);
  assign hidx     = head_q[PTR_W-1:0];
  assign al_ready = (used < SID_W'(DEPTH));
  assign al_st_id = tail_q;
  assign rt_ready = (rtr_q != tail_q) && avld_q[rtr_q[PTR_W-1:0]];

  // Searches.
  always_comb begin
    fs_hit     = 1'b0;
    fs_st_id   = '0;
    dc_match   = 1'b0;
    dc_unknown = 1'b0;
    for (int k = 0; k < DEPTH; k++) begin
      logic [SID_W-1:0] sid;
      logic [PTR_W-1:0] i;
      sid = head_q + SID_W'(k);
      i   = sid[PTR_W-1:0];
      if (SID_W'(k) < used) begin
        if (awt_q[i] && addr_q[i] == fs_addr) begin   // youngest wins
          fs_hit   = 1'b1;
          fs_st_id = sid;
        end
        if (SID_W'(k) < SID_W'(dc_bound - head_q)) begin
          if (!avld_q[i])                          dc_unknown = 1'b1;
          else if (addr_q[i] == dc_addr)           dc_match   = 1'b1;
        end
      end
    end
  end
  assign fs_cnt_full = fs_hit && (cnt_q[fs_st_id[PTR_W-1:0]] == '1);

  // Head pairing with the CompD value.
  logic head_awt, do_pop;
  assign head_awt  = (used != '0) && awt_q[hidx];
  assign mem_valid = sv_valid && head_awt && !sv_inv;
  assign mem_addr  = addr_q[hidx];
  assign mem_data  = sv_data;
  assign sv_ready  = head_awt && (sv_inv || mem_ready);
  assign do_pop    = sv_valid && sv_ready;
  assign cnt_valid = do_pop;
  // A forward from the leaving entry in this very cycle is included.
  assign cnt_out   = cnt_q[hidx] + CNT_W'(fs_inc && fs_hit && !fs_cnt_full && fs_st_id == head_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      rtr_q  <= '0;
      tail_q <= '0;
      avld_q <= '0;
      awt_q  <= '0;
      cnt_q  <= '0;
      addr_q <= '0;
    end else begin
      if (fl_valid) begin
        tail_q <= fl_st_id;
      end else if (al_valid && al_ready) begin
        avld_q[tail_q[PTR_W-1:0]] <= 1'b0;
        awt_q[tail_q[PTR_W-1:0]]  <= 1'b0;
        cnt_q[tail_q[PTR_W-1:0]]  <= '0;
        tail_q <= tail_q + 1'b1;
      end
      if (aw_valid) begin
        addr_q[aw_st_id[PTR_W-1:0]] <= aw_addr;
        avld_q[aw_st_id[PTR_W-1:0]] <= 1'b1;
      end
      if (rt_valid && rt_ready) begin
        awt_q[rtr_q[PTR_W-1:0]] <= 1'b1;
        rtr_q <= rtr_q + 1'b1;
      end
      if (fs_inc && fs_hit && !fs_cnt_full)
        cnt_q[fs_st_id[PTR_W-1:0]] <= cnt_q[fs_st_id[PTR_W-1:0]] + 1'b1;
      if (do_pop) begin
        awt_q[hidx] <= 1'b0;
        head_q <= head_q + 1'b1;
      end
    end
  end

  // A flush may only discard entries that have not retired.
  assert property (@(posedge clk) disable iff (!rst_n)
                   fl_valid |-> SID_W'(fl_st_id - rtr_q) <= SID_W'(tail_q - rtr_q));
  // STORE_ADDR retires only with its address known.
  assert property (@(posedge clk) disable iff (!rst_n) rt_valid |-> rt_ready);

endmodule
