// store_value_buffer: the store value buffer (SVB) of the CompD, the FIFO
// counterpart of the SuppD's store address buffer. It holds the values of
// STORE_VALs so that forwarded CONSUMEs can read them.
//
// A STORE_VAL (or STORE_INV, which carries no value) reserves the tail entry
// at dispatch (al_*), keeping program order; its st_id is the running store
// count, the same numbering the SAB uses. The value is written when computed
// (wr_*). At commit (cm_*), in program order, the oldest uncommitted entry
// is sent to the SAB head (sv_*) and waits there until the SAB accepts it.
// A forwarded item names a store by st_id; subtracting the SVB's count of
// released entries (the head) from it gives the entry, read on rd_*.
// When the SAB frees the paired entry it returns how many loads were
// forwarded from it (cnt_*, in program order). Every forwarded CONSUME that
// commits after reading the value decrements the entry's count (use_*). The
// oldest entry is released once it has committed, its count has arrived and
// has drained to zero.
// A flush (fl_*) rolls back unretired reservations; this recovery port is
// this design's addition.
//
// Timing: reads are combinational; all updates take effect at the clock
// edge. DEPTH must be a power of two.
module store_value_buffer
  import desc_pkg::*;
#(
  parameter int unsigned DEPTH = SVB_DEPTH,
  parameter int unsigned SID_W = ST_ID_W,
  parameter int unsigned CNT_W = FWD_CNT_W,
  localparam int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // STORE_VAL / STORE_INV dispatch
  input  logic              al_valid,
  input  logic              al_inv,
  output logic              al_ready,
  output logic [SID_W-1:0]  al_st_id,
  // value computed
  input  logic              wr_valid,
  input  logic [SID_W-1:0]  wr_st_id,
  input  logic [DATA_W-1:0] wr_data,
  // commit of the oldest uncommitted STORE_VAL / STORE_INV
  input  logic              cm_valid,
  output logic              cm_ready,
  // to the SAB head
  output logic              sv_valid,
  output logic              sv_inv,
  output logic [DATA_W-1:0] sv_data,
  input  logic              sv_ready,
  // forward count from the SAB
  input  logic              cnt_valid,
  input  logic [CNT_W-1:0]  cnt_in,
  // forwarded CONSUME read and use
  input  logic [SID_W-1:0]  rd_st_id,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data,
  input  logic              use_valid,
  input  logic [SID_W-1:0]  use_st_id,
  // rollback of uncommitted entries
  input  logic              fl_valid,
  input  logic [SID_W-1:0]  fl_st_id,
  output logic [PTR_W:0]    count
);

  localparam int unsigned REM_W = CNT_W + 2;

  logic [DEPTH-1:0][DATA_W-1:0]       data_q;
  logic [DEPTH-1:0]                   dvld_q;
  logic [DEPTH-1:0]                   inv_q;
  logic [DEPTH-1:0]                   rcv_q;
  logic [DEPTH-1:0][REM_W-1:0]        rem_q;

  // head = released, cmt = committed, crv = counts received, tail = allocated
  logic [SID_W-1:0] head_q, cmt_q, crv_q, tail_q;
  logic [SID_W-1:0] used;
  logic [PTR_W-1:0] hidx, cidx, ridx;
  logic             do_release, rd_in_range;

  assign used     = tail_q - head_q;
  assign count    = (PTR_W+1)'(used);
  assign hidx     = head_q[PTR_W-1:0];
  assign cidx     = cmt_q[PTR_W-1:0];
  assign al_ready = (used < SID_W'(DEPTH));
  assign al_st_id = tail_q;

  // Commit: hand the oldest uncommitted value to the SAB.
  assign sv_valid = cm_valid && (cmt_q != tail_q) && (inv_q[cidx] || dvld_q[cidx]);
  assign sv_inv   = inv_q[cidx];
  assign sv_data  = data_q[cidx];
  assign cm_ready = sv_valid && sv_ready;

  // Forwarded read: entry = st_id - released count.
  assign rd_in_range = SID_W'(rd_st_id - head_q) < used;
  assign ridx        = rd_st_id[PTR_W-1:0];
  assign rd_valid    = rd_in_range && dvld_q[ridx] && !inv_q[ridx];
  assign rd_data     = data_q[ridx];

  assign do_release = (head_q != cmt_q) && (head_q != crv_q) && rcv_q[hidx] &&
                      (rem_q[hidx] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      cmt_q  <= '0;
      crv_q  <= '0;
      tail_q <= '0;
      dvld_q <= '0;
      inv_q  <= '0;
      rcv_q  <= '0;
      rem_q  <= '0;
      data_q <= '0;
    end else begin
      if (fl_valid) begin
        tail_q <= fl_st_id;
      end else if (al_valid && al_ready) begin
        dvld_q[tail_q[PTR_W-1:0]] <= 1'b0;
        inv_q[tail_q[PTR_W-1:0]]  <= al_inv;
        rcv_q[tail_q[PTR_W-1:0]]  <= 1'b0;
        rem_q[tail_q[PTR_W-1:0]]  <= '0;
        tail_q <= tail_q + 1'b1;
      end
      if (wr_valid) begin
        data_q[wr_st_id[PTR_W-1:0]] <= wr_data;
        dvld_q[wr_st_id[PTR_W-1:0]] <= 1'b1;
      end
      if (cm_ready) cmt_q <= cmt_q + 1'b1;
      // The count may arrive in the same cycle as uses of the same entry.
      for (int i = 0; i < DEPTH; i++) begin
        logic [REM_W-1:0] r;
        r = rem_q[i];
        if (cnt_valid && crv_q[PTR_W-1:0] == PTR_W'(i)) r = r + REM_W'(cnt_in);
        if (use_valid && use_st_id[PTR_W-1:0] == PTR_W'(i)) r = r - 1'b1;
        rem_q[i] <= r;
      end
      if (cnt_valid) begin
        rcv_q[crv_q[PTR_W-1:0]] <= 1'b1;
        crv_q <= crv_q + 1'b1;
      end
      if (do_release) head_q <= head_q + 1'b1;
    end
  end

  // A forwarded CONSUME only uses a live entry.
  assert property (@(posedge clk) disable iff (!rst_n)
                   use_valid |-> SID_W'(use_st_id - head_q) < used);
  // Counts come back only for committed stores.
  assert property (@(posedge clk) disable iff (!rst_n)
                   cnt_valid |-> (crv_q != cmt_q) || cm_ready);

endmodule
