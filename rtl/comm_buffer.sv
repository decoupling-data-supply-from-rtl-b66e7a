// comm_buffer: the communication buffer (CommBuf) on the CompD side, a
// content-addressable array of DEPTH entries {id, fwd, data} filled from the
// link and searched by CONSUME instructions by their program-order id.
//
// Because every entry is found by id, CONSUMEs may read their data out of
// order. A lookup does not remove the entry: the CompD releases it when the
// CONSUME commits (rel_*), so a mis-speculated CONSUME can never evict data.
// Each insertion is also broadcast on wake_* so that a CONSUME already waiting
// in the CompD's instruction window can wake up. The free entry taken on
// insertion is the lowest-numbered one (this design's choice).
//
// Timing: insertion (ins_valid && ins_ready, ready = not full) and release
// take effect at the clock edge; lookup_* and rel_hit/rel_fwd/rel_data are
// combinational on the current contents. An entry inserted in cycle t can be
// looked up from cycle t+1. The wake broadcast is combinational with the
// insertion.
module comm_buffer
  import desc_pkg::*;
#(
  parameter int unsigned DEPTH = COMMBUF_DEPTH,
  localparam int unsigned IDX_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // fill from the link / decompressor
  input  logic              ins_valid,
  output logic              ins_ready,
  input  logic [ID_W-1:0]   ins_id,
  input  logic              ins_fwd,
  input  logic [DATA_W-1:0] ins_data,
  // wake-up broadcast to the CompD instruction window
  output logic              wake_valid,
  output logic [ID_W-1:0]   wake_id,
  // CONSUME value lookup
  input  logic [ID_W-1:0]   lookup_id,
  output logic              lookup_hit,
  output logic              lookup_fwd,
  output logic [DATA_W-1:0] lookup_data,
  // CONSUME commit: release the entry
  input  logic              rel_valid,
  input  logic [ID_W-1:0]   rel_id,
  output logic              rel_hit,
  output logic              rel_fwd,
  output logic [DATA_W-1:0] rel_data,
  output logic [IDX_W:0]    count
);

  logic [DEPTH-1:0]             vld_q;
  logic [DEPTH-1:0][ID_W-1:0]   id_q;
  logic [DEPTH-1:0]             fwd_q;
  logic [DEPTH-1:0][DATA_W-1:0] data_q;

  logic [IDX_W-1:0] free_idx, rel_idx;
  logic             has_free;

  always_comb begin
    has_free = 1'b0;
    free_idx = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (!vld_q[i]) begin has_free = 1'b1; free_idx = IDX_W'(i); end
  end

  always_comb begin
    lookup_hit  = 1'b0;
    lookup_fwd  = 1'b0;
    lookup_data = '0;
    rel_hit     = 1'b0;
    rel_idx     = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (vld_q[i] && id_q[i] == lookup_id) begin
        lookup_hit  = 1'b1;
        lookup_fwd  = fwd_q[i];
        lookup_data = data_q[i];
      end
      if (vld_q[i] && id_q[i] == rel_id) begin
        rel_hit = 1'b1;
        rel_idx = IDX_W'(i);
      end
    end
  end
  assign rel_fwd  = fwd_q[rel_idx];
  assign rel_data = data_q[rel_idx];

  assign ins_ready  = has_free;
  assign wake_valid = ins_valid && ins_ready;
  assign wake_id    = ins_id;

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count = count + (IDX_W+1)'(vld_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
    end else begin
      if (rel_valid && rel_hit) vld_q[rel_idx] <= 1'b0;
      if (ins_valid && ins_ready) vld_q[free_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ins_valid && ins_ready) begin
      id_q[free_idx]   <= ins_id;
      fwd_q[free_idx]  <= ins_fwd;
      data_q[free_idx] <= ins_data;
    end
  end

  // Every committed CONSUME has its item in the buffer.
  assert property (@(posedge clk) disable iff (!rst_n) rel_valid |-> rel_hit);

endmodule
