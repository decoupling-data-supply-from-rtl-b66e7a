// comm_queue: the communication queue (CommQ) on the SuppD side, a FIFO of
// DEPTH items {id, fwd, fp, data} from the supplier's commit stage towards
// the CompD.
//
// Items are pushed only by committed PRODUCEs and fully committed terminal
// loads, so the queue never holds mis-speculated data and has no flush. Its
// size bounds how far the SuppD can run ahead of the CompD (512 items in the
// evaluated configuration). It is written as a RAM array with a circular
// read and write pointer; the head item is presented combinationally on
// out_item while out_valid is high.
//
// Timing: push_valid && push_ready writes at the clock edge (one-cycle push
// latency); the item can leave through out_* from the following cycle.
// push_ready is low when full. count reports the occupancy.
module comm_queue
  import desc_pkg::*;
#(
  parameter int unsigned DEPTH = COMMQ_DEPTH,
  localparam int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push_valid,
  output logic         push_ready,
  input  comm_item_t   push_item,
  output logic         out_valid,
  input  logic         out_ready,
  output comm_item_t   out_item,
  output logic [PTR_W:0] count
);

  comm_item_t         mem [DEPTH];
  logic [PTR_W-1:0]   wr_ptr, rd_ptr;
  logic [PTR_W:0]     cnt_q;
  logic               do_push, do_pop;

  assign push_ready = (cnt_q != (PTR_W+1)'(DEPTH));
  assign out_valid  = (cnt_q != '0);
  assign out_item   = mem[rd_ptr];
  assign count      = cnt_q;
  assign do_push    = push_valid && push_ready;
  assign do_pop     = out_valid && out_ready;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_item;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt_q  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      cnt_q <= cnt_q + (PTR_W+1)'(do_push) - (PTR_W+1)'(do_pop);
    end
  end

  // Occupancy never passes the capacity.
  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= (PTR_W+1)'(DEPTH));

endmodule
