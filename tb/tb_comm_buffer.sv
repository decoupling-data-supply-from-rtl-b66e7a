// tb_comm_buffer: self-checking test of the communication buffer. Items with
// unique ids are inserted in a scrambled order, looked up by id in a random
// order (out-of-order consumption), and released; a lookup must never remove
// an entry. Checks that insertion stops at exactly 64 entries, that the wake
// broadcast names each inserted id, and that a released id no longer hits.
module tb_comm_buffer;
  import desc_pkg::*;

  localparam int unsigned DEPTH = COMMBUF_DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              ins_valid, ins_ready, ins_fwd, wake_valid;
  logic [ID_W-1:0]   ins_id, wake_id, lookup_id, rel_id;
  logic [DATA_W-1:0] ins_data, lookup_data, rel_data;
  logic              lookup_hit, lookup_fwd, rel_valid, rel_hit, rel_fwd;
  logic [$clog2(DEPTH):0] count;

  comm_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [DATA_W-1:0] ref_data [int];
  bit                ref_fwd  [int];
  int                live [$];
  int                next_id;
  int                wakes;

  always @(posedge clk) if (rst_n && wake_valid) begin
    wakes++;
    check(wake_id == ins_id, "wake names the inserted id");
  end

  task automatic insert_one(int id);
    ins_valid = 1; ins_id = ID_W'(id); ins_data = $urandom; ins_fwd = ($urandom % 5) == 0;
    ref_data[id] = ins_data; ref_fwd[id] = ins_fwd; live.push_back(id);
    @(negedge clk);
    ins_valid = 0;
  endtask

  task automatic lookup_check(int id);
    lookup_id = ID_W'(id);
    #1;
    check(lookup_hit && lookup_data == ref_data[id] && lookup_fwd == ref_fwd[id],
          $sformatf("lookup id %0d", id));
  endtask

  task automatic release_one(int pos);
    int id;
    id = live[pos];
    live.delete(pos);
    rel_valid = 1; rel_id = ID_W'(id);
    #1;
    check(rel_hit && rel_data == ref_data[id] && rel_fwd == ref_fwd[id],
          $sformatf("release id %0d", id));
    @(negedge clk);
    rel_valid = 0;
    lookup_id = ID_W'(id);
    #1;
    check(!lookup_hit, $sformatf("id %0d gone after release", id));
  endtask

  initial begin
    ins_valid = 0; rel_valid = 0; ins_id = 0; ins_data = 0; ins_fwd = 0;
    lookup_id = 0; rel_id = 0; wakes = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill with scrambled ids (out-of-order arrival from the terminal load buffer)
    for (int i = 0; i < DEPTH; i++) begin
      check(ins_ready, "room before full");
      insert_one((i * 37) % 1000);
    end
    check(!ins_ready && count == DEPTH, "full at 64 entries");
    check(wakes == DEPTH, "one wake per insertion");
    // out-of-order lookups do not consume
    for (int r = 0; r < 200; r++) lookup_check(live[$urandom % live.size()]);
    check(count == DEPTH, "lookups do not remove entries");
    // random release / insert mix
    next_id = 2000;
    for (int r = 0; r < 3000; r++) begin
      if (live.size() > 0 && ($urandom % 2)) release_one($urandom % live.size());
      else if (ins_ready) begin insert_one(next_id); next_id++; end
      if (live.size() > 0) lookup_check(live[$urandom % live.size()]);
      check(count == live.size(), "occupancy matches");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
