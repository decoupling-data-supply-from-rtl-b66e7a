// tb_terminal_load_buffer: self-checking test of the terminal load buffer.
// Directed part: loads answered in reverse order commit in reverse order
// (out-of-order commit); after N-1 = 63 PRODUCE commits the waiting oldest
// entry blocks PRODUCEs and younger ready entries until it commits; capacity
// is 32 entries. Random part: partial commits, memory responses, PRODUCE
// commits and CommQ back-pressure at random, with every cycle's commit output
// compared against a reference model kept as a program-ordered list.
module tb_terminal_load_buffer;
  import desc_pkg::*;

  localparam int unsigned DEPTH = TLB_DEPTH;
  localparam int unsigned N     = COMMBUF_DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              pc_valid, pc_ready, pc_fp, pc_done, pc_fwd;
  logic [ID_W-1:0]   pc_id;
  logic [TAG_W-1:0]  pc_tag, resp_tag;
  logic [DATA_W-1:0] pc_data, resp_data;
  logic              resp_valid, cm_valid, cm_ready, produce_commit, block_produce;
  comm_item_t        cm_item;
  logic [$clog2(DEPTH):0] count;

  terminal_load_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  typedef struct {
    int id; int tag; bit ready; bit fwd; bit fp; bit [DATA_W-1:0] data; int cnt;
  } ment_t;
  ment_t L [$];
  bit    model_on;
  int    ooo_commits, blocked_cycles, commits;

  // Reference model, compared every cycle.
  always @(posedge clk) if (rst_n && model_on) begin
    int sel;
    bit sat;
    sel = -1;
    sat = (L.size() > 0) && (L[0].cnt == N-1);
    if (sat) sel = L[0].ready ? 0 : -1;
    else foreach (L[i]) if (sel < 0 && L[i].ready) sel = i;
    check(block_produce == sat, "block_produce");
    check(cm_valid == (sel >= 0), $sformatf("cm_valid %0b expected %0b", cm_valid, sel >= 0));
    if (sat) blocked_cycles++;
    if (sel >= 0 && cm_valid)
      check(cm_item.id == ID_W'(L[sel].id) && cm_item.data == L[sel].data &&
            cm_item.fwd == L[sel].fwd && cm_item.fp == L[sel].fp,
            $sformatf("commit id %0d expected %0d", cm_item.id, L[sel].id));
    // update
    if (cm_valid && cm_ready && sel >= 0) begin
      for (int i = 0; i < sel; i++) if (L[i].cnt < N-1) L[i].cnt++;
      if (sel > 0) ooo_commits++;
      commits++;
      L.delete(sel);
    end
    if (produce_commit) foreach (L[i]) if (L[i].cnt < N-1) L[i].cnt++;
    if (resp_valid) foreach (L[i]) if (!L[i].ready && L[i].tag == resp_tag) begin
      L[i].ready = 1; L[i].data = resp_data;
    end
    if (pc_valid && pc_ready) begin
      ment_t e;
      e.id = pc_id; e.tag = pc_tag; e.fwd = pc_fwd; e.fp = pc_fp; e.cnt = 0;
      e.ready = pc_done || (resp_valid && resp_tag == pc_tag);
      e.data  = pc_done ? pc_data : resp_data;
      L.push_back(e);
    end
  end

  task automatic idle();
    pc_valid = 0; resp_valid = 0; produce_commit = 0;
  endtask

  task automatic partial(int id, int tag, bit done, bit [DATA_W-1:0] d);
    pc_valid = 1; pc_id = ID_W'(id); pc_tag = TAG_W'(tag); pc_done = done; pc_data = d;
    pc_fwd = 0; pc_fp = 0;
    @(negedge clk);
    pc_valid = 0;
  endtask

  task automatic respond(int tag, bit [DATA_W-1:0] d);
    resp_valid = 1; resp_tag = TAG_W'(tag); resp_data = d;
    @(negedge clk);
    resp_valid = 0;
  endtask

  int free_tags [$];
  int waiting_tags [$];

  initial begin
    idle(); cm_ready = 0; pc_id = 0; pc_tag = 0; pc_data = 0; pc_fp = 0; pc_done = 0;
    pc_fwd = 0; resp_tag = 0; resp_data = 0; model_on = 0;
    ooo_commits = 0; blocked_cycles = 0; commits = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    model_on = 1;
    // 1) three loads, answered youngest first, commit youngest first
    partial(1, 1, 0, 0); partial(2, 2, 0, 0); partial(3, 3, 0, 0);
    check(!cm_valid, "nothing ready yet");
    respond(3, 32'h333);
    check(cm_valid && cm_item.id == 3 && cm_item.data == 32'h333, "youngest commits first");
    cm_ready = 1; @(negedge clk); cm_ready = 0;
    respond(2, 32'h222);
    check(cm_valid && cm_item.id == 2, "middle next");
    cm_ready = 1; @(negedge clk); cm_ready = 0;
    // 2) reordering limit: load 1 has been passed by loads 3 and 2 (count 2);
    //    PRODUCE commits age it further up to N-1
    partial(4, 4, 1, 32'h444);            // younger, already done
    for (int i = 0; i < N-4; i++) begin produce_commit = 1; @(negedge clk); end
    produce_commit = 0;
    check(!block_produce, "not yet at N-1");
    produce_commit = 1; @(negedge clk); produce_commit = 0;
    check(block_produce, "oldest reached N-1 and blocks PRODUCE");
    check(!cm_valid, "younger ready entry held back behind saturated oldest");
    cm_ready = 1;
    repeat (3) @(negedge clk);
    check(!cm_valid && count == 2, "loads 1 and 4 stay while load 1 waits");
    respond(1, 32'h111);
    check(cm_valid && cm_item.id == 1, "saturated oldest commits as soon as ready");
    @(negedge clk);
    check(!block_produce && cm_valid && cm_item.id == 4, "then the younger one");
    @(negedge clk);
    cm_ready = 0;
    repeat (3) @(negedge clk);
    // 3) capacity
    for (int i = 0; i < DEPTH; i++) begin
      check(pc_ready, "room");
      partial(100 + i, i, 0, 0);
    end
    check(!pc_ready && count == DEPTH, "full at 32 entries");
    for (int i = 0; i < DEPTH; i++) respond(i, i);
    cm_ready = 1;
    while (cm_valid) @(negedge clk);
    repeat (DEPTH + 2) @(negedge clk);
    check(L.size() == 0 && count == 0, "drained");
    // 4) random traffic against the model
    for (int t = 0; t < 64; t++) free_tags.push_back(t);
    for (int c = 0; c < 20000; c++) begin
      idle();
      cm_ready = ($urandom % 4) != 0;
      produce_commit = ($urandom % 3) == 0;
      if (($urandom % 2) && free_tags.size() > 0 && pc_ready) begin
        int tg;
        tg = free_tags.pop_front();
        pc_valid = 1; pc_id = ID_W'(c); pc_tag = TAG_W'(tg); pc_fp = 1'($urandom);
        pc_fwd = ($urandom % 8) == 0; pc_done = pc_fwd || ($urandom % 6) == 0;
        pc_data = $urandom;
        if (pc_done) free_tags.push_back(tg); else waiting_tags.push_back(tg);
      end
      if (waiting_tags.size() > 0 && ($urandom % 5) == 0) begin
        int k, tg;
        k = $urandom % waiting_tags.size();
        tg = waiting_tags[k];
        // never answer the tag being committed in this same cycle twice
        if (!(pc_valid && !pc_done && pc_tag == TAG_W'(tg))) begin
          waiting_tags.delete(k);
          free_tags.push_back(tg);
          resp_valid = 1; resp_tag = TAG_W'(tg); resp_data = $urandom;
        end
      end
      @(negedge clk);
    end
    idle();
    $display("commits=%0d out_of_order=%0d blocked_cycles=%0d", commits, ooo_commits, blocked_cycles);
    check(ooo_commits > 0, "out-of-order commits happened");
    check(blocked_cycles > 0, "reordering limit reached in random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
