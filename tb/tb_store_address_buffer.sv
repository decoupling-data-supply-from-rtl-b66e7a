// tb_store_address_buffer: self-checking test of the store address buffer.
// Directed: only retired (awaiting) stores are forwarding candidates and the
// youngest match wins; a value arriving before its STORE_ADDR retired stalls
// until the retire; STORE_INV frees the entry without a memory write; the
// forward counter counts forwarded loads, is returned on release and
// saturates at 15; the dependence check sees unknown and matching older
// addresses only; capacity 128; rollback of unretired entries.
// Random: stores flow through dispatch, address, retire and value at random
// rates while forwarding searches are checked against a reference list, and
// every memory write is checked for program order, address and value.
module tb_store_address_buffer;
  import desc_pkg::*;

  localparam int unsigned DEPTH = SAB_DEPTH;
  localparam int unsigned SID_W = ST_ID_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              al_valid, al_ready, aw_valid, rt_valid, rt_ready, fl_valid;
  logic [SID_W-1:0]  al_st_id, aw_st_id, fl_st_id, fs_st_id, dc_bound;
  logic [ADDR_W-1:0] aw_addr, fs_addr, dc_addr, mem_addr;
  logic              fs_hit, fs_cnt_full, fs_inc, dc_match, dc_unknown;
  logic              sv_valid, sv_inv, sv_ready, cnt_valid, mem_valid, mem_ready;
  logic [DATA_W-1:0] sv_data, mem_data;
  logic [FWD_CNT_W-1:0] cnt_out;
  logic [$clog2(DEPTH):0] count;

  store_address_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic idle();
    al_valid = 0; aw_valid = 0; rt_valid = 0; fl_valid = 0; fs_inc = 0; sv_valid = 0;
  endtask
  task automatic step(); @(negedge clk); idle(); endtask

  task automatic alloc(output int sid);
    al_valid = 1; #1; sid = al_st_id; step();
  endtask
  task automatic addr(int sid, int a);
    aw_valid = 1; aw_st_id = SID_W'(sid); aw_addr = a; step();
  endtask
  task automatic retire();
    rt_valid = 1; #1; check(rt_ready, "retire ready"); step();
  endtask

  int s0, s1, s2, s3;
  typedef struct { int sid; int a; bit avld; bit rtd; int cnt; } st_t;
  st_t S [$];
  int  mem_exp_addr [$];
  bit [DATA_W-1:0] mem_exp_data [$];
  int  fwd_hits, stalls;

  initial begin
    idle(); mem_ready = 1; aw_st_id = 0; aw_addr = 0; fl_st_id = 0; fs_addr = 0;
    dc_addr = 0; dc_bound = 0; sv_inv = 0; sv_data = 0; fwd_hits = 0; stalls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- directed
    alloc(s0); alloc(s1); alloc(s2);
    check(s0 == 0 && s1 == 1 && s2 == 2, "store ids count from 0");
    dc_addr = 32'h100; dc_bound = 3; #1;
    check(dc_unknown, "unknown older address reported");
    addr(s0, 32'h100); addr(s1, 32'h200); addr(s2, 32'h100);
    dc_addr = 32'h200; dc_bound = 1; #1;
    check(!dc_unknown && !dc_match, "store 1 is not older than bound 1");
    dc_bound = 2; #1;
    check(dc_match, "store 1 matches with bound 2");
    fs_addr = 32'h100; #1;
    check(!fs_hit, "unretired stores are not forwarded from");
    retire(); retire();
    fs_addr = 32'h100; #1;
    check(fs_hit && fs_st_id == 0, "retired store 0 forwards (store 2 not yet retired)");
    fs_inc = 1; step();
    retire();
    fs_addr = 32'h100; #1;
    check(fs_hit && fs_st_id == 2, "youngest retired match wins");
    for (int i = 0; i < 20; i++) begin fs_inc = 1; step(); end
    fs_addr = 32'h100; #1;
    check(fs_cnt_full, "forward counter saturates");
    // value for store 0
    sv_valid = 1; sv_inv = 0; sv_data = 32'hAAAA; #1;
    check(sv_ready && mem_valid && mem_addr == 32'h100 && mem_data == 32'hAAAA, "store 0 writes memory");
    check(cnt_valid && cnt_out == 1, "store 0 returns count 1");
    step();
    // STORE_INV for store 1: no write
    sv_valid = 1; sv_inv = 1; #1;
    check(sv_ready && !mem_valid && cnt_valid && cnt_out == 0, "STORE_INV frees without a write");
    step();
    // memory back-pressure holds the pairing
    mem_ready = 0; sv_valid = 1; sv_inv = 0; sv_data = 32'hCCCC; #1;
    check(!sv_ready && mem_valid, "memory not ready stalls the value");
    mem_ready = 1; #1;
    check(sv_ready && cnt_out == 15, "store 2 returns saturated count 15");
    step();
    // value before retire stalls
    alloc(s3); addr(s3, 32'h300);
    sv_valid = 1; sv_data = 32'hDDDD; #1;
    check(!sv_ready && !mem_valid, "value waits for STORE_ADDR retire");
    step();
    retire();
    sv_valid = 1; sv_data = 32'hDDDD; #1;
    check(sv_ready && mem_addr == 32'h300, "then completes");
    step();
    check(count == 0, "empty");
    // rollback
    alloc(s0); alloc(s1); alloc(s2);
    fl_valid = 1; fl_st_id = SID_W'(s1); step();
    check(count == 1, "rollback keeps only the older entry");
    alloc(s2);
    check(s2 == s1, "ids reused after rollback");
    fl_valid = 1; fl_st_id = SID_W'(s1 - 1); step();
    // capacity
    for (int i = 0; i < DEPTH; i++) begin check(al_ready, "room"); alloc(s0); end
    check(!al_ready, "full at 128");
    fl_valid = 1; fl_st_id = SID_W'(s0 - (DEPTH - 1)); step();
    check(count == 0, "rolled back to empty");
    // ---- random flow
    for (int c = 0; c < 20000; c++) begin
      int r;
      idle();
      mem_ready = ($urandom % 4) != 0;
      if (($urandom % 3) == 0 && al_ready) begin
        st_t e; al_valid = 1; #1;
        e.sid = al_st_id; e.a = 32'h1000 + ($urandom % 16) * 4; e.avld = 0; e.rtd = 0; e.cnt = 0;
        S.push_back(e);
      end
      // address for a random unaddressed store (not one allocated this cycle)
      foreach (S[i]) if (!S[i].avld && i < S.size() - int'(al_valid) && ($urandom % 2)) begin
        aw_valid = 1; aw_st_id = SID_W'(S[i].sid); aw_addr = S[i].a; S[i].avld = 1; break;
      end
      // retire the oldest unretired if its address was known before this cycle
      foreach (S[i]) if (!S[i].rtd) begin
        #1;
        if (($urandom % 2) && rt_ready) begin rt_valid = 1; S[i].rtd = 1; end
        break;
      end
      // forwarding search against the reference
      r = $urandom % 16;
      fs_addr = 32'h1000 + r * 4;
      #1;
      begin
        int exp;
        exp = -1;
        foreach (S[i]) if (S[i].rtd && S[i].a == fs_addr &&
                           !(rt_valid && S[i].rtd && is_last_retired(i))) exp = S[i].sid;
        check(fs_hit == (exp >= 0) && (exp < 0 || fs_st_id == SID_W'(exp)),
              $sformatf("forward search %h: hit %0b id %0d, expected %0d", fs_addr, fs_hit, fs_st_id, exp));
        if (fs_hit) fwd_hits++;
        if (fs_hit && !fs_cnt_full && ($urandom % 2)) begin
          fs_inc = 1;
          foreach (S[i]) if (S[i].sid == exp) S[i].cnt++;
        end
      end
      // value from the CompD for the head
      if (S.size() > 0 && ($urandom % 2)) begin
        sv_valid = 1; sv_inv = ($urandom % 8) == 0; sv_data = $urandom;
        #1;
        if (sv_ready) begin
          check(S[0].rtd && !(rt_valid && is_last_retired(0)), "head pairs only when awaiting");
          if (!sv_inv) check(mem_valid && mem_addr == S[0].a && mem_data == sv_data,
                             "memory write address/value in program order");
          check(cnt_valid && cnt_out == FWD_CNT_W'(S[0].cnt),
                $sformatf("forward count %0d returned, expected %0d", cnt_out, S[0].cnt));
          S.delete(0);
        end else stalls++;
      end
      @(negedge clk);
    end
    idle();
    $display("forward hits=%0d value stalls=%0d", fwd_hits, stalls);
    check(fwd_hits > 100 && stalls > 100, "forwarding and stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The entry retired in this very cycle is not awaiting yet.
  function automatic bit is_last_retired(int i);
    for (int j = S.size() - 1; j >= 0; j--) if (S[j].rtd) return j == i;
    return 0;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
