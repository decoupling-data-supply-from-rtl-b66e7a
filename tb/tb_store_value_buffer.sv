// tb_store_value_buffer: self-checking test of the store value buffer.
// Directed: reads by store id see written values only (not STORE_INV
// entries); commit waits for the value and for the SAB; an entry that loads
// were forwarded from stays until that many forwarded CONSUMEs have used it;
// capacity 128; rollback. Random: stores are dispatched, written, committed
// and given forward counts, and forwarded uses arrive at random, over several
// wraps of the store id; every read and the occupancy are checked against a
// reference list.
module tb_store_value_buffer;
  import desc_pkg::*;

  localparam int unsigned DEPTH = SVB_DEPTH;
  localparam int unsigned SID_W = ST_ID_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              al_valid, al_inv, al_ready, wr_valid, cm_valid, cm_ready;
  logic [SID_W-1:0]  al_st_id, wr_st_id, rd_st_id, use_st_id, fl_st_id;
  logic [DATA_W-1:0] wr_data, sv_data, rd_data;
  logic              sv_valid, sv_inv, sv_ready, cnt_valid, rd_valid, use_valid, fl_valid;
  logic [FWD_CNT_W-1:0] cnt_in;
  logic [$clog2(DEPTH):0] count;

  store_value_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic idle();
    al_valid = 0; wr_valid = 0; cm_valid = 0; cnt_valid = 0; use_valid = 0; fl_valid = 0;
  endtask
  task automatic step(); @(negedge clk); idle(); endtask

  typedef struct {
    int sid; bit inv; bit wr; bit [DATA_W-1:0] d; bit cm; bit rcv; int rem;
  } e_t;
  e_t E [$];
  int a, b, c3;

  function automatic int find(int sid);
    foreach (E[i]) if (E[i].sid == sid) return i;
    return -1;
  endfunction

  int releases, reads_ok;

  initial begin
    idle(); al_inv = 0; wr_st_id = 0; wr_data = 0; rd_st_id = 0; use_st_id = 0;
    fl_st_id = 0; sv_ready = 1; cnt_in = 0; releases = 0; reads_ok = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- directed
    al_valid = 1; al_inv = 0; #1; a = al_st_id; step();
    al_valid = 1; al_inv = 1; #1; b = al_st_id; step();
    al_valid = 1; al_inv = 0; #1; c3 = al_st_id; step();
    check(a == 0 && b == 1 && c3 == 2, "ids in program order");
    rd_st_id = SID_W'(a); #1;
    check(!rd_valid, "unwritten value not readable");
    cm_valid = 1; #1;
    check(!sv_valid && !cm_ready, "commit waits for the value");
    step();
    wr_valid = 1; wr_st_id = SID_W'(a); wr_data = 32'h1111; step();
    wr_valid = 1; wr_st_id = SID_W'(c3); wr_data = 32'h3333; step();
    rd_st_id = SID_W'(c3); #1;
    check(rd_valid && rd_data == 32'h3333, "forwarded read of store 2");
    rd_st_id = SID_W'(b); #1;
    check(!rd_valid, "STORE_INV entry has no value");
    sv_ready = 0; cm_valid = 1; #1;
    check(sv_valid && !sv_inv && sv_data == 32'h1111 && !cm_ready, "waits for the SAB");
    sv_ready = 1; #1;
    check(cm_ready, "committed when the SAB takes it");
    cnt_valid = 1; cnt_in = 2; step();     // two loads were forwarded from store 0
    cm_valid = 1; #1; check(sv_valid && sv_inv, "STORE_INV committed"); cnt_valid = 1; cnt_in = 0; step();
    repeat (2) @(negedge clk);
    check(count == 3, "store 0 held while its count is 2");
    use_valid = 1; use_st_id = SID_W'(a); step();
    check(count == 3, "held after one use");
    use_valid = 1; use_st_id = SID_W'(a); step();
    repeat (2) @(negedge clk);
    check(count == 1, "stores 0 and 1 released after the second use");
    rd_st_id = SID_W'(c3); #1;
    check(rd_valid && rd_data == 32'h3333, "store 2 still read by id after head moved");
    cm_valid = 1; #1; cnt_valid = 1; cnt_in = 0; step();
    @(negedge clk);
    check(count == 0, "empty");
    // capacity and rollback
    for (int i = 0; i < DEPTH; i++) begin check(al_ready, "room"); al_valid = 1; al_inv = 0; #1; a = al_st_id; step(); end
    check(!al_ready, "full at 128");
    fl_valid = 1; fl_st_id = SID_W'(a - (DEPTH - 1)); step();
    check(count == 0, "rolled back");
    // ---- random
    for (int c = 0; c < 30000; c++) begin
      int k;
      idle();
      sv_ready = ($urandom % 3) != 0;
      if (($urandom % 3) == 0 && al_ready) begin
        e_t e;
        al_valid = 1; al_inv = ($urandom % 6) == 0; #1;
        e.sid = al_st_id; e.inv = al_inv; e.wr = 0; e.d = 0; e.cm = 0; e.rcv = 0; e.rem = 0;
        E.push_back(e);
      end
      // write a value (not for the entry allocated now)
      k = E.size() > 1 ? $urandom % (E.size() - 1) : -1;
      if (k >= 0 && !E[k].inv && !E[k].wr && ($urandom % 2)) begin
        wr_valid = 1; wr_st_id = SID_W'(E[k].sid); wr_data = $urandom;
        E[k].wr = 1; E[k].d = wr_data;
      end
      // read a random live entry
      k = E.size() > 1 ? $urandom % (E.size() - 1) : -1;
      if (k >= 0) begin
        bit exp;
        rd_st_id = SID_W'(E[k].sid); #1;
        exp = E[k].wr && !E[k].inv && !(wr_valid && wr_st_id == SID_W'(E[k].sid));
        check(rd_valid == exp && (!exp || rd_data == E[k].d),
              $sformatf("read st %0d valid %0b exp %0b", E[k].sid, rd_valid, exp));
        if (exp) reads_ok++;
      end
      // commit the oldest uncommitted one, count returned with it
      foreach (E[i]) if (!E[i].cm) begin
        if ((E[i].inv || (E[i].wr && !(wr_valid && wr_st_id == SID_W'(E[i].sid)))) && ($urandom % 2)) begin
          cm_valid = 1; #1;
          if (cm_ready) begin
            check(sv_inv == E[i].inv && (E[i].inv || sv_data == E[i].d), "committed value");
            E[i].cm = 1; E[i].rcv = 1;
            cnt_valid = 1; cnt_in = E[i].inv ? 0 : FWD_CNT_W'($urandom % 3); E[i].rem = cnt_in;
          end
        end
        break;
      end
      // a forwarded CONSUME commits (only for counts already received)
      foreach (E[i]) if (E[i].rcv && E[i].rem > 0 && !(cnt_valid && E[i].cm && E[i].rem == cnt_in && i == last_cm())) begin
        if ($urandom % 2) begin use_valid = 1; use_st_id = SID_W'(E[i].sid); E[i].rem--; end
        break;
      end
      @(negedge clk);
      // model release: the head leaves, one per cycle, once committed,
      // its count received and drained
      if (count == E.size() - 1) begin
        check(E[0].cm && E[0].rcv && E[0].rem == 0, "only a drained committed head is released");
        E.delete(0); releases++; held = 0;
      end else begin
        check(count == E.size(), $sformatf("occupancy %0d model %0d", count, E.size()));
        if (E.size() > 0 && E[0].cm && E[0].rem == 0) held++; else held = 0;
        check(held < 3, "drained head released promptly");
      end
    end
    idle();
    $display("releases=%0d value reads=%0d", releases, reads_ok);
    check(releases > 1000 && reads_ok > 1000, "traffic exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int held = 0;
  function automatic int last_cm();
    for (int j = E.size() - 1; j >= 0; j--) if (E[j].cm) return j;
    return -1;
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
