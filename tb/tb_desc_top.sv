// tb_desc_top: end-to-end test of the DeSC communication hardware at its
// default sizes (512-item CommQ, 64-entry CommBuf, 32-entry terminal load
// buffer, 128-entry SAB and SVB, extended compression).
//
// The testbench plays both processors and the memory:
//  - a SuppD model executes a communication slice in program order, one
//    operation at a time: PRODUCE, LOAD_PRODUCE (partial commit, memory read
//    with random latency, some very long), STORE_ADDR (dispatch, address,
//    retire after a random delay), and wrong-path STORE_ADDRs that are
//    flushed;
//  - a CompD model executes the matching computation slice: CONSUME by id,
//    compute, STORE_VAL / STORE_INV, wrong-path STORE_VALs that are flushed;
//  - a memory model answers loads with random latency, applies writes, and
//    sometimes refuses writes.
// Phase 1 (a Table I-like stream of PRODUCEs with a slow consumer) fills the
// CommQ and the CommBuf. Phase 2 runs a kernel with an indirect terminal
// load, a reload of the value stored in the previous iteration (decoupled
// store-to-load forwarding) and a conditional store turned into STORE_VAL /
// STORE_INV:
//     y = b[i] (PRODUCE, float)   x = v[a[i]] (LOAD_PRODUCE)
//     z = c[i-1] (LOAD_PRODUCE)   c[i] = x + 3*y + z
//     if (c[i] odd) d[i] = c[i] ^ 0x5555   (else STORE_INV)
// Every consumed value and the final memory are compared with a sequential
// reference. Each mechanism is counted and a failure is recorded for any that
// never happened. The CommQ-push-to-CommBuf latency of an idle system is
// checked to be 3 clock edges (push, compression stage, decompression stage).
module tb_desc_top;
  import desc_pkg::*;

  localparam int unsigned SID_W = ST_ID_W;
  localparam int N1 = 1200;   // phase 1 PRODUCEs
  localparam int N2 = 400;    // phase 2 iterations
  localparam int V_BASE = 32'h1000, A_BASE = 32'h2000, B_BASE = 32'h3000;
  localparam int C_BASE = 32'h4000, D_BASE = 32'h5000, P_BASE = 32'h6000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT
  logic              pr_valid, pr_ready, pr_fp;
  logic [ID_W-1:0]   pr_id, lp_id, cs_id, cc_id, wake_id;
  logic [DATA_W-1:0] pr_data, lp_data, ld_resp_data, mem_data, cs_data, sv_wr_data;
  logic              lp_valid, lp_ready, lp_fp, lp_done, lp_fwd, ld_resp_valid;
  logic [ADDR_W-1:0] lp_addr, sa_aw_addr, dc_addr, mem_addr;
  logic [TAG_W-1:0]  lp_tag, ld_resp_tag;
  logic              sa_al_valid, sa_al_ready, sa_aw_valid, sa_rt_valid, sa_rt_ready, sa_fl_valid;
  logic [SID_W-1:0]  sa_al_st_id, sa_aw_st_id, sa_fl_st_id, dc_bound;
  logic              dc_match, dc_unknown, mem_valid, mem_ready;
  logic              cs_hit, cc_valid, wake_valid;
  logic              sv_al_valid, sv_al_inv, sv_al_ready, sv_wr_valid, sv_cm_valid, sv_cm_ready, sv_fl_valid;
  logic [SID_W-1:0]  sv_al_st_id, sv_wr_st_id, sv_fl_st_id;
  logic              link_valid;
  logic [5:0]        link_nbits;
  logic [$clog2(COMMQ_DEPTH):0]   commq_count;
  logic [$clog2(COMMBUF_DEPTH):0] commbuf_count;

  desc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- memory
  bit [DATA_W-1:0] mem [int];
  typedef struct { int tag; bit [DATA_W-1:0] data; longint due; } pend_t;
  pend_t  pend [$];
  int     free_tags [$];
  longint cyc = 0;

  function automatic bit [DATA_W-1:0] rd(int a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && mem_valid && mem_ready) mem[int'(mem_addr)] = mem_data;
  end

  // responses: at most one per cycle, the first that is due
  always @(negedge clk) begin
    ld_resp_valid <= 1'b0;
    mem_ready     <= ($urandom % 8) != 0;
    foreach (pend[i]) if (pend[i].due <= cyc) begin
      ld_resp_valid <= 1'b1;
      ld_resp_tag   <= TAG_W'(pend[i].tag);
      ld_resp_data  <= pend[i].data;
      free_tags.push_back(pend[i].tag);
      pend.delete(i);
      break;
    end
  end

  // ---------------------------------------------------------------- reference
  bit [DATA_W-1:0] exp_val [int];     // expected CONSUME value by id
  bit [DATA_W-1:0] v_tab [16];
  int              a_idx [N2];
  bit [DATA_W-1:0] b_val [N2];
  bit [DATA_W-1:0] c_ref [N2];
  bit [DATA_W-1:0] d_ref [N2];
  bit [DATA_W-1:0] c_init_last;
  bit              d_written [N2];

  // ---------------------------------------------------------------- counters
  int n_produce, n_lp_pending, n_lp_done, n_fwd, n_ooo_arrival, n_block_cycles;
  int n_commq_full, n_commbuf_full, n_consume_wait, n_wake_match, n_sv_stall;
  int n_inv, n_sab_flush, n_svb_flush, n_mem_refused, n_dc_queries;
  int n_codes [4];
  int link_bits, link_items;
  int max_arrived;
  int push_log [$];
  int pc_log [int];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_tlb.block_produce) n_block_cycles++;
    if (pr_valid && !dut.q_push_ready) n_commq_full++;
    if (dut.dq_valid && !dut.dq_ready) n_commbuf_full++;
    if (mem_valid && !mem_ready) n_mem_refused++;
    if (link_valid) begin
      n_codes[dut.lk_word.kind]++;
      link_bits += link_nbits;
      link_items++;
    end
    if (dut.q_push_valid && dut.q_push_ready) push_log.push_back(int'(dut.q_push_item.id));
    if (lp_valid && lp_ready) pc_log[int'(lp_id)] = push_log.size();
    if (dut.q_push_valid && dut.q_push_ready) begin
      if (int'(dut.q_push_item.id) < max_arrived) n_ooo_arrival++;
      else max_arrived = int'(dut.q_push_item.id);
    end
  end

  // ---------------------------------------------------------------- SuppD
  int next_id_s = 0;

  task automatic s_produce(bit [DATA_W-1:0] d, bit fp);
    @(negedge clk);
    pr_valid = 1; pr_id = ID_W'(next_id_s); pr_data = d; pr_fp = fp;
    #1;
    while (!pr_ready) begin @(negedge clk); #1; end
    next_id_s++; n_produce++;
    @(negedge clk); pr_valid = 0;
  endtask

  task automatic s_load_produce(int addr, bit fp);
    int tg;
    @(negedge clk);
    while (free_tags.size() == 0) @(negedge clk);
    tg = free_tags.pop_front();
    lp_valid = 1; lp_id = ID_W'(next_id_s); lp_addr = addr; lp_fp = fp; lp_tag = TAG_W'(tg);
    lp_done = ($urandom % 4) == 0;
    lp_data = lp_done ? rd(addr) : '0;
    #1;
    while (!lp_ready) begin @(negedge clk); #1; lp_data = lp_done ? rd(addr) : '0; end
    // the partial commit happens at the next edge
    if (lp_fwd) begin
      n_fwd++; free_tags.push_back(tg);
    end else if (lp_done) begin
      n_lp_done++; free_tags.push_back(tg);
    end else begin
      pend_t p;
      p.tag = tg; p.data = rd(addr);
      p.due = cyc + (($urandom % 25 == 0) ? 600 : 1 + $urandom % 12);
      pend.push_back(p);
      n_lp_pending++;
    end
    next_id_s++;
    @(negedge clk); lp_valid = 0;
  endtask

  task automatic s_store_addr(int addr, bit bogus, bit slow = 1'b0);
    int sid;
    @(negedge clk);
    sa_al_valid = 1;
    #1;
    while (!sa_al_ready) begin @(negedge clk); #1; end
    sid = int'(sa_al_st_id);
    sa_aw_valid = 1; sa_aw_st_id = sa_al_st_id; sa_aw_addr = addr;
    @(negedge clk);
    sa_al_valid = 0; sa_aw_valid = 0;
    if (bogus) begin
      sa_fl_valid = 1; sa_fl_st_id = SID_W'(sid);
      n_sab_flush++;
      @(negedge clk);
      sa_fl_valid = 0;
      return;
    end
    // retire in program order after a delay, sometimes a long one
    repeat ((slow || $urandom % 30 == 0) ? 40 : $urandom % 3) @(negedge clk);
    sa_rt_valid = 1;
    #1;
    check(sa_rt_ready, "STORE_ADDR retires with its address known");
    @(negedge clk);
    sa_rt_valid = 0;
  endtask

  task automatic s_dep_query(int addr);
    dc_addr = addr; dc_bound = sa_al_st_id;
    #1;
    check(!dc_match, "ordinary loads of read-only arrays never match a store");
    n_dc_queries++;
  endtask

  task automatic suppd();
    for (int i = 0; i < N1; i++) s_produce(rd(P_BASE + 4*i), i[0]);
    // the kernel starts once the first loop's values are consumed
    while (next_id_c < N1) @(negedge clk);
    for (int i = 0; i < N2; i++) begin
      s_dep_query(B_BASE + 4*i);
      s_produce(rd(B_BASE + 4*i), 1'b1);
      s_load_produce(V_BASE + 4*a_idx[i], 1'b0);
      s_load_produce(C_BASE + 4*((i + N2 - 1) % N2), 1'b0);
      if ($urandom % 40 == 0) s_store_addr(C_BASE + 4*i, 1'b1);
      s_store_addr(C_BASE + 4*i, 1'b0, i < 4);   // the first ones retire late
      s_store_addr(D_BASE + 4*i, 1'b0);
    end
  endtask

  // ---------------------------------------------------------------- CompD
  int next_id_c = 0;
  int next_store_c = 0;

  task automatic c_consume(output bit [DATA_W-1:0] v);
    bit waited;
    waited = 0;
    @(negedge clk);
    cs_id = ID_W'(next_id_c);
    #1;
    while (!cs_hit) begin waited = 1; @(negedge clk); #1; end
    if (waited) n_consume_wait++;
    v = cs_data;
    check(v == exp_val[next_id_c], $sformatf("CONSUME id %0d got %h expected %h",
                                            next_id_c, v, exp_val[next_id_c]));
    cc_valid = 1; cc_id = ID_W'(next_id_c);
    next_id_c++;
    @(negedge clk);
    cc_valid = 0;
  endtask

  task automatic c_store(bit inv, bit [DATA_W-1:0] v, bit bogus);
    bit [SID_W-1:0] sid;
    @(negedge clk);
    sv_al_valid = 1; sv_al_inv = inv;
    #1;
    while (!sv_al_ready) begin @(negedge clk); #1; end
    sid = sv_al_st_id;
    if (!bogus) check(sid == SID_W'(next_store_c), "STORE_VAL pairs with the same store id as its STORE_ADDR");
    if (!inv) begin sv_wr_valid = 1; sv_wr_st_id = sid; sv_wr_data = v; end
    @(negedge clk);
    sv_al_valid = 0; sv_wr_valid = 0;
    if (bogus) begin
      sv_fl_valid = 1; sv_fl_st_id = sid; n_svb_flush++;
      @(negedge clk);
      sv_fl_valid = 0;
      return;
    end
    next_store_c++;
    if (inv) n_inv++;
    sv_cm_valid = 1;
    #1;
    if (!sv_cm_ready && !dut.u_sab.head_awt) n_sv_stall++;
    while (!sv_cm_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    sv_cm_valid = 0;
  endtask

  task automatic compd();
    bit [DATA_W-1:0] x, y, z, val;
    for (int i = 0; i < N1; i++) begin
      c_consume(x);
      repeat (3) @(negedge clk);          // slow computation
    end
    for (int i = 0; i < N2; i++) begin
      c_consume(y); c_consume(x); c_consume(z);
      val = x + 3*y + z;
      if ($urandom % 40 == 0) c_store(1'b0, 32'hDEAD, 1'b1);
      c_store(1'b0, val, 1'b0);
      c_store(!val[0], val ^ 32'h5555, 1'b0);
    end
  endtask

  // ---------------------------------------------------------------- wake check
  always @(posedge clk) if (rst_n && wake_valid && int'(wake_id) == int'(cs_id) && !cs_hit)
    n_wake_match++;

  // ---------------------------------------------------------------- main
  initial begin
    int lat;
    pr_valid = 0; pr_id = 0; pr_data = 0; pr_fp = 0;
    lp_valid = 0; lp_id = 0; lp_addr = 0; lp_fp = 0; lp_tag = 0; lp_done = 0; lp_data = 0;
    sa_al_valid = 0; sa_aw_valid = 0; sa_aw_st_id = 0; sa_aw_addr = 0; sa_rt_valid = 0;
    sa_fl_valid = 0; sa_fl_st_id = 0; dc_addr = 0; dc_bound = 0; mem_ready = 1;
    ld_resp_valid = 0; ld_resp_tag = 0; ld_resp_data = 0;
    cs_id = 0; cc_valid = 0; cc_id = 0;
    sv_al_valid = 0; sv_al_inv = 0; sv_wr_valid = 0; sv_wr_st_id = 0; sv_wr_data = 0;
    sv_cm_valid = 0; sv_fl_valid = 0; sv_fl_st_id = 0;
    n_codes = '{0, 0, 0, 0}; link_bits = 0; link_items = 0; max_arrived = -1;
    for (int t = 0; t < 64; t++) free_tags.push_back(t);

    // memory image and reference
    foreach (v_tab[k]) begin v_tab[k] = 32'h0001_0000 + k * 32'h40 + ($urandom % 8); mem[V_BASE + 4*k] = v_tab[k]; end
    for (int i = 0; i < N1; i++) mem[P_BASE + 4*i] = (i % 5 == 0) ? $urandom : 32'h0000_7000 + (i % 50);
    for (int i = 0; i < N2; i++) begin
      a_idx[i] = $urandom % 16;             mem[A_BASE + 4*i] = a_idx[i];
      b_val[i] = {1'b0, 8'(126 + $urandom % 3), 23'($urandom)};
      mem[B_BASE + 4*i] = b_val[i];
      mem[C_BASE + 4*i] = 32'h0000_0100 + i;
      mem[D_BASE + 4*i] = 32'hFFFF_0000 + i;
    end
    c_init_last = mem[C_BASE + 4*(N2-1)];
    begin
      int id;
      bit [DATA_W-1:0] x, y, z, val;
      id = 0;
      for (int i = 0; i < N1; i++) begin exp_val[id] = mem[P_BASE + 4*i]; id++; end
      for (int i = 0; i < N2; i++) begin
        y = b_val[i]; x = v_tab[a_idx[i]];
        z = (i == 0) ? c_init_last : c_ref[i-1];
        exp_val[id] = y; exp_val[id+1] = x; exp_val[id+2] = z; id += 3;
        val = x + 3*y + z;
        c_ref[i] = val;
        d_written[i] = val[0];
        d_ref[i] = val[0] ? (val ^ 32'h5555) : mem[D_BASE + 4*i];
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // latency of an idle system: CommQ push edge -> CommBuf insertion edge
    pr_valid = 1; pr_id = ID_W'(4000); pr_data = 32'h1234_5678; pr_fp = 0;
    #1; check(pr_ready, "idle system accepts a PRODUCE");
    @(negedge clk); pr_valid = 0;
    lat = 1;
    while (!(dut.dq_valid && dut.dq_ready)) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("push-to-CommBuf latency %0d edges, expected 3", lat));
    @(negedge clk);
    cs_id = ID_W'(4000); #1;
    check(cs_hit && cs_data == 32'h1234_5678, "the item is found by id");
    cc_valid = 1; cc_id = ID_W'(4000); @(negedge clk); cc_valid = 0;
    // the warm-up item is not part of the program; clear its bookkeeping
    max_arrived = -1; n_codes = '{0, 0, 0, 0}; link_bits = 0; link_items = 0;

    fork
      suppd();
      compd();
    join
    // drain the stores
    while (dut.u_sab.count != 0) @(negedge clk);
    repeat (5) @(negedge clk);

    for (int i = 0; i < N2; i++) begin
      check(rd(C_BASE + 4*i) == c_ref[i], $sformatf("c[%0d] = %h expected %h", i, rd(C_BASE + 4*i), c_ref[i]));
      check(rd(D_BASE + 4*i) == d_ref[i], $sformatf("d[%0d] = %h expected %h", i, rd(D_BASE + 4*i), d_ref[i]));
    end
    check(commbuf_count == 0 && commq_count == 0, "communication structures empty at the end");
    check(dut.u_svb.count == 0, "store value buffer drained");

    $display("PRODUCE=%0d terminal loads pending=%0d done-at-commit=%0d forwarded=%0d",
             n_produce, n_lp_pending, n_lp_done, n_fwd);
    $display("out-of-order arrivals=%0d reorder-limit cycles=%0d CommQ-full cycles=%0d CommBuf-full cycles=%0d",
             n_ooo_arrival, n_block_cycles, n_commq_full, n_commbuf_full);
    $display("CONSUME waits=%0d (wake seen %0d) STORE_VAL stalls on SAB=%0d STORE_INV=%0d flushes SAB=%0d SVB=%0d mem refused=%0d",
             n_consume_wait, n_wake_match, n_sv_stall, n_inv, n_sab_flush, n_svb_flush, n_mem_refused);
    $display("link codes none=%0d int=%0d fp=%0d fp_se=%0d bits=%0d of %0d uncompressed (%0d%%)",
             n_codes[0], n_codes[1], n_codes[2], n_codes[3], link_bits, link_items*32,
             100 * link_bits / (link_items*32));
    check(n_produce > 0,       "PRODUCE happened");
    check(n_lp_pending > 0,    "terminal load partial commit before data happened");
    check(n_lp_done > 0,       "terminal load with data at commit happened");
    check(n_fwd > 0,           "decoupled store-to-load forwarding happened");
    check(n_ooo_arrival > 0,   "out-of-order terminal load commit happened");
    check(n_block_cycles > 0,  "reordering limit (deadlock avoidance) happened");
    check(n_commq_full > 0,    "CommQ full stall happened");
    check(n_commbuf_full > 0,  "CommBuf full stall happened");
    check(n_consume_wait > 0,  "CONSUME waiting for data happened");
    check(n_wake_match > 0,    "wake-up of a waiting CONSUME happened");
    check(n_sv_stall > 0,      "STORE_VAL waiting for STORE_ADDR retire happened");
    check(n_inv > 0,           "STORE_INV happened");
    check(n_sab_flush > 0 && n_svb_flush > 0, "wrong-path flushes happened");
    check(n_mem_refused > 0,   "memory back-pressure happened");
    check(n_dc_queries > 0,    "dependence checks happened");
    foreach (n_codes[k]) check(n_codes[k] > 0, $sformatf("link code %0d happened", k));
    check(link_bits < link_items * 32, "compression reduced link traffic");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (SuppD id %0d, CompD id %0d)", next_id_s, next_id_c);
    foreach (push_log[k]) if (push_log[k] == next_id_c) $display("  id %0d pushed at position %0d, partial commit at %0d", next_id_c, k, pc_log.exists(next_id_c) ? pc_log[next_id_c] : -1);
    for (int k = 0; k < 64; k++) $write("%0d%s ", dut.u_commbuf.id_q[k], dut.u_commbuf.vld_q[k] ? "" : "x");
    $display("");
    $display("  CommQ %0d CommBuf %0d TLB %0d SAB %0d SVB %0d block %0d pending %0d pr_valid %0d lp_valid %0d sa_al %0d sv_cm %0d",
             commq_count, commbuf_count, dut.u_tlb.count, dut.u_sab.count, dut.u_svb.count,
             dut.u_tlb.block_produce, pend.size(), pr_valid, lp_valid, sa_al_valid, sv_cm_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
