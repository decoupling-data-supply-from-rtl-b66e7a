// tb_commq_size_sweep: the CommQ size study on the whole DeSC top. The
// CommBuf stays at 64 entries and the CommQ is sized so that CommQ + CommBuf
// is 128, 256 or 512 items; each configuration runs the same program:
// a stream of PRODUCEs and (every third item) LOAD_PRODUCEs whose memory
// latency is mostly short but sometimes 2000 cycles (a burst of memory
// queueing), consumed in order by a CompD whose compute time per item varies.
// Latencies and compute times are drawn once and shared by all
// configurations, so the runs differ only in the queue size.
//
// Every consumed value is checked; the cycles each configuration needs are
// reported. A larger queue holds more work for the CompD while a load is
// outstanding (the SuppD can never get more than N-1 = 63 items past it), so
// the check is that the largest configuration is not slower than the
// smallest.
module tb_commq_size_sweep;
  import desc_pkg::*;

  localparam int NC = 3;                     // configurations
  localparam int NI = 3000;                  // items per run
  localparam int unsigned SID_W = ST_ID_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int     lat  [NI];     // memory latency of item n (if it is a load)
  int     comp [NI];     // CompD cycles spent on item n
  longint done_cycle [NC];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  function automatic bit [DATA_W-1:0] value_of(int n);
    return DATA_W'(n) * 32'h9E37_79B9;
  endfunction

  for (genvar g = 0; g < NC; g++) begin : C
    localparam int unsigned QD = (g == 0) ? 64 : (g == 1) ? 192 : 448;

    logic              pr_valid, pr_ready, pr_fp, lp_valid, lp_ready, lp_fp, lp_done, lp_fwd;
    logic [ID_W-1:0]   pr_id, lp_id, cs_id, cc_id, wake_id;
    logic [DATA_W-1:0] pr_data, lp_data, ld_resp_data, mem_data, cs_data;
    logic [ADDR_W-1:0] lp_addr, mem_addr;
    logic [TAG_W-1:0]  lp_tag, ld_resp_tag;
    logic              ld_resp_valid, cs_hit, cc_valid, wake_valid, mem_valid;
    logic              sa_al_ready, sa_rt_ready, dc_match, dc_unknown, sv_al_ready, sv_cm_ready;
    logic [SID_W-1:0]  sa_al_st_id, sv_al_st_id;
    logic              link_valid;
    logic [5:0]        link_nbits;
    logic [$clog2(QD):0]            commq_count;
    logic [$clog2(COMMBUF_DEPTH):0] commbuf_count;

    desc_top #(.Q_DEPTH(QD)) dut (
      .clk, .rst_n,
      .pr_valid, .pr_ready, .pr_id, .pr_fp, .pr_data,
      .lp_valid, .lp_ready, .lp_id, .lp_addr, .lp_fp, .lp_tag, .lp_done, .lp_data, .lp_fwd,
      .ld_resp_valid, .ld_resp_tag, .ld_resp_data,
      .sa_al_valid(1'b0), .sa_al_ready, .sa_al_st_id,
      .sa_aw_valid(1'b0), .sa_aw_st_id('0), .sa_aw_addr('0),
      .sa_rt_valid(1'b0), .sa_rt_ready, .sa_fl_valid(1'b0), .sa_fl_st_id('0),
      .dc_addr('0), .dc_bound('0), .dc_match, .dc_unknown,
      .mem_valid, .mem_ready(1'b1), .mem_addr, .mem_data,
      .cs_id, .cs_hit, .cs_data, .cc_valid, .cc_id, .wake_valid, .wake_id,
      .sv_al_valid(1'b0), .sv_al_inv(1'b0), .sv_al_ready, .sv_al_st_id,
      .sv_wr_valid(1'b0), .sv_wr_st_id('0), .sv_wr_data('0),
      .sv_cm_valid(1'b0), .sv_cm_ready, .sv_fl_valid(1'b0), .sv_fl_st_id('0),
      .link_valid, .link_nbits, .commq_count, .commbuf_count);

    // memory: pending loads answered when due, one per cycle
    typedef struct { int tag; int n; longint due; } pend_t;
    pend_t pend [$];
    int    free_tags [$];
    always @(negedge clk) begin
      ld_resp_valid <= 1'b0;
      foreach (pend[i]) if (pend[i].due <= cyc) begin
        ld_resp_valid <= 1'b1;
        ld_resp_tag   <= TAG_W'(pend[i].tag);
        ld_resp_data  <= value_of(pend[i].n);
        free_tags.push_back(pend[i].tag);
        pend.delete(i);
        break;
      end
    end

    // SuppD
    initial begin
      pr_valid = 0; pr_id = 0; pr_fp = 0; pr_data = 0;
      lp_valid = 0; lp_id = 0; lp_addr = 0; lp_fp = 0; lp_tag = 0; lp_done = 0; lp_data = 0;
      ld_resp_valid = 0; ld_resp_tag = 0; ld_resp_data = 0;
      for (int t = 0; t < 64; t++) free_tags.push_back(t);
      wait (rst_n);
      for (int n = 0; n < NI; n++) begin
        @(negedge clk);
        if (n % 3 == 0) begin
          int tg;
          while (free_tags.size() == 0) @(negedge clk);
          tg = free_tags.pop_front();
          lp_valid = 1; lp_id = ID_W'(n); lp_addr = 32'h8000 + 4 * n; lp_tag = TAG_W'(tg);
          #1;
          while (!lp_ready) begin @(negedge clk); #1; end
          begin
            pend_t p;
            p.tag = tg; p.n = n; p.due = cyc + lat[n];
            pend.push_back(p);
          end
          @(negedge clk); lp_valid = 0;
        end else begin
          pr_valid = 1; pr_id = ID_W'(n); pr_data = value_of(n);
          #1;
          while (!pr_ready) begin @(negedge clk); #1; end
          @(negedge clk); pr_valid = 0;
        end
      end
    end

    // CompD
    initial begin
      cs_id = 0; cc_valid = 0; cc_id = 0;
      wait (rst_n);
      for (int n = 0; n < NI; n++) begin
        @(negedge clk);
        cs_id = ID_W'(n);
        #1;
        while (!cs_hit) begin @(negedge clk); #1; end
        check(cs_data == value_of(n), $sformatf("config %0d item %0d: %h", g, n, cs_data));
        cc_valid = 1; cc_id = ID_W'(n);
        @(negedge clk);
        cc_valid = 0;
        repeat (comp[n]) @(negedge clk);
      end
      done_cycle[g] = cyc;
    end
  end

  initial begin
    for (int n = 0; n < NI; n++) begin
      lat[n]  = ($urandom % 60 == 0) ? 2000 : 2 + $urandom % 20;
      comp[n] = $urandom % 4;
    end
    for (int g = 0; g < NC; g++) done_cycle[g] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cycle[0] != 0 && done_cycle[1] != 0 && done_cycle[2] != 0);
    for (int g = 0; g < NC; g++)
      $display("CommQ %0d + CommBuf 64 = %0d items: %0d cycles for %0d items",
               g == 0 ? 64 : g == 1 ? 192 : 448, (g == 0 ? 64 : g == 1 ? 192 : 448) + 64,
               done_cycle[g], NI);
    check(done_cycle[NC-1] <= done_cycle[0], "the largest queue is not slower than the smallest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
