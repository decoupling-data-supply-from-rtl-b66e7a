// tb_fv_codec: self-checking test of fv_compressor, in both the extended
// (default) and the base scheme. A stream of values with locality is pushed
// through each compressor under random link back-pressure; every link word
// (kind, payload, size) is compared with the reference model, and every word
// is decoded by a reference decoder to check that the original value comes
// back. Checks the one-cycle encode latency, and that every code the scheme
// defines occurs.
module tb_fv_codec;
  import desc_pkg::*;
  import fv_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // two DUTs: extended (default) and base scheme
  logic       in_valid [2], in_ready [2], out_valid [2], out_ready [2];
  comm_item_t in_item [2];
  link_word_t out_word [2];

  fv_compressor dut_ext (.clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_item(in_item[0]), .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_word(out_word[0]));
  fv_compressor #(.EXTENDED(1'b0)) dut_base (.clk, .rst_n, .in_valid(in_valid[1]),
    .in_ready(in_ready[1]), .in_item(in_item[1]), .out_valid(out_valid[1]),
    .out_ready(out_ready[1]), .out_word(out_word[1]));

  fv_model   enc_m [2];
  fv_model   dec_m [2];
  value_gen  gen;
  link_word_t exp_q [2][$];
  comm_item_t sent_q [2][$];
  int kinds [2][4];
  int bits_sent [2];
  int items [2];

  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (in_valid[d] && in_ready[d]) begin
        link_word_t e;
        cmp_kind_e  kd;
        bit [DATA_W-1:0] pl;
        int nb;
        enc_m[d].encode(in_item[d].data, in_item[d].fp, in_item[d].fwd, kd, pl, nb);
        e = '0; e.id = in_item[d].id; e.fwd = in_item[d].fwd; e.kind = kd;
        e.payload = pl; e.nbits = 6'(nb);
        exp_q[d].push_back(e);
        sent_q[d].push_back(in_item[d]);
      end
      if (out_valid[d] && out_ready[d]) begin
        link_word_t e;
        comm_item_t s;
        bit [DATA_W-1:0] back;
        e = exp_q[d].pop_front();
        s = sent_q[d].pop_front();
        check(out_word[d] == e, $sformatf("dut%0d word %p expected %p", d, out_word[d], e));
        back = dec_m[d].decode(out_word[d].kind, out_word[d].payload, out_word[d].fwd);
        check(back == s.data, $sformatf("dut%0d round trip %h -> %h", d, s.data, back));
        kinds[d][out_word[d].kind]++;
        bits_sent[d] += out_word[d].nbits;
        items[d]++;
      end
    end
  end

  task automatic drive(int d, int n);
    for (int c = 0; c < n; c++) begin
      bit [DATA_W-1:0] v;
      bit fp;
      gen.next(v, fp);
      in_valid[d] = ($urandom % 4) != 0;
      in_item[d].id = ID_W'(c); in_item[d].fp = fp; in_item[d].data = v;
      in_item[d].fwd = ($urandom % 20) == 0;
      out_ready[d] = ($urandom % 4) != 0;
      @(negedge clk);
    end
    in_valid[d] = 0; out_ready[d] = 1;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      in_valid[d] = 0; out_ready[d] = 1; in_item[d] = '0;
      kinds[d] = '{0, 0, 0, 0}; bits_sent[d] = 0; items[d] = 0;
    end
    enc_m[0] = new(1); dec_m[0] = new(1);
    enc_m[1] = new(0); dec_m[1] = new(0);
    gen = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: one item, seen on the link one cycle later
    in_item[0] = '{id: 12'd7, fwd: 1'b0, fp: 1'b0, data: 32'h0000_1234};
    in_valid[0] = 1;
    @(negedge clk);
    in_valid[0] = 0;
    check(out_valid[0] && out_word[0].id == 12'd7 && out_word[0].kind == CMP_NONE,
          "first value leaves uncompressed one cycle after acceptance");
    @(negedge clk);
    // the same value again (low bits differ): integer hit, 12 link bits
    in_item[0] = '{id: 12'd8, fwd: 1'b0, fp: 1'b0, data: 32'h0000_1239};
    in_valid[0] = 1;
    @(negedge clk);
    in_valid[0] = 0;
    check(out_valid[0] && out_word[0].kind == CMP_INT && out_word[0].nbits == 6'd12,
          "near value compresses to 2+4+6 bits");
    @(negedge clk);
    fork
      drive(0, 6000);
      drive(1, 6000);
    join
    for (int d = 0; d < 2; d++) begin
      check(exp_q[d].size() == 0, $sformatf("dut%0d all words seen", d));
      $display("dut%0d: items=%0d none=%0d int=%0d fp=%0d fp_se=%0d bits=%0d (uncompressed %0d)",
               d, items[d], kinds[d][0], kinds[d][1], kinds[d][2], kinds[d][3],
               bits_sent[d], items[d]*32);
    end
    check(kinds[0][0] > 0 && kinds[0][1] > 0 && kinds[0][2] > 0 && kinds[0][3] > 0,
          "extended scheme used all four codes");
    check(kinds[1][0] > 0 && kinds[1][1] > 0 && kinds[1][2] == 0 && kinds[1][3] == 0,
          "base scheme used only its two codes");
    check(bits_sent[0] < items[0]*32 && bits_sent[1] < items[1]*32, "traffic reduced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
