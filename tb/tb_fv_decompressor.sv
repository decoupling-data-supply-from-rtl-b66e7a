// tb_fv_decompressor: self-checking test of fv_decompressor in the extended
// (default) and base schemes. Link words are produced by the reference
// encoder from a value stream with locality and fed to the decompressor under
// random back-pressure on both sides; every decoded item (id, fwd, value)
// must equal the value that was encoded. Checks the one-cycle decode latency
// and that every code of each scheme was exercised.
module tb_fv_decompressor;
  import desc_pkg::*;
  import fv_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic              in_valid [2], in_ready [2], out_valid [2], out_ready [2], out_fwd [2];
  link_word_t        in_word [2];
  logic [ID_W-1:0]   out_id [2];
  logic [DATA_W-1:0] out_data [2];

  fv_decompressor dut_ext (.clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_word(in_word[0]), .out_valid(out_valid[0]), .out_ready(out_ready[0]),
    .out_id(out_id[0]), .out_fwd(out_fwd[0]), .out_data(out_data[0]));
  fv_decompressor #(.EXTENDED(1'b0)) dut_base (.clk, .rst_n, .in_valid(in_valid[1]),
    .in_ready(in_ready[1]), .in_word(in_word[1]), .out_valid(out_valid[1]),
    .out_ready(out_ready[1]), .out_id(out_id[1]), .out_fwd(out_fwd[1]), .out_data(out_data[1]));

  fv_model    enc_m [2];
  value_gen   gen;
  comm_item_t sent_q [2][$];
  int         kinds [2][4];
  bit         took [2];

  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      took[d] = in_valid[d] && in_ready[d];
      if (in_valid[d] && in_ready[d]) kinds[d][in_word[d].kind]++;
      if (out_valid[d] && out_ready[d]) begin
        comm_item_t s;
        s = sent_q[d].pop_front();
        check(out_id[d] == s.id && out_fwd[d] == s.fwd && out_data[d] == s.data,
              $sformatf("dut%0d got id %0d data %h, expected id %0d data %h",
                        d, out_id[d], out_data[d], s.id, s.data));
      end
    end
  end

  // Present a new encoded word whenever the previous one was taken.
  task automatic drive(int d, int n);
    int c;
    bit have;
    c = 0; have = 0;
    while (c < n) begin
      if (!have || took[d]) begin
        bit [DATA_W-1:0] v; bit fp; cmp_kind_e kd; bit [DATA_W-1:0] pl; int nb;
        comm_item_t it;
        if (have) c++;
        gen.next(v, fp);
        it.id = ID_W'(c); it.fp = fp; it.data = v; it.fwd = ($urandom % 20) == 0;
        enc_m[d].encode(v, fp, it.fwd, kd, pl, nb);
        in_word[d] = '0;
        in_word[d].id = it.id; in_word[d].fwd = it.fwd; in_word[d].kind = kd;
        in_word[d].payload = pl; in_word[d].nbits = 6'(nb);
        sent_q[d].push_back(it);
        have = 1;
      end
      in_valid[d]  = 1;
      out_ready[d] = ($urandom % 4) != 0;
      @(negedge clk);
    end
    in_valid[d] = 0; out_ready[d] = 1;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      in_valid[d] = 0; out_ready[d] = 1; in_word[d] = '0; kinds[d] = '{0, 0, 0, 0};
    end
    enc_m[0] = new(1); enc_m[1] = new(0);
    gen = new();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: an uncompressed word is decoded one cycle later
    in_word[0] = '0; in_word[0].id = 12'd5; in_word[0].kind = CMP_NONE;
    in_word[0].payload = 32'hCAFE_0040;
    sent_q[0].push_back('{id: 12'd5, fwd: 1'b0, fp: 1'b0, data: 32'hCAFE_0040});
    in_valid[0] = 1;
    @(negedge clk);
    in_valid[0] = 0;
    check(out_valid[0] && out_id[0] == 12'd5 && out_data[0] == 32'hCAFE_0040,
          "uncompressed word decoded one cycle after acceptance");
    // an integer hit on it: same set ([7:6] = 01), way 3 -> index 7, low bits 0x2A
    in_word[0].id = 12'd6; in_word[0].kind = CMP_INT;
    in_word[0].payload = 32'((7 << 6) | 6'h2A);
    sent_q[0].push_back('{id: 12'd6, fwd: 1'b0, fp: 1'b0, data: 32'hCAFE_006A});
    in_valid[0] = 1;
    @(negedge clk);
    in_valid[0] = 0;
    check(out_valid[0] && out_data[0] == 32'hCAFE_006A, $sformatf("integer hit rebuilt %h", out_data[0]));
    @(negedge clk);
    // restart the extended decoder's reference from the same table state
    void'(enc_m[0].decode(CMP_NONE, 32'hCAFE_0040, 1'b0));
    void'(enc_m[0].decode(CMP_INT, 32'((7 << 6) | 6'h2A), 1'b0));
    fork
      drive(0, 5000);
      drive(1, 5000);
    join
    for (int d = 0; d < 2; d++) check(sent_q[d].size() == 0, $sformatf("dut%0d all items out", d));
    check(kinds[0][0] > 0 && kinds[0][1] > 0 && kinds[0][2] > 0 && kinds[0][3] > 0,
          "extended decoder saw all four codes");
    check(kinds[1][0] > 0 && kinds[1][1] > 0, "base decoder saw both codes");
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
