// tb_fvc_size_sweep: the FVC/FVT size study. The same value stream is sent
// through compressor/decompressor pairs with 16, 32, 64, 128 and 256 entries
// (4 ways, extended scheme), plus a 16-entry base-scheme pair for reference.
// Every pair is lossless (each decoded value is compared with the value sent),
// and the link bits each size needs are reported next to the uncompressed
// 32 bits per value.
//
// The stream has a working set larger than 16 entries, so larger tables hit
// more often while each hit costs one more index bit per doubling: the two
// effects that make the best size depend on the data. The checks are that
// every pair decodes exactly, that every table size compresses, and that the
// hit rate does not fall as the table grows. Codes are 2 + log2(entries) (+6
// or +23) bits as in the extended scheme; sizes are parameters of the
// compressor and decompressor, so this sweep uses the RTL unchanged.
module tb_fvc_size_sweep;
  import desc_pkg::*;

  localparam int NL = 6;                     // lanes: 5 sizes + base scheme
  localparam int NV = 20000;                 // values sent
  localparam int WS = 96;                    // working set of the stream

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic       in_valid;
  comm_item_t in_item;
  logic [NL-1:0]   c_in_ready, lk_valid, lk_ready, d_valid;
  link_word_t      lk_word [NL];
  logic [ID_W-1:0] d_id [NL];
  logic            d_fwd [NL];
  logic [DATA_W-1:0] d_data [NL];

  for (genvar g = 0; g < NL; g++) begin : L
    localparam int unsigned ENT = (g < 5) ? (16 << g) : 16;
    localparam bit          EXT = (g < 5);
    fv_compressor #(.EXTENDED(EXT), .ENTRIES(ENT)) u_c (
      .clk, .rst_n,
      .in_valid (in_valid), .in_ready (c_in_ready[g]), .in_item (in_item),
      .out_valid(lk_valid[g]), .out_ready(lk_ready[g]), .out_word(lk_word[g]));
    fv_decompressor #(.EXTENDED(EXT), .ENTRIES(ENT)) u_d (
      .clk, .rst_n,
      .in_valid (lk_valid[g]), .in_ready (lk_ready[g]), .in_word (lk_word[g]),
      .out_valid(d_valid[g]), .out_ready(1'b1),
      .out_id   (d_id[g]), .out_fwd(d_fwd[g]), .out_data(d_data[g]));
  end

  // stream with a working set of integer ranges and floats
  bit [DATA_W-1:0] ws [WS];
  function automatic void gen(output bit [DATA_W-1:0] v, output bit fp);
    int r, k;
    r = $urandom % 100;
    k = ($urandom % 4 == 0) ? $urandom % WS : $urandom % (WS / 4);  // skewed
    fp = k[0];
    if (r < 90) begin
      v = ws[k];
      if (!fp) v[5:0] = 6'($urandom);            // nearby integer
      else if (r >= 70) v[22:0] = 23'($urandom); // same exponent, new mantissa
    end else v = $urandom;
  endfunction

  bit [DATA_W-1:0] sent [int];
  longint bits [NL];
  int     hits [NL];
  int     got  [NL];

  always @(posedge clk) if (rst_n)
    for (int g = 0; g < NL; g++) begin
      if (lk_valid[g] && lk_ready[g]) begin
        bits[g] += lk_word[g].nbits;
        if (lk_word[g].kind != CMP_NONE) hits[g]++;
      end
      if (d_valid[g]) begin
        check(sent.exists(int'(d_id[g])) && d_data[g] == sent[int'(d_id[g])] && !d_fwd[g],
              $sformatf("lane %0d id %0d decoded %h", g, d_id[g], d_data[g]));
        got[g]++;
      end
    end

  initial begin
    bit [DATA_W-1:0] v;
    bit fp;
    foreach (ws[i]) ws[i] = (i % 2) ? {1'b0, 8'(120 + i % 12), 23'($urandom)}
                                    : 32'h0001_0000 + 32'(i) * 32'h1040;
    in_valid = 0; in_item = '0;
    for (int g = 0; g < NL; g++) begin bits[g] = 0; hits[g] = 0; got[g] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NV; n++) begin
      @(negedge clk);
      gen(v, fp);
      in_valid = 1;
      in_item.id = ID_W'(n); in_item.fwd = 0; in_item.fp = fp; in_item.data = v;
      sent[n % (1 << ID_W)] = v;
      #1;
      check(&c_in_ready, "every lane accepts one value per cycle");
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    for (int g = 0; g < NL; g++) begin
      $display("%s %3d entries: hit rate %0d%%, %0d bits = %0d%% of uncompressed",
               g < 5 ? "extended" : "base    ", g < 5 ? (16 << g) : 16,
               100 * hits[g] / NV, bits[g], 100 * bits[g] / (NV * 32));
      check(got[g] == NV, $sformatf("lane %0d decoded all %0d values", g, NV));
      check(bits[g] < NV * 32, "the table compresses");
      if (g > 0 && g < 5) check(hits[g] >= hits[g-1], "larger table hits at least as often");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
