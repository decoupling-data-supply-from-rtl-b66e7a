// fv_table: set-associative value store with true-LRU replacement, the
// storage shared by the frequent-value CAM (compression side) and the
// frequent-value table (decompression side).
//
// ENTRIES values of W bits are arranged as ENTRIES/WAYS sets of WAYS ways;
// entry index = set * WAYS + way, which is also the compressed code sent on
// the link. All contents are visible on val_o/vld_o so that the compressor
// can compare them in parallel (a CAM) and the decompressor can read one by
// index. Each set keeps an age per way (0 = most recently used); victim_o
// names the way with the largest age. Ages reset to 0..WAYS-1 so empty ways
// are filled before any valid value is evicted.
//
// One update per cycle (upd_en): upd_hit = 1 marks (upd_set, upd_way) most
// recently used; upd_hit = 0 writes upd_val into the set's victim way and
// marks it most recently used. Both sides of the link apply the same update
// sequence, so their tables stay identical. Results are visible the next
// cycle. LRU (rather than pseudo-LRU) is this design's choice; the text
// allows either.
module fv_table #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned W       = 32,
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              upd_en,
  input  logic                              upd_hit,
  input  logic [SET_W-1:0]                  upd_set,
  input  logic [WAY_W-1:0]                  upd_way,
  input  logic [W-1:0]                      upd_val,
  output logic [ENTRIES-1:0][W-1:0]         val_o,
  output logic [ENTRIES-1:0]                vld_o,
  output logic [SETS-1:0][WAY_W-1:0]        victim_o
);

  logic [ENTRIES-1:0][W-1:0]     val_q;
  logic [ENTRIES-1:0]            vld_q;
  logic [ENTRIES-1:0][WAY_W-1:0] age_q;

  assign val_o = val_q;
  assign vld_o = vld_q;

  always_comb begin
    for (int s = 0; s < SETS; s++) begin
      victim_o[s] = '0;
      for (int w = 0; w < WAYS; w++)
        if (age_q[s*WAYS+w] == WAY_W'(WAYS-1)) victim_o[s] = WAY_W'(w);
    end
  end

  logic [WAY_W-1:0] tway;
  assign tway = upd_hit ? upd_way : victim_o[upd_set];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      val_q <= '0;
      for (int e = 0; e < int'(ENTRIES); e++) age_q[e] <= WAY_W'(e % WAYS);
    end else if (upd_en) begin
      for (int w = 0; w < WAYS; w++) begin
        if (WAY_W'(w) == tway)
          age_q[int'(upd_set)*WAYS+w] <= '0;
        else if (age_q[int'(upd_set)*WAYS+w] < age_q[int'(upd_set)*WAYS+int'(tway)])
          age_q[int'(upd_set)*WAYS+w] <= age_q[int'(upd_set)*WAYS+w] + 1'b1;
      end
      if (!upd_hit) begin
        val_q[int'(upd_set)*WAYS+int'(tway)] <= upd_val;
        vld_q[int'(upd_set)*WAYS+int'(tway)] <= 1'b1;
      end
    end
  end

endmodule
