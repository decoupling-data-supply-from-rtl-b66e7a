// desc_pkg: shared sizes and types of the decoupled supply-compute (DeSC)
// communication hardware.
//
// The supplier device (SuppD) sends values to the computation device (CompD)
// through a communication queue (CommQ) and a communication buffer (CommBuf);
// stores travel back through a store address buffer (SAB) on the SuppD and a
// store value buffer (SVB) on the CompD. The sizes below are the evaluated
// configuration: 512-item CommQ, 64-entry CommBuf, 32-entry terminal load
// buffer, 128-entry SAB and SVB, 4-bit forward counters, a 16-entry 4-way
// frequent-value CAM with k = 6 discarded low bits, and a 4-entry table for
// the 9 sign/exponent bits of single-precision values. Widths of ids,
// addresses and memory tags are this design's own choices.
package desc_pkg;

  localparam int unsigned DATA_W        = 32;   // value width (32-bit FVC entries)
  localparam int unsigned ADDR_W        = 32;   // memory address width (assumed)
  localparam int unsigned ID_W          = 12;   // program-order id of PRODUCE/CONSUME (assumed)
  localparam int unsigned TAG_W         = 6;    // SuppD memory request tag (assumed)
  localparam int unsigned COMMQ_DEPTH   = 512;
  localparam int unsigned COMMBUF_DEPTH = 64;
  localparam int unsigned TLB_DEPTH     = 32;
  localparam int unsigned SAB_DEPTH     = 128;
  localparam int unsigned SVB_DEPTH     = 128;
  localparam int unsigned FWD_CNT_W     = 4;    // per-store forward counter ("e.g., 4bit")
  localparam int unsigned FVC_ENTRIES   = 16;
  localparam int unsigned FVC_WAYS      = 4;
  localparam int unsigned FVC_K         = 6;    // low bits discarded for integers
  localparam int unsigned FPC_ENTRIES   = 4;    // sign/exponent table, fully associative
  localparam int unsigned FP_SE_W       = 9;    // sign + exponent bits of a float

  // Store id: global count of stores, unique over every store that can be
  // live in the SAB and the SVB together (two buffers of 128 -> 2 extra bits).
  localparam int unsigned ST_ID_W = $clog2(SAB_DEPTH) + 2;

  // One item of the communication path. When fwd is set, data holds the
  // st_id of the store whose value the CONSUME must read from the SVB.
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic              fwd;
    logic              fp;     // value is single-precision floating point
    logic [DATA_W-1:0] data;
  } comm_item_t;

  // Compression indicator of the extended scheme. The base scheme uses only
  // CMP_NONE and CMP_INT (one bit: compressed or not).
  typedef enum logic [1:0] {
    CMP_NONE  = 2'b00,  // value sent whole
    CMP_INT   = 2'b01,  // integer: FVC index + low k bits (base scheme: index only)
    CMP_FP    = 2'b10,  // float: FVC index only
    CMP_FP_SE = 2'b11   // float: sign/exponent index + 23-bit mantissa
  } cmp_kind_e;

  // One word on the SuppD -> CompD link. payload holds the encoded bits,
  // right-aligned; nbits is how many link bits the item occupies (indicator
  // bits and payload, not counting id and fwd). nbits is bookkeeping for
  // traffic measurement and is not itself sent.
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic              fwd;
    cmp_kind_e         kind;
    logic [DATA_W-1:0] payload;
    logic [5:0]        nbits;
  } link_word_t;

endpackage
