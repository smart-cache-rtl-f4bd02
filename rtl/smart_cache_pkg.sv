// smart_cache_pkg - constants and types shared by the smart data-cache blocks.
//
// The hierarchy moves whole cache lines between its levels over one line-wide
// request/response bus (mem_req_t / mem_resp_t) with a byte-strobe per line
// byte, so a single word can be written through it as well as a full line.
// Every request on that bus receives exactly one response (load data or a
// write acknowledgement); the requester raises valid and holds it until the
// receiver's ready, and then waits for resp.valid.
//
// The CPU tags every access with an access class, the way an annotated load or
// store instruction would: normal accesses go to the way-partitioned L1,
// bypass accesses skip the L1 and go straight to the next level, and mini
// accesses go to the small direct-mapped mini-cache.  The TLB entry carries,
// besides the translation, the per-page way bit vector that selects which L1
// ways an access may read and replace.
//
// Line size (32 bytes), page size (4 KB) and the 32-bit addresses are this
// design's choices; the original proposal gives only the cache sizes and ways.
package smart_cache_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);
  localparam int unsigned WSEL_W     = OFF_W - 2;          // word within a line
  localparam int unsigned PAGE_BITS  = 12;                 // 4 KB pages
  localparam int unsigned VPN_W      = ADDR_W - PAGE_BITS;
  localparam int unsigned L1_WAYS    = 4;                  // width of the way bit vector

  typedef logic [ADDR_W-1:0]     addr_t;
  typedef logic [WORD_W-1:0]     word_t;
  typedef logic [LINE_BITS-1:0]  line_t;
  typedef logic [LINE_BYTES-1:0] line_be_t;
  typedef logic [L1_WAYS-1:0]    way_vec_t;

  // Access class carried by the CPU request.
  typedef enum logic [1:0] {
    CLS_NORMAL = 2'd0,   // way-partitioned L1
    CLS_BYPASS = 2'd1,   // straight to the next level
    CLS_MINI   = 2'd2    // mini-cache
  } acc_class_e;

  // Line-wide bus between levels.
  typedef struct packed {
    logic     valid;
    logic     write;
    addr_t    addr;    // line aligned
    line_be_t be;      // byte strobes for a write
    line_t    wdata;
  } mem_req_t;

  typedef struct packed {
    logic  valid;
    line_t rdata;      // line data for a read, don't care for a write
  } mem_resp_t;

  // TLB entry: translation plus the way bit vector (bit i enables way i).
  typedef struct packed {
    logic                 valid;
    logic [VPN_W-1:0]     vpn;
    logic [VPN_W-1:0]     ppn;
    way_vec_t             ways;
  } tlb_entry_t;

  // Select word `sel` of a line.
  function automatic word_t line_word(line_t l, logic [WSEL_W-1:0] sel);
    return l[sel*WORD_W +: WORD_W];
  endfunction

  // Place a word and its byte enables at word position `sel` of a line.
  function automatic line_t word_to_line(word_t w);
    line_t l;
    for (int i = 0; i < LINE_BITS / WORD_W; i++) l[i*WORD_W +: WORD_W] = w;
    return l;
  endfunction

  function automatic line_be_t be_to_line(logic [3:0] be, logic [WSEL_W-1:0] sel);
    line_be_t m;
    m = '0;
    m[sel*4 +: 4] = be;
    return m;
  endfunction

  // Merge `nw` into `old` where `be` is set.
  function automatic line_t merge_line(line_t old, line_t nw, line_be_t be);
    line_t r;
    for (int b = 0; b < LINE_BYTES; b++) r[b*8 +: 8] = be[b] ? nw[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

endpackage
