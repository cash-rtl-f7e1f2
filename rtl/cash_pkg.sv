// cash_pkg: shared constants and types of the criticality-aware split hybrid
// L1 data cache (CASH). Addresses are 64-bit-word addresses; a cache line
// holds WORDS_PER_LINE words. The line size (64 bytes), word size (64 bits)
// and address width (32-bit byte address) are this design's own choices;
// the capacities, associativities, latencies and table sizes used as module
// defaults come from the design description.
package cash_pkg;
  localparam int unsigned WORD_BITS      = 64;
  localparam int unsigned WORDS_PER_LINE = 8;                    // 64-byte line
  localparam int unsigned LINE_BITS      = WORD_BITS * WORDS_PER_LINE;
  localparam int unsigned WADDR_BITS     = 29;                   // 32-bit byte address
  localparam int unsigned WOFF_BITS      = $clog2(WORDS_PER_LINE);
  localparam int unsigned LADDR_BITS     = WADDR_BITS - WOFF_BITS;

  typedef logic [WORD_BITS-1:0]  word_t;
  typedef logic [LINE_BITS-1:0]  line_t;
  typedef logic [WADDR_BITS-1:0] waddr_t;
  typedef logic [LADDR_BITS-1:0] laddr_t;
  typedef logic [WOFF_BITS-1:0]  woff_t;

  // Request type held in each status holding register entry.
  typedef enum logic [1:0] {REQ_READ = 2'd0, REQ_WRITE = 2'd1, REQ_PREFETCH = 2'd2} req_type_e;

  // Where a core request was served from.
  typedef enum logic [2:0] {SRC_P0 = 3'd0, SRC_P1 = 3'd1, SRC_LWB = 3'd2, SRC_L2 = 3'd3,
                            SRC_WRITE = 3'd4} resp_src_e;

  // Destination partition of a line write buffer entry.
  typedef enum logic {DEST_P0 = 1'b0, DEST_P1 = 1'b1} dest_e;

  // Request sent to the L2: a line fetch or a write-through word.
  typedef enum logic {L2_FETCH = 1'b0, L2_WRITE = 1'b1} l2_kind_e;

  typedef struct packed {
    l2_kind_e kind;
    logic [3:0] id;          // SHR entry that issued it
    waddr_t   waddr;
    word_t    wdata;
  } l2_req_t;

  // One committed instruction, as recorded in the criticality predictor's
  // post-commit buffer.
  typedef struct packed {
    logic       is_load;
    laddr_t     laddr;       // line touched by the load
    logic [7:0] lat;         // execution latency in cycles
    logic [5:0] dep;         // distance back to the producer, 0 = none
  } commit_rec_t;

  // One pulse per cycle for each mechanism of the cache; used for statistics.
  typedef struct packed {
    logic core_stall;     // core request held back: SHR, LWB or L2 queue full
    logic lwb_hit;
    logic p0_hit;
    logic p1_hit;
    logic p1_abort;       // P1 lookup dropped because P0/L2 served first
    logic l2_abort;       // abort sent to L2 after a P1 hit
    logic l2_fill;
    logic place_p0;
    logic place_p1;
    logic bypass_dead;
    logic bypass_wi;
    logic place_drop;     // placement not attempted: LWB full
    logic migrate;        // P1 -> P0 line migration
    logic prefetch;       // prefetch request entered the SHR
    logic write_through;  // store sent to L2
  } cash_events_t;

  function automatic word_t line_word(line_t l, woff_t o);
    return l[o*WORD_BITS +: WORD_BITS];
  endfunction

  function automatic line_t line_merge(line_t l, woff_t o, word_t w);
    line_t r = l;
    r[o*WORD_BITS +: WORD_BITS] = w;
    return r;
  endfunction
endpackage
