// Shared types and constants of the SMT stream fetch front end.
//
// Addresses are kept as word addresses (byte address bits [31:2]) because
// every instruction is 4 bytes wide. A stream is a run of sequential
// instructions from the target of a taken branch up to and including the
// next taken branch; it is described by its start word address, its length
// in instructions and the address it continues at.
//
// The path history used to index the second level of the stream predictor
// follows a DOLC 16-2-4-10 scheme: it remembers the start addresses of the
// last 16 streams, keeping 4 bits of the most recent one and 2 bits of each
// of the 15 older ones; the current start address adds 10 bits when the
// index is formed. The 32-bit address and instruction widths, the 6-bit
// stream length and the stream end types are this design's own choices.
package smt_fetch_pkg;

  localparam int unsigned ADDR_W  = 32;            // byte address width
  localparam int unsigned WA_W    = ADDR_W - 2;    // word address width
  localparam int unsigned INSN_W  = 32;            // instruction width
  localparam int unsigned LEN_W   = 6;             // stream length field
  localparam int unsigned MAX_LEN = (1 << LEN_W) - 1;
  localparam int unsigned SEQ_LEN = 16;            // length predicted on a predictor miss

  // DOLC history geometry
  localparam int unsigned DOLC_D = 16;
  localparam int unsigned DOLC_O = 2;
  localparam int unsigned DOLC_L = 4;
  localparam int unsigned DOLC_C = 10;
  localparam int unsigned HIST_W = (DOLC_D - 1) * DOLC_O + DOLC_L;   // 34

  typedef logic [WA_W-1:0]   waddr_t;
  typedef logic [INSN_W-1:0] insn_t;
  typedef logic [LEN_W-1:0]  slen_t;

  // How a stream ends. SEQ: no taken branch inside the predicted length
  // (predictor miss, or a stream split because it is longer than MAX_LEN).
  typedef enum logic [1:0] {
    ST_SEQ    = 2'd0,
    ST_BRANCH = 2'd1,
    ST_CALL   = 2'd2,
    ST_RETURN = 2'd3
  } stype_e;

  // Path history: older[0] is the oldest of the 15 older streams.
  typedef struct packed {
    logic [DOLC_D-2:0][DOLC_O-1:0] older;
    logic [DOLC_L-1:0]             last;
  } hist_t;

  // State needed to restart a thread's predictor at the end of a stream.
  typedef struct packed {
    hist_t      hist;     // history before this stream was predicted
    logic [5:0] ras_tos;  // RAS pointer before this stream was predicted
  } ckpt_t;

  // One predicted stream waiting in a fetch target queue.
  typedef struct packed {
    waddr_t start;        // next word to fetch (advances as the head is consumed)
    slen_t  len;          // instructions left in the stream
    waddr_t next;         // predicted start of the following stream
    stype_e stype;        // predicted end type
    waddr_t sstart;       // original start of the stream
    ckpt_t  ckpt;
  } ftq_entry_t;

  // One instruction in the fetch buffer and on the decode interface.
  typedef struct packed {
    logic       valid;
    logic [2:0] tid;
    waddr_t     pc;
    insn_t      insn;
    logic       last;     // last instruction of its predicted stream
    waddr_t     pred_next;// predicted next stream start (meaningful when last)
    stype_e     stype;
    waddr_t     sstart;   // start of the stream the instruction belongs to
    ckpt_t      ckpt;
  } fb_entry_t;

  // Event pulses of the front end, one bit per mechanism, for counting.
  typedef struct packed {
    logic pred;        // a stream was predicted
    logic pred_l1;     // ... from the first-level table
    logic pred_l2;     // ... from the second-level (path) table
    logic fetch;       // a block was written into the fetch buffer
    logic fetch_full;  // the block had FETCH_W instructions
    logic line_split;  // the block spanned two cache lines
    logic ic_miss;     // an I-cache miss blocked a thread
    logic fb_stall;    // a thread could fetch but the fetch buffer lacked room
    logic ftq_full;    // an active thread could not be predicted: FTQ full
    logic redirect;    // a thread was redirected by the back end
  } fe_events_t;

  // Shift a stream start address into a path history.
  function automatic hist_t hist_push(hist_t h, waddr_t start);
    hist_t n;
    n.older = {h.older[DOLC_D-3:0], h.last[DOLC_O-1:0]};
    n.last  = start[DOLC_L-1:0];
    return n;
  endfunction

  // Second-level index: XOR-fold of the history and DOLC_C bits of the
  // current start address into IDX_BITS bits.
  function automatic logic [15:0] dolc_fold(hist_t h, waddr_t start, int unsigned idx_bits);
    logic [HIST_W+DOLC_C-1:0] cat;
    logic [15:0] acc;
    cat = {h, start[DOLC_C-1:0]};
    acc = '0;
    for (int unsigned i = 0; i < HIST_W + DOLC_C; i++)
      acc[i % idx_bits] = acc[i % idx_bits] ^ cat[i];
    return acc;
  endfunction

endpackage
