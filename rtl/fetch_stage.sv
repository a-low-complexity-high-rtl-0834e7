// Fetch stage of the single-thread-per-cycle (1.X) SMT front end.
//
// Each cycle the ICOUNT selector names one thread (`sel_tid`). The stage
// takes the head of that thread's fetch target queue, reads the I-cache at
// the head's address (the line and the next one), aligns up to FETCH_W
// instructions of the stream and writes them, tagged with the thread and
// their addresses, into the fetch buffer. The FTQ head is consumed by the
// number fetched; a stream longer than FETCH_W takes several cycles.
//
// On a miss the thread gets a miss status register holding the missing line
// and is reported `blocked` until the line returns, so the selector skips
// it while other threads keep fetching. When only the second line misses,
// the part of the block in the first line is still fetched and the miss is
// raised in the same cycle. Refill requests leave one per cycle, round-robin
// over the threads; a thread missing on a line already requested for
// another thread waits for the same refill. The single-thread fetch, one
// access per cycle and blocking of missing threads follow the document; the
// miss handling details are this design's choices.
//
// Interface and timing: the I-cache read is combinational, the fetch buffer
// and FTQ are updated at the clock edge, so a block goes from FTQ head to
// fetch buffer in one cycle. The caller guarantees that the selected thread
// has a non-empty FTQ, is not blocked and that the fetch buffer has room for
// FETCH_W instructions. `kill`/`kill_tid` cancel this cycle's fetch of a
// thread that is being redirected. `mem_req_*` is a valid/ready request
// channel; `mem_resp_*` returns a whole line, which the caller also writes
// into the I-cache.
module fetch_stage
  import smt_fetch_pkg::*;
#(
  parameter int unsigned NTHREADS = 8,
  parameter int unsigned FETCH_W  = 16,
  parameter int unsigned LINE_W   = 16,
  localparam int unsigned TW      = (NTHREADS > 1) ? $clog2(NTHREADS) : 1,
  localparam int unsigned OFF_B   = $clog2(LINE_W),
  localparam int unsigned LA_W    = WA_W - OFF_B,
  localparam int unsigned WCW     = $clog2(FETCH_W + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sel_valid,
  input  logic [TW-1:0]              sel_tid,
  input  ftq_entry_t [NTHREADS-1:0]  ftq_head,
  output logic [NTHREADS-1:0]        ftq_consume,
  output slen_t                      ftq_consume_n,
  input  logic                       kill,
  input  logic [TW-1:0]              kill_tid,
  // I-cache read port
  output logic                       ic_rd_en,
  output waddr_t                     ic_rd_addr,
  input  logic                       ic_hit0,
  input  logic                       ic_hit1,
  input  insn_t [LINE_W-1:0]         ic_line0,
  input  insn_t [LINE_W-1:0]         ic_line1,
  // fetch buffer write port
  output logic [WCW-1:0]             fb_wr_cnt,
  output fb_entry_t [FETCH_W-1:0]    fb_wr_slot,
  // miss handling
  output logic [NTHREADS-1:0]        blocked,
  output logic                       mem_req_valid,
  output logic [LA_W-1:0]            mem_req_line,
  input  logic                       mem_req_ready,
  input  logic                       mem_resp_valid,
  input  logic [LA_W-1:0]            mem_resp_line,
  // events (for performance counting)
  output logic                       ev_miss,
  output logic                       ev_line_split
);

  typedef logic [LA_W-1:0] laddr_t;

  // ---------------- fetch ----------------
  ftq_entry_t        h;
  logic [OFF_B-1:0]  off;
  logic [WCW-1:0]    n_want, n_got;
  logic              need1, go;
  logic              miss;
  laddr_t            miss_line;
  insn_t [FETCH_W-1:0] al_insn;
  logic  [FETCH_W-1:0] al_valid;

  always_comb begin
    h      = ftq_head[sel_tid];
    off    = h.start[OFF_B-1:0];
    n_want = (h.len > slen_t'(FETCH_W)) ? WCW'(FETCH_W) : WCW'(h.len);
    need1  = (32'(off) + 32'(n_want)) > LINE_W;
    go     = sel_valid && !(kill && kill_tid == sel_tid);
  end

  always_comb begin
    miss      = 1'b0;
    miss_line = '0;
    n_got     = '0;
    if (go) begin
      if (!ic_hit0) begin
        miss      = 1'b1;
        miss_line = h.start[WA_W-1:OFF_B];
      end else if (need1 && !ic_hit1) begin
        miss      = 1'b1;
        miss_line = h.start[WA_W-1:OFF_B] + 1'b1;
        n_got     = WCW'(LINE_W - 32'(off));
      end else begin
        n_got     = n_want;
      end
    end
  end

  assign ic_rd_en      = go;
  assign ic_rd_addr    = h.start;
  assign ev_miss       = miss;
  assign ev_line_split = go && need1 && ic_hit0 && ic_hit1;

  fetch_align #(.FETCH_W(FETCH_W), .LINE_W(LINE_W)) u_align (
    .line0 (ic_line0),
    .line1 (ic_line1),
    .offset(off),
    .count (n_got),
    .insn  (al_insn),
    .valid (al_valid)
  );

  always_comb begin
    for (int unsigned i = 0; i < FETCH_W; i++) begin
      fb_wr_slot[i].valid     = al_valid[i];
      fb_wr_slot[i].tid       = 3'(sel_tid);
      fb_wr_slot[i].pc        = h.start + waddr_t'(i);
      fb_wr_slot[i].insn      = al_insn[i];
      fb_wr_slot[i].last      = (i + 1 == 32'(n_got)) && (slen_t'(n_got) == h.len);
      fb_wr_slot[i].pred_next = h.next;
      fb_wr_slot[i].stype     = h.stype;
      fb_wr_slot[i].sstart    = h.sstart;
      fb_wr_slot[i].ckpt      = h.ckpt;
    end
    fb_wr_cnt     = n_got;
    ftq_consume   = '0;
    ftq_consume_n = slen_t'(n_got);
    if (n_got != '0) ftq_consume[sel_tid] = 1'b1;
  end

  // ---------------- miss status registers ----------------
  logic   [NTHREADS-1:0] pend, reqd;
  laddr_t                mline [NTHREADS];
  logic                  dup;
  logic [TW-1:0]         rr, req_tid;
  logic                  req_any;

  // another thread already waits for the same line with its request sent
  always_comb begin
    dup = 1'b0;
    for (int unsigned t = 0; t < NTHREADS; t++)
      if (pend[t] && reqd[t] && mline[t] == miss_line) dup = 1'b1;
  end

  // round-robin choice of the next request
  always_comb begin
    req_any = 1'b0;
    req_tid = '0;
    for (int unsigned k = 0; k < NTHREADS; k++) begin
      logic [TW-1:0] t;
      t = TW'((32'(rr) + k) % NTHREADS);
      if (!req_any && pend[t] && !reqd[t]) begin
        req_any = 1'b1;
        req_tid = t;
      end
    end
  end

  assign mem_req_valid = req_any;
  assign mem_req_line  = mline[req_tid];
  assign blocked       = pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0;
      reqd <= '0;
      rr   <= '0;
      for (int unsigned t = 0; t < NTHREADS; t++) mline[t] <= '0;
    end else begin
      if (req_any && mem_req_ready) begin
        reqd[req_tid] <= 1'b1;
        // requests for the same line from other threads ride along
        for (int unsigned t = 0; t < NTHREADS; t++)
          if (pend[t] && mline[t] == mline[req_tid]) reqd[t] <= 1'b1;
        rr <= TW'((32'(req_tid) + 1) % NTHREADS);
      end
      if (mem_resp_valid)
        for (int unsigned t = 0; t < NTHREADS; t++)
          if (pend[t] && mline[t] == mem_resp_line) begin
            pend[t] <= 1'b0;
            reqd[t] <= 1'b0;
          end
      if (miss && !(mem_resp_valid && mem_resp_line == miss_line)) begin
        pend[sel_tid]  <= 1'b1;
        reqd[sel_tid]  <= dup;
        mline[sel_tid] <= miss_line;
      end
    end
  end

  a_sel_ok: assert property (@(posedge clk) disable iff (!rst_n) sel_valid |-> !pend[sel_tid])
    else $error("fetch_stage: selected a blocked thread");
endmodule
