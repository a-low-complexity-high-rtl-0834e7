// SMT front end that fetches many instructions from one thread per cycle.
//
// Instead of sharing the fetch stage between two threads in a cycle (which
// needs a predictor port, an I-cache port, bank-conflict logic and an
// alignment network per thread), this front end fetches from a single
// thread each cycle and makes that one thread's fetch wide enough: a stream
// predictor names whole instruction streams (from a taken-branch target to
// the next taken branch, across any number of not-taken branches), so one
// prediction can supply a full 16-instruction fetch block. This is the
// ICOUNT.1.16 organisation: up to 16 instructions from 1 thread.
//
// The front end is decoupled into two stages:
//   prediction  the ICOUNT selector (using last cycle's counts) picks a
//               thread whose FTQ has room; stream_pred_stage predicts its
//               next stream and appends it to that thread's FTQ.
//   fetch       the ICOUNT selector picks, among threads with a non-empty
//               FTQ that are not waiting on an I-cache miss, the one with
//               the fewest instructions in decode/rename/dispatch;
//               fetch_stage reads the single-ported I-cache for it, aligns
//               up to 16 instructions and writes them into the 32-entry
//               fetch buffer, which feeds decode 8 instructions per cycle.
// Fetch stalls while the fetch buffer has less than FETCH_W free slots.
//
// Back-end interface: the back end checks each stream's predicted
// successor (`pred_next` on the stream's last instruction) and on a
// misprediction drives `redir_*` with the correct address and the
// checkpoint carried by the instructions; this flushes the thread's FTQ and
// fetch-buffer entries and restarts its prediction. It trains the predictor
// through `upd_*` and reports instructions leaving dispatch (or squashed)
// per thread on `icount_dec`. A thread is idle until its first redirect,
// which gives its start address. I-cache refills use `mem_req_*` (valid /
// ready) and `mem_resp_*` (one whole line).
//
// Sizes follow the document's main configuration; NTHREADS is at most 8
// (the thread id is 3 bits wide in the instruction record).
module smt_fetch_unit
  import smt_fetch_pkg::*;
#(
  parameter int unsigned NTHREADS   = 8,
  parameter int unsigned FETCH_W    = 16,
  parameter int unsigned DECODE_W   = 8,
  parameter int unsigned FBUF_DEPTH = 32,
  parameter int unsigned FTQ_DEPTH  = 4,
  parameter int unsigned RAS_DEPTH  = 64,
  parameter int unsigned IC_BYTES   = 32768,
  parameter int unsigned IC_WAYS    = 2,
  parameter int unsigned L1_ENTRIES = 1024,
  parameter int unsigned L2_ENTRIES = 4096,
  parameter int unsigned SP_WAYS    = 4,
  localparam int unsigned TW        = (NTHREADS > 1) ? $clog2(NTHREADS) : 1,
  localparam int unsigned LINE_W    = 16,
  localparam int unsigned LA_W      = WA_W - $clog2(LINE_W),
  localparam int unsigned RCW       = $clog2(DECODE_W + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // redirect
  input  logic                          redir_valid,
  input  logic [TW-1:0]                 redir_tid,
  input  waddr_t                        redir_pc,
  input  ckpt_t                         redir_ckpt,
  input  waddr_t                        redir_sstart,
  // predictor training
  input  logic                          upd_valid,
  input  waddr_t                        upd_addr,
  input  hist_t                         upd_hist,
  input  slen_t                         upd_len,
  input  waddr_t                        upd_target,
  input  stype_e                        upd_type,
  // ICOUNT feedback
  input  logic [NTHREADS-1:0][7:0]      icount_dec,
  // decode interface
  input  logic                          dec_ready,
  output fb_entry_t [DECODE_W-1:0]      dec_slot,
  output logic [RCW-1:0]                dec_cnt,
  // I-cache refill
  output logic                          mem_req_valid,
  output logic [LA_W-1:0]               mem_req_line,
  input  logic                          mem_req_ready,
  input  logic                          mem_resp_valid,
  input  logic [LA_W-1:0]               mem_resp_line,
  input  insn_t [LINE_W-1:0]            mem_resp_data,
  // status
  output logic [NTHREADS-1:0][7:0]      icount,
  output fe_events_t                    events
);

  localparam int unsigned FCW = $clog2(FBUF_DEPTH + 1);
  localparam int unsigned QCW = $clog2(FTQ_DEPTH + 1);

  logic [TW-1:0] rr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rr <= '0;
    else        rr <= TW'((32'(rr) + 1) % NTHREADS);

  // ---------------- ICOUNT ----------------
  logic [NTHREADS-1:0][3:0] inc;
  logic [NTHREADS-1:0][7:0] icount_q;

  always_comb begin
    inc = '0;
    for (int unsigned i = 0; i < DECODE_W; i++)
      if (dec_ready && dec_slot[i].valid)
        inc[dec_slot[i].tid[TW-1:0]] = inc[dec_slot[i].tid[TW-1:0]] + 4'd1;
  end

  icount_counters #(.NTHREADS(NTHREADS), .CNT_W(8), .INC_W(4)) u_cnt (
    .clk, .rst_n, .inc, .dec(icount_dec), .counts(icount)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) icount_q <= '0;
    else        icount_q <= icount;

  // ---------------- prediction stage ----------------
  logic [NTHREADS-1:0] active, ftq_full, ftq_empty, pred_elig, ftq_push;
  logic                psel_valid;
  logic [TW-1:0]       psel_tid;
  ftq_entry_t          pred_entry;
  logic                ev_pred, ev_l1, ev_l2;

  assign pred_elig = active & ~ftq_full;

  icount_select #(.NTHREADS(NTHREADS), .CNT_W(8)) u_psel (
    .eligible(pred_elig), .counts(icount_q), .rr_ptr(rr),
    .sel_valid(psel_valid), .sel_tid(psel_tid)
  );

  stream_pred_stage #(
    .NTHREADS(NTHREADS), .RAS_DEPTH(RAS_DEPTH),
    .L1_ENTRIES(L1_ENTRIES), .L2_ENTRIES(L2_ENTRIES), .SP_WAYS(SP_WAYS)
  ) u_pred (
    .clk, .rst_n,
    .sel_valid(psel_valid), .sel_tid(psel_tid),
    .ftq_push, .ftq_entry(pred_entry), .active,
    .redir_valid, .redir_tid, .redir_pc, .redir_ckpt, .redir_sstart,
    .upd_valid, .upd_addr, .upd_hist, .upd_len, .upd_target, .upd_type,
    .ev_pred, .ev_hit_l1(ev_l1), .ev_hit_l2(ev_l2)
  );

  // ---------------- fetch target queues ----------------
  ftq_entry_t [NTHREADS-1:0] ftq_head;
  logic       [NTHREADS-1:0] ftq_consume;
  slen_t                     ftq_consume_n;

  for (genvar t = 0; t < NTHREADS; t++) begin : g_ftq
    logic [QCW-1:0] cnt_unused;
    ftq #(.DEPTH(FTQ_DEPTH)) u_ftq (
      .clk, .rst_n,
      .flush    (redir_valid && redir_tid == TW'(t)),
      .push     (ftq_push[t]),
      .push_data(pred_entry),
      .consume  (ftq_consume[t]),
      .consume_n(ftq_consume_n),
      .head     (ftq_head[t]),
      .empty    (ftq_empty[t]),
      .full     (ftq_full[t]),
      .count    (cnt_unused)
    );
  end

  // ---------------- fetch stage ----------------
  logic [NTHREADS-1:0] blocked, fetch_ready, fetch_elig;
  logic                fsel_valid;
  logic [TW-1:0]       fsel_tid;
  logic [FCW-1:0]      fb_room;
  logic                fb_has_room;
  logic                ic_rd_en, ic_hit0, ic_hit1;
  waddr_t              ic_rd_addr;
  insn_t [LINE_W-1:0]  ic_line0, ic_line1;
  logic [$clog2(FETCH_W+1)-1:0] fb_wr_cnt;
  fb_entry_t [FETCH_W-1:0]      fb_wr_slot;
  logic                ev_miss, ev_split;

  assign fb_has_room = fb_room >= FCW'(FETCH_W);
  always_comb begin
    fetch_ready = active & ~ftq_empty & ~blocked;
    if (redir_valid) fetch_ready[redir_tid] = 1'b0;
    fetch_elig = fb_has_room ? fetch_ready : '0;
  end

  icount_select #(.NTHREADS(NTHREADS), .CNT_W(8)) u_fsel (
    .eligible(fetch_elig), .counts(icount), .rr_ptr(rr),
    .sel_valid(fsel_valid), .sel_tid(fsel_tid)
  );

  fetch_stage #(.NTHREADS(NTHREADS), .FETCH_W(FETCH_W), .LINE_W(LINE_W)) u_fetch (
    .clk, .rst_n,
    .sel_valid(fsel_valid), .sel_tid(fsel_tid),
    .ftq_head, .ftq_consume, .ftq_consume_n,
    .kill(redir_valid), .kill_tid(redir_tid),
    .ic_rd_en, .ic_rd_addr, .ic_hit0, .ic_hit1, .ic_line0, .ic_line1,
    .fb_wr_cnt, .fb_wr_slot,
    .blocked, .mem_req_valid, .mem_req_line, .mem_req_ready,
    .mem_resp_valid, .mem_resp_line,
    .ev_miss, .ev_line_split(ev_split)
  );

  icache #(.SIZE_BYTES(IC_BYTES), .WAYS(IC_WAYS), .LINE_BYTES(4 * LINE_W)) u_ic (
    .clk, .rst_n,
    .rd_en(ic_rd_en), .rd_addr(ic_rd_addr),
    .hit0(ic_hit0), .hit1(ic_hit1), .line0(ic_line0), .line1(ic_line1),
    .fill_valid(mem_resp_valid), .fill_line(mem_resp_line), .fill_data(mem_resp_data)
  );

  // ---------------- fetch buffer ----------------
  fetch_buffer #(.DEPTH(FBUF_DEPTH), .WR_W(FETCH_W), .RD_W(DECODE_W)) u_fb (
    .clk, .rst_n,
    .wr_cnt(fb_wr_cnt), .wr_slot(fb_wr_slot), .room(fb_room),
    .rd_ready(dec_ready), .rd_slot(dec_slot), .rd_cnt(dec_cnt),
    .flush(redir_valid), .flush_tid(3'(redir_tid))
  );

  // ---------------- events ----------------
  always_comb begin
    events.pred       = ev_pred;
    events.pred_l1    = ev_l1;
    events.pred_l2    = ev_l2;
    events.fetch      = fb_wr_cnt != '0;
    events.fetch_full = 32'(fb_wr_cnt) == FETCH_W;
    events.line_split = ev_split;
    events.ic_miss    = ev_miss;
    events.fb_stall   = !fb_has_room && (fetch_ready != '0);
    events.ftq_full   = (active & ftq_full) != '0 && !psel_valid;
    events.redirect   = redir_valid;
  end

  initial assert (NTHREADS <= 8) else $error("smt_fetch_unit: at most 8 threads");
endmodule
