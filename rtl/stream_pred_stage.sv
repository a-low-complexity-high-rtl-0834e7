// Stream prediction stage of the decoupled SMT front end.
//
// Holds, for every thread, the start address of the next stream to
// predict, its path history and its return address stack. Each cycle it
// predicts one stream for the thread chosen by the ICOUNT selector (one
// predictor port shared by all threads) and appends it to that thread's
// fetch target queue; then it moves the thread on to the predicted next
// stream, shifts the stream's start into the history and pushes or pops the
// RAS for a call or return stream. A return stream takes its target from the
// RAS instead of the predictor. The decoupling through per-thread FTQs, the
// stream predictor and the per-thread RAS follow the document; the redirect
// and repair protocol is this design's choice.
//
// A redirect from the back end (misprediction of a stream of thread
// `redir_tid`) restarts the thread at `redir_pc`. It returns the checkpoint
// recorded with the stream that resolved (history and RAS pointer before
// that stream) and the stream's start address; the history is rebuilt as
// that checkpoint with the resolved stream shifted in. A thread is idle
// after reset and starts predicting at its first redirect.
//
// Interface and timing: the predictor is read combinationally; `ftq_push`
// and `ftq_entry` are valid in the same cycle and written at the clock
// edge. Redirect of a thread suppresses its prediction in that cycle.
module stream_pred_stage
  import smt_fetch_pkg::*;
#(
  parameter int unsigned NTHREADS   = 8,
  parameter int unsigned RAS_DEPTH  = 64,
  parameter int unsigned L1_ENTRIES = 1024,
  parameter int unsigned L2_ENTRIES = 4096,
  parameter int unsigned SP_WAYS    = 4,
  localparam int unsigned TW        = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sel_valid,
  input  logic [TW-1:0]       sel_tid,
  output logic [NTHREADS-1:0] ftq_push,
  output ftq_entry_t          ftq_entry,
  output logic [NTHREADS-1:0] active,
  // redirect
  input  logic                redir_valid,
  input  logic [TW-1:0]       redir_tid,
  input  waddr_t              redir_pc,
  input  ckpt_t               redir_ckpt,
  input  waddr_t              redir_sstart,
  // training
  input  logic                upd_valid,
  input  waddr_t              upd_addr,
  input  hist_t               upd_hist,
  input  slen_t               upd_len,
  input  waddr_t              upd_target,
  input  stype_e              upd_type,
  // events
  output logic                ev_pred,
  output logic                ev_hit_l1,
  output logic                ev_hit_l2
);

  waddr_t pc   [NTHREADS];
  hist_t  hist [NTHREADS];

  logic   go;
  waddr_t cur_pc;
  hist_t  cur_hist;
  logic   p_hit1, p_hit2;
  slen_t  p_len;
  waddr_t p_target, nxt;
  stype_e p_type;

  logic   [NTHREADS-1:0] ras_push, ras_pop, ras_restore;
  waddr_t                ras_top [NTHREADS];
  logic   [5:0]          ras_tos [NTHREADS];

  assign go       = sel_valid && active[sel_tid] && !(redir_valid && redir_tid == sel_tid);
  assign cur_pc   = pc[sel_tid];
  assign cur_hist = hist[sel_tid];

  stream_predictor #(
    .L1_ENTRIES(L1_ENTRIES), .L1_WAYS(SP_WAYS),
    .L2_ENTRIES(L2_ENTRIES), .L2_WAYS(SP_WAYS)
  ) u_sp (
    .clk, .rst_n,
    .pred_addr  (cur_pc),
    .pred_hist  (cur_hist),
    .pred_hit_l1(p_hit1),
    .pred_hit_l2(p_hit2),
    .pred_len   (p_len),
    .pred_target(p_target),
    .pred_type  (p_type),
    .upd_valid, .upd_addr, .upd_hist, .upd_len, .upd_target, .upd_type
  );

  assign nxt = (p_type == ST_RETURN) ? ras_top[sel_tid] : p_target;

  always_comb begin
    ftq_entry.start   = cur_pc;
    ftq_entry.len     = p_len;
    ftq_entry.next    = nxt;
    ftq_entry.stype   = p_type;
    ftq_entry.sstart  = cur_pc;
    ftq_entry.ckpt.hist    = cur_hist;
    ftq_entry.ckpt.ras_tos = ras_tos[sel_tid];
    ftq_push = '0;
    ras_push = '0;
    ras_pop  = '0;
    ras_restore = '0;
    if (go) begin
      ftq_push[sel_tid] = 1'b1;
      ras_push[sel_tid] = (p_type == ST_CALL);
      ras_pop[sel_tid]  = (p_type == ST_RETURN);
    end
    if (redir_valid) ras_restore[redir_tid] = 1'b1;
  end

  assign ev_pred   = go;
  assign ev_hit_l1 = go && p_hit1 && !p_hit2;
  assign ev_hit_l2 = go && p_hit2;

  for (genvar t = 0; t < NTHREADS; t++) begin : g_ras
    return_address_stack #(.DEPTH(RAS_DEPTH)) u_ras (
      .clk, .rst_n,
      .push       (ras_push[t]),
      .pop        (ras_pop[t]),
      .push_addr  (cur_pc + waddr_t'(p_len)),
      .top        (ras_top[t]),
      .tos        (ras_tos[t]),
      .restore    (ras_restore[t]),
      .restore_tos(redir_ckpt.ras_tos)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
      for (int unsigned t = 0; t < NTHREADS; t++) begin
        pc[t]   <= '0;
        hist[t] <= '0;
      end
    end else begin
      if (go) begin
        pc[sel_tid]   <= nxt;
        hist[sel_tid] <= hist_push(cur_hist, cur_pc);
      end
      if (redir_valid) begin
        active[redir_tid] <= 1'b1;
        pc[redir_tid]     <= redir_pc;
        hist[redir_tid]   <= hist_push(redir_ckpt.hist, redir_sstart);
      end
    end
  end

endmodule
