// End-to-end test of smt_fetch_unit at its default configuration
// (8 threads, 16-wide fetch, 8-wide decode, 32 KB I-cache, 1K+4K stream
// predictor).
//
// Each thread runs a small synthetic program: a loop of NS streams laid out
// with gaps, one stream that calls a one-stream function (ending in a
// return), and one stream whose branch target alternates between loop
// iterations so that only the path history can predict it. A back-end model
// plays decode and commit: it follows each thread's real path, checks every
// instruction it receives (address and contents, which come from a memory
// model through the I-cache), compares each stream's predicted successor
// with the real one, sends a redirect on a mismatch, trains the predictor
// with every completed stream and drains the ICOUNT counters (odd threads
// slowly, as memory-bound threads would). The memory model answers refills
// after 100 cycles the first time a line is touched and after 10 later.
//
// Checks: every correct-path instruction arrives in order with the right
// contents; every fetch block comes from a single thread; each thread
// commits its quota; mispredictions fall once the predictor is trained;
// the fast-draining threads are fetched more (ICOUNT); and each mechanism
// (first- and second-level predictions, RAS returns, I-cache misses,
// line-spanning blocks, full 16-instruction blocks, fetch-buffer stalls,
// full FTQs, redirects) happens at least once.
module tb_smt_fetch_unit;
  import smt_fetch_pkg::*;

  localparam int NT = 8;
  localparam int NS = 10;
  localparam int QUOTA = 4000;

  logic clk = 0, rst_n = 0;
  logic redir_valid, upd_valid, dec_ready, mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [2:0] redir_tid;
  waddr_t redir_pc, redir_sstart, upd_addr, upd_target;
  ckpt_t redir_ckpt;
  hist_t upd_hist;
  slen_t upd_len;
  stype_e upd_type;
  logic [NT-1:0][7:0] icount_dec, icount;
  fb_entry_t [7:0] dec_slot;
  logic [3:0] dec_cnt;
  logic [25:0] mem_req_line, mem_resp_line;
  insn_t [15:0] mem_resp_data;
  fe_events_t events;

  smt_fetch_unit dut (
    .clk, .rst_n,
    .redir_valid, .redir_tid, .redir_pc, .redir_ckpt, .redir_sstart,
    .upd_valid, .upd_addr, .upd_hist, .upd_len, .upd_target, .upd_type,
    .icount_dec, .dec_ready, .dec_slot, .dec_cnt,
    .mem_req_valid, .mem_req_line, .mem_req_ready, .mem_resp_valid, .mem_resp_line, .mem_resp_data,
    .icount, .events
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic insn_t content(waddr_t a);
    return insn_t'(a * 32'h2545F491 + 32'h9E37);
  endfunction

  // ---------------- program ----------------
  waddr_t s_start [NT][NS];
  int     s_len   [NT][NS];
  waddr_t f_start [NT];
  localparam int CALL_IDX = 6, ALT_IDX = 3, F_LEN = 6;

  initial begin
    for (int t = 0; t < NT; t++) begin
      waddr_t a;
      a = waddr_t'(32'h40000 * (t + 1) + 32'(t) * 32'h200);
      for (int i = 0; i < NS; i++) begin
        s_start[t][i] = a;
        s_len[t][i]   = (i % 3 == 0) ? $urandom_range(3, 8) : $urandom_range(12, 40);
        a = a + waddr_t'(s_len[t][i]) + ((i == CALL_IDX) ? 30'd0 : waddr_t'($urandom_range(0, 20)));
      end
      f_start[t] = s_start[t][0] + 30'h800;
    end
  end

  // ---------------- architectural path per thread ----------------
  int     a_idx  [NT];
  logic   a_func [NT];
  int     a_iter [NT];
  waddr_t a_pc   [NT];
  hist_t  a_hist [NT];
  logic   squash [NT];
  int     committed [NT];

  function automatic waddr_t cur_start(int t);
    return a_func[t] ? f_start[t] : s_start[t][a_idx[t]];
  endfunction
  function automatic int cur_len(int t);
    return a_func[t] ? F_LEN : s_len[t][a_idx[t]];
  endfunction
  function automatic stype_e cur_type(int t);
    if (a_func[t]) return ST_RETURN;
    if (a_idx[t] == CALL_IDX) return ST_CALL;
    return ST_BRANCH;
  endfunction
  function automatic int next_idx(int t);
    if (a_func[t]) return CALL_IDX + 1;
    if (a_idx[t] == ALT_IDX && a_iter[t] % 2 == 1) return ALT_IDX + 2;
    return (a_idx[t] + 1) % NS;
  endfunction
  function automatic waddr_t cur_target(int t);
    if (!a_func[t] && a_idx[t] == CALL_IDX) return f_start[t];
    return s_start[t][next_idx(t)];
  endfunction

  // ---------------- redirect and update queues ----------------
  typedef struct packed { logic [2:0] tid; waddr_t pc; ckpt_t ckpt; waddr_t sstart; } redir_t;
  typedef struct packed { waddr_t addr; hist_t hist; slen_t len; waddr_t target; stype_e ty; } upd_t;
  redir_t rq [$];
  upd_t   uq [$];

  // ---------------- memory model ----------------
  logic [25:0] m_line [$];
  longint      m_due  [$];
  bit          touched [logic [25:0]];
  longint      cyc = 0;

  // ---------------- statistics ----------------
  int n_pred = 0, n_l1 = 0, n_l2 = 0, n_miss = 0, n_split = 0, n_full = 0, n_fbstall = 0;
  int n_ftqfull = 0, n_redir = 0, n_fetch = 0, n_fetched_insn = 0, n_ret_ok = 0;
  int redir_half [2] = '{0, 0};
  int fetched_by [NT];
  int n_mixed = 0;
  longint finish_cyc [NT];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (events.pred)       n_pred++;
    if (events.pred_l1)    n_l1++;
    if (events.pred_l2)    n_l2++;
    if (events.ic_miss)    n_miss++;
    if (events.line_split) n_split++;
    if (events.fetch_full) n_full++;
    if (events.fb_stall)   n_fbstall++;
    if (events.ftq_full)   n_ftqfull++;
    if (events.redirect)   n_redir++;
    if (events.fetch) begin
      n_fetch++;
      n_fetched_insn += int'(dut.fb_wr_cnt);
      fetched_by[dut.fb_wr_slot[0].tid] += int'(dut.fb_wr_cnt);
      for (int i = 0; i < 16; i++)
        if (i < int'(dut.fb_wr_cnt) && dut.fb_wr_slot[i].tid != dut.fb_wr_slot[0].tid) n_mixed++;
    end
    if (events.pred && dut.u_pred.p_type == ST_RETURN) begin
      int t;
      t = int'(dut.psel_tid);
      if (dut.u_pred.cur_pc == f_start[t] && dut.u_pred.nxt == s_start[t][CALL_IDX + 1]) n_ret_ok++;
    end
  end

  // ---------------- back end: decode / commit ----------------
  always @(posedge clk) if (rst_n) begin
    logic [NT-1:0] dropped;
    dropped = '0;
    if (dec_ready) begin
      for (int i = 0; i < 8; i++) begin
        fb_entry_t s;
        int t;
        s = dec_slot[i];
        t = int'(s.tid);
        if (s.valid && !squash[t] && !dropped[t]) begin
          waddr_t act_next, pred_next;
          logic   at_end;
          chk($sformatf("thread %0d pc %h expected %h", t, s.pc, a_pc[t]), s.pc == a_pc[t]);
          chk("instruction contents", s.insn == content(s.pc));
          at_end    = (s.pc == cur_start(t) + waddr_t'(cur_len(t) - 1));
          act_next  = at_end ? cur_target(t) : s.pc + 1'b1;
          pred_next = s.last ? s.pred_next : s.pc + 1'b1;
          committed[t]++;
          if (committed[t] == QUOTA) finish_cyc[t] = cyc;
          if (at_end) begin
            uq.push_back('{addr: cur_start(t), hist: a_hist[t], len: slen_t'(cur_len(t)),
                           target: cur_target(t), ty: cur_type(t)});
            a_hist[t] = hist_push(a_hist[t], cur_start(t));
          end
          a_pc[t] = act_next;
          if (pred_next != act_next) begin
            rq.push_back('{tid: 3'(t), pc: act_next, ckpt: s.ckpt, sstart: s.sstart});
            squash[t] = 1'b1;
            redir_half[(cyc > 4000) ? 1 : 0]++;
          end
          // the path index moves once the stream's successor is known
          if (at_end) a_advance(t);
        end else if (s.valid) dropped[t] = 1'b1;
      end
    end
  end

  // index bookkeeping, run after the checks of a stream's last instruction
  function automatic void a_advance(int t);
    // a_pc already holds the start of the next real stream
    a_func[t] = (a_pc[t] == f_start[t]);
    if (a_func[t]) return;
    for (int i = 0; i < NS; i++)
      if (s_start[t][i] == a_pc[t]) begin
        if (i == 0) a_iter[t]++;
        a_idx[t] = i;
      end
  endfunction

  // drive redirect, update, memory, decode readiness and ICOUNT drain
  always @(negedge clk) if (rst_n) begin
    redir_valid = 1'b0;
    if (rq.size() > 0) begin
      redir_t r;
      r = rq.pop_front();
      redir_valid = 1'b1; redir_tid = r.tid; redir_pc = r.pc; redir_ckpt = r.ckpt; redir_sstart = r.sstart;
      squash[r.tid] = 1'b0;
    end
    upd_valid = 1'b0;
    if (uq.size() > 0) begin
      upd_t u;
      u = uq.pop_front();
      upd_valid = 1'b1; upd_addr = u.addr; upd_hist = u.hist; upd_len = u.len; upd_target = u.target; upd_type = u.ty;
    end
    // decode stalls in bursts so the fetch buffer fills up now and then
    dec_ready = !((cyc % 500) > 460) && ($urandom_range(0, 99) < 90);
    for (int t = 0; t < NT; t++) begin
      int lim;
      lim = (t % 2 == 0) ? 6 : 1;
      if (lim > int'(icount[t])) lim = int'(icount[t]);
      icount_dec[t] = 8'($urandom_range(0, lim));
    end
    // memory
    mem_req_ready = ($urandom_range(0, 9) != 0);
    mem_resp_valid = 1'b0;
    for (int k = 0; k < m_line.size(); k++)
      if (m_due[k] <= cyc) begin
        mem_resp_valid = 1'b1;
        mem_resp_line = m_line[k];
        for (int i = 0; i < 16; i++) mem_resp_data[i] = content({m_line[k], 4'(i)});
        m_line.delete(k); m_due.delete(k);
        break;
      end
  end

  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    m_line.push_back(mem_req_line);
    m_due.push_back(cyc + (touched.exists(mem_req_line) ? 10 : 100));
    touched[mem_req_line] = 1'b1;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  initial begin
    logic done;
    redir_valid = 0; redir_tid = '0; redir_pc = '0; redir_ckpt = '0; redir_sstart = '0;
    upd_valid = 0; upd_addr = '0; upd_hist = '0; upd_len = '0; upd_target = '0; upd_type = ST_SEQ;
    dec_ready = 0; icount_dec = '0; mem_req_ready = 0; mem_resp_valid = 0; mem_resp_line = '0; mem_resp_data = '0;
    for (int t = 0; t < NT; t++) begin
      a_idx[t] = 0; a_func[t] = 0; a_iter[t] = 0; squash[t] = 1'b1; committed[t] = 0; fetched_by[t] = 0;
      a_hist[t] = hist_push('0, '0);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // start every thread with a redirect to its entry point
    for (int t = 0; t < NT; t++) begin
      a_pc[t] = s_start[t][0];
      rq.push_back('{tid: 3'(t), pc: s_start[t][0], ckpt: '0, sstart: '0});
    end
    do begin
      @(posedge clk);
      done = 1'b1;
      for (int t = 0; t < NT; t++) if (committed[t] < QUOTA) done = 1'b0;
    end while (!done);
    repeat (5) @(posedge clk);

    $display("cycles %0d, fetch blocks %0d, instructions per fetch cycle %0.2f", cyc, n_fetch,
             real'(n_fetched_insn) / real'(n_fetch));
    $display("predictions %0d (L1 %0d, L2 %0d, RAS returns %0d), redirects %0d (first 4000 cycles %0d, later %0d)",
             n_pred, n_l1, n_l2, n_ret_ok, n_redir, redir_half[0], redir_half[1]);
    $display("I-cache misses %0d, line-spanning blocks %0d, full blocks %0d, fetch-buffer stalls %0d, FTQ-full cycles %0d",
             n_miss, n_split, n_full, n_fbstall, n_ftqfull);
    for (int t = 0; t < NT; t++) $display("thread %0d fetched %0d, reached %0d committed at cycle %0d", t, fetched_by[t], QUOTA, finish_cyc[t]);

    chk("single thread per fetch block", n_mixed == 0);
    chk("first-level predictions", n_l1 > 0);
    chk("second-level predictions", n_l2 > 0);
    chk("RAS-predicted returns", n_ret_ok > 0);
    chk("I-cache misses", n_miss > 0);
    chk("line-spanning fetch blocks", n_split > 0);
    chk("full 16-instruction blocks", n_full > 0);
    chk("fetch-buffer stalls", n_fbstall > 0);
    chk("full FTQs", n_ftqfull > 0);
    chk("redirects", n_redir > 0);
    chk("mispredictions fall after training", redir_half[1] < redir_half[0]);
    begin
      int fast, slow;
      fast = 0; slow = 0;
      for (int t = 0; t < NT; t++) if (t % 2 == 0) fast += int'(finish_cyc[t]); else slow += int'(finish_cyc[t]);
      chk("ICOUNT favours fast-draining threads", fast < slow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
