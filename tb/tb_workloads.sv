// Workload test of smt_fetch_unit at its default configuration.
//
// Runs, one after another with a reset in between, synthetic stand-ins for
// the ten multithreaded workloads the design was evaluated with (2, 4, 6
// and 8 threads; ILP, memory-bound MEM and mixed MIX). Each benchmark is
// replaced by a synthetic loop program whose stream lengths are drawn around
// twice the benchmark's average basic-block size (gzip 11.0, vpr 9.7, gcc
// 5.8, mcf 3.9, crafty 9.2, parser 6.4, eon 8.7, perlbmk 10.1, gap 9.2,
// vortex 6.5, bzip2 10.0, twolf 8.0 instructions), so that a stream covers
// about two basic blocks. Memory-bound benchmarks (mcf, twolf, vpr,
// perlbmk) drain from dispatch slowly. The same back-end and memory models
// as the end-to-end test check every correct-path instruction; each
// workload must let every thread commit its quota. The fetch throughput
// (instructions per fetch cycle) of each workload is printed.
module tb_workloads;
  import smt_fetch_pkg::*;

  localparam int NT = 8;
  localparam int NS = 10;
  localparam int QUOTA = 1500;

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

  // benchmarks: average basic-block size (hundredths of an instruction)
  // and whether the benchmark is memory-bound
  localparam int NB = 12;
  string bname [NB] = '{"gzip", "vpr", "gcc", "mcf", "crafty", "parser", "eon", "perlbmk", "gap",
                        "vortex", "bzip2", "twolf"};
  int    bbsz  [NB] = '{1102, 968, 576, 392, 924, 637, 873, 1006, 916, 650, 1002, 800};
  bit    bmem  [NB] = '{0, 1, 0, 1, 0, 0, 0, 1, 0, 0, 0, 1};
  bit    slow  [NT];

  // lay out one synthetic program per thread for the given benchmarks
  task automatic build_programs(int n, int b [8]);
    for (int t = 0; t < NT; t++) begin
      waddr_t a;
      int bb;
      bb = (t < n) ? bbsz[b[t]] : 800;
      slow[t] = (t < n) ? bmem[b[t]] : 1'b0;
      a = waddr_t'(32'h40000 * (t + 1) + 32'(t) * 32'h200);
      for (int i = 0; i < NS; i++) begin
        int l;
        // streams of about two basic blocks: uniform in [bb, 3*bb]
        l = $urandom_range(bb / 100, (3 * bb) / 100);
        if (l < 2) l = 2;
        if (l > 63) l = 63;
        s_start[t][i] = a;
        s_len[t][i]   = l;
        a = a + waddr_t'(s_len[t][i]) + ((i == CALL_IDX) ? 30'd0 : waddr_t'($urandom_range(0, 20)));
      end
      f_start[t] = s_start[t][0] + 30'h800;
    end
  endtask

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
      lim = slow[t] ? 1 : 6;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  task automatic run_workload(string name, int n, int b [8]);
    logic done;
    longint c0;
    int f0, fi0;
    rst_n = 0;
    rq.delete(); uq.delete(); m_line.delete(); m_due.delete(); touched.delete();
    redir_valid = 0; upd_valid = 0; mem_resp_valid = 0;
    build_programs(n, b);
    for (int t = 0; t < NT; t++) begin
      a_idx[t] = 0; a_func[t] = 0; a_iter[t] = 0; squash[t] = 1'b1; committed[t] = 0; fetched_by[t] = 0;
      a_hist[t] = hist_push('0, '0);
      finish_cyc[t] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    c0 = cyc; f0 = n_fetch; fi0 = n_fetched_insn;
    for (int t = 0; t < n; t++) begin
      a_pc[t] = s_start[t][0];
      rq.push_back('{tid: 3'(t), pc: s_start[t][0], ckpt: '0, sstart: '0});
    end
    do begin
      @(posedge clk);
      done = 1'b1;
      for (int t = 0; t < n; t++) if (committed[t] < QUOTA) done = 1'b0;
    end while (!done && cyc - c0 < 200000);
    checks++;
    if (!done) begin failures++; $display("%s: threads did not reach their quota", name); end
    $display("%-6s %0d threads: %0d cycles, %0.2f instructions per fetch cycle, %0.2f correct-path instructions decoded per cycle",
             name, n, cyc - c0, real'(n_fetched_insn - fi0) / real'(n_fetch - f0),
             real'(n * QUOTA) / real'(cyc - c0));
  endtask

  initial begin
    redir_valid = 0; redir_tid = '0; redir_pc = '0; redir_ckpt = '0; redir_sstart = '0;
    upd_valid = 0; upd_addr = '0; upd_hist = '0; upd_len = '0; upd_target = '0; upd_type = ST_SEQ;
    dec_ready = 0; icount_dec = '0; mem_req_ready = 0; mem_resp_valid = 0; mem_resp_line = '0; mem_resp_data = '0;
    // benchmark indices: 0 gzip 1 vpr 2 gcc 3 mcf 4 crafty 5 parser 6 eon 7 perlbmk 8 gap 9 vortex 10 bzip2 11 twolf
    run_workload("2_ILP", 2, '{6, 2, 0, 0, 0, 0, 0, 0});
    run_workload("2_MEM", 2, '{3, 11, 0, 0, 0, 0, 0, 0});
    run_workload("2_MIX", 2, '{0, 11, 0, 0, 0, 0, 0, 0});
    run_workload("4_ILP", 4, '{6, 2, 0, 10, 0, 0, 0, 0});
    run_workload("4_MEM", 4, '{3, 11, 1, 7, 0, 0, 0, 0});
    run_workload("4_MIX", 4, '{0, 11, 10, 3, 0, 0, 0, 0});
    run_workload("6_ILP", 6, '{6, 2, 0, 10, 4, 9, 0, 0});
    run_workload("6_MIX", 6, '{0, 11, 10, 3, 1, 6, 0, 0});
    run_workload("8_ILP", 8, '{6, 2, 0, 10, 4, 9, 8, 5});
    run_workload("8_MIX", 8, '{0, 11, 10, 3, 1, 6, 8, 5});
    checks++;
    if (n_mixed != 0) begin failures++; $display("fetch blocks mixed threads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
