// Self-checking test of stream_pred_stage with two threads:
// idle threads are never predicted; a redirect starts a thread and rebuilds
// its history from the returned checkpoint; untrained streams are predicted
// as sequential 16-instruction blocks; a trained call stream pushes its
// return address and a trained return stream takes its target from the RAS;
// a redirect of a thread suppresses its prediction in that cycle; the two
// threads keep separate addresses, histories and stacks.
module tb_stream_pred_stage;
  import smt_fetch_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel_valid, redir_valid, upd_valid;
  logic sel_tid, redir_tid;
  logic [1:0] ftq_push, active;
  ftq_entry_t e;
  waddr_t redir_pc, redir_sstart, upd_addr, upd_target;
  ckpt_t redir_ckpt;
  hist_t upd_hist;
  slen_t upd_len;
  stype_e upd_type;
  logic ev_pred, ev_l1, ev_l2;
  int checks = 0, failures = 0;
  hist_t h0;

  stream_pred_stage #(.NTHREADS(2), .RAS_DEPTH(64), .L1_ENTRIES(1024), .L2_ENTRIES(4096), .SP_WAYS(4)) dut (
    .clk, .rst_n, .sel_valid, .sel_tid, .ftq_push, .ftq_entry(e), .active,
    .redir_valid, .redir_tid, .redir_pc, .redir_ckpt, .redir_sstart,
    .upd_valid, .upd_addr, .upd_hist, .upd_len, .upd_target, .upd_type,
    .ev_pred, .ev_hit_l1(ev_l1), .ev_hit_l2(ev_l2));
  always #5 clk = ~clk;

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // predict once for thread t and check the FTQ entry
  task automatic predict(logic t, waddr_t s, slen_t l, waddr_t n, stype_e ty, hist_t h, logic [5:0] tos);
    @(negedge clk);
    sel_valid = 1; sel_tid = t;
    #1;
    chk("push", ftq_push == (2'b01 << t));
    chk($sformatf("start %h exp %h", e.start, s), e.start == s && e.sstart == s);
    chk($sformatf("len %0d exp %0d", e.len, l), e.len == l);
    chk($sformatf("next %h exp %h", e.next, n), e.next == n);
    chk("type", e.stype == ty);
    chk("hist", e.ckpt.hist == h);
    chk($sformatf("tos %0d exp %0d", e.ckpt.ras_tos, tos), e.ckpt.ras_tos == tos);
    @(posedge clk);
    #1 sel_valid = 0;
  endtask

  task automatic train(waddr_t a, slen_t l, waddr_t t, stype_e ty);
    @(negedge clk);
    upd_valid = 1; upd_addr = a; upd_hist = '0; upd_len = l; upd_target = t; upd_type = ty;
    @(posedge clk);
    #1 upd_valid = 0;
  endtask

  task automatic redirect(logic t, waddr_t pc, ckpt_t c, waddr_t ss);
    @(negedge clk);
    redir_valid = 1; redir_tid = t; redir_pc = pc; redir_ckpt = c; redir_sstart = ss;
    @(posedge clk);
    #1 redir_valid = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist_t hx;
    sel_valid = 0; sel_tid = 0; redir_valid = 0; redir_tid = 0; redir_pc = '0; redir_ckpt = '0;
    redir_sstart = '0; upd_valid = 0; upd_addr = '0; upd_hist = '0; upd_len = '0; upd_target = '0;
    upd_type = ST_SEQ;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    sel_valid = 1; sel_tid = 0;
    #1 chk("idle thread not predicted", ftq_push == 2'b00 && active == 2'b00);
    @(posedge clk);
    #1 sel_valid = 0;

    redirect(0, 30'h1000, '0, 30'h0abc);
    chk("active", active == 2'b01);
    h0 = hist_push('0, 30'h0abc);
    predict(0, 30'h1000, 6'd16, 30'h1010, ST_SEQ, h0, 6'd0);
    hx = hist_push(h0, 30'h1000);
    predict(0, 30'h1010, 6'd16, 30'h1020, ST_SEQ, hx, 6'd0);
    hx = hist_push(hx, 30'h1010);

    train(30'h1020, 6'd5, 30'h8000, ST_CALL);
    train(30'h8000, 6'd3, 30'h3333, ST_RETURN);
    // thread 1 starts elsewhere and must not disturb thread 0
    redirect(1, 30'h2000, '0, 30'h0);
    predict(1, 30'h2000, 6'd16, 30'h2010, ST_SEQ, hist_push('0, 30'h0), 6'd0);

    predict(0, 30'h1020, 6'd5, 30'h8000, ST_CALL, hx, 6'd0);
    hx = hist_push(hx, 30'h1020);
    predict(0, 30'h8000, 6'd3, 30'h1025, ST_RETURN, hx, 6'd1);
    hx = hist_push(hx, 30'h8000);
    predict(0, 30'h1025, 6'd16, 30'h1035, ST_SEQ, hx, 6'd0);
    // thread 1's stack is untouched: its return prediction uses its own RAS
    predict(1, 30'h2010, 6'd16, 30'h2020, ST_SEQ, hist_push(hist_push('0, 30'h0), 30'h2000), 6'd0);

    // redirect and selection of the same thread in one cycle
    @(negedge clk);
    sel_valid = 1; sel_tid = 0; redir_valid = 1; redir_tid = 0; redir_pc = 30'h4000;
    redir_ckpt.hist = h0; redir_ckpt.ras_tos = 6'd0; redir_sstart = 30'h1000;
    #1 chk("no push while redirected", ftq_push == 2'b00);
    @(posedge clk);
    #1 begin sel_valid = 0; redir_valid = 0; end
    predict(0, 30'h4000, 6'd16, 30'h4010, ST_SEQ, hist_push(h0, 30'h1000), 6'd0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
