// Self-checking test of stream_predictor.
//  1. an empty predictor predicts a sequential 16-instruction stream;
//  2. a trained stream is found in the second level with the training
//     history and in the first level with any other history;
//  3. hysteresis: one disagreeing update only lowers the confidence of a
//     first-level entry, a second one replaces it;
//  4. first-level capacity: a fifth stream in a 4-way set evicts the first;
//  5. bulk: 1500 random streams with random histories are trained, then
//     each is predicted again; a hit must return the trained values and
//     nearly all must hit.
module tb_stream_predictor;
  import smt_fetch_pkg::*;
  logic clk = 0, rst_n = 0;
  waddr_t pa, pt, ua, ut;
  hist_t  ph, uh;
  logic   h1, h2, uv;
  slen_t  pl, ul;
  stype_e pty, uty;
  int checks = 0, failures = 0;

  stream_predictor #(.L1_ENTRIES(1024), .L1_WAYS(4), .L2_ENTRIES(4096), .L2_WAYS(4)) dut (
    .clk, .rst_n, .pred_addr(pa), .pred_hist(ph), .pred_hit_l1(h1), .pred_hit_l2(h2), .pred_len(pl),
    .pred_target(pt), .pred_type(pty), .upd_valid(uv), .upd_addr(ua), .upd_hist(uh), .upd_len(ul),
    .upd_target(ut), .upd_type(uty));
  always #5 clk = ~clk;

  task automatic train(waddr_t a, hist_t h, slen_t l, waddr_t t, stype_e ty);
    @(negedge clk);
    uv = 1; ua = a; uh = h; ul = l; ut = t; uty = ty;
    @(posedge clk);
    #1 uv = 0;
  endtask

  task automatic expect_pred(string what, waddr_t a, hist_t h, logic e1, logic e2, slen_t l, waddr_t t, stype_e ty);
    pa = a; ph = h;
    #1;
    checks++;
    if (h1 !== e1 || h2 !== e2 || pl != l || pt != t || pty != ty) begin
      failures++;
      $display("%s: hit %b%b len %0d tgt %h type %0d; exp %b%b %0d %h %0d", what, h1, h2, pl, pt, pty, e1, e2, l, t, ty);
    end
  endtask

  function automatic hist_t rhist();
    hist_t h;
    h = hist_t'({$urandom, $urandom});
    return h;
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  waddr_t ba [1500];
  hist_t  bh [1500];
  waddr_t bt [1500];
  slen_t  bl [1500];

  initial begin
    hist_t hA, hB;
    int nhit;
    uv = 0; ua = '0; uh = '0; ul = '0; ut = '0; uty = ST_SEQ; pa = '0; ph = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    hA = rhist(); hB = rhist();
    // 1
    expect_pred("empty", 30'h1000, hA, 0, 0, 6'd16, 30'h1010, ST_SEQ);
    // 2
    train(30'h1000, hA, 6'd23, 30'h5550, ST_BRANCH);
    expect_pred("l2 hit", 30'h1000, hA, 1, 1, 6'd23, 30'h5550, ST_BRANCH);
    expect_pred("l1 only", 30'h1000, hB, 1, 0, 6'd23, 30'h5550, ST_BRANCH);
    // 3: different outcome under history hB
    train(30'h1000, hB, 6'd7, 30'h7770, ST_CALL);
    expect_pred("l2 new path", 30'h1000, hB, 1, 1, 6'd7, 30'h7770, ST_CALL);
    expect_pred("l1 hysteresis", 30'h1000, ~hB, 1, 0, 6'd23, 30'h5550, ST_BRANCH);
    train(30'h1000, hB, 6'd7, 30'h7770, ST_CALL);
    expect_pred("l1 replaced", 30'h1000, ~hB, 1, 0, 6'd7, 30'h7770, ST_CALL);
    expect_pred("l2 old path", 30'h1000, hA, 1, 1, 6'd23, 30'h5550, ST_BRANCH);
    // 4: five streams in L1 set 0x20 (sets differ by address bits above 8)
    for (int k = 0; k < 5; k++) train(30'h20 + 30'(k) * 30'h100, hA, 6'(k + 1), 30'(k), ST_RETURN);
    expect_pred("l1 evicted", 30'h20, hB, 0, 0, 6'd16, 30'h30, ST_SEQ);
    for (int k = 1; k < 5; k++) expect_pred("l1 kept", 30'h20 + 30'(k) * 30'h100, hB, 1, 0, 6'(k + 1), 30'(k), ST_RETURN);
    // 5
    for (int i = 0; i < 1500; i++) begin
      ba[i] = 30'h200000 + 30'(i) * 30'd37; bh[i] = rhist(); bt[i] = waddr_t'($urandom); bl[i] = 6'($urandom_range(1, 63));
      train(ba[i], bh[i], bl[i], bt[i], ST_BRANCH);
    end
    nhit = 0;
    for (int i = 0; i < 1500; i++) begin
      pa = ba[i]; ph = bh[i];
      #1;
      if (h2) begin
        nhit++;
        checks++;
        if (pl != bl[i] || pt != bt[i] || pty != ST_BRANCH) begin failures++; $display("bulk %0d wrong", i); end
      end
    end
    checks++;
    if (nhit < 1300) begin failures++; $display("bulk: only %0d of 1500 second-level hits", nhit); end
    $display("bulk second-level hits %0d / 1500", nhit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
