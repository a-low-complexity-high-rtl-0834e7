// Self-checking test of fetch_stage with two threads and a modelled
// I-cache whose contents are a fixed function of the address (a line is
// present unless its address is a multiple of 5). Random FTQ heads are
// fetched for random unblocked threads; every cycle the number fetched, the
// FTQ consumption and every written slot (address, instruction, end of
// stream flag) are compared with values computed here from the head and the
// cache model. Each miss must block the thread and send a refill request for
// the missing line; the refill (returned 6 cycles later)
// unblocks it. A kill of the selected thread must suppress the fetch.
module tb_fetch_stage;
  import smt_fetch_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel_valid, sel_tid, kill, kill_tid;
  ftq_entry_t [1:0] head;
  logic [1:0] consume, blocked;
  slen_t consume_n;
  logic ic_rd_en, hit0, hit1;
  waddr_t ic_rd_addr;
  insn_t [15:0] line0, line1;
  logic [4:0] wr_cnt;
  fb_entry_t [15:0] slot;
  logic mreq_v, mreq_rdy, mresp_v;
  logic [25:0] mreq_line, mresp_line;
  logic ev_miss, ev_split;
  int checks = 0, failures = 0, nmiss = 0, nsplit = 0, nreq = 0, npart = 0;
  logic [25:0] resp_q [$];
  int          resp_t [$];

  fetch_stage #(.NTHREADS(2), .FETCH_W(16), .LINE_W(16)) dut (
    .clk, .rst_n, .sel_valid, .sel_tid, .ftq_head(head), .ftq_consume(consume), .ftq_consume_n(consume_n),
    .kill, .kill_tid, .ic_rd_en, .ic_rd_addr, .ic_hit0(hit0), .ic_hit1(hit1), .ic_line0(line0),
    .ic_line1(line1), .fb_wr_cnt(wr_cnt), .fb_wr_slot(slot), .blocked, .mem_req_valid(mreq_v),
    .mem_req_line(mreq_line), .mem_req_ready(mreq_rdy), .mem_resp_valid(mresp_v),
    .mem_resp_line(mresp_line), .ev_miss, .ev_line_split(ev_split));
  always #5 clk = ~clk;

  function automatic logic present(logic [25:0] la);
    return (la % 5) != 0;
  endfunction
  function automatic insn_t content(waddr_t a);
    return insn_t'(a * 32'h2545F491 + 32'h77);
  endfunction

  always_comb begin
    hit0 = present(ic_rd_addr[29:4]);
    hit1 = present(ic_rd_addr[29:4] + 1'b1);
    for (int i = 0; i < 16; i++) begin
      line0[i] = content({ic_rd_addr[29:4], 4'(i)});
      line1[i] = content({ic_rd_addr[29:4] + 26'd1, 4'(i)});
    end
  end

  // memory model: accept a request every cycle, answer 6 cycles later
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mreq_v && mreq_rdy) begin resp_q.push_back(mreq_line); resp_t.push_back(cyc + 6); nreq++; end
  end
  always @(negedge clk) begin
    mresp_v = 0;
    if (resp_t.size() > 0 && resp_t[0] <= cyc) begin
      mresp_v = 1; mresp_line = resp_q.pop_front(); void'(resp_t.pop_front());
    end
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL cyc %0d: %s", cyc, what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] outstanding;
    logic [25:0] want [2];
    sel_valid = 0; sel_tid = 0; kill = 0; kill_tid = 0; head = '0; mreq_rdy = 1; mresp_v = 0; mresp_line = '0;
    outstanding = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int off, want_n, exp_n;
      logic t, exp_miss;
      logic [25:0] exp_line;
      @(negedge clk);
      #1;
      for (int k = 0; k < 2; k++) begin
        head[k].start = waddr_t'($urandom_range(0, 4095));
        head[k].len   = slen_t'($urandom_range(1, 63));
        head[k].next  = waddr_t'($urandom);
        head[k].stype = ST_BRANCH;
        head[k].sstart = head[k].start - 30'd2;
        head[k].ckpt  = ckpt_t'({$urandom, $urandom});
      end
      t = 1'($urandom);
      if (blocked[t]) t = !t;
      sel_valid = !blocked[t] && ($urandom_range(0, 9) != 0);
      sel_tid = t;
      kill = ($urandom_range(0, 19) == 0);
      kill_tid = ($urandom_range(0, 1) == 1) ? t : !t;
      mreq_rdy = ($urandom_range(0, 3) != 0);
      #1;
      // reference
      off = int'(head[t].start[3:0]);
      want_n = (int'(head[t].len) > 16) ? 16 : int'(head[t].len);
      exp_n = 0; exp_miss = 0; exp_line = '0;
      if (sel_valid && !(kill && kill_tid == t)) begin
        if (!present(head[t].start[29:4])) begin exp_miss = 1; exp_line = head[t].start[29:4]; end
        else if (off + want_n > 16 && !present(head[t].start[29:4] + 1'b1)) begin
          exp_miss = 1; exp_line = head[t].start[29:4] + 1'b1; exp_n = 16 - off; npart++;
        end else exp_n = want_n;
      end
      chk($sformatf("count %0d exp %0d", wr_cnt, exp_n), int'(wr_cnt) == exp_n);
      chk("consume", consume == ((exp_n > 0) ? (2'b01 << t) : 2'b00) && (exp_n == 0 || int'(consume_n) == exp_n));
      chk("miss event", ev_miss == exp_miss);
      for (int i = 0; i < exp_n; i++) begin
        waddr_t pc;
        pc = head[t].start + waddr_t'(i);
        chk($sformatf("slot %0d", i), slot[i].valid && slot[i].tid == 3'(t) && slot[i].pc == pc &&
            slot[i].insn == content(pc) && slot[i].pred_next == head[t].next && slot[i].ckpt == head[t].ckpt &&
            slot[i].last == ((i == exp_n - 1) && exp_n == int'(head[t].len)));
      end
      if (exp_miss) begin nmiss++; want[t] = exp_line; end
      @(posedge clk);
      #1;
      if (exp_miss && !(mresp_v && mresp_line == exp_line)) chk("blocked after miss", blocked[t]);
    end
    // drain: every blocked thread is released by its refill
    repeat (40) @(posedge clk);
    chk("all refills returned", blocked == 2'b00);
    chk("coverage", nmiss > 20 && npart > 5 && nreq > 10);
    $display("misses %0d partial %0d requests %0d", nmiss, npart, nreq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
