// Self-checking test of fetch_buffer: random fetch blocks of up to 16
// instructions are written when room allows, decode takes up to 8 per
// cycle when ready, and random thread flushes clear entries. Every slot
// handed to decode is compared with a reference queue.
module tb_fetch_buffer;
  import smt_fetch_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] wr_cnt;
  fb_entry_t [15:0] wr_slot;
  logic [5:0] room;
  logic rd_ready, flush;
  fb_entry_t [7:0] rd_slot;
  logic [3:0] rd_cnt;
  logic [2:0] flush_tid;
  fb_entry_t rq [$];
  int checks = 0, failures = 0, nread = 0, nfull = 0;

  fetch_buffer #(.DEPTH(32), .WR_W(16), .RD_W(8)) dut (.clk, .rst_n, .wr_cnt, .wr_slot, .room,
    .rd_ready, .rd_slot, .rd_cnt, .flush, .flush_tid);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_cnt = '0; wr_slot = '0; rd_ready = 0; flush = 0; flush_tid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int n;
      @(negedge clk);
      rd_ready  = ($urandom_range(0, 99) < ((cyc % 800 < 400) ? 30 : 90));
      flush     = ($urandom_range(0, 99) < 3);
      flush_tid = 3'($urandom);
      n = (room >= 16 && $urandom_range(0, 99) < 70) ? $urandom_range(1, 16) : 0;
      wr_cnt = 5'(n);
      for (int i = 0; i < 16; i++) begin
        wr_slot[i] = '0;
        wr_slot[i].valid = (i < n);
        wr_slot[i].tid   = (flush && flush_tid == 3'(cyc % 8)) ? 3'((cyc + 1) % 8) : 3'(cyc % 8);
        wr_slot[i].pc    = waddr_t'($urandom);
        wr_slot[i].insn  = insn_t'($urandom);
      end
      #1;
      checks++;
      if (int'(room) != 32 - rq.size() || int'(rd_cnt) != ((rq.size() > 8) ? 8 : rq.size())) begin
        failures++;
        if (failures < 10) $display("cyc %0d room %0d exp %0d", cyc, room, 32 - rq.size());
      end
      if (room < 16) nfull++;
      for (int i = 0; i < 8; i++) begin
        if (i < rq.size()) begin
          logic ev;
          ev = rq[i].valid && !(flush && rq[i].tid == flush_tid);
          checks++;
          if (rd_slot[i].valid != ev || (ev && (rd_slot[i].pc != rq[i].pc || rd_slot[i].insn != rq[i].insn))) begin
            failures++;
            if (failures < 10) $display("cyc %0d slot %0d mismatch", cyc, i);
          end
        end
      end
      @(posedge clk);
      if (rd_ready) for (int i = 0; i < 8 && rq.size() > 0; i++) begin void'(rq.pop_front()); nread++; end
      if (flush) foreach (rq[k]) if (rq[k].tid == flush_tid) rq[k].valid = 1'b0;
      for (int i = 0; i < n; i++) rq.push_back(wr_slot[i]);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("buffer never ran short of room"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
