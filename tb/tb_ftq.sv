// Self-checking test of ftq: random pushes, partial and full consumption
// of the head, and flushes, against a reference queue. Also checks that the
// queue reports full after four pushes.
module tb_ftq;
  import smt_fetch_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush, push, consume, empty, full;
  ftq_entry_t push_data, head;
  slen_t consume_n;
  logic [2:0] count;
  ftq_entry_t rq [$];
  int checks = 0, failures = 0, seen_full = 0;

  ftq #(.DEPTH(4)) dut (.clk, .rst_n, .flush, .push, .push_data, .consume, .consume_n, .head, .empty,
                        .full, .count);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; push = 0; consume = 0; consume_n = '0; push_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      #1;
      checks++;
      if (empty != (rq.size() == 0) || full != (rq.size() == 4) || int'(count) != rq.size() ||
          (rq.size() > 0 && (head.start != rq[0].start || head.len != rq[0].len || head.next != rq[0].next))) begin
        failures++;
        if (failures < 10) $display("cyc %0d size %0d/%0d", cyc, count, rq.size());
      end
      if (full) seen_full++;
      flush = ($urandom_range(0, 99) < 2);
      push  = !full && ($urandom_range(0, 99) < ((cyc % 600 < 300) ? 60 : 30));
      push_data = '0;
      push_data.start = waddr_t'($urandom);
      push_data.len   = slen_t'($urandom_range(1, 63));
      push_data.next  = waddr_t'($urandom);
      push_data.sstart = push_data.start;
      consume = !empty && ($urandom_range(0, 99) < 50);
      consume_n = (rq.size() > 0) ? slen_t'($urandom_range(1, int'(rq[0].len))) : 6'd1;
      @(posedge clk);
      if (flush) rq.delete();
      else begin
        if (consume && rq.size() > 0) begin
          if (consume_n >= rq[0].len) void'(rq.pop_front());
          else begin rq[0].start += waddr_t'(consume_n); rq[0].len -= consume_n; end
        end
        if (push) rq.push_back(push_data);
      end
    end
    checks++;
    if (seen_full == 0) begin failures++; $display("queue never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
