// Fetch target queue of one thread (one instance per thread).
//
// The prediction stage appends predicted streams; the fetch stage works on
// the head. A stream longer than what one fetch cycle delivers is consumed
// in pieces: consuming fewer instructions than the head holds advances the
// head's start address and shortens its length, consuming all of them pops
// it. The depth (4 entries per thread) follows the document; partial
// consumption of the head is this design's choice.
//
// Interface and timing: `head`, `empty`, `full` and `count` reflect the
// registered state. push, consume and flush act at the clock edge; flush
// empties the queue and ignores a push of the same cycle. A push into a full
// queue is an error (asserted).
module ftq
  import smt_fetch_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       push,
  input  ftq_entry_t push_data,
  input  logic       consume,
  input  slen_t      consume_n,
  output ftq_entry_t head,
  output logic       empty,
  output logic       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  ftq_entry_t    q [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] cnt;
  logic          pop;

  assign head  = q[rd_ptr];
  assign empty = (cnt == '0);
  assign full  = (cnt == CW'(DEPTH));
  assign count = cnt;
  assign pop   = consume && !empty && (consume_n >= head.len);

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      cnt <= cnt + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (!flush) begin
      if (consume && !empty && !pop) begin
        q[rd_ptr].start <= head.start + waddr_t'(consume_n);
        q[rd_ptr].len   <= head.len - consume_n;
      end
      if (push) q[wr_ptr] <= push_data;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push && !flush |-> !full || pop)
    else $error("ftq: push into a full queue");
endmodule
