// Fetch buffer between the fetch stage and decode.
//
// A circular queue of DEPTH instruction slots. The fetch stage writes up to
// WR_W instructions per cycle (one fetch block, valid slots first) and
// decode takes up to RD_W per cycle in order. Fetch checks `room` before
// fetching, so when decode stalls and the buffer fills, fetch stalls too.
// A thread flush (after a misprediction of that thread) clears the valid
// bit of that thread's slots in place; the holes reach decode as invalid
// slots and are then freed. The 32-entry depth, the 16-wide fill and the
// 8-wide drain follow the document; flushing in place is this design's
// choice.
//
// Interface and timing: `rd_slot` and `room` are combinational from the
// registered state. A write and a read are accepted together at the clock
// edge; `rd_cnt` is the number of slots handed out when `rd_ready` is high.
// Writing more than `room` slots is an error (asserted).
module fetch_buffer
  import smt_fetch_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WR_W  = 16,
  parameter int unsigned RD_W  = 8,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned WCW  = $clog2(WR_W + 1),
  localparam int unsigned RCW  = $clog2(RD_W + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // write side
  input  logic [WCW-1:0]        wr_cnt,
  input  fb_entry_t [WR_W-1:0]  wr_slot,
  output logic [CW-1:0]         room,
  // read side
  input  logic                  rd_ready,
  output fb_entry_t [RD_W-1:0]  rd_slot,
  output logic [RCW-1:0]        rd_cnt,
  // per-thread flush
  input  logic                  flush,
  input  logic [2:0]            flush_tid
);

  localparam int unsigned PW = $clog2(DEPTH);

  fb_entry_t     buf_q [DEPTH];
  logic [PW-1:0] head, tail;
  logic [CW-1:0] used;

  function automatic logic [PW-1:0] wrap(logic [PW-1:0] p, int unsigned k);
    return PW'((32'(p) + k) % DEPTH);
  endfunction

  assign room   = CW'(DEPTH) - used;
  assign rd_cnt = (used > CW'(RD_W)) ? RCW'(RD_W) : RCW'(used);

  always_comb begin
    for (int unsigned i = 0; i < RD_W; i++) begin
      rd_slot[i] = buf_q[wrap(head, i)];
      if (i >= 32'(rd_cnt) || (flush && rd_slot[i].tid == flush_tid))
        rd_slot[i].valid = 1'b0;
    end
  end

  logic [RCW-1:0] taken;
  assign taken = rd_ready ? rd_cnt : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      used <= '0;
    end else begin
      head <= wrap(head, 32'(taken));
      tail <= wrap(tail, 32'(wr_cnt));
      used <= used + CW'(wr_cnt) - CW'(taken);
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned d = 0; d < DEPTH; d++)
      if (flush && buf_q[d].tid == flush_tid) buf_q[d].valid <= 1'b0;
    for (int unsigned i = 0; i < WR_W; i++)
      if (i < 32'(wr_cnt)) buf_q[wrap(tail, i)] <= wr_slot[i];
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) CW'(wr_cnt) <= room)
    else $error("fetch_buffer: write beyond free room");
endmodule
