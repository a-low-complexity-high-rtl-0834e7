// Fetch alignment network (mask and shift).
//
// The two cache lines read in one access are seen as one window of
// 2*LINE_W instructions. The network shifts the window left by `offset`,
// the position of the first wanted instruction in the first line, and masks
// everything past `count` instructions, so slot 0 of the result holds the
// first instruction of the fetch block. Widening fetch from 8 to 16
// instructions only widens this selection, as the document notes; the
// structure of the network is this design's choice.
//
// Interface and timing: purely combinational. `count` must not exceed
// FETCH_W.
module fetch_align
  import smt_fetch_pkg::*;
#(
  parameter int unsigned FETCH_W = 16,
  parameter int unsigned LINE_W  = 16,
  localparam int unsigned OFF_B  = $clog2(LINE_W),
  localparam int unsigned CNT_B  = $clog2(FETCH_W + 1)
) (
  input  insn_t [LINE_W-1:0]  line0,
  input  insn_t [LINE_W-1:0]  line1,
  input  logic  [OFF_B-1:0]   offset,
  input  logic  [CNT_B-1:0]   count,
  output insn_t [FETCH_W-1:0] insn,
  output logic  [FETCH_W-1:0] valid
);

  insn_t [2*LINE_W-1:0] window;

  always_comb begin
    window = {line1, line0};
    for (int unsigned i = 0; i < FETCH_W; i++) begin
      valid[i] = (i < 32'(count));
      insn[i]  = valid[i] ? window[32'(offset) + i] : '0;
    end
  end

endmodule
