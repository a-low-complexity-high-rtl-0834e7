// ICOUNT instruction counters, one per thread.
//
// Each counter holds the number of the thread's instructions that have left
// the fetch buffer and not yet left the dispatch stage, i.e. the
// instructions in decode, rename and dispatch that the ICOUNT policy ranks
// threads by. Instructions are counted in when they are handed to decode
// (`inc`, from the fetch buffer read port) and counted out when the back end
// reports them dispatched or squashed (`dec`). Where counting starts and
// ends on the back-end side, and the saturation at both ends, are this
// design's choices.
//
// Interface and timing: `counts` is registered; inc and dec of the same
// cycle are applied together at the clock edge.
module icount_counters #(
  parameter int unsigned NTHREADS = 8,
  parameter int unsigned CNT_W    = 8,
  parameter int unsigned INC_W    = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NTHREADS-1:0][INC_W-1:0] inc,
  input  logic [NTHREADS-1:0][CNT_W-1:0] dec,
  output logic [NTHREADS-1:0][CNT_W-1:0] counts
);

  logic [CNT_W+1:0] nxt [NTHREADS];

  always_comb begin
    for (int unsigned t = 0; t < NTHREADS; t++) begin
      nxt[t] = {2'b00, counts[t]} + (CNT_W+2)'(inc[t]);
      if (nxt[t] < (CNT_W+2)'(dec[t])) nxt[t] = '0;
      else                             nxt[t] = nxt[t] - (CNT_W+2)'(dec[t]);
      if (nxt[t] > (CNT_W+2)'({CNT_W{1'b1}})) nxt[t] = (CNT_W+2)'({CNT_W{1'b1}});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) counts <= '0;
    else
      for (int unsigned t = 0; t < NTHREADS; t++) counts[t] <= nxt[t][CNT_W-1:0];
  end

endmodule
