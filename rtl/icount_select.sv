// ICOUNT thread selector.
//
// Among the threads marked eligible, picks the one with the fewest
// instructions in the decode, rename and dispatch stages, as reported by
// `counts`. This steers fetch towards threads that are moving through the
// pipeline and away from threads that are clogging it. The policy follows
// the document; breaking ties with a rotating pointer (the first tied thread
// at or after `rr_ptr` wins) is this design's choice.
//
// Interface and timing: purely combinational. `sel_valid` is low when no
// thread is eligible.
module icount_select #(
  parameter int unsigned NTHREADS = 8,
  parameter int unsigned CNT_W    = 8,
  localparam int unsigned TW      = (NTHREADS > 1) ? $clog2(NTHREADS) : 1
) (
  input  logic [NTHREADS-1:0]            eligible,
  input  logic [NTHREADS-1:0][CNT_W-1:0] counts,
  input  logic [TW-1:0]                  rr_ptr,
  output logic                           sel_valid,
  output logic [TW-1:0]                  sel_tid
);

  logic [CNT_W-1:0] best;
  logic [TW-1:0]    t;

  always_comb begin
    sel_valid = 1'b0;
    sel_tid   = '0;
    best      = '1;
    // visit threads in rotated order; a strictly smaller count replaces
    for (int unsigned k = 0; k < NTHREADS; k++) begin
      t = TW'((32'(rr_ptr) + k) % NTHREADS);
      if (eligible[t] && (!sel_valid || counts[t] < best)) begin
        sel_valid = 1'b1;
        sel_tid   = t;
        best      = counts[t];
      end
    end
  end

endmodule
