// Return address stack of one thread (one instance per thread).
//
// A stream that ends in a call pushes the address following the call; a
// stream that ends in a return takes its target from the top of the stack
// and pops it. The stack is circular: pushing onto a full stack overwrites
// the oldest entry, popping an empty one returns a stale entry. The depth
// (64) follows the document; the circular organisation and the repair by
// restoring the top-of-stack pointer after a misprediction are this
// design's choices.
//
// Interface and timing: `top` is combinational from the current pointer;
// push, pop and restore take effect at the clock edge. When restore is high
// it wins over push and pop. Push and pop in the same cycle replace the top.
module return_address_stack
  import smt_fetch_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  logic       pop,
  input  waddr_t     push_addr,
  output waddr_t     top,
  output logic [5:0] tos,
  input  logic       restore,
  input  logic [5:0] restore_tos
);

  localparam int unsigned PW = $clog2(DEPTH);

  waddr_t        stack [DEPTH];
  logic [PW-1:0] ptr;          // index of the top entry

  assign top = stack[ptr];
  assign tos = 6'(ptr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (restore) begin
      ptr <= PW'(restore_tos);
    end else if (push && !pop) begin
      ptr <= ptr + 1'b1;
    end else if (pop && !push) begin
      ptr <= ptr - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!restore && push) begin
      if (pop) stack[ptr] <= push_addr;
      else     stack[ptr + 1'b1] <= push_addr;
    end
  end

endmodule
