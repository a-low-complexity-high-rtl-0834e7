// Self-checking test of return_address_stack: random pushes, pops,
// push+pop and pointer restores against a reference circular stack,
// including overflow past 64 entries.
module tb_return_address_stack;
  import smt_fetch_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push, pop, restore;
  waddr_t push_addr, top;
  logic [5:0] tos, restore_tos;
  waddr_t ref_s [64];
  int ref_p;
  int checks = 0, failures = 0;

  return_address_stack #(.DEPTH(64)) dut (.clk, .rst_n, .push, .pop, .push_addr, .top, .tos,
                                          .restore, .restore_tos);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; restore = 0; push_addr = '0; restore_tos = '0;
    ref_p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the stack completely so every entry the reference reads is known
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      push = 1; pop = 0; push_addr = waddr_t'($urandom);
      @(posedge clk);
      ref_p = (ref_p + 1) % 64; ref_s[ref_p] = push_addr;
    end
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 99);
      push = (cyc % 400 < 200) ? (r < 55) : (r < 35);
      pop  = ($urandom_range(0, 99) < 45);
      restore = ($urandom_range(0, 99) < 3);
      restore_tos = 6'($urandom);
      push_addr = waddr_t'($urandom);
      #1;
      checks++;
      if (top != ref_s[ref_p] || int'(tos) != ref_p) begin
        failures++;
        if (failures < 10) $display("cyc %0d top %h exp %h tos %0d exp %0d", cyc, top, ref_s[ref_p], tos, ref_p);
      end
      @(posedge clk);
      if (restore) ref_p = int'(restore_tos);
      else if (push && pop) ref_s[ref_p] = push_addr;
      else if (push) begin ref_p = (ref_p + 1) % 64; ref_s[ref_p] = push_addr; end
      else if (pop) ref_p = (ref_p + 63) % 64;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
