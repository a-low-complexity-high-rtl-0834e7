// Self-checking test of fetch_align: random pairs of lines, every offset
// and count; each output slot is compared with the instruction picked
// directly from the two lines.
module tb_fetch_align;
  import smt_fetch_pkg::*;
  insn_t [15:0] l0, l1, ins;
  logic  [3:0]  off;
  logic  [4:0]  cnt;
  logic  [15:0] vld;
  int checks = 0, failures = 0;

  fetch_align #(.FETCH_W(16), .LINE_W(16)) dut (.line0(l0), .line1(l1), .offset(off), .count(cnt),
                                                .insn(ins), .valid(vld));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < 16; i++) begin l0[i] = $urandom; l1[i] = $urandom; end
      for (int o = 0; o < 16; o++)
        for (int c = 0; c <= 16; c++) begin
          insn_t exp;
          off = 4'(o); cnt = 5'(c);
          #1;
          for (int i = 0; i < 16; i++) begin
            exp = (i < c) ? ((o + i < 16) ? l0[o+i] : l1[o+i-16]) : '0;
            checks++;
            if (vld[i] != (i < c) || ins[i] != exp) begin
              failures++;
              if (failures < 10) $display("mismatch off=%0d cnt=%0d slot=%0d got %h exp %h", o, c, i, ins[i], exp);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
