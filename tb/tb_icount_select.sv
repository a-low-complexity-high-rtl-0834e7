// Self-checking test of icount_select: random counts, eligibility masks and
// tie-break pointers; the choice is compared with a reference that scans
// for the minimum count with ties going to the first thread at or after
// the pointer.
module tb_icount_select;
  logic [7:0]      elig;
  logic [7:0][7:0] cnts;
  logic [2:0]      rr;
  logic            sv;
  logic [2:0]      st;
  int checks = 0, failures = 0;

  icount_select #(.NTHREADS(8), .CNT_W(8)) dut (.eligible(elig), .counts(cnts), .rr_ptr(rr),
                                               .sel_valid(sv), .sel_tid(st));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 5000; rep++) begin
      int best, bt;
      elig = 8'($urandom);
      if (rep % 10 == 0) elig = '0;
      for (int t = 0; t < 8; t++) cnts[t] = 8'($urandom_range(0, (rep % 2) ? 3 : 255));
      rr = 3'($urandom);
      #1;
      best = 1000; bt = -1;
      for (int k = 0; k < 8; k++) begin
        int t;
        t = (int'(rr) + k) % 8;
        if (elig[t] && int'(cnts[t]) < best) begin best = cnts[t]; bt = t; end
      end
      checks++;
      if (sv != (bt >= 0) || (bt >= 0 && int'(st) != bt)) begin
        failures++;
        if (failures < 10) $display("mismatch elig=%b rr=%0d got %0d/%0d exp %0d", elig, rr, sv, st, bt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
