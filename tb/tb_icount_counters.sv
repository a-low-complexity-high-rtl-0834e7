// Self-checking test of icount_counters: random increments and decrements
// per thread against a saturating reference count.
module tb_icount_counters;
  logic clk = 0, rst_n = 0;
  logic [7:0][3:0] inc;
  logic [7:0][7:0] dec, cnt;
  int ref_c [8];
  int checks = 0, failures = 0;

  icount_counters #(.NTHREADS(8), .CNT_W(8), .INC_W(4)) dut (.clk, .rst_n, .inc, .dec, .counts(cnt));
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc = '0; dec = '0;
    foreach (ref_c[t]) ref_c[t] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int t = 0; t < 8; t++) begin
        inc[t] = 4'($urandom_range(0, 8));
        dec[t] = 8'((cyc % 500 < 250) ? $urandom_range(0, 6) : $urandom_range(0, 12));
        if (cyc % 700 == 0) dec[t] = 8'd255;
      end
      @(posedge clk);
      for (int t = 0; t < 8; t++) begin
        ref_c[t] = ref_c[t] + int'(inc[t]) - int'(dec[t]);
        if (ref_c[t] < 0) ref_c[t] = 0;
        if (ref_c[t] > 255) ref_c[t] = 255;
      end
      #1;
      for (int t = 0; t < 8; t++) begin
        checks++;
        if (int'(cnt[t]) != ref_c[t]) begin
          failures++;
          if (failures < 10) $display("cyc %0d t%0d got %0d exp %0d", cyc, t, cnt[t], ref_c[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
