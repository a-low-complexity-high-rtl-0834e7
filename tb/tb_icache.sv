// Self-checking test of icache: lines are filled from a random pool that
// is larger than the cache, and random reads check hit0/hit1 and the line
// contents against a reference 2-way LRU cache of the same geometry
// (256 sets of two 64-byte ways; lines alternate between two banks).
module tb_icache;
  import smt_fetch_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rd_en, hit0, hit1, fill_valid;
  waddr_t rd_addr;
  insn_t [15:0] line0, line1, fill_data;
  logic [25:0] fill_line;
  // reference
  logic [25:0] rtag [256][2];
  logic        rvld [256][2];
  int          rlru [256];
  int checks = 0, failures = 0, nhit = 0, nmiss = 0, nsplit = 0;

  icache #(.SIZE_BYTES(32768), .WAYS(2), .LINE_BYTES(64)) dut (.clk, .rst_n, .rd_en, .rd_addr, .hit0, .hit1,
    .line0, .line1, .fill_valid, .fill_line, .fill_data);
  always #5 clk = ~clk;

  function automatic insn_t content(logic [25:0] la, int i);
    return insn_t'({la, 4'(i)} * 32'h9E3779B1 + 32'h1234567);
  endfunction

  function automatic int lookup(logic [25:0] la);
    for (int w = 0; w < 2; w++) if (rvld[la[7:0]][w] && rtag[la[7:0]][w] == la) return w;
    return -1;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; rd_addr = '0; fill_valid = 0; fill_line = '0; fill_data = '0;
    for (int s = 0; s < 256; s++) begin rvld[s][0] = 0; rvld[s][1] = 0; rlru[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      logic [25:0] la, la1;
      int w0, w1;
      @(negedge clk);
      la = 26'($urandom_range(0, 1023)) + 26'h100000;   // pool of 1024 lines = 2x capacity
      rd_addr = {la, 4'($urandom)};
      rd_en = ($urandom_range(0, 1) == 1);
      fill_valid = ($urandom_range(0, 99) < 40);
      fill_line  = 26'($urandom_range(0, 1023)) + 26'h100000;
      if (lookup(fill_line) >= 0) fill_valid = 0;   // the fetch unit refills only missing lines
      for (int i = 0; i < 16; i++) fill_data[i] = content(fill_line, i);
      #1;
      la1 = la + 1;
      w0 = lookup(la); w1 = lookup(la1);
      checks++;
      if (hit0 != (w0 >= 0) || hit1 != (w1 >= 0)) begin
        failures++;
        if (failures < 10) $display("cyc %0d hit %b%b exp %0d %0d", cyc, hit0, hit1, w0, w1);
      end
      if (w0 >= 0) begin nhit++; for (int i = 0; i < 16; i++) begin checks++; if (line0[i] != content(la, i)) failures++; end end
      else nmiss++;
      if (w1 >= 0) begin nsplit++; for (int i = 0; i < 16; i++) begin checks++; if (line1[i] != content(la1, i)) failures++; end end
      @(posedge clk);
      // reference update: LRU points at the way to replace next; a fill
      // chooses its way from the LRU state at the start of the cycle
      begin
        int s, fw;
        s = int'(fill_line[7:0]);
        fw = rlru[s];
        if (rd_en && w0 >= 0) rlru[la[7:0]] = 1 - w0;
        if (rd_en && w1 >= 0) rlru[la1[7:0]] = 1 - w1;
        if (fill_valid) begin
        if (!rvld[s][1]) fw = 1;
        if (!rvld[s][0]) fw = 0;
        rvld[s][fw] = 1; rtag[s][fw] = fill_line; rlru[s] = 1 - fw;
        end
      end
    end
    checks++;
    if (nhit == 0 || nmiss == 0 || nsplit == 0) begin failures++; $display("coverage hit %0d miss %0d", nhit, nmiss); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
