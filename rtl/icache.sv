// Single-ported, set-associative L1 instruction cache.
//
// Only one thread reads the cache per cycle, so it needs one port and no
// bank-conflict logic. To let a fetch block of up to 16 instructions start
// anywhere in a 64-byte (16-instruction) line, the sets are split into an
// even-line bank and an odd-line bank: one access reads the addressed line
// from one bank and the following line from the other. Size (32 KB), 2 ways
// and 64-byte lines follow the document; the even/odd split, LRU replacement
// and combinational read are this design's choices.
//
// Interface and timing: the read port is combinational. From `rd_addr` (a
// word address) it returns `hit0`/`line0` for the line holding it and
// `hit1`/`line1` for the next line. With `rd_en` high the LRU state of the
// hit lines is updated at the clock edge. The fill port writes a whole line
// at the clock edge into the LRU way of its set.
module icache
  import smt_fetch_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 32768,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned LINE_BYTES = 64,
  localparam int unsigned LINE_W    = LINE_BYTES / 4,             // instructions per line
  localparam int unsigned OFF_B     = $clog2(LINE_W),
  localparam int unsigned LA_W      = WA_W - OFF_B                // line address width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rd_en,
  input  waddr_t                   rd_addr,
  output logic                     hit0,
  output logic                     hit1,
  output insn_t [LINE_W-1:0]       line0,
  output insn_t [LINE_W-1:0]       line1,
  input  logic                     fill_valid,
  input  logic [LA_W-1:0]          fill_line,
  input  insn_t [LINE_W-1:0]       fill_data
);

  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned BSETS = SETS / 2;                 // sets per bank
  localparam int unsigned BI_B  = $clog2(BSETS);
  localparam int unsigned SI_B  = $clog2(SETS);
  localparam int unsigned TAG_W = LA_W - SI_B;
  localparam int unsigned WB    = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [LA_W-1:0] laddr_t;
  typedef logic [TAG_W-1:0] tag_t;

  // bank b holds the sets whose lowest set-index bit is b
  insn_t [LINE_W-1:0] data  [2][BSETS][WAYS];
  tag_t               tags  [2][BSETS][WAYS];
  logic [WAYS-1:0]    vld   [2][BSETS];
  logic [WB-1:0]      lru   [2][BSETS];       // way to replace next

  laddr_t la0, la1;
  logic   b0, b1;
  logic [BI_B-1:0] r0, r1;
  logic [WB-1:0]   w0, w1;

  assign la0 = rd_addr[WA_W-1:OFF_B];
  assign la1 = la0 + 1'b1;
  assign b0  = la0[0];
  assign b1  = la1[0];
  assign r0  = la0[SI_B-1:1];
  assign r1  = la1[SI_B-1:1];

  always_comb begin
    hit0 = 1'b0; hit1 = 1'b0; w0 = '0; w1 = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (vld[b0][r0][w] && tags[b0][r0][w] == la0[LA_W-1:SI_B]) begin hit0 = 1'b1; w0 = WB'(w); end
      if (vld[b1][r1][w] && tags[b1][r1][w] == la1[LA_W-1:SI_B]) begin hit1 = 1'b1; w1 = WB'(w); end
    end
    line0 = data[b0][r0][w0];
    line1 = data[b1][r1][w1];
  end

  // fill
  logic            fb;
  logic [BI_B-1:0] fr;
  logic [WB-1:0]   fw;
  assign fb = fill_line[0];
  assign fr = fill_line[SI_B-1:1];

  always_comb begin
    fw = lru[fb][fr];
    for (int w = WAYS - 1; w >= 0; w--)
      if (!vld[fb][fr][w]) fw = WB'(w);
  end

  always_ff @(posedge clk) begin
    if (fill_valid) begin
      data[fb][fr][fw] <= fill_data;
      tags[fb][fr][fw] <= fill_line[LA_W-1:SI_B];
    end
  end

  // 2-way LRU: point at the way not used last (for more ways: round robin)
  function automatic logic [WB-1:0] other(logic [WB-1:0] w);
    return (WAYS == 2) ? ~w : WB'((32'(w) + 1) % WAYS);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < 2; b++)
        for (int unsigned s = 0; s < BSETS; s++) begin
          vld[b][s] <= '0;
          lru[b][s] <= '0;
        end
    end else begin
      if (rd_en && hit0) lru[b0][r0] <= other(w0);
      if (rd_en && hit1) lru[b1][r1] <= other(w1);
      if (fill_valid) begin
        vld[fb][fr][fw] <= 1'b1;
        lru[fb][fr]     <= other(fw);
      end
    end
  end

endmodule
