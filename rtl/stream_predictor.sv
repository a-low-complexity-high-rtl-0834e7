// Two-level cascaded stream predictor.
//
// Given the start word address of a stream and the thread's path history,
// it predicts how many sequential instructions follow before the next taken
// branch, where that branch goes and how the stream ends (branch, call or
// return). The first level (L1_ENTRIES, L1_WAYS-way) is indexed by the start
// address alone; the second level (L2_ENTRIES, L2_WAYS-way) is indexed by a
// DOLC hash of the path history and the start address, so it can tell apart
// streams that start at the same address but follow different paths. When
// the second level hits its prediction wins, otherwise the first level's;
// when neither hits, a sequential stream of SEQ_LEN instructions is
// predicted. The table sizes and the DOLC 16-2-4-10 geometry follow the
// document; the hash, the entry layout, the replacement and the hysteresis
// counters are this design's choices.
//
// Interface and timing: the prediction port is combinational (the tables
// are read in the prediction stage and the result is written into an FTQ at
// the next clock edge). The update port writes both levels at the clock
// edge: a matching entry gains confidence when it agreed with the outcome
// and loses it otherwise, being replaced once its counter is zero; a missing
// stream is allocated in an invalid way or the set's round-robin victim.
module stream_predictor
  import smt_fetch_pkg::*;
#(
  parameter int unsigned L1_ENTRIES = 1024,
  parameter int unsigned L1_WAYS    = 4,
  parameter int unsigned L2_ENTRIES = 4096,
  parameter int unsigned L2_WAYS    = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // prediction
  input  waddr_t pred_addr,
  input  hist_t  pred_hist,
  output logic   pred_hit_l1,
  output logic   pred_hit_l2,
  output slen_t  pred_len,
  output waddr_t pred_target,
  output stype_e pred_type,
  // training
  input  logic   upd_valid,
  input  waddr_t upd_addr,
  input  hist_t  upd_hist,
  input  slen_t  upd_len,
  input  waddr_t upd_target,
  input  stype_e upd_type
);

  typedef struct packed {
    waddr_t     tag;
    slen_t      len;
    waddr_t     target;
    stype_e     stype;
    logic [1:0] conf;
  } sp_entry_t;

  localparam int unsigned L1_SETS = L1_ENTRIES / L1_WAYS;
  localparam int unsigned L2_SETS = L2_ENTRIES / L2_WAYS;
  localparam int unsigned L1_IB   = $clog2(L1_SETS);
  localparam int unsigned L2_IB   = $clog2(L2_SETS);
  localparam int unsigned L1_WB   = (L1_WAYS > 1) ? $clog2(L1_WAYS) : 1;
  localparam int unsigned L2_WB   = (L2_WAYS > 1) ? $clog2(L2_WAYS) : 1;

  sp_entry_t        l1_mem   [L1_SETS][L1_WAYS];
  sp_entry_t        l2_mem   [L2_SETS][L2_WAYS];
  logic [L1_WAYS-1:0] l1_vld [L1_SETS];
  logic [L2_WAYS-1:0] l2_vld [L2_SETS];
  logic [L1_WB-1:0] l1_rr    [L1_SETS];
  logic [L2_WB-1:0] l2_rr    [L2_SETS];

  function automatic logic [L1_IB-1:0] l1_index(waddr_t a);
    return a[L1_IB-1:0];
  endfunction

  function automatic logic [L2_IB-1:0] l2_index(hist_t h, waddr_t a);
    logic [15:0] f;
    f = dolc_fold(h, a, L2_IB);
    return f[L2_IB-1:0];
  endfunction

  // ---------------- prediction ----------------
  logic [L1_IB-1:0] p1_idx;
  logic [L2_IB-1:0] p2_idx;
  sp_entry_t        p1_e, p2_e;

  always_comb begin
    p1_idx      = l1_index(pred_addr);
    p2_idx      = l2_index(pred_hist, pred_addr);
    pred_hit_l1 = 1'b0;
    pred_hit_l2 = 1'b0;
    p1_e        = '0;
    p2_e        = '0;
    for (int unsigned w = 0; w < L1_WAYS; w++)
      if (l1_vld[p1_idx][w] && l1_mem[p1_idx][w].tag == pred_addr) begin
        pred_hit_l1 = 1'b1;
        p1_e        = l1_mem[p1_idx][w];
      end
    for (int unsigned w = 0; w < L2_WAYS; w++)
      if (l2_vld[p2_idx][w] && l2_mem[p2_idx][w].tag == pred_addr) begin
        pred_hit_l2 = 1'b1;
        p2_e        = l2_mem[p2_idx][w];
      end
    if (pred_hit_l2) begin
      pred_len    = p2_e.len;
      pred_target = p2_e.target;
      pred_type   = p2_e.stype;
    end else if (pred_hit_l1) begin
      pred_len    = p1_e.len;
      pred_target = p1_e.target;
      pred_type   = p1_e.stype;
    end else begin
      pred_len    = slen_t'(SEQ_LEN);
      pred_target = pred_addr + waddr_t'(SEQ_LEN);
      pred_type   = ST_SEQ;
    end
  end

  // ---------------- training ----------------
  logic [L1_IB-1:0] u1_idx;
  logic [L2_IB-1:0] u2_idx;
  logic             u1_hit, u2_hit;
  logic [L1_WB-1:0] u1_way;
  logic [L2_WB-1:0] u2_way;
  sp_entry_t        u1_old, u2_old, u1_new, u2_new;
  logic             u1_adv_rr, u2_adv_rr;

  // Compute the entry to write for one level from the looked-up way.
  function automatic sp_entry_t train(logic hit, sp_entry_t old, waddr_t a, slen_t l,
                                      waddr_t t, stype_e ty);
    sp_entry_t n;
    logic same;
    same = hit && old.len == l && old.target == t && old.stype == ty;
    n = old;
    if (same) begin
      if (old.conf != 2'd3) n.conf = old.conf + 2'd1;
    end else if (hit && old.conf != 2'd0) begin
      n.conf = old.conf - 2'd1;
    end else begin
      n.tag    = a;
      n.len    = l;
      n.target = t;
      n.stype  = ty;
      n.conf   = 2'd1;
    end
    return n;
  endfunction

  always_comb begin
    u1_idx = l1_index(upd_addr);
    u2_idx = l2_index(upd_hist, upd_addr);
    u1_hit = 1'b0;
    u2_hit = 1'b0;
    u1_way = l1_rr[u1_idx];
    u2_way = l2_rr[u2_idx];
    u1_adv_rr = 1'b1;
    u2_adv_rr = 1'b1;
    // prefer an invalid way over the round-robin victim
    for (int w = L1_WAYS - 1; w >= 0; w--)
      if (!l1_vld[u1_idx][w]) begin u1_way = L1_WB'(w); u1_adv_rr = 1'b0; end
    for (int w = L2_WAYS - 1; w >= 0; w--)
      if (!l2_vld[u2_idx][w]) begin u2_way = L2_WB'(w); u2_adv_rr = 1'b0; end
    for (int unsigned w = 0; w < L1_WAYS; w++)
      if (l1_vld[u1_idx][w] && l1_mem[u1_idx][w].tag == upd_addr) begin
        u1_hit = 1'b1; u1_way = L1_WB'(w); u1_adv_rr = 1'b0;
      end
    for (int unsigned w = 0; w < L2_WAYS; w++)
      if (l2_vld[u2_idx][w] && l2_mem[u2_idx][w].tag == upd_addr) begin
        u2_hit = 1'b1; u2_way = L2_WB'(w); u2_adv_rr = 1'b0;
      end
    u1_old = l1_mem[u1_idx][u1_way];
    u2_old = l2_mem[u2_idx][u2_way];
    u1_new = train(u1_hit, u1_old, upd_addr, upd_len, upd_target, upd_type);
    u2_new = train(u2_hit, u2_old, upd_addr, upd_len, upd_target, upd_type);
  end

  always_ff @(posedge clk) begin
    if (upd_valid) begin
      l1_mem[u1_idx][u1_way] <= u1_new;
      l2_mem[u2_idx][u2_way] <= u2_new;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < L1_SETS; s++) begin
        l1_vld[s] <= '0;
        l1_rr[s]  <= '0;
      end
      for (int unsigned s = 0; s < L2_SETS; s++) begin
        l2_vld[s] <= '0;
        l2_rr[s]  <= '0;
      end
    end else if (upd_valid) begin
      l1_vld[u1_idx][u1_way] <= 1'b1;
      l2_vld[u2_idx][u2_way] <= 1'b1;
      if (u1_adv_rr) l1_rr[u1_idx] <= l1_rr[u1_idx] + 1'b1;
      if (u2_adv_rr) l2_rr[u2_idx] <= l2_rr[u2_idx] + 1'b1;
    end
  end

endmodule
