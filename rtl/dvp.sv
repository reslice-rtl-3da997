// dvp: Dependence and Value Predictor, extended to predict slice buffering.
//
// A PC-indexed, 4-way set-associative table of 512 entries. Each entry holds a
// 4-bit confidence counter (the 2 bits of the dependence predictor plus the 2
// bits added to predict buffering) and a hybrid value predictor that chooses,
// with a 2-bit selector counter, between a last-value and a stride
// (incremental) prediction.
//   * Lookup (combinational, at fetch): a load whose PC hits a valid entry is a
//     seed, so slice buffering starts. If the two most significant confidence
//     bits are both set, a dependence is predicted and the predicted value is
//     used (use_pred); otherwise the load uses the value it reads.
//   * Insert: a load whose address matched the dependence buffer is inserted
//     (or refreshed) with confidence at its maximum.
//   * Train: the correct value of a predicted load updates the value predictor.
//   * Decay: every DECAY_CYCLES cycles all counters are decremented; an entry
//     whose counter would go below zero is invalidated.
// The value predictor's update rules, the indexing and the replacement
// (round-robin per set) are this design's own; the source gives only its kind.
module dvp
  import reslice_pkg::*;
#(
  parameter int unsigned ENTRIES      = 512,
  parameter int unsigned WAYS         = 4,
  parameter int unsigned CONF_BITS    = 4,
  parameter int unsigned DECAY_CYCLES = 100000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t lk_pc,
  output logic  lk_seed,       // hit: mark as seed and buffer its slice
  output logic  lk_use_pred,   // confident: use the predicted value
  output word_t lk_value,      // predicted value
  input  logic  ins_valid,
  input  word_t ins_pc,
  input  logic  tr_valid,
  input  word_t tr_pc,
  input  word_t tr_value,
  output logic  decay_tick     // high in the cycle the counters are decremented
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = XLEN - 2 - SET_W;

  typedef struct packed {
    logic                 valid;
    logic [TAG_W-1:0]     tag;
    logic [CONF_BITS-1:0] conf;
    word_t                last;
    word_t                stride;
    logic [1:0]           sel;     // >= 2: use the stride prediction
  } dvp_entry_t;

  dvp_entry_t       tbl [SETS][WAYS];
  logic [WAY_W-1:0] rr  [SETS];
  logic [$clog2(DECAY_CYCLES)-1:0] decay_cnt;

  function automatic logic [SET_W-1:0] idx_of(word_t pc);
    return pc[2 +: SET_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(word_t pc);
    return pc[XLEN-1 -: TAG_W];
  endfunction

  typedef struct packed {
    logic             hit;
    logic [WAY_W-1:0] way;
    logic             has_free;
    logic [WAY_W-1:0] free_way;
  } probe_t;

  function automatic probe_t probe(word_t pc);
    probe_t r;
    r = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (tbl[idx_of(pc)][w].valid && tbl[idx_of(pc)][w].tag == tag_of(pc)) begin
        r.hit = 1'b1;
        r.way = WAY_W'(w);
      end
      if (!tbl[idx_of(pc)][w].valid) begin
        r.has_free = 1'b1;
        r.free_way = WAY_W'(w);
      end
    end
    return r;
  endfunction

  probe_t     p_lk, p_ins, p_tr;
  dvp_entry_t e_lk, e_tr;

  always_comb begin
    p_lk        = probe(lk_pc);
    p_ins       = probe(ins_pc);
    p_tr        = probe(tr_pc);
    e_lk        = tbl[idx_of(lk_pc)][p_lk.way];
    e_tr        = tbl[idx_of(tr_pc)][p_tr.way];
    lk_seed     = p_lk.hit;
    lk_use_pred = p_lk.hit && (&e_lk.conf[CONF_BITS-1 -: 2]);
    lk_value    = (e_lk.sel[1]) ? e_lk.last + e_lk.stride : e_lk.last;
    decay_tick  = (32'(decay_cnt) == DECAY_CYCLES - 1);
  end

  logic lv_ok, st_ok;
  assign lv_ok = (e_tr.last == tr_value);
  assign st_ok = (e_tr.last + e_tr.stride == tr_value);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decay_cnt <= '0;
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) tbl[s][w] <= '0;
      end
    end else begin
      decay_cnt <= decay_tick ? '0 : decay_cnt + 1'b1;
      if (decay_tick) begin
        for (int s = 0; s < SETS; s++)
          for (int w = 0; w < WAYS; w++)
            if (tbl[s][w].valid) begin
              if (tbl[s][w].conf == '0) tbl[s][w].valid <= 1'b0;
              else                      tbl[s][w].conf  <= tbl[s][w].conf - 1'b1;
            end
      end
      if (tr_valid && p_tr.hit) begin
        tbl[idx_of(tr_pc)][p_tr.way].last   <= tr_value;
        tbl[idx_of(tr_pc)][p_tr.way].stride <= tr_value - e_tr.last;
        if (st_ok && !lv_ok && e_tr.sel != 2'b11)
          tbl[idx_of(tr_pc)][p_tr.way].sel <= e_tr.sel + 1'b1;
        else if (lv_ok && !st_ok && e_tr.sel != 2'b00)
          tbl[idx_of(tr_pc)][p_tr.way].sel <= e_tr.sel - 1'b1;
      end
      // Insertion is last so that it wins over decay in the same cycle.
      if (ins_valid) begin
        if (p_ins.hit) begin
          tbl[idx_of(ins_pc)][p_ins.way].conf <= '1;
        end else if (p_ins.has_free) begin
          tbl[idx_of(ins_pc)][p_ins.free_way] <= '{valid: 1'b1, tag: tag_of(ins_pc),
                                                  conf: '1, last: '0, stride: '0, sel: '0};
        end else begin
          tbl[idx_of(ins_pc)][rr[idx_of(ins_pc)]] <= '{valid: 1'b1, tag: tag_of(ins_pc),
                                                       conf: '1, last: '0, stride: '0, sel: '0};
          rr[idx_of(ins_pc)] <= rr[idx_of(ins_pc)] + 1'b1;
        end
      end
    end
  end

endmodule
