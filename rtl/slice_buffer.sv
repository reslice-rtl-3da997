// slice_buffer: Instruction Buffer, Slice Descriptors and Slice Live-In File.
//
// The Slice Buffer holds every slice collected in the current task.
//   * IB (160 x 40 bits): the decoded instructions of all buffered slices in
//     program order, each stored once even when several slices share it. A
//     load or store is followed by an entry holding the address it accessed.
//   * SLIF (80 x 32 bits): slice live-in values, one entry per live-in
//     operand, shared by every slice for which that operand is a live-in.
//   * SDs (16 descriptors x 16 entries x 18 bits): one descriptor per slice,
//     listing its instructions in program order. An entry points to the IB
//     (SD.IB), optionally to a SLIF value (SD.SLIF), and carries the
//     TakenBranch, LeftOp and RightOp bits. A descriptor also has an Overlap
//     bit, set when one of its instructions belongs to more than one slice.
//
// Filling happens at retirement, one instruction per cycle. A retiring seed
// opens the descriptor of its slice ID. An instruction whose SliceTag is not
// zero is written to the IB (plus its address for a load/store), its live-in
// operands are written to the SLIF, and an entry is appended to the descriptor
// of every slice it belongs to. Overlap bits are set when the SliceTag has more
// than one bit. A slice stops being usable (sd_ok low) when its descriptor
// overflows (slices longer than 16 instructions are discarded), when the IB or
// SLIF is full, when it contains an indirect branch, or when abort_mask names
// it (tag cache eviction, undo log overflow). Entries are never freed inside a
// task; clear empties everything at the end of a task. These overflow rules are
// this design's choice where the source only states the discard of long
// slices and the abort on indirect branches.
//
// Read ports are combinational: MAX_CONC descriptor ports, one IB port that
// returns an entry and the next one (the address of a load/store), and one
// SLIF port.
module slice_buffer
  import reslice_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  // retirement
  input  logic                  rt_valid,
  input  dinst_t                rt_inst,
  input  slicetag_t             rt_tag,        // SliceTag of the instruction
  input  logic                  rt_is_seed,
  input  slicetag_t             rt_seed_id,
  input  slicetag_t             rt_live_left,
  input  slicetag_t             rt_live_right,
  input  word_t                 rt_val_left,
  input  word_t                 rt_val_right,  // rs2 value, or loaded word for a load
  input  word_t                 rt_addr,       // address of a load or store
  input  logic                  rt_taken,      // branch was taken
  input  slicetag_t             abort_mask,
  // status
  output slicetag_t             sd_valid,
  output slicetag_t             sd_ok,
  output slicetag_t             sd_overlap,
  output logic [SD_IDX_W:0]     sd_count [N_SLICES],
  output logic [IB_PTR_W:0]     ib_used,
  output logic [SLIF_PTR_W:0]   slif_used,
  // re-execution reads
  input  logic [SLICE_ID_W-1:0] rd_slice [MAX_CONC],
  input  logic [SD_IDX_W-1:0]   rd_idx   [MAX_CONC],
  output sd_entry_t             rd_entry [MAX_CONC],
  input  logic [IB_PTR_W-1:0]   ib_rd_ptr,
  output dinst_t                ib_rd_inst,
  output word_t                 ib_rd_addr,
  input  logic [SLIF_PTR_W-1:0] slif_rd_ptr,
  output word_t                 slif_rd_val
);

  sd_entry_t               sd   [N_SLICES][SD_ENTRIES];
  logic [IB_WIDTH-1:0]     ib   [IB_ENTRIES];
  word_t                   slif [SLIF_ENTRIES];

  // ---------------------------------------------------------------- reads
  always_comb begin
    for (int p = 0; p < MAX_CONC; p++) rd_entry[p] = sd[rd_slice[p]][rd_idx[p]];
    ib_rd_inst  = (32'(ib_rd_ptr) < IB_ENTRIES) ? dinst_t'(ib[ib_rd_ptr]) : '0;
    ib_rd_addr  = (32'(ib_rd_ptr) + 1 < IB_ENTRIES) ? word_t'(ib[ib_rd_ptr + 1'b1]) : '0;
    slif_rd_val = (32'(slif_rd_ptr) < SLIF_ENTRIES) ? slif[slif_rd_ptr] : '0;
  end

  // ---------------------------------------------------------------- fill
  slicetag_t           live_sl, eff_tag, sd_full, abort_now;
  logic                need_l, need_r, ib_fit, slif_fit, multi;
  logic [1:0]          ib_need, slif_need;
  logic [IB_PTR_W-1:0] ib_ptr;
  logic [SLIF_PTR_W-1:0] l_ptr, r_ptr;

  always_comb begin
    // slices still being collected; a retiring seed (re)opens its own
    live_sl  = (sd_valid & sd_ok) | (rt_is_seed ? rt_seed_id : '0);
    eff_tag  = rt_valid ? (rt_tag & live_sl) : '0;
    need_l   = |(rt_live_left & eff_tag);
    need_r   = |(rt_live_right & eff_tag);
    ib_need  = is_mem(rt_inst.op) ? 2'd2 : 2'd1;
    slif_need = 2'(need_l) + 2'(need_r);
    ib_fit   = (32'(ib_used) + 32'(ib_need)) <= IB_ENTRIES;
    slif_fit = (32'(slif_used) + 32'(slif_need)) <= SLIF_ENTRIES;
    ib_ptr   = IB_PTR_W'(ib_used);
    l_ptr    = SLIF_PTR_W'(slif_used);
    r_ptr    = SLIF_PTR_W'(slif_used) + SLIF_PTR_W'(need_l);
    multi    = $countones(eff_tag) > 1;
    for (int k = 0; k < N_SLICES; k++)
      sd_full[k] = (32'(sd_count[k]) >= SD_ENTRIES) && !(rt_is_seed && rt_seed_id[k]);
    abort_now = '0;
    if (|eff_tag) begin
      if (!ib_fit || !slif_fit || rt_inst.op == OP_JR) abort_now = eff_tag;
      else                                            abort_now = eff_tag & sd_full;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sd_valid   <= '0;
      sd_ok      <= '0;
      sd_overlap <= '0;
      ib_used    <= '0;
      slif_used  <= '0;
      for (int k = 0; k < N_SLICES; k++) begin
        sd_count[k] <= '0;
        for (int e = 0; e < SD_ENTRIES; e++) sd[k][e] <= '0;
      end
      for (int i = 0; i < IB_ENTRIES; i++)   ib[i]   <= '0;
      for (int i = 0; i < SLIF_ENTRIES; i++) slif[i] <= '0;
    end else if (clear) begin
      sd_valid   <= '0;
      sd_ok      <= '0;
      sd_overlap <= '0;
      ib_used    <= '0;
      slif_used  <= '0;
      for (int k = 0; k < N_SLICES; k++) sd_count[k] <= '0;
    end else begin
      if (rt_valid && rt_is_seed) begin
        for (int k = 0; k < N_SLICES; k++)
          if (rt_seed_id[k]) begin
            sd_valid[k]   <= 1'b1;
            sd_ok[k]      <= 1'b1;
            sd_overlap[k] <= 1'b0;
            sd_count[k]   <= '0;
          end
      end
      if (|eff_tag && ib_fit && slif_fit && rt_inst.op != OP_JR) begin
        ib[ib_ptr] <= IB_WIDTH'(rt_inst);
        if (is_mem(rt_inst.op)) ib[ib_ptr + 1'b1] <= IB_WIDTH'(rt_addr);
        ib_used <= ib_used + (IB_PTR_W+1)'(ib_need);
        if (need_l) slif[l_ptr] <= rt_val_left;
        if (need_r) slif[r_ptr] <= rt_val_right;
        slif_used <= slif_used + (SLIF_PTR_W+1)'(slif_need);
        for (int k = 0; k < N_SLICES; k++) begin
          if (eff_tag[k] && !sd_full[k]) begin
            sd[k][(rt_is_seed && rt_seed_id[k]) ? '0 : SD_IDX_W'(sd_count[k])] <= '{
              ib:       ib_ptr,
              slif:     rt_live_left[k] ? l_ptr : (rt_live_right[k] ? r_ptr : '0),
              taken:    rt_taken,
              left_op:  rt_live_left[k],
              right_op: rt_live_right[k]};
            // a seed starts a fresh descriptor in this same cycle
            sd_count[k] <= ((rt_is_seed && rt_seed_id[k]) ? '0 : sd_count[k]) + 1'b1;
            if (multi) sd_overlap[k] <= 1'b1;
          end
        end
      end
      sd_ok <= (sd_ok | ((rt_valid && rt_is_seed) ? rt_seed_id : '0)) & ~abort_now & ~abort_mask;
    end
  end

endmodule
