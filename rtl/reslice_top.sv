// reslice_top: ReSlice attached to one out-of-order core.
//
// The core itself, its caches and the TLS protocol are outside this module;
// the ports below are the points where ReSlice hooks into them.
//   Fetch      - the Dependence and Value Predictor (dvp) marks loads whose PC
//                hits as seeds and may supply a predicted value. The
//                Temporary Dependence Buffer (tdb) holds violating addresses;
//                a re-executed load that matches one is inserted in the dvp.
//   Rename     - a seed gets a free one-hot slice ID (slice_id_alloc).
//   Operand    - slicetag_logic combines the SliceTags of the two sources
//   read         (from reg_slicetag_file, or for a load's memory operand from
//                the load/store queue or the tag_cache) into the instruction's
//                SliceTag and live-in masks; the destination's tag is written.
//   Retire     - slice instructions fill the slice_buffer; slice stores
//                update the tag_cache and log the overwritten word in the
//                undo_log; a seed records the value it used in reexec_ctrl.
//   Resolution - reexec_ctrl compares the correct seed value; on a
//                misprediction it stalls the core, runs the reu, and then
//                resumes the task or squashes it back to its checkpoint.
// The REU reads and, when merging, writes the core's L1 through the mem_*
// ports (with the Speculative Read/Write bits of the word read; the L1 must
// set Speculative Read for mem_rd_en and Speculative Write for mem_wr_en, as
// for any access of the speculative task), and writes
// merged registers through the rn_*/rf_* ports using the core's rename table.
// A squash or task_clear empties every ReSlice structure for the next task.
module reslice_top
  import reslice_pkg::*;
#(
  parameter int unsigned N_PREGS = 90
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       task_clear,
  // fetch: predictor
  input  word_t                      fe_pc,
  output logic                       fe_seed,
  output logic                       fe_use_pred,
  output word_t                      fe_pred_value,
  input  logic                       viol_valid,      // dependence violation on viol_addr
  input  word_t                      viol_addr,
  input  logic                       ldchk_valid,     // load of a re-executed consumer task
  input  word_t                      ldchk_pc,
  input  word_t                      ldchk_addr,
  input  logic                       train_valid,     // correct value of a predicted load
  input  word_t                      train_pc,
  input  word_t                      train_value,
  // rename
  input  logic                       rn_seed,
  output logic                       rn_seed_ok,
  output slicetag_t                  rn_seed_id,
  input  logic                       seed_free_valid, // seeds squashed before retiring
  input  slicetag_t                  seed_free_mask,
  // operand read
  input  logic [$clog2(N_PREGS)-1:0] or_src1,
  input  logic [$clog2(N_PREGS)-1:0] or_src2,
  input  logic                       or_is_load,      // right operand is memory
  input  word_t                      or_ld_addr,
  input  logic                       or_lsq_hit,      // load forwarded from the LSQ
  input  slicetag_t                  or_lsq_tag,
  input  logic                       or_is_seed,
  input  slicetag_t                  or_seed_id,
  input  logic                       or_dst_we,
  input  logic [$clog2(N_PREGS)-1:0] or_dst,
  output slicetag_t                  or_inst_tag,
  output slicetag_t                  or_live_left,
  output slicetag_t                  or_live_right,
  // retirement
  input  logic                       rt_valid,
  input  dinst_t                     rt_inst,
  input  slicetag_t                  rt_tag,
  input  logic                       rt_is_seed,
  input  slicetag_t                  rt_seed_id,
  input  slicetag_t                  rt_live_left,
  input  slicetag_t                  rt_live_right,
  input  word_t                      rt_val_left,
  input  word_t                      rt_val_right,
  input  word_t                      rt_addr,
  input  logic                       rt_taken,
  input  word_t                      rt_result,       // value written by the instruction
  input  word_t                      rt_mem_old,      // word a store overwrites
  // resolution
  input  logic                       rs_valid,
  input  slicetag_t                  rs_id,
  input  word_t                      rs_value,
  output logic                       rs_ready,
  // L1 access by the REU
  output word_t                      mem_rd_addr,
  output logic                       mem_rd_en,       // set Speculative Read on mem_rd_addr
  input  word_t                      mem_rd_data,
  input  logic                       mem_spec_rd,
  input  logic                       mem_spec_wr,
  output logic                       mem_wr_en,
  output word_t                      mem_wr_addr,
  output word_t                      mem_wr_data,
  // register merge
  output logic [AREG_W-1:0]          mg_areg,
  input  logic [$clog2(N_PREGS)-1:0] mg_preg,
  output logic                       rf_we,
  output logic [$clog2(N_PREGS)-1:0] rf_preg,
  output word_t                      rf_data,
  // status
  output logic                       stall,
  output logic                       squash,
  output logic                       resume,
  output fail_e                      squash_reason,
  output logic [7:0]                 reexec_insts,
  output slicetag_t                  buffered_ok,
  output slicetag_t                  overlap,
  output logic                       tc_evicted,
  output logic                       or_in_slice,
  output slicetag_t                  ids_busy,
  output slicetag_t                  reexecuted,
  output logic [IB_PTR_W:0]          ib_used,
  output logic [SLIF_PTR_W:0]        slif_used,
  output logic                       decay_tick,
  output logic [15:0]                cnt_correct,
  output logic [15:0]                cnt_reexec,
  output logic [15:0]                cnt_concurrent,
  output logic [15:0]                cnt_salvaged,
  output logic [15:0]                cnt_squash
);

  localparam int unsigned PW = $clog2(N_PREGS);

  logic clr;
  assign clr = task_clear | squash;

  // ------------------------------------------------------------ predictor
  logic tdb_match;
  tdb u_tdb (
    .clk, .rst_n, .clear(1'b0),
    .ins_valid(viol_valid), .ins_addr(viol_addr),
    .lk_addr(ldchk_addr), .lk_match(tdb_match)
  );

  dvp u_dvp (
    .clk, .rst_n,
    .lk_pc(fe_pc), .lk_seed(fe_seed), .lk_use_pred(fe_use_pred), .lk_value(fe_pred_value),
    .ins_valid(ldchk_valid && tdb_match), .ins_pc(ldchk_pc),
    .tr_valid(train_valid), .tr_pc(train_pc), .tr_value(train_value),
    .decay_tick
  );

  // ------------------------------------------------------------ rename
  slice_id_alloc u_alloc (
    .clk, .rst_n, .clear(clr),
    .alloc_req(rn_seed), .alloc_ok(rn_seed_ok), .alloc_id(rn_seed_id),
    .free_valid(seed_free_valid), .free_mask(seed_free_mask), .busy(ids_busy)
  );

  // ------------------------------------------------------------ operand read
  slicetag_t ra_tag, rb_tag, rm_tag, right_tag;
  logic [PW-1:0] pt_idx;
  word_t     tc_lk_addr [3];
  logic      tc_lk_hit  [3];
  slicetag_t tc_lk_tag  [3];

  reg_slicetag_file #(.N_PREGS(N_PREGS)) u_rtags (
    .clk, .rst_n, .clear(clr),
    .ra_idx(or_src1), .ra_tag(ra_tag),
    .rb_idx(or_src2), .rb_tag(rb_tag),
    .rm_idx(pt_idx),  .rm_tag(rm_tag),
    .we(or_dst_we), .w_idx(or_dst), .w_tag(or_inst_tag)
  );

  assign right_tag = !or_is_load ? rb_tag :
                     or_lsq_hit  ? or_lsq_tag :
                     tc_lk_hit[0] ? tc_lk_tag[0] : '0;

  slicetag_logic u_stl (
    .tag_left(ra_tag), .tag_right(right_tag),
    .is_seed(or_is_seed), .seed_id(or_seed_id),
    .inst_tag(or_inst_tag), .live_left(or_live_left), .live_right(or_live_right),
    .in_slice(or_in_slice)
  );

  // ------------------------------------------------------------ retirement
  slicetag_t tc_evict_tag, ul_over_tag;
  logic      rt_store;
  assign rt_store = rt_valid && rt_inst.op == OP_ST;

  word_t reu_tc_addr;
  assign tc_lk_addr[0] = or_ld_addr;
  assign tc_lk_addr[1] = reu_tc_addr;
  assign tc_lk_addr[2] = rt_addr;

  tag_cache #(.N_LK(3)) u_tc (
    .clk, .rst_n, .clear(clr),
    .lk_addr(tc_lk_addr), .lk_hit(tc_lk_hit), .lk_tag(tc_lk_tag),
    .up_valid(rt_store), .up_addr(rt_addr), .up_tag(rt_tag),
    .evict_valid(tc_evicted), .evict_tag(tc_evict_tag)
  );

  word_t     ul_addr, ul_data;
  slicetag_t ul_mask;
  logic      ul_hit, ul_multi, ul_undone, ul_chained, ul_mark;
  undo_log u_ul (
    .clk, .rst_n, .clear(clr),
    .rec_valid(rt_store && |rt_tag), .rec_addr(rt_addr), .rec_old(rt_mem_old), .rec_tag(rt_tag),
    .rec_prev_tag(tc_lk_hit[2] ? tc_lk_tag[2] : '0),
    .overflow_tag(ul_over_tag),
    .lk_addr(ul_addr), .lk_mask(ul_mask), .lk_hit(ul_hit), .lk_data(ul_data),
    .lk_multi(ul_multi), .lk_undone(ul_undone), .lk_chained(ul_chained), .mark_undone(ul_mark)
  );

  slicetag_t             sd_valid, sd_ok;
  logic [SD_IDX_W:0]     sd_count [N_SLICES];
  logic [SLICE_ID_W-1:0] rd_slice [MAX_CONC];
  logic [SD_IDX_W-1:0]   rd_idx   [MAX_CONC];
  sd_entry_t             rd_entry [MAX_CONC];
  logic [IB_PTR_W-1:0]   ib_rd_ptr;
  dinst_t                ib_rd_inst;
  word_t                 ib_rd_addr, slif_rd_val;
  logic [SLIF_PTR_W-1:0] slif_rd_ptr;

  slice_buffer u_sb (
    .clk, .rst_n, .clear(clr),
    .rt_valid, .rt_inst, .rt_tag, .rt_is_seed, .rt_seed_id,
    .rt_live_left, .rt_live_right, .rt_val_left, .rt_val_right, .rt_addr, .rt_taken,
    .abort_mask(tc_evict_tag | ul_over_tag),
    .sd_valid, .sd_ok, .sd_overlap(overlap), .sd_count, .ib_used, .slif_used,
    .rd_slice, .rd_idx, .rd_entry,
    .ib_rd_ptr, .ib_rd_inst, .ib_rd_addr, .slif_rd_ptr, .slif_rd_val
  );
  assign buffered_ok = sd_valid & sd_ok;

  // ------------------------------------------------------------ resolution
  logic      reu_start, reu_done, reu_ok;
  slicetag_t reu_mask;
  fail_e     reu_fail;
  word_t     seed_val [N_SLICES];

  reexec_ctrl u_ctrl (
    .clk, .rst_n, .clear(clr),
    .sv_valid(rt_valid && rt_is_seed), .sv_id(rt_seed_id), .sv_value(rt_result),
    .rs_valid, .rs_id, .rs_value, .rs_ready,
    .sd_valid, .sd_ok, .sd_overlap(overlap),
    .reu_start, .reu_mask, .seed_val, .reu_done, .reu_ok, .reu_fail,
    .stall, .squash, .resume, .squash_reason, .reexecuted,
    .cnt_correct, .cnt_reexec, .cnt_concurrent, .cnt_salvaged, .cnt_squash
  );

  reu #(.N_PREGS(N_PREGS)) u_reu (
    .clk, .rst_n,
    .start(reu_start), .exec_mask(reu_mask), .seed_val,
    .busy(), .done(reu_done), .ok(reu_ok), .fail(reu_fail), .n_exec(reexec_insts),
    .sd_count, .rd_slice, .rd_idx, .rd_entry,
    .ib_rd_ptr, .ib_rd_inst, .ib_rd_addr, .slif_rd_ptr, .slif_rd_val,
    .mem_rd_addr, .mem_rd_en, .mem_rd_data, .mem_spec_rd, .mem_spec_wr,
    .mem_wr_en, .mem_wr_addr, .mem_wr_data,
    .tc_addr(reu_tc_addr), .tc_hit(tc_lk_hit[1]), .tc_tag(tc_lk_tag[1]),
    .ul_addr, .ul_mask, .ul_hit, .ul_data, .ul_multi, .ul_undone, .ul_chained, .ul_mark,
    .rn_areg(mg_areg), .rn_preg(mg_preg), .pt_idx, .pt_tag(rm_tag),
    .rf_we, .rf_preg, .rf_data
  );

endmodule
