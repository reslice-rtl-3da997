// reu: Re-Execution Unit.
//
// When a seed turns out to be mispredicted, the pipeline is stalled and the
// REU replays the buffered slice with the correct seed value, checks that the
// replay is guaranteed correct, and merges the result into the program state.
// It is a small in-order engine with a 16-entry register file that starts
// clean for every re-execution.
//
// Replay (state EXEC, one instruction per cycle). Up to MAX_CONC slices are
// replayed together (exec_mask); each has a cursor into its descriptor. Each
// cycle the instruction with the smallest IB pointer among the cursors is
// executed, so the combined slice runs in program order, and every cursor
// pointing at it advances. A source operand comes from the SLIF only if all
// the descriptors that share the instruction point to the same SLIF entry
// with the same LeftOp/RightOp bit; otherwise it comes from the REU registers.
// The first entry of a descriptor is its seed and produces the seed value.
// During replay the cache is only read; stores go to an internal store list
// that also forwards to later loads and keeps old (buffered) and new
// addresses. Checks, in the order they can fail:
//   branch       - outcome differs from the TakenBranch bit;
//   load, new address differs from buffered one:
//                  Inhibiting load if the new word has its Speculative Write bit;
//   load, same address: search the replayed stores backwards for the one that
//                  wrote this address in the original run; if it now writes a
//                  different address, Dangling load;
//   store, new address differs: Inhibiting store if the new word has its
//                  Speculative Read or Write bit.
// Merge:
//   CHKUNDO - every buffered store address not rewritten by the replay whose
//             Tag Cache entry still carries a replayed slice's bit needs an
//             undo; the Undo Log must hold a value for it that was written by
//             a single slice update and not yet used, and that did not log a
//             live value of another slice (else FAIL_MERGE).
//             Any store whose address changed must be the only replayed
//             store that wrote its old address (else FAIL_MERGE).
//             Done before any state is changed, so a failure leaves it intact.
//   MRGREG  - for each register the replay defined, the current physical
//             register (through the core's rename table) is written if its
//             SliceTag still has a replayed slice's bit.
//   MRGUNDO - the undos are written to the cache.
//   MRGAPPLY- the last replayed store to each address is written to the cache
//             if the Tag Cache has no entry for it or its entry still carries a
//             replayed slice's bit.
// done pulses for one cycle with ok and fail; n_exec counts the replayed
// instructions. One merge action is done per cycle. mem_rd_en marks the
// cycles in which a replayed load reads the cache: like every access of the
// speculative task, the cache must set that word's Speculative Read bit, and
// merge writes must set Speculative Write bits, so that a later re-execution
// of another slice sees these accesses in its checks. The source leaves the REU
// implementation open (small core or firmware); this engine, its one
// instruction per cycle timing, and the order of the merge passes are this
// design's own.
//
// pt_idx and rf_preg pass the rename table's answer (rn_preg) straight on to
// the SliceTag read and the register write of the same merge cycle.
//
// Lint reports rst_n as both an asynchronous reset and a synchronous signal:
// the synchronous use is only the "disable iff" of the store-list assertion.
module reu
  import reslice_pkg::*;
#(
  parameter int unsigned N_PREGS = 90,
  parameter int unsigned SL_DEPTH = SD_ENTRIES * MAX_CONC   // store list entries
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // control
  input  logic                       start,
  input  slicetag_t                  exec_mask,
  input  word_t                      seed_val [N_SLICES],
  output logic                       busy,
  output logic                       done,
  output logic                       ok,
  output fail_e                      fail,
  output logic [7:0]                 n_exec,
  // slice buffer
  input  logic [SD_IDX_W:0]          sd_count [N_SLICES],
  output logic [SLICE_ID_W-1:0]      rd_slice [MAX_CONC],
  output logic [SD_IDX_W-1:0]        rd_idx   [MAX_CONC],
  input  sd_entry_t                  rd_entry [MAX_CONC],
  output logic [IB_PTR_W-1:0]        ib_rd_ptr,
  input  dinst_t                     ib_rd_inst,
  input  word_t                      ib_rd_addr,
  output logic [SLIF_PTR_W-1:0]      slif_rd_ptr,
  input  word_t                      slif_rd_val,
  // cache (read during replay, written during merge)
  output word_t                      mem_rd_addr,
  output logic                       mem_rd_en,     // a replayed load reads mem_rd_addr
  input  word_t                      mem_rd_data,
  input  logic                       mem_spec_rd,
  input  logic                       mem_spec_wr,
  output logic                       mem_wr_en,
  output word_t                      mem_wr_addr,
  output word_t                      mem_wr_data,
  // tag cache and undo log
  output word_t                      tc_addr,
  input  logic                       tc_hit,
  input  slicetag_t                  tc_tag,
  output word_t                      ul_addr,
  output slicetag_t                  ul_mask,
  input  logic                       ul_hit,
  input  word_t                      ul_data,
  input  logic                       ul_multi,
  input  logic                       ul_undone,
  input  logic                       ul_chained,
  output logic                       ul_mark,
  // register merge
  output logic [AREG_W-1:0]          rn_areg,
  input  logic [$clog2(N_PREGS)-1:0] rn_preg,
  output logic [$clog2(N_PREGS)-1:0] pt_idx,
  input  slicetag_t                  pt_tag,
  output logic                       rf_we,
  output logic [$clog2(N_PREGS)-1:0] rf_preg,
  output word_t                      rf_data
);

  typedef enum logic [2:0] {S_IDLE, S_EXEC, S_CHKUNDO, S_MRGREG, S_MRGUNDO, S_MRGAPPLY, S_DONE}
    state_e;

  localparam int unsigned SL_W = $clog2(SL_DEPTH + 1);

  state_e                  state;
  slicetag_t               mask_q;
  logic                    slot_v   [MAX_CONC];
  logic [SLICE_ID_W-1:0]   slot_sl  [MAX_CONC];
  logic [SD_IDX_W:0]       slot_idx [MAX_CONC];
  word_t                   regs [AREGS];
  logic [AREGS-1:0]        rdef;
  word_t                   sl_old  [SL_DEPTH];
  word_t                   sl_new  [SL_DEPTH];
  word_t                   sl_data [SL_DEPTH];
  logic                    sl_undo [SL_DEPTH];
  logic [SL_W-1:0]         sl_cnt;
  logic [5:0]              it;        // iterator of the merge passes
  fail_e                   fail_q;

  // ------------------------------------------------------------ replay step
  logic                  act   [MAX_CONC];   // slot still has entries
  logic                  part  [MAX_CONC];   // slot takes part in this step
  logic [IB_PTR_W-1:0]   cur_ptr;
  logic                  any_act, agree, is_seed, use_l, use_r;
  sd_entry_t             e0;
  word_t                 seed_v, op_a, op_b, a2, a1, ld_val, result;
  logic                  fwd_hit, dng_found, dng_moved;
  word_t                 fwd_data;
  fail_e                 step_fail;
  logic                  wr_rd;

  always_comb begin
    for (int p = 0; p < MAX_CONC; p++) begin
      rd_slice[p] = slot_sl[p];
      rd_idx[p]   = SD_IDX_W'(slot_idx[p]);
      act[p]      = slot_v[p] && (slot_idx[p] < sd_count[slot_sl[p]]);
    end
    any_act = 1'b0;
    cur_ptr = '1;
    for (int p = 0; p < MAX_CONC; p++)
      if (act[p] && rd_entry[p].ib <= cur_ptr) begin
        cur_ptr = rd_entry[p].ib;
        any_act = 1'b1;
      end
    e0      = '0;
    is_seed = 1'b0;
    seed_v  = '0;
    for (int p = MAX_CONC - 1; p >= 0; p--) begin
      part[p] = act[p] && rd_entry[p].ib == cur_ptr;
      if (part[p]) e0 = rd_entry[p];
      if (part[p] && slot_idx[p] == '0) begin
        is_seed = 1'b1;
        seed_v  = seed_val[slot_sl[p]];
      end
    end
    agree = e0.left_op || e0.right_op;
    for (int p = 0; p < MAX_CONC; p++)
      if (part[p] && (rd_entry[p].slif != e0.slif || rd_entry[p].left_op != e0.left_op ||
                      rd_entry[p].right_op != e0.right_op))
        agree = 1'b0;
    ib_rd_ptr   = cur_ptr;
    slif_rd_ptr = e0.slif;
  end

  // execute the selected instruction
  always_comb begin
    use_l       = agree && e0.left_op;
    use_r       = agree && e0.right_op;
    op_a        = use_l ? slif_rd_val : regs[ib_rd_inst.rs1];
    op_b        = use_r ? slif_rd_val : regs[ib_rd_inst.rs2];
    a1          = ib_rd_addr;
    a2          = eff_addr(op_a, ib_rd_inst.imm);
    mem_rd_addr = a2;

    // store-to-load forwarding from the replayed stores (youngest wins)
    fwd_hit  = 1'b0;
    fwd_data = '0;
    for (int i = 0; i < SL_DEPTH; i++)
      if (SL_W'(i) < sl_cnt && sl_new[i] == a2) begin
        fwd_hit  = 1'b1;
        fwd_data = sl_data[i];
      end
    // youngest replayed store that wrote this address in the original run
    dng_found = 1'b0;
    dng_moved = 1'b0;
    for (int i = 0; i < SL_DEPTH; i++)
      if (SL_W'(i) < sl_cnt && sl_old[i] == a1) begin
        dng_found = 1'b1;
        dng_moved = (sl_new[i] != a1);
      end

    mem_rd_en = (state == S_EXEC) && any_act && !is_seed && ib_rd_inst.op == OP_LD;
    step_fail = FAIL_NONE;
    ld_val    = '0;
    result    = '0;
    wr_rd     = 1'b0;
    if (is_seed) begin
      result = seed_v;
      wr_rd  = 1'b1;
    end else begin
      unique case (ib_rd_inst.op)
        OP_LD: begin
          wr_rd = 1'b1;
          if (a2 != a1) begin
            if (mem_spec_wr) step_fail = FAIL_INH_LOAD;
            ld_val = fwd_hit ? fwd_data : mem_rd_data;
          end else if (dng_found) begin
            if (dng_moved) step_fail = FAIL_DANGLING;
            ld_val = fwd_data;
          end else begin
            ld_val = use_r ? slif_rd_val : (fwd_hit ? fwd_data : mem_rd_data);
          end
          result = ld_val;
        end
        OP_ST: begin
          if (a2 != a1 && (mem_spec_rd || mem_spec_wr)) step_fail = FAIL_INH_STORE;
        end
        OP_BEQ, OP_BNE, OP_BLT: begin
          if (br_taken(ib_rd_inst.op, op_a, op_b) != e0.taken) step_fail = FAIL_BRANCH;
        end
        OP_NOP, OP_JR: ;
        default: begin
          result = alu(ib_rd_inst.op, op_a, op_b);
          wr_rd  = 1'b1;
        end
      endcase
    end
  end

  // ------------------------------------------------------------ merge passes
  logic           it_in_list, in_m2, first_old, multi_old, last_new, undo_ok_i;
  word_t          it_old, it_new;

  always_comb begin
    it_in_list = 32'(it) < 32'(sl_cnt);
    it_old     = sl_old[it[SL_W-1:0] < SL_W'(SL_DEPTH) ? it[SL_W-1:0] : '0];
    it_new     = sl_new[it[SL_W-1:0] < SL_W'(SL_DEPTH) ? it[SL_W-1:0] : '0];
    in_m2      = 1'b0;
    first_old  = 1'b1;
    multi_old  = 1'b0;
    last_new   = 1'b1;
    for (int j = 0; j < SL_DEPTH; j++)
      if (SL_W'(j) < sl_cnt) begin
        if (sl_new[j] == it_old) in_m2 = 1'b1;
        if (sl_old[j] == it_old && 32'(j) < 32'(it)) first_old = 1'b0;
        if (sl_old[j] == it_old && 32'(j) != 32'(it)) multi_old = 1'b1;
        if (sl_new[j] == it_new && 32'(j) > 32'(it)) last_new  = 1'b0;
      end
    tc_addr   = (state == S_MRGAPPLY) ? it_new : it_old;
    ul_addr   = it_old;
    ul_mask   = mask_q;
    undo_ok_i = ul_hit && !ul_multi && !ul_undone && !ul_chained && !multi_old;

    rn_areg   = AREG_W'(it);
    pt_idx    = rn_preg;
    rf_preg   = rn_preg;
    rf_data   = regs[AREG_W'(it)];
    rf_we     = (state == S_MRGREG) && rdef[AREG_W'(it)] && |(pt_tag & mask_q);

    mem_wr_en   = 1'b0;
    mem_wr_addr = '0;
    mem_wr_data = '0;
    ul_mark     = 1'b0;
    if (state == S_MRGUNDO && it_in_list && sl_undo[it[SL_W-1:0]]) begin
      mem_wr_en   = 1'b1;
      mem_wr_addr = it_old;
      mem_wr_data = ul_data;
      ul_mark     = 1'b1;
    end
    if (state == S_MRGAPPLY && it_in_list && last_new && (!tc_hit || |(tc_tag & mask_q))) begin
      mem_wr_en   = 1'b1;
      mem_wr_addr = it_new;
      mem_wr_data = sl_data[it[SL_W-1:0]];
    end
  end

  assign busy = (state != S_IDLE);
  assign fail = fail_q;

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mask_q <= '0;
      done   <= 1'b0;
      ok     <= 1'b0;
      fail_q <= FAIL_NONE;
      n_exec <= '0;
      sl_cnt <= '0;
      it     <= '0;
      rdef   <= '0;
      for (int p = 0; p < MAX_CONC; p++) begin
        slot_v[p] <= 1'b0; slot_sl[p] <= '0; slot_idx[p] <= '0;
      end
      for (int r = 0; r < AREGS; r++) regs[r] <= '0;
      for (int i = 0; i < SL_DEPTH; i++) begin
        sl_old[i] <= '0; sl_new[i] <= '0; sl_data[i] <= '0; sl_undo[i] <= 1'b0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          automatic int n = 0;
          for (int p = 0; p < MAX_CONC; p++) slot_v[p] <= 1'b0;
          for (int k = 0; k < N_SLICES; k++)
            if (exec_mask[k] && n < MAX_CONC) begin
              slot_v[n]   <= 1'b1;
              slot_sl[n]  <= SLICE_ID_W'(k);
              slot_idx[n] <= '0;
              n++;
            end
          for (int r = 0; r < AREGS; r++) regs[r] <= '0;
          rdef   <= '0;
          sl_cnt <= '0;
          n_exec <= '0;
          mask_q <= exec_mask;
          fail_q <= FAIL_NONE;
          state  <= S_EXEC;
        end
        S_EXEC: begin
          if (!any_act) begin
            it    <= '0;
            state <= S_CHKUNDO;
          end else if (step_fail != FAIL_NONE) begin
            fail_q <= step_fail;
            state  <= S_DONE;
          end else begin
            n_exec <= n_exec + 1'b1;
            for (int p = 0; p < MAX_CONC; p++)
              if (part[p]) slot_idx[p] <= slot_idx[p] + 1'b1;
            if (wr_rd) begin
              regs[ib_rd_inst.rd] <= result;
              rdef[ib_rd_inst.rd] <= 1'b1;
            end
            if (!is_seed && ib_rd_inst.op == OP_ST && 32'(sl_cnt) < SL_DEPTH) begin
              sl_old[sl_cnt[SL_W-1:0]]  <= a1;
              sl_new[sl_cnt[SL_W-1:0]]  <= a2;
              sl_data[sl_cnt[SL_W-1:0]] <= op_b;
              sl_undo[sl_cnt[SL_W-1:0]] <= 1'b0;
              sl_cnt <= sl_cnt + 1'b1;
            end
          end
        end
        S_CHKUNDO: begin
          if (!it_in_list) begin
            it    <= '0;
            state <= S_MRGREG;
          end else begin
            // a store that moved may not share its old address with another
            // store of the replayed slice(s) (merge condition), live or not
            if (it_old != it_new && multi_old) begin
              fail_q <= FAIL_MERGE;
              state  <= S_DONE;
            end
            if (!in_m2 && first_old && tc_hit && |(tc_tag & mask_q)) begin
              if (!undo_ok_i) begin
                fail_q <= FAIL_MERGE;
                state  <= S_DONE;
              end
              sl_undo[it[SL_W-1:0]] <= 1'b1;
            end
            it <= it + 1'b1;
          end
        end
        S_MRGREG: begin
          if (32'(it) == AREGS - 1) begin
            it    <= '0;
            state <= S_MRGUNDO;
          end else it <= it + 1'b1;
        end
        S_MRGUNDO: begin
          if (!it_in_list) begin
            it    <= '0;
            state <= S_MRGAPPLY;
          end else it <= it + 1'b1;
        end
        S_MRGAPPLY: begin
          if (!it_in_list) state <= S_DONE;
          else it <= it + 1'b1;
        end
        S_DONE: begin
          done  <= 1'b1;
          ok    <= (fail_q == FAIL_NONE);
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A replay never needs more store-list entries than it has instructions.
  a_sl_room: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_EXEC && any_act && !is_seed && ib_rd_inst.op == OP_ST |-> 32'(sl_cnt) < SL_DEPTH);

endmodule
