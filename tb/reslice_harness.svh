// Shared test harness for the ReSlice top: an in-order core model that runs a
// straight-line program through the top's rename, operand-read and retire
// ports, a 256-word L1 model with Speculative Read/Write bits, an oracle that
// re-runs the program with the correct seed values, and tasks that resolve a
// seed and compare the merged state with the oracle.
//
// Included inside a testbench module that declares: int checks, failures.
// Physical register i is architectural register i in this model.
//
// The core model is this design's own test fixture: in-order, two cycles per
// instruction, with the Speculative Read/Write marking that the source
// expects from the L1 of a speculative task.

  import reslice_pkg::*;

  localparam int MW = 256;        // words of the memory model (addresses 0..1023)

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT I/O
  logic        task_clear;
  word_t       fe_pc;  logic fe_seed, fe_use_pred;  word_t fe_pred_value;
  logic        viol_valid; word_t viol_addr;
  logic        ldchk_valid; word_t ldchk_pc, ldchk_addr;
  logic        train_valid; word_t train_pc, train_value;
  logic        rn_seed, rn_seed_ok; slicetag_t rn_seed_id;
  logic        seed_free_valid; slicetag_t seed_free_mask;
  logic [6:0]  or_src1, or_src2, or_dst;
  logic        or_is_load, or_lsq_hit, or_is_seed, or_dst_we;
  word_t       or_ld_addr; slicetag_t or_lsq_tag, or_seed_id;
  slicetag_t   or_inst_tag, or_live_left, or_live_right;
  logic        rt_valid, rt_is_seed, rt_taken;
  dinst_t      rt_inst;
  slicetag_t   rt_tag, rt_seed_id, rt_live_left, rt_live_right;
  word_t       rt_val_left, rt_val_right, rt_addr, rt_result, rt_mem_old;
  logic        rs_valid, rs_ready; slicetag_t rs_id; word_t rs_value;
  word_t       mem_rd_addr, mem_rd_data, mem_wr_addr, mem_wr_data;
  logic        mem_spec_rd, mem_spec_wr, mem_wr_en, mem_rd_en;
  logic [3:0]  mg_areg; logic [6:0] mg_preg, rf_preg; logic rf_we; word_t rf_data;
  logic        stall, squash, resume, tc_evicted, or_in_slice, decay_tick;
  fail_e       squash_reason;
  logic [7:0]  reexec_insts;
  slicetag_t   buffered_ok, overlap, ids_busy, reexecuted;
  logic [8:0]  ib_used; logic [7:0] slif_used;
  logic [15:0] cnt_correct, cnt_reexec, cnt_concurrent, cnt_salvaged, cnt_squash;

  reslice_top dut (.*);

  // ---------------------------------------------------------------- models
  word_t R [AREGS];
  word_t M [MW];
  bit    SR [MW];
  bit    SW [MW];
  word_t R0 [AREGS];              // task start state (checkpoint)
  word_t M0 [MW];

  assign mg_preg     = 7'(mg_areg);
  assign mem_rd_data = M[mem_rd_addr[9:2]];
  assign mem_spec_rd = SR[mem_rd_addr[9:2]];
  assign mem_spec_wr = SW[mem_rd_addr[9:2]];

  // program
  dinst_t prog [64];
  int     plen;
  int     seed_no [64];           // -1, or which seed (0..2) the instruction is
  word_t  pred_v [3];             // value each seed used initially
  word_t  good_v [3];             // correct value of each seed
  slicetag_t sid [3];             // slice ID each seed received

  function automatic dinst_t I(opcode_e op, int rd, int rs1, int rs2, int imm);
    dinst_t d;
    d.op = op; d.rd = 4'(rd); d.rs1 = 4'(rs1); d.rs2 = 4'(rs2); d.imm = 24'(imm);
    return d;
  endfunction

  function automatic int widx(word_t a);
    return int'(a[9:2]);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle_inputs();
    task_clear = 0; fe_pc = '0; viol_valid = 0; viol_addr = '0; ldchk_valid = 0;
    ldchk_pc = '0; ldchk_addr = '0; train_valid = 0; train_pc = '0; train_value = '0;
    rn_seed = 0; seed_free_valid = 0; seed_free_mask = '0;
    or_src1 = '0; or_src2 = '0; or_dst = '0; or_is_load = 0; or_lsq_hit = 0; or_is_seed = 0;
    or_dst_we = 0; or_ld_addr = '0; or_lsq_tag = '0; or_seed_id = '0;
    rt_valid = 0; rt_is_seed = 0; rt_taken = 0; rt_inst = '0; rt_tag = '0; rt_seed_id = '0;
    rt_live_left = '0; rt_live_right = '0; rt_val_left = '0; rt_val_right = '0; rt_addr = '0;
    rt_result = '0; rt_mem_old = '0; rs_valid = 0; rs_id = '0; rs_value = '0;
  endtask

  task automatic init_state(input int salt);
    for (int r = 0; r < AREGS; r++) R0[r] = word_t'(r * 4);          // small, address-like
    for (int w = 0; w < MW; w++)    M0[w] = word_t'(w * 7 + salt);
  endtask

  // Oracle: run the whole program with the given seed values.
  task automatic oracle(input word_t sv [3], output word_t Ro [AREGS], output word_t Mo [MW]);
    word_t a;
    Ro = R0; Mo = M0;
    for (int i = 0; i < plen; i++) begin
      dinst_t d = prog[i];
      a = eff_addr(Ro[d.rs1], d.imm);
      if (seed_no[i] >= 0)      Ro[d.rd] = sv[seed_no[i]];
      else if (d.op == OP_LD)   Ro[d.rd] = Mo[widx(a)];
      else if (d.op == OP_ST)   Mo[widx(a)] = Ro[d.rs2];
      else if (!is_branch(d.op) && d.op != OP_NOP && d.op != OP_JR)
                                Ro[d.rd] = alu(d.op, Ro[d.rs1], Ro[d.rs2]);
    end
  endtask

  // Run the task once, speculatively, through the DUT (slice collection).
  task automatic run_task();
    @(negedge clk); task_clear = 1; @(negedge clk); task_clear = 0;
    R = R0; M = M0;
    for (int w = 0; w < MW; w++) begin SR[w] = 0; SW[w] = 0; end
    for (int i = 0; i < plen; i++) begin
      dinst_t    d = prog[i];
      word_t     a, lv, rv, res, old;
      slicetag_t tg, ll, lr;
      bit        tk;
      // rename: a seed gets a slice ID
      if (seed_no[i] >= 0) begin
        rn_seed = 1; #1; sid[seed_no[i]] = rn_seed_id; @(negedge clk); rn_seed = 0;
      end
      // operand read
      a = eff_addr(R[d.rs1], d.imm);
      or_src1 = 7'(d.rs1); or_src2 = 7'(d.rs2);
      or_is_load = (d.op == OP_LD); or_ld_addr = a;
      or_is_seed = (seed_no[i] >= 0); or_seed_id = (seed_no[i] >= 0) ? sid[seed_no[i]] : '0;
      or_dst = 7'(d.rd);
      or_dst_we = !(d.op == OP_ST || is_branch(d.op) || d.op == OP_NOP || d.op == OP_JR);
      #1; tg = or_inst_tag; ll = or_live_left; lr = or_live_right;
      @(negedge clk); or_dst_we = 0; or_is_seed = 0;
      // execute in the model
      lv = R[d.rs1]; rv = R[d.rs2]; res = '0; old = '0; tk = 0;
      if (seed_no[i] >= 0) begin res = pred_v[seed_no[i]]; R[d.rd] = res; rv = M[widx(a)]; SR[widx(a)] = 1; end
      else if (d.op == OP_LD) begin res = M[widx(a)]; rv = res; R[d.rd] = res; SR[widx(a)] = 1; end
      else if (d.op == OP_ST) begin old = M[widx(a)]; M[widx(a)] = rv; SW[widx(a)] = 1; end
      else if (is_branch(d.op)) tk = br_taken(d.op, lv, rv);
      else if (d.op != OP_NOP && d.op != OP_JR) begin res = alu(d.op, lv, rv); R[d.rd] = res; end
      // retire
      rt_valid = 1; rt_inst = d; rt_tag = tg; rt_is_seed = (seed_no[i] >= 0);
      rt_seed_id = (seed_no[i] >= 0) ? sid[seed_no[i]] : '0;
      rt_live_left = ll; rt_live_right = lr; rt_val_left = lv; rt_val_right = rv;
      rt_addr = a; rt_taken = tk; rt_result = res; rt_mem_old = old;
      @(negedge clk); rt_valid = 0; rt_is_seed = 0;
    end
  endtask

  // Resolve seed s with value v; returns 1 if the task resumed, 0 if squashed,
  // 2 if the prediction was correct. Applies the REU's writes to the models.
  task automatic resolve(input int s, input word_t v, output int outcome, output int cycles);
    int n;
    n = 0;
    while (!rs_ready) @(negedge clk);
    rs_valid = 1; rs_id = sid[s]; rs_value = v;
    @(negedge clk); rs_valid = 0;
    outcome = 2;
    cycles = 0;
    while (n < 400) begin
      // replayed loads are reads of the speculative task
      if (mem_rd_en) SR[widx(mem_rd_addr)] = 1;
      // merge writes are writes of the speculative task: they set Speculative Write
      if (mem_wr_en) begin M[widx(mem_wr_addr)] = mem_wr_data; SW[widx(mem_wr_addr)] = 1; end
      if (rf_we)     R[rf_preg[3:0]] = rf_data;
      if (resume) begin outcome = 1; break; end
      if (squash) begin outcome = 0; break; end
      if (!stall && n > 1) break;
      @(negedge clk);
      n++;
    end
    cycles = n;
  endtask

  task automatic compare_with_oracle(input word_t sv [3], input string tag);
    word_t Ro [AREGS]; word_t Mo [MW];
    int bad;
    oracle(sv, Ro, Mo);
    bad = 0;
    for (int r = 0; r < AREGS; r++) if (R[r] != Ro[r]) begin
      bad++; $display("  %s: R%0d = %h, expected %h", tag, r, R[r], Ro[r]);
    end
    for (int w = 0; w < MW; w++) if (M[w] != Mo[w]) begin
      bad++; $display("  %s: M[%0d] = %h, expected %h", tag, w * 4, M[w], Mo[w]);
    end
    if (bad != 0) begin
      for (int i = 0; i < plen; i++)
        $display("    %2d: %-6s rd %0d rs1 %0d rs2 %0d imm %0d seed %0d", i, prog[i].op.name(),
                 prog[i].rd, prog[i].rs1, prog[i].rs2, prog[i].imm, seed_no[i]);
      $display("    predicted %h %h %h  correct %h %h %h  now %h %h %h", pred_v[0], pred_v[1],
               pred_v[2], good_v[0], good_v[1], good_v[2], sv[0], sv[1], sv[2]);
    end
    check(bad == 0, {tag, ": merged state equals a full re-run with the correct seed"});
  endtask

  task automatic do_reset();
    idle_inputs();
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask
