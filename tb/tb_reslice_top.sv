// tb_reslice_top: end-to-end test of ReSlice at its default sizes.
//
// Many random speculative tasks run through the in-order core model of
// reslice_harness.svh. Each task is a straight-line program of loads, stores,
// ALU operations and branches with one to three seed loads. Before a task the
// predictor is taught the seed PCs through the dependence buffer (a violation
// on the seed's address, then the re-executed load), and at fetch every seed
// PC must be predicted as a seed. After the task, the seeds are resolved in
// random order with new values (sometimes the same value). Whenever ReSlice
// resumes the task, registers and memory must equal a full re-run of the task
// with the seed values known so far. A squash ends the task.
//
// The test counts how often each mechanism happened and fails for any that
// never did: seed prediction, slice buffering, overlap, correct prediction,
// successful re-execution, concurrent re-execution, register merge, undo,
// memory apply, each failure class, discard of a long slice, tag cache
// eviction and predictor decay.
//
// The oracle (a full re-run with the true seed values) expresses the
// source's correctness goal; the core model, program mix and task sizes
// are this design's choice.
`timescale 1ns/1ps
module tb_reslice_top;
  int checks = 0, failures = 0;
  `include "tb/reslice_harness.svh"

  localparam int TASKS = 1500;

  typedef enum int {M_SEEDPRED, M_BUFFERED, M_OVERLAP, M_CORRECT, M_SALVAGED, M_CONCURRENT,
                    M_REGMERGE, M_UNDO, M_APPLY, M_F_BRANCH, M_F_DANGLING, M_F_INHLOAD,
                    M_F_INHSTORE, M_F_MERGE, M_F_NOSLICE, M_TCEVICT, M_DECAY, M_NUM} mech_e;
  int mcount [M_NUM];
  string mname [M_NUM] = '{"seed predicted", "slice buffered", "overlapping slices",
    "correct prediction", "re-execution salvaged task", "concurrent re-execution",
    "register merge write", "undo write", "apply write", "fail: branch", "fail: dangling load",
    "fail: inhibiting load", "fail: inhibiting store", "fail: merge", "fail: slice not buffered",
    "tag cache eviction", "predictor decay"};

  always @(posedge clk) if (rst_n) begin
    if (rf_we) mcount[M_REGMERGE]++;
    if (mem_wr_en && dut.u_reu.state == dut.u_reu.S_MRGUNDO)  mcount[M_UNDO]++;
    if (mem_wr_en && dut.u_reu.state == dut.u_reu.S_MRGAPPLY) mcount[M_APPLY]++;
    if (tc_evicted) mcount[M_TCEVICT]++;
    if (decay_tick) mcount[M_DECAY]++;
  end

  int unsigned total_replayed = 0, total_insts = 0;

  function automatic int rnd(int n);
    return int'($urandom % n);
  endfunction

  // keep only one seed, at the start of the program
  task automatic single_seed(dinst_t d);
    for (int i = 1; i < 64; i++) if (seed_no[i] >= 0) begin
      seed_no[i] = -1;
      prog[i] = I(OP_NOP, 0, 0, 0, 0);
    end
    prog[0] = d; seed_no[0] = 0;
  endtask

  // Registers 1..4 hold addresses (multiples of 4 below 128); 5..15 hold data.
  task automatic gen_prog();
    int nseeds, len;
    len = 12 + rnd(24);
    plen = len;
    for (int i = 0; i < 64; i++) seed_no[i] = -1;
    nseeds = 1 + rnd(3);
    for (int i = 0; i < len; i++) begin
      int k = rnd(10);
      if (k < 3)      prog[i] = I(opcode_e'(rnd(8)), 5 + rnd(11), 1 + rnd(15), 1 + rnd(15), 0);
      else if (k < 5) prog[i] = I(OP_LD, 5 + rnd(11), 1 + rnd(4), 0, 4 * rnd(8));
      else if (k < 8) prog[i] = I(OP_ST, 0, 1 + rnd(4), 1 + rnd(15), 4 * rnd(8));
      else            prog[i] = I(rnd(2) ? OP_BEQ : OP_BLT, 0, 1 + rnd(15), 1 + rnd(15), 0);
    end
    for (int s = 0; s < nseeds; s++) begin
      int pos;
      do pos = rnd(len / 2 + 1); while (seed_no[pos] != -1);
      seed_no[pos] = s;
      prog[pos] = I(OP_LD, rnd(2) ? 1 + rnd(4) : 5 + rnd(11), 0, 0, 512 + 4 * s);
      pred_v[s] = word_t'(4 * rnd(32));
      good_v[s] = rnd(4) == 0 ? pred_v[s] : word_t'(4 * rnd(32));
    end
    // occasionally a slice that stores to five words of one tag cache set
    if (rnd(20) == 0) begin
      for (int i = 1; i < 6; i++) prog[i] = I(OP_ST, 0, 1, 5, 32 * (i - 1));
      single_seed(I(OP_LD, 1, 0, 0, 512));
    end
    // occasionally a long dependence chain to overflow a descriptor
    if (rnd(20) == 0) begin
      plen = 40;
      for (int i = len; i < 40; i++) prog[i] = I(OP_ADD, 5, 5, 6, 0);
      single_seed(I(OP_LD, 5, 0, 0, 512));
    end
  endtask

  function automatic int nseeds_of();
    int n = 0;
    for (int i = 0; i < plen; i++) if (seed_no[i] >= 0 && seed_no[i] + 1 > n) n = seed_no[i] + 1;
    return n;
  endfunction

  // teach the predictor a seed PC: violation on its address, then the load
  task automatic teach(word_t pc, word_t addr);
    @(negedge clk); viol_valid = 1; viol_addr = addr;
    @(negedge clk); viol_valid = 0; ldchk_valid = 1; ldchk_pc = pc; ldchk_addr = addr;
    @(negedge clk); ldchk_valid = 0;
  endtask

  initial begin
    #80ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int out, cyc, ns, order [3], s, before_conc;
    word_t sv [3];
    bit seeds_ok;
    for (int m = 0; m < M_NUM; m++) mcount[m] = 0;
    do_reset();
    for (int t = 0; t < TASKS; t++) begin
      init_state(t);
      gen_prog();
      ns = nseeds_of();
      // predictor: every seed PC must be recognised at fetch
      seeds_ok = 1;
      for (int i = 0; i < plen; i++) if (seed_no[i] >= 0) begin
        teach(word_t'(32'h4000 + 4 * i + 256 * (t % 64)), 32'h200 + 4 * seed_no[i]);
        fe_pc = word_t'(32'h4000 + 4 * i + 256 * (t % 64)); #1;
        if (!fe_seed) seeds_ok = 0; else mcount[M_SEEDPRED]++;
      end
      check(seeds_ok, $sformatf("task %0d: seed PCs predicted at fetch", t));
      run_task();
      total_insts += plen;
      for (int s = 0; s < ns; s++) if (buffered_ok & sid[s]) mcount[M_BUFFERED]++;
      if (overlap != '0) mcount[M_OVERLAP]++;
      for (int s = 0; s < 3; s++) sv[s] = pred_v[s];
      for (int s = 0; s < 3; s++) order[s] = s;
      if (ns > 1 && rnd(2)) begin order[0] = ns - 1; order[ns - 1] = 0; end
      for (int j = 0; j < ns; j++) begin
        s = order[j];
        before_conc = int'(cnt_concurrent);
        resolve(s, good_v[s], out, cyc);
        if (out == 2) begin
          mcount[M_CORRECT]++;
          check(good_v[s] == sv[s], "no action only for a correct prediction");
        end else if (out == 1) begin
          mcount[M_SALVAGED]++;
          if (cnt_concurrent != before_conc) mcount[M_CONCURRENT]++;
          total_replayed += reexec_insts;
          sv[s] = good_v[s];
          compare_with_oracle(sv, $sformatf("task %0d seed %0d", t, s));
        end else begin
          case (squash_reason)
            FAIL_BRANCH:    mcount[M_F_BRANCH]++;
            FAIL_DANGLING:  mcount[M_F_DANGLING]++;
            FAIL_INH_LOAD:  mcount[M_F_INHLOAD]++;
            FAIL_INH_STORE: mcount[M_F_INHSTORE]++;
            FAIL_MERGE:     mcount[M_F_MERGE]++;
            FAIL_NOSLICE:   mcount[M_F_NOSLICE]++;
            default: ;
          endcase
          check(good_v[s] != sv[s], "squash only on a misprediction");
          break;
        end
      end
    end
    // run on until the predictor has decayed at least once
    while (mcount[M_DECAY] == 0) @(negedge clk);
    $display("tasks %0d, instructions %0d, replayed %0d", TASKS, total_insts, total_replayed);
    for (int m = 0; m < M_NUM; m++) begin
      $display("  %-28s %0d", mname[m], mcount[m]);
      check(mcount[m] > 0, {"mechanism happened: ", mname[m]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
