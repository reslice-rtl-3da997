// tb_reu: directed tests of the Re-Execution Unit, run through the ReSlice top
// with an in-order core model (reslice_harness.svh).
//
// Each scenario runs a short task speculatively, resolves a seed with a new
// value and checks the outcome: a replay that must succeed has to leave the
// registers and memory equal to a full re-run of the task with the correct
// seed (the oracle); a replay that must fail has to squash with the right
// reason. Covered: register and memory merge with liveness, store-to-load
// dependence inside the slice, a store that moves to an untouched address
// (undo + apply), branch change, Inhibiting store, Inhibiting load, Dangling
// load, a double update that cannot be undone, a correct prediction, and two
// overlapping slices re-executed together.
//
// The failure classes and merge rules checked follow the source; the two
// extra merge rules (chained undo, moved store sharing its old address)
// are this design's and are checked too.
`timescale 1ns/1ps
module tb_reu;
  int checks = 0, failures = 0;
  `include "tb/reslice_harness.svh"

  int out, cyc;
  word_t sv [3];

  task automatic new_prog();
    plen = 0;
    for (int i = 0; i < 64; i++) seed_no[i] = -1;
  endtask
  task automatic add(dinst_t d, int s = -1);
    prog[plen] = d; seed_no[plen] = s; plen++;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset();
    init_state(3);

    // ---- A: success, register and memory merge with liveness
    new_prog();
    add(I(OP_LD, 3, 1, 0, 0), 0);        // seed: R3 <- [R1]
    add(I(OP_ADD, 5, 3, 2, 0));          // R5 = R3 + R2        (R2 live-in)
    add(I(OP_ST, 0, 6, 5, 100));         // [R6+100] = R5       (R6 live-in)
    add(I(OP_LD, 8, 6, 0, 100));         // R8 <- [R6+100]      (memory dependence)
    add(I(OP_ADD, 9, 2, 2, 0));          // not in the slice
    add(I(OP_SUB, 10, 8, 9, 0));         // R10 = R8 - R9       (R9 live-in)
    add(I(OP_ADD, 3, 2, 2, 0));          // kills the slice value of R3
    add(I(OP_ST, 0, 6, 12, 40));         // [R6+40] = R12  (not in slice)
    add(I(OP_ST, 0, 7, 10, 60));         // [R7+60] = R10
    add(I(OP_ST, 0, 7, 2, 60));          // kills the slice update of [R7+60]
    pred_v[0] = 32'h10; good_v[0] = 32'h20;
    run_task();
    check(buffered_ok == sid[0], "A: slice buffered");
    resolve(0, good_v[0], out, cyc);
    check(out == 1, "A: re-execution resumes the task");
    check(reexec_insts == 6, $sformatf("A: 6 instructions replayed (got %0d)", reexec_insts));
    sv[0] = good_v[0];
    compare_with_oracle(sv, "A");

    // ---- I: correct prediction needs no action
    resolve(0, good_v[0], out, cyc);
    check(out == 2 && cnt_correct == 1, "I: correct prediction does nothing");

    // ---- F: store moves to an untouched address: undo + apply
    new_prog();
    add(I(OP_LD, 1, 2, 0, 0), 0);        // seed R1 (an address)
    add(I(OP_ST, 0, 1, 4, 0));           // [R1] = R4
    add(I(OP_ADD, 5, 1, 4, 0));
    pred_v[0] = 32'h40; good_v[0] = 32'h80;
    run_task();
    resolve(0, good_v[0], out, cyc);
    check(out == 1, "F: moved store salvaged");
    sv[0] = good_v[0];
    compare_with_oracle(sv, "F");

    // ---- B: branch outcome changes
    new_prog();
    add(I(OP_LD, 3, 1, 0, 0), 0);
    add(I(OP_BEQ, 0, 3, 2, 0));          // R2 = 8
    pred_v[0] = 32'h8; good_v[0] = 32'h9;
    run_task();
    resolve(0, good_v[0], out, cyc);
    check(out == 0 && squash_reason == FAIL_BRANCH, "B: branch change squashes");

    // ---- C: Inhibiting store
    new_prog();
    add(I(OP_LD, 7, 0, 0, 128));         // reads 0x80 in the original run
    add(I(OP_LD, 3, 1, 0, 0), 0);        // seed
    add(I(OP_ST, 0, 3, 2, 0));           // [R3]: 0x40 -> 0x80
    pred_v[0] = 32'h40; good_v[0] = 32'h80;
    run_task();
    resolve(0, good_v[0], out, cyc);
    check(out == 0 && squash_reason == FAIL_INH_STORE, "C: Inhibiting store squashes");

    // ---- D: Inhibiting load
    new_prog();
    add(I(OP_LD, 3, 1, 0, 0), 0);        // seed
    add(I(OP_LD, 4, 3, 0, 0));           // [R3]: 0x40 -> 0x80
    add(I(OP_ST, 0, 0, 5, 128));         // later write of 0x80 in the original run
    pred_v[0] = 32'h40; good_v[0] = 32'h80;
    run_task();
    resolve(0, good_v[0], out, cyc);
    check(out == 0 && squash_reason == FAIL_INH_LOAD, "D: Inhibiting load squashes");

    // ---- E: Dangling load
    new_prog();
    add(I(OP_LD, 1, 2, 0, 0), 0);        // seed R1
    add(I(OP_ST, 0, 1, 4, 0));           // [R1] = R4: 0x40 -> 0x80
    add(I(OP_LD, 3, 0, 0, 64));          // reads 0x40: joined the slice through memory
    pred_v[0] = 32'h40; good_v[0] = 32'h80;
    run_task();
    resolve(0, good_v[0], out, cyc);
    check(out == 0 && squash_reason == FAIL_DANGLING, "E: Dangling load squashes");

    // ---- G: two slice updates of the moved address cannot be undone
    new_prog();
    add(I(OP_LD, 1, 2, 0, 0), 0);
    add(I(OP_ST, 0, 1, 4, 0));
    add(I(OP_ST, 0, 1, 5, 0));
    pred_v[0] = 32'h40; good_v[0] = 32'h80;
    run_task();
    resolve(0, good_v[0], out, cyc);
    check(out == 0 && squash_reason == FAIL_MERGE, "G: double update squashes at merge");

    // ---- H: overlapping slices (two seeds feeding one add and a store)
    new_prog();
    add(I(OP_LD, 4, 1, 0, 0), 0);        // seed A
    add(I(OP_LD, 3, 1, 0, 4), 1);        // seed B
    add(I(OP_ADD, 11, 3, 4, 0));         // in both slices
    add(I(OP_ST, 0, 0, 11, 200));
    pred_v[0] = 32'h100; good_v[0] = 32'h111;
    pred_v[1] = 32'h200; good_v[1] = 32'h222;
    run_task();
    check(overlap == (sid[0] | sid[1]), "H: both descriptors marked Overlap");
    resolve(1, good_v[1], out, cyc);
    check(out == 1, "H: slice B re-executed");
    sv[0] = pred_v[0]; sv[1] = good_v[1];
    compare_with_oracle(sv, "H1");
    resolve(0, good_v[0], out, cyc);
    check(out == 1 && cnt_concurrent == 1, "H: slices A and B re-executed together");
    check(reexec_insts == 4, $sformatf("H: combined slice has 4 instructions (got %0d)", reexec_insts));
    sv[0] = good_v[0];
    compare_with_oracle(sv, "H2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
