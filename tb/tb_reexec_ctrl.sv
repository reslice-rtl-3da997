// tb_reexec_ctrl: the Resolution Point decisions. A resolved value equal to
// the seed's value does nothing; a misprediction of a usable slice starts the
// REU with the right slice mask and the new seed value, and resumes or
// squashes by the REU's answer; an unusable slice squashes at once; an
// overlapping slice pulls in the overlapping slices already re-executed, and
// more than three together squash. The REU is played by the testbench.
//
// The decisions follow the source's resolution flow and overlap rule; the
// squash when more than three slices are needed is this design's choice.
`timescale 1ns/1ps
module tb_reexec_ctrl;
  import reslice_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, sv_valid = 0, rs_valid = 0, rs_ready;
  slicetag_t sv_id = '0, rs_id = '0, sd_valid = '0, sd_ok = '0, sd_overlap = '0, reu_mask, reexecuted;
  word_t sv_value = '0, rs_value = '0, seed_val [N_SLICES];
  logic reu_start, reu_done = 0, reu_ok = 0, stall, squash, resume;
  fail_e reu_fail = FAIL_NONE, squash_reason;
  logic [15:0] cnt_correct, cnt_reexec, cnt_concurrent, cnt_salvaged, cnt_squash;
  always #5 clk = ~clk;

  reexec_ctrl dut (.*);

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic seed(int k, word_t v);
    @(negedge clk); sv_valid = 1; sv_id = slicetag_t'(1) << k; sv_value = v;
    @(negedge clk); sv_valid = 0;
  endtask
  // resolve slice k; the REU (if started) answers ok after 3 cycles
  task automatic resolve(int k, word_t v, bit answer, output bit started, output slicetag_t m,
                         output bit sq, output bit rsm);
    started = 0; sq = 0; rsm = 0; m = '0;
    @(negedge clk); rs_valid = 1; rs_id = slicetag_t'(1) << k; rs_value = v;
    @(negedge clk); rs_valid = 0;
    for (int n = 0; n < 12; n++) begin
      if (reu_start) begin started = 1; m = reu_mask; end
      if (squash) sq = 1;
      if (resume) rsm = 1;
      if (started && n == 4) begin reu_done = 1; reu_ok = answer; reu_fail = answer ? FAIL_NONE : FAIL_BRANCH; end
      @(negedge clk); reu_done = 0;
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit st, sq, rs; slicetag_t m;
    repeat (2) @(negedge clk); rst_n = 1;
    sd_valid = 16'h001F; sd_ok = 16'h001F; sd_overlap = 16'h001E;
    for (int k = 0; k < 5; k++) seed(k, word_t'(100 + k));
    resolve(0, 100, 1, st, m, sq, rs);
    check(!st && !sq && cnt_correct == 1, "correct prediction: nothing");
    resolve(0, 200, 1, st, m, sq, rs);
    check(st && m == 16'h0001 && rs && !sq && seed_val[0] == 200, "mispredict: REU runs slice 0, resume");
    resolve(0, 300, 0, st, m, sq, rs);
    check(st && sq && !rs && squash_reason == FAIL_BRANCH, "REU failure squashes");
    resolve(1, 7, 1, st, m, sq, rs);
    check(st && m == 16'h0002 && rs, "overlap slice 1 alone (none re-executed yet)");
    resolve(2, 7, 1, st, m, sq, rs);
    check(st && m == 16'h0006 && rs && cnt_concurrent == 1, "slice 2 pulls in re-executed slice 1");
    resolve(3, 7, 1, st, m, sq, rs);
    check(st && m == 16'h000E && rs, "three slices together");
    resolve(4, 7, 1, st, m, sq, rs);
    check(!st && sq && squash_reason == FAIL_NOSLICE, "four slices: squash");
    sd_ok = 16'h001E;
    resolve(0, 1, 1, st, m, sq, rs);
    check(!st && sq, "slice not usable: squash");
    check(cnt_reexec == 5 && cnt_salvaged == 4 && cnt_squash == 3, "outcome counters");
    clear = 1; @(negedge clk); clear = 0; #1;
    check(reexecuted == '0, "clear forgets re-executed slices");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
