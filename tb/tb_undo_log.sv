// tb_undo_log: first slice update of an address is logged, a second update
// by the same slice marks the entry multi, another slice's first update gets
// its own entry, mark_undone is seen, an update of a word that another slice
// had written is flagged chained, a full log reports overflow, clear.
//
// First-update logging and the multi/undone conditions follow the source;
// the chained flag and overflow reporting are this design's choice.
`timescale 1ns/1ps
module tb_undo_log;
  import reslice_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, rv = 0, mk = 0;
  word_t ra = '0, ro = '0, la = '0, ld;
  slicetag_t rt = '0, rp = '0, lm = '0, ov;
  logic lh, lmu, lun, lch;
  always #5 clk = ~clk;

  undo_log dut (.clk, .rst_n, .clear, .rec_valid(rv), .rec_addr(ra), .rec_old(ro), .rec_tag(rt),
                .rec_prev_tag(rp),
                .overflow_tag(ov), .lk_addr(la), .lk_mask(lm), .lk_hit(lh), .lk_data(ld),
                .lk_multi(lmu), .lk_undone(lun), .lk_chained(lch), .mark_undone(mk));

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic rec(word_t a, word_t o, slicetag_t t, slicetag_t exp_ov = '0);
    @(negedge clk); rv = 1; ra = a; ro = o; rt = t; #1;
    check(ov == exp_ov, $sformatf("record %h overflow %h (got %h)", a, exp_ov, ov));
    @(negedge clk); rv = 0;
  endtask
  task automatic look(word_t a, slicetag_t m, bit h, word_t d, bit mu, bit un);
    la = a; lm = m; #1;
    check(lh == h && (!h || (ld == d && lmu == mu && lun == un)),
          $sformatf("lookup %h/%h: hit %b data %h multi %b undone %b", a, m, h, d, mu, un));
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    rec(32'h100, 32'hAAAA, 16'h0001);
    look(32'h100, 16'h0001, 1, 32'hAAAA, 0, 0);
    look(32'h100, 16'h0002, 0, '0, 0, 0);
    rec(32'h100, 32'hBBBB, 16'h0001);                  // second update, same slice
    look(32'h100, 16'h0001, 1, 32'hAAAA, 1, 0);
    rec(32'h100, 32'hCCCC, 16'h0002);                  // first update of slice 1
    look(32'h100, 16'h0002, 1, 32'hCCCC, 0, 0);
    la = 32'h100; lm = 16'h0002; mk = 1; @(negedge clk); mk = 0;
    look(32'h100, 16'h0002, 1, 32'hCCCC, 0, 1);
    check(lch == 0, "unchained entry");
    rp = 16'h0002; rec(32'h180, 32'hDDDD, 16'h0010); rp = '0;  // word written by slice 1
    look(32'h180, 16'h0010, 1, 32'hDDDD, 0, 0);
    check(lch == 1, "chained entry");
    for (int i = 0; i < 29; i++) rec(32'h200 + 4 * i, word_t'(i), 16'h0004);
    rec(32'h400, 32'h1, 16'h0008, 16'h0008);            // 33rd entry does not fit
    look(32'h200 + 4 * 28, 16'h0004, 1, 32'd28, 0, 0);
    clear = 1; @(negedge clk); clear = 0;
    look(32'h100, 16'h0001, 0, '0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
