// tb_tdb: the 4-entry dependence buffer matches inserted addresses, replaces
// the oldest entry when a fifth address arrives, and ignores repeats.
//
// The 4-entry CAM of violating addresses follows the source; FIFO
// replacement and ignoring repeats are this design's choice.
`timescale 1ns/1ps
module tb_tdb;
  import reslice_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, iv = 0, m;
  word_t ia = '0, la = '0;
  always #5 clk = ~clk;
  tdb dut (.clk, .rst_n, .clear, .ins_valid(iv), .ins_addr(ia), .lk_addr(la), .lk_match(m));

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic ins(word_t a);
    @(negedge clk); iv = 1; ia = a; @(negedge clk); iv = 0;
  endtask
  task automatic look(word_t a, bit e);
    la = a; #1; check(m == e, $sformatf("lookup %h expects %b", a, e));
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    look(32'h100, 0);
    ins(32'h100); ins(32'h200); ins(32'h300); ins(32'h300); ins(32'h400);
    look(32'h100, 1); look(32'h200, 1); look(32'h300, 1); look(32'h400, 1); look(32'h500, 0);
    ins(32'h500);                      // replaces 0x100, the oldest
    look(32'h100, 0); look(32'h500, 1); look(32'h200, 1);
    clear = 1; @(negedge clk); clear = 0;
    look(32'h500, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
