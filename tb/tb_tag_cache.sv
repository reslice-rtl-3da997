// tb_tag_cache: slice stores allocate and overwrite tags, a non-slice store
// zeroes the tag of an existing entry without allocating, a fifth address in
// a full set evicts round-robin and reports the victim's tag, clear empties.
//
// Address plus SliceTag entries follow the source; the zero-tag kill, 4
// ways and round-robin eviction are this design's choice.
`timescale 1ns/1ps
module tb_tag_cache;
  import reslice_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, uv = 0, ev;
  word_t la [2]; logic lh [2]; slicetag_t lt [2];
  word_t ua = '0; slicetag_t ut = '0, et;
  always #5 clk = ~clk;

  tag_cache #(.N_LK(2)) dut (.clk, .rst_n, .clear, .lk_addr(la), .lk_hit(lh), .lk_tag(lt),
                 .up_valid(uv), .up_addr(ua), .up_tag(ut), .evict_valid(ev), .evict_tag(et));

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic up(word_t a, slicetag_t t, bit exp_ev = 0, slicetag_t exp_et = '0);
    @(negedge clk); uv = 1; ua = a; ut = t; #1;
    check(ev == exp_ev && (!exp_ev || et == exp_et), $sformatf("update %h eviction %b", a, exp_ev));
    @(negedge clk); uv = 0;
  endtask
  task automatic look(word_t a, bit h, slicetag_t t);
    la[0] = a; la[1] = a; #1;
    check(lh[0] == h && lh[1] == h && (!h || (lt[0] == t && lt[1] == t)),
          $sformatf("lookup %h: hit %b tag %h (got %b %h)", a, h, t, lh[0], lt[0]));
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    la[0] = '0; la[1] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    look(32'h40, 0, '0);
    up(32'h40, 16'h0001);      look(32'h40, 1, 16'h0001);
    up(32'h40, 16'h0006);      look(32'h40, 1, 16'h0006);
    up(32'h40, 16'h0000);      look(32'h40, 1, 16'h0000);   // killed, entry kept
    up(32'h44, 16'h0000);      look(32'h44, 0, '0);         // no allocation
    // set 0 holds word addresses with bits [4:2] = 0: 0x00, 0x20, 0x40, ...
    up(32'h00, 16'h0010); up(32'h20, 16'h0020); up(32'h60, 16'h0040);
    look(32'h60, 1, 16'h0040);
    up(32'h80, 16'h0100, 1, 16'h0000);   // set full: evicts way 0 (0x40, tag 0)
    look(32'h80, 1, 16'h0100); look(32'h40, 0, '0);
    up(32'ha0, 16'h0200, 1, 16'h0010);   // next victim: way 1 (0x00)
    look(32'h00, 0, '0); look(32'h20, 1, 16'h0020);
    clear = 1; @(negedge clk); clear = 0;
    look(32'h80, 0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
