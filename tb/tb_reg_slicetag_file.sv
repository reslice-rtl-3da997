// tb_reg_slicetag_file: random writes to the 90 tags with three read ports
// compared against a reference array, then clear.
//
// The source only places SliceTags beside the registers; the port count
// and the clear are this design's choice, and are what is checked here.
`timescale 1ns/1ps
module tb_reg_slicetag_file;
  import reslice_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  logic [6:0] ra, rb, rm, wi;
  slicetag_t ta, tbg, tm, wt;
  slicetag_t ref_t [90];
  always #5 clk = ~clk;

  reg_slicetag_file dut (.clk, .rst_n, .clear, .ra_idx(ra), .ra_tag(ta), .rb_idx(rb), .rb_tag(tbg),
                         .rm_idx(rm), .rm_tag(tm), .we, .w_idx(wi), .w_tag(wt));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 90; i++) ref_t[i] = '0;
    ra = 0; rb = 0; rm = 0; wi = 0; wt = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1; wi = 7'($urandom % 90); wt = slicetag_t'($urandom);
      ref_t[wi] = wt;
      ra = 7'($urandom % 90); rb = 7'($urandom % 90); rm = 7'($urandom % 90);
      @(negedge clk); we = 0; #1;
      checks++;
      if (ta !== ref_t[ra] || tbg !== ref_t[rb] || tm !== ref_t[rm]) begin
        failures++; $display("FAIL read %0d %0d %0d", ra, rb, rm);
      end
    end
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 90; i++) begin
      ra = 7'(i); #1; checks++; if (ta !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
