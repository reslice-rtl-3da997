// tb_slice_id_alloc: all 16 IDs are handed out lowest first and one-hot, the
// 17th request is refused, a freed ID is reused, and clear frees all.
//
// One-hot IDs follow the source; lowest-first choice and the refusal when
// all are busy are this design's choice.
`timescale 1ns/1ps
module tb_slice_id_alloc;
  import reslice_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, req = 0, ok, fv = 0;
  slicetag_t id, fm = '0, busy;
  always #5 clk = ~clk;

  slice_id_alloc dut (.clk, .rst_n, .clear, .alloc_req(req), .alloc_ok(ok), .alloc_id(id),
                      .free_valid(fv), .free_mask(fm), .busy);

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N_SLICES; i++) begin
      req = 1; #1;
      check(ok && id == (slicetag_t'(1) << i), $sformatf("alloc %0d gives bit %0d", i, i));
      @(negedge clk);
    end
    #1; check(!ok && id == '0 && busy == '1, "17th request refused");
    req = 0; fv = 1; fm = slicetag_t'(1) << 5; @(negedge clk); fv = 0;
    req = 1; #1; check(ok && id == (slicetag_t'(1) << 5), "freed ID 5 reused");
    @(negedge clk); req = 0;
    clear = 1; @(negedge clk); clear = 0; #1;
    check(busy == '0 && id == slicetag_t'(1), "clear frees all IDs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
