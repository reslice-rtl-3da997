// tb_dvp: a PC inserted with maximum confidence is a seed with a used
// prediction; decay ticks lower the confidence until only buffering is
// predicted and finally invalidate the entry; the hybrid value predictor
// switches from last value to stride on a strided sequence. The decay
// interval is shortened to 20 cycles.
//
// The expected behaviour (seed on a hit, prediction only with both upper
// confidence bits set, decay and invalidation) follows the source; the
// stride selector and its training rule are this design's choice.
`timescale 1ns/1ps
module tb_dvp;
  import reslice_pkg::*;
  int checks = 0, failures = 0;
  localparam int DEC = 20;
  logic clk = 0, rst_n = 0, iv = 0, tv = 0, seed, usep, tick;
  word_t lpc = '0, ipc = '0, tpc = '0, tval = '0, pval;
  int ticks = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (tick) ticks++;

  dvp #(.DECAY_CYCLES(DEC)) dut (.clk, .rst_n, .lk_pc(lpc), .lk_seed(seed), .lk_use_pred(usep),
        .lk_value(pval), .ins_valid(iv), .ins_pc(ipc), .tr_valid(tv), .tr_pc(tpc),
        .tr_value(tval), .decay_tick(tick));

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int t0;
    repeat (2) @(negedge clk); rst_n = 1;
    lpc = 32'h1000; #1; check(!seed, "unknown PC is no seed");
    @(negedge clk); iv = 1; ipc = 32'h1000; @(negedge clk); iv = 0;
    t0 = ticks;
    #1; check(seed && usep, "inserted PC: seed and prediction used");
    // train 10, 20, 30, 40: stride wins
    for (int v = 1; v <= 4; v++) begin
      @(negedge clk); tv = 1; tpc = 32'h1000; tval = word_t'(10 * v); @(negedge clk); tv = 0;
    end
    #1; check(pval == 32'd50, $sformatf("stride prediction 50 (got %0d)", pval));
    // conf 15 -> 12 still predicts (top bits 11), 11 does not
    while (ticks - t0 < 4) @(negedge clk);
    #1; check(seed && !usep, $sformatf("after 4 decays: buffer only (ticks %0d)", ticks - t0));
    while (ticks - t0 < 15) @(negedge clk);
    #1; check(seed, "after 15 decays still valid");
    while (ticks - t0 < 16) @(negedge clk);
    #1; check(!seed, "after 16 decays invalidated");
    check(ticks > 0 && (ticks - t0) == 16, "decay period");
    // train of a constant sequence: last value
    @(negedge clk); iv = 1; ipc = 32'h2000; @(negedge clk); iv = 0;
    for (int v = 0; v < 3; v++) begin
      @(negedge clk); tv = 1; tpc = 32'h2000; tval = 32'd77; @(negedge clk); tv = 0;
    end
    lpc = 32'h2000; #1; check(seed && pval == 32'd77, "last-value prediction 77");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
