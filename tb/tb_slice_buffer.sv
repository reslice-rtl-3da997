// tb_slice_buffer: fills the buffer with the two overlapping slices of the
// classic example (two seed loads feeding one add and one store) and checks
// every IB, SLIF and descriptor entry, the shared entries and the Overlap
// bits; then checks that a slice longer than 16 instructions, a slice with an
// indirect branch and an externally aborted slice stop being usable.
//
// The entry layout and sharing follow the source's slice buffer; the
// abort conditions and the seed in entry 0 are this design's choice.
`timescale 1ns/1ps
module tb_slice_buffer;
  import reslice_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0;
  logic rt_valid = 0, rt_is_seed = 0, rt_taken = 0;
  dinst_t rt_inst = '0;
  slicetag_t rt_tag = '0, rt_seed_id = '0, rt_live_left = '0, rt_live_right = '0, abort_mask = '0;
  word_t rt_val_left = '0, rt_val_right = '0, rt_addr = '0;
  slicetag_t sd_valid, sd_ok, sd_overlap;
  logic [SD_IDX_W:0] sd_count [N_SLICES];
  logic [IB_PTR_W:0] ib_used; logic [SLIF_PTR_W:0] slif_used;
  logic [SLICE_ID_W-1:0] rd_slice [MAX_CONC]; logic [SD_IDX_W-1:0] rd_idx [MAX_CONC];
  sd_entry_t rd_entry [MAX_CONC];
  logic [IB_PTR_W-1:0] ib_rd_ptr = '0; dinst_t ib_rd_inst; word_t ib_rd_addr, slif_rd_val;
  logic [SLIF_PTR_W-1:0] slif_rd_ptr = '0;
  always #5 clk = ~clk;

  slice_buffer dut (.*);

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  function automatic dinst_t I(opcode_e op, int rd, int rs1, int rs2);
    dinst_t d; d = '0; d.op = op; d.rd = 4'(rd); d.rs1 = 4'(rs1); d.rs2 = 4'(rs2); return d;
  endfunction
  task automatic retire(dinst_t d, slicetag_t tag, bit seed, slicetag_t ll, slicetag_t lr,
                        word_t vl, word_t vr, word_t a, bit tk = 0);
    @(negedge clk);
    rt_valid = 1; rt_inst = d; rt_tag = tag; rt_is_seed = seed; rt_seed_id = seed ? tag : '0;
    rt_live_left = ll; rt_live_right = lr; rt_val_left = vl; rt_val_right = vr; rt_addr = a;
    rt_taken = tk;
    @(negedge clk); rt_valid = 0; rt_is_seed = 0;
  endtask
  task automatic sd_is(int s, int i, int ib, int slif, bit t, bit l, bit r);
    rd_slice[0] = SLICE_ID_W'(s); rd_idx[0] = SD_IDX_W'(i); #1;
    check(rd_entry[0].ib == IB_PTR_W'(ib) && (!(l || r) || rd_entry[0].slif == SLIF_PTR_W'(slif)) &&
          rd_entry[0].taken == t && rd_entry[0].left_op == l && rd_entry[0].right_op == r,
          $sformatf("SD%0d[%0d] = ib %0d slif %0d t%b l%b r%b (got %p)", s, i, ib, slif, t, l, r, rd_entry[0]));
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int p = 0; p < MAX_CONC; p++) begin rd_slice[p] = '0; rd_idx[p] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    retire(I(OP_LD, 4, 1, 0), 16'h0001, 1, '0, '0, 0, 0, 32'h100);
    retire(I(OP_LD, 3, 1, 0), 16'h0002, 1, '0, '0, 0, 0, 32'h104);
    retire(I(OP_ADD, 1, 3, 4), 16'h0003, 0, 16'h0001, 16'h0002, 32'h33, 32'h44, 0);
    retire(I(OP_BEQ, 0, 1, 0), 16'h0002, 0, 16'h0000, 16'h0002, 32'h0, 32'h0, 0, 1);
    retire(I(OP_ST, 0, 5, 1), 16'h0003, 0, 16'h0003, 16'h0000, 32'h55, 32'h0, 32'h200);
    retire(I(OP_ADD, 7, 8, 9), 16'h0000, 0, '0, '0, 1, 2, 0);     // not in a slice
    #1;
    check(ib_used == 8 && slif_used == 4, $sformatf("IB %0d and SLIF %0d entries used", ib_used, slif_used));
    check(sd_valid == 16'h0003 && sd_ok == 16'h0003 && sd_overlap == 16'h0003, "valid, ok and Overlap bits");
    check(sd_count[0] == 3 && sd_count[1] == 4, "descriptor lengths 3 and 4");
    ib_rd_ptr = 0; #1; check(ib_rd_inst.op == OP_LD && ib_rd_inst.rd == 4 && ib_rd_addr == 32'h100, "IB[0] seed A + address");
    ib_rd_ptr = 2; #1; check(ib_rd_inst.rd == 3 && ib_rd_addr == 32'h104, "IB[2] seed B + address");
    ib_rd_ptr = 4; #1; check(ib_rd_inst.op == OP_ADD, "IB[4] shared add");
    ib_rd_ptr = 6; #1; check(ib_rd_inst.op == OP_ST && ib_rd_addr == 32'h200, "IB[6] store + address");
    slif_rd_ptr = 0; #1; check(slif_rd_val == 32'h33, "SLIF[0] = R3 (live-in of slice A)");
    slif_rd_ptr = 1; #1; check(slif_rd_val == 32'h44, "SLIF[1] = R4 (live-in of slice B)");
    slif_rd_ptr = 3; #1; check(slif_rd_val == 32'h55, "SLIF[3] = store base, shared");
    sd_is(0, 0, 0, 0, 0, 0, 0); sd_is(0, 1, 4, 0, 0, 1, 0); sd_is(0, 2, 6, 3, 0, 1, 0);
    sd_is(1, 0, 2, 0, 0, 0, 0); sd_is(1, 1, 4, 1, 0, 0, 1); sd_is(1, 2, 5, 2, 1, 0, 1);
    sd_is(1, 3, 6, 3, 0, 1, 0);
    // slice 2: 1 seed + 16 more instructions exceeds 16 entries
    retire(I(OP_LD, 2, 1, 0), 16'h0004, 1, '0, '0, 0, 0, 32'h300);
    for (int i = 0; i < 15; i++) retire(I(OP_ADD, 2, 2, 2), 16'h0004, 0, '0, '0, 0, 0, 0);
    #1; check(sd_ok[2] && sd_count[2] == 16, "16-instruction slice kept");
    retire(I(OP_ADD, 2, 2, 2), 16'h0004, 0, '0, '0, 0, 0, 0);
    #1; check(!sd_ok[2], "17th instruction discards the slice");
    // slice 3 meets an indirect branch
    retire(I(OP_LD, 2, 1, 0), 16'h0008, 1, '0, '0, 0, 0, 32'h304);
    retire(I(OP_JR, 0, 2, 0), 16'h0008, 0, '0, '0, 0, 0, 0);
    #1; check(sd_valid[3] && !sd_ok[3], "indirect branch aborts buffering");
    @(negedge clk); abort_mask = 16'h0001; @(negedge clk); abort_mask = '0; #1;
    check(sd_ok == 16'h0002, "external abort of slice 0");
    clear = 1; @(negedge clk); clear = 0; #1;
    check(sd_valid == '0 && ib_used == 0 && slif_used == 0, "clear empties the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
