// tb_slice_buffer_workloads: the slice buffer at its default sizes holding
// the per-task demand of the SpecInt 2000 applications the architecture was
// evaluated on.
//
// Part 1 builds, for each application, one task with the average number of
// slices per buffering task, the average instructions per slice, and about
// the average IB and SLIF use reported for it. Each slice is a seed load
// followed by ALU instructions and stores. Stores add IB address entries, and
// ALU instructions with one outside operand add SLIF live-ins, chosen so that
// the IB and SLIF totals come near the reported figures. Every slice must stay
// usable, and the descriptor, IB and SLIF counts must equal the expected use.
// Part 2 retires one slice of the average re-executed slice length reported
// for unlimited structures. The slice must be kept if it has at most 16
// instructions and discarded otherwise (gap and mcf).
//
// The workload figures are the reported averages (rounded). How the IB and
// SLIF use splits into stores and live-ins is this test's own construction.
`timescale 1ns/1ps
module tb_slice_buffer_workloads;
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
  logic [SLICE_ID_W-1:0] rd_slice [MAX_CONC] = '{default: '0};
  logic [SD_IDX_W-1:0] rd_idx [MAX_CONC] = '{default: '0};
  sd_entry_t rd_entry [MAX_CONC];
  logic [IB_PTR_W-1:0] ib_rd_ptr = '0; dinst_t ib_rd_inst; word_t ib_rd_addr, slif_rd_val;
  logic [SLIF_PTR_W-1:0] slif_rd_ptr = '0;
  always #5 clk = ~clk;

  slice_buffer dut (.*);

  // Per buffering task, x10: slices, instructions per slice, IB entries, SLIF entries.
  localparam int NAPP = 10;
  string app [NAPP] = '{"bzip2", "crafty", "gap", "gzip", "mcf", "parser", "twolf",
                        "vortex", "vpr", "mean"};
  int sds  [NAPP] = '{114, 153, 147, 115,  40,  88, 106,  50,  64,  97};
  int ipsd [NAPP] = '{ 64,  72,  60,  76, 120,  57,  47,  32,  64,  66};
  int ibe  [NAPP] = '{918, 1269, 1209, 959, 728, 660, 578, 247, 478, 783};
  int slf  [NAPP] = '{453, 760, 422, 433, 189, 316, 315, 106, 224, 358};
  // Average re-executed slice length with unlimited structures, x10.
  int ulen [NAPP] = '{ 39,  80, 279,  49, 201, 105, 100,  65,  18, 104};

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask
  function automatic int rnd10(int x10);  // round a x10 figure
    return (x10 + 5) / 10;
  endfunction
  function automatic dinst_t I(opcode_e op, int rd, int rs1, int rs2);
    dinst_t d; d = '0; d.op = op; d.rd = 4'(rd); d.rs1 = 4'(rs1); d.rs2 = 4'(rs2); return d;
  endfunction
  task automatic retire(dinst_t d, slicetag_t tag, bit seed, slicetag_t ll, slicetag_t lr, word_t a);
    @(negedge clk);
    rt_valid = 1; rt_inst = d; rt_tag = tag; rt_is_seed = seed; rt_seed_id = seed ? tag : '0;
    rt_live_left = ll; rt_live_right = lr; rt_val_left = a ^ 32'h55; rt_val_right = a + 7;
    rt_addr = a; rt_taken = 0;
    @(negedge clk); rt_valid = 0; rt_is_seed = 0;
  endtask
  task automatic do_clear();
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
  endtask

  // One slice of k instructions for slice s: a seed load, then `st` stores
  // (both operands in the slice) and k-1-st ALU instructions, `li` of which
  // have an outside right operand (a live-in).
  task automatic slice(int s, int k, int st, int li, int base);
    slicetag_t t; t = slicetag_t'(1) << s;
    retire(I(OP_LD, 1, 0, 0), t, 1, '0, '0, word_t'(base));
    for (int j = 1; j < k; j++) begin
      if (j <= st)           retire(I(OP_ST, 0, 1, 1), t, 0, '0, '0, word_t'(base + 4 * j));
      else if (j - st <= li) retire(I(OP_ADD, 1, 1, 9), t, 0, '0, t, '0);
      else                   retire(I(OP_ADD, 1, 1, 1), t, 0, '0, '0, '0);
    end
  endtask

  initial begin
    #4ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, k, mem, lv, ib_exp, st_s, li_s, rem;
    repeat (2) @(negedge clk); rst_n = 1;
    // Part 1: average demand per buffering task.
    for (int a = 0; a < NAPP; a++) begin
      n = rnd10(sds[a]); k = rnd10(ipsd[a]);
      // IB use = n*k instructions + n seed addresses + one address per store
      mem = rnd10(ibe[a]) - n * k - n;
      if (mem < 0) mem = 0;
      if (mem > n * (k - 1)) mem = n * (k - 1);
      lv = rnd10(slf[a]);
      if (lv > n * (k - 1) - mem) lv = n * (k - 1) - mem;
      ib_exp = n * k + n + mem;
      rem = lv;
      for (int s = 0; s < n; s++) begin
        st_s = mem / n + ((s < mem % n) ? 1 : 0);
        li_s = (rem + n - s - 1) / (n - s);
        if (li_s > k - 1 - st_s) li_s = k - 1 - st_s;
        rem -= li_s;
        slice(s, k, st_s, li_s, 64 * s);
      end
      check(rem == 0, $sformatf("%s: all %0d live-ins placed", app[a], lv));
      #1;
      $display("%-7s %2d slices x %2d insts: IB %3d of %0d, SLIF %2d of %0d, usable %h",
               app[a], n, k, ib_used, IB_ENTRIES, slif_used, SLIF_ENTRIES, sd_ok);
      check(sd_ok == slicetag_t'((32'h1 << n) - 1) && sd_valid == sd_ok,
            $sformatf("%s: all %0d slices usable (got %h)", app[a], n, sd_ok));
      check(32'(ib_used) == ib_exp, $sformatf("%s: IB use %0d (got %0d)", app[a], ib_exp, ib_used));
      check(32'(slif_used) == lv, $sformatf("%s: SLIF use %0d (got %0d)", app[a], lv, slif_used));
      for (int s = 0; s < n; s++)
        check(32'(sd_count[s]) == k, $sformatf("%s: SD%0d holds %0d", app[a], s, k));
      do_clear();
    end
    // Part 2: one slice of the average unlimited-resource length.
    for (int a = 0; a < NAPP; a++) begin
      k = rnd10(ulen[a]); if (k < 1) k = 1;
      slice(0, k, 0, k / 2, 0);
      #1;
      $display("%-7s slice of %2d instructions: %s", app[a], k, sd_ok[0] ? "kept" : "discarded");
      check(sd_ok[0] == (k <= SD_ENTRIES),
            $sformatf("%s: slice of %0d kept only if it fits 16 entries", app[a], k));
      do_clear();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
