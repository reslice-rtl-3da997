// tb_slicetag_logic: random SliceTags against a bit-by-bit reference of the
// membership rule (OR of sources and seed ID) and the live-in rule (a source
// is a live-in of the slices the other source belongs to and it does not).
//
// Both rules, including ORing a seed's own ID into its tag, follow the
// source's operand-read logic; the random stimulus is this test's own.
`timescale 1ns/1ps
module tb_slicetag_logic;
  import reslice_pkg::*;
  int checks = 0, failures = 0;
  slicetag_t tl, tr, sidv, it, ll, lr;
  logic seed, ins;

  slicetag_logic dut (.tag_left(tl), .tag_right(tr), .is_seed(seed), .seed_id(sidv),
                      .inst_tag(it), .live_left(ll), .live_right(lr), .in_slice(ins));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      slicetag_t e_it, e_ll, e_lr;
      tl   = slicetag_t'($urandom) & slicetag_t'($urandom);
      tr   = slicetag_t'($urandom) & slicetag_t'($urandom);
      if (n % 3 == 0) tl = '0;
      if (n % 5 == 0) tr = '0;
      seed = ($urandom % 4) == 0;
      sidv = slicetag_t'(1) << ($urandom % N_SLICES);
      #1;
      for (int b = 0; b < N_SLICES; b++) begin
        e_it[b] = tl[b] || tr[b] || (seed && sidv[b]);
        e_ll[b] = tr[b] && !tl[b];
        e_lr[b] = tl[b] && !tr[b];
      end
      checks++;
      if (it !== e_it || ll !== e_ll || lr !== e_lr || ins !== (e_it != 0)) begin
        failures++;
        $display("FAIL tl=%h tr=%h seed=%b id=%h -> %h %h %h", tl, tr, seed, sidv, it, ll, lr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
