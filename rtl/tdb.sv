// tdb: Temporary Dependence Buffer, a small per-core CAM of addresses.
//
// When a cross-task dependence violation squashes a task, the violating
// address is inserted. While the squashed task re-executes, each load address
// is looked up; a match tells the predictor to insert the load's PC. The CAM
// has 4 entries as in the evaluated system; replacement is FIFO and a repeated
// address is not inserted twice (both this design's choice).
//
// Lookup is combinational; insertion takes effect at the clock edge.
module tdb
  import reslice_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  ins_valid,
  input  word_t ins_addr,
  input  word_t lk_addr,
  output logic  lk_match
);

  logic                       valid [ENTRIES];
  word_t                      addr  [ENTRIES];
  logic [$clog2(ENTRIES)-1:0] wptr;
  logic                       ins_dup;

  always_comb begin
    lk_match = 1'b0;
    ins_dup  = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (valid[i] && addr[i] == lk_addr)  lk_match = 1'b1;
      if (valid[i] && addr[i] == ins_addr) ins_dup  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      for (int i = 0; i < ENTRIES; i++) begin valid[i] <= 1'b0; addr[i] <= '0; end
    end else if (clear) begin
      wptr <= '0;
      for (int i = 0; i < ENTRIES; i++) valid[i] <= 1'b0;
    end else if (ins_valid && !ins_dup) begin
      valid[wptr] <= 1'b1;
      addr[wptr]  <= ins_addr;
      wptr        <= (32'(wptr) == ENTRIES - 1) ? '0 : wptr + 1'b1;
    end
  end

endmodule
