// tag_cache: SliceTags of memory words written by slice stores.
//
// Instead of tagging cache lines, ReSlice keeps the addresses that slice
// stores wrote, each with a SliceTag, in a small set-associative buffer (32
// entries, 48 bits each: a 32-bit word address and a 16-bit SliceTag).
//   * Lookup (N_LK combinational ports): hit and SliceTag of an address. In
//     the top, port 0 serves operand read of loads, port 1 the re-execution
//     unit at merge, port 2 the undo log at store retirement.
//   * Update (one per cycle, at store retirement): a store that belongs to a
//     slice writes its SliceTag into the entry of its address, allocating one
//     on a miss. A store outside every slice overwrites the tag of an existing
//     entry with zero (the slice's update is then no longer live) and does not
//     allocate. Keeping the zero-tag entry matters: at merge, "no entry" means
//     the update is live while "entry without the slice's bit" means it is not.
//   * When an allocation finds the set full, a victim is chosen round-robin per
//     set and its tag is reported on evict_tag so those slices can stop being
//     trusted. Associativity, indexing and replacement are not given by the
//     source and are this design's choice (4 ways, word-address index).
module tag_cache
  import reslice_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned N_LK    = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  word_t     lk_addr [N_LK],
  output logic      lk_hit  [N_LK],
  output slicetag_t lk_tag  [N_LK],
  input  logic      up_valid,
  input  word_t     up_addr,
  input  slicetag_t up_tag,
  output logic      evict_valid,
  output slicetag_t evict_tag
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef struct packed {
    logic      valid;
    word_t     addr;
    slicetag_t tag;
  } tc_entry_t;

  tc_entry_t        mem  [SETS][WAYS];
  logic [WAY_W-1:0] rr   [SETS];

  function automatic logic [SET_W-1:0] set_of(word_t a);
    return (SETS > 1) ? SET_W'(a[2 +: SET_W]) : '0;
  endfunction

  always_comb begin
    for (int p = 0; p < N_LK; p++) begin
      lk_hit[p] = 1'b0;
      lk_tag[p] = '0;
      for (int w = 0; w < WAYS; w++) begin
        if (mem[set_of(lk_addr[p])][w].valid && mem[set_of(lk_addr[p])][w].addr == lk_addr[p]) begin
          lk_hit[p] = 1'b1;
          lk_tag[p] = mem[set_of(lk_addr[p])][w].tag;
        end
      end
    end
  end

  logic             up_hit, up_has_free;
  logic [WAY_W-1:0] up_way, free_way;
  logic [SET_W-1:0] up_set;

  always_comb begin
    up_set      = set_of(up_addr);
    up_hit      = 1'b0;
    up_way      = '0;
    up_has_free = 1'b0;
    free_way    = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (mem[up_set][w].valid && mem[up_set][w].addr == up_addr) begin
        up_hit = 1'b1;
        up_way = WAY_W'(w);
      end
      if (!mem[up_set][w].valid) begin
        up_has_free = 1'b1;
        free_way    = WAY_W'(w);
      end
    end
    evict_valid = up_valid && !up_hit && (|up_tag) && !up_has_free;
    evict_tag   = evict_valid ? mem[up_set][rr[up_set]].tag : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) mem[s][w] <= '0;
      end
    end else if (clear) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) mem[s][w].valid <= 1'b0;
    end else if (up_valid) begin
      if (up_hit) begin
        mem[up_set][up_way].tag <= up_tag;
      end else if (|up_tag) begin
        if (up_has_free) begin
          mem[up_set][free_way] <= '{valid: 1'b1, addr: up_addr, tag: up_tag};
        end else begin
          mem[up_set][rr[up_set]] <= '{valid: 1'b1, addr: up_addr, tag: up_tag};
          rr[up_set] <= (32'(rr[up_set]) == WAYS - 1) ? '0 : rr[up_set] + 1'b1;
        end
      end
    end
  end

endmodule
