// undo_log: values overwritten by the first slice update of each location.
//
// When a store that belongs to one or more slices retires, the word it
// overwrites is logged if this is the first update of that address by those
// slices. An entry is 80 bits of payload: word address, old value and the
// SliceTag of the slices whose first update it records, plus two flags:
//   multi  - a later store of one of those slices wrote the same address again
//            (the log then no longer holds the right pre-slice value for a
//            second update, so an undo of this address must abort), and
//   undone - the entry has already been used to undo an update in this task
//            (a second undo of the same address must abort),
//   chained- the logged word was itself a live update of another slice (the
//            Tag Cache had a non-zero SliceTag for it). If that other slice is
//            re-executed, the logged word is stale, so an undo from such an
//            entry must abort. This flag is this design's addition: the
//            source's merge condition is stated for one slice at a time.
// Both conditions come from the source's merge correctness condition; the
// entry layout and the flags are this design's way of checking them.
//
// Record: one store per cycle; slices that already have an entry for the
// address set its multi flag, the remaining slices get a new entry. When the
// log is full, overflow_tag names the slices that could not be logged.
// Lookup (combinational): the entry for an address whose tag meets a slice
// mask. mark_undone sets the undone flag of the looked-up entry.
module undo_log
  import reslice_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      rec_valid,
  input  word_t     rec_addr,
  input  word_t     rec_old,
  input  slicetag_t rec_tag,
  input  slicetag_t rec_prev_tag,   // Tag Cache SliceTag of the address before this store
  output slicetag_t overflow_tag,
  input  word_t     lk_addr,
  input  slicetag_t lk_mask,
  output logic      lk_hit,
  output word_t     lk_data,
  output logic      lk_multi,
  output logic      lk_undone,
  output logic      lk_chained,
  input  logic      mark_undone
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef struct packed {
    logic      valid;
    logic      multi;
    logic      undone;
    logic      chained;
    word_t     addr;
    word_t     data;
    slicetag_t tag;
  } ul_entry_t;

  ul_entry_t        mem [ENTRIES];
  logic [IDX_W-1:0] lk_idx, free_idx;
  logic             has_free;
  slicetag_t        logged, new_tag;
  logic [ENTRIES-1:0] rec_match;

  always_comb begin
    lk_hit    = 1'b0;
    lk_idx    = '0;
    lk_data   = '0;
    lk_multi  = 1'b0;
    lk_undone = 1'b0;
    lk_chained = 1'b0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (mem[i].valid && mem[i].addr == lk_addr && |(mem[i].tag & lk_mask)) begin
        lk_hit    = 1'b1;
        lk_idx    = IDX_W'(i);
        lk_data   = mem[i].data;
        lk_multi  = mem[i].multi;
        lk_undone = mem[i].undone;
        lk_chained = mem[i].chained;
      end
    end
    logged   = '0;
    has_free = 1'b0;
    free_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      rec_match[i] = mem[i].valid && mem[i].addr == rec_addr && |(mem[i].tag & rec_tag);
      if (rec_match[i]) logged = logged | (mem[i].tag & rec_tag);
      if (!mem[i].valid) begin
        has_free = 1'b1;
        free_idx = IDX_W'(i);
      end
    end
    new_tag      = rec_tag & ~logged;
    overflow_tag = (rec_valid && |new_tag && !has_free) ? new_tag : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) mem[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < ENTRIES; i++) mem[i].valid <= 1'b0;
    end else begin
      if (rec_valid) begin
        for (int i = 0; i < ENTRIES; i++)
          if (rec_match[i]) mem[i].multi <= 1'b1;
        if (|new_tag && has_free)
          mem[free_idx] <= '{valid: 1'b1, multi: 1'b0, undone: 1'b0,
                             chained: |rec_prev_tag, addr: rec_addr, data: rec_old, tag: new_tag};
      end
      if (mark_undone && lk_hit) mem[lk_idx].undone <= 1'b1;
    end
  end

endmodule
