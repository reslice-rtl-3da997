// slice_id_alloc: hands out slice IDs to seed instructions.
//
// A slice ID is a one-hot vector with as many bits as slices that can be
// buffered at once. When a seed is renamed it receives the lowest-numbered ID
// that is not in use. IDs are returned one by one when a seed is squashed
// before it retires, and all at once when the task ends (clear). Which free ID
// is chosen, and when IDs are returned, is this design's own choice.
//
// Timing: alloc_id/alloc_ok are combinational from the busy set; the ID is
// marked busy at the clock edge on which alloc_req is high and alloc_ok is set.
module slice_id_alloc
  import reslice_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,       // end of task: all IDs become free
  input  logic      alloc_req,   // a seed is being renamed
  output logic      alloc_ok,    // a free ID exists
  output slicetag_t alloc_id,    // one-hot ID (zero if none free)
  input  logic      free_valid,  // return IDs of squashed seeds
  input  slicetag_t free_mask,
  output slicetag_t busy         // IDs in use
);

  always_comb begin
    alloc_id = '0;
    for (int i = N_SLICES - 1; i >= 0; i--)
      if (!busy[i]) alloc_id = slicetag_t'(1) << i;
    alloc_ok = |alloc_id;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          busy <= '0;
    else if (clear)      busy <= '0;
    else begin
      busy <= (busy | ((alloc_req && alloc_ok) ? alloc_id : '0))
                    & ~(free_valid ? free_mask : '0);
    end
  end

endmodule
