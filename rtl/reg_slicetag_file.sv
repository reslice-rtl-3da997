// reg_slicetag_file: SliceTags kept beside the physical register file.
//
// One SliceTag per physical register. At operand read the tags of the two
// sources are read (ports a and b); when an instruction writes its destination
// the tag computed by slicetag_logic is written with it (a non-slice
// instruction writes zero, which kills the liveness of an earlier slice value).
// During state merging the re-execution unit reads the tag of the physical
// register currently mapped to an architectural register (port m) to see
// whether the slice's update is still live.
//
// Reads are combinational; the write takes effect at the clock edge. Reset and
// clear set all tags to zero. The number of physical registers follows the
// evaluated core (90 integer registers).
module reg_slicetag_file
  import reslice_pkg::*;
#(
  parameter int unsigned N_PREGS = 90
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic [$clog2(N_PREGS)-1:0] ra_idx,
  output slicetag_t                  ra_tag,
  input  logic [$clog2(N_PREGS)-1:0] rb_idx,
  output slicetag_t                  rb_tag,
  input  logic [$clog2(N_PREGS)-1:0] rm_idx,
  output slicetag_t                  rm_tag,
  input  logic                       we,
  input  logic [$clog2(N_PREGS)-1:0] w_idx,
  input  slicetag_t                  w_tag
);

  slicetag_t tags [N_PREGS];

  assign ra_tag = (32'(ra_idx) < N_PREGS) ? tags[ra_idx] : '0;
  assign rb_tag = (32'(rb_idx) < N_PREGS) ? tags[rb_idx] : '0;
  assign rm_tag = (32'(rm_idx) < N_PREGS) ? tags[rm_idx] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_PREGS; i++) tags[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < N_PREGS; i++) tags[i] <= '0;
    end else if (we && 32'(w_idx) < N_PREGS) begin
      tags[w_idx] <= w_tag;
    end
  end

endmodule
