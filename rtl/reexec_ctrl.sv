// reexec_ctrl: what happens at the Resolution Point.
//
// Keeps, per slice, the seed value the slice was last executed with (the
// value the seed used when it retired, then the value of each re-execution).
// When the correct seed value of a slice becomes known (rs_valid):
//   * equal to the kept value: the prediction was right, nothing is done;
//   * different: a misprediction. If the slice is buffered and usable, the
//     slices to replay are chosen: the slice itself and, if its Overlap bit is
//     set, every other slice with the Overlap bit that has already been
//     re-executed in this task (their SLIF live-ins may be stale). If more than
//     MAX_CONC (3) slices would have to run together, or a slice is not
//     usable, the task is squashed and rolls back to its checkpoint. Otherwise
//     the pipeline is stalled (stall) and the REU is started; its result
//     either resumes the task at the Resolution Point or squashes it.
// Outputs squash and resume are one-cycle pulses; squash_reason says why.
// The counters (cnt_*) count each outcome since reset. The choice of the
// comparison value and the counters are this design's own.
module reexec_ctrl
  import reslice_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  // seed retirement: value used by the seed
  input  logic      sv_valid,
  input  slicetag_t sv_id,
  input  word_t     sv_value,
  // resolution
  input  logic      rs_valid,
  input  slicetag_t rs_id,
  input  word_t     rs_value,
  output logic      rs_ready,
  // slice buffer state
  input  slicetag_t sd_valid,
  input  slicetag_t sd_ok,
  input  slicetag_t sd_overlap,
  // REU
  output logic      reu_start,
  output slicetag_t reu_mask,
  output word_t     seed_val [N_SLICES],
  input  logic      reu_done,
  input  logic      reu_ok,
  input  fail_e     reu_fail,
  // to the core
  output logic      stall,
  output logic      squash,
  output logic      resume,
  output fail_e     squash_reason,
  output slicetag_t reexecuted,
  output logic [15:0] cnt_correct,
  output logic [15:0] cnt_reexec,
  output logic [15:0] cnt_concurrent,
  output logic [15:0] cnt_salvaged,
  output logic [15:0] cnt_squash
);

  typedef enum logic [1:0] {C_IDLE, C_START, C_WAIT} cstate_e;
  cstate_e   st;
  slicetag_t cand, sel;
  logic      usable, mispred;

  always_comb begin
    cand    = (sd_overlap & rs_id) != '0 ? (sd_overlap & reexecuted & sd_valid) | rs_id : rs_id;
    usable  = ((cand & ~(sd_valid & sd_ok)) == '0) && ($countones(cand) <= MAX_CONC);
    // compare with the value the resolved slice was last executed with
    mispred = 1'b0;
    for (int k = 0; k < N_SLICES; k++)
      if (rs_id[k]) mispred = rs_valid && rs_value != seed_val[k];
    sel      = cand;
    rs_ready = (st == C_IDLE);
    stall    = (st != C_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE;
      reu_start <= 1'b0; reu_mask <= '0;
      squash <= 1'b0; resume <= 1'b0; squash_reason <= FAIL_NONE;
      reexecuted <= '0;
      cnt_correct <= '0; cnt_reexec <= '0; cnt_concurrent <= '0;
      cnt_salvaged <= '0; cnt_squash <= '0;
      for (int k = 0; k < N_SLICES; k++) seed_val[k] <= '0;
    end else begin
      squash    <= 1'b0;
      resume    <= 1'b0;
      reu_start <= 1'b0;
      if (clear) reexecuted <= '0;
      if (sv_valid)
        for (int k = 0; k < N_SLICES; k++) if (sv_id[k]) seed_val[k] <= sv_value;
      unique case (st)
        C_IDLE: if (rs_valid && !clear) begin
          if (!mispred) begin
            cnt_correct <= cnt_correct + 1'b1;
          end else if (!usable) begin
            squash        <= 1'b1;
            squash_reason <= FAIL_NOSLICE;
            cnt_squash    <= cnt_squash + 1'b1;
          end else begin
            for (int k = 0; k < N_SLICES; k++) if (rs_id[k]) seed_val[k] <= rs_value;
            reu_mask   <= sel;
            reu_start  <= 1'b1;
            cnt_reexec <= cnt_reexec + 1'b1;
            if ($countones(sel) > 1) cnt_concurrent <= cnt_concurrent + 1'b1;
            st <= C_START;
          end
        end
        C_START: st <= C_WAIT;
        C_WAIT: if (reu_done) begin
          st <= C_IDLE;
          if (reu_ok) begin
            resume       <= 1'b1;
            reexecuted   <= reexecuted | reu_mask;
            cnt_salvaged <= cnt_salvaged + 1'b1;
          end else begin
            squash        <= 1'b1;
            squash_reason <= reu_fail;
            cnt_squash    <= cnt_squash + 1'b1;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
