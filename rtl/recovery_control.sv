// recovery_control: Recovery StateId (RecStId) generation.
//
// Branch mis-prediction: the StateId of the mis-predicted branch becomes the
// Recovery StateId at once; every state younger than it is discarded.
//
// Exception: an exception reported at write-back is not taken at once,
// since an older instruction may still raise one. The oldest reported
// exception is kept pending; while it is pending 'block' stalls renaming and
// issue_limit_* tells the issue logic to issue only instructions with a
// smaller StateId. The exception is taken once every older state has
// committed, i.e. the unclamped LCS has reached its StateId. Its Recovery
// StateId is its own StateId, or the one before if the excepting instruction
// opened a new state (exc_new_state). Until then hold_* keeps the LCS from
// passing that recovery point. hold_* also clamps the LCS to the StateId of
// a branch being reported and to a Recovery StateId being broadcast: states
// on the wrong path may already be complete, and the LCS must not pass the
// recovery point before the discarded states are gone, or the entry holding
// the recovered mapping could be released in the recovery cycle. A branch recovery to an older state drops a
// pending exception that lies on the discarded path; if both happen in the
// same cycle the older recovery point wins.
//
// rec_valid/rec_sid are registered: a recovery is broadcast to the SCTs,
// the StateId counter and the rest of the pipeline for one cycle, the cycle
// after the event. exc_taken marks a recovery caused by an exception (the
// front end then restarts at the handler). On sb_clear the saturation bit
// of the held StateIds is cleared. Synchronous reset.
//
// The recovery points and the in-order taking of exceptions follow the
// published design; the single branch port, the LCS condition used to decide
// that the exception is the oldest, and the clamp are this design's own.
module recovery_control #(
  parameter int unsigned SID_W = msp_pkg::SID_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             br_valid,
  input  logic [SID_W-1:0] br_sid,
  input  logic             exc_valid,
  input  logic [SID_W-1:0] exc_sid,
  input  logic             exc_new_state,
  input  logic [SID_W-1:0] lcs_raw,
  input  logic             sb_clear,
  output logic             rec_valid,
  output logic [SID_W-1:0] rec_sid,
  output logic             exc_taken,
  output logic             block,
  output logic             hold_valid,
  output logic [SID_W-1:0] hold_sid,
  output logic             issue_limit_valid,
  output logic [SID_W-1:0] issue_limit_sid
);

  logic             pend_q, rec_q, taken_q;
  logic [SID_W-1:0] pend_sid_q, pend_tgt_q, rec_sid_q;

  logic             take_exc, br_wins;
  logic             pend_n, rec_n, taken_n;
  logic [SID_W-1:0] pend_sid_n, pend_tgt_n, rec_sid_n;

  function automatic logic [SID_W-1:0] clr_sb(input logic [SID_W-1:0] v, input logic en);
    return en ? {1'b0, v[SID_W-2:0]} : v;
  endfunction

  always_comb begin
    pend_n     = pend_q;
    pend_sid_n = pend_sid_q;
    pend_tgt_n = pend_tgt_q;
    // a newly reported exception replaces a younger pending one
    if (exc_valid && (!pend_q || exc_sid < pend_sid_q)) begin
      pend_n     = 1'b1;
      pend_sid_n = exc_sid;
      pend_tgt_n = exc_new_state ? exc_sid - 1'b1 : exc_sid;
    end
    take_exc = pend_q && (lcs_raw >= pend_sid_q);
    br_wins  = br_valid && (!take_exc || br_sid < pend_tgt_q);
    rec_n     = 1'b0;
    rec_sid_n = '0;
    taken_n   = 1'b0;
    if (br_wins) begin
      rec_n     = 1'b1;
      rec_sid_n = br_sid;
      if (pend_n && pend_sid_n > br_sid) pend_n = 1'b0;
    end else if (take_exc) begin
      rec_n     = 1'b1;
      rec_sid_n = pend_tgt_q;
      taken_n   = 1'b1;
      pend_n    = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_q     <= 1'b0;
      pend_sid_q <= '0;
      pend_tgt_q <= '0;
      rec_q      <= 1'b0;
      rec_sid_q  <= '0;
      taken_q    <= 1'b0;
    end else begin
      pend_q     <= pend_n;
      pend_sid_q <= clr_sb(pend_sid_n, sb_clear);
      pend_tgt_q <= clr_sb(pend_tgt_n, sb_clear);
      rec_q      <= rec_n;
      rec_sid_q  <= clr_sb(rec_sid_n, sb_clear);
      taken_q    <= taken_n;
    end
  end

  assign rec_valid         = rec_q;
  assign rec_sid           = rec_sid_q;
  assign exc_taken         = taken_q;
  assign block             = pend_q;
  // LCS clamp: the pending exception's recovery point, a branch being
  // reported and a recovery being broadcast; the smallest active one wins.
  always_comb begin
    hold_valid = pend_q;
    hold_sid   = pend_tgt_q;
    if (br_valid && (!hold_valid || br_sid < hold_sid)) begin
      hold_valid = 1'b1;
      hold_sid   = br_sid;
    end
    if (rec_q && (!hold_valid || rec_sid_q < hold_sid)) begin
      hold_valid = 1'b1;
      hold_sid   = rec_sid_q;
    end
  end
  assign issue_limit_valid = pend_q;
  assign issue_limit_sid   = pend_sid_q;

endmodule
