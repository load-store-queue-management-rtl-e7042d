// lsq_steer: dispatch steering of memory instructions between the queues.
//
// Purely combinational. A store goes to the SQ, or stalls dispatch when the SQ
// is full. A load predicted dependent goes to the ALQ, or stalls dispatch when
// the ALQ is full (it is never placed in the BNLQ, where it would very likely
// cause a squash). A load predicted independent goes to the BNLQ; when the BNLQ
// cannot take it, it is "upgraded" to the ALQ rather than stalling, and stalls
// only when both are unavailable.
//
// bnlq_avail is low when the BNLQ is full or busy walking out flushed entries
// (treating the walk like a full BNLQ is this design's choice). The rules above
// follow the design description.
module lsq_steer
  import lsq_pkg::*;
(
  input  logic   valid,
  input  logic   is_store,
  input  logic   pred_dep,
  input  logic   sq_full,
  input  logic   alq_full,
  input  logic   bnlq_avail,
  output queue_e target,     // Q_NONE when dispatch must stall
  output logic   ready,
  output logic   upgrade,    // independent load sent to the ALQ
  output logic   alq_stall   // load stalled because the ALQ is full
);

  always_comb begin
    target    = Q_NONE;
    upgrade   = 1'b0;
    alq_stall = 1'b0;
    if (valid) begin
      if (is_store) begin
        if (!sq_full) target = Q_SQ;
      end else if (pred_dep) begin
        if (!alq_full) target = Q_ALQ;
        else           alq_stall = 1'b1;
      end else if (bnlq_avail) begin
        target = Q_BNLQ;
      end else if (!alq_full) begin
        target  = Q_ALQ;
        upgrade = 1'b1;
      end else begin
        alq_stall = 1'b1;
      end
    end
    ready = (target != Q_NONE);
  end

endmodule
