// lsq_pkg: shared sizes, types and helpers of the split load-store queue.
//
// The load queue of this design is split into a small Associative Load Queue
// (ALQ) and a Banked Non-associative Load Queue (BNLQ); loads predicted not to
// talk to in-flight stores go to the BNLQ and are policed by the Exclusive
// Bloom Filter (EBF). The default sizes are those of the main configuration:
// BNLQ 48, ALQ 32, SQ 48, a 4001-entry EBF of 4-bit counters and a predictor
// refresh period of 100,000 cycles. Address, data, PC and sequence-number
// widths, the predictor size and the BNLQ bank count are this design's own
// choices.
//
// Program order is carried by a sequence number (seq) supplied by the core.
// Seq numbers wrap; two seqs are compared by the sign of their difference, so
// the core must keep fewer than 2**(SEQ_W-1) instructions in flight.
package lsq_pkg;

  // ---------------- default sizes ----------------
  localparam int unsigned BNLQ_DEPTH_D   = 48;      // main configuration
  localparam int unsigned ALQ_DEPTH_D    = 32;      // main configuration
  localparam int unsigned SQ_DEPTH_D     = 48;      // store queue
  localparam int unsigned EBF_SIZE_D     = 4001;    // prime, hash = addr % size
  localparam int unsigned EBF_CW_D       = 4;       // bits per EBF counter
  localparam int unsigned BNLQ_BANKS_D   = 4;       // own choice
  localparam int unsigned PRED_ENTRIES_D = 1024;    // own choice
  localparam int unsigned REFRESH_D      = 100_000; // cycles between refreshes

  localparam int unsigned ADDR_W = 32;  // word address (all accesses full words)
  localparam int unsigned DATA_W = 64;
  localparam int unsigned PC_W   = 32;
  localparam int unsigned SEQ_W  = 10;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [SEQ_W-1:0]  seq_t;

  // Which structure holds a memory instruction.
  typedef enum logic [1:0] {
    Q_NONE = 2'd0,
    Q_ALQ  = 2'd1,
    Q_BNLQ = 2'd2,
    Q_SQ   = 2'd3
  } queue_e;

  // One-cycle event pulses brought out of the top for statistics.
  typedef struct packed {
    logic forward;        // an ALQ load took its data from the SQ
    logic alq_violation;  // an executing store found a premature ALQ load
    logic upgrade;        // independent load placed in the ALQ (BNLQ full)
    logic alq_full_stall; // dispatch stalled: ALQ full for a dependent load
    logic ebf_reject;     // BNLQ load issue refused: EBF counter saturated
    logic ebf_bypass;     // saturated counter but oldest memory op: issued unfiltered
    logic ebf_hit;        // committing store found a nonzero EBF counter
    logic search_true;    // BNLQ search found an address match (squash)
    logic search_false;   // BNLQ search ended without a match (squash avoided)
    logic search_stall;   // store commit held: EBF hit while a search runs
    logic commit_block;   // BNLQ load commit held: not yet searched
    logic flush_walk;     // a flush-walk step decremented the EBF
    logic refresh;        // predictor table reset to "independent"
    logic train;          // predictor entry set to "dependent"
    logic ebf_squash;     // option A: EBF hit squashed everything after the store
    logic dpu_train;      // option A: DPU mode found a load that matches the hit
  } lsq_events_t;

  // a is older than b
  function automatic logic seq_older(seq_t a, seq_t b);
    seq_t d;
    d = a - b;
    return d[SEQ_W-1];
  endfunction

endpackage
