// lsq_dpu: dependence-predictor-update (DPU) mode controller, used when EBF
// hits are handled by squashing at once (OPTION_B = 0 in lsq_top).
//
// Without the background search, a store that hits in the EBF squashes every
// younger instruction but cannot tell which BNLQ load caused the hit. The DPU
// mode finds out after the fact: at the hit it saves the EBF index of the store
// and the counter value at that moment in two registers. While the mode is
// active, every BNLQ load that commits has its own EBF index compared with the
// saved one; on a match the predictor entry of that load's PC is set to
// "dependent" (train_valid, combinational in the commit cycle; the caller
// trains with the committing load's own PC, which it already has). The
// mode ends when the number of matching loads reaches the saved count, or
// after TIMEOUT cycles, since the re-executed path may never bring the same
// loads back.
//
// A new hit while the mode is active restarts it with the new index and count.
// The saved index and count registers, the match rule and the two end
// conditions follow the design description; the time-out length and the
// restart rule are this design's choices.
module lsq_dpu
  import lsq_pkg::*;
#(
  parameter int unsigned SIZE    = EBF_SIZE_D,
  parameter int unsigned CW      = EBF_CW_D,
  parameter int unsigned TIMEOUT = 1024,
  localparam int unsigned IW  = $clog2(SIZE),
  localparam int unsigned TW  = $clog2(TIMEOUT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // EBF hit at store commit
  input  logic          start_valid,
  input  logic [IW-1:0] start_idx,
  input  logic [CW-1:0] start_cnt,
  // BNLQ load commit
  input  logic          cm_valid,
  input  addr_t         cm_addr,
  // predictor update
  output logic          train_valid,
  output logic          active,
  output logic          timed_out
);

  logic          active_q;
  logic [IW-1:0] idx_q;
  logic [CW-1:0] left_q;    // matches still expected
  logic [TW-1:0] timer_q;

  function automatic logic [IW-1:0] hash(addr_t a);
    addr_t r;
    r = a % ADDR_W'(SIZE);
    return r[IW-1:0];
  endfunction

  assign active      = active_q;
  assign train_valid = active_q && cm_valid && hash(cm_addr) == idx_q;
  assign timed_out   = active_q && timer_q == TW'(TIMEOUT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      idx_q    <= '0;
      left_q   <= '0;
      timer_q  <= '0;
    end else if (start_valid) begin
      active_q <= (start_cnt != '0);
      idx_q    <= start_idx;
      left_q   <= start_cnt;
      timer_q  <= '0;
    end else if (active_q) begin
      timer_q <= timer_q + 1'b1;
      if (train_valid) left_q <= left_q - 1'b1;
      if ((train_valid && left_q == CW'(1)) || timed_out) active_q <= 1'b0;
    end
  end

endmodule
