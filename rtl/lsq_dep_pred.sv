// lsq_dep_pred: PC-indexed load dependence predictor with periodic refresh.
//
// One bit per entry: 0 = "independent" (the load goes to the BNLQ), 1 =
// "dependent" (it goes to the ALQ). Every entry starts independent. An entry is
// set to dependent when a load of that PC is found to have read memory ahead of
// an older store to the same address. Every REFRESH cycles the whole table is
// put back to independent, so that loads that only rarely meet a store get a
// new chance at the cheap queue. REFRESH = 0 gives the other policy: no
// refresh, so an entry once trained stays dependent until reset.
//
// Interface: rd_pc -> rd_dep is a combinational lookup for dispatch;
// train_valid/train_pc sets an entry at the next clock edge; refresh pulses for
// the cycle in which the table is cleared (a training request in that same
// cycle is kept). The 1-bit entries, the reset-to-independent refresh and the
// 100,000-cycle period follow the design description; the table size (1024)
// and the index (PC bits above the 4-byte instruction offset) are this design's
// choices.
module lsq_dep_pred
  import lsq_pkg::*;
#(
  parameter int unsigned ENTRIES = PRED_ENTRIES_D,
  parameter int unsigned REFRESH = REFRESH_D,
  localparam int unsigned IW = $clog2(ENTRIES),
  localparam int unsigned CW = (REFRESH > 1) ? $clog2(REFRESH + 1) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  pc_t  rd_pc,
  output logic rd_dep,
  input  logic train_valid,
  input  pc_t  train_pc,
  output logic refresh
);

  logic [ENTRIES-1:0] dep_q;
  logic [CW-1:0]      tick_q;

  function automatic logic [IW-1:0] idx(pc_t pc);
    return pc[IW+1:2];
  endfunction

  assign rd_dep  = dep_q[idx(rd_pc)];
  assign refresh = (REFRESH != 0) && (tick_q == CW'(REFRESH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dep_q  <= '0;
      tick_q <= '0;
    end else begin
      tick_q <= (refresh || REFRESH == 0) ? '0 : tick_q + 1'b1;
      if (refresh) dep_q <= '0;
      if (train_valid) dep_q[idx(train_pc)] <= 1'b1;
    end
  end

endmodule
