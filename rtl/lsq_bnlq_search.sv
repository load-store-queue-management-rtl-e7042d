// lsq_bnlq_search: background BNLQ search that filters false EBF hits.
//
// When a committing store finds a nonzero EBF counter, some BNLQ load with the
// same hash has issued, but the hit may be false (a different address with the
// same hash). Instead of squashing at once, this engine walks the BNLQ from its
// oldest load forward, reading BANKS consecutive entries per cycle (one per
// bank), and compares each issued load's address with the store's.
//
//  * On start it records the store address and snapshots which entries are
//    live and issued: only those loads may have read memory before the store
//    was written. Loads issued later read the updated memory and are not
//    checked.
//  * Each cycle the BANKS entries at the read pointer are checked and their
//    pending bits cleared. The first match in program order ends the search
//    with `found`, giving that load's seq (squash it and all younger
//    instructions) and PC (train the predictor to "dependent").
//  * When no pending entry is left the search ends with `no_match`: the hit
//    was false and nothing is squashed.
//
// Normal operation continues meanwhile. Two rules are enforced through the
// outputs: head_blocked stops a BNLQ load from committing while it is still
// pending, and busy stops a second search (the caller holds the next store
// commit that hits). A search takes at most ceil(DEPTH/BANKS) cycles plus one.
// The read bandwidth of one entry per bank per cycle follows the design
// description; the snapshot of issued loads is this design's choice.
module lsq_bnlq_search
  import lsq_pkg::*;
#(
  parameter int unsigned DEPTH = BNLQ_DEPTH_D,
  parameter int unsigned BANKS = BNLQ_BANKS_D,
  localparam int unsigned IW = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_valid,
  input  addr_t             start_addr,
  input  logic [IW-1:0]     head_idx,
  input  logic [DEPTH-1:0]  live_vec,
  input  logic [DEPTH-1:0]  issued_vec,
  // banked read port of the BNLQ
  output logic [IW-1:0]     rd_base,
  input  logic [IW-1:0]     rd_idx  [BANKS],
  input  addr_t             rd_addr [BANKS],
  input  seq_t              rd_seq  [BANKS],
  input  pc_t               rd_pc   [BANKS],
  // status
  output logic              busy,
  output logic              head_blocked,
  output logic              found,
  output seq_t              found_seq,
  output pc_t               found_pc,
  output logic              no_match
);

  logic             busy_q;
  addr_t            addr_q;
  logic [IW-1:0]    ptr_q;
  logic [DEPTH-1:0] pend_q, pend_live, pend_next;

  function automatic logic [IW-1:0] wrap(logic [IW:0] x);
    return (x >= (IW+1)'(DEPTH)) ? IW'(x - (IW+1)'(DEPTH)) : x[IW-1:0];
  endfunction

  assign rd_base      = ptr_q;
  assign busy         = busy_q;
  assign pend_live    = pend_q & live_vec;
  assign head_blocked = busy_q && pend_live[head_idx];

  always_comb begin
    found     = 1'b0;
    found_seq = '0;
    found_pc  = '0;
    pend_next = pend_live;
    if (busy_q) begin
      for (int b = 0; b < int'(BANKS); b++) begin
        if (!found && pend_live[rd_idx[b]] && rd_addr[b] == addr_q) begin
          found     = 1'b1;
          found_seq = rd_seq[b];
          found_pc  = rd_pc[b];
        end
        pend_next[rd_idx[b]] = 1'b0;
      end
    end
    no_match = busy_q && !found && (pend_next == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      addr_q <= '0;
      ptr_q  <= '0;
      pend_q <= '0;
    end else if (busy_q) begin
      ptr_q  <= wrap({1'b0, ptr_q} + (IW+1)'(BANKS));
      pend_q <= found ? '0 : pend_next;
      busy_q <= !(found || no_match);
    end else if (start_valid) begin
      busy_q <= 1'b1;
      addr_q <= start_addr;
      ptr_q  <= head_idx;
      pend_q <= live_vec & issued_vec;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start_valid |-> !busy_q)
    else $error("BNLQ search started while busy");

endmodule
