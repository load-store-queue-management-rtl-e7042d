// lsq_sq: store queue with associative store-to-load forwarding.
//
// A circular FIFO of DEPTH stores in program order. A store is allocated at
// dispatch, gets its address and data when it executes, and leaves from the
// head when it commits (the caller then writes it to the data cache).
//
// Forwarding search (combinational): a load of the ALQ presents its seq and
// address; every resolved store that is older than the load and has the same
// word address matches, and the youngest of them (nearest in program order,
// found by a priority encoder over the distance from the head) supplies the
// data. Loads of the BNLQ never search the SQ.
//
// Flush: flush_seq removes every store not older than flush_seq; the tail is
// moved back to head + (number of older stores). An allocation in a flush cycle
// is ignored. All other updates take effect at the next clock edge.
// Word-granular matching (no partial overlaps) is this design's choice.
module lsq_sq
  import lsq_pkg::*;
#(
  parameter int unsigned DEPTH = SQ_DEPTH_D,
  localparam int unsigned IW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // dispatch
  input  logic          alloc_valid,
  input  seq_t          alloc_seq,
  output logic [IW-1:0] alloc_idx,
  output logic          full,
  output logic          empty,
  // execute: address and data become known
  input  logic          ex_valid,
  input  logic [IW-1:0] ex_idx,
  input  addr_t         ex_addr,
  input  data_t         ex_data,
  output seq_t          ex_seq,
  // forwarding search for an executing load
  input  seq_t          fwd_seq,
  input  addr_t         fwd_addr,
  output logic          fwd_hit,
  output data_t         fwd_data,
  // commit
  input  logic          commit_valid,
  output seq_t          head_seq,
  output addr_t         head_addr,
  output data_t         head_data,
  output logic          head_resolved,
  // flush
  input  logic          flush_valid,
  input  seq_t          flush_seq
);

  typedef struct packed {
    logic  valid;
    logic  resolved;
    seq_t  seq;
    addr_t addr;
    data_t data;
  } sq_entry_t;

  sq_entry_t      q [DEPTH];
  logic [IW-1:0]  head_q, tail_q;
  logic [IW:0]    cnt_q;

  function automatic logic [IW-1:0] wrap(logic [IW:0] x);
    return (x >= (IW+1)'(DEPTH)) ? IW'(x - (IW+1)'(DEPTH)) : x[IW-1:0];
  endfunction

  assign full          = (cnt_q == (IW+1)'(DEPTH));
  assign empty         = (cnt_q == '0);
  assign alloc_idx     = tail_q;
  assign ex_seq        = q[ex_idx].seq;
  assign head_seq      = q[head_q].seq;
  assign head_addr     = q[head_q].addr;
  assign head_data     = q[head_q].data;
  assign head_resolved = q[head_q].resolved;

  // Youngest older matching store.
  always_comb begin
    logic [IW:0] best_pos, pos;
    fwd_hit  = 1'b0;
    fwd_data = '0;
    best_pos = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      pos = (i >= int'(head_q)) ? (IW+1)'(i - int'(head_q)) : (IW+1)'(i + int'(DEPTH) - int'(head_q));
      if (q[i].valid && q[i].resolved && q[i].addr == fwd_addr &&
          seq_older(q[i].seq, fwd_seq) && (!fwd_hit || pos > best_pos)) begin
        fwd_hit  = 1'b1;
        fwd_data = q[i].data;
        best_pos = pos;
      end
    end
  end

  // Stores that survive a flush.
  logic [IW:0] n_keep;
  always_comb begin
    n_keep = '0;
    for (int i = 0; i < int'(DEPTH); i++)
      if (q[i].valid && seq_older(q[i].seq, flush_seq)) n_keep = n_keep + 1'b1;
  end

  logic do_alloc;
  assign do_alloc = alloc_valid && !full && !flush_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else begin
      if (ex_valid) begin
        q[ex_idx].resolved <= 1'b1;
        q[ex_idx].addr     <= ex_addr;
        q[ex_idx].data     <= ex_data;
      end
      if (do_alloc) begin
        q[tail_q] <= '{valid: 1'b1, resolved: 1'b0, seq: alloc_seq, addr: '0, data: '0};
      end
      if (flush_valid) begin
        for (int i = 0; i < int'(DEPTH); i++)
          if (!seq_older(q[i].seq, flush_seq)) q[i].valid <= 1'b0;
        tail_q <= wrap({1'b0, head_q} + n_keep);
      end else if (do_alloc) begin
        tail_q <= wrap({1'b0, tail_q} + 1'b1);
      end
      if (commit_valid && !empty) begin
        q[head_q].valid <= 1'b0;
        head_q <= wrap({1'b0, head_q} + 1'b1);
      end
      cnt_q <= (flush_valid ? n_keep : cnt_q + (IW+1)'(do_alloc))
               - (IW+1)'(commit_valid && !empty);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) commit_valid |-> !empty)
    else $error("SQ commit while empty");

endmodule
