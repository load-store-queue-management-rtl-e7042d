// lsq_bnlq: Banked Non-associative Load Queue (BNLQ).
//
// A circular FIFO of DEPTH loads in program order, like a reorder buffer, for
// loads predicted independent. It has no associative search: a BNLQ load does
// not search the SQ when it issues and stores do not search the BNLQ. Instead
// each issued load is counted in the Exclusive Bloom Filter (outside), and the
// BNLQ keeps per entry whether it was counted so that the count can be undone.
//
// Storage is split into BANKS banks by entry index (entry i lives in bank
// i % BANKS), purely to save energy; consecutive entries sit in different banks,
// so the background search reads BANKS consecutive entries per cycle, one per
// bank, through the rd_* port.
//
// Flush: flush_seq marks every entry not older than it dead at once. The dead
// entries are then walked out from the tail, one per cycle: for each one that
// was counted, walk_dec_valid asks the EBF to decrement the counter of its
// address. While walking, `avail` is low and no load is allocated here.
//
// Commit pops the head; the caller decrements the EBF with head_addr when
// head_counted is set, and must hold commit while the search still has to
// check the head. Updates take effect at the next clock edge. The bank count,
// the one-entry-per-cycle walk and the stall during the walk are this design's
// choices; the walk itself follows the design description.
module lsq_bnlq
  import lsq_pkg::*;
#(
  parameter int unsigned DEPTH = BNLQ_DEPTH_D,
  parameter int unsigned BANKS = BNLQ_BANKS_D,
  localparam int unsigned IW = $clog2(DEPTH),
  localparam int unsigned RW = $clog2(DEPTH / BANKS),
  localparam int unsigned BW = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  input  logic              alloc_valid,
  input  seq_t              alloc_seq,
  input  pc_t               alloc_pc,
  output logic [IW-1:0]     alloc_idx,
  output logic              full,
  output logic              avail,
  output logic              empty,
  // issue (address known, data read from the cache)
  input  logic              issue_valid,
  input  logic [IW-1:0]     issue_idx,
  input  addr_t             issue_addr,
  input  data_t             issue_data,
  input  logic              issue_counted,
  output logic              issue_live,
  output seq_t              issue_seq,
  // commit
  input  logic              commit_valid,
  output logic [IW-1:0]     head_idx,
  output seq_t              head_seq,
  output addr_t             head_addr,
  output data_t             head_data,
  output pc_t               head_pc,
  output logic              head_counted,
  // flush and flush walk
  input  logic              flush_valid,
  input  seq_t              flush_seq,
  output logic              walking,
  output logic              walk_dec_valid,
  output addr_t             walk_dec_addr,
  // per-entry state for the search snapshot
  output logic [DEPTH-1:0]  live_vec,
  output logic [DEPTH-1:0]  issued_vec,
  // banked read port for the search: entries rd_base .. rd_base+BANKS-1
  input  logic [IW-1:0]     rd_base,
  output logic [IW-1:0]     rd_idx  [BANKS],
  output addr_t             rd_addr [BANKS],
  output seq_t              rd_seq  [BANKS],
  output pc_t               rd_pc   [BANKS]
);

  typedef struct packed {
    logic  live;
    logic  issued;
    logic  counted;
    seq_t  seq;
    pc_t   pc;
    addr_t addr;
    data_t data;
  } bnlq_entry_t;

  localparam int unsigned ROWS = DEPTH / BANKS;

  bnlq_entry_t bank [BANKS][ROWS];

  logic [IW-1:0] head_q, tail_q, tail_m1;
  logic [IW:0]   cnt_q;

  function automatic logic [IW-1:0] wrap(logic [IW:0] x);
    return (x >= (IW+1)'(DEPTH)) ? IW'(x - (IW+1)'(DEPTH)) : x[IW-1:0];
  endfunction
  function automatic logic [BW-1:0] bsel(logic [IW-1:0] i);
    return BW'(i % IW'(BANKS));
  endfunction
  function automatic logic [RW-1:0] rsel(logic [IW-1:0] i);
    return RW'(i / IW'(BANKS));
  endfunction

  bnlq_entry_t head_e, tail_e, issue_e;
  assign tail_m1 = (tail_q == '0) ? IW'(DEPTH - 1) : tail_q - 1'b1;
  assign head_e  = bank[bsel(head_q)][rsel(head_q)];
  assign tail_e  = bank[bsel(tail_m1)][rsel(tail_m1)];
  assign issue_e = bank[bsel(issue_idx)][rsel(issue_idx)];

  assign full         = (cnt_q == (IW+1)'(DEPTH));
  assign empty        = (cnt_q == '0);
  assign walking      = !empty && !tail_e.live;
  assign avail        = !full && !walking;
  assign alloc_idx    = tail_q;
  assign issue_live   = issue_e.live;
  assign issue_seq    = issue_e.seq;
  assign head_idx     = head_q;
  assign head_seq     = head_e.seq;
  assign head_addr    = head_e.addr;
  assign head_data    = head_e.data;
  assign head_pc      = head_e.pc;
  assign head_counted = head_e.counted;

  assign walk_dec_valid = walking && tail_e.counted;
  assign walk_dec_addr  = tail_e.addr;

  always_comb begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      live_vec[i]   = bank[bsel(IW'(i))][rsel(IW'(i))].live;
      issued_vec[i] = bank[bsel(IW'(i))][rsel(IW'(i))].issued;
    end
  end

  // One entry from each bank.
  always_comb begin
    logic [IW-1:0] ri;
    for (int b = 0; b < int'(BANKS); b++) begin
      ri         = wrap({1'b0, rd_base} + (IW+1)'(b));
      rd_idx[b]  = ri;
      rd_addr[b] = bank[bsel(ri)][rsel(ri)].addr;
      rd_seq[b]  = bank[bsel(ri)][rsel(ri)].seq;
      rd_pc[b]   = bank[bsel(ri)][rsel(ri)].pc;
    end
  end

  logic do_alloc, do_commit;
  assign do_alloc  = alloc_valid && avail && !flush_valid;
  assign do_commit = commit_valid && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
      for (int b = 0; b < int'(BANKS); b++)
        for (int r = 0; r < int'(ROWS); r++) bank[b][r] <= '0;
    end else begin
      if (issue_valid) begin
        bank[bsel(issue_idx)][rsel(issue_idx)].issued  <= 1'b1;
        bank[bsel(issue_idx)][rsel(issue_idx)].counted <= issue_counted;
        bank[bsel(issue_idx)][rsel(issue_idx)].addr    <= issue_addr;
        bank[bsel(issue_idx)][rsel(issue_idx)].data    <= issue_data;
      end
      if (do_alloc) begin
        bank[bsel(tail_q)][rsel(tail_q)] <= '{live: 1'b1, issued: 1'b0, counted: 1'b0,
                                              seq: alloc_seq, pc: alloc_pc,
                                              addr: '0, data: '0};
        tail_q <= wrap({1'b0, tail_q} + 1'b1);
      end else if (walking) begin
        bank[bsel(tail_m1)][rsel(tail_m1)].counted <= 1'b0;
        tail_q <= tail_m1;
      end
      if (flush_valid) begin
        for (int b = 0; b < int'(BANKS); b++)
          for (int r = 0; r < int'(ROWS); r++)
            if (!seq_older(bank[b][r].seq, flush_seq)) bank[b][r].live <= 1'b0;
      end
      if (do_commit) begin
        bank[bsel(head_q)][rsel(head_q)].live    <= 1'b0;
        bank[bsel(head_q)][rsel(head_q)].counted <= 1'b0;
        head_q <= wrap({1'b0, head_q} + 1'b1);
      end
      cnt_q <= cnt_q + (IW+1)'(do_alloc) - (IW+1)'(walking) - (IW+1)'(do_commit);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) commit_valid |-> !empty)
    else $error("BNLQ commit while empty");
  assert property (@(posedge clk) disable iff (!rst_n) commit_valid |-> head_e.live)
    else $error("BNLQ commit of a flushed load");

endmodule
