// lsq_alq: Associative Load Queue (ALQ).
//
// A circular FIFO of DEPTH loads in program order, used for loads predicted
// dependent and for independent loads upgraded when the BNLQ is full. It works
// like a conventional load queue: an ALQ load searches the SQ when it executes
// (done outside, in the top), and every store, when its address becomes known,
// searches the ALQ associatively.
//
// Store check (combinational): among the executed loads that are younger than
// the store and have its word address, the oldest one (priority encoder over
// the distance from the head) has read stale data. viol is raised with its seq
// and PC; the caller squashes that load and everything after it.
//
// Entries hold seq, PC, address and loaded data. Flush, allocate and commit
// behave as in the store queue: flush_seq removes every load not older than
// it, and an allocation in a flush cycle is ignored. Updates take effect at
// the next clock edge. Word-granular matching is this design's choice.
module lsq_alq
  import lsq_pkg::*;
#(
  parameter int unsigned DEPTH = ALQ_DEPTH_D,
  localparam int unsigned IW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // dispatch
  input  logic          alloc_valid,
  input  seq_t          alloc_seq,
  input  pc_t           alloc_pc,
  output logic [IW-1:0] alloc_idx,
  output logic          full,
  output logic          empty,
  // load execution
  input  logic          ex_valid,
  input  logic [IW-1:0] ex_idx,
  input  addr_t         ex_addr,
  input  data_t         ex_data,
  output seq_t          ex_seq,
  // store address check
  input  logic          st_valid,
  input  seq_t          st_seq,
  input  addr_t         st_addr,
  output logic          viol,
  output seq_t          viol_seq,
  output pc_t           viol_pc,
  // commit
  input  logic          commit_valid,
  output seq_t          head_seq,
  output data_t         head_data,
  // flush
  input  logic          flush_valid,
  input  seq_t          flush_seq
);

  typedef struct packed {
    logic  valid;
    logic  executed;
    seq_t  seq;
    pc_t   pc;
    addr_t addr;
    data_t data;
  } alq_entry_t;

  alq_entry_t     q [DEPTH];
  logic [IW-1:0]  head_q, tail_q;
  logic [IW:0]    cnt_q;

  function automatic logic [IW-1:0] wrap(logic [IW:0] x);
    return (x >= (IW+1)'(DEPTH)) ? IW'(x - (IW+1)'(DEPTH)) : x[IW-1:0];
  endfunction

  assign full      = (cnt_q == (IW+1)'(DEPTH));
  assign empty     = (cnt_q == '0);
  assign alloc_idx = tail_q;
  assign ex_seq    = q[ex_idx].seq;
  assign head_seq  = q[head_q].seq;
  assign head_data = q[head_q].data;

  // Oldest younger executed load to the same address.
  always_comb begin
    logic [IW:0] best_pos, pos;
    viol     = 1'b0;
    viol_seq = '0;
    viol_pc  = '0;
    best_pos = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      pos = (i >= int'(head_q)) ? (IW+1)'(i - int'(head_q)) : (IW+1)'(i + int'(DEPTH) - int'(head_q));
      if (st_valid && q[i].valid && q[i].executed && q[i].addr == st_addr &&
          seq_older(st_seq, q[i].seq) && (!viol || pos < best_pos)) begin
        viol     = 1'b1;
        viol_seq = q[i].seq;
        viol_pc  = q[i].pc;
        best_pos = pos;
      end
    end
  end

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
        q[ex_idx].executed <= 1'b1;
        q[ex_idx].addr     <= ex_addr;
        q[ex_idx].data     <= ex_data;
      end
      if (do_alloc) begin
        q[tail_q] <= '{valid: 1'b1, executed: 1'b0, seq: alloc_seq, pc: alloc_pc,
                       addr: '0, data: '0};
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
    else $error("ALQ commit while empty");

endmodule
