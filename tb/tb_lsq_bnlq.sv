// tb_lsq_bnlq: self-checking test of the banked non-associative load queue.
//
// An 8-entry, 4-bank queue is driven with random dispatch, issue, commit and
// flush. A reference model keeps the entries in program order with a live
// flag. After a flush the dead entries must be walked out from the tail one
// per cycle, each counted one producing an EBF decrement request with its
// address, and no allocation may happen until the walk is over. Also checked:
// allocation index, full/avail/empty, head fields, the live/issued vectors
// and the four-entry banked read port at a random base.
module tb_lsq_bnlq;
  import lsq_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned BANKS = 4;
  localparam int unsigned IW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic alloc_valid, full, avail, empty, issue_valid, issue_counted, issue_live;
  logic commit_valid, head_counted, flush_valid, walking, walk_dec_valid;
  seq_t alloc_seq, issue_seq, head_seq, flush_seq;
  pc_t  alloc_pc, head_pc;
  logic [IW-1:0] alloc_idx, issue_idx, head_idx, rd_base;
  addr_t issue_addr, head_addr, walk_dec_addr;
  data_t issue_data, head_data;
  logic [DEPTH-1:0] live_vec, issued_vec;
  logic [IW-1:0] rd_idx [BANKS];
  addr_t rd_addr [BANKS];
  seq_t  rd_seq [BANKS];
  pc_t   rd_pc [BANKS];

  lsq_bnlq #(.DEPTH(DEPTH), .BANKS(BANKS)) dut (.*);

  typedef struct {
    int    idx;
    bit    live;
    bit    issued;
    bit    counted;
    seq_t  seq;
    pc_t   pc;
    addr_t addr;
    data_t data;
  } e_t;
  e_t   m [$];
  int   m_tail;
  seq_t next_seq;
  int   n_walk_dec, n_walk, n_full;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(int idx);
    foreach (m[k]) if (m[k].idx == idx) return k;
    return -1;
  endfunction

  initial begin
    alloc_valid = 0; issue_valid = 0; commit_valid = 0; flush_valid = 0;
    alloc_seq = '0; alloc_pc = '0; issue_idx = '0; issue_addr = '0; issue_data = '0;
    issue_counted = 0; flush_seq = '0; rd_base = '0;
    m_tail = 0; next_seq = 10'd1020; n_walk_dec = 0; n_walk = 0; n_full = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int is_k;
      bit exp_walk;
      @(negedge clk);
      alloc_valid = ($urandom_range(0, 2) != 0);
      alloc_seq   = next_seq;
      alloc_pc    = pc_t'($urandom);
      issue_valid = 0;
      is_k = -1;
      if (m.size() > 0) begin
        is_k = $urandom_range(0, m.size() - 1);
        if (m[is_k].live && !m[is_k].issued && $urandom_range(0, 1) != 0) begin
          issue_valid   = 1;
          issue_idx     = IW'(m[is_k].idx);
          issue_addr    = addr_t'($urandom);
          issue_data    = {$urandom, $urandom};
          issue_counted = ($urandom_range(0, 5) != 0);
        end
      end
      commit_valid = m.size() > 0 && m[0].live && m[0].issued && ($urandom_range(0, 2) == 0);
      flush_valid  = m.size() > 0 && ($urandom_range(0, 25) == 0);
      if (flush_valid) flush_seq = m[$urandom_range(0, m.size() - 1)].seq;
      if (flush_valid && commit_valid && flush_seq == m[0].seq) flush_valid = 0;
      rd_base = IW'($urandom_range(0, DEPTH - 1));
      #1;
      exp_walk = m.size() > 0 && !m[m.size()-1].live;
      check(full == (m.size() == DEPTH), "full");
      check(empty == (m.size() == 0), "empty");
      check(walking == exp_walk, "walking");
      check(avail == (m.size() < DEPTH && !exp_walk), "avail");
      if (avail) check(int'(alloc_idx) == m_tail, "alloc index");
      if (exp_walk) begin
        check(walk_dec_valid == m[m.size()-1].counted, "walk decrement");
        if (walk_dec_valid) check(walk_dec_addr == m[m.size()-1].addr, "walk address");
      end else check(!walk_dec_valid, "no walk decrement");
      if (m.size() > 0 && m[0].live) begin
        check(int'(head_idx) == m[0].idx && head_seq == m[0].seq && head_pc == m[0].pc, "head");
        if (m[0].issued)
          check(head_counted == m[0].counted && head_addr == m[0].addr &&
                head_data == m[0].data, "head fields");
      end
      if (is_k >= 0 && issue_valid)
        check(issue_live == 1'b1 && issue_seq == m[is_k].seq, "issue entry");
      for (int i = 0; i < int'(DEPTH); i++) begin
        int k;
        k = find(i);
        check(live_vec[i] == (k >= 0 && m[k].live), "live vector");
        if (k >= 0) check(issued_vec[i] == m[k].issued, "issued vector");
      end
      for (int b = 0; b < int'(BANKS); b++) begin
        int k;
        check(int'(rd_idx[b]) == (int'(rd_base) + b) % DEPTH, "read index");
        k = find(int'(rd_idx[b]));
        if (k >= 0 && m[k].live) begin
          check(rd_seq[b] == m[k].seq && rd_pc[b] == m[k].pc, "read seq/pc");
          if (m[k].issued) check(rd_addr[b] == m[k].addr, "read address");
        end
      end
      if (full) n_full++;
      // model update
      if (issue_valid) begin
        m[is_k].issued = 1; m[is_k].counted = issue_counted;
        m[is_k].addr = issue_addr; m[is_k].data = issue_data;
      end
      if (alloc_valid && avail && !flush_valid) begin
        m.push_back('{idx: m_tail, live: 1, issued: 0, counted: 0, seq: next_seq,
                      pc: alloc_pc, addr: '0, data: '0});
        m_tail = (m_tail + 1) % DEPTH;
        next_seq++;
      end else if (exp_walk) begin
        n_walk++;
        if (m[m.size()-1].counted) n_walk_dec++;
        void'(m.pop_back());
        m_tail = (m_tail + DEPTH - 1) % DEPTH;
      end
      if (flush_valid)
        foreach (m[k]) if (!seq_older(m[k].seq, flush_seq)) m[k].live = 0;
      if (commit_valid) void'(m.pop_front());
    end
    check(n_walk > 50 && n_walk_dec > 20 && n_full > 10, "coverage of walk and full");
    $display("walk_steps=%0d walk_decrements=%0d full_cycles=%0d", n_walk, n_walk_dec, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
