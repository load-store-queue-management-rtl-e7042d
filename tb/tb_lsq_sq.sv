// tb_lsq_sq: self-checking test of the store queue.
//
// A reference model keeps the in-flight stores as a list in program order.
// Random dispatch, execute, forwarding lookups, commits and flushes are applied
// to an 8-entry queue (so that it fills and wraps often). Checked every cycle:
// allocation index, full/empty, head contents, and the forwarding result, which
// must come from the youngest resolved older store with the same address.
module tb_lsq_sq;
  import lsq_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned IW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic alloc_valid, full, empty, ex_valid, fwd_hit, commit_valid, head_resolved, flush_valid;
  seq_t alloc_seq, ex_seq, fwd_seq, head_seq, flush_seq;
  logic [IW-1:0] alloc_idx, ex_idx;
  addr_t ex_addr, fwd_addr, head_addr;
  data_t ex_data, fwd_data, head_data;

  lsq_sq #(.DEPTH(DEPTH)) dut (.*);

  typedef struct {
    int    idx;
    seq_t  seq;
    bit    resolved;
    addr_t addr;
    data_t data;
  } st_t;
  st_t  m [$];
  int   m_tail;
  seq_t next_seq;
  int   n_fwd, n_full, n_flush;

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

  initial begin
    alloc_valid = 0; ex_valid = 0; commit_valid = 0; flush_valid = 0;
    alloc_seq = '0; ex_idx = '0; ex_addr = '0; ex_data = '0; fwd_seq = '0; fwd_addr = '0;
    flush_seq = '0;
    m_tail = 0; next_seq = 10'd1000; n_fwd = 0; n_full = 0; n_flush = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int ex_k, best;
      bit exp_hit;
      data_t exp_data;
      @(negedge clk);
      alloc_valid  = ($urandom_range(0, 2) != 0);
      alloc_seq    = next_seq;
      ex_k         = -1;
      ex_valid     = 0;
      if (m.size() > 0 && $urandom_range(0, 1) != 0) begin
        ex_k = $urandom_range(0, m.size() - 1);
        if (!m[ex_k].resolved) begin
          ex_valid = 1;
          ex_idx   = IW'(m[ex_k].idx);
          ex_addr  = addr_t'($urandom_range(0, 3));
          ex_data  = {$urandom, $urandom};
        end
      end
      commit_valid = m.size() > 0 && m[0].resolved && ($urandom_range(0, 2) == 0);
      flush_valid  = m.size() > 0 && ($urandom_range(0, 40) == 0);
      if (flush_valid) flush_seq = m[$urandom_range(0, m.size() - 1)].seq;
      if (flush_valid && commit_valid && flush_seq == m[0].seq) flush_valid = 0;
      fwd_addr = addr_t'($urandom_range(0, 3));
      fwd_seq  = next_seq - seq_t'($urandom_range(0, 10));
      #1;
      // checks on combinational outputs
      check(full == (m.size() == DEPTH), "full");
      check(empty == (m.size() == 0), "empty");
      if (!full) check(int'(alloc_idx) == m_tail, "alloc index");
      if (m.size() > 0) begin
        check(head_seq == m[0].seq, "head seq");
        check(head_resolved == m[0].resolved, "head resolved");
        if (m[0].resolved) check(head_addr == m[0].addr && head_data == m[0].data, "head data");
      end
      if (ex_valid) check(ex_seq == m[ex_k].seq, "execute seq");
      exp_hit = 0; exp_data = '0; best = -1;
      foreach (m[k])
        if (m[k].resolved && m[k].addr == fwd_addr && seq_older(m[k].seq, fwd_seq)) best = k;
      if (best >= 0) begin exp_hit = 1; exp_data = m[best].data; end
      check(fwd_hit == exp_hit, "forward hit");
      if (exp_hit) begin
        check(fwd_data == exp_data, "forward data");
        n_fwd++;
      end
      if (full) n_full++;
      // model update, as the clock edge will do it
      if (ex_valid) begin
        m[ex_k].resolved = 1; m[ex_k].addr = ex_addr; m[ex_k].data = ex_data;
      end
      if (commit_valid) void'(m.pop_front());
      if (flush_valid) begin
        n_flush++;
        while (m.size() > 0 && !seq_older(m[m.size()-1].seq, flush_seq)) begin
          void'(m.pop_back());
          m_tail = (m_tail + DEPTH - 1) % DEPTH;
        end
      end else if (alloc_valid && !full) begin
        m.push_back('{idx: m_tail, seq: next_seq, resolved: 0, addr: '0, data: '0});
        m_tail = (m_tail + 1) % DEPTH;
        next_seq++;
      end
    end
    check(n_fwd > 100 && n_full > 10 && n_flush > 10, "coverage of forward, full, flush");
    $display("forwards=%0d full_cycles=%0d flushes=%0d", n_fwd, n_full, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
