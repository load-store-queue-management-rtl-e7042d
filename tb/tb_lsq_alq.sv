// tb_lsq_alq: self-checking test of the associative load queue.
//
// A reference model keeps the in-flight loads as a list in program order.
// Random dispatch, load execution, store address checks, commits and flushes
// are applied to an 8-entry queue. Checked every cycle: allocation index,
// full/empty, head, and the store check, which must report the oldest
// executed load that is younger than the store and has its address.
module tb_lsq_alq;
  import lsq_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned IW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic alloc_valid, full, empty, ex_valid, st_valid, viol, commit_valid, flush_valid;
  seq_t alloc_seq, ex_seq, st_seq, viol_seq, head_seq, flush_seq;
  pc_t  alloc_pc, viol_pc;
  logic [IW-1:0] alloc_idx, ex_idx;
  addr_t ex_addr, st_addr;
  data_t ex_data, head_data;

  lsq_alq #(.DEPTH(DEPTH)) dut (.*);

  typedef struct {
    int    idx;
    seq_t  seq;
    pc_t   pc;
    bit    executed;
    addr_t addr;
    data_t data;
  } ld_t;
  ld_t  m [$];
  int   m_tail;
  seq_t next_seq;
  int   n_viol, n_full, n_flush;

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
    alloc_valid = 0; ex_valid = 0; st_valid = 0; commit_valid = 0; flush_valid = 0;
    alloc_seq = '0; alloc_pc = '0; ex_idx = '0; ex_addr = '0; ex_data = '0;
    st_seq = '0; st_addr = '0; flush_seq = '0;
    m_tail = 0; next_seq = 10'd900; n_viol = 0; n_full = 0; n_flush = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int ex_k, best;
      @(negedge clk);
      alloc_valid = ($urandom_range(0, 2) != 0);
      alloc_seq   = next_seq;
      alloc_pc    = pc_t'($urandom);
      ex_k        = -1;
      ex_valid    = 0;
      if (m.size() > 0 && $urandom_range(0, 1) != 0) begin
        ex_k = $urandom_range(0, m.size() - 1);
        if (!m[ex_k].executed) begin
          ex_valid = 1;
          ex_idx   = IW'(m[ex_k].idx);
          ex_addr  = addr_t'($urandom_range(0, 3));
          ex_data  = {$urandom, $urandom};
        end
      end
      st_valid = ($urandom_range(0, 1) != 0);
      st_seq   = next_seq - seq_t'($urandom_range(1, 10));
      st_addr  = addr_t'($urandom_range(0, 3));
      commit_valid = m.size() > 0 && m[0].executed && ($urandom_range(0, 2) == 0);
      flush_valid  = m.size() > 0 && ($urandom_range(0, 40) == 0);
      if (flush_valid) flush_seq = m[$urandom_range(0, m.size() - 1)].seq;
      if (flush_valid && commit_valid && flush_seq == m[0].seq) flush_valid = 0;
      #1;
      check(full == (m.size() == DEPTH), "full");
      check(empty == (m.size() == 0), "empty");
      if (!full) check(int'(alloc_idx) == m_tail, "alloc index");
      if (m.size() > 0) begin
        check(head_seq == m[0].seq, "head seq");
        if (m[0].executed) check(head_data == m[0].data, "head data");
      end
      if (ex_valid) check(ex_seq == m[ex_k].seq, "execute seq");
      best = -1;
      if (st_valid)
        foreach (m[k])
          if (best < 0 && m[k].executed && m[k].addr == st_addr && seq_older(st_seq, m[k].seq))
            best = k;
      check(viol == (best >= 0), "violation");
      if (best >= 0) begin
        check(viol_seq == m[best].seq && viol_pc == m[best].pc, "violating load");
        n_viol++;
      end
      if (full) n_full++;
      if (ex_valid) begin
        m[ex_k].executed = 1; m[ex_k].addr = ex_addr; m[ex_k].data = ex_data;
      end
      if (commit_valid) void'(m.pop_front());
      if (flush_valid) begin
        n_flush++;
        while (m.size() > 0 && !seq_older(m[m.size()-1].seq, flush_seq)) begin
          void'(m.pop_back());
          m_tail = (m_tail + DEPTH - 1) % DEPTH;
        end
      end else if (alloc_valid && !full) begin
        m.push_back('{idx: m_tail, seq: next_seq, pc: alloc_pc, executed: 0, addr: '0, data: '0});
        m_tail = (m_tail + 1) % DEPTH;
        next_seq++;
      end
    end
    check(n_viol > 100 && n_full > 10 && n_flush > 10, "coverage of violation, full, flush");
    $display("violations=%0d full_cycles=%0d flushes=%0d", n_viol, n_full, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
