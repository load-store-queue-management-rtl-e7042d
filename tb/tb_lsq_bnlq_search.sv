// tb_lsq_bnlq_search: self-checking test of the background BNLQ search.
//
// The testbench plays the BNLQ: a 16-entry, 4-bank array of entries with live,
// issued, address, seq and PC, served through the banked read port. Each trial
// fills a random window of the queue, starts a search with a store address
// and, now and then, kills (flushes) random entries while the search runs.
// The expected outcome is worked out from the snapshot of issued entries in
// program order: the search must report the first live issued entry with the
// store's address in the cycle that covers its position (4 entries per cycle),
// or report no match once all snapshot entries are covered. Also checked: busy,
// and that the head entry is held from commit while it is still unchecked.
module tb_lsq_bnlq_search;
  import lsq_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned BANKS = 4;
  localparam int unsigned IW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start_valid, busy, head_blocked, found, no_match;
  addr_t start_addr;
  logic [IW-1:0] head_idx, rd_base;
  logic [DEPTH-1:0] live_vec, issued_vec;
  logic [IW-1:0] rd_idx [BANKS];
  addr_t rd_addr [BANKS];
  seq_t  rd_seq [BANKS];
  pc_t   rd_pc [BANKS];
  seq_t  found_seq;
  pc_t   found_pc;

  lsq_bnlq_search #(.DEPTH(DEPTH), .BANKS(BANKS)) dut (.*);

  addr_t e_addr [DEPTH];
  seq_t  e_seq [DEPTH];
  pc_t   e_pc [DEPTH];

  // the banked read port of the BNLQ
  always_comb
    for (int b = 0; b < int'(BANKS); b++) begin
      rd_idx[b]  = IW'((int'(rd_base) + b) % DEPTH);
      rd_addr[b] = e_addr[rd_idx[b]];
      rd_seq[b]  = e_seq[rd_idx[b]];
      rd_pc[b]   = e_pc[rd_idx[b]];
    end

  int checks = 0, failures = 0;
  int n_found, n_none, n_kill;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start_valid = 0; start_addr = '0; head_idx = '0; live_vec = '0; issued_vec = '0;
    foreach (e_addr[i]) begin e_addr[i] = '0; e_seq[i] = '0; e_pc[i] = '0; end
    n_found = 0; n_none = 0; n_kill = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 600; trial++) begin
      int cnt, cyc;
      bit done;
      bit pend [DEPTH];
      @(negedge clk);
      head_idx = IW'($urandom_range(0, DEPTH - 1));
      cnt = $urandom_range(0, DEPTH);
      live_vec = '0; issued_vec = '0;
      for (int p = 0; p < cnt; p++) begin
        int i;
        i = (int'(head_idx) + p) % DEPTH;
        live_vec[i]   = 1;
        issued_vec[i] = ($urandom_range(0, 3) != 0);
        e_addr[i]     = addr_t'($urandom_range(0, 5));
        e_seq[i]      = seq_t'(100 + trial * 20 + p);
        e_pc[i]       = pc_t'($urandom);
      end
      start_valid = 1;
      start_addr  = addr_t'($urandom_range(0, 5));
      #1;
      check(!busy && !found && !no_match, "idle before start");
      foreach (pend[i]) pend[i] = live_vec[i] && issued_vec[i];
      @(negedge clk);
      start_valid = 0;
      done = 0;
      for (cyc = 0; cyc < DEPTH / BANKS + 2 && !done; cyc++) begin
        int exp_found_i;
        bit any_left;
        // occasionally kill entries in the middle of a search
        if ($urandom_range(0, 5) == 0) begin
          int i;
          i = $urandom_range(0, DEPTH - 1);
          live_vec[i] = 0;
          n_kill++;
        end
        #1;
        check(busy, "busy during search");
        check(head_blocked == (pend[head_idx] && live_vec[head_idx]), "head blocked");
        exp_found_i = -1;
        for (int b = 0; b < int'(BANKS); b++) begin
          int i;
          i = (int'(head_idx) + cyc * BANKS + b) % DEPTH;
          if (exp_found_i < 0 && pend[i] && live_vec[i] && e_addr[i] == start_addr) exp_found_i = i;
          pend[i] = 0;
        end
        any_left = 0;
        foreach (pend[i]) if (pend[i] && live_vec[i]) any_left = 1;
        check(found == (exp_found_i >= 0), "found");
        if (exp_found_i >= 0) begin
          check(found_seq == e_seq[exp_found_i] && found_pc == e_pc[exp_found_i], "found load");
          n_found++;
          done = 1;
        end else begin
          check(no_match == !any_left, "no match");
          if (!any_left) begin n_none++; done = 1; end
        end
        @(negedge clk);
      end
      check(done == 1, "search ends in time");
      #1;
      check(!busy, "idle after search");
    end
    check(n_found > 50 && n_none > 50 && n_kill > 20, "coverage");
    $display("found=%0d no_match=%0d kills=%0d", n_found, n_none, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
