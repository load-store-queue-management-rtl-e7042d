// lsq_harness: model core that runs a generated program through one lsq_top
// instance with the queue sizes given as parameters. It is the engine of
// tb_lsq_configs, which runs several queue-size configurations side by side;
// tb_lsq_top holds the same core model for the default sizes.
//
// The testbench is a small out-of-order core. It runs a generated program of
// loads and stores: dispatch in order, execution in random order, in-order
// commit, and re-fetch from the squash point whenever the queue unit or the
// core itself (a random "branch misprediction" flush) squashes. The data cache
// is an array written only by committed stores.
//
// Correctness is checked against sequential semantics, worked out here and not
// by the unit: every committing load must return what the memory holds at
// that point in program order, every committed store must write its own
// address and data, and at the end the memory must equal a sequential replay
// of the committed program. The address mix makes all mechanisms happen:
// shared addresses (with pairs a, a+4001 that share an EBF counter, for false
// hits), private addresses that are never stored to, and bursts of loads to
// one address that saturate a 4-bit EBF counter. Each mechanism is counted
// from the event outputs and a failure is counted for any that never occurs.
module lsq_harness
  import lsq_pkg::*;
#(
  parameter int unsigned BNLQ_DEPTH = BNLQ_DEPTH_D,
  parameter int unsigned ALQ_DEPTH  = ALQ_DEPTH_D,
  parameter int unsigned REFRESH    = 10_000,
  parameter int          CYCLES     = 30_000,
  parameter int          SEED       = 1,
  parameter bit          OPTION_B   = 1'b1,
  parameter bit          PROFILE_PRED = 1'b0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int NOPS    = 20000;
  localparam int WINDOW  = 200;
  localparam int RING    = 1 << SEQ_W;
  localparam int IW      = $clog2((BNLQ_DEPTH > SQ_DEPTH_D) ? BNLQ_DEPTH : SQ_DEPTH_D);

  logic rst_n = 1'b0;

  logic        disp_valid, disp_is_store, disp_ready;
  seq_t        disp_seq;
  pc_t         disp_pc;
  logic        disp_dep_hint;
  queue_e      disp_queue;
  logic [IW-1:0]  disp_idx;
  logic        ld_valid, ld_accept;
  queue_e      ld_queue;
  logic [IW-1:0]  ld_idx;
  addr_t       ld_addr;
  data_t       ld_mem_data, ld_data;
  logic        st_valid;
  logic [IW-1:0]  st_idx;
  addr_t       st_addr;
  data_t       st_data;
  logic        cm_valid, cm_is_store, cm_ready, mem_wr_valid;
  data_t       cm_ld_data, mem_wr_data;
  addr_t       mem_wr_addr;
  logic        flush_valid, squash_valid;
  seq_t        flush_seq, squash_seq;
  lsq_events_t events;

  lsq_top #(.BNLQ_DEPTH(BNLQ_DEPTH), .ALQ_DEPTH(ALQ_DEPTH), .REFRESH(REFRESH),
            .OPTION_B(OPTION_B), .PROFILE_PRED(PROFILE_PRED)) dut (.*);

  // ---------------- program ----------------
  bit    p_store [NOPS];
  pc_t   p_pc    [NOPS];
  addr_t p_addr  [NOPS];

  function automatic data_t st_value(int p);
    return data_t'(64'hA5A5_0000_0000_0000) | data_t'(p);
  endfunction

  function automatic addr_t shared_addr();
    int k;
    k = $urandom_range(0, 11);
    // 0..7 and 4001..4004: the second group shares EBF counters with 0..3
    return (k < 8) ? addr_t'(k) : addr_t'(4001 + k - 8);
  endfunction

  // ---------------- memory ----------------
  data_t mem [addr_t];
  function automatic data_t rd_mem(addr_t a);
    return mem.exists(a) ? mem[a] : data_t'(a) * 64'd7919;
  endfunction

  // ---------------- core state per in-flight op ----------------
  bit     s_disp [RING];
  queue_e s_q    [RING];
  int     s_idx  [RING];
  bit     s_exec [RING];
  int     cp, fp;    // commit and fetch positions

  // Offline profile: half of the load PCs that touch shared addresses are
  // tagged dependent; the other half keep causing EBF hits.
  function automatic bit profile_tag(int p);
    return !p_store[p] && p_pc[p][31:8] == 24'h10 && p_pc[p][5:2] < 4'd8;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t (cp=%0d) in BNLQ %0d / ALQ %0d", what, $time, cp,
                                  BNLQ_DEPTH, ALQ_DEPTH);
    end
  endtask

  // mechanism counters
  int n_forward, n_viol, n_upgrade, n_alq_stall, n_reject, n_bypass, n_hit;
  int n_true, n_false, n_srch_stall, n_cm_block, n_walk, n_refresh, n_train;
  int n_ext_flush, n_squash, n_committed, n_ebf_squash, n_dpu_train;

  function automatic seq_t sq(int p);
    return seq_t'(p % RING);
  endfunction
  function automatic int pos_of(seq_t s);
    return cp + int'(seq_t'(s - sq(cp)));
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    void'($urandom(SEED));
    // generate the program
    for (int p = 0; p < NOPS; p++) begin
      int r;
      r = $urandom_range(0, 99);
      if ((p % 3000) >= 2900) begin
        // burst of loads to one private address: saturates an EBF counter
        p_store[p] = 0;
        p_pc[p]    = 32'h3000;
        p_addr[p]  = 32'd300;
      end else if (r < 26) begin
        p_store[p] = 1;
        p_pc[p]    = 32'h2000 + 4 * $urandom_range(0, 15);
        p_addr[p]  = shared_addr();
      end else if (r < 46) begin
        p_store[p] = 0;
        p_pc[p]    = 32'h1000 + 4 * $urandom_range(0, 15);
        p_addr[p]  = shared_addr();
      end else begin
        p_store[p] = 0;
        p_pc[p]    = 32'h1100 + 4 * $urandom_range(0, 47);
        p_addr[p]  = 32'd200 + $urandom_range(0, 63);
      end
    end
    foreach (s_disp[i]) begin s_disp[i] = 0; s_exec[i] = 0; s_q[i] = Q_NONE; s_idx[i] = 0; end
    {disp_valid, disp_is_store, ld_valid, st_valid, cm_valid, cm_is_store, flush_valid} = '0;
    disp_seq = '0; disp_pc = '0; disp_dep_hint = 1'b0; ld_queue = Q_NONE; ld_idx = '0; ld_addr = '0; ld_mem_data = '0;
    st_idx = '0; st_addr = '0; st_data = '0; flush_seq = '0;
    cp = 0; fp = 0;
    {n_forward, n_viol, n_upgrade, n_alq_stall, n_reject, n_bypass, n_hit} = '0;
    {n_true, n_false, n_srch_stall, n_cm_block, n_walk, n_refresh, n_train} = '0;
    {n_ext_flush, n_squash, n_committed, n_ebf_squash, n_dpu_train} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < CYCLES + 20000 && cp < NOPS; cyc++) begin
      int ld_p, st_p, fl_p, kill;
      bit draining;
      draining = cyc >= CYCLES;
      @(negedge clk);
      // dispatch
      disp_valid = !draining && fp < NOPS && (fp - cp) < WINDOW && ($urandom_range(0, 5) != 0);
      if (disp_valid) begin
        disp_is_store = p_store[fp];
        disp_pc       = p_pc[fp];
        disp_seq      = sq(fp);
        disp_dep_hint = profile_tag(fp);
      end
      // pick a load and a store to execute, among the oldest in flight
      ld_p = -1; st_p = -1;
      for (int t = 0; t < 6; t++) begin
        int p;
        p = cp + $urandom_range(0, 63);
        if (p < fp && s_disp[p % RING] && !s_exec[p % RING]) begin
          if (!p_store[p] && ld_p < 0) ld_p = p;
          if (p_store[p] && st_p < 0 && $urandom_range(0, 2) == 0) st_p = p;
        end
      end
      ld_valid = ld_p >= 0;
      if (ld_valid) begin
        ld_queue    = s_q[ld_p % RING];
        ld_idx      = IW'(s_idx[ld_p % RING]);
        ld_addr     = p_addr[ld_p];
        ld_mem_data = rd_mem(p_addr[ld_p]);
      end
      st_valid = st_p >= 0;
      if (st_valid) begin
        st_idx  = IW'(s_idx[st_p % RING]);
        st_addr = p_addr[st_p];
        st_data = st_value(st_p);
      end
      // commit the oldest op when it has executed
      cm_valid    = cp < fp && s_exec[cp % RING] && ($urandom_range(0, 3) != 0);
      cm_is_store = p_store[cp];
      // a random branch misprediction flush of younger ops
      fl_p = -1;
      flush_valid = (fp - cp > 2) && ($urandom_range(0, 400) == 0);
      if (flush_valid) begin
        fl_p = $urandom_range(cp + 1, fp - 1);
        flush_seq = sq(fl_p);
      end
      #1;
      // ---------- observe ----------
      if (events.forward)        n_forward++;
      if (events.alq_violation)  n_viol++;
      if (events.upgrade)        n_upgrade++;
      if (events.alq_full_stall) n_alq_stall++;
      if (events.ebf_reject)     n_reject++;
      if (events.ebf_bypass)     n_bypass++;
      if (events.ebf_hit)        n_hit++;
      if (events.search_true)    n_true++;
      if (events.search_false)   n_false++;
      if (events.search_stall)   n_srch_stall++;
      if (events.commit_block)   n_cm_block++;
      if (events.flush_walk)     n_walk++;
      if (events.refresh)        n_refresh++;
      if (events.train)          n_train++;
      if (events.ebf_squash)     n_ebf_squash++;
      if (events.dpu_train)      n_dpu_train++;

      if (disp_valid && disp_ready) begin
        check(disp_queue == (p_store[fp] ? Q_SQ : disp_queue) && disp_queue != Q_NONE &&
              (disp_queue == Q_SQ) == p_store[fp], "dispatch queue kind");
        if (PROFILE_PRED && !p_store[fp])
          check(profile_tag(fp) ? disp_queue == Q_ALQ
                                : (disp_queue == Q_BNLQ || events.upgrade), "profile tag steers");
        s_disp[fp % RING] = 1;
        s_exec[fp % RING] = 0;
        s_q[fp % RING]    = disp_queue;
        s_idx[fp % RING]  = int'(disp_idx);
        fp++;
      end
      if (ld_valid && ld_accept) s_exec[ld_p % RING] = 1;
      if (st_valid) s_exec[st_p % RING] = 1;
      if (cm_valid && cm_ready) begin
        if (p_store[cp]) begin
          check(mem_wr_valid && mem_wr_addr == p_addr[cp] && mem_wr_data == st_value(cp),
                "committed store write");
          mem[p_addr[cp]] = st_value(cp);
        end else begin
          check(!mem_wr_valid, "no write on load commit");
          check(cm_ld_data == rd_mem(p_addr[cp]), "committed load value");
        end
        s_disp[cp % RING] = 0;
        cp++;
        n_committed++;
      end else begin
        check(!mem_wr_valid, "no write without commit");
      end
      // squash: the older of the core's flush and the unit's own squash
      kill = -1;
      if (flush_valid) begin kill = fl_p; n_ext_flush++; end
      if (squash_valid) begin
        int sp;
        sp = pos_of(squash_seq);
        check(sp >= cp && sp <= fp, "squash point in flight");
        if (kill < 0 || sp < kill) kill = sp;
        n_squash++;
      end
      if (kill >= 0) begin
        for (int p = kill; p < fp; p++) begin s_disp[p % RING] = 0; s_exec[p % RING] = 0; end
        fp = kill;
      end
    end
    check(cp == fp, "drained");
    // sequential replay of the committed program
    begin
      data_t ref_mem [addr_t];
      int bad;
      bad = 0;
      for (int p = 0; p < cp; p++) if (p_store[p]) ref_mem[p_addr[p]] = st_value(p);
      foreach (ref_mem[a]) if (rd_mem(a) != ref_mem[a]) bad++;
      check(bad == 0, "final memory equals sequential replay");
    end
    $display("BNLQ %0d / ALQ %0d, option %s, %s predictor: ebf_squash=%0d dpu_train=%0d", BNLQ_DEPTH,
             ALQ_DEPTH, OPTION_B ? "B" : "A", PROFILE_PRED ? "profile" : "dynamic", n_ebf_squash,
             n_dpu_train);
    $display("committed=%0d squashes=%0d core_flushes=%0d", n_committed, n_squash, n_ext_flush);
    $display("forward=%0d alq_violation=%0d upgrade=%0d alq_full_stall=%0d", n_forward, n_viol,
             n_upgrade, n_alq_stall);
    $display("ebf_reject=%0d ebf_bypass=%0d ebf_hit=%0d search_true=%0d search_false=%0d",
             n_reject, n_bypass, n_hit, n_true, n_false);
    $display("search_stall=%0d commit_block=%0d flush_walk=%0d refresh=%0d train=%0d",
             n_srch_stall, n_cm_block, n_walk, n_refresh, n_train);
    check(n_committed > 3000, "progress");
    check(n_forward > 0, "forwarding happened");
    check(n_viol > 0, "ALQ violation happened");
    check(n_hit > 0, "EBF hit happened");
    if (OPTION_B) check(n_true + n_false > 0, "search completed");
    else begin
      check(n_ebf_squash > 0 && n_true + n_false == 0, "option A squashes on EBF hits");
      check(n_dpu_train > 0, "DPU mode trained the predictor");
    end
    check(n_walk > 0, "flush walk happened");
    check(n_refresh > 0, "predictor refresh happened");
    done = 1;
  end
endmodule
