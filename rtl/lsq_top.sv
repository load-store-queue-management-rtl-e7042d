// lsq_top: split load-store queue with state filtering.
//
// The conventional load queue is replaced by two queues working side by side:
// a small Associative Load Queue (ALQ) for loads predicted to depend on an
// in-flight store, and a larger Banked Non-associative Load Queue (BNLQ) for
// the rest. A PC-indexed predictor picks the queue at dispatch. ALQ loads are
// handled conventionally: they search the store queue (SQ) for forwarding and
// stores search the ALQ when their address is known. BNLQ loads do neither;
// each issued BNLQ load increments an Exclusive Bloom Filter (EBF) counter at
// address % 4001, and a committing store that finds a nonzero counter starts a
// background search of the BNLQ which squashes only on a real address match
// and then trains the predictor.
//
// Interface (one operation of each kind per cycle, valid/ready style):
//   disp_*  dispatch a load or store in program order; disp_ready, disp_queue
//           and disp_idx tell where it went (combinational). disp_dep_hint
//           is the load's profile tag, used only when PROFILE_PRED = 1.
//   ld_*    a load executes with its queue and index; ld_mem_data is the data
//           cache word for ld_addr read in the same cycle. ld_accept low means
//           retry later. ld_data is the value the load obtains.
//   st_*    a store's address and data become known.
//   cm_*    the core commits its oldest instruction if it is a memory op;
//           cm_ready low holds it. cm_ld_data is a committing load's value.
//   mem_wr_* a committed store's write to the data cache.
//   flush_* the core squashes everything from flush_seq on (e.g. a branch
//           misprediction); squash_* is this unit's own squash request, which
//           is already applied inside in the same cycle.
// Sequence numbers are supplied by the core and wrap (see lsq_pkg).
//
// Squash sources: an ALQ ordering violation (a store finds a younger executed
// load to its address, or an ALQ load executes in the same cycle as an older
// store to its address) and a BNLQ search match. Same-cycle races are this
// design's choice: a BNLQ load issuing to the very address being written by a
// committing store is refused and retried, since neither the EBF nor the
// search could see it yet. Everything else follows the design description:
// queue sizes 48/32/48, 4-bit EBF counters, option B false-hit filtering,
// dynamic predictor with a 100,000-cycle refresh, EBF overflow by refusing the
// load unless it is the oldest memory instruction.
//
// OPTION_B = 0 selects the simpler alternative (option A): every EBF hit at
// store commit squashes everything after the store, and the DPU mode
// (lsq_dpu) trains the predictor afterwards from the BNLQ loads that commit
// with the same EBF index. The search is then never started. DPU_TIMEOUT, the
// length of the DPU mode's time-out, is this design's choice. In the default
// build (OPTION_B = 1) the events.ebf_squash and events.dpu_train pulses are
// constant zero.
//
// PROFILE_PRED = 1 replaces the dynamic predictor by the profile-based one:
// each load arrives with a dependent/independent tag (disp_dep_hint) fixed
// offline by profiling and stored in the program binary, and that tag alone
// picks its queue. The tagging itself is software and not part of this unit.
module lsq_top
  import lsq_pkg::*;
#(
  parameter int unsigned BNLQ_DEPTH   = BNLQ_DEPTH_D,
  parameter int unsigned ALQ_DEPTH    = ALQ_DEPTH_D,
  parameter int unsigned SQ_DEPTH     = SQ_DEPTH_D,
  parameter int unsigned BNLQ_BANKS   = BNLQ_BANKS_D,
  parameter int unsigned EBF_SIZE     = EBF_SIZE_D,
  parameter int unsigned EBF_CW       = EBF_CW_D,
  parameter int unsigned PRED_ENTRIES = PRED_ENTRIES_D,
  parameter int unsigned REFRESH      = REFRESH_D,
  parameter bit          OPTION_B     = 1'b1,
  parameter int unsigned DPU_TIMEOUT  = 1024,
  parameter bit          PROFILE_PRED = 1'b0,
  localparam int unsigned MAXD  = (BNLQ_DEPTH > ALQ_DEPTH)
                                  ? ((BNLQ_DEPTH > SQ_DEPTH) ? BNLQ_DEPTH : SQ_DEPTH)
                                  : ((ALQ_DEPTH > SQ_DEPTH) ? ALQ_DEPTH : SQ_DEPTH),
  localparam int unsigned IDX_W = $clog2(MAXD)
) (
  input  logic             clk,
  input  logic             rst_n,
  // dispatch
  input  logic             disp_valid,
  input  logic             disp_is_store,
  input  seq_t             disp_seq,
  input  pc_t              disp_pc,
  input  logic             disp_dep_hint,
  output logic             disp_ready,
  output queue_e           disp_queue,
  output logic [IDX_W-1:0] disp_idx,
  // load execution
  input  logic             ld_valid,
  input  queue_e           ld_queue,
  input  logic [IDX_W-1:0] ld_idx,
  input  addr_t            ld_addr,
  input  data_t            ld_mem_data,
  output logic             ld_accept,
  output data_t            ld_data,
  // store execution
  input  logic             st_valid,
  input  logic [IDX_W-1:0] st_idx,
  input  addr_t            st_addr,
  input  data_t            st_data,
  // commit
  input  logic             cm_valid,
  input  logic             cm_is_store,
  output logic             cm_ready,
  output data_t            cm_ld_data,
  output logic             mem_wr_valid,
  output addr_t            mem_wr_addr,
  output data_t            mem_wr_data,
  // squash
  input  logic             flush_valid,
  input  seq_t             flush_seq,
  output logic             squash_valid,
  output seq_t             squash_seq,
  output lsq_events_t      events
);

  localparam int unsigned AIW = $clog2(ALQ_DEPTH);
  localparam int unsigned BIW = $clog2(BNLQ_DEPTH);
  localparam int unsigned SIW = $clog2(SQ_DEPTH);
  localparam int unsigned EIW = $clog2(EBF_SIZE);

  // ---------------- wires between the blocks ----------------
  logic    f_valid;   // combined flush applied to every queue
  seq_t    f_seq;

  logic    pred_dep, pred_train, pred_refresh;
  pc_t     pred_train_pc;

  queue_e  steer_q;
  logic    steer_ready, steer_upgrade, steer_alq_stall;

  logic           sq_full, sq_empty, sq_fwd_hit, sq_head_res;
  logic [SIW-1:0] sq_alloc_idx;
  seq_t           sq_ex_seq, sq_head_seq;
  addr_t          sq_head_addr;
  data_t          sq_fwd_data, sq_head_data;

  logic           alq_full, alq_empty, alq_viol;
  logic [AIW-1:0] alq_alloc_idx;
  seq_t           alq_ex_seq, alq_head_seq, alq_viol_seq;
  pc_t            alq_viol_pc;
  data_t          alq_head_data;

  logic                  bq_full, bq_avail, bq_empty, bq_issue_live, bq_head_counted;
  logic                  bq_walking, bq_walk_dec;
  logic [BIW-1:0]        bq_alloc_idx, bq_head_idx, bq_rd_base;
  logic [BIW-1:0]        bq_rd_idx  [BNLQ_BANKS];
  addr_t                 bq_rd_addr [BNLQ_BANKS];
  seq_t                  bq_rd_seq  [BNLQ_BANKS];
  pc_t                   bq_rd_pc   [BNLQ_BANKS];
  seq_t                  bq_issue_seq, bq_head_seq;
  addr_t                 bq_head_addr, bq_walk_addr;
  data_t                 bq_head_data;
  pc_t                   bq_head_pc;
  logic [BNLQ_DEPTH-1:0] bq_live, bq_issued;

  logic              ebf_inc, ebf_sat, ebf_hit, ebf_ready;
  logic [EIW-1:0]    ebf_look_idx;
  logic [EBF_CW-1:0] ebf_look_cnt;

  logic srch_busy, srch_head_blk, srch_found, srch_none, srch_start;
  seq_t srch_seq;
  pc_t  srch_pc;

  // ---------------- dispatch ----------------
  lsq_dep_pred #(.ENTRIES(PRED_ENTRIES), .REFRESH(REFRESH)) u_pred (
    .clk, .rst_n,
    .rd_pc(disp_pc), .rd_dep(pred_dep),
    .train_valid(pred_train), .train_pc(pred_train_pc),
    .refresh(pred_refresh)
  );

  // With the profile-based predictor the load carries its own tag from the
  // program binary and the table above is not consulted.
  logic steer_dep;
  assign steer_dep = PROFILE_PRED ? disp_dep_hint : pred_dep;

  lsq_steer u_steer (
    .valid(disp_valid && !f_valid), .is_store(disp_is_store), .pred_dep(steer_dep),
    .sq_full(sq_full), .alq_full(alq_full), .bnlq_avail(bq_avail),
    .target(steer_q), .ready(steer_ready), .upgrade(steer_upgrade),
    .alq_stall(steer_alq_stall)
  );

  assign disp_ready = steer_ready;
  assign disp_queue = steer_q;
  always_comb begin
    case (steer_q)
      Q_SQ:    disp_idx = IDX_W'(sq_alloc_idx);
      Q_ALQ:   disp_idx = IDX_W'(alq_alloc_idx);
      Q_BNLQ:  disp_idx = IDX_W'(bq_alloc_idx);
      default: disp_idx = '0;
    endcase
  end

  // ---------------- load execution ----------------
  logic ld_alq, ld_bq, bq_oldest, ld_same_wr, bq_issue_ok, bq_bypass;
  logic cm_store;     // a store commits this cycle
  assign ld_alq = ld_valid && ld_queue == Q_ALQ;
  assign ld_bq  = ld_valid && ld_queue == Q_BNLQ && bq_issue_live;

  // The load is the oldest memory instruction: BNLQ head, older than the
  // ALQ head and the SQ head.
  assign bq_oldest = BIW'(ld_idx) == bq_head_idx && bq_live[bq_head_idx] &&
                     (alq_empty || seq_older(bq_issue_seq, alq_head_seq)) &&
                     (sq_empty  || seq_older(bq_issue_seq, sq_head_seq));
  assign ld_same_wr  = cm_store && sq_head_addr == ld_addr;
  assign ebf_inc     = ld_bq && !ld_same_wr;
  assign bq_bypass   = ebf_inc && ebf_sat && bq_oldest;
  assign bq_issue_ok = ebf_inc && (!ebf_sat || bq_oldest);

  assign ld_accept = ld_alq || bq_issue_ok;
  assign ld_data   = (ld_alq && sq_fwd_hit) ? sq_fwd_data : ld_mem_data;

  // ---------------- store queue ----------------
  lsq_sq #(.DEPTH(SQ_DEPTH)) u_sq (
    .clk, .rst_n,
    .alloc_valid(steer_q == Q_SQ), .alloc_seq(disp_seq), .alloc_idx(sq_alloc_idx),
    .full(sq_full), .empty(sq_empty),
    .ex_valid(st_valid), .ex_idx(SIW'(st_idx)), .ex_addr(st_addr), .ex_data(st_data),
    .ex_seq(sq_ex_seq),
    .fwd_seq(alq_ex_seq), .fwd_addr(ld_addr), .fwd_hit(sq_fwd_hit), .fwd_data(sq_fwd_data),
    .commit_valid(cm_store), .head_seq(sq_head_seq), .head_addr(sq_head_addr),
    .head_data(sq_head_data), .head_resolved(sq_head_res),
    .flush_valid(f_valid), .flush_seq(f_seq)
  );

  // ---------------- associative load queue ----------------
  logic cm_alq, cm_bq;
  lsq_alq #(.DEPTH(ALQ_DEPTH)) u_alq (
    .clk, .rst_n,
    .alloc_valid(steer_q == Q_ALQ), .alloc_seq(disp_seq), .alloc_pc(disp_pc),
    .alloc_idx(alq_alloc_idx), .full(alq_full), .empty(alq_empty),
    .ex_valid(ld_alq), .ex_idx(AIW'(ld_idx)), .ex_addr(ld_addr), .ex_data(ld_data),
    .ex_seq(alq_ex_seq),
    .st_valid(st_valid), .st_seq(sq_ex_seq), .st_addr(st_addr),
    .viol(alq_viol), .viol_seq(alq_viol_seq), .viol_pc(alq_viol_pc),
    .commit_valid(cm_alq), .head_seq(alq_head_seq), .head_data(alq_head_data),
    .flush_valid(f_valid), .flush_seq(f_seq)
  );

  // ---------------- banked non-associative load queue ----------------
  lsq_bnlq #(.DEPTH(BNLQ_DEPTH), .BANKS(BNLQ_BANKS)) u_bnlq (
    .clk, .rst_n,
    .alloc_valid(steer_q == Q_BNLQ), .alloc_seq(disp_seq), .alloc_pc(disp_pc),
    .alloc_idx(bq_alloc_idx), .full(bq_full), .avail(bq_avail), .empty(bq_empty),
    .issue_valid(bq_issue_ok), .issue_idx(BIW'(ld_idx)), .issue_addr(ld_addr),
    .issue_data(ld_mem_data), .issue_counted(!bq_bypass),
    .issue_live(bq_issue_live), .issue_seq(bq_issue_seq),
    .commit_valid(cm_bq), .head_idx(bq_head_idx), .head_seq(bq_head_seq),
    .head_addr(bq_head_addr), .head_data(bq_head_data), .head_pc(bq_head_pc),
    .head_counted(bq_head_counted),
    .flush_valid(f_valid), .flush_seq(f_seq),
    .walking(bq_walking), .walk_dec_valid(bq_walk_dec), .walk_dec_addr(bq_walk_addr),
    .live_vec(bq_live), .issued_vec(bq_issued),
    .rd_base(bq_rd_base), .rd_idx(bq_rd_idx), .rd_addr(bq_rd_addr),
    .rd_seq(bq_rd_seq), .rd_pc(bq_rd_pc)
  );

  // ---------------- exclusive bloom filter ----------------
  lsq_ebf #(.SIZE(EBF_SIZE), .CW(EBF_CW)) u_ebf (
    .clk, .rst_n,
    .inc_valid(ebf_inc), .inc_addr(ld_addr), .inc_sat(ebf_sat),
    .dec0_valid(cm_bq && bq_head_counted), .dec0_addr(bq_head_addr),
    .dec1_valid(bq_walk_dec), .dec1_addr(bq_walk_addr),
    .look_addr(sq_head_addr), .look_hit(ebf_hit),
    .look_idx(ebf_look_idx), .look_cnt(ebf_look_cnt), .ready(ebf_ready)
  );

  // ---------------- background search (false-hit filter) ----------------
  lsq_bnlq_search #(.DEPTH(BNLQ_DEPTH), .BANKS(BNLQ_BANKS)) u_search (
    .clk, .rst_n,
    .start_valid(srch_start), .start_addr(sq_head_addr),
    .head_idx(bq_head_idx), .live_vec(bq_live), .issued_vec(bq_issued),
    .rd_base(bq_rd_base), .rd_idx(bq_rd_idx), .rd_addr(bq_rd_addr),
    .rd_seq(bq_rd_seq), .rd_pc(bq_rd_pc),
    .busy(srch_busy), .head_blocked(srch_head_blk),
    .found(srch_found), .found_seq(srch_seq), .found_pc(srch_pc), .no_match(srch_none)
  );

  // ---------------- option A: squash on every hit, DPU mode ----------------
  logic ebf_squash, dpu_train, dpu_active, dpu_timeout;
  assign ebf_squash = !OPTION_B && cm_store && ebf_hit;

  lsq_dpu #(.SIZE(EBF_SIZE), .CW(EBF_CW), .TIMEOUT(DPU_TIMEOUT)) u_dpu (
    .clk, .rst_n,
    .start_valid(ebf_squash), .start_idx(ebf_look_idx), .start_cnt(ebf_look_cnt),
    .cm_valid(!OPTION_B && cm_bq), .cm_addr(bq_head_addr),
    .train_valid(dpu_train), .active(dpu_active), .timed_out(dpu_timeout)
  );

  // ---------------- commit ----------------
  logic ld_from_bq;   // oldest load is in the BNLQ
  // The BNLQ head may be a flushed entry still waiting for the walk: only a
  // live head takes part (bq_empty is then irrelevant).
  assign ld_from_bq = bq_live[bq_head_idx] && (alq_empty || seq_older(bq_head_seq, alq_head_seq));

  always_comb begin
    cm_ready = 1'b0;
    if (cm_valid) begin
      if (cm_is_store) cm_ready = !sq_empty && !(ebf_hit && srch_busy);
      else if (ld_from_bq) cm_ready = !srch_head_blk;
      else cm_ready = !alq_empty;
    end
  end
  assign cm_store   = cm_valid && cm_is_store && cm_ready;
  assign cm_alq     = cm_valid && !cm_is_store && cm_ready && !ld_from_bq;
  assign cm_bq      = cm_valid && !cm_is_store && cm_ready && ld_from_bq;
  assign cm_ld_data = ld_from_bq ? bq_head_data : alq_head_data;
  assign srch_start = OPTION_B && cm_store && ebf_hit;

  assign mem_wr_valid = cm_store;
  assign mem_wr_addr  = sq_head_addr;
  assign mem_wr_data  = sq_head_data;

  // ---------------- squash ----------------
  // An ALQ load executing in the same cycle as an older store to its address
  // has missed that store's data and is squashed too.
  logic race_viol, viol_any;
  seq_t viol_seq;
  assign race_viol = ld_alq && st_valid && st_addr == ld_addr &&
                     seq_older(sq_ex_seq, alq_ex_seq);
  always_comb begin
    viol_any = alq_viol || race_viol;
    viol_seq = alq_viol_seq;
    if (race_viol && (!alq_viol || seq_older(alq_ex_seq, alq_viol_seq)))
      viol_seq = alq_ex_seq;
  end

  always_comb begin
    squash_valid = viol_any || srch_found || ebf_squash;
    squash_seq   = viol_seq;
    if (srch_found && (!viol_any || seq_older(srch_seq, viol_seq)))
      squash_seq = srch_seq;
    // option A: everything after the committing store (it is the oldest
    // instruction, so this point is older than any other squash point)
    if (ebf_squash) squash_seq = sq_head_seq + 1'b1;
    f_valid = flush_valid || squash_valid;
    f_seq   = squash_seq;
    if (flush_valid && (!squash_valid || seq_older(flush_seq, squash_seq)))
      f_seq = flush_seq;
  end

  // Predictor training: a load that really read ahead of a store.
  // One training per cycle: the search (option B) or DPU mode (option A)
  // wins over an ALQ violation in the same cycle.
  assign pred_train    = srch_found || dpu_train || alq_viol;
  assign pred_train_pc = srch_found ? srch_pc : dpu_train ? bq_head_pc : alq_viol_pc;

  // ---------------- event pulses ----------------
  always_comb begin
    events                = '0;
    events.forward        = ld_alq && sq_fwd_hit;
    events.alq_violation  = viol_any;
    events.upgrade        = steer_upgrade;
    events.alq_full_stall = steer_alq_stall;
    events.ebf_reject     = ld_bq && !ld_accept;
    events.ebf_bypass     = bq_bypass;
    events.ebf_hit        = cm_store && ebf_hit;
    events.search_true    = srch_found;
    events.search_false   = srch_none;
    events.search_stall   = cm_valid && cm_is_store && !sq_empty && ebf_hit && srch_busy;
    events.commit_block   = cm_valid && !cm_is_store && ld_from_bq && srch_head_blk;
    events.flush_walk     = bq_walk_dec;
    events.refresh        = pred_refresh;
    events.train          = pred_train;
    events.ebf_squash     = ebf_squash;
    events.dpu_train      = dpu_train;
  end

  assert property (@(posedge clk) disable iff (!rst_n) cm_store |-> sq_head_res)
    else $error("store committed before its address was known");

endmodule
