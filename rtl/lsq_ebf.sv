// lsq_ebf: Exclusive Bloom Filter (EBF).
//
// A table of SIZE small counters indexed by the hash  addr % SIZE  (SIZE is a
// prime, 4001, which spreads word addresses better than a power of two). Each
// counter holds how many issued, uncommitted loads of the non-associative load
// queue map to it. A committing store looks up its own index: a nonzero count
// means some BNLQ load with that hash may have read memory too early.
//
// Ports (all single-cycle):
//   inc_*   a BNLQ load issues: its counter is incremented. inc_sat is high
//           (combinationally) when the counter is already at its maximum; the
//           increment is then dropped and the caller must reject or bypass.
//   dec0_*, dec1_*  a BNLQ load commits or is walked out after a flush: its
//           counter is decremented. Two ports so that commit and flush walk
//           can proceed in the same cycle.
//   look_*  store-commit lookup, combinational: hit, index and current count.
// Increments and decrements of the same counter in one cycle are summed.
// After reset the table is cleared by a sweep of one counter per cycle (SIZE
// cycles, `ready` low); meanwhile lookups read zero and every increment is
// refused as saturated, so only the oldest memory instruction can issue
// from the BNLQ, unfiltered. The counter width, the size and the hash follow
// the design description; the two decrement ports and the clearing sweep are
// this design's choices.
module lsq_ebf
  import lsq_pkg::*;
#(
  parameter int unsigned SIZE = EBF_SIZE_D,
  parameter int unsigned CW   = EBF_CW_D,
  localparam int unsigned IW  = $clog2(SIZE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc_valid,
  input  addr_t         inc_addr,
  output logic          inc_sat,
  input  logic          dec0_valid,
  input  addr_t         dec0_addr,
  input  logic          dec1_valid,
  input  addr_t         dec1_addr,
  input  addr_t         look_addr,
  output logic          look_hit,
  output logic [IW-1:0] look_idx,
  output logic [CW-1:0] look_cnt,
  output logic          ready
);

  localparam logic [CW-1:0] CMAX = '1;

  logic [CW-1:0] cnt [SIZE];
  logic          init_q;
  logic [IW-1:0] init_idx_q;

  function automatic logic [IW-1:0] hash(addr_t a);
    addr_t r;
    r = a % ADDR_W'(SIZE);
    return r[IW-1:0];
  endfunction

  logic [IW-1:0] i_inc, i_d0, i_d1;
  logic          do_inc;

  assign i_inc    = hash(inc_addr);
  assign i_d0     = hash(dec0_addr);
  assign i_d1     = hash(dec1_addr);
  assign look_idx = hash(look_addr);
  assign ready    = !init_q;
  assign look_cnt = init_q ? '0 : cnt[look_idx];
  assign look_hit = (look_cnt != '0);
  assign inc_sat  = inc_valid && (init_q || cnt[i_inc] == CMAX);
  assign do_inc   = inc_valid && !inc_sat;

  // Net change seen by the counter each port addresses.
  function automatic logic [CW-1:0] upd(logic [IW-1:0] idx, logic [CW-1:0] old,
                                        logic a, logic [IW-1:0] ia,
                                        logic b, logic [IW-1:0] ib,
                                        logic c, logic [IW-1:0] ic);
    logic [CW+1:0] v;
    v = {2'b00, old};
    if (a && ia == idx) v = v + 1'b1;
    if (b && ib == idx) v = v - 1'b1;
    if (c && ic == idx) v = v - 1'b1;
    if (v[CW+1]) v = '0;  // never below zero
    return v[CW-1:0];
  endfunction

  // Counter storage, written as a memory: after reset the table is cleared
  // by a sweep of one counter per cycle.
  always_ff @(posedge clk) begin
    if (init_q) begin
      cnt[init_idx_q] <= '0;
    end else begin
      if (do_inc)
        cnt[i_inc] <= upd(i_inc, cnt[i_inc], do_inc, i_inc, dec0_valid, i_d0, dec1_valid, i_d1);
      if (dec0_valid)
        cnt[i_d0]  <= upd(i_d0, cnt[i_d0], do_inc, i_inc, dec0_valid, i_d0, dec1_valid, i_d1);
      if (dec1_valid)
        cnt[i_d1]  <= upd(i_d1, cnt[i_d1], do_inc, i_inc, dec0_valid, i_d0, dec1_valid, i_d1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q     <= 1'b1;
      init_idx_q <= '0;
    end else if (init_q) begin
      init_idx_q <= init_idx_q + 1'b1;
      if (init_idx_q == IW'(SIZE - 1)) init_q <= 1'b0;
    end
  end

  // A decrement must always match an earlier increment.
  always_ff @(posedge clk) begin
    if (rst_n && !init_q && dec0_valid && !(dec1_valid && i_d1 == i_d0) && !(do_inc && i_inc == i_d0))
      assert (cnt[i_d0] != '0) else $error("EBF underflow on port 0, index %0d", i_d0);
  end

endmodule
