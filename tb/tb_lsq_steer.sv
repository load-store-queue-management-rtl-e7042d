// tb_lsq_steer: exhaustive self-checking test of the dispatch steering rules.
//
// All 64 input combinations are applied and compared with the rules written
// out independently here: stores to the SQ unless full; dependent loads to
// the ALQ or stall; independent loads to the BNLQ, else upgraded to the ALQ,
// else stall.
module tb_lsq_steer;
  import lsq_pkg::*;

  logic   valid, is_store, pred_dep, sq_full, alq_full, bnlq_avail;
  queue_e target;
  logic   ready, upgrade, alq_stall;

  lsq_steer dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s for inputs %b", what,
                                  {valid, is_store, pred_dep, sq_full, alq_full, bnlq_avail});
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      queue_e exp_t;
      bit exp_up, exp_st;
      {valid, is_store, pred_dep, sq_full, alq_full, bnlq_avail} = 6'(v);
      #1;
      exp_t = Q_NONE; exp_up = 0; exp_st = 0;
      if (valid && is_store && !sq_full) exp_t = Q_SQ;
      if (valid && !is_store) begin
        if (pred_dep) begin
          if (alq_full) exp_st = 1; else exp_t = Q_ALQ;
        end else begin
          if (bnlq_avail) exp_t = Q_BNLQ;
          else if (!alq_full) begin exp_t = Q_ALQ; exp_up = 1; end
          else exp_st = 1;
        end
      end
      check(target == exp_t, "target");
      check(ready == (exp_t != Q_NONE), "ready");
      check(upgrade == exp_up, "upgrade");
      check(alq_stall == exp_st, "alq stall");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
