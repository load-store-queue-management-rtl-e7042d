// tb_lsq_dep_pred: self-checking test of the PC-indexed dependence predictor.
//
// Random training requests and lookups are mirrored in a reference table. The
// refresh period is shortened to 200 cycles; the test checks that the refresh
// pulse comes exactly every 200 cycles, that it returns every entry to
// "independent", and that a training request in the refresh cycle survives.
// A second instance with REFRESH = 0 (no refresh) gets the same training and
// lookups and must never refresh, so its entries stay dependent once set.
module tb_lsq_dep_pred;
  import lsq_pkg::*;
  localparam int unsigned ENTRIES = 1024;
  localparam int unsigned REFRESH = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pc_t  rd_pc, train_pc;
  logic rd_dep, train_valid, refresh;

  lsq_dep_pred #(.ENTRIES(ENTRIES), .REFRESH(REFRESH)) dut (.*);

  logic hold_dep, hold_refresh;
  lsq_dep_pred #(.ENTRIES(ENTRIES), .REFRESH(0)) dut_hold (
    .clk, .rst_n, .rd_pc, .rd_dep(hold_dep), .train_valid, .train_pc, .refresh(hold_refresh)
  );
  bit hold_tab [ENTRIES];

  int checks = 0, failures = 0;
  bit ref_tab [ENTRIES];
  int since_refresh, n_refresh;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a small set of PCs so that trained entries are read back often
  function automatic pc_t rand_pc();
    return pc_t'({$urandom_range(0, 63), 2'b00}) + pc_t'(32'h4000_0000 * $urandom_range(0, 1));
  endfunction

  initial begin
    foreach (ref_tab[i]) ref_tab[i] = 1'b0;
    foreach (hold_tab[i]) hold_tab[i] = 1'b0;
    train_valid = 1'b0; train_pc = '0; rd_pc = '0;
    n_refresh = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    since_refresh = 1;  // the release cycle is the first of the period
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      train_valid = ($urandom_range(0, 9) == 0);
      train_pc    = rand_pc();
      rd_pc       = rand_pc();
      #1;
      check(rd_dep == ref_tab[rd_pc[11:2]], "lookup");
      check(hold_dep == hold_tab[rd_pc[11:2]] && !hold_refresh, "lookup without refresh");
      since_refresh++;
      check(refresh == (since_refresh == REFRESH), "refresh period");
      if (refresh) begin
        foreach (ref_tab[i]) ref_tab[i] = 1'b0;
        since_refresh = 0;
        n_refresh++;
      end
      if (train_valid) ref_tab[train_pc[11:2]] = 1'b1;
      if (train_valid) hold_tab[train_pc[11:2]] = 1'b1;
    end
    check(n_refresh == 5000 / REFRESH, "number of refreshes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
