// tb_lsq_dpu: self-checking test of the DPU-mode controller.
//
// A reference model keeps the saved EBF index, the number of matches still
// expected and the elapsed cycles. Random hits (some with a zero count, some
// while the mode is already active) and random committing loads are applied;
// most load addresses are chosen to map to the saved index, through different
// addresses with the same hash, so that matches are frequent. Every cycle the
// test compares train_valid, active and timed_out with the model, and
// it checks that the mode ends both by reaching the count and by the time-out.
// The time-out is shortened to 40 cycles.
module tb_lsq_dpu;
  import lsq_pkg::*;
  localparam int unsigned SIZE    = 4001;
  localparam int unsigned CW      = 4;
  localparam int unsigned TIMEOUT = 40;
  localparam int unsigned IW      = $clog2(SIZE);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start_valid, cm_valid, train_valid, active, timed_out;
  logic [IW-1:0] start_idx;
  logic [CW-1:0] start_cnt;
  addr_t         cm_addr;

  lsq_dpu #(.SIZE(SIZE), .CW(CW), .TIMEOUT(TIMEOUT)) dut (.*);

  int checks = 0, failures = 0;
  int n_end_count = 0, n_end_timeout = 0, n_train = 0, n_restart = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  bit m_active;
  int m_idx, m_left, m_timer;

  initial begin
    bit exp_train, exp_to;
    {start_valid, cm_valid} = '0;
    start_idx = '0; start_cnt = '0; cm_addr = '0;
    m_active = 0; m_idx = 0; m_left = 0; m_timer = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      // drive inputs away from the clock edge
      start_valid = ($urandom_range(99) < (m_active ? 1 : 6));
      start_idx   = IW'($urandom_range(SIZE - 1));
      start_cnt   = CW'($urandom_range(3) == 0 ? 0 : $urandom_range(1, 4));
      cm_valid    = ($urandom_range(99) < 15);
      if ($urandom_range(2) != 0)
        cm_addr = addr_t'(m_idx + SIZE * $urandom_range(0, 1000));
      else
        cm_addr = addr_t'($urandom);
      #1;
      exp_train = m_active && cm_valid && (int'(cm_addr % SIZE) == m_idx);
      exp_to    = m_active && (m_timer == TIMEOUT - 1);
      check(active == m_active, "active");
      check(train_valid == exp_train, "train_valid");
      check(timed_out == exp_to, "timed_out");
      if (exp_train) n_train++;
      // model update at the edge
      @(posedge clk);
      if (start_valid) begin
        if (m_active) n_restart++;
        m_active = (start_cnt != 0);
        m_idx = int'(start_idx); m_left = int'(start_cnt); m_timer = 0;
      end else if (m_active) begin
        m_timer++;
        if (exp_train) m_left--;
        if (exp_train && m_left == 0) begin m_active = 0; n_end_count++; end
        else if (exp_to) begin m_active = 0; n_end_timeout++; end
      end
      @(negedge clk);
    end
    check(n_train > 100, "matches seen");
    check(n_end_count > 20, "mode ended by count");
    check(n_end_timeout > 20, "mode ended by time-out");
    check(n_restart > 5, "restart while active");
    $display("train=%0d end_count=%0d end_timeout=%0d restart=%0d", n_train, n_end_count,
             n_end_timeout, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
