// tb_lsq_configs: the split load-store queue in the other queue-size
// configurations studied for this design, run side by side with the end-to-end
// core model (lsq_harness): BNLQ/ALQ of 32/48, 40/40 and 56/24 entries, and an
// enlarged 80-entry BNLQ next to a 32-entry ALQ. The SQ stays at 48 entries and
// the EBF at 4001 four-bit counters. Each instance checks every committed load
// and store against sequential semantics and the final memory against a
// sequential replay. A fifth instance runs the main sizes with option A: every
// EBF hit squashes and the predictor learns in DPU mode; a sixth uses the
// profile-based predictor, where a tag carried by each load picks its queue and
// the test checks that it does. The predictor refresh
// is shortened to 10,000 cycles so that it happens within the 30,000-cycle run.
module tb_lsq_configs;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 6;
  logic done [N];
  int   c [N];
  int   f [N];

  lsq_harness #(.BNLQ_DEPTH(32), .ALQ_DEPTH(48), .SEED(11)) u_32_48 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  lsq_harness #(.BNLQ_DEPTH(40), .ALQ_DEPTH(40), .SEED(12)) u_40_40 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  lsq_harness #(.BNLQ_DEPTH(56), .ALQ_DEPTH(24), .SEED(13)) u_56_24 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  lsq_harness #(.BNLQ_DEPTH(80), .ALQ_DEPTH(32), .SEED(14)) u_80_32 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));
  // main sizes with option A: squash on every EBF hit, predictor trained in DPU mode
  lsq_harness #(.BNLQ_DEPTH(48), .ALQ_DEPTH(32), .SEED(15), .OPTION_B(1'b0)) u_48_32_a (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]));
  // main sizes with the profile-based predictor: the load's tag picks its queue
  lsq_harness #(.BNLQ_DEPTH(48), .ALQ_DEPTH(32), .SEED(16), .PROFILE_PRED(1'b1)) u_48_32_p (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]));

  int checks, failures;

  initial begin
    #3_000_000;
    checks = 0; failures = 1;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
