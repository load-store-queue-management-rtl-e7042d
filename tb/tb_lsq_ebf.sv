// tb_lsq_ebf: self-checking test of the Exclusive Bloom Filter.
//
// Random increments and decrements on a small pool of addresses, chosen so that
// pairs (a, a+SIZE) share a counter, are mirrored in a reference count array.
// Every cycle the lookup (index = addr % SIZE, count, hit) and the saturation
// flag are compared with the reference. A phase drives one counter to its
// 4-bit maximum to check that the sixteenth increment is refused.
module tb_lsq_ebf;
  import lsq_pkg::*;
  localparam int unsigned SIZE = 4001;
  localparam int unsigned CW   = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic inc_valid, dec0_valid, dec1_valid, inc_sat, look_hit;
  addr_t inc_addr, dec0_addr, dec1_addr, look_addr;
  logic [$clog2(SIZE)-1:0] look_idx;
  logic [CW-1:0] look_cnt;
  logic ready;

  lsq_ebf #(.SIZE(SIZE), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  int ref_cnt [SIZE];
  addr_t pool [8];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(addr_t a);
    return int'(a % SIZE);
  endfunction

  initial begin
    pool = '{32'd5, 32'd5 + SIZE, 32'd77, 32'd77 + 2*SIZE, 32'd4000, 32'd123456, 32'd9, 32'd9 + SIZE};
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    {inc_valid, dec0_valid, dec1_valid} = '0;
    inc_addr = '0; dec0_addr = '0; dec1_addr = '0; look_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(ready == 1'b0, "clearing sweep after reset");
    while (!ready) @(negedge clk);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int exp_cnt;
      bit exp_sat;
      @(negedge clk);
      inc_valid  = ($urandom_range(0, 2) != 0);
      inc_addr   = pool[$urandom_range(0, 7)];
      // decrement only counters that are nonzero
      dec0_addr  = pool[$urandom_range(0, 7)];
      dec0_valid = ($urandom_range(0, 2) == 0) && ref_cnt[h(dec0_addr)] > 0;
      dec1_addr  = pool[$urandom_range(0, 7)];
      dec1_valid = ($urandom_range(0, 3) == 0) &&
                   ref_cnt[h(dec1_addr)] > ((dec0_valid && h(dec0_addr) == h(dec1_addr)) ? 1 : 0);
      look_addr  = pool[$urandom_range(0, 7)];
      #1;
      exp_cnt = ref_cnt[h(look_addr)];
      check(int'(look_idx) == h(look_addr), "hash index");
      check(int'(look_cnt) == exp_cnt, "lookup count");
      check(look_hit == (exp_cnt > 0), "lookup hit");
      exp_sat = inc_valid && ref_cnt[h(inc_addr)] == 15;
      check(inc_sat == exp_sat, "saturation flag");
      if (inc_valid && !exp_sat) ref_cnt[h(inc_addr)]++;
      if (dec0_valid) ref_cnt[h(dec0_addr)]--;
      if (dec1_valid) ref_cnt[h(dec1_addr)]--;
      // drain the pool now and then so counts stay well below saturation
      if (cyc % 500 == 499) begin
        @(negedge clk);
        inc_valid = 0; dec1_valid = 0;
        foreach (pool[k]) begin
          while (ref_cnt[h(pool[k])] > 0) begin
            dec0_valid = 1; dec0_addr = pool[k];
            ref_cnt[h(pool[k])]--;
            @(negedge clk);
          end
        end
        dec0_valid = 0;
      end
    end
    // saturate one counter
    @(negedge clk);
    {inc_valid, dec0_valid, dec1_valid} = '0;
    inc_addr = 32'd2024; look_addr = 32'd2024;
    #1;
    while (ref_cnt[h(32'd2024)] < 15) begin
      inc_valid = 1;
      @(negedge clk);
      ref_cnt[h(32'd2024)]++;
    end
    #1;
    check(look_cnt == 15, "count reaches 15");
    check(inc_sat == 1'b1, "sixteenth increment refused");
    @(negedge clk);
    #1;
    check(look_cnt == 15, "saturated counter holds");
    inc_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
