// parallel_counter_tb: end-to-end test of the 8-bit parallel counter at its
// only size. After reset the counter must read 0 and then advance by exactly
// one per clock through 0..255 and wrap. The testbench runs four full
// periods, resets once in the middle of a period, and compares count every
// cycle with an integer counted modulo 256 in the testbench.
// It also counts how often each look-ahead mechanism acted, and fails if one
// never did: SCM1 advancing (BCM wrap), SCM2 advancing (BCM and SCM1 wrap),
// the full 255 -> 0 wrap, the SAM's registered enables (observed on the
// internal enable nets) and a reset in mid count.
module parallel_counter_tb;
  import pcnt_pkg::*;
  logic   clk = 1'b0;
  logic   rst;
  count_t count;
  int     checks = 0, failures = 0;
  int     exp_cnt, prev_cnt;
  int     n_scm1_step = 0, n_scm2_step = 0, n_wrap = 0, n_mid_reset = 0;
  int     n_scm1_en = 0, n_scm2_en = 0;
  int     cycles = 0;

  parallel_counter dut (.clk(clk), .rst(rst), .count(count));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Enables seen on the clock edge where they take effect.
  always @(posedge clk) begin
    if (!rst) begin
      n_scm1_en <= n_scm1_en + int'(dut.scm1_en);
      n_scm2_en <= n_scm2_en + int'(dut.scm2_en);
    end
  end

  task automatic check_count(string what);
    checks++;
    if (int'(count) != exp_cnt) begin
      failures++;
      $display("%s: cycle %0d count=%0d expected %0d", what, cycles, count, exp_cnt);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
    else $display("%-22s %0d", what, n);
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 exp_cnt = 0; check_count("after reset");
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 4 * 256 + 5; n++) begin
      @(posedge clk); #1;
      cycles++;
      prev_cnt = exp_cnt;
      exp_cnt  = (exp_cnt + 1) % 256;
      if (prev_cnt % 8 == 7)  n_scm1_step++;
      if (prev_cnt % 32 == 31) n_scm2_step++;
      if (prev_cnt == 255)    n_wrap++;
      check_count("count");
      // reset once in mid count, at a point where the SAM pipeline is full
      if (n == 600 && exp_cnt % 8 != 5) begin
        @(negedge clk) rst = 1'b1;
        @(posedge clk); #1 exp_cnt = 0; check_count("mid reset");
        n_mid_reset++;
        @(negedge clk) rst = 1'b0;
      end
    end
    // rate: one step per clock, 256 clocks per period
    checks++;
    if (cycles != 4 * 256 + 5) begin failures++; $display("cycle count %0d", cycles); end
    need("SCM1 steps", n_scm1_step);
    need("SCM2 steps", n_scm2_step);
    need("255->0 wraps", n_wrap);
    need("SAM scm1_en cycles", n_scm1_en);
    need("SAM scm2_en cycles", n_scm2_en);
    need("mid-count resets", n_mid_reset);
    checks++;
    if (n_scm1_en != n_scm1_step || n_scm2_en != n_scm2_step) begin
      failures++;
      $display("enable counts %0d/%0d differ from steps %0d/%0d",
               n_scm1_en, n_scm2_en, n_scm1_step, n_scm2_step);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
