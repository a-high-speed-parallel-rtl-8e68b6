// bcm_tb: self-checking test of the 3-bit basic counting module. After reset
// the module must step 0,1,...,7,0,... on every clock; a reset in the middle
// of the sequence must return it to 0. The expected value is an integer
// counted modulo 8 in the testbench.
module bcm_tb;
  import pcnt_pkg::*;
  logic       clk = 1'b0;
  logic       rst;
  bcm_state_t q;
  int         checks = 0, failures = 0;
  int         exp_q, wraps = 0;

  bcm dut (.clk(clk), .rst(rst), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q();
    checks++;
    if (int'(q) != exp_q) begin
      failures++;
      $display("t=%0t q=%0d expected %0d", $time, q, exp_q);
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 exp_q = 0; check_q();
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 100; n++) begin
      @(posedge clk); #1;
      if (exp_q == 7) wraps++;
      exp_q = (exp_q + 1) % 8;
      check_q();
      if (n == 50) begin
        @(negedge clk) rst = 1'b1;
        @(posedge clk); #1 exp_q = 0; check_q();
        @(negedge clk) rst = 1'b0;
      end
    end
    checks++;
    if (wraps < 10) begin failures++; $display("too few wraps: %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
