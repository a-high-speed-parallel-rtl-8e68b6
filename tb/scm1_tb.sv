// scm1_tb: self-checking test of the 2-bit subsequent counting module
// scm1. Drives a random count enable and occasional reset; the expected
// state is an integer the testbench advances modulo 4 in cycles with
// the enable high and holds otherwise. Checks that both hold and wrap occur.
module scm1_tb;
  import pcnt_pkg::*;
  logic clk = 1'b0;
  logic rst, en;
  scm1_state_t q;
  int   checks = 0, failures = 0;
  int   exp_q, holds = 0, wraps = 0;

  scm1 dut (.clk(clk), .rst(rst), .en(en), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b1;
    @(posedge clk); #1 exp_q = 0;
    checks++; if (int'(q) != 0) begin failures++; $display("reset: q=%0d", q); end
    repeat (500) begin
      @(negedge clk);
      rst = ($urandom % 32) == 0;
      en  = 1'($urandom);
      @(posedge clk); #1;
      if (rst) exp_q = 0;
      else if (en) begin
        if (exp_q == 3) wraps++;
        exp_q = (exp_q + 1) % 4;
      end else holds++;
      checks++;
      if (int'(q) != exp_q) begin
        failures++;
        $display("t=%0t en=%b rst=%b q=%0d expected %0d", $time, en, rst, q, exp_q);
      end
    end
    checks++;
    if (holds == 0 || wraps == 0) begin
      failures++; $display("holds=%0d wraps=%0d", holds, wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
