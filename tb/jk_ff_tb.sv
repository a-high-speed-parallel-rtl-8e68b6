// jk_ff_tb: self-checking test of the JK flip-flop. Drives random J, K and
// occasional reset, and compares q after every edge with the JK truth table
// evaluated in the testbench (hold, clear, set, toggle; reset wins).
module jk_ff_tb;
  logic clk = 1'b0;
  logic rst, j, k, q;
  int   checks = 0, failures = 0;
  logic exp_q;
  int   seen[4];

  jk_ff dut (.clk(clk), .rst(rst), .j(j), .k(k), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; j = 1'b0; k = 1'b0;
    @(posedge clk); #1;
    exp_q = 1'b0;
    checks++; if (q !== exp_q) begin failures++; $display("reset: q=%b", q); end
    rst = 1'b0;
    repeat (400) begin
      @(negedge clk);
      j   = 1'($urandom);
      k   = 1'($urandom);
      rst = ($urandom % 16) == 0;
      @(posedge clk); #1;
      if (rst)            exp_q = 1'b0;
      else if (j && k)    exp_q = ~exp_q;
      else if (j)         exp_q = 1'b1;
      else if (k)         exp_q = 1'b0;
      if (!rst) seen[{j, k}]++;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("j=%b k=%b rst=%b: q=%b expected %b", j, k, rst, q, exp_q);
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("JK combination %0d never driven", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
