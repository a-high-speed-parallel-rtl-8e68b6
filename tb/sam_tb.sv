// sam_tb: self-checking test of the state anticipation module. Drives the
// BCM and SCM1 state inputs, first as a real counter would (BCM stepping
// every clock) and then with random values, and checks every cycle that
//   scm1_en == (BCM state one clock earlier == 6)
//   scm2_en == (BCM state two clocks earlier == 5) && (SCM1 state now == 3)
// using a history of the driven inputs kept by the testbench. Also checks
// that reset clears the pipeline.
module sam_tb;
  import pcnt_pkg::*;
  logic        clk = 1'b0;
  logic        rst;
  bcm_state_t  bcm_q;
  scm1_state_t scm1_q;
  logic        scm1_en, scm2_en;
  int          checks = 0, failures = 0;
  int          n_en1 = 0, n_en2 = 0;
  bcm_state_t  h1, h2;     // BCM input one and two edges ago
  logic        hv1, hv2;   // history valid (not cleared by reset)

  sam dut (.clk(clk), .rst(rst), .bcm_q(bcm_q), .scm1_q(scm1_q),
           .scm1_en(scm1_en), .scm2_en(scm2_en));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out();
    logic e1, e2;
    e1 = hv1 && h1 == 3'd6;
    e2 = hv2 && h2 == 3'd5 && scm1_q == 2'd3;
    checks++;
    if (scm1_en !== e1 || scm2_en !== e2) begin
      failures++;
      $display("t=%0t bcm=%0d scm1=%0d h1=%0d h2=%0d: en1=%b/%b en2=%b/%b", $time,
               bcm_q, scm1_q, h1, h2, scm1_en, e1, scm2_en, e2);
    end
    n_en1 += int'(scm1_en);
    n_en2 += int'(scm2_en);
  endtask

  initial begin
    rst = 1'b1; bcm_q = '0; scm1_q = '0;
    hv1 = 1'b0; hv2 = 1'b0; h1 = '0; h2 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    #1 check_out();
    for (int n = 0; n < 600; n++) begin
      @(posedge clk);
      if (rst) begin hv1 = 1'b0; hv2 = 1'b0; end
      else begin h2 = h1; hv2 = hv1; h1 = bcm_q; hv1 = 1'b1; end
      @(negedge clk);
      if (n < 300) begin
        // counter-like stimulus: SCM1 steps when the BCM wraps
        if (bcm_q == 3'd7) scm1_q = scm1_q + 1'b1;
        bcm_q = bcm_q + 1'b1;
        rst   = 1'b0;
      end else begin
        bcm_q  = 3'($urandom);
        scm1_q = 2'($urandom);
        rst    = ($urandom % 40) == 0;
      end
      #1 check_out();
    end
    checks++;
    if (n_en1 == 0 || n_en2 == 0) begin
      failures++; $display("enables never asserted: %0d %0d", n_en1, n_en2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
