// parallel_counter: 8-bit high speed parallel (synchronous, look-ahead) binary
// up counter.
//
// The count is split into three JK flip-flop counting modules: BCM (bits
// 2..0, counts every clock), SCM1 (bits 4..3) and SCM2 (bits 7..5). The state
// anticipation module (SAM) decodes BCM states one and two cycles before the
// BCM wraps and pipelines them through D flip-flops, so that the enables of
// SCM1 and SCM2 are ready at the start of the cycle in which they must count.
// All eight JK flip-flops and the three SAM flip-flops therefore change on
// the same clock edge, and no carry or AND chain runs from bit 0 to bit 7
// within one cycle: the longest path is the SAM's 3-input AND for SCM2
// followed by SCM2's own 3-input toggle AND, in front of a JK flip-flop.
//
// Ports: clk; rst (synchronous, active high: count and SAM pipeline to 0);
// count[7:0]. Timing: count is 0 in the cycle after reset and then increases
// by one on every rising edge, wrapping from 255 to 0.
// The module partition, widths and SAM make-up follow the design; the reset
// and the free-running count without an enable input are this
// implementation's choices.
module parallel_counter
  import pcnt_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  output count_t count
);

  bcm_state_t  bcm_q;
  scm1_state_t scm1_q;
  scm2_state_t scm2_q;
  logic        scm1_en;
  logic        scm2_en;

  bcm  u_bcm  (.clk(clk), .rst(rst), .q(bcm_q));
  sam  u_sam  (.clk(clk), .rst(rst), .bcm_q(bcm_q), .scm1_q(scm1_q),
               .scm1_en(scm1_en), .scm2_en(scm2_en));
  scm1 u_scm1 (.clk(clk), .rst(rst), .en(scm1_en), .q(scm1_q));
  scm2 u_scm2 (.clk(clk), .rst(rst), .en(scm2_en), .q(scm2_q));

  assign count = {scm2_q, scm1_q, bcm_q};

  // Look-ahead invariants: the registered enables must match the lower bits
  // in the cycle where they are used.
  logic past_rst;
  always_ff @(posedge clk) past_rst <= rst;

  a_scm1_en : assert property (@(posedge clk) disable iff (rst || past_rst)
    scm1_en == (bcm_q == BCM_LAST));
  a_scm2_en : assert property (@(posedge clk) disable iff (rst || past_rst)
    scm2_en == ((bcm_q == BCM_LAST) && (&scm1_q)));

endmodule
