// pcnt_pkg: widths and state types shared by the 8-bit parallel counter.
//
// The counter is split into a 3-bit basic counting module (BCM, count bits
// 2..0), a 2-bit first subsequent counting module (SCM1, bits 4..3) and a
// 3-bit second subsequent counting module (SCM2, bits 7..5). The split 3/2/3
// is the one the design is built around; the state anticipation module decodes
// the BCM states named here to enable the upper modules one clock early.
package pcnt_pkg;

  localparam int unsigned BCM_W  = 3;
  localparam int unsigned SCM1_W = 2;
  localparam int unsigned SCM2_W = 3;
  localparam int unsigned CNT_W  = BCM_W + SCM1_W + SCM2_W;  // 8

  typedef logic [BCM_W-1:0]  bcm_state_t;
  typedef logic [SCM1_W-1:0] scm1_state_t;
  typedef logic [SCM2_W-1:0] scm2_state_t;
  typedef logic [CNT_W-1:0]  count_t;

  // BCM state in which the upper modules count (the BCM wraps to 0 next).
  localparam bcm_state_t BCM_LAST = 3'd7;

endpackage
