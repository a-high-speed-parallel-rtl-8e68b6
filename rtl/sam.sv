// sam: State Anticipation Module of the 8-bit parallel counter.
//
// The upper counting modules must advance on the same clock edge on which the
// BCM wraps from 7 to 0 (SCM1), and on which BCM and SCM1 both wrap (SCM2).
// Instead of decoding "all lower bits are 1" in the cycle of the wrap, which
// would put a wide AND in front of every upper flip-flop, this module decodes
// the BCM state earlier and carries the decode forward through D flip-flops,
// so each enable leaves a flip-flop (or one small gate after it) at the start
// of the cycle:
//
//   SCM1: decode BCM = 6 (q2 & q1 & ~q0), one DFF     -> scm1_en high while BCM = 7
//   SCM2: decode BCM = 5 (q2 & ~q1 & q0), two DFFs    -> high while BCM = 7,
//         ANDed with SCM1 = 3 (both SCM1 bits)        -> scm2_en
//
// That is three D flip-flops, three 3-input AND gates and two inverters, the
// make-up the design gives for this module; it relies on the BCM advancing on
// every clock. SCM1's state is stable while BCM = 7, since SCM1 itself only
// changes on the edge where BCM wraps, so it can be sampled combinationally.
// Which BCM states are decoded (5 and 6) and the synchronous reset of the
// flip-flops are worked out here from that make-up and the one-cycle-per-DFF
// look-ahead principle.
//
// Ports: clk, rst (synchronous, active high, clears all three DFFs), bcm_q,
// scm1_q in; scm1_en, scm2_en out.
// Timing: scm1_en follows bcm_q == 6 one cycle later; the SCM2 pipeline
// follows bcm_q == 5 two cycles later.
module sam
  import pcnt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  bcm_state_t  bcm_q,
  input  scm1_state_t scm1_q,
  output logic        scm1_en,
  output logic        scm2_en
);

  logic dec_scm1;     // BCM = 6, one cycle early for SCM1
  logic dec_scm2;     // BCM = 5, two cycles early for SCM2
  logic scm2_pipe_q;  // first DFF of the SCM2 early-overflow chain
  logic scm2_last_q;  // second DFF: BCM = 7 now

  always_comb begin
    dec_scm1 = bcm_q[2] &  bcm_q[1] & ~bcm_q[0];
    dec_scm2 = bcm_q[2] & ~bcm_q[1] &  bcm_q[0];
    scm2_en  = scm2_last_q & scm1_q[1] & scm1_q[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      scm1_en     <= 1'b0;
      scm2_pipe_q <= 1'b0;
      scm2_last_q <= 1'b0;
    end else begin
      scm1_en     <= dec_scm1;
      scm2_pipe_q <= dec_scm2;
      scm2_last_q <= scm2_pipe_q;
    end
  end

endmodule
