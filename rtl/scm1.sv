// scm1: first Subsequent Counting Module, a 2-bit parallel synchronous binary
// up counter of JK flip-flops holding count bits 4..3 of the 8-bit counter.
//
// The module advances by one on a rising clock edge when en is high and
// holds otherwise. en comes from a D flip-flop in the state anticipation
// module, so it is already stable at the start of the cycle: no decode of
// the lower bits sits in front of these flip-flops. Bit 0 toggles with
// J=K=en, bit 1 with J=K=en&q0.
//
// Ports: clk, rst (synchronous, active high), en, q[1:0].
// Timing: q changes on the edge that ends a cycle in which en was high.
// The width and JK construction follow the design; the reset is this
// implementation's choice.
module scm1
  import pcnt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output scm1_state_t q
);

  scm1_state_t t;  // toggle condition of each bit

  always_comb begin
    t[0] = en;
    t[1] = en & q[0];
  end

  for (genvar i = 0; i < SCM1_W; i++) begin : g_bit
    jk_ff u_ff (.clk(clk), .rst(rst), .j(t[i]), .k(t[i]), .q(q[i]));
  end

endmodule
