// scm2: second Subsequent Counting Module, a 3-bit parallel synchronous
// binary up counter of JK flip-flops holding count bits 7..5 of the 8-bit
// counter.
//
// The module advances by one on a rising clock edge when en is high and
// holds otherwise. en is produced by the state anticipation module from a
// two-stage D flip-flop pipeline and the SCM1 state. Bit 0 toggles with
// J=K=en, bit 1 with J=K=en&q0, bit 2 with J=K=en&q0&q1.
//
// Ports: clk, rst (synchronous, active high), en, q[2:0].
// Timing: q changes on the edge that ends a cycle in which en was high.
// The width and JK construction follow the design; the reset is this
// implementation's choice.
module scm2
  import pcnt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output scm2_state_t q
);

  scm2_state_t t;  // toggle condition of each bit

  always_comb begin
    t[0] = en;
    t[1] = en & q[0];
    t[2] = en & q[0] & q[1];
  end

  for (genvar i = 0; i < SCM2_W; i++) begin : g_bit
    jk_ff u_ff (.clk(clk), .rst(rst), .j(t[i]), .k(t[i]), .q(q[i]));
  end

endmodule
