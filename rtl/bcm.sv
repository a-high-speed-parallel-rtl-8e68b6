// bcm: Basic Counting Module, a 3-bit parallel synchronous binary up counter
// built from JK flip-flops. It holds the three low-order bits of the 8-bit
// count and advances on every rising clock edge, wrapping from 7 to 0.
//
// Each flip-flop is in toggle mode (J = K) and toggles when all lower bits
// are 1: J0=K0=1, J1=K1=q0, J2=K2=q0&q1. All three flip-flops share the clock,
// so the module is synchronous ("parallel") rather than rippling. Its state
// also feeds the state anticipation module, which decodes it to enable the
// upper counting modules ahead of time.
//
// Ports: clk, rst (synchronous, active high, clears the count), q[2:0].
// Timing: q increments by one on every clock edge after reset is released.
// The 3-bit width and JK construction follow the design; the free-running
// count (no count-enable input) and the reset are this implementation's choice.
module bcm
  import pcnt_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output bcm_state_t q
);

  bcm_state_t t;  // toggle condition of each bit

  always_comb begin
    t[0] = 1'b1;
    t[1] = q[0];
    t[2] = q[0] & q[1];
  end

  for (genvar i = 0; i < BCM_W; i++) begin : g_bit
    jk_ff u_ff (.clk(clk), .rst(rst), .j(t[i]), .k(t[i]), .q(q[i]));
  end

endmodule
