// jk_ff: positive-edge JK flip-flop, the storage element of every counting
// module (BCM, SCM1, SCM2).
//
// On each rising clock edge: J=0,K=0 holds, J=0,K=1 clears, J=1,K=0 sets and
// J=1,K=1 toggles, i.e. q_next = (j & ~q) | (~k & q). A synchronous,
// active-high reset clears q and takes priority over J and K. Using JK
// flip-flops for the counting modules follows the design; the reset is this
// implementation's choice.
//
// Ports: clk, rst, j, k in; q out. q changes only on the rising edge of clk.
module jk_ff (
  input  logic clk,
  input  logic rst,
  input  logic j,
  input  logic k,
  output logic q
);

  always_ff @(posedge clk) begin
    if (rst) q <= 1'b0;
    else     q <= (j & ~q) | (~k & q);
  end

endmodule
