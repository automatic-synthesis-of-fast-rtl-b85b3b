// async_dff -- asynchronous D flip-flop specified as a burst-mode machine.
//
// The paper introduces its specification style with a D flip-flop whose
// bursts are {D-, Clk+} / Q- and {D+, Clk+} / Q+, with Clk- returning
// without output change; inputs and output start at zero. Clk here is a
// handshake input of a self-timed circuit, not a global clock. The function
// is: on a rising Clk, Q takes the value D has at that moment; Q holds while
// Clk is high and while Clk is low.
//
// The implementation is this design's own (the paper does not print the
// synthesised equations): two hazard-free latch equations, each a sum of
// products with its consensus term so that no single input change can
// glitch the held value:
//   M = D*Clk' + M*Clk + M*D      (follows D while Clk is low)
//   Q = M*Clk  + Q*Clk' + Q*M     (follows M while Clk is high)
// Both are combinational feedback loops, which is how the state is stored;
// rst (active high) forces M and Q to 0, the ':init-out' value.
//
// Interface: rst, d, clk in; q out. Zero delay. D must be stable around the
// rising Clk (burst mode: the D change belongs to the burst before Clk+).
module async_dff (
  input  logic rst,
  input  logic d,
  input  logic clk,
  output logic q
);
  logic m;

  assign m = ~rst & ((d & ~clk) | (m & clk) | (m & d));
  assign q = ~rst & ((m & clk) | (q & ~clk) | (q & m));
endmodule
