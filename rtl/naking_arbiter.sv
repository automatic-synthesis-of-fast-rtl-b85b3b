// naking_arbiter -- NAKing arbiter, a single-input-change (SIC) asynchronous
// state machine.
//
// Two clients request with r1 / r2. From idle the first request is granted
// (a1 or a2). While one side holds the grant, a request from the other side is
// answered with a negative acknowledge (n2 or n1), which follows that request
// up and down. When the holder releases while the other side is still being
// NAKed, the machine waits in a "wait" state (grant low, NAK still high)
// until the NAKed request is withdrawn; if the previous holder requests again
// meanwhile, it is granted again. State graph (side 1; side 2 mirrors it):
//   idle  --r1+ / a1+ ------------> grant1
//   grant1 --r2+ / n2+, r2- / n2- (stays in grant1)
//   grant1 --r1- with r2 low / a1- --> idle
//   grant1 --r1- with r2 high / a1- --> wait1
//   wait1 --r1+ / a1+ --> grant1,  wait1 --r2- / n2- --> idle
//
// The state graph follows the paper. The state assignment and equations are
// this design's own: X1 marks "side 1 owns the arbiter" (grant1, wait1), X2
// likewise for side 2:
//   X1 = r1*X2' + X1*r1 + X1*r2      X2 = r2*X1' + X2*r2 + X2*r1
//   a1 = X1*r1   n2 = X1*r2          a2 = X2*r2   n1 = X2*r1
// X1 and X2 are combinational feedback loops (the machine's storage, so loop
// warnings are expected); rst (active high) clears both, giving idle.
//
// Timing: zero delay; the inputs must change one at a time with the machine
// settled in between (SIC). Concurrent requests must pass a sequencer first.
module naking_arbiter (
  input  logic rst,
  input  logic r1,
  input  logic r2,
  output logic a1,
  output logic a2,
  output logic n1,
  output logic n2
);
  logic x1, x2, x1_gate_n, x2_gate_n;

  assign x1_gate_n = ~((r1 & ~x2) | (x1 & r1) | (x1 & r2));
  assign x2_gate_n = ~((r2 & ~x1) | (x2 & r2) | (x2 & r1));
  assign x1 = ~(x1_gate_n | rst);
  assign x2 = ~(x2_gate_n | rst);

  assign a1 = x1 & r1;
  assign n2 = x1 & r2;
  assign a2 = x2 & r2;
  assign n1 = x2 & r1;
endmodule
