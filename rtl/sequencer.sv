// sequencer -- turns concurrent request changes into single input changes.
//
// A single-input-change state machine such as the NAKing arbiter may not see
// two of its inputs change together. The sequencer sits between the raw
// requests r1/r2 and the machine. It keeps a latched copy s1/s2 of each
// request. A request whose copy is out of date (ri != si) asks a mutual
// exclusion element for a turn, gated by the enable en; the grant opens that
// request's transparent latch (si := ri), which removes the difference, drops
// the ME request and releases the grant. A second pending change is then
// granted in turn. So s1 and s2 never change at the same moment, however r1
// and r2 move.
//
// The paper says only that a sequencer is made of ME gates, AND gates and
// latches with an input enabling the next transition; this arrangement of
// them is this design's own. The ME is the behavioural model mutex; its grant
// delay spaces the passed changes in time. The latches are hazard-free
// feedback equations (s = g*r + g'*s + r*s, cleared by rst, active high), so
// the combinational loops tools report here are the storage.
//
// Interface: rst, en, r1, r2 in; s1, s2 out. Each change of ri reaches si one
// ME grant delay after it is enabled and wins arbitration.
module sequencer (
  input  logic rst,
  input  logic en,
  input  logic r1,
  input  logic r2,
  output logic s1,
  output logic s2
);
  logic pend1, pend2, g1, g2;

  // AND gates: a change is offered to the ME only when enabled.
  assign pend1 = (r1 ^ s1) & en;
  assign pend2 = (r2 ^ s2) & en;

  mutex u_me (
    .r1(pend1),
    .r2(pend2),
    .g1(g1),
    .g2(g2)
  );

  // Latches, transparent while granted.
  assign s1 = ~rst & ((g1 & r1) | (~g1 & s1) | (r1 & s1));
  assign s2 = ~rst & ((g2 & r2) | (~g2 & s2) | (r2 & s2));
endmodule
