// c_element -- Muller C-element built as a single static complex gate.
//
// The output rises when both inputs are high, falls when both are low and
// otherwise keeps its value. Instead of a dynamic node kept alive by a weak
// "trickle" inverter, the paper's version is the majority function with its
// own output fed back as the third input:
//
//     c = a*b + a*c + b*c
//
// This equation is exactly what the MEAT tool synthesises for a C-element, and
// it is the hand-optimised static C-element of the paper. The feedback of c
// into its own gate is the storage: the combinational loop reported by lint
// and synthesis tools is intended and is how this asynchronous element holds
// state. There is no reset (none is described); c is defined as soon as
// a == b.
//
// Interface: inputs a, b; output c. Zero delay in this RTL.
module c_element (
  input  logic a,
  input  logic b,
  output logic c
);
  assign c = (a & b) | (a & c) | (b & c);
endmodule
