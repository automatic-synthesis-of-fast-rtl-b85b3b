// afsm_trigger -- trigger box of an asynchronous (self-timed) state machine.
//
// In the MEAT partition of a state machine (trigger -> state -> output ->
// driver) the trigger box is the only place where machine inputs are
// conditioned. Every input is buffered once (the paper uses an inverter or a
// Schmitt trigger for slow, heavily loaded inputs) and, where the state or
// output logic needs the unasserted polarity, inverted once. The one true copy
// and the one inverted copy are shared by all logic of the machine, so any
// fork on an input stays inside the machine.
//
// Interface: x is the raw input vector, x_t the buffered true copy, x_n the
// shared complement. Purely combinational, zero delay in this RTL; the
// electrical part (Schmitt trigger, sizing) is not modelled. The width N is a
// parameter of this design (3 = the inputs of sbuf_send_ctl).
module afsm_trigger #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] x_t,
  output logic [N-1:0] x_n
);
  assign x_t = x;
  assign x_n = ~x;
endmodule
