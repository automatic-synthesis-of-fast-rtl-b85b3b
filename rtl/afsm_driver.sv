// afsm_driver -- driver block of an asynchronous (self-timed) state machine.
//
// MEAT complex gates produce their outputs in negative logic (low = asserted).
// The driver block inverts each one to positive logic for the machine's
// environment; the inverter's gain also lets it be sized for the output load
// and isolates any internal fork of a state variable from the outside world.
//
// Interface: z_n are the negative-logic outputs of the output box, z the
// positive-logic machine outputs. Combinational, zero delay in this RTL;
// transistor sizing and buffer trees are not modelled. The width N is a
// parameter of this design (3 = the outputs of sbuf_send_ctl).
module afsm_driver #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] z_n,
  output logic [N-1:0] z
);
  assign z = ~z_n;
endmodule
