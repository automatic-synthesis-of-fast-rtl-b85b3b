// sendr_done -- the "Sendr-Done" state machine in its d-trio-hazard-free form.
//
// One state variable Y records that W8 has been seen high while Req-S is
// high; it is held while Req-S stays high and cleared when Req-S falls.
// Done is asserted while Y is set and W8 has returned low:
//   Y    = W8*Req-S + Req-S*Y
//   Done = Y*W8'
// In the original logic W8 fed the state gate directly and also, through an
// inverter, the Done gate. When W8 rises (Y=0, Req-S=1) Y is set; if the Done
// gate sees the new Y before it sees W8' fall, Done glitches (a d-trio
// function hazard) and W8 also forms a fork outside the machine. The fix
// reorders the trigger logic: W8 is inverted once, that W8' feeds the Done
// gate, and a second inverter re-creates W8 for the state gate. The Done gate
// therefore always sees W8' change before Y changes, at no cost on the
// critical path, and the only fork of W8 is inside the machine. That
// structure is kept here (w8_n, w8_dd); in zero-delay RTL the two inverters
// are logically a buffer, the ordering they give is a delay property.
//
// Equations are read from the paper's gate drawing and Karnaugh map; gate
// types and the reset (active high, NOR style, Y forced to 0) are this
// design's reading. The loop on Y is the machine's storage and is intended.
//
// Interface: rst, req_s, w8 inputs; done output; y brought out to observe.
module sendr_done (
  input  logic rst,
  input  logic req_s,
  input  logic w8,
  output logic done,
  output logic y
);
  logic w8_n, w8_dd, y_gate_n;

  // Trigger: single inversion for the output logic, double for the state.
  assign w8_n  = ~w8;
  assign w8_dd = ~w8_n;

  // State: complex gate (negative logic) NOR-ed with reset.
  assign y_gate_n = ~((w8_dd & req_s) | (req_s & y));
  assign y        = ~(y_gate_n | rst);

  // Output.
  assign done = y & w8_n;
endmodule
