// sbuf_send_ctl -- burst-mode send-buffer controller (a Post Office state
// machine), the worked example of the MEAT synthesis flow.
//
// Behaviour (burst-mode state graph, states 0..7):
//   0 --Deliver+ / Latch-Addr+ IdleBAR+ --> 1 --Deliver- --> 2
//   2 --Begin-Send+ / Latch-Addr- -------> 3 --Begin-Send- / Send-Pkt+ --> 4
//   4 --Ack-Send+ / Send-Pkt- -----------> 5 --Ack-Send- / IdleBAR- --> 0
//   4 --Deliver+ ------------------------> 6
//   6 --{Deliver-, Ack-Send+} / Send-Pkt- Latch-Addr+ --> 7 --Ack-Send- --> 2
// A burst's inputs may change in any order; the machine only moves when the
// whole burst has arrived. Path 4->6->7->2 lets a new Deliver overlap the
// acknowledge of the packet being sent, so the next address is latched
// without passing through idle.
//
// Implementation follows the paper's synthesis result. States are merged
// into (0 5) (1 2 7) (3 4) (6) and coded with two state variables
// {Y1,Y0} = 00, 10, 01, 11. The equations below are the paper's
// minimised sums of products:
//   Y1 = Deliver + Y1*Begin-Send'
//   Y0 = Begin-Send + Y0*Ack-Send' + Y0*Deliver
//   Latch-Addr = Y1*Y0'   IdleBAR = Ack-Send + Begin-Send + Y0 + Y1
//   Send-Pkt   = Y0*Begin-Send'
// They are grouped as in the paper's partition: the trigger box supplies the
// shared complements of the inputs, each state variable is one complex gate
// (negative-logic output) NOR-ed with the reset line, the output box forms
// negative-logic outputs, and the driver block inverts them.
//
// The state variables are combinational feedback loops: that is the storage
// of a self-timed machine, so the loop warnings tools give here are expected.
// Timing: zero delay. The environment must obey burst mode and fundamental
// mode (next burst only after the machine has settled). rst (active high,
// this design's choice of polarity) forces {Y1,Y0} = 00, state 0.
module sbuf_send_ctl (
  input  logic       rst,
  input  logic       deliver,
  input  logic       begin_send,
  input  logic       ack_send,
  output logic       latch_addr,
  output logic       idle_bar,
  output logic       send_pkt,
  output logic [1:0] y
);
  // Trigger box: bit 0 Deliver, bit 1 Begin-Send, bit 2 Ack-Send. No gate
  // of this machine uses Deliver in its unasserted polarity, so x_n[0] is
  // left unused (a real trigger box would simply omit that inverter).
  logic [2:0] x_t, x_n;
  afsm_trigger #(.N(3)) u_trigger (
    .x  ({ack_send, begin_send, deliver}),
    .x_t(x_t),
    .x_n(x_n)
  );

  // State box: one complex gate per state variable, output in negative
  // logic, then NOR with reset (Y = ~(Ybar | rst)).
  logic y1, y0, y1_gate_n, y0_gate_n;
  assign y1_gate_n = ~(x_t[0] | (y1 & x_n[1]));
  assign y0_gate_n = ~(x_t[1] | (y0 & (x_n[2] | x_t[0])));
  assign y1 = ~(y1_gate_n | rst);
  assign y0 = ~(y0_gate_n | rst);

  // Output box: complex gates in negative logic, bit order {Send-Pkt,
  // IdleBAR, Latch-Addr}.
  logic [2:0] z_n, z;
  assign z_n[0] = ~(y1 & ~y0);
  assign z_n[1] = ~(x_t[2] | x_t[1] | y0 | y1);
  assign z_n[2] = ~(y0 & x_n[1]);

  // Driver block.
  afsm_driver #(.N(3)) u_driver (
    .z_n(z_n),
    .z  (z)
  );

  assign latch_addr = z[0];
  assign idle_bar   = z[1];
  assign send_pkt   = z[2];
  assign y          = {y1, y0};
endmodule
