// meat_examples_top -- the example circuits of the MEAT self-timed control
// synthesis paper, side by side.
//
// The paper illustrates its burst-mode asynchronous state machine style with
// separate small circuits that do not form one system. This top places each
// of them, with its own ports:
//   sb_*   sbuf_send_ctl, the Post Office send-buffer controller (trigger,
//          state, output and driver boxes)
//   ce_*   c_element, the static C-element c = ab + ac + bc
//   sd_*   sendr_done, the Sendr-Done machine with its d-trio hazard removed
//   ff_*   async_dff, the burst-mode D flip-flop
//   arb_*  the NAKing arbiter: raw requests pass a sequencer (ME element,
//          AND gates, latches) so that the SIC arbiter machine sees one change
//          at a time; the sequencer enable is tied high (the arbiter settles
//          within zero delay in this RTL), this design's choice.
// A single active-high rst clears every state variable. There is no clock:
// every block is self-timed and responds to its input changes. The state of
// each block is held in combinational feedback loops (its state variables and
// latches); the loop warnings tools report for this top come from those and
// are intended.
module meat_examples_top (
  input  logic       rst,
  // sbuf_send_ctl
  input  logic       sb_deliver,
  input  logic       sb_begin_send,
  input  logic       sb_ack_send,
  output logic       sb_latch_addr,
  output logic       sb_idle_bar,
  output logic       sb_send_pkt,
  output logic [1:0] sb_state,
  // C-element
  input  logic       ce_a,
  input  logic       ce_b,
  output logic       ce_c,
  // Sendr-Done
  input  logic       sd_req_s,
  input  logic       sd_w8,
  output logic       sd_done,
  output logic       sd_state,
  // D flip-flop
  input  logic       ff_d,
  input  logic       ff_clk,
  output logic       ff_q,
  // NAKing arbiter behind its sequencer
  input  logic       arb_r1,
  input  logic       arb_r2,
  output logic       arb_a1,
  output logic       arb_a2,
  output logic       arb_n1,
  output logic       arb_n2
);
  sbuf_send_ctl u_sbuf_send_ctl (
    .rst       (rst),
    .deliver   (sb_deliver),
    .begin_send(sb_begin_send),
    .ack_send  (sb_ack_send),
    .latch_addr(sb_latch_addr),
    .idle_bar  (sb_idle_bar),
    .send_pkt  (sb_send_pkt),
    .y         (sb_state)
  );

  c_element u_c_element (
    .a(ce_a),
    .b(ce_b),
    .c(ce_c)
  );

  sendr_done u_sendr_done (
    .rst  (rst),
    .req_s(sd_req_s),
    .w8   (sd_w8),
    .done (sd_done),
    .y    (sd_state)
  );

  async_dff u_async_dff (
    .rst(rst),
    .d  (ff_d),
    .clk(ff_clk),
    .q  (ff_q)
  );

  logic s1, s2;
  sequencer u_sequencer (
    .rst(rst),
    .en (1'b1),
    .r1 (arb_r1),
    .r2 (arb_r2),
    .s1 (s1),
    .s2 (s2)
  );

  naking_arbiter u_naking_arbiter (
    .rst(rst),
    .r1 (s1),
    .r2 (s2),
    .a1 (arb_a1),
    .a2 (arb_a2),
    .n1 (arb_n1),
    .n2 (arb_n2)
  );
endmodule
