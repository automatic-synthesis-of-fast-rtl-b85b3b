// tb_meat_examples_top -- end-to-end test of all example circuits in the top.
//
// The top has no parameters, so this test runs the design at its only size.
// After one reset, five independent environments run in parallel, each
// against its own reference model:
//   - sbuf_send_ctl: random walk over the burst-mode state graph, burst
//     inputs in random order, outputs checked mid-burst and after each burst;
//   - c_element: random input changes against a hold/follow model;
//   - sendr_done: single input changes against its flow table;
//   - async_dff: D set while Clk low, Clk rise, D changed while Clk high;
//   - arbiter: two 4-phase clients request at random (often in the same time
//     step); a client that sees its NAK withdraws, one that sees its grant
//     holds it a while and releases. Grants must be exclusive, a NAK must
//     only answer a request while the other side owns the arbiter, and every
//     request must be answered.
// Each mechanism is counted: every arc of the send-buffer graph, both orders
// of its concurrent burst, C-element holds, Done pulses, flip-flop rises and
// falls, grants, NAKs, waits and same-step request pairs through the
// sequencer. A mechanism that never happened is a failure.
module tb_meat_examples_top;
  logic rst;
  logic sb_deliver, sb_begin_send, sb_ack_send, sb_latch_addr, sb_idle_bar, sb_send_pkt;
  logic [1:0] sb_state;
  logic ce_a, ce_b, ce_c;
  logic sd_req_s, sd_w8, sd_done, sd_state;
  logic ff_d, ff_clk, ff_q;
  logic arb_r1, arb_r2, arb_a1, arb_a2, arb_n1, arb_n2;

  int checks = 0, failures = 0;

  meat_examples_top dut (.*);

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // ---------------- sbuf_send_ctl ----------------
  localparam logic [2:0] SB_OUTS [8] = '{3'b000, 3'b110, 3'b110, 3'b010,
                                         3'b011, 3'b010, 3'b011, 3'b110};
  int sb_arcs [9];
  int sb_orders [2];

  task automatic sb_check(int s);
    checks++;
    if ({sb_latch_addr, sb_idle_bar, sb_send_pkt} !== SB_OUTS[s])
      fail($sformatf("sbuf state %0d outputs %b%b%b", s, sb_latch_addr, sb_idle_bar, sb_send_pkt));
  endtask

  task automatic sb_burst(logic [2:0] mask, int src, int dst);
    logic [2:0] left;
    left = mask;
    while (left != 0) begin
      int k;
      k = $urandom_range(2);
      if (left[k]) begin
        if (src == 6 && left == 3'b101) sb_orders[k == 0 ? 0 : 1]++;
        case (k)
          0: sb_deliver = ~sb_deliver;
          1: sb_begin_send = ~sb_begin_send;
          default: sb_ack_send = ~sb_ack_send;
        endcase
        left[k] = 1'b0;
        #7;
        if (left != 0) sb_check(src);
      end
    end
    sb_check(dst);
  endtask

  task automatic run_sbuf(int n);
    int s;
    s = 0;
    for (int i = 0; i < n; i++) begin
      case (s)
        0: begin sb_burst(3'b001, 0, 1); sb_arcs[0]++; s = 1; end
        1: begin sb_burst(3'b001, 1, 2); sb_arcs[1]++; s = 2; end
        2: begin sb_burst(3'b010, 2, 3); sb_arcs[2]++; s = 3; end
        3: begin sb_burst(3'b010, 3, 4); sb_arcs[3]++; s = 4; end
        4: if ($urandom_range(1) == 0) begin
             sb_burst(3'b100, 4, 5); sb_arcs[4]++; s = 5;
           end else begin
             sb_burst(3'b001, 4, 6); sb_arcs[6]++; s = 6;
           end
        5: begin sb_burst(3'b100, 5, 0); sb_arcs[5]++; s = 0; end
        6: begin sb_burst(3'b101, 6, 7); sb_arcs[7]++; s = 7; end
        default: begin sb_burst(3'b100, 7, 2); sb_arcs[8]++; s = 2; end
      endcase
    end
  endtask

  // ---------------- c_element ----------------
  int ce_holds = 0;
  task automatic run_celem(int n);
    logic c_ref;
    c_ref = 0;
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(1) == 0) ce_a = ~ce_a; else ce_b = ~ce_b;
      if (ce_a == ce_b) c_ref = ce_a; else ce_holds++;
      #5;
      checks++;
      if (ce_c !== c_ref) fail("C-element output");
    end
  endtask

  // ---------------- sendr_done ----------------
  localparam logic SD_NEXT [8] = '{0, 0, 0, 1, 0, 1, 0, 1};
  localparam logic SD_DONE [8] = '{0, 0, 0, 0, 0, 1, 0, 0};
  int sd_pulses = 0;
  task automatic run_sendr(int n);
    logic y_ref;
    y_ref = 0;
    for (int i = 0; i < n; i++) begin
      logic prev_done;
      prev_done = SD_DONE[{y_ref, sd_w8, sd_req_s}];
      if ($urandom_range(1) == 0) begin
        if (!(y_ref && sd_w8 && sd_req_s)) sd_req_s = ~sd_req_s;
      end else begin
        sd_w8 = ~sd_w8;
      end
      y_ref = SD_NEXT[{y_ref, sd_w8, sd_req_s}];
      if (SD_DONE[{y_ref, sd_w8, sd_req_s}] && !prev_done) sd_pulses++;
      #6;
      checks++;
      if (sd_state !== y_ref || sd_done !== SD_DONE[{y_ref, sd_w8, sd_req_s}])
        fail("Sendr-Done state or Done");
    end
  endtask

  // ---------------- async_dff ----------------
  int ff_rises = 0, ff_falls = 0;
  task automatic run_dff(int n);
    logic q_ref;
    q_ref = 0;
    for (int i = 0; i < n; i++) begin
      ff_d = 1'($urandom);
      #4 ff_clk = 1;
      if (ff_d && !q_ref) ff_rises++;
      if (!ff_d && q_ref) ff_falls++;
      q_ref = ff_d;
      #4;
      checks++;
      if (ff_q !== q_ref) fail("flip-flop capture");
      ff_d = 1'($urandom);
      #4 ff_clk = 0;
      #4;
      checks++;
      if (ff_q !== q_ref) fail("flip-flop hold");
    end
  endtask

  // ---------------- arbiter behind the sequencer ----------------
  int arb_grants [2], arb_naks [2], arb_waits = 0, arb_ties = 0, arb_served [2];
  logic arb_running = 0;

  // Exclusion and NAK rules, checked at every output change.
  always @(arb_a1 or arb_a2 or arb_n1 or arb_n2) if (arb_running) begin
    checks++;
    if (arb_a1 && arb_a2) fail("both grants");
    if (arb_n1 && arb_a1) fail("grant and NAK to side 1");
    if (arb_n2 && arb_a2) fail("grant and NAK to side 2");
  end
  // A NAK while the other side's grant is low is a wait state.
  always @(posedge arb_a1 or posedge arb_a2) if (arb_running) begin
    if (arb_a1 && arb_n2) arb_waits++;
    if (arb_a2 && arb_n1) arb_waits++;
  end

  task automatic arb_client1(int n);
    for (int i = 0; i < n; i++) begin
      #($urandom_range(8));
      arb_r1 = 1;
      wait (arb_a1 || arb_n1);
      arb_served[0]++;
      if (arb_a1) begin
        arb_grants[0]++;
        #($urandom_range(1, 12));
        arb_r1 = 0;
        wait (!arb_a1);
      end else begin
        arb_naks[0]++;
        #($urandom_range(1, 4));
        arb_r1 = 0;
        wait (!arb_n1);
      end
    end
  endtask

  task automatic arb_client2(int n);
    for (int i = 0; i < n; i++) begin
      #($urandom_range(8));
      arb_r2 = 1;
      wait (arb_a2 || arb_n2);
      arb_served[1]++;
      if (arb_a2) begin
        arb_grants[1]++;
        #($urandom_range(1, 12));
        arb_r2 = 0;
        wait (!arb_a2);
      end else begin
        arb_naks[1]++;
        #($urandom_range(1, 4));
        arb_r2 = 0;
        wait (!arb_n2);
      end
    end
  endtask

  // Same-step request pairs: both requests rise in one time step.
  time t_r1 = 0, t_r2 = 1;
  always @(posedge arb_r1) begin t_r1 = $time; if (t_r1 == t_r2) arb_ties++; end
  always @(posedge arb_r2) begin t_r2 = $time; if (t_r1 == t_r2) arb_ties++; end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    sb_deliver = 0; sb_begin_send = 0; sb_ack_send = 0;
    ce_a = 0; ce_b = 0;
    sd_req_s = 0; sd_w8 = 0;
    ff_d = 0; ff_clk = 0;
    arb_r1 = 0; arb_r2 = 0;
    #10 rst = 0;
    #10;
    checks++;
    if ({sb_latch_addr, sb_idle_bar, sb_send_pkt, ce_c, sd_done, ff_q,
         arb_a1, arb_a2, arb_n1, arb_n2} !== '0)
      fail("outputs after reset");
    arb_running = 1;
    fork
      run_sbuf(2000);
      run_celem(2000);
      run_sendr(2000);
      run_dff(1000);
      arb_client1(1500);
      arb_client2(1500);
    join
    arb_running = 0;

    // Coverage of every mechanism.
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (sb_arcs[k] == 0) fail($sformatf("sbuf arc %0d never taken", k));
    end
    checks++; if (sb_orders[0] == 0 || sb_orders[1] == 0) fail("concurrent burst orders");
    checks++; if (ce_holds == 0) fail("C-element never held");
    checks++; if (sd_pulses == 0) fail("no Done pulse");
    checks++; if (ff_rises == 0 || ff_falls == 0) fail("flip-flop never toggled both ways");
    checks++; if (arb_grants[0] == 0 || arb_grants[1] == 0) fail("grant missing");
    checks++; if (arb_naks[0] == 0 || arb_naks[1] == 0) fail("NAK missing");
    checks++; if (arb_waits == 0) fail("no re-grant while the other side is NAKed");
    checks++; if (arb_ties == 0) fail("no same-step request pair");
    checks++; if (arb_served[0] != 1500 || arb_served[1] != 1500) fail("requests unanswered");
    $display("sbuf arcs %p, burst orders %p", sb_arcs, sb_orders);
    $display("C-element holds %0d, Done pulses %0d, FF rises %0d falls %0d",
             ce_holds, sd_pulses, ff_rises, ff_falls);
    $display("arbiter grants %p naks %p waits %0d same-step pairs %0d",
             arb_grants, arb_naks, arb_waits, arb_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
