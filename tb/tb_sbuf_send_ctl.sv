// tb_sbuf_send_ctl -- burst-mode test of the send-buffer controller.
//
// The reference is the state graph itself (states 0..7, written out in the
// tables below), not the synthesised equations. The test walks the graph at
// random for 3000 bursts. Each burst's input changes are applied one at a
// time in random order, 10 time units apart: after every change that leaves
// the burst incomplete the outputs must still be those of the source state
// (the machine must wait for the whole burst), and after the last change
// they must be those of the destination state, with the state code of the
// merged-state assignment. In state 4 the branch to 5 or 6 is chosen at
// random. Each arc is counted and an arc never taken is a failure.
module tb_sbuf_send_ctl;
  logic rst, deliver, begin_send, ack_send;
  logic latch_addr, idle_bar, send_pkt;
  logic [1:0] y;
  int checks = 0, failures = 0;

  sbuf_send_ctl dut (
    .rst(rst), .deliver(deliver), .begin_send(begin_send), .ack_send(ack_send),
    .latch_addr(latch_addr), .idle_bar(idle_bar), .send_pkt(send_pkt), .y(y)
  );

  // Outputs {latch_addr, idle_bar, send_pkt} of each state of the graph.
  localparam logic [2:0] OUTS [8] = '{3'b000, 3'b110, 3'b110, 3'b010,
                                      3'b011, 3'b010, 3'b011, 3'b110};
  // Merged-state code {Y1,Y0}: (0 5)=00, (1 2 7)=10, (3 4)=01, (6)=11.
  localparam logic [1:0] CODE [8] = '{2'b00, 2'b10, 2'b10, 2'b01,
                                      2'b01, 2'b00, 2'b11, 2'b10};

  int arc_count [9];  // 0:0-1 1:1-2 2:2-3 3:3-4 4:4-5 5:5-0 6:4-6 7:6-7 8:7-2
  int mic_order [2];  // arc 6-7: deliver first / ack first

  task automatic check_state(int s, string what);
    checks++;
    if ({latch_addr, idle_bar, send_pkt} !== OUTS[s] || y !== CODE[s]) begin
      failures++;
      $display("FAIL t=%0t %s state %0d: outs=%b%b%b y=%b expected %b y=%b",
               $time, what, s, latch_addr, idle_bar, send_pkt, y, OUTS[s], CODE[s]);
    end
  endtask

  // Toggle the inputs in mask (bit0 deliver, bit1 begin_send, bit2 ack_send)
  // one by one in random order; src is the state the burst starts from.
  task automatic burst(logic [2:0] mask, int src, int dst);
    logic [2:0] left;
    left = mask;
    while (left != 0) begin
      int k;
      k = $urandom_range(2);
      if (left[k]) begin
        if (src == 6 && left == 3'b101) mic_order[k == 0 ? 0 : 1]++;
        case (k)
          0: deliver = ~deliver;
          1: begin_send = ~begin_send;
          default: ack_send = ~ack_send;
        endcase
        left[k] = 1'b0;
        #10;
        if (left != 0) check_state(src, "mid-burst");
      end
    end
    check_state(dst, "after burst");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    rst = 1; deliver = 0; begin_send = 0; ack_send = 0;
    #10 rst = 0;
    #10 check_state(0, "after reset");
    s = 0;
    for (int i = 0; i < 3000; i++) begin
      case (s)
        0: begin burst(3'b001, 0, 1); arc_count[0]++; s = 1; end
        1: begin burst(3'b001, 1, 2); arc_count[1]++; s = 2; end
        2: begin burst(3'b010, 2, 3); arc_count[2]++; s = 3; end
        3: begin burst(3'b010, 3, 4); arc_count[3]++; s = 4; end
        4: if ($urandom_range(1) == 0) begin
             burst(3'b100, 4, 5); arc_count[4]++; s = 5;
           end else begin
             burst(3'b001, 4, 6); arc_count[6]++; s = 6;
           end
        5: begin burst(3'b100, 5, 0); arc_count[5]++; s = 0; end
        6: begin burst(3'b101, 6, 7); arc_count[7]++; s = 7; end
        default: begin burst(3'b100, 7, 2); arc_count[8]++; s = 2; end
      endcase
    end
    // Reset from the middle of a cycle returns to state 0.
    rst = 1;
    #10 rst = 0;
    deliver = 0; begin_send = 0; ack_send = 0;
    #10 check_state(0, "after second reset");
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (arc_count[k] == 0) begin
        failures++;
        $display("arc %0d never taken", k);
      end
    end
    checks++;
    if (mic_order[0] == 0 || mic_order[1] == 0) begin
      failures++;
      $display("burst 6-7 not seen in both input orders");
    end
    $display("arcs taken: %p, 6-7 orders %p", arc_count, mic_order);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
