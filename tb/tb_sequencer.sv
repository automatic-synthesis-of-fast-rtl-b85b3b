// tb_sequencer -- test of the request sequencer.
//
// The raw requests are changed at random, often both in the same time step.
// Checked: s1 and s2 never change in the same time step; every change reaches
// its output (after the burst settles s1 == r1 and s2 == r2); nothing passes
// while en is low, and the held changes pass once en returns high.
module tb_sequencer;
  logic rst, en, r1, r2, s1, s2;
  int checks = 0, failures = 0;
  int concurrent = 0;
  time t_s1, t_s2;

  sequencer dut (.rst(rst), .en(en), .r1(r1), .r2(r2), .s1(s1), .s2(s2));

  always @(s1) t_s1 = $time;
  always @(s2) t_s2 = $time;
  always @(s1 or s2) begin
    if (!rst && $time > 0) begin
      checks++;
      if (t_s1 == t_s2) begin
        failures++;
        $display("FAIL t=%0t s1 and s2 changed together", $time);
      end
    end
  end

  task automatic expect_s(logic e1, logic e2, string what);
    checks++;
    if (s1 !== e1 || s2 !== e2) begin
      failures++;
      $display("FAIL t=%0t %s: s=%b%b expected %b%b", $time, what, s1, s2, e1, e2);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_s1 = 0; t_s2 = 1;
    rst = 1; en = 1; r1 = 0; r2 = 0;
    #10 rst = 0;
    #10 expect_s(0, 0, "after reset");
    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(2))
        0: r1 = ~r1;
        1: r2 = ~r2;
        default: begin r1 = ~r1; r2 = ~r2; concurrent++; end
      endcase
      #10 expect_s(r1, r2, "settled");
    end
    // Enable low holds changes back.
    en = 0;
    r1 = ~r1; r2 = ~r2;
    #10 expect_s(~r1, ~r2, "held while en low");
    en = 1;
    #10 expect_s(r1, r2, "passed after en high");
    checks++;
    if (concurrent == 0) failures++;
    $display("concurrent request changes: %0d", concurrent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
