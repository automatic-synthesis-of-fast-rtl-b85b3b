// tb_async_dff -- test of the burst-mode D flip-flop.
//
// Bursts as in the specification: D is set (changed or not) while Clk is
// low, then Clk rises and Q must equal that D; D then changes at random
// while Clk is high and Q must hold; Clk falls and Q must still hold. A
// reference value is kept by the test.
module tb_async_dff;
  logic rst, d, clk, q, q_ref;
  int checks = 0, failures = 0;
  int ups = 0, downs = 0;

  async_dff dut (.rst(rst), .d(d), .clk(clk), .q(q));

  task automatic check(string what);
    checks++;
    if (q !== q_ref) begin
      failures++;
      $display("FAIL t=%0t %s: d=%b clk=%b q=%b expected %b", $time, what, d, clk, q, q_ref);
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
    rst = 1; d = 0; clk = 0; q_ref = 0;
    #10 rst = 0;
    #10 check("after reset");
    for (int i = 0; i < 1000; i++) begin
      logic nd;
      nd = 1'($urandom);
      d = nd;
      #10 check("D changed, Clk low");
      clk = 1;
      if (nd && !q_ref) ups++;
      if (!nd && q_ref) downs++;
      q_ref = nd;
      #10 check("after Clk rise");
      d = 1'($urandom);
      #10 check("D changed, Clk high");
      clk = 0;
      #10 check("after Clk fall");
    end
    checks++;
    if (ups == 0 || downs == 0) failures++;
    $display("Q rises %0d falls %0d", ups, downs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
