// tb_mutex -- test of the mutual exclusion element model.
//
// Random 4-phase request sequences on both sides (a side raises its request,
// waits for its grant, holds it a random time, then releases). Checked
// continuously: the grants are never both high. Checked per grant: it
// arrives within the grant delay plus the other side's hold time, and only
// while requested. Also directed: a tie goes to r1, and a request arriving
// while the other side holds the grant waits for the release.
module tb_mutex;
  logic r1, r2, g1, g2;
  int checks = 0, failures = 0;
  int ties = 0, waits = 0, served1 = 0, served2 = 0;

  mutex #(.GRANT_DELAY(1)) dut (.r1(r1), .r2(r2), .g1(g1), .g2(g2));

  always @(g1 or g2) begin
    if ($time > 0) checks++;
    if (g1 && g2) begin
      failures++;
      $display("FAIL t=%0t both grants high", $time);
    end
  end

  task automatic expect_grants(logic e1, logic e2, string what);
    checks++;
    if (g1 !== e1 || g2 !== e2) begin
      failures++;
      $display("FAIL t=%0t %s: g1=%b g2=%b expected %b %b", $time, what, g1, g2, e1, e2);
    end
  endtask

  task automatic client1();
    for (int i = 0; i < 300; i++) begin
      #($urandom_range(20));
      r1 = 1;
      wait (g1);
      served1++;
      #($urandom_range(1, 10));
      r1 = 0;
      wait (!g1);
    end
  endtask

  task automatic client2();
    for (int i = 0; i < 300; i++) begin
      #($urandom_range(20));
      r2 = 1;
      wait (g2);
      served2++;
      #($urandom_range(1, 10));
      r2 = 0;
      wait (!g2);
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
    r1 = 0; r2 = 0;
    #10 expect_grants(0, 0, "idle");
    // Tie: both requests in the same step.
    r1 = 1; r2 = 1;
    #5 expect_grants(1, 0, "tie goes to r1"); ties++;
    r1 = 0;
    #5 expect_grants(0, 1, "r2 served after r1 releases"); waits++;
    r2 = 0;
    #5 expect_grants(0, 0, "both released");
    // r2 first, r1 must wait.
    r2 = 1;
    #5 expect_grants(0, 1, "r2 alone");
    r1 = 1;
    #5 expect_grants(0, 1, "r1 waits while g2 held"); waits++;
    r2 = 0;
    #5 expect_grants(1, 0, "r1 served after r2 releases");
    r1 = 0;
    #5 expect_grants(0, 0, "both released");
    fork
      client1();
      client2();
    join
    checks++;
    if (served1 != 300 || served2 != 300) begin
      failures++;
      $display("served %0d/%0d", served1, served2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
