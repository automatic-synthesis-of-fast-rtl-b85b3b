// tb_naking_arbiter -- test of the NAKing arbiter machine against its state
// graph.
//
// The reference is the five-state graph (idle, grant1, wait1, grant2, wait2)
// with its outputs, written as an enum-driven model. Single input changes are
// applied at random, 10 time units apart, as a SIC environment would; the
// four outputs are compared after each. Grant, NAK and wait events on both
// sides are counted and must all occur.
module tb_naking_arbiter;
  typedef enum logic [2:0] {IDLE, GRANT1, WAIT1, GRANT2, WAIT2} arb_state_e;

  logic rst, r1, r2, a1, a2, n1, n2;
  arb_state_e st;
  int checks = 0, failures = 0;
  int grants1 = 0, grants2 = 0, naks1 = 0, naks2 = 0, waits1 = 0, waits2 = 0;

  naking_arbiter dut (.rst(rst), .r1(r1), .r2(r2), .a1(a1), .a2(a2), .n1(n1), .n2(n2));

  function automatic logic [3:0] outs(arb_state_e s, logic q1, logic q2);
    // {a1, a2, n1, n2}
    case (s)
      GRANT1:  return {1'b1, 1'b0, 1'b0, q2};
      WAIT1:   return 4'b0001;
      GRANT2:  return {1'b0, 1'b1, q1, 1'b0};
      WAIT2:   return 4'b0010;
      default: return 4'b0000;
    endcase
  endfunction

  task automatic check();
    logic [3:0] e;
    e = outs(st, r1, r2);
    checks++;
    if ({a1, a2, n1, n2} !== e) begin
      failures++;
      $display("FAIL t=%0t state=%s r1=%b r2=%b out=%b expected %b",
               $time, st.name(), r1, r2, {a1, a2, n1, n2}, e);
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
    rst = 1; r1 = 0; r2 = 0; st = IDLE;
    #10 rst = 0;
    #10 check();
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(1) == 0) r1 = ~r1;
      else                        r2 = ~r2;
      case (st)
        IDLE:   if (r1) begin st = GRANT1; grants1++; end
                else if (r2) begin st = GRANT2; grants2++; end
        GRANT1: if (!r1) begin
                  if (r2) begin st = WAIT1; waits1++; end else st = IDLE;
                end else if (r2) naks2++;
        WAIT1:  if (r1) begin st = GRANT1; grants1++; end
                else if (!r2) st = IDLE;
        GRANT2: if (!r2) begin
                  if (r1) begin st = WAIT2; waits2++; end else st = IDLE;
                end else if (r1) naks1++;
        default: if (r2) begin st = GRANT2; grants2++; end
                 else if (!r1) st = IDLE;
      endcase
      #10 check();
    end
    checks++;
    if (grants1 == 0 || grants2 == 0 || naks1 == 0 || naks2 == 0 || waits1 == 0 || waits2 == 0) begin
      failures++;
      $display("coverage gap");
    end
    $display("grants %0d/%0d naks %0d/%0d waits %0d/%0d", grants1, grants2, naks1, naks2, waits1, waits2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
