// tb_c_element -- self-checking test of the static C-element.
//
// A reference model (output follows the inputs when they agree, else holds)
// is stepped alongside the circuit. 2000 random single or double input
// changes are applied, 10 time units apart, and the output is compared after
// each. A watchdog ends the run with a failure if it does not finish.
module tb_c_element;
  logic a, b, c;
  logic c_ref;
  int checks = 0, failures = 0;
  int holds = 0, rises = 0, falls = 0;

  c_element dut (.a(a), .b(b), .c(c));

  task automatic check();
    checks++;
    if (c !== c_ref) begin
      failures++;
      $display("FAIL t=%0t a=%b b=%b c=%b expected %b", $time, a, b, c, c_ref);
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
    a = 0; b = 0; c_ref = 0;
    #10 check();
    for (int i = 0; i < 2000; i++) begin
      logic prev;
      prev = c_ref;
      case ($urandom_range(2))
        0: a = ~a;
        1: b = ~b;
        default: begin a = ~a; b = ~b; end
      endcase
      if (a == b) c_ref = a;
      if (c_ref == prev && a != b) holds++;
      if (c_ref && !prev) rises++;
      if (!c_ref && prev) falls++;
      #10 check();
    end
    if (holds == 0 || rises == 0 || falls == 0) begin
      failures++;
      $display("coverage gap holds=%0d rises=%0d falls=%0d", holds, rises, falls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
