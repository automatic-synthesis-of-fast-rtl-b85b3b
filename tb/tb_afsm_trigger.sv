// tb_afsm_trigger -- checks that the trigger box delivers a true and an
// inverted copy of every input, for random input vectors at N = 3 and N = 8.
module tb_afsm_trigger;
  logic [2:0] x3, t3, n3;
  logic [7:0] x8, t8, n8;
  int checks = 0, failures = 0;

  afsm_trigger #(.N(3)) dut3 (.x(x3), .x_t(t3), .x_n(n3));
  afsm_trigger #(.N(8)) dut8 (.x(x8), .x_t(t8), .x_n(n8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      x3 = 3'($urandom);
      x8 = 8'($urandom);
      #1;
      for (int k = 0; k < 3; k++) begin
        checks += 2;
        if (t3[k] != x3[k]) failures++;
        if (n3[k] == x3[k]) failures++;
      end
      for (int k = 0; k < 8; k++) begin
        checks += 2;
        if (t8[k] != x8[k]) failures++;
        if (n8[k] == x8[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
