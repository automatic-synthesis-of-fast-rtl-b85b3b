// tb_afsm_driver -- checks that the driver block turns negative-logic
// outputs into positive logic, for random vectors at N = 3 and N = 5.
module tb_afsm_driver;
  logic [2:0] zn3, z3;
  logic [4:0] zn5, z5;
  int checks = 0, failures = 0;

  afsm_driver #(.N(3)) dut3 (.z_n(zn3), .z(z3));
  afsm_driver #(.N(5)) dut5 (.z_n(zn5), .z(z5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      zn3 = 3'($urandom);
      zn5 = 5'($urandom);
      #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (z3[k] == zn3[k]) failures++;
      end
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (z5[k] == zn5[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
