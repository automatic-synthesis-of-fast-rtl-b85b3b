// tb_sendr_done -- test of the Sendr-Done machine against its flow table.
//
// The reference is the Karnaugh map of the machine written as tables (next
// state and Done for each present state Y and input column {W8,Req-S}), not
// the gate equations. Inputs change one at a time, 10 time units apart, in a
// random walk that avoids the one unspecified entry (Y=1, W8=1, Req-S=0).
// Done is also watched continuously: a Done pulse not predicted by the table
// (a glitch) counts as a failure.
module tb_sendr_done;
  logic rst, req_s, w8, done, y;
  logic y_ref, done_ref;
  int checks = 0, failures = 0;
  int set_cnt = 0, done_cnt = 0, clr_cnt = 0, done_edges = 0;

  sendr_done dut (.rst(rst), .req_s(req_s), .w8(w8), .done(done), .y(y));

  // Index {Y, W8, Req-S}. Next state; entry 6 (Y=1, W8=1, Req-S=0) is
  // unspecified and never visited.
  localparam logic NEXT [8] = '{0, 0, 0, 1, 0, 1, 0, 1};
  localparam logic DONE [8] = '{0, 0, 0, 0, 0, 1, 0, 0};

  always @(done) if (!rst) done_edges++;

  task automatic check();
    checks++;
    if (y !== y_ref || done !== done_ref) begin
      failures++;
      $display("FAIL t=%0t req_s=%b w8=%b y=%b done=%b expected y=%b done=%b",
               $time, req_s, w8, y, done, y_ref, done_ref);
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
    int expected_edges;
    rst = 1; req_s = 0; w8 = 0; y_ref = 0; done_ref = 0;
    #10 rst = 0;
    #10 check();
    expected_edges = 0;
    for (int i = 0; i < 3000; i++) begin
      logic prev_y, prev_done;
      logic [2:0] idx;
      prev_y = y_ref;
      prev_done = done_ref;
      if ($urandom_range(1) == 0) begin
        if (y_ref && w8 && req_s) continue;   // would enter the X entry
        req_s = ~req_s;
      end else begin
        w8 = ~w8;
      end
      idx = {y_ref, w8, req_s};
      y_ref = NEXT[idx];
      idx = {y_ref, w8, req_s};
      y_ref = NEXT[idx];  // settle (normal form: one step reaches stable)
      done_ref = DONE[{y_ref, w8, req_s}];
      if (y_ref && !prev_y) set_cnt++;
      if (!y_ref && prev_y) clr_cnt++;
      if (done_ref && !prev_done) done_cnt++;
      if (done_ref != prev_done) expected_edges++;
      #10 check();
    end
    checks++;
    if (done_edges != expected_edges) begin
      failures++;
      $display("Done changed %0d times, table predicts %0d", done_edges, expected_edges);
    end
    checks++;
    if (set_cnt == 0 || clr_cnt == 0 || done_cnt == 0) begin
      failures++;
      $display("coverage gap set=%0d clear=%0d done=%0d", set_cnt, clr_cnt, done_cnt);
    end
    $display("Y set %0d, cleared %0d, Done pulses %0d", set_cnt, clr_cnt, done_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
