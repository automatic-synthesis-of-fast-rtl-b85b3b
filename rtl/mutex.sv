// mutex -- behavioural model of a mutual exclusion element (ME).
//
// This file is a behavioural model, not synthesizable logic. A real ME is an
// analog cell (12 transistors in CMOS: a cross-coupled latch plus a
// metastability filter) and is the only such part an otherwise all-logic MEAT
// control design may need. The model has the real cell's ports and
// behaviour: at most one grant is high; a request that arrives while the other
// side holds the grant waits; when the holder withdraws its request its grant
// falls, and a waiting request is then granted. A grant follows its request
// by GRANT_DELAY time units, standing in for the resolution time. Requests
// that arrive in the same time step are resolved in favour of r1 (the analog
// cell would pick one side after a metastable interval of unbounded length).
//
// Interface: r1, r2 requests; g1, g2 grants (4-phase: a grant stays high until
// its request falls, and falls in the same time step as its request).
module mutex #(
  parameter int unsigned GRANT_DELAY = 1
) (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  // A grant falls as soon as its request does. When neither grant is held
  // and a request is present, a decision is armed for GRANT_DELAY later; at
  // that moment whichever request is present is granted, r1 first. The
  // process never blocks: the delay is a scheduled toggle of tick, so every
  // request and grant change is seen when it happens.
  logic tick;
  logic armed;
  time  due;

  initial begin
    g1    = 1'b0;
    g2    = 1'b0;
    tick  = 1'b0;
    armed = 1'b0;
    due   = 0;
  end

  always @(r1 or r2 or g1 or g2 or tick) begin : arbitrate
    if (!r1 && g1) g1 <= 1'b0;
    if (!r2 && g2) g2 <= 1'b0;
    if (armed && $time >= due) begin
      armed = 1'b0;
      if (!g1 && !g2) begin
        if (r1)      g1 <= 1'b1;
        else if (r2) g2 <= 1'b1;
      end
    end else if (!armed && !g1 && !g2 && (r1 || r2)) begin
      armed = 1'b1;
      due   = $time + time'(GRANT_DELAY);
      tick <= #(GRANT_DELAY) ~tick;
    end
  end

  // The element's one rule: never two grants.
  always_comb assert (!(g1 && g2)) else $error("mutex: both grants high");
endmodule
