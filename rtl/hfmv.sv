// hfmv: hazard-free majority voter (HFMV), 3 inputs, 1 output.
//
// A plain majority gate passes a single-event transient (SET) on an input
// whenever the three inputs disagree, that is during the skew window of every
// transition. The HFMV closes that window: once two inputs agree on a new
// value and the output switches, the output is frozen until all three inputs
// agree again. Stuck or late single inputs are still masked as by a majority
// gate, but the output falls (or rises) back only after all inputs have
// returned, and two opposing stuck inputs lock it.
//
// The document's circuit is a majority gate feeding a D-latch whose enable is
// a hold bit h, an S-R latch set when the majority differs from the latch
// output and reset when all inputs are equal. That set condition exists only
// while the D-latch is still switching, so it depends on gate delays. This
// implementation keeps the same behaviour with delay-independent logic:
//   u  latch  - the value of the inputs at the last unanimous input code
//               (000 or 111); transparent while the inputs are unanimous.
//   h  latch  - hold bit; reset while unanimous, set when the majority
//               differs from u (the output has switched since unanimity).
//   m         = h ? ~u : majority.
// Whenever h is 0 the output equals u, so "majority differs from u" is the
// document's "majority differs from the output".
//
// rst (active high) clears both latches; starting at 0 is this design's
// choice, as in the document's model (v = 0, h = 0).
module hfmv (
  input  logic       rst,
  input  logic [2:0] a,
  output logic       m
);

  logic maj, eq, u, h;

  assign maj = (a[0] & a[1]) | (a[1] & a[2]) | (a[2] & a[0]);
  assign eq  = (a == 3'b000) || (a == 3'b111);

  // last unanimous value
  always_latch begin
    if (rst)     u = 1'b0;
    else if (eq) u = a[0];
  end

  // hold bit (S-R latch, reset dominant)
  always_latch begin
    if (rst || eq)      h = 1'b0;
    else if (maj != u)  h = 1'b1;
  end

  assign m = h ? ~u : maj;

endmodule
