// mutex: behavioural model of a two-way mutual exclusion element (arbiter).
//
// This is a behavioural model. A real MUTEX is a cross-coupled latch followed
// by a metastability filter, an analogue circuit that resolves requests
// arriving together after an unbounded time; logic cannot reproduce that.
// The model grants g1 while r1 is high and g2 is low, g2 while r2 is high and
// g1 is low; a grant is held until its own request falls, then passes to a
// waiting request. Requests arriving in the same instant are resolved in
// favour of r1 with no delay. At most one grant is ever high.
//
// Four-phase: raise r to ask, wait for g, lower r to release; g then falls.
// rst (active high) clears both grants.
module mutex (
  input  logic rst,
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);

  always_latch begin
    if (rst) begin
      g1 = 1'b0;
      g2 = 1'b0;
    end else begin
      if (!r1) g1 = 1'b0;
      if (!r2) g2 = 1'b0;
      if (r1 && !g1 && !g2)      g1 = 1'b1;
      else if (r2 && !g1 && !g2) g2 = 1'b1;
    end
  end

endmodule
