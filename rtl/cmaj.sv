// cmaj: CMAJ element, a 3-input C-element that degrades to a 2-of-3 majority
// gate after a time limit.
//
// Each cycle starts strongly indicating: if all three inputs reach the new
// value the output follows at once, like a 3-input C-element. If only two
// arrive, the delayed 2-of-3 majority of the inputs tips the decision after
// DELAY, so a stuck or lost third input cannot deadlock it, while a single
// early input can never switch the output. DELAY must exceed the largest
// skew expected among the three healthy inputs.
//
// Structure as in the document: a 2-of-3 majority gate, a delay element, and
// a 3-of-5 threshold gate whose output is fed back to one of its five inputs.
// The 3-of-5 gate with feedback is written as the equivalent latch: with
// n = a0+a1+a2+delayed_majority, the output sets when n >= 3, clears when
// n <= 1 and holds when n == 2.
//
// rst (active high) clears the output. DELAY defaults to 10 time units, the
// time limit of the document's behavioural model; it must be set above the
// skew of the target technology. It is a timing
// parameter of the behavioural delay element only.
module cmaj #(
  parameter int unsigned DELAY  = 10,
  parameter int unsigned JITTER = 0
) (
  input  logic       rst,
  input  logic [2:0] a,
  output logic       c
);

  logic maj, dmaj;
  logic [2:0] n;

  assign maj = (a[0] & a[1]) | (a[1] & a[2]) | (a[2] & a[0]);

  delay_element #(.DELAY(DELAY), .JITTER(JITTER)) u_dly (.in(maj), .out(dmaj));

  assign n = 3'(a[0]) + 3'(a[1]) + 3'(a[2]) + 3'(dmaj);

  always_latch begin
    if (rst)          c = 1'b0;
    else if (n >= 3)  c = 1'b1;
    else if (n <= 1)  c = 1'b0;
  end

endmodule
