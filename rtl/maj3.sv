// maj3: combinational 2-of-3 majority ("threshold >=2") gate, applied bitwise
// to WIDTH-bit words.
//
// This is the basic voter of the triplex architecture. As a clockless voter it
// is weakly indicating: its output moves as soon as two of the three inputs
// agree on a new value, so the output transition time is set by the median
// input arrival, and a missing, late or early third input cannot block or
// change it. Purely combinational, no state.
//
// Interface: a, b, c are the three copies of a word; y is their bitwise
// majority. WIDTH defaults to 1 (a single gate); the width is this design's
// choice.
module maj3 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);

  assign y = (a & b) | (b & c) | (c & a);

endmodule
