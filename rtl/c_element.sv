// c_element: N-input Muller C-element.
//
// The output switches to 1 when all inputs are 1, to 0 when all inputs are 0,
// and holds its value while the inputs disagree (a "last-of" join of input
// events). It is the storage element of every pipeline control stage. The
// 2-input form is the classic element; the 3-input form is used where three
// redundant events must all have arrived.
//
// The state is written as a level-sensitive latch rather than as a gate with
// output feedback, so that it synthesises to a latch cell and simulates
// without a combinational loop. The latch inference is intended.
// When C-elements are chained through voters and OR gates into a 4-phase
// dual-rail pipeline, the simulator still reports the handshake ring as a
// circular combinational path (UNOPTFLAT) at this output: each stage's
// C-element feeds the acknowledge that gates its neighbour, which gates it
// back. That ring is the clockless handshake itself and stands as designed;
// it settles because a C-element only switches when its inputs agree.
//
// rst (active high, asynchronous) clears the output to 0, the empty-pipeline
// state; an initial value of 0 is this design's choice. Inverted inputs (the
// "C-element with one inverting input" of a pipeline stage) are formed by the
// instantiating module.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] a,
  output logic         c
);

  always_latch begin
    if (rst)          c = 1'b0;
    else if (&a)      c = 1'b1;
    else if (~|a)     c = 1'b0;
  end

endmodule
