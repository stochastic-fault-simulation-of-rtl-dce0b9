// delay_element: behavioural model of an analogue delay line.
//
// This is a behavioural model, not synthesizable logic: a real delay element
// is a chain of gates or a tuned cell sized for a technology. The model
// reproduces each input transition on the output DELAY time units later, plus
// an optional random extra of 0..JITTER units per transition that lets a
// testbench stress the circuit with delay variation (skew between the three
// copies of a triplet). JITTER must stay well below the spacing of successive
// transitions on the input, or events could be reordered.
//
// It models the matched delay on the forward request path of a bundled-data
// pipeline stage and the delay inside the CMAJ element. Synthesis ignores the
// delay and sees a wire.
module delay_element #(
  parameter int unsigned DELAY  = 2,
  parameter int unsigned JITTER = 0
) (
  input  logic in,
  output logic out
);

  initial out = 1'b0;

  always @(in) begin
    if (JITTER == 0) out <= #(DELAY) in;
    else             out <= #(DELAY + $urandom_range(JITTER, 0)) in;
  end

endmodule
