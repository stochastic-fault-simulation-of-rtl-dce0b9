// capture_pass_latch: event-controlled data latch of a 2-phase micropipeline.
//
// The latch is transparent while its two control inputs are equal and holds
// its data while they differ, so a transition on "capture" (cap) closes it and
// the following transition on "pass" reopens it. Rising and falling
// transitions act alike, which matches 2-phase (transition) signalling.
//
// Interface: d/q are WIDTH-bit data; cap is driven by the stage's (voted)
// C-element output and pas by the next stage's (voted) C-element output. No
// reset: after reset both controls are equal and the latch is transparent.
// WIDTH defaults to the 8-bit data path of the simulated pipelines.
module capture_pass_latch #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             cap,
  input  logic             pas,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_latch begin
    if (cap == pas) q = d;
  end

endmodule
