// triplex_4p2r_stage: one stage of a triple-modular redundant 1-bit
// four-phase dual-rail (4P2R) pipeline.
//
// The simplex stage holds one dual-rail bit in two C-elements (true rail t,
// false rail f). Each C-element joins the rail from the previous stage with
// the inverted acknowledge of the next stage; an OR gate over the two rails
// is the stage's completion signal, sent back as the previous stage's
// acknowledge. The triplex stage triplicates all of it and restores every
// C-element triplet with a triplex voter:
//   ct[k] = C( in_t[k], ~ack_from_next[k] )   cf[k] likewise with in_f
//   out_t = vote(ct),  out_f = vote(cf)
//   ack_to_prev[k] = out_t[k] | out_f[k]
// giving 6 C-elements, 6 voters and 3 OR gates per bit.
//
// Handshake: 4-phase return-to-zero dual-rail. Rising t or f means a valid 1
// or 0; both low is "empty"; both high is illegal. Acknowledge rises when the
// stage holds a value and falls after it has returned to empty.
// rst (active high) empties the stage.
// Lint note: the simulator reports a combinational loop (UNOPTFLAT) through
// this stage. The loop is the circuit itself: C-element -> voter -> OR ->
// previous stage's C-element, and back through the next stage. Such
// feedback is how a clockless handshake works; it settles because each
// C-element only changes when its inputs agree.
module triplex_4p2r_stage
  import tmr_pkg::*;
#(
  parameter voter_e VOTER = VOTER_MAJ
) (
  input  logic       rst,
  input  logic [2:0] in_t,
  input  logic [2:0] in_f,
  input  logic [2:0] ack_from_next,
  output logic [2:0] out_t,
  output logic [2:0] out_f,
  output logic [2:0] ack_to_prev
);

  logic [2:0] ct, cf;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    c_element #(.N(2)) u_ct (.rst(rst), .a({~ack_from_next[k], in_t[k]}), .c(ct[k]));
    c_element #(.N(2)) u_cf (.rst(rst), .a({~ack_from_next[k], in_f[k]}), .c(cf[k]));
    assign ack_to_prev[k] = out_t[k] | out_f[k];
  end

  triplex_voter #(.WIDTH(1), .VOTER(VOTER)) u_vt (.rst(rst), .x(ct), .y(out_t));
  triplex_voter #(.WIDTH(1), .VOTER(VOTER)) u_vf (.rst(rst), .x(cf), .y(out_f));

endmodule
