// triplex_join: triple-modular redundant JOIN for 2-phase bundled-data
// channels.
//
// A JOIN synchronises two parallel streams into one: the output request is
// the C-element join of the two input requests, so it toggles only when both
// inputs have delivered; the output acknowledge is copied back to both
// senders. The output data word is the two input words side by side
// ({data_b, data_a}); how they are combined further is left to the receiver.
// The triplex form triplicates wires and C-elements and restores the
// C-element triplet with a triplex voter.
//
// Interface: input channels a and b, output channel out, all as triplets.
// WIDTH (per input) defaults to 8, this design's choice.
module triplex_join
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter voter_e      VOTER = VOTER_MAJ
) (
  input  logic                    rst,
  input  logic [2:0]              req_a,
  output logic [2:0]              ack_a,
  input  logic [2:0][WIDTH-1:0]   data_a,
  input  logic [2:0]              req_b,
  output logic [2:0]              ack_b,
  input  logic [2:0][WIDTH-1:0]   data_b,
  output logic [2:0]              req_out,
  input  logic [2:0]              ack_out,
  output logic [2:0][2*WIDTH-1:0] data_out
);

  logic [2:0] c;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    c_element #(.N(2)) u_c (.rst(rst), .a({req_b[k], req_a[k]}), .c(c[k]));
    assign data_out[k] = {data_b[k], data_a[k]};
  end

  triplex_voter #(.WIDTH(1), .VOTER(VOTER)) u_vote (.rst(rst), .x(c), .y(req_out));

  assign ack_a = ack_out;
  assign ack_b = ack_out;

endmodule
