// triplex_fork: triple-modular redundant FORK for a 2-phase bundled-data
// channel.
//
// A FORK splits one stream into two parallel streams. The request and data
// are copied to both outputs; the input acknowledge is the join of the two
// output acknowledges, a C-element, so the sender is released only when both
// receivers have taken the data. The triplex form triplicates every wire and
// C-element and restores the C-element triplet with a triplex voter.
//
// Interface: one input channel (req_in/ack_in/data_in) and two output
// channels a and b, all as triplets; data copy k belongs to request copy k.
// WIDTH defaults to 8, this design's choice. rst clears the C-elements.
module triplex_fork
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter voter_e      VOTER = VOTER_MAJ
) (
  input  logic                  rst,
  input  logic [2:0]            req_in,
  output logic [2:0]            ack_in,
  input  logic [2:0][WIDTH-1:0] data_in,
  output logic [2:0]            req_a,
  input  logic [2:0]            ack_a,
  output logic [2:0][WIDTH-1:0] data_a,
  output logic [2:0]            req_b,
  input  logic [2:0]            ack_b,
  output logic [2:0][WIDTH-1:0] data_b
);

  logic [2:0] c;

  assign req_a  = req_in;
  assign req_b  = req_in;
  assign data_a = data_in;
  assign data_b = data_in;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    c_element #(.N(2)) u_c (.rst(rst), .a({ack_b[k], ack_a[k]}), .c(c[k]));
  end

  triplex_voter #(.WIDTH(1), .VOTER(VOTER)) u_vote (.rst(rst), .x(c), .y(ack_in));

endmodule
