// triplex_merge: triple-modular redundant bundled-data MERGE of two
// mutually exclusive four-phase streams.
//
// Simplex MERGE: the output request is the OR of the two input requests; the
// output data is input B's word while request B is high and input A's word
// otherwise; each input acknowledge is a C-element joining that input's
// request with the output acknowledge, so only the active input sees the
// acknowledge. The triplex form triplicates all of it and restores each
// C-element triplet (ack_a, ack_b) with a triplex voter.
//
// Handshake: 4-phase (return-to-zero) bundled data; the two inputs must be
// mutually exclusive (use triplex_mutex in front of them otherwise).
// Interface: channels a and b in, c out, all triplets; WIDTH defaults to 8,
// this design's choice. rst clears the C-elements.
module triplex_merge
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter voter_e      VOTER = VOTER_MAJ
) (
  input  logic                  rst,
  input  logic [2:0]            req_a,
  output logic [2:0]            ack_a,
  input  logic [2:0][WIDTH-1:0] data_a,
  input  logic [2:0]            req_b,
  output logic [2:0]            ack_b,
  input  logic [2:0][WIDTH-1:0] data_b,
  output logic [2:0]            req_c,
  input  logic [2:0]            ack_c,
  output logic [2:0][WIDTH-1:0] data_c
);

  logic [2:0] ca, cb;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    assign req_c[k]  = req_a[k] | req_b[k];
    assign data_c[k] = req_b[k] ? data_b[k] : data_a[k];
    c_element #(.N(2)) u_ca (.rst(rst), .a({ack_c[k], req_a[k]}), .c(ca[k]));
    c_element #(.N(2)) u_cb (.rst(rst), .a({ack_c[k], req_b[k]}), .c(cb[k]));
  end

  triplex_voter #(.WIDTH(1), .VOTER(VOTER)) u_va (.rst(rst), .x(ca), .y(ack_a));
  triplex_voter #(.WIDTH(1), .VOTER(VOTER)) u_vb (.rst(rst), .x(cb), .y(ack_b));

endmodule
