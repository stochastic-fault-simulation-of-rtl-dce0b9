// s2t_handshake: simplex-to-triplex handshake interface for dataless or
// four-phase dual-rail channels.
//
// Going from a simplex sender into the triplex domain, each request rail is
// simply fanned out to the three copies of its triplet. The acknowledge
// triplet coming back from the triplex receiver is reduced to one simplex
// acknowledge by a 2-of-3 voter (combinational majority gate or HFMV), so one
// faulty copy of the acknowledge cannot reach the simplex sender.
//
// RAILS is the number of request wires: 1 for a bare (dataless) handshake,
// 2 for one dual-rail bit (t, f), 2*n for n dual-rail bits sharing one
// acknowledge. Default 2 (one dual-rail bit). The opposite direction is
// t2s_handshake. rst only resets an HFMV. Delay: one voter on the
// acknowledge path, none on the request path.
module s2t_handshake
  import tmr_pkg::*;
#(
  parameter int unsigned RAILS = 2,
  parameter voter_e      VOTER = VOTER_MAJ
) (
  input  logic                   rst,
  input  logic [RAILS-1:0]       req,      // simplex request rails
  output logic                   ack,      // simplex acknowledge
  output logic [2:0][RAILS-1:0]  req_t,    // triplex request rails
  input  logic [2:0]             ack_t     // triplex acknowledge
);

  assign req_t = {3{req}};

  voter #(.VOTER(VOTER)) u_ack_vote (.rst(rst), .a(ack_t), .y(ack));

endmodule
