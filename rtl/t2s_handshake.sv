// t2s_handshake: triplex-to-simplex handshake interface for dataless or
// four-phase dual-rail channels.
//
// Leaving the triplex domain, each request rail triplet is reduced to one
// simplex rail by a 2-of-3 voter (combinational majority gate or HFMV), which
// masks one stuck, early or late copy. The simplex acknowledge from the
// receiver is fanned out to the three copies of the acknowledge triplet.
//
// RAILS: 1 for a bare handshake, 2 per dual-rail bit; default 2.
// rst only resets HFMV voters. Delay: one voter on each request rail.
module t2s_handshake
  import tmr_pkg::*;
#(
  parameter int unsigned RAILS = 2,
  parameter voter_e      VOTER = VOTER_MAJ
) (
  input  logic                   rst,
  input  logic [2:0][RAILS-1:0]  req_t,    // triplex request rails
  output logic [2:0]             ack_t,    // triplex acknowledge
  output logic [RAILS-1:0]       req,      // simplex request rails
  input  logic                   ack       // simplex acknowledge
);

  for (genvar i = 0; i < RAILS; i++) begin : g_rail
    voter #(.VOTER(VOTER)) u_vote (
      .rst(rst),
      .a  ({req_t[2][i], req_t[1][i], req_t[0][i]}),
      .y  (req[i])
    );
  end

  assign ack_t = {3{ack}};

endmodule
