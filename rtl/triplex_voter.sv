// triplex_voter: triplex majority restoring stage for WIDTH triplets.
//
// Three voters, each fed by all three copies of a triplet (a 3x3
// cross-connection), produce a restored triplet. Any one copy that is stuck
// at 0 or 1, or that switches early, late or never, is outvoted on all three
// outputs. Each output switches after the second (median) input transition,
// which also reduces the skew of the triplet.
//
// Interface: x[k][i] is copy k of signal i, y[k][i] the restored copy k.
// WIDTH (number of independent triplets) defaults to 1; VOTER selects the
// voter type. Timing: one voter delay from the median input transition.
module triplex_voter
  import tmr_pkg::*;
#(
  parameter int unsigned WIDTH = 1,
  parameter voter_e      VOTER = VOTER_MAJ
) (
  input  logic                 rst,
  input  logic [2:0][WIDTH-1:0] x,
  output logic [2:0][WIDTH-1:0] y
);

  for (genvar k = 0; k < 3; k++) begin : g_copy
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      voter #(.VOTER(VOTER)) u_v (
        .rst(rst),
        .a  ({x[2][i], x[1][i], x[0][i]}),
        .y  (y[k][i])
      );
    end
  end

endmodule
