// triplex_mutex: triple-modular redundant mutual exclusion element.
//
// Three MUTEX elements arbitrate the three copies of the two request
// triplets; their grant outputs feed two triplex voter stages (one per grant
// triplet). Skew between the copies of the two request triplets can make the
// three MUTEXes decide differently even when none is faulty; the voters then
// pass the decision of two of them and block the third, so the voted grant
// triplets always concur and a single faulty MUTEX is masked.
//
// Interface: r1/r2 request triplets in, g1/g2 voted grant triplets out,
// four-phase. rst clears the MUTEXes (and HFMV voters).
module triplex_mutex
  import tmr_pkg::*;
#(
  parameter voter_e VOTER = VOTER_MAJ
) (
  input  logic       rst,
  input  logic [2:0] r1,
  input  logic [2:0] r2,
  output logic [2:0] g1,
  output logic [2:0] g2
);

  logic [2:0] m1, m2;

  for (genvar k = 0; k < 3; k++) begin : g_copy
    mutex u_mutex (.rst(rst), .r1(r1[k]), .r2(r2[k]), .g1(m1[k]), .g2(m2[k]));
  end

  triplex_voter #(.WIDTH(1), .VOTER(VOTER)) u_v1 (.rst(rst), .x(m1), .y(g1));
  triplex_voter #(.WIDTH(1), .VOTER(VOTER)) u_v2 (.rst(rst), .x(m2), .y(g2));

endmodule
