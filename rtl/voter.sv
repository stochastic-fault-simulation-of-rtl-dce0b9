// voter: one 2-of-3 restoring voter of the selected type.
//
// VOTER_MAJ instantiates the combinational majority gate; VOTER_HFMV the
// hazard-free majority voter. The choice is made at elaboration so that the
// same triplex structures can be built with either voter, as in the
// document's comparison of the two. rst only matters for the HFMV.
// With VOTER_MAJ, rst is therefore unused (the lint UNUSEDSIGNAL warning on
// it is expected); the port stays so both voter types share one interface.
// In the dual-rail pipeline the voter output lies on the stage-to-stage
// handshake ring (C-element -> voter -> OR -> neighbouring C-element), which
// the simulator flags as a circular combinational path (UNOPTFLAT). The ring
// is the intended asynchronous feedback and is left as it is.
module voter
  import tmr_pkg::*;
#(
  parameter voter_e VOTER = VOTER_MAJ
) (
  input  logic       rst,
  input  logic [2:0] a,
  output logic       y
);

  if (VOTER == VOTER_HFMV) begin : g_hfmv
    hfmv u_hfmv (.rst(rst), .a(a), .m(y));
  end else begin : g_maj
    maj3 #(.WIDTH(1)) u_maj (.a(a[0]), .b(a[1]), .c(a[2]), .y(y));
  end

endmodule
