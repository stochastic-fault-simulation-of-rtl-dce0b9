// tb_triplex_4p2r_pipeline: self-checking test of the 10-stage, 1-bit
// triplex four-phase dual-rail pipeline.
//
// Runs the dr_fault_bench core twice, once with combinational majority
// voters and once with hazard-free voters. Each core checks fault-free
// transfer of random bits with fill-until-stall and drain, the capacity of
// the half-buffer pipeline (STAGES/2 bits), and that every single stuck-at
// fault on any C-element, voter or acknowledge OR gate output is masked
// (no deadlock, no illegal code, no wrong bit). The three wires of each
// triplet come from a triplex sender and go to a triplex receiver.
// A watchdog ends the test if it hangs.
module tb_triplex_4p2r_pipeline;
  import tmr_pkg::*;
  bit d0, d1;
  int c0, c1, f0, f1;

  dr_fault_bench #(.VOTER(VOTER_MAJ),  .MODE(0)) u_maj  (.done(d0), .checks(c0), .failures(f0));
  dr_fault_bench #(.VOTER(VOTER_HFMV), .MODE(0)) u_hfmv (.done(d1), .checks(c1), .failures(f1));

  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
