// tb_fault_sweep: stochastic stuck-at fault simulation of the two 10-stage
// triplex pipelines, each with combinational and with hazard-free voters.
//
// For each stuck-at probability P_SA from 0.0005 to 0.1 (8 points) every gate
// of the control path is made stuck-at-0 or stuck-at-1, each with
// probability w * P_SA, where w is the gate's equivalent gate count over
// two (C-element 1.25, OR 0.75, majority gate 1.5, hazard-free voter 6.25).
// A run then fills the pipeline until it stalls and drains it, and fails
// on deadlock, wrong data or a protocol error. The bench prints the
// pipeline error rate per probability and voter type; it checks that every
// run with no fault or with one fault passes, since triplex voting masks any
// single fault. Runs per point are few (RUNS), so the printed rates are
// coarse estimates. The micropipeline is 8 bits wide, the dual-rail
// pipeline 1 bit. The micropipeline is also swept with early-transition
// faults instead of stuck-at faults: a faulty C-element switches on one of
// its two input events alone, a faulty voter copy follows one input alone
// (weights 2.5 for a C-element, 1.5 majority gate, 6.25 HFMV). Late
// transitions are not modelled. The early-transition benches use a forward
// delay of 7 rather than 6, so that they elaborate their own parameter set of
// the pipeline: Verilator mixed up forces applied from two benches to two
// identically parameterised copies. A watchdog ends the test if it hangs.
module tb_fault_sweep;
  import tmr_pkg::*;
  localparam int RUNS = 60;
  bit d[6];
  int c[6], f[6];

  mp_fault_bench #(.VOTER(VOTER_MAJ),  .MODE(1), .RUNS(RUNS)) u_mp_maj (.done(d[0]), .checks(c[0]), .failures(f[0]));
  mp_fault_bench #(.VOTER(VOTER_HFMV), .MODE(1), .RUNS(RUNS)) u_mp_hf  (.done(d[1]), .checks(c[1]), .failures(f[1]));
  dr_fault_bench #(.VOTER(VOTER_MAJ),  .MODE(1), .RUNS(RUNS)) u_dr_maj (.done(d[2]), .checks(c[2]), .failures(f[2]));
  dr_fault_bench #(.VOTER(VOTER_HFMV), .MODE(1), .RUNS(RUNS)) u_dr_hf  (.done(d[3]), .checks(c[3]), .failures(f[3]));
  mp_fault_bench #(.VOTER(VOTER_MAJ),  .MODE(2), .RUNS(RUNS), .FWD(7)) u_mp_maj_early (.done(d[4]), .checks(c[4]), .failures(f[4]));
  mp_fault_bench #(.VOTER(VOTER_HFMV), .MODE(2), .RUNS(RUNS), .FWD(7)) u_mp_hf_early  (.done(d[5]), .checks(c[5]), .failures(f[5]));

  function automatic int total(input int x[6]);
    int t = 0;
    foreach (x[j]) t += x[j];
    return t;
  endfunction

  initial begin
    #200ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
