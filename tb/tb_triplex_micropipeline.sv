// tb_triplex_micropipeline: self-checking test of the triplex 2-phase
// bundled-data micropipeline (10 stages, 8 bits), once with combinational
// majority voters and once with hazard-free majority voters. Each bench runs
// a fault-free fill/drain (all three output copies checked, capacity must be
// 10 words) and then one run per single stuck-at fault on every C-element,
// voter and data latch copy; every run must deliver all words correctly.
module tb_triplex_micropipeline;
  import tmr_pkg::*;
  bit d0, d1;
  int c0, c1, f0, f1;

  mp_fault_bench #(.VOTER(VOTER_MAJ),  .MODE(0)) u_maj  (.done(d0), .checks(c0), .failures(f0));
  mp_fault_bench #(.VOTER(VOTER_HFMV), .MODE(0)) u_hfmv (.done(d1), .checks(c1), .failures(f1));

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
