// tb_triplex_4p2r_stage: self-checking test of one triplex 4-phase
// dual-rail stage, with combinational and with hazard-free voters.
//
// The three copies of both input rails and of the acknowledge are driven
// from random values, so copies often disagree (as a faulty copy would). A
// reference model keeps the state of the six C-elements (set when both
// inputs are 1, clear when both are 0) and, for the combinational voter,
// requires every output copy to equal the majority of the C-element copies,
// and every acknowledge copy to be the OR of that copy's two rails. The HFMV
// stage is checked on patterns where all three copies agree (its output
// then equals the majority) and on the freezing rule: once the output has
// followed two copies it ignores a copy that moves back until all agree.
// A watchdog ends the test if it hangs. Inputs change 2 units apart and
// outputs are sampled 1 unit after a change.
module tb_triplex_4p2r_stage;
  import tmr_pkg::*;
  int checks = 0, failures = 0;
  logic rst;
  logic [2:0] in_t, in_f, ackn;
  logic [2:0] mt, mf, mack, ht, hf, hack;
  logic [2:0] rt, rf;     // reference C-element states

  triplex_4p2r_stage #(.VOTER(VOTER_MAJ)) u_maj (
    .rst, .in_t, .in_f, .ack_from_next(ackn), .out_t(mt), .out_f(mf), .ack_to_prev(mack));
  triplex_4p2r_stage #(.VOTER(VOTER_HFMV)) u_hf (
    .rst, .in_t, .in_f, .ack_from_next(ackn), .out_t(ht), .out_f(hf), .ack_to_prev(hack));

  function automatic logic maj(input logic [2:0] x);
    return (x[0] & x[1]) | (x[1] & x[2]) | (x[2] & x[0]);
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic step;
    for (int k = 0; k < 3; k++) begin
      if (in_t[k] && !ackn[k]) rt[k] = 1; else if (!in_t[k] && ackn[k]) rt[k] = 0;
      if (in_f[k] && !ackn[k]) rf[k] = 1; else if (!in_f[k] && ackn[k]) rf[k] = 0;
    end
    #1;
    check(mt === {3{maj(rt)}} && mf === {3{maj(rf)}},
          $sformatf("MAJ stage t=%b f=%b ack=%b: out t=%b f=%b ref C t=%b f=%b", in_t, in_f, ackn, mt, mf, rt, rf));
    check(mack === (mt | mf), "MAJ stage acknowledge is not the OR of the rails");
    check(hack === (ht | hf), "HFMV stage acknowledge is not the OR of the rails");
    if (&rt || ~|rt) check(ht === {3{rt[0]}}, $sformatf("HFMV out_t=%b with C copies %b", ht, rt));
    if (&rf || ~|rf) check(hf === {3{rf[0]}}, $sformatf("HFMV out_f=%b with C copies %b", hf, rf));
    #1;
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; in_t = '0; in_f = '0; ackn = '0; rt = '0; rf = '0;
    #2 rst = 0; #2;
    // clean 4-phase transfers of a 1 and a 0 with all copies together
    in_t = '1; step(); ackn = '1; step(); in_t = '0; step(); ackn = '0; step();
    in_f = '1; step(); ackn = '1; step(); in_f = '0; step(); ackn = '0; step();
    // HFMV freezing: two copies fall and both voters fall; one of them then
    // glitches back high: MAJ follows, HFMV holds until all three agree
    in_t = '1; step(); ackn = '1; step();
    in_t = 3'b100; #1;
    check(ht === 3'b000 && mt === 3'b000, "two copies low: both voters fall");
    #1 ackn = 3'b101; in_t = 3'b110; #1;
    check(mt === 3'b111 && ht === 3'b000, "one copy back high: MAJ rises, HFMV holds");
    #1 ackn = 3'b111; in_t = 3'b000; #1;
    check(ht === 3'b000 && mt === 3'b000, "all copies low: both voters low");
    #1 ackn = '0; rt = '0; #2;
    // random copies, including disagreeing ones
    repeat (3000) begin
      int sel;
      logic [2:0] val;
      sel = $urandom_range(2, 0);
      val = 3'($urandom);
      if (sel == 0) in_t = val; else if (sel == 1) in_f = val; else ackn = val;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
