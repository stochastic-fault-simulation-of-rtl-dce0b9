// tb_s2t_handshake: self-checking test of the simplex-to-triplex handshake
// interface (two request rails, one acknowledge), with a combinational
// majority voter and with a hazard-free voter.
//
// Random request rails must appear unchanged on all three copies. Random
// acknowledge triplets (including disagreeing copies, as from one faulty
// copy) must give the majority on the simplex acknowledge for the
// combinational voter; the HFMV version is checked whenever all three copies
// agree, and on a walk where one copy is stuck (the output must still follow
// the other two). Inputs change every 2 units, outputs are sampled 1 unit
// later. A watchdog ends the test if it hangs.
module tb_s2t_handshake;
  import tmr_pkg::*;
  int checks = 0, failures = 0;
  logic rst;
  logic [1:0] req;
  logic [2:0] ack_t;
  logic ack_m, ack_h;
  logic [2:0][1:0] rt_m, rt_h;

  s2t_handshake #(.RAILS(2), .VOTER(VOTER_MAJ))  u_m (.rst, .req, .ack(ack_m), .req_t(rt_m), .ack_t);
  s2t_handshake #(.RAILS(2), .VOTER(VOTER_HFMV)) u_h (.rst, .req, .ack(ack_h), .req_t(rt_h), .ack_t);

  function automatic logic maj(input logic [2:0] x);
    return (x[0] & x[1]) | (x[1] & x[2]) | (x[2] & x[0]);
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; req = '0; ack_t = '0;
    #2 rst = 0; #2;
    repeat (2000) begin
      req = 2'($urandom); ack_t = 3'($urandom);
      #1;
      check(rt_m === {3{req}} && rt_h === {3{req}}, $sformatf("request fan-out %b -> %b", req, rt_m));
      check(ack_m === maj(ack_t), $sformatf("MAJ ack %b from %b", ack_m, ack_t));
      if (&ack_t || ~|ack_t) check(ack_h === ack_t[0], $sformatf("HFMV ack %b from %b", ack_h, ack_t));
      #1;
    end
    // each copy in turn stuck at 0 and at 1 while the others toggle
    for (int s = 0; s < 3; s++) begin
      for (int v = 0; v < 2; v++) begin
        ack_t = '0; #2;   // all copies agree: HFMV leaves any frozen state
        for (int n = 0; n < 4; n++) begin
          logic lvl;
          lvl = !n[0];
          for (int k = 0; k < 3; k++) ack_t[k] = (k == s) ? v[0] : lvl;
          #1;
          check(ack_m === lvl && ack_h === lvl,
                $sformatf("copy %0d stuck-at-%0d: ack MAJ %b HFMV %b, expected %b", s, v, ack_m, ack_h, lvl));
          #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
