// tb_t2s_handshake: self-checking test of the triplex-to-simplex handshake
// interface (two request rails, one acknowledge), with a combinational
// majority voter and with a hazard-free voter.
//
// Random request triplets (including disagreeing copies) must give the
// per-rail majority for the combinational voter; the HFMV version is
// checked whenever the three copies of a rail agree, and on walks where one
// copy of a rail is stuck (each walk starts from all copies low). The simplex acknowledge must appear on all three
// acknowledge copies. Inputs change every 2 units, outputs are sampled 1
// unit later. A watchdog ends the test if it hangs.
module tb_t2s_handshake;
  import tmr_pkg::*;
  int checks = 0, failures = 0;
  logic rst, ack;
  logic [2:0][1:0] req_t;
  logic [1:0] req_m, req_h;
  logic [2:0] at_m, at_h;

  t2s_handshake #(.RAILS(2), .VOTER(VOTER_MAJ))  u_m (.rst, .req_t, .ack_t(at_m), .req(req_m), .ack);
  t2s_handshake #(.RAILS(2), .VOTER(VOTER_HFMV)) u_h (.rst, .req_t, .ack_t(at_h), .req(req_h), .ack);

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
    rst = 1; req_t = '0; ack = 0;
    #2 rst = 0; #2;
    repeat (2000) begin
      req_t = 6'($urandom); ack = 1'($urandom);
      #1;
      check(at_m === {3{ack}} && at_h === {3{ack}}, "acknowledge fan-out");
      for (int i = 0; i < 2; i++) begin
        logic [2:0] x;
        x = {req_t[2][i], req_t[1][i], req_t[0][i]};
        check(req_m[i] === maj(x), $sformatf("MAJ rail %0d = %b from %b", i, req_m[i], x));
        if (&x || ~|x) check(req_h[i] === x[0], $sformatf("HFMV rail %0d = %b from %b", i, req_h[i], x));
      end
      #1;
    end
    // one copy of both rails stuck while the others run a 4-phase sequence
    for (int s = 0; s < 3; s++) begin
      for (int v = 0; v < 2; v++) begin
        logic [1:0] seq[4];
        seq = '{2'b10, 2'b00, 2'b01, 2'b00};
        req_t = '0; #2;   // all copies agree: HFMV leaves any frozen state
        foreach (seq[n]) begin
          for (int k = 0; k < 3; k++) req_t[k] = (k == s) ? {2{v[0]}} : seq[n];
          #1;
          check(req_m === seq[n] && req_h === seq[n],
                $sformatf("copy %0d stuck-at-%0d: MAJ %b HFMV %b expected %b", s, v, req_m, req_h, seq[n]));
          #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
