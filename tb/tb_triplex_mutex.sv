// tb_triplex_mutex: self-checking test of the triplex mutual-exclusion
// element, with combinational and hazard-free voters.
//
// Two triplex clients raise and release four-phase requests at random
// times (often overlapping). Checks on every change: the two voted grants
// are never both high on any copy; a grant is only high while its request
// is high; every request is eventually granted, and grants are released
// after the request falls. One run also holds one copy of r1 stuck low,
// which the voters must mask. Delays are 1 to 5 units; a watchdog ends the
// test if it hangs.
module tb_triplex_mutex;
  import tmr_pkg::*;
  int checks = 0, failures = 0, contention = 0;
  logic rst;
  logic [2:0] r1, r2;
  logic [2:0] g1_m, g2_m, g1_h, g2_h;
  bit stuck;

  triplex_mutex #(.VOTER(VOTER_MAJ))  u_m (.rst, .r1, .r2, .g1(g1_m), .g2(g2_m));
  triplex_mutex #(.VOTER(VOTER_HFMV)) u_h (.rst, .r1, .r2, .g1(g1_h), .g2(g2_h));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  always @(g1_m or g2_m or g1_h or g2_h)
    if (!rst) begin
      #0.1;
      check((g1_m & g2_m) == 0 && (g1_h & g2_h) == 0, $sformatf("both granted g1=%b/%b g2=%b/%b", g1_m, g1_h, g2_m, g2_h));
    end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic client(ref logic [2:0] r, ref logic [2:0] gm, ref logic [2:0] gh, input int id, input int n);
    for (int i = 0; i < n; i++) begin
      int t;
      #($urandom_range(5, 1));
      r = '1;
      if (stuck && id == 1) r[0] = 1'b0;
      t = 0;
      while (!(gm === 3'b111 && gh === 3'b111) && t < 200) begin #1; t++; end
      check(t < 200, $sformatf("client %0d never granted", id));
      if (t > 2) contention++;   // waited for the other client
      #($urandom_range(5, 1));
      r = '0;
      #1;
      check(gm === 3'b000 && gh === 3'b000, $sformatf("client %0d grant not released", id));
    end
  endtask

  initial begin
    rst = 1; r1 = '0; r2 = '0; stuck = 0;
    #2 rst = 0; #2;
    for (int run = 0; run < 2; run++) begin
      stuck = (run == 1);
      fork
        client(r1, g1_m, g1_h, 1, 200);
        client(r2, g2_m, g2_h, 2, 200);
      join
      #5;
    end
    $display("waits under contention: %0d", contention);
    check(contention > 0, "contention never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
