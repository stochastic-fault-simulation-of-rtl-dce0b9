// tb_triplex_join: self-checking test of the triplex 2-phase JOIN (two
// 8-bit inputs, 16-bit output), with combinational and hazard-free voters.
//
// For each token the two senders toggle their request copies in random
// order; the output request must toggle on all copies only after both, and
// the output data must be {data_b, data_a} per copy. In every other token
// one copy of one input request is stuck at its old value, which the
// voters must mask. The output acknowledge must reach both inputs on all
// copies. Signals change 1 unit apart; a watchdog ends the test.
module tb_triplex_join;
  import tmr_pkg::*;
  int checks = 0, failures = 0;
  logic rst;
  logic [2:0] req_a, req_b, ack_out;
  logic [2:0][7:0] data_a, data_b;
  logic [2:0] ack_a_m, ack_b_m, ack_a_h, ack_b_h, ro_m, ro_h;
  logic [2:0][15:0] do_m, do_h;

  triplex_join #(.WIDTH(8), .VOTER(VOTER_MAJ)) u_m (
    .rst, .req_a, .ack_a(ack_a_m), .data_a, .req_b, .ack_b(ack_b_m), .data_b,
    .req_out(ro_m), .ack_out, .data_out(do_m));
  triplex_join #(.WIDTH(8), .VOTER(VOTER_HFMV)) u_h (
    .rst, .req_a, .ack_a(ack_a_h), .data_a, .req_b, .ack_b(ack_b_h), .data_b,
    .req_out(ro_h), .ack_out, .data_out(do_h));

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
    logic lvl;
    rst = 1; req_a = '0; req_b = '0; ack_out = '0; data_a = '0; data_b = '0;
    #2 rst = 0; #2;
    lvl = 0;
    for (int n = 0; n < 200; n++) begin
      bit a_first, faulty;
      int fc;
      a_first = 1'($urandom); faulty = n[0]; fc = $urandom_range(2, 0);
      data_a = {3{8'($urandom)}}; data_b = {3{8'($urandom)}};
      for (int s = 0; s < 2; s++) begin
        logic [2:0] nv;
        nv = {3{!lvl}};
        if (faulty) nv[fc] = lvl;
        if ((s == 0) == a_first) req_a = nv; else req_b = nv;
        #1;
        if (s == 0) check(ro_m === {3{lvl}} && ro_h === {3{lvl}}, "output request before both inputs");
        else        check(ro_m === {3{!lvl}} && ro_h === {3{!lvl}}, "output request after both inputs");
      end
      for (int k = 0; k < 3; k++)
        check(do_m[k] === {data_b[k], data_a[k]} && do_h[k] === {data_b[k], data_a[k]}, "joined data");
      req_a = {3{!lvl}}; req_b = {3{!lvl}};
      ack_out = {3{!lvl}};
      #1;
      check(ack_a_m === ack_out && ack_b_m === ack_out && ack_a_h === ack_out && ack_b_h === ack_out,
            "acknowledge fan-out");
      lvl = !lvl;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
