// tb_triplex_fork: self-checking test of the triplex 2-phase FORK (8-bit
// data), with combinational and with hazard-free voters.
//
// For each token the sender toggles its request copies with new data; both
// branches must see the request and data on all copies. The two branch
// receivers acknowledge in random order and the sender's acknowledge must
// toggle only after both have. In every other token one copy of one branch
// acknowledge is stuck at its old value, which the voters must mask.
// Signals change 1 unit apart; a watchdog ends the test if it hangs.
module tb_triplex_fork;
  import tmr_pkg::*;
  int checks = 0, failures = 0;
  logic rst;
  logic [2:0] req_in, ack_a, ack_b;
  logic [2:0][7:0] data_in;
  logic [2:0] ack_in_m, ack_in_h, req_a_m, req_b_m, req_a_h, req_b_h;
  logic [2:0][7:0] da_m, db_m, da_h, db_h;

  triplex_fork #(.WIDTH(8), .VOTER(VOTER_MAJ)) u_m (
    .rst, .req_in, .ack_in(ack_in_m), .data_in, .req_a(req_a_m), .ack_a, .data_a(da_m),
    .req_b(req_b_m), .ack_b, .data_b(db_m));
  triplex_fork #(.WIDTH(8), .VOTER(VOTER_HFMV)) u_h (
    .rst, .req_in, .ack_in(ack_in_h), .data_in, .req_a(req_a_h), .ack_a, .data_a(da_h),
    .req_b(req_b_h), .ack_b, .data_b(db_h));

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
    rst = 1; req_in = '0; ack_a = '0; ack_b = '0; data_in = '0;
    #2 rst = 0; #2;
    lvl = 0;
    for (int n = 0; n < 200; n++) begin
      bit a_first, faulty;
      int fc;
      a_first = 1'($urandom); faulty = n[0]; fc = $urandom_range(2, 0);
      data_in = {3{8'($urandom)}};
      req_in = {3{!lvl}};
      #1;
      check(req_a_m === req_in && req_b_m === req_in && req_a_h === req_in && req_b_h === req_in,
            "request fan-out");
      check(da_m === data_in && db_m === data_in && da_h === data_in && db_h === data_in,
            "data fan-out");
      for (int s = 0; s < 2; s++) begin
        logic [2:0] nv;
        nv = {3{!lvl}};
        if (faulty) nv[fc] = lvl;      // one copy stuck
        if ((s == 0) == a_first) ack_a = nv; else ack_b = nv;
        #1;
        if (s == 0) check(ack_in_m === {3{lvl}} && ack_in_h === {3{lvl}}, "ack before both branches");
        else        check(ack_in_m === {3{!lvl}} && ack_in_h === {3{!lvl}}, "ack after both branches");
      end
      // repair the stuck copy before the next token
      ack_a = {3{!lvl}}; ack_b = {3{!lvl}};
      #1;
      lvl = !lvl;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
