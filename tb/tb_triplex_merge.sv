// tb_triplex_merge: self-checking test of the triplex 4-phase MERGE (8-bit
// data), with combinational and hazard-free voters.
//
// Random sequences of four-phase transfers alternate at random between input
// A and input B (never both at once). For each transfer: the output request
// and data copies must follow the active input; only the active input's
// acknowledge may rise (after the output acknowledge) and it must fall
// after the request and output acknowledge have returned to zero. In every
// other transfer one copy of the output acknowledge is stuck low, which the
// voters must mask. Signals change 1 unit apart; a watchdog ends the test.
module tb_triplex_merge;
  import tmr_pkg::*;
  int checks = 0, failures = 0;
  logic rst;
  logic [2:0] req_a, req_b, ack_c;
  logic [2:0][7:0] data_a, data_b;
  logic [2:0] aa_m, ab_m, rc_m, aa_h, ab_h, rc_h;
  logic [2:0][7:0] dc_m, dc_h;

  triplex_merge #(.WIDTH(8), .VOTER(VOTER_MAJ)) u_m (
    .rst, .req_a, .ack_a(aa_m), .data_a, .req_b, .ack_b(ab_m), .data_b,
    .req_c(rc_m), .ack_c, .data_c(dc_m));
  triplex_merge #(.WIDTH(8), .VOTER(VOTER_HFMV)) u_h (
    .rst, .req_a, .ack_a(aa_h), .data_a, .req_b, .ack_b(ab_h), .data_b,
    .req_c(rc_h), .ack_c, .data_c(dc_h));

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
    rst = 1; req_a = '0; req_b = '0; ack_c = '0; data_a = '0; data_b = '0;
    #2 rst = 0; #2;
    for (int n = 0; n < 300; n++) begin
      bit use_b, faulty;
      int fc;
      logic [2:0] ackv;
      logic [2:0] act_m, act_h, oth_m, oth_h;
      use_b = 1'($urandom); faulty = n[0]; fc = $urandom_range(2, 0);
      data_a = {3{8'($urandom)}}; data_b = {3{8'($urandom)}};
      if (use_b) req_b = '1; else req_a = '1;
      #1;
      check(rc_m === 3'b111 && rc_h === 3'b111, "output request follows the active input");
      check(dc_m === (use_b ? data_b : data_a) && dc_h === (use_b ? data_b : data_a),
            "output data follows the active input");
      ackv = '1;
      if (faulty) ackv[fc] = 1'b0;
      ack_c = ackv;
      #1;
      act_m = use_b ? ab_m : aa_m; act_h = use_b ? ab_h : aa_h;
      oth_m = use_b ? aa_m : ab_m; oth_h = use_b ? aa_h : ab_h;
      check(act_m === 3'b111 && act_h === 3'b111, "active input acknowledged");
      check(oth_m === 3'b000 && oth_h === 3'b000, "idle input not acknowledged");
      req_a = '0; req_b = '0;
      #1;
      check(rc_m === 3'b000 && rc_h === 3'b000, "output request returns to zero");
      act_m = use_b ? ab_m : aa_m; act_h = use_b ? ab_h : aa_h;
      check(act_m === 3'b111 && act_h === 3'b111, "acknowledge held until output acknowledge falls");
      ack_c = '0;
      #1;
      check(aa_m === 3'b000 && ab_m === 3'b000 && aa_h === 3'b000 && ab_h === 3'b000,
            "acknowledges return to zero");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
