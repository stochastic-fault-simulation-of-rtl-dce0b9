// tb_triplex_dataless_pipeline: self-checking test of the triplex 2-phase
// dataless pipeline (10 stages, FWD_DELAY = 4).
//
// Timing, fault-free:
//   - empty-pipeline forward latency, req_in to req_out, is STAGES*FWD_DELAY;
//   - with a receiver answering 1 unit after each request, the steady-state
//     output period is FWD_DELAY + 1 (the last stage's loop);
//   - capacity is STAGES tokens: with the receiver stopped the sender gets
//     STAGES acknowledges and then stalls.
// Fault tolerance: every C-element output and every voter output is in turn
// held stuck at 0 and at 1 (one fault at a time) while tokens are pushed
// through with the pipeline filled and drained; every run must complete.
// The sender and receiver are triplex: they act on the majority of the
// triplet they receive and drive all three copies, with random skew between
// copies.
module tb_triplex_dataless_pipeline;
  import tmr_pkg::*;
  localparam int unsigned STAGES = 10;
  localparam int unsigned FWD    = 4;

  int checks = 0, failures = 0;
  logic rst;
  logic [2:0] req_in, ack_in, req_out, ack_out;
  logic [STAGES-1:0][2:0] stage_v;

  int fault_site = -1;       // 0..3*STAGES-1 C-elements, then voters
  logic fault_val = 0;

  triplex_dataless_pipeline #(.STAGES(STAGES), .VOTER(VOTER_MAJ), .FWD_DELAY(FWD)) dut (
    .rst, .req_in, .ack_in, .req_out, .ack_out, .stage_v
  );

  for (genvar i = 0; i < STAGES; i++) begin : g_fi
    for (genvar k = 0; k < 3; k++) begin : g_fk
      always @(fault_site or fault_val) begin
        if (fault_site == i*3 + k) force dut.g_stage[i].g_copy[k].u_c.c = fault_val;
        else                       release dut.g_stage[i].g_copy[k].u_c.c;
        if (fault_site == 3*STAGES + i*3 + k)
          force dut.g_stage[i].u_vote.g_copy[k].g_bit[0].u_v.y = fault_val;
        else
          release dut.g_stage[i].u_vote.g_copy[k].g_bit[0].u_v.y;
      end
    end
  end

  function automatic logic maj(input logic [2:0] x);
    return (x[0] & x[1]) | (x[1] & x[2]) | (x[2] & x[0]);
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive a triplet to a level, copies in random order with random skew
  task automatic drive(ref logic [2:0] t, input logic lvl, input int max_skew);
    int order = $urandom_range(2, 0);
    for (int j = 0; j < 3; j++) begin
      t[(order + j) % 3] = lvl;
      if (max_skew > 0 && j < 2) #($urandom_range(max_skew, 1));
    end
  endtask

  // wait (bounded) until the majority of a triplet reaches lvl; 1 on success
  task automatic wait_maj(ref logic [2:0] t, input logic lvl, input int limit, output bit ok);
    int n = 0;
    ok = 1;
    while (maj(t) != lvl) begin
      #1;
      if (++n > limit) begin ok = 0; return; end
    end
  endtask

  task automatic reset_all();
    rst = 1; req_in = '0; ack_out = '0;
    #5 rst = 0; #5;
  endtask

  // push ntok tokens with the receiver held until the sender stalls; then
  // drain. Returns 1 if all tokens arrived in order without deadlock.
  task automatic run_fill_drain(input int ntok, input int skew, output bit ok, output int accepted);
    logic sl = 0, rl = 0;
    int sent = 0, recv = 0;
    bit w;
    ok = 1; accepted = 0;
    // fill
    while (sent < ntok) begin
      #($urandom_range(3, 1));
      sl = !sl; drive(req_in, sl, skew);
      wait_maj(ack_in, sl, 200, w);
      if (!w) begin sl = !sl; break; end     // stalled: the token is still waiting
      sent++;
    end
    accepted = sent;
    // drain, then finish sending anything left
    fork
      begin
        while (recv < ntok) begin
          wait_maj(req_out, !rl, 2000, w);
          if (!w) begin ok = 0; break; end
          recv++;
          #($urandom_range(3, 1));
          rl = !rl; drive(ack_out, rl, skew);
        end
      end
      begin
        if (sent < ntok) begin
          wait_maj(ack_in, !sl, 2000, w);  // the pending token
          if (!w) ok = 0; else sent++;
          sl = !sl;
          while (ok && sent < ntok) begin
            #($urandom_range(3, 1));
            sl = !sl; drive(req_in, sl, skew);
            wait_maj(ack_in, sl, 2000, w);
            if (!w) begin ok = 0; break; end
            sent++;
          end
        end
      end
    join
    if (recv != ntok) ok = 0;
  endtask

  initial begin
    bit ok, w;
    int acc;
    time t0, t1, tprev;
    int npass = 0;

    // ---- forward latency ----
    reset_all();
    t0 = $time;
    req_in = 3'b111;
    wait ((req_out[0] & req_out[1]) | (req_out[1] & req_out[2]) | (req_out[2] & req_out[0]));
    t1 = $time;
    check((t1 - t0) == STAGES * FWD * 1ns,
          $sformatf("forward latency %0t, expected %0d units", t1 - t0, STAGES * FWD));
    ack_out = 3'b111; #20;

    // ---- throughput: sender always ready, receiver 1 unit ----
    reset_all();
    fork
      begin : snd
        logic l = 0;
        forever begin
          l = !l; req_in = {3{l}};
          wait (((ack_in[0] & ack_in[1]) | (ack_in[1] & ack_in[2]) | (ack_in[2] & ack_in[0])) == l);
          #1;
        end
      end
      begin : rcv
        logic l = 0;
        for (int n = 0; n < 40; n++) begin
          wait (((req_out[0] & req_out[1]) | (req_out[1] & req_out[2]) | (req_out[2] & req_out[0])) != l);
          if (n == 20) tprev = $time;
          if (n == 39) t1 = $time;
          #1;
          l = !l; ack_out = {3{l}};
        end
      end
    join_any
    disable snd;
    check((t1 - tprev) == 19 * (FWD + 2) * 1ns,
          $sformatf("steady-state period %0t over 19 tokens, expected %0d units each", t1 - tprev, FWD + 2));

    // ---- capacity / stall ----
    reset_all();
    run_fill_drain(STAGES + 3, 0, ok, acc);
    check(ok, "fault-free fill/drain completes");
    check(acc == STAGES, $sformatf("capacity %0d tokens, expected %0d", acc, STAGES));

    // ---- single stuck-at faults on every C-element and voter output ----
    for (int s = 0; s < 6 * STAGES; s++) begin
      for (int v = 0; v < 2; v++) begin
        fault_val = v[0];
        fault_site = s;
        reset_all();
        run_fill_drain(STAGES + 4, 2, ok, acc);
        check(ok, $sformatf("single fault site %0d stuck-at-%0d masked", s, v));
        if (ok) npass++;
        fault_site = -1;
      end
    end
    $display("single-fault runs passed: %0d of %0d", npass, 12 * STAGES);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
