// mp_fault_bench: test bench core for the triplex micropipeline, used by the
// block test and by the stochastic fault-simulation workload.
//
// It instantiates one triplex_micropipeline with the given voter type and
// exercises it in runs. Each run resets the pipeline, injects faults, pushes
// NTOK random words while the receiver is held until the sender stalls
// (pipeline full), then drains it (pipeline empty). A run fails on deadlock
// (no handshake progress within a time limit), on an acknowledge without a
// request, or on any data mismatch; this is the scoring used for the
// document's stochastic fault simulations.
//
// Fault sites (stuck-at, forced from outside the design): the output of
// every C-element and every voter of the control path, 6 per stage, and in
// MODE 0 also every data latch copy (whole word stuck at 0 or 1).
//   MODE 0: one fault at a time over every site and both polarities, plus a
//           fault-free run; every run must pass.
//   MODE 1: stochastic injection. For each stuck-at probability in the list,
//           RUNS runs; each cell is independently stuck-at-1 or stuck-at-0
//           with probability w * P_SA each, w = equivalent gates / 2 (1.25
//           for a C-element, 1.5 for a majority gate, 6.25 for an HFMV).
//           Runs with at most one fault must pass; the failure rate for each
//           probability is printed.
//   MODE 2: as MODE 1 with early-transition faults in place of stuck-at
//           faults (see below); weights 2.5 per C-element (early rise plus
//           early fall), 1.5 majority gate, 6.25 HFMV.
// The acknowledge delay is set one unit above the jitter, as the pipeline
// requires.
// Sender and receiver are themselves triplex: they drive all copies and act
// on the majority of what they receive. The sender skews its request copies
// randomly. The receiver samples the data a settle time after the majority
// of the request copies has toggled and drives its acknowledge copies
// together: an acknowledge copy that lags the others by more than the
// last stage's acknowledge delay lets that stage's latch copy reopen briefly
// and take the next word (a corrupted copy that, with one more fault, would
// outvote the good one), so the design assumes a tightly timed receiver.
module mp_fault_bench
  import tmr_pkg::*;
#(
  parameter voter_e      VOTER  = VOTER_MAJ,
  parameter int unsigned STAGES = 10,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned FWD    = 6,
  parameter int unsigned JITTER = 2,
  parameter int unsigned MODE   = 0,
  parameter int unsigned RUNS   = 20
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int NCTRL  = 6 * STAGES;          // C-elements then voters
  localparam int NSITES = NCTRL + 3 * STAGES;  // plus data latch copies
  localparam int SETTLE = 2 * JITTER + 4;

  logic rst;
  logic [2:0] req_in, ack_in, req_out, ack_out;
  logic [2:0][WIDTH-1:0] data_in, data_out;

  logic [NSITES-1:0] f_en, f_val;

  triplex_micropipeline #(
    .STAGES(STAGES), .WIDTH(WIDTH), .VOTER(VOTER), .FWD_DELAY(FWD), .REV_DELAY(JITTER + 1), .JITTER(JITTER)
  ) dut (
    .rst, .req_in, .ack_in, .data_in, .req_out, .ack_out, .data_out
  );

  // Early-transition (dysynchronous) faults, MODE 2: a faulty C-element
  // follows its request input alone (or its inverted acknowledge alone), so
  // it switches on that one input event without waiting for the other; a
  // faulty voter copy follows its first input alone. Each control site has
  // one force whose value is the stuck-at level or the followed input.
  logic [NCTRL-1:0] e_en, e_sel;
  logic [NCTRL-1:0] x_en, x_val;

  for (genvar i = 0; i < STAGES; i++) begin : g_fi
    for (genvar k = 0; k < 3; k++) begin : g_fk
      localparam int SC = i*3 + k;
      localparam int SV = 3*STAGES + i*3 + k;
      localparam int SL = 6*STAGES + i*3 + k;
      always_comb begin
        x_en[SC]  = f_en[SC] | e_en[SC];
        x_val[SC] = f_en[SC] ? f_val[SC]
                  : (e_sel[SC] ? dut.u_ctrl.g_stage[i].g_copy[k].u_c.a[0]
                               : dut.u_ctrl.g_stage[i].g_copy[k].u_c.a[1]);
        x_en[SV]  = f_en[SV] | e_en[SV];
        x_val[SV] = f_en[SV] ? f_val[SV] : dut.u_ctrl.g_stage[i].u_vote.g_copy[k].g_bit[0].u_v.a[0];
      end
      always @(x_en[SC])
        if (x_en[SC]) force dut.u_ctrl.g_stage[i].g_copy[k].u_c.c = x_val[SC];
        else          release dut.u_ctrl.g_stage[i].g_copy[k].u_c.c;
      always @(x_en[SV])
        if (x_en[SV]) force dut.u_ctrl.g_stage[i].u_vote.g_copy[k].g_bit[0].u_v.y = x_val[SV];
        else          release dut.u_ctrl.g_stage[i].u_vote.g_copy[k].g_bit[0].u_v.y;
      always @(f_en[SL] or f_val[SL])
        if (f_en[SL]) force dut.g_stage[i].g_copy[k].u_lat.q = {WIDTH{f_val[SL]}};
        else          release dut.g_stage[i].g_copy[k].u_lat.q;
    end
  end

  function automatic logic maj(input logic [2:0] x);
    return (x[0] & x[1]) | (x[1] & x[2]) | (x[2] & x[0]);
  endfunction

  bit skew;  // drive the three request copies at skewed times

  task automatic drive(ref logic [2:0] t, input logic lvl, input bit skew);
    int order = $urandom_range(2, 0);
    for (int j = 0; j < 3; j++) begin
      t[(order + j) % 3] = lvl;
      if (skew && JITTER > 0 && j < 2) #($urandom_range(JITTER, 1));
    end
  endtask

  task automatic wait_maj(ref logic [2:0] t, input logic lvl, input int limit, output bit ok);
    int n = 0;
    ok = 1;
    while (maj(t) != lvl) begin
      #1;
      if (++n > limit) begin ok = 0; return; end
    end
  endtask

  // One run. ok = 0 on deadlock, protocol error or data mismatch.
  task automatic run(input int ntok, input bit all_copies, output bit ok, output int accepted);
    logic sl = 0, rl = 0;
    int sent = 0, recv = 0, mism = 0;
    bit w, proto_err = 0;
    logic [WIDTH-1:0] words[$];
    logic [WIDTH-1:0] exp_w, got;
    int limit = 40 * STAGES * (FWD + JITTER + 4);
    ok = 1; accepted = 0;
    // reset long enough for every delay element to settle to zero
    rst = 1; req_in = '0; ack_out = '0; data_in = '0;
    #(4 * (FWD + JITTER) + 10) rst = 0; #5;
    for (int n = 0; n < ntok; n++) words.push_back(WIDTH'($urandom));
    // fill until stalled
    while (sent < ntok) begin
      #($urandom_range(3, 1));
      data_in = {3{words[sent]}};
      #($urandom_range(3, 1));
      sl = !sl; drive(req_in, sl, skew);
      wait_maj(ack_in, sl, 40 * (FWD + JITTER + 4), w);
      if (!w) begin sl = !sl; break; end
      sent++;
    end
    accepted = sent;
    fork
      begin
        while (recv < ntok) begin
          wait_maj(req_out, !rl, limit, w);
          if (!w) begin ok = 0; break; end
          if (recv >= sent + 1) proto_err = 1;   // output before input
          #(SETTLE);
          exp_w = words[recv];
          got = (data_out[0] & data_out[1]) | (data_out[1] & data_out[2]) | (data_out[2] & data_out[0]);
          if (got != exp_w) mism++;
          if (all_copies)
            for (int k = 0; k < 3; k++) if (data_out[k] != exp_w) mism++;
          recv++;
          #($urandom_range(3, 1));
          rl = !rl; drive(ack_out, rl, 1'b0);
        end
      end
      begin
        if (sent < ntok) begin
          wait_maj(ack_in, !sl, limit, w);
          if (!w) ok = 0; else sent++;
          sl = !sl;
          while (ok && sent < ntok) begin
            #($urandom_range(3, 1));
            data_in = {3{words[sent]}};
            #($urandom_range(3, 1));
            sl = !sl; drive(req_in, sl, skew);
            wait_maj(ack_in, sl, limit, w);
            if (!w) begin ok = 0; break; end
            sent++;
          end
        end
      end
    join
    if (recv != ntok || mism != 0 || proto_err) ok = 0;
    // an extra output request after the last word is a protocol error
    #(4 * (FWD + JITTER));
    if (maj(req_out) != rl) ok = 0;
  endtask

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [%s] @%0t: %s", VOTER.name(), $time, msg);
    end
  endtask

  // probability weights per cell, Table-17 style: equivalent gates / 2
  function automatic real weight(input int site);
    if (site < 3 * STAGES) return 1.25;                    // C-element
    return (VOTER == VOTER_HFMV) ? 6.25 : 1.5;             // voter
  endfunction

  initial begin
    bit ok;
    int acc;
    done = 0; checks = 0; failures = 0; skew = 1;
    f_en = '0; f_val = '0; e_en = '0; e_sel = '0;
    #1;
    if (MODE == 0) begin
      int npass = 0;
      // fault-free: every copy of the output data must be right
      skew = 0;
      run(STAGES + 5, 1, ok, acc);
      check(ok, "fault-free run, no skew");
      check(acc == STAGES, $sformatf("capacity %0d, expected %0d", acc, STAGES));
      skew = 1;
      run(STAGES + 5, 1, ok, acc);
      check(ok, "fault-free run, skewed requests");
      for (int s = 0; s < NSITES; s++) begin
        for (int v = 0; v < 2; v++) begin
          f_en = '0; f_val = '0;
          f_en[s] = 1; f_val[s] = v[0];
          run(STAGES + 3, 0, ok, acc);
          check(ok, $sformatf("single fault at site %0d stuck-at-%0d", s, v));
          if (ok) npass++;
        end
      end
      f_en = '0;
      $display("[%s] single-fault runs passed: %0d of %0d", VOTER.name(), npass, 2 * NSITES);
    end else if (MODE == 2) begin
      real plist[8] = '{0.0005, 0.001, 0.002, 0.005, 0.01, 0.02, 0.05, 0.1};
      foreach (plist[pi]) begin
        int nfail, nfaults_total;
        nfail = 0; nfaults_total = 0;
        for (int r = 0; r < RUNS; r++) begin
          int nf;
          nf = 0;
          e_en = '0; e_sel = '0;
          for (int s = 0; s < NCTRL; s++) begin
            real u, p;
            u = real'($urandom) / 4294967296.0;
            // early-rise plus early-fall weight, Table-17 style
            p = (s < 3 * STAGES) ? 2.5 * plist[pi] : ((VOTER == VOTER_HFMV) ? 6.25 : 1.5) * plist[pi];
            if (u < p) begin e_en[s] = 1; e_sel[s] = 1'($urandom); nf++; end
          end
          nfaults_total += nf;
          run(STAGES + 2, 0, ok, acc);
          if (!ok) nfail++;
          if (nf <= 1) check(ok, $sformatf("run with %0d early-transition fault must pass", nf));
        end
        $display("[micropipeline %s] P_Dys=%0.4f runs=%0d mean faults=%0.2f pipeline error rate=%0.3f",
                 VOTER.name(), plist[pi], RUNS, real'(nfaults_total) / RUNS, real'(nfail) / RUNS);
      end
      e_en = '0;
      check(1'b1, "early-transition sweep completed");
    end else begin
      real plist[8] = '{0.0005, 0.001, 0.002, 0.005, 0.01, 0.02, 0.05, 0.1};
      foreach (plist[pi]) begin
        int nfail, nfaults_total;
        nfail = 0; nfaults_total = 0;
        for (int r = 0; r < RUNS; r++) begin
          int nf;
          nf = 0;
          f_en = '0; f_val = '0;
          for (int s = 0; s < NCTRL; s++) begin
            real u, p;
            u = real'($urandom) / 4294967296.0;
            p = weight(s) * plist[pi];
            if (u < p)          begin f_en[s] = 1; f_val[s] = 1; nf++; end
            else if (u < 2 * p) begin f_en[s] = 1; f_val[s] = 0; nf++; end
          end
          nfaults_total += nf;
          run(STAGES + 2, 0, ok, acc);
          if (!ok) nfail++;
          if (nf <= 1) check(ok, $sformatf("run with %0d fault must pass", nf));
        end
        $display("[micropipeline %s] P_SA=%0.4f runs=%0d mean faults=%0.2f pipeline error rate=%0.3f",
                 VOTER.name(), plist[pi], RUNS, real'(nfaults_total) / RUNS, real'(nfail) / RUNS);
      end
      f_en = '0;
      check(1'b1, "stochastic sweep completed");
    end
    done = 1;
  end
endmodule
