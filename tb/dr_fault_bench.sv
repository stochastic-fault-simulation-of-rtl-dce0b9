// dr_fault_bench: test bench core for the triplex four-phase dual-rail
// (4P2R) pipeline, used by the block test and by the stochastic fault
// simulation workload.
//
// It instantiates one 1-bit triplex_4p2r_pipeline with the given voter type
// and exercises it in runs. Each run resets the pipeline, injects faults,
// sends random bits while the receiver is held until the sender stalls
// (pipeline full), then drains it. A run fails on deadlock (no handshake
// progress within a time limit), on an illegal code (both rails high at
// the voted output), on a wrong bit, on an output without an input, or on
// an extra output after the last bit.
//
// Fault sites, stuck-at, forced from outside the design; per stage and copy:
// the true-rail and false-rail C-elements, their two voters and the OR gate
// that makes the acknowledge copy (15 sites per stage).
//   MODE 0: every site with both polarities, one at a time, plus fault-free
//           runs; every run must pass.
//   MODE 1: stochastic injection. For each stuck-at probability in the list,
//           RUNS runs; each cell is independently stuck-at-1 or stuck-at-0
//           with probability w * P_SA each (w = 1.25 C-element, 0.75 OR,
//           1.5 majority gate, 6.25 HFMV). Runs with at most one fault must
//           pass; the failure rate per probability is printed.
// The sender drives its three rail copies together and acts on the majority
// of the acknowledge copies; the receiver acts on the voted rails and drives
// its three acknowledge copies together. The pipeline model has no gate
// delays, so the copies of a rail must switch together: a copy that is still
// high after the majority has been acknowledged and released would re-fire
// its C-element as a stale token. (The drive task can skew the copies, which
// shows this effect; it is left off.)
module dr_fault_bench
  import tmr_pkg::*;
#(
  parameter voter_e      VOTER  = VOTER_MAJ,
  parameter int unsigned STAGES = 10,
  parameter int unsigned MODE   = 0,
  parameter int unsigned RUNS   = 20
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int NSITES = 15 * STAGES;
  localparam int LIMIT  = 20 * STAGES + 50;

  logic rst;
  logic [2:0] in_t, in_f, in_ack, out_t, out_f, out_ack;
  logic [NSITES-1:0] f_en, f_val;

  triplex_4p2r_pipeline #(.STAGES(STAGES), .VOTER(VOTER)) dut (
    .rst, .in_t, .in_f, .in_ack, .out_t, .out_f, .out_ack
  );

  // site numbering: group g (0 ct, 1 cf, 2 vote t, 3 vote f, 4 OR) * 3*STAGES + 3*i + k
  for (genvar i = 0; i < STAGES; i++) begin : g_fi
    for (genvar k = 0; k < 3; k++) begin : g_fk
      localparam int B = 3*i + k;
      localparam int G = 3*STAGES;
      always @(f_en[B] or f_val[B])
        if (f_en[B]) force dut.g_stage[i].u_stage.g_copy[k].u_ct.c = f_val[B];
        else         release dut.g_stage[i].u_stage.g_copy[k].u_ct.c;
      always @(f_en[G+B] or f_val[G+B])
        if (f_en[G+B]) force dut.g_stage[i].u_stage.g_copy[k].u_cf.c = f_val[G+B];
        else           release dut.g_stage[i].u_stage.g_copy[k].u_cf.c;
      always @(f_en[2*G+B] or f_val[2*G+B])
        if (f_en[2*G+B]) force dut.g_stage[i].u_stage.u_vt.g_copy[k].g_bit[0].u_v.y = f_val[2*G+B];
        else             release dut.g_stage[i].u_stage.u_vt.g_copy[k].g_bit[0].u_v.y;
      always @(f_en[3*G+B] or f_val[3*G+B])
        if (f_en[3*G+B]) force dut.g_stage[i].u_stage.u_vf.g_copy[k].g_bit[0].u_v.y = f_val[3*G+B];
        else             release dut.g_stage[i].u_stage.u_vf.g_copy[k].g_bit[0].u_v.y;
      always @(f_en[4*G+B] or f_val[4*G+B])
        if (f_en[4*G+B]) force dut.ak[i][k] = f_val[4*G+B];
        else             release dut.ak[i][k];
    end
  end

  function automatic logic maj(input logic [2:0] x);
    return (x[0] & x[1]) | (x[1] & x[2]) | (x[2] & x[0]);
  endfunction

  task automatic drive(ref logic [2:0] t, input logic lvl, input bit skew);
    int order = $urandom_range(2, 0);
    for (int j = 0; j < 3; j++) begin
      t[(order + j) % 3] = lvl;
      if (skew && j < 2) #($urandom_range(2, 1));
    end
  endtask

  task automatic wait_ack(input logic lvl, input int limit, output bit ok);
    int n = 0;
    ok = 1;
    while (maj(in_ack) != lvl) begin
      #1;
      if (++n > limit) begin ok = 0; return; end
    end
  endtask

  // voted output state: 0 empty, 1 valid, 2 illegal
  bit illegal;
  always @(out_t or out_f) if (maj(out_t) && maj(out_f)) illegal = 1;

  bit skew;

  task automatic send(input logic b, input int limit, output bit ok);
    #($urandom_range(3, 1));
    if (b) drive(in_t, 1'b1, skew); else drive(in_f, 1'b1, skew);
    wait_ack(1'b1, limit, ok);
  endtask

  task automatic finish_send(input logic b, input int limit, output bit ok);
    #($urandom_range(3, 1));
    if (b) drive(in_t, 1'b0, skew); else drive(in_f, 1'b0, skew);
    wait_ack(1'b0, limit, ok);
  endtask

  task automatic run(input int ntok, output bit ok, output int accepted);
    int sent = 0, recv = 0, mism = 0;
    bit w, proto_err = 0;
    logic bits[$];
    ok = 1; accepted = 0; illegal = 0;
    rst = 1; in_t = '0; in_f = '0; out_ack = '0;
    #10 rst = 0; #5;
    illegal = 0;
    for (int n = 0; n < ntok; n++) bits.push_back(1'($urandom));
    // fill until stalled
    while (sent < ntok) begin
      send(bits[sent], 10 * STAGES, w);
      if (!w) break;
      finish_send(bits[sent], 10 * STAGES, w);
      if (!w) break;
      sent++;
    end
    accepted = sent;
    fork
      begin
        while (recv < ntok) begin
          int n = 0;
          while (!(maj(out_t) || maj(out_f))) begin
            #1;
            if (++n > LIMIT) break;
          end
          if (n > LIMIT) begin ok = 0; break; end
          if (recv >= sent + 1) proto_err = 1;
          #1;
          if (maj(out_t) != bits[recv] || maj(out_f) != !bits[recv]) mism++;
          recv++;
          #($urandom_range(3, 1));
          out_ack = '1;
          n = 0;
          while (maj(out_t) || maj(out_f)) begin
            #1;
            if (++n > LIMIT) break;
          end
          if (n > LIMIT) begin ok = 0; break; end
          #($urandom_range(3, 1));
          out_ack = '0;
        end
      end
      begin
        // complete the stalled word, then send the rest
        while (ok && sent < ntok) begin
          if (maj(in_ack) != 1'b1) begin
            if (in_t == '0 && in_f == '0) send(bits[sent], LIMIT, w);
            else wait_ack(1'b1, LIMIT, w);
            if (!w) begin ok = 0; break; end
          end
          finish_send(bits[sent], LIMIT, w);
          if (!w) begin ok = 0; break; end
          sent++;
        end
      end
    join
    if (recv != ntok || mism != 0 || proto_err || illegal) ok = 0;
    #40;
    if (maj(out_t) || maj(out_f)) ok = 0;   // extra output
  endtask

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [%s] @%0t: %s", VOTER.name(), $time, msg);
    end
  endtask

  function automatic real weight(input int site);
    int g = site / (3 * STAGES);
    if (g < 2)  return 1.25;                                // C-element
    if (g == 4) return 0.75;                                // OR gate
    return (VOTER == VOTER_HFMV) ? 6.25 : 1.5;              // voter
  endfunction

  initial begin
    bit ok;
    int acc;
    done = 0; checks = 0; failures = 0; skew = 0;
    f_en = '0; f_val = '0;
    #1;
    if (MODE == 0) begin
      int npass = 0;
      skew = 0;
      run(STAGES + 6, ok, acc);
      check(ok, "fault-free run, no skew");
      // a half-buffer 4-phase pipeline holds one bit per two stages
      check(acc == STAGES / 2, $sformatf("capacity %0d, expected %0d", acc, STAGES / 2));
      run(STAGES + 6, ok, acc);
      check(ok, "second fault-free run");
      for (int s = 0; s < NSITES; s++) begin
        for (int v = 0; v < 2; v++) begin
          f_en = '0; f_val = '0;
          f_en[s] = 1; f_val[s] = v[0];
          run(STAGES / 2 + 3, ok, acc);
          check(ok, $sformatf("single fault at site %0d stuck-at-%0d", s, v));
          if (ok) npass++;
        end
      end
      f_en = '0;
      $display("[%s] single-fault runs passed: %0d of %0d", VOTER.name(), npass, 2 * NSITES);
    end else begin
      real plist[8] = '{0.0005, 0.001, 0.002, 0.005, 0.01, 0.02, 0.05, 0.1};
      foreach (plist[pi]) begin
        int nfail, nfaults_total;
        nfail = 0; nfaults_total = 0;
        for (int r = 0; r < RUNS; r++) begin
          int nf;
          nf = 0;
          f_en = '0; f_val = '0;
          for (int s = 0; s < NSITES; s++) begin
            real u, p;
            u = real'($urandom) / 4294967296.0;
            p = weight(s) * plist[pi];
            if (u < p)          begin f_en[s] = 1; f_val[s] = 1; nf++; end
            else if (u < 2 * p) begin f_en[s] = 1; f_val[s] = 0; nf++; end
          end
          nfaults_total += nf;
          run(STAGES / 2 + 2, ok, acc);
          if (!ok) nfail++;
          if (nf <= 1) check(ok, $sformatf("run with %0d fault must pass", nf));
        end
        $display("[4P2R %s] P_SA=%0.4f runs=%0d mean faults=%0.2f pipeline error rate=%0.3f",
                 VOTER.name(), plist[pi], RUNS, real'(nfaults_total) / RUNS, real'(nfail) / RUNS);
      end
      f_en = '0;
      check(1'b1, "stochastic sweep completed");
    end
    done = 1;
  end
endmodule
