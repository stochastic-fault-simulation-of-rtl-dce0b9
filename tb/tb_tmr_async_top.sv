// tb_tmr_async_top: end-to-end test of the complete design at its default
// parameters (10-stage pipelines, 8-bit bundled data, combinational voters,
// CMAJ delay 10 units).
//
// Simplex environments drive both paths through their simplex-triplex
// interfaces:
//   * 2-phase bundled data: a simplex sender pushes random words while the
//     simplex receiver holds off until the sender stalls (pipeline full),
//     then everything drains; this is repeated with a stuck C-element inside
//     the micropipeline and with a stuck first-stage voter copy, which makes
//     the input CMAJ take its slow (two copies plus delay) path.
//   * 4-phase dual rail: random bits go through the 1-bit 4P2R pipeline, with
//     and without a stuck C-element.
//   * the triplex FORK, JOIN, MERGE and MUTEX ports get one short exercise
//     each.
// Every received word and bit is compared with what was sent. Each mechanism
// has a counter (words, full pipeline, masked faults, CMAJ slow path, bits,
// fork/join/merge transfers, mutex contention); the summary counts a failure
// for any mechanism that never happened. A watchdog ends the test if it
// hangs. Faults are forced on internal nodes from this bench.
module tb_tmr_async_top;
  import tmr_pkg::*;
  int checks = 0, failures = 0;

  logic       rst;
  logic       mp_in_req, mp_in_ack, mp_out_req, mp_out_ack;
  logic [7:0] mp_in_data, mp_out_data;
  logic       dr_in_t, dr_in_f, dr_in_ack, dr_out_t, dr_out_f, dr_out_ack;
  logic [2:0] fk_req_in, fk_ack_in, fk_req_a, fk_ack_a, fk_req_b, fk_ack_b;
  logic [2:0][7:0] fk_data_in, fk_data_a, fk_data_b;
  logic [2:0] jn_req_a, jn_ack_a, jn_req_b, jn_ack_b, jn_req_out, jn_ack_out;
  logic [2:0][7:0] jn_data_a, jn_data_b;
  logic [2:0][15:0] jn_data_out;
  logic [2:0] mg_req_a, mg_ack_a, mg_req_b, mg_ack_b, mg_req_c, mg_ack_c;
  logic [2:0][7:0] mg_data_a, mg_data_b, mg_data_c;
  logic [2:0] mx_r1, mx_r2, mx_g1, mx_g2;

  tmr_async_top dut (.*);

  // mechanism counters
  int n_mp_words, n_mp_full, n_mp_fault_words, n_cmaj_slow, n_dr_bits, n_dr_fault_bits;
  int n_fork, n_join, n_merge, n_mutex_contention;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CMAJ slow path: the simplex acknowledge toggles while the three
  // acknowledge copies disagree
  always @(mp_in_ack)
    if (!rst && !(dut.mp_ack_i === 3'b000 || dut.mp_ack_i === 3'b111)) n_cmaj_slow++;

  // ---------------- 2-phase bundled-data path ----------------
  task automatic mp_run(input int ntok, input bit faulted);
    logic [7:0] words[$];
    int sent = 0, recv = 0, t;
    bit stalled = 0;
    for (int n = 0; n < ntok; n++) words.push_back(8'($urandom));
    fork
      begin : sender
        while (sent < ntok) begin
          logic l;
          l = mp_in_ack;
          #2 mp_in_data = words[sent];
          #2 mp_in_req = !mp_in_req;
          t = 0;
          while (mp_in_ack === l && t < 2000) begin #1; t++; end
          check(t < 2000, "bundled sender: no acknowledge");
          if (t >= 2000) break;
          if (t > 60) stalled = 1;      // waited for the receiver to drain
          sent++;
        end
      end
      begin : receiver
        logic l;
        l = mp_out_req;
        // hold off until the pipeline is full and the sender has stalled
        t = 0;
        while (sent < 10 && t < 2000) begin #1; t++; end
        #200;
        if (sent < ntok) begin
          check(sent >= 10, $sformatf("pipeline took only %0d words before stalling", sent));
          n_mp_full++;
        end
        while (recv < ntok) begin
          t = 0;
          while (mp_out_req === l && t < 2000) begin #1; t++; end
          check(t < 2000, "bundled receiver: no request");
          if (t >= 2000) break;
          l = mp_out_req;
          #1;
          check(mp_out_data === words[recv],
                $sformatf("word %0d: got %h expected %h", recv, mp_out_data, words[recv]));
          if (mp_out_data === words[recv]) begin
            if (faulted) n_mp_fault_words++; else n_mp_words++;
          end
          recv++;
          #2 mp_out_ack = !mp_out_ack;
        end
      end
    join
    if (stalled) n_mp_full++;
    #50;
    // 2-phase: after the last acknowledge the request and acknowledge match
    check(mp_out_req === mp_out_ack, "no extra output request");
  endtask

  // ---------------- 4-phase dual-rail path ----------------
  task automatic dr_run(input int nbits, input bit faulted);
    for (int n = 0; n < nbits; n++) begin
      logic b;
      int t;
      b = 1'($urandom);
      #2;
      if (b) dr_in_t = 1; else dr_in_f = 1;
      t = 0;
      while (!(dr_out_t || dr_out_f) && t < 500) begin #1; t++; end
      check(t < 500, "dual-rail: no output");
      check(dr_out_t === b && dr_out_f === !b, $sformatf("dual-rail bit %0d: t=%b f=%b expected %b", n, dr_out_t, dr_out_f, b));
      if (dr_out_t === b && dr_out_f === !b) begin
        if (faulted) n_dr_fault_bits++; else n_dr_bits++;
      end
      #2 dr_out_ack = 1;
      t = 0;
      while (!dr_in_ack && t < 500) begin #1; t++; end
      check(t < 500, "dual-rail: no input acknowledge");
      #2 dr_in_t = 0; dr_in_f = 0;
      t = 0;
      while ((dr_out_t || dr_out_f) && t < 500) begin #1; t++; end
      check(t < 500, "dual-rail: output did not return to zero");
      #2 dr_out_ack = 0;
      t = 0;
      while (dr_in_ack && t < 500) begin #1; t++; end
      check(t < 500, "dual-rail: input acknowledge did not fall");
    end
  endtask

  task automatic reset_all();
    rst = 1;
    mp_in_req = 0; mp_out_ack = 0; mp_in_data = '0;
    dr_in_t = 0; dr_in_f = 0; dr_out_ack = 0;
    fk_req_in = '0; fk_ack_a = '0; fk_ack_b = '0; fk_data_in = '0;
    jn_req_a = '0; jn_req_b = '0; jn_ack_out = '0; jn_data_a = '0; jn_data_b = '0;
    mg_req_a = '0; mg_req_b = '0; mg_ack_c = '0; mg_data_a = '0; mg_data_b = '0;
    mx_r1 = '0; mx_r2 = '0;
    #50 rst = 0;
    #10;
  endtask

  initial begin
    n_mp_words = 0; n_mp_full = 0; n_mp_fault_words = 0; n_cmaj_slow = 0;
    n_dr_bits = 0; n_dr_fault_bits = 0; n_fork = 0; n_join = 0; n_merge = 0;
    n_mutex_contention = 0;

    reset_all();
    mp_run(16, 0);
    dr_run(20, 0);

    // a C-element stuck inside the micropipeline and one in the 4P2R pipeline
    reset_all();
    force dut.u_mp.u_ctrl.g_stage[4].g_copy[1].u_c.c = 1'b0;
    force dut.u_dr.g_stage[6].u_stage.g_copy[2].u_ct.c = 1'b1;
    mp_run(14, 1);
    dr_run(20, 1);
    release dut.u_mp.u_ctrl.g_stage[4].g_copy[1].u_c.c;
    release dut.u_dr.g_stage[6].u_stage.g_copy[2].u_ct.c;

    // one copy of the first-stage voter stuck: input CMAJ sees two copies
    reset_all();
    force dut.u_mp.u_ctrl.g_stage[0].u_vote.g_copy[2].g_bit[0].u_v.y = 1'b0;
    mp_run(12, 1);
    release dut.u_mp.u_ctrl.g_stage[0].u_vote.g_copy[2].g_bit[0].u_v.y;

    // FORK: one token to both branches
    for (int n = 0; n < 4; n++) begin
      logic l;
      l = !fk_req_in[0];
      fk_data_in = {3{8'($urandom)}};
      fk_req_in = {3{l}};
      #2;
      check(fk_req_a === {3{l}} && fk_req_b === {3{l}} && fk_data_a === fk_data_in && fk_data_b === fk_data_in,
            "fork fan-out");
      fk_ack_a = {3{l}};
      #2 check(fk_ack_in === {3{!l}}, "fork waits for both branches");
      fk_ack_b = {3{l}};
      #2 check(fk_ack_in === {3{l}}, "fork acknowledges after both branches");
      if (fk_ack_in === {3{l}}) n_fork++;
    end

    // JOIN: two tokens into one
    for (int n = 0; n < 4; n++) begin
      logic l;
      l = !jn_req_a[0];
      jn_data_a = {3{8'($urandom)}}; jn_data_b = {3{8'($urandom)}};
      jn_req_a = {3{l}};
      #2 check(jn_req_out === {3{!l}}, "join waits for both inputs");
      jn_req_b = {3{l}};
      #2 check(jn_req_out === {3{l}} && jn_data_out[0] === {jn_data_b[0], jn_data_a[0]}, "join output");
      if (jn_req_out === {3{l}}) n_join++;
      jn_ack_out = {3{l}};
      #2 check(jn_ack_a === {3{l}} && jn_ack_b === {3{l}}, "join acknowledge fan-out");
    end

    // MERGE: alternate inputs, 4-phase
    for (int n = 0; n < 4; n++) begin
      bit b;
      b = n[0];
      mg_data_a = {3{8'($urandom)}}; mg_data_b = {3{8'($urandom)}};
      if (b) mg_req_b = '1; else mg_req_a = '1;
      #2 check(mg_req_c === 3'b111 && mg_data_c === (b ? mg_data_b : mg_data_a), "merge output");
      mg_ack_c = '1;
      #2 check((b ? mg_ack_b : mg_ack_a) === 3'b111 && (b ? mg_ack_a : mg_ack_b) === 3'b000,
               "merge acknowledges the active input only");
      if ((b ? mg_ack_b : mg_ack_a) === 3'b111) n_merge++;
      mg_req_a = '0; mg_req_b = '0;
      #2 mg_ack_c = '0;
      #2 check(mg_ack_a === 3'b000 && mg_ack_b === 3'b000, "merge returns to zero");
    end

    // MUTEX: overlapping requests
    for (int n = 0; n < 4; n++) begin
      mx_r1 = '1;
      #1 mx_r2 = '1;
      #2 check(mx_g1 === 3'b111 && mx_g2 === 3'b000, "mutex grants the first request only");
      mx_r1 = '0;
      #2 check(mx_g1 === 3'b000 && mx_g2 === 3'b111, "mutex passes the grant on release");
      if (mx_g2 === 3'b111) n_mutex_contention++;
      mx_r2 = '0;
      #2;
    end

    $display("mechanisms: words=%0d full=%0d masked-fault words=%0d cmaj-slow=%0d bits=%0d masked-fault bits=%0d fork=%0d join=%0d merge=%0d mutex-contention=%0d",
             n_mp_words, n_mp_full, n_mp_fault_words, n_cmaj_slow, n_dr_bits, n_dr_fault_bits,
             n_fork, n_join, n_merge, n_mutex_contention);
    check(n_mp_words > 0,         "mechanism never seen: bundled-data transfer");
    check(n_mp_full > 0,          "mechanism never seen: full micropipeline stall");
    check(n_mp_fault_words > 0,   "mechanism never seen: masked fault in micropipeline");
    check(n_cmaj_slow > 0,        "mechanism never seen: CMAJ slow path");
    check(n_dr_bits > 0,          "mechanism never seen: dual-rail transfer");
    check(n_dr_fault_bits > 0,    "mechanism never seen: masked fault in 4P2R pipeline");
    check(n_fork > 0,             "mechanism never seen: fork");
    check(n_join > 0,             "mechanism never seen: join");
    check(n_merge > 0,            "mechanism never seen: merge");
    check(n_mutex_contention > 0, "mechanism never seen: mutex contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
