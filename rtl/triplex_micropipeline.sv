// triplex_micropipeline: triple-modular redundant 2-phase bundled-data
// micropipeline (an elastic FIFO), STAGES stages of WIDTH-bit data.
//
// Control is the triplex dataless pipeline (triplicated C-elements, each
// triplet restored by a triplex voter). The data path is three copies of the
// capture-pass latch chain. Latch copy k of stage i is controlled by the
// voted control copy k of its own stage (capture) and of the next stage
// (pass), so a faulty C-element cannot open or close a latch by itself. A
// bitwise majority voter in front of every latch (except the first) restores
// the data word from the three copies of the previous stage, so a single
// corrupted latch copy is corrected before the next stage.
//
// Handshake: 2-phase bundled data on triplets. The sender sets data_in[k]
// and then toggles req_in[k]; the pipeline toggles ack_in[k] when the word is
// captured in stage 0. At the output, data_out[k] is valid when req_out[k]
// toggles and is held until the receiver toggles ack_out[k].
// Timing: each stage adds a voter delay and the forward delay element
// (FWD_DELAY) to the forward latency; the data must settle through one latch
// and one data voter within FWD_DELAY plus the control delays. The voted
// capture controls of a triplet may be skewed; FWD_DELAY must exceed that
// skew plus the latch set-up time. The C-elements see each acknowledge
// REV_DELAY after the latch it reopens, so a latch always passes the next
// word before it captures again.
// rst (active high) empties the pipeline.
//
// Follows the document: 10 stages, 8-bit bundled data, triplicated latches,
// voters driving the latch controls, data voters between latch stages. This
// design's choice: a data voter in front of every latch but the first.
module triplex_micropipeline
  import tmr_pkg::*;
#(
  parameter int unsigned STAGES    = 10,
  parameter int unsigned WIDTH     = 8,
  parameter voter_e      VOTER     = VOTER_MAJ,
  parameter int unsigned FWD_DELAY = 2,
  parameter int unsigned REV_DELAY = 1,
  parameter int unsigned JITTER    = 0
) (
  input  logic                   rst,
  input  logic [2:0]             req_in,
  output logic [2:0]             ack_in,
  input  logic [2:0][WIDTH-1:0]  data_in,
  output logic [2:0]             req_out,
  input  logic [2:0]             ack_out,
  output logic [2:0][WIDTH-1:0]  data_out
);

  logic [STAGES-1:0][2:0]            v;   // voted stage controls
  logic [STAGES-1:0][2:0][WIDTH-1:0] q;   // latch outputs
  logic [STAGES-1:0][2:0][WIDTH-1:0] d;   // latch inputs

  triplex_dataless_pipeline #(
    .STAGES(STAGES), .VOTER(VOTER), .FWD_DELAY(FWD_DELAY), .REV_DELAY(REV_DELAY),
    .JITTER(JITTER)
  ) u_ctrl (
    .rst    (rst),
    .req_in (req_in),
    .ack_in (ack_in),
    .req_out(req_out),
    .ack_out(ack_out),
    .stage_v(v)
  );

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    for (genvar k = 0; k < 3; k++) begin : g_copy
      logic pas;
      if (i == STAGES - 1) begin : g_last
        assign pas = ack_out[k];
      end else begin : g_mid
        assign pas = v[i+1][k];
      end

      if (i == 0) begin : g_first
        assign d[i][k] = data_in[k];
      end else begin : g_vote
        maj3 #(.WIDTH(WIDTH)) u_dvote (
          .a(q[i-1][0]), .b(q[i-1][1]), .c(q[i-1][2]), .y(d[i][k])
        );
      end

      capture_pass_latch #(.WIDTH(WIDTH)) u_lat (
        .cap(v[i][k]),
        .pas(pas),
        .d  (d[i][k]),
        .q  (q[i][k])
      );
    end
  end

  assign data_out = q[STAGES-1];

endmodule
