// triplex_dataless_pipeline: triple-modular redundant 2-phase pipeline
// control ("dataless" pipeline), STAGES stages.
//
// The simplex circuit is a chain of Muller C-elements, each taking the
// request from the stage before and the inverted acknowledge (the next
// stage's C-element output) from the stage after. Here every C-element and
// wire is triplicated and every C-element triplet is followed by a triplex
// majority voter, so each stage is:
//   c[i][k] = C( r[i][k], ~a[i][k] )          k = copy 0..2
//   v[i][*] = triplex_voter( c[i][0..2] )
//   r[i+1][k] = delay( v[i][k], FWD_DELAY )    forward matched delay
//   a[i][k]   = delay( v[i+1][k], REV_DELAY )  inverted acknowledge input
// A single faulty C-element, voter or wire corrupts one copy of one triplet
// and is outvoted at the next restoring stage. Because all copies are
// restored, the three wires of a triplet are interchangeable.
//
// Handshake: 2-phase (transition) signalling on every triplet. req_in/ack_in
// face the sender, req_out/ack_out the receiver; req_out is the voted last
// stage delayed by FWD_DELAY, ack_in is the voted first stage. stage_v gives
// the voted C-element outputs, used as capture controls of data latches.
// Timing: forward latency FWD_DELAY per stage; the stage loop (one stage's
// C-element fires, the next one fires, its acknowledge returns) takes
// FWD_DELAY + REV_DELAY plus gate delays, which is the pipeline period.
// REV_DELAY stands for the delay of the inverting C-element input; it also
// guarantees that a data latch reopened by the next stage has passed its
// new word before its own C-element can close it again.
// The delay elements are inertial: a pulse shorter than the delay is
// absorbed. A stage pulse lasts at least FWD_DELAY + REV_DELAY, so the
// forward jitter must stay below REV_DELAY or one copy can lose a
// transition; this is checked at elaboration.
// rst (active high) empties the pipeline (all C-elements and voters to 0).
//
// Follows the document: triplication, one voter triplet per C-element
// triplet, inverted acknowledge input, 10 stages. This design's own choices:
// the voter sits between the C-element and both of its neighbours, the
// forward delay element sits after the voter, FWD_DELAY = 2 units and
// REV_DELAY = 1 unit.
module triplex_dataless_pipeline
  import tmr_pkg::*;
#(
  parameter int unsigned STAGES    = 10,
  parameter voter_e      VOTER     = VOTER_MAJ,
  parameter int unsigned FWD_DELAY = 2,
  parameter int unsigned REV_DELAY = 1,
  parameter int unsigned JITTER    = 0
) (
  input  logic                    rst,
  input  logic [2:0]              req_in,
  output logic [2:0]              ack_in,
  output logic [2:0]              req_out,
  input  logic [2:0]              ack_out,
  output logic [STAGES-1:0][2:0]  stage_v
);

  logic [STAGES-1:0][2:0] c;    // C-element outputs
  logic [STAGES-1:0][2:0] v;    // voted C-element outputs
  logic [STAGES:0][2:0]   r;    // forward requests into each stage (r[STAGES] = req_out)
  logic [STAGES-1:0][2:0] an;   // acknowledge from the next stage
  logic [STAGES-1:0][2:0] a;    // acknowledge into each C-element (delayed)

  assign r[0] = req_in;

  if (JITTER >= REV_DELAY) begin : g_bad_timing
    $error("triplex_dataless_pipeline: JITTER must be smaller than REV_DELAY");
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    if (i == STAGES - 1) begin : g_last
      assign an[i] = ack_out;
    end else begin : g_mid
      assign an[i] = v[i+1];
    end

    for (genvar k = 0; k < 3; k++) begin : g_copy
      c_element #(.N(2)) u_c (
        .rst(rst),
        .a  ({~a[i][k], r[i][k]}),
        .c  (c[i][k])
      );
      delay_element #(.DELAY(FWD_DELAY), .JITTER(JITTER)) u_dly (
        .in (v[i][k]),
        .out(r[i+1][k])
      );
      delay_element #(.DELAY(REV_DELAY), .JITTER(0)) u_rdly (
        .in (an[i][k]),
        .out(a[i][k])
      );
    end

    triplex_voter #(.WIDTH(1), .VOTER(VOTER)) u_vote (
      .rst(rst),
      .x  (c[i]),
      .y  (v[i])
    );
  end

  assign req_out = r[STAGES];
  assign ack_in  = v[0];
  assign stage_v = v;

endmodule
