// triplex_4p2r_pipeline: triple-modular redundant four-phase dual-rail
// pipeline, STAGES stages, one bit wide.
//
// A chain of triplex_4p2r_stage: the voted rails of stage i feed stage i+1,
// and the OR completion triplet of stage i+1 is the acknowledge of stage i.
// The circuit is quasi delay-insensitive: data and timing travel together on
// the rails, so no matched delays are needed. Wider words are built by
// placing several such pipelines side by side.
//
// Interface (all triplets): in_t/in_f/in_ack face the sender, out_t/out_f/
// out_ack the receiver. in_ack is the OR completion of stage 0; out_ack
// comes from the receiver's completion. rst (active high) empties the pipe.
// The chained handshake loops between neighbouring stages are real feedback
// paths; the simulator's UNOPTFLAT loop warning on them is expected.
// Follows the document: 10 stages, 1-bit width, as in its simulations.
module triplex_4p2r_pipeline
  import tmr_pkg::*;
#(
  parameter int unsigned STAGES = 10,
  parameter voter_e      VOTER  = VOTER_MAJ
) (
  input  logic       rst,
  input  logic [2:0] in_t,
  input  logic [2:0] in_f,
  output logic [2:0] in_ack,
  output logic [2:0] out_t,
  output logic [2:0] out_f,
  input  logic [2:0] out_ack
);

  logic [STAGES:0][2:0]   t, f;    // rails into each stage; index STAGES = output
  logic [STAGES:0][2:0]   ak;      // ak[i] = acknowledge out of stage i; ak[STAGES] = out_ack

  assign t[0] = in_t;
  assign f[0] = in_f;
  assign ak[STAGES] = out_ack;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    triplex_4p2r_stage #(.VOTER(VOTER)) u_stage (
      .rst          (rst),
      .in_t         (t[i]),
      .in_f         (f[i]),
      .ack_from_next(ak[i+1]),
      .out_t        (t[i+1]),
      .out_f        (f[i+1]),
      .ack_to_prev  (ak[i])
    );
  end

  assign in_ack = ak[0];
  assign out_t  = t[STAGES];
  assign out_f  = f[STAGES];

endmodule
