// tmr_async_top: triple-modular redundant clockless pipelines with simplex
// interfaces, plus the triplex flow-control building blocks.
//
// Two independent datapaths, each a simplex channel in, a 10-stage triplex
// pipeline, and a simplex channel out:
//   mp_*  2-phase bundled-data path (8-bit):
//         s2t_bundled -> triplex_micropipeline -> t2s_bundled.
//         The simplex sender's acknowledge and the simplex receiver's
//         request come from CMAJ elements, which wait for all three copies
//         or, after CMAJ_DELAY, for two.
//   dr_*  4-phase dual-rail path (1 bit):
//         s2t_handshake -> triplex_4p2r_pipeline -> t2s_handshake.
// Inside the pipelines every C-element triplet is restored by a triplex
// voter, so any single faulty cell is masked.
// The triplex FORK, JOIN, MERGE and MUTEX stand beside the pipelines with
// their triplex ports brought out (fk_*, jn_*, mg_*, mx_*); they are the
// building blocks from which larger triplex clockless systems are composed.
//
// Handshakes: mp_ 2-phase (transition) request/acknowledge with data valid
// before the request transition; dr_ 4-phase return-to-zero dual rail (t,f);
// fk_/jn_ 2-phase; mg_/mx_ 4-phase. rst (active high) empties everything.
// VOTER selects combinational majority gates (default) or hazard-free
// majority voters throughout.
// The clockless handshakes form feedback loops through C-elements, voters
// and OR gates; the simulator's UNOPTFLAT loop warnings on these nets are
// the intended asynchronous feedback, not a design error.
module tmr_async_top
  import tmr_pkg::*;
#(
  parameter int unsigned STAGES     = 10,
  parameter int unsigned WIDTH      = 8,
  parameter voter_e      VOTER      = VOTER_MAJ,
  parameter int unsigned FWD_DELAY  = 2,
  parameter int unsigned CMAJ_DELAY = 10
) (
  input  logic                  rst,
  // 2-phase bundled-data path, simplex ends
  input  logic                  mp_in_req,
  output logic                  mp_in_ack,
  input  logic [WIDTH-1:0]      mp_in_data,
  output logic                  mp_out_req,
  input  logic                  mp_out_ack,
  output logic [WIDTH-1:0]      mp_out_data,
  // 4-phase dual-rail path, simplex ends
  input  logic                  dr_in_t,
  input  logic                  dr_in_f,
  output logic                  dr_in_ack,
  output logic                  dr_out_t,
  output logic                  dr_out_f,
  input  logic                  dr_out_ack,
  // triplex FORK
  input  logic [2:0]            fk_req_in,
  output logic [2:0]            fk_ack_in,
  input  logic [2:0][WIDTH-1:0] fk_data_in,
  output logic [2:0]            fk_req_a,
  input  logic [2:0]            fk_ack_a,
  output logic [2:0][WIDTH-1:0] fk_data_a,
  output logic [2:0]            fk_req_b,
  input  logic [2:0]            fk_ack_b,
  output logic [2:0][WIDTH-1:0] fk_data_b,
  // triplex JOIN
  input  logic [2:0]              jn_req_a,
  output logic [2:0]              jn_ack_a,
  input  logic [2:0][WIDTH-1:0]   jn_data_a,
  input  logic [2:0]              jn_req_b,
  output logic [2:0]              jn_ack_b,
  input  logic [2:0][WIDTH-1:0]   jn_data_b,
  output logic [2:0]              jn_req_out,
  input  logic [2:0]              jn_ack_out,
  output logic [2:0][2*WIDTH-1:0] jn_data_out,
  // triplex MERGE
  input  logic [2:0]            mg_req_a,
  output logic [2:0]            mg_ack_a,
  input  logic [2:0][WIDTH-1:0] mg_data_a,
  input  logic [2:0]            mg_req_b,
  output logic [2:0]            mg_ack_b,
  input  logic [2:0][WIDTH-1:0] mg_data_b,
  output logic [2:0]            mg_req_c,
  input  logic [2:0]            mg_ack_c,
  output logic [2:0][WIDTH-1:0] mg_data_c,
  // triplex MUTEX
  input  logic [2:0]            mx_r1,
  input  logic [2:0]            mx_r2,
  output logic [2:0]            mx_g1,
  output logic [2:0]            mx_g2
);

  // ---------------- 2-phase bundled-data path ----------------
  logic [2:0]            mp_req_i, mp_ack_i, mp_req_o, mp_ack_o;
  logic [2:0][WIDTH-1:0] mp_data_i, mp_data_o;

  s2t_bundled #(.WIDTH(WIDTH), .CMAJ_DELAY(CMAJ_DELAY)) u_mp_s2t (
    .rst(rst), .req(mp_in_req), .ack(mp_in_ack), .data(mp_in_data),
    .req_t(mp_req_i), .ack_t(mp_ack_i), .data_t(mp_data_i)
  );

  triplex_micropipeline #(
    .STAGES(STAGES), .WIDTH(WIDTH), .VOTER(VOTER), .FWD_DELAY(FWD_DELAY)
  ) u_mp (
    .rst(rst),
    .req_in(mp_req_i), .ack_in(mp_ack_i), .data_in(mp_data_i),
    .req_out(mp_req_o), .ack_out(mp_ack_o), .data_out(mp_data_o)
  );

  t2s_bundled #(.WIDTH(WIDTH), .CMAJ_DELAY(CMAJ_DELAY)) u_mp_t2s (
    .rst(rst), .req_t(mp_req_o), .ack_t(mp_ack_o), .data_t(mp_data_o),
    .req(mp_out_req), .ack(mp_out_ack), .data(mp_out_data)
  );

  // ---------------- 4-phase dual-rail path ----------------
  logic [2:0][1:0] dr_rails_i, dr_rails_o;
  logic [2:0]      dr_t_i, dr_f_i, dr_ack_i, dr_t_o, dr_f_o, dr_ack_o;
  logic [1:0]      dr_out_rails;

  s2t_handshake #(.RAILS(2), .VOTER(VOTER)) u_dr_s2t (
    .rst(rst), .req({dr_in_t, dr_in_f}), .ack(dr_in_ack),
    .req_t(dr_rails_i), .ack_t(dr_ack_i)
  );

  for (genvar k = 0; k < 3; k++) begin : g_dr_copy
    assign dr_t_i[k]        = dr_rails_i[k][1];
    assign dr_f_i[k]        = dr_rails_i[k][0];
    assign dr_rails_o[k]    = {dr_t_o[k], dr_f_o[k]};
  end

  triplex_4p2r_pipeline #(.STAGES(STAGES), .VOTER(VOTER)) u_dr (
    .rst(rst),
    .in_t(dr_t_i), .in_f(dr_f_i), .in_ack(dr_ack_i),
    .out_t(dr_t_o), .out_f(dr_f_o), .out_ack(dr_ack_o)
  );

  t2s_handshake #(.RAILS(2), .VOTER(VOTER)) u_dr_t2s (
    .rst(rst), .req_t(dr_rails_o), .ack_t(dr_ack_o),
    .req(dr_out_rails), .ack(dr_out_ack)
  );

  assign dr_out_t = dr_out_rails[1];
  assign dr_out_f = dr_out_rails[0];

  // ---------------- building blocks ----------------
  triplex_fork #(.WIDTH(WIDTH), .VOTER(VOTER)) u_fork (
    .rst(rst), .req_in(fk_req_in), .ack_in(fk_ack_in), .data_in(fk_data_in),
    .req_a(fk_req_a), .ack_a(fk_ack_a), .data_a(fk_data_a),
    .req_b(fk_req_b), .ack_b(fk_ack_b), .data_b(fk_data_b)
  );

  triplex_join #(.WIDTH(WIDTH), .VOTER(VOTER)) u_join (
    .rst(rst), .req_a(jn_req_a), .ack_a(jn_ack_a), .data_a(jn_data_a),
    .req_b(jn_req_b), .ack_b(jn_ack_b), .data_b(jn_data_b),
    .req_out(jn_req_out), .ack_out(jn_ack_out), .data_out(jn_data_out)
  );

  triplex_merge #(.WIDTH(WIDTH), .VOTER(VOTER)) u_merge (
    .rst(rst), .req_a(mg_req_a), .ack_a(mg_ack_a), .data_a(mg_data_a),
    .req_b(mg_req_b), .ack_b(mg_ack_b), .data_b(mg_data_b),
    .req_c(mg_req_c), .ack_c(mg_ack_c), .data_c(mg_data_c)
  );

  triplex_mutex #(.VOTER(VOTER)) u_mutex (
    .rst(rst), .r1(mx_r1), .r2(mx_r2), .g1(mx_g1), .g2(mx_g2)
  );

endmodule
