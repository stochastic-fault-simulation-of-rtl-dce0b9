// t2s_bundled: triplex-to-simplex interface for a 2-phase bundled-data
// channel.
//
// Each of the three request copies marks when its own copy of the data word
// is valid. A CMAJ element combines them: it toggles the simplex request once
// all three copies have toggled, or DELAY after the second one if the third
// never comes. At that moment at least two data copies are valid, so the
// bitwise majority of the copies is correct; a capture-pass latch, closed by
// the CMAJ transition and reopened by the simplex acknowledge, holds that
// voted word for the simplex receiver. A plain majority gate here would fire
// on one early request plus one valid one, before two words were valid.
//
// Interface: req_t/ack_t/data_t triplex (2-phase bundled), req/ack/data
// simplex. The simplex acknowledge is fanned out to the triplet.
// Timing: the simplex request follows the last request copy by one CMAJ
// delay, or the second copy by CMAJ_DELAY. rst (active high) clears the CMAJ.
module t2s_bundled #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned CMAJ_DELAY = 10
) (
  input  logic                  rst,
  input  logic [2:0]            req_t,
  output logic [2:0]            ack_t,
  input  logic [2:0][WIDTH-1:0] data_t,
  output logic                  req,
  input  logic                  ack,
  output logic [WIDTH-1:0]      data
);

  logic [WIDTH-1:0] voted;

  cmaj #(.DELAY(CMAJ_DELAY)) u_cmaj (.rst(rst), .a(req_t), .c(req));

  maj3 #(.WIDTH(WIDTH)) u_dvote (.a(data_t[0]), .b(data_t[1]), .c(data_t[2]), .y(voted));

  capture_pass_latch #(.WIDTH(WIDTH)) u_lat (.cap(req), .pas(ack), .d(voted), .q(data));

  assign ack_t = {3{ack}};

endmodule
