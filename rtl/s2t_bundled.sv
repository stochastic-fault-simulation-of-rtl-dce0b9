// s2t_bundled: simplex-to-triplex interface for a 2-phase bundled-data
// channel.
//
// The simplex request and data word are fanned out to the three copies of
// the triplex channel. The three acknowledge copies are combined by a CMAJ
// element: the simplex acknowledge toggles as soon as all three copies have
// toggled, or DELAY after two of them have, so one missing copy cannot
// deadlock the sender and one early copy cannot release the sender's data
// before the majority of the triplex receivers have taken it.
//
// Interface: req/ack/data simplex (2-phase), req_t/ack_t/data_t triplex.
// WIDTH defaults to the 8-bit data path; CMAJ_DELAY must exceed the skew of
// the acknowledge triplet. rst (active high) clears the CMAJ.
module s2t_bundled #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned CMAJ_DELAY = 10
) (
  input  logic                  rst,
  input  logic                  req,
  output logic                  ack,
  input  logic [WIDTH-1:0]      data,
  output logic [2:0]            req_t,
  input  logic [2:0]            ack_t,
  output logic [2:0][WIDTH-1:0] data_t
);

  assign req_t  = {3{req}};
  assign data_t = {3{data}};

  cmaj #(.DELAY(CMAJ_DELAY)) u_cmaj (.rst(rst), .a(ack_t), .c(ack));

endmodule
