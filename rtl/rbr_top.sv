// rbr_top: the four constant-time redundant binary adders side by side, plus
// the four-row CS3 partial-product reducer.
//
// Each adder takes two N-digit operands in its own digit set and returns the
// exact sum in the same digit set, with a delay of one digit cell whatever N
// is:
//   cs2  CS2 + CS2 -> CS2   digits {0,1,2},     equal-weight grouping,
//                           carries {0,1}, no look-back (implicit left context)
//   cs3  CS3 + CS3 -> CS3   digits {0..3},      4:2 compressor per digit
//   sd3  SD3 + SD3 -> SD3   digits {-2..1} (or {-1..2} read as SD3(+)),
//                           equal-weight grouping, carries {-1,0,1}
//   sd   SD + SD -> SD      digits {-1,0,1},    carries {-1,0,1}, look-back 1
// The reducer turns four two's complement partial products into one CS3
// number: pairs of rows one position apart form CS3 numbers by wiring alone,
// and a cs3_adder adds the two pairs.
//
// Every digit is two bits {h,l} (rbr_pkg::rdigit_t), digit i at index i.
// The units share nothing and are purely combinational. Five output bits are
// constant by construction: z[0].h of the CS2 and CS3 sums and, in pp_z, the
// h bits of digits 0, 1 and N+3.
// Placing the four adders, whose cells the document compares, in one top
// level is this design's choice.
module rbr_top #(
  parameter int unsigned N = rbr_pkg::DEFAULT_DIGITS   // operand digits and partial product bits
) (
  input  rbr_pkg::rdigit_t [N-1:0] cs2_x,
  input  rbr_pkg::rdigit_t [N-1:0] cs2_y,
  output rbr_pkg::rdigit_t [N:0]   cs2_z,
  input  rbr_pkg::rdigit_t [N-1:0] cs3_x,
  input  rbr_pkg::rdigit_t [N-1:0] cs3_y,
  output rbr_pkg::rdigit_t [N:0]   cs3_z,
  input  rbr_pkg::rdigit_t [N-1:0] sd3_x,
  input  rbr_pkg::rdigit_t [N-1:0] sd3_y,
  output rbr_pkg::rdigit_t [N+1:0] sd3_z,
  input  rbr_pkg::rdigit_t [N-1:0] sd_x,
  input  rbr_pkg::rdigit_t [N-1:0] sd_y,
  output rbr_pkg::rdigit_t [N:0]   sd_z,
  input  logic [3:0][N-1:0]        pp,      // pp[k] weighs 2^k, two's complement
  output rbr_pkg::rdigit_t [N+3:0] pp_z     // CS3 sum of the four rows, modulo 2^(N+4)
);
  cs2_adder #(.N(N)) u_cs2 (.x(cs2_x), .y(cs2_y), .z(cs2_z));
  cs3_adder #(.N(N)) u_cs3 (.x(cs3_x), .y(cs3_y), .z(cs3_z));
  sd3_adder #(.N(N)) u_sd3 (.x(sd3_x), .y(sd3_y), .z(sd3_z));
  sd_adder  #(.N(N)) u_sd  (.x(sd_x),  .y(sd_y),  .z(sd_z));

  cs3_pp_reducer #(.M(N), .W(N + 4)) u_pp (.pp(pp), .z(pp_z));
endmodule
