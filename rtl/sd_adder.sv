// sd_adder: constant-time addition of two N-digit signed-digit numbers.
//
// Digits are in {-1,0,1}, each a two's complement pair {h,l} worth -2*h + l.
// Position i (sd_cell) adds x[i] + y[i], picks a carry in {-1,0,1} from that
// sum and from the sign bits of x[i-1], y[i-1] (one digit of look-back), and
// adds the carry of position i-1 into its sum digit. The delay is one cell
// for any N. Position 0 has no digit below; it treats that digit as
// non-negative, which matches its carry in of 0.
//
// The result has N+1 digits: digit N is the carry out of position N-1.
// Operand digits must not use the code 10; z never does.
// Interface: combinational. Follows the document's digit set, encoding and
// carry set; the addition rules are the classic ones chosen by this design.
module sd_adder #(
  parameter int unsigned N = rbr_pkg::DEFAULT_DIGITS   // operand digits
) (
  input  rbr_pkg::rdigit_t [N-1:0] x,   // operand X, digit i at index i
  input  rbr_pkg::rdigit_t [N-1:0] y,   // operand Y
  output rbr_pkg::rdigit_t [N:0]   z    // sum Z = X + Y
);
  rbr_pkg::scarry_t [N:0] c;   // c[i+1] is the carry out of position i
  assign c[0] = '{pos: 1'b0, neg: 1'b0};

  for (genvar i = 0; i < N; i++) begin : g_pos
    logic xn, yn;
    if (i > 0) begin : g_lb
      assign xn = x[i-1].h;
      assign yn = y[i-1].h;
    end else begin : g_lb0
      assign xn = 1'b0;
      assign yn = 1'b0;
    end
    sd_cell u_cell (
      .x      (x[i]),
      .y      (y[i]),
      .x_neg_m(xn),
      .y_neg_m(yn),
      .c_in   (c[i]),
      .c_out  (c[i+1]),
      .z      (z[i])
    );
  end

  // The top digit is the last carry: -1 -> 11, 0 -> 00, +1 -> 01.
  assign z[N] = '{h: c[N].neg, l: c[N].neg | c[N].pos};
endmodule
