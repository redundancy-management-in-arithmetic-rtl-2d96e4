// cs2_adder: constant-time addition of two N-digit CS2 numbers, CS2 result.
//
// Each operand digit x[i] in {0,1,2} is encoded {h,l} = 00/01/10 and weighs
// 2^i, so its h bit weighs 2^(i+1), the same as the l bit of x[i+1].
// Position i (cs2_cell) adds the four bits of weight 2^i (the l bits of x[i],
// y[i] and the h bits of x[i-1], y[i-1]), passes a carry in {0,1} to
// position i+1 and takes the carry of position i-1. No carry depends on
// another carry, so the delay is one cell whatever N is.
//
// The result has N+1 digits: position N adds only the h bits of the top
// operand digits. Its carry out is always 0 (its l inputs are 0, so a group
// sum of 2 keeps its value), hence z needs no further digit and the sum is
// exact: value(z) = value(x) + value(y). Position 0 has no digit below it,
// so its h inputs and its carry in are 0.
//
// Operand digits must not use the code 11; z never does. z[0].h is always 0:
// position 0 sees no h bits, so its group sum 2 always carries.
// Interface: combinational. Follows the document's rules; the N+1 digit
// result and the zero carry into position 0 are this design's choices.
module cs2_adder #(
  parameter int unsigned N = rbr_pkg::DEFAULT_DIGITS   // operand digits
) (
  input  rbr_pkg::rdigit_t [N-1:0] x,   // operand X, digit i at index i
  input  rbr_pkg::rdigit_t [N-1:0] y,   // operand Y
  output rbr_pkg::rdigit_t [N:0]   z    // sum Z = X + Y
);
  logic [N+1:0] c;   // c[i+1] is the carry out of position i; c[0] = 0
  assign c[0] = 1'b0;

  for (genvar i = 0; i <= N; i++) begin : g_pos
    logic xl, yl, xh, yh;
    if (i < N) begin : g_l
      assign xl = x[i].l;
      assign yl = y[i].l;
    end else begin : g_l0
      assign xl = 1'b0;
      assign yl = 1'b0;
    end
    if (i > 0) begin : g_h
      assign xh = x[i-1].h;
      assign yh = y[i-1].h;
    end else begin : g_h0
      assign xh = 1'b0;
      assign yh = 1'b0;
    end
    cs2_cell u_cell (
      .x_l  (xl),
      .y_l  (yl),
      .x_hm (xh),
      .y_hm (yh),
      .c_in (c[i]),
      .c_out(c[i+1]),
      .z    (z[i])
    );
  end

  // The top position never produces a carry: the result fits N+1 digits.
  always_comb begin
    assert (c[N+1] == 1'b0) else $error("cs2_adder: carry out of the top digit");
  end
endmodule
