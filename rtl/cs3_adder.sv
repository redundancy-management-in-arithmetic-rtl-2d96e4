// cs3_adder: constant-time addition of two N-digit CS3 numbers, CS3 result.
//
// A CS3 digit takes any value 0..3, encoded {h,l} with value 2*h + l, so the
// h bit of digit i-1 and the l bit of digit i both weigh 2^i. Position i feeds
// these four equal-weight bits (x[i].l, y[i].l, x[i-1].h, y[i-1].h) to a 4:2
// compressor together with the compressor carry of position i-1. The
// compressor's sum becomes z[i].l and its carry becomes z[i].h; its second
// carry goes to position i+1. That carry never depends on the incoming one,
// so the delay is one compressor whatever N is (carry set {0,1}, no
// look-back).
//
// The result has N+1 digits. Position N sees only the two top h bits, so its
// outgoing carry is always 0 and the sum is exact. z[0].h is always 0, as
// position 0 has only two input bits and no carry in.
// Interface: combinational. The digit set, its encoding and the use of a 4:2
// compressor row follow the document; the compressor equations and the N+1
// digit result are this design's choices.
module cs3_adder #(
  parameter int unsigned N = rbr_pkg::DEFAULT_DIGITS   // operand digits
) (
  input  rbr_pkg::rdigit_t [N-1:0] x,   // operand X, digit i at index i
  input  rbr_pkg::rdigit_t [N-1:0] y,   // operand Y
  output rbr_pkg::rdigit_t [N:0]   z    // sum Z = X + Y
);
  logic [N+1:0] c;   // c[i+1] is the compressor carry out of position i
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
    compressor_42 u_cmp (
      .i1   (xl),
      .i2   (yl),
      .i3   (xh),
      .i4   (yh),
      .cin  (c[i]),
      .sum  (z[i].l),
      .carry(z[i].h),
      .cout (c[i+1])
    );
  end

  // The top position never produces a carry: the result fits N+1 digits.
  always_comb begin
    assert (c[N+1] == 1'b0) else $error("cs3_adder: carry out of the top digit");
  end
endmodule
