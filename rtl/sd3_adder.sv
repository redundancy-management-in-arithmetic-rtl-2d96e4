// sd3_adder: constant-time addition of two N-digit SD3 numbers.
//
// An SD3(-) digit is a two's complement pair {h,l} worth -2*h + l, values
// {-2,-1,0,1}. Position i (sd3_cell) adds the equal-weight bits x[i].l,
// y[i].l (weight +2^i) and x[i-1].h, y[i-1].h (weight -2^i), emits a carry in
// {-1,0,1} that depends on those four bits only, and adds the carry of
// position i-1 into its sum digit. The delay is one cell for any N.
//
// The result has N+2 digits: position N adds only the two top h bits and may
// send a carry of -1, which becomes digit N+1 (code 11 for -1, 00 for 0).
// The same circuit adds SD3(+) numbers (digits {-1,0,1,2}, value 2*h - l)
// without change: read every operand and result digit as SD3(+) instead.
// Interface: combinational. The digit sets, encodings and the constant-time
// property follow the document; the cell rules and the result width are this
// design's choices.
module sd3_adder #(
  parameter int unsigned N = rbr_pkg::DEFAULT_DIGITS   // operand digits
) (
  input  rbr_pkg::rdigit_t [N-1:0] x,   // operand X, digit i at index i
  input  rbr_pkg::rdigit_t [N-1:0] y,   // operand Y
  output rbr_pkg::rdigit_t [N+1:0] z    // sum Z = X + Y
);
  rbr_pkg::scarry_t [N+1:0] c;   // c[i+1] is the carry out of position i
  assign c[0] = '{pos: 1'b0, neg: 1'b0};

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
    sd3_cell u_cell (
      .x_l  (xl),
      .y_l  (yl),
      .x_hm (xh),
      .y_hm (yh),
      .c_in (c[i]),
      .c_out(c[i+1]),
      .z    (z[i])
    );
  end

  // The top carry is 0 or -1 (in SD3(-) terms) and becomes the last digit.
  assign z[N+1] = '{h: c[N+1].neg, l: c[N+1].neg};

  always_comb begin
    assert (!c[N+1].pos) else $error("sd3_adder: positive carry out of the top digit");
  end

endmodule
