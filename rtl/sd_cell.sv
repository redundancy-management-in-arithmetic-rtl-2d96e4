// sd_cell: one digit position of the constant-time SD + SD -> SD adder.
//
// SD digits take values {-1,0,1}, encoded as a two's complement pair {h,l}
// with value -2*h + l (00 = 0, 01 = 1, 11 = -1; 10 is never used). The cell
// forms p = x[i] + y[i] (-2..2) and splits it as p = 2*c_out + w, looking back
// at whether both operand digits of position i-1 are non-negative:
//     p  2 -> c  1, w  0
//     p  1 -> c  1, w -1   if both lower digits >= 0, else c 0, w 1
//     p  0 -> c  0, w  0
//     p -1 -> c  0, w -1   if both lower digits >= 0, else c -1, w 1
//     p -2 -> c -1, w  0
// If both lower digits are non-negative the carry arriving from below is in
// {0,1} and w is in {-1,0}; otherwise the carry is in {-1,0} and w in {0,1}.
// Either way z = w + c_in stays in {-1,0,1}. c_out needs this position and
// the sign bits of the one below (look-back of one digit), never c_in.
//
// Interface: combinational; carries use rbr_pkg::scarry_t {pos, neg}.
// The digit set, encoding, carry set and look-back follow the document; the
// rule table is the classic signed-digit addition chosen by this design.
module sd_cell (
  input  rbr_pkg::rdigit_t  x,       // operand digit x[i]
  input  rbr_pkg::rdigit_t  y,       // operand digit y[i]
  input  logic              x_neg_m, // x[i-1] < 0 (its h bit)
  input  logic              y_neg_m, // y[i-1] < 0 (its h bit)
  input  rbr_pkg::scarry_t  c_in,    // carry from position i-1
  output rbr_pkg::scarry_t  c_out,   // carry to position i+1
  output rbr_pkg::rdigit_t  z        // sum digit z[i]
);
  logic signed [2:0] p, w, zv, cin_v;
  logic              lower_nonneg;

  always_comb begin
    p = $signed({x.h, x.h, x.l}) + $signed({y.h, y.h, y.l});
    lower_nonneg = ~x_neg_m & ~y_neg_m;
    unique case (p)
      3'sd2:   begin c_out = '{pos: 1'b1, neg: 1'b0}; w = 3'sd0; end
      3'sd1:   if (lower_nonneg) begin c_out = '{pos: 1'b1, neg: 1'b0}; w = -3'sd1; end
               else              begin c_out = '{pos: 1'b0, neg: 1'b0}; w = 3'sd1;  end
      -3'sd1:  if (lower_nonneg) begin c_out = '{pos: 1'b0, neg: 1'b0}; w = -3'sd1; end
               else              begin c_out = '{pos: 1'b0, neg: 1'b1}; w = 3'sd1;  end
      -3'sd2:  begin c_out = '{pos: 1'b0, neg: 1'b1}; w = 3'sd0; end
      default: begin c_out = '{pos: 1'b0, neg: 1'b0}; w = 3'sd0; end
    endcase
    cin_v = c_in.pos ? 3'sd1 : (c_in.neg ? -3'sd1 : 3'sd0);
    zv    = w + cin_v;
    z     = '{h: zv[1], l: zv[0]};
    assert (zv >= -3'sd1 && zv <= 3'sd1) else $error("sd_cell: sum digit out of range");
  end
endmodule
