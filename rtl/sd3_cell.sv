// sd3_cell: one digit position of the constant-time SD3 adder.
//
// SD3(-) digits take values {-2,-1,0,1}, encoded as a two's complement pair
// {h,l} with value -2*h + l. The h bit of digit i-1 weighs -2^i and the l bit
// of digit i weighs +2^i, so position i forms the equal-weight group sum
//     theta = x_l[i] + y_l[i] - x_h[i-1] - y_h[i-1]      (-2..2)
// and splits it as theta = 2*c_out + sigma with c_out = ceil(theta/2):
//     theta -2 -> c -1, sigma 0      theta 1 -> c 1, sigma -1
//     theta -1 -> c  0, sigma -1     theta 2 -> c 1, sigma  0
//     theta  0 -> c  0, sigma 0
// sigma is in {-1,0} and the carry in is in {-1,0,1}, so the output digit
// z = sigma + c_in is always in {-2..1}: no context at all is needed.
//
// The same gates also add SD3(+) numbers (digits {-1,0,1,2}, value 2*h - l):
// an SD3(+) code word read as SD3(-) stands for the negated value, and the
// cell maps -x, -y to -(x+y). Carries then count with the opposite sign.
//
// Interface: combinational; carries use rbr_pkg::scarry_t {pos, neg}.
// The digit set, encoding, carry set and zero look-back follow the document;
// the rule table above is this design's own derivation.
module sd3_cell (
  input  logic              x_l,    // l bit of x[i]
  input  logic              y_l,    // l bit of y[i]
  input  logic              x_hm,   // h bit of x[i-1]
  input  logic              y_hm,   // h bit of y[i-1]
  input  rbr_pkg::scarry_t  c_in,   // carry from position i-1
  output rbr_pkg::scarry_t  c_out,  // carry to position i+1
  output rbr_pkg::rdigit_t  z       // sum digit z[i]
);
  logic signed [2:0] theta, sigma, zv;
  logic signed [2:0] cin_v;

  always_comb begin
    theta = $signed({2'b00, x_l}) + $signed({2'b00, y_l})
          - $signed({2'b00, x_hm}) - $signed({2'b00, y_hm});
    unique case (theta)
      -3'sd2:  begin c_out = '{pos: 1'b0, neg: 1'b1}; sigma = 3'sd0;  end
      -3'sd1:  begin c_out = '{pos: 1'b0, neg: 1'b0}; sigma = -3'sd1; end
      3'sd1:   begin c_out = '{pos: 1'b1, neg: 1'b0}; sigma = -3'sd1; end
      3'sd2:   begin c_out = '{pos: 1'b1, neg: 1'b0}; sigma = 3'sd0;  end
      default: begin c_out = '{pos: 1'b0, neg: 1'b0}; sigma = 3'sd0;  end
    endcase
    cin_v = c_in.pos ? 3'sd1 : (c_in.neg ? -3'sd1 : 3'sd0);
    zv    = sigma + cin_v;
    // zv is in -2..1: its two low bits are the two's complement code.
    z     = '{h: zv[1], l: zv[0]};
    assert (zv >= -3'sd2 && zv <= 3'sd1) else $error("sd3_cell: sum digit out of range");
  end
endmodule
