// cs2_cell: one digit position of the constant-time CS2 + CS2 -> CS2 adder.
//
// CS2 digits take values {0,1,2} encoded {h,l} = 00, 01, 10 (11 is never used).
// Position i forms the equal-weight group sum
//     theta = x_l[i] + y_l[i] + x_h[i-1] + y_h[i-1]      (0..4)
// and splits it as theta = 2*c_out + sigma with these rules:
//     theta 0 -> c 0, sigma 0        theta 3 -> c 1, sigma 1
//     theta 1 -> c 0, sigma 1        theta 4 -> c 1, sigma 2
//     theta 2 -> c 0, sigma 2  when both h bits of digit i-1 are 1
//               c 1, sigma 0  otherwise
// The output digit is z = sigma + c_in, where c_in is c_out of position i-1.
// The theta = 2 rule is the implicit left context: a position whose own
// l bits are both 0 knows the h bits of its digit may be 1, so the position
// above may be left holding sigma = 2 and must not receive a carry. With the
// rule, z never exceeds 2. c_out depends only on this position's four input
// bits, never on c_in, so an array of these cells adds in constant time.
//
// Interface: purely combinational, no clock.
// The rules are the document's; the gate-level form is this design's own.
module cs2_cell (
  input  logic              x_l,    // l bit of operand digit x[i]
  input  logic              y_l,    // l bit of operand digit y[i]
  input  logic              x_hm,   // h bit of operand digit x[i-1]
  input  logic              y_hm,   // h bit of operand digit y[i-1]
  input  logic              c_in,   // carry c[i-1] from the position below
  output logic              c_out,  // carry c[i] to the position above
  output rbr_pkg::rdigit_t  z       // sum digit z[i]
);
  logic [2:0] theta;
  logic [1:0] sigma;
  logic       both_h;

  always_comb begin
    theta  = 3'(x_l) + 3'(y_l) + 3'(x_hm) + 3'(y_hm);
    both_h = x_hm & y_hm;
    unique case (theta)
      3'd0:    begin c_out = 1'b0; sigma = 2'd0; end
      3'd1:    begin c_out = 1'b0; sigma = 2'd1; end
      3'd2:    begin c_out = ~both_h; sigma = both_h ? 2'd2 : 2'd0; end
      3'd3:    begin c_out = 1'b1; sigma = 2'd1; end
      default: begin c_out = 1'b1; sigma = 2'd2; end
    endcase
    // sigma + c_in is 0, 1 or 2: sigma = 2 is never paired with c_in = 1.
    unique case ({sigma, c_in})
      3'b000:  z = '{h: 1'b0, l: 1'b0};
      3'b001,
      3'b010:  z = '{h: 1'b0, l: 1'b1};
      default: z = '{h: 1'b1, l: 1'b0};
    endcase
  end
endmodule
