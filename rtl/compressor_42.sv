// compressor_42: 4:2 compressor, one digit position of the CS3 adder.
//
// Adds four bits of equal weight and a carry in: 
//     i1 + i2 + i3 + i4 + cin = sum + 2*(carry + cout)
// cout depends on i1..i3 only, never on cin, so a row of compressors whose
// cout feeds the next position's cin has a delay independent of its length.
// The equations use the multiplexer form (a select of i3/i1 and of cin/i4 by
// XOR terms), which is equivalent to two chained full adders:
//     cout  = (i1 ^ i2) ? i3 : i1       majority of i1, i2, i3
//     t     = i1 ^ i2 ^ i3 ^ i4
//     sum   = t ^ cin
//     carry = t ? cin : i4              majority of (i1^i2^i3), i4, cin
// Interface: combinational. The document names the cell and its role; the
// equations here are a standard form chosen by this design.
module compressor_42 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,    // cout of the position below
  output logic sum,    // weight 1
  output logic carry,  // weight 2, stays in this position's output digit
  output logic cout    // weight 2, goes to the position above
);
  logic t;
  always_comb begin
    cout  = (i1 ^ i2) ? i3 : i1;
    t     = i1 ^ i2 ^ i3 ^ i4;
    sum   = t ^ cin;
    carry = t ? cin : i4;
  end
endmodule
