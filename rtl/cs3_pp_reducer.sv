// cs3_pp_reducer: adds four two's complement partial products into one CS3
// number, the first reduction step of a multiplier built on CS3 digits.
//
// Row k (pp[k], M bits, two's complement) carries weight 2^k, as the partial
// products of consecutive multiplier bits do. All arithmetic is modulo 2^W
// (W = M + 4), so each row is sign-extended to W bits and then treated as
// unsigned.
//
// Step 1, no gates: two rows one position apart already form a CS3 number.
// Bit i of row 0 (weight 2^i) and bit i of row 1 (weight 2^(i+1)) become the
// l and h bits of CS3 digit i, value 2*h + l. Rows 2 and 3 form a second CS3
// number in the same way, placed two digits higher.
// Step 2: the two CS3 numbers are added by cs3_adder, one 4:2 compressor per
// digit, with a delay independent of W.
//
// The result z is W CS3 digits whose value modulo 2^W is
// pp0 + 2*pp1 + 4*pp2 + 8*pp3, read as a W-bit two's complement number.
// Interface: combinational. Digit W of the adder result and the h bit of
// digit W-1 lie at 2^W and above and are left unused on purpose.
// The pairing of shifted rows and the use of 4:2 compressors follow the
// document; the four-row size, the sign extension and W are this design's.
module cs3_pp_reducer #(
  parameter int unsigned M = rbr_pkg::DEFAULT_DIGITS,  // partial product bits
  parameter int unsigned W = M + 4                     // result digits
) (
  input  logic [3:0][M-1:0]        pp,  // pp[k] weighs 2^k, two's complement
  output rbr_pkg::rdigit_t [W-1:0] z    // CS3 sum, modulo 2^W
);
  logic [3:0][W-1:0]        ext;       // rows sign-extended to W bits
  rbr_pkg::rdigit_t [W-1:0] pair_lo;   // rows 0 and 1 as a CS3 number
  rbr_pkg::rdigit_t [W-1:0] pair_hi;   // rows 2 and 3, two digits higher
  rbr_pkg::rdigit_t [W:0]   sum;       // digit W and sum[W-1].h lie at 2^W and above

  always_comb begin
    for (int k = 0; k < 4; k++)
      ext[k] = W'($signed(pp[k]));
    for (int i = 0; i < W; i++) begin
      pair_lo[i] = '{h: ext[1][i], l: ext[0][i]};
      pair_hi[i] = (i < 2) ? '{h: 1'b0, l: 1'b0}
                           : '{h: ext[3][(i >= 2) ? i - 2 : 0], l: ext[2][(i >= 2) ? i - 2 : 0]};
    end
  end

  cs3_adder #(.N(W)) u_add (
    .x(pair_lo),
    .y(pair_hi),
    .z(sum)
  );

  // Digit W and the h bit of digit W-1 weigh 2^W or more: dropped modulo 2^W.
  always_comb begin
    z          = sum[W-1:0];
    z[W-1].h   = 1'b0;
  end
endmodule
