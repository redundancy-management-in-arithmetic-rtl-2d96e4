// tb_digit_cells: exhaustive test of the four digit cells on their own.
//
// For every combination of a cell's inputs the testbench checks
//   - the arithmetic identity of the cell: (its weighted input bits) + c_in
//     = 2*c_out + z, with z a legal digit of the output digit set;
//   - that c_out is the same for every value of c_in, which is what makes an
//     array of these cells add in constant time (no carry ripples).
// Cells: cs2_cell (CS2, carries {0,1}), compressor_42 (CS3, carries {0,1}),
// sd3_cell (SD3(-), carries {-1,0,1}), sd_cell (SD, carries {-1,0,1}, with
// the sign bits of the lower digits as look-back). Operand codes that a
// digit set forbids are skipped. A watchdog ends the run.
module tb_digit_cells;
  import rbr_pkg::*;

  int unsigned checks = 0, failures = 0;

  // cs2_cell
  logic    a_xl, a_yl, a_xh, a_yh, a_ci, a_co;
  rdigit_t a_z;
  cs2_cell u_cs2 (.x_l(a_xl), .y_l(a_yl), .x_hm(a_xh), .y_hm(a_yh), .c_in(a_ci), .c_out(a_co), .z(a_z));

  // compressor_42
  logic b_i1, b_i2, b_i3, b_i4, b_ci, b_s, b_c, b_co;
  compressor_42 u_cmp (.i1(b_i1), .i2(b_i2), .i3(b_i3), .i4(b_i4), .cin(b_ci),
                       .sum(b_s), .carry(b_c), .cout(b_co));

  // sd3_cell
  logic    d_xl, d_yl, d_xh, d_yh;
  scarry_t d_ci, d_co;
  rdigit_t d_z;
  sd3_cell u_sd3 (.x_l(d_xl), .y_l(d_yl), .x_hm(d_xh), .y_hm(d_yh), .c_in(d_ci), .c_out(d_co), .z(d_z));

  // sd_cell
  rdigit_t e_x, e_y, e_z;
  logic    e_xn, e_yn;
  scarry_t e_ci, e_co;
  sd_cell u_sd (.x(e_x), .y(e_y), .x_neg_m(e_xn), .y_neg_m(e_yn), .c_in(e_ci), .c_out(e_co), .z(e_z));

  function automatic int cval(input scarry_t c);
    return c.pos ? 1 : (c.neg ? -1 : 0);
  endfunction

  function automatic scarry_t cenc(input int v);
    return (v > 0) ? 2'b10 : (v < 0) ? 2'b01 : 2'b00;
  endfunction

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // CS2 cell. The h bit of digit i-1 and the l bit of digit i are free; the
    // carry out is compared for both values of the carry in.
    for (int v = 0; v < 16; v++) begin
      int co0, theta;
      {a_xl, a_yl, a_xh, a_yh} = 4'(v);
      theta = int'(a_xl) + int'(a_yl) + int'(a_xh) + int'(a_yh);
      a_ci = 1'b0;
      #1;
      co0 = int'(a_co);
      expect_true($sformatf("cs2 identity v=%0d", v),
                  theta == 2 * int'(a_co) + 2 * int'(a_z.h) + int'(a_z.l) && !(a_z.h && a_z.l));
      a_ci = 1'b1;
      #1;
      expect_true($sformatf("cs2 carry independent of c_in v=%0d", v), int'(a_co) == co0);
      // A carry in of 1 never meets sigma = 2 in an array (theta 4, or 2 with
      // both lower h bits set); elsewhere the identity must hold with it.
      if (!(theta == 4 || (theta == 2 && a_xh && a_yh)))
        expect_true($sformatf("cs2 identity with carry in v=%0d", v),
                    theta + 1 == 2 * int'(a_co) + 2 * int'(a_z.h) + int'(a_z.l)
                    && !(a_z.h && a_z.l));
    end
    // 4:2 compressor.
    for (int v = 0; v < 32; v++) begin
      int co0;
      {b_i1, b_i2, b_i3, b_i4, b_ci} = 5'(v);
      #1;
      expect_true($sformatf("compressor identity v=%0d", v),
                  int'(b_i1) + int'(b_i2) + int'(b_i3) + int'(b_i4) + int'(b_ci)
                  == int'(b_s) + 2 * (int'(b_c) + int'(b_co)));
      co0 = int'(b_co);
      b_ci = ~b_ci;
      #1;
      expect_true($sformatf("compressor carry independent of cin v=%0d", v), int'(b_co) == co0);
    end
    // SD3 cell, every carry in -1, 0, +1.
    for (int v = 0; v < 16; v++) begin
      int co0;
      {d_xl, d_yl, d_xh, d_yh} = 4'(v);
      for (int ci = -1; ci <= 1; ci++) begin
        int theta, zv;
        d_ci = cenc(ci);
        #1;
        theta = int'(d_xl) + int'(d_yl) - int'(d_xh) - int'(d_yh);
        zv    = -2 * int'(d_z.h) + int'(d_z.l);
        expect_true($sformatf("sd3 identity v=%0d ci=%0d", v, ci),
                    theta + ci == 2 * cval(d_co) + zv && !(d_co.pos && d_co.neg));
        if (ci == -1) co0 = cval(d_co);
        else expect_true($sformatf("sd3 carry independent of c_in v=%0d", v), cval(d_co) == co0);
      end
    end
    // SD cell: legal digits 00, 01, 11; carry in as the look-back allows.
    for (int v = 0; v < 64; v++) begin
      int co0;
      {e_x, e_y, e_xn, e_yn} = 6'(v);
      if (e_x == 2'b10 || e_y == 2'b10) continue;
      for (int n = 0; n < 3; n++) begin
        int p, zv;
        automatic int ci = (n == 0) ? 0 : (n == 1) ? -1 : 1;
        // A carry of +1 only comes from a non-negative lower pair, -1 only
        // from a pair with a negative digit.
        if (ci == 1 && (e_xn || e_yn)) continue;
        if (ci == -1 && !(e_xn || e_yn)) continue;
        e_ci = cenc(ci);
        #1;
        p  = -2 * int'(e_x.h) + int'(e_x.l) - 2 * int'(e_y.h) + int'(e_y.l);
        zv = -2 * int'(e_z.h) + int'(e_z.l);
        expect_true($sformatf("sd identity v=%0d ci=%0d", v, ci),
                    p + ci == 2 * cval(e_co) + zv && e_z != 2'b10);
        if (ci == 0) co0 = cval(e_co);
        else expect_true($sformatf("sd carry independent of c_in v=%0d", v), cval(e_co) == co0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
