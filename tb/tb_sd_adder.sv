// tb_sd_adder: self-checking test of the constant-time SD adder.
//
// Part 1 applies every pair of 4-digit SD operands (3^8 pairs) to a 4-digit
// adder; part 2 applies random operands to an adder of the default size.
// Digits are drawn from the legal codes 00 (0), 01 (+1) and 11 (-1). The
// testbench computes the integer values itself and checks Z = X + Y and that
// no sum digit uses the illegal code 10. It counts how often a position sum
// of +1 or -1 met each look-back outcome (both lower digits non-negative, or
// not) and fails if any of the four cases never occurred.
module tb_sd_adder;
  import rbr_pkg::*;

  localparam int unsigned NS = 4;
  localparam int unsigned NL = DEFAULT_DIGITS;
  localparam int unsigned W  = 2 * (NL + 1);

  rdigit_t [NS-1:0] xs, ys;
  rdigit_t [NS:0]   zs;
  rdigit_t [NL-1:0] xl, yl;
  rdigit_t [NL:0]   zl;

  int unsigned checks = 0, failures = 0;
  int unsigned lb_cases[4];   // {p=+1,nonneg}, {p=+1,neg}, {p=-1,nonneg}, {p=-1,neg}

  sd_adder #(.N(NS)) dut_small (.x(xs), .y(ys), .z(zs));
  sd_adder           dut_full  (.x(xl), .y(yl), .z(zl));

  function automatic longint sd_value(input logic [W-1:0] bits, input int nd);
    longint v = 0;
    for (int i = 0; i < nd; i++)
      v += (-2 * longint'(bits[2*i+1]) + longint'(bits[2*i])) * (longint'(1) << i);
    return v;
  endfunction

  function automatic bit has_code10(input logic [W-1:0] bits, input int nd);
    for (int i = 0; i < nd; i++)
      if (bits[2*i+1] && !bits[2*i]) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic [1:0] sd_code(input int d);
    return (d == 0) ? 2'b00 : (d == 1) ? 2'b01 : 2'b11;
  endfunction

  task automatic check(input logic [W-1:0] a, input logic [W-1:0] b,
                       input logic [W-1:0] zz, input int nd);
    longint ev, got;
    ev  = sd_value(a, nd) + sd_value(b, nd);
    got = sd_value(zz, nd + 1);
    checks++;
    if (got != ev || has_code10(zz, nd + 1)) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d expected %0d got %0d", nd, ev, got);
    end
    for (int i = 1; i < nd; i++) begin
      int p = -2 * int'(a[2*i+1]) + int'(a[2*i]) - 2 * int'(b[2*i+1]) + int'(b[2*i]);
      bit nn = !a[2*i-1] && !b[2*i-1];
      if (p == 1)  lb_cases[nn ? 0 : 1]++;
      if (p == -1) lb_cases[nn ? 2 : 3]++;
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 81; a++) begin
      for (int b = 0; b < 81; b++) begin
        automatic int ta = a;
        automatic int tb = b;
        for (int i = 0; i < NS; i++) begin
          xs[i] = sd_code(ta % 3);
          ys[i] = sd_code(tb % 3);
          ta /= 3;
          tb /= 3;
        end
        #1;
        check(W'(xs), W'(ys), W'(zs), NS);
      end
    end
    for (int k = 0; k < 20000; k++) begin
      for (int i = 0; i < NL; i++) begin
        xl[i] = (k == 0) ? 2'b01 : (k == 1) ? 2'b11 : sd_code(int'($urandom_range(2)));
        yl[i] = (k == 0) ? 2'b01 : (k == 1) ? 2'b11 : sd_code(int'($urandom_range(2)));
      end
      #1;
      check(W'(xl), W'(yl), W'(zl), NL);
    end
    checks++;
    if (lb_cases[0] == 0 || lb_cases[1] == 0 || lb_cases[2] == 0 || lb_cases[3] == 0) begin
      failures++;
      $display("FAIL a look-back case was never exercised");
    end
    $display("look-back cases: +1/nonneg %0d, +1/neg %0d, -1/nonneg %0d, -1/neg %0d",
             lb_cases[0], lb_cases[1], lb_cases[2], lb_cases[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
