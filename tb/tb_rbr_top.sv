// tb_rbr_top: end-to-end test of rbr_top at its default size.
//
// Each step drives fresh random operands into all five units at once (CS2,
// CS3, SD3 and SD adders and the four-row CS3 reducer), computes every
// expected sum with integer arithmetic of its own and compares it with the
// value of the returned redundant number. It also checks that the CS2 and SD
// results use only legal digit codes. The mechanisms the units rely on are
// counted from the operands, and the test fails if any never happened:
//   - CS2 group sum 2 with both lower h bits set (implicit left context:
//     no carry) and group sum 2 otherwise (carry)
//   - a 4:2 compressor passing a carry (group sum >= 3) in the CS3 adder
//   - SD3 carries of -1 and of +1
//   - SD look-back: position sum +-1 with both lower digits >= 0, and not
//   - negative partial products in the reducer
// The first vectors are the extremes (all digits maximal or minimal).
module tb_rbr_top;
  import rbr_pkg::*;

  localparam int unsigned N = DEFAULT_DIGITS;
  localparam int unsigned W = 2 * (N + 4);   // bits of the widest digit vector
  localparam int unsigned STEPS = 50000;

  rdigit_t [N-1:0] cs2_x, cs2_y, cs3_x, cs3_y, sd3_x, sd3_y, sd_x, sd_y;
  rdigit_t [N:0]   cs2_z, cs3_z, sd_z;
  rdigit_t [N+1:0] sd3_z;
  logic [3:0][N-1:0] pp;
  rdigit_t [N+3:0] pp_z;

  int unsigned checks = 0, failures = 0;
  int unsigned n_cs2_noc = 0, n_cs2_c2 = 0, n_cs3_carry = 0, n_sd3_neg = 0, n_sd3_pos = 0;
  int unsigned n_sd_nn = 0, n_sd_neg = 0, n_pp_neg = 0;

  rbr_top dut (.*);

  // Sum of digit values times 2^i, digit value = a*h + b*l.
  function automatic longint digits_value(input logic [W-1:0] bits, input int nd,
                                          input int a, input int b);
    longint v = 0;
    for (int i = 0; i < nd; i++)
      v += (longint'(a) * longint'(bits[2*i+1]) + longint'(b) * longint'(bits[2*i]))
           * (longint'(1) << i);
    return v;
  endfunction

  function automatic bit has_code(input logic [W-1:0] bits, input int nd, input logic [1:0] code);
    for (int i = 0; i < nd; i++)
      if (bits[2*i+:2] == code) return 1'b1;
    return 1'b0;
  endfunction

  task automatic expect_eq(input string what, input longint ev, input longint got, input bit bad_code);
    checks++;
    if (ev != got || bad_code) begin
      failures++;
      if (failures < 10) $display("FAIL %s: expected %0d got %0d%s", what, ev, got,
                                  bad_code ? " (illegal digit code)" : "");
    end
  endtask

  function automatic rdigit_t pick(input int code_set, input int k);
    // code_set 0: CS2 {00,01,10}; 1: any code; 2: SD {00,01,11}.
    if (k == 0) return (code_set == 0) ? 2'b10 : (code_set == 1) ? 2'b11 : 2'b01;
    if (k == 1) return (code_set == 0) ? 2'b00 : (code_set == 1) ? 2'b10 : 2'b11;
    case (code_set)
      0:       return ($urandom_range(2) == 2) ? 2'b10 : 2'($urandom_range(1));
      1:       return 2'($urandom_range(3));
      default: begin
        int r = int'($urandom_range(2));
        return (r == 0) ? 2'b00 : (r == 1) ? 2'b01 : 2'b11;
      end
    endcase
  endfunction

  task automatic count_mechanisms();
    for (int i = 0; i < N; i++) begin
      int s2, s3, t3, p;
      bit hh, nn;
      hh = (i > 0) && cs2_x[i-1].h && cs2_y[i-1].h;
      s2 = int'(cs2_x[i].l) + int'(cs2_y[i].l) + ((i > 0) ? int'(cs2_x[i-1].h) + int'(cs2_y[i-1].h) : 0);
      if (s2 == 2 && hh)  n_cs2_noc++;
      if (s2 == 2 && !hh) n_cs2_c2++;
      s3 = int'(cs3_x[i].l) + int'(cs3_y[i].l) + ((i > 0) ? int'(cs3_x[i-1].h) + int'(cs3_y[i-1].h) : 0);
      if (s3 >= 3) n_cs3_carry++;
      t3 = int'(sd3_x[i].l) + int'(sd3_y[i].l) - ((i > 0) ? int'(sd3_x[i-1].h) + int'(sd3_y[i-1].h) : 0);
      if (t3 == -2) n_sd3_neg++;
      if (t3 >= 1)  n_sd3_pos++;
      p  = -2 * int'(sd_x[i].h) + int'(sd_x[i].l) - 2 * int'(sd_y[i].h) + int'(sd_y[i].l);
      nn = (i == 0) || (!sd_x[i-1].h && !sd_y[i-1].h);
      if ((p == 1 || p == -1) && nn)  n_sd_nn++;
      if ((p == 1 || p == -1) && !nn) n_sd_neg++;
    end
    for (int r = 0; r < 4; r++)
      if (pp[r][N-1]) n_pp_neg++;
  endtask

  task automatic require(input string what, input int unsigned n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
    $display("  %-40s %0d", what, n);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < STEPS; k++) begin
      for (int i = 0; i < N; i++) begin
        cs2_x[i] = pick(0, k); cs2_y[i] = pick(0, k);
        cs3_x[i] = pick(1, k); cs3_y[i] = pick(1, k);
        sd3_x[i] = pick(1, k); sd3_y[i] = pick(1, k);
        sd_x[i]  = pick(2, k); sd_y[i]  = pick(2, k);
      end
      for (int r = 0; r < 4; r++)
        pp[r] = (k == 0) ? {1'b1, {(N-1){1'b0}}} : (k == 1) ? {1'b0, {(N-1){1'b1}}}
                                                 : N'({$urandom, $urandom});
      #1;
      expect_eq("cs2", digits_value(W'(cs2_x), N, 2, 1) + digits_value(W'(cs2_y), N, 2, 1),
                digits_value(W'(cs2_z), N + 1, 2, 1), has_code(W'(cs2_z), N + 1, 2'b11));
      expect_eq("cs3", digits_value(W'(cs3_x), N, 2, 1) + digits_value(W'(cs3_y), N, 2, 1),
                digits_value(W'(cs3_z), N + 1, 2, 1), 1'b0);
      expect_eq("sd3", digits_value(W'(sd3_x), N, -2, 1) + digits_value(W'(sd3_y), N, -2, 1),
                digits_value(W'(sd3_z), N + 2, -2, 1), 1'b0);
      expect_eq("sd3(+)", digits_value(W'(sd3_x), N, 2, -1) + digits_value(W'(sd3_y), N, 2, -1),
                digits_value(W'(sd3_z), N + 2, 2, -1), 1'b0);
      expect_eq("sd", digits_value(W'(sd_x), N, -2, 1) + digits_value(W'(sd_y), N, -2, 1),
                digits_value(W'(sd_z), N + 1, -2, 1), has_code(W'(sd_z), N + 1, 2'b10));
      expect_eq("pp",
                (longint'($signed(pp[0])) + 2 * longint'($signed(pp[1])) + 4 * longint'($signed(pp[2]))
                 + 8 * longint'($signed(pp[3]))) & ((longint'(1) << (N + 4)) - 1),
                digits_value(W'(pp_z), N + 4, 2, 1) & ((longint'(1) << (N + 4)) - 1), 1'b0);
      count_mechanisms();
    end
    $display("mechanisms exercised:");
    require("CS2 group sum 2, lower h bits both 1", n_cs2_noc);
    require("CS2 group sum 2, carry passed", n_cs2_c2);
    require("CS3 compressor carry passed", n_cs3_carry);
    require("SD3 carry of -1", n_sd3_neg);
    require("SD3 carry of +1", n_sd3_pos);
    require("SD look-back, lower digits >= 0", n_sd_nn);
    require("SD look-back, a lower digit < 0", n_sd_neg);
    require("negative partial product", n_pp_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
