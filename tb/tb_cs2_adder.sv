// tb_cs2_adder: self-checking test of the constant-time CS2 adder.
//
// Part 1 applies every pair of 4-digit CS2 operands (3^8 pairs) to a 4-digit
// adder. Part 2 applies random 32-digit operands to an adder at its default
// size. For every vector the testbench computes the integer values of X, Y
// and Z on its own and checks Z = X + Y, and that no sum digit uses the
// forbidden code 11. It also counts how often a position saw a group sum of
// 2 with both lower h bits set (the case that must not produce a carry) and
// fails if that never happened. One directed vector checks the output digits
// of the case where a group sum of 4 sits above a group sum of 2 whose lower
// h bits are both 1. A watchdog ends the run after a fixed time.
module tb_cs2_adder;
  import rbr_pkg::*;

  localparam int unsigned NS = 4;
  localparam int unsigned NL = DEFAULT_DIGITS;
  localparam int unsigned W  = 2 * (NL + 1);   // bits of the widest digit vector

  rdigit_t [NS-1:0] xs, ys;
  rdigit_t [NS:0]   zs;
  rdigit_t [NL-1:0] xl, yl;
  rdigit_t [NL:0]   zl;

  int unsigned checks = 0, failures = 0, left_ctx_seen = 0;

  cs2_adder #(.N(NS)) dut_small (.x(xs), .y(ys), .z(zs));
  cs2_adder           dut_full  (.x(xl), .y(yl), .z(zl));

  // CS2 digit value 2h + l; weight 2^i.
  function automatic longint unsigned cs2_value(input logic [W-1:0] bits, input int nd);
    longint unsigned v = 0;
    for (int i = 0; i < nd; i++)
      v += (2 * longint'(bits[2*i+1]) + longint'(bits[2*i])) << i;
    return v;
  endfunction

  function automatic bit has_code11(input logic [W-1:0] bits, input int nd);
    for (int i = 0; i < nd; i++)
      if (bits[2*i+1] && bits[2*i]) return 1'b1;
    return 1'b0;
  endfunction

  // Counts positions where l bits sum to 0 and the h bits below are both 1.
  function automatic int count_left_ctx(input logic [W-1:0] a, input logic [W-1:0] b, input int nd);
    int n = 0;
    for (int i = 1; i < nd; i++)
      if (!a[2*i] && !b[2*i] && a[2*(i-1)+1] && b[2*(i-1)+1]) n++;
    return n;
  endfunction

  function automatic rdigit_t rand_cs2();
    case ($urandom_range(2))
      0:       return '{h: 1'b0, l: 1'b0};
      1:       return '{h: 1'b0, l: 1'b1};
      default: return '{h: 1'b1, l: 1'b0};
    endcase
  endfunction

  task automatic check_small();
    longint unsigned ev, got;
    ev  = cs2_value(W'(xs), NS) + cs2_value(W'(ys), NS);
    got = cs2_value(W'(zs), NS + 1);
    checks++;
    if (got != ev || has_code11(W'(zs), NS + 1)) begin
      failures++;
      if (failures < 10) $display("FAIL small x=%b y=%b z=%b expected %0d got %0d", xs, ys, zs, ev, got);
    end
    left_ctx_seen += count_left_ctx(W'(xs), W'(ys), NS);
  endtask

  task automatic check_full();
    logic [W-1:0] zb;
    longint unsigned ev, got;
    zb  = zl;
    ev  = cs2_value(W'(xl), NL) + cs2_value(W'(yl), NL);
    got = cs2_value(zb, NL + 1);
    checks++;
    if (got != ev || has_code11(zb, NL + 1)) begin
      failures++;
      if (failures < 10) $display("FAIL full expected %0d got %0d", ev, got);
    end
    left_ctx_seen += count_left_ctx(W'(xl), W'(yl), NL);
  endtask

  // Watchdog.
  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exhaustive over 4-digit operands: digit code d in 0..2 maps to 00,01,10.
    for (int a = 0; a < 81; a++) begin
      for (int b = 0; b < 81; b++) begin
        automatic int ta = a;
        automatic int tb = b;
        for (int i = 0; i < NS; i++) begin
          xs[i] = (ta % 3 == 2) ? '{h: 1'b1, l: 1'b0} : '{h: 1'b0, l: 1'((ta % 3) == 1)};
          ys[i] = (tb % 3 == 2) ? '{h: 1'b1, l: 1'b0} : '{h: 1'b0, l: 1'((tb % 3) == 1)};
          ta /= 3;
          tb /= 3;
        end
        xl = '0; yl = '0;
        #1;
        check_small();
        check_full();
      end
    end
    // Directed case: group sum 4 at position 2 above group sum 2 at position 1,
    // whose lower h bits are both 1. Position 1 must not carry, so z[2] = 2.
    // X = Y = digits (3..0) 0,1,2,2; expected Z digits (4..0) 0,1,2,2,0.
    xs = {2'b00, 2'b01, 2'b10, 2'b10};
    ys = xs;
    #1;
    checks++;
    if (zs != {2'b00, 2'b01, 2'b10, 2'b10, 2'b00}) begin
      failures++;
      $display("FAIL directed left-context case: z=%b", zs);
    end
    // Random full-size operands, including all-2 extremes.
    for (int k = 0; k < 20000; k++) begin
      for (int i = 0; i < NL; i++) begin
        xl[i] = (k == 0) ? '{h: 1'b1, l: 1'b0} : rand_cs2();
        yl[i] = (k == 0) ? '{h: 1'b1, l: 1'b0} : rand_cs2();
      end
      #1;
      check_full();
    end
    checks++;
    if (left_ctx_seen == 0) begin
      failures++;
      $display("FAIL left-context case never exercised");
    end
    $display("left-context (group sum 2, both lower h bits set) cases: %0d", left_ctx_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
