// tb_cs3_adder: self-checking test of the constant-time CS3 adder.
//
// Part 1 applies every pair of 3-digit CS3 operands (4^6 pairs) to a 3-digit
// adder; part 2 applies random operands to an adder of the default size.
// The testbench computes the integer values of X, Y and Z itself (digit
// value 2h + l, weight 2^i) and checks Z = X + Y. It counts the positions
// whose four equal-weight input bits sum to 3 or more, i.e. where the 4:2
// compressor has to pass a carry to the next position, and fails if none
// occurred. A watchdog ends the run after a fixed time.
module tb_cs3_adder;
  import rbr_pkg::*;

  localparam int unsigned NS = 3;
  localparam int unsigned NL = DEFAULT_DIGITS;
  localparam int unsigned W  = 2 * (NL + 1);

  rdigit_t [NS-1:0] xs, ys;
  rdigit_t [NS:0]   zs;
  rdigit_t [NL-1:0] xl, yl;
  rdigit_t [NL:0]   zl;

  int unsigned checks = 0, failures = 0, big_groups = 0;

  cs3_adder #(.N(NS)) dut_small (.x(xs), .y(ys), .z(zs));
  cs3_adder           dut_full  (.x(xl), .y(yl), .z(zl));

  function automatic longint unsigned cs3_value(input logic [W-1:0] bits, input int nd);
    longint unsigned v = 0;
    for (int i = 0; i < nd; i++)
      v += (2 * longint'(bits[2*i+1]) + longint'(bits[2*i])) << i;
    return v;
  endfunction

  function automatic int count_big(input logic [W-1:0] a, input logic [W-1:0] b, input int nd);
    int n = 0;
    for (int i = 0; i < nd; i++) begin
      int s = int'(a[2*i]) + int'(b[2*i]);
      if (i > 0) s += int'(a[2*i-1]) + int'(b[2*i-1]);
      if (s >= 3) n++;
    end
    return n;
  endfunction

  task automatic check(input logic [W-1:0] a, input logic [W-1:0] b,
                       input logic [W-1:0] zz, input int nd);
    longint unsigned ev, got;
    ev  = cs3_value(a, nd) + cs3_value(b, nd);
    got = cs3_value(zz, nd + 1);
    checks++;
    if (got != ev) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d expected %0d got %0d", nd, ev, got);
    end
    big_groups += count_big(a, b, nd);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      for (int b = 0; b < 64; b++) begin
        xs = (2*NS)'(a);
        ys = (2*NS)'(b);
        #1;
        check(W'(xs), W'(ys), W'(zs), NS);
      end
    end
    for (int k = 0; k < 20000; k++) begin
      for (int i = 0; i < NL; i++) begin
        xl[i] = (k == 0) ? 2'b11 : 2'($urandom_range(3));
        yl[i] = (k == 0) ? 2'b11 : 2'($urandom_range(3));
      end
      #1;
      check(W'(xl), W'(yl), W'(zl), NL);
    end
    checks++;
    if (big_groups == 0) begin
      failures++;
      $display("FAIL no position ever passed a compressor carry");
    end
    $display("positions with group sum >= 3: %0d", big_groups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
