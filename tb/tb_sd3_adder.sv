// tb_sd3_adder: self-checking test of the constant-time SD3 adder.
//
// Part 1 applies every pair of 3-digit operands (4^6 pairs) to a 3-digit
// adder; part 2 applies random operands to an adder of the default size.
// Every vector is checked twice, reading all digits first as SD3(-)
// (value -2h + l) and then as SD3(+) (value 2h - l): the same circuit must
// add in both digit sets. The testbench also counts positions whose group
// sum is -2 (a carry of -1 leaves the position) and +1 or +2 (a carry of +1),
// and fails if either kind never occurred. A watchdog ends the run.
module tb_sd3_adder;
  import rbr_pkg::*;

  localparam int unsigned NS = 3;
  localparam int unsigned NL = DEFAULT_DIGITS;
  localparam int unsigned W  = 2 * (NL + 2);

  rdigit_t [NS-1:0] xs, ys;
  rdigit_t [NS+1:0] zs;
  rdigit_t [NL-1:0] xl, yl;
  rdigit_t [NL+1:0] zl;

  int unsigned checks = 0, failures = 0, neg_carries = 0, pos_carries = 0;

  sd3_adder #(.N(NS)) dut_small (.x(xs), .y(ys), .z(zs));
  sd3_adder           dut_full  (.x(xl), .y(yl), .z(zl));

  // plus = 0: SD3(-) value -2h + l; plus = 1: SD3(+) value 2h - l.
  function automatic longint sd3_value(input logic [W-1:0] bits, input int nd, input bit plus);
    longint v = 0;
    for (int i = 0; i < nd; i++) begin
      longint d = -2 * longint'(bits[2*i+1]) + longint'(bits[2*i]);
      v += (plus ? -d : d) * (longint'(1) << i);
    end
    return v;
  endfunction

  task automatic count_carries(input logic [W-1:0] a, input logic [W-1:0] b, input int nd);
    for (int i = 0; i <= nd; i++) begin
      int t = 0;
      if (i < nd) t += int'(a[2*i]) + int'(b[2*i]);
      if (i > 0)  t -= int'(a[2*i-1]) + int'(b[2*i-1]);
      if (t == -2) neg_carries++;
      if (t >= 1)  pos_carries++;
    end
  endtask

  task automatic check(input logic [W-1:0] a, input logic [W-1:0] b,
                       input logic [W-1:0] zz, input int nd);
    for (int pl = 0; pl < 2; pl++) begin
      longint ev, got;
      ev  = sd3_value(a, nd, pl[0]) + sd3_value(b, nd, pl[0]);
      got = sd3_value(zz, nd + 2, pl[0]);
      checks++;
      if (got != ev) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d plus=%0d expected %0d got %0d", nd, pl, ev, got);
      end
    end
    count_carries(a, b, nd);
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
        xl[i] = (k == 0) ? 2'b10 : (k == 1) ? 2'b01 : 2'($urandom_range(3));
        yl[i] = (k == 0) ? 2'b10 : (k == 1) ? 2'b01 : 2'($urandom_range(3));
      end
      #1;
      check(W'(xl), W'(yl), W'(zl), NL);
    end
    checks++;
    if (neg_carries == 0 || pos_carries == 0) begin
      failures++;
      $display("FAIL a carry sign was never exercised");
    end
    $display("carries of -1: %0d, carries of +1: %0d", neg_carries, pos_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
