// tb_cs3_pp_reducer: self-checking test of the four-row CS3 reducer.
//
// Part 1 applies every combination of four 3-bit two's complement rows
// (8^4 combinations) to a reducer with M = 3; part 2 applies random rows,
// including the most negative and most positive values, to a reducer of the
// default size. The testbench computes pp0 + 2*pp1 + 4*pp2 + 8*pp3 itself,
// evaluates the CS3 result (digit value 2h + l, weight 2^i) modulo 2^W and
// compares. It counts vectors with negative rows (where sign extension
// matters) and fails if there were none.
module tb_cs3_pp_reducer;
  import rbr_pkg::*;

  localparam int unsigned MS = 3;
  localparam int unsigned WS = MS + 4;
  localparam int unsigned ML = DEFAULT_DIGITS;
  localparam int unsigned WL = ML + 4;

  logic [3:0][MS-1:0] pps;
  rdigit_t [WS-1:0]   zs;
  logic [3:0][ML-1:0] ppl;
  rdigit_t [WL-1:0]   zl;

  int unsigned checks = 0, failures = 0, neg_rows = 0;

  cs3_pp_reducer #(.M(MS)) dut_small (.pp(pps), .z(zs));
  cs3_pp_reducer           dut_full  (.pp(ppl), .z(zl));

  // Value of a CS3 digit vector, modulo 2^w.
  function automatic longint unsigned cs3_mod(input logic [2*WL-1:0] bits, input int w);
    longint unsigned v = 0;
    for (int i = 0; i < w; i++)
      v += (2 * longint'(bits[2*i+1]) + longint'(bits[2*i])) << i;
    return v & ((longint'(1) << w) - 1);
  endfunction

  task automatic check(input longint r0, input longint r1, input longint r2, input longint r3,
                       input logic [2*WL-1:0] zz, input int w);
    longint unsigned ev, got;
    ev  = longint'(r0 + 2 * r1 + 4 * r2 + 8 * r3) & ((longint'(1) << w) - 1);
    got = cs3_mod(zz, w);
    checks++;
    if (got != ev) begin
      failures++;
      if (failures < 10) $display("FAIL w=%0d rows %0d %0d %0d %0d: expected %0h got %0h",
                                  w, r0, r1, r2, r3, ev, got);
    end
    if (r0 < 0 || r1 < 0 || r2 < 0 || r3 < 0) neg_rows++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      pps = 12'(v);
      #1;
      check(longint'($signed(pps[0])), longint'($signed(pps[1])),
            longint'($signed(pps[2])), longint'($signed(pps[3])), (2*WL)'(zs), WS);
    end
    for (int k = 0; k < 20000; k++) begin
      for (int r = 0; r < 4; r++)
        ppl[r] = (k == 0) ? {1'b1, {(ML-1){1'b0}}} :
                 (k == 1) ? {1'b0, {(ML-1){1'b1}}} : ML'({$urandom, $urandom});
      #1;
      check(longint'($signed(ppl[0])), longint'($signed(ppl[1])),
            longint'($signed(ppl[2])), longint'($signed(ppl[3])), (2*WL)'(zl), WL);
    end
    checks++;
    if (neg_rows == 0) begin
      failures++;
      $display("FAIL no negative partial product was applied");
    end
    $display("vectors with negative rows: %0d", neg_rows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
