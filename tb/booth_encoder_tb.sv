// Self-checking testbench for booth_encoder.
//
// Exhaustive over every multiplicand x (XW bits) and every triplet. For each
// case the expected digit is computed directly as -2*y_{k+1} + y_k + y_{k-1}
// and the expected row value as digit*x; the block must give the right digit
// enum, and signed(pp) + neg must equal digit*x. The negate bit must be set
// exactly for negative digits. Runs at XW = 8 and, as a second instance, at
// XW = 5.
module booth_encoder_tb;
  import booth_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]   x8;
  logic [4:0]   x5;
  logic [2:0]   tri_in;
  booth_digit_t d8, d5;
  logic [8:0]   pp8;
  logic [5:0]   pp5;
  logic         n8, n5;

  booth_encoder #(.XW(8)) dut8 (.x(x8), .triplet(tri_in), .digit(d8), .pp(pp8), .neg(n8));
  booth_encoder #(.XW(5)) dut5 (.x(x5), .triplet(tri_in), .digit(d5), .pp(pp5), .neg(n5));

  // watchdog
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: x8=%0d x5=%0d triplet=%b", what, $signed(x8), $signed(x5), tri_in);
    end
  endtask

  initial begin
    int z, v8, v5;
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < 256; i++) begin
        tri_in = 3'(t);
        x8     = 8'(i);
        x5     = 5'(i);
        #1;
        z  = -2 * int'(tri_in[2]) + int'(tri_in[1]) + int'(tri_in[0]);
        v8 = int'($signed(pp8)) + int'(n8);
        v5 = int'($signed(pp5)) + int'(n5);
        check(booth_digit_value(d8) == z, "digit8");
        check(booth_digit_value(d5) == z, "digit5");
        check(v8 == z * int'($signed(x8)), "value8");
        check(v5 == z * int'($signed(x5)), "value5");
        check(n8 == (z < 0), "neg8");
        check(n5 == (z < 0), "neg5");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
