// Self-checking testbench for booth_pp_adder.
//
// Drives random (XW+1)-bit partial products and negate bits at the 8x8 size,
// at 6x10 and at 16x16, plus all-ones and all-zeros rows. The expected sum is
// computed with 64-bit integer arithmetic as
//   sum_i (signed(pp_i) + neg_i) * 4^i   modulo 2^(XW+YW),
// independently of how the block aligns its rows.
module booth_pp_adder_tb;

  int checks = 0;
  int failures = 0;

  logic [3:0][8:0]   pp_a;
  logic [3:0]        neg_a;
  logic [15:0]       p_a;
  logic [4:0][6:0]   pp_b;
  logic [4:0]        neg_b;
  logic [15:0]       p_b;
  logic [7:0][16:0]  pp_c;
  logic [7:0]        neg_c;
  logic [31:0]       p_c;

  booth_pp_adder                      dut_a (.pp(pp_a), .neg(neg_a), .p(p_a));
  booth_pp_adder #(.XW(6),  .YW(10))  dut_b (.pp(pp_b), .neg(neg_b), .p(p_b));
  booth_pp_adder #(.XW(16), .YW(16))  dut_c (.pp(pp_c), .neg(neg_c), .p(p_c));

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
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint ea, eb, ec;
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < 4; i++) pp_a[i] = (n == 0) ? '1 : (n == 1) ? '0 : 9'($urandom);
      for (int i = 0; i < 5; i++) pp_b[i] = (n == 0) ? '1 : (n == 1) ? '0 : 7'($urandom);
      for (int i = 0; i < 8; i++) pp_c[i] = (n == 0) ? '1 : (n == 1) ? '0 : 17'($urandom);
      neg_a = (n < 2) ? '1 : 4'($urandom);
      neg_b = (n < 2) ? '1 : 5'($urandom);
      neg_c = (n < 2) ? '1 : 8'($urandom);
      #1;
      ea = 0; eb = 0; ec = 0;
      for (int i = 0; i < 4; i++)
        ea += (longint'($signed(pp_a[i])) + longint'(neg_a[i])) * (64'sd1 << (2 * i));
      for (int i = 0; i < 5; i++)
        eb += (longint'($signed(pp_b[i])) + longint'(neg_b[i])) * (64'sd1 << (2 * i));
      for (int i = 0; i < 8; i++)
        ec += (longint'($signed(pp_c[i])) + longint'(neg_c[i])) * (64'sd1 << (2 * i));
      check(p_a == 16'(ea), "8x8");
      check(p_b == 16'(eb), "6x10");
      check(p_c == 32'(ec), "16x16");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
