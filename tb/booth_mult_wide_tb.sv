// Randomised testbench for booth_mult at sizes other than the default 8x8.
//
// Instances: 16x16 (a typical word size), 12x6 (multiplicand wider than the
// multiplier) and 5x10 (multiplier wider, odd multiplicand width). Each gets
// the corner operands (0, 1, -1, most positive, most negative) in every
// combination and then random pairs; the product is compared with the integer
// product of the two's complement operands.
module booth_mult_wide_tb;

  int checks = 0;
  int failures = 0;

  logic [15:0] xa, ya;
  logic [31:0] pa;
  logic [11:0] xb;
  logic [5:0]  yb;
  logic [17:0] pb;
  logic [4:0]  xc;
  logic [9:0]  yc;
  logic [14:0] pc;

  booth_mult #(.XW(16), .YW(16)) dut_a (.x(xa), .y(ya), .p(pa));
  booth_mult #(.XW(12), .YW(6))  dut_b (.x(xb), .y(yb), .p(pb));
  booth_mult #(.XW(5),  .YW(10)) dut_c (.x(xc), .y(yc), .p(pc));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic apply_and_check();
    #1;
    check(longint'($signed(pa)), longint'($signed(xa)) * longint'($signed(ya)), "16x16");
    check(longint'($signed(pb)), longint'($signed(xb)) * longint'($signed(yb)), "12x6");
    check(longint'($signed(pc)), longint'($signed(xc)) * longint'($signed(yc)), "5x10");
  endtask

  // corner value number k of a w-bit operand: 0, 1, -1, max, min
  function automatic logic [31:0] corner(input int k, input int w);
    logic [31:0] one = 32'd1;
    case (k)
      0:       return 32'd0;
      1:       return 32'd1;
      2:       return '1;
      3:       return (one << (w - 1)) - 1;
      default: return one << (w - 1);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 5; i++) begin
      for (int j = 0; j < 5; j++) begin
        xa = 16'(corner(i, 16)); ya = 16'(corner(j, 16));
        xb = 12'(corner(i, 12)); yb = 6'(corner(j, 6));
        xc = 5'(corner(i, 5));   yc = 10'(corner(j, 10));
        apply_and_check();
      end
    end
    for (int n = 0; n < 100_000; n++) begin
      xa = 16'($urandom); ya = 16'($urandom);
      xb = 12'($urandom); yb = 6'($urandom);
      xc = 5'($urandom);  yc = 10'($urandom);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
