// End-to-end, exhaustive testbench for booth_mult at its default 8x8 size.
//
// Applies all 256*256 = 65,536 operand pairs, treats x, y and p as two's
// complement and compares p with the integer product x*y. It also counts how
// often each Booth digit (0, +1, +2, -1, -2) is applied in each of the four
// rows, working the digit out from the multiplier triplet, and counts a
// failure for any digit value that some row never used (row 0 cannot produce
// +2, since y_{-1} = 0). The -2X row with the most negative multiplicand (the
// one case where the partial product needs all nine bits) is counted
// separately and must occur as well.
module booth_mult_tb;

  localparam int XW  = 8;
  localparam int YW  = 8;
  localparam int NPP = YW / 2;

  int checks = 0;
  int failures = 0;

  logic [XW-1:0]    x;
  logic [YW-1:0]    y;
  logic [XW+YW-1:0] p;

  booth_mult dut (.x(x), .y(y), .p(p));

  int digit_seen [NPP][5];   // [row][digit + 2]
  int m2_by_x [1 << XW];     // -2 digits seen, per multiplicand value

  // y bit b, with y_{-1} = 0
  function automatic int ybit(input logic [YW-1:0] yy, input int b);
    return (b < 0) ? 0 : int'(yy[b]);
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, yv, pv;
    int z;
    foreach (digit_seen[r, v]) digit_seen[r][v] = 0;
    foreach (m2_by_x[k]) m2_by_x[k] = 0;
    for (int i = 0; i < (1 << XW); i++) begin
      for (int j = 0; j < (1 << YW); j++) begin
        x = XW'(i);
        y = YW'(j);
        #1;
        xv = int'($signed(x));
        yv = int'($signed(y));
        pv = int'($signed(p));
        checks++;
        if (pv != xv * yv) begin
          failures++;
          if (failures < 20) $display("FAIL %0d * %0d = %0d, got %0d", xv, yv, xv * yv, pv);
        end
        for (int r = 0; r < NPP; r++) begin
          z = -2 * ybit(y, 2*r+1) + ybit(y, 2*r) + ybit(y, 2*r-1);
          digit_seen[r][z + 2]++;
          if (z == -2) m2_by_x[i]++;
        end
      end
    end
    for (int r = 0; r < NPP; r++) begin
      $display("row %0d digits: 0:%0d +1:%0d +2:%0d -2:%0d -1:%0d", r,
               digit_seen[r][2], digit_seen[r][3], digit_seen[r][4],
               digit_seen[r][0], digit_seen[r][1]);
      for (int v = 0; v < 5; v++) begin
        // row 0 has y_{-1} = 0, so it can never produce +2
        if (!(r == 0 && v == 4)) begin
          checks++;
          if (digit_seen[r][v] == 0) begin
            failures++;
            $display("FAIL row %0d never used digit %0d", r, v - 2);
          end
        end
      end
    end
    $display("-2 x most-negative-X rows: %0d", m2_by_x[1 << (XW - 1)]);
    checks++;
    if (m2_by_x[1 << (XW - 1)] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
