// Self-checking testbench for arith_unit: random fractions and every pair of
// power-of-two exponents; the expected mantissa is evaluated in real
// arithmetic (exact at these widths) and scaled to FM fraction bits.
module tb_arith_unit;
  localparam int unsigned T = 4, H = 4;
  localparam int unsigned EW = $clog2(H + 2);
  localparam int unsigned FM = ((T + 1) > (2 * H + 2)) ? (T + 1) : (2 * H + 2);
  localparam int unsigned MW = FM + 2;

  logic [T:0] at, bt;
  logic [H:0] aapx, bapx;
  logic [EW-1:0] ea, eb;
  logic [MW-1:0] m;
  int checks = 0, failures = 0;

  arith_unit #(.T(T), .H(H)) dut (
    .at(at), .bt(bt), .aapx(aapx), .bapx(bapx), .ea(ea), .eb(eb), .m(m)
  );

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      real ra, rb, rx, ry, ar, br, em;
      logic [31:0] r0, r1, r2, r3;
      r0 = $urandom; r1 = $urandom; r2 = $urandom; r3 = $urandom;
      at   = {r0[T-1:0], 1'b1};
      bt   = {r1[T-1:0], 1'b1};
      aapx = {r2[H-1:0], 1'b1};
      bapx = {r3[H-1:0], 1'b1};
      ea   = EW'($urandom_range(H + 1, 0));
      eb   = EW'($urandom_range(H + 1, 0));
      #1;
      ra = real'(at) / (2.0 ** (T + 1));
      rb = real'(bt) / (2.0 ** (T + 1));
      rx = real'(aapx) / (2.0 ** (H + 1));
      ry = real'(bapx) / (2.0 ** (H + 1));
      ar = 1.0;
      br = 1.0;
      repeat (int'(ea)) ar = ar / 2.0;
      repeat (int'(eb)) br = br / 2.0;
      em = (1.0 + ra + rb + rx * br + ry * ar - ar * br) * (2.0 ** FM);
      checks++;
      if (real'(m) != em) begin
        failures++;
        if (failures < 10)
          $display("FAIL at=%h bt=%h aapx=%h bapx=%h ea=%0d eb=%0d m=%0d exp=%0f",
                   at, bt, aapx, bapx, ea, eb, m, em);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
