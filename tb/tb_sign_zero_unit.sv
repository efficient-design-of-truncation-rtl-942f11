// Self-checking testbench for sign_zero_unit, in both modes: an unsigned
// instance (the default) and a signed one. Magnitudes, zero flag and the
// final product are compared with integer computations; the test counts
// zero operands and negative products seen and fails if none occurred.
module tb_sign_zero_unit;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, am_u, bm_u, am_s, bm_s;
  logic [2*N-1:0] pm, p_u, p_s;
  logic z_u, z_s;
  int checks = 0, failures = 0, n_zero = 0, n_neg = 0;

  sign_zero_unit #(.N(N), .SIGNED(1'b0)) dut_u (
    .a(a), .b(b), .a_mag(am_u), .b_mag(bm_u), .prod_mag(pm), .prod(p_u), .zero(z_u));
  sign_zero_unit #(.N(N), .SIGNED(1'b1)) dut_s (
    .a(a), .b(b), .a_mag(am_s), .b_mag(bm_s), .prod_mag(pm), .prod(p_s), .zero(z_s));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint sa, sb;
      longint ea, eb, ez;
      longint ep_s;
      a  = (n % 17 == 0) ? '0 : N'($urandom);
      b  = (n % 23 == 0) ? '0 : N'($urandom);
      pm = (2 * N)'($urandom) >> 2;
      #1;
      sa = longint'($signed(a));
      sb = longint'($signed(b));
      ea = (sa < 0) ? -sa : sa;
      eb = (sb < 0) ? -sb : sb;
      ez = (a == 0 || b == 0) ? 1 : 0;
      ep_s = (ez != 0) ? 0 : (((sa < 0) != (sb < 0)) ? -longint'(pm) : longint'(pm));
      checks++;
      if (am_u != a || bm_u != b || longint'(z_u) != ez ||
          p_u != ((ez != 0) ? '0 : pm)) begin
        failures++;
        $display("FAIL unsigned a=%h b=%h pm=%h p=%h z=%0d", a, b, pm, p_u, z_u);
      end
      checks++;
      if (longint'(am_s) != ea || longint'(bm_s) != eb || longint'(z_s) != ez ||
          longint'($signed(p_s)) != ep_s) begin
        failures++;
        $display("FAIL signed a=%h b=%h pm=%h p=%h z=%0d", a, b, pm, p_s, z_s);
      end
      if (ez != 0) n_zero++;
      if (ez == 0 && $signed(p_s) < 0) n_neg++;
    end
    $display("zero operands %0d, negative products %0d", n_zero, n_neg);
    checks++;
    if (n_zero == 0 || n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
