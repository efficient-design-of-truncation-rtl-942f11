// End-to-end testbench for tr_approx_mult built with SIGNED = 1 (two's-
// complement operands, sign-magnitude around the unsigned core). The
// expected product is the reference model applied to the magnitudes, negated
// when the operand signs differ. Counts zero operands, negative products and
// the most negative operand, each of which must occur.
module tb_tr_approx_mult_signed;
  import approx_ref_pkg::*;
  localparam int unsigned N = 16, T = 4, H = 4;

  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0, n_zero = 0, n_neg = 0, n_min = 0;

  tr_approx_mult #(.N(N), .T(T), .H(H), .SIGNED(1'b1)) dut (.a(a), .b(b), .p(p));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] va, input logic [N-1:0] vb);
    longint sa, sb;
    longint unsigned mag;
    longint expv;
    sa = longint'($signed(va));
    sb = longint'($signed(vb));
    a = va;
    b = vb;
    #1;
    mag = approx_mul((sa < 0) ? -sa : sa, (sb < 0) ? -sb : sb, N, T, H);
    expv = ((sa < 0) != (sb < 0)) ? -longint'(mag) : longint'(mag);
    checks++;
    if (longint'($signed(p)) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d expected %0d", sa, sb, $signed(p), expv);
    end
    if (sa == 0 || sb == 0) n_zero++;
    if (expv < 0) n_neg++;
    if (va == {1'b1, {(N-1){1'b0}}} || vb == {1'b1, {(N-1){1'b0}}}) n_min++;
  endtask

  initial begin
    check(16'h8000, 16'h8000);
    check(16'h8000, 16'h7FFF);
    check(16'h0000, 16'hFFFF);
    check(16'hFFFF, 16'hFFFF);
    for (int n = 0; n < 20000; n++) begin
      logic [N-1:0] va, vb;
      va = N'($urandom);
      vb = N'($urandom);
      va = $signed(va) >>> $urandom_range(N - 1, 0);
      vb = $signed(vb) >>> $urandom_range(N - 1, 0);
      check(va, vb);
    end
    $display("zero %0d, negative %0d, most-negative operand %0d", n_zero, n_neg, n_min);
    checks++;
    if (n_zero == 0 || n_neg == 0 || n_min == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
