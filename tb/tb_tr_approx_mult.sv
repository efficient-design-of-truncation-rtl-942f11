// End-to-end, full-size testbench for tr_approx_mult at its default
// parameters (16 x 16 bits, unsigned). Every product is compared with the
// real-valued reference model in approx_ref_pkg. Operands are drawn with a
// random bit length so that short and long operands are both common, plus
// corner cases (zero, one, powers of two, all-ones).
//
// Mechanisms counted, each must occur at least once: a zero operand forcing
// the product to zero; the power-of-two rounding of the product-term
// fraction going up and going down; an operand with fewer bits below its
// leading one than the truncation keeps (zeros filled in); an operand whose
// fraction is actually truncated. It also reports the mean and the maximum
// relative error against the exact product, and checks the mean stays
// below 5 % (the document gives no accuracy figure; the bound is a sanity
// limit for this configuration).
module tb_tr_approx_mult;
  import approx_ref_pkg::*;
  localparam int unsigned N = 16, T = 4, H = 4;
  localparam int unsigned NVEC = 200000;

  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int n_zero = 0, n_up = 0, n_down = 0, n_short = 0, n_trunc = 0, n_err = 0;
  real sum_red = 0.0, max_red = 0.0;

  tr_approx_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Classify one operand's path through the truncation unit.
  task automatic classify(input logic [N-1:0] v);
    int k;
    real x, aa, r;
    if (v == 0) return;
    k = lead_one(64'(v), N);
    if (k < int'(T)) n_short++; else if (k > int'(T)) n_trunc++;
    x = (real'(v) - 2.0 ** k) / (2.0 ** k);
    aa = trunc_odd(x, H);
    r = round_pow2(aa);
    if (r > aa) n_up++; else n_down++;
  endtask

  task automatic check(input logic [N-1:0] va, input logic [N-1:0] vb);
    longint unsigned expv, exact;
    real red;
    a = va;
    b = vb;
    #1;
    expv = approx_mul(64'(va), 64'(vb), N, T, H);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d expected %0d", va, vb, p, expv);
    end
    if (va == 0 || vb == 0) n_zero++;
    classify(va);
    classify(vb);
    exact = longint'(va) * longint'(vb);
    if (exact != 0) begin
      red = (real'(p) - real'(exact)) / real'(exact);
      if (red < 0.0) red = -red;
      sum_red += red;
      n_err++;
      if (red > max_red) max_red = red;
    end
  endtask

  function automatic logic [N-1:0] rand_opnd();
    logic [N-1:0] v;
    v = N'($urandom);
    return v >> $urandom_range(N - 1, 0);
  endfunction

  initial begin
    logic [N-1:0] corners [6];
    corners = '{16'd0, 16'd1, 16'd3, 16'h8000, 16'hFFFF, 16'h00FF};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    for (int n = 0; n < NVEC; n++) check(rand_opnd(), rand_opnd());
    $display("zero %0d, round-up %0d, round-down %0d, short operand %0d, truncated operand %0d",
             n_zero, n_up, n_down, n_short, n_trunc);
    $display("mean relative error %f %%, max %f %% over %0d products",
             100.0 * sum_red / n_err, 100.0 * max_red, n_err);
    checks++;
    if (n_zero == 0 || n_up == 0 || n_down == 0 || n_short == 0 || n_trunc == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    if (sum_red / n_err > 0.05) begin
      failures++;
      $display("FAIL mean relative error too large");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
