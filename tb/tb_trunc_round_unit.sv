// Self-checking testbench for trunc_round_unit. For random non-zero
// operands (and every power of two, plus operands with fewer bits below the
// leading one than the truncation keeps) it compares the truncated, odd-
// rounded fractions with an integer computation and the power-of-two
// exponent with a real-valued nearest-power search. It counts how often the
// power-of-two rounding went up and down, and fails if either never happened.
module tb_trunc_round_unit;
  import approx_ref_pkg::*;
  localparam int unsigned N = 16, T = 4, H = 4;
  localparam int unsigned KW = $clog2(N), EW = $clog2(H + 2);

  logic [N-1:0] opnd;
  logic [KW-1:0] k;
  logic [T:0] frac_t;
  logic [H:0] frac_apx;
  logic [EW-1:0] e;
  int checks = 0, failures = 0, n_up = 0, n_down = 0;

  trunc_round_unit #(.N(N), .T(T), .H(H)) dut (
    .opnd(opnd), .k(k), .frac_t(frac_t), .frac_apx(frac_apx), .e(e)
  );

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] v);
    int kk, exp_t, exp_apx, exp_e;
    longint unsigned x;
    real fv, r;
    kk = lead_one(64'(v), N);
    x = 64'(v) - (longint'(1) << kk);
    exp_t   = int'(((x << T) >> kk) * 2 + 1);
    exp_apx = int'(((x << H) >> kk) * 2 + 1);
    fv = real'(exp_apx) / (2.0 ** (H + 1));
    r = round_pow2(fv);
    exp_e = 0;
    while (r < 1.0) begin r = r * 2.0; exp_e++; end
    opnd = v;
    k = KW'(kk);
    #1;
    checks++;
    if (int'(frac_t) != exp_t || int'(frac_apx) != exp_apx || int'(e) != exp_e) begin
      failures++;
      $display("FAIL opnd=%h k=%0d: t=%h/%h apx=%h/%h e=%0d/%0d", v, kk,
               frac_t, exp_t, frac_apx, exp_apx, e, exp_e);
    end
    if (2.0 ** (-exp_e) > fv) n_up++; else n_down++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) check(N'(1) << i);
    for (int v = 1; v < 64; v++) check(N'(v));
    for (int n = 0; n < 5000; n++) begin
      logic [N-1:0] v;
      v = N'($urandom) >> $urandom_range(N - 1, 0);
      if (v == 0) v = 1;
      check(v);
    end
    $display("power-of-two rounding: up %0d down %0d", n_up, n_down);
    checks++;
    if (n_up == 0 || n_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
