// Arithmetic unit: the mantissa of the approximate product.
//
// Computes, in unsigned fixed point with FM fraction bits,
//   M = 1 + A_t + B_t + (A_apx * B_apx* + B_apx * A_apx* - A_apx* * B_apx*)
// which is the bracket of the document's equation (1). Because A_apx* and
// B_apx* are powers of two (2^-ea, 2^-eb), the three products are right
// shifts, and the whole unit is shifters and adders only; no multiplier
// array is built. The bracketed term equals A_apx*B_apx minus
// (A_apx - A_apx*)(B_apx - B_apx*), which is never negative, and it is exact
// at FM fraction bits, so M needs no rounding here.
//
// Interface: at, bt (T+1 fraction bits), aapx, bapx (H+1 fraction bits),
// ea, eb (power-of-two exponents); m = M with FM fraction bits and 2 integer
// bits (M < 4).
// Timing: purely combinational.
module arith_unit #(
  parameter int unsigned T  = 4,
  parameter int unsigned H  = 4,
  parameter int unsigned EW = $clog2(H + 2),
  parameter int unsigned FM = ((T + 1) > (2 * H + 2)) ? (T + 1) : (2 * H + 2),
  parameter int unsigned MW = FM + 2
) (
  input  logic [T:0]    at,
  input  logic [T:0]    bt,
  input  logic [H:0]    aapx,
  input  logic [H:0]    bapx,
  input  logic [EW-1:0] ea,
  input  logic [EW-1:0] eb,
  output logic [MW-1:0] m
);
  logic [MW-1:0] one, at_w, bt_w, a_x_br, b_x_ar, ar_x_br, prod_term;

  always_comb begin
    one     = MW'(1) << FM;
    // Align the fractions to FM fraction bits.
    at_w    = MW'(at) << (FM - (T + 1));
    bt_w    = MW'(bt) << (FM - (T + 1));
    // A_apx * 2^-eb and B_apx * 2^-ea: align, then shift right.
    a_x_br  = (MW'(aapx) << (FM - (H + 1))) >> eb;
    b_x_ar  = (MW'(bapx) << (FM - (H + 1))) >> ea;
    // 2^-(ea+eb); the exponent sum is widened so it cannot wrap.
    ar_x_br = (MW'(1) << FM) >> ({1'b0, ea} + {1'b0, eb});
    prod_term   = a_x_br + b_x_ar - ar_x_br;
    m       = one + at_w + bt_w + prod_term;
  end
endmodule
