// Truncation- and rounding-based approximate multiplier (top level).
//
// Each N-bit operand is written as A = 2^k1 (1 + x1), B = 2^k2 (1 + x2),
// where k is the position of the leading one. The product
//   A*B = 2^(k1+k2) (1 + x1 + x2 + x1*x2)
// is approximated by
//   2^(k1+k2) (1 + A_t + B_t + (A_apx*B_apx* + B_apx*A_apx* - A_apx*B_apx*))
// where A_t, B_t are the fractions truncated to T bits and rounded to odd,
// A_apx, B_apx the fractions truncated to H bits and rounded to odd, and
// A_apx*, B_apx* those rounded to the nearest power of two. Every product in
// the bracket has a power-of-two factor, so the datapath is only leading-one
// detectors, shifters and adders.
//
// Datapath: sign_zero_unit (magnitudes, zero detect) -> two lod ->
// two trunc_round_unit -> arith_unit -> shift_unit -> sign_zero_unit
// (zero force, sign). The chain of units and equation (1) follow the
// document; the operand width N = 16 and the truncation widths T = H = 4
// are this design's choices, as the document does not state them.
//
// Interface: a, b (N-bit operands, unsigned unless SIGNED); p (2N-bit
// approximate product).
// Timing: purely combinational, no clock; the result is valid one
// combinational delay after the operands.
module tr_approx_mult #(
  parameter int unsigned N      = 16,
  parameter int unsigned T      = 4,
  parameter int unsigned H      = 4,
  parameter bit          SIGNED = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned KW = $clog2(N);
  localparam int unsigned EW = $clog2(H + 2);
  localparam int unsigned FM = ((T + 1) > (2 * H + 2)) ? (T + 1) : (2 * H + 2);
  localparam int unsigned MW = FM + 2;

  logic [N-1:0]   a_mag, b_mag;
  logic [KW-1:0]  k1, k2;
  logic           a_nz, b_nz;
  logic [T:0]     at, bt;
  logic [H:0]     aapx, bapx;
  logic [EW-1:0]  ea, eb;
  logic [MW-1:0]  m;
  logic [2*N-1:0] prod_mag;
  logic           zero;

  sign_zero_unit #(.N(N), .SIGNED(SIGNED)) u_sz (
    .a(a), .b(b), .a_mag(a_mag), .b_mag(b_mag),
    .prod_mag(prod_mag), .prod(p), .zero(zero)
  );

  lod #(.W(N)) u_lod_a (.din(a_mag), .pos(k1), .valid(a_nz));
  lod #(.W(N)) u_lod_b (.din(b_mag), .pos(k2), .valid(b_nz));

  trunc_round_unit #(.N(N), .T(T), .H(H)) u_tr_a (
    .opnd(a_mag), .k(k1), .frac_t(at), .frac_apx(aapx), .e(ea)
  );
  trunc_round_unit #(.N(N), .T(T), .H(H)) u_tr_b (
    .opnd(b_mag), .k(k2), .frac_t(bt), .frac_apx(bapx), .e(eb)
  );

  arith_unit #(.T(T), .H(H)) u_arith (
    .at(at), .bt(bt), .aapx(aapx), .bapx(bapx), .ea(ea), .eb(eb), .m(m)
  );

  shift_unit #(.N(N), .FM(FM), .MW(MW)) u_shift (
    .m(m), .k1(k1), .k2(k2), .prod(prod_mag)
  );

  // The LOD valid flags duplicate the zero detector's test on the
  // magnitudes; the zero detector is the one that gates the output.
  wire unused_ok = a_nz & b_nz & zero;
endmodule
