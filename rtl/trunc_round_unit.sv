// Truncation and rounding unit, one per operand.
//
// An operand A with leading one at position k is A = 2^k * (1 + x), with the
// fraction x made of the k bits below the leading one. This unit
//   * left-aligns those bits (shift by N-1-k, zeros filled in below when the
//     operand has fewer than T or H bits after its leading one),
//   * truncates them to T bits for the linear term A_t and to H bits for the
//     product term A_apx, and appends a '1' below each, which rounds the
//     truncated value to the nearest odd number as the document prescribes,
//   * rounds A_apx to the nearest power of two, A_apx* = 2^-e, by finding its
//     leading one with an LOD and rounding up when the next bit is '1'.
// The outputs are unsigned fixed-point fractions: frac_t has T+1 fraction
// bits, frac_apx has H+1 fraction bits, and e (0..H+1) is the exponent of the
// power of two (e = 0 means A_apx* = 1.0).
// The widths T and H, the append-a-one way of rounding to odd and the
// rounding threshold of the power-of-two step are this design's choices; the
// document gives the operations, not these details.
//
// Interface: opnd (N bits, non-zero), k (leading-one position from the LOD).
// Timing: purely combinational.
module trunc_round_unit #(
  parameter int unsigned N  = 16,
  parameter int unsigned T  = 4,
  parameter int unsigned H  = 4,
  parameter int unsigned KW = $clog2(N),
  parameter int unsigned EW = $clog2(H + 2)
) (
  input  logic [N-1:0]  opnd,
  input  logic [KW-1:0] k,
  output logic [T:0]    frac_t,
  output logic [H:0]    frac_apx,
  output logic [EW-1:0] e
);
  localparam int unsigned HPW = $clog2(H + 1);

  logic [N-1:0] aligned;     // leading one moved to bit N-1
  logic [HPW-1:0] lpos;      // leading one of frac_apx
  logic           lvalid;

  always_comb begin
    aligned  = opnd << (KW'(N - 1) - k);
    frac_t   = {aligned[N-2 -: T], 1'b1};
    frac_apx = {aligned[N-2 -: H], 1'b1};
  end

  lod #(.W(H + 1)) u_lod_frac (
    .din  (frac_apx),
    .pos  (lpos),
    .valid(lvalid)
  );

  // Bit i of frac_apx (i = H is the MSB) weighs 2^-(H+1-i). The leading one
  // at lpos gives 2^-(H+1-lpos); if the bit below it is also set the value is
  // at least 1.5 times that, and it is rounded up to the next power.
  always_comb begin
    e = EW'(H + 1 - lpos);
    if (lpos != '0 && frac_apx[lpos - 1'b1])
      e = EW'(H - lpos);
  end

  // lvalid is always true: the appended LSB of frac_apx is '1'. The MSB of
  // aligned is the leading one itself and the bits below the kept fraction
  // are the ones truncation drops.
  wire unused_ok = lvalid ^ (^aligned);
endmodule
