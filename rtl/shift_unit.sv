// Shift unit: scales the mantissa by 2^(k1+k2).
//
// The document's shift unit moves the arithmetic unit's output left by
// k1 + k2, the sum of the two leading-one positions. M arrives with FM
// fraction bits; after the left shift those bits are dropped (the result is
// truncated toward zero), which is this design's choice for turning the
// fixed-point product back into an integer.
//
// Interface: m (MW bits, FM of them fraction), k1, k2 (KW bits each);
// prod = floor(M * 2^(k1+k2)), 2N bits.
// Timing: purely combinational.
module shift_unit #(
  parameter int unsigned N  = 16,
  parameter int unsigned FM = 10,
  parameter int unsigned MW = FM + 2,
  parameter int unsigned KW = $clog2(N)
) (
  input  logic [MW-1:0]  m,
  input  logic [KW-1:0]  k1,
  input  logic [KW-1:0]  k2,
  output logic [2*N-1:0] prod
);
  localparam int unsigned WW = 2 * N + FM;

  logic [KW:0]   ksum;
  logic [WW-1:0] wide;

  always_comb begin
    ksum = {1'b0, k1} + {1'b0, k2};
    wide = WW'(m) << ksum;
    prod = wide[WW-1:FM];
  end

  // The FM fraction bits left after the shift are truncated away.
  wire unused_frac = ^wide[FM-1:0];
endmodule
