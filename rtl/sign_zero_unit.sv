// Sign and zero detector unit.
//
// Front half: detects a zero operand and, when SIGNED is set, takes the
// magnitudes of two's-complement operands and forms the sign of the product.
// Back half: forces the product to zero when an operand is zero (the
// leading-one/fraction path has no way to represent zero) and negates the
// magnitude product when the sign is negative.
// The document lists a sign and zero detector among the multiplier's units
// and evaluates the multiplier for unsigned operands; SIGNED therefore
// defaults to 0, where the sign logic reduces to wires and only the zero
// detection acts. The signed mode (sign-magnitude around the unsigned core)
// is this design's reading of the unit's name.
//
// Interface: a, b (N-bit operands); a_mag, b_mag (N-bit magnitudes to the
// core); prod_mag (2N-bit magnitude product from the core); prod (2N-bit
// final product, two's complement when SIGNED); zero (an operand is zero).
// Timing: purely combinational.
module sign_zero_unit #(
  parameter int unsigned N      = 16,
  parameter bit          SIGNED = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N-1:0]   a_mag,
  output logic [N-1:0]   b_mag,
  input  logic [2*N-1:0] prod_mag,
  output logic [2*N-1:0] prod,
  output logic           zero
);
  logic neg;

  always_comb begin
    zero = (a == '0) || (b == '0);
    if (SIGNED) begin
      a_mag = a[N-1] ? (~a + 1'b1) : a;
      b_mag = b[N-1] ? (~b + 1'b1) : b;
      neg   = a[N-1] ^ b[N-1];
    end else begin
      a_mag = a;
      b_mag = b;
      neg   = 1'b0;
    end
  end

  always_comb begin
    if (zero)     prod = '0;
    else if (neg) prod = ~prod_mag + 1'b1;
    else          prod = prod_mag;
  end
endmodule
