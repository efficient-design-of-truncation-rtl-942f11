// Leading-one detector (LOD).
//
// Finds the position of the most significant '1' in a W-bit word. The
// multiplier uses it twice per operand: once on the operand itself, to get
// the exponent k of its leading one (A = 2^k * (1 + x)), and once, at width
// H+1, inside the truncation unit to round the truncated fraction to the
// nearest power of two. The document names the LOD as the first unit of the
// multiplier and says it finds the leading-one position; the priority-scan
// structure below is this design's own choice.
//
// Interface: din (W bits) in; pos = index of the highest set bit (0 = LSB),
// valid = din is not zero (pos is 0 when din is 0).
// Timing: purely combinational.
module lod #(
  parameter int unsigned W  = 16,
  parameter int unsigned PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  din,
  output logic [PW-1:0] pos,
  output logic          valid
);
  always_comb begin
    pos   = '0;
    valid = 1'b0;
    // Scan from LSB to MSB; the last set bit seen is the highest one.
    for (int unsigned i = 0; i < W; i++) begin
      if (din[i]) begin
        pos   = PW'(i);
        valid = 1'b1;
      end
    end
  end
endmodule
