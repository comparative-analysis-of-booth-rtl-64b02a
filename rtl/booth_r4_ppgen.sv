// booth_r4_ppgen: radix-4 Booth partial product generator.
//
// Combinational. From the N-bit signed multiplicand M and the encoder lines
// it forms the two's-complement partial product 0, +M, -M, +2M or -2M:
// `single` selects M, `dbl` selects M shifted left by one, and `neg`
// negates completely (invert and add one inside this block), matching the
// signed partial product values of the document's simulation traces.
// The output is N+2 bits wide, one more than the N+1 bits of the document's
// schematic: with a complete negation, -2M for the most negative M
// (2 x 2^(N-1) = 2^N) does not fit in N+1 signed bits.
module booth_r4_ppgen
  import booth_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] multiplicand,
  input  r4_code_t     code,
  output logic [N+1:0] pp
);

  logic [N+1:0] m_ext, mag;

  always_comb begin
    m_ext = {{2{multiplicand[N-1]}}, multiplicand};
    if (code.dbl)         mag = {multiplicand[N-1], multiplicand, 1'b0};
    else if (code.single) mag = m_ext;
    else                  mag = '0;
    pp = code.neg ? -mag : mag;
  end

endmodule
