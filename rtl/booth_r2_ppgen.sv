// booth_r2_ppgen: radix-2 Booth partial product generator.
//
// Combinational. Forms the N+1-bit two's-complement partial product
// 0, +M or -M from the N-bit signed multiplicand M and the encoder lines
// `single` and `neg`. The negation is complete (invert and add one here), so
// the partial product is already the signed value, as in the document's
// simulation traces. One extra bit keeps -M exact for the most negative M.
module booth_r2_ppgen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] multiplicand,
  input  logic         neg,
  input  logic         single,
  output logic [N:0]   pp
);

  logic [N:0] m_ext;

  always_comb begin
    m_ext = {multiplicand[N-1], multiplicand};
    if (!single)  pp = '0;
    else if (neg) pp = -m_ext;
    else          pp = m_ext;
  end

endmodule
