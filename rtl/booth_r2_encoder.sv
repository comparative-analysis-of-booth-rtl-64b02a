// booth_r2_encoder: radix-2 Booth recoder for one multiplier bit.
//
// Combinational. x = {Q(i), Q(i-1)}, the multiplier bit and its right-hand
// neighbour (0 to the right of bit 0). The recoded digit is
//   00 -> 0, 01 -> +1, 10 -> -1, 11 -> 0
// given as two select lines: `single` (digit is non-zero) and `neg` (digit
// is negative). The table is the document's; the two-line form follows the
// encoder boxes of its radix-2 schematic.
module booth_r2_encoder (
  input  logic [1:0] x,
  output logic       neg,
  output logic       single
);

  assign single = x[1] ^ x[0];
  assign neg    = x[1] & ~x[0];

endmodule
