// booth_r4_encoder: radix-4 (modified) Booth recoder for one bit pair.
//
// Combinational. x = {Q(2i+1), Q(2i), Q(2i-1)}, a bit pair of the multiplier
// with the top bit of the pair to its right (0 for the lowest pair). The
// recoded digit, per the document's radix-4 recoding table, is
//   000 0   001 +1   010 +1   011 +2   100 -2   101 -1   110 -1   111 0
// given as three select lines, as in the encoder boxes of its radix-4
// schematic: `single` (magnitude 1), `dbl` (magnitude 2; printed "double")
// and `neg` (digit negative). `neg` is low for 111, whose digit is 0.
module booth_r4_encoder
  import booth_pkg::*;
(
  input  logic [2:0] x,
  output r4_code_t   code
);

  assign code.single = x[1] ^ x[0];
  assign code.dbl    = (x == 3'b011) || (x == 3'b100);
  assign code.neg    = x[2] & ~(x[1] & x[0]);

endmodule
