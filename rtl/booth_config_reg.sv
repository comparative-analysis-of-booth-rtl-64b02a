// booth_config_reg: configuration register of the sequential multiplier.
//
// Holds the operand range, 4, 8, 12 or 16 bits, that the next
// multiplication uses. It is written from input ports: `we` with `range_in`
// at a rising edge stores the new range, but only while the multiplier is not
// busy, so the range cannot change under a running multiplication. After
// reset the range is the full N bits.
//
// Outputs: `range_q` (the stored code), `bits` (operand width R in bits,
// limited to N), and `iter_m1` = R - 1, the preset of the iteration
// counter. With a smaller range the multiplier runs only R Booth steps, so
// the unused upper operand bits cause no add, subtract or shift activity.
// That a configuration register selects among 4/8/12/16-bit multiplication
// is from the document; the encoding, the write rule and the reset value are
// this design's choices.
module booth_config_reg
  import booth_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  range_e        range_in,
  input  logic          busy,
  output range_e        range_q,
  output logic [5:0]    bits,
  output logic [CW-1:0] iter_m1
);

  always_ff @(posedge clk) begin
    if (!rst_n)          range_q <= RANGE_16;
    else if (we && !busy) range_q <= range_in;
  end

  logic [5:0] req_bits;

  assign req_bits = 6'(range_bits(range_q));
  assign bits     = (req_bits > 6'(N)) ? 6'(N) : req_bits;
  assign iter_m1  = CW'(bits - 6'd1);

endmodule
