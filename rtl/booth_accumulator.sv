// booth_accumulator: accumulator A of the sequential radix-2 Booth
// multiplier.
//
// A register that takes the ALU result whenever the control block asserts
// `load`. The ALU decides what that result is (zero at the start, A+M, A-M or
// A shifted right arithmetically), so this register only stores; it holds the
// upper half of the running product, and its least significant bit is what
// the Q register shifts in.
//
// The document gives the accumulator N = 16 bits. This register is one bit
// wider (W = N + 1 at the multiplier level) so that A - M cannot overflow when
// the multiplicand is the most negative N-bit value; that guard bit is this
// design's choice. Synchronous active-low reset to zero.
module booth_accumulator #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] a
);

  always_ff @(posedge clk) begin
    if (!rst_n)    a <= '0;
    else if (load) a <= d;
  end

endmodule
