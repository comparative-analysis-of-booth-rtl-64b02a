// booth_m_reg: multiplicand register M of the sequential radix-2 Booth
// multiplier.
//
// An N-bit register that captures the multiplicand when `load` is high at a
// rising clock edge and holds it for the rest of the multiplication. It feeds
// the B input of the accumulator ALU. Width N = 16 follows the document; the
// synchronous active-low reset to zero is this design's choice.
//
// Timing: `m` shows the loaded value from the cycle after the load edge.
module booth_m_reg #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic [N-1:0] m
);

  always_ff @(posedge clk) begin
    if (!rst_n)    m <= '0;
    else if (load) m <= d;
  end

endmodule
