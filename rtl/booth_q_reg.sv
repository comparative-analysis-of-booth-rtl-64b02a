// booth_q_reg: multiplier register Q with the extra bit Q-1.
//
// Parallel-load shift register of N bits plus the one-bit register Q-1 that
// sits to the right of Q0. `load` puts the multiplier into Q and clears Q-1.
// `shift` moves everything one place to the right: the accumulator's LSB
// (`sin`) enters at the top of Q, and Q0 moves into Q-1. Together with the
// accumulator this forms the concatenated A:Q:Q-1 right shift of the Booth
// algorithm. After the last shift Q holds the low half of the product.
//
// q0 and qm1 are the two bits the control block examines. Load has priority
// over shift. Synchronous active-low reset to zero is this design's choice.
module booth_q_reg #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] d,
  input  logic         sin,
  output logic [N-1:0] q,
  output logic         qm1
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q   <= '0;
      qm1 <= 1'b0;
    end else if (load) begin
      q   <= d;
      qm1 <= 1'b0;
    end else if (shift) begin
      q   <= {sin, q[N-1:1]};
      qm1 <= q[0];
    end
  end

endmodule
