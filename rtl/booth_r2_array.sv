// booth_r2_array: combinational N x N radix-2 Booth multiplier.
//
// Each multiplier bit i with its right neighbour (0 for bit 0) drives a
// radix-2 encoder; its `neg`/`single` lines steer a partial product
// generator that emits 0, +M or -M; the adder sums the N partial products,
// partial product i weighted by 2^i, into the 2N-bit signed product. This is
// the structure of the document's radix-2 schematic: N encoder boxes, N
// partial product boxes and one summing box. Operands are signed two's
// complement; N = 8 is the size the document simulates and synthesises.
// No clock: the product follows the operands after the combinational delay.
module booth_r2_array #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [2*N-1:0] product
);

  logic [N:0]        mx;     // multiplier with a 0 appended on the right
  logic [N-1:0]      neg, single;
  logic [N-1:0][N:0] pp;

  assign mx = {multiplier, 1'b0};

  for (genvar i = 0; i < N; i++) begin : g_row
    booth_r2_encoder u_enc (
      .x(mx[i+1 -: 2]), .neg(neg[i]), .single(single[i])
    );
    booth_r2_ppgen #(.N(N)) u_pp (
      .multiplicand, .neg(neg[i]), .single(single[i]), .pp(pp[i])
    );
  end

  booth_pp_adder #(.N(N), .K(N), .STEP(1)) u_add (
    .pp, .product
  );

endmodule
