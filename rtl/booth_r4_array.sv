// booth_r4_array: combinational N x N radix-4 (modified) Booth multiplier.
//
// The multiplier is scanned in overlapping triplets {Q(2i+1), Q(2i),
// Q(2i-1)}, i = 0 .. N/2-1, with a 0 to the right of bit 0; the document's
// schematic feeds its four encoders multiplier(1:0) (plus the implied 0),
// (3:1), (5:3) and (7:5). Each radix-4 encoder's double/neg/single lines
// steer a partial product generator giving 0, +-M or +-2M, and the adder
// sums the N/2 partial products, partial product i weighted by 4^i, into the
// 2N-bit signed product: half the partial products of the radix-2 version.
// N must be even; N = 8 is the size the document simulates and synthesises.
// No clock: the product follows the operands after the combinational delay.
module booth_r4_array
  import booth_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [2*N-1:0] product
);

  localparam int unsigned K = N / 2;

  logic [N:0]        mx;     // multiplier with a 0 appended on the right
  r4_code_t [K-1:0]  code;
  logic [K-1:0][N+1:0] pp;

  assign mx = {multiplier, 1'b0};

  for (genvar i = 0; i < K; i++) begin : g_row
    booth_r4_encoder u_enc (
      .x(mx[2*i+2 -: 3]), .code(code[i])
    );
    booth_r4_ppgen #(.N(N)) u_pp (
      .multiplicand, .code(code[i]), .pp(pp[i])
    );
  end

  booth_pp_adder #(.N(N), .K(K), .STEP(2), .PW(N + 2)) u_add (
    .pp, .product
  );

  initial begin
    if (N % 2 != 0) $error("booth_r4_array: N must be even");
  end

endmodule
