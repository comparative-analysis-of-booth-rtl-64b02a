// booth_pp_adder: partial product summation of the combinational Booth
// multipliers.
//
// Combinational. Takes K partial products of PW bits each, sign-extends
// partial product i to 2N bits, shifts it left by STEP*i places and adds them
// all, giving the 2N-bit signed product (bits above 2N are dropped, which is
// exact because the true product fits in 2N bits). STEP is 1 for radix-2
// (one partial product per multiplier bit, K = N) and 2 for radix-4 (one per
// bit pair, K = N/2). PW is N + 1 for radix-2 and N + 2 for radix-4 (see
// booth_r4_ppgen). The document shows this as one block collecting pp1 to
// ppK into product(15:0) and does not say how it adds; a plain chain of
// word adders, left to synthesis, is this design's choice.
module booth_pp_adder #(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 8,
  parameter int unsigned STEP = 1,
  parameter int unsigned PW   = N + 1
) (
  input  logic [K-1:0][PW-1:0] pp,
  output logic [2*N-1:0]       product
);

  always_comb begin
    logic [2*N-1:0] acc;
    acc = '0;
    for (int i = 0; i < K; i++) begin
      acc = acc + ((2*N)'($signed(pp[i])) << (STEP * i));
    end
    product = acc;
  end

endmodule
