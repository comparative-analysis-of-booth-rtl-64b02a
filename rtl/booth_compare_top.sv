// booth_compare_top: the three Booth multipliers side by side.
//
// Brings out, each with its own ports:
//   seq_*  the configurable sequential radix-2 multiplier (N = 16, one
//          Booth step per multiplier bit, operand range 4/8/12/16 bits set
//          through a configuration register),
//   r2_*   the combinational radix-2 Booth multiplier (N = 8),
//   r4_*   the combinational radix-4 Booth multiplier (N = 8).
// The two combinational multipliers compute the same function with N and
// N/2 partial products, which is the comparison the design is built for.
// Only the sequential multiplier is clocked; see its header for timing.
module booth_compare_top
  import booth_pkg::*;
#(
  parameter int unsigned SEQ_N  = 16,
  parameter int unsigned SEQ_CW = 4,
  parameter int unsigned ARR_N  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // sequential radix-2
  input  logic               seq_cfg_we,
  input  range_e             seq_cfg_range,
  input  logic               seq_go,
  input  logic [SEQ_N-1:0]   seq_multiplicand,
  input  logic [SEQ_N-1:0]   seq_multiplier,
  output logic [2*SEQ_N-1:0] seq_product,
  output range_e             seq_cfg_q,
  output logic               seq_idle,
  output logic               seq_done,
  // combinational radix-2
  input  logic [ARR_N-1:0]   r2_multiplicand,
  input  logic [ARR_N-1:0]   r2_multiplier,
  output logic [2*ARR_N-1:0] r2_product,
  // combinational radix-4
  input  logic [ARR_N-1:0]   r4_multiplicand,
  input  logic [ARR_N-1:0]   r4_multiplier,
  output logic [2*ARR_N-1:0] r4_product
);

  booth_radix2_seq #(.N(SEQ_N), .CW(SEQ_CW)) u_seq (
    .clk, .rst_n,
    .cfg_we(seq_cfg_we), .cfg_range(seq_cfg_range), .go(seq_go),
    .multiplicand(seq_multiplicand), .multiplier(seq_multiplier),
    .product(seq_product), .cfg_q(seq_cfg_q),
    .idle(seq_idle), .done(seq_done)
  );

  booth_r2_array #(.N(ARR_N)) u_r2 (
    .multiplicand(r2_multiplicand), .multiplier(r2_multiplier),
    .product(r2_product)
  );

  booth_r4_array #(.N(ARR_N)) u_r4 (
    .multiplicand(r4_multiplicand), .multiplier(r4_multiplier),
    .product(r4_product)
  );

endmodule
