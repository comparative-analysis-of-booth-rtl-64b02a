// booth_radix2_seq: configurable sequential radix-2 Booth multiplier.
//
// Multiplies two signed two's-complement operands, one Booth step per
// multiplier bit, with a controller and a datapath: multiplicand register M,
// multiplier shift register Q with its extra bit Q-1, accumulator A, an ALU
// that clears, adds, subtracts or arithmetically shifts A, a down counter,
// and the control block. A and Q shift as one register, so after the last
// step A holds the upper half and Q the lower half of the product.
//
// The configuration register chooses a 4, 8, 12 or 16-bit operand range.
// The low R bits of each operand are taken as an R-bit signed number and
// sign-extended to N bits when they are loaded; the counter is preset to
// R - 1, so only R steps run. After R steps A:Q holds the product shifted
// left by N - R places (the unused multiplier bits are still in the low end
// of Q), and the output aligns it with an arithmetic right shift.
//
// Interface
//   cfg_we, cfg_range   write the configuration register (ignored while busy)
//   cfg_q               configuration register read-back
//   go                  start: operands are sampled in this cycle if idle
//   multiplicand,       N-bit operands, low R bits used
//   multiplier
//   product             2N-bit signed product, valid while idle after done
//   idle                no multiplication running (labelled Ideal in the
//                       architecture drawing this follows)
//   done                one-cycle pulse: product has just become valid
//
// Timing: 1 + R + k cycles from go to done, k being the number of add or
// subtract steps (pairs 01 or 10 among the R recoded bits).
//
// From the document: register names and widths, the four ALU operations, the
// 4-bit down counter, the control signals load/add/sub/shift/dc, the Booth
// pair rule and the concatenated arithmetic right shift. This design's own:
// the one-bit guard on A (W = N + 1, so that A - M cannot overflow for the
// most negative multiplicand), the cycle split, the range encoding, the
// output alignment for short ranges and the synchronous active-low reset.
module booth_radix2_seq
  import booth_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_we,
  input  range_e         cfg_range,
  input  logic           go,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [2*N-1:0] product,
  output range_e         cfg_q,
  output logic           idle,
  output logic           done
);

  localparam int unsigned W = N + 1;

  logic [5:0]    bits;
  logic [CW-1:0] iter_m1;
  logic [N-1:0]  m, q;
  logic          qm1;
  logic [W-1:0]  a, alu_y;
  alu_op_e       op;
  logic          load, zero, add, sub, shift, dc;
  logic          cnt_zero;
  logic [CW-1:0] count;
  logic [5:0]    unused_sh;
  logic [N-1:0]  mcand_ext, mplier_ext;

  booth_config_reg #(.N(N), .CW(CW)) u_cfg (
    .clk, .rst_n,
    .we(cfg_we), .range_in(cfg_range), .busy(!idle),
    .range_q(cfg_q), .bits, .iter_m1
  );

  // Take the low R bits of an operand as a signed R-bit number.
  assign unused_sh  = 6'(N) - bits;
  assign mcand_ext  = N'($signed(multiplicand << unused_sh) >>> unused_sh);
  assign mplier_ext = N'($signed(multiplier   << unused_sh) >>> unused_sh);

  booth_control u_ctrl (
    .clk, .rst_n, .go,
    .q0(q[0]), .qm1, .cnt_zero,
    .load, .zero, .add, .sub, .shift, .dc, .idle, .done
  );

  booth_m_reg #(.N(N)) u_m (
    .clk, .rst_n, .load, .d(mcand_ext), .m
  );

  booth_q_reg #(.N(N)) u_q (
    .clk, .rst_n, .load, .shift, .d(mplier_ext), .sin(a[0]), .q, .qm1
  );

  always_comb begin
    if (add)        op = ALU_ADD;
    else if (sub)   op = ALU_SUB;
    else if (shift) op = ALU_SHIFT;
    else            op = ALU_ZERO;
  end

  booth_alu #(.W(W), .N(N)) u_alu (
    .op, .a, .m, .y(alu_y)
  );

  booth_accumulator #(.W(W)) u_acc (
    .clk, .rst_n, .load(zero | add | sub | shift), .d(alu_y), .a
  );

  booth_counter #(.CW(CW)) u_cnt (
    .clk, .rst_n, .load, .dc, .init(iter_m1), .count, .zero(cnt_zero)
  );

  // A:Q holds product * 2^(N-R); shift it back down, keeping the sign.
  logic signed [W+N-1:0] aq;
  assign aq      = $signed({a, q});
  assign product = (2*N)'(aq >>> unused_sh);

endmodule
