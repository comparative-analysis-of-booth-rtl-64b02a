// booth_alu: arithmetic unit in front of the accumulator.
//
// Purely combinational. According to `op` it produces
//   ALU_ZERO   0                (clears A at the start of a multiplication)
//   ALU_ADD    A + M            (Booth pair Q0,Q-1 = 01)
//   ALU_SUB    A - M            (Booth pair Q0,Q-1 = 10)
//   ALU_SHIFT  A >>> 1          (arithmetic right shift, sign bit kept)
// `m` is sign-extended to the ALU width W. The document's ALU is 16 bits
// wide; W defaults to 17 here (one guard bit, see booth_accumulator).
module booth_alu
  import booth_pkg::*;
#(
  parameter int unsigned W = 17,
  parameter int unsigned N = 16
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [N-1:0] m,
  output logic [W-1:0] y
);

  logic [W-1:0] m_ext;

  always_comb begin
    m_ext = W'($signed(m));
    unique case (op)
      ALU_ZERO:  y = '0;
      ALU_ADD:   y = a + m_ext;
      ALU_SUB:   y = a - m_ext;
      ALU_SHIFT: y = {a[W-1], a[W-1:1]};
      default:   y = '0;
    endcase
  end

endmodule
