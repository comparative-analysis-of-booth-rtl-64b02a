// booth_pkg: types shared by the Booth multipliers.
//
// alu_op_e     operation selected by the control block for the accumulator
//              ALU of the sequential radix-2 multiplier (zero, add, subtract,
//              arithmetic right shift). The four operations are the four ALU
//              control lines of the sequential datapath; the encoding is this
//              design's own.
// range_e      operand range held in the configuration register: 4, 8, 12 or
//              16 bits. The encoding is this design's own.
// r4_code_t    radix-4 recoding of one multiplier triplet into the three
//              select lines double, neg and single.
package booth_pkg;

  typedef enum logic [1:0] {
    ALU_ZERO  = 2'd0,
    ALU_ADD   = 2'd1,
    ALU_SUB   = 2'd2,
    ALU_SHIFT = 2'd3
  } alu_op_e;

  typedef enum logic [1:0] {
    RANGE_4  = 2'd0,
    RANGE_8  = 2'd1,
    RANGE_12 = 2'd2,
    RANGE_16 = 2'd3
  } range_e;

  typedef struct packed {
    logic dbl;     // magnitude is 2 x multiplicand
    logic neg;     // partial product is negated
    logic single;  // magnitude is 1 x multiplicand
  } r4_code_t;

  // Operand width in bits selected by a range code.
  function automatic int unsigned range_bits(range_e r);
    return 4 * (int'(r) + 1);
  endfunction

endpackage
