// tb_booth_alu: self-checking test of the accumulator ALU.
// Every operation with random and corner operands; expected values come from
// integer arithmetic on sign-extended values.
module tb_booth_alu;
  import booth_pkg::*;
  localparam int unsigned W = 17, N = 16;
  alu_op_e op;
  logic [W-1:0] a, y, expct;
  logic [N-1:0] m;
  int checks = 0, failures = 0;
  int unsigned counts[4];

  booth_alu #(.W(W), .N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'($urandom_range(0, 3));
      a  = (i < 16) ? ((i % 2 == 1) ? 17'h10000 : 17'h0FFFF) : W'($urandom);
      m  = (i < 16) ? ((i % 4 < 2) ? 16'h8000 : 16'h7FFF) : N'($urandom);
      #1;
      case (op)
        ALU_ZERO:  expct = '0;
        ALU_ADD:   expct = W'(longint'($signed(a)) + longint'($signed(m)));
        ALU_SUB:   expct = W'(longint'($signed(a)) - longint'($signed(m)));
        ALU_SHIFT: expct = W'(longint'($signed(a)) >>> 1);
        default:   expct = '0;
      endcase
      counts[op]++;
      checks++;
      if (y !== expct) begin
        failures++;
        $display("op=%s a=%h m=%h y=%h expected %h", op.name(), a, m, y, expct);
      end
    end
    foreach (counts[k]) if (counts[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
