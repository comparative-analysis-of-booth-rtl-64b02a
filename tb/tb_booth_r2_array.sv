// tb_booth_r2_array: exhaustive check of the combinational radix-2 Booth
// multiplier: all 65536 pairs of signed 8-bit operands against the integer
// product, starting with the two cases of the document's simulations
// (2 x 2 = 0000000000000100 and 3 x 2 = 0000000000000110).
module tb_booth_r2_array;
  localparam int unsigned N = 8;
  logic [N-1:0] multiplicand, multiplier;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;

  booth_r2_array #(.N(N)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    multiplicand = 8'b00000010; multiplier = 8'b00000010; #1;
    checks++;
    if (product !== 16'b0000000000000100) failures++;
    multiplicand = 8'b00000011; multiplier = 8'b00000010; #1;
    checks++;
    if (product !== 16'b0000000000000110) failures++;
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        multiplicand = N'(a);
        multiplier   = N'(b);
        #1;
        checks++;
        if (int'($signed(product)) != a * b) begin
          failures++;
          if (failures < 10) $display("%0d * %0d = %0d", a, b, $signed(product));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
