// tb_booth_r4_ppgen: exhaustive check of the radix-4 partial product
// generator: every 8-bit multiplicand with every digit 0, +-1, +-2
// (including -2 x -128 = +256), and the trace value -2 x 2 = 1111111100.
module tb_booth_r4_ppgen;
  import booth_pkg::*;
  localparam int unsigned N = 8;
  logic [N-1:0] multiplicand;
  r4_code_t code;
  logic [N+1:0] pp;
  int checks = 0, failures = 0;

  booth_r4_ppgen #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int digits[5] = '{0, 1, -1, 2, -2};
    for (int m = 0; m < 256; m++) begin
      foreach (digits[d]) begin
        int expct;
        multiplicand = N'(m);
        code.neg    = (digits[d] < 0);
        code.single = (digits[d] == 1 || digits[d] == -1);
        code.dbl    = (digits[d] == 2 || digits[d] == -2);
        #1;
        expct = digits[d] * int'($signed(multiplicand));
        checks++;
        if (int'($signed(pp)) != expct) begin
          failures++;
          $display("m=%0d digit=%0d pp=%b expected %0d", m, digits[d], pp, expct);
        end
      end
    end
    multiplicand = 8'd2; code = '{dbl: 1'b1, neg: 1'b1, single: 1'b0}; #1;
    checks++;
    if (pp !== 10'b1111111100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
