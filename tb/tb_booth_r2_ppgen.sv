// tb_booth_r2_ppgen: exhaustive check of the radix-2 partial product
// generator: every 8-bit multiplicand with every select combination, and the
// partial products of the document's traces (-2 = 111111110, +2).
module tb_booth_r2_ppgen;
  localparam int unsigned N = 8;
  logic [N-1:0] multiplicand;
  logic neg, single;
  logic [N:0] pp;
  int checks = 0, failures = 0;

  booth_r2_ppgen #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 256; m++) begin
      for (int s = 0; s < 3; s++) begin
        int expct;
        multiplicand = N'(m);
        single = (s != 0);
        neg    = (s == 2);
        #1;
        expct = single ? (neg ? -int'($signed(multiplicand)) : int'($signed(multiplicand))) : 0;
        checks++;
        if (int'($signed(pp)) != expct) begin
          failures++;
          $display("m=%0d s=%0d pp=%b expected %0d", m, s, pp, expct);
        end
      end
    end
    multiplicand = 8'd2; single = 1'b1; neg = 1'b1; #1;
    checks++;
    if (pp !== 9'b111111110) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
