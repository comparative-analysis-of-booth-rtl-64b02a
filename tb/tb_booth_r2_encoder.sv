// tb_booth_r2_encoder: exhaustive check of the radix-2 recoder against the
// recoding table (00 -> 0, 01 -> +1, 10 -> -1, 11 -> 0).
module tb_booth_r2_encoder;
  logic [1:0] x;
  logic neg, single;
  int checks = 0, failures = 0;
  int digit[4] = '{0, 1, -1, 0};

  booth_r2_encoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int got;
      x = 2'(i);
      #1;
      got = single ? (neg ? -1 : 1) : 0;
      checks++;
      if (got != digit[i] || (neg && !single)) begin
        failures++;
        $display("x=%b neg=%b single=%b expected digit %0d", x, neg, single, digit[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
