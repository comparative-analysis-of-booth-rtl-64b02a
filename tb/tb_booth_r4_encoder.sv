// tb_booth_r4_encoder: exhaustive check of the radix-4 recoder against the
// modified Booth table (000 0, 001 +1, 010 +1, 011 +2, 100 -2, 101 -1,
// 110 -1, 111 0), including that neg stays low for a zero digit.
module tb_booth_r4_encoder;
  import booth_pkg::*;
  logic [2:0] x;
  r4_code_t code;
  int checks = 0, failures = 0;
  int digit[8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  booth_r4_encoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int mag, got;
      x = 3'(i);
      #1;
      mag = code.dbl ? 2 : code.single ? 1 : 0;
      got = code.neg ? -mag : mag;
      checks++;
      if (got != digit[i] || (code.dbl && code.single) || (code.neg && mag == 0)) begin
        failures++;
        $display("x=%b code=%b expected digit %0d", x, code, digit[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
