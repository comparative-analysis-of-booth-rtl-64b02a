// tb_booth_pp_adder: self-checking test of the partial product adder in
// both of its configurations: 8 partial products of 9 bits weighted 2^i
// (radix-2) and 4 partial products of 10 bits weighted 4^i (radix-4). The
// expected product is the integer sum, reduced to 16 bits.
module tb_booth_pp_adder;
  localparam int unsigned N = 8;
  logic [7:0][N:0]   pp2;
  logic [3:0][N+1:0] pp4;
  logic [2*N-1:0] prod2, prod4;
  int checks = 0, failures = 0;

  booth_pp_adder #(.N(N), .K(8), .STEP(1))             u2 (.pp(pp2), .product(prod2));
  booth_pp_adder #(.N(N), .K(4), .STEP(2), .PW(N + 2)) u4 (.pp(pp4), .product(prod4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      longint s2, s4;
      s2 = 0; s4 = 0;
      for (int i = 0; i < 8; i++) begin
        pp2[i] = (N+1)'($urandom);
        s2 += longint'($signed(pp2[i])) * (longint'(1) << i);
      end
      for (int i = 0; i < 4; i++) begin
        pp4[i] = (N+2)'($urandom);
        s4 += longint'($signed(pp4[i])) * (longint'(1) << (2 * i));
      end
      #1;
      checks += 2;
      if (prod2 !== 16'(s2)) begin failures++; $display("radix-2 sum %h expected %h", prod2, 16'(s2)); end
      if (prod4 !== 16'(s4)) begin failures++; $display("radix-4 sum %h expected %h", prod4, 16'(s4)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
