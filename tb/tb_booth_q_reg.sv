// tb_booth_q_reg: self-checking test of the Q / Q-1 shift register.
// Checks parallel load (which also clears Q-1), the right shift with the
// serial input entering at the top and Q0 moving into Q-1, hold, the
// priority of load over shift, and reset, against a reference model.
module tb_booth_q_reg;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0, sin = 1'b0;
  logic [N-1:0] d = '0, q;
  logic qm1;
  logic [N:0] ref_qq;   // {Q, Q-1}
  int checks = 0, failures = 0, n_shift = 0;

  booth_q_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_qq = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    // The example of the architecture description: shifting Q = 0100000000001111
    // with a 1 coming from the accumulator gives 1010000000000111.
    load = 1'b1; d = 16'b0100000000001111;
    @(posedge clk); #1 load = 1'b0; shift = 1'b1; sin = 1'b1;
    @(posedge clk); #1 shift = 1'b0;
    checks++;
    if (q !== 16'b1010000000000111 || qm1 !== 1'b1) begin
      failures++;
      $display("example shift: q=%b qm1=%b", q, qm1);
    end
    ref_qq = {q, qm1};
    for (int i = 0; i < 3000; i++) begin
      load  = ($urandom_range(0, 5) == 0);
      shift = ($urandom_range(0, 1) == 0);
      sin   = 1'($urandom);
      d     = N'($urandom);
      rst_n = (i % 1000 != 500);
      @(posedge clk);
      if (!rst_n)     ref_qq = '0;
      else if (load)  ref_qq = {d, 1'b0};
      else if (shift) begin ref_qq = {sin, ref_qq[N:1]}; n_shift++; end
      #1;
      checks++;
      if ({q, qm1} !== ref_qq) begin
        failures++;
        $display("mismatch at %0d: q=%h qm1=%b expected %h", i, q, qm1, ref_qq);
      end
    end
    if (n_shift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
