// tb_booth_m_reg: self-checking test of the multiplicand register.
// Random load/hold traffic and resets; a reference copy kept in the test
// bench is compared with the register output every cycle.
module tb_booth_m_reg;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [N-1:0] d = '0, m, ref_m;
  int checks = 0, failures = 0;

  booth_m_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_m = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      load = ($urandom_range(0, 2) == 0);
      d    = N'($urandom);
      if (i % 500 == 250) rst_n = 1'b0; else rst_n = 1'b1;
      @(posedge clk);
      if (!rst_n) ref_m = '0; else if (load) ref_m = d;
      #1;
      checks++;
      if (m !== ref_m) begin
        failures++;
        $display("mismatch at %0d: m=%h expected %h", i, m, ref_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
