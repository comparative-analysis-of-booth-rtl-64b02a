// tb_booth_accumulator: self-checking test of the accumulator register.
// Random load/hold traffic and resets, compared with a reference copy every
// cycle.
module tb_booth_accumulator;
  localparam int unsigned W = 17;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [W-1:0] d = '0, a, ref_a;
  int checks = 0, failures = 0;

  booth_accumulator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_a = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      load  = ($urandom_range(0, 1) == 0);
      d     = W'($urandom);
      rst_n = (i % 600 != 300);
      @(posedge clk);
      if (!rst_n) ref_a = '0; else if (load) ref_a = d;
      #1;
      checks++;
      if (a !== ref_a) begin
        failures++;
        $display("mismatch at %0d: a=%h expected %h", i, a, ref_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
