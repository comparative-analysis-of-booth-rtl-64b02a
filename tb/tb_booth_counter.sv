// tb_booth_counter: self-checking test of the iteration down counter.
// Load, decrement, hold, load priority and the zero flag against a model.
module tb_booth_counter;
  localparam int unsigned CW = 4;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, dc = 1'b0, zero;
  logic [CW-1:0] init = '0, count, ref_c;
  int checks = 0, failures = 0, n_zero = 0;

  booth_counter #(.CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_c = '0;
    @(posedge clk); #1 rst_n = 1'b1;
    // A full 16-step count: preset 15, sixteen shifts.
    load = 1'b1; init = 4'd15;
    @(posedge clk); #1 load = 1'b0; dc = 1'b1;
    for (int k = 15; k >= 0; k--) begin
      checks++;
      if (count !== CW'(k) || zero !== (k == 0)) begin
        failures++;
        $display("count=%0d zero=%b expected %0d", count, zero, k);
      end
      if (k > 0) @(posedge clk); #1;
    end
    dc = 1'b0;
    ref_c = count;
    for (int i = 0; i < 3000; i++) begin
      load = ($urandom_range(0, 7) == 0);
      dc   = ($urandom_range(0, 1) == 0);
      init = CW'($urandom);
      @(posedge clk);
      if (load) ref_c = init; else if (dc) ref_c = ref_c - 1'b1;
      #1;
      checks++;
      if (count !== ref_c || zero !== (ref_c == 0)) begin
        failures++;
        $display("mismatch at %0d: count=%0d expected %0d", i, count, ref_c);
      end
      if (zero) n_zero++;
    end
    if (n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
