// tb_booth_trace_cases: the operand sequences of the reference simulation
// traces, run on all three multipliers of booth_compare_top.
//
// Radix-2 trace: multiplicand 2 with multipliers 2, 3, 7 and 1
// (products 4, 6, 14, 2). Radix-4 trace: (2, 2), (2, 3), (3, 3), (3, 8) and
// (8, 8) as (multiplicand, multiplier) (products 4, 6, 9, 24, 64). Every pair
// is applied to both arrays and to the sequential multiplier in its 8-bit
// range, and each result is compared with the product printed in the trace.
module tb_booth_trace_cases;
  import booth_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic seq_cfg_we = 1'b0, seq_go = 1'b0;
  range_e seq_cfg_range = RANGE_8, seq_cfg_q;
  logic [15:0] seq_multiplicand = '0, seq_multiplier = '0;
  logic [31:0] seq_product;
  logic seq_idle, seq_done;
  logic [7:0] r2_multiplicand = '0, r2_multiplier = '0;
  logic [7:0] r4_multiplicand = '0, r4_multiplier = '0;
  logic [15:0] r2_product, r4_product;
  int checks = 0, failures = 0;

  booth_compare_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(logic [7:0] a, logic [7:0] b, logic [15:0] expct);
    r2_multiplicand = a; r2_multiplier = b;
    r4_multiplicand = a; r4_multiplier = b;
    @(negedge clk);
    seq_multiplicand = {8'h00, a}; seq_multiplier = {8'h00, b}; seq_go = 1'b1;
    @(negedge clk);
    seq_go = 1'b0;
    while (!seq_done) @(negedge clk);
    checks += 3;
    if (r2_product !== expct)  begin failures++; $display("radix-2 %0d x %0d = %b", a, b, r2_product); end
    if (r4_product !== expct)  begin failures++; $display("radix-4 %0d x %0d = %b", a, b, r4_product); end
    if (seq_product !== {16'h0000, expct}) begin failures++; $display("seq %0d x %0d = %h", a, b, seq_product); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); seq_cfg_we = 1'b1; seq_cfg_range = RANGE_8;
    @(negedge clk); seq_cfg_we = 1'b0;
    run_case(8'b00000010, 8'b00000010, 16'b0000000000000100);
    run_case(8'b00000010, 8'b00000011, 16'b0000000000000110);
    run_case(8'b00000010, 8'b00000111, 16'b0000000000001110);
    run_case(8'b00000010, 8'b00000001, 16'b0000000000000010);
    run_case(8'b00000011, 8'b00000011, 16'b0000000000001001);
    run_case(8'b00000011, 8'b00001000, 16'b0000000000011000);
    run_case(8'b00001000, 8'b00001000, 16'b0000000001000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
