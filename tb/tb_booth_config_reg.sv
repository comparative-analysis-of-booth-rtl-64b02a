// tb_booth_config_reg: self-checking test of the configuration register.
// Writes every range, checks the width and counter preset it reports, and
// checks that writes are ignored while the multiplier is busy.
module tb_booth_config_reg;
  import booth_pkg::*;
  localparam int unsigned N = 16, CW = 4;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, busy = 1'b0;
  range_e range_in = RANGE_4, range_q, ref_r;
  logic [5:0] bits;
  logic [CW-1:0] iter_m1;
  int checks = 0, failures = 0, n_blocked = 0;

  booth_config_reg #(.N(N), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int unsigned w;
    w = (int'(ref_r) + 1) * 4;
    checks++;
    if (range_q !== ref_r || bits !== 6'(w) || iter_m1 !== CW'(w - 1)) begin
      failures++;
      $display("range=%0d bits=%0d iter_m1=%0d expected range %0d width %0d",
               range_q, bits, iter_m1, ref_r, w);
    end
  endtask

  initial begin
    ref_r = RANGE_16;
    @(posedge clk); #1 rst_n = 1'b1;
    check();
    for (int i = 0; i < 2000; i++) begin
      we       = ($urandom_range(0, 2) == 0);
      busy     = ($urandom_range(0, 2) == 0);
      range_in = range_e'($urandom_range(0, 3));
      @(posedge clk);
      if (we && !busy) ref_r = range_in;
      if (we && busy && range_in != ref_r) n_blocked++;
      #1 check();
    end
    if (n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
