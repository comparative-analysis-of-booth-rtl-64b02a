// tb_booth_radix2_seq: self-checking test of the configurable sequential
// radix-2 Booth multiplier at its full 16-bit size.
// For every operand range (4, 8, 12, 16 bits) it multiplies corner and
// random operands, compares the 32-bit product with the integer product of
// the sign-extended low R bits, and checks the latency from go to done
// against 1 + R + (number of 01 / 10 pairs in the recoded multiplier). It
// also writes the configuration while a multiplication runs and checks that
// the write is ignored.
module tb_booth_radix2_seq;
  import booth_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0, go = 1'b0;
  range_e cfg_range = RANGE_16, cfg_q;
  logic [N-1:0] multiplicand = '0, multiplier = '0;
  logic [2*N-1:0] product;
  logic idle, done;
  int checks = 0, failures = 0, n_blocked = 0;
  int n_range[4];

  booth_radix2_seq #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sext(logic [N-1:0] v, int unsigned r);
    longint x;
    x = longint'(v) & ((64'd1 << r) - 1);
    if (x >= (64'sd1 << (r - 1))) x -= (64'sd1 << r);
    return x;
  endfunction

  task automatic set_range(range_e r);
    @(negedge clk);
    cfg_we = 1'b1; cfg_range = r;
    @(negedge clk);
    cfg_we = 1'b0;
    checks++;
    if (cfg_q !== r) begin failures++; $display("config write failed"); end
  endtask

  task automatic multiply(logic [N-1:0] a, logic [N-1:0] b, range_e r, bit poke_cfg);
    int unsigned bits, k, cycles;
    logic prev;
    longint expct;
    bits = 4 * (int'(r) + 1);
    k = 0; prev = 1'b0;
    for (int i = 0; i < int'(bits); i++) begin
      if (b[i] != prev) k++;
      prev = b[i];
    end
    expct = sext(a, bits) * sext(b, bits);
    @(negedge clk);
    multiplicand = a; multiplier = b; go = 1'b1;
    @(negedge clk);
    go = 1'b0; multiplicand = N'($urandom); multiplier = N'($urandom);
    cycles = 1;
    if (poke_cfg) begin
      cfg_we = 1'b1; cfg_range = range_e'(~r);
    end
    while (!done && cycles < 100) begin
      @(negedge clk);
      cfg_we = 1'b0;
      cycles++;
    end
    if (poke_cfg) begin
      checks++;
      if (cfg_q !== r) begin failures++; $display("config changed while busy"); end
      else n_blocked++;
    end
    checks++;
    if (product !== (2*N)'(expct)) begin
      failures++;
      $display("r=%0d %h * %h: product %h expected %h", bits, a, b, product, (2*N)'(expct));
    end
    checks++;
    if (cycles != 1 + bits + k || !idle) begin
      failures++;
      $display("r=%0d %h * %h: %0d cycles expected %0d", bits, a, b, cycles, 1 + bits + k);
    end
    n_range[r]++;
  endtask

  initial begin
    logic [N-1:0] corner[6];
    corner = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h0002};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Reset leaves the full 16-bit range; the two operand cases of the
    // document's simulations first.
    multiply(16'd2, 16'd2, RANGE_16, 1'b0);
    multiply(16'd3, 16'd2, RANGE_16, 1'b0);
    for (int r = 0; r < 4; r++) begin
      set_range(range_e'(r));
      foreach (corner[i]) foreach (corner[j])
        multiply(corner[i] >> (12 - 4 * r), corner[j] >> (12 - 4 * r), range_e'(r), 1'b0);
      foreach (corner[i]) foreach (corner[j])
        multiply(corner[i], corner[j], range_e'(r), 1'b0);
      for (int t = 0; t < 300; t++)
        multiply(N'($urandom), N'($urandom), range_e'(r), (t % 50) == 0);
    end
    foreach (n_range[r]) if (n_range[r] == 0) failures++;
    if (n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
