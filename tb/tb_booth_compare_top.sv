// tb_booth_compare_top: end-to-end test of the whole design at its default
// sizes (16-bit sequential multiplier, 8-bit combinational multipliers).
//
// Each round picks two random 8-bit operands and multiplies them on all
// three multipliers at once: the radix-2 and radix-4 arrays, and the
// sequential multiplier in its 8-bit range. All three must give the integer
// product. Rounds then continue on the sequential multiplier alone in the
// 4, 12 and 16-bit ranges. The test counts how often each mechanism of the
// design happened and fails if one never did: sequential add, subtract and
// shift-only steps, each operand range, a configuration write refused while
// busy, and in the arrays each radix-2 digit (+1, -1) and each radix-4
// digit (+1, -1, +2, -2, and 0 from both 000 and 111). Latency of the
// sequential multiplier is checked against 1 + R + (add/subtract steps).
module tb_booth_compare_top;
  import booth_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic seq_cfg_we = 1'b0, seq_go = 1'b0;
  range_e seq_cfg_range = RANGE_16, seq_cfg_q;
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
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled from inside the design.
  int n_add = 0, n_sub = 0, n_skip = 0, n_blocked = 0;
  int n_range[4];
  int n_r2[3];      // radix-2 digits 0, +1, -1
  int n_r4[6];      // radix-4: 0 via 000, 0 via 111, +1, -1, +2, -2
  always @(posedge clk) if (rst_n) begin
    if (dut.u_seq.add) n_add++;
    if (dut.u_seq.sub) n_sub++;
    if (dut.u_seq.shift && dut.u_seq.u_ctrl.state == 2'd1) n_skip++;
  end

  task automatic count_array_digits();
    logic [8:0] mx2, mx4;
    mx2 = {r2_multiplier, 1'b0};
    mx4 = {r4_multiplier, 1'b0};
    for (int i = 0; i < 8; i++)
      case (mx2[i+1 -: 2])
        2'b01: n_r2[1]++;
        2'b10: n_r2[2]++;
        default: n_r2[0]++;
      endcase
    for (int i = 0; i < 4; i++)
      case (mx4[2*i+2 -: 3])
        3'b000: n_r4[0]++;
        3'b111: n_r4[1]++;
        3'b001, 3'b010: n_r4[2]++;
        3'b101, 3'b110: n_r4[3]++;
        3'b011: n_r4[4]++;
        default: n_r4[5]++;
      endcase
  endtask

  function automatic longint sext(logic [15:0] v, int unsigned r);
    longint x;
    x = longint'(v) & ((64'd1 << r) - 1);
    if (x >= (64'sd1 << (r - 1))) x -= (64'sd1 << r);
    return x;
  endfunction

  task automatic set_range(range_e r);
    @(negedge clk);
    seq_cfg_we = 1'b1; seq_cfg_range = r;
    @(negedge clk);
    seq_cfg_we = 1'b0;
    checks++;
    if (seq_cfg_q !== r) begin failures++; $display("configuration write failed"); end
  endtask

  task automatic seq_multiply(logic [15:0] a, logic [15:0] b, range_e r, bit poke);
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
    seq_multiplicand = a; seq_multiplier = b; seq_go = 1'b1;
    @(negedge clk);
    seq_go = 1'b0;
    cycles = 1;
    if (poke) begin seq_cfg_we = 1'b1; seq_cfg_range = range_e'(~r); end
    while (!seq_done && cycles < 100) begin
      @(negedge clk);
      seq_cfg_we = 1'b0;
      cycles++;
    end
    if (poke) begin
      checks++;
      if (seq_cfg_q !== r) begin failures++; $display("configuration changed while busy"); end
      else n_blocked++;
    end
    checks++;
    if (seq_product !== 32'(expct)) begin
      failures++;
      $display("seq r=%0d %h * %h = %h expected %h", bits, a, b, seq_product, 32'(expct));
    end
    checks++;
    if (cycles != 1 + bits + k || !seq_idle) begin
      failures++;
      $display("seq r=%0d latency %0d expected %0d", bits, cycles, 1 + bits + k);
    end
    n_range[r]++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    set_range(RANGE_8);
    for (int t = 0; t < 600; t++) begin
      logic [7:0] a, b;
      int expct;
      a = (t == 0) ? 8'd2 : (t == 1) ? 8'd3 : (t == 2) ? 8'h80 : 8'($urandom);
      b = (t < 2) ? 8'd2 : (t == 2) ? 8'h80 : 8'($urandom);
      expct = int'($signed(a)) * int'($signed(b));
      r2_multiplicand = a; r2_multiplier = b;
      r4_multiplicand = a; r4_multiplier = b;
      count_array_digits();
      // Upper operand bits are random garbage that the 8-bit range ignores.
      seq_multiply({8'($urandom), a}, {8'($urandom), b}, RANGE_8, (t % 40) == 5);
      checks += 3;
      if (int'($signed(r2_product)) != expct) begin failures++; $display("radix-2 %0d", $signed(r2_product)); end
      if (int'($signed(r4_product)) != expct) begin failures++; $display("radix-4 %0d", $signed(r4_product)); end
      if (seq_product !== 32'(expct)) failures++;
    end
    set_range(RANGE_4);
    for (int t = 0; t < 200; t++) seq_multiply(16'($urandom), 16'($urandom), RANGE_4, (t % 50) == 7);
    set_range(RANGE_12);
    for (int t = 0; t < 200; t++) seq_multiply(16'($urandom), 16'($urandom), RANGE_12, (t % 50) == 7);
    set_range(RANGE_16);
    seq_multiply(16'h8000, 16'h8000, RANGE_16, 1'b0);
    seq_multiply(16'h8000, 16'h7FFF, RANGE_16, 1'b0);
    for (int t = 0; t < 300; t++) seq_multiply(16'($urandom), 16'($urandom), RANGE_16, (t % 50) == 7);

    $display("seq: add=%0d sub=%0d shift-only=%0d refused cfg writes=%0d",
             n_add, n_sub, n_skip, n_blocked);
    $display("seq ranges 4/8/12/16: %0d %0d %0d %0d", n_range[0], n_range[1], n_range[2], n_range[3]);
    $display("radix-2 digits 0/+1/-1: %0d %0d %0d", n_r2[0], n_r2[1], n_r2[2]);
    $display("radix-4 digits 0(000)/0(111)/+1/-1/+2/-2: %0d %0d %0d %0d %0d %0d",
             n_r4[0], n_r4[1], n_r4[2], n_r4[3], n_r4[4], n_r4[5]);
    if (n_add == 0 || n_sub == 0 || n_skip == 0 || n_blocked == 0) failures++;
    foreach (n_range[i]) if (n_range[i] == 0) failures++;
    foreach (n_r2[i]) if (n_r2[i] == 0) failures++;
    foreach (n_r4[i]) if (n_r4[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
