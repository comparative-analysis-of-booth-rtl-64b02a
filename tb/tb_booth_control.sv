// tb_booth_control: self-checking test of the Booth control block.
// The test bench models the Q / Q-1 register and the down counter around
// the controller, starts multiplications with random multipliers and
// iteration counts, and records the sequence of add / sub / shift commands.
// It is compared with the sequence the radix-2 recoding rule gives for that
// multiplier (01 -> add then shift, 10 -> subtract then shift, 00 / 11 ->
// shift), and the cycle count from go to done with 1 + R + (adds + subs).
module tb_booth_control;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic q0, qm1, cnt_zero;
  logic load, zero, add, sub, shift, dc, idle, done;
  logic [N-1:0] qm;      // model of Q
  logic         qm1m;    // model of Q-1
  int unsigned  cnt;     // model of the counter
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_skip = 0;

  booth_control dut (.*);

  assign q0 = qm[0];
  assign qm1 = qm1m;
  assign cnt_zero = (cnt == 0);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Datapath model: what the Q register and counter do with the commands.
  logic [N-1:0] next_mult;
  int unsigned  next_r;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      qm   <= '0;
      qm1m <= 1'b0;
      cnt  <= 0;
    end else if (load) begin
      qm   <= next_mult;
      qm1m <= 1'b0;
      cnt  <= next_r - 1;
    end else begin
      if (shift) begin
        qm   <= {1'($urandom), qm[N-1:1]};
        qm1m <= qm[0];
      end
      if (dc) cnt <= cnt - 1;
    end
  end

  // 0 = shift, 1 = add, 2 = sub
  int exp_ops[$], got_ops[$];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      int unsigned r, cycles, k;
      logic prev;
      r = 4 * $urandom_range(1, 4);
      next_mult = (t < 3) ? N'(t == 0 ? 16'h0000 : t == 1 ? 16'hFFFF : 16'h5555)
                          : N'($urandom);
      next_r = r;
      exp_ops.delete(); got_ops.delete();
      prev = 1'b0; k = 0;
      for (int i = 0; i < int'(r); i++) begin
        if ({next_mult[i], prev} == 2'b01) begin exp_ops.push_back(1); k++; end
        if ({next_mult[i], prev} == 2'b10) begin exp_ops.push_back(2); k++; end
        exp_ops.push_back(0);
        prev = next_mult[i];
      end
      checks++;
      if (!idle) begin failures++; $display("not idle before go"); end
      go = 1'b1;
      #1;
      checks++;
      if (!(load && zero)) begin failures++; $display("go did not load"); end
      @(posedge clk); #1 go = 1'b0;
      cycles = 1;
      while (!done && cycles < 100) begin
        if (idle) begin failures++; $display("idle while busy"); break; end
        if (add)   got_ops.push_back(1);
        if (sub)   got_ops.push_back(2);
        if (shift) got_ops.push_back(0);
        if (add && !shift) n_add++;
        if (sub && !shift) n_sub++;
        if (shift && !dut.state[1]) n_skip++;
        @(posedge clk); #1;
        cycles++;
      end
      checks++;
      if (got_ops != exp_ops) begin
        failures++;
        $display("op sequence mismatch for %h r=%0d: %p vs %p", next_mult, r, got_ops, exp_ops);
      end
      checks++;
      if (cycles != 1 + r + k + 0 || !idle) begin
        failures++;
        $display("latency %0d expected %0d (r=%0d k=%0d)", cycles, 1 + r + k, r, k);
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
    if (n_add == 0 || n_sub == 0 || n_skip == 0) failures++;
    $display("adds=%0d subs=%0d shift-only steps=%0d", n_add, n_sub, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
