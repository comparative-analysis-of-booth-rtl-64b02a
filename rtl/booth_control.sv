// booth_control: control block Y of the sequential radix-2 Booth multiplier.
//
// A three-state machine that walks the Booth flow: clear A and load the
// operands, then per multiplier bit look at the pair (Q0, Q-1), add or
// subtract M when the pair is 01 or 10, and shift A:Q:Q-1 right by one while
// counting down. The pair rule is the radix-2 recoding table: 00 and 11 shift
// only, 01 adds M, 10 subtracts M.
//
//   IDLE   `idle` high. On `go`: load = 1 (M, Q, counter) and zero = 1 (the
//          ALU writes 0 into A). Next TEST.
//   TEST   pair 01: add = 1, next SHIFT. Pair 10: sub = 1, next SHIFT.
//          Pair 00/11: shift = 1 in this same cycle (no separate add cycle),
//          then as in SHIFT.
//   SHIFT  shift = 1. If the counter is zero this was the last bit: next
//          IDLE and `done` pulses for one cycle. Otherwise dc = 1, next TEST.
//
// Timing: a multiplication of R-bit operands takes 1 + R + (number of add or
// subtract steps) clock cycles from the `go` cycle to the first cycle with
// `idle` high, so it depends on the multiplier value, as the Booth method
// does. The split into a separate add/subtract cycle and shift cycle follows
// the separate add, sub and shift control lines of the datapath; folding a
// shift-only step into the test cycle is this design's choice. The counter
// is loaded with R-1 and the shift done while it reads zero is the last.
module booth_control (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  input  logic q0,
  input  logic qm1,
  input  logic cnt_zero,
  output logic load,
  output logic zero,
  output logic add,
  output logic sub,
  output logic shift,
  output logic dc,
  output logic idle,
  output logic done
);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_TEST  = 2'd1,
    S_SHIFT = 2'd2
  } state_e;

  state_e state, state_nx;
  logic   finish;

  always_comb begin
    state_nx = state;
    load     = 1'b0;
    zero     = 1'b0;
    add      = 1'b0;
    sub      = 1'b0;
    shift    = 1'b0;
    dc       = 1'b0;
    finish   = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (go) begin
          load     = 1'b1;
          zero     = 1'b1;
          state_nx = S_TEST;
        end
      end
      S_TEST: begin
        unique case ({q0, qm1})
          2'b01: begin add = 1'b1; state_nx = S_SHIFT; end
          2'b10: begin sub = 1'b1; state_nx = S_SHIFT; end
          default: begin
            shift = 1'b1;
            if (cnt_zero) begin finish = 1'b1; state_nx = S_IDLE; end
            else          begin dc = 1'b1; state_nx = S_TEST; end
          end
        endcase
      end
      S_SHIFT: begin
        shift = 1'b1;
        if (cnt_zero) begin finish = 1'b1; state_nx = S_IDLE; end
        else          begin dc = 1'b1; state_nx = S_TEST; end
      end
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      state <= state_nx;
      done  <= finish;
    end
  end

  assign idle = (state == S_IDLE);

  // One ALU operation at most per cycle.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot0({zero, add, sub, shift}));

endmodule
