// booth_counter: down counter of remaining Booth iterations.
//
// A CW-bit binary down counter (4 bits, as in the document, enough for 16
// iterations). `load` presets it to `init`, which is the number of
// iterations minus one; `dc` decrements it by one. `zero` is high while the
// count is zero and tells the control block that the shift now being done is
// the last one. Load has priority over dc. Synchronous active-low reset.
module booth_counter #(
  parameter int unsigned CW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          dc,
  input  logic [CW-1:0] init,
  output logic [CW-1:0] count,
  output logic          zero
);

  always_ff @(posedge clk) begin
    if (!rst_n)    count <= '0;
    else if (load) count <= init;
    else if (dc)   count <= count - 1'b1;
  end

  assign zero = (count == '0);

endmodule
