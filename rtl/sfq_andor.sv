// Dynamically reconfigurable clocked AND/OR gate.
//
// The gate has two data inputs, a clock, and two control inputs that switch its
// function: a pulse on `set_to_or_i` puts it into OR mode, a pulse on
// `set_to_and_i` back into AND mode. On each clock it emits a pulse on `dout_o`
// if, in the current mode, the data pulses it collected since the last clock
// satisfy the function (AND: both a and b; OR: a or b).
//
// Timing, in cycles of `clk` (a pulse is one cycle high):
//   * a Set_to_OR pulse in cycle t is seen by the evaluation at the end of cycle t;
//   * a Set_to_AND pulse in cycle t takes effect after that evaluation, so it acts
//     like a Set_to_AND pulse that arrives with the clock.
// The ALU drives `set_to_and_i` with the clock (tied high), so OR mode lasts for
// exactly one evaluation unless Set_to_OR is pulsed again; this is what lets the
// gate compute the carry c(i+1) = c(i) ? a|b : a&b of a bit-serial adder.
// If neither control pulses, the mode is kept. `rst_n` (synchronous, active low)
// selects AND mode and clears the output.
module sfq_andor (
  input  logic clk,
  input  logic rst_n,
  input  logic a_i,
  input  logic b_i,
  input  logic set_to_or_i,
  input  logic set_to_and_i,
  output logic dout_o,
  output logic or_mode_o
);

  logic or_mode_q;
  logic or_mode_eff;

  assign or_mode_eff = or_mode_q | set_to_or_i;
  assign or_mode_o   = or_mode_eff;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      or_mode_q <= 1'b0;
      dout_o    <= 1'b0;
    end else begin
      dout_o    <= or_mode_eff ? (a_i | b_i) : (a_i & b_i);
      or_mode_q <= set_to_and_i ? 1'b0 : or_mode_eff;
    end
  end

endmodule
