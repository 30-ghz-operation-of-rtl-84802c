// Clocked exclusive-OR gate.
//
// An SFQ XOR collects the pulses that arrive on its two inputs between two clock
// pulses and, on the clock, emits a pulse if exactly one input had a pulse. Here a
// pulse is a one-cycle-high level, so the gate is a register loaded with a ^ b on
// each rising edge of `clk`: one clock of latency. `rst_n` (synchronous, active
// low) clears the output for simulation.
module sfq_xor (
  input  logic clk,
  input  logic rst_n,
  input  logic a_i,
  input  logic b_i,
  output logic q_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) q_o <= 1'b0;
    else        q_o <= a_i ^ b_i;
  end

endmodule
