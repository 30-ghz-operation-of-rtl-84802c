// Non-destructive read-out (NDRO) gate.
//
// An NDRO stores one bit. A pulse on `set_i` stores a 1, a pulse on `reset_i`
// stores a 0, and every pulse on the read input `read_i` is copied to `out_o`
// while the stored bit is 1; reading does not disturb the stored bit. In the ALU
// five NDROs hold the function selection: two are read by the clock (and so emit a
// pulse every cycle while set), three are read by data pulses and act as gates.
//
// Pulses are modelled as one-cycle-high signals of the system clock `clk`. The
// stored bit changes at the clock edge after a set/reset pulse; `out_o` follows
// `read_i` in the same cycle (the read path is not clocked by `clk`). If set and
// reset arrive in the same cycle the set wins, matching the rule that a
// reconfiguration resets all NDROs first and then applies the new set pulses.
// `rst_n` (synchronous, active low) only gives the simulation a defined start.
module sfq_ndro (
  input  logic clk,
  input  logic rst_n,
  input  logic set_i,
  input  logic reset_i,
  input  logic read_i,
  output logic out_o,
  output logic state_o
);

  logic state_q;

  always_ff @(posedge clk) begin
    if (!rst_n)       state_q <= 1'b0;
    else if (set_i)   state_q <= 1'b1;
    else if (reset_i) state_q <= 1'b0;
  end

  assign out_o   = state_q & read_i;
  assign state_o = state_q;

endmodule
