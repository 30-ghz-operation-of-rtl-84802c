// Bit-serial adder built around the dynamically reconfigurable AND/OR gate.
//
// Operands enter LSB first, one bit per clock, on `a_i` and `b_i`. Two gates work
// on each bit pair in parallel (second pipeline stage):
//   * a clocked XOR forms the propagate bit p = a ^ b;
//   * the AND/OR gate forms the carry out, c(i+1) = c(i) ? (a | b) : (a & b). The
//     gate returns to AND mode on every clock; a carry pulse fed back to its
//     Set_to_OR input switches it to OR mode for the next bit.
// A DFF delays the carry by one bit and a second clocked XOR (third stage) adds
// it to the next propagate bit: sum(i) = p(i) ^ c(i).
//
// The carry loop is closed outside this module so that the ALU can gate it:
//   gate_o      AND/OR result of the current bit (the raw carry out)
//   carry_i     carry that enters the DFF (gate_o, or gate_o gated by an NDRO)
//   set_to_or_i Set_to_OR pulses (carry feedback merged with any external pulse)
//   carry_q_o   DFF output: carry into the bit now in the third stage
//   sum_o       sum bit
// With carry_i = gate_o and set_to_or_i = gate_o the module is a plain adder: a bit entering in cycle t
// leaves `sum_o` in cycle t+2 (two clocked stages here; the ALU adds a third in
// front).
module bit_serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic a_i,
  input  logic b_i,
  input  logic set_to_or_i,
  input  logic carry_i,
  output logic gate_o,
  output logic carry_q_o,
  output logic sum_o
);

  logic prop;

  sfq_andor u_andor (
    .clk          (clk),
    .rst_n        (rst_n),
    .a_i          (a_i),
    .b_i          (b_i),
    .set_to_or_i  (set_to_or_i),
    .set_to_and_i (1'b1),         // the clock resets the gate to AND mode
    .dout_o       (gate_o),
    .or_mode_o    ()
  );

  sfq_xor u_xor_prop (
    .clk   (clk),
    .rst_n (rst_n),
    .a_i   (a_i),
    .b_i   (b_i),
    .q_o   (prop)
  );

  sfq_dff u_dff (
    .clk   (clk),
    .rst_n (rst_n),
    .d_i   (carry_i),
    .q_o   (carry_q_o)
  );

  sfq_xor u_xor_sum (
    .clk   (clk),
    .rst_n (rst_n),
    .a_i   (prop),
    .b_i   (carry_q_o),
    .q_o   (sum_o)
  );

endmodule
