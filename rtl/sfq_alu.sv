// Bit-serial single-flux-quantum ALU with a dynamically reconfigurable AND/OR gate.
//
// Six functions, A+B, A-B, B-A, A&B, A|B and A^B, share one small datapath of
// clocked gates in three pipeline stages. Operands enter LSB first, one bit per
// clock, on `a_i` and `b_i`; the result leaves LSB first on `dout_o`, each bit
// exactly PIPE_STAGES = 3 clocks after the operand bits it comes from.
//
//   stage 1  two XOR gates, each with an NDRO read by the clock on its second
//            input: a set NDRO (Set1 for A, Set2 for B) inverts that operand.
//   stage 2  the AND/OR gate (carry, or the AND/OR result) and an XOR (a ^ b).
//            NDRO4 (Set4), read by the AND/OR output, passes that output on to
//            the DFF and back to the gate's Set_to_OR input, which puts the gate
//            into OR mode for the next bit; the clock puts it back into AND mode.
//            Set3 drives Set_to_OR directly, merged with the feedback.
//   stage 3  the DFF (carry delayed by one bit) and an XOR (sum = p ^ carry).
//            NDRO5 (Set5), read by the DFF output, sends the AND/OR result to
//            `dout_o`; NDRO6 (Set6), read by the sum, sends the sum to `dout_o`.
//
// Control: a pulse on `ndro_reset_i` clears all five NDROs; afterwards one cycle
// with the function's Set pulses on `set_i` (bit k = Set k, see sfq_alu_pkg)
// selects the function. Pulses are one cycle high. Function settings:
//   ADD  Set4 Set6          SUB1 (A-B) Set2 Set4 Set6   SUB2 (B-A) Set1 Set4 Set6
//   AND  Set4 Set5          OR  Set3 Set4 Set5          XOR Set6
//
// Choices of this design, beyond the block diagram:
//   * The AND/OR result reaches the DFF only through NDRO4, and the Set_to_OR
//     feedback is taken only while NDRO6 (sum output) is set. Without the first,
//     XOR (no Set4) would fold a&b of the previous bit into its result; without
//     the second, AND and OR (both with Set4, like ADD) would chain carries.
//   * Set3 is not stored: OR mode holds for one clock per Set3 pulse, so OR keeps
//     Set3 pulsing on every operand bit. Set3 acts in stage 2, so the pulse for
//     operand bit k is applied one clock after bit k is on a_i/b_i.
//   * Subtraction is A + ~B + 1. The "+1" comes from one Set3 pulse during the
//     idle time after configuration and before the operands: the inverted idle
//     input reads as all ones, so the planted carry circulates until the LSB.
//     Streams are then exact two's-complement differences; a negative difference
//     borrows from the next word, so each subtraction word gets its own carry-in
//     (reconfigure, or give Set3 again while the inputs are idle).
//   * Results are exact for zero-extended operands: a word's carry out appears as
//     the result bit after its MSB, so words should be separated by one idle bit.
// An assertion flags Set pulses (other than Set3) given with the NDRO reset.
// `rst_n` (synchronous, active low) exists only to start simulation in a known
// state; the clock output of the block diagram is the input clock and is not
// repeated as a port.
module sfq_alu
  import sfq_alu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      a_i,
  input  logic      b_i,
  input  set_mask_t set_i,
  input  logic      ndro_reset_i,
  output logic      dout_o
);

  logic inv_a, inv_b;        // NDRO1/NDRO2 outputs (read by the clock)
  logic xa, xb;              // stage-1 outputs
  logic gate_out;            // AND/OR gate result
  logic carry;               // AND/OR result passed by NDRO4
  logic carry_fb;            // Set_to_OR feedback
  logic set_to_or;
  logic carry_q;             // DFF output
  logic sum;                 // stage-3 XOR output
  logic out5, out6;          // NDRO5/NDRO6 outputs
  logic sum_sel;             // NDRO6 state

  // ---------------- stage 1: conditional inversion ----------------
  sfq_ndro u_ndro1 (
    .clk(clk), .rst_n(rst_n), .set_i(set_i[1]), .reset_i(ndro_reset_i),
    .read_i(1'b1), .out_o(inv_a), .state_o()
  );
  sfq_ndro u_ndro2 (
    .clk(clk), .rst_n(rst_n), .set_i(set_i[2]), .reset_i(ndro_reset_i),
    .read_i(1'b1), .out_o(inv_b), .state_o()
  );
  sfq_xor u_xor_a (.clk(clk), .rst_n(rst_n), .a_i(a_i), .b_i(inv_a), .q_o(xa));
  sfq_xor u_xor_b (.clk(clk), .rst_n(rst_n), .a_i(b_i), .b_i(inv_b), .q_o(xb));

  // ---------------- stages 2 and 3: bit-serial adder ----------------
  assign set_to_or = set_i[3] | carry_fb;

  bit_serial_adder u_adder (
    .clk         (clk),
    .rst_n       (rst_n),
    .a_i         (xa),
    .b_i         (xb),
    .set_to_or_i (set_to_or),
    .carry_i     (carry),
    .gate_o      (gate_out),
    .carry_q_o   (carry_q),
    .sum_o       (sum)
  );

  sfq_ndro u_ndro4 (
    .clk(clk), .rst_n(rst_n), .set_i(set_i[4]), .reset_i(ndro_reset_i),
    .read_i(gate_out), .out_o(carry), .state_o()
  );
  assign carry_fb = carry & sum_sel;

  // ---------------- output selection ----------------
  sfq_ndro u_ndro5 (
    .clk(clk), .rst_n(rst_n), .set_i(set_i[5]), .reset_i(ndro_reset_i),
    .read_i(carry_q), .out_o(out5), .state_o()
  );
  sfq_ndro u_ndro6 (
    .clk(clk), .rst_n(rst_n), .set_i(set_i[6]), .reset_i(ndro_reset_i),
    .read_i(sum), .out_o(out6), .state_o(sum_sel)
  );

  // Merger of the two output branches.
  assign dout_o = out5 | out6;

  // Reconfiguration rule: the NDRO reset comes before, not with, the pulses that
  // set NDROs (Set3 sets no NDRO and is exempt).
  a_reset_before_set: assert property (
    @(posedge clk) disable iff (!rst_n)
      ndro_reset_i |-> (set_i & 6'b111_011) == '0
  ) else $error("Set pulse in the same cycle as the NDRO reset");

endmodule
