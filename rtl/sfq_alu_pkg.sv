// Shared types and constants of the bit-serial SFQ ALU.
//
// The ALU is configured by six control pulses, Set1..Set6. Five of them set the
// state of a non-destructive read-out (NDRO) gate; Set3 is fed straight into the
// Set_to_OR input of the reconfigurable AND/OR gate. `set_mask_t` carries the six
// lines with bit k standing for Set k. `table1_mask` returns, for each function,
// the NDRO settings of the function table (ADD: Set4+Set6, SUB1: Set2+Set4+Set6,
// SUB2: Set1+Set4+Set6, AND: Set4+Set5, OR: Set3+Set4+Set5, XOR: Set6).
//
// Two driving rules are this design's own reading of how the six lines are used
// and are exposed as helper functions for the driver (see sfq_alu.sv):
//   * OR needs the Set3 line pulsed on every data bit, because the clock returns the
//     AND/OR gate to AND mode after every evaluation (the pulse for operand bit k
//     comes one clock after bit k, since Set3 acts in the second stage);
//   * SUB1/SUB2 need one Set3 pulse in the idle time before the operands: it plants
//     the "+1" of the two's-complement subtraction in the carry loop.
package sfq_alu_pkg;

  // Number of clocked gate stages between an operand bit and its result bit.
  localparam int unsigned PIPE_STAGES = 3;

  typedef enum logic [2:0] {
    FN_ADD  = 3'd0,  // A + B
    FN_SUB1 = 3'd1,  // A - B
    FN_SUB2 = 3'd2,  // B - A
    FN_AND  = 3'd3,  // A & B
    FN_OR   = 3'd4,  // A | B
    FN_XOR  = 3'd5   // A ^ B
  } alu_func_e;

  // Bit k is control line Set k (k = 1..6).
  typedef logic [6:1] set_mask_t;

  // Control lines pulsed once after the NDRO reset to select a function.
  function automatic set_mask_t table1_mask(alu_func_e fn);
    set_mask_t m;
    m = '0;
    unique case (fn)
      FN_ADD:  begin m[4] = 1'b1; m[6] = 1'b1; end
      FN_SUB1: begin m[2] = 1'b1; m[4] = 1'b1; m[6] = 1'b1; end
      FN_SUB2: begin m[1] = 1'b1; m[4] = 1'b1; m[6] = 1'b1; end
      FN_AND:  begin m[4] = 1'b1; m[5] = 1'b1; end
      FN_OR:   begin m[3] = 1'b1; m[4] = 1'b1; m[5] = 1'b1; end
      FN_XOR:  begin m[6] = 1'b1; end
      default: m = '0;
    endcase
    return m;
  endfunction

  // True for the function that keeps Set3 pulsing on every operand bit.
  function automatic logic set3_every_bit(alu_func_e fn);
    return fn == FN_OR;
  endfunction

  // True for the functions that need a single Set3 pulse as carry-in.
  function automatic logic set3_carry_in(alu_func_e fn);
    return fn == FN_SUB1 || fn == FN_SUB2;
  endfunction

endpackage
