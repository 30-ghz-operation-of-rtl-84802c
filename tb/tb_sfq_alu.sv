// End-to-end self-checking testbench of the bit-serial SFQ ALU.
//
// For each function the testbench resets the NDROs, applies the function's Set
// pulses (sfq_alu_pkg::table1_mask), adds the Set3 pulses the function needs,
// streams two operands LSB first and compares every result bit, in the exact
// clock cycle it is due (3 clocks after its operand bits), with a reference
// computed here with ordinary integer arithmetic. It runs the two measured
// examples (01100 + 00101 = 10001 and 01100 ^ 00101 = 01001, 5 bits), then random
// operands of 1..24 bits in all six functions with random function order, so that
// every reconfiguration path is crossed. It also counts how often each mechanism
// of the datapath fired (operand inversion, carry feedback into OR mode, Set3 OR
// mode, NDRO4 carry pass, NDRO5 and NDRO6 output branches, reconfiguration) and
// counts a failure for any that never did.
module tb_sfq_alu;
  import sfq_alu_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      a_i = 1'b0, b_i = 1'b0;
  set_mask_t set_i = '0;
  logic      ndro_reset_i = 1'b0;
  logic      dout_o;

  int checks = 0;
  int failures = 0;

  sfq_alu dut (.*);

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled on every clock.
  int n_invert, n_feedback, n_set3_or, n_carry_pass, n_out5, n_out6, n_reconf;
  int n_fn [6];
  always @(posedge clk) if (rst_n) begin
    if (dut.inv_a || dut.inv_b) n_invert++;
    if (dut.carry_fb)           n_feedback++;
    if (set_i[3])               n_set3_or++;
    if (dut.carry)              n_carry_pass++;
    if (dut.out5)               n_out5++;
    if (dut.out6)               n_out6++;
    if (ndro_reset_i)           n_reconf++;
  end

  // Drive values just after the rising edge so the DUT samples them cleanly.
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic configure(alu_func_e fn);
    ndro_reset_i = 1'b1;
    tick();
    ndro_reset_i = 1'b0;
    repeat (4) tick();                 // let the old function drain
    set_i = table1_mask(fn);
    set_i[3] = 1'b0;                   // Set3 is applied with the data below
    tick();
    set_i = '0;
    repeat (2) tick();                 // inverted idle input reaches stage 2
    if (set3_carry_in(fn)) begin
      set_i[3] = 1'b1;                 // carry-in for two's-complement subtraction
      tick();
      set_i[3] = 1'b0;
    end
    repeat (3) tick();
  endtask

  function automatic logic [31:0] reference(alu_func_e fn, logic [31:0] a,
                                            logic [31:0] b);
    unique case (fn)
      FN_ADD:  return a + b;
      FN_SUB1: return a - b;
      FN_SUB2: return b - a;
      FN_AND:  return a & b;
      FN_OR:   return a | b;
      default: return a ^ b;
    endcase
  endfunction

  // Stream an n-bit operand pair and check n+1 result bits (bit n is the carry out
  // for ADD and zero for the bitwise functions; SUB checks n bits only).
  task automatic run_op(alu_func_e fn, logic [31:0] a, logic [31:0] b, int n);
    logic [31:0] exp_r;
    logic [31:0] got;
    int nchk;
    exp_r = reference(fn, a, b);
    nchk  = (fn == FN_SUB1 || fn == FN_SUB2) ? n : n + 1;
    got   = '0;
    n_fn[fn]++;
    for (int t = 0; t < n + PIPE_STAGES + 1; t++) begin
      a_i = (t < n) ? a[t] : 1'b0;
      b_i = (t < n) ? b[t] : 1'b0;
      // Set3 enters stage 2 directly: its pulse for bit k follows that bit by a clock
      set_i[3] = set3_every_bit(fn) && (t >= 1) && (t <= n);
      // the result bit of operand bit k is on dout_o in the cycle of bit k+3
      if (t >= PIPE_STAGES && t - PIPE_STAGES < nchk) begin
        got[t - PIPE_STAGES] = dout_o;
        checks++;
        if (dout_o !== exp_r[t - PIPE_STAGES]) begin
          failures++;
          $display("FAIL %s n=%0d a=%h b=%h bit %0d: got %b exp %b", fn.name(), n, a, b,
                   t - PIPE_STAGES, dout_o, exp_r[t - PIPE_STAGES]);
        end
      end
      tick();
    end
    set_i[3] = 1'b0;
  endtask

  function automatic logic [31:0] mask_n(int n);
    return (n >= 32) ? '1 : ((32'd1 << n) - 1);
  endfunction

  initial begin
    alu_func_e fn;
    int n;
    logic [31:0] a, b;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();

    // The two measured examples: A = 01100, B = 00101, 5 bits, LSB first.
    configure(FN_ADD);
    run_op(FN_ADD, 32'b01100, 32'b00101, 5);   // 10001
    configure(FN_XOR);
    run_op(FN_XOR, 32'b01100, 32'b00101, 5);   // 01001

    // Every function once more with fixed operands, then random ones.
    for (int f = 0; f < 6; f++) begin
      fn = alu_func_e'(f);
      configure(fn);
      run_op(fn, 32'hB5, 32'h6E, 8);
      // a negative difference borrows from the following word: new carry-in first
      if (set3_carry_in(fn)) configure(fn);
      run_op(fn, 32'h6E, 32'hB5, 8);
    end
    for (int i = 0; i < 240; i++) begin
      fn = alu_func_e'($urandom_range(0, 5));
      n  = $urandom_range(1, 24);
      a  = $urandom() & mask_n(n);
      b  = $urandom() & mask_n(n);
      configure(fn);
      // one or two words per configuration; ADD and the bitwise functions can
      // stream more words after one idle bit, subtraction gets one word
      run_op(fn, a, b, n);
      if (!set3_carry_in(fn)) begin
        a = $urandom() & mask_n(n);
        b = $urandom() & mask_n(n);
        run_op(fn, a, b, n);
      end
    end

    // Every mechanism must have fired at least once.
    checks++; if (n_invert == 0)     begin failures++; $display("no operand inversion"); end
    checks++; if (n_feedback == 0)   begin failures++; $display("no carry feedback"); end
    checks++; if (n_set3_or == 0)    begin failures++; $display("no Set3 OR mode"); end
    checks++; if (n_carry_pass == 0) begin failures++; $display("no NDRO4 carry pass"); end
    checks++; if (n_out5 == 0)       begin failures++; $display("no NDRO5 output"); end
    checks++; if (n_out6 == 0)       begin failures++; $display("no NDRO6 output"); end
    checks++; if (n_reconf == 0)     begin failures++; $display("no reconfiguration"); end
    for (int f = 0; f < 6; f++) begin
      checks++;
      if (n_fn[f] == 0) begin failures++; $display("function %0d never ran", f); end
    end
    $display("mechanisms: invert=%0d feedback=%0d set3=%0d carry=%0d out5=%0d out6=%0d reconf=%0d",
             n_invert, n_feedback, n_set3_or, n_carry_pass, n_out5, n_out6, n_reconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
