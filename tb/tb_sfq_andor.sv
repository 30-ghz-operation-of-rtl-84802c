// Self-checking testbench of the reconfigurable AND/OR gate. Random data and
// control pulses are compared with a reference mode flag kept here: Set_to_OR
// acts on the evaluation of the same clock, Set_to_AND after it, and with neither
// the mode is kept. A second phase ties Set_to_AND high, as the ALU does, and
// checks that OR mode then lasts one evaluation per Set_to_OR pulse.
module tb_sfq_andor;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a_i = 1'b0, b_i = 1'b0, set_to_or_i = 1'b0, set_to_and_i = 1'b0;
  logic dout_o, or_mode_o;
  int checks = 0, failures = 0;
  logic ref_mode, eff, exp_out;
  int n_or = 0, n_and = 0;

  sfq_andor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ref_mode = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      a_i = $urandom_range(0, 1);
      b_i = $urandom_range(0, 1);
      set_to_or_i  = ($urandom_range(0, 3) == 0);
      set_to_and_i = (i >= 1500) ? 1'b1 : ($urandom_range(0, 3) == 0);
      eff = ref_mode | set_to_or_i;
      exp_out = eff ? (a_i | b_i) : (a_i & b_i);
      if (eff) n_or++; else n_and++;
      @(posedge clk);
      ref_mode = set_to_and_i ? 1'b0 : eff;
      #1;
      checks++;
      if (dout_o !== exp_out) begin
        failures++;
        $display("FAIL i=%0d mode=%b a=%b b=%b out=%b", i, eff, a_i, b_i, dout_o);
      end
    end
    checks++;
    if (n_or == 0 || n_and == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
