// Self-checking testbench of the bit-serial adder. The carry loop is closed as a
// plain adder (DFF and Set_to_OR both fed by the AND/OR result). Random n-bit
// operands (n = 1..30) go in LSB first with idle bits between words; each of the
// n+1 sum bits must appear exactly two clocks after its operand bits and match
// the integer sum computed here.
module tb_bit_serial_adder;
  logic clk = 1'b0, rst_n = 1'b0, a_i = 1'b0, b_i = 1'b0;
  logic gate_o, carry_q_o, sum_o;
  int checks = 0, failures = 0;
  int n_carry = 0;

  bit_serial_adder dut (
    .clk(clk), .rst_n(rst_n), .a_i(a_i), .b_i(b_i),
    .set_to_or_i(gate_o), .carry_i(gate_o),
    .gate_o(gate_o), .carry_q_o(carry_q_o), .sum_o(sum_o)
  );
  always #5 clk = ~clk;
  always @(posedge clk) if (carry_q_o) n_carry++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, s;
    int n;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 500; w++) begin
      n = $urandom_range(1, 30);
      a = $urandom() & ((32'd1 << n) - 1);
      b = $urandom() & ((32'd1 << n) - 1);
      if (w == 0) begin n = 30; a = 32'h3FFF_FFFF; b = 32'd1; end  // full carry ripple
      s = a + b;
      for (int t = 0; t < n + 3; t++) begin
        a_i = (t < n) ? a[t] : 1'b0;
        b_i = (t < n) ? b[t] : 1'b0;
        if (t >= 2 && t - 2 <= n) begin
          checks++;
          if (sum_o !== s[t - 2]) begin
            failures++;
            $display("FAIL n=%0d a=%h b=%h bit %0d got %b", n, a, b, t - 2, sum_o);
          end
        end
        @(posedge clk);
        #1;
      end
    end
    checks++;
    if (n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
