// Self-checking testbench of the clocked XOR gate: random input pairs; each output
// must equal the XOR of the inputs of the previous clock (one clock of latency).
module tb_sfq_xor;
  logic clk = 1'b0, rst_n = 1'b0, a_i = 1'b0, b_i = 1'b0, q_o;
  int checks = 0, failures = 0;
  logic exp_q;

  sfq_xor dut (.*);
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
    checks++;
    if (q_o !== 1'b0) failures++;
    for (int i = 0; i < 1000; i++) begin
      a_i = $urandom_range(0, 1);
      b_i = $urandom_range(0, 1);
      exp_q = (a_i != b_i);
      @(posedge clk);
      #1;
      checks++;
      if (q_o !== exp_q) begin
        failures++;
        $display("FAIL a=%b b=%b q=%b", a_i, b_i, q_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
