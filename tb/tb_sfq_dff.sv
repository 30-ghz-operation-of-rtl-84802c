// Self-checking testbench of the delay flip-flop: a random pulse stream must come
// out unchanged and exactly one clock later.
module tb_sfq_dff;
  logic clk = 1'b0, rst_n = 1'b0, d_i = 1'b0, q_o;
  int checks = 0, failures = 0;
  logic prev;

  sfq_dff dut (.*);
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
      d_i = $urandom_range(0, 1);
      prev = d_i;
      @(posedge clk);
      #1;
      checks++;
      if (q_o !== prev) begin
        failures++;
        $display("FAIL d=%b q=%b", prev, q_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
