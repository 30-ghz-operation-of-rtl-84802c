// Replays the two measured ALU sequences: after power-up the control pulses are
// given one at a time (ADD: Set4, then Set6; XOR: Set6), then the 5-bit operands
// A = 01100 and B = 00101 stream in LSB first, i.e. in time order A = 0,0,1,1,0
// and B = 1,0,1,0,0. The expected serial outputs, in time order, are 1,0,0,0,1
// (ADD, 10001) and 1,0,0,1,0 (XOR, 01001). The testbench checks each output bit
// in its cycle (3 clocks after the operand bit) and that dout stays low at all
// other times of the run, so no stray pulse leaves the ALU.
module tb_sfq_alu_measured;
  import sfq_alu_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      a_i = 1'b0, b_i = 1'b0;
  set_mask_t set_i = '0;
  logic      ndro_reset_i = 1'b0;
  logic      dout_o;
  int checks = 0, failures = 0;

  sfq_alu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic pulse(int k);
    set_i[k] = 1'b1;
    tick();
    set_i[k] = 1'b0;
    repeat (2) tick();
  endtask

  // Stream the measured operands and compare the 5 result bits plus 3 trailing
  // idle bits (which must stay low) against `exp_r` (time order, LSB first).
  task automatic run(string name, logic [7:0] exp_r);
    logic [4:0] a, b;
    a = 5'b01100;
    b = 5'b00101;
    for (int t = 0; t < 8 + PIPE_STAGES; t++) begin
      a_i = (t < 5) ? a[t] : 1'b0;
      b_i = (t < 5) ? b[t] : 1'b0;
      checks++;
      if (t < PIPE_STAGES) begin
        if (dout_o !== 1'b0) begin failures++; $display("%s: early pulse", name); end
      end else if (dout_o !== exp_r[t - PIPE_STAGES]) begin
        failures++;
        $display("%s: bit %0d got %b", name, t - PIPE_STAGES, dout_o);
      end
      tick();
    end
  endtask

  initial begin
    repeat (2) tick();
    rst_n = 1'b1;
    tick();
    pulse(4);
    pulse(6);
    repeat (3) tick();
    run("ADD", 8'b0001_0001);   // 01100 + 00101 = 10001
    ndro_reset_i = 1'b1;
    tick();
    ndro_reset_i = 1'b0;
    repeat (4) tick();
    pulse(6);
    repeat (3) tick();
    run("XOR", 8'b0000_1001);   // 01100 ^ 00101 = 01001
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
